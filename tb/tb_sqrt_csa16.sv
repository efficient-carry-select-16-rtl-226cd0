// tb_sqrt_csa16 -- end-to-end test of the 16-bit square-root carry-select
// adder at its default size.
//
// Drives directed corner cases (all-ones plus carry-in, alternating bit
// patterns, every single-bit operand) followed by random operands, and
// compares {cout, sum} with a + b + cin computed in 64-bit integer
// arithmetic. The carry between stages (C1, C3, C6, ...) is checked too,
// through the adder's internal carry vector. For every carry-select stage it counts, from the reference
// arithmetic, how often the stage received a carry (its excess-1 result
// selected) and how often not (its ripple result selected), and how often
// a carry entering the stage passed straight through it (all result bits
// one before the increment). It also counts carry-outs of the whole adder
// and carries that travel from bit 0 to the carry-out. Each of these
// mechanisms must happen at least once.
module tb_sqrt_csa16;
  import csa_pkg::*;

  localparam int unsigned N_RANDOM = 200_000;

  logic [ADDER_W-1:0] a, b, sum;
  logic               cin, cout;

  int checks = 0, failures = 0;
  int sel_bec  [N_STAGES];
  int sel_rca  [N_STAGES];
  int pass_thru[N_STAGES];
  int carry_out_seen = 0, full_ripple = 0;

  sqrt_csa16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [ADDER_W-1:0] x, logic [ADDER_W-1:0] y, logic ci);
    longint unsigned expect_v, got;
    a = x; b = y; cin = ci;
    #1;
    expect_v = longint'(x) + longint'(y) + longint'(ci);
    got      = {cout, sum};
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 20)
        $display("FAIL %h + %h + %0b = %h, expected %h", x, y, ci, got, expect_v);
    end
    // Mechanism bookkeeping from the reference arithmetic only.
    for (int s = 1; s < N_STAGES; s++) begin
      int unsigned lsb = stage_lsb(s);
      int unsigned w   = STAGE_W[s];
      longint unsigned mask_lo = (64'd1 << lsb) - 1;
      longint unsigned mask_st = (64'd1 << w) - 1;
      bit carry_in = 1'(((longint'(x) & mask_lo) + (longint'(y) & mask_lo) + ci) >> lsb);
      longint unsigned raw = ((longint'(x) >> lsb) & mask_st) + ((longint'(y) >> lsb) & mask_st);
      checks++;
      if (dut.carry[s] !== carry_in) begin
        failures++;
        if (failures < 20)
          $display("FAIL carry into stage %0d is %0b, expected %0b (%h + %h + %0b)",
                   s + 1, dut.carry[s], carry_in, x, y, ci);
      end
      if (carry_in) sel_bec[s]++; else sel_rca[s]++;
      if (carry_in && raw == mask_st) pass_thru[s]++;
    end
    if (expect_v[ADDER_W]) carry_out_seen++;
    if (ci && ((longint'(x) + longint'(y)) == 64'hFFFF)) full_ripple++;
  endtask

  initial begin
    foreach (sel_bec[s]) begin sel_bec[s] = 0; sel_rca[s] = 0; pass_thru[s] = 0; end

    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);          // carry from bit 0 all the way to cout
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply(16'hAAAA, 16'h5555, 1'b0);
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'h5555, 16'h5555, 1'b0);
    for (int i = 0; i < ADDER_W; i++) begin
      apply(16'(1) << i, '1, 1'b0);
      apply(16'(1) << i, 16'(1) << i, 1'b0);
      apply('1 >> (ADDER_W - i), 16'd1, 1'b0);
    end
    for (int n = 0; n < N_RANDOM; n++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));

    for (int s = 1; s < N_STAGES; s++) begin
      $display("stage %0d (%0d bits): excess-1 result chosen %0d, ripple result chosen %0d, carry passed through %0d",
               s + 1, STAGE_W[s], sel_bec[s], sel_rca[s], pass_thru[s]);
      if (sel_bec[s] == 0 || sel_rca[s] == 0 || pass_thru[s] == 0) begin
        failures++;
        $display("FAIL stage %0d: a selection mechanism never happened", s + 1);
      end
    end
    $display("carry out of the adder %0d times, carry through all 16 bits %0d times",
             carry_out_seen, full_ripple);
    if (carry_out_seen == 0 || full_ripple == 0) begin
      failures++;
      $display("FAIL carry-out or full-length carry never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
