// tb_csa_stage -- exhaustive check of the carry-select stage at every
// width the adder uses (2, 3, 4, 5 bits): {cout, sum} must equal
// a + b + cin. Also counts how often the incoming carry picked the
// excess-1 result and how often the ripple result, and fails if either
// path was never exercised.
module tb_csa_stage;
  int checks = 0, failures = 0;
  int sel_bec = 0, sel_rca = 0;

  logic [1:0] a2, b2, s2;  logic c2, co2;
  logic [2:0] a3, b3, s3;  logic c3, co3;
  logic [3:0] a4, b4, s4;  logic c4, co4;
  logic [4:0] a5, b5, s5;  logic c5, co5;

  csa_stage              dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));
  csa_stage #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .cin(c3), .sum(s3), .cout(co3));
  csa_stage #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  csa_stage #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(c5), .sum(s5), .cout(co5));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int w, int unsigned x, int unsigned y, bit ci, int unsigned got);
    checks++;
    if (got != x + y + ci) begin
      failures++;
      $display("FAIL width %0d: %0d + %0d + %0b gave %0d", w, x, y, ci, got);
    end
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) begin
      {c5, a5, b5} = 11'(i);
      {c4, a4, b4} = 9'(i);
      {c3, a3, b3} = 7'(i);
      {c2, a2, b2} = 5'(i);
      #1;
      check(5, a5, b5, c5, {co5, s5});
      if (c5) sel_bec++; else sel_rca++;
      if (i < 512) check(4, a4, b4, c4, {co4, s4});
      if (i < 128) check(3, a3, b3, c3, {co3, s3});
      if (i < 32)  check(2, a2, b2, c2, {co2, s2});
    end
    if (sel_bec == 0 || sel_rca == 0) begin
      failures++;
      $display("FAIL a selection path was never exercised");
    end
    $display("excess-1 path selected %0d times, ripple path %0d times", sel_bec, sel_rca);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
