// tb_bec -- exhaustive check of the binary to excess-1 converter at every
// width the adder uses (3, 4, 5 and 6 bits): x must equal b + 1 modulo
// 2**WIDTH. The 3-bit instance uses the module's default width.
module tb_bec;
  int checks = 0, failures = 0;

  logic [2:0] b3, x3;
  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  logic [5:0] b6, x6;

  bec              dut3 (.b(b3), .x(x3));
  bec #(.WIDTH(4)) dut4 (.b(b4), .x(x4));
  bec #(.WIDTH(5)) dut5 (.b(b5), .x(x5));
  bec #(.WIDTH(6)) dut6 (.b(b6), .x(x6));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int w, int unsigned bin, int unsigned xout);
    int unsigned expect_x = (bin + 1) % (1 << w);
    checks++;
    if (xout != expect_x) begin
      failures++;
      $display("FAIL width %0d: b=%0d x=%0d expected %0d", w, bin, xout, expect_x);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      b3 = 3'(i); b4 = 4'(i); b5 = 5'(i); b6 = 6'(i);
      #1;
      if (i < 8)  check(3, b3, x3);
      if (i < 16) check(4, b4, x4);
      if (i < 32) check(5, b5, x5);
      check(6, b6, x6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
