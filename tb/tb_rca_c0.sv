// tb_rca_c0 -- exhaustive check of the carry-in-0 ripple adder at the
// widths the adder uses (2, 3, 4, 5): s must equal a + b with its carry.
module tb_rca_c0;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2;  logic [2:0] s2;
  logic [2:0] a3, b3;  logic [3:0] s3;
  logic [3:0] a4, b4;  logic [4:0] s4;
  logic [4:0] a5, b5;  logic [5:0] s5;

  rca_c0              dut2 (.a(a2), .b(b2), .s(s2));
  rca_c0 #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .s(s3));
  rca_c0 #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .s(s4));
  rca_c0 #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .s(s5));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int w, int unsigned x, int unsigned y, int unsigned s);
    checks++;
    if (s != x + y) begin
      failures++;
      $display("FAIL width %0d: %0d + %0d gave %0d", w, x, y, s);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      {a4, b4} = 8'(i);
      {a3, b3} = 6'(i);
      {a2, b2} = 4'(i);
      #1;
      check(5, a5, b5, s5);
      if (i < 256) check(4, a4, b4, s4);
      if (i < 64)  check(3, a3, b3, s3);
      if (i < 16)  check(2, a2, b2, s2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
