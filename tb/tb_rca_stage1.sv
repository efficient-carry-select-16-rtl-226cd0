// tb_rca_stage1 -- exhaustive check of the 2-bit first stage:
// {cout, sum} must equal a + b + cin for all 32 input combinations.
module tb_rca_stage1;
  int checks = 0, failures = 0;

  logic [1:0] a, b, sum;
  logic       cin, cout;

  rca_stage1 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {cin, a, b} = 5'(i);
      #1;
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0b -> cout=%0b sum=%0d", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
