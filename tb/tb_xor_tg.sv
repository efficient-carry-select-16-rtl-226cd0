// tb_xor_tg -- exhaustive check of the XOR cell against its truth table.
module tb_xor_tg;
  logic a, b, y;
  int checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b0110;  // index {a,b}

  xor_tg dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = i[1:0];
      #1;
      checks++;
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
