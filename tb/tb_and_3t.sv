// tb_and_3t -- exhaustive check of the 3-transistor AND cell.
module tb_and_3t;
  logic a, b, and_out;
  int checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b1000;  // index {a,b}

  and_3t dut (.a(a), .b(b), .and_out(and_out));

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
      if (and_out !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b and_out=%0b", a, b, and_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
