// tb_inv_cell -- exhaustive check of the inverter cell against ~vin.
module tb_inv_cell;
  logic vin, vout;
  int checks = 0, failures = 0;

  inv_cell dut (.vin(vin), .vout(vout));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      vin = i[0];
      #1;
      checks++;
      if (vout !== (i == 0)) begin
        failures++;
        $display("FAIL vin=%0b vout=%0b", vin, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
