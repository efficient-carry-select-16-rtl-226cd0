// tb_mux_bank -- exhaustive check of the 6:3 multiplexer (default width 3):
// with sel = 1 the output must be in1, with sel = 0 it must be in0.
// A 6-bit instance (the widest bank in the adder) gets random vectors.
module tb_mux_bank;
  int checks = 0, failures = 0;

  logic [2:0] in1, in0, y;
  logic       sel;
  logic [5:0] w_in1, w_in0, w_y;
  logic       w_sel;

  mux_bank              dut  (.in1(in1), .in0(in0), .sel(sel), .y(y));
  mux_bank #(.WIDTH(6)) dut6 (.in1(w_in1), .in0(w_in0), .sel(w_sel), .y(w_y));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      {sel, in1, in0} = 7'(i);
      #1;
      checks++;
      if (y !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0b in1=%b in0=%b y=%b", sel, in1, in0, y);
      end
    end
    for (int i = 0; i < 200; i++) begin
      w_in1 = 6'($urandom); w_in0 = 6'($urandom); w_sel = 1'($urandom);
      #1;
      checks++;
      if (w_y !== (w_sel ? w_in1 : w_in0)) begin
        failures++;
        $display("FAIL 6-bit sel=%0b in1=%b in0=%b y=%b", w_sel, w_in1, w_in0, w_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
