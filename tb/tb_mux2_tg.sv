// tb_mux2_tg -- exhaustive check of the 2:1 multiplexer: y = s ? a : b.
module tb_mux2_tg;
  logic a, b, s, y;
  int checks = 0, failures = 0;

  mux2_tg dut (.a(a), .b(b), .s(s), .y(y));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_y;
    for (int i = 0; i < 8; i++) begin
      {s, a, b} = i[2:0];
      #1;
      // truth table written out: s selects a, otherwise b
      case (i[2:0])
        3'b000: expect_y = 0;  3'b001: expect_y = 1;
        3'b010: expect_y = 0;  3'b011: expect_y = 1;
        3'b100: expect_y = 0;  3'b101: expect_y = 0;
        3'b110: expect_y = 1;  default: expect_y = 1;
      endcase
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL s=%0b a=%0b b=%0b y=%0b expected %0b", s, a, b, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
