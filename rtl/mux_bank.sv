// mux_bank -- 2N:N multiplexer (the "6:3 MUX" for N = 3).
//
// WIDTH 2:1 transmission-gate multiplexers share one select. With sel = 1
// every output takes its in1 bit, with sel = 0 its in0 bit. In a
// carry-select stage in0 is the carry-in 0 result from the ripple adder,
// in1 the carry-in 1 result from the excess-1 converter, and sel is the
// carry arriving from the stage below. The 6:3 size and its build from
// 2:1 cells are published; other widths follow the same pattern.
// Purely combinational.
module mux_bank #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in0,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_mux
    mux2_tg u_mux (.a(in1[i]), .b(in0[i]), .s(sel), .y(y[i]));
  end

endmodule
