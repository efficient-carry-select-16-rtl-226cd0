// bec -- binary to excess-1 converter: x = b + 1 (modulo 2**WIDTH).
//
// Bit 0 is inverted; every higher bit i is flipped when all bits below it
// are one:  X0 = ~B0,  Xi = Bi ^ (B0 & B1 & ... & Bi-1).
// The AND terms are formed by the three-transistor pass-transistor AND
// cell (and_3t), the variant of the converter that saves transistors over
// one built from conventional AND gates. For the 3-bit converter this is
// one inverter, one AND and two XORs. For wider converters the AND terms
// are chained, each cell adding one more bit to the previous term; that
// chain is this design's own generalisation of the 3-bit circuit.
// A carry-select stage uses the converter in place of a second ripple
// adder with carry-in 1: the carry-in 0 result plus one is the carry-in 1
// result. Purely combinational.
module bec #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);

  // all_ones[i] = B0 & ... & B(i-1); all_ones[1] is B0 itself.
  logic [WIDTH-1:1] all_ones;

  if (WIDTH < 2) begin : g_width_check
    $error("bec: WIDTH must be at least 2");
  end

  inv_cell u_inv0 (.vin(b[0]), .vout(x[0]));

  assign all_ones[1] = b[0];
  xor_tg u_xor1 (.a(b[0]), .b(b[1]), .y(x[1]));

  for (genvar i = 2; i < WIDTH; i++) begin : g_bit
    and_3t u_and (.a(all_ones[i-1]), .b(b[i-1]), .and_out(all_ones[i]));
    xor_tg u_xor (.a(b[i]), .b(all_ones[i]), .y(x[i]));
  end

endmodule
