// rca_c0 -- WIDTH-bit ripple-carry adder with its carry-in tied to 0.
//
// Returns the WIDTH+1 bit result s = {carry, sum} of a + b. With no carry
// into bit 0 that bit needs only a half adder; the bits above are full
// adders rippling the carry upward. In a carry-select stage this is the
// one real adder: its result plus one (from the excess-1 converter) gives
// the carry-in 1 answer. Using a half adder for bit 0 is this design's
// own choice. Purely combinational.
module rca_c0 #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   s
);

  logic [WIDTH:0] c;   // c[i] is the carry into bit i

  half_adder u_ha (.a(a[0]), .b(b[0]), .sum(s[0]), .carry(c[1]));
  assign c[0] = 1'b0;

  for (genvar i = 1; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(s[i]), .cout(c[i+1]));
  end

  assign s[WIDTH] = c[WIDTH];

endmodule
