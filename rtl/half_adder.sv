// half_adder -- adds two bits.
//
// sum = a XOR b from the transmission-gate XOR cell, carry = a AND b.
// Used as the least significant bit of the ripple adders whose carry-in
// is fixed at zero, where a full adder would waste a carry input; that
// placement is this design's own choice. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  xor_tg u_xor (.a(a), .b(b), .y(sum));

  assign carry = a & b;

endmodule
