// full_adder -- adds three bits.
//
// Sum   = (A XOR B) XOR Cin, from two transmission-gate XOR cells;
// Carry = A.B + Cin.A + Cin.B (the majority of the three inputs).
// Both equations are the published ones. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  xor_tg u_xor_ab (.a(a), .b(b),   .y(p));
  xor_tg u_xor_s  (.a(p), .b(cin), .y(sum));

  assign cout = (a & b) | (cin & a) | (cin & b);

endmodule
