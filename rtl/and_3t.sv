// and_3t -- three-transistor pass-transistor AND gate.
//
// Two NMOS devices and one PMOS device: when A is high the output is
// connected to B through a pass transistor, and when A is low a pull-down
// transistor ties the output to ground, so and_out = A.B with only three
// transistors instead of the six of a static CMOS AND. This cell replaces
// the conventional AND gate inside the binary-to-excess-1 converter, which
// is where the adder saves its transistors. Only the logic function is
// modelled; the weak levels a pass transistor passes are an electrical
// property with no logic meaning. Purely combinational.
module and_3t (
  input  logic a,
  input  logic b,
  output logic and_out
);

  always_comb begin
    if (a) and_out = b;     // pass device conducts, B reaches the output
    else   and_out = 1'b0;  // pull-down device conducts
  end

endmodule
