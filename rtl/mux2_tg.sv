// mux2_tg -- 2:1 multiplexer made of two transmission gates.
//
// An inverter forms the complement of the select S. One transmission gate
// passes A while S=1 and the other passes B while S=0, both driving the
// shared output y, so y = S.A + S'.B. At logic level the two gates are
// never on together, which is written here as a conditional. Supply pins
// are not modelled. Purely combinational.
module mux2_tg (
  input  logic a,  // passed when s = 1
  input  logic b,  // passed when s = 0
  input  logic s,
  output logic y
);

  logic s_n;

  inv_cell u_inv (.vin(s), .vout(s_n));

  // Transmission gate on A is on for s=1 (nmos gate s, pmos gate s_n);
  // the gate on B is on for s=0 (nmos gate s_n, pmos gate s).
  always_comb begin
    if (s && !s_n) y = a;
    else           y = b;
  end

endmodule
