// xor_tg -- two-input XOR in transmission-gate style (8 transistors:
// two inverters and two transmission gates).
//
// The inverters give the complements of the inputs. Input b steers two
// transmission gates: for b=0 the output is connected to a, for b=1 to
// the inverted a, which is a XOR b. Which input steers the gates is this
// design's reading of the schematic; the function is the XOR either way.
// Supply pins are not modelled. Purely combinational.
module xor_tg (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_n, b_n;

  inv_cell u_inv_a (.vin(a), .vout(a_n));
  inv_cell u_inv_b (.vin(b), .vout(b_n));

  always_comb begin
    if (b && !b_n) y = a_n;   // gate steered by b passes the inverted a
    else           y = a;     // gate steered by b_n passes a
  end

endmodule
