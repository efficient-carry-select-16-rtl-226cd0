// inv_cell -- static CMOS inverter, modelled by its logic function.
//
// The inverter is the shared cell used inside the transmission-gate XOR,
// the 2:1 multiplexer (to make the complementary select) and the
// binary-to-excess-1 converter (bit X0). Pins vin/vout follow the cell's
// pin names; supply pins are not modelled. Purely combinational.
module inv_cell (
  input  logic vin,
  output logic vout
);

  assign vout = ~vin;

endmodule
