// csa_stage -- one carry-select stage with a binary-to-excess-1 converter.
//
// The stage adds its WIDTH-bit slices of a and b before the carry from
// the stage below is known:
//   r0 = a + b        (rca_c0, WIDTH+1 bits including the carry)
//   r1 = r0 + 1       (bec of WIDTH+1 bits: the result for carry-in 1)
// When the incoming carry arrives it only has to steer a (WIDTH+1)-bit
// 2:1 multiplexer bank (the 6:3 MUX for the 2-bit stage): cin = 0 picks
// r0, cin = 1 picks r1. The top bit of the chosen result is the carry to
// the next stage. Replacing the second ripple adder of a conventional
// carry-select stage with the converter is the published structure.
// Purely combinational: the delay from cin to the outputs is one mux.
module csa_stage #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] r0;   // result for carry-in 0
  logic [WIDTH:0] r1;   // result for carry-in 1
  logic [WIDTH:0] r;

  rca_c0   #(.WIDTH(WIDTH))   u_rca (.a(a), .b(b), .s(r0));
  bec      #(.WIDTH(WIDTH+1)) u_bec (.b(r0), .x(r1));
  mux_bank #(.WIDTH(WIDTH+1)) u_mux (.in1(r1), .in0(r0), .sel(cin), .y(r));

  assign sum  = r[WIDTH-1:0];
  assign cout = r[WIDTH];

endmodule
