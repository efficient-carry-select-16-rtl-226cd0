// sqrt_csa16 -- 16-bit square-root carry-select adder.
//
// {cout, sum} = a + b + cin, split into five stages of 2, 2, 3, 4 and 5
// bits (csa_pkg::STAGE_W):
//   stage 1  bits  1:0   ripple adder of two full adders (rca_stage1)
//   stage 2  bits  3:2   csa_stage, 3-bit converter, 6:3 mux
//   stage 3  bits  6:4   csa_stage, 4-bit converter
//   stage 4  bits 10:7   csa_stage, 5-bit converter
//   stage 5  bits 15:11  csa_stage, 6-bit converter
// Every carry-select stage forms both of its possible results at once,
// from its own operand bits only; the carry that ripples from stage to
// stage passes just one multiplexer per stage. Wider stages toward the top
// have more time for their internal ripple before that carry arrives.
// The stage widths and the use of the excess-1 converter are the published
// design. Purely combinational: no clock and no reset.
module sqrt_csa16
  import csa_pkg::*;
(
  input  logic [ADDER_W-1:0] a,
  input  logic [ADDER_W-1:0] b,
  input  logic               cin,
  output logic [ADDER_W-1:0] sum,
  output logic               cout
);

  // carry[s] is the carry into stage s; carry[N_STAGES] leaves the adder.
  logic [N_STAGES:0] carry;

  assign carry[0] = cin;

  rca_stage1 #(.WIDTH(STAGE_W[0])) u_stage1 (
    .a   (a[STAGE_W[0]-1:0]),
    .b   (b[STAGE_W[0]-1:0]),
    .cin (carry[0]),
    .sum (sum[STAGE_W[0]-1:0]),
    .cout(carry[1])
  );

  for (genvar s = 1; s < N_STAGES; s++) begin : g_stage
    localparam int unsigned LSB = stage_lsb(s);
    localparam int unsigned W   = STAGE_W[s];

    csa_stage #(.WIDTH(W)) u_stage (
      .a   (a[LSB +: W]),
      .b   (b[LSB +: W]),
      .cin (carry[s]),
      .sum (sum[LSB +: W]),
      .cout(carry[s+1])
    );
  end

  assign cout = carry[N_STAGES];

  if (stage_lsb(N_STAGES) != ADDER_W) begin : g_width_check
    $error("csa_pkg: stage widths do not add up to ADDER_W");
  end

endmodule
