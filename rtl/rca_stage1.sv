// rca_stage1 -- first stage of the square-root carry-select adder.
//
// The least significant stage has nothing to select between: the carry
// into it is known at once, so it is a ripple adder of WIDTH (2) full
// adders in cascade, a + b + cin. Its carry out (cout1) is the select of
// stage 2. The 2-bit size and the two cascaded full adders are the
// published structure. Purely combinational.
module rca_stage1 #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[WIDTH];

endmodule
