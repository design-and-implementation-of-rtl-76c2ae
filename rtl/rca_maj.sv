// rca_maj -- W-bit ripple-carry adder of majority full adders.
//
// A chain of W maj_fa cells; the carry of bit k feeds bit k+1. It is the
// final adder of the NxN Wallace multiplier (wallace_mult), which hands it
// the two rows left by the reduction tree. Purely combinational; the carry
// path is W carry gates long.
//
// The ripple-carry adder is one of the multiplier's component cells; its
// width and the use of maj_fa for every bit are this design's choices.
module rca_maj #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;

  assign c[0] = ci;
  for (genvar k = 0; k < W; k++) begin : g_bit
    maj_fa u_fa (.a(a[k]), .b(b[k]), .ci(c[k]), .s(s[k]), .co(c[k+1]));
  end
  assign co = c[W];
endmodule
