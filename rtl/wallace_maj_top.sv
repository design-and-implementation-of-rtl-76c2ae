// wallace_maj_top -- the two majority-logic Wallace multipliers side by side.
//
//   u_mul4 : wallace4x4_maj, the hand-placed 4x4 multiplier (majority AND
//            array, two full-adder rows, 4-bit majority parallel-prefix adder)
//   u_mulN : wallace_mult, the NxN multiplier generated for any width
//            (majority AND array, Wallace tree of majority full/half adders,
//            majority ripple-carry final adder), N = 16 by default
// Each has its own operands and product; both are purely combinational, so
// a product is valid one propagation delay after its operands change.
//
// Both multipliers follow the majority-logic Wallace structure described for
// this design; putting them in one top, and the default N = 16, are this
// design's choices.
module wallace_maj_top #(
  parameter int unsigned N = 16
) (
  input  logic [3:0]     a4,
  input  logic [3:0]     b4,
  output logic [7:0]     y4,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  wallace4x4_maj         u_mul4 (.a(a4), .b(b4), .y(y4));
  wallace_mult #(.N(N))  u_mulN (.a(a),  .b(b),  .p(p));
endmodule
