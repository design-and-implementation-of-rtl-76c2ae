// wallace4x4_maj -- 4x4 unsigned Wallace multiplier in majority logic, with
// every adder placed by hand.
//
// Phase I   (1 gate level): pp_gen forms p_ij = b_i AND a_j; y0 = p00.
// Phase II  (2 x 2 levels): two rows of majority full adders. A "half adder"
//           here is a full adder with a 0 carry-in.
//   FA I :  (y1 ,c01) = FA(p01,p10,0)     (s02,c02) = FA(p02,p11,p20)
//           (s03,c03) = FA(p03,p12,p21)   (s04,c04) = FA(p13,p22,0)
//   FA II:  (y2 ,c11) = FA(s02,c01,0)     (s12,c12) = FA(s03,c02,p30)
//           (s13,c13) = FA(s04,c03,p31)   (s14,c14) = FA(c04,p23,p32)
// Phase III: a 4-bit majority parallel-prefix adder (ppa_maj) adds
//           {p33,s14,s13,s12} and {c14,c13,c12,c11} at weights 3..6 and gives
//           y6..y3, its carry-out is y7.
// Interface: a, b (4 bits) in, y = a*b (8 bits) out; no clock.
//
// The three phases, the two full-adder rows and the names of their outputs
// (y0..y7, s0x/c0x, s1x/c1x) follow the multiplier's 4x4 map; which partial
// products feed which adder is inferred from the column weights, and the
// prefix adder's gates are this design's (see ppa_maj).
module wallace4x4_maj (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] y
);
  logic [3:0][3:0] p;   // p[i][j] = b[i] & a[j]
  logic c01, c02, c03, c04, s02, s03, s04;
  logic c11, c12, c13, c14, s12, s13, s14;

  // Phase I
  pp_gen #(.N(4)) u_pp (.a(a), .b(b), .pp(p));
  assign y[0] = p[0][0];

  // Phase II, FA I
  maj_fa u_fa01 (.a(p[0][1]), .b(p[1][0]), .ci(1'b0),    .s(y[1]), .co(c01));
  maj_fa u_fa02 (.a(p[0][2]), .b(p[1][1]), .ci(p[2][0]), .s(s02),  .co(c02));
  maj_fa u_fa03 (.a(p[0][3]), .b(p[1][2]), .ci(p[2][1]), .s(s03),  .co(c03));
  maj_fa u_fa04 (.a(p[1][3]), .b(p[2][2]), .ci(1'b0),    .s(s04),  .co(c04));

  // Phase II, FA II
  maj_fa u_fa11 (.a(s02), .b(c01),     .ci(1'b0),    .s(y[2]), .co(c11));
  maj_fa u_fa12 (.a(s03), .b(c02),     .ci(p[3][0]), .s(s12),  .co(c12));
  maj_fa u_fa13 (.a(s04), .b(c03),     .ci(p[3][1]), .s(s13),  .co(c13));
  maj_fa u_fa14 (.a(c04), .b(p[2][3]), .ci(p[3][2]), .s(s14),  .co(c14));

  // Phase III
  ppa_maj #(.W(4)) u_final (
    .a ({p[3][3], s14, s13, s12}),
    .b ({c14, c13, c12, c11}),
    .ci(1'b0),
    .s (y[6:3]),
    .co(y[7])
  );
endmodule
