// maj_ha -- majority-logic half adder.
//
//   co = M3(a, b, 0)   -- AND
//   s  = a xor b       -- three-gate majority XOR (xor_maj)
//
// Used by the NxN Wallace tree wherever a column leaves a pair of bits. The
// half adder is one of the multiplier's component cells; building its sum from
// the majority XOR cell is this design's choice. Purely combinational.
module maj_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  maj3    u_carry (.a(a), .b(b), .c(1'b0), .y(co));
  xor_maj u_sum   (.a(a), .b(b), .y(s));
endmodule
