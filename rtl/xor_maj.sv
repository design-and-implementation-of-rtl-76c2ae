// xor_maj -- two-input XOR made of three 3-input majority gates.
//
//   M0: X1 = M3( A,  B, 1)  -- OR of the inputs
//   M1: X2 = M3(~A, ~B, 1)  -- NAND of the inputs (0 only when both are 1)
//   M2: Y  = M3(X1, X2, 0)  -- AND of the two: 1 when exactly one input is 1
//
// The three-gate structure and the net names X1, X2, M0, M1 follow the
// multiplier's XOR cell; the constants chosen for each gate (and the name M2)
// are this design's reading of that cell. Purely combinational, two gate
// levels plus the input inverters.
module xor_maj (
  input  logic a,
  input  logic b,
  output logic y
);
  logic x1, x2;

  maj3 M0 (.a(a),  .b(b),  .c(1'b1), .y(x1));
  maj3 M1 (.a(~a), .b(~b), .c(1'b1), .y(x2));
  maj3 M2 (.a(x1), .b(x2), .c(1'b0), .y(y));
endmodule
