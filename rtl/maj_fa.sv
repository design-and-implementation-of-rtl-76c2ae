// maj_fa -- majority-logic full adder (MLFA).
//
//   co = M3(a, b, ci)
//   s  = M5(a, b, ci, ~co, ~co)
//
// The carry is the majority of the three inputs. For the sum, the inverted
// carry is fed twice into a five-input majority gate: when two or three inputs
// are 1 the two inverted-carry votes are 0, so the sum is 1 only if all three
// inputs are 1; when at most one input is 1 the two votes are 1 and the sum
// follows "at least one input is 1". Two majority gates and one inverter, two
// gate levels; purely combinational.
//
// The carry gate and the carry-then-sum arrangement follow the multiplier's
// full-adder cell; the duplicated inverted carry on the five-input gate is
// this design's reading of that cell.
module maj_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  maj3 u_carry (.a(a), .b(b), .c(ci), .y(co));
  maj5 u_sum   (.x({a, b, ci, ~co, ~co}), .y(s));
endmodule
