// maj3 -- three-input majority gate (M3 cell).
//
// The output is 1 when at least two of the three inputs are 1. Tying one
// input to a constant turns the cell into a two-input AND (constant 0) or OR
// (constant 1); every other cell of the multiplier is composed from this gate,
// maj5 and inverters. The gate is purely combinational.
//
// The majority function is the one the multiplier is built on; writing it as
// the sum of products ab + bc + ca is this design's choice, since the cell's
// transistor-level form is left to the target technology.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (c & a);
endmodule
