// maj5 -- five-input majority gate (M5 cell).
//
// The output is 1 when at least three of the five inputs x[4:0] are 1. With
// constants on some inputs it realises AND (x = {a,b,0,0,1}) and the
// three-input majority (x = {a,b,c,0,1}); with an inverted carry fed twice it
// gives the sum of a full adder (see maj_fa). Purely combinational.
//
// The gate is written as a threshold on the number of ones, a choice of this
// design: the cell's physical form is left to the target technology.
module maj5 (
  input  logic [4:0] x,
  output logic       y
);
  logic [2:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < 5; i++) ones += 3'(x[i]);
  end

  assign y = (ones >= 3'd3);
endmodule
