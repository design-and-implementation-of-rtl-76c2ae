// pp_gen -- partial-product array of an NxN multiplier, in majority logic.
//
// Every partial product pp[i][j] = b[i] AND a[j] (weight 2^(i+j)) is one
// five-input majority gate with the constants 0, 0, 1 on its spare inputs:
// M5(a, b, 0, 0, 1) reaches three ones only when a and b are both 1. All N*N
// gates work in parallel, one gate level, no clock.
//
// The AND-from-M5 cell and the index order (first index from b, second from
// a) follow the multiplier's first phase; the width N defaults to 16, a choice
// of this design.
module pp_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output logic [N-1:0][N-1:0] pp    // pp[i][j] = b[i] & a[j]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      maj5 u_and (.x({a[j], b[i], 1'b0, 1'b0, 1'b1}), .y(pp[i][j]));
    end
  end
endmodule
