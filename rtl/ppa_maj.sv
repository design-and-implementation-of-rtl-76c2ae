// ppa_maj -- W-bit parallel-prefix adder made only of majority gates.
//
// For a group of bit positions let G be its carry-out when the carry into the
// group is 0, and K its carry-out when the carry into it is 1. Always G <= K,
// so the carry-out for a carry-in c is M3(G, K, c). For one bit,
// G = a AND b = M3(a, b, 0) and K = a OR b = M3(a, b, 1). Two adjacent groups
// (high h over low l) merge as
//     G = M3(Gh, Kh, Gl)      K = M3(Gh, Kh, Kl)
// which is again a pair of majority gates, so the whole carry network is a
// prefix tree of M3 cells. The carry-in takes position 0 of the tree as a
// group with G = K = ci, bit k of the operands sits at position k+1, and the
// tree is a Sklansky (divide-and-conquer) prefix of ceil(log2(W+1)) levels.
// Position k of the last level is the carry into bit k; the sum of bit k is
//     s[k] = M5(a[k], b[k], c[k], ~c[k+1], ~c[k+1])
// the same sum gate as in maj_fa. Purely combinational: one gate level for
// G/K, ceil(log2(W+1)) prefix levels, one sum level.
//
// A majority-gate parallel-prefix adder is what the 4x4 multiplier uses as its
// final phase; the G/K formulation, the Sklansky tree and the carry-in are
// this design's choices. The default W = 4 is that adder's width.
module ppa_maj #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  localparam int unsigned L = $clog2(W + 1);

  logic [W:0] g [L+1];
  logic [W:0] k [L+1];

  // Level 0: per-bit generate / carry-if-carry-in, carry-in at position 0.
  assign g[0][0] = ci;
  assign k[0][0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_bitgk
    maj3 u_g (.a(a[i]), .b(b[i]), .c(1'b0), .y(g[0][i+1]));
    maj3 u_k (.a(a[i]), .b(b[i]), .c(1'b1), .y(k[0][i+1]));
  end

  // Sklansky prefix levels.
  for (genvar lv = 1; lv <= L; lv++) begin : g_level
    for (genvar pos = 0; pos <= W; pos++) begin : g_pos
      if (((pos >> (lv - 1)) & 1) == 1) begin : g_merge
        localparam int unsigned LO = ((pos >> (lv - 1)) << (lv - 1)) - 1;
        maj3 u_mg (.a(g[lv-1][pos]), .b(k[lv-1][pos]), .c(g[lv-1][LO]), .y(g[lv][pos]));
        maj3 u_mk (.a(g[lv-1][pos]), .b(k[lv-1][pos]), .c(k[lv-1][LO]), .y(k[lv][pos]));
      end else begin : g_keep
        assign g[lv][pos] = g[lv-1][pos];
        assign k[lv][pos] = k[lv-1][pos];
      end
    end
  end

  // Sum gates: the carry into bit i is g[L][i], its carry-out g[L][i+1].
  for (genvar i = 0; i < W; i++) begin : g_sum
    maj5 u_s (.x({a[i], b[i], g[L][i], ~g[L][i+1], ~g[L][i+1]}), .y(s[i]));
  end
  assign co = g[L][W];
endmodule
