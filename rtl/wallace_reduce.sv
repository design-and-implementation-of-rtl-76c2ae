// wallace_reduce -- Wallace-tree reduction of an NxN partial-product array
// to two rows, built from majority full and half adders (3:2 compressors).
//
// g_stage[s].bits[c] holds the bits of column c (weight 2^c) after s stages, packed
// from index 0 up. Stage 0 is the partial-product array: column c gets every
// pp[i][j] with i+j = c. In each stage a column's bits are taken three at a
// time by maj_fa cells, a remaining pair by a maj_ha cell, and a single
// remaining bit is passed on. In the next stage a column holds, in this order:
// the sums of its full adders, the sum of its half adder, its passed bit, and
// then the carries of the column below (full adders first). The heights that
// fix all indices are computed at elaboration by wallace_pkg, and stages are
// added until no column holds more than two bits; for N a power of two that
// is log2(N*N/4) stages (2 for N = 4, 6 for N = 16). A carry out of the top
// column 2N-1 is left unconnected (the lint tool reports that column's cy as
// unused): the product always fits in 2N bits, so it is always 0.
//
// Outputs row0/row1 are the two remaining bits of every column (0 where a
// column holds fewer); row0 + row1 = a*b modulo 2^(2N). Purely combinational.
//
// The 3:2 reduction with majority full adders is the multiplier's own; the
// per-column grouping rule (classic Wallace, half adders on pairs) and the
// bit order inside a column are this design's choices.
module wallace_reduce
  import wallace_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0][N-1:0] pp,     // pp[i][j], weight 2^(i+j)
  output logic [2*N-1:0]      row0,
  output logic [2*N-1:0]      row1
);
  localparam int W   = 2 * N;
  localparam int NST = num_stages(N);
  localparam int H   = N;              // no column ever exceeds N bits

  // Elaboration-time sanity check of the bookkeeping limits.
  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("wallace_reduce: N must be within 2..%0d", MAX_N);
  end

  // ---- stage 0: partial products, column c = i + j -------------------------
  // Every stage keeps its columns in its own array, g_stage[s].bits, so the
  // netlist has no loop through a shared array.
  for (genvar s = 0; s <= NST; s++) begin : g_stage
    logic [H-1:0] bits [W];
  end

  for (genvar i = 0; i < N; i++) begin : g_pp_i
    for (genvar j = 0; j < N; j++) begin : g_pp_j
      // rows i are listed bottom-up inside a column; the first row present in
      // column i+j is max(0, i+j-(N-1))
      localparam int IDX = (i + j <= N - 1) ? i : i - (i + j - (N - 1));
      assign g_stage[0].bits[i+j][IDX] = pp[i][j];
    end
  end
  for (genvar c = 0; c < W; c++) begin : g_pp_pad
    for (genvar k = init_height(N, c); k < H; k++) begin : g_zero
      assign g_stage[0].bits[c][k] = 1'b0;
    end
  end

  // ---- reduction stages ----------------------------------------------------
  for (genvar s = 1; s <= NST; s++) begin : g_red
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int HC   = col_height(N, s - 1, c);   // this column, before
      localparam int HB   = (c > 0) ? col_height(N, s - 1, c - 1) : 0;
      localparam int HN   = col_height(N, s, c);       // this column, after
      localparam int NFA  = n_fa(HC);
      localparam int NHA  = n_ha(HC);
      localparam int OWN  = n_own(HC);
      localparam int CIN  = n_fa(HB) + n_ha(HB);      // carries from below
      // carries of this column land above the next column's own bits
      localparam int COFS = (c + 1 < W) ? n_own(col_height(N, s - 1, c + 1)) : 0;

      logic [NFA+NHA:0] cy;   // carries produced here (one spare bit)
      assign cy[NFA+NHA] = 1'b0;

      for (genvar f = 0; f < NFA; f++) begin : g_fa
        maj_fa u_fa (
          .a (g_stage[s-1].bits[c][3*f]),
          .b (g_stage[s-1].bits[c][3*f+1]),
          .ci(g_stage[s-1].bits[c][3*f+2]),
          .s (g_stage[s].bits[c][f]),
          .co(cy[f])
        );
      end
      if (NHA == 1) begin : g_ha
        maj_ha u_ha (
          .a (g_stage[s-1].bits[c][3*NFA]),
          .b (g_stage[s-1].bits[c][3*NFA+1]),
          .s (g_stage[s].bits[c][NFA]),
          .co(cy[NFA])
        );
      end
      if (n_pass(HC) == 1) begin : g_pass
        assign g_stage[s].bits[c][NFA] = g_stage[s-1].bits[c][3*NFA];
      end
      if (c + 1 < W) begin : g_carry_up
        for (genvar f = 0; f < NFA + NHA; f++) begin : g_cy
          assign g_stage[s].bits[c+1][COFS+f] = cy[f];
        end
      end
      // bits above the column's new height are constant 0
      for (genvar k = OWN + CIN; k < H; k++) begin : g_zero
        assign g_stage[s].bits[c][k] = 1'b0;
      end
      if (OWN + CIN != HN) begin : g_height_check
        $error("wallace_reduce: height bookkeeping mismatch");
      end
    end
  end

  // ---- the two remaining rows ---------------------------------------------
  for (genvar c = 0; c < W; c++) begin : g_out
    assign row0[c] = g_stage[NST].bits[c][0];
    assign row1[c] = g_stage[NST].bits[c][1];
  end
endmodule
