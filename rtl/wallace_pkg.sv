// wallace_pkg -- elaboration-time bookkeeping for the NxN Wallace tree.
//
// The partial products of an NxN multiplication form 2N columns; column c
// (weight 2^c) initially holds min(c+1, 2N-1-c) bits. Each reduction stage
// treats every column on its own: its bits are taken three at a time by full
// adders, a remaining pair goes to a half adder and a single remaining bit is
// passed on. A column's height in the next stage is its own sums and passed
// bits plus the carries of the column below. Stages are added until no
// column holds more than two bits; the two rows left are summed by the final
// adder. The functions below compute these heights so that wallace_reduce
// can place every adder with generate loops. For N a power of two the stage
// count equals log2(N*N/4).
package wallace_pkg;

  // Largest operand width the bookkeeping arrays support.
  localparam int unsigned MAX_N = 128;

  // Number of bits column c holds in the partial-product array.
  function automatic int init_height(int n, int c);
    if (c < 0 || c > 2 * n - 2) return 0;
    return (c <= n - 1) ? c + 1 : 2 * n - 1 - c;
  endfunction

  // Full adders, half adders and passed bits for a column of height h.
  function automatic int n_fa(int h);
    return h / 3;
  endfunction

  function automatic int n_ha(int h);
    return (h % 3 == 2) ? 1 : 0;
  endfunction

  function automatic int n_pass(int h);
    return (h % 3 == 1) ? 1 : 0;
  endfunction

  // Bits that a column of height h keeps in its own position after a stage.
  function automatic int n_own(int h);
    return n_fa(h) + n_ha(h) + n_pass(h);
  endfunction

  // Height of column c after s reduction stages.
  function automatic int col_height(int n, int s, int c);
    int h  [2 * MAX_N];
    int nh [2 * MAX_N];
    for (int k = 0; k < 2 * n; k++) h[k] = init_height(n, k);
    for (int st = 0; st < s; st++) begin
      for (int k = 0; k < 2 * n; k++) nh[k] = n_own(h[k]);
      for (int k = 0; k + 1 < 2 * n; k++) nh[k+1] += n_fa(h[k]) + n_ha(h[k]);
      for (int k = 0; k < 2 * n; k++) h[k] = nh[k];
    end
    return h[c];
  endfunction

  // Tallest column after s stages.
  function automatic int max_height(int n, int s);
    int m = 0;
    for (int k = 0; k < 2 * n; k++)
      if (col_height(n, s, k) > m) m = col_height(n, s, k);
    return m;
  endfunction

  // Reduction stages needed to bring every column down to two bits.
  function automatic int num_stages(int n);
    int s = 0;
    while (max_height(n, s) > 2) s++;
    return s;
  endfunction

  // Lowest column that still holds two bits after the last stage: the final
  // adder starts here, everything below is already a product bit.
  function automatic int adder_lo(int n);
    int s = num_stages(n);
    for (int k = 0; k < 2 * n; k++)
      if (col_height(n, s, k) >= 2) return k;
    return 2 * n;
  endfunction

endpackage
