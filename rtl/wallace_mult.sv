// wallace_mult -- NxN unsigned Wallace-tree multiplier in majority logic.
//
// Three phases, all combinational:
//   1. pp_gen builds the N*N partial products, each an AND made from a
//      five-input majority gate.
//   2. wallace_reduce compresses the columns to two rows with majority full
//      and half adders, in log2(N*N/4) stages for N a power of two.
//   3. A final adder adds the two rows: rca_maj, a ripple-carry adder of
//      majority full adders (PREFIX_FINAL = 0, the default), or ppa_maj, a
//      majority parallel-prefix adder (PREFIX_FINAL = 1). Columns below the
//      first one that still holds two bits are already product bits and
//      bypass the adder, so the adder spans 2N - adder_lo(N) bits (25 for
//      N = 16, i.e. 2(N - log2 N) + 1 including the top column).
// Interface: a, b (N bits) in, p = a*b (2N bits) out; no clock. The final
// adder's carry-out is always 0 and is left unused.
//
// The three phases, the majority cells and both kinds of final adder follow
// the multiplier as described; the unsigned operands, the default width of 16,
// ripple-carry as the default final adder and the bypass of the low columns
// are this design's choices.
module wallace_mult
  import wallace_pkg::*;
#(
  parameter int unsigned N            = 16,
  parameter bit          PREFIX_FINAL = 1'b0   // 0: ripple-carry, 1: parallel-prefix
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int W  = 2 * N;
  localparam int LO = adder_lo(N);
  localparam int AW = W - LO;

  logic [N-1:0][N-1:0] pp;
  logic [W-1:0]        row0, row1;
  logic                co_unused;

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .pp(pp));

  wallace_reduce #(.N(N)) u_tree (.pp(pp), .row0(row0), .row1(row1));

  if (LO > 0) begin : g_low
    assign p[LO-1:0] = row0[LO-1:0];
  end

  if (PREFIX_FINAL) begin : g_ppa
    ppa_maj #(.W(AW)) u_final (
      .a (row0[W-1:LO]),
      .b (row1[W-1:LO]),
      .ci(1'b0),
      .s (p[W-1:LO]),
      .co(co_unused)
    );
  end else begin : g_rca
    rca_maj #(.W(AW)) u_final (
      .a (row0[W-1:LO]),
      .b (row1[W-1:LO]),
      .ci(1'b0),
      .s (p[W-1:LO]),
      .co(co_unused)
    );
  end
endmodule
