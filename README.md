# Wallace-tree multipliers built from majority gates

This is an unsigned Wallace-tree multiplier where every logic gate is a
**majority gate**. A three-input gate M3 outputs 1 when at least two of its
inputs are 1. A five-input gate M5 outputs 1 when at least three are 1. The
only other element is the inverter. Tie some of a majority gate's inputs to
constants and it turns into AND or OR. Feed it an inverted carry and it
produces the sum bit of an adder. That is enough to build the three parts of
a multiplier:

1. the partial-product AND array;
2. the carry-save reduction tree;
3. the final carry-propagate adder.

Majority gates are the natural primitive of several emerging technologies,
for example in-memory logic in magnetic crossbars, threshold logic and
quantum-dot cellular automata. A netlist made only of M3, M5 and inverters
maps onto them directly. On an FPGA or in standard cells, synthesis turns
each gate back into ordinary logic.

There are two multipliers, and the top `wallace_maj_top` places them side by side:

| module | size | reduction | final adder |
|---|---|---|---|
| `wallace4x4_maj` | 4x4, every adder placed by hand | two rows of majority full adders | 4-bit majority parallel-prefix adder |
| `wallace_mult` | NxN, N = 16 by default, any N from 2 to 128 | Wallace tree generated at elaboration | majority ripple-carry adder (default) or majority parallel-prefix adder |

Both multipliers are purely combinational. They have no clock, no registers
and no handshake: the product is valid one propagation delay after the
operands change.

## The majority cells

| cell | module | gates |
|---|---|---|
| M3 | `maj3` | `y = ab + bc + ca` |
| M5 | `maj5` | `y = (number of ones in x) >= 3` |
| AND | inside `pp_gen` | `M5(a, b, 0, 0, 1)` |
| XOR | `xor_maj` | `X1 = M3(a,b,1)` (OR), `X2 = M3(~a,~b,1)` (NAND), `y = M3(X1,X2,0)` (AND) |
| full adder | `maj_fa` | `co = M3(a,b,ci)`, `s = M5(a,b,ci,~co,~co)` |
| half adder | `maj_ha` | `co = M3(a,b,0)`, `s = xor_maj(a,b)` |

The full adder's sum gate is the least obvious cell. The inverted carry is
fed twice, so it carries two votes out of five:

- If at most one input is 1, the carry is 0 and its two inverted votes are
  1. The sum is then 1 exactly when one input is 1.
- If two or three inputs are 1, the carry is 1 and its two votes are 0. The
  sum is then 1 only when all three inputs are 1.

This full adder needs two majority gates and one inverter, and has two gate
levels. Its sum waits for its carry.

## The 4x4 multiplier (`wallace4x4_maj`)

The naming follows the structure: `p_ij = b_i AND a_j` has weight 2^(i+j),
and the product is `y7..y0`.

| phase | gate levels | what happens |
|---|---|---|
| I | 1 | 16 majority ANDs; `y0 = p00` |
| II, first row | 2 | `(y1,c01) = FA(p01,p10,0)`, `(s02,c02) = FA(p02,p11,p20)`, `(s03,c03) = FA(p03,p12,p21)`, `(s04,c04) = FA(p13,p22,0)` |
| II, second row | 2 | `(y2,c11) = FA(s02,c01,0)`, `(s12,c12) = FA(s03,c02,p30)`, `(s13,c13) = FA(s04,c03,p31)`, `(s14,c14) = FA(c04,p23,p32)` |
| III | 5 | `{y7..y3} = {p33,s14,s13,s12} + {c14,c13,c12,c11}` in a 4-bit majority prefix adder |

In this block a half adder is a full adder with a 0 carry-in. In the NxN
generator it is the separate `maj_ha` cell.

## The NxN multiplier (`wallace_mult`, `wallace_reduce`, `wallace_pkg`)

The N x N partial products form 2N columns. Column c starts with
`min(c+1, 2N-1-c)` bits. A reduction stage handles each column on its own:

- bits are taken three at a time by full adders;
- a remaining pair goes to a half adder;
- a single remaining bit is passed on unchanged.

In the next stage a column holds its own sums and passed bit, followed by
the carries from the column below. Stages are added until no column holds
more than two bits.

The functions in `wallace_pkg` compute all column heights at elaboration.
`wallace_reduce` uses them to place every adder with `generate` loops, and
checks that the heights add up. Each stage keeps its columns in its own
array, `g_stage[s].bits[c][k]`. This keeps the netlist free of any apparent
combinational loop.

| N | reduction stages (= log2(N²/4)) | first column of the final adder | final adder width |
|---|---|---|---|
| 4 | 2 | 3 | 5 |
| 8 | 4 | 5 | 11 |
| 16 | 6 | 7 | 25 |
| 32 | 8 | 9 | 55 |

The columns below the first one that holds two bits are already product
bits, so they skip the final adder. A carry out of the top column is
dropped, because the product always fits in 2N bits.

The final adder is selected by `PREFIX_FINAL`:

- `rca_maj` (0, the default) is a chain of `maj_fa` cells;
- `ppa_maj` (1) is the prefix adder described below.

## The majority parallel-prefix adder (`ppa_maj`)

A prefix adder usually merges (generate, propagate) pairs with AND and OR.
With majority gates there is a neater formulation. For any group of bit
positions, define:

- **G**: the group's carry-out when the carry into the group is 0;
- **K**: the group's carry-out when the carry into the group is 1.

G can never exceed K, so the carry-out for a carry-in c is simply M3(G, K, c).
For a single bit, G = a AND b = M3(a,b,0) and K = a OR b = M3(a,b,1). A high
group h and a low group l merge as

    G = M3(Gh, Kh, Gl)        K = M3(Gh, Kh, Kl)

The merged pair again satisfies G <= K, so the merge can be repeated. The
whole carry network is therefore a tree of M3 cells. The carry-in sits at
position 0 of the tree as a group with G = K = ci. The tree is a Sklansky
tree with ceil(log2(W+1)) levels. Once the carries are known, each sum bit
uses the same M5 gate as the full adder:

    s[i] = M5(a[i], b[i], c[i], ~c[i+1], ~c[i+1])

A common mistake is to use the textbook propagate P = Ph AND Pl in place of
K. The merged P can then be smaller than G, and `M3(Gh, Ph, Gl)` gives wrong
carries. The G/K pair avoids this problem.

## Where this RTL departs from the original description

- **Gate depth of the 4x4 multiplier.** The reference structure uses eight
  levels of majority gates, three of them for the final adder. Here the
  final adder takes five levels (G/K, three prefix levels, sum), so the
  whole multiplier has ten. The G/K prefix tree is this design's own
  construction, chosen because it is correct for any width.
- **Full adder.** Some descriptions of the majority full adder use three
  gates. This design uses the two-gate form above.
- **XOR.** The gate constants are chosen so that the three gates really
  compute XOR: OR, then NAND, then AND.
- **Which partial products feed which adder** in the 4x4 multiplier was
  worked out from column weights and adder names. The half adders on
  weights 1 and 4 are placed where the reference structure has constant-0
  inputs.
- **Operand width.** `N = 16` is this design's default, large enough for
  the reference test case 73 × 380 = 27740. Operands are unsigned, with no
  sign handling.
- **Final adder of the NxN multiplier.** Ripple-carry is the default.
  Parallel-prefix is an option. The adder is one bit wider than
  2(N − log2 N) because it includes the top column.
- **Not included:** the in-memory version of the 4x4 multiplier. That
  version evaluates each level of majority gates as one READ of a
  spin-orbit-torque MRAM crossbar and writes the results back to the array
  between levels. The array, its sensing and its command sequencing are a
  device and circuit design in their own right. No interface or command
  encoding for them is specified, so neither the array nor its controller
  is modelled here.

## Files

| file | contents |
|---|---|
| `rtl/maj3.sv`, `rtl/maj5.sv` | majority gates |
| `rtl/xor_maj.sv`, `rtl/maj_fa.sv`, `rtl/maj_ha.sv` | XOR, full adder and half adder built from majority gates |
| `rtl/pp_gen.sv` | N x N majority-AND partial-product array |
| `rtl/wallace_pkg.sv` | elaboration-time column-height bookkeeping |
| `rtl/wallace_reduce.sv` | generated Wallace tree |
| `rtl/rca_maj.sv`, `rtl/ppa_maj.sv` | ripple-carry and parallel-prefix final adders |
| `rtl/wallace4x4_maj.sv` | hand-placed 4x4 multiplier |
| `rtl/wallace_mult.sv` | NxN multiplier |
| `rtl/wallace_maj_top.sv` | top with both multipliers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`.
With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/wallace_pkg.sv \
        tb/tb_wallace_maj_top.sv --top-module tb_wallace_maj_top -Mdir obj -o sim
    ./obj/sim

Replace `wallace_maj_top` with any other module name to run its own test.
The package must be listed first, because `wallace_reduce`, `wallace_mult`
and two testbenches import it.

What the testbenches cover:

- The cells, the 4x4 multiplier and the 4-bit adders are tested
  exhaustively.
- `wallace_mult` is tested exhaustively at N = 8 with both final adders and
  at N = 5. At N = 16 it gets 73 × 380 and extreme operands, plus 5000
  random pairs.
- `wallace_reduce` gets arbitrary bit patterns, not only real partial
  products. It must preserve the weighted sum of its inputs. Its test also
  checks the stage count against log2(N²/4).
- The top-level test runs both multipliers at the default size. It counts
  three cases and fails if one never happens: a carry into the 4x4
  product's top bit, a 16x16 product with its top bit set, and a product
  small enough to need no final-adder bit.

## Changing it

- **Operand width:** set `N` on `wallace_maj_top` or `wallace_mult`
  (2..128; the limit is `wallace_pkg::MAX_N`).
- **Final adder:** set `PREFIX_FINAL = 1` on `wallace_mult` to get the
  prefix adder.
- **Reduction rule:** it lives entirely in `wallace_pkg` (`n_fa`, `n_ha`,
  `n_pass`). `wallace_reduce` follows whatever those functions return, and
  stops with an elaboration error if the heights do not add up.
- **Physical form of the gates:** `maj3` and `maj5` are the only places
  that describe how a gate is built. Replace them to map the design onto a
  majority-gate technology.
