# Inexact arithmetic: probabilistically pruned adders and minimised-logic datapaths

Many workloads — audio, images, video, sensor processing — end at a consumer
that does not notice a small arithmetic error. Such a workload can buy energy,
delay and area by letting the arithmetic be slightly wrong, as long as the error
is small and falls mostly on the low-order bits. This RTL implements two ways of
doing that. Both are applied when the circuit is designed, not at run time:

* **Probabilistic pruning.** A parallel-prefix adder computes every carry with a
  tree of prefix nodes. For random operands, a carry generated *j* columns below
  a sum bit reaches it only if every column in between propagates. That happens
  with probability about 2^-(j+1). The upper levels of a prefix tree do nothing
  but serve these long, rarely used paths. Deleting them, and deleting more of
  them in low-order bits than in high-order bits, gives a smaller and shallower
  adder. Its sum is wrong only when a long carry chain occurs.
* **Probabilistic logic minimisation.** Take a full adder's sum or carry as a
  Karnaugh map. Flip one, two or three of its cells, preferring input
  combinations that rarely occur, and the function becomes a much cheaper gate.
  A ripple-carry adder or an array multiplier built from such cells in its
  low-order columns is cheaper and slightly wrong.

The design has two independent parts, side by side in `inexact_top`:

1. **`ppa_chip`**, a test chip for pruned adders. It holds 30 64-bit adders:
   11 conventional architectures and 19 pruned variants. Two on-chip
   pseudo-random generators feed them. Six select pins choose which adder runs,
   and its registered sum comes out on 65 pins.
2. **`plm_rca` and `plm_array_multiplier`**, a 16-bit ripple-carry adder and a
   16 x 16 array multiplier whose low-order full adders are logic-minimised.

Everything is plain synthesizable SystemVerilog with no vendor cells.

---

## 1. Prefix-adder conventions used throughout

All the prefix adders (conventional and pruned) share one numbering, set up by
`prefix_pre` and `prefix_post`:

* **Column 0 is the carry-in**, with G0 = cin and P0 = 0. **Column k ≥ 1 is
  operand bit k−1**, with Gk = a & b and Pk = a ^ b. An N-bit adder therefore
  has N+1 columns, 0..N.
* A prefix node combines a column's (G,P) with a lower group's (G,P):
  `G = Gh | Ph & Gl`, `P = Ph & Pl` (`adder_pkg::pg_combine`). There are three
  kinds of node: black nodes keep G and P, grey nodes need only G, and buffers
  are wires. All of them are written as the same function, and synthesis drops
  the unused P.
* The carry into sum bit i is the group generate G[i:0] that ends at column i.
  `sum[i] = p[i] ^ G[i:0]` and `cout = g[N-1] | p[N-1] & G[N-1:0]`.
* A group label such as **11:4** means "the (G,P) of columns 11 down to 4".

Every prefix network is written as one `generate` block per level,
`g_lvl[l].node[k]`, plus a constant function `partner(l, k)`. This function
returns the column that column k combines with at level l, or −1 when the node
is a wire. This turns every architecture into a few lines that can be checked
against a drawing. It also keeps each level a separate signal, so simulators
see no false combinational loops.

## 2. The conventional adders (`rca_adder` … `sparse_tree_adder`)

| Select code | Module | How the carries are formed |
|---|---|---|
| 1 | `rca_adder` | serial prefix: N−1 levels, one node per level |
| 2 | `csla_adder` | 8-bit blocks rippled twice (carry-in 0 and 1), then a mux chain |
| 3 | `cia_adder` | 4-bit ripple groups, then each group incremented by the carry of the groups below, group after group |
| 4 | `sklansky_adder` | divide and conquer, log2 N levels, high fan-out |
| 5 | `brent_kung_adder` | up-sweep tree to G[N:0], then a down-sweep filling in the missing carries, 2·log2 N − 1 levels |
| 6 | `kogge_stone_adder` | level l combines column k with column k − 2^(l−1), log2 N levels |
| 7 | `han_carlson_adder` | Kogge-Stone on odd columns, one extra level for even columns |
| 8 | `ladner_fischer_adder` | Sklansky on odd columns, one extra level for even columns |
| 9, 10, 11 | `sparse_tree_adder` (SPARSITY 2, 4, 8) | local ripple inside each group of SPARSITY columns, a Kogge-Stone tree over the groups gives every SPARSITY-th carry, and carry-select sums inside each group |

All of them are exact for every N that is a power of two (the sparse tree also
needs SPARSITY to divide N). Block sizes and sparsities are parameters.

## 3. Pruning a prefix network (`pruned_prefix_adder`)

This is the part that needs the most care. The module takes three parameters:

* `ARCH`, the underlying network: `ARCH_KS` (Kogge-Stone) or `ARCH_SKLANSKY`.
* `BIN_LEVEL`, four 4-bit level counts with the **most significant bin first**.
  The N+1 prefix columns are cut into four equal bins of N/4 columns (column N
  joins the top bin). Bin b keeps only its first `BIN_LEVEL[b]` levels. Every
  node above that level is deleted, and a deleted node passes its column's value
  on unchanged.
* `N`, the width (a multiple of 4).

Equal levels in every bin is **uniform pruning**. Fewer levels in the low bins is
**weighted pruning**, which puts the error where it costs least.
`BIN_LEVEL = {L,L,L,L}` with L = log2 N gives the exact adder.

The difficult question is what a kept node combines with once the node below it
has gone. Two rules are used. Both reproduce the group labels of the standard
16-bit uniform and weighted examples of pruned Kogge-Stone and Sklansky adders:

**Kogge-Stone.** At level l, a column k that is still within its bin's level
limit combines with column k − 2^(l−1). It takes that column's value *as it
stands after level l−1*. If the lower column's own bin stopped earlier, that is
simply its last kept value. Example, 16 bits, levels {4,3,2,1} from the top bin
down: column 15 ends at 15:4, column 7 at 7:4, column 3 at 3:2. The carries of
the upper columns are exact apart from a missing carry from below column 4.

**Sklansky.** Below its last kept level, a column follows the normal Sklansky
rule (combine with the top column of the neighbouring group). At its last kept
level, every column whose group does not yet reach column 0 combines with the
column just below its current group. In the uniform 16-bit case with three
levels this gives 11:4, 10:4, 9:4, 8:4.

**Error behaviour.** A pruned carry is the generate of a *window* of columns
instead of the full prefix. The sum is wrong exactly when a carry is generated
below that window and propagated all the way through it. With random 64-bit
operands this is rare for 4 or 5 kept levels and frequent for 2.

**Gapped windows.** When neighbouring bins differ by two or more levels (for
example `{6,6,4,2}`), the Kogge-Stone rule makes some high columns combine with
a column of a lower bin that has already been pruned. Their carry then covers
a set of columns with a hole in it. For example, column 32 covers columns 5..32
plus the carry-in column. The RTL applies the rule unchanged. The testbench
model (`adder_model_pkg::group_mask`) computes these column sets explicitly,
so the hole is checked rather than ignored.

## 4. The pruned-adder test chip (`ppa_chip`)

```
            +---------+   rnd_a   +------------------+ op_a/op_b/op_cin  +-------------+
 clk,rst -->| prng64 A|---------->|                  |------------------>|             |
            +---------+           |   adder_regs     |                   | adders_core |
            +---------+   rnd_b   | operand regs     |   res_sum/cout    |  30 x 64-bit|
            | prng64 B|---------->| (load on en[k])  |<------------------|  adders     |
            +---------+           | result regs      |                   +-------------+
 cin ---------------------------->| (load on en_d[k])|
                                  +------------------+
 sel[5:0] --> select_decoder --en[29:0], any--+      | q_sum/q_cout
                                              v      v
                                         one-hot AND-OR mux --> sum[63:0], cout
```

**Select codes** (`adder_pkg::ppa_sel_e`). Code c selects core adder c−1.
Code 0 and codes 31..63 select nothing ("all off"), and the outputs then read
zero.

| Codes | Adders |
|---|---|
| 1–11 | RCA, carry-select, carry-increment, Sklansky, Brent-Kung, Kogge-Stone, Han-Carlson, Ladner-Fischer, Sparse 1/2/3 |
| 12–30 | Pruned 1, 2, 18, 16, 17, 12, 13, 20, 21, 22, 23, 14, 10, 11, 7, 9, 19, Mixed 3, Mixed 4 |

**Pruning configurations** (`ppa_pruned_arch`, `ppa_pruned_levels`; bins
listed from the top, 6 levels = exact for 64 bits):

| Adder | Network | Levels | Adder | Network | Levels |
|---|---|---|---|---|---|
| Pruned 1 | KS | 5,5,5,5 | Pruned 22 | Sklansky | 6,6,4,2 |
| Pruned 2 | KS | 4,4,4,4 | Pruned 23 | Sklansky | 6,6,5,3 |
| Pruned 18 | Sklansky | 5,4,3,2 | Pruned 14 | KS | 5,4,3,2 |
| Pruned 16 | Sklansky | 6,5,4,3 | Pruned 10 | Sklansky | 4,4,4,4 |
| Pruned 17 | Sklansky | 6,4,3,2 | Pruned 11 | Sklansky | 3,3,3,3 |
| Pruned 12 | KS | 6,5,4,3 | Pruned 7 | KS | 3,3,3,3 |
| Pruned 13 | KS | 6,4,3,2 | Pruned 9 | Sklansky | 5,5,5,5 |
| Pruned 20 | KS | 6,6,4,2 | Pruned 19 | KS | 2,2,2,2 |
| Pruned 21 | KS | 6,6,5,3 | Mixed 3 / Mixed 4 | KS / Sklansky | 6,6,3,1 |

These configurations are this design's choice. Only the names and select codes
of the chip's pruned adders are known. The configurations were picked to span
mild to strong, uniform and weighted pruning of both networks. "Mixed" is read
as an exact top half combined with a very short bottom bin. Edit
`ppa_pruned_levels` to build other variants. Nothing else depends on the
values.

**Pipeline and timing.** This assumes `sel` is held. The generators advance on
every clock edge. A generator word is loaded into the selected adder's
operand registers at the next edge. The adder's result is loaded into its
result registers one edge after that, so each adder has a full clock cycle to
settle. The result is on `sum`/`cout` after the edge that loads it. Latency:
two edges from generator to pins, and a new result every cycle.

Only the selected adder's registers load. Every other adder keeps its
operands, so its logic does not switch. This is what lets the supply current
of the adder power domain be measured one adder at a time. When an adder is
selected again, it first shows the result it held from its last run (one
cycle), and then fresh results.

**Generators** (`prng64`). Each one is a 64-bit Galois LFSR with taps
`0xD800_0000_0000_0000` (x^64 + x^63 + x^61 + x^60 + 1), stepped 64 times per
clock. The 64 steps are unrolled into one XOR network, so every operand word is
new. The seeds are parameters of `ppa_chip`.

**Reset.** `rst` is synchronous and active high. It reseeds both generators and
clears every register.

Pads, the separate supply of the adder power domain and the external test
board have no logic function and are not modelled. The chip's logic signals
are the ports.

## 5. Logic-minimised full adders and datapaths

**`plm_full_adder`** offers the following functions. Truth tables are given as
8-bit masks, where bit index {a,b,c} holds the output for that input:

| `SUM_MODE` | Cells flipped | Function | Mask |
|---|---|---|---|
| `SUM_EXACT` | — | a ^ b ^ c | 0x96 |
| `SUM_F1_011` | 011 | one flip | 0x9E |
| `SUM_F1_000` | 000 | one flip | 0x97 |
| `SUM_F2_OR` | 011, 101 | (a ^ b) \| c | 0xBE |
| `SUM_F2_NA` | 000, 011 | ~a \| ~(b ^ c) | 0x9F |
| `SUM_F3_OR` | 011, 101, 110 | a \| b \| c | 0xFE |
| `SUM_F3_NA` | 000, 011, 110 | three flips | 0xDF |

| `CARRY_MODE` | Function | Mask |
|---|---|---|
| `CARRY_EXACT` | majority | 0xE8 |
| `CARRY_F_001` | a & b \| c | 0xEA |
| `CARRY_F_011` | a & (b \| c) | 0xE0 |

Which function suits a node depends on how often each input combination
occurs there. That is decided offline from the application's test vectors, so
here it is a parameter.

**`plm_rca`** is a 16-bit ripple-carry adder. By default its 8 least
significant full adders use `SUM_F2_OR` with an exact carry. With uniformly
random operands, about three sums in four are wrong, but the mean relative
error is only about 0.14 %.

**`plm_array_multiplier`** is an unsigned N x N array multiplier:

* row 0 holds the AND partial products;
* row 1 holds half adders on the partial products;
* rows 2..N−1 hold full adders that take a partial product, the sum from the
  row above and the carry from the row above;
* the last row is a ripple carry-propagate adder (one half adder, then full
  adders).

Every full adder whose sum has weight below 2^`INEXACT_COLS` (default 12 of
the 32 product columns) uses the minimised functions. Half adders stay exact.
With uniformly random 16-bit operands, most products are off in their low bits,
and the mean relative error is about 0.005 %. `INEXACT_COLS = 0` gives an exact
multiplier.

Both modules are purely combinational.

## 6. Top level (`inexact_top`)

| Ports | Meaning |
|---|---|
| `clk`, `rst`, `cin`, `sel[5:0]`, `sum[63:0]`, `cout` | pruned-adder test chip |
| `rca_a[15:0]`, `rca_b[15:0]`, `rca_cin`, `rca_sum[15:0]`, `rca_cout` | minimised adder |
| `mul_x[15:0]`, `mul_y[15:0]`, `mul_z[31:0]` | minimised multiplier |

The two parts share no signals. A synthesis of the whole top comes to about
18k cells and 6k flip-flops, nearly all of them in the chip's per-adder
registers.

## 7. Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=… failures=…`. The reference values never come from the
RTL:

* **Conventional adders**: a 64-bit instance and a smaller one are checked
  against `a + b + cin`, using corner cases (all-propagate chains, all-generate, single
  carries at every bit) and random operands.
* **Pruned adder**: 16-bit instances are checked against the hand-derived group
  labels of the standard uniform and weighted KS/Sklansky examples. 64-bit
  instances are checked against `adder_model_pkg::window_add`, which computes
  each carry from its column set. The exact configuration is checked against
  `a + b`.
* **Chip** (`tb_ppa_chip`, `tb_inexact_top`): a cycle-level model runs beside
  the RTL. It includes the generators, per-adder registers, delayed enables and
  output mux. The pins are compared on every cycle while the select code walks
  through all 64 codes, with random carry-in and random resets.
* **Minimised datapaths**: the RTL is compared with cell-by-cell models built
  from the truth-table masks above. The tests also measure the error and check
  it against the bounds given above.

`tb_inexact_top` runs the whole design at its default parameters. It counts
each mechanism and fails if any count stays zero. The mechanisms are:

* each of the 30 adders delivering a result;
* the all-off code;
* reset;
* a reselected adder showing its held result;
* pruned adders giving both wrong and right sums;
* erroneous and exact results from the minimised adder and multiplier.

Two further testbenches measure error on uniformly random operands.
`tb_pruned_error_sweep` feeds all 30 chip adders and prints each one's error
rate and mean relative error. It checks that fewer kept levels always mean
more error, and that an exact top half beats uniform pruning. With the
configurations above, the mean relative error ranges from about 1e-18 (mild
weighted pruning) to about 2 % (Kogge-Stone with 2 levels).
`tb_plm_error_sweep` runs the 16-bit adder with every minimised sum function.
The mean relative error is 0.07 % for one flipped cell, 0.14 % for two and
0.2 % for three. The testbench also checks that flipping more cells never
lowers the result.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/adder_pkg.sv $(ls rtl/*.sv | grep -v adder_pkg) \
    tb/adder_model_pkg.sv tb/tb_inexact_top.sv --top-module tb_inexact_top
obj_dir/Vtb_inexact_top
```

The full-design testbench needs about a minute to compile and a few seconds to
run.

## 8. Where this design departs from, or goes beyond, its sources

* The configurations of the pruned adders on the chip and the meaning of
  "Mixed" are assumed (section 4).
* The weighted Sklansky example is usually drawn with its top bin labelled
  15:0..12:0. The rule used here, which reproduces every other label, gives
  15:4..12:4. The rule was kept.
* The sparse-tree sparsities (2, 4, 8), the carry-select block size (8), the
  generator type and seeds, the reset behaviour and the register pipeline are
  this design's own choices.
* How many bits of the minimised adder and multiplier use inexact cells, and
  which function they use, are defaults chosen here. The choice is meant to be
  made per application from input statistics, which is not automated.
* The algorithms that choose nodes to prune or minimise (significance x
  activity ranking, input-probability-guided bit flips) are design-time
  procedures. Their result enters as parameters.
* No power, delay or energy results can be reproduced from RTL simulation.
  Only the functional error is checked.

## 9. Files

* `rtl/adder_pkg.sv`: shared types, the prefix combine function, chip constants,
  select codes and pruning configurations.
* `rtl/prefix_pre.sv`, `rtl/prefix_post.sv`: column (G,P) setup and sum/carry-out
  formation.
* `rtl/*_adder.sv`: the conventional and pruned adders.
* `rtl/prng64.sv`, `rtl/select_decoder.sv`, `rtl/adder_regs.sv`,
  `rtl/adders_core.sv`, `rtl/ppa_chip.sv`: the test chip.
* `rtl/plm_full_adder.sv`, `rtl/plm_rca.sv`, `rtl/plm_array_multiplier.sv`: the
  minimised datapaths.
* `rtl/inexact_top.sv`: the top level.
* `tb/adder_model_pkg.sv`: reference models shared by the testbenches.
* `tb/tb_*.sv`: one testbench per module.
