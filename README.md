# EHSD: a fully pipelined hybrid sphere detector for 4x4 16-QAM MIMO

A MIMO receiver has to find the transmitted symbol vector `x` that best
explains the received vector `y = Hx + n`. After a QR decomposition of the
channel (`H = QR`), this becomes a search for the `x` that minimises
`||Q^H y - R x||^2`. Because `R` is upper triangular, the search can go one
symbol at a time, from the last row of `R` to the first, as a tree search.

This RTL implements an *enhanced hybrid sphere detector* (EHSD). It is a
breadth-first tree search with a fixed shape chosen offline:

* the top levels are **fully expanded**, so every node is kept;
* the lower levels are **K-best** levels, and the number of survivors `K` can
  differ from level to level;
* at each K-best level the survivors are chosen by one **global sort** of all
  candidate nodes, not by sorting small groups separately.

Everything has a fixed size and there are no loops or data-dependent
decisions. This lets the whole detector be one deep pipeline that accepts a
new problem every clock. Its latency is fixed: 64 clocks for the default 4x4
configuration.

## The search tree

A 4x4 complex system is handled in its real-valued form, which has
`L = 2N = 8` levels. Each level decides one real symbol from
`{-3, -1, +1, +3}`, coded in 2 bits as `value = 2*code - 3`. Level `m` uses
row `m` of `R`. Level 8 is the top (the last row, one non-zero entry) and
level 1 is the bottom (the first row, eight entries).

A **node** holds the symbols decided so far and its *remaining squared
radius*:

```
r_{m-1}^2 = r_m^2 - ( (Q^H y)_m - sum_{i>=m} R_mi x_i )^2 ,   r_{L}^2 = r_sph^2
```

A node is inside the sphere while its remaining radius is `>= 0`. A larger
remaining radius means a smaller partial distance, so every sort in the design
ranks nodes by descending remaining radius. Nodes that leave the sphere are
not removed. They carry on with a negative radius, which saturates at the most
negative 32-bit value, so they always rank below every node still inside.

The default configuration, `K_BEST = {4,16,8,8,4,4,4,1}`, lists the nodes kept
after each level from level 8 down to level 1:

| level | parents in | LPBs | children | selection      | kept | clocks (LPB + selection) |
|------:|-----------:|-----:|---------:|----------------|-----:|--------------------------|
| 8     | 1          | 4    | 4        | none (full)    | 4    | 3                        |
| 7     | 4          | 16   | 16       | none (full)    | 16   | 3                        |
| 6     | 16         | 64   | 64       | NSB 64 -> 8    | 8    | 3 + 10                   |
| 5     | 8          | 32   | 32       | NSB 32 -> 8    | 8    | 3 + 7                    |
| 4     | 8          | 32   | 32       | NSB 32 -> 4    | 4    | 3 + 7                    |
| 3     | 4          | 16   | 16       | NSB 16 -> 4    | 4    | 3 + 5                    |
| 2     | 4          | 16   | 16       | NSB 16 -> 4    | 4    | 3 + 5                    |
| 1     | 4          | 16   | 16       | compare 16 -> 1| 1    | 3 + 4                    |

That is 196 level processing blocks in total. Adding one clock for the input
register and one for the XR multiplier gives the 64-clock latency.

## Blocks

| module | role |
|---|---|
| `ehsd_pkg` | widths, symbol coding, the default K vector, and elaboration-time functions for the latency and timing of each level |
| `ehsd_detector` | top level: input registers, XR multiplier, the 8 levels with their selection stages, and side-data delay chains |
| `ehsd_xr_multiplier` | all products `x * R_mi` for `x` in {-3,-1,+1,+3}, made with a shift and adders (`3R = R + 2R`) and negation; 1 clock |
| `ehsd_level` | the LPBs of one level: 4 per parent, child `4p+c` gets symbol code `c` |
| `ehsd_lpb` | level processing block; 3 pipeline stages (see below) |
| `ehsd_nsb` | node selection block: pads the input to a power of two, sorts it with a Batcher network, keeps the first `K` |
| `ehsd_batcher_sorter` | Batcher odd-even merge network of `ehsd_csw2` elements, with a register after every `REG_EVERY` (default 2) compare stages |
| `ehsd_csw2` | compare-and-swap: the node with the larger remaining radius goes to output `x` |
| `ehsd_compare` | final 16 -> 1 selection: a registered binary tree of 2-input selections |
| `ehsd_delay` | register chain that carries per-level side data next to the node pipeline |

### Level processing block

The LPB is the only block that does arithmetic on every node. It has three
stages:

1. A 4-to-1 multiplexer for each term picks `R_mi x_i` from the table of
   products, using the parent's symbol for `i > m` and the LPB's own fixed
   symbol for `i = m`. A first rank of pairwise adders follows. Then
   register 1.
2. The rest of the adder tree runs, and the sum is subtracted from
   `(Q^H y)_m`. Then register 2.
3. The residual is squared with the block's only multiplier, and the square is
   subtracted, with saturation, from the parent's radius. Then the output
   register.

The residual is kept at full precision (22 bits) and squared exactly, so the
datapath has no rounding. Its only non-linearity is the saturation of the
radius.

### Node selection

The Batcher odd-even merge network on `n = 2^p` inputs has `p(p+1)/2` compare
stages. With a register after every second stage, its latency is 5, 7 and 10
clocks for 16, 32 and 64 inputs. Stages after the last register are
combinational, so a 21-stage network has one unregistered stage at its
output. The K-best selection is just wiring to the first `K` outputs. The
network is not stable: nodes with equal radius can come out in either order.
Setting `REG_EVERY = 1` puts a register after every compare stage. This makes
the pipeline deeper (21 clocks for 64 inputs) at the cost of more flip-flops.

With `GROUP > 0`, `ehsd_nsb` is instead built as a *recursive* global sort.
The nodes are split into groups of `GROUP`, each group keeps its own K best,
and the survivors go round again until one network of at most `GROUP` inputs
is left. The K best of all nodes are always among the K best of their own
group, so the selected set is the same as with a single network; only the
size and latency change. The detector passes `GS_GROUP` down to every NSB.
With `GS_GROUP = 16` the 4x4 latency becomes 73 clocks.

When an input count is not a power of two (this happens only in the 8x8
configuration), the network is padded with most-negative-radius nodes. The
comparators that see only padding then have constant inputs.

### Keeping a problem together across levels

Each level needs row `m` of the product table and `(Q^H y)_m` for the same
problem as the nodes it is processing. Both are carried to level `m` in
`ehsd_delay` chains, whose lengths come from `ehsd_pkg::level_time`. The root
radius `rsph2` enters level 8 together with the first product row. A valid
bit travels with the data through every pipelined block. There is no
back-pressure, and bubbles (`in_vld` low) are allowed in any pattern.

## Interface of `ehsd_detector`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, which clears only the valid bits |
| `in_vld` | in | 1 | a problem is presented this clock |
| `r_mat[m][i]` | in | 8x8 x 15 signed | `R_(m+1)(i+1)`; only `i >= m` is read |
| `y_til[m]` | in | 8 x 17 signed | `(Q^H y)_(m+1)` |
| `rsph2` | in | 32 signed | initial squared radius (per problem, >= 0) |
| `out_vld` | out | 1 | result valid, exactly 64 clocks after `in_vld` |
| `x_hat[m]` | out | 8 x 2 | code of real symbol `m+1` |
| `out_rad` | out | 32 signed | `rsph2` minus the squared distance of `x_hat` |
| `out_inside` | out | 1 | `out_rad >= 0` |

The arithmetic is exact integer arithmetic, so the binary point of `R` and
`y` is up to the user. The testbenches use 1.0 = 1024, which makes
`r_sph = 3` an `rsph2` of `9 * 2^20`. If no kept node stays inside the sphere,
`x_hat` is the least-bad kept vector and `out_inside` is low.

Parameters: `N_ANT` (4), `K_BEST` (16-entry array, top level first), `RAD_W`
(32), `REG_EVERY` (2), `GS_GROUP` (0, one sorting network per NSB).
`ehsd_pkg::detector_latency()` gives the latency for any setting. The 8x8 configuration is
`N_ANT = 8, K_BEST = '{4,16,28,28,24,16,12,12,8,8,8,8,4,4,4,1}`. It has 740
LPBs and a latency of 174 clocks. Elaboration-time assertions reject a
`K_BEST` that keeps more nodes than a level produces, or that does not end
in 1.

## Where this design departs from or fills in the description it follows

* **Latency split.** The LPB (3 clocks) and NSB latencies (10/7/7/5/5) follow
  the original design and add up to 58 of its 64 clocks. The other six (input
  register, XR register, and a 4-clock compare tree) are this design's own
  choice.
* **Sort direction.** The original describes keeping the nodes of "smallest
  radius" while its LPB produces a *remaining* radius. Here the best node is
  the closest one, which is the one with the largest remaining radius.
* **Global sort.** The original outlines a recursive group-wise global sort
  but reports the latencies of a single Batcher network per level. The
  single network is the default. The recursive form is available through
  `GS_GROUP`; its group size is not specified, so that choice is left to the
  user.
* **Level-4 K.** One passage suggests K = 8 at level 4. The configuration
  table and the list of sorter sizes give K = 4, which is what is built.
* **Chosen here, not specified:** the 2-bit symbol code, the 32-bit
  saturating radius, the valid-bit protocol and reset, the output when the
  sphere is empty, the child ordering, and tie handling in the sorters.
* **8x8.** With padding to powers of two, the latency is 174 clocks, not the
  176 reported for the original. The original's reported 96-input/8-output
  sorter and its DSP count do not match its own K vector. The RTL follows
  the K vector.
* **Not included:** QR decomposition and the computation of `Q^H y`, the
  complex-to-real conversion, and the mapping of symbols back to bits. The
  detector expects `R` and `Q^H y` as inputs.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
values computed in the testbench, checks the latency cycle by cycle, and
prints `TB_RESULT checks=N failures=M`.

* `tb_ehsd_detector` runs the default 4x4 configuration end to end. It sends
  600 random problems back to back with random bubbles, mixing noise-free,
  lightly and heavily noisy, and empty-sphere cases. Each result is checked
  against a breadth-first model of the same search written in the testbench.
  Noise-free problems must return the transmitted vector with zero distance,
  and every result must arrive exactly 64 clocks after its problem. The test
  also counts, and requires, pruned nodes, truncations that drop nodes still
  inside the sphere, empty spheres, back-to-back issue and bubbles.
* `tb_ehsd_detector_gs` repeats the 4x4 test with `GS_GROUP = 16`: 300
  problems and a latency of 73.
* `tb_ehsd_detector_configs` builds the detector with one of the
  alternative K vectors of the BER study, `{4,16,20,24,16,8,4,1}`. This
  configuration needs 128-input padded sorters and has a latency of 85. The
  test runs 150 problems. Its `NCFG` setting adds three more alternative
  configurations, each of which takes longer to compile.
* `tb_ehsd_detector_8x8` does the same for the 8x8 configuration: 200
  problems and a latency of 174.
* The block tests cover:
  * every NSB size of the 4x4 detector, a padded 48 -> 12 block, a 64 -> 8
    block with `REG_EVERY = 1`, and recursive 64 -> 8 and 32 -> 4 blocks;
  * a 32-input sorter with many equal keys;
  * LPBs at the top, middle and bottom levels, including saturation, and a
    full 32-LPB level;
  * the XR multiplier at the extremes of the 15-bit range;
  * the compare tree and the delay chain.

A tie in remaining radius across a truncation boundary could, in principle,
make the RTL and the model keep different nodes. The detector test accepts
a different vector only if its radius equals the model's. No such tie
occurred in the runs.

To simulate with Verilator, for example the full detector:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/ehsd_pkg.sv tb/tb_ehsd_detector.sv --top-module tb_ehsd_detector
./obj_dir/Vtb_ehsd_detector
```

The 4x4 test builds in about a minute and a half and runs in well under a
second. The 8x8 test takes about two minutes to build.

What is not verified: bit error rate against a channel model, and timing or
area on an FPGA.
