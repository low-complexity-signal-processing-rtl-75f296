# Sparse tree classifiers in logic: a multiplier-free detector and a tree-driven arctangent

A correlation detector normally computes `C = a'x` over a window of samples
and compares it with a threshold. Often only that comparison matters, and
for most inputs the first few bits of the samples already settle it. A
**sparse binary tree classifier** makes use of this. It looks at one bit
of the input at a time, most informative bit first. At every node it either
stops with a decision or branches on the bit it just read. Because most
inputs are settled near the root, the tree stays small ("sparse").

This RTL builds such a tree as a **parallel array of identical small nodes**.
Each node has four flip-flops and a handful of gates. The input vector
enters the root as a serial bit stream. An enable token "snakes" down
the tree from parent to child, and only the nodes on the path actually
taken ever switch. There is no arithmetic anywhere on the detection path.

Two engines are provided, side by side in `tree_classifier_top`:

* **`tree_detector`**: template detection. It decides H1 (template plus
  noise) or H0 (noise only) for a window of samples.
* **`tree_atan2`**: two-input arctangent. The same kind of tree sorts
  `(x, y)` into one of 41 rectangles. A small multiply-add then evaluates
  that rectangle's affine approximation of `atan2(y, x)`.

## The node and its timing

`tree_node` is the heart of the design. Its four flip-flops are:

| flip-flop | next value | purpose |
|-----------|-----------|---------|
| `dout_q`  | `din & vin` | passes the stream on to both children, one clock later; gated so an idle node does not toggle |
| `vind1_q` | `vin` | enable delayed by 1 |
| `vind2_q` | `vind1_q` | enable delayed by 2 |
| `din1_q`  | `dout_q` when `dlatch` | the bit this node examines |

The combinational outputs are:

* `dlatch = vind1 & ~vind2`: a one-clock pulse, one clock after `vin` rises.
* `voutr = vind2 & din1` and `voutl = vind2 & ~din1`: exactly one child is
  enabled, two clocks after `vin` rises. Bit 1 goes right, bit 0 goes left.
* `rout = routl | routr`: results travel back toward the root with no
  clocking.

The stream is delayed by one clock per level, and the enable by two. So a
child's `vin` rises in the same clock as the *next* bit of the stream
arrives on its `din`. Each level therefore costs two clocks and consumes
exactly one bit. With the root's `vin` rising in clock 0, and bit `k` of the
examination order put on the root's `din` in clock `k`:

| clock | root | depth-1 node | depth-2 node |
|------:|------|--------------|--------------|
| 0 | `vin`↑, sees bit 0 | | |
| 1 | `dlatch`, Dout = bit 0 | | |
| 2 | Din1 = bit 0, enables a child | `vin`↑, sees bit 1 | |
| 4 | | enables a child | `vin`↑, sees bit 2 |
| 2L | | | node at depth L enabled, sees bit L |

**Leaves are not nodes.** A leaf at depth `D` is only the parent's branch
enable, wired back into the parent's `routl`/`routr`:

* an H1 leaf returns the enable itself;
* an H0 leaf returns 0;
* an estimator leaf returns its leaf number: the enable ANDed with a
  constant, on an `RW`-bit result bus.

The root's `rout` therefore shows the reached leaf's value from clock `2D`
onward, for as long as `vin` stays high.

**Between classifications** the root's `vin` has to drop for only one clock.
That is enough: a node's `dlatch` fires whenever its `vin` was low two
clocks before it rises. The previous descent keeps draining out of the
deep levels while the next one starts at the root. The tail of a depth-`D`
descent is gone 2·DEPTH clocks after the restart, which is exactly when the
next result is sampled, so the two never collide at the sampling point. The
combinational `rout` is *not* clean in between. Only sample it at the time
the feeder uses.

**The nodes have no reset**, as in the original node. Holding `vin` low
clears them. After reset the feeder holds the root's `vin` low for
2·DEPTH+2 clocks before it accepts work.

## Describing a tree

`sparse_tree` builds the array from a parameter table `TREE` of type
`tree_pkg::node_t` (one entry per internal node):

* `c0` is the branch taken on bit 0, `c1` the branch taken on bit 1.
* A branch is `{is_node, idx}`. When `is_node` is set, `idx` is the child
  node's number. Otherwise `idx` is the leaf value (1 = H1, 0 = H0, or a
  leaf number).
* Nodes are numbered breadth first, with the root as 0. All nodes at depth
  `L` examine the same bit `ORDER[L]` (a **fixed examination order**). That
  is why one serial stream serves every node.

An elaboration-time check rejects a table in which a node does not have
exactly one parent with a smaller number.

The trees themselves are designed offline. The defaults are in
`det_tree_pkg` and `atan_tree_pkg`, and the method is:

* **Examination order (detector).** Bit `j` of sample `i` is ranked by
  `|a_i|·2^j`, largest first. The MSB of the sample with the largest template
  weight is examined first, and a bit is never examined before the higher
  bits of the same sample.
* **Growing the detector tree.** Every leaf confines the samples to a box,
  because its examined bits fix a range for each sample. With white Gaussian
  noise, the probability of reaching the leaf under H0 and under H1 is a
  product of per-sample Gaussian interval probabilities. Each leaf decides
  for the more likely hypothesis. While `P_F` or `P_M` misses its goal, the
  leaf with the largest `P(leaf|H0)/P_F,goal` (for an H1 leaf) or
  `P(leaf|H1)/P_M,goal` (for an H0 leaf) is split.
* **Example detector.** Goals `P_F = 1e-4`, `P_M = 1e-5`, noise variance 256.
  Template `[85, 96, -51, -58, 31, 35, -19, -22]` with 8-bit samples that
  saturate at the 8-bit range. The result has 44 internal nodes, 45 leaves
  and depth 18. It reaches `P_F = 9.4e-5` and `P_M = 8.8e-6`.

## The arctangent engine

`x` and `y` are 5-bit two's-complement numbers, read as `x/16` and `y/16`.
The tree examines their bits in the interleaved order `x4, y4, x3, y3, …`.
Each of its 41 leaves is an axis-aligned rectangle, and inside rectangle `r`:

    atan2(y, x) ≈ a_r·x + b_r·y + c_r
               = (a_r·x_k + b_r·y_k + c_r) + (a_r·x_u + b_r·y_u)

`x_k` is the part of `x` fixed by the examined bits. `x_u` is the rest: the
unexamined low bits. The first bracket is a per-leaf constant. Only the
short values `x_u` and `y_u` are multiplied at run time.

`atan_affine_unit` stores, per leaf and with 10 fraction bits:

* `k = a·lo_x + b·lo_y + c`, where `lo` is the rectangle's lower corner;
* the slopes per LSB, `a/16` and `b/16`;
* `ux` and `uy`, the numbers of unexamined low bits.

It computes `k + a·x_u + b·y_u`, where `x_u` is the low `ux` bits of `x`
with its sign bit inverted (offset binary). That equals `x − lo_x` in every
case.

The coefficients are least-squares fits over the integer points of each
rectangle. Rectangles were split, largest squared error first, until there
were 41. The mean-square error over all 1024 inputs is **5.26e-4 rad²**
(worst case 0.12 rad), with the ±π cut on the negative x axis reproduced.

## Interfaces and timing

All engines use a valid/ready input handshake and a one-clock `out_valid`
pulse. Reset is synchronous and active low (`rst_n`).

| engine | accept → result | interval between inputs | result |
|--------|-----------------|-------------------------|--------|
| `tree_detector` (DEPTH 18) | 2·18+2 = 38 clocks | 38 clocks | `detect` (1 = H1) |
| `tree_atan2` (DEPTH 9) | 2·9+3 = 21 clocks | 20 clocks | `leaf`, `angle` (signed, 10 fraction bits, radians) |

`tree_feeder` is the control logic shared by both engines:

* It loads the vector's bits, in `ORDER`, into a shift register.
* It holds the root's `vin` high for 2·DEPTH+1 clocks and samples `rout` in
  the last of them.
* It drops `vin` for at least the one clock in which it accepts the next
  vector.

`tree_detector` also brings out `node_active`, the enable of every node, so
switching activity can be observed.

## How far to trust it

`tree_feeder` carries assertions for its output rules: `out_valid` lasts one
clock, the root enable is low when a result is presented, and it is never
high for longer than one descent.

The testbenches are self-checking, and each prints
`TB_RESULT checks=… failures=…`. Each testbench was also run against a
deliberately broken copy of its module, and it caught the fault.

| testbench | what it shows |
|-----------|---------------|
| `tb_tree_node` | node against a cycle model: stream delay, 2-clock enable delay, latched bit, OR of results; gaps of 1–3 clocks |
| `tb_sparse_tree` | both example trees driven directly; a path to every leaf; result at exactly 2·depth; only path nodes ever enabled; back-to-back descents with one-clock gaps |
| `tb_sparse_tree_325` | a 325-node / 326-leaf pseudo-random tree, the size quoted for a 64-sample rifle-signature detector; leaves down to its full depth of 25 are reached |
| `tb_tree_feeder` | flush length, Vin window, bit order on Din, sampling clock, latency, back-to-back and idle gaps |
| `tb_tree_detector` | 4000 noisy windows: every decision equals the tree-table walk; latency and rate; 1 false alarm in 2000 H0 trials, no misses in 2000 H1 trials; the exact correlator at half the template energy agrees on 3999 of 4000; on average 2.65 levels descended under H0 |
| `tb_atan_affine_unit`, `tb_tree_atan2` | all 1024 inputs and random ones: exact integer results, all 41 rectangles used, MSE below 6e-4 |
| `tb_tree_classifier_top` | both engines at default size, concurrently; counts that flush, H1, H0, early (depth ≤ 2) and deep decisions, one-clock Vin gaps, idle off-path nodes and both sides of the ±π cut all occur |

What is this design's own, and not from the original description:

* The example trees. The rifle-signature template (64 samples, 325 internal
  nodes) is not available as numbers, so the detector default is an 8-sample
  example designed with the same method. The RTL takes any tree of that kind
  as parameters (`N_NODES`, `DEPTH`, `TREE`, `ORDER`).
* The sample width (8 bits).
* The gates producing `dlatch` and the branch enables.
* Which branch is "right" (bit 1).
* The multi-bit result bus for estimator leaves.
* The handshake, the reset, and the flush.
* Arithmetic formats and the arctangent's interleaved bit order.

The fitted arctangent reaches 5.26e-4 rather than the 4.8e-4 reported for
its 41-leaf original.

Not built:

* the offline tree-design and FPGA placement programs;
* variable (per-node) bit examination orders;
* the input normalization and octant reflection suggested for the
  arctangent;
* clockless (asynchronous) nodes.

## Simulating and changing it

Packages go first on the command line. From the repository root:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
      rtl/tree_pkg.sv rtl/det_tree_pkg.sv rtl/atan_tree_pkg.sv tb/tb_ref_pkg.sv \
      tb/tb_tree_classifier_top.sv --top-module tb_tree_classifier_top
    ./obj_dir/Vtb_tree_classifier_top

Replace the testbench name to run any other bench. `tb_ref_pkg` holds the
reference tree walks and the Gaussian noise source.

To use a different detector, design a tree with the method above and
pass these parameters to `tree_detector`:

* `TREE`: breadth-first node table;
* `ORDER`: the bit examined at each depth;
* `N_NODES`;
* `DEPTH`: the number of internal levels, which is also the maximum leaf
  depth;
* `N_WORDS` and `WORD_W`.

The feeder's timing follows `DEPTH` automatically.

Files in `rtl/`:

* `tree_pkg.sv`: shared types;
* `det_tree_pkg.sv`, `atan_tree_pkg.sv`: example trees and coefficients;
* `tree_node.sv`, `sparse_tree.sv`, `tree_feeder.sv`: the tree machinery;
* `tree_detector.sv`, `atan_affine_unit.sv`, `tree_atan2.sv`: the engines;
* `tree_classifier_top.sv`: both engines together.
