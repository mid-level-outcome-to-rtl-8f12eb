# Two-minimum search by candidate collection (SMpro)

A min-sum LDPC decoder's check node needs three values for each row of
the parity-check matrix. It needs the smallest incoming magnitude (MIN1),
the second smallest (MIN2) and the position of the smallest (IDX). Every
edge of the node gets MIN1 back, except edge IDX, which gets MIN2. A
high-throughput decoder runs many such searches in parallel. The
searching module (SM) that produces the three values therefore takes up
much of the decoder's area.

A simple comparator tree finds MIN1 quickly, but MIN2 is harder. Finding
it after MIN1 means either a second search or a wide multiplexor that
picks values out by IDX. This design does neither. **Any value that could
be MIN2 has already lost to MIN1 in one direct comparison in the MIN1
tree.** So, while the tree finds MIN1, it also records the value that
lost to the eventual winner at each of its log2(N) levels. A few small
comparators then pick MIN2 from those log2(N) candidates. No N-to-1
multiplexor is needed anywhere.

The RTL here is written from a published description of that structure
(the "PROk" unit and the "SMpro" searching module). It is purely
combinational and parameterised in the number of inputs and their width.

## Why log2(N) candidates are enough

Take a balanced binary tree of comparators over N = 2^m inputs. Call the
final winner p, so MIN1 = din[p]. At level l (l = 0 is the leaves), the
block of 2^(l+1) inputs that contains p is made of two halves. One half
contains p. The other half (the *sibling block* of size 2^l) sends its
own minimum up to be compared with p's half. That minimum loses to MIN1
there, or ties with it.

Every input other than p lies in exactly one of these m sibling blocks.
The smallest of them is therefore the smallest of the m sibling-block
minima, and those minima are exactly the values that lost directly to
MIN1. MIN2 is the smallest of the m losers. If MIN1 occurs more than once,
the copy that lost to p is among the candidates, and MIN2 comes out equal
to MIN1, as it should.

## The PROk unit

`pro_unit` is the building block. It outputs MIN1 of k inputs and the m =
log2(k) candidates, and it is defined recursively:

```
                 din[0 .. k/2-1]            din[k/2 .. k-1]
                       |                          |
                +-------------+            +-------------+
                |  PRO(k/2)   |            |  PRO(k/2)   |
                +-------------+            +-------------+
                  |min     |m-1 cand         |min     |m-1 cand
                  |        +---------+  +----|--------+
                  v                  |  |    v
                +----------------------------+
                |  C1M2: comparator + 2 mux  |---- sel (1 = high half smaller)
                +----------------------------+          |
                   |min           |max                  |
                 MIN1         cand[m-1]       m-1 x 2:1 mux, steered by sel
                                              -> cand[0 .. m-2]
```

- **PRO2** is a single C1M2: one comparator and two w-bit 2-to-1
  multiplexors that output both the smaller and the larger value.
- **PROk** compares the two half minima in a C1M2. The smaller is MIN1.
  The larger lost to MIN1 at the top level, so it becomes the newest
  candidate, `cand[m-1]`.
- The other m-1 candidates are those of the **winning half**. m-1 2-to-1
  multiplexors take them, steered by the same comparison bit. The losing
  half's candidates lost to a value that is not MIN1, so they are
  dropped.

Each level adds one comparator and m+1 two-input multiplexors. Because
the candidates are collected during the MIN1 search, the wide
IDX-controlled multiplexors of a sort-based SM are not needed.

In the RTL the recursion is unrolled level by level with generate loops
(`g_lvl[l].g_node[j]`). Node j of level l is the PRO(2^(l+1)) unit for
inputs j·2^(l+1) … (j+1)·2^(l+1)−1. `cand_o[l]` is the value that lost to
MIN1 at level l.

## MIN2 and the C1M1 tree

`min2_tree` reduces the m candidates with m−1 C1M1 units, arranged as a
balanced tree. A C1M1 is one comparator and one multiplexor that passes
only the smaller value. For eight inputs this is two C1M1 units:
`min(min(cand[0], cand[1]), cand[2])`. For other sizes, neighbours are
paired low index first, and an odd value passes up unchanged.

## The index of MIN1

`idx_gen` builds IDX from the tree's comparison bits. `pro_unit` brings
these out as one flat vector `cmp_o` of K−1 bits. It holds level 0 first
(the K/2 leaf comparators, lowest index first), then level 1, and so on,
with the root last. A bit is 1 when the higher-index side was strictly
smaller. For eight inputs, with c_lj being comparator j of level l:

```
IDX[2] = c20
IDX[1] = c20 ? c11 : c10
IDX[0] = one of c00, c01, c02, c03, selected by {IDX[2], IDX[1]}
```

This is a tree of 2-to-1 multiplexors that walks from the root down the
winning path. The RTL writes the same walk as a loop for any
power-of-two K.

## Input counts that are not a power of two

`sm_pro` builds the tree for K = 2^ceil(log2 N) inputs. It ties the
K−N unused inputs to the largest value (all ones). Synthesis then removes
every comparator and multiplexor fed only by constants, which prunes the
leaf nodes of the balanced tree. Ties go to the lower index, so a padded
input never becomes MIN1, even when every real input is all ones.

## Interface of `sm_pro`

| port     | dir | width          | meaning                                             |
|----------|-----|----------------|-----------------------------------------------------|
| `din`    | in  | N × W (packed) | unsigned magnitudes, `din[0]` is input 0            |
| `min1_o` | out | W              | smallest input                                      |
| `min2_o` | out | W              | second smallest (equals `min1_o` if the minimum repeats) |
| `idx_o`  | out | ceil(log2 N)   | lowest index whose value equals `min1_o`            |

| parameter | default | meaning                                   |
|-----------|---------|-------------------------------------------|
| `N`       | 8       | number of inputs (at least 2)             |
| `W`       | 6       | bits per magnitude                        |

The module has no clock and no reset. The outputs are a combinational
function of `din`, so one search can be done every cycle if a register
stage is placed around it.

## Cost and delay

Let K = 2^ceil(log2 N) and m = log2 K. In units of one comparator stage
(a comparator followed by its multiplexor):

| item                                   | formula                                 | N = 8 |
|----------------------------------------|-----------------------------------------|-------|
| comparators in PROk                    | K − 1                                   | 7     |
| comparators in the C1M1 tree           | m − 1                                   | 2     |
| w-bit 2-to-1 muxes in PROk             | Σ over l of (K/2^(l+1))·(l+2)           | 18    |
| w-bit 2-to-1 muxes in the C1M1 tree    | m − 1                                   | 2     |
| 1-bit muxes for IDX                    | K − m − 1                               | 4     |
| stages to MIN1                         | m                                       | 3     |
| stages to MIN2                         | m + ceil(log2 m)                        | 5     |

The synthesised eight-input, 6-bit module has 9 comparators and
20 six-bit multiplexors, which matches the table. All candidates become
valid together, after the root comparison steers the last multiplexor
level. This is why MIN2 uses a balanced tree rather than a chain.

## What follows the paper and what is this design's own choice

These parts follow the paper:

- the C1M2 and PRO2 units;
- the recursive PROk construction, with one comparator and m+1 two-input
  multiplexors per level;
- the eight-input SMpro, built as PRO8 followed by two C1M1 units;
- the index-generation multiplexor tree;
- pruning for input counts that are not a power of two.

These are this design's own choices, because the paper does not state
them:

- **Width.** The paper writes "w-bit" but gives no value. Here
  `W = 6`.
- **Ties.** Each comparator tests `b < a` strictly, so the lower index
  wins a tie. MIN1's index is therefore the lowest index holding the
  minimum.
- **No registers.** The paper gives delays, not a pipeline. The module is
  purely combinational, with no clock or reset.
- **The largest candidate.** The larger output of the root C1M2 is used
  as the m-th candidate. The paper implies this but does not say it.
- **The IDX output.** The paper describes how IDX is generated. Bringing
  it out of `sm_pro` is a choice.
- **Pruning.** The unused inputs are padded with all ones. Pruning
  comparators by hand would give the same netlist after constant
  propagation.
- **MIN2 tree.** For more than three candidates, the C1M1 tree is
  balanced. Neighbours are paired low index first.

These are not included:

- the LDPC decoder around the searching module. The paper does not
  design it.
- the sort-based and tree-based searching modules that the paper only
  compares against.

The design targets eight inputs by default. Codes with row degrees above
100, which motivate the structure, need `N` set to that degree, for
example `N = 128`. `tb_sm_pro_sizes` simulates N = 128 with 5-bit
inputs. That needs 127 comparators in PRO128 and 6 in the C1M1 tree.

## Files

| file                   | contents                                              |
|------------------------|-------------------------------------------------------|
| `rtl/sm_pkg.sv`        | default sizes; layout of the flat comparison vector   |
| `rtl/c1m2.sv`          | comparator + min/max multiplexors                     |
| `rtl/c1m1.sv`          | comparator + min multiplexor                          |
| `rtl/pro_unit.sv`      | PROk: MIN1 and log2 K candidates                      |
| `rtl/min2_tree.sv`     | C1M1 tree choosing MIN2                               |
| `rtl/idx_gen.sv`       | IDX from the comparison bits                          |
| `rtl/sm_pro.sv`        | top: the searching module                             |
| `tb/tb_*.sv`           | one self-checking testbench per module, plus `tb_sm_pro_sizes` |

## Verification

Each testbench computes its expected values independently of the RTL,
mostly by linear scans. It prints `TB_RESULT checks=<n> failures=<n>` and
has a cycle watchdog.

- `tb_c1m2`, `tb_c1m1`: all 4096 operand pairs at W = 6.
- `tb_pro_unit`: K = 8 and K = 16. It checks MIN1, every candidate
  against the minimum of its sibling block, and every comparison bit.
  The inputs are random vectors, many from a narrow range so that ties
  are common, plus directed all-equal, all-zero, all-max and descending
  vectors.
- `tb_idx_gen`: all 128 comparison patterns at K = 8, checked against
  the formula above. At K = 16 it uses comparison bits derived from
  random values, checked against the argmin.
- `tb_min2_tree`: every triple of 4-bit values (three candidates), plus
  random vectors with five candidates.
- `tb_sm_pro`: the top at its default parameters. It applies one vector
  per clock and checks the outputs in the same cycle, including the
  cycle count. For every edge it also checks the magnitude a check node
  would return against the minimum over the other inputs. It requires
  several cases to occur at least once: MIN1 at each of the eight
  positions, MIN2 from each of the three tree levels, repeated minima,
  and all-zero and all-max inputs.
- `tb_sm_pro_sizes`: N = 2, 3, 5, 16 and 128, including pruned trees whose
  real inputs all tie with the padding.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/sm_pkg.sv tb/tb_sm_pro.sv --top-module tb_sm_pro
./obj_dir/Vtb_sm_pro
```
