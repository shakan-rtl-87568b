# Shakan-style oblique random forest inference engine

An oblique decision tree splits on a weighted sum of features rather than
on one feature. That is more expressive than the usual axis-aligned split,
but a general weighted sum needs multipliers in every node. This design
uses a restricted oblique split that costs little more than an
axis-aligned one. Every node looks at three features. The first has
weight 1, and the other two have weights taken from a small set of signed
powers of two:

    X[f1] + g2*X[f2] + g3*X[f3] < th,      g2, g3 in {0, -1/2, -1, -2, +1/4, +1/2, +1, +2}

A product with such a weight is a shift and possibly a negation, so a
node needs two shifters, two adders and one comparator. Weight 0 drops a
feature, so ordinary axis-aligned nodes are a special case.

The hardware is memory-centric. The trees are stored as 64-bit node
instructions in small memories (memory elements, MEs). A chain of
processing elements (PEs) walks each sample through them, one tree level
per PE. The chain is closed into a ring, and trees are laid out
*circulantly*: tree levels go in consecutive MEs and wrap from the last ME
back to the first. A tree can therefore start in any ME and still reach
full depth, and every ME fills about equally. Several rings work in
parallel on different parts of the forest. Their vote counts for a sample
are added together at the end.

All RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The
testbenches run on Verilator 5.

## The split condition

`shakan_split_cond` evaluates the rule rearranged as

    X[f1] + g2*X[f2]   <   th - g3*X[f3]

This lets the two additions run side by side, followed by one comparison.
Both coefficient products come from `shakan_gamma_mul`.

Number formats. The published architecture fixes the widths but not the
binary points, so these are this design's choices:

| quantity | width | format here |
|---|---|---|
| feature | 32 bit signed | Q16.16 |
| threshold `th` | 16 bit signed | Q8.8: `TH_SHIFT = 8` feature LSBs to the left |
| internal sums | 37 bit signed | feature scale, 2 extra fractional bits |

`shakan_gamma_mul` widens the feature by two fractional bits before it
shifts right. The halves and quarters are therefore exact, and the
comparison is exact for any input. There is no rounding or saturation to
worry about.

Coefficient codes (3 bits) follow the order in which the set is listed:

| code | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| weight | 0 | -1/2 | -1 | -2 | +1/4 | +1/2 | +1 | +2 |

The set is asymmetric: +1/4 has no negative counterpart. The RTL keeps
that set as it stands. To change it, edit the two `case` statements in
`shakan_gamma_mul` and the reference function `gamma4` in the testbench
package.

A feature index of 5 or above (the index field is 6 bits, but a sample
carries five features) reads as zero.

## Node instruction (64-bit word)

The instruction has 63 bits of content plus one pad bit. The field widths
follow the original format. The bit positions are this design's choice
(`instr_t` in `shakan_pkg`):

| bits | field | meaning |
|---|---|---|
| 63 | pad | unused |
| 62 | valid | 0 = empty slot (see below) |
| 61:46 | th | threshold, Q8.8 |
| 45:40 | f1 | feature with weight 1 |
| 39:34 | f2 | feature weighted by g2 |
| 33:28 | f3 | feature weighted by g3 |
| 27:25 | g2 | coefficient code |
| 24:22 | g3 | coefficient code |
| 21 | leaf_l | left child is a leaf |
| 20 | leaf_r | right child is a leaf |
| 19:10 | child_l | left child: class, or node address in the next ME |
| 9:0 | child_r | right child: class, or node address in the next ME |

"Left" is the child taken when the condition holds (`<` is true).

## The processing element: three cycles per tree level

`shakan_pe` is a three-stage pipeline. It accepts a new sample every cycle.

1. **Fetch.** The node address goes to the PE's ME (`shakan_me`, a
   synchronous-read block RAM). The sample is registered alongside the
   read.
2. **Condition.** The instruction and the sample feed
   `shakan_split_cond`. The one-bit result is registered together with
   the sample and the instruction.
3. **Next node and votes.** `shakan_next_node` chooses the child. For an
   inner child, its address goes to the next PE. For a leaf child:
   - `shakan_votes_update` adds one to the class counter the leaf names
     (seven 16-bit counters per sample).
   - The sample's completed-tree count goes up by one.
   - The address passed on is the root of the sample's next tree.

Sample and address are registered towards the next PE. Each PE adds
exactly three cycles and holds three samples at a time. Only the valid
bits are reset. The reset is synchronous and active low (`rst_n`).

A sample carries (`sample_t`, 301 bits):
- its five features and seven vote counters;
- a tag;
- the number of trees it has completed;
- the number of ring passes it has made;
- a done flag.

## Rings, circulant layout and where the next tree starts

This is the part to understand before preparing a forest for the engine.

`shakan_ring` chains `N_PE` PEs, each with its own ME, and feeds the last
PE's output back into PE 0:

- **Entry.** A new sample enters at PE 0 when no circulating sample needs
  that slot. Circulating samples have priority, and `in_ready` drops in
  the cycles they occupy the slot.
- **Looping.** A sample goes round the ring until it has completed
  `n_trees` trees. Each time it wraps from the last PE to PE 0, its
  pass counter goes up by one.
- **Done samples.** Once a sample is done, the remaining PEs let it
  through untouched. It leaves the ring at the last PE.
- **Timing.** One pass takes `3*N_PE` cycles, so a sample that needs `k`
  passes leaves exactly `3*N_PE*k` cycles after it was accepted.

**Tree placement.** A tree of depth D starting at ring position p has:
- its root in ME p;
- its level-1 nodes in ME p+1;
- ... and its level D-1 nodes in ME (p+D-1) mod N_PE.

Inner child fields hold addresses in the next ME. The children of the
last level are leaves and hold class numbers.

**Root addressing.** The original architecture says only that after a
leaf, the address passed on is the root of the next tree. This design
fixes where that root lives: *a tree that starts while the sample is on
pass k has its root at address k of the ME where it starts*. So after a
leaf at PE i, the next address is the sample's pass count, plus one if PE
i is the last PE of the ring. The low addresses of every ME (one per pass
a sample makes) therefore form a root area. Inner nodes go above it.

**Empty slots.** An instruction with `valid = 0` is an empty slot. A
sample reaching one gets no vote and moves on to the next PE's root slot
for the same pass. The compiler can insert empty slots to move a tree's
start to another ME. Every root-area word a sample can reach must hold
either a root or an empty slot.

**Full-depth trees.** Trees are expected to be padded to full depth: every
path from root to leaf has the same length. The next tree's starting
position is then the same for every sample, and one root slot per tree
suffices. The PE does handle a leaf on an earlier level (it votes and
jumps to the next root). But then the next root has to exist at every
position where some path can end, which this layout does not provide.

**Example.** With 3 PEs and depth-3 trees, tree 0 occupies ME 0, 1 and 2
(root at ME 0 address 0). A sample finishes it at PE 2 and comes back to
PE 0 on pass 1.
- If tree 1 is placed in ME 0 to 2 again, its root is at ME 0 address 1.
  The layout is then uneven: ME 2 holds four nodes of every tree.
- Alternatively, an empty slot at ME 0 address 1 moves tree 1 to start at
  ME 1 (root at ME 1 address 1). The levels then rotate over the MEs.

**Choosing the ring length.** Consecutive full-depth trees start D
positions apart. If `N_PE` shares no factor with D, the starts rotate
through all MEs with no empty slots at all. That is why the default is
`N_PE = 11`: 11 is prime and shares no factor with the depths 5, 7 and 9.

`tb/shakan_tb_pkg.sv` contains a reference implementation of this layout
(`forest::layout`), including the empty slots.

## Parallel rings and vote merging

`shakan_top` instantiates `N_PIPES` rings. Each ring holds its own trees
and has its own `n_trees`. A sample is accepted only when every ring can
take it and the merger has room. It is then issued to all rings in the
same cycle under an 8-bit running tag (`in_tag` shows the tag the next
sample will get).

Rings with different work return a sample at different times, and
`shakan_vote_merge` adds their counts:
- It keeps one entry per in-flight tag (`MERGE_DEPTH` entries, indexed by
  the low tag bits). Each returning copy adds its seven counters to the
  entry and counts itself.
- Several rings may return in the same cycle.
- When all `N_PIPES` copies are in, the entry is emitted (`out_valid`,
  `out_tag`, `out_score`) and freed. If several entries complete
  together, they leave one per cycle, lowest index first.

The output has no back-pressure. The host takes the class with the most
votes. There is no vote weighting.

The original architecture says that trees are spread over parallel
pipelines, but not how the pipelines' results are combined. The merger,
the tags and the handshake are this design's own.

## Timing and throughput

- **Latency**, from the accepting clock edge to `out_valid`: `3*N_PE*P +
  2` cycles, where P is the number of ring passes the slowest ring
  needs. The last two cycles are the merger (accumulate, then emit).
  With the defaults and one pass this is 35 cycles, 0.21 us at 166 MHz.
- **Throughput.** Each ring has `3*N_PE` slots. A sample that needs P
  passes occupies one slot for P passes, so the steady-state rate is
  about one sample per P cycles.

## Sizes

| parameter | default | origin |
|---|---|---|
| features per sample | 5 x 32 bit | original architecture |
| class counters | 7 x 16 bit | original architecture |
| instruction | 63 bit in a 64-bit word | original architecture |
| child field / ME address | 10 bit | original architecture |
| `ME_DEPTH` | 512 words | one 36 Kb block RAM holds 32 Kb of data, i.e. 512 64-bit words |
| `N_PE` | 11 | this design (coprime with depths 5, 7, 9) |
| `N_PIPES` | 4 | this design |
| `MERGE_DEPTH` | 64 | this design (covers the 33 in-flight samples per ring) |

The ME address field can reach 1024 words, but only the low
`log2(ME_DEPTH)` bits index the memory.

**Capacity and timing at the defaults.** Each forest below uses the layout
above. The tree counts approximate the ensemble sizes of the original
latency evaluation. All six were simulated on the default-size engine
(`tb_shakan_workloads`). The times assume 166 MHz. "Per sample" is the
time between results with samples offered back to back.

| forest | fullest ME | ring passes | latency | per sample |
|---|---|---|---|---|
| 5 depth-5 trees | 18 of 512 words | 1 | 35 cycles, 0.21 us | 0.01 us |
| 540 depth-5 trees | 447 of 512 words | 62 | 2048 cycles, 12.3 us | 0.62 us |
| 4 depth-7 trees | 66 of 512 words | 1 | 35 cycles, 0.21 us | 0.01 us |
| 112 depth-7 trees | 379 of 512 words | 18 | 596 cycles, 3.6 us | 0.18 us |
| 3 depth-9 trees | 258 of 512 words | 1 | 35 cycles, 0.21 us | 0.01 us |
| 27 depth-9 trees | 497 of 512 words | 6 | 200 cycles, 1.2 us | 0.06 us |

A sample holds only five features and seven class counters. Data sets with
more features need feature selection before they fit, and data sets with
more than seven classes lose the counts of the extra classes.

## Where this design departs from the original

These points are not given by the original architecture and were chosen
here:
- the fixed-point formats;
- the bit order of the instruction;
- left = condition true;
- exact (non-truncating) halving and quartering;
- the root addressing by pass count;
- empty slots as the meaning of the validity bit;
- the done flag and tree counter in the sample;
- the ring length, ring count and merger;
- the host write port and the valid/ready handshake.

The original design was clocked at 166 MHz on a Zynq UltraScale+ device.
This RTL has not been taken through FPGA timing closure. The split
condition (a 6-bit feature mux, a shifter, a 37-bit add and a 37-bit
compare) is the critical path.

The original memory has 32-bit words and stores an instruction padded
to two of them. Here each ME is one 64-bit word wide, so that a whole
instruction arrives in the PE's single fetch cycle.

The original design packs a sample into 320 bits. Here the sample struct
is 301 bits and unpadded.

Latency comparisons with the original's published numbers are not
meaningful. Its ring sizes and batching are not known, and the single
sample latency here (35 cycles for one-pass ensembles) is somewhat higher
than its smallest configurations.

## Files

| file | content |
|---|---|
| `rtl/shakan_pkg.sv` | widths, `instr_t`, `sample_t`, coefficient codes |
| `rtl/shakan_gamma_mul.sv` | shift/negate coefficient product |
| `rtl/shakan_split_cond.sv` | oblique split condition |
| `rtl/shakan_votes_update.sv` | leaf vote |
| `rtl/shakan_next_node.sv` | successor / next-root selection, tree count, done |
| `rtl/shakan_me.sv` | memory element (block RAM model, 1 read + 1 write port) |
| `rtl/shakan_pe.sv` | three-stage PE |
| `rtl/shakan_ring.sv` | ring of PEs and MEs with sample looping |
| `rtl/shakan_vote_merge.sv` | merger of the rings' votes |
| `rtl/shakan_top.sv` | top: parallel rings + merger |
| `tb/shakan_tb_pkg.sv` | reference forest model: random trees, layout, evaluation |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_shakan_top_full` at default size |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/shakan_pkg.sv tb/shakan_tb_pkg.sv tb/tb_shakan_top.sv \
        --top-module tb_shakan_top -o sim
    ./obj_dir/sim

Replace `tb_shakan_top` with any other testbench name.

- **`tb_shakan_top`** runs two rings of three PEs. It checks:
  - every merged vote count against the reference model;
  - the exact latency;
  - that stalls from looping samples and from a full merger, empty slots,
    trees crossing the wrap and multi-pass samples all occurred.
- **`tb_shakan_workloads`** runs the six forests of the table above on
  the default configuration. It takes about 30 seconds.
- **`tb_shakan_top_full`** runs the default configuration: 44 MEs loaded
  with 60 depth-5 trees, then 100 samples. It takes about 20 seconds
  including compilation.
- **Unit testbenches** check the arithmetic exhaustively over the
  coefficient codes and on random and corner values, including ties at
  the threshold.

Each module's header comment describes its interface and timing. The
concurrent assertions (merger entries reused only once free, samples
leaving a ring only after all their trees) are active under `--assert`.
