# Decision tree object classifier on uniform-LBP descriptors

A trained decision tree is usually evaluated by walking it: test the root,
pick a child, test again, until a leaf is reached. This hardware does not
walk. It performs **every split comparison of the tree at once** in one clock
cycle, and in the next cycle it checks, **for every leaf at once**, whether
the comparison results match the path from the root to that leaf. Exactly one
leaf matches, and its class is the answer. A classification therefore takes
two clock cycles and a new one can start on every clock, whatever the depth
of the tree.

The classifier is fed with an image-region descriptor made of histograms of
*uniform local binary patterns* (ULBPs), the set-up used for detecting human
silhouettes in 96x160 pixel detection windows. The RTL here contains both
parts and the glue between them:

```
 pixels (AXI4-Stream)                                         results (AXI4-Stream, to a DMA S2MM channel)
   │                                                                    ▲
   ▼                                                                    │
 lbp_ctrl ──► lbp_descriptor ───────────────► decision_tree ──► dt_stream_out
 (frame       lbp_window → lbp_ulbp →          dt_comparator_bank
  gating,     cell_histogram                   → dt_leaf_logic
  row/col)    (3540 x 8-bit descriptor)
   ▲                                                   ▲                 │ counters
   └──────── enables ── ctrl_regs (AXI4-Lite) ◄────────┴─────────────────┘
```

The top is `dt_system`. The processor, the DMA engine, the DDR memory and the
image sensor of a complete camera system sit outside it; their links are the
top's three ports (pixel stream in, result stream out, AXI4-Lite control).

This is an independent RTL implementation of the architecture described in
*Hardware implementation of a decision tree classifier for object recognition
applications*. The sections below say which parts follow that description and
which are choices made here.

## The classifier: how a tree becomes two pipeline stages

### Stage 1 — the comparator bank (`dt_comparator_bank`)

A tree with *s* splits becomes *s* comparators. Split *i* looks at one feature
(one 8-bit histogram bin of the descriptor) and a constant threshold:

    split[i] = features[feat_i] > thr_i

Because the feature index and threshold of each split are elaboration-time
constants, each comparator is a fixed wire selection plus an 8-bit compare
against a constant; there is no multiplexer over the 3540 features. The *s*
results are registered.

### Stage 2 — the leaf paths (`dt_leaf_logic`)

Every leaf is reached by one path, a list of splits with the value each must
have, for example `split_1=0 & split_4=1 & split_9=1`. Stage 2 holds one AND
term per leaf:

    leaf_hit[j] = ((split ^ leaf_val[j]) & leaf_mask[j]) == 0

where `leaf_mask[j]` marks the splits on the path and `leaf_val[j]` the value
each must take (1 = "feature > threshold", i.e. the right child). The paths
are mutually exclusive, so `leaf_hit` is one-hot (an assertion checks this),
and the class is the OR of the hits of the leaves labelled 1. The class is
registered.

The register count is *s* split bits plus one class bit (plus two valid bits),
i.e. one flip-flop per leaf, since a binary tree has *s*+1 leaves.

### The tree as a parameter (`dt_pkg::tree_t`)

The tree is not hard-coded in the RTL. `decision_tree`, and the top, take it
as a parameter of type `dt_pkg::tree_t`, a packed struct of tables sized for up
to 128 splits (`MAX_SPLITS`) and 129 leaves:

| field        | per    | meaning                                                        |
|--------------|--------|----------------------------------------------------------------|
| `feat`       | split  | feature index, `cell*59 + bin`                                 |
| `thr`        | split  | integer threshold; the split is 1 when feature > `thr`          |
| `left`       | split  | child when the split is 0: `{1'b0, node}` or `{1'b1, leaf}`     |
| `right`      | split  | child when the split is 1                                      |
| `leaf_mask`  | leaf   | bit *i* set when split *i* lies on the path to the leaf         |
| `leaf_val`   | leaf   | value split *i* must have on that path                          |
| `leaf_class` | leaf   | 1 = object present                                             |

The hardware uses `feat`, `thr`, `leaf_mask`, `leaf_val` and `leaf_class`; the
node links `left`/`right` are there so that a reference model can walk the
same tree. Set `NUM_SPLITS` to the tree's split count; leaves are numbered
0..`NUM_SPLITS`.

**Loading a trained tree.** For a scikit-learn `DecisionTreeClassifier` on
integer features: number the internal nodes 0..*s*-1 with the root as 0, and
the leaves 0..*s*. For node *i*, `feat = tree_.feature[i]` and
`thr = floor(tree_.threshold[i])` (scikit-learn sends `x <= t` left, and for
integer *x* that is `x <= floor(t)`, i.e. split 0). For each leaf, walk up to
the root and set `leaf_mask[leaf][i] = 1` and `leaf_val[leaf][i] = side` for
every ancestor *i*, where side is 0 if the path went to its left child. The
class is the argmax of `tree_.value` at the leaf. Write the result as a
`tree_t` constant (or a constant function) and pass it as `TREE`.

**The default tree is a stand-in.** No trained model ships with this RTL.
`dt_pkg::synth_tree(num_splits, depth, seed)` builds a deterministic tree of
the requested size at elaboration so that everything elaborates, synthesises
and simulates: splits 0..depth-1 form a chain that reaches the full depth, the
remaining splits fill the shallowest free child slots breadth first, features
and thresholds (0..23) come from a linear congruential generator, and leaf
classes alternate 0/1 in leaf order. Its *size* is that of the largest tree
evaluated for this architecture, 20 levels with 83 splits and 84 leaves; its
*decisions* mean nothing. The four smaller evaluated sizes are equally
available:

| depth | splits | leaves |
|------:|-------:|-------:|
| 5     | 30     | 31     |
| 7     | 54     | 55     |
| 10    | 65     | 66     |
| 15    | 77     | 78     |
| 20    | 83     | 84     |  ← default (`NUM_SPLITS=83, TREE_DEPTH=20`)

## The descriptor: uniform LBP histograms

### LBP of one pixel (`lbp_window`, `lbp_ulbp`)

`lbp_window` keeps two line buffers and a 3x3 register window, so that with
each incoming pixel the complete 8-neighbourhood of the pixel one row up and
one column left is available. Pixels on the image border have no complete
neighbourhood and produce no LBP (a 96x160 frame gives 94x158 LBPs).

`lbp_ulbp` numbers the neighbours clockwise from the top-left:

```
 1 2 3
 8 C 4        LBP bit 7 = neighbour 1 ... bit 0 = neighbour 8
 7 6 5        bit = 0 if neighbour > C, else 1
```

So a neighbourhood in which only neighbours 2, 3, 4 and 5 are not brighter
than the centre gives `0b01111000` = 120. The 8-bit code is then reduced to
59 bins: the 58 *uniform* patterns, those with at most two 0/1 changes going
once around the circle, get bins 0..57 in ascending order of their value;
every other pattern goes to bin 58. The 256-entry table is computed at
elaboration by `dt_pkg::build_ulbp_lut()`. The bin order is a choice made
here; a tree trained with another order needs its `feat` indices remapped.

### Cells and concatenation (`cell_histogram`)

The 96x160 window is cut into 6x10 cells of 16x16 pixels. Each LBP adds one
to bin `bin` of its cell's histogram. Features are numbered

    feature = (cell_row * 6 + cell_col) * 59 + bin        (3540 features)

i.e. cells in raster order, each cell's 59 bins contiguous. Counters are 8
bits and saturate at 255 (an interior 16x16 cell can collect 256 counts).

The histogram is cleared lazily: at the start of a frame the counters are
only marked stale, and the first count of the new frame zeroes all others
while setting its own to 1. The last descriptor therefore stays readable
until new pixels reach the histogram.

### One window per frame

`lbp_descriptor` computes the descriptor of a whole frame the size of one
detection window, one pixel per clock. It does **not** slide a detection
window over a larger image: each frame yields one descriptor and one
classification, i.e. 15360 clocks per classification. The classifier itself
accepts one descriptor per clock; a descriptor engine that delivers a new
window position on every clock (for sliding-window detection at the clock
rate) would need to replace `lbp_descriptor`.

## Frames, control and results

**Pixel input (`lbp_ctrl`).** 8-bit gray pixels arrive as an AXI4-Stream
video stream: `tuser` marks the first pixel of a frame, `tlast` the last pixel
of each line. `tready` is always 1 (a sensor cannot be stalled; idle cycles
with `tvalid` low are fine). A frame is admitted only if the LBP core is
enabled when its first pixel arrives. A `tlast` on the wrong column, or a new
`tuser` in the middle of a frame, aborts the frame and counts a framing error;
nothing is classified for it.

**Control registers (`ctrl_regs`, AXI4-Lite, 32-bit).**

| offset | name         | access | contents                                   |
|-------:|--------------|--------|--------------------------------------------|
| 0x00   | CTRL         | RW     | bit 0 LBP core enable, bit 1 tree enable (reset 0) |
| 0x04   | FRAMES       | RO     | frames received completely                 |
| 0x08   | FRAME_ERRORS | RO     | frames aborted                             |
| 0x0C   | RESULTS      | RO     | windows classified                         |
| 0x10   | DETECTIONS   | RO     | windows classified as class 1              |
| 0x14   | DROPPED      | RO     | results lost because the result FIFO was full |

With the tree disabled, descriptors are still computed but not classified.
A write is taken when address and data are both valid; responses are held
until `bready`/`rready`. Unmapped addresses read 0; all responses are OKAY.

**Result stream (`dt_stream_out`).** Every classified window becomes one
32-bit beat with `tlast` set: `tdata[31:8]` is the window number (counting all
classified windows from 0, wrapping at 2^24), `tdata[0]` the class. A 4-entry
FIFO (`FIFO_DEPTH`, a power of two) absorbs DMA back-pressure; a result that
finds it full is dropped and counted, and the window numbers of the beats
that do arrive show which ones are missing.

## Timing

| path                                                  | clocks |
|-------------------------------------------------------|-------:|
| `decision_tree`: `in_valid` → `out_valid`             | 2      |
| `lbp_descriptor`: `frame_end` pixel → `desc_valid`    | 3      |
| `dt_system`: last pixel accepted → result beat valid  | 7      |
| throughput of `decision_tree`                         | 1 descriptor / clock |
| throughput of `dt_system`                             | 1 pixel / clock, 1 result / frame |

All logic is in one clock domain with a synchronous active-low reset
(`rst_n`) that clears control state and valid flags; data registers are not
reset. The design was targeted at 75 MHz; no timing analysis has been done on
this RTL.

## What follows the original architecture and what does not

Taken from it: the two-stage structure (parallel comparator bank, then one AND
term per leaf path with exactly one true), one clock per stage, `feature >
threshold` comparators on 8-bit histogram bins, the five tree sizes above, the
LBP bit rule and neighbour numbering, the 59-bin uniform mapping, the 96x160
window of 6x10 cells of 16x16 pixels, and the overall chain sensor → LBP
descriptor → decision tree → AXI4-Stream to DMA, with AXI4-Lite control of
both cores.

Chosen here: the tree parameter format and the stand-in default tree; the ULBP
bin order; dropping border pixels; counter saturation; the lazy histogram
clear; the one-window-per-frame descriptor core (the original pairs the tree
with a separate sliding-window LBP processor whose design is not reproduced);
the pixel-stream framing rules; the register map; the result beat format, FIFO
and drop policy; reset style and valid flags.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the software models
they compare against (ULBP bins from an explicit list of uniform patterns, the
descriptor of an image computed pixel by pixel, and a node-by-node tree walk)
and a generator of test images (gradients, noise, blocks, a bright blob).

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dt_system \
    -y rtl -y tb +libext+.sv rtl/dt_pkg.sv tb/tb_dt_system.sv
./obj_dir/Vtb_dt_system
```

Replace `tb_dt_system` by any other testbench name. The end-to-end test
`tb_dt_system` runs the top at its default size (96x160 frames, 83-split
tree): it sends frames while the cores are disabled, 10 frames of various
image kinds (some with idle cycles), a frame with a framing error, a frame
with the tree disabled, and six frames while the DMA side stalls, so that two
results are dropped. It checks every descriptor against the model, every
result beat against a walk of the tree, the 7-clock latency, and all status
registers. `tb_decision_tree` runs all five tree sizes side by side on the
same random descriptors and checks class, 2-clock latency and one result per
clock.

| testbench               | checks                                             |
|-------------------------|----------------------------------------------------|
| `tb_dt_comparator_bank` | split bits vs direct comparison, boundary values   |
| `tb_dt_leaf_logic`      | class and one-hot leaf vs tree walk                |
| `tb_decision_tree`      | five tree sizes, latency, throughput               |
| `tb_lbp_ctrl`           | admission, row/column tags, framing errors         |
| `tb_lbp_window`         | every interior neighbourhood exactly once          |
| `tb_lbp_ulbp`           | worked example (120), all 256 codes, random windows |
| `tb_cell_histogram`     | counts, saturation, held descriptor, lazy clear    |
| `tb_lbp_descriptor`     | full-size descriptors of five images, latency      |
| `tb_dt_stream_out`      | beat order and content, drops, counters            |
| `tb_ctrl_regs`          | register map, byte strobes, held responses         |
| `tb_dt_system`          | the whole pipeline, as above                       |

## Changing it

* **Another tree:** pass `NUM_SPLITS` and `TREE` to `dt_system` (or
  `decision_tree`). More than 128 splits needs a larger `dt_pkg::MAX_SPLITS`
  (leaf indices in `left`/`right` are 8 bits; widen `CHILD_W` beyond 255).
* **Another window or cell size:** `WIDTH`, `HEIGHT` and `CELL` of `dt_system`;
  the descriptor length follows as `(WIDTH/CELL)*(HEIGHT/CELL)*59`. The test
  reference package assumes the default geometry.
* **Deeper result buffering:** `FIFO_DEPTH`.
