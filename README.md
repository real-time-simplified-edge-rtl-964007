# Simplified Edge Detector (SED) for 3D-HEVC depth-map coding

Depth maps are mostly flat regions separated by sharp object borders. A 3D-HEVC
encoder can code a border block well with the bipartition (DMM) intra modes,
which split the block into two constant regions. Evaluating those modes is
expensive. The Simplified Edge Detector decides, per block, whether they are
worth trying. It looks only at the four corner samples of the block. If any two
corners differ by more than a threshold, the block is an **edge** block (1) and
the bipartition modes are evaluated. Otherwise it is **homogeneous** (0) and
they are skipped. The threshold depends on the block size and on the frame
resolution.

This RTL classifies every sub-block of a 32x32 depth block in one pass:

| size  | blocks in a 32x32 | corner registers | classifiers | decision bits |
|-------|------------------:|-----------------:|------------:|--------------:|
| 4x4   | 64 | 16 | 8 | 64 |
| 8x8   | 16 |  8 | 4 | 16 |
| 16x16 |  4 |  4 | 2 |  4 |
| 32x32 |  1 |  2 | 1 |  1 |
| total | 85 | 30 bytes | 15 | 85 |

A block takes 34 cycles from start to result: one start cycle, 32 row reads
and one cycle in which the result is presented. When blocks are issued back to
back, they take 33 cycles each. At 34 cycles per block, one 1080p view at
30 frames/s needs about 2.1 MHz: 2025 blocks x 30 x 34. A hundred views need
about 207 MHz.

## How the corners are collected: bands and rows

The block is read from the encoder's block memory one full row of 32 samples
per cycle. The memory can be shared with other encoder stages that need the
whole block, so the detector reads every row. It keeps only the samples it
needs, and only for as long as it needs them.

For blocks of edge `BS`, the 32 rows form `32/BS` *bands*. A band is one row of
blocks. Each band has a top row (`row % BS == 0`) and a bottom row
(`row % BS == BS-1`).

* When a band's **top row** arrives, `sed_input_regs` stores the top-left and
  top-right corners of every block in the band. These are columns `j*BS` and
  `j*BS+BS-1`. That is 2 bytes per block: 16 bytes for 4x4 and 2 bytes for
  32x32.
* When the band's **bottom row** arrives, the bottom corners are not stored.
  They are taken directly from the memory's data bus. In that same cycle, the
  band's `32/BS` classifiers see all four corners of their blocks. Their
  decisions are written into `sed_output_regs` at the end of the cycle.

All four sizes run side by side on the same row stream. For the 4x4 level, a
row is either a top row (0, 4, 8, ...), a bottom row (3, 7, 11, ...) or
unused. Rows 1, 2, 5, 6, ... are read only because the memory delivers the
whole block. The corners of the larger blocks are a subset of the 4x4 corners.
This is why 16 samples per row and 16 of the 32 rows carry everything the
decision needs. Because the bottom corners go straight to the classifiers, 30
bytes of storage are enough. The last band of every size ends on row 31, so
all 85 decisions are settled when row 31 has been consumed.

## Classifier and core

`sed_classifier` takes the four corners A (top-left), B (top-right), C
(bottom-left) and D (bottom-right). It has six `sed_score` cores, one for each
pair: AB, AC, AD, BC, BD and CD. Two 3-input ORs and one final 2-input OR
combine the six core outputs. So the block is an edge if any pair differs by
more than the threshold. This is the same as saying that the maximum corner
minus the minimum corner exceeds the threshold, and the testbenches use that
form as their reference.

`sed_score` computes `border_2 - border_1` at 9 bits and takes its absolute
value. It outputs 1 only when the result is **strictly greater** than the
threshold. A difference equal to the threshold counts as homogeneous.

## Threshold table

`sed_threshold_table` gives each block size its own threshold. The threshold
is selected by a resolution class that `sed_controller` latches at start. The
source architecture specifies a table indexed by size and resolution, but its
values come from the underlying algorithm and are not given with it. The
contents here are **placeholders**:

| resolution class | 4x4 | 8x8 | 16x16 | 32x32 |
|---|---|---|---|---|
| `RES_1024X768` (0)  | 6 | 8 | 10 | 12 |
| `RES_1920X1088` (1) | 5 | 7 | 9 | 11 |

Before the decisions mean anything for coding efficiency, replace them with
the algorithm's real thresholds. Pass them through the `THRESHOLDS` parameter
of `sed_top`, of type `sed_pkg::thr_table_t` and indexed
`[resolution][level]`, with level 0 = 4x4. The threshold width (`THR_W` = 8)
and the choice of two resolution classes also belong to this design.

## Interface and timing (`sed_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | start one 32x32 block; accepted only while `ready` is high |
| `res_sel` | in | 1 | resolution class (`sed_pkg::resolution_e`), sampled with `start` |
| `ready` | out | 1 | no block in flight |
| `mem_rd_en`, `mem_rd_addr` | out | 1, 5 | row read request and row number |
| `mem_rd_data` | in | 32 x 8 | the requested row, **one cycle after** the request; column 0 at index 0 |
| `done` | out | 1 | one-cycle pulse: all decisions of the block are valid |
| `dec_4x4`, `dec_8x8`, `dec_16x16`, `dec_32x32` | out | 64, 16, 4, 1 | decisions, 1 = edge, raster order: bit `by*N+bx`, `N = 32/size` |

Cycle by cycle, with `start` accepted in cycle 0:

```
cycle        0    1    2   ...  31   32   33
mem_rd_addr  0    1    2   ...  31
mem_rd_data       r0   r1  ...  r30  r31
done                                      1     (next start may be given here)
```

The decision bits stay stable until the matching band of the next block
overwrites them. For example, the first 4x4 band is rewritten 4 cycles after
the next block's rows begin. Read the results while `done` is high, or copy
them at that point. A `start` that arrives while a block is in flight is
ignored.

## Where this design departs from, or adds to, the source architecture

* **Threshold values and resolution classes** are placeholders (see above).
* **Decision polarity.** The source describes the classifier's OR output both
  as a "skip" decision equal to 1 and as 1 = "evaluate bipartition modes". This
  design follows the core-level definition: 1 = edge, evaluate DMM. Only this
  polarity is consistent with ORing the pair results.
* **Memory port.** This design assumes a synchronous memory with one cycle of
  read latency. The source says only that a 32-byte row is read every cycle.
* **Handshake.** The `start`/`ready`/`done` signals, the latching of the
  resolution class, and the option to start the next block in the `done`
  cycle (33 cycles per block back to back) are additions.
* **Output layout and reset.** The raster-ordered decision vectors and the
  reset of all registers to zero are this design's choices.
* **Where the classification cycle falls.** Each band is decided in the cycle
  its bottom row is on the bus, and `done` is raised in the following cycle.
  This is how the "1 start + 32 read + 1 classification" budget is counted
  here.
* Not built: the encoder around the detector. That includes the shared block
  memory (modelled only in the testbenches), the HEVC intra and DMM mode
  evaluation, and any power or area figures.

## Files

`rtl/`:

* `sed_pkg.sv`: geometry constants, sample/row/threshold types, the
  resolution enum and the default threshold table
* `sed_score.sv`: one core: absolute difference and strict compare
* `sed_classifier.sv`: six cores and the OR tree
* `sed_threshold_table.sv`: per-size threshold for the selected resolution
* `sed_input_regs.sv`: top-corner registers of one block size (parameter `BS`)
* `sed_output_regs.sv`: decision bits of one block size (parameter `BS`)
* `sed_controller.sv`: start/read/done schedule
* `sed_top.sv`: the whole detector; one generate level per block size

`tb/` (self-checking; each prints `TB_RESULT checks=N failures=M`):

* `tb_sed_score`, `tb_sed_classifier`: corner cases, threshold ties and
  random vectors against an integer reference
* `tb_sed_threshold_table`: default table and a parameter-supplied table
* `tb_sed_input_regs`, `tb_sed_output_regs`: random row and band streams
  with idle cycles
* `tb_sed_controller`: exact cycle schedule, ignored starts, back-to-back
  blocks
* `tb_sed_top`: 60 blocks of varied patterns (flat, noisy, step edges,
  ramps, noise, exact threshold ties) in both resolution classes, with all
  85 decisions checked per block. It also checks that `done` comes in cycle
  33, and counts edge and homogeneous decisions at every size, back-to-back
  starts and starts while busy; a count that stays at zero is a failure.
  It runs `sed_top` at its default parameters.
* `tb_sed_frame`: a synthetic 1024x768 frame (768 blocks) and a 1920x1080
  frame padded to 1088 rows (2040 blocks), streamed back to back. Every
  decision is checked, and the measured throughput is 33.00 cycles per block.
* `sed_row_memory.sv`: behavioural block memory used by `tb_sed_top`

All tests pass. For each module, a deliberately broken copy was also run and
its testbench caught it. The breakages were: `>=` in place of `>`, a missing
core, a wrong corner column, mirrored output bits, `done` raised one row
early, the resolution select ignored, and thresholds swapped between sizes.

## Simulating

With Verilator 5 (packages first):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_sed_top \
    rtl/sed_pkg.sv tb/tb_sed_top.sv
./obj_dir/Vtb_sed_top
```

Replace `tb_sed_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/sed_pkg.sv rtl/sed_top.sv`. Lint
reports two harmless warnings. UNUSEDPARAM flags the default threshold table in
modules that do not use it. SYNCASYNCNET appears because the controller's
schedule assertions are disabled by the same reset that the flip-flops use
asynchronously.
