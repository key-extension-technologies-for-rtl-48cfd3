# FCDD: boundary-correlation CU size pre-decision for HEVC / SHVC intra coding

An HEVC intra encoder normally finds the best coding-unit (CU) partition of
each 64x64 coding tree unit (CTU) by recursive rate-distortion optimisation
(RDO). It codes the CTU as one 64x64 CU, as four 32x32 CUs, and so on down
to 8x8 (and 4x4 prediction units), and keeps the cheapest result. That search
dominates the encoder's cycle budget. Fast CU depth decision (FCDD) is a
cheap pre-pass that runs before the encoder. For every CU it looks only at
the pixels next to the CU's two centre lines, and from them it predicts
whether the CU should be split. The encoder then only has to try the sizes
FCDD leaves open. The scheme was proposed for the spatial-scalable extension
SHVC, where it runs on both the base and the enhancement layer, but the
hardware is the same for any CTU.

This repository holds synthesizable SystemVerilog for the FCDD pre-processor:
CTU buffers, the address generator, the three-stage boundary calculation, the
QP-dependent threshold and the decision register. It also holds a
self-checking testbench for each block.

## The decision rule

For a CU of size N = 2^(3+l) (l = 0..3 for 8x8 .. 64x64) at CU position
(k, m) in the CTU:

| quantity | pixels used | meaning |
|---|---|---|
| bc1 | column N/2-1 of the CU, all N rows | mean left of the vertical centre line |
| bc2 | column N/2 of the CU, all N rows | mean right of the vertical centre line |
| bc3 | row N/2-1 of the CU, all N columns | mean above the horizontal centre line |
| bc4 | row N/2 of the CU, all N columns | mean below the horizontal centre line |

Each mean is the N-pixel sum shifted right by log2 N (truncating). Then

    bcV = |bc1 - bc2|      bcH = |bc3 - bc4|      BC = max(bcV, bcH)
    split(CU) = (BC >= TH(QP))

A small BC means both halves of the CU look alike across the centre line. The
neighbouring reference pixels then predict the CU well, and a large CU is
likely to win. A large BC means an edge runs through the middle, so smaller
CUs are likely better. The threshold rises with QP, because coarser
quantisation favours larger CUs:

| QP | TH |
|---|---|
| QP <= 27 | 10 |
| 27 < QP <= 32 | 20 |
| 32 < QP <= 37 | 30 |
| QP > 37 | 50 |

All four levels are evaluated for every CTU: 64 + 16 + 4 + 1 = 85 flags. The
flags are turned into a CU size for every 8x8 block by walking down the
quadtree. The answer is the first unflagged CU on the way down from 64x64,
and a flagged 8x8 CU means 4x4.

## Data flow

```
 frame memory ──px_valid/px_ready, 8 pixels/cycle──▶ ┌──────────────┐
                                                    │ ctu_memory 0 │──┐
                                   (ping-pong) ───▶ │ ctu_memory 1 │──┤ 2 read ports,
                                                    └──────────────┘  │ 2 pixels each
 fcdd_addr_gen ── V address, H address, CU tag ──────────────────────▶│
                                                                      ▼
 fcdd_th_select(QP) ─ TH per CTU ─▶ fcdd_boundary_calc ── per-CU BC, split ──▶ fcdd_cu_decision
                                    (3 stages)                                   │
                                                               done, 85 flags, 64 CU sizes
```

`fcdd_top` wires these together. A CTU is written into whichever of the two
CTU memories is free. When its last word is in, the QP threshold is stored
with it. When the address generator is idle, it starts on the oldest full
memory.

## CTU memory and the read schedule

This is the part that takes the most care. In every cycle the boundary
calculation takes two pixel pairs, one for the vertical path and one for the
horizontal path. Each pair must come from a single memory address, one
two-byte word. The schedule avoids any transposed copy of the CTU:

* **Vertical path.** For each row j = 0..N-1 of the CU, the word holds
  pixels (N/2-1, N/2) of that row, the pair that straddles the vertical
  centre line. The path walks from top to bottom and takes N cycles.
* **Horizontal path.** The word holds two neighbouring pixels of the upper
  centre row. The path goes left to right for N/2 cycles, then returns to the
  left edge and reads the lower centre row for another N/2 cycles. That is
  also N cycles, so both paths finish a CU together.

The vertical pair starts at an odd column (3, 11, ... for 8x8 CUs), so the
memory cannot use aligned two-pixel words. `ctu_memory` keeps even columns
and odd columns in two banks. A read at (y, x) takes pixel x from one bank and
pixel x+1 from the other, and swaps them back into order. Each bank entry
holds LOAD_PIX/2 pixels, so one load word of LOAD_PIX pixels writes one entry
in each bank. The read data is registered, so it arrives one cycle after the
address.

The walk visits the levels 8x8, 16x16, 32x32, 64x64 in that order, and the
CUs of each level in raster order. One CTU therefore takes
8·64 + 16·16 + 32·4 + 64·1 = 960 read cycles. Each path reads 1920 of the
CTU's 4096 pixels.

## Boundary calculation pipeline

`fcdd_boundary_calc` receives the word pairs with a tag (level, CU index,
first/last word, upper/lower row phase). It accepts a new CU in the cycle
right after the previous one's last word.

1. **Accumulate (N cycles).** Two accumulators sum the left and right
   vertical pixels. One accumulator sums both horizontal pixels of each word.
   When the horizontal path turns back to the lower row, the upper-row sum
   moves to a wait register.
2. **Align (1 cycle).** The four sums, the level, the CU index and the
   threshold are registered together.
3. **Decide (1 cycle).** Shift the sums to means, take the absolute
   differences and their maximum, compare with TH, and register the result.

A CU's result leaves two cycles after its last word. The threshold is
sampled with each CU's last word. Two CTUs with different QPs can therefore
follow each other without draining the pipeline.

## Timing and throughput

| event | cycles |
|---|---|
| load one CTU (LOAD_PIX = 8, no stalls) | 512 |
| boundary reads of one CTU | 960 |
| last loaded word to `done`, design idle | 965 |
| `done` to `done`, continuous input | 961 (960 reads + 1 idle) |

Loading one CTU overlaps the reads of the other, so throughput is set by the
961-cycle read phase.

* **4K at 60 fps.** 3840x2160 is 2025 CTUs per frame. 2025 × 60 × 961 is
  116.8 M cycles/s. This is below the 1792-cycle/CTU budget of a 220 MHz
  intra pipeline and below 120 MHz, so FCDD keeps up at a 120 MHz clock.
  A simulated frame padded to 60 × 34 = 2040 CTUs takes 1,960,955 cycles
  from first pixel to last decision. That is 117.7 MHz at 60 fps.
* **SHVC, 2x spatial scalability.** The 4K enhancement layer plus a
  1920x1080 base layer is 2025 + 510 CTUs per frame. That needs 146.2 M
  cycles/s: it fits a 220 MHz clock, but not 120 MHz.
* **8K at 60 fps.** 8100 CTUs per frame need 467 M cycles/s. One instance at
  416 MHz does not keep up. Two instances, each taking every other CTU,
  would.

## Top-level interface (`fcdd_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| qp | in | 6 | QP of the CTU, sampled with its last load word |
| px_valid / px_ready | in / out | 1 | load handshake; ready is low only while both CTU memories hold unread CTUs |
| px_data | in | 8·LOAD_PIX | LOAD_PIX pixels of one row, raster order, leftmost pixel in bits [7:0] |
| busy | out | 1 | boundary reads in progress |
| done | out | 1 | one-cycle pulse: split_flags and cu_log2 are updated |
| split_flags | out | 85 | `split_flags_t`: s8[64], s16[16], s32[4], s64; CU index = row·(64/N) + column |
| cu_log2 | out | 64 × 3 | CU size of each 8x8 block (raster order), log2: 2 = 4x4 … 6 = 64x64 |
| cu_valid, cu_level, cu_idx, cu_split, cu_bc | out | | stream of per-CU results: level 0..3, index, flag, BC |

Outputs hold their values until the next `done`. A CTU's load words go in
row order: 64 rows of 64/LOAD_PIX words each.

## Where the RTL fills gaps or departs from the original description

The original architecture fixes these points:

* the decision rule and the QP table;
* the two-byte read word;
* parallel vertical and horizontal paths with the upper/lower-row "return";
* the three stages and the wait register;
* the 960-cycle schedule.

The following are this design's own choices:

* **Comparison.** The original prose says "larger than TH" but its algorithm
  listing says BC >= TH. The RTL uses >=.
* **Stage cycle counts.** The original lists N/2+1 and N/2 cycles for the
  horizontal path's first two stages. Here both paths take N cycles in
  stage 1 and 1 cycle each in stages 2 and 3. The total per CU (N+2) is the
  same.
* **Loading.** The load width (8 pixels per cycle), the valid/ready port and
  the ping-pong pair of CTU memories are not specified in the original. They
  were chosen so that loading hides behind the 960 read cycles, which the
  120 MHz operating point needs. With a single 2-pixel-wide buffer a CTU
  would take 2048 + 960 cycles and miss the budget.
* **Bank split.** The even/odd bank split that allows odd-aligned words is
  new here.
* **Flags to CU sizes.** The original only says that a flagged N×N CU is
  coded as N/2×N/2 and that the result is stored in a register. The
  top-down quadtree map in `fcdd_cu_decision` is an interpretation. The raw
  85 flags and the per-CU BC values are also output, so a different policy
  can be applied downstream.
* **Other details.** Pixel depth (8 bits), reset style and read latency are
  assumed.

## What is not here

* The frame memory that supplies the CTUs.
* The intra encoder FCDD feeds: prediction, rough mode decision (RMD), RDO,
  transform, quantisation, in-loop filters.
* The fast mode decision / early termination rules used in the RMD and RDO
  stages. Those rules act on rate-distortion costs that only a full encoder
  produces.

The top module brings out everything such an encoder would consume.

## Files

| file | content |
|---|---|
| `rtl/fcdd_pkg.sv` | constants, pixel/address/tag/flag types |
| `rtl/fcdd_top.sv` | top level: ping-pong CTU memories, control, wiring |
| `rtl/ctu_memory.sv` | 64x64 buffer, wide write port, two unaligned two-pixel read ports |
| `rtl/fcdd_addr_gen.sv` | level/CU state machine and read address generator |
| `rtl/fcdd_boundary_calc.sv` | three-stage boundary correlation datapath |
| `rtl/fcdd_th_select.sv` | QP to threshold table (parameters) |
| `rtl/fcdd_cu_decision.sv` | flag collection and CU size map |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fcdd_4k_frame.sv` | a whole 4K frame streamed through `fcdd_top` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
For example, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fcdd_pkg.sv \
          tb/tb_fcdd_top.sv --top-module tb_fcdd_top -o sim
./obj_dir/sim
```

Replace `fcdd_top` with any other module name to run its testbench. Lint a
module with `verilator --lint-only -Wall -Irtl -y rtl rtl/fcdd_pkg.sv
rtl/<module>.sv`.

What the testbenches establish:

* **`tb_fcdd_top`** runs at the default parameters. It sends 16 CTUs:
  random noise, quadtree-structured flat regions, a smooth ramp, and a
  picture whose 64x64 BC equals TH exactly. The QPs cover all four threshold
  bands. Some loads stall, one load starts on an idle design, and others
  wait for a free memory. For every CTU it recomputes the equations directly
  from the pixel array. It compares every per-CU BC and flag, all 85 flags
  and the 64 CU sizes. It checks that each CTU's read phase lasts 960 cycles
  and that every `done` arrives at exactly max(previous done + 961, last
  word + 965). It counts splits and non-splits at every level, every
  threshold band, every CU size from 4x4 to 64x64, BC == TH, vertical-led
  and horizontal-led splits, stalls, held-off loads and loads overlapping
  reads. It fails if any of these never happened.
* **`tb_fcdd_4k_frame`** streams a generated 3840x2160 frame, with its
  last CTU row padded, through `fcdd_top` at four QPs. It checks every CTU's
  flags and CU sizes against the equations. It checks that CTUs complete
  every 961 cycles and that the frame fits in 2,000,000 cycles, one 60 fps
  frame at 120 MHz. It takes a few seconds.
* **The block testbenches** check each module against a model written
  independently in the testbench:
  * every address of the 960-cycle schedule;
  * random unaligned reads of the memory;
  * BC and the two-cycle latency for random and constructed CUs, with TH
    changing between CUs;
  * the quadtree map;
  * the QP table at every QP.

Trust boundaries: the arithmetic and the schedule are checked exhaustively or
against independent models. The quadtree map and the load interface are this
design's interpretation and have not been checked against an encoder.
Synthesis has not been timing-closed on any target.
