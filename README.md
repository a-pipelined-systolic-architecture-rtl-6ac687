# HORB motion estimation processor

A video encoder spends most of its effort on motion estimation. For each 16x16
macroblock of the current frame it searches the previous frame for the
16x16 block with the smallest sum of absolute differences (SAD). The search
range is displacements −16..+15 in both directions. Exhaustive full search
costs 1024 SADs of 256 pixels each per macroblock. Zonal searches such as
APDZS find almost the same vectors with far fewer SADs, but they jump from point to
point, which does not suit a regular hardware pipeline.

The Hardware Oriented Region Based (HORB) algorithm keeps most of that saving
and stays regular. It searches **regions**, not single points. Each region
is a 7x7 block of displacements and gets a small exhaustive search. A
regular systolic datapath handles that well. This repository holds
synthesizable SystemVerilog for a processor that runs HORB, and also a
full-search mode, on one macroblock at a time. It also holds self-checking
testbenches for every unit.

## The algorithm as built

For every macroblock:

1. **No-motion test.** Each pixel of the macroblock is compared with the
   pixel at the same position in the previous frame, using only the 5 most
   significant bits so that noise is ignored. If more than 70% match (at
   least 180 of 256), the block is stationary. The result is vector (0,0)
   and nothing else is done.
2. **Region search.** The search area is a 5x5 grid of regions. Each region
   covers 7x7 displacements, and the region centres lie at multiples of 7:
   ```
   group:  3 3 3 3 3        ring 2 order      ring 3 order
           3 2 2 2 3          0 1 2          0  1  2  3  4
           3 2 1 2 3          7 . 3         15  .  .  .  5
           3 2 2 2 3          6 5 4         14  .  .  .  6
           3 3 3 3 3                        13  .  .  .  7
                                            12 11 10  9  8
   ```
   The centre region (group 1) is searched first. After **every** region the
   best SAD found so far is tested against

   &nbsp;&nbsp;&nbsp;&nbsp;T = SADav · (10 − g) / 5,&nbsp;&nbsp;g = group of the region just searched,

   and the search stops if the best SAD is below T. Otherwise the 8 regions of
   group 2 are searched clockwise. The first one searched is the region whose
   centre is nearest to the best vector so far. If none of them passes the
   test, the 16 regions of group 3 are searched the same way.
   The regions span −17..+17. Vectors outside −16..+15, or outside the frame,
   are never evaluated.
3. **Partial SAD criterion.** A region's SAD is built line by line. After n
   of the 16 macroblock lines, a vector whose partial SAD exceeds
   SADav · (n + 5) / 8 is dropped. Its remaining lines are not computed.
4. **SADav** is the mean of the minimum SADs of all earlier macroblocks
   (those that were not stationary). It is kept as a running sum and
   count. `sadav_clear` restarts it. Until the first macroblock has
   finished there is no average, and that macroblock gets a full search.

Both thresholds are evaluated by cross-multiplication (`best*5 <
SADav*(10-g)`, `psad*8 > SADav*(n+5)`). That is exact and needs no divider.
The only divider computes SADav, once per macroblock (32 cycles).

`fs_mode = 1` runs the same datapath over all 25 regions with neither test.
That is a full search over −16..+15.

## How the datapath produces one SAD_line per cycle

The core of the design is the motion estimation unit (`meu`). Its work unit
is a **SAD_line**: the SAD of one 16-pixel line of the macroblock at one
displacement (h, k). A full SAD is the sum of 16 SAD_lines.

```
 cache ──2 px──►┌ delay line 0 (16 taps) ┐
       ──2 px──►└ delay line 1 (16 taps) ┘──16 px──► 16 PEs ──► adder tree ──► SAD bank ──► min
       ──1 px──►        (run port)                   |X_act−Y|   4 stages      49 accum.
                                                      X_next◄── X bus          + partial test
```

* **Delay lines.** Each is a 16-tap shift register holding 16 consecutive
  pixels of one search-window row, and tap j feeds PE j. A line is filled
  two pixels per cycle, so filling takes 8 cycles. After that, each cycle
  produces one SAD_line. One new pixel is then shifted in, which moves the
  window one column: the next cycle's SAD_line belongs to k+1. Seven cycles
  cover k = kc−3 … kc+3 for one h.
* **Two lines alternate.** While one delay line produces the 7 SAD_lines for
  displacement h, the other is filled with the row for h+1. Work therefore
  runs in **slots of 8 cycles**: 7 SAD_lines and one idle cycle, because
  filling takes 8 cycles.
* **PEs** hold the current macroblock line in `X_act` and the next line in
  `X_next`. Each PE registers |X_act − Y| when enabled.
* **Adder tree.** A binary tree with a register after each level (4 stages
  for 16 inputs) gives one SAD_line per cycle.
* **SAD bank.** It has 49 accumulators and enable flags, one per vector of
  the region. Each SAD_line is added and then checked by the partial SAD unit.
  A vector that fails is disabled: its later SAD_lines are not computed, and
  the PE and tree registers hold their values, so nothing switches. When
  line 15 of a surviving vector arrives, its complete SAD goes to the
  minimum unit.

**Order of work within a region.** All 49 SAD_lines of macroblock line i are
computed before line i+1 starts. The order is line i, then h, then k. So each
current-frame line is fetched once per region, over the X bus into
`X_next`, during the previous line. It moves to `X_act` in the idle cycle
just before line i's first SAD_line. The schedule, in slots t of 8 cycles
with s = 7·i + hh:

| slot          | what happens                                              |
|---------------|-----------------------------------------------------------|
| 7i, 7i+1      | X AGU fetches line i (16 cycles) into `X_next`            |
| s + 2         | delay line s mod 2 is filled with row i + h + 16 of the window |
| s + 3         | that line produces SAD_lines kk = 0..6, shifting in between |
| 7i + 2, cycle 7 | `X_next → X_act` for line i                              |

One region takes 115 slots (920 cycles) plus a 10-cycle pipeline drain. With
the controller's overhead that is **934 cycles per region**. Disabled vectors
save switching activity, not time.

## Processing of one macroblock

| phase | cycles |
|-------|--------|
| no-motion test (X and Y AGUs read both blocks in parallel) | 262 |
| search window (48x48) copied into the on-chip cache | 2304 |
| per region searched (1..25) | 934 |
| SADav update (divider) | up to 36 |

So a macroblock that is not stationary takes 2604 + 934·R cycles, where R is
the number of regions searched.

## Top-level interface (`horb_me_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start`, `mb_row`, `mb_col` | in | start a macroblock; indices in macroblocks (accepted while `busy` is low) |
| `fs_mode` | in | 1: full search, no thresholds |
| `sadav_clear` | in | restart the running average (e.g. new sequence) |
| `cur_rd`, `cur_addr`, `cur_data` | out/out/in | current-frame memory port, data one cycle after the address |
| `prev_rd`, `prev_addr`, `prev_data` | out/out/in | previous-frame memory port, same timing |
| `busy`, `done` | out | `done` pulses for one cycle with `res` valid |
| `res` | out | `horb_result_t`: `mv_h` (vertical), `mv_k` (horizontal), `sad`, `sad_valid`, `stationary`, `regions`, `active_lines` |
| `sadav` | out | current average |

Frames are stored row-major, one byte per pixel: address = y·FRAME_W + x.
Parameters `FRAME_W`/`FRAME_H` default to QCIF, 176x144. `active_lines` is the
number of SAD_lines actually computed, a direct measure of datapath activity.
It is the basis for comparing HORB's power with full search. The result
has no valid SAD (`sad_valid = 0`) for a stationary block, or when the
partial criterion dropped every vector. The vector is then (0,0). No
fallback search is made in the second case, and it does not update SADav.

## Files

| file | unit |
|------|------|
| `rtl/horb_pkg.sv` | shared types, geometry constants, ring order and nearest-region functions |
| `rtl/horb_me_top.sv` | top level: wiring, memory-latency alignment |
| `rtl/horb_ctrl.sv` | macroblock FSM: no-motion phase, window load, region order, stop test, vector masks |
| `rtl/x_agu.sv`, `rtl/y_agu.sv` | address generators for the current and previous frame (previous frame clamped at the edges) |
| `rtl/nmdu.sv` | no-motion detection |
| `rtl/search_cache.sv` | 48x48 search window, 1 write and 3 read ports |
| `rtl/cache_agu.sv` | region sequencer: cache addresses, MEU control word, X line requests |
| `rtl/meu.sv` | the datapath above; `delay_line.sv`, `pe.sv`, `adder_tree.sv`, `sad_bank.sv`, `partial_sad_unit.sv`, `min_sad_unit.sv` |
| `rtl/sadav_unit.sv` | running average with a 32-cycle restoring divider |
| `tb/tb_<unit>.sv` | one self-checking testbench per unit |
| `tb/horb_ref_pkg.sv` | untimed reference model of the whole search plus a frame generator |
| `tb/tb_horb_me_top.sv`, `tb/tb_horb_full.sv` | end to end on a 64x48 frame and on a full QCIF frame |
| `tb/tb_horb_sequence.sv` | a 4-frame QCIF sequence, compared with full search |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. A
watchdog stops it if it hangs. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/horb_pkg.sv tb/horb_ref_pkg.sv \
          tb/tb_horb_full.sv --top-module tb_horb_full
./obj_dir/Vtb_horb_full
```

Replace `horb_full` with any unit name (`meu`, `cache_agu`, `horb_ctrl`, …).
`rtl/horb_pkg.sv` is always needed. `tb/horb_ref_pkg.sv` is needed by the
top and controller testbenches. The full QCIF frame (99 macroblocks, about
1.2 M cycles) runs in about a second.

The end-to-end tests build a previous frame of random texture. The current
frame is made from it by moving each macroblock by a known vector and adding
±2 of noise. Each macroblock's vector, SAD, region count, SAD_line count and
the running average are compared with `horb_ref_pkg::model`. That model
implements the rules above directly, with no timing. The cycle count of
every macroblock is checked against the table above. The tests also count
every mechanism and fail if one never occurs:

* stationary blocks
* a search with no average yet
* a stop after the centre region
* a stop in ring 2
* a search reaching ring 3
* partial-SAD kills
* masked vectors at frame edges
* full-search mode

On the synthetic QCIF frame HORB searches 8.5 regions per macroblock on
average, about 10,100 cycles. That is 15 MHz for 15 frames/s.

`tb/tb_horb_sequence.sv` runs a short QCIF sequence at the default
parameters: 4 frames, so 3 frame pairs and 297 macroblocks. The background
has smooth texture and pans by (1,2) pixels per frame. A 48x48 object moves
by (−3,4). SADav is carried from frame to frame. Besides checking every
result against the model, it compares HORB with full search:

| measure | result |
|---------|--------|
| SAD_lines computed (datapath activity) | 3.4% of full search |
| macroblocks with a result where HORB's SAD equals the full-search minimum | 227 of 229 |
| total SAD, HORB / full search | 1.04 |
| clock for 15 frames/s | 14.3 MHz (9,647 cycles per macroblock) |
| macroblocks where every vector was rejected | 68 of 297 |

Most of the 68 rejected blocks lie on the top and left frame edges. There the
pan's true vector points outside the frame and is masked, so no vector comes
close to the average SAD.

## Performance against the original targets

The architecture was designed for 15 frames/s QCIF at 26 MHz. That is a
budget of 17,508 cycles per macroblock, so this implementation meets it
while HORB searches at most 15.9 regions per macroblock on average. Full
search (25 regions, 25,954 cycles per macroblock) would need 38.5 MHz. CIF
(352x288) at 15 frames/s and 100 MHz leaves about the same per-macroblock
budget. It needs `FRAME_W=352, FRAME_H=288`.

## Design decisions and departures

These points are this implementation's own choices, where the original
description is silent or not followed:

* **Ring visiting order.** Regions are visited clockwise from the top-left.
  The first region of each ring is the one nearest (squared distance, first
  in ring order on a tie) to the best vector so far. The original only says
  that the group-2 region closest to the best vector of the centre region
  comes first and that a fixed path follows. Group 3 uses the same rule.
* **Region grid.** The 5x5 grid of 7x7 regions covers −17..+17. Vectors
  outside −16..+15 are masked, and so are vectors that would leave the
  frame. The original does not say how the edges are handled.
* **Full search** reuses the HORB datapath region by region. The original
  proposes a modified datapath for full search, without the partial SAD
  unit and with a different feed order (all k for h = −15, then −14, …).
  That variant is not built. Both find the same minimum, but the built
  mode costs 25 regions.
* **No average yet.** The first macroblock after `sadav_clear` is searched
  fully, because neither threshold exists without SADav.
* **Comparisons** are strict: stop when best < T, drop when partial SAD > T2.
  Among equal SADs the first vector evaluated wins.
* **Timing.** The 8-cycle slot with one idle cycle and the X-line timing are
  this design's. So are the three-port window cache and the full window
  load (2304 cycles) per macroblock. Windows of neighbouring macroblocks
  are not reused.
* **SADav** uses a 32-bit sum and a 16-bit count. When the count is full,
  both are halved. The quotient is truncated.
* **Frame memory** is external, with a read latency of one cycle.

## Limits

The processor handles one macroblock at a time, and the window load is not
overlapped with the search. Real video sequences were not simulated. The
quality figures of the original (PSNR within 0.15 dB of full search, 10–16%
of its power) are therefore not reproduced here, only the rules that
produce them.
