# Low-memory-traffic motion estimation for H.264 (IME + half/quarter-pel FME)

Motion estimation in an H.264 encoder reads the same reference pixels over and
over: neighbouring search candidates overlap in all but one row, the 41
variable-size blocks of a macroblock overlap each other, and the six-tap
half-pel filter needs a 6x6 neighbourhood for every pixel it makes. This RTL
implements a motion estimation datapath organised so that each reference pixel
is read from the search-window memory as few times as the parallel hardware
allows, and then reused inside the datapath:

* **Integer motion estimation (IME)** evaluates one full-search candidate per
  clock with 256 absolute-difference units. A 16x16 reference array shifts by
  one row or one column between candidates, so each candidate costs one
  16-pixel memory access; all 41 block SADs come from the sixteen 4x4 SADs.
  A 32x32 search takes 1039 accesses, 16.23 pixels per candidate, against 256
  for a block that re-reads its pixels, or 1792 if the seven block sizes were
  searched one after another.
* **Fractional motion estimation (FME)** refines the 41 integer vectors to
  quarter-pel precision in two passes. Each pass evaluates nine candidates of
  a block in parallel from one shared stream of 10-pixel reference lines:
  first the integer position and its eight half-pel neighbours, then the
  half-pel winner and its eight quarter-pel neighbours. The half-pel pass of
  a macroblock reads 7600 reference pixels, against 173 824 for a naive
  per-pixel, per-candidate interpolation. The quarter-pel pass reads the same
  lines again.
* Both engines read one **search-window memory with a ladder-shaped data
  arrangement**. It delivers 16 consecutive pixels of a row *or* of a column in
  one access, which the snake scan of the IME and the horizontal strips of the
  FME need.

The architecture follows Y.-H. Chen, T.-C. Chen, C.-Y. Tsai, S.-F. Tsai and
L.-G. Chen, "Data Reuse Exploration for Low Power Motion Estimation
Architecture Design in H.264 Encoder" (J. Signal Processing Systems, 2007).
Details that publication leaves open are filled in here, and each one is
marked as this design's choice in the file headers and in the
"Where this RTL departs" section below.

## Data flow of one macroblock (`me_top`)

```
 host ──► sw_sram_ladder (53x53 window, 16 banks) ◄───────────────┐
 host ──► cur_mb_buf (in each engine)                              │
                                                                   │ 16-pixel row/column reads
 start ─► ime_engine ── 41 integer MVs, SADs ──► fme_engine ───────┘
            ime_scan_ctrl → ime_ref_array → ime_pu_array          fme_ctrl → fme_interp → 9 x fme_pu
            → ime_sad4x4_tree → ime_vbs_tree → ime_decision       → fme_mv_cost → best of 9
                                                                  → output buffer → fme_mode_decision ─► done
```

1. The host writes the search window, 16 pixels per clock, and the current
   macroblock, one row per clock.
2. `start` launches the IME engine. It owns the window memory until it is done,
   1043 clocks later.
3. The IME `done` pulse starts the FME engine with the 41 best integer vectors.
   After 1849 clocks `done` rises: 41 quarter-pel vectors, their costs, and
   the partition decision are valid.

Window geometry: the search range is H[-16,15] x V[-16,15], so the IME window
is 16 + 31 = 47 pixels wide. The FME filter needs three more pixels on each
side, so the memory holds 53 x 53. Window pixel (X, Y) is at displacement
(X - 19, Y - 19) from the top-left pixel of the current macroblock.

## The ladder-shaped search-window memory (`sw_sram_ladder`)

A plain banked memory puts column x of the window into bank x mod 16. A row
segment then spreads over all 16 banks, but a column segment sits in a single
bank and takes 16 clocks. The ladder arrangement rotates each row one more
position to the right than the row above:

    bank(x, y) = (x + y) mod 16          word(x, y) = y * 4 + x / 16

Now the 16 pixels of any row segment *and* of any column segment lie in 16
different banks. Each bank computes its own word address from the request.
The read data, registered one clock later, is rotated back by (x + y) mod 16,
so lane k is always pixel k of the segment. The module also counts accesses;
the testbenches use the count to check the memory-traffic figures.

## Integer search (`ime_engine`)

**Reference array and snake scan.** `ime_ref_array` holds the 16x16 reference block of
the current candidate and supports three moves:

| move         | new data                          | used when                     |
|--------------|-----------------------------------|-------------------------------|
| `SCAN_DOWN`  | row below the block enters at the bottom | walking down a column, and the initial fill |
| `SCAN_UP`    | row above the block enters at the top    | walking up a column           |
| `SCAN_RIGHT` | column right of the block enters at the right (one column access) | stepping to the next column |

`ime_scan_ctrl` first fills the array with 16 rows. The first candidate,
(-16, -16), is complete with the 16th row. The controller then walks down 31
rows, steps right, walks up 31 rows, steps right, and so on, a snake over the
32 columns. Every access after the fill completes exactly one new candidate:
16 + 1023 = 1039 accesses for 1024 candidates. Without the right step, each
column would need a fresh 16-row fill, 47 rows per column: 23.5 pixels per
candidate instead of 16.23.

**SAD datapath.** `ime_pu_array` has 256 subtract-and-absolute units. By
default each drops the 3 low bits of both pixels and only the checkerboard half
of the units is active (1/2 sub-sampling). These are the reduced-precision
settings of the fabricated engine; set `TRUNC = 0` and `SUBSAMPLE = 0` for
exact SADs. `ime_sad4x4_tree` forms the sixteen 4x4 SADs, which are
registered. `ime_vbs_tree` builds 8x4, 4x8, 8x8, 16x8, 8x16 and 16x16 from
them. `ime_decision` keeps, per block, the minimum and the vector that gave it.
A tie keeps the earlier candidate in snake order.

**Timing.** One candidate per clock. Four pipeline stages sit between a request
and the decision update: memory read, array update, 4x4 SAD register, decision
register. `done` comes 16 + SR*SR - 1 + 4 = 1043 clocks after `start`.

## Fractional refinement (`fme_engine`)

This is the least obvious part of the design.

**What one reference line feeds.** For a 4x4 element at integer position
(x, y), the nine candidates are the integer position and the eight half-pel
positions around it. Along one row they need the integer pixels x..x+3 and the
horizontal half positions x-1/2 .. x+3 1/2. The six-tap filter for those needs
pixels x-3 .. x+6: ten pixels. `fme_interp` therefore takes one 10-pixel line
per clock and computes the five unrounded horizontal filter sums. It keeps the
last seven lines (integer pixels and unrounded sums) in a window register.
From that window it produces, for line k-3, the four pixels of every
candidate:

* vertical offset 0: integer line k-3 (integer pixels, or horizontal halves
  `clip((sum + 16) >> 5)`);
* vertical offset +1/2: six-tap down the window over lines k-5..k;
* vertical offset -1/2: the same over lines k-6..k-1.

The centre (half, half) samples are filtered vertically from the *unrounded*
horizontal sums, `clip((sum + 512) >> 10)`, as H.264 specifies. Candidate
index t = (dy + 1) * 3 + (dx + 1) in half-pel units; t = 4 is the integer
position.

**The quarter-pel pass.** For the second pass the engine tells `fme_interp`
the half-pel winner (bx, by). The nine outputs become the positions
(2bx + qx, 2by + qy) in quarter-pel units, with qx, qy in -1..1. Each of
those positions lies within 3/4 pixel of the output pixel, so the half-pel
samples it is averaged from lie at most two half-pel steps away, in either
direction. The 10-pixel line covers that reach horizontally: integer
pixels x-1..x+4 and the five horizontal halves. The 7-line window covers it
vertically: lines k-4..k-2 and the half lines between them. So the engine
builds a 5 x 11 grid of half-pel samples around each output line.

* A quarter sample that lies on the grid is taken as it is.
* One that lies between two grid samples is their rounded average,
  (a + b + 1) >> 1.
* On a diagonal, the two samples averaged are the two neighbours on a
  horizontal and a vertical half position. This is the H.264 rule.

The processing units, the costs and the strip order are the same in both
passes. The controller reads each block's lines once per pass and raises
`pass` for the second sweep. `QPEL = 0` stops after the half-pel pass.

**Strips instead of elements.** Every block is folded onto the 4x4 processing
units. Elements that touch vertically can share one stream of lines: a column
of n elements needs 4n + 6 lines, not 10n. `fme_ctrl` therefore cuts each
block into strips. Normally a strip is a column of elements read row by row.
With `ADV = 1` (advanced flow), blocks wider than tall (16x8 and 8x4) are cut
into *rows* of elements and read column by column, using the ladder memory's
column access. The interpolation engine is direction-agnostic: fed columns, it
interpolates the transposed block. The processing units then see transposed
difference blocks, which have the same SATD. `fme_engine` only swaps the
candidate indices, (dx, dy) to (dy, dx), when it collects the costs of a
transposed block.

| block size | count | basic flow pixels | advanced flow pixels |
|-----------:|------:|------------------:|---------------------:|
| 16x16 | 1  | 880  | 880  |
| 16x8  | 2  | 1120 | 880  |
| 8x16  | 2  | 880  | 880  |
| 8x8   | 4  | 1120 | 1120 |
| 8x4   | 8  | 1600 | 1120 |
| 4x8   | 8  | 1120 | 1120 |
| 4x4   | 16 | 1600 | 1600 |
| total |    | 8320 | 7600 |

**Processing units.** Each of the nine `fme_pu` instances subtracts the four
interpolated pixels of its candidate from four current pixels. It then feeds
`fme_hadamard`, which transforms each line and accumulates the vertical
transform into 16 coefficient registers as the lines arrive. One clock after an
element's fourth line, the element's SATD (sum of |coefficients|, unscaled) is
added to the unit's accumulator. The engine thus handles 36 pixels per clock.

**Costs and decisions.** After a block's last line, `fme_ctrl` waits three
clocks for the accumulators, then captures them. For each candidate,
`fme_mv_cost` adds `lambda * (se(mvd_x) + se(mvd_y))`, where se() is the
signed Exp-Golomb code length and mvd is the quarter-pel difference to the
predicted vector `pmvq`. Each pass starts from its centre, the integer
position or the half-pel winner. A candidate replaces the centre only with a
strictly lower cost; among equal costs the lowest index wins. The winner of
the second pass goes to the output buffer. When all 41 blocks are done,
`fme_mode_decision` picks the partition: 16x16, 16x8, 8x16 or 8x8, with each
8x8 as 8x8, 8x4, 4x8 or 4x4. A macroblock takes 2 x (760 line accesses +
41 x 4 capture clocks) + 1 = 1849 clocks; the half-pel pass alone
(`QPEL = 0`) takes 925.

## Numbers the testbenches confirm

| quantity | value |
|---|---|
| IME window accesses per macroblock (32x32 range) | 1039 x 16 pixels = 16.23 pixels per candidate |
| IME start to done | 1043 clocks |
| FME window accesses, half-pel pass | 760 x 10 pixels = 7600 (advanced), 832 x 10 = 8320 (basic) |
| FME window accesses, both passes | 1520 x 10 pixels (advanced) |
| FME start to done | 1849 clocks (925 with `QPEL = 0`) |
| whole macroblock (`me_top`) | 1043 + 1849 = 2892 clocks |

At CIF (396 macroblocks), 30 frames/s, this is 12.4 M clocks/s for the IME and
22.0 M clocks/s for the two-pass FME. That fits the published clocks of
13.5 MHz (IME) and 27 MHz (FME) when each engine runs on its own clock. In
`me_top` the two engines run one after the other, which needs 34.4 M clocks/s.

## Where this RTL departs from, or goes beyond, the published design

* **The quarter-pel pass is this design's.** The publication describes the
  second pass only as a step of the algorithm: eight quarter-pel candidates
  around the best half-pel one, with bilinear quarter samples. Its hardware
  and its memory counts cover only the half-pel pass. Here the same nine
  units run the second pass. It re-reads the block's lines, so the FME reads
  1520 lines per macroblock, not 760. It adds 924 clocks.
* The two engines are connected in sequence on one window memory. The
  published engines are separate; a pipelined encoder would give each its own
  window buffer.
* The 3-pixel filter margin (53 x 53 window) is this design's choice.
* The memory has 16 banks. The published example draws 8 banks, but 16-pixel
  accesses need 16.
* The checkerboard sub-sampling pattern, the tie rules, the SATD scaling (none)
  and the pipeline depths are choices made here.
* The filter rounding and clipping are the standard H.264 ones; the published
  formula shows only (A - 5B + 20C + 20D - 5E + F) / 32.
* The rate term (lambda times the Exp-Golomb lengths, one predicted vector per
  macroblock) and the partition decision without a mode-rate term are this
  design's reading of a block that is only named there.
* The advanced flow transposes the 16x8 and 8x4 blocks, the ones wider than
  tall. This reproduces the published per-size pixel counts and flow drawing.
  One sentence of the publication names 4x8 and 8x16 instead; the counts do not
  support that reading.
* There is one reference frame. Window refill between macroblocks (Level-C/D
  reuse) and multi-frame scheduling are left to the host.
* All memories are behavioural register arrays, not foundry SRAM macros.

## Files

`rtl/` (one module or package per file):

| file | role |
|---|---|
| `me_pkg.sv` | shared types, 41-block geometry, Exp-Golomb length |
| `me_top.sv` | IME + FME + window memory for one macroblock |
| `sw_sram_ladder.sv` | ladder-arranged 16-bank window memory |
| `cur_mb_buf.sv` | 16x16 current-block register buffer |
| `ime_engine.sv`, `ime_scan_ctrl.sv`, `ime_ref_array.sv`, `ime_pu_array.sv`, `ime_sad4x4_tree.sv`, `ime_vbs_tree.sv`, `ime_decision.sv` | integer search |
| `fme_engine.sv`, `fme_ctrl.sv`, `fme_interp.sv`, `fme_pu.sv`, `fme_hadamard.sv`, `fme_mv_cost.sv`, `fme_mode_decision.sv` | half-pel and quarter-pel refinement |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
checks against an independent software model in `tb/tb_ref_pkg.sv`, which
computes SADs, H.264 half-pel and quarter-pel samples (the latter from the
standard's table of sixteen sub-positions), Hadamard SATDs and code lengths
directly from their definitions. `tb_me_top.sv` runs the whole design at its
default parameters on two macroblocks. It also counts that every mechanism
occurs: down, up and right moves; row and column accesses; normal and
transposed strips; quarter-pel passes; half-pel and quarter-pel results.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/me_pkg.sv tb/tb_ref_pkg.sv tb/tb_me_top.sv --top-module tb_me_top -o sim
./obj_dir/sim
```

Replace `tb_me_top` with any other testbench name. The whole-design run
takes under a minute, most of it compiling.

## Changing it

* `SR` (me_top, ime_engine, ime_scan_ctrl): search-range edge. The window
  memory grows to 16 + SR - 1 + 2 * PAD. The FME offset follows as PAD + SR/2.
* `TRUNC`, `SUBSAMPLE`: IME precision reductions. Use 0 and 0 for exact SADs.
* `ADV`: 1 for the advanced FME flow (transposed wide blocks), 0 for the basic
  flow.
* `QPEL`: 1 for both refinement passes, 0 for the half-pel pass only
  (vectors at half-pel precision, 925 clocks).
* Window coordinates are 7 bits (`me_pkg::CW`) and integer vectors 6 bits
  (`MVW`). Widen them together with `SR` beyond 32.
