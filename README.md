# Hierarchical motion estimation core for MPEG-2 MP@HL

This is the RTL of a low-power motion estimation core for 1920x1080 MPEG-2
encoding. It finds, for each 16x16 macroblock, a motion vector over a
+-128 x +-64 pixel range with half-pel precision. A full search over that
range is far too expensive, so the core splits the search into three stages.
Each stage has its own processor:

| stage | processor | what it searches | result |
|---|---|---|---|
| coarse | **MEH2** (`meh2_dds`) | 2:1 x 2:1 decimated picture, +-64 x +-32 decimated pixels (= +-128 x +-64), using a *one-dimensional diamond search* | coarse vector v2 |
| fine | **MEH1** (`meh1_fs`) | full resolution, full search over +-8 x +-8 around 2*v2, on a *ring-connected systolic array* | integer frame vector, plus top-field and bottom-field vectors |
| half-pel | **MEHH** (`hppu`) | the 8 half-pel positions around MEH1's frame vector | final vector in half-pel units |

The three processors run at the same time on different macroblocks. MEH2
works on macroblock n+1 while MEH1 searches macroblock n. MEHH refines
macroblock n-1 out of the same buffers MEH1 uses, in the clocks MEH1 leaves
them free.

The final full-resolution vector of a macroblock, in half pels, is
`4*v2 + hp_mv`. Here `v2` is MEH2's vector in decimated pixels and `hp_mv` is
MEHH's vector, relative to the centre of the MEH1 window.

## The ring-connected systolic array (MEH1)

This is the part that needs the most explanation.

**Geometry.** The array has 16x16 processor elements (PEs) and 16x16 shift
registers (SRs). A PE holds one pixel of the 16x16 template, which stays put
for the whole search. It also holds one search-window pixel, and it outputs
the absolute difference of the two. Row *i* of the PEs and row *i* of the SRs
are chained into one ring of 32 search pixels:

    PE0 -> PE1 -> ... -> PE15 -> SR0 -> SR1 -> ... -> SR15 -> (back to PE0)

The search window for +-8 is 16+16 = 32 pixels wide, so one window row fits
in one ring exactly. Rotating a ring by one position moves the window one
pixel sideways under the template. The adder tree then delivers the SAD
(sum of absolute differences) of the next horizontal candidate. Each clock
of rotation therefore yields one candidate SAD.

**Window layout.** SW1 holds a 32x32 window. Window column c and row r sit
at displacement (c-8, r-8) from template pixel (0,0). Each window row is
stored as two 128-bit words: half 0 holds columns 0..15 and half 1 holds
columns 16..31. SW1 has two read ports, so one whole window row (both halves)
can be read per clock.

**Phases** (the `phase` output, type `fs_phase_e`):

| phase | clocks | what happens |
|---|---|---|
| INIT | 17 | Template rows 0..15 and window rows 0..15 are read and shifted *up* into the array, one row per clock. After 16 shifts, PE row i holds template row i over window row i. |
| CALC | 17 per candidate row | The 17 candidates dx = -8..+8 of the current dy. Even candidate rows rotate the rings left (dx rising). Odd rows rotate them right (dx falling). One SAD is summed per clock. The next window row is read in the last CALC clock. |
| INPUT | 1 per candidate row | All rows shift up by one and the new window row enters the bottom row. The array then covers dy+1. |
| DRAIN | 2 | The last sums leave the pipelined adder tree. |

So a search takes 17 + 17x17 + 16 + 2 = **324 clocks** from `start` to `done`.
The testbenches check this count.

**The half swap.** A left sweep rotates every ring by 16 positions, half the
ring. The PE half then holds what the SR half held before. The row that
enters at the next INPUT must be aligned the same way, so its two 128-bit
halves have to be swapped. This needs no crossbar: the row is read with port
A on half 1 and port B on half 0. Port A always feeds the PE half and port B
the SR half. A right sweep undoes the rotation, so the row after it is read
straight. Sweeps alternate left and right (a serpentine scan), so no clock is
spent rewinding the rings.

**Frame and field.** The adder tree keeps the per-row sums apart. It adds the
even rows (top field) and the odd rows (bottom field) separately, and the
frame SAD is their sum. One pass therefore gives three best vectors: frame,
top field and bottom field, each in frame-row units. A top-field vector with
an even dy compares the top field with the top reference field; with an odd
dy it compares against the bottom reference field.

**Ties.** Equal SADs go to the smaller (dy, dx), in signed order (`sad_min`).
This makes the result independent of the serpentine scan order.

**SW1 traffic.** MEH1 reads SW1 only during INIT and in one clock per
candidate row. It never reads in the other CALC clocks, and those are the
clocks MEHH uses.

## The one-dimensional diamond search (MEH2)

MEH2 searches the decimated picture. Each decimated pixel stands for a 2x2
block of the original, so the block is 8x8 and the range is +-64 x +-32. For
one candidate vector it reads two 8-pixel block rows per clock through the
two read ports of SW2 and TB2. It sums them in a 16-lane SIMD
absolute-difference unit (`sad_simd`). One SAD takes 4 clocks of reads, and
8 clocks in all from issue to the next issue.

SW2 is built from 16 byte-wide banks. Bank b holds the columns whose index
mod 16 equals b. With this layout any 8 consecutive pixels of a row come out
of 8 different banks in one clock, whatever their alignment. The bus still
writes one aligned 16-pixel word at a time.

The search runs in three steps:

1. Evaluate the four candidate vectors given at `start` and keep the best as
   the centre. Candidates outside the range are clamped to it. The host
   chooses the candidates; the testbench uses zero, the previous macroblock's
   vector, a guess and a far point.
2. Evaluate the four neighbours at distance 1 (+x, -x, +y, -y). If none beats
   the centre, the search ends.
3. Otherwise walk along the best neighbour's direction to distances
   2..`STEPS` (default 4). The best point on that line becomes the new
   centre. Return to step 2, at most `MAX_ITER` (default 16) times.

Points outside the range are skipped. On equal SADs the earlier point wins.
The outputs `n_evals` and `n_lines` report how much work a search took.

Like any gradient method, the diamond search can stop in a local minimum.
The +-8 full search that follows hides small coarse errors, but not large
ones. The end-to-end testbench prints its coarse and final vectors against
the true motion, and two of its six jobs miss.

## Half-pel refinement (MEHH) and buffer sharing

MEHH (`hppu`) receives MEH1's frame vector (dx, dy) and its SAD. It reads
the 18 window rows around the block, one per clock, with both SW1 ports, and
keeps three rows in a line buffer. Each clock it builds all eight
interpolated versions of one template row and accumulates their SADs. The
interpolation uses MPEG-2 rounding: (a+b+1)>>1 for a half position, and
(a+b+c+d+2)>>2 for a diagonal one. The best of the nine candidates (integer
vector first, then the eight half positions in a fixed order) is returned as
`(2*dx+hx, 2*dy+hy)`.

Some half positions need a pixel outside the 32x32 window; this happens when
dx or dy is +-8 on that side. Those positions are skipped.

MEHH starts by itself in the clock in which MEH1's `done` is high, on the
buffer MEH1 just searched. It latches MEH1's result at once, so the host may
restart MEH1 in the very next clock.

MEHH asks for the SW1 ports with `sw_req` and stalls in any clock in which
MEH1 reads them. With no stalls it finishes 20 clocks after its start.
TB1 port A belongs to MEH1 and port B to MEHH, so the template never
conflicts.

SW1 and TB1 each hold two buffers, selected by `meh1_buf`. While MEH1 and
then MEHH work on one buffer, the host fills the other.

## Buffers and the bus

All four buffers are two-read, one-write synchronous SRAMs (`sram_2r1w`,
written as arrays). The core is fed through a 128-bit write-only bus
(`mem_if`). It registers each write and routes it one clock later:

| `bus_sel` | buffer | word address | contents |
|---|---|---|---|
| `SEL_SW2` (0) | SW2, 648 words | row*9 + word (72 rows x 9 words) | 16 decimated pixels |
| `SEL_TB2` (1) | TB2, 8 words | template row 0..7 | 8 decimated pixels in bits 63:0 |
| `SEL_SW1` (2) | SW1, 128 words | {buffer, row[4:0], half} | 16 pixels |
| `SEL_TB1` (3) | TB1, 32 words | {buffer, row[3:0]} | 16 pixels |

A write beyond a buffer's size is dropped and sets the sticky `addr_err`.
Pixel k of a word is bits [8k+7:8k]. The SW2 window covers decimated columns
-64..+79 and rows -32..+39 relative to the decimated block origin. Only
columns 0..135 are ever read.

## Using the core

Signals of `meh_top`, all synchronous to `clk`, with asynchronous reset
`rst_n` (active low):

* Fill SW2/TB2, then pulse `meh2_start` with `meh2_cand[4]`. `meh2_done`
  pulses when `meh2_mv` / `meh2_sad` are valid.
* Fill the free SW1/TB1 buffer with the window centred on 2*`meh2_mv`. Then
  pulse `meh1_start` with `meh1_buf` while `meh1_busy` is low. After 324
  clocks `meh1_done` pulses with `frame_mv/sad`, `top_mv/sad` and
  `bot_mv/sad`.
* 20 clocks after `meh1_done` (more if MEHH stalls), `hp_done` pulses with
  `hp_mv`, `hp_sad` and `hp_buf`.
* Results hold until the next start of the same processor. Do not rewrite a
  buffer while MEH1 or MEHH still uses it. The assertion `a_hp_ready` in
  `meh_top` flags a new MEH1 result that arrives while MEHH is still busy.

Bi-directional (B-picture) prediction means two searches per macroblock, one
per reference picture. Forming the averaged (interpolated) prediction is left
to the encoder.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `meh_pkg` | `MB` | 16 | macroblock size and PE array dimension |
| `meh_pkg` | `FS_R` | 8 | full-search range |
| `meh_pkg` | `UR_X`, `UR_Y` | 64, 32 | decimated coarse range (x2 in full resolution) |
| `meh2_dds` | `STEPS` | 4 | farthest point of a line search |
| `meh2_dds` | `MAX_ITER` | 16 | maximum number of line searches |
| `sad_simd` | `LANES` | 16 | SIMD width |

The array and the buffers follow from `MB`. The buffer address widths in
`meh_top` are derived, not separate parameters.

## What follows the source design and what does not

These points follow the published architecture: the three processors and
their roles; the 2R1W buffers; 16x16 PEs plus 16x16 SRs in rings that move
left or right; the half swap done through read addresses; the Init/Calc/Input
phase structure; frame and field sums from one adder tree; the 16-way SIMD of
MEH2; MEHH sharing SW1/TB1 in the clocks MEH1 leaves free; the 128-bit bus.

These are choices of this design:

* **Decimation.** The picture is decimated 2:1 in each direction; the host
  does the filtering.
* **Search details.** The four diamond-search candidates are inputs. Line
  length, iteration bound, clamping and tie rules are this design's.
* **Phase schedule.** A whole window row lives in a ring, so one CALC sweep
  covers a candidate row and one INPUT clock moves to the next. The source
  also names an "Idle" phase for the vertical shift at the end of a row; here
  it coincides with INPUT.
* **Row loads.** Each INPUT clock loads a whole 32-pixel row, 16 pixels
  through each read port. The source mentions 16 pixels per Input phase in
  one place, but a 128-bit half swap in another; this design follows the
  swap.
* **MEHH datapath.** MEHH is organised as 8 positions x 16 pixels per clock.
  The source gives its width as 108 lanes without saying how they are used.
  Edge half positions are skipped, and only the frame vector is refined.
* **Interfaces.** Bus protocol, address map, handshakes and pipeline depths
  are this design's.
* **No window reuse.** The windows are rewritten in full for every search,
  with no circular addressing to reuse the overlap between neighbouring
  macroblocks. The shared search-window scheme for B-pictures is not built
  either. In that scheme, the two narrow B-picture ranges share the memory of
  the wide P-picture range. The host can lay out windows that way, but the
  core gives no help.

## Capacity

At 1920x1088 (8160 macroblocks) and 30 frames/s, a 108 MHz clock leaves 441
clocks per macroblock.

* **One reference.** One MEH1 search (324 clocks) fits, with MEH2 and MEHH
  overlapped.
* **Two references.** A B-picture needs 648 clocks per macroblock, which
  needs about 159 MHz.
* **Bus load.** Reloading whole windows for two references costs about 46
  Gbit/s, well over the 13.8 Gbit/s of a 128-bit, 108 MHz bus. Window reuse
  would be needed for real-time HD.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/tb_ref_pkg.sv`: a plain-loop full search, the half-pel search and the
diamond search.

| testbench | covers |
|---|---|
| `tb_meh_top` | Whole core at default sizes. Six jobs: three macroblocks, forward and backward. Every MEH2, MEH1 (frame/top/bottom) and MEHH result is checked against the models, and MEH1's 324-clock latency is checked. It counts that line searches, an immediate stop, left/right sweeps, swapped row loads, MEHH stalls, processor overlap, a half-pel result, a found true motion and a rejected bus write all occur. |
| `tb_meh_rate` | HD throughput: eight searches back to back with the next window loaded meanwhile. Checks the 325-clock start-to-start interval against the 441-clock budget of 1080p30 at 108 MHz, every result, and MEHH stalls. |
| `tb_meh1_fs` | Full search on random and planted data, separate field matches, corners, both buffers, latency, sweep and swap counts. |
| `tb_systolic_array` | Ring rotation both ways, row shift with swapped halves, frame/field sums. |
| `tb_hppu` | All eight half positions planted, edges and corners, random grant (stalls), 20-clock latency. |
| `tb_meh2_dds` | Diamond search against the model, exact finds on a textured bowl, boundary, clamped candidate, stop at a candidate. |
| `tb_me_pe`, `tb_adder_tree`, `tb_sad_simd`, `tb_sram_2r1w`, `tb_mem_if` | Unit behaviour, including latency and range checks. |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_meh_top \
        -y rtl -y tb +libext+.sv rtl/meh_pkg.sv tb/tb_ref_pkg.sv tb/tb_meh_top.sv
    obj_dir/Vtb_meh_top

The array testbenches take a few minutes to compile (256 PEs) and seconds to
run.

## Files

`rtl/meh_pkg.sv` holds the shared types and constants. The other `rtl/*.sv`
files each hold one module: `meh_top`, `mem_if`, `meh2_dds`, `sad_simd`,
`sram_2r1w`, `meh1_fs`, `systolic_array`, `me_pe`, `adder_tree`, `sad_min`
and `hppu`. The testbenches in `tb/` are named `tb_<module>.sv`.
