# Memory-based pipelined blocking-effect remover for HDTV

Block-transform video coding (DCT on 8x8 blocks) leaves visible seams
along block borders after decoding. This design removes them in real time
for 1920-pixel-wide HDTV. Filtering the whole picture would blur real edges,
so the design classifies each 8x8 block first. The class is either flat
("monotone") or an edge at 0°, 45°, 90° or 135°. Only the 28 border pixels
of each block are then filtered, with a 3x3 mask that smooths along the
edge rather than across it. All arithmetic uses shifts and adds.

The architecture has two main ideas:

* **Banked memory.** The picture memory is split into 60 small banks, so
  that all nine pixels of a 3x3 window can be read in a single cycle.
* **A rotating schedule.** Six memory modules each hold one strip of 8
  lines. The modules take turns at the five processing operations, so
  every processing unit is busy on some strip in every step.

## Data flow

```
 in ──► input mapper ──► ┌───────────── memory: 6 modules x (9 + 1) banks ─────────────┐ ──► output mapper ──► out
                         └──▲──────────────▲─────────────▲───────────────▲──────────────┘
                            │ edge mapper  │ h-filter    │ v-filter      │
                       edge detector       │ mapper      │ mapper        │
                            │              │             │               │
                   direction detector ──► direction registers ──► horizontal / vertical filter
```

| Operation | Unit(s) | Work per strip (1920-pixel lines) |
|-----------|---------|-----------------------------------|
| 0 write   | `in_mapper` | 15 360 pixels in, one per cycle |
| 1 edge    | `edge_mapper`, `edge_detector`, `direction_detector`, `dir_regs` | 240 blocks x 64 cycles |
| 2 h-filter | `filter_mapper` (VERT=0), `bre_filter` | 240 x 16 left/right border pixels |
| 3 v-filter | `filter_mapper` (VERT=1), `bre_filter` | 240 x 12 top/bottom border pixels |
| 4 read    | `out_mapper` | 15 360 pixels out, one per cycle |

## The bank map (the key to single-cycle windows)

A memory module stores one strip: 8 lines of `WIDTH` pixels. Within the
strip, the pixel at row `r` (0..7) and column `c` goes to

    bank    = 3*(r mod 3) + (c mod 3)          (0..8)
    address = (r div 3)*(WIDTH/3) + (c div 3)

Any three consecutive columns fall in three different column classes.
Any three consecutive rows inside a strip fall in three different row
classes. So every 3x3 window inside a strip touches nine different banks.
A window that crosses into the strip above or below takes that row from
another module, which is a different physical memory anyway. Rows 0, 3
and 6 share a row class, so each bank holds 3 x 640 = 1920 bytes.

The tenth bank of each module holds the filtered border pixels: 28 per
block, 240 x 28 = 6720 bytes. Border pixel `p` of block `b` is at address
`b*28 + p`:

| p | position in the block |
|---|-----------------------|
| 0..7 | column 0, rows 0..7 |
| 8..15 | column 7, rows 0..7 |
| 16..21 | row 0, columns 1..6 |
| 22..27 | row 7, columns 1..6 |

Total storage is 54 x 1920 + 6 x 6720 = 144 000 bytes (about 141 KB).
The input banks are never written during processing. Because of that,
both filters work on original pixels, and the order of the two filter
steps does not matter.

## The schedule

The step counter `w` names the module that receives input. Operation `k`
works on module `(w - k) mod 6`, and the sixth module sits idle for one
step:

| step | mod 0 | mod 1 | mod 2 | mod 3 | mod 4 | mod 5 |
|------|-------|-------|-------|-------|-------|-------|
| 0 | write | – | – | – | – | – |
| 1 | edge | write | – | – | – | – |
| 2 | h-filt | edge | write | – | – | – |
| 3 | v-filt | h-filt | edge | write | – | – |
| 4 | read | v-filt | h-filt | edge | write | – |
| 5 | idle | read | v-filt | h-filt | edge | write |
| 6 | write | idle | read | v-filt | h-filt | edge |

Filtering the border rows of strip `s` needs the last row of strip `s-1`
and the first row of strip `s+1`:

* When the horizontal filter works on strip `s`, strip `s-1` is in
  vertical filtering and strip `s+1` is in edge detection.
* When the vertical filter works on strip `s`, strip `s-1` is being read
  out and strip `s+1` is in horizontal filtering.

So each input bank has two read ports. Port A serves the operation on the
module's own strip. Port B serves a filter on a neighbouring strip.
`memory_banks` makes this routing with multiplexers, driven by the step's
module assignment. (A tri-state bus enabled by a decoder would do the same
job.)

A step begins with a one-cycle start pulse to every unit that has work.
It ends when all units report done. At full rate a step lasts
`8*WIDTH + 3` cycles. The write and read units set that length: 15 360
cycles each. The edge unit needs 15 360 + 1 cycles, and the filters need
3 840 and 2 880. A slow source or a stalled sink simply lengthens the
step. Within a frame, the write step always waits for input. After the
last strip of a frame, a step that starts with no input pending is empty
(the `bubble` output). This drains the pipeline between frames without a
flush signal. A strip leaves four steps after it entered.

## Edge classification

For each block, counter K looks at the 56 horizontally adjacent pairs,
and counter L at the 56 vertically adjacent pairs. A pair (a, b) counts
+1 if `(b-a)/avg(a,b) > 1/4` and -1 if it is below -1/4. The hardware
avoids the division: it tests `8*(b-a) > a+b` and `8*(b-a) < -(a+b)`,
where the 8 is a 3-bit left shift (`edge_cmp`, used twice in
`edge_detector`). `edge_mapper` scans each block in 64 cycles. In every
cycle it reads a pixel together with its right-hand and lower neighbours,
which lie in three different banks.

With minimum edge length M = 6 (`direction_detector`):

| condition | class | code |
|-----------|-------|------|
| \|K\| < 6, \|L\| < 6 | monotone | 0 |
| \|K\| < 6, \|L\| ≥ 6 | 0° | 1 |
| \|K\| ≥ 6, \|L\| ≥ 6, sign K = sign L | 45° | 2 |
| \|K\| ≥ 6, \|L\| < 6 | 90° | 3 |
| \|K\| ≥ 6, \|L\| ≥ 6, signs differ | 135° | 4 |

The class of every block is kept in `dir_regs` (6 modules x 240 blocks x
3 bits) until both filters have used it.

## Filtering

Each mask has integer coefficients that sum to 1024, and every
coefficient is a power of two:

* **monotone:** centre 512, the eight neighbours 64 each;
* **edges:** centre 512, and 256 on each of the two neighbours that lie
  along the edge:
  * 0°: left and right;
  * 90°: above and below;
  * 45°: upper-right and lower-left;
  * 135°: upper-left and lower-right.

In `bre_filter`, the `amount_selector` turns the class into a shift of 6,
8 or 9 bits per tap, or marks the tap unused. Each shift is fixed wiring.
A Wallace tree (four levels of 3:2 carry-save adders) reduces the nine
terms to two. A carry-select adder (4-bit blocks) adds those two, and
bits [17:10] of the sum form the result, i.e. `floor(sum / 1024)`. The
same filter datapath serves both filter operations.

`filter_mapper` walks the border pixels one per cycle:

* **Horizontal operation:** columns 0 and 7 of each block, all 8 rows
  (corners included).
* **Vertical operation:** rows 0 and 7, columns 1..6.

At the picture border, the missing neighbours are replaced by the nearest
row or column inside the picture (edge replication). Left/right borders
come from the column position. Top/bottom borders come from the strip's
first/last-in-frame flags, which the scheduler keeps for every module.

## Interface and timing (`bre_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_pix` | in/out/in | 1/1/8 | input pixels, raster order; a pixel moves when both are high at a clock edge |
| `out_valid`, `out_ready`, `out_pix` | out/in/out | 1/1/8 | output pixels, same order and size as the input |
| `step_start`, `bubble` | out | 1 | a schedule step starts / the starting step is empty |

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH` | 1920 | pixels per line; must be a multiple of 24 (blocks of 8, bank map of 3) |
| `STRIPS` | 135 | 8-line strips per frame (1080 lines); only sets the frame-edge flags |

Bank depth (`WIDTH`) and filtered-bank depth (`WIDTH/8*28`) follow from
`WIDTH`.

Each schedule step adds a few cycles of overhead. During those cycles
`in_ready` is low, so a source that cannot pause needs a small FIFO (or
the line blanking interval).

## Where this design makes its own choices

The following points are not fixed by the source description of the
architecture, and were settled here:

* **Schedule.** The schedule is write, edge, h-filter, v-filter, read,
  then one idle step per module (period 6). The step length is set by the
  slowest unit rather than fixed.
* **Decoder bus.** Multiplexers replace the tri-state buses.
* **Bank ports.** Input banks have two read ports, so that filters can
  read neighbouring strips.
* **Tau.** The threshold is 1/4 as in the hardware formulation. The
  algorithm's experimental value is 0.2.
* **Counts equal to M.** A count of exactly M = 6 counts as an edge. The
  rules as published leave that case open.
* **Masks.** Each 1-D mask goes with the edge direction along which it
  smooths.
* **Details left unspecified.** These were chosen here:
  * pixel width: 8 bits;
  * handshakes: valid/ready;
  * class encoding: 0..4;
  * storage of the filtered-pixel bank;
  * corner pixels: done by the horizontal filter;
  * picture-border handling: edge replication;
  * result rounding: floor;
  * one pipeline register in the filter;
  * one-cycle synchronous RAM reads;
  * frame height: 1080 lines.

## Files

| file | contents |
|------|----------|
| `rtl/bre_pkg.sv` | types (`dir_t`, request structs), bank-map functions |
| `rtl/bre_top.sv` | top level |
| `rtl/scheduler.sv` | step control and module rotation |
| `rtl/memory_banks.sv`, `memory_module.sv`, `mem_bank.sv` | memory and routing |
| `rtl/in_mapper.sv`, `edge_mapper.sv`, `filter_mapper.sv`, `out_mapper.sv` | address generators |
| `rtl/edge_cmp.sv`, `edge_detector.sv`, `direction_detector.sv`, `dir_regs.sv` | classification |
| `rtl/bre_filter.sv`, `amount_selector.sv`, `wallace_tree.sv`, `csa32.sv`, `carry_select_adder.sv` | filter datapath |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/bre_ref.svh` | frame-level reference model (plain multiply/divide arithmetic) |
| `tb/tb_bre_top.sv` | end-to-end test, 48-pixel lines, 3 strips, 5 frames |
| `tb/tb_bre_top_full.sv` | end-to-end test at the default size, 3 frames of 1920x1080 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its
own (each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/bre_pkg.sv tb/tb_bre_top.sv --top-module tb_bre_top -o sim
./obj_dir/sim
```

To run another block's test, replace `tb_bre_top` with that block's
testbench.

The end-to-end tests compare every output pixel against `tb/bre_ref.svh`.
They send frames back to back and with idle gaps, some with random input
pauses and random output back-pressure. They also check:

* the step length (`8*WIDTH` to `8*WIDTH+8` cycles when nothing stalls);
* the four-step latency;
* that each mechanism occurred: all five classes, input stalls,
  back-pressure, empty steps, and border replication.
