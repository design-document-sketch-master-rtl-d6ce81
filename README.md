# Sketch board: FPGA logic for a tablet tracing game

The game shows a player a simple picture. The player traces it with a pen on a
drawing tablet, and the system then grades how closely the tracing follows the
picture's outline. The system runs on a Cyclone V SoC board (DE1-SoC). The ARM
processor talks to the USB tablet and writes each pen stroke as pixels into a
frame buffer. This RTL is everything on the FPGA side of that:

* a 640 x 480 frame buffer in the board's 64 MB SDRAM, with its own SDRAM controller;
* VGA scan-out of the frame buffer to the board's video DAC;
* a hardware **sketch checker** that compares the player's frame with the
  reference frame and produces a score (0–100) and a letter grade;
* a small register block for the processor, and a 7-segment readout of the grade.

The USB link, the tablet driver, the processor and its AXI bridges are not in
this RTL. The design starts at the FPGA side of the bridge: two Avalon
memory-mapped ports on the top level.

```
           processor (via bridge)
             |hps_fb_*             |hps_csr_*
             v                     v
   +----------------+       +-----------+  start/bases   +--------------+
   | avl_arbiter    |<------| sm_regs   |--------------->| check_reader |
   | 0: scan-out    |       +-----------+                +--------------+
   | 1: processor   |            ^ score, grade, counts     | pixel pairs
   | 2: checker     |<-----------|--------------------------+ (Avalon reads)
   +----------------+            |                          v
          |                      |                   +----------------+
          v                      +-------------------| sketch_checker |--> seg7_display --> HEX5..0
   +------------+                                    +----------------+
   | sdram_ctrl |<==> DRAM_* pins (32M x 16 SDRAM)
   +------------+
          ^ line reads
   +---------------+     +------------+
   | vga_fb_reader |<----| vga_timing |
   +---------------+     +------------+
          |
          v VGA_R/G/B, VGA_CLK, VGA_BLANK_N, VGA_SYNC_N, VGA_HS, VGA_VS
```

Everything runs on one clock, assumed to be 100 MHz. `rst_n` is an
asynchronous, active-low reset.

## Frames and pixels

A frame is 640 x 480 pixels with one byte per pixel: 307,200 bytes. The byte
packs colour as 4 bits red, 2 bits green and 2 bits blue: red in `[7:4]`, green
in `[3:2]`, blue in `[1:0]`. Two pixels share a 16-bit SDRAM word, and the left
pixel is in the low byte. Rows follow one another, so pixel (x, y) of a frame
that starts at word address `base` is:

    word = base + (y*640 + x)/2,   byte = x mod 2

The SDRAM word address is `{bank[1:0], row[12:0], column[9:0]}`. By default the
player's frame, which is also the displayed frame, starts at word 0 (bank 0).
The reference frame starts at word 0x800000 (bank 1). Keeping the two in
different banks lets the checker alternate between them without closing rows.
The processor can move either frame, and the displayed frame, through the
registers.

A frame does not fit in the FPGA's 256 KB of on-chip memory, so frames live in
SDRAM. Only two display lines and a few checker lines are held on chip.

For the DAC, each channel is widened to 8 bits by repeating its bits. Red is
multiplied by 17, and green and blue by 85, so full scale maps to 255.

## SDRAM controller and bus sharing (`sdram_ctrl`, `avl_arbiter`)

The controller is an Avalon-MM agent with waitrequest flow control. A host
presents a request and holds it unchanged while `waitrequest` is high.
`waitrequest` drops for exactly one cycle, and the transfer completes at the end
of that cycle. For a read, `readdata` is valid in that cycle.

* **Power-up.** The controller waits 100 µs (`INIT_WAIT` cycles). It then
  precharges all banks, issues two auto-refreshes and loads the mode register:
  burst length 1, CAS latency 2. `init_done` then rises.
* **Open-row policy.** Each of the four banks remembers its open row.
  * A request to the open row issues READ or WRITE at once.
  * A request to another row precharges the bank and then activates the row.
  * A request to an idle bank activates the row first.
* **Latency.** For a row hit, a read takes `3 + CAS_LATENCY` = 5 cycles from
  request to completion, and a write takes 2.
* **Refresh.** Every 750 cycles (7.5 µs at 100 MHz) the controller closes all
  banks and auto-refreshes.
* **Byte writes.** `byteenable` drives the DQM pins, so the processor can write
  a single pixel.
* **Pins.** The DQ pins are split inside (`sd_dq_o`, `sd_dq_oe`, `sd_dq_i`).
  The top level has the tri-state `DRAM_DQ`. `DRAM_CLK` is the system clock.
  On a board it would normally come from a phase-shifted PLL output.

The arbiter gives fixed priority to scan-out (host 0), then the processor
(host 1), then the checker (host 2). A granted host keeps the SDRAM until its
transfer completes, so a higher-priority request waits for at most one transfer.
The grant itself is combinational, so an idle bus adds no cycle.

**Bandwidth budget.** A display line needs 320 words. At 100 MHz a line lasts
3,200 cycles, and 320 row-hit reads take about 1,600 of them. To protect the
display, the checker's loader starts no new word pair while a line fetch is
running. The full-size simulation confirms there is no underrun during a check.

## Display (`vga_timing`, `vga_fb_reader`)

`vga_timing` divides the clock by 4 to get a 25 MHz pixel enable and the
`VGA_CLK` pin. That pin rises in the middle of each pixel. The raster runs from
the top-left corner, left to right and then down, using the standard
640 x 480 @ 60 Hz intervals:

| | display | front porch | sync (active low) | back porch | total |
|---|---|---|---|---|---|
| horizontal, pixels | 640 | 16 | 96 | 48 | 800 |
| vertical, lines | 480 | 10 | 2 | 33 | 525 |

`vga_fb_reader` fetches each display line **one line ahead**. While line L is on
screen, it reads line L+1 into the other half of a two-line ping-pong buffer.
Line L is stored in half `L mod 2`. Line 0 is fetched during the last blanking
line, and `fb_base` is sampled at that moment, so a change of displayed frame
takes effect cleanly at the next frame. The DAC outputs are registered one pixel
after the counters, syncs included, so colour and sync stay aligned. Outside the
display interval the colour outputs are 0 and `VGA_BLANK_N` is low. `VGA_SYNC_N`
is held low because sync-on-green is not used.

If a line's fetch has not finished when the line starts, `underruns` counts it
and the line shows stale data. After reset this happens for the few lines that
fall inside the SDRAM's 100 µs power-up wait, and not after that. When the
next fetch falls due while a late one is still reading, the reader lets the
read in flight complete and then moves on to the new line; a stalled read is
never changed.

## The sketch check (`check_reader`, `sketch_checker`)

The check answers one question: how much of the reference outline did the
player trace, and how far off were the misses? It runs in these steps.

1. **Binarise.** Each pixel of both frames becomes one bit, "ink". A pixel is
   ink when its value differs from the background colour `BG` (default 0,
   black).
2. **Difference.** Where the two ink bits differ, the pixel counts towards
   `mismatch`. This is the absolute difference of the two binary images.
3. **Distance.** For every reference ink pixel, the checker finds the Euclidean
   distance `d` to the nearest player ink pixel. The distance is rounded down.
   The search covers a 7 x 7 window (`R` = 3). If no ink is found, `d` is capped
   at R+1 = 4.
4. **Correct or penalised.** A pixel with `d <= TOL` (default 1) counts as
   correct (`matched`). A pixel with `d > TOL` adds `d - TOL` to `penalty`.
5. **Score.** `score = 100 * (matched - penalty) / ref_count`, clamped to
   0..100. `score` is 0 when there is no reference ink.
6. **Grade.** A ≥ 90, B ≥ 80, C ≥ 70, D ≥ 60, otherwise F.

For example, suppose the outline has 941 ink pixels. The player traced 694 of
them to within one pixel, and the misses add up to 553 excess pixels of
distance. The score is then 100·(694−553)/941 = 14, grade F.

**How the checker does it in one pass.** The pixel pairs stream in raster order.
A line buffer of 643 entries x 12 bits keeps both ink bits of the last six rows.
A 7 x 7 register window shifts one column per step. The pixel being judged, the
window's centre, trails the input by three rows and three columns. To judge the
pixels of the last columns and rows, the checker pads each row with three blank
columns and the image with three blank rows. It generates the padding itself,
without waiting for input. Window cells that fall outside the image are masked
by comparing the window position with the cell offset. Each cell's distance
from the centre is a constant worked out during elaboration, so there is no
square root in hardware. A 49-way minimum picks the nearest ink. A check
therefore takes (480+3) x (640+3) window steps, plus stalls while the input
waits on memory, plus a 32-cycle division.

**Loading the images.** `check_reader` reads reference word i, then player word
i, and hands the checker the two pixel pairs those words hold. Then it moves on
to word i+1. In the full-size simulation a whole check takes about 3.7 million
cycles (37 ms at 100 MHz), most of it spent waiting for SDRAM reads and
yielding to the display.

The order of operations (binary outlines, difference, distance penalty beyond a
tolerance, percentage correct minus penalty, grade) is the game's algorithm.
The following are this design's choices:

* the window search and the distance cap;
* the tolerance of 1 pixel;
* the ink test;
* measuring the penalty in the same units as the correct count;
* the grade thresholds.

Change them through the parameters of `sketch_checker`.

## Processor registers (`sm_regs`)

The register port is a 32-bit Avalon-MM agent with word addresses. It has no
wait states.

| addr | name | access | meaning |
|---|---|---|---|
| 0 | CTRL | W | bit 0 = 1 starts a check. Ignored while a check is busy. |
| 1 | STATUS | R | bit 0 check busy, bit 1 result valid, bit 2 SDRAM ready |
| 2 | FB_BASE | R/W | word address of the displayed frame (reset 0) |
| 3 | REF_BASE | R/W | word address of the reference frame (reset 0x800000) |
| 4 | STU_BASE | R/W | word address of the player's frame (reset 0) |
| 5 | RESULT | R | bits 6:0 score, bits 10:8 grade (0 = A … 4 = F) |
| 6–9 | MATCHED, REF_COUNT, PENALTY, MISMATCH | R | the checker's counts |
| 10 | UNDERRUNS | R | display lines that were late |

The frame-buffer port (`hps_fb_*`) is a 16-bit Avalon-MM agent straight into the
SDRAM, through the arbiter. To draw a pixel, write its word address with
`byteenable` 01 for an even x or 10 for an odd x.

The 7-segment readout shows the letter on HEX5 (A, b, C, d, F) and the score on
HEX2..HEX0, with leading zeros blanked. HEX4 and HEX3 stay dark. Before the
first result, HEX2..HEX0 show dashes. Segments are active low, with bit 0 =
segment a.

## Files

| file | contents |
|---|---|
| `rtl/sm_pkg.sv` | Avalon request/response structs, grade enum, pixel expansion |
| `rtl/sdram_ctrl.sv` | SDRAM controller |
| `rtl/avl_arbiter.sv` | fixed-priority Avalon arbiter (with a hold-request assertion) |
| `rtl/vga_timing.sv`, `rtl/vga_fb_reader.sv` | raster timing; line-ahead frame scan-out |
| `rtl/check_reader.sv`, `rtl/sketch_checker.sv` | image loader; sketch checker |
| `rtl/seg7_display.sv`, `rtl/sm_regs.sv` | grade readout; registers |
| `rtl/sketch_master_top.sv` | top level with the board's pin names |
| `tb/sdram_model.sv` | behavioural 32M x 16 SDRAM that also checks the command protocol and timing |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Build one with Verilator 5, for example the full-size, end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sm_pkg.sv rtl/sketch_master_top.sv tb/sdram_model.sv tb/tb_sketch_master_top.sv \
    --top-module tb_sketch_master_top -Mdir obj_top
./obj_top/Vtb_sketch_master_top
```

The end-to-end test runs the top level at its real size, with the SDRAM model
on the pins. It takes about 10 seconds. It does the following:

1. Draws a reference outline and an imperfect tracing with single-pixel writes.
2. Checks every pixel of a captured VGA frame.
3. Runs a check and compares the counts, score, grade and HEX5 with a model in
   the testbench.
4. Switches the display to the reference frame and checks that frame.

It also counts the following events and fails if any of them never happened:

* SDRAM initialisation;
* refreshes;
* row misses;
* byte-masked writes;
* the processor waiting on the display;
* a display underrun, at power-up only.

The unit testbenches use smaller sizes where that saves time. The scan-out test
uses a 40 x 6 raster, and the checker test uses 16 x 12 images. Replace `tb_sketch_master_top` with
`tb_<module>` and the top file with `rtl/<module>.sv` to run them.

## Where this design stops, and what to trust

* **Verified in simulation only.** Nothing here has been run on hardware. The
  SDRAM timing values (tRCD = tRP = 2, tRFC = 7, CAS latency 2, refresh every
  750 cycles) assume a -7 speed-grade part at 100 MHz. Check them against the
  actual chip and clock. The SDRAM model enforces exactly these values, so it
  cannot catch a wrong choice of them.
* **No clock generation.** There is no PLL. The SDRAM clock pin is the system
  clock without a phase shift, and the pixel clock is an internal
  divide-by-4.
* **No tablet handling in hardware.** Pen packets are decoded in software,
  which writes pixels through `hps_fb_*`. Clearing a frame is also the
  processor's job.
* **Checker choices are not calibrated.** The interpretation of the grading
  algorithm (window radius, tolerance, penalty units, thresholds) is this
  design's. The scores it gives have not been compared with human judgement.
* **Only 640 x 480 is supported.** The DAC can go up to 1280 x 1024, but the
  raster and buffer sizes here are parameters set for 640 x 480 at 60 Hz.
