# Pixel memory and 3x3 window generator for Sobel edge detection

A Sobel edge detector needs, for every pixel, the 3x3 neighbourhood around it. This
design keeps a whole grey-scale frame in an on-chip memory organised by image row. It
reads three consecutive rows in one access and copies them into three line buffers. The
line buffers then shift one pixel per clock, which produces a stream of 3x3 pixel
matrices (P0..P8) covering the frame in raster order. A two-stage Sobel datapath turns
each matrix into the gradient magnitude |Gx|+|Gy|. It compares that with an 8-bit
threshold and outputs 255 (edge) or 0 (no edge) for the centre pixel.

The clock of each part is gated by clock AND enable. The memory, the window logic and the
Sobel datapath therefore get clock pulses only on the cycles when they have work. This
clock gating is the power-saving idea of the architecture.

The default build is sized for a 128x128 8-bit image. Smaller images run in the same
build, and larger ones need a build with larger `IMG_W`/`IMG_H`.

```
             wr_* (load frame)
                  |
   clk --+--[clock_gate]--> image_pixel_memory  (IMG_H rows x IMG_W pixels)
         |                    | dout1 = row r, dout2 = row r+1, dout3 = row r+2
         +--[clock_gate]--> pixel_matrix_gen: 3 x line_buffer -> window register P0..P8 --> win_*
         |                    |
         +--[clock_gate]--> sobel_edge_detector: |Gx|,|Gy| -> |Gx|+|Gy| > thr ? 255 : 0 --> edge_*
         |
         +----------------> frame_controller (scan order, clock-gate enables, busy/done)
```

## The frame memory: one address per row

`image_pixel_memory` holds `IMG_H` words. Each word is a whole row of `IMG_W` 8-bit
pixels, with column 0 in the least significant byte. The address range is the number of
rows, and a read returns all the columns of a row.

A read at row address `r` returns rows `r`, `r+1` and `r+2` together on `dout1`, `dout2`
and `dout3`, registered one clock after `rd_en`. The memory is a single array with three
read ports and one write port. On an FPGA, a synthesis tool builds the three read ports
by replicating the array, or builds it from registers. At 128x128 the array is
131,072 bits.

The frame is loaded one pixel per clock through `wr_en`/`wr_row`/`wr_col`/`wr_data`.
Alternatively, set the `INIT_FILE` parameter to a `$readmemh` file with one row per
line, each line holding `IMG_W*2` hex digits.

## Line buffers and the 3x3 window

This is the part whose timing matters most. A `line_buffer` is a parallel-load shift
register one row long. `load` copies a row in, and each `shift` moves it one pixel
towards column 0. After `k` shifts its three taps are columns `k`, `k+1` and `k+2`.

`pixel_matrix_gen` has three line buffers, one per row of the window. On each shift
cycle it captures their taps into the window register:

```
P0 P1 P2   row r,   columns c, c+1, c+2
P3 P4 P5   row r+1
P6 P7 P8   row r+2
```

`frame_controller` drives this with a fixed schedule for every row triple
`r = 0 .. cfg_h-3`:

| cycle            | controller | effect at the clock edge                       |
|------------------|------------|------------------------------------------------|
| 0                | READ r     | memory registers rows r, r+1, r+2              |
| 1                | LOAD       | line buffers take the three rows               |
| 2 .. cfg_w-1     | SHIFT c    | window (r, c) captured, line buffers shift     |

One row triple therefore costs `cfg_w` cycles and yields `cfg_w-2` windows. A frame
costs `(cfg_h-2)*cfg_w` cycles: 16,128 cycles at 128x128, of which 15,876 produce a
window. Each window appears on `win_*` one cycle after its SHIFT cycle. Its edge result
appears on `edge_*` two cycles after that.

Only full windows are formed, with no padding. Pixels in the first and last row and in
the first and last column get no result.

## Sobel datapath

`sobel_edge_detector` numbers the window P1..P9 (P1 = window P0). It uses six 9-bit
subtractors, doubles the middle term of each group by a left shift, and has two
absolute-value adders (`abs_sum3`):

```
|Gx| = |(P3-P1) + 2(P6-P4) + (P9-P7)|
|Gy| = |(P7-P1) + 2(P8-P2) + (P9-P3)|
```

These are the standard Sobel kernels. The centre pixel itself is not used.

- **Stage 1** registers |Gx| and |Gy|. Each is at most 1020 and is held in 11 bits.
- **Stage 2** adds them into a 12-bit magnitude. The largest magnitude an 8-bit image
  can produce is 1530.
- Stage 2 then compares the magnitude with `threshold` and registers P5' = 255 if
  magnitude > threshold, else 0. A magnitude equal to the threshold is not an edge.

The block accepts one window per clock and has a latency of 2 clocks.

## Clock gating

`clock_gate` computes `gclk = clk & en_latched`. `en_latched` is `en` passed through a
latch that is transparent while `clk` is low, so the gated clock carries only whole
pulses. The three enables come from `frame_controller`:

- **memory:** `rd_en | wr_en`
- **window logic:** load or shift, plus one cycle to clear `win_valid`
- **Sobel datapath:** the three cycles after each shift, while a window is in its
  pipeline

Outside a frame, only the controller is clocked. The three latches in a synthesis
report are these gates.

While `busy`, the window and Sobel clocks run on nearly every cycle. The savings come
from idle time and frame loading, and (for the memory) from all cycles except READ. For
example, the small-image test reports that over its run the memory clock was delivered
on 54% of cycles, and the window and Sobel clocks on 48%.

Flops behind a gated clock keep their reset through the asynchronous `rst_n`. `rst_n`
must fall, not merely start low, for those flops to reset.

## Interface of `sobel_memory_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `wr_en`, `wr_row`, `wr_col`, `wr_data` | in | 1, log2 H, log2 W, 8 | write one pixel (only while `busy` is low) |
| `start` | in | 1 | begin a frame (ignored while busy) |
| `cfg_w`, `cfg_h` | in | log2(W+1), log2(H+1) | active image size, 3..IMG_W and 3..IMG_H, sampled at `start` |
| `threshold` | in | 8 | edge threshold, hold stable while busy |
| `busy`, `done` | out | 1 | frame in progress; one-cycle pulse on the last window's SHIFT cycle |
| `win_valid`, `win`, `win_row`, `win_col` | out | 1, 9x8, ... | 3x3 matrix P0..P8 and its top-left pixel |
| `edge_valid`, `edge_pix`, `edge_mag`, `edge_row`, `edge_col` | out | 1, 8, 12, ... | P5' (255/0), magnitude, centre-pixel coordinates |

The first window appears 3 cycles after `start`. The last edge result appears 3 cycles
after `done`.

Parameters: `IMG_W = 128` and `IMG_H = 128` (pixels per row and rows). `sobel_pkg`
holds the fixed widths: 8-bit pixels, a 12-bit magnitude and an 8-bit threshold.

## Image sizes

| image | fits the default 128x128 build? |
|-------|---------------------------------|
| 128x128 | yes: 16,128 cycles per frame |
| 10x40, 40x10, 10x20, 20x10 | yes, through `cfg_w`/`cfg_h` |
| 32x32 (1024-pixel digit images) | yes: 960 cycles per frame |
| 320x240 | no: build with `IMG_W=320, IMG_H=240` (614,400-bit memory, 76,160 cycles) |
| 512x512 | no: build with `IMG_W=IMG_H=512` (2,097,152-bit memory, 261,120 cycles) |

## What follows the original architecture and what is this design's own

These parts follow the architecture this RTL implements:

- row-per-address memory read three rows at a time
- three line buffers feeding a 3x3 window
- window order: rows 0-2 across all columns, then rows 1-3, and so on
- the subtractor / shift / |X+Y+Z| structure, registered |Gx| and |Gy|, the 12-bit
  magnitude, the 8-bit threshold and the 255/0 output
- clock gating as clock AND enable

These are this design's own choices:

- **Clock gate latch:** the latch in front of the AND, which keeps the gated clock free
  of glitches.
- **Split into three gated domains:** memory, window logic and Sobel datapath, each with
  the enable terms listed above.
- **Memory interface:** one-cycle read latency, the pixel write port and the
  `$readmemh` file layout.
- **Line buffer form:** parallel load followed by shifting.
- **Frame schedule:** READ / LOAD / SHIFT, with no overlap between row triples. The
  next read is not overlapped with shifting, which would save 2 cycles per row triple.
- **Run-time image size:** `cfg_w`/`cfg_h`, so that one build serves smaller images.
- **Sobel output register** and the "equal is not an edge" rule.
- **Borders:** no output for border pixels.
- **Coordinates:** the window and edge streams carry coordinates. No text file of
  results is written; the edge stream is where that would be produced.

The results against the reference Sobel model are exact: 0 wrong pixels on all test
images. The published architecture reports a few wrong pixels per 1024-pixel digit
image against its own reference, without saying where they come from. No power figures
are given here. Power depends on the target technology and needs a power-analysis tool;
the clock-activity figures above are the nearest simulation-level measure.

## Simulation

All testbenches check themselves and end with a line
`TB_RESULT checks=<n> failures=<n>`. The test images are generated in
`tb/sobel_ref_pkg.sv`: noise, shaded shapes, and digit-like strokes on a 5x7 grid. That
file also holds the reference Sobel model, written directly from the kernels.

- **`tb_sobel_memory_top`:** default 128x128 build. Two full frames and one 32x32
  frame. It checks every window and edge result and the frame cycle counts. It fails
  if any mechanism never occurs: loads, shifts, row advances, edge and non-edge pixels,
  a magnitude equal to the threshold, each clock gate holding its clock off, and an
  ignored `start`.
- **`tb_workloads`:** default build with 10x40, 40x10, 20x10, 10x20 and ten 32x32 digit
  images. It prints the errors per image.
- **`tb_frame_320x240`, `tb_frame_512x512`:** the top rebuilt for the larger sizes.
- **`tb_image_pixel_memory`, `tb_line_buffer`, `tb_pixel_matrix_gen`, `tb_clock_gate`,
  `tb_sobel_edge_detector`, `tb_frame_controller`:** block-level tests. The clock-gate
  test moves the enable while the clock is high. The controller test compares every
  control output on every cycle.

`tb/sobel_frame_harness.sv` holds the clock, the reset, the top and the load/run/check
tasks that the top-level testbenches call.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_sobel_memory_top.sv \
  --top-module tb_sobel_memory_top
./obj_dir/Vtb_sobel_memory_top
```

Every testbench finishes in about a second or less. The testbenches set up every state
they read through reset or explicit drive, so they also pass with random initial
values (`+verilator+rand+reset+2`). The RTL is plain synthesizable SystemVerilog.
Assertions check the frame size at `start` and that no write arrives while busy; they
sit behind `ifndef SYNTHESIS`. A default build synthesises to about 500 word-level
cells, 3,264 flip-flop bits, 3 latches (the clock gates) and a 131,072-bit memory.

## Files

- `rtl/sobel_pkg.sv`: pixel and window types, widths, the 255/0 values
- `rtl/image_pixel_memory.sv`: row-organised frame memory with three-row reads
- `rtl/line_buffer.sv`: parallel-load row shift register
- `rtl/pixel_matrix_gen.sv`: three line buffers and the P0..P8 window register
- `rtl/abs_sum3.sv`: the |X+Y+Z| adder
- `rtl/sobel_edge_detector.sv`: gradients, magnitude, threshold, P5'
- `rtl/frame_controller.sv`: scan schedule and clock-gate enables
- `rtl/clock_gate.sv`: latch-based clock AND enable
- `rtl/sobel_memory_top.sv`: the whole design
