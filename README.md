# Edge-oriented area-pixel image scaler

This is a streaming hardware scaler for grey-level images. It resizes a
source image of SW x SH pixels to TW x TH pixels, from 1/8 to 8 times in
each direction, with the ratio chosen per frame. It keeps one line of
source pixels on chip and issues at most one target pixel per clock.

Each output pixel is treated as a small square window laid over the source
image. Its value is the mean of the source pixels under the window, each
weighted by how much of the window it covers (the *area-pixel* model). Two
ideas keep this cheap and sharp:

* **Integer geometry.** Exact overlap areas would need fractional
  arithmetic. Instead every target pixel is cut into 8 x 8 grid cells, and
  all window and pixel edges are tracked as integer cell counts by
  accumulators. The window is a power of two in each direction, so the final
  division is a shift.
* **Edge catching.** Before the weighted mean is taken, the areas of the two
  pixels in the more important source row are nudged toward the side where
  the image is locally more uniform. A step edge then stays a step instead of
  turning into a ramp.

The RTL follows a published seven-stage architecture for this algorithm.
Where that description is silent, this implementation makes its own
choices. They are listed in [Departures and own choices](#departures-and-own-choices).

## Pipeline at a glance

```
             +-------------+      +--------------+
 src_pix --->| line_buffer |----->|register_bank |---- 2x4 window ----+
   |         +-------------+      |  (Reg0..7)   |                   |
   +----------------------------->+--------------+                   |
                                                                     v
 cfg -> approx_module --left/right/top/bottom--> area_generator --> area_tuner --> target_generator --> ft_pix
        (stages 1-2)        |                     (stage 3)          (stages 4-5)   (stages 6-7)
                            +--- top ---------->  edge_catcher ---LA, U_GE--^
                                                  (stage 3)
 scaler_controller: sequences rows, source reads, bank shifts, target issue; supplies the shift amount
```

| Stage | Module | Work |
|------:|--------|------|
| 1 | `approx_module` | walk the grid: advance the source column m, issue target k |
| 2 | `approx_module` | left = min(srcright - winleft, winw), right, top, bottom |
| 3 | `area_generator` | A00 = left*top, A10 = right*top, A01 = left*bottom, A11 = right*bottom |
| 3 | `edge_catcher` | pick row n or n+1, compute LA |
| 4-5 | `area_tuner` | move abs(LA)*AC/256 of area between the two pixels of that row |
| 6-7 | `target_generator` | sum of F*A for the four pixels, shifted right by log2(winw*winh) |

A target pixel leaves `ft_pix` exactly 7 clocks after stage 1 issues it.

## The integer grid

All geometry is in grid cells. A target pixel is 8 x 8 cells (2^n with
n = 3). The target pixels therefore sit 8 cells apart horizontally, and a
source pixel is `sw` cells wide:

    sw = round(8 * (TW-1) / (SW-1))        (halves round up)

This choice puts the centres of the four corner pixels of both images at the
same positions. `sw` is computed once per frame with a sequential divider,
which takes about 18 clocks. `sh` is computed the same way from TH and SH.

**Window size.** The window is `winw = 8 * 2^j` cells, where 2^j <= TW/SW < 2^(j+1).
j is limited to -3..2, so winw is one of 1, 2, 4, 8, 16 or 32. Larger
enlargements get wider windows and smoother results. Reductions get narrower
windows, so that detail is not averaged away. `winh` is chosen the same way.

**Walking along a row.** The approximate module keeps two positions:

* `winleft` is the left edge of the current window. It starts at
  (sw - winw)/2 and grows by 8 for each target pixel.
* `srcright` is the right edge of source pixel m. It starts at sw and grows
  by sw + Tw for each source column.

Each clock it does one of three things:

* If the window starts at or right of `srcright`, m advances one column.
* If one column step is enough, target k is issued in the same clock, using
  the advanced m.
* Otherwise only the column step is taken, and k waits.

On issue, `left` is the part of the window that falls on pixel m, capped at
winw, and `right = winw - left` falls on pixel m+1. Vertical positions work
the same way: `wintop`, `srcbtm` and `n` are updated once per target row.

**Regulation.** Rounding `sw` leaves an error of
`rw = 8*(TW-1) - sw*(SW-1)` cells over a row. Without a correction, the last
source column would drift away from the last target column. The module
spreads |rw| single-cell corrections evenly over the SW-1 column steps, using
a Bresenham-style error accumulator. Each correction is `Tw = +1` when sw
was rounded down, and `Tw = -1` when it was rounded up. After the last step,
`srcright` ends exactly at `sw + 8*(TW-1)`. Rows are corrected the same way
with `Th`/`rh`.

At the borders, columns m-1 and m+2 and row n+1 may fall outside the image.
They are then replaced by the nearest border pixel.

## Edge catching and area tuning

`U_GE = (top >= winh/2)` selects the source row that covers more of the
window: row n if it is set, otherwise row n+1. Along that row, with E(i)
being the pixel at column i:

    LA = |E(m+1) - E(m-1)| - |E(m+2) - E(m)|          (-255 .. 255)

LA > 0 means the intensity changes faster on the left, so the edge is more
uniform on the right. Pixel m+1 should then count for more. The tuner
subtracts `d = LA * AC / 256` from the left pixel's area and adds it to the
right one, where `AC` is the left pixel's area. When LA < 0, AC is the right
pixel's area instead, and the transfer goes the other way. The rows'
other pair of areas is left alone. Because |LA| < 256, no area becomes
negative. The sum of the four areas stays winw*winh, so the final
normalisation is still a plain shift. The product is truncated toward zero.

## Line buffer and register bank

`register_bank` holds eight pixels, which are columns m-1..m+2 of rows n and
n+1. On a shift, Reg7 takes the next pixel of row n+1 from the source, and
Reg3 takes the same column of row n from `line_buffer`. At the right border,
the controller shifts with `dup` set instead, which repeats the last column.

`line_buffer` holds one source row. It is an SW-deep simple dual-port memory
with a registered read.

`scaler_controller` works through each target row in up to four phases:

1. **FILL** runs only if the line buffer does not already hold row n. It
   reads row n into the buffer and produces no output. This happens for the
   first row, and when a reduction skips source rows.
2. **PRE** makes four shifts to load columns -1..2. Column -1 is a copy of
   column 0.
3. **PASS** follows the approximate module, shifting and issuing as
   described above.
4. **TAIL** reads any source columns the pass did not reach, so that the
   line buffer ends up complete.

Row n+1 overwrites row n in the line buffer only if the next target row
starts at a lower source row. When an image is enlarged, the same pair of
source rows is reused for several target rows, so the buffer keeps row n and
the source row n+1 is simply read again. The vertical walk runs one target
row ahead, so the controller knows which case applies before the pass starts.

Source reads and line-buffer reads both take one clock. A shift issued in
stage 1 therefore reaches the register bank two clocks later, exactly when
the pixel issued in the same clock is in stage 3. The edge catcher reads the
bank there, and the four pixels the target generator needs ride along in
pipeline registers to stage 6.

Throughput:

* **Enlargement:** one target pixel per clock inside a pass, plus about ten
  clocks per target row. A 640x480 to 1920x1080 frame takes 2.09 M clocks
  for 2.07 M pixels.
* **Reduction:** one source column per clock, plus a fill pass for each
  skipped row. A 1920x1080 to 320x240 frame takes 0.93 M clocks.

## Interface (`edge_scaler_top`)

| Port | Dir | Width | Meaning |
|------|-----|------:|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | start a frame (while `busy` is low); `cfg` is sampled |
| `cfg` | in | 48 | `frame_cfg_t` {sw, sh, tw, th}, 12 bits each |
| `busy`, `done` | out | 1 | frame in progress; one-clock pulse after the last pixel |
| `src_rd`, `src_x`, `src_y` | out | 1, 12, 12 | request source pixel (x, y) |
| `src_pix` | in | 8 | the requested pixel, one clock after `src_rd` |
| `ft_valid`, `ft_pix` | out | 1, 8 | target pixels, raster order, no back-pressure |

The source must be able to return any pixel of the current row pair, and to
replay a row. A synchronous frame memory does this, as does a row FIFO that
can rewind.

Valid configurations:

* SW, SH, TW and TH are each 2..4095.
* SW <= `LB_DEPTH`.
* Each ratio is within 1/8..8.

## Parameters and sizes

| Name | Default | Where | Meaning |
|------|--------:|-------|---------|
| `LB_DEPTH` | 1920 | `edge_scaler_top`, `line_buffer` `DEPTH` | widest source row |
| `GRID_LOG2` | 3 | `scaler_pkg` | target pixel = 2^3 x 2^3 grid cells |
| `SIDE_W` | 6 | `scaler_pkg` | width of left/top/right/bottom and winw/winh |
| `PIX_W` | 8 | `scaler_pkg` | grey-level bits |
| `COORD_W` | 12 | `scaler_pkg` | image sizes and coordinates |

At the defaults, the design synthesises to about 980 flip-flops, a
15,360-bit line buffer and about 620 word-level cells.

## Departures and own choices

These points follow the published architecture:

* the 8 x 8 grid;
* 6-bit sides and power-of-two windows from 1 to 32;
* the 1/8..8 range;
* the accumulator recurrences for the window and pixel edges;
* rounding of sw and sh;
* regulation by one cell;
* the eight-register bank;
* the single line buffer;
* the area products;
* the U_GE comparator and the LA formula;
* the area transfer of the tuner;
* the multiply-add-shift target generator;
* the seven-stage split.

These are this implementation's own choices:

* **Window size at exact powers of two.** When TW/SW is exactly 1, 2, 4, ...,
  the larger window is used. The published ranges are open at the ends.
* **Regulation pattern.** The corrections are spread by an error
  accumulator. They use Tw = -1 when sw was rounded up. The published
  description asks only that the corrected pixels be chosen "regularly".
* **Tuning divisor and rounding.** The divisor is 256, and the correction is
  truncated toward zero.
* **Area multiplier width.** The area generator multiplies 6-bit sides, so
  a full 32 x 32 window fits. The published description names a 4 x 4
  multiplier there, which would only cover sides up to 15.
* **Edge handling.** Border pixels are replicated.
* **Line-buffer feed.** The line buffer is written from the incoming pixel,
  not from the output of Reg4 as the published register-bank drawing shows.
  The data are the same. Writing it this way keeps replicated border columns
  out of the buffer.
* **Shift and issue in one clock.** Stage 1 updates m and srcright and may
  issue a pixel in the same clock. This is what gives one pixel per clock.
  Stage 2 only forms the four sides.
* **Controller and source interface.** The FILL/PRE/PASS/TAIL phases, the
  pixel-request source interface and the re-reading of source rows during
  enlargement are all this implementation's own. The published description
  only says that a state machine controls the data flow.
* **Sizes not given in the description.** The line-buffer depth (1920), the
  8-bit pixels, the 12-bit coordinates, the asynchronous reset and the
  absence of output back-pressure are also own choices.

The published result of 157 MHz on a Xilinx Artix-7 has not been
reproduced here. Only function and cycle counts were checked.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

`tb/scaler_ref_pkg.sv` is an independent behavioural model. It uses closed
forms for the grid positions, such as
`srcright(m) = sw*(m+1) + sign(rw)*floor(m*|rw|/(SW-1))`, instead of the
accumulators. The testbenches that check the full design compare against
it bit for bit:

* **`tb_edge_scaler_top`** runs 13 frames with `LB_DEPTH` = 64. The frames
  include 4x4 to 5x5, 8x8 to 11x11 and 13x13, identity, about 1/7, about 7x,
  and mixed directions. It checks every pixel and the 7-clock latency. It
  checks that enlargements issue a pixel on every pass clock. It also
  requires that each mechanism occurs at least once:
  * fill pass, line-buffer update and row-pair reuse;
  * border replication;
  * regulation of both signs in both directions;
  * both row choices, and LA > 0, < 0 and = 0;
  * all six window sizes.
* **`tb_full_size`** uses the default parameters. It scales 640x480 to
  1920x1080 and 1920x1080 to 320x240, and checks all pixels. It runs in a
  few seconds.
* **`tb_roundtrip`** measures image quality at the default parameters. A
  512x512 synthetic grey image with smooth shading and hard edges is resized
  bilinearly to 256, 384, 700 and 1024 pixels square, then scaled back to
  512x512 by the design. Every output pixel is checked against the model.
  The PSNR against the original is printed, next to nearest-neighbour and
  bilinear reconstruction of the same image:

  | via  | this design | bilinear | nearest |
  |------|-------------|----------|---------|
  | 256  | 27.61 dB    | 27.40 dB | 19.76 dB |
  | 384  | 30.36 dB    | 30.76 dB | 20.73 dB |
  | 700  | 34.26 dB    | 33.46 dB | 25.20 dB |
  | 1024 | 35.86 dB    | 36.35 dB | 28.36 dB |

  These numbers come from one synthetic image only. They say little about
  natural images.
* **`tb_scaler_controller`** runs the controller with the approximate
  module. It replaces pixels with (row, column) tags, and checks that for
  every target pixel the register bank holds exactly the right eight source
  pixels.
* The remaining unit testbenches use random stimulus against formulas.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/scaler_pkg.sv tb/scaler_ref_pkg.sv tb/tb_edge_scaler_top.sv \
  --top-module tb_edge_scaler_top -o sim && ./obj_dir/sim
```

Replace the last file and the top module to run another testbench.
`tb_full_size` needs the same two packages.
