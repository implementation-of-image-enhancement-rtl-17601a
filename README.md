# Retinal fundus image enhancement and Sobel edge detection in SystemVerilog

Diabetic retinopathy is diagnosed from photographs of the back of the eye
(fundus images). Raw fundus images are dim and low in contrast, and the small
blood vessels are hard to see. This RTL gives two small streaming image
processors for preparing such images in hardware:

* an **enhancement IP** that holds a 768 x 512 colour image and pushes it through
  one point operation (brightness up or down by a constant, photographic
  negative, or a binary threshold), two pixels per clock;
* a **Sobel edge detection IP** that takes a 512 x 512 grayscale image as a pixel
  stream, one pixel per clock, and returns a black-and-white edge map. It uses
  four line buffers that take turns being filled and being read.

The two IPs share nothing but clock and reset. `dr_image_ip_top` places them
side by side. The method follows a published FPGA implementation of these
algorithms for retinopathy images. The interfaces, the handling of image
borders and frame boundaries, the flow control and several constants are
choices made here. They are listed in
[Where this design departs from, or adds to, the method](#where-this-design-departs-from-or-adds-to-the-method).

## Files

| File | Role |
|---|---|
| `rtl/img_pkg.sv` | pixel, RGB, pixel-pair and window types; enhancement operation codes and settings struct |
| `rtl/dr_image_ip_top.sv` | top: both IPs side by side |
| `rtl/sobel_top.sv` | edge detection IP: `image_control` → `sobel_conv` → `sync_fifo` |
| `rtl/image_control.sv` | four rotating line buffers, input steering, 3x3 window formation |
| `rtl/line_buffer.sv` | one image line; writes 1 pixel, reads 3 adjacent pixels |
| `rtl/sobel_conv.sv` | Sobel masks, gradient magnitude, threshold |
| `rtl/sync_fifo.sv` | output buffer (show-ahead FIFO) |
| `rtl/enhance_top.sv` | enhancement IP: `image_read` → 2 x `pixel_enhance` → register |
| `rtl/image_read.sv` | image memory, streamed out two pixels per clock |
| `rtl/pixel_enhance.sv` | brightness / negative / threshold on one RGB pixel |
| `tb/*.sv` | self-checking testbenches and a reference-model package `tb_ref_pkg` |

## The edge detector's line buffers

This is the part of the design that takes the most care to follow.

A 3x3 Sobel window needs pixels from three consecutive image lines, but the
image arrives one pixel at a time in raster order. `image_control` keeps four
`line_buffer`s, each holding one full line of `W` pixels:

```
 input pixels ──► buffer wr_sel          (fills left to right, W pixels)
                  buffers rd_base, +1, +2 ──► 3 pixels each per clock ──► 3x3 window
```

* **Writing.** Pixels go into buffer `wr_sel`. After `W` pixels, `wr_sel`
  moves to the next buffer, wrapping 3 → 0.
* **Reading.** Reading starts once three complete lines are stored. Each read
  takes the three adjacent pixels at columns `c, c+1, c+2` from each of buffers
  `rd_base`, `rd_base+1` and `rd_base+2`, which gives the window P0..P8 in one
  clock. A window row has `W-2` windows, one for each column `c = 0 .. W-3`.
  Only windows that lie wholly inside the image are formed, so there is no
  padding.
* **Releasing.** After the last window of a row, the oldest line (`rd_base`)
  is no longer needed. It is released for refilling, `rd_base` advances by
  one, and `o_intr` pulses for one clock. While three buffers are being read,
  the fourth keeps filling with the next line. This overlap lets the IP accept
  a new pixel on every clock.
* **Counting.** A single counter, `pix_cnt`, holds the number of stored pixels
  in lines not yet released. It goes up by 1 per accepted pixel and down by
  `W` per released line. Two rules follow from it:
  * input is accepted (`o_ready`) while `pix_cnt < 4W`, so a buffer under
    convolution is never overwritten (an assertion checks this);
  * windows are read while `pix_cnt >= 3W`, meaning the three oldest lines are
    complete.
* **End of image.** After `H-2` window rows, the three lines under the last row
  are all released together, and `rd_base` advances by three. The next image
  therefore starts on clean buffers without any frame signal. Images may
  follow each other back to back. The IP assumes every image has exactly `H`
  lines of `W` pixels.

Timing at full rate: a line of `W` pixels takes `W` clocks to arrive, and its
`W-2` windows take `W-2` clocks to read. The read side therefore keeps up. An
`H x W` image is taken in `H*W` clocks. The last edge pixel appears about
`W + 4` clocks after the last input pixel: the last window row cannot start
until the last line is complete, and the pipeline adds a few clocks.

For a 512 x 512 image this is 262,144 clocks, or 2.62 ms at 100 MHz. The
published FPGA time for Sobel edge detection on this image size is 2.652 ms,
but its clock frequency is not stated.

### Flow control to the output FIFO

Each window read produces one result three clocks later (window register,
then two `sobel_conv` stages). `sobel_top` reads a window only while the FIFO
has room for that result and for the three results already in flight:

```
rd_allow = fifo_count <= FIFO_DEPTH - 4
```

The FIFO therefore never overflows (an assertion checks this). If the receiver
holds `i_data_ready` low, the following happens in order:

1. The FIFO fills.
2. Window reads pause.
3. The fourth line buffer fills.
4. `o_pixel_ready` drops.

Nothing is lost at any step.

## Sobel arithmetic (`sobel_conv`)

With the window in raster order (P0 top left, P4 the centre, P8 bottom right):

```
Gx = (P2 + 2*P5 + P8) - (P0 + 2*P3 + P6)      mask [-1 0 1; -2 0 2; -1 0 1]
Gy = (P6 + 2*P7 + P8) - (P0 + 2*P1 + P2)      mask [-1 -2 -1; 0 0 0; 1 2 1]
edge  <=>  sqrt(Gx^2 + Gy^2) > THRESHOLD
```

The square root is not built. For an integer threshold T, `sqrt(S) > T` holds
exactly when `S > T^2`, so the hardware compares `Gx^2 + Gy^2` (23 bits) with
`THRESHOLD^2`. An edge is output as 255 and a non-edge as 0.

* Stage 1 registers Gx and Gy. These are 11-bit signed values, with a magnitude
  of at most 1020.
* Stage 2 squares them, adds the squares and compares the sum with the
  threshold.

The default threshold of 100 is a choice made here, not a published value.

## The enhancement IP

`image_read` stores the colour image as `WIDTH*HEIGHT/2` words of 48 bits. Each
word holds two horizontally adjacent pixels: `p0` is the even column and `p1`
the odd one. Each pixel is `{r, g, b}`, 8 bits per channel. Words are stored
in raster order, so the word address is `row*WIDTH/2 + col/2`.

A host loads the memory through `i_wr_*`. A one-clock `i_start` then streams
the whole frame, one word per clock. Two `pixel_enhance` units process the
even and odd pixel of each word in parallel. A 768 x 512 frame therefore takes
196,608 clocks.

Output timing:

* The first enhanced word is valid after the third rising edge, counting the
  edge that samples `i_start`.
* `o_row_start` marks the first word of each row.
* `o_done` marks the last word of the frame.
* `o_busy` stays high until the last word has left.

The operations, selected by `enh_cfg_t.op`:

| `op` | Operation | Result per channel c |
|---|---|---|
| 0 `OP_BRIGHTNESS`, `sign=1` | brighten | `min(c + value, 255)` |
| 0 `OP_BRIGHTNESS`, `sign=0` | darken | `max(c - value, 0)` |
| 1 `OP_NEGATIVE` | negative | `255 - c` |
| 2 `OP_THRESHOLD` | threshold | 255 on all channels if `(r+g+b)/3 > threshold`, else 0 |
| 3 `OP_BYPASS` | none | `c` |

Clamping matters: without it, a bright pixel that is brightened further would
wrap around to dark. The published experiments use a brightness constant of
100 in both directions and thresholds of 90 and 80. The settings must be held
steady while a frame streams.

## Top-level ports (`dr_image_ip_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising-edge clock; asynchronous active-low reset (memories are not cleared) |
| `enh_cfg` | in | `enh_cfg_t` (20) | operation, sign, brightness value, threshold |
| `enh_wr_en`, `enh_wr_addr`, `enh_wr_data` | in | 1, 18, 48 | image memory load port (ignored while streaming) |
| `enh_start` | in | 1 | start streaming a frame |
| `enh_busy`, `enh_valid`, `enh_pair`, `enh_row_start`, `enh_done` | out | 1, 1, 48, 1, 1 | enhanced pixel-pair stream |
| `sobel_pixel_data`, `sobel_pixel_valid` | in | 8, 1 | grayscale input stream |
| `sobel_pixel_ready` | out | 1 | input accepted when valid and ready are both high |
| `sobel_data`, `sobel_data_valid` | out | 8, 1 | edge map stream: 255 = edge, 0 = non-edge; `(H-2) x (W-2)` pixels per image |
| `sobel_data_ready` | in | 1 | receiver ready |
| `sobel_intr` | out | 1 | pulse per finished window row; a line buffer can take a new line |

The edge detector on its own (`sobel_top`) has 23 single-bit I/O, counting
clock and reset.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `ENH_WIDTH` x `ENH_HEIGHT` | 768 x 512 | enhancement image size (published) |
| `SOBEL_WIDTH` x `SOBEL_HEIGHT` | 512 x 512 | edge detector image size (published) |
| `SOBEL_THRESHOLD` | 100 | edge threshold on the gradient magnitude (chosen here) |
| `SOBEL_FIFO_DEPTH` | 32 | output FIFO depth (chosen here; must exceed 4) |

Storage at the defaults:

* enhancement image memory: 9,437,184 bits;
* four line buffers: 4 x 512 x 8 bits;
* output FIFO: 32 x 8 bits.

The line buffers are read without a clock, which suits distributed RAM. The
image memory is read with a clock, which suits block RAM.

## Where this design departs from, or adds to, the method

* **Operation selection.** The published enhancement flow chooses the
  operation when the code is compiled. Here `enh_cfg` selects it at run time,
  and code 3 (bypass) is added.
* **Threshold on colour images.** Each pixel is compared by its mean intensity
  `(r+g+b)/3`, truncated. All three channels then become 0 or 255 together.
  The method does not say which intensity of a colour pixel is compared.
* **Image memory load port.** The method reads the picture from a hex file in
  simulation, and writes the result back as a BMP file with a header. Here the
  image memory has a load port. The enhanced stream leaves on ports, and
  file-writing is left to the user's testbench. Colour-to-grayscale
  conversion for the edge detector is also expected to happen before the data
  reach the IP.
* **Output image size.** The edge map covers only the interior: windows that
  cross the image border are not formed. The IP does not pad the image.
* **Added signals and constants.** The handshakes, `o_intr`, the frame-end
  release of three lines, the FIFO depth, the flow-control rule and the 255/0
  output coding are all choices made here.
* **Unverified timing.** The published processing times (5.58 ms for
  brightness and negative, 5.36 ms for threshold, 2.652 ms for Sobel) have not
  been checked against this RTL, because no clock frequency is given. At
  100 MHz this RTL needs 1.97 ms per enhancement frame and 2.62 ms per Sobel
  image.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Each compares the outputs with reference models in `tb/tb_ref_pkg.sv`. These
models compute the results with plain integer and real arithmetic, including a
real square root for the Sobel magnitude. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/img_pkg.sv tb/tb_ref_pkg.sv tb/tb_sobel_top.sv --top-module tb_sobel_top
./obj_dir/Vtb_sobel_top
```

| Testbench | What it checks |
|---|---|
| `tb_pixel_enhance` | 4,000 random pixels and settings, plus corner cases, against the reference |
| `tb_image_read` | every word, row and frame markers, one word per clock, writes ignored while streaming |
| `tb_enhance_top` | the five published settings plus bypass on a 16 x 6 image; latency and rate |
| `tb_line_buffer` | every 3-pixel window, pointer wrap over repeated fills |
| `tb_image_control` | every window of 9 x 8 images, with and without stalls; input refused when full; one pixel per clock |
| `tb_sobel_conv` | random and near-threshold windows against `sqrt(Gx^2+Gy^2) > T`; two-clock latency |
| `tb_sync_fifo` | random traffic against a queue model, including full and empty |
| `tb_sobel_top` | three 10 x 16 images: full rate (one pixel per clock, bounded drain), then back to back with input gaps and a stalling receiver |
| `tb_dr_image_ip_top` | both IPs at once at small sizes; counts each mechanism and fails if any never happens |
| `tb_dr_image_ip_top_full` | the same at the default sizes: a 768 x 512 colour image through the five settings, and two 512 x 512 images through the edge detector (about 1.5 million checks, about one second in Verilator) |

The mechanisms counted by the end-to-end tests are:

* clamping at 255 and at 0;
* both threshold outcomes;
* negative;
* edge detector input stall;
* full output FIFO;
* line release;
* end of image;
* back-to-back images;
* edge and non-edge pixels.

## Lint notes

Verilator reports `SYNCASYNCNET` on `rst_n`. The cause is that `rst_n` is both
the asynchronous reset of the flip-flops and the `disable iff` condition of
the concurrent assertions. The warning has no effect on the hardware.
