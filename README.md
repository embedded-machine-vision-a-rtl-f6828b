# Streaming Sobel edge detector for a CMOS camera

A small camera-side vision pipeline that finds edges in a live greyscale video
stream without ever storing a frame. Each pixel is processed in the clock cycle
it arrives: the pipeline keeps only two image lines of history, forms a 3x3
neighbourhood around every pixel, optionally smooths it, applies the Sobel
operator and thresholds the gradient to one bit per pixel. Every stage accepts
one pixel per clock, so the achievable frame rate is set only by the clock:
a 320 x 240 image needs 76 800 clocks per frame.

The architecture follows a published FPGA design for robot vision (a
Spartan-IIE FPGA fed by an OmniVision OV7620 camera, 27 MHz system clock,
320 x 240 images). The arithmetic structure, the bit widths, the line-buffer
organisation and the stage order are taken from it. The handshakes, border
handling, reset behaviour and a few widths were not specified there and are
this implementation's own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Pipeline

```
 camera port        acquisition        window          low-pass        window           Sobel + threshold
 PCLK HREF VSYN ──► image_acquisition ─► image_buffer ─► low_pass_filter ─► image_buffer ─► edge_detector ─► edge_pix
 Y[7:0] UV[7:0]          │                                (or bypass)                      (|Gx|+|Gy| >= T)
                         ├─► threshold_unit ─► seg_pix   (greyscale segmentation)
                         └─► xor_compressor ─► compressed_memory ─► xor_decompressor ─► dec_pix
                                                  (one frame)         (read back on request)
```

All blocks run on one clock (`clk`) and pass pixels with a one-cycle strobe.
Between image lines, while the camera's HREF is low, nothing moves: the line
buffers count pixels, not clocks.

| Module | Role |
|---|---|
| `vision_top` | the pipeline above |
| `image_acquisition` | camera port to pixel stream with column/row counters |
| `image_buffer` | 3x3 sliding window: nine registers and two `line_fifo`s |
| `line_fifo` | fixed line delay of N-3 pixels with a fill counter |
| `low_pass_filter` | 3x3 box filter, sum / 8, clamped; can be bypassed |
| `edge_detector` | two `sobel_gradient` units, the magnitude adder and a `threshold_unit` |
| `sobel_gradient` | one Sobel component from six pixels, and its magnitude |
| `threshold_unit` | `value >= threshold` |
| `xor_compressor`, `xor_decompressor` | difference coding by XOR with the previous pixel |
| `compressed_memory` | dual-port RAM holding one coded frame |
| `vision_pkg` | pixel and window types, gradient widths |

## Camera port and acquisition

The OV7620 puts out one pixel per rising edge of its pixel clock PCLK while
HREF is high; VSYN starts a frame. In YCrCb 4:2:2 mode the Y bus carries the
luminance of every pixel and the UV bus alternates U and V. Only Y is used:
the pipeline works on greyscale.

`image_acquisition` does not use PCLK as a clock. It samples PCLK, HREF, VSYN
and Y with `clk` and detects the rising edge of PCLK, giving a one-cycle
strobe `pclk_valid` with the pixel (`y_valid`) and its position (`col_cnt`,
`row_cnt`, from 0). This requires `clk` to run at least twice as fast as PCLK
and to be derived from the same oscillator as the camera, since there is no
synchroniser. (The original system ran 27 MHz against a 74 ns pixel period.)
A rising VSYN clears the counters, and the next pixel carries `sof`. A
falling HREF ends a line.

## The 3x3 window buffer

This is the part of the design to understand first. A 3x3 operator at pixel
(i, j) needs pixels from the current line and the two lines before. Storing
three lines and addressing nine words per pixel would cost nine reads per
output. Instead, the incoming pixels run through one shift chain that is
exactly two lines plus three pixels long:

```
pix_in ─► W33 ─► W32 ─► W31 ─► FIFO1 (N-3) ─► W23 ─► W22 ─► W21 ─► FIFO2 (N-3) ─► W13 ─► W12 ─► W11
```

Each row of three registers plus one FIFO holds exactly N pixels (N = image
width), so after every shift:

```
W11 W12 W13     h(i-2,j-2) h(i-1,j-2) h(i,j-2)
W21 W22 W23  =  h(i-2,j-1) h(i-1,j-1) h(i,j-1)
W31 W32 W33     h(i-2,j)   h(i-1,j)   h(i,j)      (h(i,j) = pixel just received)
```

Every pixel is stored once, and it leaves the FIFO at the shift on which it is
last needed. With N = 320 each FIFO holds 317 pixels (`IMG_WIDTH - 3`).

`line_fifo` is a RAM with a single rotating pointer. It reads the oldest word
and overwrites it on each shift. A counter counts the words written until it
reaches the depth and raises `full`. From then on, each shift moves one word in
and one out, and the FIFO is a pure delay. While it is still filling, it
outputs 0.

The window is meaningful only when it lies inside the image: the newest pixel
must be at column >= 2 and row >= 2. Otherwise the window wraps around the
line end or reaches into the previous frame. `image_buffer` keeps a column
counter, restarted by `pix_sof`, and a row counter that saturates at 2. Its
`win_valid` output is high only for such windows. An image of W x H pixels
therefore gives (W-2)(H-2) valid windows.

When the pipeline is chained (window → filter → window → Sobel), the second
window buffer receives a smoothed image whose first two rows and columns are
not real filtered pixels. Each pixel therefore carries a tag bit through the
chain: 1 for a real pixel. `win_valid` also requires all nine tags to be set.
For the raw camera stream the tag is tied to 1, and for the filter output it is
the first buffer's `win_valid`. The line FIFOs are 9 bits wide for this reason.

## Low-pass filter

Noise in high-resolution images produces false edges, so the image can be
smoothed first with a 3x3 box filter (all coefficients 1). The 1/9 scale is
approximated by 1/8, a three-bit shift, so no divider is needed. Nine pixels
of 255 give 2295 / 8 = 286, so the result is clamped to 255. The filter is
switched off by `lpf_en = 0`. The newest pixel is then passed through
unchanged with tag 1, and the edge detector sees the raw image. Change
`lpf_en` only between frames.

## Sobel datapath

The masks, with `w<row><col>` and row 1 the oldest line:

```
      -1  0  1            -1 -2 -1
Gx =  -2  0  2      Gy =   0  0  0
      -1  0  1             1  2  1
```

Three coefficients of each mask are zero, so each gradient needs six pixels,
paired as (positive − negative):

| | pair A | centre pair, ×2 | pair B |
|---|---|---|---|
| Gx | w13 − w31 | w23 − w21 | w33 − w11 |
| Gy | w31 − w13 | w32 − w12 | w33 − w11 |

`sobel_gradient` implements one row of this table, and `edge_detector` uses it
twice with different wiring. The doubling is a wired left shift, not a
multiplier. Widths through the adder tree:

| signal | width |
|---|---|
| pair A difference | 10 bits signed |
| centre difference | 9 bits, 10 after the shift |
| A + 2·centre | 11 bits |
| pair B difference | 11 bits |
| G | 12 bits signed |
| \|G\| (two's complement if negative) | 11 bits (at most 1020) |
| \|Gx\| + \|Gy\| | 12 bits (at most 2040) |

The magnitude is the usual approximation |Gx| + |Gy| of sqrt(Gx² + Gy²).
`threshold_unit` compares it with the `threshold` input: `edge_pix = 1` when
the sum is at least the threshold, and only for a valid window. The original
design reports good results at a threshold of about 78.4 %. On an 8-bit
scale that is 200, which the testbenches use. The whole datapath is
combinational and registered once at its output.

`seg_pix` is a second, independent use of the threshold rule. It compares each
acquired greyscale pixel with `seg_threshold`, splitting the image into
foreground and background at one pixel per clock.

## XOR difference coding

Neighbouring pixels are similar, so `e(n) = s(n) XOR s(n-1)` has mostly zero
upper bits. The first pixel of a frame is stored as is. Because
`x XOR x = 0`, the decoder rebuilds the pixel exactly:
`s(n) = e(n) XOR s(n-1)`, with s(n-1) taken from its own output.

In `vision_top`, the coder watches the acquired stream and writes codes to
`compressed_memory` at consecutive addresses, starting from 0 at each frame
start. The memory holds one frame (W·H words of 8 bits). To read the frame
back, assert `cmp_rd_en` with `cmp_rd_addr` in pixel order, and
`cmp_rd_first` with address 0. The rebuilt pixels appear on `dec_valid` /
`dec_pix` two clocks after each request. Codes are stored at full 8-bit
width: this RTL does not pack the short codes more densely.

## Timing of the outputs

With the pixel strobe `pix_valid` at cycle t, the stages follow at fixed
offsets:

| stage | cycle |
|---|---|
| first window (`image_buffer` #1) | t+1 |
| smoothed pixel `lpf_strobe` | t+2 |
| second window | t+3 |
| `edge_strobe` | t+4 |

Each input pixel produces exactly one `edge_strobe`, in raster order, and
`edge_sof` marks the first. The k-th edge strobe of a frame belongs to input
position (i, j) = (k mod W, k div W). The edge pixel it carries is centred on:

* filter on: image position (i-2, j-2), valid for i >= 4 and j >= 4;
* filter bypassed: image position (i-1, j-1), valid for i >= 2 and j >= 2.

`edge_valid` gives the same information per strobe.

## Parameters and image sizes

| parameter | default | meaning |
|---|---|---|
| `IMG_WIDTH` | 320 | line length; FIFOs hold `IMG_WIDTH-3` words |
| `IMG_HEIGHT` | 240 | frame height; used only to size `compressed_memory` |

At the defaults, the pipeline handles QVGA. For VGA (640 x 480) or SXGA
(1280 x 1024), set the parameters accordingly: the FIFOs become 637 or 1277
words deep. Both sizes are simulated end to end. The counters in
`image_acquisition` are 11 bits wide, enough for 2047 x 2047. Pixel rates
needed at 30 frames/s are 2.3 (QVGA), 9.2 (VGA) and 39.3 (SXGA) Mpixel/s,
against one pixel per clock.

## Departures and own choices

* Acquisition samples PCLK in the system clock domain, as described above,
  instead of generating a gated pixel-valid clock.
* The line FIFOs are single-clock circular buffers. The original used
  vendor-generated asynchronous FIFO cores in 512-byte block RAMs.
* The border rule (`win_valid`), the column and row counters in the window
  buffer, and the validity tags are additions. The original notes only that
  comparators generate the FIFO control signals.
* A second window buffer sits between the low-pass filter and the edge
  detector. The original block diagram goes straight from filter to edge
  detection and does not say how the filtered neighbourhood is formed.
* The filter clamps sum/8 to 255. The original does not say how the overshoot
  is handled.
* Gx is taken as the column difference and Gy as the row difference, as in
  the masks above. The original's equations use the opposite names. The edge
  magnitude is the same either way.
* The threshold is "greater than or equal". The original's text says so, but
  its block diagram shows "greater than".
* Outputs are registered once per stage (four stages), and all resets are
  asynchronous and active low.
* The compression memory size and read protocol are this design's.
* Not built: the camera itself, its I²C configuration interface and the
  host-side display. The testbenches contain a behavioural model of the
  camera's video port (`tb/ov7620_model.sv`).

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator 5,
from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/vision_pkg.sv tb/tb_image_pkg.sv tb/tb_vision_top.sv \
  --top-module tb_vision_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_vision_top` | the full pipeline at 320 x 240 with default parameters. One frame with the filter on and one bypassed, each output against a reference model, four-cycle latency, segmentation, and compressed read-back of a whole frame. It also counts that each mechanism occurs (filter clamp, border windows, negative gradients, edge and non-edge). |
| `tb_vision_resolutions` | the same test at 640 x 480 and 1280 x 1024 (through `tb/vision_harness.sv`) |
| `tb_image_acquisition` | pixel values, positions, `sof`, pixels per frame from the camera model |
| `tb_image_buffer` | every window against the image, and `win_valid` with random tags and idle cycles |
| `tb_line_fifo` | fill count, `full`, and exact line delay |
| `tb_low_pass_filter` | filter, clamp, bypass, one window per clock |
| `tb_sobel_gradient` | gradient and magnitude, including ±1020 |
| `tb_edge_detector` | Sobel masks, magnitude, threshold, one window per clock |
| `tb_threshold_unit` | the >= rule at the boundary |
| `tb_xor_compressor`, `tb_xor_decompressor` | coding and exact reconstruction |
| `tb_compressed_memory` | random writes and reads |

The test image (`tb/tb_image_pkg.sv`) is a 40 x 30 checkerboard of grey
levels 40 and 200, with a saturated white patch and a small hashed noise term.
It is computed, not read from a file.
