# Streaming colour-space conversion and Sobel edge detection

Two small FPGA pixel-stream accelerators, written in SystemVerilog:

* **`csc_rgb2ycbcr`** converts RGB pixels to YCbCr (luma and two colour differences).
* **`sobel_edge_detector`** converts RGB pixels to grey levels and outputs a Sobel edge-magnitude image.

Each core takes one pixel per clock in raster order and produces one pixel per clock, with no stalls.
Neither core stores a frame. The edge detector keeps two image lines, which is all a 3x3 operator
needs. The two cores are independent. `image_proc_top` places them side by side. They share only
the clock and reset.

The equations, the port names and the 512 x 512 frame size come from a published pair of cores. Those
cores were generated from MATLAB by a high-level synthesis flow. Their internal structure was not
published, so everything inside the cores here is this design's own: word lengths, rounding,
pipelining, line storage, border handling and end-of-frame behaviour. The section
[What follows the source and what does not](#what-follows-the-source-and-what-does-not) lists these
choices.

## The pixel stream

Both cores use the same streaming convention:

| signal | width | meaning |
|---|---|---|
| `pixel_in_R/G/B` | 8 each | unsigned colour components |
| `val_in` | 1 | the pixel on the inputs this cycle is valid |
| `fs_in` | 1 | frame start. It is high, together with `val_in`, on the first pixel of a frame |
| `..._out` | 8 each | result components |
| `val_out`, `fs_out` | 1 | the same flags for the output stream |

Pixels arrive in raster order: left to right, then top to bottom. `val_in` may drop for any number of
cycles, in the middle of a frame or between frames. Nothing can stop the output stream, so a
consumer must accept one pixel on every cycle in which `val_out` is high. The reset is synchronous and
active high (`rst`). It clears the flag pipelines and the counters. The data registers and line
memories are not reset. Every value they hold before the first valid pixel is discarded.

## Colour-space converter (`csc_rgb2ycbcr`)

```
Y  =  0.299 R + 0.587 G + 0.114 B +  16
Cb = -0.169 R - 0.331 G + 0.500 B + 128
Cr =  0.500 R - 0.419 G - 0.081 B + 128
```

Y combines full-range (0-255) weights with the +16 offset of studio-range video. This converter keeps
that combination. As a result, Y saturates at 255 for bright pixels: pure white would be 271.
Cb and Cr reach 255.5 on pure blue and pure red.

Each component is computed by one `rgb_weighted_sum` pipeline:

1. Three constant multiplications. The weights are signed fixed-point words with `COEF_FRAC` = 12
   fractional bits. They are computed from the real weights when the design is elaborated.
2. The products are summed, together with the offset and half an LSB for rounding.
3. The fraction is dropped and the result is clamped to 0..255.

**Timing:** a pixel presented on cycle *n* appears on `yout`/`Cbout`/`Crout` on cycle *n*+3.
`fs_out` and `val_out` are the input flags delayed by the same three cycles.

**Accuracy:** each 12-bit weight is within 2^-13 of its real value. The result is therefore at most
one code from the ideal `clamp(round(x))`, and only near a rounding tie. The testbenches check every
output against double-precision arithmetic within that tolerance. In the tests, about 98% of grey-level outputs match it exactly.

## Sobel edge detector (`sobel_edge_detector`)

The edge detector is a chain of two parts.

**`rgb2gray`** computes `I = 0.2989 R + 0.5870 G + 0.1140 B`. It is the same 3-stage weighted-sum
pipeline as the converter, with offset 0.

**`sobel_core`** applies the two Sobel kernels to the grey image:

```
      | +1  0 -1 |           | +1 +2 +1 |
 Gx = | +2  0 -2 | * I  Gy = |  0  0  0 | * I      G = |Gx| + |Gy|
      | +1  0 -1 |           | -1 -2 -1 |
```

G ranges from 0 to 2040. It is clamped to 255 on the 8-bit `pixel_out`. Pixels in the first and last
row and column are output as 0, because their 3x3 window would reach outside the image. The
gradient orientation, atan(Gy/Gx), is not computed because the core has no output for it.

### How the window is formed from a stream

This is the part of the design that needs the most care.

`line_buffer` holds the two previous image lines in two memories of `IMG_WIDTH` bytes, both addressed
by the column of the incoming pixel. When a pixel is written at column *c*:

* the old byte at *c* in the "one line above" memory moves to the "two lines above" memory;
* the new pixel replaces it;
* one cycle later, the outputs show the three pixels of that column, top to bottom.

A 3x3 register window shifts this column in from the right on every valid input pixel. When input
pixel (*r*, *c*) has just been shifted in, the window is centred on pixel (*r*-1, *c*-1). So **output
pixel *k* of a frame is computed when input pixel *k* + `IMG_WIDTH` + 1 arrives**. The first
`IMG_WIDTH` + 1 inputs of a frame only fill the buffers and produce no output.

The core does not take its output position from the input counter. It keeps a separate output
counter, which is set to (0, 0) when the window first becomes centred on pixel 0 (input pixel
(1, 1)). The border test and `fs_out` use this counter.

Where the window spans the right edge of one line and the left edge of the next, it mixes the two
lines. This happens only while the window is centred on a border column, and the border rule then
outputs 0.

### End of frame: the flush

The last `IMG_WIDTH` + 1 outputs of a frame are the rest of the second-to-last line and the whole
last line. Their lower-right neighbours do not exist. Every one of these pixels is a border pixel,
so its value is 0 and needs no further input. When the core sees the last pixel of a frame (position
`IMG_HEIGHT`-1, `IMG_WIDTH`-1), it loads a counter with `IMG_WIDTH` + 1. The core then emits those
zero pixels on its own, one per cycle. A frame in therefore gives a complete frame out, and no
further input is needed to push it out.

The next frame may follow with no idle cycle. Its first output is `IMG_WIDTH` + 1 inputs away, by
which time the flush has finished. An assertion in `sobel_core` checks that a flushed pixel and a
regular output never fall on the same cycle.

### Timing

| event | cycles |
|---|---|
| `rgb2gray` | 3 |
| line buffer read | 1 |
| window shift | 1 |
| Gx/Gy, then magnitude and clamp (`sobel_kernel`) | 2 |
| output pixel *k* leaves after input pixel *k* + W + 1 was presented | 7 |
| last output of a frame after the last input pixel | W + 8 |

At one pixel per clock, a 512 x 512 frame enters in 262,144 cycles. Its last edge pixel leaves 520
cycles after its last input pixel.

A frame is expected to be complete. If `fs_in` arrives before a frame has ended, the input position
restarts and the output counter realigns on the new frame. The cut-short frame gets no flush.

## Top level (`image_proc_top`)

The top has two independent port groups. The colour converter uses `csc_pixel_in` (`rgb_t`),
`csc_fs_in`, `csc_val_in`, `csc_pixel_out` (`ycbcr_t`: y, cb, cr), `csc_fs_out` and `csc_val_out`.
The edge detector uses `sobel_pixel_in` (`rgb_t`), `sobel_fs_in`, `sobel_val_in`, `sobel_pixel_out`,
`sobel_fs_out` and `sobel_val_out`. The packed structs are defined in `img_pkg`, with R (or Y) in
the most significant byte.

| parameter | default | meaning |
|---|---|---|
| `IMG_WIDTH` | 512 | pixels per line. It sets the line-buffer depth |
| `IMG_HEIGHT` | 512 | lines per frame. It is used to find the last line and to start the flush |
| `COEF_FRAC` | 12 | fractional bits of the colour weights |

At the defaults, a generic synthesis maps the top to about 541 flip-flops and 8,192 memory bits (the
two 512-byte line memories).

## What follows the source and what does not

The following come from the source design:

* the three colour-conversion equations, including the +16 on Y;
* the grey-level weights;
* the Sobel kernels and the |Gx| + |Gy| magnitude;
* the port names `pixel_in_R/G/B`, `fs_in`, `val_in`, `yout`, `Cbout`, `Crout`, `pixel_out`,
  `fs_out` and `val_out`;
* 8-bit pixels;
* the 512 x 512 frame size.

The following are this design's own choices:

* **fs/val meaning.** `fs_in` marks the first pixel of a frame and is qualified by `val_in`.
* **Word length and rounding.** 12 fractional bits, round half up, clamp to 0..255. The source
  cores used an automatic floating-to-fixed-point conversion whose word lengths were not published.
* **Output widths.** All outputs are 8 bits. The source cores' I/O pin counts suggest that some
  outputs there were wider or narrower.
* **Pipelines and latency.** All pipeline depths, and so all latencies, are this design's own.
* **Border and clamp.** Border pixels are 0, and the magnitude is clamped to 255. No threshold is
  applied: the magnitude is the output.
* **Window, output alignment and flush.** The whole windowing scheme, the output alignment and the
  end-of-frame flush described above.
* **Reset.** A synchronous, active-high reset of the control state only.

Not built:

* the gradient orientation;
* board-level I/O and synchronisation logic;
* the image source and display used around the cores in simulation. The testbenches generate and
  check the pixel streams themselves.

## Files

`rtl/`:

* `img_pkg.sv`: pixel and struct types, the weights, and the fixed-point quantiser.
* `rgb_weighted_sum.sv`: the 3-stage weighted sum used by both cores.
* `csc_rgb2ycbcr.sv`: the colour-space converter.
* `rgb2gray.sv`: the grey-level conversion.
* `line_buffer.sv`: the two-line memory.
* `sobel_kernel.sv`: Gx, Gy and the magnitude of one window.
* `sobel_core.sv`: the stream control, window, border handling and flush.
* `sobel_edge_detector.sv`: the edge-detector core.
* `image_proc_top.sv`: both cores side by side.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_image_proc_top_full.sv`: two back-to-back 512 x 512 frames through both cores at the default parameters.
* `tb_ref_pkg.sv`: the reference models, evaluated in double precision or on whole frames.
* `top_tb_body.svh`: the body shared by the two top-level testbenches.

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if the design hangs.
Several testbenches also count events and fail if one never happens: clamping, border pixels,
flushes, input gaps and back-to-back frames.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Itb \
    rtl/img_pkg.sv tb/tb_ref_pkg.sv tb/tb_image_proc_top.sv \
    --top-module tb_image_proc_top -Mdir obj
./obj/Vtb_image_proc_top
```

Replace `tb_image_proc_top` with any other testbench name. Name the packages first, as above. The
full-size testbench simulates two 512 x 512 frames in well under a second. To change the frame size,
set `IMG_WIDTH` and `IMG_HEIGHT` on the top or on `sobel_edge_detector`. The edge detector needs a
frame of at least 3 x 3 pixels.
