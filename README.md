# Iterative pixel compression pipeline for CMOS image sensor output

This design cleans up the digitised pixel stream of a CMOS image sensor and
codes it into wavelet subbands. Salt-and-pepper noise (single pixels forced
to black or white by read-out and conversion errors) is removed in two
stages:

1. an edge-aware averaging filter;
2. an iterative impulse test whose window grows until the test decides.

The cleaned image is then split into the four subbands of a one-level 2-D
wavelet transform. The subbands are buffered, rebuilt into pixels and
written to an output frame memory. The whole chain is streaming: one pixel
per clock in, one pixel per clock out, with only a few rows of storage
before the output memory.

The RTL is written from the paper "Pixel Optimization Using Iterative Pixel
Compression Algorithm for Complementary Metal Oxide Semiconductor Image
Sensors". That paper gives a block diagram, the structure of the averaging
filter, the filter's clamp equation, the stage A / stage B impulse
procedure and a histogram-mean formula. Much else is left open, including
widths, interfaces, window sizes, the wavelet and border handling. Those
choices are this design's own, and the sections below point out each one.

## Data flow

```
 sensor pixels ──► pixel_averaging_filter ──► ipc_impulse_stage ──┬─► haar_dwt ──► 4 x subband_fifo ──► reconstruction ─┐
 (in_valid/ready)  line_buffer (2 rows)       line_buffer (6 rows)  │   (LL LH HL HH    (LL, LH, HL, HH)   2 adders, logic, │
       │           register_bank 3x3          register_bank 7x7     │    on sb_* ports)                     output mux        │
       │           average_generator          stage A / stage B     └─► histogram_mean (mean_o)                              ▼
       │           SortFour clamp                                                                          output_frame_store
       └──────────────────────────── raw pixels when bypass_i = 1 ───────────────────────────────────────►  (host reads rd_*)
```

`ipc_top` wires these blocks together. Each filter stage has its own
`window_gen`, which combines a buffer circuit (`line_buffer`), a register
bank (`register_bank`) and the control that walks a raster stream through
them.

## Streams, windows and flushing

All pixel streams are raster order, one `WIDTH x HEIGHT` frame after
another, with a valid/ready handshake. The stream between the filter stages
carries the pixel's `(x, y)` coordinates along with it.

A window stage of size `K` (radius `R = (K-1)/2`) works like this:

- **Window position.** The stage can only show the window centred on
  pixel `(x, y)` once pixel `(x+R, y+R)` has arrived. Its output therefore
  trails its input by `R` rows and `R` pixels.
- **Flush.** After the last pixel of a frame, the stage feeds itself
  `R*WIDTH + R` zero pixels. This pushes the last rows out. During the
  flush, `in_ready` is low.
- **Backpressure.** If the downstream stage refuses an output
  (`out_ready` low), the whole stage holds. This happens when the impulse
  stage is flushing while the averaging filter already has pixels of the
  next frame.
- **Frame edges.** Near a frame edge the outer cells of the window hold
  wrapped or stale pixels. Each filter decides from the coordinates what it
  may use.

At full input rate, a frame of `N = WIDTH*HEIGHT` pixels leaves the
averaging filter after `N + WIDTH + 1` clocks. It leaves the impulse stage
`3*WIDTH + 3` clocks later. The reconstruction adds a short drain of the
subband buffers. At the default 640x480 size, `frame_done_o` rises about
`N + 4*WIDTH` clocks after the first pixel is accepted.

## Pixel averaging filter

The filter looks at the 3x3 neighbourhood

```
a b c
d X e
f g h
```

For each of five directions it forms a contrast and a mean, using only
adders and shifts:

| # | direction     | pixels | contrast | mean           |
|---|---------------|--------|----------|----------------|
| 0 | horizontal    | d, e   | \|d−e\|  | (d+e)/2        |
| 1 | vertical      | b, g   | \|b−g\|  | (b+g)/2        |
| 2 | diagonal      | a, h   | \|a−h\|  | (a+h)/2        |
| 3 | anti-diagonal | c, f   | \|c−f\|  | (c+f)/2        |
| 4 | upper row     | a, b, c| \|a−c\|  | (a+2b+c)/4     |

A min tree picks the direction with the lowest contrast. On a tie, the
lower number wins. The mean of that direction is the estimate `f̄`.

The estimate is then bounded by the four edge neighbours b, d, e and g.
Call the second and third smallest of them S2 and S3. The output is:

- S2 if S2 > `f̄`;
- S3 if S3 < `f̄`;
- `f̄` otherwise.

This clamp comes from the paper. So do the least-contrast selection, the
adder/shifter construction and the `(a+2b+c)/4` term.

The five directions and the contrast measure are this design's own. The
paper's average generator uses 18 adders and eight shifters; this design
does not reproduce that exact wiring.

The filter applies to every pixel. The outermost row and column pass
through unchanged.

## Iterative impulse stage (stage A / stage B)

For the centre pixel `W_xy`, take the smallest window first (3x3), with
minimum `W_min`, median `W_med` and maximum `W_max`.

- **Stage A.** If `W_min < W_med < W_max`, the median is trusted and the
  stage moves to stage B. Otherwise the window grows by two (5x5, then 7x7)
  and stage A repeats. If the largest window `TMAX` also fails, the output
  is `W_xy`.
- **Stage B.** If `W_min < W_xy < W_max`, the pixel is not an impulse and
  is kept. Otherwise (it equals the window's extreme) it is replaced by
  `W_med`.

In hardware, the "iterations" happen in space rather than in time:

- A 7x7 register bank feeds all window sizes at once.
- Each size computes its own min, max and median. The median is found by
  rank counting: the element with at most `M` elements below it and more
  than `M` at or below it, where `M = (S*S−1)/2`.
- A priority chain makes the stage A / stage B decision in the same clock.

This keeps one pixel per clock. It is also the largest part of the design:
the 7x7 median alone compares every pair of its 49 pixels twice, about
4,800 8-bit comparisons. The impulse stage accounts for roughly 22,000 of
the top's 22,400 word-level cells.

The outputs `level_o` and `replaced_o` report how many stage A iterations
failed and whether the median was used.

A window that would reach outside the frame counts as unavailable. As a
result, pixels within one pixel of the edge pass unchanged, and pixels
within three pixels of the edge only try the smaller windows.

`TMAX = 7` is this design's choice; the paper gives no number.

## Wavelet split, subband buffers and reconstruction

`haar_dwt` applies an integer, unnormalised 2-D Haar step to each 2x2
block. With `a b` on the even row and `c d` below:

```
LL = a+b+c+d    LH = a−b+c−d    HL = a+b−c−d    HH = a−b−c+d
```

Each coefficient is an 11-bit signed number (`coef_t`), so the step is
exact. The paper asks for a one-level wavelet decomposition into four
subbands but does not name the wavelet; Haar is this design's choice.

On even rows, pixel pairs are kept in a half-row memory. On odd rows, one
coefficient set leaves every two pixels and appears on the `sb_*` ports.

`reconstruction` pops one set from the four `subband_fifo` buffers and
spends four clocks on it:

```
s1 = LL ± LH,  s2 = HL ± HH   (+ on the left column)
pixel = (s1 + s2)/4 on the top row, (s1 − s2)/4 on the bottom row
```

This is the exact inverse of the forward step. The two adders, the combining
logic and the output multiplexer mirror the paper's reconstruction diagram.

**Buffer sizing.** On an odd row, sets arrive at up to one per two clocks,
but the reconstruction takes four clocks per set. At most `WIDTH/4` sets
pile up, so the buffers hold `WIDTH/4 + 2`. Assertions check for overflow
and underflow, and that all four buffers stay in step.

**Limitation.** Because the transform is lossless and nothing is dropped
between the split and the rebuild, the output image equals the output of
the two filters. The paper also mentions ordering and coding the
coefficients by the number of bits their magnitude needs. It does not
describe that closely enough to build, so it is not implemented. The
subbands are available on the `sb_*` ports for such a coder.

## Frame mean

`histogram_mean` computes the mean grey level of each cleaned frame. The
mean of a grey-level histogram, `Σ i·hs(i) / N`, equals the plain pixel sum
divided by `N`. So the block needs no histogram memory: it accumulates the
stream and divides by `WIDTH*HEIGHT` at the frame's last pixel. `mean_o` is
valid one clock later and is rounded down.

Normalising by the pixel count is this design's choice.

## Output memory and bypass

`output_frame_store` is a `WIDTH x HEIGHT` byte array at address
`y*WIDTH + x`. It has one write port (the pipeline) and one registered read
port (`rd_x_i`, `rd_y_i` → `rd_pix_o` one clock later). The paper calls it
an output ROM; it has to be writable to receive the image.

With `bypass_i = 1`, the raw input pixels are written instead of the
reconstructed ones, and `frame_done_o` marks their last write. This follows
the direct sensor-to-memory path in the paper's block diagram. Hold
`bypass_i` for a whole frame. The processing chain, the subband ports and
the mean keep running in bypass mode.

## Parameters

| parameter    | default          | where                         | origin |
|--------------|------------------|-------------------------------|--------|
| `WIDTH`      | 640              | all streaming blocks          | paper's main image size |
| `HEIGHT`     | 480              | all streaming blocks          | paper's main image size |
| `TMAX`       | 7                | `ipc_top`, `ipc_impulse_stage`| own choice |
| `FIFO_DEPTH` | `WIDTH/4 + 2`    | `ipc_top`                     | own choice (see above) |
| `PIX_W`      | 8 (package)      | `ipc_pkg`                     | own choice |

`WIDTH` and `HEIGHT` must be even and at least `TMAX`. Coordinates are 16
bits wide.

The frame size is fixed when the design is built. The paper's other sizes,
320x240 and 1024x768, need a rebuild with those parameters; both have been
simulated.

At the default size, the design stores:

- 2.46 Mbit in the output memory;
- eight rows of line buffer (two for the 3x3 stage, six for the 7x7 stage);
- a half row in the wavelet stage;
- four buffers of 162 coefficients.

Reset is asynchronous and active low. Memories are not reset.

## Clock rate

The clock rate has not been established for any target. The longest
combinational path is in the impulse stage. It runs from the 7x7 window
registers through the rank-counting median and the stage A / stage B
priority chain to the next stage's line buffer, all in one clock. For a fast
clock, that stage is the place to add pipeline registers. A register after
the per-size min/max/median would not change the algorithm, only the
latency.

## Boundaries of the design

The input is the sensor's digitised output: `in_pix_i` stands for the ADC
output. The colour filter, the pixel array, the ADC and the sensor's
read-out control are outside this RTL.

The subbands leave the design uncoded on the `sb_*` ports. The paper
outlines a coder that orders coefficients by the number of bits their
magnitude needs and sends them row by row. Such a coder would attach to
these ports.

Image-quality figures (MSE, PSNR) are computed by the testbenches, not in
hardware.

## Verification

Every block has a self-checking testbench in `tb/`. The testbenches compare
against reference models in `tb/ipc_ref_pkg.sv`, which are written
independently of the RTL. Sorting gives the median, and the filters are
computed on whole-frame arrays.

| testbench | what it covers |
|-----------|----------------|
| `tb_line_buffer`, `tb_register_bank` | row delays and window shifting with random enables |
| `tb_average_generator` | 2,000 random windows plus one case per direction |
| `tb_pixel_averaging_filter`, `tb_ipc_impulse_stage` | 16x12 frames with random gaps and backpressure; raster order, values, per-frame clock count; window growth, replacement and the `TMAX` limit all occur |
| `tb_haar_dwt`, `tb_reconstruction`, `tb_subband_fifo` | coefficients against the reference; exact rebuild at one pixel per clock; FIFO against a queue model |
| `tb_histogram_mean`, `tb_output_frame_store` | frame means; random-order writes and read-back |
| `tb_ipc_top` | six 16x12 frames, including a back-to-back pair and a bypass frame; whole output memory, every subband set and every mean checked; counts each mechanism and fails if one never happens |
| `tb_ipc_top_full` | one frame at the default 640x480 size, every output pixel checked (about 15 s) |
| `tb_noise_sweep` | 64x48 image at 10 %, 20 % … 90 % noise; output checked, MSE/PSNR printed |
| `tb_table2_sizes` | one frame each at 320x240 and 1024x768 |

The mechanisms counted by `tb_ipc_top` are:

- each min-tree direction;
- both clamps;
- flush;
- inter-stage backpressure;
- window growth;
- median replacement;
- reaching `TMAX`;
- more than one set waiting in the subband buffers;
- bypass.

The test images are synthetic: a ramp with texture plus random impulses.
For example, at 20 % noise the PSNR rises from about 12 dB to about 22 dB
at 64x48, and from about 12 dB to about 30 dB at 1024x768. These numbers
describe this implementation on these images only. They are not the
paper's results.

To run a testbench with Verilator (from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ipc_top rtl/ipc_pkg.sv tb/ipc_ref_pkg.sv tb/tb_ipc_top.sv
./obj_dir/Vtb_ipc_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The
top-level testbenches read internal signals
through hierarchical names to count mechanisms. If you rename instances,
adjust those names.
