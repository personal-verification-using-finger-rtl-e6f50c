# Finger-vein image preprocessing core

A finger-vein verification system photographs a finger in near-infrared light:
the blood in the veins absorbs the light, so the veins show up as dark curves
inside a bright finger. Before a template can be extracted (vein crossings and
line ends) and matched, the raw camera image must be cleaned and turned into a
one-pixel-wide skeleton of the vein pattern. In software on a small embedded
processor that preprocessing takes tens of seconds per image. This RTL is the
hardware accelerator that does it in a fraction of a second. It sits next to an
embedded CPU, which keeps the minutiae extraction and the template matching.

The core takes an 8-bit grey image (320 x 240 in the reference capture set-up)
and runs it through this chain:

| step | block | what it does |
|---|---|---|
| 1 | `gray_median` | 7x7 median filter, built as a sorting network, removes noise |
| 2 | `canny_nms` | Canny edge detection: gradient, non-maximum suppression and strong/weak classification |
| 3 | `edge_track` | hysteresis edge tracking, repeated until stable, then weak edges removed |
| 4 | `dilate` | 3x3 dilation closes gaps in the finger outline |
| 5 | `region_fill` | fills the finger between its upper and lower outline and keeps only the grey finger region (the ROI) |
| 6 | `gauss5` | 5x5 Gaussian low-pass filter |
| 7 | `local_thresh` | 19x19 local threshold: pixels darker than their surroundings become vein (255) |
| 8 | `bin_median` | 5x5 binary median by counting, applied three times |
| 9 | `thinning` | Zhang-Suen thinning until stable, giving the skeleton |

Steps 2 to 5 make up the ROI extraction. The reference design also aligns and
resizes the finger between steps 5 and 6. That step is not included, because
nothing fixes what it aligns to or what size it produces. The chain goes
straight from the ROI image to the Gaussian filter.

## One buffer, many passes

All images live in one RAM of 2^18 words x 8 bits (`image_ram`). An image of
N = W x H pixels is stored row by row, so pixel (x, y) is at
`base + y*W + x`. For 320 x 240, row 239 starts at 76,480 and the last pixel is
at 76,799. An 8-bit word holds either a grey level or a binary pixel coded as
0 or 255. The Canny stages also use 128 for a weak edge.

The image is loaded at address 0, and the first result goes right after it, at
N. Later passes alternate (ping-pong) between regions: each pass writes its
result into the region the previous pass read from. Region filling also needs
a grey image, so that image is kept in a region of its own until filling is
done. The grey image is the median-filtered image in the full chain, and the
loaded image when the ROI module runs alone. This has two consequences:

* The full chain and the ROI module use a third region at 2N, so they need
  3N ≤ 2^18, which means N ≤ 87,381 pixels. A 320 x 240 image uses 230,400 of
  the 262,144 words.
* Every other module run on its own needs only the input and output regions.
  Those modules take images up to 2^18 / 2 = 131,072 pixels, for example
  512 x 256.

The region rotation is this implementation's choice. The reference design
only states the input/output split and the 131,072-pixel limit.

`pixel_addr_gen` produces these raster addresses with a running counter, with
no multiplier. The core uses two of them: one for loading pixels in, one for
reading results out.

## The window pixel buffer

Every filter except region filling works on a K x K neighbourhood of each
pixel, with K = 7, 9, 3, 5 or 19. `window_fetch` supplies these windows. It
holds the window in registers (K rows of K pixels) and walks the image in
raster order:

* At the start of each row it reads all K columns of the first window.
* For each further pixel it shifts the window one column left and reads only
  the new right-hand column, which is K pixels.
* Coordinates outside the image are clamped to the nearest edge pixel
  (replicate padding). This is the "image border checking". Clamping is this
  implementation's choice. Zero padding would darken the border under the
  median and Gaussian filters.

The RAM has one read port with a one-cycle latency. A column therefore costs
K read cycles, one cycle for the last word to land and one to shift it in. One
pass takes exactly

    H * (K*(K+2) + 1 + (W-1)*(K+3))   cycles

For example, a 7x7 pass over 320 x 240 takes 780,960 cycles, or 15.6 ms at
50 MHz. With each window, `window_fetch` emits a *tag*: the destination address
`dst_base + y*W + x` and a `last` flag (`vein_pkg::tag_t`). Each filter carries
the tag through its own pipeline and hands it to the RAM write port. As a
result, filters can have any latency, and the end of a pass is simply the
filter output whose tag has `last` set. There is no backpressure: every filter
accepts one window per cycle, which is far faster than the windows arrive.

## Canny edge detection in integer arithmetic

This is the least obvious part of the design. Everything is reduced to shifts
and adds.

**Gradient (`dog_gradient`).** The gradient uses the first derivative of a
Gaussian with σ = 1, sampled at seven points:
(-0.0133, -0.1080, -0.2420, 0, 0.2420, 0.1080, 0.0133). Scaled by 10,000 this
gives the integer weights 133, 1080 and 2420. The kernel is antisymmetric, so
the block forms three pixel differences first. It then multiplies them by
shift-and-add:

* 133 = 128 + 4 + 1
* 1080 = 1024 + 32 + 16 + 8
* 2420 = 2048 + 256 + 64 + 32 + 16 + 4

The horizontal gradient dx runs along the row and dy runs along the column.

**Dividing by 10,000 (`div10000`).** The block multiplies the magnitude by
13421 = 2^13 + 2^12 + 2^10 + 2^6 + 2^5 + 2^3 + 2^2 + 1, again with shifts and
adds, and shifts the result right by 27. This is 1/10,000 within 5·10⁻⁵. The
sign is restored afterwards, so the quotient rounds toward zero. For 8-bit
pixels the gradient lies in -92..92.

**Magnitude and direction (`grad_mag_dir`).** The square root of
dx² + dy² is replaced by max(7a/8 + b/2, a), where a = max(|dx|, |dy|) and
b = min(|dx|, |dy|). The code computes 7a/8 as a - (a >> 3). The estimate is
within about 12 % of the true length. The direction is put into one of four
classes:

| class (`dir`) | θ | compared neighbours |
|---|---|---|
| 0 | 0–45° or 180–225° | left, right |
| 1 | 45–90° or 225–270° | lower-right, upper-left |
| 2 | 90–135° or 270–315° | up, down |
| 3 | 135–180° or 315–360° | lower-left, upper-right |

No arctangent is needed. The block folds the vector into the upper half plane,
since θ and θ+180° share a class. It then looks at the sign of dx and compares
|dy| with |dx|, because tan 45° = 1. Lower bounds are inclusive. Rows grow
downward, so a positive dy points down. The neighbour mapping is this
implementation's choice.

**Suppression and hysteresis (`canny_nms`).** Non-maximum suppression needs G
at the centre and at its eight neighbours. Each of these needs a 7-tap
gradient in both directions, so `canny_nms` takes a 9x9 window and runs 18
gradient units and 9 magnitude units in parallel. The centre survives if its G
is at least as large as both neighbours along its direction. The survivor is
then classified:

* G ≥ `t_high`: 255 (strong edge)
* G ≥ `t_low`: 128 (weak edge)
* otherwise 0

The thresholds are run-time inputs, because the reference design gives no
values. A step of about 130 grey levels gives G ≈ 47. The tests use
`t_high = 30` and `t_low = 12`.

**Edge tracking (`edge_track`).** A weak pixel with a strong 8-neighbour
becomes strong. One pass extends a chain by about one pixel, so the sequencer
repeats the pass until no pixel changes, up to `MAX_ITER` = 32 passes. A final
pass then sets the remaining weak pixels to 0.

**Outline to ROI (`dilate`, `region_fill`).** A 3x3 dilation thickens the
outline. The finger lies across the image, so each column crosses its upper
and lower outline. `region_fill` scans each column twice:

1. It finds the first and the last edge pixel.
2. It copies the median-filtered grey pixels between them, inclusive, and
   writes 0 elsewhere. A column without edges becomes all 0.

The column rule and the masking are this implementation's reading of "finger
region filling".

## The median sorting network

`gray_median` is Batcher's odd-even mergesort for N = 49 inputs. It uses the
iterative form: for p = 1, 2, 4 … and k = p, p/2 … 1, a compare-exchange joins
elements i+j and i+j+k when both lie in the same block of 2p. For 49 inputs
this gives 21 stages and 394 compare-exchange units, with a pipeline register
after every stage. Only the middle output is used, and the 319 units that feed
it remain after synthesis. The reference design quotes 342 comparators for its
7x7 network, which implies a different pruning. The filter accepts one window
per cycle with a latency of 21 cycles.

## Binary stages

* `local_thresh` compares `pixel*361` with the sum of its 19x19 window, which
  avoids a division. A pixel that is strictly darker than the local mean
  becomes 255. Zero pixels (outside the ROI) stay 0.
* `bin_median` counts the zeros in a 5x5 window and outputs 0 if there are more
  than (25-1)/2 = 12, else 255. This counter replaces sorting. The sequencer
  runs it three times.
* `thinning` is one Zhang-Suen sub-iteration on a 3x3 window. The sequencer
  alternates sub-iterations 0 and 1 until a pair changes nothing, up to
  `MAX_ITER` pairs. The reference design only names a thinning step. Zhang-Suen
  is this implementation's choice, as are the mean rule of the threshold and
  the zero rule.

`gauss5` uses the mask

    1  4  7  4 1
    4 16 26 16 4
    7 26 41 26 7   / 273
    4 16 26 16 4
    1  4  7  4 1

The division by 273 is done as `(sum * 122911) >> 25`. This is exact floor
division for every possible sum (0..69,615).

## Whole chain or one module

With `run_one = 0` the sequencer runs the whole chain. With `run_one = 1` it
runs only the module given by `op_sel` (`vein_pkg::op_t`):

* `OP_MEDIAN`: the 7x7 median filter.
* `OP_ROI`: the whole ROI extraction (Canny, tracking, dilation, filling) on a
  grey image that has already been median-filtered.
* `OP_GAUSS`: the 5x5 Gaussian filter.
* `OP_THRESH`: the 19x19 local threshold.
* `OP_BMED`: the binary median, three passes.
* `OP_THIN`: thinning until stable.

This matches the way the reference design times each of these modules
separately. The sequencer iterates in the same way in both modes, so running
the six modules one after another gives the same result as the chain.

## Using the core (`vein_preproc_core`)

Parameters are `ADDR_W` = 18, `COORD_W` = 10 and `MAX_ITER` = 32. All signals
are synchronous to `clk`. `rst_n` is an active-low synchronous reset.

1. **Load.** Set `img_w` and `img_h`, pulse `load_start`, then give the N
   pixels in raster order on `in_pix` with `in_valid`. The core accepts at most
   one pixel per cycle, and only while it is idle.
2. **Run.** Pulse `start` with `run_one` and `op_sel`. `busy` stays high
   during the run, and `done` pulses once at the end. `t_high` and `t_low`
   must stay stable during the run. Assertions flag loading or starting a
   read-out while the core is busy.
3. **Read.** Pulse `rd_start` with `rd_sel`: 0 selects the final result and 1
   the grey image kept for region filling. Each cycle with `rd_step` high fetches the next
   pixel in raster order. The pixel appears on `out_pix` with `out_valid` one
   cycle later.
4. **Statistics.** `stat_pass`, `stat_track_iter` and `stat_thin_iter` count
   the passes of the last run.

Run time follows from the pass formula of the window buffer. Region filling
takes W*(2H+2) cycles. For a 320 x 240 image:

| module | passes | cycles | at 50 MHz | reference hardware |
|---|---|---|---|---|
| median 7x7 | 1 | 780,960 | 15.6 ms | 20 ms |
| ROI extraction | Canny + (t+1) tracking + dilation + filling | 942,720 + (t+2)·463,200 + 154,240 | 87 ms for t = 5 | 390 ms |
| Gaussian 5x5 | 1 | 621,120 | 12.4 ms | 10 ms |
| local threshold 19x19 | 1 | 1,780,320 | 35.6 ms | 30 ms |
| binary median 5x5 | 3 | 1,863,360 | 37.3 ms | 40 ms |
| thinning | 2 per iteration | 463,200 per pass | 130 ms for 7 iterations | 410 ms |

Here t is the number of tracking passes, which depends on the image.
A 320 x 240 synthetic finger takes 15.9 million cycles for the whole chain:
0.32 s at 50 MHz, or 0.16 s at 100 MHz. The number of tracking and thinning
passes depends on the image. The largest parts are thinning (two 3x3 passes
per iteration) and the 19x19 threshold (22 cycles per pixel). The reference
hardware reports about 0.9 s for its preprocessing at 50 MHz.

## Where this RTL departs from the reference design

* **Alignment and resizing** are not included.
* **Host interface.** The host side (CPU bus, transfer of the image) is
  replaced by the pixel-stream load and read-out ports above.
* **Buffer use.** The full chain and the ROI module need a third region, so
  they are limited to 87,381-pixel images, not 131,072. The other modules
  keep the limit of 131,072 pixels.
* **Own choices:** window fetching, border clamping, the thresholds as inputs,
  the neighbour mapping of suppression, the weak-edge code 128, iterative edge
  tracking, the 3x3 dilation, column-wise region filling, the mean rule of the
  local threshold and Zhang-Suen thinning. The reference design names these
  steps but does not detail them.
* **Comparator count.** The median network is the full Batcher network, pruned
  by synthesis, so its comparator count differs from the published 342.
* **Gradient axes.** dx is the horizontal (along-row) gradient. One printed
  formula can be read as the opposite, but the accompanying text names dx the
  horizontal gradient.
* **No pipelining between passes.** Each pass waits for the previous one. The
  reference design notes that pipelining would be a further speed-up, and
  neither design has it.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block with the behavioural models in `tb/vein_ref_pkg.sv`, which use plain
multiplications, a sort and `$atan2` rather than the RTL's structure. Each
prints `TB_RESULT checks=… failures=…`.

* Filter testbenches feed random or structured windows back-to-back. They
  check the pixel, the tag and the exact latency.
* `tb_window_fetch` checks every window, including images smaller than the
  window, and the pass cycle count given above.
* `tb_grad_mag_dir` is exhaustive over the gradient range.
* `tb_vein_preproc_core` (64 x 48) and `tb_vein_full` (320 x 240, default
  parameters) use `tb/vein_core_run.sv`. It draws a synthetic finger with
  veins, a faint outline stretch, an isolated weak-edge patch and
  salt-and-pepper noise, and runs a behavioural model of the whole chain. It
  compares the median image and the skeleton pixel by pixel, checks the pass
  counts, and fails if any mechanism never occurred. It then runs each module
  on its own with the model's input for that module and compares the result. The mechanisms are border
  clamping, weak edges, promotion, weak-edge removal, ROI masking, vein
  pixels, median flips and thinning deletions. The full-size run needs about
  a minute of simulation.
* `tb_vein_big` runs the two-region modules on a 512 x 256 image
  (131,072 pixels), the largest a module may take.

To run a testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_vein_preproc_core \
      -y rtl -y tb +libext+.sv -Irtl -Itb rtl/vein_pkg.sv tb/vein_ref_pkg.sv \
      tb/tb_vein_preproc_core.sv
    ./obj_dir/Vtb_vein_preproc_core

To run another testbench, replace the testbench name. Everything in `rtl/` is
synthesizable SystemVerilog. `image_ram` is written as a plain array so that
tools can map it to block RAM.
