# Real-time video pixel pipelines: GMM background identification and fluoroscopic noise filtering

This repository holds synthesizable SystemVerilog for two streaming image
processors that each take one pixel per clock:

1. **Background identification for HD video.** Every pixel of a 1920 x 1080
   stream is compared with a per-pixel statistical model (a mixture of three
   Gaussians, "GMM"). The circuit decides whether the pixel is foreground or
   background and updates the model. A second stage cleans up the binary
   foreground/background mask with morphological erosion, dilation, opening
   or closing.
2. **Spatio-temporal filtering of fluoroscopic (X-ray) sequences.** Each
   pixel of a 1024 x 1024 frame is replaced by the average of the pixels in
   a 7 x 7 x 5 window (7 x 7 in space, the current frame and the 4 previous
   ones). Only window pixels whose grey level is within a threshold T of
   the current pixel are averaged. T depends on the pixel's brightness,
   because X-ray noise is Poisson-like. Previous frames live in an external
   DDR2 memory.

Both designs follow the architecture of M. Genovese's thesis "Hardware
Architectures for Real Time Processing of High Definition Video Sequences".
Where the thesis leaves a detail open, this implementation makes its own
choice. Each choice is listed below and in the opening comment of the file
concerned.

The two designs share nothing. The top module `hd_video_top` places them
side by side, each with its own clocks and ports.

---

## 1. The per-pixel Gaussian model

### What is stored

Each pixel has three Gaussians. Each Gaussian holds four unsigned
fixed-point fields (`gmm_pkg`):

| field    | bits | value of a code     | note                         |
|----------|------|---------------------|------------------------------|
| weight w | 8    | code / 256          | the fraction of time this Gaussian explains the pixel |
| mean mu  | 10   | code / 4            | grey level with 2 fraction bits |
| variance | 11   | code x 8            | range 8 .. 16376             |
| matchsum | 4    | count               | how often it matched, saturating at 15 |

That is 33 bits per Gaussian and 99 bits per pixel (`model_t`). With the
pixel itself, a pixel needs 107 bits. The model memory (one entry per pixel,
read and written once per frame) is **not** part of the RTL. The top brings
out `model_in`, `model_out` and `model_valid`, and an external memory
controller closes the loop. The testbenches model this memory as an array.

### One update step (`fgbg_optimized`)

`fgbg_optimized` registers the pixel and its model, evaluates one step of the
algorithm combinationally, and registers the decision and the new model.
The latency is 2 clocks and the throughput is one pixel per clock. Its
sub-blocks are:

* **Standard deviation (`gmm_std_dev`).** sigma = sqrt(variance) is
  approximated by four straight segments. Every slope is a power of two, so
  each segment is a shift and an add. The output is sigma x 4. In terms of
  the variance code v, the segments are: `11 + v/4` for v < 2,
  `12 + 2v` for v < 24, `47 + v/2` for v < 384, and `215 + v/8` otherwise.
  These coefficients come from a least-relative-error fit. The worst error
  against the true square root is below 20 %.
* **Match (`gmm_match`).** A pixel matches a Gaussian when
  |pixel - mu| < 2.5 sigma. The test is done exactly in integers:
  2|4*pixel - mu| < 5*(4 sigma).
* **Learning rate (`gmm_learning_rate`).** The algorithm's per-Gaussian
  learning rate is approximately alpha_w / w, where alpha_w = 2^-6. It is
  rounded to a power of two, alpha_k = 2^-s, so every multiplication by it
  becomes a shift. s is the nearest integer to log2(w / alpha_w), limited to
  0..6. It is computed with a comparison of w^2 against six constants, with
  no ROM.
* **Inverse fitness (`gmm_ifitness`).** Gaussians are ranked by fitness
  w / sigma. The circuit uses the inverse, IF = variance / w^2. When w is
  expressed through s, this becomes a shift: `IF = var << 2(6 - s)`.
* **Control logic (`gmm_control_logic`).** Three comparators (b1: IF0 <=
  IF1, b2: IF1 <= IF2, b3: IF0 <= IF2) select one of the six orderings.
  The outputs are:
  - G1, G2, G3: the Gaussians from fittest to least fit;
  - GU: the fittest Gaussian that matched;
  - NM: set when none matched.

  Ties go to the lower index.
* **Background identification (`gmm_bg_ident`).** The pixel is background
  when GU is among the first B Gaussians, where B is the smallest count whose
  weights add up to more than T. The equivalent test used here: the pixel is
  foreground when NM = 1, or when the weights ranked ahead of GU add up to
  more than T. T = 0.70 (code 179) is a parameter (`T_BG`).
* **Parameter update (`gmm_param_update`).** All weights decay by
  `w - (w >> 6)`. The matched Gaussian gains `+4` (that is, alpha_w x 256),
  saturating at 255. Its mean and variance move by `(x - old) >>> s`, and
  its matchsum counts up. The square (pixel - mu)^2 comes from a single
  shared **truncated 12 x 12 -> 15 multiplier** (`gmm_trunc_mult`), whose
  operands are 2|4*pixel - mu|. With that scaling the output is already in
  variance codes. The multiplier does not form the seven lowest
  partial-product columns. It adds a constant equal to their expected value
  plus half an LSB, which keeps the error within 2 LSB with almost no bias.
* **No match (`gmm_no_match`).** When nothing matched, the least-fit
  Gaussian G3 is replaced:
  - mean = the pixel;
  - variance = VINIT (code 112, i.e. 896);
  - matchsum = 1;
  - weight = 1 / (matchsum of G1 + matchsum of G2).

  That reciprocal is a second four-segment approximation with power-of-two
  slopes: `384 - 128x`, `100 - 8x`, `35 - x`, `12 - x/8`, limited to 255.

The behavioural reference in `tb/gmm_ref_pkg.sv` implements the same step
from the equations, with real arithmetic for the logarithm and an exact
square. The testbenches compare the RTL with it.

## 2. Morphological clean-up of the mask

### Line window (`line_window`)

A generic raster-scan window holds ROWS x COLS pixels in flip-flops. The
rest of each image line sits in a RAM FIFO of `LINE - COLS - 1` entries plus
an output register. All the FIFOs share one address pointer. The module
gives both the registered window and `win_nxt`, which is the window as it
will be after the pixel now being accepted. Users of the window form their
result from `win_nxt` and register it in the same clock.

### Dilation (`dilation`)

The unit computes the OR, over the 3 x 3 window, of each pixel ANDed with
its bit of the structuring element `se`. `se[3r+c]` pairs with the
neighbour at row offset r-1 and column offset c-1, so bit 0 meets the
oldest pixel.

Frame borders need neither padding nor stalls. Two counters track the
column and row of the window centre. At the first or last row or column,
the products of neighbours that fall outside the frame are forced to 0.

The result for pixel (y, x) is registered one clock after pixel
(y+1, x+1) is accepted, so the latency is IMG_W + 1 pixels plus one clock.
Frames stream back to back. At the end of a stream, IMG_W + 1 further
pixels flush it.

`se` is used in the clock in which the window-completing pixel is accepted.
A new SE for a frame must therefore arrive together with that frame's
pixel (1, 1).

### Denoising unit (`denoising_unit`)

The unit contains two Dilation units in cascade. Erosion is obtained as
NOT dilation(NOT image). `sel1` and `sel2` choose the operation:

| sel2 | sel1 | operation | first unit input | output |
|------|------|-----------|------------------|--------|
| 0    | 0    | erosion   | NOT fgbg         | NOT D1 |
| 0    | 1    | dilation  | fgbg             | D1     |
| 1    | 0    | opening   | NOT fgbg         | D2 = dilation(NOT D1) |
| 1    | 1    | closing   | fgbg             | NOT D2 |

Out-of-frame pixels count as 0 for dilation and therefore as 1 for erosion.
With one unit in use the latency is IMG_W + 2 clocks, and with two units it
is 2(IMG_W + 2). `sel1` and `sel2` may only change between streams, after
the pipeline has drained.

## 3. The fluoroscopic filter

### Filtering rule (`st_filter`)

For the current pixel P and each window pixel R at position i:

    accepted(i) = mask(i) and P - T(P) <= R <= P + T(P)
    out         = sum(accepted R) / count(accepted)

P - T and P + T are formed once per pixel, so each of the 245 window
positions needs only two comparisons.

The division is a multiplication by a table of round(2^F / count),
followed by `(sum*recip + 2^(F-1)) >> F`. F is 17 at the default window,
giving 18-bit table entries. It grows with the window, as max(17,
clog2(2 x 255 x window size)), so that the table's rounding stays below a
quarter of an output step. The result is within 0.75 of the exact
average.

At the default 7 x 7 x 5 window, the sum has 16 bits, the count 8 bits and
the table 256 entries, as in the original circuit. All three are sized from
the window, so K = 9 or 17 also divides correctly. The output is registered,
so the latency is 1 clock.

`mask` removes two kinds of window position:
- positions outside the frame;
- positions in frames that do not exist yet (the first K-1 frames after
  reset).

Averaging only what exists is this design's border and start-up rule. A
count of 0 cannot occur in practice, because P is always in its own window.
If it did, P would pass through unchanged.

### Threshold tables (`threshold_srams`)

T(P) is read from a 256 x 10 table addressed by P. There are two banks:
- one is read;
- the other is written through `thr_we`, `thr_addr` and `thr_data`.

`thr_swap` requests an exchange of the two banks. The request is held until
the next frame start. The first pixel of that frame already uses the new
table, and `thr_active` shows which bank is in use. The noise model can
therefore change between two frames without stopping the stream.

The tables are not reset, so load a bank before swapping it in.

### Frame synchronizer (`frame_synchronizer`)

This unit brings every incoming pixel together with the same pixel of the
K-1 previous frames. It has two clock domains:

* **Pixel side, `clk_pix`.** Pixels enter here. The buffering unit, the
  threshold tables and the filter also run on this clock.
* **Memory side, `clk`.** The frame manager and the memory port run here.

Three dual-clock FIFOs join them. Each FIFO has 16 entries, Gray-coded
pointers with two-flop synchronisers, and a first-word-fall-through read
(`async_fifo`). The FIFOs are:
- the input pixels, from `clk_pix` to `clk`;
- the current pixel (8 bits), from `clk` to `clk_pix`;
- the K-1 previous pixels (32 bits at K = 5), from `clk` to `clk_pix`.

`in_overflow` flags a pixel that arrived while the input FIFO was full. Such
a pixel is lost. This happens only if the memory cannot keep up.

### Frame manager and memory layout (`frame_manager`)

This is the part that needs the most care when changing the design.

* **What one burst holds.** A memory burst is K-1 words of 64 bits: 256
  bits at K = 5. The burst at address g holds pixels 8g .. 8g+7 of each of
  the K-1 stored frames. Frame f is in word f mod (K-1).
* **Read, then masked write.** For each group of 8 new pixels the manager
  does two things:
  1. It reads burst g. The read returns the 8 pixels of every stored frame.
  2. It writes the 8 new pixels back into the same burst, with byte enables
     only on word f mod (K-1). That word held the oldest frame, which was
     just read and is no longer needed.

  So one read and one write move 8 pixels, and no frame is ever copied.
* **Frame order.** When the group has been read, the emit buffer sends 8
  outputs: `cur` and `prev[0..K-2]`. `prev[i]` comes from word
  (slot + i) mod (K-1), so `prev[0]` is always the oldest frame.
* **Addresses.** The burst address is `{row, bank, col}`, with 8 column
  bits and 3 bank bits by default and the row bits derived from the frame
  size. Consecutive bursts fill a row's columns, then the same row in the
  next bank, and only then open a new row. This keeps slow row changes rare.
* **Memory port.** The port is a plain request/ready interface, this
  design's own choice:
  - `mem_rd` or `mem_wr` is held until `mem_ready`;
  - read data comes back later with a one-clock `mem_rvalid`;
  - `mem_be` gives byte enables for the masked write.

  A DDR2 controller must be adapted to this port. It is not included.
* **Overlap.** A collect buffer gathers the next 8 pixels while the current
  group is read, written and emitted. Output backpressure (`out_ready`)
  stalls only the emitter.

Before K-1 frames have been written, the reads return whatever the memory
held. The buffering unit's mask keeps those values out of the average.

### Buffering unit (`buffering_unit`)

There is one 7-row `line_window` per frame stream, K in total. Together they
present the 7 x 7 x K window around the current centre.

Counters give the centre position and the number of completed frames. From
these the unit builds `mask` and a `frame_start` strobe. `frame_start`
drives the threshold bank swap.

The window index is `k*49 + r*7 + c`:
- k = K-1 is the current frame;
- r = 0 is the oldest row;
- c = 0 is the oldest column.

The first window is complete Y*N + X pixels after reset. After that,
windows follow one per input pixel.

## 4. Top level (`hd_video_top`)

| group | ports |
|-------|-------|
| GMM + denoising, clock `clk` | `rst_n`, `in_valid`, `pix`, `model_in`, `model_valid`, `model_out`, `fgbg`, `se`, `sel1`, `sel2`, `bm_valid`, `bm` |
| fluoroscopic filter, clocks `fl_clk` (memory side) and `fl_clk_pix` (pixel side) | `fl_rst_n`, `fl_rst_pix_n`, `fl_pix_in(_valid)`, `fl_in_overflow`, `fl_thr_we/addr/data/swap`, `fl_thr_active`, the `fl_mem_*` burst port, `fl_pix_out(_valid)` |

The parameters are IMG_W, IMG_H, FL_M, FL_N, FL_X, FL_Y, FL_K and the
address field widths. Their defaults are 1920 x 1080 for the video and
1024 x 1024, X = Y = 3, K = 5 for the fluoroscopic filter.

All resets are asynchronous and active low. The per-pixel model memory and
the DDR2 device with its controller sit outside this RTL.

## 5. Where this implementation departs from, or adds to, the original

* **sqrt approximation.** The original's segment equation subtracts the
  slope term, while its circuit figure adds it. The figure is followed:
  the segments rise with the variance, as the square root does. The breakpoints and coefficients of both
  approximations (sqrt and 1/x) are not given in the original; they were
  fitted for this design.
* **Accepted-pixel count.** In the filter, each accepted pixel adds 1 to
  the count. The original's count equation carries an extra factor there;
  it is read as 1, which its datapath figure supports.
* **Opening and closing.** These follow the equations: for closing the
  second dilation is inverted, for opening it is not.
* **Unspecified GMM values.** T = 0.70, VINIT = 896, lambda = 2.5 and
  alpha_w = 2^-6 are parameters. The original gives no values for T and
  VINIT.
* **Saturation and rounding.** Weight, matchsum and variance saturate.
  Mean and variance updates round toward minus infinity.
* **Border counters.** Each Dilation unit has its own border counters. The
  original shares one pair between both units.
* **Not-yet-acquired frames.** The treatment of frame borders and of
  missing frames in the filter (mask and exclude) is this design's own.
* **Interfaces, FIFOs and swap timing.** The memory port, the FIFO depths,
  the overflow flag and the moment of the threshold swap are this design's
  own.
* **Not built.** The alternative low-power and low-area ASIC foldings of the
  GMM circuit are not part of this RTL. Neither are the variants with five
  Gaussians.

## 6. Capacity at the default sizes

| workload | fits? | arithmetic |
|----------|-------|------------|
| 1080p at 60 fps, GMM + denoising | yes | 124.4 Mpixel/s, so the clock must be at least 124.4 MHz (one pixel per clock). Line buffers: 4 x 1916 bits. Model traffic is 107 bits per pixel each way (1.66 GB/s), handled by the external memory. |
| 272 x 176 or 320 x 240 test videos | only with IMG_W/IMG_H set to the size | The GMM has no size dependence; the denoising line buffers do. |
| five Gaussians per pixel | no | The sort and the control logic are written for three. |
| 1024 x 1024, K = 5, 7 x 7, 58 fps | yes | 60.8 Mpixel/s on `clk_pix`. The memory holds 4 frames = 4 MB = 2^17 bursts of 32 bytes. Traffic is 8 bytes per pixel = 486 MB/s. On chip: 5 x 7 lines x 1024 x 8 bits. |
| K = 9 or 17 | with FL_K changed | 8 or 16 stored frames (512- or 1024-bit bursts), 9 or 17 line windows. Simulated on 32 x 16 frames with the 7 x 7 window. |

## 7. Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_gmm_std_dev`, `tb_gmm_no_match` | Every input code: error against the real sqrt (< 20 %) or 1/x (< 25 % or 1.6 codes); sqrt never decreases. |
| `tb_gmm_match`, `tb_gmm_learning_rate`, `tb_gmm_ifitness`, `tb_gmm_control_logic`, `tb_gmm_bg_ident` | Random or exhaustive inputs against real-valued or sorted references, with forced ties. |
| `tb_gmm_trunc_mult` | Error of at most 2 LSB; mean error below 0.25 LSB. |
| `tb_gmm_param_update`, `tb_fgbg_optimized` | Random models against the behavioural GMM reference, with variance within 3 codes. Checks latency 2, valid tracking, and a static pixel that becomes background and then foreground when an object appears. |
| `tb_line_window`, `tb_dilation`, `tb_denoising_unit` | Window contents; every pixel of several frames against reference morphology, borders included. Checks latency and SE changes between frames; all four operations are run. |
| `tb_async_fifo` | Two unrelated clocks in both speed orders. Nothing lost or reordered; full and empty both reached. |
| `tb_threshold_srams` | Random writes, reads, swaps and frame starts against a model; swap timing. |
| `tb_frame_manager`, `tb_frame_synchronizer` | Memory model with random stalls and backpressure. Every `prev[i]` is checked against the frame it must come from, and every window pixel and mask bit is checked. Burst addresses and byte enables are checked too. |
| `tb_st_filter`, `tb_fluoro_filter` | Every output within 0.75 of the exact conditioned average, using the bank shown active. The threshold swap must land on the right frame. |
| `tb_fluoro_filter_k9` | The same checks with K = 9 and the 7 x 7 window, on 32 x 16 frames. Setting K = 17 in it runs the K = 17 case, which also passes. |
| `tb_hd_video_top` | Both designs at reduced size, end to end (see below). |
| `tb_hd_video_top_full` | The same checks with the top at its default sizes (see below). |

**`tb_hd_video_top`** runs both designs end to end at reduced sizes:
16 x 8 video and 32 x 8 fluoroscopy with K = 3. It counts these mechanisms
and fails if any of them never happens:
- GMM match and no-match;
- foreground and background decisions;
- each of the four morphological operations;
- border pixels;
- memory reads, writes and stalls;
- the threshold swap;
- masking of borders and of missing frames;
- input overflow (forced by holding the memory off).

**`tb_hd_video_top_full`** uses the top with no parameter overrides. It runs
two 1920 x 1080 frames through the GMM and closing, and two 1024 x 1024
frames through the K = 5 filter. It makes about 22.8 million checks. It
takes about 45 s with Verilator 5 on one thread.

`tb/ddr2_model.sv` is a behavioural burst memory with random stalls and a
fixed read latency. It stands in for the DDR2 and its controller and is not
synthesizable. `tb/gmm_ref_pkg.sv` and `tb/morph_ref_pkg.sv` are the
reference models. `tb/hd_top_body.svh` is shared by the two top-level
testbenches.

To run one testbench with Verilator (from the repository root):

    verilator --binary --timing --top-module tb_hd_video_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/gmm_pkg.sv tb/gmm_ref_pkg.sv tb/morph_ref_pkg.sv tb/tb_hd_video_top.sv
    ./obj_dir/Vtb_hd_video_top

Other testbenches work the same way. List the packages they import before
the testbench file.

All RTL passes Verilator lint and the slang front end of Yosys. What
remains is a small number of unused-signal warnings, each explained in its
module's header. The RTL has not been placed and routed. Clock frequencies
are therefore not established here, and the capacity table gives only the
rates that would be required.
