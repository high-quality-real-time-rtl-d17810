# Real-time stereo matching with guided-filter cost aggregation

This is a streaming hardware stereo matcher. It takes a rectified left/right
colour video pair, one pixel of each image per clock, and outputs a dense,
refined left disparity map at the same rate. The defaults are 1280 x 720
frames with 64 disparity levels: 720p at 60 fps on a ~74.25 MHz pixel clock.

The matcher is a local, adaptive-support-weight method. Every disparity slice
of the matching-cost volume is smoothed by a **guided image filter (GIF)**
steered by the grey reference image. The filter is edge-preserving, so costs
are averaged within objects but not across their borders. The key point for
hardware is that a GIF can be built from box means, and a box mean can be
updated incrementally. Each filter therefore only needs, per clock, the sample
entering its window and the sample leaving it. Its logic does not grow with
the window radius `r`. Only a column-sum memory scales, with the image width.

The architecture follows the paper "High-Quality Real-Time Hardware Stereo
Matching Based on Guided Image Filtering". The RTL, its fixed-point formats,
the pipeline timing and everything listed under
[Departures and own choices](#departures-and-own-choices) belong to this
implementation.

## What is computed

For a left pixel `p` and disparity `d` (right pixel `p-d`):

* **Cost** (`ccu`):
  `C = (min(Tc, (|dR|+|dG|+|dB|)/3) << 3) + (min(Tg, |dGx|+|dGy|) << 6)`.
  `Gx`/`Gy` are Sobel gradients normalised to 0..255. `Tc = 7`, `Tg = 2`. The
  shifts replace the colour/gradient balance factor. Costs are 8 bits, at most 184.
* **Guided filter per slice** (`gif`), with grey guidance `I`, cost slice `p`
  and window (2r+1)²:
  `mean_I, corr_I = mean(I·I), corr_Ip = mean(I·p), mean_p`;
  `var = corr_I − mean_I²`, `cov = corr_Ip − mean_I·mean_p`;
  `a = cov / 2^k`, where `2^k` is the power of two nearest to `var + eps`;
  `b = mean_p − a·mean_I`; `q = mean_x(a)·I + mean_x(b)`.
  `mean_x` is a horizontal mean over 2r+1 columns. It is cheaper than a second
  box mean and costs little accuracy.
* **Winner-takes-all** (`wta`): `d(p) = argmin_d q(p,d)`, using a comparator tree.
  On a tie the lower disparity wins.
* **Refinement** (`dru`):
  * A left/right consistency check: the right-referenced map is computed as well.
  * Filling of inconsistent pixels.
  * A segment-weighted 5x5 median.
  * A 3x3 median for spike removal.

## How the stream is organised (read this before changing timing)

### One enable, raster offsets

There is no handshake inside the matcher. Every register advances on the
shared `pix_en`, so a low `pix_en` stalls the whole pipeline losslessly.

Each signal has an **offset**: how many raster samples it trails the pixel
presented at the input.
* A register adds 1.
* A window adds the distance from its newest sample to its centre, e.g. `R*N + R`.

All offsets are written once, as functions in `gifsm_pkg`:
`off_gcmmu`, `off_cvf`, `gif_lat`, `off_dl`, `off_lr`, `off_fill`,
`off_filled`, `off_win_centre`, `off_med_out`, `off_out`.

`sys_ctrl` holds one `raster_pos` counter per stage boundary. Each counter
starts `offset` samples before (0,0), so every unit gets the (x, y) of the
sample it is handling. That position drives several things:
* column-sum clears at the first row;
* leaving-row clears for rows above the image;
* row starts for the horizontal accumulators;
* border bypasses in the gradient core and median filters;
* the L-R range test.

If you add a register anywhere, update the matching function in `gifsm_pkg`.

With the defaults, the output (`disp`, with its position `disp_x`, `disp_y`)
trails the input by **9,117 samples**, just over 7 rows. Frames are streamed
back to back. A frame is complete at the output once 9,117 samples of the next
frame have been sent.

### New and old rows instead of window buffers

The GCMMU keeps a (2r+1)-row circular buffer (a read-first memory) of colour
plus gradients for each image. The word read at an address is the pixel of
the same column 2r+1 rows earlier: the pixel *leaving* the window. It is
overwritten in the same cycle by the pixel *entering* it.

The cost units run twice per disparity:
* once for the new-row pixel pair;
* once for the old-row pixel pair.

Costs of the old row are recomputed, not stored. The guided filters therefore
see only `p_new`/`p_old` and `I_new`/`I_old`.

### Column sums (`mean_filter`)

Each box mean keeps one column sum per image column, in a memory of N words.
Per sample:
1. Read the column sum one clock early.
2. Update it in place: `+new −old`.
3. Write it back.

The window sum then adds the updated column sum and subtracts the one from
2r+1 columns earlier. That older sum comes from a (2r+1)-deep queue, not from
a second memory read, so the memory needs only its two ports.

The sum is scaled by a fixed-point 1/(2r+1)². The result for new row `y`,
column `x` belongs to row `y−r`, column `x−r`.

### The right disparity map without a second cost volume

A right-referenced cost is a left-referenced cost read diagonally:
`C_R(x', d) = C_L(x'+d, d)`. The cost memory in `cvcu` therefore delays slice
`d` by `DM−1−d` steps. After that delay, all slices belong to right pixel
`x−(DM−1)`.

A second bank of DM guided filters smooths these slices. It is guided by the
right grey image, taken from the last tap of the right shift register. Its WTA
produces `D_R`, `DM−1` samples behind `D_L`.

The DRU delays `D_L` by `DM−1` steps ("Buff D_L"). A DM-entry shift register
of `D_R` ("Buff D_R") then holds `D_R(x−k)` for k = 0..DM−1. It is indexed by
`D_L(x)` directly.

### Guidance at the output pixel

`q = mean_a·I + mean_b` needs `I` at the pixel being output. That pixel is r
rows above the new row, so the GCMMU keeps an extra r-row grey buffer per image
(`gl_mid`, `gr_mid`). Each GIF delays this guidance by its internal latency.

## Units and files

| Unit | File(s) | Contents |
|---|---|---|
| top | `gif_sm.sv` | wiring of the units below |
| system controller | `sys_ctrl.sv`, `raster_pos.sv` | per-stage raster positions |
| GCMMU | `gcmmu.sv`, `gcc.sv`, `rgb2gray.sv`, `line_window.sv`, `delay_line.sv` | Sobel cores (3x3 window, two CONV, two NORM), colour delay of N+3, (2r+1)-row buffers, DM-stage target shift registers, grey guidance |
| CVCU | `cvcu.sv`, `ccu.sv` | 2·DM cost units, diagonal cost memory |
| CVFDSU | `cvfdsu.sv`, `gif.sv`, `mean_filter.sv`, `meanx.sv`, `wta.sv` | 2·DM guided filters (4 box means each), 2 WTA trees |
| DRU | `dru.sv`, `lr_check_fill.sv`, `segmentation.sv`, `median_filter.sv` | consistency check and filling, segment labels, weighted median, spike removal |
| shared | `gifsm_pkg.sv` | `pix_t`, `pos_t`, fixed-point widths, offset functions |

### Refinement details

* **Check**: `D_L(x)` is consistent if `x ≥ D_L(x)` and
  `|D_L(x) − D_R(x−D_L(x))| ≤ 1`.
* **Filling**: an inconsistent pixel takes the smaller of its nearest
  consistent neighbours in the same row.
  * The left neighbour is held in a register.
  * The right neighbour is found by a priority encoder over a 64-pixel
    look-ahead.
  * If only one side has a consistent pixel, that one is used. If neither
    does, the pixel becomes 0.
* **Histogram median** (`median_filter`), in a single cycle:
  1. Each window position addresses a "ROM" whose word for value `v` is
     all-ones `>> v`, i.e. bits `63−v..0` set. The ROM is generated, not stored.
  2. The position's weight enables its ROM.
  3. Bit-wise adder trees give a cumulative histogram: bin `k` = number of
     weighted values ≤ k.
  4. Comparators test `bin > floor(W/2)`, where W is the number of weighted values.
  5. A priority encoder returns the lowest bin that passes: the weighted median.
  * The adaptive filter's weight is 1 where the neighbour's segment label
    equals the centre's.
  * Labels cut the grey left image into 8 equal bands (`segmentation`).
  * The spike filter sets all weights to 1.

## Parameters (top level, `gif_sm`)

| Name | Default | Meaning | Origin |
|---|---|---|---|
| `N`, `M` | 1280, 720 | frame width, height | prototype |
| `DM` | 64 | disparity levels 0..DM−1 | prototype |
| `R` | 3 | GIF window radius (7x7 box) | prototype |
| `EPS` | 0 | GIF regulariser, grey levels² | prototype |
| `TC`, `TG` | 7, 2 | colour / gradient truncation | prototype |
| `FW` | 64 | filling look-ahead (pixels) | own choice |
| `M1`, `M2` | 5, 3 | adaptive / spike median window | own choice |

Other frame sizes only need `N` and `M` changed. For example, 1080p needs
`N=1920, M=1080`. The line buffers and column-sum memories scale with `N`, and
the latency with `N·R`.

The CCU shifts (3 and 6) come from the source architecture. Fixed-point
formats are in `gifsm_pkg`:
* means carry 4 fraction bits;
* `a` carries 8 fraction bits;
* `b` and `q` carry 12 fraction bits, as 48-bit signed values.

## Departures and own choices

The source architecture fixes these points:
* the unit partition;
* the data flow;
* the mean-filter and GIF structure;
* the CCU datapath;
* the histogram median.

This implementation chose the rest:

* **Guidance for the final multiply.** The published GIF diagram feeds the
  last multiplier from the entering-row guidance line. This design uses the
  guidance at the output pixel, since that is what the filter formula needs.
  The cost is an r-row grey buffer per image.
* **Median threshold.** The published median diagram labels its comparators
  "> d_M+1". That cannot select a median of m² values. Here the threshold is
  half the number of weighted values.
* **Segmentation input.** The segment labels come from the grey left image.
  One description of the original refers to segmenting the disparity image,
  but its block diagram feeds the weight generator from a separate segment
  map of the scene.
* Numerical choices:
  * grey conversion: `(77R + 150G + 29B) >> 8`;
  * gradient normalisation: `(g + 1020) >> 3`;
  * colour mean: `×171 >> 9`.
* Nearest power of two: `2^m` for msb `m`, or `2^(m+1)` when bit `m−1` is set.
  A zero divisor gives `a = 0`.
* **Borders.**
  * Windows are zero-padded at the top and left.
  * Gradient windows centred on the border give a zero gradient.
  * Median windows near the border pass the centre value through.
  * The last `R` rows and roughly the last `2R + DM` columns of each frame
    come from windows that wrap into the next row or frame. They are not
    meaningful.
* **Not included:** the rectification unit, HDMI input/output and cameras of
  the original prototype. The two RGB input ports take their place.

## How far it is verified

Each unit has a self-checking testbench in `tb/` (`tb_<unit>.sv`). Most compare
against a direct, non-streaming evaluation of the same arithmetic on whole
frame arrays, with random `pix_en` gaps:
* box sums for `mean_filter`;
* full GIF formulas for `gif`;
* Sobel for `gcc`/`gcmmu`;
* sort-based weighted medians;
* a frame-level model of check, fill and both medians for `dru`.

Two end-to-end benches render a synthetic two-plane scene with occlusions:
* `tb_gif_sm` (96 x 40, 16 levels, three frames);
* `tb_gif_sm_full` (default 1280 x 720, 64 levels, one frame plus flush).

They require the true disparity on every pixel well inside a plane. At full
size, all 724,518 such pixels are correct. They also require stalls, L-R
rejections and changes by both medians to have occurred.

Accuracy on real imagery (e.g. the Middlebury set) has not been measured with
this RTL.

Size at the defaults is dominated by the 128 guided filters. Each has four
column-sum memories of 1280 words (11, 19, 19 and 11 bits), about 9.8 Mbit in
total.

## Simulating

Plain Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
  rtl/gifsm_pkg.sv tb/tb_gif_sm.sv --top-module tb_gif_sm
./obj_dir/Vtb_gif_sm
```

Swap in any `tb/tb_*.sv` and its module name. Each bench prints
`TB_RESULT checks=<n> failures=<n>`. `tb_gif_sm_full` builds in about 35 s and
runs a full 720p frame in about 20 s.

To use the matcher:
1. Hold `rst` for a cycle.
2. Stream frames in raster order with `pix_en` high on valid pixels.
3. Read `disp` at (`disp_x`, `disp_y`).

`dl_raw` exposes the unrefined left WTA output. `ev_invalid`, `ev_median` and
`ev_spike` pulse when refinement changes a pixel.
