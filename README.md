# Wide-range phase-based stereo on an FPGA: shiftable correlation windows

This is a synthesizable SystemVerilog model of a real-time dense stereo system.
It takes a pair of interlaced camera fields, 640×240 pixels at 60 fields per second.
For every pixel of the left image it produces a disparity of up to 128 pixels, plus a
flag saying whether the left-to-right and right-to-left matches agree.

Matching uses local weighted phase correlation (LWPC):

- both images are split into three scales and three orientations with quadrature filters;
- the phases are compared at a set of candidate shifts;
- the votes are summed over orientations and scales;
- the strongest candidate wins.

A plain implementation needs one correlator ("voting unit") per candidate disparity.
That makes a 128-pixel range far too large for an FPGA. Here the cost stays fixed
whatever the range: each scale has only two short windows of voting units, and both can
be moved anywhere in the range.

- The **primary tracking window (PTW)** is centred, for every pixel, on the disparity
  that pixel had in the previous field. Disparities change little from one field to
  the next, so once a pixel is locked the PTW keeps following it.
- The **secondary roving window (SRW)** moves a fixed distance every field
  (9, 18, 27, … 126, then 0, then again 9, …) and so sweeps the whole range. If the
  SRW finds a stronger peak than the PTW, that peak wins the pixel. The PTW then jumps
  to it in the next field. This is how the system starts up, and how it recovers when
  something new enters the scene.

Each window is 9 candidates wide at full resolution, 5 at half and 3 at quarter
resolution. That gives 34 voting units per direction, while disparities up to
`MAXD = 128` are reachable.

## Data path

```
cam L ─► image_rectifier ─► scale_orient_decomp ─► 9 × l1_normaliser ─┐
cam R ─► image_rectifier ─► scale_orient_decomp ─► 9 × l1_normaliser ─┤
                                                                      ▼
                                        tdm_tx ─► 100-bit bus ─► tdm_rx
                                                                      │
             ┌───────────────── srw_scheduler (SRW centre) ───────────┤
             ▼                                                        ▼
   phase_corr_chain DIR=0 (left reference)      phase_corr_chain DIR=1 (right reference)
             └──────────────► consistency_check ◄─────────────┘
                                    │
                   disparity, x, y, invalid flag
```

All logic after the rectifier input buffers runs on one system clock `clk`. That
clock must be at least four times the camera pixel clock `cam_clk`. Pixels move as a
stream of `valid` + `x` + `y` + data, one pixel per 4 system clocks. Every sample
carries its own coordinates. Units that must line up different streams match them by
coordinate, not by counting cycles.

### Rectification (`image_rectifier`, `image_buffer`, `rect_coord_gen`, `bilinear_interp`, `sync_2ff`)

Each camera writes its pixels, on its own clock, into a 32-line dual-clock buffer.
Two toggles cross into the system clock through two-flop synchronisers: one flips at
the end of each line, the other at the start of each field.

For each output pixel (x, y):

- a second-order polynomial gives the source position. The coefficients are in Q16
  (`A_COEF`, `B_COEF`, six each for 1, x, y, x², xy, y²). The result keeps six
  fractional bits.
- the four neighbours are read in four consecutive system cycles;
- the neighbours are blended bilinearly.

A row starts once the source line `y + VLOOK` has arrived (VLOOK = 15). The usable
vertical misalignment is therefore ±15 lines. A pixel whose neighbourhood lies outside
the image or outside the buffered band comes out as 0, with `out_missing` set. The
default coefficients are the identity warp. Real values come from an offline
calibration.

### Scale and orientation decomposition (`scale_orient_decomp`, `pyramid_level`, `g2h2_filter_bank`, `fir7_sym`)

Two 5×5 binomial stages (`pyramid_level`) make the half- and quarter-resolution images.
Each stage emits a sample at every even (x, y) centre.

Each scale then goes through a G2/H2 quadrature filter bank built from seven separable
7-tap basis filters: three for G2 and four for H2.

- The vertical pass comes first, so all seven filters share one 6-line buffer.
- Each 1-D filter is symmetric or antisymmetric, so it needs only four multipliers after
  pre-addition (`fir7_sym`).
- Steering combines the basis outputs into −45°, 0° and +45° responses, 16 bits per
  component.

The 1-D kernels (Q10, in `stereo_pkg`) are the standard steerable G2/H2 functions
sampled at spacing 0.67:

- Gaussian: `e^-t²`
- first-moment factor: `t·e^-t²`
- G2 factor: `(2t²−1)·e^-t²`
- H2 factors: `(t³−2.254t)·e^-t²` and `(t²−0.75)·e^-t²`

All three scales leave the decomposition in the same cycle, 3 cycles after the input
pixel that completes them.

`l1_normaliser` maps each complex response to 8-bit phase components:
`127·re/(|re|+|im|)` and `127·im/(|re|+|im|)`. The correlation therefore sees phase,
not amplitude.

### Inter-board link (`tdm_tx`, `tdm_rx`)

Decomposition and correlation sit on different FPGAs in the target board. Each link
word holds one sample of all three scales, for both images, together with their
valid bits and coordinates: 345 bits in all. The word is sent as four beats over a
100-bit bus, with a first-beat marker for framing. The link therefore carries one word
per 4 clocks, which is exactly the pixel rate. An assertion in `tdm_tx` flags a word
offered before the previous one has gone.

### Shiftable-window correlation (`shift_corr_unit`, `partial_line_buffer`, `voting_unit`, `gauss_window5`)

This is the core of the design. There is one unit per scale and per direction.

- The search stream is written into a **partial line buffer**, a ring that holds only
  the latest `2·MAXD_S + 2·NWIN + 4` samples of the line.
- Each voting unit needs its own read port, so the ring has one copy per voting unit
  (`NWIN` copies). Each copy has two read ports: one for the PTW and one for the SRW.
- The ring is indexed by stream step, not by x. Every entry stores its (x, y). A voting
  unit whose search pixel lies outside the row, or has not been written, is disabled
  (vote 0) by comparing that tag.
- For candidate t, the left-reference direction (`DIR=0`) reads pixel x − t. The
  right-reference direction (`DIR=1`) reads x + t. Pixel x + t arrives later than x, so
  in `DIR=1` the reference is held back by `DLY = MAXD_S + NWIN` steps in a small
  reference ring. That ring also keeps each pixel's window centres.
- A `voting_unit` computes `Σ_orient Re(ref · conj(search))`, which is the phase
  correlation vote.
- `gauss_window5` smooths the votes along x with the 1×5 binomial window
  (1, 4, 6, 4, 1)/16, using only taps from the same row.

Pipeline: write → address → buffer read and vote → window.

The smoothing adds slot k of neighbouring pixels. When the PTW centre changes from one
pixel to the next, slot k of the neighbours stands for a slightly different disparity.
This is a deliberate approximation: the centre map is smooth wherever tracking has
locked.

### Combination and peak (`interp_peak`, `disparity_store`, `phase_corr_chain`)

The three scales reach the combiner at different times. Coarse levels pass through
more line buffers, so full resolution is about 18 lines ahead of quarter resolution.

`interp_peak` first realigns them. It writes each scale's votes into a row ring (32, 16
and 8 rows) at the coordinates they carry. A scale has finished row q once it writes
row q + 2. At the end of a field every row counts as finished (`frame_end`, raised a
fixed delay after the rectifier's last row). Row r is read out, one pixel per clock,
when scale 1 has row r, scale 2 has row r/2 and scale 4 has row r/4.

For each of the 9 PTW and 9 SRW candidates t of a pixel:

- the full-resolution vote is added to the coarse votes of the pixel's block;
- the coarse votes are interpolated in disparity with a three-point quadratic (Lagrange)
  through the nearest coarse samples, in quarter steps, with weights
  `n(n−4)/32, (32−2n²)/32, n(n+4)/32`;
- a candidate outside a coarse window's reach gets nothing from that scale.

The largest of the 18 sums is the disparity. On a tie the PTW wins. `out_srw` marks
pixels where the SRW won.

`phase_corr_chain` connects the three scale units, `interp_peak` and a double-buffered
`disparity_store`. The store holds the previous field's map, which gives each pixel's
PTW centre: the disparity itself for scale 1, and ½ and ¼ of it for the coarse scales.
The current field is written into the other bank, and the banks swap at `frame_done`.
Before the first field completes, the PTW is centred on 0.

### Consistency check (`consistency_check`)

Both chains start each row together: a row starts only when both are ready. The check
therefore sees pixel x from both directions in the same cycle.

It works as follows:

- a small ring keeps the right-to-left result of each recent x, tagged with (x, y);
- the left result d at x is compared with the right result stored at x − d;
- the pixel is marked invalid if that entry is missing, or differs by more than
  `CONS_THR = 2`.

Occluded pixels and pixels near the left image edge, which have no partner, are
rejected this way.

## Interfaces and timing of the top (`stereo_top`)

| port | dir | meaning |
|---|---|---|
| `cam_clk`, `cam_valid`, `cam_x[9:0]`, `cam_y[7:0]` | in | shared pixel timing of both cameras |
| `cam_pix_l[7:0]`, `cam_pix_r[7:0]` | in | left and right pixels |
| `clk`, `rst_n` | in | system clock (≥ 4 × `cam_clk`), synchronous active-low reset |
| `disp_valid`, `disp_x`, `disp_y`, `disp_d[7:0]` | out | checked left-to-right disparity map, raster order |
| `disp_invalid` | out | pixel failed the consistency check |
| `rl_d` | out | raw right-to-left disparity (monitor) |
| `lr_srw_win`, `rl_srw_win` | out | the roving window won this pixel |
| `srw_c`, `srw_wrap` | out | current SRW centre, strobe when the sweep restarts |
| `rect_missing` | out | a rectified input pixel fell outside its source image |
| `frame_start`, `frame_done` | out | field started; last checked disparity of a field |

Parameters: `LINE_W` 640, `NROWS` 240, `MAXD` 128, `SRW_STEP` 9, `BUS_W` 100,
`FLUSH_DLY` 32, and the four sets of warp coefficients.

Disparity rows leave in bursts of one pixel per clock, about 25 input lines after the
matching camera line. A complete field leaves once per camera field period.

The camera must send at least `VLOOK + 1` blank lines between fields. The rectifier
finishes the last rows of a field during that gap.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/stereo_pkg.sv tb/tb_stereo_top.sv --top-module tb_stereo_top -o sim
./obj_dir/sim
```

Testbenches:

- **`tb_stereo_top`**: the whole system at 64×32 (MAXD 32) over seven fields.
  - The scene is a random texture with a true disparity of 20. The right image needs
    a one-pixel warp to line up, so the rectifier's warp is exercised.
  - It checks that the first field cannot find 20. It checks that the SRW captures 20
    in the next field and the PTW keeps it afterwards (more than 90 % of interior
    pixels exact within ±1).
  - It counts each mechanism and fails if any count is zero: SRW wins in both
    directions, PTW wins, sweep wrap, consistency rejections at the left border,
    rectifier missing pixels, link beats (exactly 4 per word).
  - It checks the field count and that fields leave at the camera field rate.
- **`tb_stereo_top_full`**: one complete 640×240 field at default parameters. The true
  disparity is 9, so the SRW (at 9 in the first field) must supply it.
- **Unit testbenches**: each compares the block with a model written independently in
  the bench.
  - Bit-exact for the filters (`tb_fir7_sym`, `tb_g2h2_filter_bank` with a direct 2-D
    evaluation, `tb_pyramid_level`), the rectifier (`tb_image_rectifier`: 4-cycle pixel
    rate, sub-pixel warp, missing flags, two fields), the normaliser, the link, the
    voting unit, the Gaussian window, the partial line buffer, the disparity store,
    the SRW schedule and the consistency check.
  - `tb_shift_corr_unit` compares every PTW/SRW vote of both directions with a direct
    model, and checks the latency.
  - `tb_phase_corr_chain` runs both chains on synthetic phase images and checks SRW
    capture followed by PTW tracking.
  - `tb_interp_peak` feeds coarse windows that hold samples of known quadratics, so the
    interpolated sum is exact. It checks disparity, peak score and the SRW flag of every
    pixel, ties going to the PTW, and rows released both by the completion rule and by
    the field-end flush.

## Departures, limits and own choices

- **Borders.** Filter and pyramid stages produce outputs only for centres whose window
  has fully arrived, with zeros above and left of the image. The last two columns and
  rows of a pyramid level, and the last three of a filter bank, are not produced. The
  combiner then uses whatever its rings last held there, so disparities within a few
  pixels of the right and bottom edges are unreliable. Near the left edge, pixels
  without a partner are caught by the consistency check.
- **Row ends.** The Gaussian window emits a pixel when the next step arrives. The last
  two pixels of a field's final row (and, for the right-reference chain, its last `DLY`
  pixels) are still in the pipeline when the field ends, and the combiner uses stale
  votes for them.
- **Link width.** The 288 phase bits per pixel are sent together with coordinates and
  valid bits (345 bits, 4 beats).
- **Rectifier band.** ±15 lines with the 32-line buffer, not ±16.
- **Quadratic interpolation** is done in quarter steps on integer votes. The weights
  above are exact for a quadratic vote profile.
- **Filter coefficients, word widths and rounding** are this design's own choices,
  listed in `stereo_pkg`. The phase components are 8 bits, the filter outputs 16 bits,
  and the warp uses 16 fractional bits for coefficients and 6 for coordinates. The
  phase, filter and warp widths follow the original description.
- **Memory.** The row rings of `interp_peak` hold every candidate vote for 32/16/8 rows
  of each scale. That is the largest storage in the design (about 9 Mbit per direction
  at 640 pixels). It is the price of matching scales by coordinate rather than by fixed
  delays.
- **Not included.** NTSC decoding and display output are outside the digital design:
  the top exposes a plain pixel stream instead. The fixed-window correlator that the
  shiftable windows replace is not built, because it is only a point of comparison.
