# Edge-adaptive Bayer colour interpolation processor

A single-chip image sensor sees only one colour per pixel: a Bayer colour filter array
(CFA) puts a red, green or blue filter over each photosite, so two of the three colour
values are missing everywhere. This processor rebuilds them in real time. It takes the
raw CFA stream, one sample per clock in raster order, and emits a full RGB pixel per clock.

The algorithm keeps the hardware small. Every filter weight is 1/2, 1/4, 1/8 or 3/8, so
there are no multipliers or dividers, only adders and shifts. It uses only two line
memories. The reconstruction is edge-adaptive: a cheap edge measure decides, at every
red or blue site, whether green should be interpolated along the row, along the column,
or from all four neighbours. Every estimate then gets a Laplacian (high-pass)
correction taken from the samples that are present. This correction restores sharpness
that plain averaging blurs away.

The RTL follows the architecture of the article "Anisotropic Strategy To Achieve The
Decrease In Blur And Improve In Edge Information" (S. M. Basha, L. Vidya Sagar). That
article gives the block structure, the operator budget and the weight set, but it does
not print the interpolation equations. The equations here were written to fit that
structure. They are this design's own (see *What comes from the source and what does
not*).

## Data flow

```
 in_pixel ──┬─────────────────────────────┐
            │                             ▼
            └─► line_buffer ─(rows r-1, r)─► register_bank  3 x 5 window, border mirroring
                                              │
                         ┌────────────────────┼──────────────────────────┐
                         ▼                    ▼                          │
                   edge_detector ─DH,DV,TD─► g_interpolator  (stage 1 regs)
                                              │ G^ (stage 2)              │ window delayed 1 clock
                                              ▼                           ▼
                                      rb_m3_interpolator   rb_m1 / rb_m2_interpolator
                                              │                 │
             controller ── selects ──► output multiplexers + registers ──► out_r, out_g, out_b
```

* **line_buffer**: two image lines, organised as a `WIDTH`-deep array of two-sample words
  with a circular pointer. Each advance reads the word at the pointer. It then writes the
  new pixel into line 1 and moves the old line-1 sample into line 2.
* **register_bank**: 15 registers in 3 rows × 5 columns. They shift left once per
  accepted pixel. The window reaches two columns sideways but only one row up and down.
  This is the design's anisotropy: it gets more horizontal context without more line
  memory.
* **edge_detector**: six absolute differences and five adders (see below).
* **g_interpolator**: one shared datapath for the three green models. It has two stages.
* **rb_m1/m2/m3_interpolator**: the three red/blue models. They are combinational.
* **controller**: an FSM that paces the stream and tracks where the window centre is in
  the frame. It drives every multiplexer select.

## The window and the borders

The window `win[row][col]` has row 0 above the centre and column 0 two to the left. The
centre is `win[1][2]`. The centre trails the newest input pixel by one line and two
columns. So the output lags the input by `WIDTH + 2` pixels, plus the pipeline.

Near the image edge some window positions fall outside the frame. These positions
still hold stale data: the tail of the previous line, the previous frame, or zeros
pushed in while flushing. The register bank replaces each such sample with its mirror
image about the centre. Column `c-k` becomes `c+k`, and row `r-1` becomes `r+1`.
Reflecting about the centre keeps the Bayer colour of the replacement correct, so the
same equations work on every pixel. Stale data therefore never reaches an output, and
the line memory needs no reset. This needs `WIDTH >= 4` and `HEIGHT >= 2`.

## Edge detection and the choice of green model

At a red or blue site the edge detector reads eight samples. These are the four green
neighbours (left, right, up, down) and the four diagonal samples, which all share one
colour:

```
DH = |Gl - Gr| + |Dul - Dur| + |Ddl - Ddr|      (change along the row)
DV = |Gu - Gd| + |Dul - Ddl| + |Dur - Ddr|      (change along the column)
TD = DH + DV
```

The green interpolator compares each measure against a quarter of the total. The
comparisons are done by shifting, so no divider is needed:

| condition      | model      | green estimate (L = 2·C − C₋₂ − C₊₂, centre row)          |
|----------------|------------|------------------------------------------------------------|
| 4·DH < TD      | horizontal | ½(Gl + Gr) + ¼ L                                           |
| else 4·DV < TD | vertical   | ⅜(Gu + Gd) + ⅛(Gl + Gr) + ⅛ L                              |
| otherwise      | no edge    | ¼(Gl + Gr + Gu + Gd) + ⅛ L                                 |

`L` is the horizontal Laplacian of the centre sample C, using the same-colour samples
two columns away. Adding L works as a spatial sharpening filter. The window has only
three rows, so no vertical same-colour Laplacian exists. For that reason the vertical
model keeps a one-eighth share of the horizontal pair, and it applies only a light
horizontal correction. The "horizontal" test wins when both tests pass, which slightly
favours the direction the window sees best.

Stage 1 registers the row pair sum, the column pair sum, L and the chosen model. Stage 2
scales and adds them by shifts and produces the green value one clock later. `out_gmode`
reports the model used at each red/blue site.

## Red and blue

| site                    | red                        | blue                       |
|-------------------------|----------------------------|----------------------------|
| red                     | the sample                 | M3                         |
| green, red row (`GR`)   | M1 (left/right neighbours) | M2 (up/down neighbours)    |
| green, blue row (`GB`)  | M2                         | M1                         |
| blue                    | M3                         | the sample                 |

```
M1: X = ½(Xl + Xr) + ¼(2G − G₋₂ − G₊₂)                     greens of the centre row
M2: X = ½(Xu + Xd) + ⅛(4G − Gul − Gur − Gdl − Gdr)         diagonal greens
M3: X = ¼(Xul + Xur + Xdl + Xdr) + ⅛(4Ĝ − Gl − Gr − Gu − Gd)
```

In M3, Ĝ is the green that the green interpolator has just produced for the same pixel.
The correction therefore mixes interpolated and original greens. That is why the red/blue
stage runs one clock after the green stage 1.

All results are formed as integer sums in units of 1/8. They are rounded by adding 4 and
shifting right by 3, then clamped to `0 .. 2^DW − 1`. The shared helper is
`cfa_pkg::div8_clamp`.

## Timing and interface

* The input uses a valid/ready handshake. A pixel is taken on a clock edge when
  `in_valid` and `in_ready` are both high. `in_valid` may drop at any time, and the whole
  pipe waits for it.
* A frame is `WIDTH × HEIGHT` pixels in raster order. The first pixel after reset, or
  after the previous frame, starts a frame. There is no separate frame-start signal.
* Controller states:

  | state   | what happens                                                             |
  |---------|--------------------------------------------------------------------------|
  | `FILL`  | the first `WIDTH + 3` pixels enter; no output yet                        |
  | `RUN`   | one output pixel per accepted pixel                                      |
  | `FLUSH` | `in_ready` is low for `WIDTH + 2` clocks while the last line is finished |

* Throughput is one pixel per clock. A frame occupies `WIDTH·HEIGHT + WIDTH + 2` clocks.
* Latency is `WIDTH + 5` clocks from the first accepted pixel to the first output, when
  the input has no gaps. The last pixel leaves `WIDTH·HEIGHT + WIDTH + 4` clocks after
  the first one is accepted.
* `out_valid` marks each output pixel. `out_row` and `out_col` give its position, and
  `out_ptype` gives its CFA colour.
* Reset is asynchronous and active-low (`rst_n`).

## Parameters (`cfa_interp_top`)

| parameter | default | meaning                                              |
|-----------|---------|------------------------------------------------------|
| `DW`      | 8       | bits per sample                                      |
| `WIDTH`   | 640     | pixels per line (at least 4); sets line-buffer depth |
| `HEIGHT`  | 480     | lines per frame (at least 2)                         |
| `R_ROW`   | 0       | row parity of the red samples                        |
| `R_COL`   | 0       | column parity of the red samples (0,0 = RGGB)        |

The line buffer stores `2 × WIDTH × DW` bits. The rest of the design is about 310
registers.

## What comes from the source and what does not

Taken from the source article:
* the seven blocks and how they connect, including the line buffer, the output
  multiplexers and the green result feeding the red/blue interpolators;
* a 15-pixel register bank that serves all interpolators in every cycle, and the idea
  of seeing further horizontally than vertically without extra line memory;
* an edge detector with six absolute subtractors, five adders and eight inputs that
  yields DH, DV and TD;
* three green models (no edge, horizontal, vertical) chosen from TD, DH and DV, with a
  sharpening compensation;
* three red/blue models with Laplacian compensation based on the four neighbouring
  greens;
* the weight set {1/2, 1/4, 1/8, 3/8}, realised with shifts;
* three pipeline registers in the green interpolator;
* an FSM controller that keeps one pixel in and one pixel out.

This design's own choices:
* the exact equations above and the pairing of samples in the edge detector;
* the thresholds `4·DH < TD` and `4·DV < TD`;
* the 3 × 5 window shape;
* mirroring at the borders;
* the handshake, the flush, rounding and clamping;
* the Bayer phase parameters, the sizes, and the extra observation outputs (`out_row`,
  `out_col`, `out_ptype`, `out_gmode`).

The article reports 200 MHz and about 5.2 k gates in a 0.18 µm standard-cell process, and
an image-quality gain of over 1.6 dB CPSNR. None of these figures has been reproduced
here. The operator counts of the green interpolator (eight adders, one subtractor, four
multiplexers, five shifters) are not matched one for one. Because the equations are not
the published ones, image quality may differ from the article's.

## Files and simulation

`rtl/` contains one module or package per file. `cfa_pkg.sv` holds the shared enums, the
border-flag struct and the rounding helper. `cfa_interp_top.sv` is the top.

`tb/` contains a self-checking testbench for each block. `cfa_ref_pkg.sv` is a
whole-frame reference model written independently of the datapath.
* `tb_cfa_interp_top` streams four 12 × 8 frames with random input gaps. The frames are
  texture, stripes in both directions, and a full-range checkerboard. It checks every
  output pixel, the latency and the frame period. It also counts every mechanism (each
  green model, each red/blue model, stalls, flushes, border pixels, clamping).
* `tb_cfa_interp_full` runs one 640 × 480 frame at the default parameters.
* `tb_cfa_interp_phases` runs four processors side by side, one per Bayer phase.
* `tb_cfa_interp_quality` builds a 96 × 64 synthetic colour scene (ramps, a disc, fine
  stripes), mosaics it and measures colour PSNR. The processor reaches 30.3 dB against
  27.7 dB for bilinear interpolation of the same mosaic. This is a sanity check of the
  equations, not a substitute for an evaluation on natural images.

Every testbench prints `TB_RESULT checks=N failures=M`.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/cfa_pkg.sv tb/cfa_ref_pkg.sv tb/tb_cfa_interp_top.sv \
    --top-module tb_cfa_interp_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. The full-frame test runs in about a second.
