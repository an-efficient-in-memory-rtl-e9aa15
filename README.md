# Random Spray Retinex on an RRAM in-memory computing core

This is a hardware engine for **Random Spray Retinex (RSR)**, a local image-enhancement
filter that brightens dark regions without washing out bright ones. Its main idea is
that the two costly steps of RSR happen inside a crossbar of resistive memory (RRAM)
cells, not in arithmetic units:

* the **maximum** of each random "spray" of pixels, and
* the **sum of reciprocals** that the harmonic mean needs.

The repository holds synthesizable SystemVerilog for the digital part. The RRAM cells
and the source-line sense integrators are analog parts, so they are given as
behavioural models.

## The algorithm being accelerated

For each target pixel with intensity `i` (one colour channel):

1. Draw `N` sprays. Each spray is `n` random pixels from the target's neighbourhood.
   Add the target itself to each spray, which makes it an *augmented* spray.
2. Take the maximum `y_s` of each augmented spray.
3. The white reference `w` is the harmonic mean of the maxima: `1/w = (1/N) * sum_s 1/y_s`.
4. The output is `i / w`, rescaled to full scale.

The defaults are `N = 25` sprays, `n = 250` points per spray and a 256 x 256 image with
8-bit pixels. Values are stored in the cells as 4-bit (16-level) states.

## How the crossbar computes max and 1/y

**Scale-to-max by programming.** A cell holds one of 16 resistance states, and its
resistance grows with the state. A pixel level `q` reaches the cell as a staircase of
pulses: slot `j = 1..15` carries a pulse of amplitude step `j` if `j <= q`. A pulse of
step `j` switches a cell only if the cell is below state `j`. So after the staircase the
cell holds `max(old state, q)`. Send all `n + 1` points of a spray to one cell this way,
and the cell ends at the spray maximum. No comparator is involved.

**Reciprocal sum by reading.** Take the `N` cells holding one target's `N` spray maxima
(one column of the crossbar). Open all of their word lines and put the read voltage on
the bit line. The source-line current is then `V_read * sum_s G(y_s)`, where the
conductance `G = 1/R`. Resistance rises with the stored level, so the current is the
accumulation the harmonic mean needs. All columns are read at the same time.

**Device curve.** The resistance of level `L` follows a fitted exponential model of a
gradual-RESET device:

```
p    = round(21 * L / 15)                      pulse steps needed for level L
R(p) = Rmax - F * (1 - exp(a * (p - 21)))
F    = (Rmax - Rmin) / (1 - exp(-21 * a))
Rmax = 2800 ohm, Rmin = 157 ohm, a = 1.5 /V * 0.25 V per step = 0.375
```

Conductances are carried as integer codes in units of 0.1 uS:
`G_TABLE[L] = round(1e7 / R(p))`, from 63694 at level 0 down to 3571 at level 15 (see
`rsr_pkg`). The curve is very nonlinear. Levels 0 to 6 differ by only about 11% in
conductance, while the top levels differ by large factors. The sensed mean is
therefore dominated by the darkest spray maxima, even more than a plain harmonic mean
of intensities would be. This is a property of the device model, kept on purpose. To
change the curve, edit `G_TABLE` and the cell's parameters together.

**Back to a white reference.** The back end divides the integrated charge by `N * TI`
to get the mean conductance. It then picks the level whose conductance is nearest (on a
tie, the lower level); that level is `w`. Finally it rescales the **original 8-bit**
target, not its 4-bit copy:

```
out = min(255, pix * 15 / max(w, 1))      (= 255 * pix / (17 * w), saturated)
```

Using the full-precision target at this last step recovers most of the resolution
lost to the 4-bit cells.

## Sprays by shifting the image

All 256 targets of an image row are processed at once, one crossbar column each. They
share the random offsets: for spray point `(dx, dy)`, the engine reads image row
`r + dy` as one wide word and shifts it by `dx` columns. Column `c` then holds the pixel
at `(c + dx, r + dy)` for its own target. Points that fall outside the image read as 0,
which never changes a maximum, so such a point is simply dropped. Point 0 of every spray
is the target itself, with offset (0, 0).

Offsets come from a 32-bit xorshift generator (shifts 13, 17, 5). Each offset is drawn
evenly from ±256 pixels in both directions (a flat sampling profile over the whole
image). The generator is not reseeded between rows, so every row gets fresh sprays.

## Schedule and timing

The image is processed one row at a time (`rsr_controller`):

| phase   | cycles            | what happens |
|---------|-------------------|--------------|
| CLEAR   | 1                 | every cell is SET back to level 0; the spray generator restarts |
| FETCH   | 1 per point       | read image row `r + dy` |
| LOAD    | 1 per point       | shift, quantize to 4 bits, load the 256 pulse encoders |
| PULSE   | 15 per point      | staircase into word line = spray index |
| RCLR    | 1                 | clear the sense integrators |
| INTEG   | TI (4)            | parallel read, all word lines on, integrate |
| TGT     | 2                 | re-read and capture the target row |
| OUT     | W (256)           | one column per cycle into the back end |

One row takes `1 + N*(n+1)*17 + 1 + TI + 2 + W` cycles: 106,939 at the defaults. A
whole 256 x 256 image takes about 27.4 million cycles. Results leave the back end two
cycles after they are issued. A point's pulses always finish before the next point is
applied, so one batch never overlaps the next.

## Blocks

```
rsr_imc_top
├── rsr_controller        sequencer (table above)
├── spray_generator       augmented-spray offsets, spray/point counters
├── image_mem             256 rows x 256 pixels, one row per word
├── mask_shifter          row shift by dx, zero outside the image
├── pixel_quantizer  x W  8-bit -> 4-bit, nearest of 17*L
├── pulse_encoder    x W  pulse staircase per bit line
├── imc_macro_core        (behavioural: contains the analog models)
│   ├── wl_decoder        one row for writing, all rows for reading
│   ├── bl_switch_matrix  bit lines idle / to their encoders / to the read voltage
│   ├── rram_cell  x N*W  behavioural 4-bit 1T1R cell
│   └── sense_integrator x W  behavioural integrator + converter
└── average_resample      mean conductance -> w -> rescaled pixel
```

Shared types, constants and `G_TABLE` are in `rtl/rsr_pkg.sv`. Each file starts with a
comment on its function, interface and timing.

## Top-level interface

`rsr_imc_top` parameters: `W`, `H` (image size, 256 x 256), `NS` (`N`, 25), `NP` (`n`,
250), `TI` (read integration cycles, 4), `OW` (signed offset width, 9), `SEED`.

1. While idle, write the image one pixel per cycle with `img_we_i`, `img_wrow_i`,
   `img_wcol_i`, `img_wdata_i`.
2. Pulse `start_i`.
3. Collect `W*H` results in raster order from `out_valid_o`, `out_row_o`, `out_col_o`,
   `out_pix_o` and `out_w_o` (the white reference level). `done_o` pulses with the last
   pixel, and `busy_o` is high while the engine runs.

There is no back-pressure. Reset `rst_n` is asynchronous and active low. Cells and the
image store have no reset: the controller clears the cells at the start of every row.

## What follows the published architecture and what is this design's choice

Taken from the published architecture:

* the RSR algorithm, with `N = 25`, `n = 250` and a 256 x 256 evaluation image;
* 4-bit (16-level) cells;
* the 1T1R crossbar with word-line decoder and bit-line switch matrix;
* pixel levels coded by pulse count on the bit lines;
* cells that keep the greatest value they were programmed with (scale-to-max);
* the device model and its constants;
* the source-line current sum sensed by integrators, then averaging, then resampling
  with the original target pixel;
* sprays formed by shifting the image.

Chosen here, because the architecture leaves it open:

* the crossbar size (N rows by 256 columns, one column per target of an image row);
* the row-at-a-time schedule and un-pipelined fetch/load cycles;
* the amplitude staircase and its 15-slot length;
* the mapping of 16 levels onto the 21 pulse steps, and the reading of the device
  equation;
* the SET-to-level-0 clear;
* the xorshift generator, the flat ±256 profile and zero fill outside the image;
* the rounding quantizer, the nearest-level inverse mapping, saturation and the
  `w = 0` guard;
* `TI = 4`, an ideal converter, all bus widths and the pixel-write and output
  interfaces;
* a single colour channel (use one engine per channel for colour).

Not modelled:

* device variation, drift and read noise;
* the analog read voltage and the integrator bandwidth;
* the other sampling profile (`1/(1+r)^a`);
* other bit widths — the cell table is fixed at 16 levels, so the 2-, 5-, 6- and
  8-bit comparisons cannot run;
* images larger than `W x H`. The 768-pixel-wide road-scene images and 874 x 583
  colour-checker images need a larger store and `W` columns of crossbar.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. The reference models in `tb/tb_ref_pkg.sv` do not
use the RTL tables. They recompute conductances from the device equation, redraw the
same xorshift sprays and search for the nearest level themselves. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rsr_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_rsr_imc_top.sv --top-module tb_rsr_imc_top
./obj_dir/Vtb_rsr_imc_top
```

Replace `tb_rsr_imc_top` with any other testbench name.

* `tb_rsr_imc_top` runs the whole engine at 8 x 4 pixels, `N = 3`, `n = 5`, on three
  images: random, one with a bright band, and one almost black. It checks every pixel,
  every white reference, the busy time per row and the done pulse. It also confirms
  that each of these happened at least once: spray points outside the image, maxima
  left unchanged by a smaller later point, saturated outputs, and the `w = 0` guard.
* `tb_rsr_imc_full` runs the top at its default parameters on a synthetic 256 x 256
  image. By default it checks the first 3 rows; `+rows=<k>` checks more. Verilator
  simulates about one image row (≈107 k cycles with 6,400 cell models) per 16 s, so
  the whole image (`+rows=256`) takes roughly 70 minutes. The largest run made so far
  is listed under "Verification status" below.

## Verification status

All block testbenches and both end-to-end testbenches pass. The largest run is
`tb_rsr_imc_full +rows=128`: every parameter at its default, the first 128 rows (half)
of a 256 x 256 image, 32,768 pixels and white references plus the busy time, with
131,074 checks and no failures. A complete 256 x 256 image has not been simulated end
to end at the default size; the reduced end-to-end test covers complete images. Each block's testbench has
also been shown to fail on a deliberately broken copy of its block. All files pass
Verilator lint and the slang front end of Yosys.
