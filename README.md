# Hot-spot recognition with a pipelined Cellular Nonlinear Network

Infrared cameras that watch the inside of a fusion device can show a
plasma-facing surface overheating. A protection system has to decide, frame
after frame, whether a lasting, large enough hot region is present. It has
to do this within a time that is known in advance and does not grow when
the image gets busy. This RTL makes that decision in hardware. The image
processing is a Cellular Nonlinear Network (CNN): a grid of cells, one per
pixel. Each cell repeatedly updates its state from its own 3x3
neighbourhood, under a *template* of a few coefficients. A fixed sequence
of templates turns a thresholded image into one that is white only where a
real hot spot is. Every pixel costs the same arithmetic whatever the image
shows, so the processing time is a constant.

At the default size (496 x 560 pixels, 8-bit grey levels) one frame passes
through the whole chain in 917,336 cycles. At 100 MHz that is 9.2 ms, which
is enough for a 100 Hz camera.

## The processing chain

```
camera grey levels --> threshold_unit --> frame_averager --> cnn_core_array --> hotspot_detector
  (1 pixel / 3 clk)    (hot / cold,       (mean of the       (28 core rows:     (any white pixel
                        divertor limit)    last 4 frames)     5 templates)        left? -> alarm)
```

* **threshold_unit**: a pixel is hot if its grey level reaches `thr_low`.
  Inside the divertor region it must also reach `thr_high`, because the
  divertor tolerates higher temperatures. The intended limits are 500 C and
  800 C. The camera calibration that maps temperatures to grey levels is
  not part of this design, so both limits are given as grey levels. The
  divertor region is a rectangle set by four ports.
* **frame_averager**: a pixel that is hot in one frame only is a flash, not
  a hot spot. For every pixel the averager stores whether it was hot in each
  of the three previous frames (3 bits per pixel). It outputs the mean of
  the last four frames as the CNN input, counting hot as white (-1) and
  cold as black (+1). Only a pixel hot in all four frames arrives fully
  white. Frames that have not been seen since reset count as cold.
* **cnn_core_array**: runs the template program (next section).
* **hotspot_detector**: counts the white (negative) pixels of the final
  image. With the frame's last pixel it reports the count and raises
  `alarm` if at least `ALARM_MIN` (default 1) remain.

## The CNN arithmetic

Each cell state `x` lies in [-1, +1]. The state and the output are the same
value, clipped to that range. One iteration is one forward-Euler step of
the CNN state equation. With the time step h folded into the templates,
`A' = hA` (centre `h(a00 - 1)`) and `B' = hB`, the step splits into:

```
g      = sum over 3x3 of B'(k,l) * u(k,l) + z          once per template (u = input image)
x(n+1) = clip( x(n) + sum over 3x3 of A'(k,l) * x(n)(k,l) + g )
```

The input `u` is constant while a template runs, so `g` is computed once
per pixel and then travels with the pixel's state from row to row. Cells
outside the image take the value of the nearest edge cell (zero-flux
boundary).

Number formats (this design's choice; `cnn_pkg`):

| quantity | width | fraction bits | range |
|---|---|---|---|
| state x, u | 18 signed | 16 | clipped to [-1, +1] (+1.0 = 65536) |
| coefficients A', B', z | 18 signed | 12 | [-32, 32) |
| constant g | 24 signed | 16 | saturated to [-128, 128) |

Products are summed exactly. The sum is scaled back by an arithmetic right
shift of 12 bits, which rounds toward minus infinity.

## The core: one iteration over a whole frame

A `cnn_core` takes a stream of (state, g) pairs, one pixel every three
clock cycles, row by row. It emits the next iteration's states in the same
format. It has five parts:

* **cnn_memory_unit**: three shift registers, each one image line long.
  The new pixel enters the first register, whose output feeds the second,
  whose output feeds the third. The three outputs are therefore one
  column of three vertically adjacent pixels: row above, centre row, row
  below. At the top edge the first line is written into the first two
  registers at once. After two line times the window for row 0 is
  (line 0, line 0, line 1), which is the zero-flux copy. At the bottom edge
  the first register recirculates its own output for two line times,
  repeating the last line. Each register is a circular buffer (a RAM with
  one shared pointer).
* **cnn_mixer_unit**: keeps the last two columns. When the column to the
  right of a centre column arrives, it plays the 3x3 neighbourhood out as
  left, centre and right column in three consecutive cycles. At the left
  and right edges the edge column is used twice. The last pixel of a line
  is played out in the slot that brings the first column of the next line.
  The last pixel of the frame needs one extra flush slot. The centre
  pixel's g rides along with the centre column.
* **cnn_template_unit**: holds `NUM_TEMPLATES` templates of 19 coefficients
  each, loaded at run time. It presents the template column that matches
  the column the mixer is playing out: A' in iteration mode, B' in constant
  mode.
* **cnn_arithmetic_unit**: three multipliers, one per row of the column. A
  pipeline of `MULT_LAT` stages follows (18 by default; a deliberately long
  latency, so the widths can change without retiming the control). After
  it, the three column sums are accumulated. The result is one new state
  every three cycles, `MULT_LAT + 3` cycles after the cell's first column.
* **cnn_core_ctrl**: an FSM started by `start_in`. It counts 3-cycle pixel
  slots, columns and lines. It drives the memory unit's shift and input
  select, and the mixer's strobes.

A core is busy for `(H+2)*W + 1` slots per frame. Its first result appears
`6W + 8 + MULT_LAT` cycles after its first input (3002 at the defaults):

| part | cycles |
|---|---|
| two line times to fill the registers | 6W |
| one slot to receive the right-hand column | 3 |
| memory output register and mixer | 2 |
| arithmetic unit | MULT_LAT + 3 |

### The constant rows

How `g` is produced is this design's own choice. A core has a `mode` input.
In `MODE_CONST` the arithmetic unit computes `g = sum B'u + z` and passes
the state `u` through unchanged. That `u` then also serves as the
template's initial state.

## The core array: iterations as a pipeline of rows

Every iteration gets its own core. The cores are chained start to start:
a row begins as soon as the row above delivers its first result. So a
frame needs about `ROWS * 3002 + 3*W*H` cycles, instead of `ROWS * 3*W*H`
for iterations run one after another. Adding iterations barely changes the
time.

The program is fixed when the array is built (`NUM_STAGES`,
`STAGE_ITERS`). Each template gets one constant row, followed by one row
per iteration. Template `s` of the program is stored at index `s` of every
core's template unit. The default program is the hot-spot sequence:

| stage | template | iterations |
|---|---|---|
| 0 | point removal (drops pixels with fewer than two neighbours of their colour) | 1 |
| 1 | directed growing shadow (grows objects, more horizontally than vertically, merging close fragments) | 6 |
| 2 | concave filler (fills cavities so the later shrink does not split merged objects) | 4 |
| 3 | object increasing, applied to the black background (shrinks the hot regions back) | 2 |
| 4 | small object remover (discards regions that are too small) | 10 |

That is 5 + 23 = 28 core rows. Only the iteration counts are built in. The
template coefficients are run-time data: load them through `tmpl_wr_*`,
one coefficient per cycle. Addresses 0..8 hold A' row by row from the
top-left, 9..17 hold B', and 18 holds z, all h-scaled, in Q12. A "safer"
setting with 8 small-object-remover iterations (earlier alarms, more false
alarms) is `STAGE_ITERS = '{1, 6, 4, 2, 8}`.

## Interface and timing of `hotspot_top`

* `pix_valid`, `pix_sof`, `pix`: one pixel every third cycle, raster
  order, `W` per line, `H` lines. `pix_sof` flags the first pixel. The
  stream must be strictly periodic within a frame. Successive frames must
  start at least `3*((H+2)*W + 1)` cycles apart: 836,259 cycles, or
  8.4 ms at 100 MHz.
* `thr_low`, `thr_high`, `div_*`: threshold configuration, to be held
  stable.
* `tmpl_wr_en`, `tmpl_wr_sel`, `tmpl_wr_addr`, `tmpl_wr_data`: template
  load.
* `res_valid`, `res_sof`, `res_state`: the final CNN image, in the same
  stream format.
* `frame_done`, `alarm`, `hot_pixels`: the frame's verdict.
  `frame_done` comes `28 * 3002 + 3*(W*H - 1) + 3` cycles after the
  frame's first pixel.
* Reset: `rst_n`, asynchronous, active low. Templates reset to zero.

Assertions check the stream rules: no frame start while a core is busy,
and a pixel in every slot that needs one.

## Where this design departs from, or goes beyond, its description

* **One core column only.** The original architecture can split the image
  into vertical stripes processed by several core columns side by side,
  which exchange border pixels while they compute. That would multiply the
  frame rate (for example ten columns for 1 kHz). How the stripe borders
  are exchanged is not described, so it is not built.
* **No calibration table or host interface.** Limits come in as grey
  levels. Frames and templates come in through plain ports.
* **Own choices**, none of them specified by the description: the number
  formats; the rounding; the way `g` is computed (constant rows); the
  bottom-edge recirculation; the mixer's play-out order; the template
  address map; `NUM_TEMPLATES = 8`; the rectangular divertor region; the
  averaging of thresholded rather than raw frames.
* The mixer needs 8 cycles from its first input column to a complete first
  neighbourhood. The arithmetic unit needs 21 cycles. The description
  quotes about 9 and about 20.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The CNN testbenches compare every output
bit-exactly with a direct, unpipelined evaluation of the cell equation
(`tb_cnn_ref_pkg`), using edge-clamped neighbourhoods. They also check the
latencies above and the rate of one result per three cycles.

* `tb_hotspot_top` runs the whole chain at 12 x 8 pixels with a shortened
  program (1, 2, 1, 1, 2 iterations) over seven frames. The scene has a
  lasting blob, a two-frame blob, flickers and a warm divertor patch. The
  testbench compares every result pixel and every verdict with its own
  model of the chain. It requires that each mechanism occurred: the
  divertor limit deciding a pixel, partial persistence, constant rows,
  clipping, overlapped rows, and frames both with and without an alarm.
* `tb_hotspot_full` runs the same kind of scene and model at full size
  (496 x 560 pixels, 28 rows), with every parameter at its default. It
  runs five frames, so the blob persists long enough to raise the alarm.
  All 1.39 million pixel and verdict checks pass, and the first frame's
  verdict comes exactly 917,336 cycles after its first pixel. Building it
  with Verilator takes about 3 to 5 minutes; the run itself takes about
  20 seconds.

To run a testbench with Verilator, for example the core:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cnn_pkg.sv tb/tb_cnn_ref_pkg.sv \
    tb/tb_cnn_core.sv --top-module tb_cnn_core
./obj_dir/Vtb_cnn_core
```

Not covered by simulation: real camera data, and tuned template
coefficients. The testbenches use their own templates, which exercise the
arithmetic but are not the library templates of the original study.
