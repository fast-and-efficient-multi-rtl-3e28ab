# Falcon: an emulated-digital multi-layer CNN-UM processor array

A Cellular Neural Network (CNN) is a grid of cells. Each cell's state changes
according to a weighted sum of the states of the cells near it (the feedback
template A). It also sees the inputs of those cells (the control template B)
and a bias I. Analog CNN chips are fast, but they give only 7 to 8 bits of
precision. Software simulation is precise but slow, and slowest for
multi-layer networks whose layers have very different time constants.

This RTL describes a digital processor array that emulates such a network
with configurable precision. It is meant for FPGAs. Each processor core
updates one cell per step, with one Euler iteration per pass of the image
through the core:

    x_p(m+1)[i][j] = sum_q sum_k sum_l A'[p][q][k][l] * x_q(m)[i+k-N][j+l-N] + g_p[i][j]
    g_p[i][j]      = sum_q sum_k sum_l B'[p][q][k][l] * u_q[i+k-N][j+l-N]  + h*I_p[i][j]

The indices are:

- `p` is the output layer and `q` the input layer. There are `LAYERS` layers.
- `k` and `l` run over a (2N+1) x (2N+1) template, where N is the neighbourhood radius.
- `A' ` and `B'` are the templates with the time step h already folded in.

Cells outside the image take the value of the nearest edge cell. This is the
zero-flux boundary condition. Each new state is limited to [-1, +1], as in
the full-range CNN model.

The input part g does not change while the network runs. The same datapath
computes it once, with B' loaded as the template, before the iterations
start.

Two ideas make the core small and fast:

- **The belt.** A core never holds the whole image. It keeps only the 2N+1
  image lines around the line it is updating, plus N+1 lines of constants.
  As a result, each cell is read from outside once per iteration: one state
  and one constant go in, and one state and one constant come out.
- **Distributed arithmetic (DA).** The template multiply-accumulate uses no
  multipliers. The window is consumed bit plane by bit plane. Look-up tables
  hold pre-computed sums of template elements, and a shifting accumulator
  adds them up. How many bit planes are processed per clock sets the balance
  between area and speed: anywhere from one cell per clock down to one cell
  per SW clocks.

## Files

| file | what it is |
|---|---|
| `rtl/falcon_pkg.sv` | shared enums: `mode_e` (iterate / compute g) and `arith_e` (DA / multiplier unit) |
| `rtl/falcon_array.sv` | **top**: a ROWS x COLS grid of cores |
| `rtl/falcon_core.sv` | one processor core: controller, belt, mixer, arithmetic unit |
| `rtl/belt_memory.sv` | the belt: 2N+1 state lines and N+1 constant lines |
| `rtl/mixer.sv` | the (2N+1) x (2N+1) window register |
| `rtl/da_arith_unit.sv` | two-dimensional distributed-arithmetic FIR filter (the default arithmetic unit) |
| `rtl/da_lut.sv` | the partial-product tables of the DA unit |
| `rtl/mult_arith_unit.sv` | conventional multiplier unit (the alternative arithmetic unit) |
| `rtl/cnn_round_sat.sv` | final rounding and limiting, shared by both arithmetic units |
| `tb/falcon_ref_pkg.sv` | integer reference model of one Euler step, used by all system-level testbenches |
| `tb/tb_core_run.sv`, `tb/tb_au_run.sv`, `tb/tb_array_run.sv` | reusable harnesses around one core / one arithmetic unit / a 2 x 2 array, instantiated by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches (see *Verification*) |

## Number formats

Every value is two's complement, and each kind of value has its own width
and radix point:

| value | width | fraction bits | default | range at default |
|---|---|---|---|---|
| state x, input u | `SW` | `SFRAC` | 24 / 22 | [-2, 2); results are limited to [-1, +1] |
| constant g, h*I | `CW` | `CFRAC` | 24 / 20 | [-8, 8) |
| template A', B' | `TW` | `TFRAC_L`, one per output layer (`TFRAC` for all by default) | 24 / 20 | [-8, 8) |

The constraints are:

- `SFRAC <= SW-2`, so that +1 can be represented.
- `TFRAC >= 1` for every layer.
- `TFRAC + SFRAC >= CFRAC` for every layer.

The template radix point can be placed separately for each output layer p:
all templates A'_pq and B'_pq that feed layer p share the fraction bits in
`TFRAC_L[8*p +: 8]`. A layer with large template values then uses fewer
fraction bits, and a layer that needs fine steps uses more, at the same
`TW`. Each layer's sum is rounded with its own shift; in the formulas below,
`TFRAC` means the value of the layer being computed.

Both arithmetic units compute the template sum exactly, in units of
2^-(TFRAC+SFRAC). The constant is aligned and added. Only then is the total
rounded, once, to nearest with ties toward +infinity:

- In **MODE_ITERATE** the result is rounded to the state format and limited
  to [-1, +1]. The cell's constant is passed on unchanged.
- In **MODE_INPUT** the result is g, rounded and saturated to the constant
  format. The cell's own input value, the window centre, is passed on as the
  state.

The 24-bit defaults correspond to the 24-bit configuration that the design
is rated at. The radix positions are this design's choice.

## How a core walks the image

This is the part that takes the most care.

A core receives its image in raster order, one cell per handshake. The
image is `img_h` rows by `img_w` columns, where `img_w <= W`. The controller
runs over a grid of `(img_h+N) x (img_w+N)` *steps*. Step (r, c) does three
things:

1. **Stores input cell (r, c)**, if that cell exists, into the belt. The state
   line goes to slot `r mod (2N+1)` and the constant line to slot
   `r mod (N+1)`. The slot numbers are kept as counters, so no division is
   needed.
2. **Moves one column into the mixer.** The column holds rows r-2N .. r at
   column `min(c, img_w-1)`.
   - Rows above the image read row 0. Rows below it read the last row (its
     slot is remembered when that row is written). This gives the top and
     bottom boundaries.
   - The newest row is the one arriving in this very step. The belt passes
     the incoming value straight through, because reads are write-first.
   - At c = 0 the column is copied into every mixer position. This gives the
     left boundary.
   - Columns beyond the right edge repeat the last column. This gives the
     right boundary.
3. **Releases output cell (r-N, c-N)**, when r >= N and c >= N. The mixer now
   holds exactly that cell's window, with the boundary already applied. The
   window and the cell's constant are handed to the arithmetic unit. The
   constant is read from slot `(r-N) mod (N+1)`, which the current line
   cannot have overwritten. That is why N+1 constant lines are enough.

A step happens when three conditions hold: the core is running, the input
cell is present (if the step needs one), and the window register is free.
So input gaps and output back-pressure simply pause the schedule. The
arithmetic unit accepts a new window in the same clock that finishes the
previous one. The core therefore sustains one cell per SW/BPC clocks for the
DA unit, or one per ceil((2N+1)^2/MULTS) clocks for the multiplier unit. A pass takes about
`(img_h+N)*(img_w+N)` steps.

The belt holds `((2N+1)*SW + (N+1)*CW) * W * LAYERS` bits. At the defaults
that is `(3*24 + 2*24) * 256 = 30 kbit`.

## The distributed-arithmetic unit

Write each state as its bits, `x = -x[SW-1]*2^(SW-1) + sum_b x[b]*2^b` (in
LSB units). The template sum then splits into one sum per bit plane b:

    sum_{taps} T*x = sum_b  sign(b) * 2^b * ( sum_{taps with x[b]=1} T )

The inner sum depends only on which taps have bit b set. For each template
row (2N+1 taps, in one layer pair (p, q)), `da_lut` stores that sum for all
2^(2N+1) bit patterns. For a 3x3 template this is an 8-word table per row.
Each clock, `da_arith_unit` does the following:

- shifts the window registers (the parallel-to-serial converters) right by
  BPC bits;
- for each of the BPC current bit planes, forms one address per template row
  from the tap bits, and adds the table outputs of all rows and all input
  layers (the adder tree);
- **subtracts** the sign plane (the last plane) instead of adding it;
- weights the planes by 2^j and adds them at the top of the scaling
  accumulator, which shifts right by BPC bits every clock. The accumulator is
  wide enough to lose nothing. After SW/BPC clocks it holds the exact sum.

The speed and area trade-off depends on BPC:

- `BPC = SW` (the default) is the fully parallel filter. It has SW copies of
  the table read ports and gives one cell per clock.
- `BPC = 1` is the bit-serial filter. It needs SW clocks per cell.
- Any divisor of SW may be used. For 28-bit states, `BPC = 2` gives the
  14-clock-per-cell core used for the 3-layer retina-model configuration.

The tables are rebuilt when a template element is written. The element is
stored, and the 2^(2N+1) entries of its row are recomputed from the stored
row in the same clock. Templates therefore must not be written while a core
is busy.

For a multi-layer core, each output layer has its own accumulator. Every
output layer adds the tables of all LAYERS x LAYERS single-layer templates,
so all layers are updated together in the time a single layer would take.

## The multiplier arithmetic unit

`mult_arith_unit` is the conventional alternative, selected with
`ARITH = ARITH_MULT`. It has the same interface as the DA unit:

- Each single-layer template has `MULTS` multipliers. The default, 2N+1,
  multiplies one template row with one window row per clock. `MULTS =
  (2N+1)^2` does the whole template in one clock, and `MULTS = 1` does one
  tap per clock. Any other count from 1 to (2N+1)^2 also works: with 3
  multipliers on a 5x5 template a cell takes 9 clocks, and in the last one
  only one multiplier has a tap. Taps are taken in row-major order.
- An adder tree sums the products of all input layers, and an accumulator
  collects them.
- A cell takes ceil((2N+1)^2/MULTS) clocks: 2N+1 at the default.

Templates are held in plain registers. The rounding and the modes are those
of the DA unit.

## The processor array

`falcon_array` is a square grid of cores, 2 x 2 by default:

- **Columns** work on vertical stripes of the image. Each has its own input
  and output stream, so more columns give more I/O bandwidth.
- **Rows** are chained. The top core of a column performs one iteration and
  streams its results, with each cell's constant, straight into the core
  below, which performs the next iteration. One pass through a column is
  therefore ROWS iterations, and the output stream can be fed back for the
  next ROWS.

Every core has its own templates. They are written through one
configuration port with a `cfg_row`/`cfg_col` address. To compute g through
the array, load B' into the top row and a zero template into the rows below,
then run a pass in MODE_INPUT. The lower rows then forward g unchanged.

**Stripes do not talk to each other.** Each column applies the zero-flux
boundary at its own stripe edges. To process an image wider than one stripe,
do the following:

- Send each stripe with ROWS*N extra columns of its neighbours on every inner
  side.
- Discard the results of those columns.
- Join the stripes again.

A stripe of width `W` therefore gives `W - 2*ROWS*N` useful columns, or
`W - ROWS*N` at the image edge. `tb_falcon_array` shows this with a
508-column image on two 256-column stripes. Images wider than the array can
be processed as several passes, stripe by stripe.

## Interfaces and timing

Every core and every array column uses the same valid/ready stream in each
direction:

- Input: `in_valid`/`in_ready` with `in_state[LAYERS]` and `in_const[LAYERS]`.
- Output: `out_valid`/`out_ready` with `out_state[LAYERS]` and
  `out_const[LAYERS]`.
- A transfer happens on a rising clock edge with valid and ready both high.
- A result is held until it is taken. An assertion checks this.

Frame control:

- `start` is accepted while `busy` is low. It latches `mode`, `img_w` and
  `img_h`, which are shared by the whole array.
- `busy` falls after the last result has been taken.
- The first result of a core comes after about N lines plus N cells of
  input, plus the arithmetic latency. That latency is SW/BPC + 1 clocks for
  the DA unit and ceil((2N+1)^2/MULTS) + 1 clocks for the multiplier unit.

Template writes use `cfg_we` with `cfg_p` (output layer), `cfg_q` (input
layer), `cfg_k` (row), `cfg_l` (column) and `cfg_data`, one element per
clock, while the cores are idle.

Reset is asynchronous and active low. It clears the controllers, the
templates and the tables. The belt and the window are not reset, because
every entry is written before it is read.

A typical run:

1. Write B' (and zero templates in the lower rows).
2. Run a MODE_INPUT pass with `state = u`, `const = h*I`, and keep
   `out_const` (that is g).
3. Write A'.
4. Run MODE_ITERATE passes with `state = x(m)`, `const = g`, feeding each
   pass's output into the next.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 2, 2 | grid size (array only) |
| `N` | 1 | neighbourhood radius; templates are (2N+1) x (2N+1) |
| `LAYERS` | 1 | CNN layers per cell (3 for the multi-layer examples) |
| `SW`, `SFRAC` | 24, 22 | state width, fraction bits |
| `CW`, `CFRAC` | 24, 20 | constant width, fraction bits |
| `TW`, `TFRAC` | 24, 20 | template width, fraction bits |
| `TFRAC_L` | `TFRAC` in every field | template fraction bits per output layer, 8 bits per layer (layer p in bits 8p+7..8p) |
| `BPC` | 24 | DA bit planes per clock; must divide SW; SW/BPC clocks per cell |
| `ARITH` | `ARITH_DA` | `ARITH_DA` or `ARITH_MULT` |
| `MULTS` | 2N+1 | multipliers per single-layer template (multiplier unit), 1 to (2N+1)^2 |
| `W` | 256 | belt width: widest stripe a core accepts |
| `HW` | 16 | width of the image-height input |

## What the array can hold at its defaults

| workload | size | fits the defaults? |
|---|---|---|
| single layer, 3x3, 180 x 135 | 180 <= 256 | yes, one stripe |
| single layer, 3x3, 320 x 200 | 320 <= 2*256 - 2*2 = 508 | yes, two stripes with overlap |
| single layer, 3x3, 640 x 480 | 640 > 508 | not in one pass; two passes of stripes, or one core built with `W = 640` (as in `tb_table4`) |
| 3-layer networks | needs `LAYERS = 3` | no; set `LAYERS = 3` |
| 5x5 halftoning | needs `N = 2` | no; set `N = 2` |
| 3-layer retina model, 28-bit states, 19-bit templates | needs `LAYERS = 3, SW = 28, TW = 19` | no; parameters must change |

The image height is limited only by `HW`.

## Verification

Each testbench checks its results against values computed independently,
and ends with a `TB_RESULT checks=... failures=...` line.

| testbench | what it checks |
|---|---|
| `tb_belt_memory` | random writes and column reads against a shadow copy, including write-first reads (2 layers, small widths; the default sizes run inside `tb_falcon_array`) |
| `tb_mixer` | random shifts and fills against a shadow window (2 layers) |
| `tb_da_lut` | every table entry after random template writes (2 x 2 layer templates) |
| `tb_da_arith_unit` | random windows through 2-layer DA units with 1, 2 and 8 bit planes per clock (8, 4 and 1 clocks per cell), both modes, against direct multiply-accumulate; exact latency and back-to-back rate, then random back-pressure (harness `tb_au_run`) |
| `tb_mult_arith_unit` | the same for the multiplier unit with 1, 3, 9 and 4 multipliers (9, 3, 1 and 3 clocks per cell; with 4, one multiplier works in the last clock) |
| `tb_falcon_core` | a 3-layer core (4 clocks per cell) on random images and templates: input pass, then iterations, against `falcon_ref_pkg`; once with a steady stream (clocks per pass checked), once with random gaps and back-pressure; a third run uses the multiplier unit with 3 layers, gaps, back-pressure and 7, 5 and 3 template fraction bits for the three layers |
| `tb_falcon_array` | the whole array at its default parameters; see below |
| `tb_halftone` | the 5x5 halftoning template (h = 25/128, 8-bit templates with 7 fraction bits, B middle row taken as 0.07 0.76 0.76 0.76 0.07) on cores with 3 multipliers (9 clocks per cell, checked), with 16-bit and with 8-bit states, and with 8-bit states on a 2 x 2 array (12 x 56 image, two stripes, 50 passes of two steps); 100 iterations each, every cell checked |
| `tb_table4` | the image sizes of the single-core speed comparison, 180 x 135, 320 x 200 and 640 x 480, with one and with three layers, each on one core with 24-bit formats, a fully parallel DA unit and W = 640; every cell of the g pass and of one iteration is checked, and so are the clocks of the iteration. Measured: 24619, 64524 and 308324 clocks per iteration ((H+1)(W+1) steps plus 3 clocks of pipeline) (1.01, 1.01 and 1.00 clocks per cell), the same with three layers; at 200 MHz that is about 8120, 3100 and 649 iterations per second |
| `tb_retina` | 3 layers, 28-bit states, 19-bit templates with 15, 10 and 5 fraction bits for the three layers, DA two bit planes per clock, on a 180 x 135 image: g pass and one iteration, every cell checked, and 14 clocks per cell (344624 clocks per iteration, about 290 iterations per second at 100 MHz). The templates are random |

`tb_falcon_array` runs the array at its default parameters through `tb_array_run`:

- A 16 x 508 image goes through the input pass and two iteration passes (four
  Euler steps).
- Column 0 streams steadily, and its clocks per pass are checked.
- Column 1 has random input gaps and back-pressure.
- The testbench counts input gaps, back-pressure, limited results, both
  modes, all four image boundaries and the discarded overlap columns. It
  fails if any of them never happens.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/falcon_pkg.sv tb/falcon_ref_pkg.sv tb/tb_falcon_array.sv \
        --top-module tb_falcon_array -o sim && obj_dir/sim

Swap in another `tb_*.sv` for `tb_falcon_array.sv` and `--top-module`. The
unit testbenches do not need `falcon_ref_pkg.sv`, but including it does no
harm.

## Where this design makes its own choices

The following are decided here, not taken from a source description:

- the step schedule, the slot counters and the write-first belt reads;
- the mixer fill used for the left boundary;
- the valid/ready handshakes and the load clock of the arithmetic units;
- computing g on the same datapath (MODE_INPUT);
- rebuilding the tables when a template is written;
- rounding to nearest;
- saturating g;
- the default radix positions;
- the 2 x 2 grid;
- the overlap scheme between stripes;
- the template radix point set per output layer (all templates feeding a
  layer share it).

One measured difference from the published speed: a pass takes (H+N) x
(W+N) steps rather than H x W, because the last N lines and columns are
needed before the bottom and right edge cells can be finished. At 180 x
135 a core therefore takes 24619 clocks per iteration, about 8120
iterations per second at 200 MHz, against the 8230 (one clock per cell)
reported for this size. The gap shrinks as images grow (1.00 clocks per
cell at 640 x 480).

Some parts are not built:

- The two-line belt of a single-core 3-layer prototype. Its description
  does not say where the third line's values come from, so the general
  2N+1-line belt is used.
- The host and external memory that hold the full image and schedule the
  passes. The testbenches play this role.

The default of 2N+1 multipliers per template follows the general rule of
one template row per clock. The halftoning configuration, with three
multipliers on a 5x5 template, is reached by setting `MULTS = 3`; the
halftoning testbench does this, on single cores and, for 8-bit states, on a
2 x 2 array of four cores.
