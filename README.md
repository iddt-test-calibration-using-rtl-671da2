# One-bit processing array for Iddt test calibration

Transient supply current (Iddt) measurements taken on a probe card are
distorted by the resistance of the probe contacts and the power grid, which
varies from die to die. The distortion can be undone per die by a linear
transform: a vector of measurements `T = [t0 t1 t2 t3]` is multiplied by a
calibration matrix `X` to give compensated values `C = T x X`. Doing that on
the probe card, for several measurement streams at once, needs many
multipliers in little area.

This design does the arithmetic on **one-bit streams**. A number is the
average of a stream of bits, so a multiplier is one XNOR gate and an adder is
a few gates with a one-bit memory. Small processing units of that kind are
tiled into an FPGA-like mesh (8 x 8 cells of four units each), ringed by I/O
registers that turn 8-bit numbers into streams and streams back into 8-bit
numbers. What the mesh computes is set by a serial configuration stream.
Accuracy is paid for in time: an 8-bit result takes on the order of a
thousand clock cycles.

## Stream arithmetic

Every signal inside the mesh is a one-bit **bipolar** stream: a stream whose
bits are 1 with probability `p` stands for the value `v = 2p - 1` in
`[-1, 1]`. A constant-1 stream is +1, constant-0 is -1 and an alternating
stream is 0. Negation is bit inversion.

| operation | how it is done on streams | condition |
|---|---|---|
| multiply `a*b` | `XNOR(a, b)` each cycle | `a`, `b` statistically independent |
| average `(a+b)/2` | add the two bits and a one-bit residual; send the high bit, keep the low bit | exact: output count = half the input count, to within one |
| add `sat(a+b)` | first-order sigma-delta loop: an integrator accumulates `a + b - y`, `y` is its sign | saturates at ±1 |
| divide `a/b` | loop that drives `y*b` towards `a`: integrator accumulates `a - XNOR(y,b)` | `b > 0`, saturates at ±1 |
| square `a^2` | `XNOR(a(t), a(t-1))` | successive bits independent |
| square root | loop that drives `y(t)*y(t-1)` towards `a`, with a randomised output decision so successive `y` bits are independent | `a >= 0`; less accurate near 0 |

Multiplication is the reason the streams must be **decorrelated**: XNOR of two
copies of the same stream gives +1, not `a^2`. The I/O registers therefore
generate their streams with independent pseudo-random dither (each register
has its own LFSR seed), and a squaring unit multiplies a stream by its own
previous bit.

Adding two numbers in `[-1, 1]` can leave the range, so sums of products are
formed with the averaging operation, which halves the result instead of
overflowing. A four-term dot product built as a tree of averages gives

    c0 = (t0*x00 + t1*x10 + t2*x20 + t3*x30) / 4

and the caller rescales by 4.

Precision comes from averaging over time. A stream read over `n` cycles has a
statistical error of roughly `1/sqrt(n)`; the I/O register's IIR filter with
time constant `2^k` cycles gives an 8-bit reading after one to a few thousand
cycles for `k = 8` or `9`. At the 300 MHz target clock that is a result rate
of roughly 100-300 kHz, independent of the vector length, since every term is
computed by its own unit in parallel.

## Processing unit (`processing_unit`)

Each unit has three function blocks:

* **F1 and F2** each pick one of eight candidate streams (`sel_a`), optionally
  multiply it by a second one (`sel_b`, `mul`) and optionally negate it
  (`inv`).
* **F3** combines the F1 result `p` and the F2 result `q`:

| `op` | result | covers |
|---|---|---|
| `F3_PASS` | `p` | routing, MUL, INVERT |
| `F3_AVE` | `(p+q)/2`, exact residual form | AVE, SUB (with `q` inverted), MUL-and-ADD |
| `F3_ADD` | `sat(p+q)`, sigma-delta | ADD, MUL by 2 (`p` = `q`) |
| `F3_HALF` | `p/2` (average with an internal zero stream) | DIV by 2 |
| `F3_DIV` | `sat(p/q)`, `q > 0`, feedback loop | DIV |
| `F3_SQR` | `p*p` | SQR |
| `F3_LUT2` | `lut[{p,q}]` (4 entries) | any 2-input logic, SET (`lut=4'hF`), CLEAR |
| `F3_LUT3` | `lut[{p,q,y}]`, `y` = own previous result | 3-input control logic: latches, toggles, conditional behaviour |
| `F3_SQRT` | `sqrt(p)`, feedback loop with dithered decision | SQRT |

The integrator of ADD and DIV (`ACC_W` = 6 bits, signed, saturating) is the
unit's loop filter: it absorbs the short-term error of the feedback loop so
that the output mean follows the target.

Square root needs more care. A loop that drives `y*y` towards `p` must form
`y*y` from two *independent* bits of `y`, but a sigma-delta output is a
deterministic pattern whose successive bits are strongly correlated. The
SQRT operation therefore keeps a wider integrator `sq` (`SQ_W` = 10 bits) and
sets `y = 1` when `sq` plus a pseudo-random sample from the unit's own LFSR
is non-negative, so that `y` is 1 with probability `(sq + 512)/1024`. The
integrator accumulates `p - XNOR(y(t), y(t-1))` and settles where the
stream's square equals `p`. `sq` is held at or above zero, which keeps `y`
on the positive root (a negative `p` gives 0). Each unit gets its own LFSR
seed (`SEED` parameter, set per cell by `ppa_top`).

**Timing.** F1/F2 results are registered, the F3 result is registered, and
the output is registered: any function takes **3 cycles** from a candidate
stream to the unit's output. The ADD/DIV/SQRT/LUT3 feedback closes around the F3
register only (one cycle).

The configuration word `pu_cfg_t` (28 bits, `ppa_pkg`) is, from MSB to LSB:
`f1.sel_a[2:0] f1.sel_b[2:0] f1.mul f1.inv f2.sel_a f2.sel_b f2.mul f2.inv op[3:0] lut[7:0]`.

## Cells and the mesh (`array_cell`, `ppa_top`)

A cell holds four **directional** units, N, E, S and W. Unit `d` drives the
single stream that leaves the cell towards the neighbour on side `d`. All four
units see the same eight candidates:

| index | stream |
|---|---|
| 0..3 | arriving from the N, E, S, W neighbour |
| 4..7 | the cell's own N, E, S, W unit outputs (including the unit's own output: feedback) |

So one configuration word sets both what a unit computes and where its result
goes: a unit that only passes a stream on is a routing hop with 3 cycles of
latency. Units of one cell can be chained through candidates 4..7 without
leaving the cell.

The mesh is `ROWS x COLS` (8 x 8) cells, 256 units. A cell's N input is the
S-unit output of the cell above, and so on; at the edges the links end in I/O
registers.

## I/O ring (`io_register`, `dither_gen`, `iir_filter`)

There is one I/O register on every boundary link: `2*(ROWS+COLS)` = 32 links
into the mesh and 32 out of it, 64 registers. Every register holds:

* an 8-bit value (two's complement fraction `V/128`) written by the processor;
* a **dither generator**: a 16-bit LFSR advanced eight steps per cycle; the
  stream bit is `(V + 128) > u` for the LFSR's low byte `u`, so the stream's
  mean is `V/128`;
* an **IIR filter** on the stream arriving at the register,
  `y += (x - y) / 2^k` with `x = ±1`, read by the processor as an 8-bit value;
* a source select (`io_cfg_t.mode`) for the stream it sends on: `IO_PASS`
  (arriving stream, re-timed by one cycle), `IO_DITHER` (own value),
  `IO_ZERO` (alternating) or `IO_REDITHER` (the filtered value of the
  arriving stream, dithered again: the same value, but a stream
  independent of its source, so that it can be multiplied with it).

**Clock rates.** The filter runs on the clock of the arriving stream
(`src_clk`); the 8-bit filter value is carried into the array clock by a
toggle handshake (the filter side loads a holding register and toggles a
request; the array side, after a two-flop synchroniser, copies the holding
register and returns the toggle as acknowledge). Processor reads and the
dither generator use that copy, so `IO_REDITHER` turns a stream at one clock
rate into a stream of the same value at the array's rate. In `ppa_top` the
16 pinned inbound registers take their `src_clk` from the `pin_clk` port and
all others from `clk`. `IO_PASS` samples its input with `clk`, so passing a
pin stream straight through needs `pin_clk` = `clk`.

For an inbound register the "arriving stream" is a pin or a wrap-around, and
the stream it sends enters the mesh. For an outbound register the arriving
stream is the mesh's output and the stream it sends goes to a pin or around
to the other side.

**Pins.** 16 stream inputs and 16 stream outputs:

* `in_pin[c]` feeds the north inbound register of column `c`, `in_pin[8+r]`
  the west inbound register of row `r`;
* `out_pin[c]` is the south outbound register of column `c`, `out_pin[8+r]`
  the east outbound register of row `r`.

**Wrap-around.** The remaining registers are joined across the mesh: the
north outbound register of column `c` feeds the south inbound register of the
same column, and the west outbound register of row `r` feeds the east inbound
register of that row. Because input and output pins sit on opposite sides,
two chips can be placed side by side and wired pin to pin to make a larger
mesh.

**Register numbers** (the `io_addr` space, also the order of the I/O words in
the configuration stream):

| registers | inbound | outbound |
|---|---|---|
| north, column `c` | `c` | `32 + c` |
| east, row `r` | `8 + r` | `40 + r` |
| south, column `c` | `16 + c` | `48 + c` |
| west, row `r` | `24 + r` | `56 + r` |

The processor port is synchronous to the array clock: `io_wr` writes
`io_wdata` into register `io_addr`; `io_rdata` shows that register's filter
value (its array-clock copy) combinationally.

## Configuration stream (`config_chain`)

The whole array is configured through `cfg_sdi` while `cfg_shift` is high, one
bit per clock; keep `run` low meanwhile so the mesh does not run on a half
loaded configuration. The chain is 7552 bits: 256 unit words of 28 bits, unit
`d` of cell `(r,c)` at word `(r*8 + c)*4 + d` (d: N=0, E=1, S=2, W=3),
followed by 64 I/O words of 6 bits (`mode[1:0] iir_shift[3:0]`) in register
order. Send bit 0 of the whole vector first; after 7552 shifts it sits at bit
0. `cfg_sdo` is the bit falling out of the far end, for cascading chips.
A reset clears the configuration: every unit then passes its north input and
every I/O register passes its arriving stream.

## Mapping a calibration onto the mesh

`tb/tb_ppa_top.sv` maps one output of the calibration, `c0`, like this
(x values enter on the east side and travel west along their row; t values
enter from the west):

    cell (0,0) S-unit:  p0  = t0*x0                 -> down to (1,0)
    cell (1,0) E-unit:  s01 = (t1*x1 + p0)/2        -> (1,1)
    cell (1,1) S-unit:  pass s01                    -> (2,1) -> (3,1)
    cell (2,0) S-unit:  p2  = t2*x2                 -> (3,0)
    cell (3,0) E-unit:  s23 = (t3*x3 + p2)/2        -> (3,1)
    cell (3,1) S-unit:  c0  = (s01 + s23)/2         -> down column 1 to the south edge

The multiply and the average of a pair share one unit (F1 multiplies, F2
picks the partial sum, F3 averages), so a four-term dot product takes four
arithmetic units; the rest is routing. A full 4 x 4 calibration needs four
such trees, 16 multiplying units, 20 dithered inputs (4 measurements and 16
matrix entries) and 4 outputs, against 256 units and 32 inbound and 32
outbound registers, so it fits. In this design the matrix entries live in
I/O registers and must be routed to the units that use them; that routing,
not arithmetic, is what limits how densely the mesh can be used.

## How far to trust it, and where it departs

* The overall organisation is the reference design's: F1/F2/F3 units with
  feedback and a loop filter, four directional units per cell, an 8 x 8 mesh,
  64 I/O registers with dither and IIR filters, 16 + 16 stream pins with the
  rest wrapped to the opposite side, serial configuration, 3-cycle function
  latency, 8-bit resolution. The bit-level circuits (stream code, residual
  average, sigma-delta add and divide, LFSR dither, first-order filter,
  candidate set, register numbering, configuration layout, processor port)
  are this design's own; the reference gives functions, not gates.
* The reference counts 512 processing units in its 8 x 8 test array, which
  would be eight per cell; it also describes the cell as four directional
  units. This design has four per cell, 256 in all.
* A unit here is larger than the roughly 20 gates of the reference.
* The reference's dithering is partly analog; here it is a digital LFSR. How
  its I/O registers join different clock rates is not described in detail;
  the filter-handshake-dither arrangement here is one way to do it.
* Signal quality of real silicon (supply noise, analog dither) is outside
  what RTL can show; the statistical tests below are the evidence for the
  arithmetic.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5 (package first):

    verilator --binary --timing --assert -Wno-fatal rtl/ppa_pkg.sv \
        rtl/processing_unit.sv rtl/array_cell.sv rtl/dither_gen.sv \
        rtl/iir_filter.sv rtl/io_register.sv rtl/config_chain.sv \
        rtl/ppa_top.sv tb/tb_ppa_top.sv --top-module tb_ppa_top
    ./obj_dir/Vtb_ppa_top

| testbench | what it shows |
|---|---|
| `tb_processing_unit` | every F3 operation: bit-exact routing, XNOR multiply, invert, LUT logic and a LUT3 latch with the 3-cycle latency; exact-count checks of AVE, SUB, DIV by 2; mean checks of ADD (with saturation), MUL by 2, DIV, SQR, SQRT, MUL-and-AVE |
| `tb_array_cell` | routing, multiply, chaining of a cell's own units and feedback, bit by bit |
| `tb_dither_gen` | stream density for several values, registered output, decorrelation of two generators |
| `tb_iir_filter` | output against an integer model of the recurrence, settled values |
| `tb_io_register` | the four stream sources; written value read back through the dither and filter; re-dithering keeps the value and removes the correlation; the filter side runs on its own clock (period 7 against 10) |
| `tb_config_chain` | load order, hold, serial output |
| `tb_ppa_top` | the full-size array: serial configuration of all 7552 bits, three dot products `c0` (fixed and random) checked on the output pin and through the processor port, a pin-to-pin path through the wrap-around checked bit by bit with its 10 register stages, a dithered value wrapped from the west to the east side, and a square-root and a divide unit working in the mesh |
| `tb_calibration` | a complete 4 x 4 calibration `C = T x X` on the full-size array: one random matrix, three measurement vectors, all four outputs checked on their pins and through the processor port |
| `tb_pin_clock` | the full-size array with `pin_clk` apart from `clk` (periods 13 and 7 against 10): two pin streams re-dithered by their inbound registers, passed across the mesh and checked on the output pins and through the processor port |

`tb_ppa_top` takes under a minute to build and a second to run. It ties
`pin_clk` to `clk`; `tb_pin_clock` runs them apart.

## Files

`rtl/ppa_pkg.sv` holds the shared types (`pu_cfg_t`, `io_cfg_t`, operation and
mode encodings) and helper functions `fsel()` and `pu_cfg()` for building
configuration words. The other files in `rtl/` are one module each, from
`processing_unit` up to `ppa_top`.
