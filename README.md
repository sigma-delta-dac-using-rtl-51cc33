# Sigma-delta D/A converters: a single-bit FPGA DAC and a multi-bit current-steering DAC

A sigma-delta DAC trades amplitude resolution for time resolution. It runs
far faster than the signal, turns each input word into a coarse output (a
single bit, or a few bits) and feeds the rounding error back, so that the
average of the coarse output follows the input exactly and the error is
pushed to frequencies that a simple analog low-pass filter removes. Because
the loop is digital, accuracy does not depend on matched resistors or on
temperature.

This RTL holds two such converters, side by side in one top module
(`sd_dac_top`):

1. **A single-bit Delta-Sigma DAC for an FPGA** (`ds_dac`). A handful of
   flip-flops and two adders produce a pulse string on one output pin; one
   external resistor and one capacitor turn it into a voltage between 0 V
   and the I/O supply. This part is fully specified and synthesizable.
2. **A multi-bit Sigma-Delta DAC** built from an n-bit digital noise shaper
   (`noise_shaper`), a thermometer decoder with optional dynamic element
   matching (`thermo_decoder`), an array of 2^n current cells
   (`current_source_array`) and a differential current-to-voltage converter
   (`iv_converter`). The two digital blocks are synthesizable; the two
   analog blocks are behavioural models with real-valued ports, meant for
   system-level simulation of effects such as cell mismatch and opamp
   slewing.

## 1. The single-bit FPGA DAC (`ds_dac`)

### Datapath

For an input of MSBI+1 bits (8 bits by default, MSBI = 7) there are three
pieces, all MSBI+3 = 10 bits wide:

| piece          | computes                                                        |
|----------------|-----------------------------------------------------------------|
| Delta adder    | `delta = dac_in + {L[9], L[9], 0000_0000}`                      |
| Sigma adder    | `sigma = delta + L`                                             |
| Sigma latch    | `L <= sigma` on each rising clock edge                          |
| output flop    | `dac_out <= L[9]`                                               |

`L[9]`, the top bit of the latch, is the converter's decision: the output is
"all ones" or "all zeros". `{L[9], L[9], 0...0}` is `-256` in 10-bit two's
complement when `L[9]` is set and `0` otherwise, so the Delta adder forms
the difference between the unsigned input and the current output expressed
as a binary number (full scale = 256). The Sigma adder accumulates that
difference. Since one of the Delta adder's operands always has zeros where
the other has data, synthesis usually merges the two operands instead of
building a real adder.

### Why the average is exact

Write the latch as `L = 256 + q + 256*b`, with `b = L[9]` and
`0 <= q < 256`. One clock gives `L' = 256 + q + dac_in`, so the next
decision `b'` is the carry out of `q + dac_in` and `q' = (q + dac_in) mod
256`. The converter is a modulo-256 phase accumulator whose carry is the
pulse. Over any 256 consecutive clocks with a constant input the
accumulator wraps exactly `dac_in` times, so the pulse string holds exactly
`dac_in` ones. Filtered, that gives

    V_OUT = dac_in / 2^(MSBI+1) * VCCO

from 0 V for input 0 up to 255/256 of VCCO for input 0xFF. To get full
resolution each input value must be held for 2^(MSBI+1) clocks (2.56 us at
the 100 MHz of the reference setup).

### Reset and timing

`reset` is active high and asynchronous. It loads the latch with
2^(MSBI+1) (binary `01_0000_0000`), the state that belongs to input 0 and
output 0, and clears the output flop, so an input that starts at zero leaves
the output quiet. The input is sampled on the rising edge of `clk`; a change
of input shows in the latch one edge later and at `dac_out` two edges later.
From reset with full-scale input the first pulse appears at `dac_out` after
the third rising edge. The input should come from a register clocked by the
same clock when the clock is fast; that register is not part of `ds_dac`.

### Rail-to-rail option

With `RAIL_TO_RAIL = 1` the input gets one extra bit (9 bits for MSBI = 7)
while the adders and latch stay 10 bits wide. Input 256 then gives a
constant one and V_OUT = VCCO. Inputs above 256 are illegal; an assertion
in `ds_dac` reports them in simulation.

### External parts

In the reference board setup `dac_out` leaves the FPGA through an output
buffer (a 24 mA fast output primitive) and drives a 3.3 kOhm resistor into a
4.7 nF capacitor (time constant 15.5 us), whose voltage is V_OUT. Neither is
in the RTL; `tb_sd_dac_top` models the filter numerically.

## 2. The multi-bit Sigma-Delta DAC

    ns_din (k) -> noise_shaper -> (n) -> thermo_decoder -> (2^n) ->
        current_source_array -> i_p, i_n -> iv_converter -> v_outp - v_outn

Default sizes: k = 16, n = 4, 16 current cells. These are this design's
choices; the architecture is defined with symbolic widths only.

### Noise shaper (`noise_shaper`) - the heart of the converter

A loop of an adder, an n-bit truncator and an error-feedback filter:

    v  = din + F(e)                   (k+1 bits after the limiter)
    y  = v[k : k-n+1]                 top n bits, the output word
    e  = v[k-n : 0]                   the k-n+1 stripped bits, 0 <= e < 2^(k-n+1)

The filter feeds back earlier truncation errors:

| order m | F(e)                                  | noise transfer function |
|---------|---------------------------------------|-------------------------|
| 1       | `e[-1]`                               | `1 - z^-1`              |
| 2       | `2 e[-1] - e[-2]`                     | `(1 - z^-1)^2`          |
| 3       | `3 e[-1] - 3 e[-2] + e[-3]`           | `(1 - z^-1)^3`          |

Since `y * 2^(k-n+1) = v - e = din + F(e) - e`, the output equals the
input plus `(1 - z^-1)^m` applied to the truncation error: the error is
differentiated m times and ends up at high frequencies. The mean of
`y * 2^(k-n+1)` equals `din`. With k = 16 and n = 4 one output step is
2^13; a full-scale input averages y = 8, and the upper half of the 4-bit
range is headroom for the feedback.

The order is chosen at run time with the `order` input (`ns_order_e` in
`sd_dac_pkg`; 0 acts as 1). Orders 2 and 3 feed back values that can be
negative or larger than the headroom: for order 3 the feedback spans
`-3*2^13 .. 4*2^13`. The **limiter** clamps `v` to `0 .. 2^(k+1)-1` when
that happens and raises `clip` for that sample. While the limiter acts the
noise shaping is degraded; with the defaults, order 3 overloads for inputs
below about 24576 and order 2 below about 8192.

One sample is taken per clock; `dout` and `clip` are registered, one clock
of latency. Reset clears the error memory and the outputs.

### Thermometer decoder (`thermo_decoder`)

Turns the n-bit word into 2^n lines, one per current cell, with as many
lines on as the word's value. With `dem_en = 0` lines `0 .. din-1` are on.
With `dem_en = 1` (dynamic element matching by data-weighted averaging) the
lines on start at a rotating index `p` and wrap around: `p, p+1, ...,
p+din-1` modulo 2^n; then `p` advances by `din`. Successive codes use the
cells in turn, so a cell whose current is slightly off contributes its error
to all codes equally and the mismatch error is itself noise-shaped instead of
producing distortion. With a constant input every cell is used exactly
`din` times per 2^n codes. The index holds while DEM is off. The output is
registered (one clock), and an assertion checks that the number of lines on
always equals the word decoded.

### Current cell array (`current_source_array`, behavioural model)

Each cell has its own current (the `cell_current` input array, in amperes,
which stands for the cells' current initialisation), an output resistance
`R_CS`, a switch resistance `R_ON` and a node capacitance `C_CS`. A cell
whose line is 1 steers its current into `i_p`, otherwise into `i_n`; both
outputs sit at virtual ground, so a cell delivers `I * R_CS / (R_CS +
R_ON)`. Switching follows a lumped two-part scheme: when the code changes,
cells that stay on are treated as settled, and the cells just switched over
are lumped into one source that rises from zero with the time constant
`(R_CS || R_ON) * C_CS` (1 ns with the defaults). The cell currents are read
when the code changes. The model steps every `TSTEP_NS` (0.05 ns).

### Current-to-voltage converter (`iv_converter`, behavioural model)

A fully differential opamp with a feedback resistor `R_F` on each side holds
both inputs at virtual ground, so the array output does not swing with the
code, and gives

    v_outp = V_REF + 0.5 v_int,   v_outn = V_REF - 0.5 v_int,
    v_int -> (i_p - i_n) * 2 R_F

`v_int` settles with one closed-loop time constant (`TAU_NS`, 2 ns), its
rate of change is limited to `SLEW_V_PER_NS` (0.5 V/ns) and it is clipped
at `+/- V_SWING`. The opamp's internal transconductance, integrating node
and output stage are collapsed into this one pole and slew limit. With the
defaults (10 uA cells, R_F = 2.5 kOhm) each cell moves the differential
output by 50 mV, and the 16 cells span -0.8 V to +0.8 V.

## 3. Top level (`sd_dac_top`)

| port           | dir | width        | meaning                                        |
|----------------|-----|--------------|------------------------------------------------|
| `clk`          | in  | 1            | clock of both converters, rising edge          |
| `reset`        | in  | 1            | active-high asynchronous reset of both         |
| `ds_dac_in`    | in  | MSBI+1       | single-bit DAC input (MSBI+2 if rail-to-rail)  |
| `ds_dac_out`   | out | 1            | pulse string to the pad and RC filter          |
| `ns_order`     | in  | 2            | noise-shaper order (1..3)                      |
| `dem_en`       | in  | 1            | decoder DEM enable                             |
| `ns_din`       | in  | K            | multi-bit DAC input                            |
| `cell_current` | in  | real [2^N]   | current of each cell, amperes                  |
| `ns_clip`      | out | 1            | limiter acted on this sample                   |
| `thermo`       | out | 2^N          | code driving the cells                         |
| `v_outp/v_outn`| out | real         | differential analog output                     |

Parameters: `MSBI` (7), `RAIL_TO_RAIL` (0), `K` (16), `N` (4). The two
converters share only clock and reset. Because the top holds the two
behavioural models, it simulates but does not synthesize as a whole; for
an FPGA or ASIC build, use `ds_dac`, `noise_shaper` and `thermo_decoder` on
their own. `sd_dac_pkg` holds the order type and default sizes and must be
compiled first.

## 4. Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/sd_dac_pkg.sv tb/tb_sd_dac_top.sv --top-module tb_sd_dac_top
    ./obj_dir/Vtb_sd_dac_top

(replace the testbench and top name for the others; `-y rtl` lets Verilator
find each module in `rtl/<name>.sv`). All files carry `timescale 1ns/1ps`.

| testbench                 | what it checks                                                         |
|---------------------------|------------------------------------------------------------------------|
| `tb_ds_dac`               | 8-bit, 4-bit and rail-to-rail converters bit for bit against a phase-accumulator model; latency from reset; exactly `dac_in` pulses per 256 clocks |
| `tb_noise_shaper`         | every output word and limiter flag against an integer model, all orders and order switching; averages within the bound set by the noise transfer function; limiter action |
| `tb_thermo_decoder`       | every code in both modes; equal use of all cells over 2^n codes; index wrap |
| `tb_current_source_array` | settled currents, current one time constant after switching, current conservation |
| `tb_iv_converter`         | transimpedance, common mode, small-step time constant, slew-limited large step, output clipping |
| `tb_sd_dac_top`           | whole design at the default sizes: the single-bit DAC through an RC filter model (V_OUT within 10 mV of `dac_in/256 * 3.3 V`), the multi-bit chain sample by sample and on average in all orders and both decoder modes; with a 10 % mismatch between the two halves of the array, an average error of about 49 mV without DEM that DEM removes (below 5 mV); counts limiter action, DEM wraps, order and mode changes, zero and full scale |

The top-level testbench simulates 760 us (76,000 clocks at 100 MHz) and
takes a few seconds; most of that time goes into the analog models, which
step every 50 ps.

## 5. What is fixed by the architecture and what is a choice here

Taken from the architecture: the single-bit DAC's adders, widths, DeltaB
concatenation, a reset state meaning "0 in, 0 out", the rail-to-rail option
and its input limit; the
noise shaper's adder / truncator / subtractor / filter loop with widths k,
k+1, k-n+1 and n, selectable order and limiter; a 2^n-line thermometer
decoder with an optional DEM index updated by addition and modulo; a
current-cell array with the lumped settled/switching model; a differential
I/V converter with virtual ground and +/- 0.5 v_int outputs.

Choices of this design, where the architecture leaves it open:

- asynchronous reset in all blocks, and sharing clock and reset in the top;
- the single-bit latch's reset value 2^(MSBI+1), the one value for which
  input 0 keeps the latch still with the output low;
- error-feedback coefficients giving `(1 - z^-1)^m`, orders 1 to 3, the
  order as a run-time input, the limiter's clamp bounds;
- k = 16, n = 4;
- data-weighted averaging as the DEM algorithm, DEM as a run-time input,
  registered decoder output;
- all analog element values, the complementary `i_n` output of the array,
  a single-pole-plus-slew opamp model, and the sign of the output voltage;
- the current initialisation of the cells is not modelled: the top takes the
  cell currents as inputs.

How far to trust it: the three digital blocks are checked bit for bit
against independent models and their average behaviour against the
theory above, at the default sizes and a few others; they have not been
tried in hardware. The two analog models are deliberately simple (one pole
and a slew limit for the opamp, first-order settling for the cells, no
noise, no nonlinearity of the cells); they show the effect of mismatch,
DEM and slewing on the output but are no substitute for transistor-level
simulation.
