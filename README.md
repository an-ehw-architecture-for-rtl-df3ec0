# Evolvable multiplier-less FIR filter array

This is the RTL of a small reconfigurable fabric for FIR filters. It was
meant for the control and filtering loops of a micro-machined gyroscope. The
fabric has no multipliers. A filter is a signal-flow graph of adders,
subtractors, shifters and delays, and an outside search (a genetic
algorithm) chooses that graph by trying configuration words and scoring the
result. The search is free to choose the whole graph: the number of delays,
where they sit and how partial sums are combined. The filter does not have
to be in direct or transposed form. The fabric helps the search in three
ways:

* it accepts any configuration word without misbehaving;
* it reports how often a configuration drove the arithmetic into
  saturation;
* it can take the spectrum of its input and output, so a configuration can
  be scored against a target magnitude response.

It also switches off the processing elements that a configuration does not
use, to save power.

The design has two parts:

| part | module | what it is |
|---|---|---|
| reconfigurable array | `reconfig_array` | 4 x 12 CALUs (configurable arithmetic-logic units), mux arrays, register columns, output CALU, configuration register, activity detection, saturation counter |
| spectrum unit | `fft256_r4` | radix-4, 256-point FFT with 1/256 scaling |
| top | `ehw_system` | both, with the ports a search engine drives |

The genetic algorithm is not part of this RTL. It is specified only as
software. Its side of the interface is described under
[Driving the platform](#driving-the-platform).

## The array

```
         mux array        mux array                 mux array    out mux
 x ──► col 0 ──► [6x4:1] ──► col 1 ──► ... ──► [6x4:1] ──► col 11 ──► [2x4:1] ──► A/S ──► y
       A/S              A/S                        A/S                        (1 cycle)
       L/R              L/R                        L/R
       A/S              A/S                        A/S
       L/R              L/R                        L/R
```

* **Columns.** There are twelve columns of four CALUs. From top to bottom
  each column holds an add/subtract CALU (A/S), a shift CALU (L/R), another
  A/S and another L/R. Every input of column 0 is the input sample `x`.
* **Mux arrays.** A mux array of six 4:1 multiplexers sits between column
  c-1 and column c. Each mux picks one of the four outputs of column c-1.
  Muxes 0 and 1 feed the two operands of row 0. Mux 2 feeds row 1. Muxes 3
  and 4 feed row 2. Mux 5 feeds row 3.
* **CALUs.** An A/S CALU computes `a + b` or `a - b`. An L/R CALU multiplies
  by 2, 1/2, 1/4 or 1. Each CALU's result then goes through its own delay
  chain of 0 to 3 cycles. A delay of 0 is a combinational path.
* **Register columns.** A column of six registers sits in front of columns
  5 and 10, one register per mux output. Without them, a configuration with
  all delays at 0 would be one long combinational chain.
* **Output CALU.** A single A/S CALU adds or subtracts two outputs of column
  11, chosen by two more muxes. Its delay is fixed at one cycle.

**Latency and filter length.** A new sample enters on every clock. The
shortest path from `x` to `y` takes 3 cycles: the two register columns and
the output CALU. The longest adds 3 cycles in each of the 12 columns, so
3 + 36 = 39 cycles. The array can therefore build FIR filters of up to 36
taps, whose impulse response shows up 3 to 38 cycles after the impulse.
Filters are *built*, not programmed: a tap of 0.375 might be
`x/2 - x/8`, with `x/2` from one shift CALU, `x/8` from two shift CALUs in
series (right by 2, then right by 1) and a subtractor combining them.

To read a configuration's coefficients, apply an impulse followed by 39
zeros and record `y`.

## Hybrid arithmetic: the protection bit

This is the part of the design that takes most care to understand. A
multiplier-less graph chosen by a random search can easily build gains far
above 1. Plain two's complement would then wrap around, which is the worst
possible noise. Every sample on the array's buses is therefore a 21-bit
**hybrid** word (`ehw_pkg::hyb_t`):

```
  [20]   prot   protection bit = binary exponent of 3
  [19:0] m      two's complement mantissa
  value = m * 8**prot
```

Each A/S and L/R operation first computes its result exactly. The result is
then placed as follows (`ehw_pkg::hyb_fit`):

1. **Fits in 20 bits:** it is kept as it is, with the operands' exponent.
2. **Overflows, exponent still 0:** it is shifted right arithmetically by 3
   (sign extended, the three LSBs dropped) and `prot` is set. This is a
   *rescale*, flagged on the CALU's `ovf` output. It can happen only once to
   a sample.
3. **Overflows, exponent already 3:** the mantissa is clipped to +2^19-1 or
   -2^19. This is a *saturation*, flagged on `sat` and counted.

If the two operands of an add or subtract have different exponents, the
unprotected one is first shifted right by 3. The sum can then be formed
exactly at exponent 3. Right shifts keep the exponent. A left shift
overflows and saturates just like an addition. `y_value` gives the output as
a plain 23-bit number (`m << 3*prot`).

Examples (from `tb/tb_ehw_pkg.sv`):

| operation | result |
|---|---|
| 400000 + 400000 | prot=1, m=100000 (rescaled, value 800000) |
| (prot=1, 1000) + 80 | prot=1, m=1010 (80 aligned to 10) |
| (prot=1, 500000) + (prot=1, 100000) | prot=1, m=524287 (saturated) |
| 300000 << 1 | prot=1, m=75000 |

## Configuration word

`cfg_word` is 305 bits for 12 columns (`ehw_pkg::cfg_width(NCOLS)`). It is
copied into the configuration register on a cycle with `cfg_load` high. The
fields, from MSB to LSB:

| field | bits | contents |
|---|---|---|
| `col_cfg[11] .. col_cfg[0]` | 12 x 14 | per column, from MSB: A/S row 0 `{dly[1:0], sub}`, L/R row 1 `{dly[1:0], op[1:0]}`, A/S row 2, L/R row 3 |
| `mux_cfg[11] .. mux_cfg[1]` | 11 x 12 | per column c, from MSB: selects of muxes 5..0 that feed column c (value = source row in column c-1) |
| `fin_sel[1], fin_sel[0]` | 2 x 2 | rows of column 11 feeding operands b and a of the output CALU |
| `fin_sub` | 1 | output CALU computes a - b |

L/R `op` codes: 0 no shift, 1 shift left by 1, 2 shift right by 1, 3 shift
right by 2. A/S `sub`: 0 add, 1 subtract (`a - b`). `dly` is the delay in
cycles.

Every bit pattern is legal. Loading a new word does not clear the delay
chains: samples keep streaming through while the array is reconfigured, so
`y` is settled 39 cycles after a load.

## Activity detection and clock gating

A CALU whose output cannot reach the output CALU through the selected muxes
does nothing useful. `activity_unit` finds such CALUs by working backwards
from the two output muxes, one column at a time, and drives the CALU clock
enables from the result. In an ASIC these enables would drive AND-gated
clocks. Here they are register enables, which behave the same in
simulation. `n_active` reports the number of CALUs in use, the output CALU
included.

Because only two CALUs of column 11 can reach the output, at most 47 of the
49 CALUs are ever active. Register columns and the output CALU are never
gated.

## Saturation feedback

`sat_count` counts saturation events in active CALUs, and in the output
CALU, since the last `cfg_load`. It adds one per CALU and per cycle, is 16
bits wide, and sticks at its maximum. The search uses it as a penalty:
configurations that saturate produce noisy filters. `sat_any` and `ovf_any`
show, cycle by cycle, whether any active CALU saturated or rescaled.

## Spectrum unit

`fft256_r4` is a streaming radix-4 FFT written in radix-2^2 form. It has
four stages, one per radix-4 digit. Each stage is two single-delay-feedback
radix-2 butterflies (`sdf_bf2`) followed by a complex twiddle multiplier.
The first butterfly of a stage pairs samples N/2 apart through a feedback
register of N/2 words (N = 256, 64, 16, 4 for stages 0..3). The second pairs
samples N/4 apart, and on every other pair multiplies one operand by -j.
Together the two make the radix-4 butterfly, so only the three multipliers
between stages need general twiddles. Stage s multiplies sample m of its
frame by W^(n3·(k1 + 2·k2)·256/N), where m = k1·N/2 + k2·N/4 + n3 and
W = exp(-j·2π/256).

Every butterfly halves its result, so eight butterflies give

    X[k] = (1/256) * sum_{n=0}^{255} x[n] * exp(-j*2*pi*n*k/256)

The pipeline takes one sample per clock. Its latency is 255 cycles, and the
bins come out in bit-reversed order. A 256-word buffer stores them at the
bit-reversed address, and the unit then reads them out in natural order, one
bin per clock. Twiddles are `round(cos/sin(2*pi*e/256) * 2^14)` in 16 bits,
computed at elaboration. The arithmetic truncates. The testbench checks
every bin against a floating-point DFT, to within 6 LSB plus 2e-5 of the
largest input.

Timing: the sample on the cycle of `start` is sample 0, and the next 255
cycles supply samples 1..255. Zeros then flush the pipeline for 256 cycles.
Bin 0 appears 512 cycles after `start` and bin 255 at 767. `busy` covers the
whole transform. One frame is handled at a time: a new `start` is taken only
once the previous frame's bins are out.

In `ehw_system`, `fft_src` is sampled together with `fft_start`. A 0 takes
the spectrum of `x`, a 1 that of `y_value`.

## Driving the platform

`ehw_system` leaves every decision to the search engine. One evaluation
goes like this:

1. *Coefficient scoring.* Pulse `cfg_load` with a candidate word and wait
   39 cycles. Apply one impulse followed by 39 zeros and read taps 3..38
   from `y_value`. Score the sum of squared differences to the target
   coefficients, with penalties for a wrong tap count and for `sat_count`.
2. *Spectrum scoring.* Once, take the spectrum of a test frame: 220 random
   samples then 36 zeros, so that a 36-tap response still fits in 256
   samples (`fft_src = 0`). For each candidate, load it, replay the frame
   and take the spectrum of `y` (`fft_src = 1`). Then compare
   `|F|^2 = (Yre^2 + Yim^2) / (Xre^2 + Xim^2)` with the target over bins
   0..127, with a penalty for `sat_count`.

The original search keeps 50 parents and makes 50 children per generation,
with 80% crossover and a mutation rate of 0.014% per gene. The best
candidate survives by elitism and 49 more by tournament selection. It is
not part of this RTL.

## Evolving filters in simulation

`tb/ga_pkg.sv` holds a (mu+lambda) genetic algorithm over configuration
words: 50 parents, 50 children, single-point crossover with probability
0.8, bit mutation, the best kept by elitism and the rest picked by binary
tournament. Two testbenches use it to evolve filters on the real RTL. Each
candidate is scored by simulating the array, and every output sample is
also checked against the reference model.

* `tb_ga_coef` makes two runs that score impulse responses. Together
  they take about 2 minutes in Verilator.
  * The first evolves towards the 8 lowpass coefficients -0.125 -0.129
    -0.203 -0.254 -0.207 -0.203 0.129 -0.078 for 3500 generations. The
    fitness drops from about 2.6e5 to 1.6e4. The best response starts
    -0.125 -0.063 -0.125 -0.250 -0.188 -0.188 0.063 -0.063.
  * The second evolves towards 12 highpass coefficients, 0.0098 ... 0.6328
    -0.2520 -0.2340 ... 0.0313, for 6300 generations. The fitness drops
    from about 6.3e5 to 7.1e4. The dominant taps come out as 0.625, -0.102
    and -0.332.

  Both runs get the shape of the response, but not the exact values.
* `tb_ga_spectrum` uses the spectrum unit. It evolves a lowpass for 72
  generations, with passband to 0.1 and stopband from 0.15 of the sample
  rate. The best |F|^2 found is about 1.0 at DC, 0.23 at 0.1, 0.04 at 0.2,
  0.002 at 0.3 and 0.1 at 0.4. It then evolves a highpass for 204
  generations, with stopband to 0.01 and passband from 0.1. This target
  scores only three stopband bins, so an all-pass configuration already
  comes close to the best possible score. The search settles there (|F|^2
  about 1 everywhere). A usable highpass would need a wider stopband or a
  weight on the stopband bins.

The scores depend on the random seed. These testbenches show that the
platform can be searched, and they are not a benchmark of the algorithm.

## Departures from the original description, and open points

* **Configuration size.** The original chromosome is described as 309 bits
  for 25 A/S CALUs, 24 L/R CALUs and 70 muxes. The array built here has the
  same CALUs but 68 muxes: 11 arrays of 6 plus 2 in front of the output
  CALU. That gives a 305-bit word, with 1 bit (add/subtract) for the output
  CALU, whose delay is fixed. Where the other two muxes would go is not
  known. Words from the original search cannot be loaded bit for bit.
* **First column.** An early drawing of the array shows four shift CALUs in
  the first column. The CALU counts above require the same
  A/S-L/R-A/S-L/R mix in all twelve columns, and that is what is built.
* **Register column placement.** The registers sit in front of columns 5
  and 10. This matches the stated 3-cycle minimum path; the exact position
  is this implementation's choice.
* **Clock gating** is a register enable rather than a gated clock net.
* **FFT details.** The original asks for a pipelined radix-4, 256-point FFT
  and says no more. The radix-2^2 feedback pipeline, the output reordering
  buffer, the one-frame-at-a-time control and the word widths (23-bit
  input, 25-bit internal) are this implementation's choices.
* **Not specified, chosen here:** the configuration field order and codes,
  parallel loading of the configuration word, asynchronous active-low reset,
  alignment by shifting the unprotected operand, and a sticky 16-bit
  saturation counter cleared on load.
* The reported area and power figures (0.13 um, 1.08 V, 1 MHz) are
  properties of a physical implementation and are not modelled.

## Files

| file | contents |
|---|---|
| `rtl/ehw_pkg.sv` | sample and configuration types, hybrid arithmetic functions |
| `rtl/delay_chain.sv` | 0..3 cycle programmable delay |
| `rtl/as_calu.sv`, `rtl/lr_calu.sv` | the two CALU kinds |
| `rtl/mux_array.sv`, `rtl/reg_column.sv`, `rtl/calu_column.sv` | array building blocks |
| `rtl/activity_unit.sv`, `rtl/sat_counter.sv` | clock-enable derivation, saturation count |
| `rtl/reconfig_array.sv` | the array |
| `rtl/sdf_bf2.sv` | feedback butterfly, one radix-2 step of the FFT pipeline |
| `rtl/fft256_r4.sv` | spectrum unit |
| `rtl/ehw_system.sv` | top |
| `tb/ra_model_pkg.sv` | cycle-level reference model of the array, written on integers |
| `tb/ga_pkg.sv` | a (mu+lambda) genetic algorithm over configuration words, for the search testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ehw_pkg` for the arithmetic |
| `tb/tb_ga_coef.sv`, `tb/tb_ga_spectrum.sv` | searches that evolve filters on the array |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each also has a watchdog). With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ehw_pkg.sv tb/ra_model_pkg.sv tb/tb_ehw_system.sv \
    --top-module tb_ehw_system -o sim && ./obj_dir/sim
```

Replace `tb_ehw_system` with any other testbench name. The search
testbenches also need `tb/ga_pkg.sv` on the command line, after
`tb/ra_model_pkg.sv`. `tb_ehw_system` runs
the top at its default size. It covers:

* a hand-built two-tap filter (taps 1/2 at 5 cycles and 1 at 15 cycles);
* a left-shift chain that rescales and then saturates;
* one input spectrum and six random-configuration output spectra.

Every cycle it compares `y`, `sat_count` and `n_active` with the reference
model. `tb_reconfig_array` checks the 3-cycle and 39-cycle path lengths, and
checks random configurations against the model, including reconfiguration
while data is streaming.

`NCOLS` can be reduced for experiments. The configuration width follows
from it, and register columns are placed every `REG_EVERY` columns.
