# Adaptive-clock sigma-delta ADC front end for ECG

An ECG spends most of its time on a slow, low-amplitude baseline. The signal changes quickly
only in short stretches, mainly the QRS complex. This front end therefore adapts the
sampling clock of its sigma-delta ADC to the signal: a small neuro-fuzzy controller (ANFIS)
looks at each converted sample and picks one of three clocks:

| clock | frequency | relative rate |
|-------|-----------|---------------|
| HCLK  | 400 MHz   | 1             |
| MCLK  | 285 MHz   | 285/400       |
| LCLK  | 222 MHz   | 222/400       |

The controller's inputs are the sample's amplitude and its slope. An interpolation stage
then puts the variable-rate samples back on one uniform grid at the highest rate, as 16-bit
words.

This is synthesizable SystemVerilog (IEEE 1800-2017) for the digital part of that system. It
follows a published system-on-chip design of the same name: "SoC based sigma delta ADC using
ANFIS algorithm for ECG signal processing systems". That publication gives the block set,
the rule table, the clock frequencies and the word widths, but no RTL. Where it is silent,
the choices here are this design's own, and they are listed in
[Departures and own choices](#departures-and-own-choices).

## Signal and clock paths

```
              x_i (ECG level, 14 bit)
                   |
                   v
   +---------------------------------+  adc_sample / adc_valid   +-------------------+
   | sd_adc                          |-------------------------->| interp_filter     |--> out_sample (16 bit)
   |  sd_modulator -> decimation_    |            |              | linear, HCLK grid |    out_valid
   |                  filter         |            v              +-------------------+
   +---------------------------------+   +------------------+
                   ^                     | anfis_controller |
                   | samp_en             |  F, G -> 5 layers|
                   | (adaptive clock)    +------------------+
                   |                              | sel (LCLK/MCLK/HCLK)
            +-------------+                       |
            |  clk_mux4   |<----------------------+
            +-------------+
             ^    ^    ^  ^
        HCLK |    |    |  +-- spare input (HCLK)
             |  MCLK  LCLK
             |    ^    ^
   clk = HCLK|    |    |
   ----------+-> clk_downsample 285/400 --> clk_downsample 222/285
```

Everything runs in one clock domain: `clk` is HCLK, which a PLL outside this RTL supplies.
MCLK, LCLK and the ADC's adaptive sampling clock are **clock enables** of that domain, not
separate clocks. "The ADC runs on MCLK" means that its modulator advances on the clocks where
the MCLK enable is high: 285 of every 400 HCLK cycles.

A conversion, end to end:

1. The modulator turns the ECG level into a bit stream, one bit per sampling tick.
2. The decimation filter averages 2^14 ticks into one 14-bit sample. A sample therefore
   takes 16384 clocks on HCLK, about 23000 on MCLK and about 29500 on LCLK.
3. The controller takes about 760 clocks to choose the clock for the following windows.
4. The multiplexer switches to that clock at the next tick of the new clock.
5. The interpolator draws a straight line from the previous sample to the new one. From
   that line it emits one 16-bit output every 16384 clocks, whatever clock the ADC is on.

## The clock decision (`anfis_controller`)

This is the least obvious part of the design. For each ADC sample p(n) it computes two
features:

* F = |p(n)|, the amplitude;
* G = |p(n) − p(n−1)|, the slope from one sample to the next.

It then evaluates a zero-order Sugeno fuzzy network with five layers:

1. **Fuzzification.** Each feature gets five membership grades, for the terms very low,
   low, medium, high and very high. Each grade is a bell curve,
   μ(x) = 1 / (1 + ((x − c)/a)²), computed as a² / (a² + (x − c)²) by a divider. The centres
   c are evenly spaced, and the width a is half the spacing, so that neighbouring curves
   cross at 0.5:
   * F: centres 0, 2048, 4096, 6144, 8192; a = 1024.
   * G: centres 0, 4, 8, 12, 16 LSB per sample; a = 2.

   A feature above its very-high centre is fuzzified as that centre.
2. **Firing strength.** Each of the 25 rules fires with strength w = μF · μG (product
   T-norm).
3. **Normalisation**, 4. **consequents** and 5. **sum.** These three layers are computed
   together as the single quotient y = Σ w·k / Σ w. Each rule's consequent k is 0 for LCLK,
   1 for MCLK and 2 for HCLK. The clock whose k is nearest to y is chosen: LCLK if y < 0.5,
   MCLK if y < 1.5, otherwise HCLK.

The rule table (rows: amplitude F; columns: slope G):

| F \ G     | very low | low  | medium | high | very high |
|-----------|----------|------|--------|------|-----------|
| very low  | HCLK     | LCLK | LCLK   | LCLK | HCLK      |
| low       | HCLK     | LCLK | LCLK   | LCLK | HCLK      |
| medium    | HCLK     | MCLK | MCLK   | MCLK | HCLK      |
| high      | HCLK     | HCLK | HCLK   | HCLK | HCLK      |
| very high | HCLK     | HCLK | HCLK   | HCLK | HCLK      |

The "very low slope" column also selects HCLK. A perfectly flat input therefore runs at
the full rate. The bell curve with exponent 2 has long tails, so even a slope between "very
low" and "low" gives that column a sizeable weight. In the synthetic-ECG run
(`tb_ecg_workload`), the quiet baseline ended up mostly on MCLK and the QRS complexes on HCLK.
The run used 60 % of the ADC power of an always-HCLK run, weighting the clocks by the power
figures quoted for them: 5.4, 3.08 and 1.4 for HCLK, MCLK and LCLK. How much time goes to LCLK
depends strongly on the G scale. That scale is a parameter of this design, not of the source,
and is the first thing to retune for real data (`G_CENTRE`, `G_WIDTH` in `ecg_soc_pkg`).

**Hardware.** There is one subtract-and-square path and one 64-bit sequential divider
(`udiv_seq`, one quotient bit per clock). The divider is shared by the ten membership grades
and the final quotient. One multiplier fires one rule per clock.

**Fixed point.**
* Grades: Q0.24.
* Firing strengths: kept whole, Q0.48. This keeps the far tails of the bell curves accurate;
  a Q0.16 version misjudged them.
* y: Q.8.

**Latency.** A decision takes 11 × 66 + 31 = 757 clocks. That is about 5 % of the shortest
ADC sample interval, so the controller is idle most of the time. It drops any sample that
arrives while it is busy; with these sizes that cannot happen.

`sel_o` is HCLK after reset. If every firing strength rounds to zero, the controller picks
HCLK.

## The sigma-delta ADC (`sd_modulator`, `decimation_filter`, `sd_adc`)

**Modulator.** This is a digital model of a first-order loop. On each sampling tick:
* the delta adder forms x − DAC;
* the sigma adder (the integrator) accumulates that difference;
* the comparator outputs 1 when the integrator is ≥ 0;
* the 1-bit DAC feeds back +2^13 for a 1 and −2^13 for a 0.

The input `x_i` is the 14-bit value of the analogue ECG level. The integrator is 16 bits
wide and stays within ±2^14.

**Decimation filter.** This is a sinc1 (accumulate-and-dump) filter. It counts the ones
over a window of 2^`R_LOG2` sampling ticks and rescales the count to a signed 14-bit sample:
`count · 2^14 / R − 2^13`, saturated at +8191. With R = 2^14, a constant input is
reproduced to within ±2 LSB. The window is counted in sampling ticks, not in clocks, so a
clock switch changes how long a window lasts but never how its result is scaled.
`valid_o` pulses on the clock after the last tick of a window.

## Deriving MCLK and LCLK (`clk_downsample`)

Each stage is a phase accumulator. Every input tick adds NUM to the phase. When the phase
reaches DEN, it wraps back by DEN and the output ticks in that same clock. The output
therefore fires exactly NUM times in every DEN input ticks, spaced as evenly as possible; at
285/400 it never skips two input ticks in a row.

The stages are chained: HCLK → MCLK with NUM/DEN = 285/400, then MCLK → LCLK with
222/285. `en_o` is combinational from the registered phase, so a chained stage adds no
latency.

## Clock multiplexer (`clk_mux4`)

This is a 4-to-1 multiplexer with two select lines. The select codes are:
* 0: LCLK
* 1: MCLK
* 2: HCLK
* 3: spare; the top feeds this input with HCLK.

The select is registered. A new select takes effect only on a clock where the newly chosen
clock ticks, so the new clock starts in step with its own tick pattern. The output is the
ADC's sampling enable.

## Interpolation to 16 bits (`interp_filter`)

When ADC sample x(n) arrives, the filter measures the interval T since x(n−1), in clocks.
A division gives the step (x(n) − x(n−1)) / T with 16 fraction bits. An accumulator then
ramps from x(n−1) by that step every clock and stops at x(n).

The filter samples the accumulator every 2^`OUT_LOG2` clocks, which is the ADC's sample
spacing on HCLK. Each output is a Q14.2 word, 16 bits. The output trails the input by about
one input interval plus one division (33 clocks).

If a new sample arrives before the current ramp has finished, the old ramp keeps heading
for its own end point while the division runs. The new ramp then starts from x(n−1).

The rate change made by the controller reaches the interpolator only through the sample
spacing it measures. The filter does not read the select itself.

## Assertions

Concurrent assertions check the internal rules that the testbenches cannot see directly:
* a derived clock tick is always a tick of its input clock;
* the controller never produces the spare select;
* the divider and the controller raise `done` only when idle;
* an interpolation ramp never passes its end point.

Run with `--assert` to enable them.

## Timing summary (defaults)

| quantity | value |
|---|---|
| ADC sample spacing | 16384 clocks (HCLK), 22995 ± 1 (MCLK), 29521 ± 1 (LCLK) |
| ADC sample rate at HCLK = 400 MHz | 24.4 k samples/s; 13.5 k samples/s on LCLK |
| Controller decision | 757 clocks after `adc_valid` |
| Clock switch | at the first tick of the new clock after the decision |
| Refined output | every 16384 clocks, Q14.2 |

## Departures and own choices

Taken from the source design:
* the block set and its wiring;
* the 14-bit ADC built from a delta adder, a sigma adder and a 1-bit DAC;
* the two features and the five ANFIS layers;
* the bell membership function and the product rule;
* the 5 × 5 rule table;
* the three clock frequencies and the two cascaded down-sampling stages;
* the 4-to-1 clock multiplexer;
* the 16-bit output resolution.

Choices made here:

* **One clock domain with enables.** The source derives MCLK and LCLK with anti-aliasing and
  decimation filters applied to the clock. Here they are exact-rate enables of HCLK.
* **Modulator and decimation filter.** The loop is first order, the filter is sinc1, and the
  decimation ratio is 2^14.
* **Network size.** The network has five membership functions per input (25 rules), which
  matches the rule table. A generic three-function example of the same network has nine
  rules; it is not used.
* **Controller constants.** The membership centres and widths, the feature saturation, the
  consequent values 0/1/2 with nearest-value selection, the fixed-point formats and the
  sequential schedule are all this design's.
* **Fourth multiplexer input and switching.** The spare input carries HCLK, and the
  multiplexer switches on a tick of the new clock.
* **Interpolation.** It is linear. It takes the ADC samples as its data input and follows the
  controller's choice through the measured spacing. The up-sampling and interpolation steps
  are one module.
* **Reset values.** All state resets to zero, and the clock select resets to HCLK.

Not built:
* the PLL (analogue; HCLK is the `clk` input);
* a "pulse generator" that the source only names;
* the analogue ECG front end. The ADC input is the 14-bit value of the ECG level.

The physical results quoted for the original chip (90 nm, 121613 µm², 15 mW, 300–400 MHz)
are not properties of this RTL.

## Files

`rtl/`:
* `ecg_soc_pkg.sv`: widths, select encoding, clock ratios, rule table and membership
  constants.
* `ecg_soc_top.sv`: the system.
* `sd_adc.sv`, `sd_modulator.sv`, `decimation_filter.sv`: the ADC.
* `anfis_controller.sv`: the clock decision.
* `udiv_seq.sv`: the shared divider.
* `clk_downsample.sv`, `clk_mux4.sv`: the clock path.
* `interp_filter.sv`: the interpolator.

`tb/`: one self-checking testbench per module, plus:
* `tb_ecg_soc_top`: the whole system at default sizes, on scripted levels that drive it onto
  each clock. It checks ADC accuracy, every decision against a floating-point ANFIS model,
  the sample spacing on each clock, the output grid, and that clock switches in both
  directions and interpolated outputs occur.
* `tb_ecg_workload`: the whole system on 1000 samples of a synthetic PQRST ECG. The record's
  timing is compressed so that each ECG sample is held for one ADC window. It reports time
  per clock and relative power.

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a cycle watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ecg_soc_top \
    -y rtl -y tb +libext+.sv rtl/ecg_soc_pkg.sv tb/tb_ecg_soc_top.sv -o sim
./obj_dir/sim
```

Replace `tb_ecg_soc_top` by any other testbench name. All of them finish in seconds.
`tb_ecg_workload` simulates about 20 million clocks and takes about 15 s. Lint with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/ecg_soc_pkg.sv rtl/ecg_soc_top.sv`.

## Changing it

* `R_LOG2` on `ecg_soc_top` sets the decimation window and the output grid together. Smaller
  values give faster simulation and lower resolution: each step below 14 costs one bit of
  effective resolution.
* The controller's behaviour is set entirely by `F_CENTRE`, `F_WIDTH`, `G_CENTRE`, `G_WIDTH`,
  `RULES` and the thresholds `Y_THR_LM` / `Y_THR_MH` in `ecg_soc_pkg`. `tb_anfis_controller`
  and the two system testbenches read the same constants, so they follow any change.
* The clock ratios come from `HCLK_MHZ`, `MCLK_MHZ` and `LCLK_MHZ`.
