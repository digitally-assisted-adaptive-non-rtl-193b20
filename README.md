# Digitally assisted IM3 suppression for a tunable channel-select filter

A receiver's analog channel-select filter (CSF) is often what limits its
linearity. Strong signals outside the channel (the own transmitter's leakage
in an FDD radio, nearby blockers) mix in the filter's third-order
non-linearity, and some of the products land inside the channel. Those
products cannot be filtered out afterwards.

Some analog stages can be made linear by choosing the right bias: at one
operating point their third-order terms cancel. That point moves with
process, voltage and temperature. This design finds it on chip. A small
digital loop watches the filter, measures how much third-order
intermodulation (IM3) its output holds, and moves the bias until that
measurement is at a minimum. Then the loop switches itself off. The loop
costs power only while it calibrates. It does not run all the time the way
a digital IM-cancellation path does.

The RTL is written in SystemVerilog (IEEE 1800-2017) and is synthesizable.
The analog parts are the CSF itself, the main ADC and the 6-bit auxiliary
ADC. They are not included. Their digital signals are ports of the top
module `nls_top`.

## How the loop measures intermodulation

```
            +---------- tunable CSF (analog) ----------+
 x(t) ------+                                          +--> main ADC --> /N --> y(n) -----> baseband
            |                                          ^                          |
            |                                        bias                       (top 10 bits)
            v                                          |                          v
        aux ADC (6 b) --+--> /M ---- x(n) --> NLMS filter (9 taps) -- z(n) --> (-) --> e(n)
                        |                                   ^                          |
                        +--> ( )^3 --> /M -- k(n) ----------|------> correlator <------+
                                                            |            |
                                                            +--- e(n)    +--> bias tuner --> bias
```

The idea is to split the CSF output into a part that a linear filter can
explain and a part that it cannot:

1. The auxiliary ADC samples the CSF **input**, including the out-of-band
   blockers. The signal is decimated to the baseband rate and fed to an
   adaptive FIR filter. The filter learns to predict the decimated CSF
   output `y(n)`.
2. The filter is linear. It can reproduce everything in `y(n)` that is a
   linear function of the input, but not the IM3 the CSF added. So the
   prediction error `e(n) = y(n) - z(n)` holds mostly that IM3.
3. The cubing unit raises the auxiliary samples to the third power. This
   regenerates the IM3 products of the input, `k(n)`, digitally.
4. The sum of `e(n)·k(n)` over one OFDM symbol measures how much of the
   error is IM3. Its sign follows the sign of the distortion, and it passes
   through zero when the filter is linear.
5. Once per symbol the bias tuner moves the bias code to make the magnitude
   of that correlation smaller.

Two points matter when you read or change the code.

- **The error must stay free of IM3 compensation.** The NLMS filter only
  sees linear, decimated samples `x(n)`, so it cannot cancel the IM3 in
  `y(n)`. If you feed it anything non-linear, the measurement breaks.
- **k(n) and e(n) must describe the same converter samples.** All three
  decimators take the same sample strobe. The two auxiliary decimators are
  held cleared while the loop is off. They are released on the cycle on
  which the main decimator delivers an output, so they start at the same
  phase. `k(n)` has one extra register to meet `e(n)`, which comes out of
  the NLMS filter one cycle later.

## Rates and symbol timing

Everything runs on one clock at the converter rate. This design assumes
245.76 MHz, which is 8 × the 30.72 MHz LTE baseband rate. `adc_valid`
marks a sample pair. All three decimators divide by `OSR = 8`, so one
baseband sample leaves them for every eight converter samples.

The correlator counts baseband samples in symbols of 2048. The first 48
samples of every symbol are skipped, which gives the NLMS filter time to
settle after the bias has moved. The next 2000 samples are correlated.
`corr_valid` pulses once per symbol, every 2048 × 8 = 16384 clock cycles
(66.7 µs). The bias changes on the following clock edge. So the CSF gets
one adjustment per OFDM symbol. In the testbenches a calibration from
mid-scale takes 13 to 22 symbols (about 1 to 1.5 ms). Starting closer to the
optimum, or with a smaller first step, shortens it. A recalibration after a
small drift is a natural case for that.

## The blocks

| file | does | timing |
|---|---|---|
| `nls_pkg.sv` | shared widths, rates, tuner state type | – |
| `cube_unit.sv` | `in³`, rounded to its 6 MSBs and saturated | 1 cycle |
| `decimator.sv` | integrate-and-dump: sum of `RATIO` samples, full precision | output 1 cycle after the last input |
| `nlms_filter.sv` | 9-tap FIR, normalized LMS update, `z` and `e` | 1 cycle, one sample per strobe |
| `correlator.sv` | Σ e·k over samples 48..2047 of each 2048-sample symbol, 16-bit operands | result 1 cycle after the last sample |
| `bias_tuner.sv` | step-halving search on \|corr\|, power-down when done | bias moves 1 cycle after `corr_valid` |
| `nls_top.sv` | wiring, input registers, alignment, power gating | – |

### NLMS filter

For the sample vector `X(n) = [x(n) … x(n-8)]`:

```
z(n)   = g · X(n)                                   rounded, saturated to 10 bits
e(n)   = y(n) - z(n)                                11 bits
g(n+1) = g(n) + mu · e(n) · X(n) / (EPS + X(n)·X(n))
```

The coefficients have 10 bits with 7 fraction bits, so they range over
±4 in steps of 1/128. They saturate. `mu = 2^-MU_SHIFT = 0.5`, a fast
setting chosen so that the filter settles within the 48-sample margin.
`EPS = 16` keeps the division defined when the input is zero.

The normalization is a single exact division per sample,
`mu·e·2^(7+16) / (EPS + X·X)`. Each tap's increment is that quotient times
its own `x`, with the 16 guard bits rounded off. The whole update happens
in one clock cycle. At 245.76 MHz there are eight clocks per baseband
sample, so a physical implementation would constrain it as an 8-cycle
multicycle path, or share one multiplier sequentially. This RTL does
neither.

The error is defined as `y - z`, so that *adding* the update reduces the
error. With the opposite sign the coefficients run away.

### Decimators

Each decimator is a boxcar sum of 8 samples (a first-order CIC filter). It
keeps full precision. `x(n)` and `k(n)` are 9 bits and `y(n)` is 15 bits.
The NLMS filter and the error use the top 10 bits of `y(n)`. A boxcar is
the simplest decimation filter there is, and it is a choice of this
design. It lets out-of-band energy alias into the baseband more than a
proper multi-stage decimator would. This is harmless for the measurement,
because the same boxcar is applied to both the linear and the cubed
auxiliary samples. It does matter for `y` as a receiver output: a real
receiver's main path needs a better filter.

### Bias tuner

The correlation magnitude has a V shape around the linear bias point. The
tuner starts at the present code (mid-scale, 128, after reset) with a step
of 16 codes and moves upward. It keeps its direction while |corr| falls.
When |corr| rises, it reverses direction and halves the step. If the step
is already at its minimum of 1 code when |corr| rises, the tuner moves back
to the last better point and stops. It also stops after 64 symbols. When it
stops, `calib_done` goes high and `aux_pd` tells the auxiliary ADC it may
power down. Inside the design all auxiliary-path strobes are gated, and the
decimators, NLMS filter and correlator are held cleared. A new
`calib_start` pulse restarts the search from the current bias code, for
example after a temperature change.

The signed correlation would also tell the direction directly. The search
uses only the magnitude, so it works whatever the sign convention of the
bias DAC.

## Top-level interface (`nls_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | converter clock; synchronous active-low reset |
| `adc_valid` | in | 1 | a main/auxiliary sample pair is present (normally every cycle) |
| `main_adc` | in | 12 | main ADC sample of the CSF output, signed |
| `aux_adc` | in | 6 | auxiliary ADC sample of the CSF input, signed |
| `calib_start` | in | 1 | pulse: start a calibration |
| `y_valid`, `y` | out | 1, 15 | decimated main-path sample at 30.72 MS/s |
| `bias` | out | 8 | CSF bias DAC code |
| `aux_pd` | out | 1 | auxiliary ADC and path may be powered down |
| `calib_done` | out | 1 | last calibration has finished |
| `corr_valid`, `corr` | out | 1, 43 | per-symbol correlation, for monitoring |

After reset the bias is 128 and the auxiliary path is off. The main path
runs all the time. A calibration never interrupts `y`.

## Configuration and what it is based on

These values are the published configuration of the auxiliary path: a
6-bit auxiliary ADC, a 9-tap NLMS filter with 10-bit coefficients and
10-bit output, a 6-bit cubing unit, 16-bit correlator multipliers, an
oversampling ratio of 8, 2048-sample symbols with 2000 correlated samples
and a 48-sample settling margin. They were found by fixed-point
simulation. Filters as short as 9 taps and ADCs of 6 bits were still able
to detect low distortion levels. `TAPS` and `AUX_W` are parameters of
`nls_top` if you want to explore around them.

These are choices of this design, not part of that configuration:

- the single 245.76 MHz clock;
- the auxiliary ADC sampling at the main ADC rate (`M = N = 8`);
- the 12-bit main ADC and the 8-bit bias code;
- reading "6-bit cubing unit" as the width of the cube's *output*;
- the boxcar decimators;
- the NLMS step size, fraction bits and `EPS`;
- placing the 48-sample margin at the start of each symbol;
- the whole bias search rule. The published scheme only says that the
  correlation is used iteratively to tune towards linearity, and then the
  auxiliary path is powered down.

Further departures and limits:

- A single bias is tuned. A filter with several bias knobs (several
  non-linear stages) would need one search per knob, or a coordinate search
  over them.
- Only the 3rd order is built. Higher orders would add a `()^5` unit and a
  decimator in parallel with the cubing branch, plus their own
  correlations.
- The correlator outputs the raw sum. A normalized correlation coefficient
  would need a second accumulator and a divider, and the tuner does not
  need it.
- The NLMS update has the single-cycle depth described above.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_cube_unit` | all 64 inputs against an integer cube; latency; hold |
| `tb_decimator` | random data with gaps against a reference sum; `sync_clr` |
| `tb_nlms_filter` | bit-exact against an integer model of the update; identification of an unknown 9-tap system (coefficients within 3 LSB); freeze, saturation, clear |
| `tb_correlator` | default timing against a reference sum, result exactly one cycle after the symbol; restart; operand saturation in a small instance |
| `tb_bias_tuner` | convergence to within one code for several optima; clamping; 64-symbol limit; power-down; bias moves only after a result |
| `tb_nls_top` | the whole design at default parameters: a two-tone signal (2.91 and 7.5 MHz) with blockers at 20.01 and 38.01 MHz through a real-valued CSF model (`tb/csf_frontend_model.sv`) `y = L4(x) + a·L2(x³)`, `a ∝ (bias − OPT)`; calibration to OPT = 90, then recalibration after OPT drifts to 170 |
| `tb_nls_sweep` | six copies of the design side by side: 3, 15 and 21 NLMS taps, and 4, 5 and 8-bit auxiliary ADCs; all calibrate, and all but the 3-tap copy end within 2 codes of the optimum (3 taps: 10 codes off) |
| `tb_nls_ofdm` | the whole design with a 600-subcarrier random-QPSK OFDM signal (15 kHz spacing, up to 9 MHz) and blockers at 20 and 38 MHz |

The two end-to-end testbenches also check several other things:

- the main output `y` against an independent sum of the ADC samples;
- exactly one correlation per 16384 clock cycles;
- bias changes only at symbol boundaries;
- no auxiliary activity while the path is powered down;
- the correlation magnitude falls at least 4×;
- the final bias lands within 12 codes of the model's optimum.

In these runs the final bias was within 2 codes of the optimum,
after 18 to 22 symbols. Each testbench also counts the mechanisms it
exercised: cubing, decimation, NLMS updates, symbols, steps both ways,
reversals, step halvings and power-downs. A mechanism that never occurred
counts as a failure.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/nls_pkg.sv tb/tb_nls_top.sv --top-module tb_nls_top
./obj_dir/Vtb_nls_top
```

The end-to-end runs take about a second each.

How far to trust this: the digital blocks are checked bit-exactly against
independent models. The loop converges on a behavioural filter model that
follows the published form of the distortion. How well it converges on
real silicon depends on the analog filter's actual non-linearity, and the
RTL cannot show that.
