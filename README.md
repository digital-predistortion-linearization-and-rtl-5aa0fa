# Wideband transmitter linearization: SRPC crest factor reduction and piecewise pre-equalized LUT predistortion

A power amplifier driving a multi-carrier WCDMA signal must be efficient and linear. Those two
goals conflict. The signal's peaks sit 9 to 10 dB above its average power, so the amplifier must
be backed off. The amplifier also compresses and has memory: its output depends on the signal
envelope it has seen over the last few samples. This RTL implements the digital half of a
transmitter that tackles both problems in two steps:

1. **Crest factor reduction (CFR)** by *scaled repeated peak cancellation* (SRPC). Peaks above a
   threshold are cut out by subtracting band-limited cancellation pulses. The pulses are scaled
   up so that a few iterations are enough.
2. **Digital predistortion (PD)** with a *piecewise pre-equalized lookup table*. A complex gain
   table indexed by the input magnitude undoes the amplifier's AM/AM and AM/PM distortion. A
   short FIR filter whose taps are also chosen by the input magnitude follows it, and undoes the
   envelope-dependent memory.

Two further blocks sit beside this chain:

- A **baseband-derived RF predistorter**. It sends the predistortion function to an RF vector
  modulator instead of predistorting the samples. It has its own ports.
- A **delay correlator**. It measures the loop delay between the transmitted samples and the
  feedback samples. Coefficient training needs that delay, and so does the path alignment of the
  RF predistorter.

Coefficient training (indirect learning) runs on a host computer. The converters, modulators,
amplifier and analyser are analog equipment. All of these are outside the RTL, and their signals
are ports of the top level.

## Signal flow

```
                 host writes: taps, carrier words, thresholds, alphas, LUT, EQ taps
                                         |
 sample_playback --> srpc_cfr (3 x srpc_stage) --> pwpe_lut_pd --> round 14b --> dac_i/dac_q
   (8192 words,         clip -> shape -> scale -> subtract   |                      |
    cyclic)                                                 pd_z                 (PA, analog)
                                                             |                      |
                                delay_correlator <-- ref ----+      adc_i/adc_q <---+
                                  (lag, peak)    <-- fb (12b ADC words)

 rf_u --> bbrf_pd: main path  delay_line -> lagrange_frac_delay -> 14b main DAC
                   coef path  |u| -> index -> LUT -> delay_line -> two 8b DACs (vector modulator)
```

The main chain advances one sample per clock while the playback runs. `play_valid` is the sample
enable (`ce`) of every register in the chain, so the pipeline freezes when playback stops. The RF
predistorter has its own enable, `rf_ce`.

## Number formats

| type | contents | scale |
|---|---|---|
| `cplx_t` | complex sample, 16-bit I and Q | Q1.15, 32768 = 1.0 |
| `coef_t` | complex coefficient (LUT gain, EQ tap) | Q2.14, 16384 = 1.0 |
| `mag_t` | unsigned magnitude | 32768 = 1.0 (up to 46341) |
| SRPC `alpha` | real scale factor | Q4.12, 4096 = 1.0 |

Every product is rounded to nearest and saturated back to 16 bits (`dpd_pkg`). The converter
words are the top 14 bits (main DACs), 12 bits (feedback ADCs, placed at the top of a Q1.15 word)
and 8 bits (vector modulator DACs), rounded with saturation.

## Crest factor reduction: scaled repeated peak cancellation

One `srpc_stage` computes

```
p_n  = x_n - x_n * c_n,        c_n = A / |x_n| if |x_n| > A, else 1     (cfr_clipper)
pf_n = noise-shaped p_n                                                (noise_shaper)
z_n  = x_{n-d} - alpha * pf_n                                           (srpc_stage)
```

**Clipper.** `cfr_clipper` forms the excess part of the peak directly, as
`p = x (|x| - A) / |x|`. `cplx_magnitude` supplies `|x|` with a 16-step integer square root. A
combinational divide follows. Below the threshold the pulse is zero. `clipped` flags a sample
that was over the threshold.

**Noise shaper.** Clipping alone would spread distortion over the whole band. The pulse has to
be filtered to the occupied carriers. With several carriers, the gaps between them must stay
clean too, so one low-pass filter is not enough. `noise_shaper` has one branch per carrier (`NC`
= 4). A branch mixes the pulse down by its carrier frequency, low-pass filters it with the shared
129-tap filter (`fir_complex`), mixes it back up, and adds it to the sum.

The subtle part is the phase of the up-mixer. If both mixers ran from one oscillator, a branch
would rotate the pulse by `exp(j w_c G)`, where `G = 64` is the filter's group delay. The pulse
would then no longer point along the peak it is meant to cancel. On real signals that made the
peaks worse. Each branch therefore has two `nco`s at the same frequency. The up-mixer lags the
down-mixer by `(G+2)*fword` of phase, set through the `phase_off` input; the 2 covers the two
mixer registers. Each branch is then an exact band-pass filter
`sum_k h_k p(n-k) exp(j w_c (k-G))` centred on its carrier, with zero phase at its centre tap.
Carriers can be disabled with `car_en`.

**Scaling.** Filtering spreads the pulse, so its peak comes out lower than the clipped excess.
Plain repeated peak cancellation (alpha = 1) therefore needs many iterations. SRPC multiplies the
filtered pulse by `alpha > 1`, about the ratio of the two peaks. The host sets alpha per stage,
found numerically for a given threshold; the hardware does not compute it. The input reaches the
subtractor through a `delay_line` of `6 + G` samples, so the centre of each pulse lines up with
its peak.

**Cascade.** `srpc_cfr` chains `STAGES` = 3 stages. Each has its own threshold and alpha, and all
share the filter taps and carrier words. Peaks that the filter of one stage regrows are removed
by the next. Each stage has a latency of `7 + (TAPS-1)/2` = 71 samples, so the cascade delays the
signal by 213 samples.

Measured on a synthetic four-carrier signal at 61.44 Msample/s (carriers at ±2.5 and ±7.5 MHz,
1.92 MHz filter cut-off, alpha = 1.5, threshold 5 dB above RMS), PAPR falls from 8.7 dB to
6.1 dB. The error vector magnitude is 9.9 % and no measurable energy lands out of band (see
`tb_srpc_cfr`). The reference work reports 5.71 dB at 10 % EVM after three stages on a real
four-carrier WCDMA Test Model 1 signal. Its alphas were tuned numerically; the testbench's were
not. With only the two inner carriers present and enabled (`car_en = 0110`), PAPR falls from
about 8-9 dB to about 6-6.5 dB at a similar EVM, and nothing is added at the two disabled
carrier frequencies.

## Piecewise pre-equalized LUT predistorter

`pwpe_lut_pd` is a six-register pipeline:

| stage | operation | block |
|---|---|---|
| 1 | `|u(n)|` | `cplx_magnitude` |
| 2 | `m = min(N-1, round(|u(n)| N))` | `lut_indexer` |
| 3 | read `F_m` | `coef_ram` (reset to 1.0) |
| 4 | `x(n) = u(n) F_m` | complex multiply |
| 5-6 | `z(n) = x(n) + sum_{k=1}^{K-1} W_k^m x(n-k)` | `piecewise_preeq` |

The table has `N = 256` entries. Each of the `N` magnitude pieces has its own short FIR filter,
and its first tap is fixed at 1. With `K = 2` the memory holds 256 gains and 256 taps. The taps
are selected by the magnitude of the *current* sample. An envelope-dependent filter of this kind
compensates memory effects that a single equalizer (a Hammerstein predistorter) cannot reach.
`bypass` removes the equalizer. It is needed while the gain table is being trained, and the gain
table itself is transparent when it holds 1.0, its reset value. `pd_sat` reports an input whose
index had to be clamped to the last entry. `x_out` and `m_out` carry the post-LUT sample and its
index, aligned with `z`, for a trainer that wants them.

The host writes the coefficients. The LUT is written with `lut_we/lut_addr/lut_data`; the taps
with `eq_we/eq_addr/eq_tap/eq_data`, where `eq_tap` = k and only k = 1 exists for `K = 2`.
Writes may happen while the chain runs, and a changed word is used from the next read.

## Baseband-derived RF predistorter

`bbrf_pd` keeps the main transmit path at the signal bandwidth and applies the predistortion at
RF. The input magnitude addresses a complex gain table, and the table word drives two 8-bit DACs
that set the I/Q gains of an RF vector modulator. The unmodified input drives the 14-bit main
DAC. The two paths must reach the vector modulator at the same time, so both get a programmable
whole-sample delay (`delay_line`, 0 to 32 samples). The main path also gets a
`lagrange_frac_delay`, a 3rd-order Lagrange interpolator in steps of 1/10 sample. Its tap table
is computed exactly at elaboration from `h_k(f) = prod_{i!=k} (D-i)/(k-i)` with `D = 1 + f/10`.

| output | value |
|---|---|
| `rf_main_dac` | `u` delayed by `main_coarse + 3 + main_frac/10` samples, top 14 bits |
| `rf_coef_dac` | `F[m(u)]` delayed by `coef_coarse + 4` samples, top 8 bits |

## Loop delay correlator

`delay_correlator` computes `R(d) = sum_{n<1024} r(n) conj(y(n+d))` for `d = 0..63` and returns
`lag = arg max |R(d)|^2`. The reference `r` is the predistorter output (`corr_sel = 0`) or the RF
predistorter input (`corr_sel = 1`). The feedback `y` is the ADC stream. A `corr_start` pulse
stores 1024 reference and 1087 feedback samples, one per sample enable. The search then runs one
complex MAC per clock, 64 x 1025 clocks in all.

A fine search follows. The complex `R(d)` of every lag is kept in a 64-word register file. After
the coarse search, the correlation is interpolated around the peak with the same 3rd-order
Lagrange taps the RF predistorter uses. It is evaluated at 20 points, `lag - 1` to `lag + 0.9` in
tenths of a sample, and `corr_lag_fine` reports the strongest one in tenths. Interpolating `R`
costs 20 clocks. The alternative would be to correlate ten interpolated copies of the feedback
block, which costs ten times the coarse search. For a band-limited signal, the fine estimate
lands within a tenth of a sample of the true delay.

`corr_done` pulses for one clock at the end. `corr_lag`, `corr_lag_fine` and `corr_peak` hold
their values until the next start. The lag includes the DAC register. With a pure delay of D
samples between `dac_i/q` and `adc_i/q`, the correlator reports D + 1 on the main loop.

To calibrate the RF predistorter, measure its two paths in turn, each with the feedback loop. The
difference of the two fine estimates gives the `rf_main_coarse`/`rf_main_frac` and
`rf_coef_coarse` settings that align them.

## Playback memory

`sample_playback` holds 8192 complex samples, written by the host. While `play_run` is high it
plays the first `play_len` words cyclically, one per clock. `play_valid` follows `play_run` by one
clock and enables the whole chain. When `play_run` drops, playback restarts at word 0.

## Latency summary (in samples)

| path | latency |
|---|---|
| `cplx_magnitude` | 1 |
| `cfr_clipper` | 2 |
| `noise_shaper` | 4 + filter group delay 64 |
| `srpc_stage` | 71 |
| `srpc_cfr` (3 stages) | 213 |
| `pwpe_lut_pd` | 6 |
| playback word to `dac_i/q` | 1 + 213 + 6 + 1 |
| correlator | 1087 samples of capture, then 65,600 + 20 clocks |

## Where this design makes its own choices

The reference work gives the algorithms and some sizes: a 256-entry LUT, 2-tap piecewise
filters, 129 filter taps, three SRPC stages, four carriers, 1/10-sample delay steps, 14-bit and
8-bit DACs and 12-bit ADCs. The following choices are this design's own:

- **Number formats.** All of the formats in the table above.
- **Arithmetic circuits.** The integer square root, the clipper's divider, the oscillators
  (32-bit phase, 1024-entry sine table built at elaboration), and the noise shaper's
  two-oscillator phase alignment.
- **Run-time registers.** Alpha is a per-stage register, not computed in hardware. The
  thresholds, carrier frequencies and filter taps are also registers.
- **Unstated sizes.** Playback depth 8192, correlator block 1024 over 64 lags, coarse delays up
  to 32, and interpolator order 3.
- **Playback depth.** A full WCDMA radio frame at 61.44 Msample/s is 614,400 samples, about 75
  times the playback memory. Longer test signals must be loaded in pieces, or the depth
  parameter must be raised.
- **Training.** The coefficient update (indirect-learning LMS for the LUT and the taps) and the
  choice of alpha run on the host. The RTL provides the write ports and the measurement
  (correlator, aligned `x_out`/`m_out`) they need.

## Verifying and simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. With plain Verilator 5:

```
verilator --binary -Wno-fatal --top-module tb_dpd_cfr_top rtl/dpd_pkg.sv -y rtl tb/tb_dpd_cfr_top.sv
./obj_dir/Vtb_dpd_cfr_top
```

Replace the name to run another testbench; each finishes in seconds. What they check:

- **Exact integer references.**
  - `tb_cplx_magnitude`: corner cases and random values.
  - `tb_fir_complex`: 129 taps.
  - `tb_lut_indexer`, `tb_coef_ram`, `tb_delay_line` (random stalls), `tb_sample_playback`.
  - `tb_piecewise_preeq`, `tb_pwpe_lut_pd`: full size.
  - `tb_bbrf_pd`: main and coefficient words bit-exact at four delay settings.
- **Real-valued models with small tolerances.**
  - `tb_cfr_clipper`, `tb_nco` (frequency and phase offset).
  - `tb_noise_shaper`: the band-pass formula above.
  - `tb_srpc_stage`.
  - `tb_lagrange_frac_delay`: all ten steps against the ideal delayed tone.
- **Cycle count.** `tb_delay_correlator` checks three integer delays on white data, and 13.4 and
  7.7 samples on a band-limited signal, each to a tenth of a sample. It also checks the exact
  number of clocks to `done`.
- **Signal quality.** `tb_srpc_cfr` uses the default three-stage, four-carrier, 129-tap
  configuration:
  - bit-exact pass-through when nothing clips;
  - PAPR reduction;
  - EVM;
  - out-of-band leakage;
  - the same checks on a two-carrier signal with the outer branches disabled.
- **End to end.** `tb_dpd_cfr_top` runs the top at its default parameters. It covers:
  - playback wraps;
  - bit-exact transparency of the chain with and without the equalizer;
  - LUT index saturation;
  - clipping in every stage and PAPR reduction at the DAC;
  - predistortion with known coefficients;
  - the correlator on the main loop through a delaying PA model;
  - the RF predistorter's exact DAC words, its fractional delay, and a correlator measurement
    of its main path.

  Each of these mechanisms is counted, and the test fails if one never happens.

## Size and limits

At the default parameters the top level synthesizes (generic cells) to about 88,000 flip-flop
bits and 1.2 Mbit of memory. Most of the flip-flops are the twelve 129-tap filter delay lines of
the SRPC cascade; most of the memory is the playback buffer. The filters are direct-form sums
over all taps in one clock, and the clipper divides in one clock. Neither has been pipelined or
timing-closed for a particular FPGA. At 61.44 MHz they would need the tap sums split into
registered adder trees or mapped to DSP cascades.

The SRPC cascade is by far the largest part. It needs 12 x 129 x 2 = 3096 real products per
sample. The predistorter path needs about ten, plus small tables, and fits comfortably in a
mid-size FPGA (a Stratix EP1S80 class device with 176 9x9 multipliers and 7.4 Mbit of RAM) next
to the playback memory. The full cascade does not fit such a part as written; it would need
time-multiplexed or polyphase shaping filters. The lint warnings that remain are deliberate
truncations: phase-accumulator bits below the sine-table index, and converter words taken from
the rounded 16-bit value. No part of the design has been tested against a real amplifier.
