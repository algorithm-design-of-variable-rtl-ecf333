# Variable symbol rate 64-QAM cable receiver

This is the digital core of a cable-TV QAM demodulator. It takes real samples of an IF channel from an ADC. It returns 64-QAM symbol decisions ready for a forward error correction decoder. The symbol rate can be anything from 875 kBd to 7 MBd. The sampling clock is never adjusted: an analog clock stays fixed while everything that depends on the symbol rate is done digitally.

The receiver contains four control loops and one sequencer that brings them up in order:

- an **AGC loop** that sets the analog RF and IF gains;
- a **timing loop** that resamples the signal to exactly two samples per symbol;
- a **blind decision-feedback equalizer** (DFE) that runs in the passband;
- a **decision-directed carrier loop** wrapped around the equalizer's slicer;
- a **mode controller** that moves the equalizer and carrier loop from blind start-up to decision-directed tracking.

## Signal flow

```
adc_in ─┬─> agc ──> rf_gain, if_gain (to the analog gain stages)
        └─> prelim_demod (x·cos(πn/2), -x·sin(πn/2))        f_s
              └─> recirc_decimator (half-band, ÷2/÷4/÷8)      f_s/2 .. f_s/8
                    └─> timing_recovery                       2 f_T
                          (interp_filter, timing_error_detector,
                           lead_lag_filter, timing_nco)
                          └─> matched_filter (RRC)            2 f_T
                                └─> pairing (2 samples -> 1 symbol)
                                      └─> blind_dfe           f_T
                                           (ffe_dual_mode, fbe, eq_error,
                                            slicer, carrier_recovery)
                                            └─> sym_i, sym_q, x_soft
mode_ctrl: ACQ -> CMA + four corners (p1) -> DD-LMS (p1) -> DFE (p2)
```

The whole design uses one clock, the ADC sample clock. Slower rates are carried as `valid` strobes that act as clock enables. This is how the design realises the "gated clocks" of the architecture: the decimator's stage clocks, the NCO's virtual clock and the symbol clock.

With a 36.15 MHz IF sampled at 28.92 MHz, the channel aliases to 7.23 MHz. That is exactly f_s/4. So the first mixer only multiplies by 0 and ±1 (`prelim_demod`), and the decimator's half-band filters see a signal centred on DC.

## Decimator: one filter core for three stages

`recirc_decimator` decimates by 2, 4 or 8 (`sel` = 0, 1, 2). This brings the signal to between one and two times the rate the timing loop needs (2 f_T).

- **Banks and core.** Each stage has its own 19-sample register bank. All three stages share one 19-tap half-band core per rail.
- **Coefficients.** The core is built from shifts and adds. It uses 10 non-zero coefficients per 1024: a centre of 512, then 317, −84, 31, −9 and 1 at odd distances.
- **Stage timing.** The core is time-shared by giving the stages mutually exclusive slots in a 3-bit input counter c:
  - stage 1 runs on odd c;
  - stage 2 runs when c mod 4 = 2;
  - stage 3 runs when c mod 8 = 4.

  A stage's result is shifted into the next stage's bank, or sent to the output when it is the last stage selected. An assertion checks that no two enables are ever high together.
- **Core count.** One core runs at the input rate for all three stages, where a straight cascade would need three filters.

## Timing recovery: resampling to a virtual clock

The timing loop is the most delicate part of the design. `timing_recovery` contains four blocks:

- **`timing_nco`** keeps a 40-bit phase register u. Each input sample it adds the step word w. A carry out of bit 39 is the "gated clock": it means that one output sample falls between the last two inputs. With no timing correction, w is `w_nom = 2^40 · 2 f_T / (f_s/decimation)`. The NCO then overflows on average once every R = (f_s/dec)/(2 f_T) inputs, where 1 ≤ R < 2.
- **The interpolation phase** is `mu = (w − u) / w`. It is worked out from the top 12 bits of w and u with a small divider, and quantised to 1/32 of a sample.
- **`interp_filter`** is a 16-tap, 32-phase polyphase FIR. Its coefficients are a Hann-windowed sinc (half-width 8.5 samples, scaled by 1024) held in `rtl/interp_coef.hex`: 512 entries of 12 bits. Phase p, tap k holds `round(1024 · sinc(d) · 0.5 · (1 + cos(π d / 8.5)))` with d = p/32 − (8 − k). The output is the value at line[8] + mu.
- **`timing_error_detector`** is a band-edge detector. It has two leaky complex resonators:
  - The resonators sit at ±f_T/2, which at two samples per symbol is ±f_s/4 of the resampled stream. So each one is simply `s[n] = x[n] + λ·(∓j)·s[n−1]` with λ = 1 − 2⁻³.
  - The timing information is in Im(s1*·s2). Its value alternates with the sampling phase. The detector outputs the difference between two consecutive products, once per symbol. This cancels the large constant part, so the error is zero when the samples sit on the symbol centres and the opposite symbol boundaries.
  - Late sampling gives a negative error.
- **`lead_lag_filter`** adds a proportional path (phase) and an integral path (frequency). Both use shift gains and saturate. The NCO word is `w = w_nom − (lf_out << 17)`.

Because the loop works at two samples per symbol, it has two equivalent lock points half a symbol apart. The equalizer is fractionally spaced, so it works at either.

## Blind DFE in the passband, with the carrier loop inside

`blind_dfe` holds the equalizer and the carrier loop.

**Filter output.** The equalizer output is `y = FFE(x) − FBE(fb)`. It is computed **before** the carrier is removed, so the filters adapt without depending on the carrier phase.

**Slicing.** y is de-rotated by `e^{−jθ}` (a complex multiply with a ROM value) to give the baseband soft value x_soft. The slicer picks the nearest 64-QAM point: levels ±1, ±3, ±5, ±7 times 128. The decision is then rotated back by `e^{+jθ}` into the passband.

**Feedback paths.** The FBE input is switched between two paths:

- **path p1** feeds back the soft output y. The structure is then a linear IIR equalizer, which is safe while decisions are still wrong.
- **path p2** feeds back the re-rotated decisions. This is the true decision-feedback equalizer.

**`ffe_dual_mode`** is 24 complex taps, split into an "even" and an "odd" half of 12.

- **T/2 mode** (`fse = 1`): the first sample of each symbol goes into the even half and the second into the odd half. This gives a fractionally spaced equalizer whose taps are clocked at the symbol rate.
- **Symbol-spaced mode** (`fse = 0`): the halves are chained into one 24-tap line of symbol-spaced samples.
- **Pipeline.** Each half is built in a hybrid direct/transposed form. Its 12 taps form 4 modules of 3 taps. Inside a module the products are added directly. At each module boundary there is one register in the output adder path and one extra register in the input line. So module m reads its taps m samples further down the line, and every tap reaches the output through D = 3 registers in all: `y(n) = Σ c_k·x_k(n−3)`. The reset response is therefore the input delayed by INIT_TAP + 3 symbols.
- **Update.** The error runs back through one register per module, so module m sees the error of 3 − m symbols ago. It updates with the data that produced that error: `c_k += μ · e(n−(3−m)) · sgn(x_k*(n−(3−m)−3))`, a sign-data LMS. Each delay line is 2D = 6 samples longer than its taps so that this data is at hand.
- **Formats.** Coefficients are 16 bits with 1.0 = 4096, kept in 24-bit accumulators. The step is μ = 2^−(MU_SH+12) per error LSB, with MU_SH = 8. At reset the taps start as a unit spike at tap 4, which lies in the odd half.

**`fbe`** is 24 complex taps over past feedback values. It uses the same sign-data LMS, with the sign flipped because its output is subtracted.

**`eq_error`** gives the update error:

- **CMA:** `y·(R2 − |y|²)` with R2 = 58 (E|a|⁴/E|a|² for 64-QAM), scaled to the 128-per-level grid.
- **Decision-directed:** `(re-rotated decision − y)`.

**`carrier_recovery`** closes the carrier loop on the de-rotated value x:

- **Phase detector:** `Im[x/y] = (x.im·y.re − x.re·y.im)/|y|²`, with y the decision in odd-integer levels. This is a real divider, so the detector gain does not depend on which ring the point is on.
- **Loop filter:** proportional (k1 = 2⁻¹⁰) and integral (k2 = 2⁻⁴) paths.
- **Phase accumulator:** 24 bits per turn.
- **Sin/cos ROM:** 256 entries holding `{round(2047·cos(2πi/256)), round(2047·sin(2πi/256))}` in `rtl/sincos_rom.hex`.
- **Four-corners mode:** used during blind start-up. The decision is replaced by the QPSK corner (±7, ±7) of x's quadrant, and the loop only updates on points outside a radius of 1200. Those are the four outermost points, at radius 1267, and the next ring is at 1101. So the loop can pull in the phase before any 64-QAM decision can be trusted.

## Acquisition sequence

`mode_ctrl` counts symbols and steps through four modes:

| mode | symbols | equalizer update | feedback | carrier loop |
|---|---|---|---|---|
| ACQ | 2048 | off | p1 | off |
| CMA | 16384 | CMA | p1 (soft) | four corners |
| LMS | 8192 | DD-LMS | p1 (soft) | decision directed |
| DFE | from then on | DD-LMS | p2 (decisions) | decision directed |

The AGC and the timing loop run from reset. ACQ only gives them time to settle before the equalizer starts.

## AGC

`agc` integrates (TARGET − |adc_in|) with a gain of 2⁻⁶ into the IF gain word. When the IF gain sits at either limit, the RF gain word moves by 16 LSBs, at most once per 1024 samples. The IF integrator keeps its value across an RF step, so the IF loop can take up the change smoothly. The meaning of the gain words, for example dB per LSB, belongs to the analog stages. The testbench models them as `if_gain/2048 · 2^((rf_gain − 2048)/1024)`.

## Number formats

- Samples: `cplx_t` in `qam_pkg`, which is two signed 12-bit rails.
- Constellation: one level unit is 128, so the outer point is 896 per rail. A rotated corner point (1267) still fits in 12 bits.
- Arithmetic: results are truncated (`>>>`) and saturated to 12 bits with `sat_dw`.
- Loop filters: 24 bits.

## Where the design goes beyond, or falls short of, the architecture

These parts follow the architecture closely:

- the f_s/4 mixer;
- the recirculating decimator with exclusive stage slots;
- the 16-tap interpolator with its 40-bit NCO and gated clock;
- the two-resonator band-edge error Im(s1*·s2);
- the proportional-integral loop filters;
- the 24+24 tap dual-mode FFE in the hybrid pipelined form (modules of 3 taps, D = 3) with its delayed sign-data update;
- the passband DFE with its p1/p2 switch and de-/re-rotation;
- the Im[x/y] carrier detector, k1/k2 filter, accumulator and ROM;
- four-corners start-up and the CMA → DD-LMS → DFE order.

These are the design's own choices:

- **Coefficients.** The half-band coefficients are a Kaiser-windowed design. The interpolator uses a windowed sinc rather than an MMSE design. The matched filter is a 25-tap root-raised cosine (roll-off 0.15, Kaiser β = 3).
- **TED.** The error is the difference of Im(s1*·s2) across two consecutive samples.
- **Tuning.** All loop gains, CMA and LMS step sizes, word widths, the AGC law and the number of symbols spent in each mode are this design's choices.
- **FFE adders.** The module sums and the output path use ordinary adders where the original architecture names carry-save adders; the choice is left to synthesis. How the delayed update is aligned per module is read from the pipeline's structure.
- **Clocking.** Gated clocks are replaced by clock enables in one clock domain.
- **Outside this RTL.** The tuner, the ADC and the FEC decoder are not included: the ADC samples come in on `adc_in`, and decisions go out on `sym_i`/`sym_q`.

## Verification

Every block has a self-checking testbench in `tb/` that compares it against an independent model and prints `TB_RESULT checks=… failures=…`:

- the decimator against a cascade of ideal half-band decimators;
- the interpolator against a sampled sinusoid at random fractional delays;
- the timing error detector's S-curve sign and zero;
- the equalizer filters for their exact outputs with frozen taps, and for convergence of the sign-data LMS to known target taps;
- the CMA and decision-directed errors against real-valued formulas;
- the carrier loop pulling in a frequency offset;
- the sequencer's mode lengths.

`tb_qam_receiver_top` runs the whole receiver with every parameter at its default: one full acquisition run and three short runs that check rates.

**Run 1** uses 29,600 64-QAM symbols at 5.2 ADC samples per symbol (5.56 MBd at f_s = 28.92 MHz). The impairments are:

- a −22 dB echo half a symbol late;
- a 30° carrier phase;
- a 100 ppm symbol-rate error;
- noise at about 30 dB SNR;
- an input weak enough that the RF gain has to step.

It counts every mechanism: IF and RF gain changes, decimator and NCO rates, each mode and its length, four-corners updates and decision feedback on p2. It requires 100% correct decisions over the last 2000 symbols; in practice it reaches 100% by the end of the DD-LMS phase.

**Three short runs** of 3000 symbols check only the decimator and symbol rates:

- ratio 4 with the symbol-spaced equalizer at 2.78 MBd;
- 7 MBd at ratio 2 (R = 1.033);
- 875 kBd at ratio 8 (R = 1.033).

The last two are the ends of the symbol-rate range. Decision quality at those rates is not checked.

The whole testbench takes about 20 s with Verilator.

## Simulating

Verilator 5 with `--timing` is enough. From the directory that holds `rtl/` and `tb/` (the ROM files are read by the relative paths `rtl/interp_coef.hex` and `rtl/sincos_rom.hex`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -I. --top-module tb_qam_receiver_top \
    rtl/qam_pkg.sv tb/tb_qam_receiver_top.sv -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

Replace `qam_receiver_top` with any block name to run that block's testbench. Every module has working defaults. The unit testbenches override a few parameters, such as larger LMS steps, to keep runs short.

Useful knobs on the top:

- **`dec_sel`:** choose it so that (f_s/2^(dec_sel+1)) / (2 f_T) lies between 1 and 2.
- **`tr_freq_word`:** set it to `round(2^40 / R)` for that R.
- **`fse`:** selects the T/2 or the symbol-spaced equalizer.

The loop gains are parameters of `timing_recovery`, `carrier_recovery`, `blind_dfe` and `agc`. The mode lengths are parameters of `mode_ctrl`.
