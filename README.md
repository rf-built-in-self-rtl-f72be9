# Spectral built-in self-test for a sigma-delta fractional-N transmitter

A cellular transmitter built around a sigma-delta fractional-N PLL is hard
to test in production. The PLL is buried in the chip, its analog nodes are
not reachable, and its key properties are spectral: loop bandwidth, spurious
sidebands and in-band phase noise. This RTL adds a test path that is purely
digital. It generates FM test tones, measures what the PLL did with them,
and reports the amplitude of any chosen frequency component, all on chip.

The idea works in three steps:

1. **Stimulus.** A compact two-tone sine generator replaces the normal
   modulation data. The fractional-N modulator then frequency-modulates the
   carrier with the tones. The PLL's closed-loop response `G(f)` shapes them
   exactly as it shapes real data.
2. **Demodulation.** A dual-modulus divider clocked straight from the VCO,
   plus one flip-flop, forms a first-order sigma-delta frequency
   discriminator. It turns the RF frequency into a bit stream. No mixer and
   no ADC are needed.
3. **Analysis.** The bit stream is decimated, band-pass filtered around one
   frequency, rectified and averaged. The result is the amplitude of that
   component. Measure both tones and divide: you get `|G|` at two
   frequencies. Tune the filter between tones and you see spurs or the
   noise floor.

The reference numbers used throughout are: 26 MHz reference (`f_ref = f_s`),
a 4 GHz VCO, a 100 kHz loop bandwidth, a 22-bit fractional word, and a
15-bit generator word.

```
              te
 tx_data ──►┤0 ├─┐      chan_int.chan_frac
            │  │ ├──► (+) ──► fracn_sdm ──► pll_n, pll_mod ──► dm_divider ──► pll_div_out ─► PFD (analog)
 ldi_multi- │  │ │                                                ▲
 tone_gen ─►┤1 ├─┘ (±mod_amp)                                     │
                                                               rf_clk ◄── VCO (analog)
                                                                  │
          amp ◄── cic_avg ◄── rectifier ◄── ldi_bp4 ◄── cic_dec ◄── sdfd (divider + D-FF, samples clk)
                   /256                                  /32
```

## Files

| File | Contents |
|---|---|
| `rtl/bist_pkg.sv` | shared constants (word lengths, decimation factors) and the `tone_cfg_t` struct |
| `rtl/bist_top.sv` | the top level: the whole digital transmitter test path |
| `rtl/ldi_multitone_gen.sv` | time-multiplexed LDI two-tone generator |
| `rtl/sdm2_tdm.sv` | second-order single-bit sigma-delta modulator shared by the tones |
| `rtl/mod_select.sv` | test-enable multiplexer, tone-bit scaling, channel-word adder |
| `rtl/fracn_sdm.sv` | fractional accumulator producing the divider's modulus bit |
| `rtl/dm_divider.sv` | /N, /N+1 counter divider |
| `rtl/sdfd.sv` | sigma-delta frequency discriminator |
| `rtl/cic_dec.sv` | second-order CIC decimator (/32) with dump-and-reset |
| `rtl/ldi_bp4.sv` | fourth-order LDI bandpass with one shared multiplier |
| `rtl/rectifier.sv`, `rtl/cic_avg.sv` | absolute value and /256 averager |
| `rtl/amp_estimator.sv` | the analysis chain: decimator, bandpass, rectifier, averager |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_bist_top`, `tb_gen_spectrum`, `tb_gsm_deviation` and `tb_bw_fault` |
| `tb/pll_model.sv` | behavioural model of the analog PLL loop, used by the three full-design testbenches |

## The two-tone LDI generator

This is the least obvious part of the design.

**The resonator.** Each tone comes from a pair of lossless discrete
integrators (LDI):

```
x_b(k+1) = x_b(k) - b * x_a(k)         (accumulator B)
x_a(k+1) = x_a(k) + a * x_b(k+1)       (accumulator A, uses the new x_b)
```

This pair oscillates at `omega = arccos(1 - ab/2)` radians per sample. For
small `ab` that is about `sqrt(ab)`. If `x_b` starts at 0, the amplitude is
the initial value `x_a(0)`, so frequency and amplitude can be set
separately. Truncating `a` or `b` only moves the frequency. It cannot make
the loop unstable. (Noise injected into the loop is another matter; see
below.)

**No multipliers.**
* `a = 2^-ALPHA` is a fixed arithmetic shift (`ALPHA = 5`).
* The product `b * x_a` is avoided. A second-order single-bit sigma-delta
  modulator (`sdm2_tdm`) recodes `x_a` into a ±1 stream `xd`. Accumulator B
  then only adds `+b` or `-b`.
* The select code is `{tone, xd}`: `00 → +b1`, `01 → -b1`, `10 → +b2`,
  `11 → -b2`. `xd = 1` stands for +1.
* The same bit stream `xd` is the generator's output. That is the test
  stimulus.

**Time multiplexing.** Every state element, in both accumulators and both
modulator integrators, is a register chain `L` deep instead of a single
register. Each clock serves the next tone. Each tone runs at `f_s/L`, and a
tone costs one register per chain. The output `tone` says which tone's bit
is on `xd` in this clock. With `L = 2` it toggles at `f_s/2`.

**Number formats.**

| Signal | Format |
|---|---|
| `x_a` | 15 bits, full scale `FS = 2^14` |
| `x_b` | 19 bits, with 2 bits below the `x_a` LSB |
| `b` | `b_coef / 2^16`, with a 14-bit `b_coef` |

At `f_s = 26 MHz` and `L = 2`:

```
f_tone = arccos(1 - b_coef / 2^22) * 13 MHz / (2*pi)
```

`b_coef = 110` gives 15 kHz and `b_coef = 16383` gives 183 kHz. Example:
`b_coef = 1225` gives 50.007 kHz and `b_coef = 7052` gives 119.996 kHz.

**Departure from a literal reading of the published block diagram.** The
drawing feeds the shift `a` from accumulator B's register, so A would add
`a * x_b(k)`. The modulator delays its input by one sample. Together those
two choices form a forward-Euler resonator: its amplitude grows by
`sqrt(1+ab)` every sample, and the oscillator saturates within a few
thousand samples. In this RTL the shift path takes the output of B's adder
(`x_b(k+1)`). That restores the lossless pair, and with it the frequency
formula above. The testbench confirms that formula to 0.1 %.

**Amplitude wanders, and an upper tone eventually collapses.** Accumulator
B integrates `-b * xd`, and `xd` is `x_a` plus the modulator's shaped
quantization noise. That noise therefore drives an undamped resonator, so
the tone amplitude diffuses.
* The drive grows steeply with frequency: second-order noise shaping rises
  as `f^4`, and `b` as `f^2`.
* Measured with `x_a(0) = 6000` (0.37 FS):
  * The 50 kHz tone stayed within 0.36 to 0.39 FS for 120 ms.
  * The 120 kHz tone stayed within 0.37 to 0.40 FS for the first 10 ms,
    then grew: 0.46 FS at 15 ms, 0.61 FS at 23 ms, 0.86 FS at 29 ms. The
    modulator then overloaded and the tone collapsed to about 0.01 FS.
* Keeping the fraction bits of `a * x_b` in accumulator A only postpones
  the collapse (to about 45 ms), so it is a property of the structure, not
  of the truncation.
* In practice, pulse `gen_load` shortly before each measurement. The
  testbenches do this. Measurements of about 2 ms (eight estimator outputs)
  are unaffected. A frequency-response measurement is not biased by the
  drift as long as the stimulus amplitude is known in the same window.
* The published material does not discuss long-term amplitude stability
  and describes no amplitude control, so none is added here.

**Loading.** Pulse `gen_load` (one clock, in `bist_top`). This writes
`x_a(0)` of every tone, clears `x_b` and the modulator, and restarts the
tone index. Keep `|x_a(0)|` below about `0.5 FS` so that the modulator stays
stable.

## Putting the tones on the carrier

`mod_select` builds the division ratio word `N_I.FRAC + D(n)`. It has
`NI_W = 8` integer bits and `WF = 22` fraction bits. `D(n)` depends on `te`:

* `te = 0`: `D(n)` is the signed TX-filter word `tx_data`.
* `te = 1`: `D(n)` is `+mod_amp` or `-mod_amp`, chosen by the generator bit.

The PLL low-pass filters this stream. A tone with generator amplitude
`x_a/FS` then appears with amplitude:

```
D_tone    = mod_amp * (x_a/FS) / L
deviation = D_tone / 2^22 * f_ref
```

A GSM-like 67.7 kHz deviation needs `D_tone = 10916`. With
`x_a = 0.5 FS` that is `mod_amp = 43664`.

`fracn_sdm` is a first-order 22-bit accumulator. Its carry is the modulus
bit `pll_mod`, and `pll_n` is the integer part. `dm_divider` divides
`rf_clk` by `pll_n + pll_mod`. It samples both at the start of each output
period. The divider's output `pll_div_out` goes to the external phase
detector.

## The sigma-delta frequency discriminator

`sdfd` contains a second `dm_divider`, clocked by the RF signal and set to
the channel's integer ratio `N = chan_int`. A flip-flop, clocked by the
divider output, samples the reference clock. The flop output is the
demodulated bit, and it is also fed back as the modulus control. A 1
selects /(N+1).

Why it works:
* The reference is high in the first half of its period.
* If a divider edge lands in that half, the next count is one longer, which
  pushes the edge later.
* If it lands in the second half, the next count is shorter.
* The divider edges therefore settle around the falling edge of the
  reference. Each reference period gets exactly one divider edge.
* The fraction of periods that needed N+1 counts is `f_RF/f_ref - N`.

The bit stream is therefore a first-order sigma-delta coding of the
instantaneous RF frequency. Its quantization noise rises at 20 dB per
decade.

The discriminator only works while `N f_ref < f_RF < (N+1) f_ref`. Put the
carrier near the middle, for example with a fractional word of 1/2, and keep
the total deviation below half a reference frequency.

`bist_top` resamples the bit once on the rising edge of `clk`, about half a
reference period away from where it changes.

## The narrowband amplitude estimator

`amp_estimator` chains four blocks at `f_s = 26 MHz`.

**1. `cic_dec`: second-order CIC, decimation 32.** The first integrator runs
freely. The second integrator is dumped and cleared every 32 inputs, and one
comb follows. This equals a textbook two-integrator, two-comb CIC:

* response `(sin(pi F)/(32 sin(pi F/32)))^2`, with `F = 32 f/f_s`. The
  worst case near `f_s/2`, where the discriminator's noise peaks, is
  -60 dB at 12.6 MHz (`F = 15.5`).
* DC gain 1024, so a ±1 input gives ±1024
* output rate `f_s/32 = 812.5 kHz`
* 12-bit wrap-around arithmetic is exact

**2. `ldi_bp4`: fourth-order bandpass.** It is two cascaded resonators of
the form:

```
s(n)   = s(n-1) + k_f * y(n)
y(n+1) = y(n) + k_bw * (x(n) - y(n)) - k_f * s(n)
```

* The centre is `f_c = f_sR/pi * asin(k_f/2)`, about
  `k_f * f_sR / (2 pi)`.
* The input enters through the same `k_bw` as the damping, so the gain at
  `f_c` is exactly 1.
* `k_f = kf/512`, where `kf` is a 9-bit input. Steps are about 250 Hz.
* `k_bw = kbw/4096`. The bandwidth of one section is about
  `k_bw * f_sR / (2 pi)`. `kbw = 96` gives about 3 kHz.
* A new sample arrives only every 32 clocks, so one multiplier does all the
  work. After each input it runs a six-step sequence:
  * section 2 first, fed with section 1's previous output;
  * then section 1;
  * each section computes `k_f*y`, `k_f*s` and `k_bw*(x-y)`.
* The output is valid 7 clocks after the input.
* An assertion flags an input that arrives while the sequence is still
  running.

**3. `rectifier`.** It takes the absolute value.

**4. `cic_avg`.** It sums 256 rectified samples and outputs the sum.

`amp` updates every 8192 clocks, that is every 315 µs at 26 MHz. For a tone
that changes the bit density by `±delta`:

```
amp ≈ 256 * (2/pi) * 2*delta * 1024 * |H_CIC(f)|
```

After retuning `kf`, discard a few outputs. The resonators settle with a
time constant of about `2/k_bw` decimated samples. For `kbw = 96`, three
outputs are enough.

To select a frequency `f`, set `kf = round(1024 * sin(pi * f / 812.5 kHz))`.
The largest centre, at `kf = 511`, is about 135 kHz. Tones above that, up to
the generator's 183 kHz, cannot be selected.

## Using the top level

`bist_top` has no parameters. Its sizes come from `bist_pkg`.

| Port | Direction | Meaning |
|---|---|---|
| `clk` | in | reference clock `f_ref`; also the signal the discriminator samples |
| `rst_n` | in | active-low asynchronous reset for all state |
| `rf_clk` | in | VCO output |
| `te` | in | 1 = test tones, 0 = `tx_data` |
| `tx_data[21:0]` | in | signed TX-filter output |
| `chan_int[7:0]`, `chan_frac[21:0]` | in | channel word `N_I`, `FRAC` |
| `gen_load` | in | load the generator (one clock) |
| `gen_cfg[2]` | in | per-tone `b` (14 bits) and `xa0` (15 bits, signed) |
| `mod_amp[21:0]` | in | scale of the tone bit stream into `D(n)` |
| `bp_kf[8:0]`, `bp_kbw[8:0]` | in | bandpass centre and damping |
| `pll_div_out` | out | PLL feedback divider output, to the phase detector |
| `pll_n[7:0]`, `pll_mod` | out | division ratio presented to the divider |
| `demod` | out | discriminator bit, resampled on `clk` |
| `amp[21:0]`, `amp_valid` | out | amplitude estimate and its one-clock strobe |

**Example measurement of the loop response.** This is what `tb_bist_top`
does:

1. Set `chan_int = 153`, `chan_frac = 2^21`. The carrier is then
   153.5 × 26 MHz, about 3.99 GHz.
2. Set `te = 1`, `mod_amp = 2^21`, tone 1 to `b = 1225`, tone 2 to
   `b = 7052`, both with `xa0 = 6000`. Pulse `gen_load`.
3. Set `bp_kbw = 96` and `bp_kf = 197` (50 kHz). Wait three `amp_valid`
   strobes, then read `amp`.
4. Repeat with `bp_kf = 463` (120 kHz).
5. Compute `(amp_120 / |H_CIC(120k)|) / (amp_50 / |H_CIC(50k)|)`. This
   estimates `|G(120 kHz)| / |G(50 kHz)|`.

## Clocking and timing notes

* Everything except the two dividers and the discriminator flop runs on
  `clk`.
* `pll_n` and `pll_mod` cross into the `rf_clk` domain without
  synchronisation. The divider samples them once per period. In silicon,
  clock the fractional accumulator from the divider output, or retime it,
  so that its outputs never change near a divider reload. The RTL here
  keeps one clock for simplicity.
* The discriminator flop's data input is the reference clock itself. That
  flop is the quantiser, and metastability is inherent to it.
* A divider ratio below 2 is treated as 2. This happens briefly after
  reset, before the modulator has produced a ratio.

## What is not in the RTL

* The reference oscillator, phase-frequency detector, loop filter and VCO
  are analog. They connect through `clk`, `pll_div_out` and `rf_clk`.
* The TX pulse-shaping filter is only known as a low-pass block. Its output
  enters as `tx_data`.
* `tb/pll_model.sv` stands in for the closed analog loop in simulation. It
  is not a phase-domain PLL model. Its VCO frequency follows
  `f_ref * (pll_n + pll_mod)` through two first-order low-pass sections
  with a 100 kHz corner, `|G| = 1/(1+(f/100k)^2)`.

## How far to trust it

Each module has a self-checking testbench. Each testbench compares the
module against an independent model or an analytic expectation:

| Testbench | What it checks |
|---|---|
| `tb_ldi_multitone_gen` | tone period within 2 % of the arccos formula; amplitude; the bit stream carries the tone |
| `tb_sdm2_tdm` | bit density equals the input within 0.5 %; bounded running error |
| `tb_mod_select` | exact results on random vectors |
| `tb_fracn_sdm` | exact results on random vectors |
| `tb_dm_divider` | exact results on random vectors |
| `tb_cic_dec` | exact results on random vectors |
| `tb_rectifier` | exact results on random vectors |
| `tb_cic_avg` | exact results on random vectors |
| `tb_sdfd` | ones count within 2 of `p·M` for four RF frequencies |
| `tb_ldi_bp4` | unity gain at `f_c`; better than 26 dB rejection at 0.6 and 1.4 `f_c`; matches ideal arithmetic within 2 LSB + 1 %; 7-clock latency |
| `tb_amp_estimator` | two-tone amplitudes within 10 % of the formula; output period |

`tb_bist_top` runs the full design at its default sizes with a 4 GHz
carrier. It takes about 15 seconds of wall-clock time. It checks:

* normal-mode modulation;
* that no data gives close to zero;
* both test tones;
* the recovered loop-response ratio;
* that every PLL divider period matches the ratio in force.

It also counts the mode switch, generator load, both moduli of both
dividers and every stage of the analyser. It counts a failure if any of
these never happens.

Known inaccuracies:

* The bandpass gain at its centre is not exactly 1. For `kbw = 96` it is
  about 0.98 at 50 kHz and 1.04 at 120 kHz. The testbenches include this
  exact gain in their predictions.
* Even after that correction, the 120 kHz estimate reads 5 to 9 % high
  per unit of actual RF deviation. This was measured by correlating the
  loop model's frequency with the tone. At 50 kHz the estimate is exact.
  The excess is the same at channel fraction 0.1234 as at 1/2. It comes
  from the generator's bit stream, not from the analyser:
  * fed an ideal FM carrier with one or two tones, the discriminator and
    estimator read within 2 %;
  * driven by an ideal two-tone sine on `tx_data` in normal mode, the
    whole chain recovers the loop ratio within 1 %.
  The likely cause is content of the generator's stream in the band
  around 120 kHz beyond the clean tone: its wandering amplitude and its
  quantization noise, passed through the first-order fractional-N
  quantizer. This was not traced further. As a result the measured `|G(120k)|/|G(50k)|` is 0.556,
  against a true 0.51.
* Absolute amplitudes are only as good as the `2/pi` relation between the
  average of a rectified sine and its peak. Noise in the band raises the
  estimate.
* A channel fraction of exactly 1/2 is a bad place to measure small
  deviations. Both first-order quantizers, the fractional-N modulator and
  the discriminator, then sit on their strongest idle pattern, and a small
  tone intermodulates with it. At the GSM-like deviation below, the
  estimate read about 4.5 times too high at fraction 1/2. At fraction
  0.1234 it read within 6 %. `tb_bist_top` uses 1/2, but its deviations
  are about 50 times larger, so there it does not matter.

Three more testbenches run workloads from the published design:

* `tb_gen_spectrum` takes a windowed (Blackman-Harris) 16384-point DFT of
  each tone's bit stream from the generator.
  * Tone 0 (50 kHz): SFDR measured 63 dB (checked at 60 dB). In-band SNR
    (0 to 100 kHz) measured about 65 dB. The published design quotes
    89 dB. That number comes from the textbook second-order formula
    `SNR = pi^2/sqrt(60) * OSR^-5/2` at OSR = 65, which takes the
    quantizer step as 1. A single-bit quantizer with levels of plus and
    minus full scale has a step of 2. With that step the same theory gives
    about 80 dB for a full-scale tone and 73 dB for this -6 dB tone.
  * Fed an ideal -6 dB sine in the same measurement, the modulator alone
    reaches 71.6 dB. The remaining loss of about 6 dB belongs to the
    oscillator loop. The resonator is lossless, and the modulator's
    quantization noise drives it through the `+/-b` path. That widens the
    tone into a close-in skirt.
  * Keeping the fraction bits of the `a` product in accumulator A would
    gain only about 1 dB, so the 15-bit accumulator is kept.
  * Tone 1 (120 kHz): SFDR measured about 53 dB (checked at 50 dB). The
    largest spur is the noise skirt close to the tone.
* `tb_gsm_deviation` runs the GSM-like case at full size: a 100 kHz tone
  of amplitude FS/2 and `mod_amp = 43664`. This gives a 67.7 kHz
  deviation, modulation index 0.68.
  * The applied deviation is checked within 15 %.
  * The estimate with a narrow bandpass (`kbw = 24`) read 454 against a
    predicted 429.
  * With the tone switched off the estimate is 127, so the measurement
    floor of this setup is only about 11 dB below this deviation.
  * The -80 dBc measurement floor of the published design was not
    reproduced. That figure comes without a bandwidth or reference. Here
    the floor (127) is about 62 dB below the reading for a full-scale
    bit-density deviation of ±0.5 (`256 * 2/pi * 1024`, about 166900).
* `tb_bw_fault` shows that a loop-bandwidth fault is detected. It runs
  the two-tone measurement against a loop that is too narrow (50 kHz) and
  one that is too wide (200 kHz). The recovered ratio
  `|G(120k)|/|G(50k)|` is 0.32 and 0.85 respectively. Both fall outside
  the 0.435 to 0.615 window that `tb_bist_top` accepts for the healthy
  100 kHz loop. Against each faulty loop's own ratio (0.30 and 0.78) both
  read high, by 7 % and 9 %, the excess described above.

## Simulating

Each testbench is self-contained. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bist_pkg.sv rtl/*.sv \
          tb/pll_model.sv tb/tb_bist_top.sv --top-module tb_bist_top -o sim
./obj_dir/sim
```

`tb_gsm_deviation` and `tb_bw_fault` are built the same way, also with
`tb/pll_model.sv`. `tb_gen_spectrum` needs only `rtl/ldi_multitone_gen.sv`
and `rtl/sdm2_tdm.sv`. Each full-design testbench runs in about 10 to 15
seconds.

For a single block, list `rtl/bist_pkg.sv`, the block's file and the files
it instantiates, then its testbench. For example:

```
verilator --binary --timing --assert -Irtl rtl/bist_pkg.sv rtl/cic_dec.sv \
          rtl/ldi_bp4.sv rtl/rectifier.sv rtl/cic_avg.sv rtl/amp_estimator.sv \
          tb/tb_amp_estimator.sv --top-module tb_amp_estimator -o sim
```

The testbenches use `$urandom` and real arithmetic only, with no constraint
solver and no external files.
