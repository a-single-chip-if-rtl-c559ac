# Single-chip IF FM/AM decoder with an IF-sampling sigma-delta converter

A broadcast FM/AM receiver usually demodulates in analog and digitizes the
audio. This design moves the analog-to-digital boundary up to the 10.7 MHz
intermediate frequency (IF). A tuner chip delivers the IF, and a single mixed-signal chip does
the rest:

- An IF-sampling sigma-delta A/D converter mixes the IF to baseband I and Q.
- The converter digitizes I and Q with one shared low-pass modulator.
- Digital logic does the channel filtering and demodulation.

The FM demodulator is a *quadricorrelator*. It needs no phase-locked loop, no
look-up table and no amplitude control. The instantaneous frequency comes
from one ratio of products of I, Q and their derivatives. The denominator of
that ratio, square-rooted, is the AM output. Stereo and RDS decoding happen in
software on an external DSP and are not part of this chip.

The synthesizable parts are the dynamic element matching logic and the whole
digital FM/AM demodulator. The analog parts (sampling filter, modulator with
its DAC) are integer behavioural models, so the complete chip can be
simulated from IF samples to FM/AM output.

## Signal chain

```
 if_in (42.8 MHz samples of the 10.7 MHz IF)
   |
 sampling_filter        x 1,0,-1,0 -> I ; x 0,1,0,-1 -> Q ; average 4   (behavioural)
   | I, Q at 10.7 MHz
 sd_modulator           one 2nd-order 17-level modulator, 21.4 MHz,     (behavioural)
   |   ^                I on even ticks, Q on odd ticks
   |   +-- dwa_dem      rotates the 16 unit DAC elements                 (RTL)
   | code 0..16 + sel_q
 fmam_demodulator                                                         (RTL)
   sinc3_integrators    integrators of the I/Q sinc^3 filters, derivative
   |                    taps, I/Q timing correction, decimate by 64
   lowrate_datapath     ONE subtractor for all 12 combs, ONE 24x24 multiplier,
   |                    ONE adder:  num = Q*dI - I*dQ,  den = I^2 + Q^2
   fm_divider           fm_out = num * 2^20 / den   (39-bit divisor)
   am_sqrt              am_out = sqrt(den)
   |
 fm_out (16 bit), am_out (24 bit) at 334.375 kHz -> external DSP
```

`if_decoder_top` wires these blocks together. `fmam_pkg` holds the shared
widths and types.

## Clocks and rates

| signal | rate | notes |
|---|---|---|
| `clk_if` | 42.8 MHz | samples the IF, 4 samples per IF period |
| I/Q from the sampling filter | 10.7 MHz each | held for 4 `clk_if` cycles |
| `clk` | 21.4 MHz | modulator and all digital logic; rises on every other `clk_if` rise |
| FM/AM output | 334.375 kHz | one sample every 64 `clk` cycles |

Both clocks come from outside. Every rising edge of `clk` must fall on a rising edge of
`clk_if`. `rst_n` is an asynchronous active-low reset for everything.

## From IF to baseband with one modulator

The sampling filter takes four samples per IF period. A carrier
`A cos(pi/2 n + phi)` then gives `x0 = A cos phi`, `x1 = -A sin phi`,
`x2 = -A cos phi` and `x3 = A sin phi`. The filter forms
`I = (x0 - x2)/2 = A cos phi` and `Q = (x1 - x3)/2 = -A sin phi`. So the
baseband vector `I + jQ` turns clockwise for an IF above 10.7 MHz. The
sign of the demodulator's numerator is chosen so that such an IF gives a
positive `fm_out`.

A low-pass modulator with its clock independent of the IF is simpler than a
band-pass modulator of the same order. The two channels share one modulator,
so they match exactly. It runs at 21.4 MHz and alternates between I and Q,
keeping separate integrator states per channel. The loop is a plain double
integrator with noise transfer function `(1 - z^-1)^2` and a 17-level
quantizer. The model scales its input so that ±32768 spans ±8 steps. One step
is 4096 input units, and the loop overloads beyond about ±6 steps.

The 16 unit elements of the feedback DAC are given fixed errors of up to
±0.2 %. `dwa_dem` uses data-weighted averaging: each code switches on the
next `code` elements after those used last time. Every element is then used
equally often, and the mismatch error is first-order shaped away from the
signal band. Each channel has its own rotation pointer, so the I and Q
element sequences do not interleave. The DAC selection is combinational
within the modulator cycle. The pointer advances on the clock edge.

## Keeping I and Q in quadrature

This is the subtle part of the filter design. The demodulator assumes that I and Q
describe the same instant, but they are converted on different ticks:

- An I value is formed from IF samples 0 and 2 of its group, so it stands for the
  moment half a 21.4 MHz tick *after* the tick that converts it.
- A Q value (samples 1 and 3) stands for the moment of its own tick.

If the filters ignore this, the I/Q pair carries a constant timing error.
A constant input frequency then shows a ±1 % ripple on `fm_out`.

`sinc3_integrators` corrects the timing in the filters themselves:

- **I path:** the integrator input is the I code held over two ticks (its
  own tick and the following Q tick). That is an extra `(1 + z^-1)` factor,
  an exact linear-phase half-tick delay.
- **Q path:** the integrator input is the Q code on Q ticks and zero on I
  ticks, doubled so both channels have the same DC gain, `64^3 = 2^18`.

Both integrator chains run on every tick and are decimated at the same
instant. The length-64 sinc has zeros at half the tick rate, and these
remove the images that the zero-stuffing creates. The remaining mismatch is
the `cos(w/2)` magnitude of the half-tick filter, 1e-4 at 100 kHz. The
measured ripple at 75 kHz deviation is about ±10 LSB out of 23088.

## The quadricorrelator and its number formats

Each sinc^3 filter is split across the decimation switch. Three integrators
run at 21.4 MHz (wrapping modulo 2^24), and three combs run at the output
rate. The derivative of each channel is tapped *before the last integrator*
and goes through the same three combs. That path is
`(1 - z^-64) * sinc^2`, a smoothed differentiator. Its transfer function
relative to the main path is `e^{jw} - 1`, where `w` is the frequency offset in
radians per 21.4 MHz tick. The `e^{jw}` appears because the tap sits one
register ahead of the last integrator. Only its imaginary part, `sin(w)`, enters the result. For a tone `I + jQ = r e^{-jwn}` this gives exactly

```
num = Q*dI - I*dQ = r^2 sin(w)        den = I^2 + Q^2 = r^2
```

with no approximation beyond the filtering itself. Hence:

- `fm_out = 2^20 num/den = 2^20 sin(2 pi f / 21.4 MHz)`. That is 3.25 Hz per
  LSB, and the 16-bit range of ±32767 covers ±104 kHz. Larger deviations are
  clipped and flagged with `fm_sat`.
- `am_out = sqrt(den)` equals `2^18 x` the amplitude in modulator steps,
  which is 64 x the IF amplitude in `if_in` units.

Word widths:

| quantity | width | range used |
|---|---|---|
| modulator code | 5 bits | 0..16, value = code - 8 |
| integrators, combs, I, Q, dI, dQ | 24 bits signed | \|I\|, \|Q\| <= 8 * 2^18 |
| products | 48 bits | |
| `num` | 49 bits signed | about sin(w) * den |
| `den` | 48 bits | < 2^44 |

The ratio is small: at 75 kHz, `sin(w)` is 0.022. So the divider scales the
numerator up and the denominator down. The divisor is `den >> 5`, which fits
in 39 bits. The dividend is `|num| << 15`. A restoring divider with a 40-bit
partial remainder yields one quotient bit per clock, 15 magnitude bits in all,
and then applies the sign. `am_sqrt` is a digit-by-digit square root with one
root bit per clock.

## The multiplexed low-rate datapath

Decimated values arrive only once every 64 clocks. So the low-rate section
does not build 12 comb subtractors, 4 multipliers and an adder tree. It uses
one of each, stepped by a small sequencer:

| clocks after the decimation strobe | unit | work |
|---|---|---|
| 1-12 | subtractor | comb stage k of path p: p = I, Q, dI, dQ; k = 0, 1, 2 |
| 13 | multiplier, adder | acc = Q * dI |
| 14 | multiplier, adder | num = acc - I * dQ |
| 15 | multiplier, adder | acc = I * I |
| 16 | multiplier, adder | den = acc + Q * Q; `done` |
| 17-31 | `fm_divider` | `fm_valid` |
| 17-40 | `am_sqrt` (in parallel) | `am_valid` |

The comb delay registers form a 4 x 3 register array. An assertion flags a
decimation strobe that arrives while a run is still busy; this cannot happen
with a decimation ratio of at least 26. `fm_valid` and `am_valid` each pulse once every 64
clocks. The divider takes 15 clocks even when it clips, so that the output
spacing stays regular.

## What is modelled, and what was chosen here

The following come from the original design description:

- the IF (10.7 MHz) and the rates (42.8 and 21.4 MHz)
- the 1,0,-1,0 / 0,1,0,-1 mixing
- one shared second-order, 17-level modulator with DEM
- split sinc^3 filters with the derivative tapped before the last integrator
- that the filters restore the I/Q quadrature
- the quadricorrelator and its products
- 24-bit multipliers and a 39-bit divider
- 16-bit FM resolution
- AM as the square root of the denominator
- the time-multiplexed low-rate section

The following were not specified and are this design's own choices:

- The decimation ratio of 64 and hence the 334.375 kHz output rate.
- How the filters are modified for quadrature: the `(1 + z^-1)` I path and
  the doubled, zero-stuffed Q path.
- Data-weighted averaging, with one pointer per channel, as the DEM scheme.
- The modulator loop structure and scaling, and the DAC mismatch values.
- The scale factors of the divider (`2^20`, the divisor `den >> 5`), clipping
  at ±32767, and the sign convention of `fm_out`.
- The restoring divider and square-root algorithms, and the cycle schedule.
- The integer scaling of the sampling-filter model (a carrier of amplitude A
  gives \|I + jQ\| = A).

Limits to keep in mind:

- **Droop.** The sinc^3 response also shapes the demodulated signal. At the
  output it is `(sin x / x)^3` with `x = pi f 64 / 21.4 MHz`: 0.984 at the
  19 kHz pilot and 0.94 at the 38 kHz stereo subcarrier. Nothing here
  compensates it; that is left to the DSP.
- **Idealized analog.** The analog models are ideal apart from the DAC
  element errors. They have no thermal noise, capacitor mismatch between the
  sampling filter's phases, integrator leakage or clock jitter. The measured
  noise figures are therefore upper bounds on real performance.
- **No gate count.** No technology mapping is done, so a gate count
  comparable to a standard-cell implementation (about 24k gates) is not
  available.

## Verification

Each block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | checks |
|---|---|
| `tb_sampling_filter` | I = (x0-x2)/2, Q = (x1-x3)/2 per frame, held 4 cycles; a carrier gives (A cos phi, -A sin phi) |
| `tb_sd_modulator` | channel alternation, code range, per-channel mean equal to the DC input, bounded integrator error, up to ±24000 input |
| `tb_dwa_dem` | exact rotated selection per channel, popcount, wrap flag, equal element usage |
| `tb_sinc3_integrators` | testbench-side combs on the latched taps against a direct convolution with the sinc^3, derivative and half-tick kernels; strobe every 64 clocks |
| `tb_lowrate_datapath` | filtered values, num and den against a 64-bit reference; 16-clock latency |
| `tb_fm_divider` | quotient and clipping against 128-bit arithmetic; 15-clock latency |
| `tb_am_sqrt` | r^2 <= x < (r+1)^2 for corner and random values; 24-clock latency |
| `tb_fmam_demodulator` | fed by a floating-point modulator model: mean `fm_out` within 0.5 % of 2^20 sin(w) from -100 to +75 kHz, `am_out` within 1 %, clipping at 130 kHz, output every 64 clocks |
| `tb_if_decoder_top` | whole chip, default parameters, IF in, FM/AM out |
| `tb_stereo_mpx` | stereo broadcast through the whole chip |
| `tb_dem_benefit` | two chains with ±1 % DAC element errors, one with `dwa_dem` and one with a fixed thermometer selection |

`tb_if_decoder_top` covers the following:

- FM steps of both signs, each mean within 1 %, with a ripple under 80 LSB
  peak-to-peak.
- Noise with an unmodulated carrier: 0.35 LSB rms over the whole output band,
  93 dB below a 75 kHz-deviation sine.
- Clipping at ±125 kHz.
- 50 % AM at 5 kHz, with envelope maximum and minimum within 2 %. The FM
  output stays within ±10 LSB meanwhile, which shows the AM suppression.
- DEM pointer wrap-around.

Each of these mechanisms is counted and must occur.

`tb_stereo_mpx` sends a stereo multiplex signal with 75 kHz deviation: L+R,
a 19 kHz pilot at -20 dB, and L-R on a 38 kHz DSB subcarrier. It measures
the FM output with windowed single-bin transforms. The L+R tone, the pilot
and both L-R sidebands must each be within 2 % of their expected amplitudes,
after droop. Empty bins must be more than 80 dB below full deviation; they
measure 100 dB or more below.

`tb_dem_benefit` runs both chains on a constant-envelope carrier at 30 kHz
offset. The DEM must lower the rms ripple of `fm_out` and of `am_out` by at
least 10 dB each. It measures 14 dB on FM (3.1 against 15.9 LSB) and 34 dB on
AM.

## Simulating

Any testbench runs with plain Verilator 5. Use `-y` so Verilator finds the
modules by file name:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_if_decoder_top rtl/fmam_pkg.sv tb/tb_if_decoder_top.sv
./obj_dir/Vtb_if_decoder_top
```

Replace `tb_if_decoder_top` with any other testbench name. Every testbench runs in
under a few seconds: the whole chip simulates about 30-40 ms of signal per
second of run time. Lint one module with:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/fmam_pkg.sv rtl/if_decoder_top.sv
```

## Changing it

- **`DEC`** on `sinc3_integrators` and `fmam_demodulator` sets the
  decimation ratio; the default comes from `fmam_pkg::DEC_DEFAULT`. It must
  be even and at least 26, so that the 24-clock square root ends before the
  next result arrives. If it
  changes, recheck the following:
  - the FM scale: `num/den` stays `sin(w)` at the tick rate;
  - the integrator width `ACC_W`: it needs `log2(8 * DEC^3) + 1` bits;
  - the divider's `DEN_DROP`: `den` must fit in 39 + `DEN_DROP` bits.
- **`FM_SHIFT`** on `fm_divider` trades FM range against resolution:
  `LSB = 21.4 MHz / (2 pi 2^FM_SHIFT)`.
- **`MISMATCH_PPM`** on `sd_modulator` sets the DAC element errors. Set it to 0
  for an ideal DAC.
- The behavioural models (`sampling_filter`, `sd_modulator`) are meant to
  be replaced by the real converter. The digital interface is `code`
  (0..16) and `sel_q` each 21.4 MHz tick, with `dac_sel` returned from
  `dwa_dem` in the same cycle.
