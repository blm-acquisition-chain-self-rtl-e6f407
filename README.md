# BLM acquisition chain self-test

Synthesizable SystemVerilog for the self-test functions of a beam loss monitor (BLM)
acquisition channel. Each channel runs from an ionization chamber through a
current-to-frequency converter to "running sums" computed on a BLMTC card. To check that
the chain works, a small sine is added to the command of the high-voltage source that
biases the chamber. The self-test then compares that reference sine with what comes out
at the end of the chain. This is a harmonic analysis: one frequency, one gain, one phase.

Two independent functions are provided. They sit side by side in the top module
`blm_selftest`, which is meant to be dropped into the combiner card's FPGA:

| | Instant value test (`instant_value_selftest`) | Long term analysis (`long_term_selftest`) |
|---|---|---|
| Purpose | Quick go/no-go before each machine cycle: broken cable, short circuit | Slow drift of gain and phase from radiation and ageing |
| Inputs | reference sine and running sum, 16 bits each | running sum only, 10 relevant bits |
| Method | full circular cross-correlation of reference and running sum, 256 lags | zero-lag correlation with ideal sine and cosine tables |
| Result | 7-bit gain indication, 8-bit phase (360/256 degrees per step) | two signed 16-bit correlation values; gain and phase are computed off-line |
| Duration | one modulation period + 256 x 256 clocks (65.5 ms at 1 MHz) | one modulation period + 2 clocks |

Everything runs on the host's 1 MHz clock with an active-low synchronous reset. One
modulation period is always 256 samples. A strobe, `new_data_strobe`, marks each new sine
value of the modulation generator together with the matching running sum.

## Signal path

```
              +-------------+    +-----------+
 iv_ref_in -->| mask | IIR  |--->| RAM 256   |---+
              +-------------+    +-----------+   |   +----------------------+
                                                 +-->| MAC, 256 x 256 lags  |--> iv_gain
              +-------------+    +-----------+   |   | max / min / argmax   |--> iv_phase
 iv_rs_in  -->| mask | IIR  |--->| RAM 256   |---+   +----------------------+
              +-------------+    +-----------+        iv_control (Moore FSM) --> iv_busy
                                  iv_gain, iv_phase --> iv_range_check (start-up window) --> iv_status_ok

              +-------------+        +--------+
 lt_rs_in  -->| 10 LSBs| IIR|---+--->|x  sin  |--> sum --> /256 --> lt_r_sin
              +-------------+   |    +--------+
                                +--->|x  cos  |--> sum --> /256 --> lt_r_cos
                                     +--------+  (sine_rom, lt_mac)    --> lt_busy
```

## The low-pass filter (`iir_filter`)

Every input goes through the same second-order Butterworth low-pass filter. This lets
the blocks work on noisy inputs, for example a reference taken from the high-voltage
source's feedback monitor instead of the generator's digital value. The filter is the
bilinear-transform design with its cut-off at twice the modulation frequency. With 256
samples per period that gives `Ts*wc = 4*pi/256`, whatever the actual modulation frequency.
With `K = 2/(Ts*wc) = 128/pi`:

```
C  = K^2 + sqrt(2) K + 1 = 1718.67
b2 = 2 - 2 K^2           = -3318.09
b1 = K^2 - sqrt(2) K + 1 = 1603.43
y[n] = ( x[n] + 2 x[n-1] + x[n-2] - b2 y[n-1] - b1 y[n-2] ) / C
```

The coefficients are normalised by C and stored as signed 16-bit words with 14 fractional
bits: `B0 = 10`, `A1 = -31631`, `A2 = 15285` (in `blm_pkg`). Things to know:

* **DC gain is 40/38 (1.053), not 1.** The rounded coefficients cause this. At the
  modulation frequency the gain is 1.053 x 0.970. The output is therefore two bits wider
  than the input, so a full-scale input never clips. The instant value test puts both
  signals through identical filters, so this factor and the filter's phase lag (43.3
  degrees at the modulation frequency) cancel in the phase. The long term analysis
  includes them in what it measures.
* **Extra history precision.** The poles sit at radius 0.966, close to z = 1. If the
  output history were rounded to integers, the rounding error would be amplified about
  430 times at DC. The two history registers therefore carry 14 fractional bits
  (`FRAC_W`). The coefficients stay 16 bits.
* **The filters never stop.** They update on every strobe, also between tests, because an
  IIR filter needs about two periods to settle. Do not start a test until the filters
  have seen at least two periods of the current signal.

Each filter does one sample per strobe. `y_valid` pulses one clock after the strobe.

## Instant value test

### Sequencing (`iv_control`)

A Moore machine with four states: `IV_IDLE`, `IV_ACQ`, `IV_START` and `IV_PROC`.

* `IV_IDLE`: `busy` is low. `start` is a level: while it is high, the next clock enters
  `IV_ACQ`.
* `IV_ACQ`: each filtered sample pair is written into the two 256-word RAMs
  (`sample_ram`). The first pair stored belongs to the strobe that arrived in the clock
  where `start` was seen (or the next strobe after it). After 256 pairs, one full period,
  the machine moves on.
* `IV_START`: a one-clock state that launches the correlator.
* `IV_PROC`: waits for the correlator's `done`, then goes back to idle, and `busy` falls.

`start` is ignored while `busy` is high. If `start` is still high when a cycle ends, a new
cycle begins.

### The sliding correlation (`iv_correlator`)

This is the heart of the block. With the reference period `r[0..255]` and the
running-sum period `s[0..255]` in the RAMs, the engine computes, for every lag
`k = 0..255`:

```
Corr[k] = sum over n = 0..255 of  r[n] * s[(n + k) mod 256]
```

A single multiply-accumulate unit does this at one product per clock. The inner index
`n` runs fastest and the lag `k` steps once every 256 clocks. The RAM read addresses are
simply `n` and `n + k`; the 8-bit wrap-around provides the circular shift. Reads are
registered, so a small pipeline tags each product with "first of lag", "last of lag" and
the lag number. The accumulator restarts on "first" and is finished on "last". At each
lag's last product the finished sum is compared with the running maximum and minimum. The
lag of the maximum is recorded; ties keep the lowest lag.

If the running sum is the reference delayed by `d` samples, `Corr[k]` is a cosine in `k`
that peaks at `k = d`. Hence:

* **phase** = lag of the peak = delay of the running sum behind the reference, in samples.
  Multiply by 360/256 for degrees.
* **gain indication** = `max - min` of `Corr`. For sines of amplitudes `Ar` and `As` this
  is `256 * Ar * As`. It is shifted right by `GAIN_SHIFT` (20 by default) and saturated
  at 127.

A constant offset on either signal adds the same amount to every lag. It therefore changes
neither the peak position nor `max - min`, so the large offsets of running-sum data do no
harm. A chain that passes no modulation (broken cable, dead chamber) gives a flat
correlation: gain near 0, and a phase that means nothing.

These values are coarse on purpose. They are meant to be compared, at each run, with a
range of values recorded at start-up. Fine ageing effects are the long term analysis'
job.

**Timing.** The run takes exactly 256 x 256 clocks of products plus a 3-clock pipeline
tail. `busy` is high from the clock after `start` until gain and phase are valid: 256
strobe intervals plus about 65 540 clocks. Results hold until the next cycle completes.

### Input masking

`REF_BITS` and `RS_BITS` keep only that many LSBs of each input. The offset-carrying
MSBs are forced low, which shrinks the filters and RAMs. They default to 16, so nothing is
masked. Set them from a study of the actual signals. The masked value must still hold the
whole signal without wrapping.

### Status against start-up values (`iv_range_check`)

The instant value results are only meaningful compared with what the same channel gave
when it was known to be good. `iv_range_check` holds the last verdict. In the clock after
`busy` falls, it compares the gain with `[gain_min, gain_max]` and the phase with
`[phase_min, phase_max]`. It then sets `status_ok`, plus a separate error bit for gain and
for phase. The phase is circular. A window with `phase_min > phase_max` wraps through
zero: for example, 250..5 accepts 250-255 and 0-5. The windows are inputs: recording them
at start-up and telling the operators which channel failed is left to the host.

## Long term analysis

This is a transfer-function analyser in the style of Elsden and Ley's pulse-rate
analyser. The filtered running sum `y` is multiplied, sample by sample, with an ideal sine
and an ideal cosine of amplitude A = 128 (`sine_rom`). Two accumulators (`lt_mac`) sum the
products over exactly one period. The results are divided by 256 and saturated to
16 bits:

```
r_sin = (1/256) * sum y[n] * round(128 sin(2 pi n/256))
r_cos = (1/256) * sum y[n] * round(128 cos(2 pi n/256))
```

If `y = Ay sin(2 pi n/256 - phi)`, then `r_sin = 64 Ay cos(phi)` and
`r_cos = -64 Ay sin(phi)`. That is, `(A/2) Ay` times the cosine and sine of the lag,
with A = 128. A remote computer recovers the amplitude as
`Ay = 2 sqrt(r_cos^2 + r_sin^2) / A` and the phase as `arctan(r_cos / r_sin) = -phi`.
Dividing `Ay` by the stimulus amplitude gives the gain. The classic analyser formula,
`|H| = sqrt(R_cos^2 + R_sin^2) / A^2`, is the same thing for correlations normalised to
a stimulus of amplitude A. The remote computer follows gain and phase over months. The measured path includes the
high-voltage source, the chamber, the electronics, the running sums and this filter.

There is no sliding window. **`start` must come at the origin of the modulation sine**:
the sample taken with (or right after) `start` is multiplied by table entry 0. In the host
design this means a begin-of-period signal from the modulation generator, applied a few
periods after the filter has started. `busy` rises the clock after `start` and falls when
`r_sin` and `r_cos` hold the new values.

Only `RS_BITS = 10` LSBs of the running sum are used. That was enough for the channel
this was tuned on; change it for other channels. The DC part of the masked signal cancels
exactly, because each rounded table sums to zero over a period. The upper input bits are
unused by design.

## Top-level interface (`blm_selftest`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 1 MHz host clock |
| `rst_n` | in | 1 | active-low synchronous reset |
| `new_data_strobe` | in | 1 | one-clock strobe: new modulation sample and running sums present |
| `iv_start` | in | 1 | instant value test request (level, taken when idle) |
| `iv_ref_in` | in | 16 | reference (stimulus) sample |
| `iv_rs_in` | in | 16 | running sum for the instant value test |
| `iv_busy` | out | 1 | instant value test running; read results after it falls |
| `iv_gain` | out | 7 | gain indication |
| `iv_phase` | out | 8 | phase in 1/256 of a period |
| `iv_gain_min`, `iv_gain_max` | in | 7 | start-up window of the gain indication |
| `iv_phase_min`, `iv_phase_max` | in | 8 | start-up phase window (wraps if min > max) |
| `iv_status_valid` | out | 1 | a result has been checked since reset |
| `iv_status_ok` | out | 1 | last result inside both windows |
| `iv_gain_err`, `iv_phase_err` | out | 1 | which window was left |
| `lt_start` | in | 1 | long term analysis request, at a period origin |
| `lt_rs_in` | in | 16 | running sum for the long term analysis |
| `lt_busy` | out | 1 | long term analysis running |
| `lt_r_cos`, `lt_r_sin` | out | 16 | signed correlation results |

The combiner's control unit, which would drive `*_start` and read the results, is not part
of this RTL. Neither are the modulation generator and the acquisition chain itself. The
two functions share no state and may run at the same time.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `blm_pkg` | `N_SAMPLES`, `DATA_W` | 256, 16 | samples per period, input width |
| `blm_pkg` | `FILT_B0/A1/A2` | 10, -31631, 15285 | filter coefficients, Q2.14 |
| `iir_filter` | `IN_W`, `OUT_W`, `FRAC_W` | 16, IN_W+2, 14 | |
| `instant_value_selftest` | `REF_BITS`, `RS_BITS` | 16, 16 | input masks |
| `instant_value_selftest` | `GAIN_W`, `GAIN_SHIFT` | 7, 20 | gain scaling (sensitivity) |
| `long_term_selftest` | `RS_BITS`, `AMP`, `REF_W`, `OUT_W`, `OUT_SHIFT` | 10, 128, 9, 16, 8 | |

`N_SAMPLES` must be a power of two: the correlator's circular addressing relies on the
address wrap-around.

## Design choices beyond the original description

The description this RTL follows gives the structure, the filter equation, the
256-sample period, the 256 x 256-clock processing time, the widths of the inputs and
outputs, and the amplitude 128 of the references. These points were decided here:

* **Phase is 8 bits.** The gain and phase were described as 7 bits each, but the phase
  also counts lags over 256 samples (360/256 degrees per step), which needs 8 bits.
* **Gain scaling.** `GAIN_SHIFT = 20` with saturation at 127. The original sensitivity
  tuning is not known. With it, signal amplitudes of a few hundred counts give mid-range
  values.
* **Filter.** The coefficients use Q2.14. The output history has 14 extra fractional bits
  and the output is 2 bits wider than the input (see above).
* **Reference tables.** They are 9 bits wide, so that +128 is exact. They are computed at
  elaboration from `$sin` and `$cos`, rounded half away from zero.
* **Long term outputs.** They are the accumulators divided by 256 (an arithmetic shift)
  and saturated to 16 bits.
* **Sample strobe on the long term block.** The long term analysis has a
  `new_data_strobe` input, like the instant value test, and it has a `busy` output.
* **Reset.** The reset is synchronous. The RAM contents are not reset.
* **Status check.** A window check with a circular phase window. Only comparison with
  start-up values was specified.
* **Combiner integration.** The top gives both functions a shared strobe and separate
  data inputs. How the combiner multiplexes 256 channels (16 BLMTC cards x 16 channels)
  onto these blocks is left to the host. One instant value test takes one period plus
  65.5 ms per channel.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_iir_filter` | every output against a double-precision model (within 2 LSB); the one-clock latency; DC gain 40/38; gain at the modulation frequency; a full-scale input without clipping |
| `tb_sample_ram` | random write/read with a shadow copy, registered read |
| `tb_iv_correlator` | gain and phase against all 256 correlations computed in the testbench; phase equal to the applied delay; saturation; random data; run length 65 536..65 540 clocks; a start during a run is ignored |
| `tb_iv_control` | write count and order, the `corr_start` pulse, `busy` timing, no writes while idle or processing |
| `tb_instant_value_selftest` | chain model (delayed, scaled, offset, noisy sine); bit-exact gain and phase from a fixed-point model; phase equal to the delay; gain against the amplitude estimate; `busy` duration |
| `tb_iv_range_check` | verdicts against a circular-distance formula, wrapping windows, one-clock timing after `busy` falls, hold between results |
| `tb_sine_rom` | both tables against 128 sin/cos; symmetry; zero sum; peaks of +/-128 |
| `tb_lt_mac` | both accumulators against 64-bit sums; clear; full-scale period |
| `tb_long_term_selftest` | bit-exact `r_sin`/`r_cos`; agreement within 3 % with `64 Ay cos/sin(phi)` including the 43.3-degree filter lag; input masking; `busy` duration |
| `tb_blm_selftest` | end to end at full size: both tests started together; a broken chain (gain 0, status error); saturation with a stray start; status inside and outside the window; every mechanism counted |

The testbenches' fixed-point models restate the filter and correlation equations
independently of the RTL. The double-precision and analytic checks confirm that those
equations mean what they should.

Simulating with Verilator (5.x), for example the full design:

```
verilator --binary --timing --assert -Wall -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/blm_pkg.sv tb/tb_blm_selftest.sv --top-module tb_blm_selftest
./obj_dir/Vtb_blm_selftest
```

Replace the testbench name to run another one. `blm_pkg.sv` must be listed first. All
other modules are found through `-y rtl`. The full-size end-to-end test takes a few
seconds.
