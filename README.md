# S-PLL: a subtraction-based, low-latency PLL for high-speed FM-AFM

In frequency-modulation atomic force microscopy (FM-AFM) a phase-locked
loop (PLL) tracks the resonance of an oscillating cantilever. Its output,
the frequency shift, is the signal that regulates the tip–sample distance.
The PLL is often what limits imaging speed. A conventional PLL multiplies
the input by its reference, and the low-pass filter that follows adds a long
delay *inside* the phase feedback loop.

This RTL implements the alternative architecture, the **S-PLL**:

* The phase of the input is measured by a fast, open-loop **phase detector**:
  mixing, a **high-pass** filter and a CORDIC.
* The feedback loop itself contains only a **subtraction**, a PI filter and a
  phase accumulator.

The filter latency is therefore outside the loop, and the loop can be tuned
much faster. Everything runs at one 100 MHz sample clock, matching 100 MSPS
converters. The RTL is synthesizable SystemVerilog-2017.

## Why a high-pass filter can replace the low-pass filter

Mix the deflection `A·cos(ωt+φ)` with `cos(ω0 t)` and `sin(ω0 t)` of a free-running
reference at the nominal resonance `ω0`, where `ω = ω0 + Δω`. Each product holds:

* a **sum term** at `2ω0 + Δω`, whose phase is `(2ω0+Δω)t + φ`;
* a **difference term** at `Δω`, i.e. near dc.

The conventional design keeps the dc term and needs a sharp low-pass filter
to reject the `2ω` term. The S-PLL keeps the *sum* term. The unwanted term
always sits near dc, whatever the cantilever frequency, so a second-order
high-pass filter removes it. At `2ω0` the filter is in its pass band, where
its group delay is a small fraction of a clock.

After the two high-pass filters:

    X = A/2 · cos((2ω0+Δω)t + φ)
    Y = A/2 · sin((2ω0+Δω)t + φ)

A CORDIC gives the amplitude `A/2` and the phase `θ = (2ω0+Δω)t + φ`.

## Block diagram

```
                 ┌──────────── phase detector (open loop) ─────────────┐
adc_deflection ─►│ quad_mixer ─► hpf_biquad (X) ─┐                     │
  (or loopback)  │   ▲  ▲        hpf_biquad (Y) ─┴► cordic_vectoring ──┼─► amplitude_o
                 │ cos sin                             │ θ             │
                 │  sincos_lut ◄─ phase_vco (ω0)       │               │
                 └─────────────────────┬───────────────┼───────────────┘
                                       │ ω0·t          ▼
                                       │        phase_comparator: φ = θ − ph2 ──► phase_o
                                       │               ▲                  │
                                       │   ph2 = (2ω0+Δω)t                ▼
                                       │        phase_vco (2ω0) ◄── loop_filter (PI) ──► freq_shift_o (Δω)
                                       ▼               │
              ph2 − ω0·t + φm = (ω0+Δω)t + φm ◄────────┘
                                       │
                               sincos_lut (cos) ──► dac_excitation
```

* **Phase feedback loop.** `phase_vco` #2 runs at `2ω0 + Δω`. The
  comparator subtracts its phase from `θ`. The PI loop filter adjusts `Δω`
  until `φ` stays constant. `Δω` is the PLL's frequency-shift output.
* **Excitation.** The excitation phase is `ph2 − ω0·t = (ω0+Δω)t`, so
  the cantilever is driven at the tracked frequency. The phase-modulation
  input `φm` is added before the cosine table.

## Modules

| file | role | latency |
|---|---|---|
| `spll_pkg.sv` | widths, types, `butter_hpf()` coefficient function, `hz_to_ftw()` | – |
| `phase_vco.sv` | phase-output VCO: 32-bit accumulator, step = centre + offset | 1 |
| `sincos_lut.sv` | sine/cosine from a phase, quarter-wave table of 1024 × 16 bits | 1 |
| `quad_mixer.sv` | deflection × cos and × sin, rescaled to 24 bits | 1 |
| `hpf_biquad.sv` | 2nd-order Butterworth high-pass, run-time coefficients | 1 |
| `cordic_vectoring.sv` | pipelined CORDIC, (X, Y) → (R, θ) | ITER+2 = 18 |
| `phase_comparator.sv` | φ = θ − VCO phase, wraps modulo one turn | 1 |
| `loop_filter.sv` | PI controller with anti-windup and clipping | 1 |
| `spll_top.sv` | the whole S-PLL and its measurement modes | – |

Each file begins with a description of its function, interface and timing.

## Number formats

| quantity | format |
|---|---|
| samples (ADC/DAC) | signed 16 bit, full scale ±32767 |
| phase accumulator, frequency tuning word (FTW) | 32 bit; one turn = 2³²; `f = FTW · 100 MHz / 2³²` (0.023 Hz per LSB) |
| phase words (`θ`, `φ`, `φm`) | 16 bit, one turn = 2¹⁶, read as signed (±π) |
| mixer / filter data | signed 24 bit; a full-scale product maps to 2²³ |
| HPF coefficients | signed 27 bit, 24 fraction bits (`hpf_coef_t` = {b0, a1, a2}) |
| LF gains | signed 24 bit, 8 fraction bits |

`freq_shift_o` is `Δω` as a signed FTW: multiply by `100e6 / 2^32` for hertz.
`amplitude_o` is `A/2` in mixer units. A full-scale deflection gives about
4.15 × 10⁶ after the HPF pass-band gain.

## Timing and latency

The detector latency, from a change of the deflection or of the excitation
phase to `phase_o`, is **22 clocks = 220 ns**:

| stage | clocks |
|---|---|
| cosine table | 1 |
| mixer | 1 |
| HPF | 1 |
| CORDIC | 18 |
| comparator | 1 |

This latency is outside the phase feedback loop. On an external input, the
loop contains only VCO → comparator → loop filter: 3 registers.

In loop-back the excitation travels through the detector, so the loop sees
the full delay. The measured effective delay is 22.6 clocks; the fraction
is the HPF group delay at 6 MHz.

## Configuring it for a cantilever

All tuning is done through run-time ports. One build serves cantilevers
from 100 kHz to 4 MHz.

1. **`f0_ftw`** = `round(f0 / 100 MHz · 2^32)`, e.g. `hz_to_ftw(3.0e6)`.
   The second VCO runs at `2·f0_ftw` internally.
2. **`hpf_coef`** = `butter_hpf(fc)`. The filter must pass `2·f0` and
   reject dc. The testbenches use `fc ≈ 0.78·f0`: `2·f0` is then within
   0.1 dB of the pass band, and the response is −40 dB at `fc/10`. For
   f0 = 3 MHz that is `fc = 2.3 MHz`. The coefficients are

       K = tan(π fc / fs),  n = 1 + √2 K + K²
       b0 = 1/n,  a1 = 2(K² − 1)/n,  a2 = (1 − √2 K + K²)/n,  b1 = −2 b0,  b2 = b0

3. **`kp`, `ki`**, the PI gains. Let `kp_eff = kp/256` and `ki_eff = ki/256`.
   A frequency error of `e` FTW LSB turns the phase by `e/2^16` phase LSB
   per clock, so on an external input the loop is

       s² + (kp_eff/2^16)·s + ki_eff/2^16 = 0   (s per clock)

   * `kp = 2^20`, `ki = 2^14` is critically damped with a 16-clock time
     constant. It locks to 1 % in 277 clocks.
   * In loop-back the 22-clock detector delay is inside the loop, and the
     gains must be far lower. A pure integrator acting on a delay of
     `L = 22.6` clocks crosses over at `ki_eff · L / 2^16` rad per clock:
     * `ki = 2048` gives a 46 kHz bandwidth;
     * `ki = 12288` gives 365 kHz.
   * As in any PLL, raise the gains to the largest stable value for the
     setup.

## Measurement modes

| `loop_enable` | `loopback` | use |
|---|---|---|
| 0 | 1 | Bare phase detector. The VCO at `2ω0` runs free and the LF integrator is held clear. `phase_o` follows `φm` with the detector latency, which is how the detector's bandwidth and delay are measured. |
| 1 | 1 | PLL without a cantilever. A phase modulation on `φm` acts like the phase shift caused by a tip–sample force, and the loop converts it into `Δω`. |
| 1 | 0 | Normal operation on the cantilever deflection from the ADC. |

When `loop_enable` falls, `freq_shift_o` reads 0 from the next clock on. An
assertion in `spll_top` checks this in simulation. `loopback` may change at
any time. After a switch the HPFs need about ten time constants
`1/(2π·fc)` to settle on the new input. That is about 70 clocks at
`fc = 2.3 MHz` and about 1400 clocks at 117 kHz. Discard the detector outputs
for that long.

## Closing the excitation loop through a cantilever

In FM-AFM the excitation drives the cantilever and its deflection comes back
as the input (`loop_enable = 1`, `loopback = 0`). The loop then holds a
constant phase between excitation and deflection. That phase includes:

* the cantilever's own lag, −90° at resonance;
* every delay on the way: converters and the detector;
* the fixed offset of the reference VCOs.

To drive the cantilever at its resonance:

1. Run open loop at `f0`.
2. Read the mean of `phase_o`.
3. Apply its negative as a constant on the phase-modulation input.
4. Close the loop. It now holds `φ = 0` exactly at resonance.

When the resonance then moves by `δ`, the oscillation follows by

    Δω = δ · Sc / (Sc + Sd),   Sc = Q·fs / (π·f0),   Sd = loop delay in clocks

Here `Sc` is the cantilever's phase slope at resonance, expressed in clocks
of delay. The loop delay also changes the phase as the frequency moves, so it
takes a small share of the correction.

| cantilever | Sc | share of δ |
|---|---|---|
| 3.44 MHz, Q = 7 | ≈ 65 clocks | 0.66 |
| 151 kHz, Q = 9 | ≈ 1890 clocks | 0.98 |

The smaller `Sd`, the closer the share comes to one. For short, fast
cantilevers the loop delay matters as much as the cantilever itself, which
is one more reason to keep the latency low. The share is a fixed
calibration factor for a given cantilever and delay.

Loop gains must be lower than on a clean input, because the cantilever's
response time sits inside the loop. The testbench uses:

| cantilever | `kp` | `ki` |
|---|---|---|
| ultra-short | 0 | 128 |
| standard | 0 | 4 |

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

`tb/cantilever_model.sv` is a behavioural, testbench-only model of the
cantilever and converters. It is a damped resonator plus a 10-clock delay.

| testbench | what it checks |
|---|---|
| `tb_phase_vco` | against a reference accumulator; output frequency by counting wraps |
| `tb_sincos_lut` | all 4096 addresses and random phases against `$sin/$cos` (±27 LSB, the 12-bit phase quantisation); symmetry; 1-clock latency |
| `tb_quad_mixer` | exact products |
| `tb_hpf_biquad` | against a double-precision model of the ideal Butterworth filter (±4 LSB); dc rejection; gain at 6 MHz and 100 kHz; impulse latency |
| `tb_cordic_vectoring` | 6000 vectors in all quadrants against `sqrt` and `atan2`; 18-clock pipeline latency |
| `tb_phase_comparator` | wrapped difference |
| `tb_loop_filter` | against a 64-bit model; saturation; anti-windup; clear |
| `tb_spll_top` | end to end at default sizes, described below |
| `tb_spll_cantilevers` | the phase-step and lock tests at 151.46 kHz, 150 kHz, 1.53 MHz (shift −1.6 kHz), 3.44 MHz and 3 MHz, and at the range ends 100 kHz and 4 MHz |
| `tb_spll_phase_modulation` | frequency response with a sinusoidal phase modulation in loop-back (lock-in demodulation): detector gain 0.99–1.00 up to 1 MHz, 0.94 at `0.9·f0` (for both f0 values), and delay 22.7 clocks; closed-loop −3 dB bandwidth 46.1 kHz at `ki = 2048` and 365 kHz at `ki = 12288`, compared with an integrator-plus-delay loop model; at 150 kHz the detector delay is 54 clocks (HPF group delay near its cut-off) and the bandwidth is 6.1 kHz at `ki = 128` and 24.3 kHz at `ki = 512`. With the higher gain, a single-tone test at 100 kHz (f0 = 3 MHz) and 10 kHz (f0 = 150 kHz) measures output latencies of 69 and 576 clocks. Both are within 25 % of the loop model, and the residual after removing the fundamental is 0.1 % and 5.2 % |
| `tb_spll_cantilever_response` | frequency response with the excitation loop closed through `cantilever_model` and a phase modulation added. The low-frequency gain is `P·2^16/(Sc+Sd)` (within 0.6 %). The −3 dB bandwidth is 12.6 kHz (`ki = 128`) and 142 kHz (`ki = 1024`) for the ultra-short cantilever, and 9.8 kHz (`ki = 4`) and 23.4 kHz (`ki = 16`) for the standard one |
| `tb_spll_with_cantilever` | excitation loop closed through `cantilever_model`: lock at resonance, then a resonance shift followed within 10 % of the formula above (measured 6605 Hz for 6584 Hz predicted, and 193.4 Hz for 196.5 Hz) |

`tb_spll_top` covers:

* in open loop, a 45° phase step appears in full after exactly 22 clocks;
* in closed loop on a generated sine at +50 kHz and −30 kHz, the shift
  settles within 0.2 % (measured 49 999.99 Hz);
* in loop-back, a phase step retunes the loop by the amount the loop delay
  predicts.

To run any testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl +libext+.sv \
        rtl/spll_pkg.sv tb/tb_spll_top.sv --top-module tb_spll_top
    ./obj_dir/Vtb_spll_top

Each testbench runs in a few seconds.

## What is taken from the published S-PLL and what is not

**From the published design:**

* the architecture and signal flow: mixing with `cos/sin(ω0 t)`, high-pass
  filters, a CORDIC R/θ converter, a subtraction comparator against a
  phase-output VCO at `2ω0 + Δω`, a PI loop filter, and an excitation phase
  equal to the difference of the two VCO phases;
* second-order Butterworth high-pass filters;
* the 100 MHz clock and converter rate;
* the phase-modulation input and the internal loop-back used to measure it.

**Choices made here.** The source gives none of these:

* all word widths;
* the table size of the sine converter;
* the CORDIC iteration count and pipelining;
* the filter structure and coefficient format;
* the HPF cut-off rule;
* the fixed-point PI filter with saturation;
* the register stages, and therefore the latencies above;
* the mode-control encoding;
* clearing the integrator while the loop is open;
* the synchronous, active-high reset.

**Not included:**

* The ADCs, DACs, cantilever, photothermal excitation and optical
  deflection sensor are analog or external. The top brings their digital
  words out as ports.
* The conventional multiplication-based PLL, with its low-pass filters,
  was only a baseline for comparison with this design, so it is not built.
* No gain values are given for the loop filter. The measured bandwidths
  (e.g. 305 kHz at 3 MHz without a cantilever, 165 kHz with an ultra-short
  cantilever) depend on those gains and on the converters' delay, so the
  testbenches check loop behaviour rather than those numbers.

## Known limitations

* The 12-bit sine-table address limits the phase resolution of single
  samples to ±1/8192 turn, about ±0.04°. The loop averages this.
* In loop-back with the loop closed, the loop settles at a frequency offset
  set by the detector delay. This is expected: `φ = φm − L·Δω + const`.
* At `f0 = 150 kHz` the frequency-shift output carries more residual than at
  3 MHz. With a 10 kHz modulation, the part that is not at the modulation
  frequency is about 5 % of the response, against 0.1 % at 3 MHz. The cause
  is mainly the sine-table quantisation. At a low `f0` the phase steps
  slowly through the table, so the quantisation error changes slowly and
  falls inside the loop bandwidth instead of averaging out. With
  `LUT_ADDR_W = 14` the residual falls to 1.8 %. Lowering the HPF cut-off
  does not help: at `0.4·f0` the residual is 6.8 %.
* The detector response is irregular where the modulation frequency equals
  `f0`. A modulation sideband then falls onto dc and onto `2·f0`. In
  simulation the modulation is phase-coherent with the carrier, so the
  result depends on their relative phase. The gain was 0.65 at 3 MHz (a
  dip) but 1.34 at 150 kHz (a peak). At `2·f0` there is only a slight dip,
  to about 0.49 from about 0.51. Do not use modulation frequencies near
  `f0` and `2·f0`.
