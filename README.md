# Fourth-order sigma-delta ADC with a sinc⁵ + FIR decimation filter

A voice-band analog-to-digital converter. A one-bit modulator samples the input at
1024 kHz, 128 times the 8 kHz output rate, for a 3.6 kHz passband. The modulator's loop
filter is fourth order. It pushes the quantisation noise of its one-bit decisions out of
the voice band much harder than the usual second-order loop, which typically reaches
about 80 dB of dynamic range. The aim is a dynamic range of 90 dB or more. A two-stage
decimation filter then removes the shaped noise and brings the rate down to 8 kHz:

```
 ain ──► 4th-order ΣΔ modulator ──1 bit @ 1024 kHz──► sinc⁵ comb, ↓32 ──27 bit @ 32 kHz──► 29-tap FIR, ↓4 ──16 bit @ 8 kHz──► dout
        (sd_modulator4, model)                     (cic_decimator)                     (fir_decimator)
                                                   └──────────────── decimation_filter ───────────────┘
```

The two filter stages are synthesizable RTL. In silicon the modulator is a
switched-capacitor circuit, so here it is a real-valued behavioural model. Its job is to
give the filters a realistic bit stream in simulation. A continuous-time anti-aliasing
filter sits in front of the modulator: a Sallen-Key biquad,
H(s) = 0.5012 / (s² + 0.6449 s + 0.7079), with s normalised to an unstated frequency.
It is not modelled, so the top-level input `ain` is that filter's sampled output.

## The modulator loop (`sd_modulator4`)

The loop is a chain of four delaying integrators, each z⁻¹/(1 − z⁻¹). It has weighted
feed-forward paths into the quantiser and one local resonator around the last two
integrators. Per sample:

```
x1 ← x1 + 0.2 ·(ain − y)
x2 ← x2 + 0.26·x1
x3 ← x3 + 0.26·(x2 − 0.002·x4)      ← resonator feedback b = 0.002
x4 ← x4 + 0.26·x3
v  = 2.6·x1 + 3.4·x2 + 3.2·x3 + 1·x4
y  = +VREF if v ≥ 0 else −VREF        (bitstream = 1 for +VREF)
```

How the gains divide up:

- The feed-forward weights (2.6, 3.4, 3.2, 1) place the poles of the noise transfer
  function (NTF). The NTF is designed as a fourth-order Chebyshev-I high-pass.
- The small resonator term moves one pair of NTF zeros off DC into the band. That widens
  the region of deep noise suppression.
- The integrator gains (0.2 and three times 0.26) are scaled to keep the internal states
  small.

These are the final, scaled coefficients of the design. The unscaled feed-forward set
they came from was a₁..a₄ = 0.0041, 0.0410, 0.2190, 0.6730, with b₁ = 0.0005.

The resulting loop, as given for the design, is:

```
NTF(z) = (1 − 3.9995z⁻¹ + 5.999z⁻² − 3.9995z⁻³ + z⁻⁴) / (1 − 3.324z⁻¹ + 4.202z⁻² − 2.375z⁻³ + 0.5011z⁻⁴)
```

This polynomial is what the loop above gives when the one-bit quantiser is linearised
as a gain of 1.3. The numerator's resonator zeros are as the integrators are drawn (all
four delaying), which places them a hair outside the unit circle (factor 1.00007). That
is harmless inside the closed loop.

The quantiser compares with 0 and has no hysteresis. It feeds back ±VREF with VREF = 1;
both are choices of this model. The specified input limit is 0.8 V peak to peak, i.e.
±0.4 with VREF = 1; beyond it the loop is said to go unstable. The model itself holds up
to an amplitude of about 0.54 and diverges at 0.70. All states are real numbers; there
are no capacitor ratios, mismatch or noise.

## Stage 1: fifth-order comb, decimate by 32 (`cic_decimator`)

H1(z) = (1/32⁵)·((1 − z⁻³²)/(1 − z⁻¹))⁵. This is built the multiplier-free "running sum"
way, as five cascaded integrators at 1024 kHz followed by five combs at 32 kHz:

- **Width.** A ±1 input grows by 32⁵ = 2²⁵, so every register is 2 + 25 = 27 bits. The
  integrators are allowed to wrap around, because two's-complement wrap cancels exactly
  in the combs when the width covers the full gain. Do not narrow the integrators
  without pruning carefully.
- **Scaling.** The 1/32⁵ factor is not computed. The output word is simply read with 25
  fractional bits, so +1.0 corresponds to 2²⁵.
- **Timing.** The integrator sum for the current bit is formed combinationally, and the
  comb chain runs in the same clock. The 32nd accepted bit after reset, and every 32nd
  after it, yields `out_valid` one clock after that bit's clock edge.
- **Why five stages.** Fifth order puts deep notches at every multiple of 32 kHz. That
  suppresses the modulator's fourth-order-shaped noise before it can alias into the band
  at 32 kHz.

## Stage 2: 29-tap FIR, decimate by 4 (`fir_decimator`)

An equiripple, linear-phase low-pass designed at the 32 kHz rate:

| Edge | Value | At 32 kHz |
|---|---|---|
| Passband edge | 0.11 | 3.52 kHz |
| Stopband edge | 0.14 | 4.48 kHz |
| Passband ripple | 3 dB | |
| Stopband attenuation | 32 dB | |

The 29 taps are symmetric. The first 15 (h0…h14, where h14 is the centre) are listed in
`sd_adc_pkg`. They are rounded to Q1.15 during elaboration by `fir_coef()`, so the real
values are the source and no table has to be kept in sync. The design chose an FIR over
an elliptic IIR (order 4) for its linear phase. The IIR option is not built.

**Schedule.** Only every fourth filter output is needed, so the filter is evaluated once
per four inputs, by a single multiplier:

- New samples go into a 29-word circular buffer.
- The 4th sample (and every 4th after it) starts a sum. Tap 0 multiplies that newest
  sample. For each following tap the read pointer steps back one sample, one tap per
  clock, for 29 clocks.
- `out_valid` rises exactly 30 clocks after the edge that took the starting sample.
- Stage-1 words arrive every 32 clocks, so the 29-clock sum always finishes in time. Two
  assertions check this: one in `fir_decimator` (no input while `busy`) and one in
  `decimation_filter`. A faster input rate, or more taps than the input spacing allows,
  would corrupt the oldest sample before it is used.

**Number formats.**

| Quantity | Format / width |
|---|---|
| Input | 27 bits, 25 fractional |
| Taps | 16-bit Q1.15 |
| Accumulator | 48 bits, 40 fractional |
| Output | Q1.15: shifted right by 25 with round-half-up, then saturated to 16 bits |

`overflow` marks a saturated word.

**Gain.** The taps sum to 1.2625. DC and low frequencies therefore come out 26% louder,
and a DC input above about 0.79 saturates. The 3 dB passband ripple is real: at 1 kHz
the filter chain's gain is 0.8125, at 250 Hz it is 1.22, and at 3 kHz it is 1.09. Apply
a gain correction downstream if a flat response matters.

**4 kHz attenuation.** The stated goal was 32 dB of attenuation at 4 kHz, which is the
Nyquist frequency of the output. The taps actually give about 12 dB there, and reach
32 dB only from 0.14 (4.48 kHz) up. The taps are used as given.

## Top level (`sd_adc`) and interfaces

Everything runs on the single 1024 kHz sampling clock `clk`, with the active-low
asynchronous reset `rst_n`. The slower rates are strobes, not clocks:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `ain` | in | real | modulator input, relative to VREF (keep within ±0.4) |
| `bitstream` | out | 1 | modulator decision (1 = +1) |
| `mid_dout` / `mid_valid` | out | 27 / 1 | stage-1 word, every 32 clocks |
| `dout` / `out_valid` | out | 16 / 1 | Q1.15 output word, every 128 clocks |
| `overflow` | out | 1 | output word saturated |

The first output word comes 31 clocks after the edge that takes the 128th bit after
reset: 1 clock in stage 1, then 30 in stage 2. The filters settle after about 35
stage-1 words, roughly 9 output words: 156 input bits for the comb, then 29 taps of FIR.
`decimation_filter` is the synthesizable block to reuse on its own, with an `in_valid`
strobe on its bit input. After coarse synthesis it has about 150 word-level cells and
1170 flip-flop bits, and its 29 × 27-bit sample buffer is a small memory.

## Source design versus choices made here

Taken from the original design:

- the rates and decimation factors (1024 → 32 → 8 kHz, OSR 128);
- H1(z);
- the modulator's topology and every gain;
- the 29 FIR taps and their band edges;
- the 16-bit output resolution.

Chosen here:

- the quantiser's threshold and levels, and VREF = 1;
- all word widths and fixed-point formats, rounding and saturation;
- the serial multiply-accumulate FIR schedule and the circular buffer;
- the integrator/comb realisation of the running sum;
- single-clock operation with strobes, the reset, and the decimation phase after reset;
- taps where the listing's two mirrored halves disagree in the last digit. The longer
  value was used: 0.025681, 0.046984 and −0.0050503.

Not provided:

- the anti-aliasing filter;
- any circuit-level model of the switched-capacitor modulator.

## Verification

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.

| Testbench | What it checks |
|---|---|
| `tb_cic_decimator` | Random bit densities with gaps in `in_valid`. Every word is compared with a direct convolution by the (Σz⁻ᵏ)⁵ impulse response, along with the exact `out_valid` timing. |
| `tb_fir_decimator` | Random inputs, then full-scale steps. Every word is compared bit-exactly with a direct 29-tap convolution, including rounding, saturation and the overflow flag. Also checks the 30-clock latency and that only every 4th input produces a word. |
| `tb_decimation_filter` | A first-order ΣΔ stream of a 600 Hz sine through both stages. Bit-exact checks at 32 kHz and 8 kHz, output spacing of 32 and 128 clocks, and the output amplitude. |
| `tb_sd_modulator4` | The bit-stream mean equals DC inputs from −0.35 to 0.35 (within 2·10⁻³), no long runs of equal bits, low-pass residue of a zero input, and tracking of a 1 kHz sine. |
| `tb_sd_adc` | Whole converter at default parameters on a 1 kHz sine of amplitude 0.2. Every word is checked bit-exactly against a reference driven by the modulator's own bits. A sine fit must give the computed gain within 2% and an SNR above 70 dB. |
| `tb_sd_adc_sweep` | Amplitudes 0.09…0.5395 at 1 kHz (gain within 2%, SNR > 65 dB), plus a 6 kHz stopband tone that must come out at least 30 dB down. |

Results of the full-size runs:

| Input | Result |
|---|---|
| 1 kHz, amplitude 0.2 | fitted output 0.1625 (expected 0.1625), SNR 87 dB |
| 1 kHz, amplitudes 0.09 to 0.54 | SNR 79–94 dB |
| 6 kHz tone | alias 41.6 dB down |

These SNR figures are set mostly by rounding to the 16-bit output word; a full-scale
16-bit sine allows about 98 dB. That clears the 90 dB dynamic-range goal but is well
below the modulator's own noise floor (a peak SQNR around 124 dB in floating point). A
wider output word would carry more of it. The modulator model is ideal, so the figures say nothing
about a real circuit. The reference arithmetic
shared by the filter tests is in `tb/tb_ref_pkg.sv`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sd_adc_pkg.sv tb/tb_ref_pkg.sv tb/tb_sd_adc.sv --top-module tb_sd_adc
./obj_dir/Vtb_sd_adc
```

Replace `tb_sd_adc` with any other testbench name. Each one runs in well under a second.
To change the filter sizes, override the parameters of `decimation_filter` (`N`, `R`,
`M`, `TAPS`, `OUT_W`). To change the taps, edit `FIR_H` in `sd_adc_pkg.sv`. If you change
`TAPS`, keep it no larger than the number of clocks between stage-1 words. The reference
package in `tb/` hard-codes the default sizes.
