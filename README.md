# Low-power audio delta-sigma DAC (18-bit, 44.1 kHz, 64x, 15-level)

This is a complete audio digital-to-analog converter chain. It turns 18-bit
PCM at 44.1 kHz into a 15-level stream at 2.8224 MHz. That stream drives
15 equal capacitors of a switched-capacitor DAC, followed by a first-order
RC low-pass filter. The main ideas:

- **Oversample, then shape the noise.** A 64x interpolator lifts the
  sample rate. A third-order modulator then moves most of the quantization
  noise of a coarse 15-level quantizer above the audio band.
- **Multibit, not 1-bit.** Fifteen levels keep the loop stable and cut the
  out-of-band noise, so one RC pole is enough after the DAC. The cost is
  that the 15 unit elements must match.
- **Data weighted averaging (DWA).** It rotates which elements are used,
  so element mismatch turns into high-frequency noise, not harmonic
  distortion.
- **Cheap arithmetic.** All modulator coefficients are sums of two powers
  of two, so it has adders and shifts but no multipliers. The FIR filters
  share one multiply-accumulate unit per stage.

The digital part (`ds_dac_digital` and below) is synthesizable
SystemVerilog. The analog part (`ds_dac_analog`, which holds `dct_sc_dac`
and `rc_lpf`) is a set of behavioural real-number models, so the whole
converter can be simulated end to end.

## Signal path and rates

| stage | module | rate out | what it does |
|---|---|---|---|
| sample request | `ds_dac_digital` | 44.1 kHz | `pcm_req` pulses every 64 clocks; `pcm_in` is taken in that cycle |
| 2x FIR, 48 taps | `fir48_x2` | 88.2 kHz | removes the image around 44.1 kHz |
| 4x FIR, 20 taps | `fir20_x4` | 352.8 kHz | removes the images around 88.2 kHz and its multiples |
| 8x hold (sinc) | `sinc_zoh` | 2.8224 MHz | repeats each sample 8 times; no droop correction |
| modulator | `crfb_mod` | 2.8224 MHz | third-order CRFB loop, level -7..+7 |
| thermometer | `therm_encoder` | - | level becomes level+8 ones out of 15 |
| DWA | `dwa_encoder` | 2.8224 MHz | rotates the ones to the next unused elements |
| SC DAC (model) | `dct_sc_dac` | held | vout = vref * (selected capacitance)/(total) |
| RC low-pass (model) | `rc_lpf` | - | one pole at 496 kHz |

There is one clock, the 2.8224 MHz main clock. Everything else runs on
strobes derived from it. `ds_dac` is the top: the digital part plus the
analog part. The split matches a build where the digital logic runs in
an FPGA and the DAC and filter sit on their own mixed-signal chip.
`ds_dac_analog` uses the chip's signal pins as its ports: Vin1..Vin15,
Vclk, Vref and Vout. It has no bias or supply pins.

## The interpolation filter

The two FIR stages use one engine, `polyphase_fir`. An interpolate-by-L
filter with TAPS taps splits into L branches of K = TAPS/L taps. Branch p
uses the coefficients h[L*k+p]. It only ever multiplies real input
samples, never the stuffed zeros. The engine keeps the last K inputs in a
circular RAM. The coefficients sit in a ROM in the wrapper (`fir48_x2`,
`fir20_x4`). The ROM stores half the response and mirrors the address,
because the response is symmetric.

One MAC works through a branch in K clocks. The time budget per output is:

| stage | K (MACs per output) | clocks per output |
|---|---|---|
| 2x, 48 taps | 24 | 32 |
| 4x, 20 taps | 5 | 8 |

So both stages run at the 2.8224 MHz clock with one multiplier each.

Timing of one stage: branch p starts p*PERIOD+1 clocks after `in_valid`.
Its result comes K+1 clocks after that, with a one-clock `out_valid`. So
the stage emits L samples PERIOD clocks apart, and the first one comes
K+2 clocks after the input. Each stage is timed by its input strobe. The
chain needs no sequencer beyond the divide-by-64 that makes `pcm_req`.
The first interpolated sample reaches the modulator 34 clocks after the
first `pcm_req`.

Arithmetic: 18-bit samples and 18-bit coefficients with 16 fraction bits.
Products are summed at full precision, rounded to nearest, and saturated
to 18 bits. The RAM is cleared at reset, so the filter starts from
silence.

The coefficients are a Kaiser-windowed sinc (beta = 4.55). The cutoff is
half the stage's input rate, i.e. fc = 1/(2L) of its output rate. The
response is scaled to a DC gain of L, so each branch has unity gain:

    h[n] = L * 2fc * sinc(2fc (n - (TAPS-1)/2)) * kaiser(n, 4.55) / sum(...)
    rounded to 18-bit signed, 16 fraction bits

The tap counts, ratios, cutoffs and word lengths follow the reference
design. The coefficient values are this implementation's own. With a
passband to 20 kHz, 48 taps cannot reach the 0.03 dB ripple and 50 dB
stopband targeted for the original filter: this set gives about 27 dB at
the 24.1 kHz stopband edge. Measured on the whole chain with a 1 kHz
tone, the image at 43.1 kHz is about 80 dB down and the one at 87.2 kHz
about 58 dB down. To use a different filter, replace the `HALF` table in
the wrapper; the engine does not change.

## The modulator (`crfb_mod`)

This is the part most worth understanding before changing anything. The
loop has three integrators. v is the quantized output fed back with unit
gain into all three:

    x1[n+1] = x1[n]   + b1*u[n]               - v[n]   (delaying)
    x2[n]   = x2[n-1] + a1*x1[n] - g1*x3[n]   - v[n]   (delay-free)
    x3[n+1] = x3[n]   + a2*x2[n]              - v[n]   (delaying)
    v[n]    = Q(x3[n])

The coefficients are b1 = 1 + 2^-2, a1 = 2^-1 + 2^-4, a2 = 2^-1 + 2^-2 and
g1 = 2^-10 + 2^-11. The loop gives

    STF = a1 a2 b1 z^-2 / D(z)
    NTF = (1 - z^-1)(1 - (2 - g1 a2) z^-1 + z^-2) / D(z)
    D(z) = 1 + (g1 a2 - 2 + a2) z^-1 + (1 - g1 a2 + a1 a2 - a2) z^-2

These are the intended transfer functions. The wiring above is one
realisation of them: unit feedback into every integrator matches all the
coefficients of both functions. Integrators 2 and 3 with the g1 feedback
form a resonator. It puts a pair of noise zeros at
sqrt(g1 a2)/(2 pi) * 2.8224 MHz, which is about 14.9 kHz. Integrator 1
puts the third zero at DC. The NTF poles have radius 0.82, and the
out-of-band NTF gain peaks at about 2.7.

Quantizer: the four most significant bits of the 18-bit integer part of
x3, so the step is 2^14 and the rounding is floor. The result is clipped
to -7..+7, which gives the 15 levels. The value fed back is the level
times 2^14.

Word lengths: the states carry 12 fraction bits, so every shift is exact,
and 6 guard bits above the 18-bit word. They saturate instead of wrapping.
Both widths are parameters (`FRAC`, `GUARD`).

Three properties matter in use:

- **The DC and in-band gain is b1 = 1.25**, not 1. A constant input u
  gives a mean level of 1.25*u/2^14.
- **Stable input range.** Full scale would need 10 levels against the 7
  that exist. A bit-level model of the loop and the testbenches show it is
  stable for sine inputs up to about 0.6 of 18-bit full scale (-4.4 dBFS).
  At 0.7 it breaks down. Scale the PCM source to that range.
- **No overload recovery.** Once driven into overload (for example by a
  full-scale DC input), the loop stays in a clipping limit cycle even after
  the input returns to zero. `sat` reports clipping. Only a reset brings
  the loop back. The reference design describes no recovery circuit, so
  none is added here.

With an in-range input, the modulator output reproduces a 1 kHz tone at
the expected amplitude. Its 2nd and 3rd harmonics are more than 80 dB down.
The in-band SNDR runs from about 47 dB at -60 dBFS to 103 dB at -4.4 dBFS
(Hann-windowed DFT over 20 ms). That gives a dynamic range of about
107 dB for the digital part alone.

## Element selection: thermometer code and DWA

`therm_encoder` maps the 4-bit signed level to level+8 ones, packed from
bit 0. So +7 turns on all 15 elements, 0 turns on 8, -7 turns on one, and
-8 (which the modulator never produces) none. Mid-scale therefore sits at
8/15 of the reference. That is a constant offset, removed after the DAC
like any DC.

`dwa_encoder` keeps a pointer to the next unused element. A word with c
ones selects elements ptr, ptr+1, ... ptr+c-1 (mod 15): the thermometer
word is rotated left by ptr. Then ptr advances by c (mod 15). Every
element is used as often as possible, and at any moment the use counts of
any two elements differ by at most one. The selection is registered, one
clock after `level`, and `wrap` pulses when the pointer passes element 14.

The effect is large. With the unit capacitors spread by +-1 %, take a
half-scale 1 kHz tone. Plain thermometer selection (lowest elements first)
gives harmonics at about -61 dB. DWA selection of the same levels gives
about -108 dB.

## Analog part (behavioural models)

`dct_sc_dac` models the direct-charge-transfer DAC. During clk high
(phase 1), capacitor i samples D_i*vref. During clk low (phase 2), all 15
capacitors are placed in parallel in the opamp feedback path. They share
their charge, so the output is vref * sum(C_i D_i)/sum(C_i) without the
opamp supplying charge. The model updates on the falling edge and holds
the value. `CAP_ERR_PCT` spreads the capacitor values by up to that
percentage, to see what DWA does with mismatch.

The model ignores:

- opamp gain, bandwidth and noise;
- switch resistance (the bootstrapped switches of the real circuit);
- kT/C noise;
- clock feedthrough.

`rc_lpf` is one pole at 496 kHz. It is evaluated at each rising clock edge
with the exact step-invariant update:

    y += (1 - exp(-2 pi fc Ts)) (x - y)

The model knows nothing between clock edges.

Full scale at the output is vref: k elements give k/15 * vref. With
vref = 1.8 V, a half-scale input (the largest comfortable one) swings
about 1.2 V peak to peak around 0.96 V. The output swing of a real chip
depends on its reference and bias network, which is not modelled.

## Interfaces

`ds_dac` (top):

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | 2.8224 MHz; high half = DAC sampling phase |
| rst_n | in | 1 | asynchronous, active low |
| pcm_in | in | 18 signed | PCM sample, taken when pcm_req is high |
| pcm_req | out | 1 | one clock in 64 |
| vref | in | real | DAC reference (model) |
| level | out | 4 signed | modulator level -7..+7 |
| dac_sel | out | 15 | element selections (the DAC's data inputs) |
| dwa_ptr | out | 4 | DWA pointer |
| q_sat | out | 1 | quantizer clipped |
| dwa_wrap | out | 1 | DWA pointer wrapped |
| v_dac | out | real | SC DAC output (model) |
| vout | out | real | filtered analog output (model) |

Shared widths and constants are in `dsdac_pkg`: W = 18, OSR = 64,
N_ELEM = 15, CW = 18, CFRAC = 16, QMAX = 7.

## Verification

Every block has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_therm_encoder` | all 16 codes against the encoder table |
| `tb_dwa_encoder` | every selection against a pointer model, latency, use-count spread of at most 1, over 3000 random levels |
| `tb_sinc_zoh` | 8 repeats per sample, repeat index, valid window |
| `tb_fir48_x2`, `tb_fir20_x4` | impulse response against the windowed-sinc formula (1 LSB), symmetry, output timing (K+2, then every PERIOD), bit-exact outputs against direct convolution, including saturation |
| `tb_interp_filter` | 34-clock latency, continuous output, DC gain, 1 kHz amplitude, image rejection at 43.1 and 87.2 kHz |
| `tb_crfb_mod` | bit-exact against a 64-bit integer model of the loop, DC mean = 1.25*u/2^14, overload flag, recovery by reset |
| `tb_dct_sc_dac` | charge-sharing output for ideal and mismatched capacitors, hold during sampling |
| `tb_ds_dac_analog` | settled output vref*k/15 for static patterns, DAC update timing, filter ripple |
| `tb_rc_lpf` | sampled step response, gain at 705.6 kHz and at 1 kHz |
| `tb_ds_dac_digital` | 64-clock request period, popcount(dac_sel) = level+8, DWA balance, DC means, 1 kHz tone and harmonics |
| `tb_ds_dac` | whole converter at its real sizes: DC output voltages, 1 kHz tone of 0.6 V peak with harmonics 70 dB down, overload then reset; counts sample requests, FIR outputs, DWA wraps, clipping and recovery, and fails if any never happened |
| `tb_dwa_mismatch` | with 1 % capacitor spread, harmonic distortion with DWA at least 20 dB below plain thermometer selection |
| `tb_workload_sndr` | SNDR of the whole chain at -60, -40, -20, -6 and -4.4 dBFS, dynamic-range estimate of at least 92 dB |

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ds_dac \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/dsdac_pkg.sv tb/tb_ds_dac.sv
    ./obj_dir/Vtb_ds_dac

The FIR testbenches include `tb/fir_tb_body.svh`, which is why `-Itb` is
needed. All testbenches run in seconds. `tb_ds_dac` runs the top with
default parameters.

## Where this design departs from, or goes beyond, the reference design

- **FIR coefficients.** The original coefficient set is not available;
  these are windowed-sinc coefficients of the same length and cutoff, with
  the weaker stopband noted above.
- **Modulator wiring.** It was derived from the transfer functions, so any
  realisation with the same STF and NTF would be equally faithful. The
  printed value of g1 (0.001468) differs slightly from 2^-10 + 2^-11
  (0.00146484); the shift form is used.
- **Fifteen levels from four bits.** The quantizer clips the 4-bit code
  to -7..+7. The encoder still handles -8 as "no elements", as its table
  specifies. (A remark that level 0 selects no capacitors contradicts that
  table; the table is followed.)
- **Own choices where nothing is specified:** internal widths (FRAC,
  GUARD), saturation, rounding in the FIRs, reset values, the `pcm_req`
  master timing, and the one-clock registers between stages.
- **Analog circuits.** The bootstrapped sampling switch and the two-stage
  class-AB opamp are transistor-level circuits and have no model here. The
  DAC and filter models treat them as ideal. The 15 level-shifting buffers
  between the digital part and the analog chip in the original test setup
  are not modelled either.
- **Limits.** The input must stay below about 0.6 of 18-bit full scale,
  and the loop has no overload recovery except reset (see the modulator
  section).
