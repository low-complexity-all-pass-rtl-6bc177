# Multiplier-free 128:1 decimator for a sigma-delta ECG front end

A wearable ECG channel can digitise with a 1-bit sigma-delta modulator running
at 51.2 kHz, 128 times faster than the 400 Hz it finally needs. The decimator
must remove the modulator's shaped quantisation noise, which rises steeply
above the ECG band, and bring the rate down by 128 while keeping the
0–150 Hz ECG band flat. Conventional chains do this with long halfband FIR filters and
many multiplications per sample. This design uses two-path all-pass IIR
halfband filters instead. Each 2:1 stage needs only two coefficients, and
both are sums of powers of two. The whole chain has no multiplier: every
coefficient is a hard-wired shift and add.

The architecture follows the decimator published by Eminaga, Coskun, Moschos
and Kale ("Low Complexity All-Pass Based Polyphase Decimation Filters for ECG
Monitoring", PRIME 2015). That work gives the stages, their orders, ratios and
rates, and the filter structures, but evaluates only a floating-point model.
The coefficient values, word lengths, rounding, interface and reset in this
RTL are this design's own choices. They are listed under
[Where this RTL departs from or adds to the published design](#where-this-rtl-departs-from-or-adds-to-the-published-design).

## The chain

```
 1-bit, 51.2 kHz      1600 Hz             800 Hz              400 Hz             400 Hz
 in_bit ──► slink 4th order ──► halfband 2:1 ──► halfband 2:1 ──► compensation ──► out_data
            32:1 (CIC)          10th order         10th order         1st order, 1:1
```

| stage | module | rate in → out | what it removes or fixes |
|---|---|---|---|
| slink | `slink_decimator` | 51 200 → 1 600 Hz | bulk of the quantisation noise, with cheap adders only |
| halfband I | `polyphase_hb_decimator` | 1 600 → 800 Hz | noise that would alias into 0–400 Hz |
| halfband II | `polyphase_hb_decimator` | 800 → 400 Hz | noise that would alias into 0–200 Hz |
| compensation | `compensation_filter` | 400 → 400 Hz | the slink's passband droop (about −0.9 dB at 200 Hz) |

`ecg_decimator` is the top level and wires the four stages together.
`allpass_section` is the building block of the halfband stages. `ecg_dec_pkg`
holds the shared constants: orders, ratios, word formats and coefficients.

## Number formats

* The input bit is +1 for 1 and −1 for 0. Full scale is ±1.0.
* Slink output: 22-bit two's complement with 20 fraction bits.
  The slink's DC gain is 32⁴ = 2²⁰, so the 1/32⁴ normalisation costs no
  logic. The binary point simply sits 20 bits up. 22 bits hold the extreme
  value +2²⁰ plus the sign.
* Everything after the slink: 26-bit two's complement with 22 fraction bits,
  so the range is ±8. The two extra fraction bits absorb the truncation of
  the shift terms. The extra integer bits cover the internal peaks of the
  all-pass sections (up to 1 + 2α times the input).
* All products are arithmetic right shifts, so they truncate toward minus
  infinity. Nothing saturates. With modulator inputs within ±1, no internal
  node comes near the ±8 limit.

## The all-pass halfband stage (`polyphase_hb_decimator`)

This is the core of the design and the part that most needs explaining.

**Two-path halfband.** A halfband lowpass can be built from two all-pass
filters in parallel:

    H(z) = ½ · [ A1(z²) + z⁻¹ · A2(z²) ],    A_i(z²) = (α_i + z⁻²) / (1 + α_i z⁻²)

Both paths pass every frequency with unit gain but different phase. At low
frequencies the phases agree and the half-sum is about 1. Near the Nyquist
frequency they differ by π and cancel. One such section is a 5th-order
filter: two second-order all-passes plus the unit delay. This stage cascades
two identical sections (10th order) and shares α1 and α2 between them. The
cascade roughly doubles the stopband attenuation in dB and leaves the
passband essentially flat.

**Coefficients.**

| coefficient | value | realisation |
|---|---|---|
| α1 | 0.125 | `x >>> 3` |
| α2 | 0.5625 | `(x >>> 1) + (x >>> 4)` |

This pair is the best one found among one- and two-term power-of-two values
for a stopband starting at 0.4 of the stage's input rate. In floating point
it gives:

* about −66 dB per 5th-order section and about −132 dB for the cascade beyond 0.4·fs;
* a passband flat to about 1 µdB per section (2 µdB for the cascade) up to 0.1·fs.

The flat passband is no accident. The two paths are power-complementary:
|passband|² + |stopband|² = 1. A stopband of −66 dB therefore forces a
passband error of only about 10⁻⁶ dB.

The fixed-point hardware measures about −120 dB on a 0.45·fs tone. That floor
is set by the 22-bit fraction, not by the coefficients.

**Each all-pass section** (`allpass_section`) computes

    y[n] = x[n−D] + α · (x[n] − y[n−D])

This is one subtraction, the shift-and-add product, and one addition. D = 2
gives A(z²) running at the stage's input rate.

**Polyphase decimation.** Only every other output of the second section is
kept. The 2:1 downsampler is therefore moved in front of it (noble
identity). Even input samples feed A1(z), odd input samples feed A2(z), and
each even sample produces

    y[m] = ½ · ( A1 applied to u[2m]  +  A2 applied to u[2m−1] )

Here D = 1, and each branch works at half rate. A1 and A2 never work on the
same sample, so the second section costs half the additions. The first
section must run at the full input rate because its every output is needed.
This arrangement is bit-exact to running both sections at full rate and
dropping odd outputs. The testbench checks exactly that. The first sample
after reset counts as even and produces an output.

## The slink stage (`slink_decimator`)

The slink is a 4th-order cascaded integrator-comb filter,
H(z) = (1/32⁴)·((1 − z⁻³²)/(1 − z⁻¹))⁴.

* The four integrators run on every input bit. They are chained within one
  cycle, so they add no sample delay.
* A phase counter picks every 32nd integrator value.
* Four differentiators (combs) with unit delays then run at 1600 Hz.

All registers wrap modulo 2²². This is exact because the final result always
fits in 22 bits. A 4th-order slink is used because the modulator is 3rd
order: the slink's attenuation must rise faster than the modulator's noise.

## The compensation filter (`compensation_filter`)

The slink's sinc⁴ response droops in the band: −0.2 dB near 95 Hz and
−0.9 dB at 200 Hz. A first-order filter with a single coefficient lifts the
upper band back:

    y[n] = x[n] + αc · (x[n] − y[n−1]),   C(z) = (1 + αc) / (1 + αc z⁻¹)

It has unity gain at DC and rises toward 200 Hz.
αc = 2⁻⁵ − 2⁻⁸ ≈ 0.0273 (`(d >>> 5) − (d >>> 8)`). With this value the slink
plus compensation stays within ±0.02 dB up to 120 Hz (0.3 of the output
rate), and is about −0.07 dB at 140 Hz. A first-order filter cannot follow
sinc⁴ all the way to 200 Hz: the combined response falls to about −0.15 dB
at 160 Hz and −0.4 dB at 200 Hz, against −0.9 dB without compensation. The output register doubles as the y[n−1] delay.

## Overall response

The four stages multiply. Measured through the modulator model with 0.5
full-scale tones, the chain's gain matches the analytic product of the
stage responses within 0.001 dB:

| tone | 10 Hz | 50 Hz | 100 Hz | 150 Hz | 180 Hz |
|---|---|---|---|---|---|
| gain | +0.000 dB | +0.011 dB | +0.008 dB | −0.19 dB | −1.64 dB |

Above about 150 Hz the second halfband stage dominates. It runs at 800 Hz,
and any halfband is 3 dB down per section at a quarter of its rate, here
200 Hz. The cascade of two sections is therefore 6 dB down at 200 Hz. The
flat band of the chain is 0–150 Hz, the minimum ECG bandwidth usually
recommended. Tones at 750 Hz and 350 Hz, which the two halfband stages fold
onto 50 Hz, come out more than 140 dB down.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of every stage |
| `in_valid`, `in_bit` | in | 1 | one modulator bit per cycle when valid (tie `in_valid` high if `clk` is the 51.2 kHz modulator clock) |
| `out_valid`, `out_data` | out | 1, 26 | one sample per 128 accepted bits, 22 fraction bits |
| `slink_valid`, `slink_data` | out | 1, 22 | slink output (1600 Hz), for monitoring |
| `hb1_valid`, `hb1_data` | out | 1, 26 | first halfband output (800 Hz) |
| `hb2_valid`, `hb2_data` | out | 1, 26 | second halfband output (400 Hz) |

* **Strobes, no back-pressure.** Each stage has a single output register.
  Its `*_valid` pulses for one cycle, the cycle after the input sample that
  completed it.
* **Latency.** `out_valid` comes exactly 4 clock cycles after every 128th
  accepted bit, whatever idle cycles came between the bits.
* **Data hold.** Output data holds its value until the next strobe.
* **Combinational depth.** The longest combinational path is in the halfband
  stage: two all-pass sections and two adders, about eight 27-bit
  additions. That is trivial at the clock rates of interest.
* **Signal delay.** The filters delay the signal itself by about 9 ms at
  400 Hz output (measured with the ECG test below).

## Where this RTL departs from or adds to the published design

* **Coefficient values are chosen here.** The published design says only that
  the halfband coefficients are powers of two and that the compensation
  filter has one coefficient; it gives no values. α1 = 1/8 and
  α2 = 1/2 + 1/16 come close to the published 5th- and 10th-order
  responses, which show about −68 dB and −140 dB stopbands and a passband
  flat to about 0.1·fs. αc reproduces its overall slink-plus-compensation curve.
* **Stopband and passband figures.** The published figures are a 1 µdB
  passband ripple and 140 dB stopband per stage. Those are floating-point
  figures. This RTL reaches about −132 dB in floating point and about
  −120 dB in 22-bit fixed point. Its passband error is about 1 µdB per
  section up to 0.1·fs in floating point. The published 5th-order curve
  has a notch near 0.42·fs; this pair has none below 0.5·fs.
* **Additions.** The published count is 10 additions per input sample per
  halfband stage. Here the first section runs at full rate with 6 additions
  (α2 needs one extra add for its second shift term). The polyphase second
  section costs 3 additions per input sample.
* **Halfband band edges.** The published table lists band edges of 200 Hz and
  323 Hz at 1600 Hz and 800 Hz sampling. These are not consistent with a
  halfband response, whose edges are symmetric about a quarter of the
  sampling rate. The coefficients were fitted to the published response
  plots instead.
* **Word lengths, truncation, reset, interface.** None are specified in
  the published design; the choices are described above.
* **Not included: the sigma-delta modulator.** The published design
  specifies it only as 3rd order, single loop, 1 bit, OSR 128. The
  testbenches contain a behavioural model (`tb/sigma_delta_model.sv`,
  not synthesizable). It is an error-feedback loop with noise transfer
  function (1 − z⁻¹)³ / D(z), where D is a 3rd-order Butterworth highpass
  denominator (peak NTF gain about 1.37). The testbenches drive it with
  inputs up to ±0.5 of full scale.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs.

| testbench | checks |
|---|---|
| `tb_slink_decimator` | every output bit-exact against the direct 125-tap FIR form of sinc⁴ (four convolved 32-sample boxcars); random bits with random gaps; all-ones and all-zeros runs (±full scale, output ±2²⁰); strobe timing and count |
| `tb_allpass_section` | three coefficient forms (single shift, shift+shift, shift−shift; D = 1 and 2), bit-exact against an integer model; all-pass property (RMS gain 1 ± 1 %) on a sine |
| `tb_polyphase_hb_decimator` | bit-exact against a plain full-rate model of the 10th-order cascade followed by dropping odd samples; strobe on the 1st, 3rd, 5th … input; passband RMS gain 1 ± 0.1 % at 0.05·fs; more than 100 dB rejection at 0.45·fs |
| `tb_compensation_filter` | bit-exact against an integer model; DC gain 1; Nyquist gain (1+αc)/(1−αc) ± 0.1 % |
| `tb_ecg_decimator` | whole chain at default parameters, fed by the modulator model with a 50 Hz sine; every output within 2⁻¹⁵ of a floating-point model of the chain; latency of exactly 4 cycles; one output per 128 bits; 50 Hz gain 1 ± 0.5 %; bits with and without idle cycles between them; both polyphase branches of both halfband stages exercised |
| `tb_ecg_response` | whole chain, modulator tones of 1 s each: gain at 10, 50, 100, 150 and 180 Hz within 0.01 dB of the analytic product of the four stage responses; more than 100 dB rejection of 750 Hz and 350 Hz tones that alias to 50 Hz |
| `tb_ecg_workload` | 10 s of a synthetic ECG (72 bpm, Gaussian P-QRS-T waves) at 51.2 kHz through modulator and decimator. Output is aligned to the input by a delay search; the magnitude error (mean \|error\| over peak) must stay below 0.48 %, the figure published for a recorded ECG. Measured: 0.0056 % at about 8.9 ms delay. |

The ECG test uses a synthetic waveform, not a database record. Its low error
says the chain is transparent to a clean, band-limited ECG. It says nothing
about real electrode noise.

To simulate any testbench with Verilator 5, from the folder holding `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ecg_dec_pkg.sv tb/tb_ecg_decimator.sv --top-module tb_ecg_decimator
./obj_dir/Vtb_ecg_decimator
```

Replace the testbench name to run another one. Each finishes in about a
second.

## Changing the design

* **Coefficients** live in `ecg_dec_pkg` as `SH1`/`SH2`/`SIGN2` triples,
  meaning α = 2^−SH1 + SIGN2·2^−SH2. The testbenches' reference models
  carry the same values and must be updated with them.
* **Word length:** `DATA_W`/`DATA_FRAC` in the package set the filter word.
  Keep at least 3 integer bits above the sign for all-pass headroom.
* **Slink:** `slink_decimator` takes `ORDER` and `R`. Its output width
  follows from them. If they change, the top's shift that aligns the slink
  output (`DATA_FRAC − SLINK_FRAC`) must stay non-negative.
