# All-digital symbol timing adjustment for a QAM-16 receiver

A digital QAM receiver has to take its decisions at the transmitter's symbol
instants, but its A/D converter runs from a free-running crystal that is neither
locked nor rationally related to the transmitter's clock. Here the sampling clock
is never adjusted. The converter samples at a fixed rate Fs = K·Fsym (K = 3
samples per symbol, nominally), and the missing samples at the true symbol
instants are *computed*. A polynomial interpolator evaluates the signal between
the received samples, and a digital timing loop decides where to evaluate it.
The whole synchronizer, loop included, is synchronous logic on one clock.

The timing control is split into two parts:

* **m**, the *basepoint index*: which of the received samples a symbol belongs
  to. It is an integer, so it works as a variable 1-of-K decimator.
* **μ**, the *fractional delay*: how far between that sample and its neighbour
  the true instant lies. It is a fraction in [0, 1) and is fed to the
  interpolator.

Interpolation happens at complex baseband with a quadratic (3-point Lagrange)
interpolator in Farrow form. A small fixed **compensation filter** follows the
interpolator and removes most of the interpolator's μ-dependent error. Among
the options for interpolator position (IF or baseband), oversampling ratio and
polynomial order, this combination (baseband, K = 3, quadratic, compensated)
gives a good trade-off between bit-error-rate loss and hardware cost. It is the
configuration implemented here.

## Signal chain

```
adc_in ─► quad_downconv ─► srrc_filter ×2 ─► farrow_quad_interp ×2 ─► comp_filter ×2 ─► var_decimator ─► qam_slicer ─► bits_i/bits_q
 (10 b,     (IF = Fs/4        (matched,        (μ from the loop)        (fixed FIR,          │  ▲
  low IF)    mixer)            rolloff 0.2)                              all-pass at μ=0.25) │  │ strobe flag (delayed 5)
                                                                                             ▼  │
                                               timing_error_detector ─► loop_filter ─► timing_integrator ─► μ, strobe
```

All blocks take one sample per clock (clk = Fs). Every block registers its
output, and all resets are synchronous and active low.

| block | does | latency |
|---|---|---|
| `quad_downconv` | IF → complex baseband; at IF = Fs/4 the oscillator is 1, 0, −1, 0, so each mixer is a sign select | 1 |
| `srrc_filter` | 25-tap square-root raised-cosine matched filter, rolloff 0.2, folded symmetric form | 1 |
| `farrow_quad_interp` | parabola through x[k], x[k−1], x[k−2], evaluated μ behind x[k−1] | 1 |
| `comp_filter` | 5-tap FIR, transposed form; main tap 2 | 2 (+2 samples group delay) |
| `var_decimator` | keeps the strobed sample and its two Fs-rate neighbours | 2 after the strobed sample |
| `timing_error_detector` | early–late error, one value per symbol | 1 |
| `loop_filter` | proportional + integral | 1 |
| `timing_integrator` | phase register → μ, strobe, m | — |
| `qam_slicer` | Gray-coded 2 bits per rail, thresholds 0 and ±2A | 1 |

The shared types and constants are in `stadj_pkg`. They are: the 10-bit
`sample_t`, the `iq_t` I/Q struct, K, the coefficient tables and a saturation
function.

## The timing loop

This is the part that needs the most care. Read it before changing anything
in the loop.

### Representing timing as a strobe plus μ

`timing_integrator` keeps a signed phase register `p` in units of 1/1024
sample. Once per symbol it subtracts the loop filter's correction `v`. In the
cycle after each strobe it *applies* the accumulated phase:

* the fractional part of `p` becomes the new `mu`;
* the integer part (carry −1, 0 or +1) sets the distance to the next strobe:

| carry | meaning | next strobe after |
|---|---|---|
| 0 | μ stayed in [0, 1) | K samples |
| +1 | μ passed 1: the instant moved back past a sample | K − 1 samples (`slip_early`) |
| −1 | μ went below 0 | K + 1 samples (`slip_late`) |

This keeps μ in the central interval of the three interpolator points. A
strobe therefore marks "the sample that enters the interpolators now is the
basepoint of a symbol". μ changes only right after a strobe, so every
strobed sample is interpolated with exactly the μ that was meant for it.

The integer part is not sent to the decimator as a number. It travels as a
one-bit **strobe flag** next to the data. The flag leaves the integrator in the
same cycle as the sample it marks enters the interpolators. The top delays it
by `FLAG_DLY = 3 + COMP_MAIN = 5` cycles. That is one cycle for the
interpolator, two for the compensation filter, and two samples for the
compensation filter's main-tap delay. The flag then reaches `var_decimator`
together with the compensated sample built around that sample. If this number
is off by one cycle, every symbol is taken one sample away from the sample
its μ was computed for. The end-to-end test detects this as decision errors.

`m` is reported on a port for observation. It is the position of the last
strobe in the free-running K-sample frame, and it takes every value 0…K−1 as
the transmitter drifts.

### Error detector

The detector is early–late. For each symbol,
`e = I·(I_late − I_early) + Q·(Q_late − Q_early)`, where early and late are the
compensated samples one Fs period before and after the strobed sample. On
average e is positive when the strobe is early, and the integrator then
reduces the delay μ. Measured on the full chain at nominal level, the mean
slope is about 14,000 per sample of timing error. The symbol-to-symbol pattern
noise is large, around 80,000 rms. That is why the loop bandwidth is small.

### The K−1 step and `ted_skip`

After a K−1 step, μ has just jumped down by almost one sample. The sample just
before the next strobe was still interpolated with the *old* μ. So the
"early" neighbour actually lies about two sample periods before the strobe,
not one. Its detector output is large and always points the same way. Without a
guard, it kicks μ straight back across the boundary. The integrator
therefore raises `ted_skip` with the first strobe after each K−1 step. The
flag travels with the strobe, and the decimator clears `ted_en`, so the
detector outputs 0 for that one symbol. The K+1 step needs no skip: the
neighbour before the strobe is then interpolated with the new μ.

### Loop filter and gains

`v = round(e / 2^KP_SH) + round(acc / 2^KI_SH)`, where `acc` is the running sum
of `e`. The result is saturated below half a sample (an assertion in the
integrator checks this). The defaults KP_SH = 11 and KI_SH = 19 correct about
0.7 % of the timing error per symbol, with a damping factor near 0.5. The
integral path removes the mean timing error caused by a constant clock offset.

Measured behaviour of the complete receiver, from the end-to-end testbench and
seed sweeps:

* With a ±0.1 % transmitter clock offset and a start offset of up to 1.4
  samples, the test allows 1500 symbols for acquisition. After that, all
  decisions are correct: 16 of 16 random seeds, 2500 symbols checked per run.
* At ±0.2 %, the loop keeps lock, but in 3 of 8 seeds the fast-transmitter
  run makes 1 to 49 decision errors after settling. Treat 0.1 % as the tested
  range.
* Halving both gains (shifts 12 and 20) still tracks ±0.1 %, with half the
  slip chatter. At ±0.2 % it loses lock in every seed tried. Larger gains
  widen the range but pass more of the detector's pattern noise on as timing
  jitter.
* **Slip chatter.** When μ sits near the 0/1 boundary, jitter carries it back
  and forth across the boundary. A 4000-symbol run at 0.1 % needs about 12 net
  slips, but 70–110 slip events occur. These come in K−1/K+1 pairs that cancel.
  They cost no decisions, because the sample chosen on either side of the
  boundary is the same instant to within the jitter. They are visible on
  `slip_early` / `slip_late`. Hysteresis on the boundary would remove them but
  is not implemented.

The loop is a design choice throughout. Only the structure comes from the
architecture being implemented: detector → loop filter → integrator producing m
and μ, fed from the Fs-rate and symbol-rate streams. The detector algorithm,
filter order, gains and the update timing are not specified there.

## Interpolator and compensation filter

The quadratic interpolator evaluates the parabola through three samples:

```
s      = x / 2                  (input scaled by 0.5 before the delay line)
c0     = 2·s[k-1]               = x[k-1]
c1     = s[k-2] − s[k]          = (x[k-2] − x[k]) / 2
c2     = s[k] + s[k-2] − 2·s[k-1]
y[k]   = c0 + μ·(c1 + μ·c2)     (Horner form)
```

That takes 2 sample registers, 5 add/subtract operations and 2 multipliers.
μ = 0 returns x[k−1], and μ → 1 approaches x[k−2], so μ is a *delay*. The
internal nodes have 1–3 guard bits, so nothing can overflow. Both products are
rounded to the sample LSB, and the output is saturated to 10 bits.

A low-order interpolator has an error that depends on μ. It is zero at μ = 0,
and at μ ≈ 0.5 it attenuates the high end of the band. `comp_filter` is a
fixed 5-tap FIR chosen so that interpolator × compensation filter is as close
as possible to a pure delay at μ = 0.25. The coefficients
{9, −20, 265, 7, −6}/256 come from a least-squares fit of
`H_interp(f, μ=0.25) · H_comp(f) = e^(−j2πf·3.25)` over |f| ≤ 0.2·Fs. That is
the band a rolloff-0.2 signal occupies at K = 3. The compensation moves some
error to small μ and removes more at large μ, which lowers the worst case.

`tb_interp_workload` measures this on the RTL. It uses 5000 random QAM-16
symbols with raised-cosine shaping (rolloff 0.2, K = 3). μ is set to its ideal
value, and 10 values of μ are tested. For each μ, the errors at the symbol
instants are combined with Gaussian noise in closed form. The table gives the
Eb/N0 increase needed to keep the bit error rate at 10⁻⁶, compared with ideal
sampling, plus the rms ISI in percent of the symbol level A:

| μ | 0.0 | 0.1 | 0.2 | 0.3 | 0.4 | 0.5 | 0.6 | 0.7 | 0.8 | 0.9 |
|---|---|---|---|---|---|---|---|---|---|---|
| loss (dB), interpolator only | 0.000 | 0.022 | 0.062 | 0.116 | 0.182 | 0.227 | **0.256** | 0.245 | 0.185 | 0.091 |
| loss (dB), with compensation | 0.067 | 0.046 | 0.043 | 0.059 | 0.093 | 0.122 | 0.148 | **0.151** | 0.126 | 0.086 |
| rms ISI (% of A), interpolator only | 0.0 | 1.5 | 2.3 | 3.2 | 3.9 | 4.4 | 4.6 | 4.5 | 3.8 | 2.5 |
| rms ISI (% of A), with compensation | 2.3 | 1.7 | 1.4 | 1.7 | 2.3 | 2.7 | 3.1 | 3.1 | 2.7 | 2.1 |

Compensation lowers the worst case from 0.26 dB to 0.15 dB. A floating-point
model of the same filters gives 0.25 and 0.14 dB, so the 10-bit datapath costs
about 0.01 dB. The published figures for this configuration are 0.15 dB and
0.05 dB. The ranking is the same, but this design's compensation gains less.
A sweep of the all-pass point and the filter length outside the RTL found
μ = 0.25 best among 0.25, 0.5, 0.6 and 0.75. Lengths of 7 and 9 taps gain
almost nothing over 5. The remaining gap is therefore not a matter of filter
length. It probably comes from details of the published evaluation, which are
not known here.

The compensation filter is a separate block. It could equally well be folded
into the matched filter's coefficients, which saves its adders. It is kept
separate here so that both responses stay visible and testable.

## Front end

* **Downconversion.** The IF is 0.75·Fsym. With Fs = 3·Fsym that is exactly
  Fs/4, so cos and −sin take only the values 1, 0, −1, 0. In the 4-phase cycle
  the mixer outputs i = x, q = −x, i = −x, q = x, and the other rail is 0 in
  each phase. This removes the multipliers and the oscillator ROM. It only
  holds for this IF/Fs ratio. Carrier recovery is not part of this design: the
  test signal is generated on the nominal carrier phase.
* **Matched filter.** 25 taps (±4 symbols). The taps are
  `round(512·h(t))`, with h the unit-energy square-root raised cosine, rolloff
  0.2, and t = (n − 12)/3 symbol periods. The filter restores the factor 2 lost
  in mixing (shift by 8 instead of 9).
* **Slicer.** Decision levels ±A and ±3A, with A = 92 LSB. Thresholds are 0 and
  ±2A. Gray code per rail: −3A → 00, −A → 01, +A → 11, +3A → 10. There is no
  AGC: the input level must put the symbols at these levels. The end-to-end
  testbench scales its transmitter accordingly.

## Number formats

| signal | format |
|---|---|
| samples everywhere (ADC, filters, interpolator, decimator) | 10-bit two's complement, full scale ±1 |
| μ | 10-bit unsigned fraction of one sample (1/1024 steps) |
| SRRC coefficients | 10-bit signed, 9 fraction bits |
| compensation coefficients | 10-bit signed, 8 fraction bits |
| detector output e | 23-bit signed |
| loop filter accumulator | 40-bit signed |
| loop correction v | 11-bit signed, 1/1024 sample, \|v\| ≤ 511 |
| integrator phase p | 13-bit signed, 1/1024 sample |

## Where this design departs from, or adds to, the reference architecture

Taken from the reference architecture:

* the chain order;
* the IF of 0.75·Fsym;
* rolloff 0.2;
* K = 3;
* the quadratic Farrow interpolator at baseband (input scaling by 0.5, Horner
  evaluation, 2 delays, 5 adders, 2 multipliers);
* the compensation filter designed for all-pass at μ = 0.25;
* 10-bit filter wordlength;
* the m/μ split of the timing control;
* the loop structure.

Chosen here:

* the exact adder wiring of the interpolator, derived from the Lagrange
  polynomial;
* guard bits and rounding;
* the direction of μ (a delay);
* matched-filter length and quantisation;
* compensation filter length, design method and coefficients;
* the Fs/4 sign-select mixer;
* the whole timing loop: early–late detector, PI filter, gains, phase
  register, strobe flag, update timing, `ted_skip`;
* the slicer levels and Gray mapping;
* synchronous reset.

Not built:

* interpolation at IF (bandpass);
* linear and cubic interpolators;
* K = 4 or 5;
* carrier recovery and AGC;
* pipelining inside the interpolator. It is the speed-limiting path. The
  reference figure is about 34.5 MHz in a 0.7 µm process, i.e. 11.5 Mbaud at
  K = 3.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops, and it has a cycle-count watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/stadj_pkg.sv tb/tb_stadj_rx_top.sv \
          --top-module tb_stadj_rx_top
./obj_dir/Vtb_stadj_rx_top
```

Swap the testbench name for any of the others:

| testbench | what it shows |
|---|---|
| `tb_stadj_rx_top` | End to end at default parameters. Two 4000-symbol runs, with transmitter clock offsets of +0.1 % and −0.1 % and start offsets of 1.4 and 0.3 samples. After 1500 symbols, every decision must match. The symbol rate must match the transmitter's. Slips in both directions, detector skips, every m and μ in every quarter must all occur. Runs in seconds. |
| `tb_interp_workload` | The Eb/N0-loss and ISI table above. The RTL must match a real-valued model within 3 LSB. Its loss may exceed the floating-point loss by at most 0.03 dB. Compensation must lower the worst-case ISI and the worst-case loss. |
| `tb_quad_downconv` | Mixer outputs against cos/−sin at Fs/4. |
| `tb_srrc_filter` | Taps recomputed from the closed form; exact convolution. |
| `tb_farrow_quad_interp` | Against real Lagrange interpolation (±2 LSB), exact at μ = 0, and on a sine wave. |
| `tb_comp_filter` | Exact convolution. Interpolator + compensation at μ = 0.25 is all-pass within 4 LSB. |
| `tb_var_decimator` | Selection, neighbours, ted_en and latency. |
| `tb_timing_error_detector` | Exact products and the ted_en gating. |
| `tb_loop_filter` | Bit-exact model with rounding and saturation. |
| `tb_timing_integrator` | An absolute timing invariant. The strobe positions and μ together must equal the accumulated corrections. Also checks m, the slip pulses and ted_skip. |
| `tb_qam_slicer` | All decision regions and thresholds. |

To change the loop, override `KP_SH`/`KI_SH` on `stadj_rx_top`. Then re-run
`tb_stadj_rx_top` with a few seeds (`+verilator+seed+N`), because lock
behaviour depends on the data. Changing K needs new compensation coefficients.
It also needs a general oscillator, because the sign-select mixer only works
at IF = Fs/4.
