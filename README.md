# 24-bit sigma-delta ADC for low-frequency space instrumentation

This is the RTL of a very high resolution analog-to-digital converter for
signals from DC to 1 kHz, meant for radiation-tolerant housekeeping and
measurement electronics. The converter oversamples: a second-order, 1-bit
sigma-delta modulator runs at several MHz and pushes its quantisation noise to
high frequencies, and a digital decimation filter removes that noise and
lowers the rate to one 24-bit word per output sample. With the nominal
6.144 MHz master clock and an oversampling ratio (OSR) of 1024 the ADC
delivers 6000 words per second; the OSR can be set from 64 to 2048, giving
output rates from 96 kHz down to 3 kHz.

The digital back end (decimator, saturation, serial output, reset
synchroniser, triple-modular-redundant registers) is synthesizable
SystemVerilog. The analog front end (modulator and the clock phase
generators that drive its switched-capacitor circuits) is written as
behavioural models, so that the whole converter can be simulated end to end
from an analog input voltage to the serial output.

## Signal chain

```
 INAP,INAN ──► sigma-delta modulator ──► SIGMA (1 bit at MCLK) ──► pin SIGMA
 VREF, VCM     (behavioural model,             │
               2 clock phase generators)       ▼
                                   SINC4 CIC, ÷R (R = 4..128)        24 bit
                                               ▼
                                   HBF1 ÷2 (order 6)                 26 bit
                                   HBF2 ÷2 (order 10)                25 bit
                                   HBF3 ÷2 (order 14)                26 bit
                                   HBF4 ÷2 (order 22)                25 bit
                                               ▼
                                   saturation                        24 bit
                                               ▼
                                   serial interface ──► DATA, VALID, CLKOUT
```

The total decimation is OSR = 16·R. All digital logic runs on MCLK.

| OSR[2:0] | SINC factor R | OSR  | output rate at 6.144 MHz |
|----------|---------------|------|--------------------------|
| 0        | 4             | 64   | 96 kHz                   |
| 1        | 8             | 128  | 48 kHz                   |
| 2        | 16            | 256  | 24 kHz                   |
| 3        | 32            | 512  | 12 kHz                   |
| 4        | 64            | 1024 | 6 kHz (nominal)          |
| 5, 6, 7  | 128           | 2048 | 3 kHz                    |

OSR 2048 gives 6 kHz if the modulator is clocked at 12.288 MHz; the
modulator of the original design is specified for 6.144 MHz, which makes
OSR 1024 the practical nominal setting.

**Output code.** A word is a signed fraction of the reference:
code = (INAP − INAN) / VREF · 2²³, clamped to [−2²³, 2²³ − 1]. The specified
input range is ±1.6 V differential (3.2 V peak-to-peak), about ±0.5 VREF
with VREF = 3.3 V; a second-order modulator overloads as the input
approaches ±VREF.

**STOPADC** high freezes the decimator (the SINC stage stops; the half-band
filters then get no samples and go idle) to save power. The SIGMA pin keeps
running, so an external FPGA or DSP filter can be used instead of the
on-chip one.

## The SINC stage (`cic_sinc`)

A fourth-order SINC filter, (1 − z^−R)⁴ / (1 − z^−1)⁴, is built as a
cascaded integrator-comb: four accumulators run at MCLK on the ±1 input, and
every R-th clock the last accumulator is passed through four first
differences. All eight stages are 30 bits wide and wrap around freely. This is
the part that surprises most readers: the accumulators overflow constantly in
normal operation, yet the output is exact, because modular arithmetic is
preserved through the differences and the true output never exceeds the
filter gain R⁴ ≤ 2²⁸, which fits in 30 bits. Narrowing the accumulators
breaks the filter at R = 128 (the testbench of this block shows it).

Scaling is done once, after the combs: the output (full scale ±R⁴) is shifted
with rounding to ±2²³ and saturated to 24 bits (only a stream of all ones
reaches +2²³). The accumulators are registered, which adds four clocks of
delay to the textbook structure. `dout_valid` pulses once every R clocks.

The order four is what protects the band around the first SINC null, which
always sits at 16 × the output rate (96 kHz at OSR 1024, R = 64, MCLK =
6.144 MHz). From 95 to 97 kHz the SINC alone attenuates by more than 158 dB,
so the half-band filters only have to handle the aliasing bands below 96 kHz.

## The half-band filters (`hbf`)

Each half-band filter halves the rate. A half-band FIR of order N has the
centre tap ½, zeros at all other even offsets, and symmetric odd taps, so it
has only K = (N + 2)/4 distinct coefficients. The four filters and the rate at
their input (OSR 1024) are:

| filter | order | pass-band edge / (Fs/2) | input rate | K | latency (clocks) |
|--------|-------|-------------------------|------------|---|------------------|
| HBF1   | 6     | 1/48                    | 96 kHz     | 2 | 3                |
| HBF2   | 10    | 1/24                    | 48 kHz     | 3 | 4                |
| HBF3   | 14    | 1/12                    | 24 kHz     | 4 | 5                |
| HBF4   | 22    | 1/6                     | 12 kHz     | 6 | 7                |

At OSR 1024 every pass band ends at 1 kHz and every stop band starts at
Nyquist − 1 kHz. Only the regions that fold onto 0–1 kHz are suppressed; the
bands in between are left as transition bands, which is what keeps the orders
this low. The lowest zero pair of the SINC stage sits at 16·(output rate),
where the half-band filters no longer help.

**Coefficients.** The odd taps are minimax (equiripple) solutions for the
stop band [(1 − Fo)·Fs/2, Fs/2], quantised to 24 fractional bits, with the
taps moved by up to a few hundred LSB (a small search) so that each filter has a DC gain
of exactly one while keeping the best attenuation. They are in
`rtl/adc_pkg.sv` (function `hbf_coef`). Stop-band attenuation of the stored
sets: 125, 149, 145 and 143 dB. Together with the SINC stage, every band that
folds onto 0–1 kHz at OSR 1024 is attenuated by at least 139.7 dB; the
original design aims at 140 dB, which the order-6 HBF1 with 24-bit
coefficients just misses. To change a
filter, redesign its taps with any minimax / Parks-McClellan tool under the
same constraints and replace the integers.

**Arithmetic.** The filter keeps the last N + 1 samples. After every second
input it computes ½·x[centre] + Σ c_k·(x[centre − (2k+1)] + x[centre + (2k+1)])
with one multiplier, one coefficient per clock (the symmetric pair is added
first), then rounds to the input LSB and saturates to the output width. The
extra output bits over the input (26/25/26/25 against 24) are headroom for
the filters' overshoot; the LSB weight is the same throughout the chain. A
new sample must not arrive while the K products run: at OSR 64 HBF1 gets a
sample every 4 clocks and needs 3, which is the tightest case (an assertion
guards it).

**Group delay.** In 96 kHz samples the chain delays by 3 + 2·5 + 4·7 + 8·11 =
129 samples, 1.344 ms at OSR 1024, plus 2R clocks for the SINC stage. The
decimator testbench measures the half-way point of a step at 131·R clocks
plus about 25 clocks of pipeline latency.

## Saturation (`saturate`)

The last filter's 25-bit result is clamped to 24 bits. A full-scale step
overshoots by a few percent and is clipped here rather than wrapping. The
`clipped` output of the top pulses with each clamped word.

## Serial output (`serial_tx`)

```
MCLK    _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
CLKOUT  ___|‾‾‾|___|‾‾‾|___|‾‾‾|___|‾‾‾|_     MCLK / 2, free running
VALID   _______|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ... (24 bits)
DATA    _______X b23   X b22   X b21   X ...
                   ^ sample on rising CLKOUT
```

Words leave MSB first. DATA and VALID change right after a falling CLKOUT
edge; sample them on the rising edge. VALID is high while the 24 bits of a
word are on DATA. A word takes 48 MCLK clocks, less than the shortest sample
period (64 clocks at OSR 64). A sample that arrives during a transmission
waits in a one-word buffer; if it is sent back to back, VALID stays high and
the receiver frames words by counting 24 bits from the rising edge of VALID.

## Radiation hardening (`tmr_reg`, `rst_sync`)

Every register of the digital part is a `tmr_reg`: three copies and a
bitwise two-out-of-three voter. Each copy reloads the voted value when the
register is not written, so a single event upset is corrected at the next
clock edge instead of waiting in a copy. The blocks are written as a packed
state struct, a combinational next-state function and one `tmr_reg` holding
the struct. `TMR = 0` on a block builds plain registers. The synthesis flow
must be told to keep the three copies (no merging of equivalent registers);
a plain synthesis run merges them.

The external reset RST_N is asserted asynchronously and released on a clock
edge through a triplicated two-stage synchroniser; all other logic uses the
synchronous, active-high result.

## The analog models

**`sdm_model`** is a discrete-time model of the switched-capacitor modulator:

```
x1 ← x1 + a1·(b1·u  + c1·v)      a1 = 1/7,   b1 = 1,   c1 = −1
x2 ← x2 + a2·(b2·x1 + c2·v)      a2 = 0.222, b2 = 5/2, c2 = −1
v  = +1 if x2 > 0 else −1,  u = (INAP − INAN)/VREF
```

The coefficients are the capacitor ratios of the circuit (Cf/Ci, Cs/Cf, and
the DAC feedback). The noise transfer function is that of a double
integrator, (1 − z^−1)², up to the quantiser's effective gain. The first
integrator samples the input when its delayed sampling phase opens and
integrates on its PHI2; the second does the same on the phases of the second
clock generator, sampling x1 while the first integrator holds it. The
comparator decision and the output flip-flop act on the rising MCLK edge.
The integrator outputs saturate at ±VREF (amplifier swing). Correlated double
sampling in the first integrator is modelled by its effect: an amplifier
offset `OFFSET1` reaches the loop only if `CDS = 0`. VCM (the amplifiers'
common-mode level) has no role in this differential model.

The one noise source modelled is the thermal (kT/C) noise of the sampling
capacitors: each input sample gets a Gaussian error of rms sqrt(8kT/CS),
225.7 µV for the 0.7 pF capacitors at 323 K. The factor 8 counts two
sampling phases and two differential halves. Spread evenly up to half the
modulator rate, only 1/OSR of that power lands in the 1 kHz band, which
sets a full-scale SNR of 10·log10(VREF²·OSR·CS/(8kT)) ≈ 113 dB at OSR 1024;
the capacitor would have to be about 10 pF for 125 dB. The samples come
from a xorshift32 generator and the Box–Muller transform inside the model,
so runs repeat exactly; `CS = 0` on the `u_sdm` instance in `adc_top`
gives a noise-free modulator. Not
modelled: amplifier finite gain, bandwidth and 1/f noise, charge injection,
comparator offset and metastability.

**`clk_phase_gen`** produces, from MCLK, two non-overlapping phases PHI1
(MCLK high) and PHI2 (MCLK low), delayed copies PHI1D and PHI2D that fall
TD = 3 ns later (so the switches they drive open last, which reduces
signal-dependent charge injection), and the complements of all four for the
pass-gate switches. The non-overlap gap is 2 ns. The ADC uses two instances,
one per integrator. In silicon this is a gate and inverter-chain network; the
model reproduces its timing with delays.

Both models use `real` and delays: they simulate with Verilator (`--timing`)
and any event simulator, but they are not for synthesis.

## Files

| file | contents |
|------|----------|
| `rtl/adc_pkg.sv` | widths, OSR code mapping, half-band orders and coefficients |
| `rtl/adc_top.sv` | the whole converter |
| `rtl/decimator.sv` | SINC + HBF1..4 + saturation |
| `rtl/cic_sinc.sv`, `rtl/hbf.sv`, `rtl/saturate.sv`, `rtl/serial_tx.sv` | decimator stages and output |
| `rtl/tmr_reg.sv`, `rtl/rst_sync.sv` | hardened register and reset synchroniser |
| `rtl/sdm_model.sv`, `rtl/clk_phase_gen.sv` | behavioural analog models |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_sine750.sv` | 750 Hz sine conversion at the nominal settings |
| `tb/tb_stopband.sv` | pass-band edge and alias suppression of the whole converter |

## Simulating

Each testbench ends with a line `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/*.sv \
          tb/tb_adc_top.sv --top-module tb_adc_top -o sim
./obj_dir/sim
```

Replace `tb_adc_top` by any other testbench. All of them finish in seconds.
`-Wno-fatal` is needed for `tb_tmr_reg`, which injects upsets into the
register copies with `force` and so draws a multiple-driver warning.

What they check:

- `tb_cic_sinc`: every SINC output against a direct convolution with the
  (1 + … + z^−(R−1))⁴ taps in 64-bit arithmetic, for R = 4, 8, 16, 128, with
  pauses, accumulator wrap-around and the full-scale limit exercised; one
  output per R clocks.
- `tb_hbf`: all four filters against direct-form convolutions (rounding and
  saturation included), minimum input spacing, latency K + 1, unity DC gain.
- `tb_decimator`: exact outputs for all-ones, all-zeros and alternating
  streams, DC accuracy through a modulator, output rate, group delay,
  saturation of a full-scale step, STOPADC, OSR change on the fly.
- `tb_serial_tx`: words rebuilt by a receiver model, CLKOUT and framing
  rules, back-to-back words through the buffer.
- `tb_tmr_reg`, `tb_rst_sync`, `tb_saturate`, `tb_clk_phase_gen`,
  `tb_sdm_model`: upset masking and scrubbing; reset assertion and release
  timing; clamp limits; non-overlap and 3 ns trailing delay; modulator
  average versus input, CDS on and off, rms of the sampling noise.
- `tb_adc_top`: the whole converter at default parameters: DC inputs at
  OSR 1024, 64 and 2048 decoded from the serial pins within 3·10⁻⁴ of full
  scale, word spacing of exactly OSR clocks, SIGMA density, STOPADC,
  saturation and accumulator wrap-around.
- `tb_sine750`: a 750 Hz, 3.2 V peak-to-peak differential sine at OSR 1024.
  A sine fitted to 64 output words matches the input amplitude within 0.04 %
  (the SINC droop), and the residual is 104 dB below the signal, which is
  the kT/C floor at this amplitude (113 dB at full scale, less 9 dB for a
  sine at 0.485 of full scale). With `CS = 0` the residual drops to 120 dB
  below the signal: that is the floor of the digital filter and the ideal loop.
- `tb_stopband`: the same converter driven by tones at 1 kHz and at 5, 7,
  11, 47 and 95 kHz, which fold onto 0–1 kHz at 6 kHz. The 1 kHz tone comes
  through at −0.02 dB; the folding tones measure between 114 and 130 dB
  down, and the check requires 100 dB. Those figures are the sampling-noise
  floor of a 64-word fit, not the filter: with `CS = 0` they read 133 to
  150 dB, close to the designed 140 dB.

## How far to trust it, and where it departs

- The structure, rates, orders, pass-band edges, bus widths, the 30-bit CIC
  word, the modulator coefficients, the 3 ns phase delay, STOPADC, SIGMA and
  TMR on every flip-flop follow the original design.
- The half-band coefficients, the serial multiply-accumulate architecture,
  rounding and saturation points, the output scaling, the OSR code mapping,
  the serial protocol details, the reset pin and synchroniser, and TMR
  scrubbing are this implementation's choices; the original gives only the
  filter specifications, the pin names and that samples leave as 24-bit
  words with a clock.
- Aliasing onto 0–1 kHz is suppressed by 139.7 dB at worst (near 47 kHz,
  at OSR 1024), 0.3 dB short of the 140 dB target; the order-6 first
  half-band filter with 24-bit coefficients cannot do better, and a longer
  filter would depart from the specified orders.
- The modulator model is ideal apart from the amplifier swing limit, an
  optional offset and the kT/C sampling noise. Distortion and amplifier
  effects are absent, so the real chip's 110 dB SFDR and about 18 effective
  bits cannot be reproduced by it.
- Transistor-level parts are not in the RTL: the amplifiers, the latched
  comparator circuit, the switches and capacitors of the integrators and of
  the 1-bit DAC, the current reference and bias network, the pads, and the
  process-level hardening (SOI with deep-trench isolation, enclosed-layout
  transistors).

## Changing it

- Widths and filter constants live in `adc_pkg`. A new half-band order only
  needs `hbf_order`, `hbf_ntaps` and `hbf_coef` updated; keep
  Σ c_k = 2²² for unity DC gain, and keep K + 1 below twice the input
  spacing at the fastest OSR.
- The CIC word must satisfy W ≥ 4·log2(R_max) + 2.
- `TMR = 0` on `decimator`, `cic_sinc`, `hbf` or `serial_tx` removes the
  triplication for area studies.
