# 201-tap FIR low-pass filter with a DDFS test source

This design is a self-contained FPGA test bench in hardware for a digital
low-pass filter. A direct digital frequency synthesiser (DDFS) makes a clean
8-bit sine tone. The tone is sampled at 2 MHz and fed to a 201-tap FIR filter
with a 100 kHz cut-off. The filter uses plain 8-bit integer coefficients
(-127..127) in place of fractional ones. They come from the ideal sinc
impulse response, normalised to its peak and rounded. All 201 taps are
multiplied in parallel. The whole system runs from one 50 MHz clock, the
clock of a Cyclone II class board.

```
 50 MHz clk
   |
   v
 phase_accumulator  (24 bit, code 671089, always enabled)
   | carry = sample_strobe, 2 MHz (every 24/25 clocks)
   v
 ddfs_sine  <-- code -- tone_select (50 k / 100 k / 102 k / external)
   | 24-bit phase, advanced once per strobe
   | top 13 bits -> sine_rom 8192 x 8 -> x_sample 0..255, x_valid
   v
 fir_lpf  (201-tap delay line, 201 constant multipliers, one adder)
   |
   v
 y_out (24-bit two's complement), y_valid
```

## The coefficients

The filter is a windowed-sinc design with a rectangular window. That means
no window at all: the ideal response is simply cut off after 100 taps on
each side of the centre. With fc = 100 kHz and fs = 2 MHz, so fc/fs = 0.05:

```
h(0) = 2 fc/fs = 0.1
h(k) = sin(2 pi k fc/fs) / (pi k)          k = -100 .. 100, k != 0
c(n) = round(127 * h(n-100) / h(0))        n = 0 .. 200 (tap index)
```

Rounding is to the nearest integer, with halves going away from zero. Some
values to check against:

| tap n | 0 | 1 | 2 | 3 | 4..7 | 8 | 92 | 93 | 94 | 95 | 96 | 97 | 98 | 99 | 100 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| c(n) | 0 | -1 | -2 | -3 | -4 | -3 | 30 | 47 | 64 | 81 | 96 | 109 | 119 | 125 | 127 |

The set is symmetric: c(200-n) = c(n). The outermost taps are 0 because
sin(10 pi) = 0. The coefficients sum to 1255, which is the DC gain, and the
sum of their magnitudes is 2659.

The coefficients are not stored in a table or file. `fir_pkg::lpf_coeff`
computes each one at elaboration time from the formula, and each tap's
multiplier gets its own constant. So synthesis sees 201 constant
multipliers, which it reduces to shift-and-add logic or maps to DSP blocks.

## The two frequency synthesisers

The design uses the DDFS principle twice. A phase accumulator adds a
frequency code to itself modulo 2^24, so the output frequency is
`code * f_step / 2^24`, where `f_step` is the rate at which the
accumulator is advanced.

* **Sampling strobe.** The accumulator is advanced on every 50 MHz clock with
  code 671089 = round(2 MHz * 2^24 / 50 MHz). Each wrap-around of the
  accumulator is a one-clock pulse, `sample_strobe`. The exact code is
  671088.64, so the gaps between pulses are 25 clocks, with an occasional
  gap of 24 clocks. The mean rate is 2.000001 MHz.
* **Test tone.** A second 24-bit accumulator is advanced once per sampling
  strobe, not once per clock. Its code is therefore referred to 2 MHz:
  `code = f * 2^24 / 2 MHz`. The top 13 phase bits address a 8192 x 8
  table holding one sine period, stored as `round(127.5 * (1 + sin))`, so
  the values run 0..255. Because the tone is stepped by the sampling strobe,
  the sample sequence does not depend on the 24/25-clock jitter of the
  strobe.

| tone | code | actual frequency |
|---|---|---|
| 50 kHz | 419430 | 49 999.95 Hz |
| 100 kHz | 838861 | 100 000.02 Hz |
| 102 kHz | 855638 | 101 999.99 Hz |
| external | `ext_code` | `ext_code * 0.1192 Hz`, up to 1 MHz |

With the tone accumulator clocked at 50 MHz instead, the step would be about
3 Hz and the range would reach 25 MHz. That is the usual way to quote a
24-bit, 50 MHz DDFS. This design follows the tone codes listed above
instead, so its step is 0.12 Hz and its range is 0..1 MHz. That is all a
2 MHz sampled filter can use anyway.

## Filter datapath and timing

* **Offset binary in, two's complement inside.** The sine table is unsigned
  (mid-scale 127.5). `fir_lpf` inverts the MSB of each incoming sample, which
  turns 0..255 into -128..127. The delay line therefore holds signed 8-bit
  samples, and the filter output has no DC offset. Without this step the
  output would sit on a DC level of about 128 * 1255 = 160 640.
* **Delay line.** There are 201 registers of 8 bits each. They shift once per
  `x_valid`, so each z^-1 element is one sampling period (0.5 us).
* **Multiply and add.** The 201 products are formed in parallel, and one
  adder sums them. The sum is registered on the clock edge after the shift.
  The adder has a whole sampling period to settle, which is 25 clocks at
  50 MHz. For timing closure, the path from the delay line to `y_out` must be
  declared a multicycle path. The RTL does not pipeline the adder.
* **Output width.** The default output is 24 bits (8 + 8 + ceil(log2 201)).
  The largest possible magnitude is 128 * 2659 = 340 352, so 20 bits would
  already be enough. `y_out` is the full-precision sum, with no rounding and
  no scaling.
* **Latency.** A sample appears on `x_sample`/`x_valid` two clocks after
  `sample_strobe`: one clock for the accumulator and one for the ROM. The
  output appears on `y_out`/`y_valid` two clocks after `x_valid`. The
  sample-to-output delay of the filter itself is 100 samples (50 us), because
  the filter is linear phase.

## Frequency response

The end-to-end test measures the following steady-state amplitudes with a
full-scale 8-bit tone (amplitude 127.5 LSB). The expected values are
127.5 * |H(f)|.

| tone | output amplitude | re DC gain | re 50 kHz |
|---|---|---|---|
| 10 kHz | 164 971 | +0.27 dB | |
| 50 kHz | 166 696 | +0.36 dB | 0 dB |
| 100 kHz | 80 590 | -5.96 dB | -6.3 dB |
| 102 kHz | 49 195 | -10.24 dB | -10.6 dB |

The 100 kHz point sits at -6 dB, as expected for a windowed-sinc cut-off.
Bench measurements of this filter design, taken after the analogue output
and a spectrum analyser, gave -7.5, -13.9 and -23.5 dB at 50, 100 and
102 kHz. The 100 kHz vs 50 kHz step (-6.4 dB) agrees with the digital
response above. The 102 kHz figure (-16 dB relative to 50 kHz) is about
5 dB steeper than the ideal arithmetic of these coefficients allows. It
presumably includes the measurement chain. The transition band of a
201-tap rectangular window is about fs/201 = 10 kHz wide, so a 2 kHz step
above the cut-off cannot by itself buy 16 dB.

## Where this RTL makes its own choices

The following are design decisions here, not fixed by the filter's
specification:

* The 2 MHz strobe is the carry of the sampling accumulator.
* `tone_select` chooses the tone, with three presets and an external 24-bit
  code.
* The offset-binary to two's complement conversion happens at the filter
  input.
* The ROM contents are `round(127.5 * (1 + sin))`, addressed by plain phase
  truncation, without dithering or interpolation.
* The output is 24 bits at full precision, with no output scaling. Converting
  `y_out` to an analogue signal (a DAC on the board) is outside this RTL.
* An active-low synchronous reset clears both accumulators, the delay line
  and the output registers.
* The pipeline latencies are as listed above.
* The symmetric coefficients are not folded to halve the multipliers. The
  filter is kept as a plain direct form.

The 50 kHz code is 419430, which is 0.05 * 2^24 / 2 rounded.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | sizes, frequency codes, `tone_sel_e`, coefficient functions |
| `rtl/phase_accumulator.sv` | DDFS accumulator with enable and wrap-around pulse |
| `rtl/sine_rom.sv` | 8192 x 8 sine table, computed at initialisation, synchronous read |
| `rtl/ddfs_sine.sv` | accumulator + sine table: the test-tone source |
| `rtl/tone_select.sv` | frequency code selector |
| `rtl/fir_lpf.sv` | 201-tap direct-form FIR filter |
| `rtl/fir_lpf_system.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports of `fir_lpf_system`: `clk`, `rst_n`, `tone_sel[1:0]`
(0 = 50 kHz, 1 = 100 kHz, 2 = 102 kHz, 3 = external), `ext_code[23:0]`,
`sample_strobe`, `x_sample[7:0]`, `x_valid`, `y_out[23:0]` (signed) and
`y_valid`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example, the end-to-end test at full size runs in well under a second:

```
verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv \
    tb/tb_fir_lpf_system.sv --top-module tb_fir_lpf_system -Mdir obj -o sim
./obj/sim
```

Here is what the testbenches check:

* **`tb_fir_lpf_system`** runs the design at its default parameters. It
  plays the 50 kHz, 100 kHz, 102 kHz and 10 kHz (external code) tones,
  switching between them on the fly. Its reference models check:
  * the spacing of the strobes;
  * every input sample;
  * every output sample, against a direct convolution;
  * the latencies;
  * the amplitudes in the table above, to within 3 %;
  * the 102 kHz vs 50 kHz attenuation.
* **`tb_fir_lpf`** checks the coefficients against the table above. It
  checks the impulse response, random-input convolution and the DC gain at
  both full-scale extremes.
* **`tb_ddfs_sine`**, **`tb_phase_accumulator`**, **`tb_sine_rom`** and
  **`tb_tone_select`** check their modules against reference models. All
  8192 table entries are checked, and the 2 MHz strobe count is checked over
  0.5 ms.

Verilator is a two-state simulator. All state that the design reads is
reset or initialised, so random start-up values do not matter.

## Changing it

* **Cut-off or sampling rate.** Change `FCUT_HZ` and `FSAM_HZ` on `fir_lpf`
  (or on the top). The coefficients follow the formula. Also change
  `FSAM_CODE` on the top to `round(fs * 2^24 / 50 MHz)`. The tone codes in
  `fir_pkg` are referred to fs and must be recomputed too.
* **Filter length.** Change `NTAPS`, which should be odd. The output width
  follows unless it is overridden.
* **Coefficient or sample width.** Change `CW` or `DW`. The coefficients
  scale to `2^(CW-1) - 1`.
* **Window.** Tapering the coefficients (Hamming, Blackman) would widen the
  transition band and lower the stop-band ripple. That takes one extra
  factor in `fir_pkg::lpf_coeff`.
