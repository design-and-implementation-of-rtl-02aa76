# Digital matched filter for square pulses

A square pulse buried in noise is hard to see because the noise has as much
power as the pulse, or more. A matched filter fixes this. It correlates the
received samples with a stored copy of the pulse, so the pulse's energy adds up
coherently over the pulse width while the noise adds up only in power. With a
pulse of M samples, the signal-to-noise ratio at the output is M times the
ratio at the input. This design uses M = 300 samples (a 6 us pulse at 50 MHz),
which gives 10 log10(300) ≈ 24.8 dB of processing gain. The filter computes
the whole 300-tap correlation in parallel and delivers one new result every
clock, so it keeps up with the 50 MHz sample stream.

The RTL holds the filter and the test set-up it was built with, all in one
FPGA. A direct digital synthesizer makes the pulse train, a pseudo-noise
generator makes the noise, and an adder mixes them at input SNRs of 1/1, 1/2,
1/3 or 1/8. The filter's input and output are also given as 8-bit DAC codes,
so both can be shown on an oscilloscope.

```
 freq_code ─► ddfs_square ──clean pulse──┬──────────────► dmf.ref_in
                  │ pulse_start          │                 ▲ ref_shift
                  ▼                      ▼                 │
            single_m_ctrl ───── single_m ──────────────────┘
                                         │
 dpng ──noise──► noise_mixer ◄───────────┘
                     │ dmf_in (signed 8 bit)
                     ▼
                    dmf ──► dmf_out (signed 27 bit) ──► dac_scaler ──► dac_out_code
                     │
                     └──────────────────────────────► dac_scaler ──► dac_in_code
```

## The filter: `dmf`

The filter evaluates

    Y(n) = sum_{m=0}^{299} S(n-m) · H(m)

It is made of four parts:

* **Two 300-stage shift registers of 8-bit samples** (`sample_shift_register`).
  The input register shifts every clock, so tap m holds S(n-m). The reference
  register shifts only while `ref_shift` is high, and holds its contents at
  all other times.
* **300 signed 9×9 multipliers** (`multiplier_array`), one per tap. The 8-bit
  operands are sign-extended to 9 bits, which is the native size of the
  embedded multipliers on the FPGA family the design was sized for. Each
  product is kept to 16 bits, which loses nothing: an 8×8-bit signed product
  never needs more.
* **A 300-input adder** (`adder_tree`) from 16-bit products to a 27-bit sum.

**How the reference gets in, and why it ends up time-reversed.** The
reference is not a table of coefficients. It is captured live. A window of
exactly 300 clocks, called *Single M*, opens on the first sample of a clean
pulse. While the window is open, the clean pulse samples are shifted into the
reference register. Both registers shift in the same direction. So when the
window closes, tap m of the reference register holds the sample taken m
clocks before the window's end: H(m) = s(299-m). This time-reversed copy of
the pulse is exactly the impulse response of a matched filter. Two things
follow:

* The same hardware can match any pulse shape. It learns the shape by
  capturing one pulse.
* The reference can be captured again at any time with `reload`.

For the square pulse, every H(m) is 14 (the pulse amplitude).

**What the output looks like.** The input is a train of 300-on/300-off
pulses. The output is therefore a triangle with a base of 600 samples, twice
the pulse width. Its peak of 300·14·14 = 58800 falls at the last sample of
each received pulse.

**Timing.** A sample applied to `x_in` before clock edge k is handled in
three steps:

* it enters the input register at edge k;
* its products are registered at edge k+1;
* the sum is registered at edge k+2.

So `y_out` reflects the sample three clocks after it was applied
(`DMF_LATENCY` in `dmf_pkg`), and one result comes out every clock. The
original design's timing only requires each full convolution to finish
within one 20 ns sample period. The two pipeline registers are this design's
own choice to make that rate practical.

## Pulse synthesizer: `ddfs_square`

The synthesizer is a 32-bit phase accumulator that adds the frequency code
every clock. The pulse is on while the accumulator's top bit is 0, so the
pulse width is half the period. The pulse frequency is
F_clk · code / 2^32. For T = 12 us at 50 MHz, the code is
2^32 / 600 = 7158278 (rounded down, `L_SQ_DEFAULT`).

Because the code is rounded down:

* the first pulse after reset lasts 301 samples and its period 601;
* after that, pulses are exactly 300 on and 300 off;
* one period in about fourteen thousand is 601 samples long.

The output sample is 14 during the pulse and 0 outside it. That is a
unipolar pulse, S(t) = 1 on the pulse and 0 elsewhere. `pulse_start` marks
the first sample of every pulse.

The same filter also serves other sample rates, as long as the pulse width is
300 samples:

| F_sam (MHz) | 10 | 20 | 25 | 30 | 50 | 60 |
|---|---|---|---|---|---|---|
| tau_s (us) | 30 | 15 | 12 | 10 | 6 | 5 |
| T (us) | 60 | 30 | 24 | 20 | 12 | 10 |

In every row T·F_sam = 600, so the frequency code stays the same and only the
clock changes.

## Noise: `dpng` and `noise_mixer`

The noise generator `dpng` is a 60-bit shift register clocked once per
sample. The bit fed back into stage 0 is the XNOR (an XOR followed by a NOT)
of stages 59 and 58, i.e. the polynomial x^60 + x^59 + 1. This is a
maximal-length sequence: it repeats after 2^60 - 1 clocks, about 730 years
at 50 MHz. Two details matter:

* **Lock-up state.** With XNOR feedback the state that locks up is all ones,
  not all zeros. An assertion checks that this state is never reached.
* **Seed.** The default seed is an arbitrary mix of ones and zeros. With this
  sparse feedback, a seed made of long runs spreads slowly: the output would
  start with thousands of biased samples.

**How the noise is taken from the register.** The noise is the register's
bit sequence itself, one bit per sample. A one becomes +127 and a zero
becomes -128. This binary sequence is white, so the filter sees it as white
noise. It is binary, not Gaussian.

The obvious alternative would be an 8-bit word made of eight adjacent
register bits, but that is not white. Consecutive words are shifted copies of
each other, so they are strongly anti-correlated and nearly cancel in the
filter's 300-sample sum. With such words the measured gain came out at 46 dB
instead of 25 dB.

**Mixing.** `noise_mixer` scales the noise word r to a peak of k·14 as
(r·k·14) >>> 7, with k = 0, 1, 2, 3 or 8 (`snr_sel`, type `snr_sel_e`). It
adds the result to the pulse, saturates to the signed 8-bit range and
registers it. The pulse amplitude is set to 14 because that is the largest
value for which pulse plus eight times the noise still fits in 8 bits
(14 + 112 = 126). The saturation therefore never triggers in the system; an
assertion in `dmf_system` checks this. The input SNR (amplitude ratio) is
1/k.

## Reference window: `single_m_ctrl`

The window controller is armed by reset or by `reload`. Once armed, it waits
for `pulse_start`. It then raises `single_m` on that same clock and keeps it
high for the next 299 clocks, 300 shifts in total. After that it raises
`ref_valid` and ignores further pulses. A `reload` in the middle of a window
aborts the window and re-arms the controller.

## DAC codes: `dac_scaler`

Each DAC code is the signed value shifted right arithmetically by `SHIFT`,
saturated to [-128, 127] and offset by 128. This gives an offset-binary code
in which 128 is zero. The code is registered (one clock).

* The input path uses `SHIFT = 0`.
* The output path uses `SHIFT = 9`, which puts the noise-free peak of 58800
  at code 242.

The DAC chips themselves are off-chip and not part of the RTL.

## Top level: `dmf_system`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock (50 MHz) |
| `rst_n` | in | 1 | synchronous, active-low reset |
| `freq_code` | in | 32 | synthesizer frequency code (7158278 for 12 us) |
| `snr_sel` | in | 3 | 0 noise off, 1: SNR 1/1, 2: 1/2, 3: 1/3, 4: 1/8 |
| `reload` | in | 1 | capture a new reference at the next pulse |
| `dac_in_code` | out | 8 | offset-binary code of the filter input |
| `dac_out_code` | out | 8 | offset-binary code of the filter output |
| `dmf_in` | out | 8 | signed filter input |
| `dmf_out` | out | 27 | signed filter output |
| `ref_valid` | out | 1 | reference captured |

Latencies, from the synthesizer onwards:

* `dmf_in` is one clock after the synthesizer's pulse sample;
* `dmf_out` is three clocks after `dmf_in`;
* each DAC code is one clock after its signal.

After reset, the reference is captured from the first pulse, and `ref_valid`
rises 300 clocks later.

Parameters (package `dmf_pkg` and module parameters), all at the original
design's values except where marked:

| name | default | meaning |
|---|---|---|
| `M_TAPS` / `M` | 300 | filter length = pulse width in samples |
| `DATA_W` | 8 | signed sample width |
| `MULT_W` | 9 | multiplier operand width |
| `PROD_W` | 16 | adder input width |
| `ACC_W` | 27 | adder output width |
| `PHASE_W` | 32 | phase accumulator width |
| `L_SQ_DEFAULT` | 7158278 | frequency code for T = 12 us at 50 MHz |
| `DPNG_K` | 60 | noise shift register length |
| `SIG_AMP` | 14 | pulse amplitude (own choice) |
| `dac_scaler.SHIFT` | 9 (output), 0 (input) | DAC scaling (own choice) |

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=F`. Each compares the module's outputs against
values the testbench computes independently:

* integer products and sums;
* a 64-bit phase model for the synthesizer;
* the defining recurrence b(n) = NOT(b(n-60) XOR b(n-59)) for the noise
  generator, plus an exact period check of 2^15 - 1 on a 15-bit instance;
* real-arithmetic scaling for the mixer and the DAC codes;
* a copy of both shift registers for the filter, including a latency check
  of 3 clocks and an impulse-response check.

`tb/dmf_system_tb.sv` runs the whole system at its default size, about 60,000
clocks. It checks, clock by clock:

* the clean input against the pulse model;
* the filter output against 14 × (sum of the last 300 inputs);
* both DAC codes.

With noise off, it checks the 58800 triangle peak and the 600-sample output
base. It then runs 20 periods at each input SNR. For each SNR it measures the
processing gain from the noisy and noise-free outputs, and it checks that the
output peak falls within a quarter period of the true peak. Measured gains:

| noise peak | input SNR | output SNR | gain | periods with peak found |
|---|---|---|---|---|
| 1 × pulse | 0.3 dB | 26.0 dB | 25.7 dB | 19 of 19 |
| 2 × pulse | -5.9 dB | 18.5 dB | 24.3 dB | 19 of 19 |
| 3 × pulse | -9.4 dB | 15.9 dB | 25.4 dB | 19 of 19 |
| 8 × pulse | -18.0 dB | 7.7 dB | 25.7 dB | 18 of 19 |

The target is 10 log10(300) = 24.8 dB; the spread comes from measuring over
only 20 periods. The testbench requires the gain to be within 3 dB of the
target and the peak to be found in at least 90% of the periods.

To simulate with Verilator (from the directory holding `rtl/` and `tb/`; the
package is read first and the modules are found by name in `rtl/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/dmf_pkg.sv \
    tb/dmf_system_tb.sv --top-module dmf_system_tb -o sim
obj_dir/sim
```

Replace the testbench file and top name to run another block's test.

## Where this design departs from, or adds to, the original

* **Pipelining.** The original sums the 300 products within one sample
  period. This design keeps the rate but adds two pipeline stages (3 clocks
  of latency).
* **Noise.** The original calls its noise white Gaussian. This generator
  gives white *binary* noise, one register bit per sample, mapped to full
  scale.
* **Own choices, not from the original:**
  * the feedback taps (stages 59 and 58) and the seed;
  * the pulse amplitude of 14;
  * the noise scaling rule and the saturation;
  * the DAC scaling and offset-binary format;
  * the reload input;
  * triggering the reference window on a pulse start;
  * the synchronous, active-low reset.
* **Not reproduced:**
  * the 10 KB memory figure quoted for the original implementation; nothing
    in this datapath needs a memory beyond its 600 bytes of sample registers;
  * the cascade of several 300-tap filters, suggested for gains up to about
    36 dB, whose structure is not specified. Raising `M` gives a longer
    single filter. Since each product is at most 2^14 in magnitude, the
    27-bit sum is safe up to 4096 taps.
* **Not checked:** synthesis and timing closure on an FPGA at 50 or 60 MHz.
  The 300-input adder in one stage may need more pipelining there.
