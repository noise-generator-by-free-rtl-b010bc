# Gaussian white-noise generator for a small iCE40 FPGA

This design makes band-limited Gaussian noise from plain shift registers. A
12-bit LFSR gives uniformly distributed numbers. The average of four such
numbers is already close to a normal distribution (central limit theorem), so
four LFSR counters run side by side and a small adder averages them. A new
averaged sample is produced at a programmable sampling frequency. It is driven
out on 12 pins to an external 12-bit DAC (a DAC7541 in a bipolar output stage).
A 4-bit amplitude code goes out on 4 more pins to an R-2R ladder that sets that
stage's reference voltage. A PC sets the seed, the sampling frequency and the
amplitude over a USB-UART link.

The RTL targets a Lattice iCE40HX4K with a 12 MHz clock. At the default
parameters yosys `synth_ice40` maps it to about 404 flip-flops, 514 LUT4 and
218 carry cells.

## Signal path

```
 PC ──USB──> USB-UART bridge ──uart_rx_i──> uart_rx ──bytes──> param_loader
                                                                 │ seed, load
                                                                 │ freq (Hz)
                                                                 │ amp ─────────────> dd_o[3:0] ─> 4-bit R-2R DAC ─> Vref
                                                                 v                                                       │
            ┌──────────────────────── gauss_gen ─────────────────────────┐                                              v
            │ seed_loader ──4 seeds every 64 clk──> lfsr12 x4 ──> avg4   │──> d_o[11:0] ─> 12-bit DAC ─> bipolar stage ─> mixing
            │ (12 MHz LFSR)                          (step at freq)      │                                              network
            └────────────────────────────────────────────────────────────┘
```

Everything left of the DACs is RTL in `rtl/`. The bridge, the DACs, the bipolar
stage and the mixing network are board parts. They are modelled only in the
testbench (`tb/`).

## How the Gaussian samples are made

**LFSR counters (`lfsr12`).** Each counter is a 12-bit Fibonacci LFSR. Its
feedback polynomial is x^12+x^6+x^4+x+1 (taps 12, 6, 4, 1, XOR). It steps
through all 4095 non-zero states. State 0 would lock it, so a seed of 0 is
loaded as 1. A counter steps once per sample tick while `enable` is high.

**Seed loader (`seed_loader`).** If all four counters started from the same
seed, they would stay equal. Their average would then just be one uniform
sequence. The seed loader prevents this with a fifth LFSR that runs at the full
12 MHz. The user seed is loaded into that LFSR. Every 64 clocks the loader
reloads all four counters, each with a different value. These values are the
fast LFSR's states at steps 15, 31, 47 and 63 of the 64-clock period. They are
16 steps apart in a 4095-long sequence, so they can never be equal.

The reload every 64 clocks has a consequence that is easy to miss. At the
sampling rates the generator is meant for (10–100 kHz, i.e. 120–1200 clocks
per sample), the counters are reseeded many times between samples. Each
sample is therefore the most recent seed set stepped once. The randomness comes
from the fast seed LFSR, not from the slow counters. Above 187.5 kHz
(12 MHz / 64) two or more samples fall inside one seed period. Those samples
are successive LFSR steps of the same four seeds, so neighbouring samples are
correlated.

**Averaging (`avg4`).** The four 12-bit values are added into a 14-bit sum and
shifted right by 2. The result is registered and held until the next sample,
so the output word changes only at the sampling frequency. This holding is what
makes the noise band-limited: its power lies below the sampling frequency.

The expected statistics are those of the mean of four uniform variables on
1..4095: mean 2047.5 and standard deviation 4096/√12/2 ≈ 591. About 68 % of
samples lie within one standard deviation (a uniform variable has 57.7 %). The
range is 1..4095, with the tails thinner than a true Gaussian's, as with any
four-term sum. Simulation of 20,000 samples gives mean 2047.5, sd 590.9,
67.1 % within 1 sd and 95.7 % within 2 sd.

## Sampling frequency

The frequency is set in Hz, as a 24-bit number. `rate_gen` turns it into
sample ticks without a divider. Every clock it adds `freq` to an accumulator.
When the accumulator reaches 12,000,000, it subtracts that value and emits a
tick. Over one second this gives exactly `freq` ticks. Individual gaps are
⌊12e6/freq⌋ or ⌈12e6/freq⌉ clocks. `freq = 0` stops the output, and values at
or above 12 MHz give a sample on every clock.

Each of the four counters has its own `rate_gen`. They share reset, frequency
and restart, so they tick in the same clock; an assertion in `gauss_gen` checks
this. A user seed load also zeroes the accumulators. A given seed and frequency
therefore always give the same sample sequence.

Latency: a sample appears on `d_o` two clocks after its tick. `d_valid_o`
pulses in the same clock.

## Host protocol

The serial link is 115200 baud, 8 data bits, no parity, 1 stop bit. The host
sends all three settings together in a 7-byte frame:

| byte | content |
|------|---------|
| 0 | header `0x7E` |
| 1 | seed[11:8] in bits 3:0 |
| 2 | seed[7:0] |
| 3–5 | sampling frequency in Hz, MSB first |
| 6 | amplitude code in bits 3:0 |

Bytes that arrive while no frame is open are skipped, unless they are `0x7E`.
Inside a frame `0x7E` is ordinary data. If a frame stalls for 1 ms (12,000
clocks), it is discarded. The loader then waits for a new header, so one lost
byte costs only one frame. When the last byte arrives, all three settings
change in the same clock. The generator is then restarted from the new seed.
A bad stop bit or a discarded frame sets the sticky `rx_err_o` flag. Reset
clears it.

After reset the settings are seed 2048, 10 kHz and amplitude code 0.

## Amplitude

`dd_o` is a plain 4-bit code for an external R-2R ladder. With the ladder
driven from 3.3 V I/O, one step is 3.3/16 ≈ 0.206 V. That ladder output is the
reference of the bipolar DAC stage, which gives an output of
Vref·(2·code/4096 − 1), i.e. ±Vref peak. Codes 2, 4 and 5 give 0.4125 V,
0.825 V and 1.031 V of noise amplitude. The host converts volts to a code.
Since the samples sit mostly near mid-scale, the RMS of the noise is about
0.29·Vref.

## Ports of `noise_gen_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 12 MHz clock |
| `rst` | in | 1 | synchronous, active high |
| `uart_rx_i` | in | 1 | serial data from the USB-UART bridge |
| `enable` | in | 1 | runs (1) or freezes (0) the LFSR counters; while 0 no samples come out |
| `d_o` | out | 12 | noise sample, to DAC data pins D0..D11 |
| `d_valid_o` | out | 1 | one-clock pulse per new sample |
| `dd_o` | out | 4 | amplitude code, to DD0..DD3 |
| `rx_err_o` | out | 1 | sticky serial/frame error |

Parameters: `CLK_HZ` (12,000,000), `BAUD` (115,200), `SEED_PERIOD` (64) and
`RX_TIMEOUT` (12,000 clocks). Shared widths and reset values are in
`noise_pkg`.

## Files

| file | content |
|------|---------|
| `rtl/noise_pkg.sv` | widths, reset values, `params_t`, LFSR step function |
| `rtl/rate_gen.sv` | Hz-to-tick phase accumulator |
| `rtl/lfsr12.sv` | 12-bit LFSR counter with rate, load, enable |
| `rtl/seed_loader.sv` | fast LFSR, four seeds every 64 clocks |
| `rtl/avg4.sv` | sum of four, shift by 2, hold |
| `rtl/gauss_gen.sv` | seed loader + 4 counters + average |
| `rtl/uart_rx.sv` | 8N1 receiver |
| `rtl/param_loader.sv` | frame parser, settings registers |
| `rtl/noise_gen_top.sv` | FPGA top |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the system ones below |
| `tb/analog_chain.sv` | behavioural model of the board's analog parts |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It has
a watchdog that counts a failure if it hangs. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/noise_pkg.sv tb/tb_noise_gen_top.sv --top-module tb_noise_gen_top -o sim
./obj_dir/sim
```

What the testbenches check:

- `tb_lfsr12`: period 4095, all states, reference sequence, load, seed 0,
  enable, rate, restart.
- `tb_rate_gen`: exact tick count and gap bounds for many frequencies,
  including 0 and above the clock.
- `tb_seed_loader`: 64-clock spacing and each seed against the fast-LFSR
  trajectory.
- `tb_avg4`: floor((a+b+c+d)/4) and hold.
- `tb_uart_rx`: random bytes, bad stop bit, glitch.
- `tb_param_loader`: frames, junk before a header, timeout, header value as
  data.
- `tb_gauss_gen`: every sample against a closed-form reference model, the
  sample rate, enable, and the distribution statistics.
- `tb_noise_gen_top` runs at the default parameters and drives everything
  through the serial line. It covers 10, 50 and 100 kHz rates, amplitude codes,
  seed reproducibility, a 15,000-sample histogram, enable, and both error
  paths. It also counts that each mechanism (frame load, reseed, frequency
  change, frame error, timeout, enable off) occurred.
- `tb_noise_equipment` adds the analog model. It mixes the noise into a 1 kHz
  square wave and a 1 kHz sine wave and checks the noise amplitude in volts
  for codes 2, 4 and 5.

## Design choices beyond the basic scheme

The core scheme is four 12-bit LFSRs averaged by sum and 2-bit shift,
reseeded from a 12 MHz LFSR every 64 clocks, at a host-set sampling frequency
and a 4-bit amplitude. The following details are choices made in this RTL:

- LFSR taps 12, 6, 4, 1; seed 0 loaded as 1.
- Seeds for the four counters: the fast LFSR's states 16 steps apart. A user
  load restarts the 64-clock period and the sample-rate phase.
- Frequency in Hz through a phase accumulator, rather than a clock-divider
  count.
- The averaged output is registered and held between samples.
- Serial format 115200 8N1; the 7-byte frame, header, timeout and error flag.
- Synchronous active-high reset; reset settings 2048 / 10 kHz / 0.
- The amplitude code is sent as a code, not in volts. The 3.3 V ladder supply
  in the analog model is an assumption about the board.

The seed-loader arrays and the frame buffer are small register arrays; on the
iCE40 they map to flip-flops rather than block RAM.

## How far it has been checked

All of this is verified in simulation only. Every RTL file passes Verilator
lint and a slang elaboration. Every module has a self-checking testbench. Each
testbench fails when a typical bug is put into its module, for example a wrong
tap, equal seeds, a wrong shift or reversed byte order. The design has not been
run on a board. The analog model is ideal: no DAC nonlinearity, no op-amp
bandwidth limit, no settling time. Its 3.3 V ladder supply is assumed.

The "Gaussian" output is the mean of four 12-bit uniform values. It is bounded
to 1..4095, and its tails beyond about 3 sd are thinner than a normal
distribution's. Applications that need accurate tails need more averaged terms.
The four counters and the seed loader all draw from one 4095-state sequence.
Over long runs the output is therefore not as independent as four separate
sources would be. The measured mean, spread and spectrum still match the
four-term model closely.
