# Time-interleaved band-stop digital sigma-delta modulator

This is synthesizable SystemVerilog for a 4th-order, single-bit digital
sigma-delta modulator. It shapes its quantisation noise away from a chosen
frequency, not away from DC. The noise transfer function (NTF) is a band-stop
filter, and its deep notch sits at the centre frequency. Here the centre is the
normalised frequency 0.2, i.e. 13.2 MHz when the sample rate is 66 MHz. The
centre frequency, bandwidth and attenuation are set only by eight loop-filter
coefficients. Four coefficient sets are included: Butterworth, Chebyshev,
inverse Chebyshev and elliptical.

The modulator can be split into N = 1, 2 or 4 time-interleaved paths. With N
paths, every register in the loop is clocked once per N samples. The N paths
together still produce one output bit per sample clock, and the output is the
same bit stream that the single-path modulator gives. Around the modulator
there is a small test system for an FPGA board:

- a sine look-up table as the source;
- an LFSR that supplies dither;
- converters between the sample rate and the path rate;
- a record buffer and an RS232 transmitter that send the output bits to a host
  for decimation and spectral analysis.

The design follows the FPGA modulators described by Kalafat Kızılkaya,
Al-Janabi and Kale in "Design and implementation of novel FPGA based
time-interleaved variable centre-frequency digital Σ-Δ modulators". The
section "Where this RTL departs from or adds to the source" lists what was
chosen here.

## The loop: error feedback with a TDA loop filter

Each sample goes through the error-feedback (EF) structure:

```
v = x - r                 r = H(z) s   (loop-filter output)
y = +1 if v + dither >= 0 else -1
s = y - v                 (quantisation error)
```

It follows that `Y = X + (1 - H) S`. The signal passes with unity gain, and
the error is shaped by `NTF = 1 - H`. The loop filter is

```
H(z) = (K1 z^-1 + K2 z^-2 + K3 z^-3 + K4 z^-4) / (1 + L1 z^-1 + L2 z^-2 + L3 z^-3 + L4 z^-4)
```

so `NTF = (1 + Σ (Lk - Kk) z^-k) / (1 + Σ Lk z^-k)`. For every coefficient set,
the numerator is `(1 - 2cos(0.4π) z^-1 + z^-2)^2 ≈ 1 - 1.236 z^-1 + 2.382 z^-2 -
1.236 z^-3 + z^-4`. That gives a double zero at 0.2. The denominator `1 + Σ Lk z^-k`
sets the width and depth of the stop band. To move the notch to a different
frequency, change the coefficients and nothing else.

The filter uses the time-delay-and-accumulate (TDA) form
(`tda_loop_filter_step`). It is a chain of four adders, and each adder is
followed by one delay register. The adder that is k delays before the output
adds `Kk·s` and subtracts `Lk·r`:

```
r[n]  = a1[n-1]
ak[n] = a(k+1)[n-1] + Kk·s[n] - Lk·r[n]      (a5 = 0)
```

The delay registers hold the intermediate sums, so no integrator grows without
bound. The loop has one delay between `s` and `r`, so it contains no
delay-free loop.

Coefficients (`ddsm_pkg::coef_of`) are integers equal to the value × 2^15:

| set | K1 | K2 | K3 | K4 | L1 | L2 | L3 | L4 |
|---|---|---|---|---|---|---|---|---|
| Butterworth | 1799 | -6878 | 5103 | -5335 | -38785 | 71223 | -35481 | 27433 |
| Chebyshev | 1329 | -5072 | 3713 | -3850 | -39255 | 73030 | -36870 | 28918 |
| inverse Chebyshev | 7613 | -28672 | 18513 | -17634 | -32890 | 49370 | -21991 | 15134 |
| elliptical | 1329 | -5072 | 3713 | -3850 | -39255 | 73030 | -36871 | 28918 |

The elliptical set equals the Chebyshev set except for L3, even though the two
filters were specified differently:

| set | bandwidth | pass-band ripple | stop-band ripple |
|---|---|---|---|
| Chebyshev | 0.004 | 1 dB | 60 dB |
| elliptical | 0.02 | 1 dB | 80 dB |

The values are kept as published. An elliptical design that meets its own
specification needs new coefficients.

## Number formats

All words are two's complement with 15 fractional bits:

- Input sinusoid: 16 bits, s.15, range [-1, 1).
- Loop signals `v`, `s`, `r` and the four delay registers: 18 bits, s.2.15,
  range [-4, 4). Each multiplier is therefore 18 × 18, one hard multiplier on
  most FPGAs. There are 8 multipliers per path.
- Coefficients: 18 bits, s.2.15. The largest is 73030 ≈ 2.23.
- Products: the full 36 bits are shifted right by 15, which truncates towards
  minus infinity. Sums wrap at 18 bits.
- Output: +1 and -1 are ±2^15 inside the loop and 1 and 0 on the output bit.
- Dither: 14 bits in units of 2^-15, so at most ±0.25.

Nothing saturates. At an input amplitude of 0.5, with or without dither, the
largest internal magnitude seen in a bit-true model is about 2.0 for inverse
Chebyshev and about 1.1 for the other sets. At amplitude 0.75 it is about 2.2.
Larger amplitudes can drive a 4th-order single-bit loop unstable. If you push
the amplitude up, first check the internal ranges at that amplitude.

## Time interleaving by node equations

This is the part of the design that is least obvious.

`ti_ef_modulator` evaluates N consecutive samples `Nm, Nm+1, …, Nm+N-1` in one
clock-enabled cycle. It keeps one set of four delay registers. Path j is a
complete copy of the EF loop (`ef_path`: subtractor, quantiser, error
subtractor and the 8-multiplier filter step). Path j takes the delay-register
state that path j-1 produced for sample Nm+j-1. Path 0 takes its state from
the registers. The registers load what path N-1 produces. The effect of this
wiring:

- Each z^-1 of the single-path loop becomes a wire from one path to the next.
- Only the last path's z^-1 is a real register, clocked at fs/N.
- The N-path modulator computes exactly the difference equations of the
  single-path one and gives the same output bits, sample for sample. The
  testbenches check this.
- The cost is N × 8 multipliers: 8, 16 and 32 for N = 1, 2, 4.
- The combinational path runs through N loop evaluations in series, but has a
  whole path-clock period (N sample clocks) to settle.

There is one clock, the 66 MHz sample clock. The path clock (33 MHz for N = 2,
16.5 MHz for N = 4) is a one-cycle enable every N clocks. The enable comes from
`path_downsampler`. A synthesis flow should get a multicycle constraint of N on
the paths from the modulator's delay registers back to themselves. Timing at
66 MHz has not been checked here.

Around the modulator:

- `path_downsampler` collects N consecutive {sample, dither} words. Slot j
  holds sample Nm+j. When the group is complete it presents all N words
  together and pulses `par_valid`.
- `ti_ef_modulator` registers the N output bits one clock after the enable.
- `path_upsampler` shifts the N bits out, one per clock, sample Nm first.

Each sample appears on `ds_out` exactly N + 2 clocks after it left the LUT
register. `ds_out` carries one bit per clock without gaps.

## Stimulus: sine table and dither

`sine_lut` produces `AMP·cos(2π·0.2·n)`. At 0.2 the sequence repeats every 5
samples, so the table holds five words, `floor(AMP·C[p]/2^15)` with
`C = {32768, 10126, -26510, -26510, 10126}` (`round(2^15·cos(2πp/5))`). The
default `AMP` is 16384, half of full scale. Because the input is an exact 0.2
tone, it carries its own quantisation tones. These fall at 0.1, 0.3, 0.4 and
0.5, outside the notch.

`fib_lfsr` is a 16-bit Fibonacci LFSR. The new bit is the XOR of bits 15, 13,
12 and 10 (x^16 + x^14 + x^13 + x^11 + 1, period 65535). The dither is its low
14 bits taken as a signed number. With `dither_en` high, the dither is added at
the quantiser input only. It changes which level is chosen, and because it
becomes part of `s` it is noise-shaped like the quantisation error. Dither
whitens the tones that single-bit quantisation of a sinusoid produces.

## Getting the bits out

One output bit per 66 MHz clock is too fast for a serial line. A pulse on
`capture_start` makes `bit_capture` do the following:

1. Record the next `CAPTURE_BITS` bits (65536 by default, an 8 KiB array).
   Bits are packed into bytes with the earliest bit in bit 0.
2. Hand the bytes in order to `uart_tx` over a valid/ready handshake.

`uart_tx` sends 8N1, LSB first, at `CLKS_PER_BIT` = 573 clocks per bit. That is
115200 baud at 66 MHz, so a full record takes about 0.71 s. An assertion checks
that an offered byte is held until it is taken. `capture_done` pulses after the
last byte. On the host, the bit stream is rebuilt from the bytes, decimated
around 0.2 and analysed. That host software is not part of this RTL.

`reset_sync` turns the asynchronous, active-low `arst_n` into a reset that is
asserted at once and released on the second clock edge. All other registers
reset synchronously.

## Measured behaviour

`tb/tb_snr_workload.sv` runs the 4-path modulator on a 20480-sample 0.2
sinusoid. It measures in-band SNR from the exact DFT bin of the tone against
all other bins within a band of 0.5/OSR centred on 0.2. The table below gives
SNR in dB at OSR 64 / 128 / 256:

| set | -40 dBFS | -20 dBFS | -6 dBFS | -6 dBFS, dithered |
|---|---|---|---|---|
| Butterworth | 13.8 / 21.0 / 24.8 | 37.8 / 43.6 / 46.5 | 47.7 / 55.3 / 59.9 | 42.9 / 53.3 / 57.3 |
| Chebyshev | 18.0 / 26.2 / 29.8 | 37.0 / 41.5 / 45.3 | 47.2 / 56.0 / 61.0 | 42.5 / 53.7 / 58.0 |
| inverse Chebyshev | 21.8 / 25.1 / 28.0 | 44.2 / 47.7 / 50.8 | 50.9 / 54.0 / 57.1 | 48.6 / 51.9 / 54.9 |
| elliptical | 14.8 / 20.0 / 23.0 | 40.6 / 46.9 / 50.6 | 48.7 / 56.5 / 61.5 | 41.8 / 49.8 / 53.9 |

The output is bit-identical for 1, 2 and 4 paths. The SNR therefore depends
only on the band chosen, and OSR 64, 128 and 256 are the effective ratios when
a fixed signal band is served by 1, 2 and 4 paths. The single-bit loop is
tonal, so SNR at a given amplitude can move by several dB when the amplitude
changes slightly. For example, the inverse Chebyshev set gives 62.6 dB at OSR
64 with `AMP` = 16384 but 50.9 dB with 16423. Dither costs a few dB of in-band
SNR here, in exchange for a whiter spectrum.

## Top level: `ti_ddsm_top`

| parameter | default | meaning |
|---|---|---|
| `NPATHS` | 4 | number of interleaved paths (1, 2 or 4) |
| `FILTER` | `INV_CHEBYSHEV` | coefficient set (`ddsm_pkg::filter_e`) |
| `AMP` | 16384 | sine amplitude in units of 2^-15 |
| `CAPTURE_BITS` | 65536 | output bits per record (multiple of 8) |
| `CLKS_PER_BIT` | 573 | UART bit time in clocks |
| `LFSR_SEED` | 16'hACE1 | non-zero LFSR start state |

| port | dir | meaning |
|---|---|---|
| `clk` | in | sample clock (66 MHz) |
| `arst_n` | in | reset request, active low, asynchronous |
| `dither_en` | in | enable dither at the quantiser |
| `capture_start` | in | start a record |
| `ds_out`, `ds_valid` | out | modulator output bit stream (1 = +1) and its valid |
| `uart_txd` | out | RS232 transmit data at logic level; needs an external line driver |
| `capture_busy`, `capture_done` | out | record in progress; pulse after the last byte |

Module hierarchy:

```
ti_ddsm_top
├── reset_sync
├── sine_lut
├── fib_lfsr
├── path_downsampler
├── ti_ef_modulator
│   └── ef_path × NPATHS
│       └── tda_loop_filter_step
├── path_upsampler
├── bit_capture
└── uart_tx
ddsm_pkg   (formats, filter enum, coefficient sets)
```

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The testbenches share two helpers:

- `tb/ddsm_ref_pkg.sv`: an independent integer model of the single-path
  modulator, the LFSR and the sine table.
- `tb/ddsm_stream_checker.sv`: the end-to-end checker.

Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/ddsm_pkg.sv tb/ddsm_ref_pkg.sv tb/tb_ti_ef_modulator.sv \
  --top-module tb_ti_ef_modulator -o sim && ./obj_dir/sim
```

For another testbench, replace the testbench file name and `--top-module`.

| testbench | what it establishes |
|---|---|
| `tb_tda_loop_filter_step` | step results against the reference for random inputs; impulse response against a floating-point evaluation of H(z), all four sets |
| `tb_ef_path` | v, y, s and the next state against the reference, with and without dither |
| `tb_ti_ef_modulator` | N = 1, 2, 4 × four sets on one dithered 0.2 input with random enables. Output bits equal the single-path reference. The tone at 0.2 keeps its input amplitude within 3 %. The error spectrum y − x is at least 25 dB lower at 0.2 ± 0.0025 than at 0.45. |
| `tb_sine_lut`, `tb_fib_lfsr` | table words within 1 LSB of the ideal cosine; LFSR period 65535 and dither format |
| `tb_path_downsampler`, `tb_path_upsampler` | slot order, enable timing, serial order |
| `tb_reset_sync`, `tb_bit_capture`, `tb_uart_tx` | reset timing, byte packing and handshake, 8N1 framing and bit time |
| `tb_ti_ddsm_top` | whole design at a 1024-bit record and 16 clocks per bit (see below) |
| `tb_snr_workload` | SNR against amplitude and OSR for the four sets, output bits against the reference |
| `tb_ti_ddsm_top_full` | all defaults: one dithered run, a 65536-bit record sent in full (about 47 M clocks, under a minute in Verilator) |

`tb_ti_ddsm_top` makes two runs, one without and one with dither. Each run
checks:

- every output bit against the reference model;
- the N + 2 clock latency and the gap-free output stream;
- the path-enable spacing;
- every byte received on the RS232 line;
- that resets, dithered and undithered samples, path enables, captures, sent
  bytes and transmitter back-pressure all occurred.

## Where this RTL departs from or adds to the source

Taken from the source:

- the EF structure;
- the TDA loop filter;
- the coefficient table and the sD.15 fixed-point format;
- node-equation time interleaving with N × 8 multipliers;
- the 66 MHz sample rate and the 33 and 16.5 MHz path rates;
- the 16-bit sine table at 0.2;
- a 16-bit Fibonacci LFSR with a 14-bit dither output;
- output over RS232.

Chosen here:

- **Coefficient placement.** `Kk` and `Lk` act after k delays, with `Kk` on the
  error and `Lk` on the fed-back output. This is the only placement for which
  the coefficient table gives the band-stop NTF. A block diagram that puts
  index 1 farthest from the output does not give it.
- **Path timing.** The node-equation interleaving is carried out as a
  combinational cascade of N paths between shared registers, under a single
  clock with an enable in place of separate path clocks.
- **Word widths and arithmetic.** 18-bit loop words, truncation of products,
  wrap-around instead of saturation.
- **Quantiser.** Levels ±1, and 0 counts as +1.
- **Dither.** Its injection point, the LFSR taps, which 14 bits are used, and
  the seed.
- **Sine table.** The amplitude (`AMP`) and the phase of the sinusoid.
- **Readout path.** The record buffer, its size and byte order, and the UART
  format and baud rate. The source names an RS232 link without giving its
  settings.
- **Reset.** The form of the reset circuitry.
- **Filter selection.** The filter and the path count are build-time
  parameters, one configuration per build. There is no run-time switch.

Not included: the host software (decimation, spectra and SNR), the RS232 line
driver and connector, and the board oscillator.
