# Coherent BPSK modulator and demodulator built from phase accumulators

This RTL generates a binary phase-shift-keyed (BPSK) signal and demodulates
it coherently. Everything is digital and runs from one 50 MHz clock.

The transmitted signal is `A·D(t)·cos(ω_c·t + φ0)`, where the data `D(t)` is
±1. Multiplying it by a local carrier `cos(ω_c·t)` gives two terms:

    A·D(t)/2 · cos(2ω_c·t + φ0)  +  A·D(t)/2 · cos(φ0)

A low-pass filter removes the first term, at twice the carrier frequency.
What is left is the data, scaled by `cos(φ0)`. Its sign is the recovered bit.

The design works on samples taken at 40 kHz. Three parts do the work:

- **Direct digital frequency synthesisers (DDFS).** Each is a 24-bit phase
  accumulator that addresses an 8192-entry cosine table. They make the
  carrier and the BPSK signal.
- **A signed 8×8 multiplier**, which forms the product above.
- **A 200-tap Hamming-window FIR low-pass filter** with a 2 kHz cut-off.

A square-wave data generator and an output scaler/slicer complete the loop.
The default operating point:

| quantity | value |
|---|---|
| system clock | 50 MHz |
| sampling rate | 40 kHz (40.0004 kHz exactly) |
| carrier | 2 kHz, 20 samples per period |
| data | square wave, 0.25 kHz or 0.125 kHz (switch `frq`) |
| waveform table | 8192 × 8 bits, offset binary 0..255 |
| low-pass filter | order 199, Hamming window, f_c = 2 kHz (−6 dB), 8-bit taps |
| filter output | 24 bits |

## Signal chain

```
             +-----------+  en (1 clk per sample)
 clk 50 MHz->| sample_gen|------------------------------------------------+
             +-----------+--> sam (40 kHz square wave)                    |
                                                                          v (all blocks)
 frq ------->| data_gen  |--data[23]--> data_pulse
                                |
                                v
             | bpsk_ddfs |--y--+--[use_adc mux]--+
                               |  adc_sample ----+--> | demodulator |--dem--> | fir_lpf |--k--> | output_stage |--> x, bit_out
             | car_ddfs  |--car-------------------->  |  (y-128)(car-128) >>> 8
```

| module | job |
|---|---|
| `bpsk_pkg` | shared constants, frequency codes, and functions that build the tables |
| `sample_gen` | 24-bit accumulator that adds 13422 on every clock. Its MSB is the 40 kHz `sam`; the strobe `en` marks each rising edge. |
| `data_gen` | 24-bit accumulator that adds 104858 (`frq`=1) or 52429 (`frq`=0) per sample. Its MSB is the data bit. |
| `car_ddfs` | carrier DDFS: accumulator plus cosine ROM |
| `bpsk_ddfs` | modulator DDFS. It adds 0 or 2^23 (180°) to the phase, chosen by the data bit, before the ROM. |
| `sine_rom` | the 8192 × 8 cosine table with a registered read |
| `demodulator` | removes the offset (−128) from both inputs, then does a signed multiply and keeps the top 8 bits |
| `fir_lpf` | 200-tap FIR built around one time-shared multiply-accumulate unit |
| `output_stage` | arithmetic shift by 9 with saturation to 8 bits. Adds 128 for the DAC output `x`; the sign gives `bit_out`. |
| `bpsk_demod_top` | wires everything together; active-low `reset_n` |

## One clock, one sample strobe

Only `sample_gen` does something on every 50 MHz cycle. Every other register
has a clock enable. That enable is the one-cycle strobe `en`, which is high
in the cycle after the sampling accumulator's MSB rises. Strobes come 1249
or 1250 clocks apart.

Because of this, the frequency codes of the carrier and data accumulators are
relative to the 40 kHz sample rate, not to the 50 MHz clock:

    code = f · 2^24 / f_ref

| accumulator | f_ref | code | frequency |
|---|---|---|---|
| sampling | 50 MHz | 13422 | 40.0004 kHz |
| carrier, and BPSK carrier | 40 kHz | 838861 | 2.000 kHz |
| data, `frq`=1 | 40 kHz | 104858 | 0.25 kHz (toggles every 80 samples) |
| data, `frq`=0 | 40 kHz | 52429 | 0.125 kHz (toggles every 160 samples) |
| phase-reversal offset | — | 8388608 | 180° |

The codes are in `bpsk_pkg`. To move the carrier, change `CODE_CAR`. It must
stay below 2^23 (20 kHz) to be a valid frequency, and well below 10 kHz so
that the 2·f_c product term lies in the filter's stop band. The data codes
work the same way. `code_f` is a port on both DDFS modules, so they can also
be driven at run time.

## Where the numbers come from

The whole chain has fixed-point gains, and a change to one scale factor moves
the decision levels. The values below are for full-scale 8-bit signals.

1. **Table.** `ROM[i] = round(127.5 + 127.5·cos(2πi/8192))` gives 0..255.
   Address 0 is the positive peak. The ROM is addressed by phase bits
   [23:11]. Its read is registered, so each DDFS output shows the phase its
   accumulator held *before* the strobe. `bpsk_ddfs` and `car_ddfs` have the
   same code and the same reset, so their outputs are phase-locked sample for
   sample (φ0 = 0).
2. **Multiplier.** The inputs become −128..127. The 16-bit product is
   shifted right by 8, giving −64..+64. Its average over a carrier period is
   about ±31.5: `cos²` averages to ½.
3. **Filter taps.** The taps are a windowed sinc with cut-off 0.1·(f_s/2):

       h[n] = sin(0.1π·t)/(π·t) · (0.54 − 0.46·cos(2πn/199)),   t = n − 99.5

   They are scaled so that the two centre taps are 127, then rounded. The
   outermost taps round to 0. The DC gain is Σh = 1286, so a steady bit gives
   `k` ≈ ±31.5 · 1286 ≈ ±40 500. The product term at 4 kHz is about 44 dB
   down.
4. **Output.** `k >>> 9` ≈ ±79, saturated to −128..127. `x = that + 128` is
   about 49 or 207. `bit_out` is 1 when the value is negative.

`sin` and `cos` in `bpsk_pkg` are a range-reduced 9-term Taylor series, so
both tables can be computed in SystemVerilog by any tool. The error is below
1e-7, far below 1 LSB.

## The filter: direct form, time-shared

The filter computes `y[n] = Σ_{k=0}^{199} h[k]·x[n−k]`. With roughly 1250
clocks per sample, one multiplier is enough:

- The input samples live in a 200-word circular buffer. `head` points at the
  newest sample.
- On a strobe, the new sample goes to `head+1`. A pass then starts that reads
  the taps `k = 0..199` and walks the read pointer back from the newest
  sample to the oldest, one product per clock.
- The last product is added straight into `sout`. `valid` pulses for one
  clock, 201 clocks after the strobe cycle.
- An assertion checks that no strobe arrives while a pass is running.
  `TAPS` can be raised to about 1200 before that rule would fail.

The taps are constants, produced by `bpsk_pkg::fir_coef` in a generate loop.
Synthesis turns them into a small constant lookup indexed by `k`.

The 24-bit accumulator cannot overflow with 8-bit data: Σ|h|·128 = 293 120,
far below 2^23.

## Latency

The registered ROM, the registered product and the filter pass each add
delay, and the FIR group delay is 99.5 samples. `bit_out` follows the data
bit by about 101–102 samples, about 2.5 ms. Around each data transition
the output passes through zero over about ±10 samples.

## Interface of `bpsk_demod_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz |
| `reset_n` | in | 1 | active-low reset. Clears all accumulators and pipeline registers asynchronously. |
| `frq` | in | 1 | data rate: 1 = 0.25 kHz, 0 = 0.125 kHz |
| `use_adc` | in | 1 | 1: demodulate `adc_sample` instead of the internal BPSK signal |
| `adc_sample` | in | 8 | offset-binary sample from an external converter, read on each strobe |
| `sam` | out | 1 | 40 kHz sampling square wave (can clock an external ADC) |
| `data_pulse` | out | 1 | transmitted data bit |
| `y` | out | 8 | BPSK signal, offset binary |
| `car` | out | 8 | local carrier, offset binary |
| `dem` | out | 8 | signed product |
| `k` | out | 24 | signed filter output |
| `x` | out | 8 | scaled filter output + 128, for a DAC |
| `bit_out` | out | 1 | recovered data |

For an external source, `adc_sample` must be coherent with the internal
carrier: same frequency, and a stable phase φ0. The output scales with
`cos(φ0)`. This design has no carrier recovery.

## What is taken from the original design and what is not

**Taken from the original FPGA design:**

- the block structure;
- every frequency code, and the 180° constant;
- the 24-bit accumulators and the 13-bit ROM address slice;
- the 8192 × 8 table size and its 0..255 range;
- the subtract-128 stages and the signed multiplier;
- the filter specification: order 199, Hamming window, 2 kHz at 40 kHz, 8-bit
  words, 24-bit output;
- the +128 output adder and a slicer with threshold 0.

Where the original texts give two values, this design follows the computed
code 838861 for the 2 kHz carrier and a 2 kHz carrier frequency throughout.
It uses the sampling accumulator, not a divide-by-1250 counter. Both give
40 kHz.

**Choices made here, where the original is silent or differs:**

- A single clock with a sample-rate clock enable. The original clocks blocks
  from the sampling waveform.
- The cosine phase of the table.
- Which 8 of the 16 product bits are kept (the top 8).
- How the filter taps are quantised (largest tap = 127).
- The filter is one multiply-accumulate unit running over 200 clocks, not
  200 parallel multipliers. The result is identical.
- The output scale: shift by 9, with saturation.
- The decision polarity: `bit_out` = 1 for the 180° phase, so it equals the
  sent data.
- Reset of the non-accumulator registers.
- The `use_adc` input path.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -Irtl rtl/bpsk_pkg.sv tb/tb_bpsk_demod_top.sv \
    --top-module tb_bpsk_demod_top -Mdir obj
./obj/Vtb_bpsk_demod_top
```

Replace the testbench name to run another one.

The system test `tb_bpsk_demod_top` uses the full-size design at real rates:
about 2.8 million clocks, under two seconds of run time. It runs four
phases:

1. 560 samples at 0.25 kHz data;
2. 720 samples at 0.125 kHz;
3. 480 samples where the testbench acts as the converter, sending its own bit
   pattern in phase with the carrier;
4. 480 more such samples with a 60° phase error. The settled output level
   must drop to half (cos 60° = ½): it measures 79.2 and 39.8.

It then resets a second time. On every sample it checks:

- `y` against its own cosine model;
- the data half-period;
- `bit_out` and `x` against the bit sent 102 samples earlier.

It also counts phase reversals, the rate switch, converter samples, both
decision values and resets. It fails if any of these never happened.

The unit testbenches compare each module with values the testbench computes
itself: its own cosine for the ROM and the DDFS, its own tap design and
convolution for the filter (impulse, random data and DC gain). They also
check latency and rate: strobe spacing, 201-clock filter latency, 20- and
80/160-sample periods.

## Limits

- The carrier is locked by construction. A real receiver would need carrier
  recovery, which this design does not have.
- The 8-bit tap quantisation sets 44 of the 200 taps to zero, most of them
  in the tails. The worst stop-band rejection above 2.6 kHz is therefore
  about −41 dB, against about −60 dB for the unquantised filter.
- The converter, the DAC that shows `x` and `y` on an oscilloscope, and the
  pin assignment of a particular board are outside this RTL.
