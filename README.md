# Three-channel digital integrate-and-dump for a microwave radiometer

A radiometer measures a very weak noise power. After detection, each channel
produces a slowly varying video voltage, buried in noise, that has to be
integrated for a fixed dwell time (the time the antenna beam spends on one
ground footprint) before it is read out. Done with an op-amp integrator this
suffers from offset, leakage and drift, and one analog integrator per channel
is heavy and power-hungry. This design does the integration digitally instead:
the video signal of each channel is low-pass filtered (5 kHz), sampled at
16 kHz by a 12-bit ADC, and the samples are simply **summed over the dwell
time and dumped** ("sum-and-dump"). Dumping a register takes one clock, with
no overshoot and no drift.

The RTL here is the digital part: one module that takes the samples of three
channels from a single serial line, integrates each channel over its own dwell
time, and sends the three averaged values out on another serial line.

| Channel | Dwell time | Samples summed at 16 kHz (`AVG_N`) | Sum width | Output |
|---------|-----------|-------------------------------------|-----------|--------|
| 1       | 8 ms      | 128                                 | 19 bits   | 12 bits |
| 2       | 2 ms      | 32                                  | 17 bits   | 12 bits |
| 3       | 1 ms      | 16                                  | 16 bits   | 12 bits |

## Why a plain sum is the right filter

Summing N samples taken every T seconds is a length-N boxcar FIR filter
followed by decimation by N. Its response is

    |H_N(f)| = |sin(N*pi*f*T) / (N * sin(pi*f*T))|

with nulls at every multiple of 1/(N*T): for channel 1 (N = 128, T = 62.5 us)
the first null is at 125 Hz, for channel 3 (N = 16) at 1 kHz. Its one-sided
equivalent noise bandwidth is 1/(2*N*T) = 1/(2*tau), where tau = N*T is the
dwell time: exactly the noise bandwidth of an ideal continuous integrator over
tau. So nothing is lost by integrating digitally, provided the input is
sampled at or above the Nyquist rate of the pre-filter. With a 5 kHz
pre-filter that means at least 10 kHz, which is why all three channels use
16 kHz and differ only in N (lower rates with fewer samples would give the
same dwell time but alias the pre-filter's passband).

Because every N is a power of two, "divide by N" is free: the average is the
sum with its log2(N) low bits dropped (7 bits for channel 1). The result is
truncated, not rounded, so it is biased low by up to one LSB minus 1/N.
The sum register is 12 + log2(N) bits wide, which holds N full-scale samples
(128 x 4095 = 524160 < 2^19), so the sum can never overflow.

## Data path

    sdata_i, frame_sync_i
       |
    serial_to_parallel   12-bit words tagged with channel 1/2/3
       |
    demultiplexer        one lane per channel, one sample per 62.5 us
       |
    accumulator x3       sum-and-dump over 128 / 32 / 16 samples
       |
    averager x3          drop log2(N) LSBs -> 12-bit average, held
       |
    multiplexer          picks averages of channels 1, 2, 3 in turn
       |
    parallel_to_serial   12-bit words out, MSB first
       |
    sdata_o (+ out_valid_o, out_first_o, out_ch_o, out_fresh_o)

Everything runs on one 960 kHz main clock, one bit per clock on both serial
lines. A sampling period at 16 kHz is therefore 60 clocks. The reset `rst_n`
is asynchronous and active low; it clears every register, so all three
channel counters start together.

### The accumulator

Each channel has a buffer that starts at zero and, for every sample of its
lane, is replaced by buffer + sample. On the N-th sample the complete sum
(buffer plus that sample) is copied to the output register, `dump_o` pulses,
and the buffer is loaded with zero in the same clock. The next integration
therefore starts with the very next sample: no sample is lost and no clearing
cycle is needed. The running buffer is visible on `acc_o`.

### Serial input frame

The input line carries, once per sampling period, a frame of three 12-bit
words, channel 1 first, each MSB first, followed by 24 idle clocks whose
content is ignored:

    clock:  0 ........ 11 | 12 ...... 23 | 24 ...... 35 | 36 ....... 59
    data:   ch1 b11..b0   | ch2 b11..b0  | ch3 b11..b0  | (ignored)
    frame_sync_i high at clock 0 only

`frame_sync_i` is high together with the first bit of a frame. If it comes
again before a frame is complete, reception restarts at channel 1, so the
link realigns itself after any glitch. Each word leaves the deserialiser one
clock after its last bit.

### When output frames are sent

This is the least obvious part. Because the three words of a period arrive
12 clocks apart, the three channels' dumps never happen in the same clock,
even when all three integrations end in the same period. The multiplexer
therefore does not react to the dumps themselves. Instead, the strobe of the
last lane (channel 3's sample) marks the end of a sampling period; two clocks
later (the latency of accumulator plus averager) all averages of that period
are in. If any channel produced a new average during the period, one output
frame is sent with the current averages of all three channels:

    word 1: channel 1 average   out_first_o on its first bit
    word 2: channel 2 average
    word 3: channel 3 average

Each word carries `out_fresh_o`, which is high if that channel produced a new
average since its word was last sent. At the default sizes a frame leaves
every 16 sampling periods (1 ms, 960 clocks); channel 3 is fresh in every
frame, channel 2 in every second and channel 1 in every eighth. The frame
occupies 36 of the 960 clocks. A frame starts six clocks after the last bit
of the period's channel-3 sample. A period end that finds nothing new sends
nothing. If a new average arrives while a frame is being sent and after
channel 1 has gone out, one more frame follows; if it arrives earlier, the
frame in progress already carries it.

The three averages are also available in parallel on `avg_o[0..2]`, with a
one-clock `avg_valid_o` strobe per channel four clocks after the last bit of
the channel's N-th sample.

### The output serialiser

`parallel_to_serial` takes a word when `load_i` and `ready_o` are both high
and sends it in the next 12 clocks. `ready_o` is also high during the last
bit, so consecutive words go out with no gap. A small tag (channel, frame
start, fresh) is captured with the word and held while it is sent; the top
turns it into `out_ch_o`, `out_first_o` and `out_fresh_o`. `sdata_o` is low
when no word is being sent.

## Top-level interface (`digital_integrator`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 960 kHz main clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `sdata_i` | in | 1 | serial samples, frame as above |
| `frame_sync_i` | in | 1 | high with the first bit of an input frame |
| `sdata_o` | out | 1 | serial averages, MSB first |
| `out_valid_o` | out | 1 | `sdata_o` carries a data bit |
| `out_first_o` | out | 1 | first bit of an output frame |
| `out_ch_o` | out | 2 | channel (0, 1, 2 for channels 1, 2, 3) of the word being sent |
| `out_fresh_o` | out | 1 | the word being sent is a new average |
| `avg_o` | out | 3 x 12 | current average of each channel |
| `avg_valid_o` | out | 3 | one-clock strobe per channel: new average |

Parameters: `AVG_N1`, `AVG_N2`, `AVG_N3` (defaults 128, 32, 16; each must be
a power of two). The sample width, channel count, clock and sampling rate are
in `integrator_pkg`.

## How far to trust it, and where it is this design's own

Taken from the original radiometer design: the chain of blocks, the 960 kHz
main clock, the 12-bit samples, the 16 kHz sampling rate, the averaging
factors 128, 32 and 16 for channels 1, 2 and 3, the 19-bit sum for 128
samples, and truncation by dropping the low 7 bits.

Choices made here where the original says nothing:

- The serial frame formats of both lines, MSB-first order, the idle gap, and
  the explicit `frame_sync_i` input. The original design must have framed its
  input some other way (its pin count suggests internal counters), so an ADC
  link built for it will need an adapter.
- Unsigned samples.
- The 17- and 16-bit sums of channels 2 and 3 (the minimum that cannot
  overflow).
- When output frames are sent, their order, and the fresh flag.
- All latencies (one register per block) and the ready handshake of the
  serialiser.

One point in the original is inconsistent: one passage assigns the
averaging factors 16, 32 and 128 to channels 1, 2 and 3, while the
frequency-response analysis, the dwell times (8, 2, 1 ms at 16 kHz) and the
19-bit channel-1 accumulator all give 128, 32, 16. This design uses
128, 32, 16. The original also calls the 12-bit result both "rounded" and
"truncated by discarding 7 LSBs"; it is truncated here.

The analog parts around the integrator (RF front end, video amplifier, 5 kHz
anti-aliasing filter, sample-and-hold, ADC) are not part of this RTL.

After coarse synthesis the whole module is about 150 word-level cells and
263 flip-flops, small enough for any FPGA (the original ran on a Xilinx
Virtex XCV600 and reported 375 slice flip-flops).

## Files

`rtl/`:

- `integrator_pkg.sv`: widths, rates, averaging factors, `sample_t`.
- `serial_to_parallel.sv`, `demultiplexer.sv`, `accumulator.sv`,
  `averager.sv`, `multiplexer.sv`, `parallel_to_serial.sv`: the blocks.
- `digital_integrator.sv`: the top.

`tb/`: one self-checking testbench per block (`tb_<block>.sv`), plus

- `tb_digital_integrator.sv`: the whole module at its default sizes. It
  sends 512 sampling periods (32 ms, four channel-1 integrations) of
  noisy constant levels, with one full-scale stretch, through the serial
  input, and checks every average, its clock of arrival, every output frame
  word, tag and fresh flag, and the 960-clock frame spacing.
- `tb_all_channels_128.sv`: all three channels at 128 samples (19-bit sums
  everywhere), checking averages, output words and the 8 ms frame spacing.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if the design hangs.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal \
      -y rtl -y tb +libext+.sv rtl/integrator_pkg.sv \
      tb/tb_digital_integrator.sv --top-module tb_digital_integrator
    ./obj_dir/Vtb_digital_integrator

Replace `tb_digital_integrator` with any other testbench name. The
end-to-end run takes well under a second. To try other dwell times, set
`AVG_N1..3` on the top (powers of two); the accumulator and averager widths
follow. A non-power-of-two factor would need a real divider in `averager`.
