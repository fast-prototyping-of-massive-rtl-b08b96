# Reconfigurable OFDM uplink transmitter for a massive-MIMO user equipment

This is the transmit chain of a user terminal (UE) in a massive-MIMO
system. It takes a serial bit stream and produces time-domain baseband samples
for one slot after another. Two control inputs reconfigure it on the fly:

- `mod_select` picks QPSK, 16QAM or 64QAM for the data;
- `user_id` picks which of four users' uplink pilot patterns goes out, so the
  base station can tell the terminals apart.

The numerology is the 60 kHz subcarrier-spacing one:

| Quantity | Value |
|---|---|
| IFFT size | 1024 points |
| Occupied subcarriers | 600 |
| Cyclic prefix | 144 samples |
| Symbols per slot | 14 |
| Sampling rate it is meant for | 61.44 MHz (50 MHz channel) |

The structure and all sizes follow the transmitter described in the thesis
*Fast Prototyping of Massive MIMO User Equipment Using PYNQ*. That thesis
builds the chain with high-level synthesis. This is a hand-written
SystemVerilog version of it. The microarchitecture, the handshakes and the
fixed-point formats are this design's own.

```
bits ─► s2p ─► modulator ─► stream_fifo (3600) ─► subcarrier_mapper ─┐
                                                                     ▼
                          uplink_pilot (pilot_rom) ─────────► frame_formatter
                                                                     │
               samples ◄── add_cp ◄── ifft_r4 (radix4_butterfly) ◄───┘
```

## The slot

Every slot carries 14 OFDM symbols, numbered 0 to 13:

| Symbol | Content |
|---|---|
| 0 | uplink pilot of the selected user |
| 1–6 | data: 6 × 600 = 3600 constellation points |
| 7–13 | zero, left free for the downlink |

Each symbol goes through the IFFT and gets its cyclic prefix. It leaves as
144 + 1024 = 1168 samples, so a slot is 16352 samples.

A slot of data is 3600 points. The bits needed for that depend on the
modulation:

| Modulation | Bits per point | Bits per slot |
|---|---|---|
| QPSK | 2 | 7200 |
| 16QAM | 4 | 14400 |
| 64QAM | 6 | 21600 |

`mod_select` is sampled with the first bit of each slot and holds for the
whole slot. `user_id` is sampled when the first subcarrier of each pilot
symbol is taken.

## Bits to constellation points

`s2p` is a shift register. It gathers 2, 4 or 6 bits and presents them on
a six-bit bus, left-aligned: the first bit received sits on bit 5. It also
passes on the modulation that was latched for the slot. A select value of 3
is treated as QPSK.

`modulator` maps each axis independently with a Gray code.

- **QPSK:** the first bit gives the sign of I and the second the sign of Q.
  A 1 bit means positive.
- **16QAM:** the bit pair b0b1 sets the I level and b2b3 the Q level:
  00 → −3, 01 → −1, 11 → +1, 10 → +3.
- **64QAM:** three bits per axis:
  000 → −7, 001 → −5, 011 → −3, 010 → −1, 110 → +1, 111 → +3, 101 → +5,
  100 → +7.

Level L is output as L × step. The step normalises each constellation to
unit average power:

| Modulation | Step (Q2.14) | Value |
|---|---|---|
| QPSK | 11585 | 1/√2 |
| 16QAM | 5181 | 1/√10 |
| 64QAM | 2528 | 1/√42 |

The modulator feeds a 3600-point stream FIFO (`stream_fifo`). That is one whole slot of data points. It lets
the bit side run ahead while the back end is busy with the pilot and zero
symbols, which need no data.

## Subcarrier map

`subcarrier_mapper` places the 600 points of a data symbol around DC, with
the upper half of the spectrum first:

| Points | Subcarriers |
|---|---|
| X0 … X299 | 724 … 1023 (the negative frequencies) |
| X300 … X599 | 1 … 300 |

Subcarrier 0 (DC) and subcarriers 301 … 723 (the guard band) carry zero:
424 zeros per symbol. Two 600-point buffers alternate: one fills while the
other is read out in subcarrier order 0 … 1023.

## Uplink pilots

The pilot symbol uses the same 600 occupied subcarriers. They are shared
comb-fashion by the four users, with spacing 4. Count occupied subcarriers in
data order, starting at 724 and wrapping to 1 after 1023. User *u* owns
positions *u*, *u*+4, *u*+8, … in that count:

| User | Subcarriers |
|---|---|
| 0 | 724, 728, … 1020, 1, 5, … 297 |
| 3 | 727, … 1023, 4, … 300 |

Each user has 150 pilots. The other three users' positions, DC and the guard
band stay zero.

`pilot_rom` holds 4 × 150 = 600 QPSK values of amplitude 1.0. The values
themselves are not fixed by the reference design. Here they are generated
at elaboration from a PN9 sequence:

- polynomial x⁹ + x⁵ + 1, register initialised to all ones;
- output bit o[n] = o[n−9] ⊕ o[n−5], with o[0..8] = 1;
- ROM entry *a* takes o[2a] as the sign of I and o[2a+1] as the sign of Q;
  a 1 bit means positive;
- user *u*'s pilot *i* is entry 150*u* + *i*.

Replace the function in `pilot_rom.sv` to use another sequence.

`uplink_pilot` walks subcarriers 0 … 1023 and reads the ROM at the
positions owned by the selected user. `frame_formatter` counts symbols. It
takes symbol 0 from `uplink_pilot`, symbols 1–6 from the mapper, and
generates symbols 7–13 as zeros itself.

## The IFFT (`ifft_r4`)

This is the largest and slowest part of the chain. It computes

  x(n) = (1/1024) Σₖ X(k) e^{+j2πkn/1024}

as five radix-4 stages of 256 butterflies each.

**Butterfly.** `radix4_butterfly` is combinational. It:

1. forms the four sums of the 4-point (inverse) DFT;
2. divides them by 4, rounding half up;
3. multiplies outputs 1, 2 and 3 by the twiddles w, w², w³.

**Storage.** The transform runs decimation in frequency, in place, in one of
three banks of 1024 complex words. A word is 24 bits per part: the 16 input
bits plus 8 guard bits of extra fraction.

**Three engines.** Three engines work at the same time on different banks:

- the **load** engine writes a new symbol in natural order (1024 cycles);
- the **compute** engine does one butterfly per cycle (5 × 256 = 1280
  cycles). In stage *s* the blocks are L = 1024/4ˢ points long. Butterfly
  *n* of a block touches points n, n+L/4, n+L/2 and n+3L/4, with twiddle
  exponent n·4ˢ;
- the **unload** engine reads the finished bank at the base-4
  digit-reversed address. It rounds and saturates back to 16 bits, so
  samples leave in natural order (1024 beats).

Each engine takes the banks in the order 0, 1, 2, 0, … and waits until its
next bank is free, loaded or done, as it needs. Two concurrent assertions
check that no two engines share a bank.

**Twiddles.** The twiddle ROM (Q1.14) is computed at elaboration with
`$cos`/`$sin`. No table file is needed.

**Scaling.** The 1/4 in every stage gives the overall 1/N. This keeps the
output in range without block floating point. The cost is that the time
samples are small: with 600 unit-power subcarriers their RMS is
√600/1024 ≈ 0.024, about 400 LSB. Measured
error against a double-precision IFFT is below 0.6 LSB.

**Throughput and latency.** The butterfly engine sets the throughput: one
symbol per 1280 cycles. Latency from the first input to the last output is
1024 + 1280 + 1024 + 1 = 3329 cycles.

**Input range.** The butterfly is exact as long as its inputs stay below
2²³ in magnitude. Inputs derived from 16-bit samples do.

## Cyclic prefix

`add_cp` buffers each 1024-sample symbol in one of two ping-pong buffers. It
then sends x880 … x1023 followed by x0 … x1023. `out_last` marks the last of
the 1168 samples.

## Interfaces and timing

All stages use valid/ready handshakes. A value moves on a rising clock edge
when both valid and ready are high. Every stage accepts back-pressure.
Reset is asynchronous and active low (`rst_n`). Memories are not reset:
every entry is written before it is read.

Samples are the packed struct `ue_pkg::cplx_t` = {re, im}. Each part is
signed 16-bit Q2.14 (1.0 = 16384).

Top level, `ue_tx_top`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `s_axis_tvalid/tready/tdata` | in/out/in | 1/1/1 | serial bit input |
| `mod_select` | in | 2 | 0 QPSK, 1 16QAM, 2 64QAM; taken at each slot start |
| `user_id` | in | 2 | pilot user 0–3; taken at each pilot symbol |
| `m_axis_tvalid/tready` | out/in | 1 | sample handshake |
| `m_axis_tdata` | out | 32 | {re, im}, Q2.14 |
| `m_axis_tuser` | out | 1 | last sample of an OFDM symbol |
| `m_axis_tlast` | out | 1 | last sample of a slot |
| `fifo_level` | out | 12 | points waiting between modulator and mapper |

**Rate.** With an output that never stalls, a slot leaves every
14 × 1280 = 17920 cycles. That is 16352 samples, or 91 samples per 100
cycles. At a 100 MHz clock it gives 80 MS/s of IFFT output. The target
is 61.32 MS/s: 1024 samples in each 16.7 µs symbol of the 60 kHz
numerology.

64QAM is the exception. It needs 21600 bits per slot, and the input takes
one bit per cycle, so 64QAM slots come every 21600 cycles. That is still
66 MS/s.

**Latency.** The first sample leaves about 3500 cycles after the first bit.

## Departures from the reference design

- Hand-written RTL. The reference design uses high-level synthesis with
  AXI-Stream ports.
- The processor, DMA engines and GPIO blocks of the prototyping board are
  not part of this RTL:
  - the two streams come out as AXI-Stream-style ports;
  - the two control inputs are plain ports.
- Pilot values come from PN9, because the reference gives none.
- The bit input is one bit per beat.
- The IFFT scales by 1/N, and all word lengths are chosen here.
- The markers `m_axis_tuser` and `m_axis_tlast`, and the `fifo_level`
  output, are additions.

## Verification

Each module has a self-checking testbench in `tb/`. It compares the
module's outputs with values the testbench computes on its own, and counts
cycles where a rate or latency matters. Each testbench ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_s2p` | bit grouping and slot-wise mode latching, with random stalls |
| `tb_modulator` | every constellation point of all three schemes |
| `tb_stream_fifo` | order, full and empty, random stalls, full depth |
| `tb_subcarrier_mapper` | placement, zeros, full-rate operation |
| `tb_pilot_rom` | all 600 entries against the PN9 recurrence |
| `tb_uplink_pilot` | pilot symbols for all four users, user switching |
| `tb_frame_formatter` | symbol layout of several slots |
| `tb_radix4_butterfly` | random butterflies, both directions, against a model |
| `tb_ifft_r4` | eight symbols against a floating-point DFT; latency 3329 and period 1280 |
| `tb_add_cp` | prefix content and length |
| `tb_ue_tx_top` | whole chain, default parameters (see below) |

`tb_ue_tx_top` runs the whole chain at its default sizes for five slots:

- all three modulations and all four users, including switches between
  them;
- a reference model in the testbench: mapping, pilots, a floating-point
  IFFT and the prefix;
- slot period checked at 17920 cycles, and the resulting useful rate at a
  100 MHz clock (80 MS/s) against the required 61.32 MS/s;
- a long output stall that fills the FIFO to its depth;
- counts of every mechanism, each of which must happen at least once: mode
  and user switches, input and output stalls, pilot, data and zero symbols,
  prefix insertions, the FIFO peak.

It runs in about ten seconds.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_ue_tx_top \
    -Irtl -y rtl rtl/ue_pkg.sv tb/tb_ue_tx_top.sv
./obj_dir/Vtb_ue_tx_top
```

Use another testbench name to run that module's test. The sizes are
parameters that default to the values above. The testbenches of the smaller
blocks override some of them to stay short.
