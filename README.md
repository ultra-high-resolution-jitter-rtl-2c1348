# Nanosecond-resolution jitter measurement for Ethernet receive streams

Media streams such as SMPTE ST 2110-21 video send UDP packets of a fixed size
at a fixed rate. On a network the spacing of the received packets wanders.
That wander, the jitter, sets how large the receive buffers must be. This
design measures it in hardware, on the receive byte stream of an Ethernet
MAC. Its resolution is one MAC clock period: 8 ns for 1G Ethernet at
125 MHz. Software-timestamping methods manage microseconds at best.

The method works on the receiver alone: no clock is shared with the sender.
Call the sender's (constant) packet spacing `Ts` and the spacing of the
i-th pair of received packets `Tr_i`. Then

    Tr_i = Ts + D_i        jitter   D_i = Ts - Tr_i

`Ts` is either known and written in by software, or estimated as the mean of
the first N received spacings. The jitter has zero mean, so that mean tends
to `Ts`. A measurement therefore has two phases:

1. **Estimation.** Sum N spacings, then divide the sum by N.
2. **Evaluation.** For every further spacing, compute `D = Ts - Tr`. Keep the
   mean of |D|, the maximum, the minimum and the peak-to-peak value. Store
   each D in a circular buffer that software can read out.

How long the estimation must run depends on the jitter expected and the
error wanted. The error bound is about `J / (2*sqrt(N-1))` for a largest
jitter J. For example, 50 samples are enough for 100 ns of jitter at 8 ns
error, and 390,625 samples for 10 µs of jitter.

Throughout this README, "gap" means the spacing from one packet's first byte
to the next packet's first byte, that is, the packet period. It does not
mean the idle time between frames.

## Where it sits

```
             receive side (jitter_platform)                          
  MAC rx  ──►┌──────────────────────────── jitter_unit ──────────────┐──► meas_packet_dropper ──► host stream
  AXI4-S     │  stream passes through on wires (no added latency)    │      (removes the flagged
  8 bit      │                                                       │       measurement frames)
             │  rx_stream_filter ─match─► gap_timer ─gap─┬─► ipg_estimator ──Ts──┐
             │                                           └─► jitter_eval ◄────────┘
             │                                                │ D          │ stats
             │                                          result_memory      │
             │                                                └── axil_regs ◄─── AXI4-Lite (host CPU)
             └───────────────────────────────────────────────────────┘

  beside it: packet_generator ──► MAC tx   (test stream with programmed jitter)
```

`jitter_unit` is the measurement unit itself. `jitter_platform` is the top
level. It puts the unit in a test set-up: after the unit comes a filter that
keeps the measurement packets away from the host CPU. Beside them, with its
own ports, is a packet generator that produces a stream with a known
jitter. In the lab the generator drives a second MAC, which is cabled
directly to the first. The MAC, the PHY and the host CPU are not part of
this RTL. Their signals are the top's ports.

All of the logic runs in the MAC receive clock domain, AXI4-Lite included.
Reset is synchronous and active low (`rst_n`).

## The packet match and why its latency is fixed

The whole measurement comes down to the times between successive
`packet_match` pulses. These pulses must mark every measurement packet at
exactly the same point relative to its first byte. If they did not, the
time spent parsing a packet would show up as jitter.

`rx_stream_filter` watches the 8-bit stream and checks the following as the
bytes go past:

- EtherType: 0x0800 for IPv4 or 0x86DD for IPv6, chosen by `CTRL.IPV6`.
- IP version.
- The next protocol, which must be UDP (17).
- Optionally, the destination IP address. All 128 bits are compared for
  IPv6.
- Optionally, the destination UDP port.

The UDP header is found through the IHL field for IPv4. The port lies at
bytes 36–37 for IPv4 and 56–57 for IPv6. The decision is never issued as
soon as it is known. A countdown starts on the first byte, and the pulse
goes out exactly `MATCH_BYTES` = 64 byte-times later. Packets that fail a
check, or that end early, give no pulse.

A byte-time is 1, 10 or 100 clock cycles at 1000, 100 or 10 Mb/s. At those
speeds the MAC still delivers 8-bit bytes, but only one every 10 or 100
cycles. The latency is therefore 64, 640 or 6400 cycles. The `speed` input
tells the filter which one applies. A frame plus its preamble and
inter-frame gap takes at least 84 byte-times, so one frame's latency window
never overlaps the next frame's. An assertion checks this.

The gaps the unit measures are therefore gaps between first bytes, in whole
clock cycles.

## Number formats

| Quantity | Format |
|---|---|
| Gap `Tr` (gap_timer) | unsigned 32-bit clock cycles, saturating |
| Estimate `Ts` (IPG_EST, MANUAL_IPG) | unsigned 32-bit, **4 fractional bits** (1/16 cycle = 0.5 ns at 125 MHz) |
| Jitter `D` (result memory, JIT_MAX, JIT_MIN) | signed 32-bit two's complement, 1/16 cycle, saturating |
| JIT_AVG, JIT_PPK | unsigned 32-bit, 1/16 cycle |

- **Estimate rounding.** The estimate is `round(16 * sum(Tr) / N)`. The
  fraction matters because the mean of many gaps resolves better than one
  clock period. Each jitter value keeps that fraction: `D = Ts - 16*Tr`.
- **Sign.** A packet that arrives early (a short gap) gives a positive D.
- **Average.** JIT_AVG is the mean of |D|, not of D. With `Ts` taken as the
  mean gap, the signed mean is zero by construction, so it says nothing.
  The mean of |D| is what a "mean jitter" of several hundred nanoseconds
  means.
- **Peak-to-peak.** JIT_PPK is `max(D) - min(D)`.
- **Result memory.** The result memory keeps the signed values, so software
  can compute any other statistic, such as standard deviation or
  histograms, from the last 8192 of them.

## Software view: registers and a measurement

AXI4-Lite uses 16-bit byte addresses and 32-bit data. Byte strobes are
honoured on writes. The read latency is three cycles after the address
handshake.

| Address | Name | Access | Content |
|---|---|---|---|
| 0x00 | CTRL | RW | bit0 ENABLE, bit1 MANUAL, bit2 FREEZE, bit3 IPV6, bit4 IP_EN, bit5 PORT_EN |
| 0x04 | STATUS | RO | bit0 estimating, bit1 evaluating (estimate valid), bit2 result memory has wrapped |
| 0x08 | EST_N | RW | number of gaps N for the estimate (reset value 50; 0 acts as 1) |
| 0x0C | MANUAL_IPG | RW | gap used when MANUAL is set, 1/16 cycle |
| 0x10 | UDP_PORT | RW | destination UDP port (bits 15:0) |
| 0x14–0x20 | IP0–IP3 | RW | destination IP address; IPv4 in IP0, IPv6 bits 127:96 in IP3 |
| 0x24 | IPG_EST | RO | estimate `Ts` |
| 0x28 | JIT_AVG | RO | mean of \|D\| |
| 0x2C | JIT_PPK | RO | peak-to-peak |
| 0x30 / 0x34 | JIT_MAX / JIT_MIN | RO | largest / smallest D (signed) |
| 0x38 | SAMPLES | RO | jitter values evaluated |
| 0x3C | WR_PTR | RO | next write position in the result memory |
| 0x40 | MATCHES | RO | packet matches since the start |
| 0x8000 + 4·i | result memory | RO | jitter value in slot i (8192 slots) |

Unmapped addresses read as 0. Writes to read-only addresses are ignored.

A measurement runs as follows:

1. Write the filter address and port and EST_N (or MANUAL_IPG).
2. Write CTRL with ENABLE set. A 0→1 change of ENABLE starts a new
   measurement: it clears the statistics, the match counter and the memory
   pointer, and starts the estimation phase. With MANUAL set, the
   estimation is skipped and the evaluation starts at once.
3. Once N gaps have been taken, the estimate stays fixed. It is ready 55
   cycles after the N-th gap: one cycle per bit for the 52-bit division,
   plus 3.
4. Read the statistics whenever you like. The mean of |D| is updated 66
   cycles after each sample.
5. To read out the result memory, first set FREEZE. Writes to the memory
   then stop, so the stored values form one unbroken run, while the
   statistics go on counting. Read from WR_PTR onwards, wrapping at 8192;
   that is oldest first once STATUS.wrapped is set. Then clear FREEZE.
6. Clearing ENABLE stops the measurement.

## Files

| File | Role |
|---|---|
| `rtl/jm_pkg.sv` | shared constants and types: fixed-point width, speeds, filter config and statistics structs, register map |
| `rtl/jitter_platform.sv` | top: unit + dropper, and the generator beside them |
| `rtl/jitter_unit.sv` | the measurement unit: wiring of the blocks below, stream pass-through |
| `rtl/rx_stream_filter.sv` | header parser, constant-latency packet match |
| `rtl/gap_timer.sv` | clock counter between matches; one counter serves both phases |
| `rtl/ipg_estimator.sv` | clock accumulator (48 bit), packet accumulator, division, manual bypass |
| `rtl/divider.sv` | sequential restoring divider, one bit per cycle |
| `rtl/jitter_eval.sv` | D = Ts − 16·Tr, max/min/peak-to-peak, mean of \|D\| (with its own divider) |
| `rtl/result_memory.sv` | 8192 × 32-bit circular buffer (32 KB block RAM), freeze |
| `rtl/axil_regs.sv` | AXI4-Lite slave, register map above, start pulse |
| `rtl/meas_packet_dropper.sv` | store-and-forward filter that removes matched frames before the host |
| `rtl/packet_generator.sv` | test source: IPv4/UDP frames at a set period, each delayed by a value from a 1024-entry delay memory |
| `tb/*.sv` | one self-checking testbench per block, plus `tb_jitter_unit` and `tb_jitter_platform` end to end; `tb_eth_pkg` builds Ethernet/IP/UDP frames |

## The test platform parts

**Measurement packet dropper.** The match pulse comes 64 byte-times after a
frame's first byte. A minimum-size frame has already ended by then, so the
dropper cannot simply gate the stream. It buffers each frame (4096 bytes in
all) and releases it only after two things: the frame has ended, and its
decision window has passed without a match. The window is the same
64 byte-times, plus 2 cycles.

Frames are discarded by moving the write pointer back to the frame's first
byte. That happens to frames that are matched, frames the MAC marks bad
(`tuser` on the last byte), and frames that do not fit. The input never
stalls, because a MAC receive stream cannot wait.

**Packet generator.** Packet k is due at `k·period` cycles. With `jitter_en`
set, it is held back by a further `delay[k mod 1024]` cycles. Software fills
the delay memory beforehand, for example with normally distributed values
shifted to be non-negative; the testbenches do this.

Each frame is IPv4/UDP. It carries a valid header checksum and the packet
number, both as the IP identification and at the start of the payload. A
packet that comes due while the previous frame is still being sent sets
`overrun`. So does a delay longer than the period.

## Verification

Every testbench checks the block's outputs against values worked out on
its own side, from the stimulus. Each ends with a `TB_RESULT` line.

- `tb_rx_stream_filter` covers 37 frames at all three speeds. The frames
  are IPv4 and IPv6, with and without options, with a wrong port, address,
  protocol or EtherType, and truncated. For every frame it checks whether a
  pulse comes, and that it comes exactly 64 byte-times after the first byte.
- `tb_ipg_estimator` checks the rounded mean, that the phase stops after N
  gaps, the 55-cycle latency, manual mode, and N = 0.
- `tb_jitter_eval` checks every stored value and every statistic against a
  model, including saturation.
- `tb_divider`, `tb_result_memory` (full 8192 words, wrap, freeze,
  read-during-write), `tb_axil_regs` (every register, strobes, timing,
  delayed READY), `tb_packet_generator` (frame contents, checksum, spacing)
  and `tb_meas_packet_dropper` (frames checked byte for byte under
  back-pressure, late matches, bad frames, overflow) test the remaining
  blocks.
- `tb_jitter_platform` runs at the default parameters and takes about 15 s.
  It runs the two lab experiments the design was made for, then manual mode
  and an IPv6 stream at 100 Mb/s. Every frame the host receives must be a
  non-measurement frame, byte for byte. Each mechanism (estimation, manual
  gap, rejected frames, IPv6, 100 Mb/s, memory wrap, freeze, drop) is
  counted and must occur. `tb_jitter_unit` is the same test on the unit
  alone.

Results of the end-to-end run, next to the lab figures the design was made
to reproduce:

| Experiment | Lab result | This RTL in simulation |
|---|---|---|
| 1 ms gap, no jitter, 50-sample estimate | gap estimated correctly, mean jitter 0, peak-to-peak 8 ns (1 cycle, two boards' clocks) | estimate exactly 125,000 cycles, mean 0, peak-to-peak 0 (one clock for both sides) |
| normal jitter, 4000-sample estimate, last 8K samples | mean 654 ns, std dev 493 ns (generator setting 653.6 / 493.3 ns) | \|D\| over the last 8192 samples: mean 632 ns, std dev 474 ns |

The second experiment is simulated with a 1000-cycle gap instead of 1 ms
(125,000 cycles), so that it finishes in seconds. The arithmetic does not
depend on the gap length: the widths hold 1 ms gaps and up to
2^32 − 1 estimation samples of gaps up to 147 ms. The remaining difference
from the lab figures comes from this testbench's own random delays, not
from the unit. Every value was compared exactly against the model.

Each block's testbench was also run against a deliberately broken copy of
the block. Every one of them failed it.

## Departures from the original design, and limits

- **Choices made here.** The published design describes the blocks and what
  they do, but not their internals. The following are choices made for this
  RTL:
  - the register map;
  - the fixed-point format and the 4 fractional bits;
  - the 64-byte match latency;
  - comparing the *destination* address and port;
  - the one-bit-per-cycle dividers;
  - the freeze bit as the way to "disable writes during read-out";
  - how the dropper and the generator work inside.
- **Mean of |D|.** Taking the reported average jitter as the mean of |D| is
  an interpretation. It is the one consistent with the published figures: a
  mean of 653.6 ns with a standard deviation of 493.3 ns is exactly the
  mean-to-deviation ratio of |X| for normally distributed X.
- **Finer average than published.** The original reports its average
  jitter in whole clocks (81 clocks, 648 ns, in its 1 ms experiment). This
  RTL keeps 4 fractional bits in JIT_AVG and in every stored value, so the
  average resolves 0.5 ns at 125 MHz. Drop the low 4 bits for the coarser
  figure.
- **Not supported:** VLAN tags, IPv6 extension headers, and IPv4 headers
  longer than 44 bytes (the UDP port must end before byte 64).
- **Only 8-bit streams.** The original architecture is said to extend to
  100 Gb/s. This RTL handles 8-bit streams only, which means 1 Gb/s at
  125 MHz. Faster links deliver 64- or 512-bit words per cycle, and the
  parser would have to take a whole word at a time.
- **One clock domain.** A host bus on a different clock needs a crossing
  outside the unit.
- **Resources.** The original implementation reports about 6.3k LUTs, 15k
  registers and 7.5 block RAMs. This unit is much smaller in registers
  (about 1,050 flip-flop bits plus the 32 KB RAM), so the original evidently
  held more, for example pipelining or further statistics, that is not
  described and not reproduced here.
- **Oscillator error.** The frequency error of the oscillator adds to the
  measured jitter, as in any single-clock measurement. It is not corrected.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/jm_pkg.sv tb/tb_eth_pkg.sv tb/tb_jitter_platform.sv --top-module tb_jitter_platform -o sim
obj_dir/sim
```

Replace `tb_jitter_platform` with any other `tb_*` name to run that
testbench. The simulator has two states, so everything that is read is
reset. `+verilator+rand+reset+2` randomises the rest, and the testbenches
pass with it.

To change the sizes, set the parameters of `jitter_platform` or
`jitter_unit`:

- `MEM_DEPTH`: result memory slots;
- `MATCH_BYTES`: the match latency, at least 58 for IPv6 and at most 83;
- `BUF_BYTES`: the dropper's buffer;
- `DELAY_DEPTH`: the generator's delay memory.

The fixed-point fraction is `jm_pkg::FRAC_BITS`.
