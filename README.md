# Timestamped radio over switched 10G Ethernet fronthaul

This is a fronthaul link that carries a digitised radio carrier over ordinary
switched Ethernet instead of a dedicated CPRI link. The central unit (CU) turns
the IF samples of an LTE carrier into compressed baseband words. It packs them
into Ethernet frames, each stamped with a 4-byte time of day, and sends them
through a standard MAC-learning switch. The remote unit (RU) uses the
timestamps to put the frames back in order and to play each one out a fixed
time after it was stamped. Delay variation in the network therefore disappears
before the samples reach the DAC.

The RTL follows the architecture of the experiment published as *Real-time
Experimental Demonstration of Timestamped Digitised Radio over Switched Optical
Ethernet Fronthaul*. The following come from that work:

- the order of the processing;
- 8-bit compression of I and Q;
- 400 Mb/s per 20 MHz carrier;
- the 4-byte timestamp in units of 2^-32 s;
- 20 copies of the service in 512-byte payloads, or 10 copies in 64-byte payloads;
- a learning switch between the units;
- reordering and synchronisation by timestamp at the RU.

Everything else is this design's own choice, listed in
[What is this design's own](#what-is-this-designs-own). That covers the
compression law, the filters, the frame layout, the playout rule, the switch
internals and every size not named above.

## The link at a glance

```
 ADC 150 MSa/s                          156.25 MHz, 64-bit beats                            DAC 150 MSa/s
 ──► ddc_fs4 ─► iq_compressor ─► async_fifo ─► iq_replicator ─► roe_packetizer ─► cu_tx_*
     (fs/4 mix, /6)  (16→8 bit)                  (x REP)           (+MAC hdr, +timestamp)
                                                                        │  10G MAC / SFP+ / fibre (outside the RTL)
                                                                        ▼
                                                     eth_learning_switch (4 ports, store and forward)
                                                                        │
 ◄── duc_fs4 ◄─ async_fifo ◄─ iq_decompressor ◄─ iq_dereplicator ◄─ reorder_buffer ◄─ roe_depacketizer ◄─ ru_rx_*
     (hold x6, fs/4 mix)        (8→16 bit)        (first copy)        (timestamp order, fixed delay)
```

`roe_cu` and `roe_ru` contain the two unit datapaths. `roe_fronthaul_top` holds
one CU, one switch and one RU. The 10G MACs, the SFP+ modules and the fibres
are not part of this RTL, so every link end is a port of the top. Whatever
drives the top (a MAC, or the testbench) connects `cu_tx_*` to a switch receive
port and a switch transmit port to `ru_rx_*`. The ADC, the DAC and the RF
front end are also outside: the top takes 16-bit IF samples in and gives 16-bit
IF samples out.

## Rates and how the numbers fit

| quantity | value | where it comes from |
|---|---|---|
| IF | 37.5 MHz | original experiment |
| ADC / DAC rate | 150 MSa/s, so the IF is exactly fs/4 | this design |
| baseband rate after decimation by 6 | 25 MSa/s | this design |
| compressed sample | 8-bit I + 8-bit Q = 16 bit, so 400 Mb/s per carrier | rate from the original |
| copies per sample, `REP` | 20 (512-byte payload) or 10 (64-byte payload) | original |
| payload rate at REP=20 | 8 Gb/s, i.e. 125 M beats/s of the 156.25 MHz clock | derived |
| frame on the wire, 512-byte payload | 512 + 18 (header, timestamp) + 24 (FCS, preamble, gap) bytes: 8.66 Gb/s | derived |
| frame period, 512-byte payload | 512 / 40 bytes per sample = 12.8 samples = 512 ns = 2199 timestamp units | derived |

The 64-bit Ethernet side runs at 156.25 MHz. The converters run at 150 MHz. Two
`async_fifo`s (Gray-code pointers, two-flop synchronisers) connect the two
clock domains, one in each unit.

## Frame format and the two-byte lane shift

Every frame is a plain Ethernet II frame:

| bytes | field |
|---|---|
| 0–5 | destination MAC (`RU_MAC` = 02:00:00:00:00:02) |
| 6–11 | source MAC (`CU_MAC` = 02:00:00:00:00:01) |
| 12–13 | EtherType 0x88B5 (IEEE local experimental) |
| 14–17 | timestamp, most significant byte first |
| 18… | `PAYLOAD_BYTES` of replicated, compressed I/Q |

The MAC adds the FCS, preamble and gap. On the 64-bit stream (`roe_pkg::beat_t`:
`data`, `keep`, `last`), byte 0 of the frame is in `data[7:0]` of the first beat.

The 18 header bytes are not a whole number of 8-byte beats. This is the least
obvious part of the datapath. Payload word *j* (8 bytes) therefore lands two
byte lanes into the stream:

- In the packetizer, output beat *k* ≥ 2 is `{payload[k-2][47:0], carry}`. The
  16-bit `carry` holds the top two bytes of the previous payload word. For beat 2
  it holds the two low timestamp bytes.
- An extra last beat carries only the final two bytes (`keep = 8'h03`).
- A frame is always `PAYLOAD_BYTES/8 + 3` beats long, sent back to back.
- The depacketizer undoes this. It emits `{beat[k][15:0], beat[k-1][63:16]}`
  as payload word *k*−3 for every beat *k* ≥ 3.

The packetizer sends a frame only after the whole payload is in its FIFO. The
10G output would otherwise run dry in mid-frame, because the payload arrives at
8 Gb/s. The timestamp of a frame is the time at which its first payload beat
entered the packetizer. That time is a fixed offset from when the samples left
the ADC.

## Replication

Each compressed sample is sent `REP` times in a row as (I, Q) byte pairs, so
the payload is one continuous byte stream. Sample *n* occupies bytes
`[2·REP·n, 2·REP·(n+1))`, whatever the frame boundaries. In the original set-up
these copies stand in for `REP` independent carriers, so that one 400 Mb/s
service can fill the 10G link.

- **`iq_replicator`** emits four 16-bit units per beat. It tracks how many copies
  of the current sample are still due. If fewer than four remain, it finishes the
  beat with the next sample from its FIFO.
- **`iq_dereplicator`** tracks the byte offset of each word inside its
  2·REP-byte group. It keeps the pair that starts a group.

`REP` ≥ 4 guarantees at most one group start per beat and no pair split across
beats. The stream is assumed to start on a sample boundary after reset. A frame
lost in the network shifts the alignment of the rest of the stream; nothing
here recovers from that.

## Compression

The two compression stages are rate reduction, then non-linear requantisation:

1. **`ddc_fs4`**: the IF is at fs/4, so mixing to baseband multiplies by
   1, 0, −1, 0 (I) and 0, −1, 0, 1 (Q). No NCO or multiplier is needed. Each
   branch then goes through a boxcar (first-order CIC) decimator of 6. The sum is
   shifted right by 2 and saturated to 16 bits.
2. **`iq_compressor`**: each 16-bit component becomes `{sign, exp[2:0], mant[3:0]}`.
   - Magnitudes below 256 use exp 0 with a step of 16.
   - Above that, exp = (position of the leading one) − 7, and the mantissa is the
     four bits below the leading one.
   - The step doubles with each segment, so the error stays roughly proportional
     to the signal.
   - The usable range is about 66 dB from the smallest step to full scale.

   **`iq_decompressor`** rebuilds each code at the middle of its interval. For
   exp 0 that is 16·m + 8. Otherwise it is (16 + m)·2^(exp+3) + 2^(exp+2).

The up-converter (`duc_fs4`) holds each sample for 6 DAC clocks and mixes it
back to fs/4 as I, −Q, −I, Q.

## Reordering and synchronisation at the RU

This is the part that makes a switched network usable for radio.

`timestamp_counter` keeps time of day as a fraction of a second in units of
2^-32 s:

- A 64-bit accumulator adds round(2^64 / f_clk) every clock, about 27.49
  timestamp units at 156.25 MHz, without long-term drift.
- Its upper 32 bits are the timestamp, which wraps every second.
- All timestamp comparisons are modulo 2^32 (`roe_pkg::ts_before`).

`reorder_buffer` has `NSLOT` slots, each one payload long. By default it holds
4 KiB of payload (`NSLOT = 4096 / PAYLOAD_BYTES`). That is enough to keep every
frame for the whole playout delay: 5 frames of 512 bytes, or 20 of 64 bytes,
arrive in 2.5 µs.

- **Storing:** a frame that passes the depacketizer's checks (destination MAC,
  EtherType, exact length) is written into a free slot. The slot is tagged with
  the frame's timestamp.
- **Playing:** the read side always picks the stored frame with the earliest
  timestamp. It starts playing that frame when local time reaches
  timestamp + `DELAY_TICKS`, then sends one 64-bit word per cycle.

Two things follow from this rule:

- Frames that overtook each other in the network leave in the right order.
- Every frame leaves a constant time after it was stamped. Network delay and its
  variation are absorbed, as long as they stay below the playout delay.

There are three counters. `reordered` counts frames that arrived with an
earlier timestamp than a frame stored before them. `dropped_late` counts frames
that arrive after a later frame has already been played; order cannot be
restored for them. `dropped_full` counts frames that find no free slot.

The default delay is 2.5 µs (`DELAY_TICKS = 10737`). It is above the 2.37 µs
measured for one switch stage with 512-byte payloads in the original experiment,
and below the 5 µs CPRI budget.

The two timestamp counters must agree. In the top they share one Ethernet clock
and reset, which matches a loop-back on one board. A `ts_load` port can set both
counters. Time transfer between separate boards (PTP or similar) is not part of
this design.

After the reorder buffer, the samples cross to the DAC clock. `duc_fs4` starts
playing `START_DELAY` (96) DAC clocks after the first sample arrives. That
margin covers the small offset between a frame's timestamp and the samples it
holds. From then on it takes one sample every 6 clocks, so the ADC-to-DAC
latency is constant. If the FIFO is ever empty when a sample is due, the DUC
counts an underflow, outputs zero and waits for data to start again.

## The switch

`eth_learning_switch` is a 4-port store-and-forward learning switch. It models
the switch stage of the link:

- **Input:** each receive port writes whole frames into its own FIFO (512 beats).
  A receive port cannot be stalled, so a frame that finds less than 190 beats
  (a maximum-size frame) of space is dropped whole.
- **Arbitration:** a round-robin arbiter picks an input that holds a complete frame.
- **Forwarding:** the destination MAC is looked up in `mac_learn_table` (16
  entries, round-robin replacement, no ageing).
  - A hit sends the frame to the learned port only.
  - A frame whose destination is on its own input port is dropped (filtered).
  - A miss or a group address floods the frame to all other ports.
- **Learning:** the source MAC is learned against the input port while the
  second beat passes.
- **Output:** the frame goes to all selected ports at once, one beat per cycle
  while all of them are ready.

Its latency is about one frame time (430 ns for a 512-byte payload) plus a few
cycles. The original experiment measured roughly 800 ns per switch stage on its
hardware.

## Interfaces and timing in brief

- Frame streams use `valid`/`ready` plus a `beat_t` (73 bits). Receive sides
  (`sw_rx_*`, `ru_rx_*`) have no `ready`: like a MAC, they cannot be stalled.
- The switch ports are arrays `[NP]` of `valid`/`ready` bits and `beat_t`.
- All flops use synchronous, active-low resets, one per clock domain:
  `adc_rst_n`, `eth_rst_n`, `dac_rst_n`.
- The top's status outputs are free-running 32-bit counters.

Top parameters and their defaults: `PAYLOAD_BYTES` 512, `REP` 20, `NP` 4,
`NSLOT` 8, `DELAY_TICKS` 10737, `START_DELAY` 96. The 64-byte configuration is
`PAYLOAD_BYTES=64`, `REP=10`. `PAYLOAD_BYTES` must be a power-of-two number of
8-byte words.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops itself. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/roe_pkg.sv tb/roe_model_pkg.sv \
    rtl/*.sv tb/tb_roe_fronthaul_top.sv --top-module tb_roe_fronthaul_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. The package file appears
twice on this command line, which Verilator accepts. `tb/roe_model_pkg.sv` holds the integer reference models of the DDC,
the 8-bit code and the up-converter that the CU, RU and end-to-end tests
compare against.

**`tb_roe_fronthaul_top`** runs the whole link at the default sizes. It drives
an amplitude-modulated IF tone with noise into the ADC port.

- It carries the CU's frames to switch port 0 and swaps neighbouring frames now
  and then.
- Part-way through, it sends one frame from the RU's address into port 1. The
  switch floods at first, then learns the RU's port and forwards by unicast.

It checks that:

- every DAC sample equals the reference chain;
- the ADC-to-DAC latency is the same for every sample (3.24 µs);
- flooding, learning, unicast and reordering all happened;
- nothing was dropped and the DAC never ran dry.

About 40 frames take a few seconds of simulation.

**`tb_roe_link_64b`** runs the same test in the 64-byte, 10-copy
configuration.

**`tb_roe_latency`** runs four links side by side with zero playout delay, so
each frame plays as soon as it is complete. That exposes the datapath's own
latency (see [Latency](#latency)).

**`tb_roe_two_stage`** puts a second learning switch after the top's own, so
frames cross two store-and-forward stages. Its playout delay is 3 µs (see
[Latency](#latency)).

Unit testbenches:

| testbench | what it covers |
|---|---|
| `tb_roe_cu`, `tb_roe_ru` | each unit alone; frames checked against the frame period of 2199 timestamp units |
| `tb_eth_learning_switch` | flooding, learning, unicast, filtering, simultaneous inputs, overflow drops |
| `tb_reorder_buffer` | release order and timing across the timestamp wrap, late and full drops |
| one per remaining module | that module alone |

## Latency

With the playout delay at zero, `tb_roe_latency` measures ADC-to-DAC latency
for both payload sizes, once with the CU connected straight to the RU and once
through the switch:

| payload | CU straight to RU | through the switch |
|---|---|---|
| 64 B, 10 copies | 943 ns | 1030 ns |
| 512 B, 20 copies | 1690 ns | 2130 ns |

These figures include the up-converter's 96-clock (640 ns) start margin. They
do not include the MAC, transceiver or fibre.

- Most of the growth with payload size is the time to fill a payload at the
  service rate: 128 ns or 512 ns.
- Then the frame itself has to be sent.
- The switch adds one store-and-forward frame time.

For comparison, the original hardware measured 364 / 513 ns on an internal
loop-back and 1846 / 2368 ns through one switch, which added about 800 ns per
switch stage.

In normal operation the playout delay (2.5 µs) sets the latency, not the
network. The latency is then the same for every sample: 3.24 µs from ADC to DAC
in the end-to-end tests, within the 5 µs CPRI budget.

Each extra switch stage adds one store-and-forward frame time, about 440 ns for
512-byte payloads. The playout delay must grow by the same amount. With two
stages and a 3 µs playout delay (`DELAY_TICKS = 12885`), `tb_roe_two_stage`
sees no late frames and a constant 3.74 µs from ADC to DAC. The original work
also found that two stages were the most a 5 µs budget allows at this payload
size.

## What is this design's own

The original work gives the architecture and the numbers listed at the top. It
does not give the following, so each was chosen here:

- The 150 MSa/s converter rate, picked so the 37.5 MHz IF is fs/4 and the
  decimated 16-bit stream is exactly 400 Mb/s.
- The boxcar decimator and the zero-order-hold interpolator. The original used
  proper filters and a compression algorithm from earlier publications. The EVM
  and dynamic-range figures of that work are analogue measurements and are not
  claimed here.
- The 8-bit segment law.
- The frame layout after the MAC header, the EtherType and the MAC addresses.
- The rule of keeping the first copy of each replicated sample.
- The reorder-and-playout rule, its 2.5 µs delay and its 4 KiB of frame slots
  (8 slots at 512 bytes, 64 at 64 bytes).
- The DUC start-up margin and underflow behaviour.
- The switch internals: FIFO sizes, round-robin arbitration, a 16-entry table
  without ageing, and 4 ports.
- The clock-domain crossing.

Known limits:

- Frames lost in the network are not concealed.
- Frame loss also breaks the copy alignment of the rest of the stream, because
  the frames carry no sequence number.
- The two units' clocks are assumed to be locked together.
