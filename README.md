# Precise IPv4/IPv6 packet generator for a 10 Gbit/s FPGA network card

This is a hardware traffic generator that sits between the host DMA engine and
the Ethernet ports of an FPGA network card. Software cannot fill a 10 Gbit/s
link with exactly timed packets, so the generator builds and times the packets
in the FPGA. It does four things, plus a pass-through mode:

* **Synthetic generation.** It builds Ethernet/IPv4 or Ethernet/IPv6 frames
  at line rate. Every variable header field is a constant, a sequence or a
  pseudo-random value inside a range set by the host.
* **Loading.** It stores traffic in the card's DDR2 memory. The traffic comes
  either from the host (for example a capture file pushed by DMA) or from a
  network port (capture).
* **Replay.** It sends the stored traffic to the network. Each packet can be
  released at its own 64-bit timestamp, or the average bit rate can be
  limited.
* **NIC.** When no run is active, the card behaves as an ordinary network
  card: host frames go out through the same output stage, unrestricted, and
  received frames go to the host.

The design is one *generator core* per network port. The top module
`precise_packet_generator` has `NUM_IFC` cores (default 2, for a 2x10G card).
The cores share only the clock, the reset and the current-time input.

All data paths are 64 bits wide at 156.25 MHz. That is 10 Gbit/s, so a stream
that moves one beat per clock runs at line rate.

## The frame stream

Frames move on chip as a stream of 64-bit beats (`pg_pkg::fl_beat_t`):

| field | width | meaning |
|---|---|---|
| `data` | 64 | frame bytes; byte 0 of the frame is `data[7:0]` |
| `rem`  | 3  | in the last beat, the index of the last valid byte (7 = full beat) |
| `sof`  | 1  | first beat of a frame |
| `eof`  | 1  | last beat of a frame |

Every stream also has separate `valid` and `ready` wires, both active high.
A beat moves in a clock where both are high. A source holds its beat until
the beat is accepted; an assertion at the packet limiter output checks
this for the traffic sent to the network.

**Timestamped frames.** Stored traffic may carry a timestamp per packet. That
frame starts with one extra 64-bit beat holding the timestamp, and that beat
has `sof`. The packet bytes follow with `sof` low, and the last beat has `eof`.

## Block structure of one core

```
              MI32 register bus (from the host)
                         |
                  register_file ---------------> main_control_fsm
                   |         |                      |  (route, enables,
   pseudorandom_generator    |                      |   start pulses)
   (9 x field_generator,     |                      |
    each with mlfsr)         v                      v
           +---------> packet_completer ----+   memory_reader_writer
                                            |    (switching_logic +
   dma_tx / net_rx / dma_rx <---------------|---> fl_ddr2_transformer) <--> DDR2 controller
                                            v        |
                                 limiter input mux <--+
                                            |
                                     packet_limiter ----> net_tx
   (timestamp_extractor, timestamp FIFO, packet FIFO, timestamp_comparator,
    length_counter, limiting_algorithm)                 ^
                                                        ts_now (64-bit time)
```

Routing for each mode (`switching_logic`, plus the limiter input multiplexer
in `pg_core`):

| mode (`CONTROL[6:4]`) | into the packet limiter | into DDR2 | network receive goes to |
|---|---|---|---|
| 0 NIC       | host DMA transmit | - | host |
| 1 GEN       | packet completer | - | host |
| 2 LOAD_HOST | - | host DMA transmit | host |
| 3 LOAD_NET  | - | network receive | memory only |
| 4 REPLAY    | DDR2 read stream | - | host |

## Header field generation

Each variable header field has a `field_generator` with three registers:
`from`, `to` and `inc` (the step), and a mode:

* **CONST**: the value is `from`.
* **SEQ**: the values are `from`, `from+inc`, `from+2*inc`, ... When the next
  value would go past `to`, it starts again at `from`.
* **RANDOM**: a random word `r` of the field's width is scaled into the range
  with a multiplication and a shift, with no divider:
  `value = from + ((r * (to - from + 1)) >> WIDTH)`.
  The result is always inside `[from, to]` and covers the whole range.

The fields are: IP payload length, TOS/traffic class, identification,
flags+fragment offset, flow label, TTL/hop limit, protocol/next header, and
the source and destination addresses (128 bits; IPv4 uses the low 32).
Version, IHL (fixed at 5), total/payload length and the IPv4 header checksum
are computed from the fields. A payload length outside what a frame can hold
is clamped, so frames are 60 to 1514 bytes: the IPv4 payload is 26..1480
bytes, the IPv6 payload 6..1460 bytes. The frame check sequence is left to
the MAC.

**Random source (`mlfsr`).** Each generator uses three Fibonacci LFSRs of
length 33, 39 and 47 (polynomials x^33+x^20+1, x^39+x^35+1, x^47+x^42+1).
Each LFSR advances 32 steps per clock, and the output is the XOR of their low
32 bits. So one clock gives a fresh 32-bit word. Unlike a single LFSR, the
output can also be zero. A field wider than 32 bits uses one `mlfsr` per 32
bits, each with its own seed. The parameter `RNG_MULTI` (top, core and
generator level) selects a smaller source instead: with `RNG_MULTI = 0`
each `mlfsr` outputs the 47-bit register alone, a plain LFSR. The payload's
random source is always the three-register version.

**Payload.** The payload is the 32-bit `PATTERN` register repeated, most
significant byte first. If `CONTROL[12]` is set, the payload is random instead.
Frames leave the completer back to back, one beat per clock.

## Timing control: the packet limiter

Every frame leaves the core through the `packet_limiter`:

1. `timestamp_extractor` splits off the leading timestamp beat (if
   timestamps are on) and moves `sof` to the first packet beat.
2. The timestamps go into a timestamp FIFO (`TS_FIFO_DEPTH`, default 64).
   The packets go into a packet FIFO (`PKT_FIFO_DEPTH` beats, default 512).
3. A frame may **start** only when both enabled conditions hold:
   * *timestamp condition*: `timestamp_comparator` raises `go` once the
     current time `ts_now` is at or past the head timestamp. A late packet is
     sent at once, not dropped.
   * *rate condition*: `limiting_algorithm` allows a start (see below).
   Once a frame has started, it is never cut: the rest of its beats flow
   without a check.
4. `length_counter` counts the bytes of each frame on its way out. One clock
   after the last beat, it reports the length to the limiting algorithm.

**Rate limiting with a bit credit.** The limiting algorithm keeps a signed
credit in units of 2^-16 bit:

* Every clock it adds `inc`, the number of bits the set rate allows per clock.
* When a packet of L bytes has been sent, it subtracts `8*L` bits.
* A new packet may start only while the credit is not negative.
* While no packet is in flight, the credit is capped at `inc`. An idle link
  therefore saves up no burst, but the fraction of a clock left over when a
  packet is released is kept, so the long-run rate is exact.

`RATE` is read in one of two ways, chosen by `CONTROL[11]`:

* *relative* (`CONTROL[11]=0`): `rate/65536` of the line rate, so
  `inc = rate * 64` in Q16. 65536 means no limitation.
* *absolute* (`CONTROL[11]=1`): `rate` in Mbit/s, and
  `inc = (rate * ceil(2^24 * 1000 / CLK_KHZ)) >> 8`. The constant is rounded
  up, so the rate is never undershot.

Only frame bytes are counted. Preamble and inter-frame gap are not, so the
rate is a frame-data rate.

## Storing and replaying: DDR2 word format

`fl_ddr2_transformer` writes each stream beat as one 128-bit memory word,
`{59'b0, data, rem, sof, eof}`, at consecutive addresses from 0. A
timestamped capture is stored with its timestamp beats, as they arrive.

Replay reads words 0 .. N-1 in order, once. N is the number of words stored
in the last load, readable in `MEMWORDS`. The reader keeps no more than
`RD_DEPTH` (32) reads in flight or buffered, so back-pressure from the
limiter never overflows the read buffer. Memory writes take priority over
reads. With the default `ADDR_W = 27` the address space is 2 GB; because
only half of each word is used, that holds 1 GB of frame data, about 0.8 s
of traffic at 10 Gbit/s. Loading stops by itself when the memory is full.

The DDR2 controller port is a generic command interface:

* `cmd_valid`/`cmd_ready` handshake with `cmd_we`, `cmd_addr` (word address)
  and `cmd_wdata`.
* Read data comes back in order on `rd_valid`/`rd_data`, with any latency.
  There is no back-pressure on read data.

Connecting a real controller takes a thin adapter.

## Control: main FSM and registers

`main_control_fsm` has the states NIC (idle), GEN, LOAD, REPLAY and FINISH.
Writing `CONTROL` with bit 0 set (start) in NIC enters the mode in
`CONTROL[6:4]`. The start pulse also resets the memory write or read pointer
in the same clock. The runs end as follows:

* GEN ends after `PKTCNT` packets (0 = run until stopped), or on stop
  (`CONTROL[1]`).
* LOAD ends on stop or when the memory is full.
* REPLAY ends when the last stored word has been read.

FINISH then waits until the completer and the limiter are empty, and the
core returns to NIC routing. Timestamp limitation is used only in REPLAY with
`CONTROL[9]` (traffic carries timestamps). The output `ts_gen_en` then asks
the time source to run. Rate limitation (`CONTROL[10]`) applies in GEN and
REPLAY.

**Register map.** The registers are 32 bits wide at byte addresses on the
MI32-style bus: `mi_addr[11:0]`, `mi_wr`, `mi_rd` and `mi_dwr`. `mi_ardy` is
always 1, and `mi_drd` is valid when `mi_drdy` is high, one clock after
`mi_rd`.

| addr | name | contents |
|---|---|---|
| 0x000 | CONTROL  | [0] start, [1] stop (pulses, read as 0), [6:4] mode, [8] IPv6, [9] timestamps present, [10] rate limit on, [11] absolute rate, [12] random payload |
| 0x004 | STATUS   | [0] busy, [3:1] FSM state (RO) |
| 0x008 | PKTCNT   | packets to generate, 0 = endless |
| 0x00C | RATE     | rate (reset 65536 = full line rate, relative) |
| 0x010 | PATTERN  | payload pattern |
| 0x014/0x018 | DMAC_LO/HI | destination MAC [31:0] / [47:32] |
| 0x01C/0x020 | SMAC_LO/HI | source MAC [31:0] / [47:32] |
| 0x024 | SENT     | frames accepted by the network port (RO) |
| 0x028 | MEMWORDS | words stored in DDR2 (RO) |
| 0x02C | FMODES   | field f mode at [2f+1:2f]: 0 CONST, 1 SEQ, 2 RANDOM |
| 0x100 + 0x40*f | FIELD f | +0x00..0x0C `from`, +0x10..0x1C `to`, +0x20..0x2C `inc`; four words each, least significant word first |

Field numbers:

| f | field |
|---|---|
| 0 | payload length |
| 1 | TOS/traffic class |
| 2 | identification |
| 3 | flags/fragment |
| 4 | flow label |
| 5 | TTL/hop limit |
| 6 | protocol/next header |
| 7 | source address |
| 8 | destination address |

Values wider than a field are cut to the field's width.

## Top-level ports

`precise_packet_generator` has these ports, each an unpacked array
`[NUM_IFC]` (one element per port). The platform blocks they connect to are
not part of this RTL.

* `mi_*`: register bus from the PCI Express interconnect.
* `dma_tx_*` and `dma_rx_*`: host DMA channels.
* `net_rx_*` and `net_tx_*`: Ethernet MAC.
* `mem_cmd_*` and `mem_rd_*`: DDR2 controller.

`ts_now` (64-bit time) is an input shared by all cores. `ts_gen_en` is the OR
of the cores' requests.

## What is this design's own choice

The block structure, the modes, the routing paths, the field settings
(`from`/`to`/`inc`, constant or generated), the multiply-and-shift range
scaling, the multiple-LFSR random source, the rate limiter's inputs (set rate
and last packet length, rate absolute or relative) and the timestamp FIFO
with a comparator all follow the published description of this generator.
Everything below was chosen here:

* the stream signal set and byte order, and the timestamp carried as a
  leading beat;
* the LFSR lengths and taps, the seeds, and the single-LFSR form that
  `RNG_MULTI = 0` selects;
* the list of generated fields, and header details such as IHL = 5, no IP
  options and no TCP/UDP header;
* the clamping of the payload length;
* the credit algorithm and both rate encodings;
* the register map and the bus timing;
* the FSM states and end conditions;
* the DDR2 port and the one-beat-per-word format;
* the FIFO depths;
* a timestamp releases a packet when the time reaches it, not only on
  exact equality;
* timestamp and rate limitation may both be on in replay.

## Limits

* One beat per 128-bit memory word halves the usable memory. Packing two
  beats per word would double it.
* Each core has its own DDR2 port. Sharing one memory between the ports
  needs an arbiter or a fixed split of the address space outside the cores.
* A stop during a LOAD can leave a partial frame at the end of the stored
  data.
* Replay plays the memory once. There is no loop mode.
* The rate limiter counts frame bytes only, as described above.
* There is no FPGA mapping or timing closure here. The 156.25 MHz target was
  not checked by synthesis timing.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog.
`tb/ddr2_model.sv` is a behavioural DDR2 controller with a sparse memory, a
fixed read latency and optional random command stalls. Shared check macros
are in `tb/tb_check.svh`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pg_pkg.sv tb/tb_precise_packet_generator.sv \
    --top-module tb_precise_packet_generator
./obj_dir/Vtb_precise_packet_generator
```

Replace the testbench name to run another block's test.

`tb_precise_packet_generator` runs the top at its default parameters (two
ports). It runs these cases and checks every frame:

* NIC pass-through;
* IPv4 generation with sequence and random fields;
* rate-limited generation at a set Mbit/s value, checking the sent bytes
  against the elapsed clocks;
* IPv6 generation on the second port at the same time;
* loading timestamped traffic from the host;
* timestamp-exact replay.

The test counts each mechanism (NIC path, generation, rate hold, timestamp
hold, replay, memory stall) and fails if one never occurs. `tb_pg_core`
covers the same for one core and adds loading from the network port.

Two more testbenches run the throughput cases the design is built for:

* `tb_workload_4x1g` builds the top with `NUM_IFC = 4`. All four ports
  generate IPv4 traffic at the same time, each limited to 1000 Mbit/s. The
  test checks the measured rate of every port to within 0.5 %; it comes out
  at 1000.01 to 1000.02 Mbit/s.
* `tb_workload_replay_2x10g` loads 120 random-length frames into each port's
  memory, then replays both ports at once with no limitation. The test checks
  that every frame comes back intact and that each link is busy in at least
  99 % of the clocks. It measures 100 %, given a memory that takes one
  command per clock.
