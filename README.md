# Slotted optical switch control for one data-centre cluster

This RTL describes the control side of one optical data-centre cluster. A
cluster has N top-of-rack (ToR) switches joined by an N x N
semiconductor-optical-amplifier (SOA) switch. An optical switch cannot
buffer, so three things must hold at once:

- packets that compete for an output are resolved before they reach the switch;
- every receiver keeps seeing a signal, so its clock recovery never loses lock;
- the switch is reconfigured within the short gap between two packets.

The design gives each ToR one bidirectional **label channel** to a central
switch controller, next to its **data channel**. That one continuous link does
four jobs:

1. carries the ToR's label request (destination and priority);
2. returns the controller's answer (ACK or NACK);
3. synchronises the ToR's time to the controller;
4. in hardware, delivers the controller's clock, recovered by each ToR from the
   never-idle label stream.

Because every ToR runs at the same frequency and on the same time base, all
packets of a slot reach the switch together. The switch can then be
re-pointed in a 14-cycle gap (43.4 ns).

The default build is the four-rack cluster: 4 ToRs, a 4 x 4 switch, and 3
buffer blocks per ToR. It moves one 32-bit word per 3.1 ns cycle, which is a
10 Gb/s lane.

## The parts

```
 servers ──► ethernet_switch ──► buffer_ram (N-1 blocks) ──► data_pkt_tx ──► data fibre ─┐
    ▲              ▲                 │ select / release / resend                          │
    │              │           label_processor ─┐                                        ▼
    └── rx_block ◄─ data_pkt_rx ◄── rx_aligner ◄─┼──────────────────────────────── soa_switch
                                                 │                                        ▲ gates
 time_latency_mgmt ──────────────► label_codec ◄─┴─► label fibre ◄──► switch_controller ──┘
                                                                     (label_codec per port,
                                                                      central_controller,
                                                                      gate_manager)
```

The blocks are grouped into three units:

- `tor_switch`: one ToR switch.
- `switch_controller`: the controller FPGA.
- `ossc_cluster`: the top. It holds N ToRs, the controller, the optical switch
  and, for each ToR, four `fiber_link` delays (label up/down, data up/down).

`soa_switch` and `fiber_link` are behavioural models of optical parts. All
shared types and constants are in `ossc_pkg`.

## One time slot

Everything is counted in cycles of the controller clock:

- A slot is **664 cycles**: a 650-word packet (2600 bytes) and a 14-word gap.
- `slot_phase` is the position within the slot, as seen at the controller and
  at the switch.

A ToR does not use the controller's phase directly. It launches every word at
its own `tx_phase`, which is the controller phase minus the measured fibre
delay D. A word it sends at `tx_phase = p` therefore arrives at the switch or
controller at `slot_phase = p`.

| controller `slot_phase` | event |
|---|---|
| 0 … 649 | packet words 0 … 649 cross the switch |
| 650 | label requests of all ToRs arrive |
| 651 | requests decoded (`label_codec`) |
| 652 | arbitration of the whole request matrix (`central_controller`) |
| 653 | responses in the codec output register |
| 654 | responses on the fibre: **4 cycles = 12.4 ns** after the request |
| 657 | end of this cycle: SOA gates switch to the new configuration (`gate_manager`) |
| 658 … 663 | 6 quiet cycles of "1010…" before the next packet |

At the ToR, the slot decision is taken at `tx_phase` 648:

1. The outcome of the previous request is known: ACK or NACK, with a missing
   response counted as NACK.
2. The buffer controller releases the frames on ACK, or keeps them on NACK.
3. It picks the block for the next slot: after a NACK the same block again,
   otherwise the most occupied block.
4. The label request goes out at phase 650 and the packet follows at phase 0.

The 14-cycle gap is the only time budget: response at 4 cycles and gate
change at 7 cycles. The SOA driver delay and rise time are physical and are
not modelled.

## Time synchronisation (`time_latency_mgmt`)

After reset each ToR goes through the following steps:

1. **Send a time stamp.** The ToR sends a time stamp holding its free-running
   time T_TX.
2. **Echo.** The controller returns the time stamp one cycle after decoding
   it.
3. **Work out the fibre delay.** The round trip is `RTT = T_RX - T_TX`. The
   fixed processing is 5 cycles: two codec stages at each end and one
   controller cycle. Both directions of the fibre are assumed equal, so
   `D = (RTT - 5) / 2`.
4. **Receive the controller's time.** The controller sends its time in the
   next free cycle, stamped with the value it has while the message sits in
   the controller's output register. The message is 2 + D cycles old when the
   ToR decodes it, and the ToR loads it one cycle later:

   ```
   local_time = received + D + 3
   tx_phase   = (local_time + D) mod 664
   ```

Time is a 28-bit count that wraps at 664 x 2^18, so the slot phase is simply
time mod 664.

An echo that would collide with the controller's response cycle is not sent.
The ToR then retries after `RETRY` = 2048 cycles.

The label and data fibres of one ToR are assumed to be the same length. That
is what lets a delay measured on the label channel also align the data packets.

## Arbitration and optical flow control (`central_controller`)

Each request carries a destination rack and a priority. A lower number wins;
the testbenches use 1 > 2 > 3 > 4 for ToR 0..3. Every slot, a single-cycle
combinational arbiter works over the whole N x N request matrix:

1. Every requested output goes to its best requester. A tie goes to the lower
   port.
2. The inputs that got nothing are handed out in port order over the outputs
   nobody won. Losers come first, then inputs that sent no request.

The result is always a full permutation, so every receiver gets a signal in
every slot. A loser's packet lands at a rack it was not meant for, which drops
it after reading the address.

Each requester gets back the output number it was given:

- **ACK**: the response equals the request.
- **NACK**: any other value.

On ACK the ToR frees the frames. On NACK it sends the same frames again in the
next slot, until they are acknowledged. A packet is never lost in the optical
part.

`gate_manager` holds the permutation as a gate matrix: `gate[i][j]` connects
ToR i to ToR j. It loads the matrix at phase 657. `soa_switch` ORs the inputs
whose gate to an output is on. This is broadcast-and-select, so a real
multicast would work, although the arbiter never asks for one.

## Label words (`label_codec`)

The label channel carries one 32-bit word per cycle. Bits [31:28] hold the
message type:

| type | name | payload [27:0] |
|---|---|---|
| 1 | request | [15:8] destination rack, [7:0] priority |
| 2 | response | [7:0] output given |
| 3 | time stamp | ToR time |
| 4 | time stamp echo | same time |
| 5 | time | controller time |
| — | idle | the whole word is `0xAAAAAAAA` |

The idle word keeps the channel toggling. This encoding is a choice of this
design.

## Data packet (`data_pkt_tx`, `data_pkt_rx`)

A packet is 650 words, launched at tx_phase 0:

| word | content |
|---|---|
| 0 | preamble `AA AA AA` + start delimiter `AB` |
| 1 | `{source rack[15:0], destination rack[15:0]}` |
| 2 … | per frame: a header word `{16'h0, length in bytes}`, then the frame, big-endian, last word zero-padded |
| … 648 | `0xAAAAAAAA` fill |
| 649 | CRC-32 over words 1 … 648 |

The CRC uses polynomial 0x04C11DB7, MSB first, initial value all ones, and the
result is inverted. The gap also carries `0xAAAAAAAA`.

Frames are taken in arrival order and are never split. Packing stops at the
first frame that does not fit.

The transmitter is a two-stage pipeline. Stage A plans word w at phase w-2 and
issues the buffer read. Stage B forms the word and updates the CRC. The word is
on the fibre at phase w.

The clocks are shared, so a receiver never has to recover a frequency. Its
phase, however, changes packet by packet: each source reaches it over a
different path. In the top, the data uplink of ToR i is (i·`BIT_STEP` mod 32)
bit times longer than a whole number of words, so packets arrive cut across
the receiver's word boundary at 0, 7, 14 or 21 bits.

`rx_aligner` finds the phase of each packet. It checks all 32 bit offsets in
one cycle for the word holding the three preamble bytes and the delimiter,
0xAAAAAAAB. It then re-cuts the packet's 650 words at that offset; between
packets it outputs the idle word. A seam where the switch changes source
between two idle streams of different phase can look the same. For that
reason a match only counts if the next word at that offset is not an idle
pattern; the address word never is. The aligned word leaves 3 cycles after
the received word in which it begins.

`data_pkt_rx` sees the preamble and delimiter in one word (one 3.1 ns cycle)
and raises `pkt_start` one cycle later. It then reads the address:

- packets for other racks (contention losers) are dropped;
- for its own packets, it writes the frames into `rx_block`.

`rx_block` keeps them invisible until the CRC word. A good CRC commits the
frames; a bad CRC rolls them back. If the RX block cannot take a whole packet,
the packet is dropped and counted.

## ToR datapath

**`ethernet_switch`** reads the destination rack from byte 4 of the
destination MAC address, which is the first byte of the frame's second word.
Byte 5 is the server number. It then routes the frame:

- own rack: back to the servers;
- other racks: to buffer block `b`, where `b = rack` if `rack < ID`, else
  `rack - 1`;
- rack number ≥ N: dropped and counted.

Frames coming out of the RX block are merged onto the server output. The merge
is by whole frames, so frames never interleave.

**`buffer_ram`** holds N-1 blocks of `BLOCK_WORDS` words, plus one descriptor
(frame length) queue per block. It keeps a byte occupancy for each block.

A frame is dropped at its first word in either case:

- its block has fewer free words than a maximum-size frame (380 words);
- its descriptor queue is full.

Dropping at the first word means no frame is ever stored partly.

Frames stay in the RAM after they are sent. `data_pkt_tx` reads a copy, so a
NACKed packet can be rebuilt from the same place. At the decision point, an ACK
advances the block's head past the frames the last packet carried.

**`label_processor`** sends the request for the chosen block at the decision
point and matches the response against it.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | racks per cluster (switch size) |
| `PKT_W` | 650 | packet words (2600 bytes) |
| `SLOT_W` | 664 | slot cycles (packet + 14-cycle gap) |
| `BLOCK_WORDS` | 2048 | words per buffer block (power of two) |
| `RXB_DEPTH` | 2048 | RX block beats (power of two) |
| `GATE_PHASE` | 657 | slot phase at whose end the gates switch |
| `BASE_DELAY`, `DELAY_STEP` | 5, 3 | fibre of ToR i = BASE_DELAY + i·DELAY_STEP cycles (top only) |
| `BIT_STEP` | 7 | extra bit delay per ToR on the data uplinks (top only) |
| `RETRY` | 2048 | time-stamp retry interval |

The synthesised top at the defaults has about 10k flip-flops and 1.1 Mbit of
RAM, most of it buffer blocks.

## Relation to the original system

The following follow the original system description:

- the cluster structure and the per-block functions;
- most-occupied block selection;
- ACK/NACK with retransmission until ACK;
- priority arbitration, with losers sent to racks that made no request;
- the idle "1010" fill;
- the time-stamp delay measurement and time distribution;
- the packet fields and sizes (2600 bytes; 3-byte preamble, 1-byte delimiter,
  4-byte address, 4-byte CRC);
- the 43.4 ns gap and 12.4 ns label processing;
- the four-rack, three-block setup.

The following are this design's own choices:

- the 32-bit word and 3.1 ns cycle, derived from "preamble and delimiter in
  one cycle";
- the label word encoding;
- the per-frame length header inside a packet;
- the CRC variant;
- MAC-to-rack mapping;
- the arbiter's tie-break and the order in which losers are spread;
- the buffer sizes and drop policy;
- the exact cycle at which each step happens;
- equal label and data fibre lengths in whole words;
- the seam check and 3-cycle latency of the phase aligner.

Not built:

- the transceivers and clock-data recovery (a single `clk` stands for the
  recovered clock; only the per-packet bit phase is modelled, by
  `rx_aligner`);
- the controller's oscillator;
- the SDN agents;
- the multi-cluster network with inter-cluster switches;
- physical optical effects (SOA rise time, power, noise).

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The main ones:

- `tb_ossc_cluster` runs the whole cluster at the default parameters. It
  checks:
  - time sync: every ToR measures its fibre delay exactly and reaches the
    controller's time;
  - delivery: about 600 random 64–1518-byte frames are delivered whole, in
    order and once, or counted as dropped. This covers uniform traffic, a
    hotspot to rack 0 and a drain;
  - counters: every request is answered and every ACK releases a packet. NACKs
    agree between the ToRs and the controller, and there are no CRC errors.

  It also counts that contention, NACK, retransmission, filler forwarding,
  gate reconfiguration, intra-rack forwarding, buffer overflow, unknown rack
  and empty slots each happened.
- `tb_tor_switch` runs one ToR against a real controller and switch, with the
  testbench playing the other rack. It checks packet alignment at phase 0 and
  the CRC, and that NACKed frames are resent.
- `tb_central_controller` replays a three-slot contention sequence. Counting
  ToRs from 1, the losers end up as ToR 2 to output 2, ToR 4 to output 4 and
  ToR 4 to output 1, all NACKed. It also checks random slots against a
  reference arbiter.
- `tb_ossc_workloads` runs the operating cases on the default cluster. In the
  first, two racks contend for the same destination: the winner gets ACK and
  moves on to a new destination, while the loser gets NACK and resends in the
  next slot. In the second, 30 slots run at full load. It measures the line
  occupancy: 650 of 664 cycles, or 97.7 % once the one cycle of delimiter
  recovery is counted. It also checks, on every port, the 12.4 ns response,
  that gates change only inside the gap, and the 1-cycle packet start. It
  also checks that packets really arrive with a bit skew.
- `tb_rx_aligner` sends 400 short packets at random bit offsets, each after a
  seam of random phase. It checks every word, the offset, the fixed latency,
  that seams never start a false packet, and that all 32 offsets occur.
- `tb_switch_controller` checks the 4-cycle request-to-response latency and the
  gate timing.

To run a testbench with Verilator 5 from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl rtl/ossc_pkg.sv \
    tb/tb_ossc_cluster.sv -y rtl --top-module tb_ossc_cluster
obj_dir/Vtb_ossc_cluster
```

Replace the testbench name to run any other. The full cluster run takes a few
seconds.
