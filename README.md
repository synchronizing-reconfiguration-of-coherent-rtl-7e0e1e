# SNFR: switching coherent FPGA functions at one point of a flow

Some stream functions come in pairs that only work together: an encoder on
one network-attached FPGA and the matching decoder on another one, further
down the path of the same flow. If they are swapped for a new pair, each FPGA
has to switch at exactly the same packet of the flow. When the switch happens
at the same *time* instead, the packets in flight between the two FPGAs are
coded by the old encoder and decoded by the new decoder, and they are lost.
The network latency between the FPGAs is unknown and varies, so no schedule
fixes this.

SNFR (Synchronization of Network Function Reconfiguration) moves the
reconfiguration command into the flow itself. A special packet, the SNFR
packet, travels in the flow together with the data. It carries the register
writes that reconfigure every FPGA on the path. Each FPGA does four things
when the SNFR packet arrives:

1. It stops the traffic behind the SNFR packet.
2. It applies its own writes.
3. It lets the SNFR packet go on to the next FPGA.
4. It releases the traffic.

Every packet ahead of the SNFR packet is handled by the old functions, on every
FPGA. Every packet behind it is handled by the new ones, on every FPGA. The
latency between the FPGAs no longer matters.

This repository is the RTL for one such FPGA node. The node has three parts:

- the **SNFR protocol processor**, which sits behind the 10 Gbps Ethernet
  receive port;
- an **on-chip stream interconnect**, whose port map can be rewritten at run
  time over AXI4;
- **reconfigurable regions** that hold the functions.

Here "reconfiguration" means rewriting the interconnect port map: it decides
which regions a flow passes through and which Ethernet port it leaves by. The
protocol processor is the AXI4 master that rewrites it.

```
 Ethernet RX ──► SNFR protocol processor ──► stream interconnect ──► Ethernet TX 0..N_NET_OUT-1
                        │ AXI4 writes            ▲    │    ▲
                        └──────────────────────► port  │    │
                                                 map   ▼    │
                                              region 0 .. region N_REG-1
```

## The SNFR packet

An SNFR packet is an ordinary IPv4-over-Ethernet frame. The IPv4 protocol
field marks it as SNFR. The payload is a sequence of 64-bit words, and the
first word starts right after the 34-byte header (14 bytes Ethernet II plus 20
bytes IPv4):

| word | content                                                          |
|------|------------------------------------------------------------------|
| 0    | OFFSET: the index of the first word for the next FPGA to process |
| 1..  | pairs `{ADD[31:0], DATA[31:0]}`; `ADD = 0xFFFF_FFFF` ends a segment |

The pairs form one segment per FPGA on the path, in path order, and each
segment ends with a terminator pair. A fresh packet carries OFFSET = 1. Each
FPGA does three things with it:

- It reads the pairs from word OFFSET up to its terminator.
- It issues one AXI4 write per pair: address ADD, data DATA.
- It rewrites OFFSET to the word after its terminator.

The next FPGA therefore starts at its own segment. A segment may be empty (a
terminator only) for an FPGA that does not change.

Conventions chosen for this implementation (the protocol leaves them open):

- All fields are big-endian, like the rest of an IP packet. ADD comes first
  within a pair.
- OFFSET counts 64-bit words from the OFFSET word itself.
- The default SNFR protocol number is 253, a value reserved for experiments.
  It is parameter `SNFR_PROTO` everywhere.
- A frame counts as SNFR only if all three hold: EtherType 0x0800,
  version/IHL byte 0x45 (no IP options), and protocol `SNFR_PROTO`.
- The IP header checksum is not recomputed after OFFSET changes, because
  OFFSET is payload, not header. The IPv4 header has no checksum over the
  payload.

With the 34-byte header, word *w* occupies frame bytes 34+8w .. 41+8w. On the
64-bit stream (byte 0 of a beat is `tdata[7:0]`) every word therefore
straddles two beats: bytes 2..7 of beat 4+w and bytes 0..1 of beat 5+w.
Both the processing unit and the OFFSET patch deal with this misalignment.

## The protocol processor (`snfr_processor`)

This is the part that implements the synchronisation. It has four parts:

- the traffic FIFO;
- the FIFO controller;
- the protocol processing unit (PPU), with its packet BRAM;
- an AXI4 master.

### Traffic FIFO and packet classification

The received stream goes straight into the traffic FIFO (`sync_fifo`, 2048
beats = 16 KiB by default). While a packet is being written, the FIFO
controller (`snfr_fifo_ctrl`) does two more things:

- **Classification.** Byte 23 (the IPv4 protocol byte) arrives in beat 2. At
  that point the controller pushes one class bit for the packet (regular or
  SNFR) into a small class queue. Packets shorter than 3 beats are pushed as
  regular at their last beat.
- **Copy into the packet BRAM.** The first `BUF_WORDS` beats of every packet
  are written in parallel into the current slot of the four-slot packet BRAM
  (`snfr_pkt_buf`). At the packet's last beat:
  - if the packet was SNFR, the slot is *committed*: it is marked busy and the
    packet length is stored;
  - otherwise the slot is simply reused by the next packet.

  If all four slots hold SNFR packets that have not been sent yet, the
  controller holds `s_tready` low at the next packet start until a slot
  frees up.

Because of the copy, the SNFR packet never has to be fetched out of the FIFO
to be parsed. That is what keeps the cost of an SNFR packet low (see
*Throughput*).

### Hold, process, release

The read side of the controller looks only at the packet at the head of the
FIFO:

- **Regular packet:** it is forwarded to the interconnect unchanged, one beat
  per cycle.
- **SNFR packet:** forwarding stops. This is the *hold*: the FIFO keeps
  accepting traffic, but nothing leaves. `holding` is high from here until
  the SNFR packet has left. The controller raises `ppu_go`, which lets the
  AXI4 master issue the writes the PPU has queued for this packet.
- When the PPU reports `done` (all writes answered), the controller sends the
  SNFR packet out of the FIFO. On the way out it overwrites bytes 34..41 with
  the new OFFSET from the PPU (unless the PPU flagged the packet as
  malformed). It then frees the slot and returns to normal forwarding. This is
  the *release*.

The PPU does not wait for the hold to start parsing. As soon as an SNFR
packet is complete in its slot and the PPU is free, the controller pulses
`ppu_start` with the slot number and the stored length. This can happen while
the traffic ahead of the SNFR packet, or the previous SNFR packet, is still
leaving. The PPU reads OFFSET, walks its segment and queues the writes in the
AXI4 master. The master holds them behind a gate until `ppu_go`. Under load,
the only time the traffic is actually held is therefore the time the
writes take to be issued and answered.

This ordering gives the two guarantees SNFR needs:

- every packet that arrived before the SNFR packet has left the processor
  before the first reconfiguration write is issued;
- no packet that arrived after it leaves before the last write response has
  come back.

The switch therefore happens exactly at the SNFR packet's place in the flow.
The interconnect has no buffering of its own, and it samples the port map only
at packet starts, so a packet already inside it is never split by a change.

### Protocol processing unit (`snfr_ppu`)

The PPU walks the segment for this node:

1. **Read OFFSET.** It reads beats 4 and 5 of the slot and assembles word 0.
2. **Check OFFSET and jump.** OFFSET must be non-zero, and word OFFSET must
   lie inside the stored packet. If so, the read address jumps to beat
   4 + OFFSET.
3. **Stream the pairs.** Beats are read one per cycle from the BRAM, which has
   a registered read. The previous beat is kept in a register, so each cycle
   yields one complete word: bytes 2..7 of the previous beat followed by
   bytes 0..1 of the current one. Each pair with ADD ≠ 0xFFFF_FFFF is offered
   to the AXI4 master on a valid/ready handshake. When the master cannot take
   it, the unit stalls and holds the BRAM output.
4. **Terminator.** The new OFFSET is the terminator's index + 1. The unit
   waits for two conditions: `go`, meaning the packet is at the FIFO head and
   the traffic is held, and an idle AXI4 master, meaning its queue is empty
   and every write has its B response.
5. **Release.** It pulses `done` together with `new_offset` and `offset_ok`.

A malformed packet (OFFSET 0, OFFSET past the end, or a segment that runs off
the end without a terminator) stops extraction. The unit still waits for any
writes already issued. It then reports `offset_ok = 0` and counts an error, so
the packet is forwarded unchanged and the traffic is never held forever.

Timing, measured in simulation:

- about 5 cycles from start to the first pair;
- then one pair per cycle;
- then the wait for `go` and the AXI round trip of the last write, plus
  2 cycles.

For example, 10 pairs against a slave with no wait states, with `go` already
high, take 21 cycles from `start` to `done`.

### AXI4 master (`snfr_axi_master`)

The master takes requests through a 512-entry queue (one block RAM) and turns
each one into a single-beat AXI4 write:

- `AWLEN` = 0, `AWSIZE` = 4 bytes, `INCR`, `WSTRB` = 0xF;
- AW and W are issued in the same cycle;
- nothing is issued while the `gate` input is low;
- up to 8 writes are outstanding.

The processor drives `gate` with `ppu_go`. It counts OKAY and error responses
separately. An error response is counted
but does not block the release. `idle` is the condition the PPU waits for.
Assertions check that AW and W stay stable while stalled and that no B
response arrives without a write outstanding.

## On-chip interconnect and port map (`stream_interconnect`)

This is an `N_IN` × `N_OUT` packet switch for AXI4-Stream.

- **Port map.** Input *i* has one entry, written through an AXI4 slave at
  address `4*i`. Bits [7:0] of the data hold the output number. Any value
  ≥ `N_OUT` discards that input's packets, which is how a region is taken out
  of use.
- **Packet boundaries.** An input samples its entry at the first beat of a
  packet and keeps the route to the last beat.
- **Arbitration.** Each output serves one input for a whole packet,
  round-robin among the inputs asking for it.
- **Timing.** The data path is combinational: no added latency and one beat
  per cycle per output.
- **Slave rules.** The slave is write-only and accepts single-beat bursts in
  any AW/W order. It answers SLVERR for addresses past the table.

One port-map update is one 8-byte pair in the SNFR packet (4 bytes address,
4 bytes data).

Numbering inside a node (`snfr_fpga_node`):

| interconnect input | source                    | interconnect output   | sink                  |
|--------------------|---------------------------|-----------------------|-----------------------|
| 0                  | protocol processor        | 0 .. N_NET_OUT-1      | Ethernet transmit ports |
| 1 + r              | output of region r        | N_NET_OUT + r         | input of region r     |

The reset map (`RESET_MAP = {0, 0, 2}`) sends the flow through region 0 to
transmit port 0. It also points region 1's output at port 0, but nothing
feeds region 1 until the map changes.

## Reconfigurable regions (`rr_region`)

A region is a slot for a stream function. The functions actually deployed are
outside the scope of the SNFR mechanism, so this design uses a stand-in that
makes coherence visible: each region XORs the payload (bytes 34 onward) of
every regular packet with a 64-bit key (`REGION_KEYS`).

- Two regions with the same key on two FPGAs form a matching encoder/decoder
  pair.
- A mismatched pair garbles the data.
- SNFR packets pass unchanged, so the next FPGA can still read them.

Each region counts the packets it has received (`region_pkt_count`). The
output goes through a two-entry FIFO, so `s_tready` comes from a register.
The latency is 2 cycles.

## Top level (`snfr_fpga_node`)

The top level is one FPGA node: protocol processor, interconnect, `N_REG`
regions (default 2) and `N_NET_OUT` transmit ports (default 2). The Ethernet
MAC/PHY is outside. The node's ports are:

- the MAC's receive stream;
- the transmit streams;
- status: the region counters, the current port map, the PPU state, the hold
  flag, packet, pair and error counters, and the FIFO level.

All streams are 64-bit AXI4-Stream (`axis_beat_t` = `{tdata[64], tkeep[8],
tlast}` in `snfr_pkg`). At 156.25 MHz that is 10 Gbps.

### Demonstration set-up

`tb_snfr_fpga_node` builds the two-FPGA set-up that SNFR was demonstrated
with. Both nodes use default parameters, and node 1's transmit port 0 feeds
node 2's receive port. The flow alternates between two states:

- **State 0:** node 1 region 0, then node 2 region 0, then node 2 port 0.
- **State 1:** node 1 region 1, then node 2 region 1, then node 2 port 1.

Each SNFR packet carries one write for node 1 and two writes for node 2. The
test checks three things, with random back-pressure on the outputs:

- every data frame arrives intact, which means encoder and decoder always
  matched;
- every frame arrives on the port of the state in force at its place in the
  flow, in order;
- OFFSET has advanced past both segments.

The original demonstration sent one SNFR packet every 5 seconds into
9 Gbps of traffic. The testbench switches every 12 frames, so that it
simulates in seconds. The four functions of the original set-up map to the
regions as follows:

- f1 and f2 are node 1's regions 0 and 1.
- The function paired with f1 (f4) is node 2's region 0.
- The function paired with f2 (f3) is node 2's region 1.

It also counts how often each mechanism happened (hold on each node, switches
each way, back-pressure) and fails if any count is zero.

## Throughput

Regular traffic costs one cycle per beat. The cost of an SNFR packet of L
beats with n writes for this node depends on the load:

- **Under load**, the packet is already buffered when it reaches the FIFO
  head, and the PPU has parsed it meanwhile. It costs L cycles to send plus
  about n + 5 cycles of hold: the n writes, the last response and the state
  changes. The drain test measures exactly this case: two buffered SNFR
  packets of 10 pairs each cost 30 cycles on top of their beats.
- **On a nearly idle link**, the processor also waits for the SNFR packet to
  arrive completely before the hold can end, which adds up to L cycles.

At 156.25 MHz there are 156.25 M beat-cycles per second. For a mix of
8.1 Gbps regular and 0.9 Gbps SNFR traffic, all in 791-byte frames (the
average of a uniform 64..1518-byte mix), the worst case is every pair for one
node (94 writes per SNFR packet). That needs 126.7 M + 28.3 M = 155 M
cycles/s, which fits with 1 % to spare.

`tb_snfr_rate` runs this mix at default sizes: 400 random frames offered at
9/10 of the line rate, one in ten an SNFR packet filled with writes for this
node. The input is never blocked, the FIFO peaks at 950 of its 2048 beats, and
the longest first-beat latency of a regular frame is about 1000 cycles
(6.6 µs).

The mix that does not fit is 0.9 Gbps of *64-byte* SNFR packets arriving back
to back. There the parsing (about 7 cycles each) can no longer overlap with
other traffic, and the mix needs about 164 M cycles/s. A wider data path or a
faster clock would be needed for it.

Typical use is one SNFR packet per reconfiguration, which costs nothing
measurable. The 1.5 M port-map updates per second that a 100 Mbps SNFR flow
can carry use about 3 % of the cycles.

**Slot limit.** The packet BRAM has four slots (`N_SLOTS`). A fifth SNFR
packet waiting in the FIFO can start only after the first has left. Until
then, the input is stopped at the next packet start, whatever that packet is.
With only two slots, the 9 Gbps mix above was not carried.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `SNFR_PROTO` | 253 | all | IPv4 protocol number of SNFR packets |
| `FIFO_DEPTH` | 2048 | processor, node | traffic FIFO depth in 64-bit beats |
| `BUF_WORDS` | 256 | processor, node | beats per packet-BRAM slot |
| `N_SLOTS` | 4 | processor | packet-BRAM slots (power of 2) |
| `REQ_DEPTH` | 512 | processor, node | AXI request queue depth |
| `MAX_OUTSTANDING` | 8 | processor | AXI writes in flight |
| `N_REG`, `N_NET_OUT` | 2, 2 | node | regions and transmit ports |
| `REGION_KEYS` | two 64-bit keys | node | XOR key of each region |
| `RESET_MAP` | {0,0,2} | node, interconnect | port map after reset |

How long packets are handled:

- An SNFR packet longer than `BUF_WORDS` beats (2048 bytes) is processed on its
  first 2048 bytes, forwarded whole, and counted in `truncated_count`.
- Standard frames (at most 1518 bytes) always fit.
- Regular packets of any length pass.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_pkt_pkg.sv` holds
the frame builders shared by the testbenches (regular frames, SNFR frames from
a list of segments, beat conversion). To run one with plain Verilator 5:

```
verilator --binary --timing --assert --top-module tb_snfr_processor \
  -y rtl -y tb +libext+.sv rtl/snfr_pkg.sv tb/tb_pkt_pkg.sv tb/tb_snfr_processor.sv
./obj_dir/Vtb_snfr_processor
```

The testbenches are:

| testbench | what it covers |
|-----------|----------------|
| `tb_sync_fifo` | FIFO order, full/empty, level, random push/pop |
| `tb_snfr_pkt_buf` | slotted RAM, registered read, output hold |
| `tb_snfr_ppu` | segments for three nodes, empty segment, malformed packets, one pair per cycle, packet longer than a slot, late `go` |
| `tb_snfr_axi_master` | AXI4 write protocol, outstanding limit, idle, error responses, gate |
| `tb_snfr_fifo_ctrl` | classification (and look-alike frames that are not SNFR), slot contents, `ppu_go` only once earlier frames have left, hold, OFFSET patch, order |
| `tb_snfr_processor` | see below |
| `tb_stream_interconnect` | routing, per-packet route hold, two inputs sharing an output, discard, AXI slave |
| `tb_rr_region` | XOR coding, SNFR pass-through, counter |
| `tb_snfr_rate` | processor at default sizes under 9 Gbps (8.1 regular + 0.9 SNFR, random 64..1518-byte frames): load carried, every write done |
| `tb_snfr_fpga_node` | two nodes end to end at default parameters (above) |

`tb_snfr_processor` covers:

- ordering and the OFFSET update;
- that all writes land between the frame before the SNFR packet and the SNFR
  packet itself;
- line rate and first-beat latency (at most 16 cycles);
- mixed-traffic cycle bounds;
- a drain test that measures how long traffic is held once frames are
  already buffered.

## Departures and open points

- **The functions in the regions** are stand-ins (keyed XOR). Real coded
  functions would take their place behind the same stream interface.
- **Where OFFSET is rewritten.** The protocol says the processing unit updates
  OFFSET. Here the unit computes the new value and the FIFO controller writes
  it into the packet as the packet leaves the FIFO. The packet is never
  written back into a buffer.
- **When extraction starts.** In the original state machine, the unit
  starts reading the packet once the traffic is buffered. Here it starts as
  soon as the packet is complete, and only the writes wait for the hold. What
  the rest of the system sees is the same: no write before the hold, no
  release before the last response. The only difference is that the hold is
  shorter.
- **The terminator** is the 32-bit value 0xFFFF_FFFF, matching the field
  definition of ADD.
- **Latency.** The processor was measured to add 0.1 to 0.21 µs to regular
  traffic. Here an idle processor adds at most 16 cycles (0.1 µs at
  156.25 MHz) to the first beat of a regular frame. Under the full 9 Gbps mix
  with every SNFR packet packed with writes, frames queue behind held
  traffic, and the worst case in `tb_snfr_rate` was about 6.6 µs. How the
  published range was loaded is not known, so that worst case is not
  compared with it.
- **Error responses** on the AXI side are counted and do not stop the release.
  The protocol only describes the success case, and a node that held traffic
  forever would stall the whole path.
- **Not included:** the Ethernet MAC/PHY, the vendor debug core used to watch
  the processor state (`ppu_state`, `holding` and the region counters are top
  ports instead), and the external traffic generator and SNFR packet source.
  The testbenches play those roles.
