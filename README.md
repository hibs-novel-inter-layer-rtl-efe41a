# HIBS: a pipelined, arbiter-free vertical bus for stacked chips

In a 3D chip, several silicon layers are stacked and joined by vertical wires (TSVs). A
cheap way to connect the layers' on-chip networks is a vertical bus: one shared channel per
(x, y) position that all layers can reach. A classic bus has two weaknesses. Only one layer
can talk at a time, and a central arbiter needs control wires through every layer.

This design removes both. The vertical channel becomes a **bidirectional pipeline**:

- Each layer owns a small **transfer stage**, which cuts the bus into segments.
- Each segment between two neighbouring stages is two point-to-point links, one upward and
  one downward.
- A layer sends whenever its own stage has room. There is no grant and no global arbiter.
- Packets from several layers move at the same time, in both directions and on every
  segment.

A pipeline has its own weakness. A packet whose exit is blocked can stall the packets queued
behind it, even if their path is free. The transfer stage avoids this with a **non-blocking
arbiter**. Each stage learns how congested each exit of the next stage is, and sends a packet
whose path is free first.

The RTL is SystemVerilog (IEEE 1800-2017). It synthesises and simulates with Verilator 5.

## Structure

```
hibs_bus                  one vertical channel, N_LAYERS layers (default 4)
 └─ per layer l (0 = bottom):
    ├─ transfer_stage     pipeline stage of the bus at layer l
    │   ├─ ts_ctrl        header decoding, demultiplexers D1-D3, multiplexers M1-M3
    │   ├─ ts_unit (up)   buffer + packet table for flits leaving upward
    │   └─ ts_unit (down) buffer + packet table for flits leaving downward
    ├─ credit_link x2     the upward and downward link to layer l+1 (not on the top layer)
    └─ hibs_interface     clock-domain crossing between layer l's router and the bus
        ├─ bisync_fifo    router -> bus (transmit)
        └─ bisync_fifo    bus -> router (receive)
hibs_pkg                  flit type, header field helpers, SH/MH packet type
```

Each layer's router is outside this design. The bus brings out, per layer, a port for
sending packets (`r_tx_*`) and a port for receiving them (`r_rx_*`), both in that layer's
clock. A network with a 4x4 mesh per layer would instantiate 16 `hibs_bus` channels, one
per (x, y) position.

## Packets and the header

A flit is `flit_t = {head, tail, data[31:0]}`. A packet is a wormhole packet: a header flit,
any number of body flits, then a tail flit (a one-flit packet has both marks set). Header
data bits:

| bits    | field                                                   |
|---------|---------------------------------------------------------|
| [31:29] | destination layer (0 = bottom of the stack)             |
| [28:25] | destination core/memory inside that layer (16 per layer) |
| [24:0]  | free for the router                                     |

Only the layer field matters to the bus. The core field is for the destination router. A
router must never put a packet for its own layer on the bus; an assertion in `ts_ctrl`
checks this.

Each TS unit classifies every packet by its destination:

- **SH (single-hop):** the packet leaves the bus at the very next layer.
- **MH (multiple-hop):** the packet passes through the next layer.

The class is set again in every stage, so an MH packet becomes SH when it is one layer away
from its destination.

## The transfer stage

A stage has three inputs and three outputs:

| input | from                          | goes to                                                    |
|-------|-------------------------------|------------------------------------------------------------|
| D1    | the stage above (moving down) | M3 if addressed to this layer, else M2                      |
| D2    | the stage below (moving up)   | M3 if addressed to this layer, else M1                      |
| D3    | this layer's router           | M1 if the destination is above, else M2                     |

| output | feeds                                 | writers   | arbitration                      |
|--------|---------------------------------------|-----------|----------------------------------|
| M1     | up TS unit -> stage above             | D2, D3    | per flit, round robin            |
| M2     | down TS unit -> stage below           | D1, D3    | per flit, round robin            |
| M3     | receive FIFO -> this layer's router   | D1, D2    | per packet, locked head to tail  |

`ts_ctrl` decides each route on the header flit and keeps it until the tail passes.

- **M3** writes a plain FIFO, so two packets must never mix in it. When both pipelines offer
  a header to a free M3 in the same cycle, round robin picks one. The winner keeps M3 until
  its tail is written, and `m3_conflict_o` marks the clash.
- **M1 and M2** write TS units, which can keep interleaved packets apart (see below). So they
  switch between their two writers every cycle in which both request. This lets a layer
  inject while packets pass through, without waiting for a whole packet.

The demultiplexers and multiplexers are combinational. A flit is written into a TS unit in
the cycle it arrives and can leave it on the next cycle. Each stage therefore adds one bus
cycle, and each link carries one flit per cycle.

## The TS unit: linked-list buffer and non-blocking arbiter

This is the heart of the design and the part that needs the most care when changing it
(`rtl/ts_unit.sv`).

### Storage

The TS unit holds two structures:

- **A flit buffer** of `DEPTH` slots (default 5). Each slot stores a flit and a pointer to
  the next flit of the same packet. The packets form linked lists through the buffer, so any
  mix of packets can share the slots with no fixed partitions.
- **A packet table** with one row per buffered packet (`ROWS`, default = `DEPTH`). Each row
  holds:
  - `v`: the row is valid;
  - `T`: the packet type, SH or MH;
  - `A`: the age, 3 bits, saturating;
  - `P`: a pointer to the packet's oldest buffered flit.

  For bookkeeping, a row also keeps a pointer to the newest flit, a count of buffered flits,
  and an "open" bit that stays set until the tail has been written.

When a header is written, it takes a free row and a free slot; the type comes from the
header's layer field, and the age starts at 0. A body or tail flit takes a free slot and is
linked behind its packet's newest flit. Reading a flit frees its slot and advances `P`. The
tail frees the row. Free slots and rows are found by a lowest-index priority search.

### Two writers

A TS unit has two writers: forwarded traffic and local injection. Their flits may
interleave cycle by cycle. The input `in_src` says which writer sends the current flit. The
unit keeps one open row per writer and links each flit to that writer's open packet. Each
writer sends its own packets in order and whole.

Interleaving adds a deadlock risk, which one rule removes. Suppose packet X owns the output
but its tail has not arrived yet. Without the rule, the other writer could fill every slot
with packet Y. X could then neither advance nor finish, and Y could not leave before X.
So while the output owner still waits for flits, the last free slot is kept for it. For the
same reason, `ts_ctrl` moves its M1/M2 round-robin pointer whenever both writers request,
even if the TS unit refused the flit. A refused writer therefore never holds the grant.

### Arbitration

The output is wormhole: once a header leaves, its packet owns the output until its tail
leaves. Between packets, the arbiter chooses among all rows whose oldest flit is in the
buffer:

1. A packet's path in the next stage is free if its status wire is low. SH packets use
   `sh_status_i`, because they will leave through that layer's interface. MH packets use
   `mh_status_i`, because they will enter that stage's TS unit.
2. Only packets with a free path compete. If no packet has a free path, all compete, so a
   congested path slows the stage but never stops it.
3. The oldest competitor (highest `A`) wins. A tie goes to the lowest row.
4. When the winner's header leaves, every other valid row of the **same type** ages by one,
   saturating at 7. So a packet that keeps losing will eventually win.

`bypass_o` pulses when a header leaves that the arbiter would not have chosen without the
status wires. That is the moment the non-blocking scheme reordered two packets.

### Congestion flag

`congested_o` is the TS unit's MH_Status. It is high when occupancy is at least
`THRESH_PCT` % (default 80) of `DEPTH`: 4 of 5 flits.

## Segment links and credits

Each direction of each segment is a `credit_link`. Only three kinds of wire cross between two
layers: the flit with its valid bit going forward, one credit wire going back, and the
status wires. No `ready` signal has to travel to the other die and back within a cycle.

- **Sender side.** A counter starts at `CREDITS` (default 2). The sending TS unit sees
  `ready` while the counter is above zero. Each flit sent spends one credit.
- **Receiver side.** A `CREDITS`-deep FIFO feeds the receiving stage's D1 or D2 input. When
  the FIFO is empty and the stage accepts, the flit passes straight through, so an idle link
  adds no cycle.
- **Credit return.** Every flit the receiving stage takes out returns one credit. The credit
  pulse is registered and reaches the counter one cycle later.

At every edge, credits held + flits buffered + credit in flight = `CREDITS`; an assertion
checks this. The buffer therefore cannot overflow. The credit round trip is two cycles, so
two credits are the minimum for one flit per cycle. With one credit the link runs at half
rate.

The receive FIFO is first-in first-out. A flit at its head waiting for a busy M3 holds the
flits behind it for at most `CREDITS` flits. The status wires keep this rare, because the
sender avoids sending towards a congested exit.

## Status wires between stages

Every stage sends both neighbours these wires:

- **SH_Status:** this layer's receive FIFO is congested (≥ 80 %, i.e. 7 of 8 words, seen from
  the bus side).
- **MH_Status towards the stage above:** this stage's *down* TS unit is congested. Packets
  coming from above continue into it.
- **MH_Status towards the stage below:** this stage's *up* TS unit is congested.

Each TS unit reads the status wires of the stage it sends to. At the ends of the stack, the
missing neighbour's status is tied to "not congested".

## Clock domains and the interface

Each layer runs on its own clock, `clk_layer[l]`, with its own reset. The transfer stages
share one bus clock, `clk_bus`. `hibs_interface` crosses between the two domains with two
dual-clock FIFOs (`bisync_fifo`). These use the usual design: Gray-coded pointers, a
two-flop synchroniser in each direction, and first-word fall-through. The defaults are depth
8 and 34-bit words. Full and empty are conservative for two cycles of the observing clock,
never wrong. Each crossing adds roughly two to three cycles of the receiving clock.

All resets are synchronous and active-low, one per clock domain. Reset them together.

## Flow control and timing

Between stages, flow control uses credits (above). Everywhere else (router ports, inside a
stage, at both ends of a `credit_link`) a same-cycle `valid`/`ready` handshake is used: a
flit moves on a clock edge when both are high.

| path                                              | latency without contention |
|---------------------------------------------------|----------------------------|
| interface FIFO of the source -> interface FIFO of the destination, d layers apart | d bus cycles |
| each clock-domain crossing                        | about 2-3 receiving-clock cycles |
| throughput of every link                          | 1 flit per bus cycle (with 2 or more credits) |

## Parameters (`hibs_bus`)

| parameter    | default | meaning                                              |
|--------------|---------|------------------------------------------------------|
| `N_LAYERS`   | 4       | layers in the stack (up to 8 with the 3-bit layer field) |
| `TS_DEPTH`   | 5       | flit slots per TS unit                               |
| `IF_DEPTH`   | 8       | words per interface FIFO (power of two)              |
| `AGE_W`      | 3       | width of the age field                               |
| `THRESH_PCT` | 80      | congestion threshold, percent of capacity            |
| `LINK_CREDITS` | 2     | credits and receive-buffer words per segment link    |

The flit and header widths are in `hibs_pkg` (`FLIT_W`, `LAYER_W`, `CORE_W`).

## Departures from the original scheme and choices made here

- **Credit details.** The original scheme uses credit-based flow control on the segments
  but gives no credit count, buffer or return path. The counter, the 2-word receive buffer
  with pass-through, and the registered one-wire credit return are this design's choices.
- **Interleaved writes into a TS unit.** Forwarded and injected packets share a TS unit flit
  by flit. The reserved slot and the always-moving round-robin pointer are this design's own
  rules to keep that deadlock-free.
- **Single bus clock.** The stages share one clock, and only the router side of each
  interface is asynchronous. The original scheme allows either synchronous or asynchronous
  links between stages.
- **Sizes not given originally:** interface FIFO depth 8, age width 3, one table row per
  buffer slot, 3-bit layer and 4-bit core fields, and the header bit positions.
- **Arbiter details not given originally:** ties go to the lowest row; if every path is
  congested, all packets compete; "same type ages" counts only valid rows; the status flag
  is 1 bit.
- **Status assignment:** which TS unit's flag is sent as MH_Status to which neighbour is this
  design's reading.
- **Layer numbering:** 0 is the bottom layer. A description that counts layers 1 to 4 maps
  onto addresses 0 to 3.

## Verification

Each block has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench            | what it checks |
|----------------------|----------------|
| `tb_bisync_fifo`     | Order and integrity across unrelated 10 ns / 7 ns clocks; full and empty; the congestion flag at 7 of 8 words. |
| `tb_hibs_interface`  | Both directions across the clock domains; SH_Status follows the receive FIFO. |
| `tb_ts_unit`         | Directed tests:<br>• an 8-flit packet streams through 5 slots at one flit per cycle, one cycle after entry;<br>• the threshold at 4 of 5;<br>• an MH packet overtakes an SH packet on a congested path, and `bypass_o` reports it;<br>• an aged packet beats a newer one in a lower row;<br>• interleaved writers come out as whole packets;<br>• the reserved slot.<br>Then 300 random packets with random stalls and status. |
| `tb_ts_ctrl`         | The M3 conflict and its lock; every route; 600 random packets from three sources, checking routing, order, no mixing in M3 and interleaving in M1/M2. |
| `tb_credit_link`     | Pass-through on an idle link; one flit per cycle; the sender stops after exactly 2 flits when the receiver stalls; a credit returns two edges after a flit is taken; 3000 random flits, with never more than 2 between the ends. |
| `tb_transfer_stage`  | Streaming latency and random traffic through one stage; bypasses and M3 conflicts must occur. |
| `tb_hibs_bus`        | The full bus at default parameters (see below). |
| `tb_hibs_bus_sweep`  | Latency against injection rate under uniform traffic (see below). |

`tb_hibs_bus` runs the full 4-layer bus at its default parameters. The layer clocks are 8,
12, 10 and 15 ns and the bus clock is 10 ns. The routers are modelled by the testbench. Its
phases:

1. **Zero load:** one packet from layer 0 to layer 3. It checks that the header crosses one
   segment per bus cycle, that every segment carries all 8 flits, and that the last segment
   carries them back to back. It also checks that the router-to-router latency lies within
   135-230 ns, a bound worked out from the clock periods.
2. **Uniform traffic:** 120 packets of 8 flits from every layer.
3. **Hotspot traffic:** as uniform, but 80 % of packets go to four hotspot nodes, (layer,
   core) = (0,5), (1,10), (2,9), (3,6). Core = 4·(y-1) + (x-1) for the node at (x, y) of a
   4x4 mesh. One receiver drains slowly.
4. **Processor/cache:** the top layer (processors) exchanges packets with the three layers
   below (cache banks).

Every packet must arrive exactly once, whole, at the right layer and core. The testbench
counts each mechanism and fails if any count stays at zero: reordering by the non-blocking
arbiter, M3 conflicts, SH and MH congestion, pass-through, injection up and down, both
directions of a segment at once, all segments busy at once, a stalled router, and a link
sender waiting for a credit.

What this does and does not establish:

- Function and deadlock freedom are shown under these random loads, not formally proven.
- Latency is checked at zero load only. Under load, the testbench prints the average
  router-to-router packet latency of each phase. With the clocks above it measures about
  190 ns at zero load, 435 ns uniform, 830 ns hotspot and 615 ns processor/cache. These
  numbers belong to this testbench's traffic and drain rates and are not a general
  performance figure.
- `tb_hibs_bus_sweep` measures one vertical channel on its own, with every clock at 10 ns.
  Each router creates 8-flit packets at random, open loop, for uniform destinations. For
  each rate it checks that every packet arrives intact and that the delivered rate matches
  the offered rate. It also checks that latency rises with load. Measured average latency,
  from packet creation to delivery and including the wait in the sender's queue:

  | offered load (flits/cycle/layer)  | 0.079 | 0.241 | 0.427 | 0.622 |
  |-----------------------------------|-------|-------|-------|-------|
  | carried while sources run         | 0.078 | 0.240 | 0.425 | 0.525 |
  | average latency (ns)              | 156   | 193   | 316   | 3014  |

  With uniform traffic the middle segment carries 4/3 of a layer's load in each direction,
  so its ideal limit is 0.75 flits/cycle/layer. The channel saturates at about 0.53. This
  gap has not been analysed. Packet-level waits for M3 and for the output lock are the
  likely causes.
- The design has not been synthesised for a specific technology or checked for timing.

Simulate a block with plain Verilator, from the project root. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
    rtl/hibs_pkg.sv rtl/bisync_fifo.sv rtl/hibs_interface.sv rtl/ts_unit.sv \
    rtl/ts_ctrl.sv rtl/transfer_stage.sv rtl/credit_link.sv rtl/hibs_bus.sv \
    tb/tb_hibs_bus.sv \
    --top-module tb_hibs_bus -o sim
./obj_dir/sim
```

For any other testbench, list `hibs_pkg.sv` first, then the modules the block uses, then
`tb/tb_<block>.sv` with `--top-module tb_<block>`. Each run, build included, takes about a minute or less.

## Outside this design

- **Routers.** The per-layer network router, including XYZ routing, input buffers and the
  switch allocator, is a standard part. Only its port to the bus is defined here.
- **TSVs.** The vertical wires are the forward and credit nets inside each `credit_link`
  and the status nets in `hibs_bus`. Their physical design is not modelled.
- **The multiprocessor system.** The processors, caches and memory that generate the
  traffic are not part of the design.
