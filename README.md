# A router for mixed real-time and best-effort traffic in a 2-D mesh

Parallel machines that run real-time applications carry two kinds of
messages over the same wires:

- **Time-constrained** traffic travels on pre-established *real-time
  channels*. Each packet must leave every router by a deadline. Throughput
  per channel is bounded.
- **Best-effort** traffic has no guarantee but wants low average latency,
  and its packets can be long.

This router serves both classes on every link without letting either spoil
the other, with a separate switching scheme for each class:

- **Time-constrained packets are packet switched.** Each one is 20 bytes and
  is stored whole in one packet memory shared by all five output ports. A
  hardware deadline scheduler picks, for each link, the packet with the most
  urgent deadline. A packet counts as *early* until its logical arrival time
  has come. Early packets are held back unless the link has nothing better to
  do and the packet is within a configurable *horizon* of its eligibility
  time.
- **Best-effort packets are wormhole switched.** They go through small flit
  buffers (a flit is 5 bytes) with per-flit acknowledgements and
  dimension-ordered routing. They use whatever link bandwidth the on-time
  time-constrained packets leave free.
- **Bytes are interleaved.** The two classes share each link as two virtual
  channels, and the choice is made byte by byte. As soon as an on-time
  time-constrained packet is ready it pre-empts a best-effort worm. When
  nothing on-time is waiting, best-effort bytes fill the link. Early packets
  within the horizon take the bytes that are still left.

The hard part is the scheduler. There is one comparator tree for all 256
stored packets, shared by all five ports in turn. It keeps deadlines correct
with an 8-bit clock that wraps around.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017).
Defaults match the prototype configuration:

- 256 packet slots
- 256 connections
- an 8-bit clock with a 9-bit sorting key
- a two-stage scheduler pipeline
- a 10-byte flit input buffer

## Ports and links

The router has five ports: 0 = local processor, 1 = +x, 2 = −x, 3 = +y,
4 = −y. Every mesh link is one byte wide. Each cycle it carries:

| signal | meaning |
|---|---|
| `data[7:0]` | one byte |
| `strobe` | the byte is valid |
| `vc` | virtual channel of the byte: 1 = time-constrained, 0 = best-effort |
| `ack` (reverse direction) | one pulse per best-effort flit the receiver has moved out of its input buffer |

Only best-effort traffic is flow controlled. Time-constrained traffic needs
no back-pressure: admission control and the scheduler guarantee the
downstream router has a free packet slot.

The local processor has its own ports:

- `inj_be_*`: best-effort injection, with `inj_be_ack` as its flit
  acknowledgement.
- `inj_tc_*`: time-constrained injection.
- Reception on port 0 of `tx_*`.
- A byte-wide control port, `ctrl_valid`, `ctrl_sel[2:0]`, `ctrl_data[7:0]`.

`rt_time` shows the router's clock.

## Packet formats

**Best-effort** (any length up to 258 bytes):

| byte | field |
|---|---|
| 0 | x offset, signed (two's complement) |
| 1 | y offset, signed |
| 2 | length *n* of the data |
| 3 … n+2 | data |

Routing is dimension ordered: +x if x > 0, −x if x < 0, otherwise +y/−y by
the sign of y, and the local port when both offsets are 0. The router steps
the offset of the dimension it routes on one closer to zero before
forwarding. The bytes are cut into flits of 5 bytes. The last flit of a
packet may be shorter.

**Time-constrained** (always 20 bytes):

| byte | field |
|---|---|
| 0 | connection id, local to the receiving router |
| 1 | logical arrival time ℓ at this router. This is the deadline the packet had at the previous hop. |
| 2 … 19 | data |

When a time-constrained packet is stored, the router makes two changes:

- It replaces byte 0 with the connection id for the next router.
- It replaces byte 1 with ℓ + d, where d is this connection's local delay
  bound.

The packet therefore leaves carrying its deadline here, which becomes its
logical arrival time at the next router.

## Configuring connections and horizons

The processor writes configuration one byte at a time. `ctrl_sel` says which
field the byte is:

| `ctrl_sel` | byte |
|---|---|
| 0 | incoming connection id (the table index) |
| 1 | outgoing connection id |
| 2 | local delay bound d, in packet times |
| 3 | output-port bit mask, bit p = port p. Writing it commits the table entry. |
| 4 | horizon: bit mask of output ports to set |
| 5 | horizon value h. Writing it loads h into every port in the mask. |

More than one bit set in the mask makes the connection multicast. The packet
is stored once and sent on each selected port. Every port of a connection
uses the same d. A connection whose mask is 0 drops its packets.

The time unit is one *packet time*, 20 cycles: the time a link needs to
send one time-constrained packet. `rt_clock` advances the 8-bit time t once
per packet time.

## The time-constrained path

Packets take these steps through the router:

1. **`tc_input`, one per input port.** Collects the incoming bytes of a
   packet into two 10-byte chunks and requests the memory for each.
2. **`mem_ctrl`.** Gives the single-ported `packet_memory` to one of ten
   requesters per cycle, round-robin on demand. The five inputs write and the
   five output ports read. One 10-byte chunk per cycle matches the total rate
   of ten byte-wide ports.
   - On the header chunk it reads `conn_table` with the incoming id and
     rewrites the header as described above. It takes a free slot from
     `idle_pool` and writes the chunk.
   - The second chunk goes into the same slot. The scheduler leaf is then
     loaded with the port mask, ℓ and ℓ + d. A packet can therefore only be
     scheduled once it is completely stored.
3. **`idle_pool`.** A stack of free slot numbers with a pointer:
   - A pop returns `mem[sp]` and increments the pointer.
   - A push decrements the pointer and writes the returned slot on top.
   - After reset a small state machine fills it with 0 … 255. This takes 256
     cycles (`ready`). Input packets are held off until then.
4. **Release.** When an output port reads the second chunk of a packet, its
   bit in the leaf mask is cleared. When the mask reaches zero, no port still
   needs the packet, and the slot goes back onto the stack.

## The link scheduler

### Sorting keys

Each of the 256 leaves (`sched_leaf`) holds one stored packet: its port
mask, ℓ and ℓ + d. For the port p being scheduled at time t, each leaf forms
a key. Smaller keys win:

| case | key = {inelig, early, value} |
|---|---|
| the packet is not queued on port p (mask bit clear) | {1, x, x} |
| on-time, ℓ ≤ t | {0, 0, (ℓ + d) − t}: the laxity |
| early, ℓ > t | {0, 1, ℓ − t}: time until eligible |

All differences are taken modulo 256. Because each key is measured relative
to t, one unsigned comparison works across clock wrap-around. This needs the
stored times to stay within half the clock range of t:

- d must be under 128 packet times.
- d + h of the previous hop must be under 128 packet times, because a
  packet can arrive that much ahead of ℓ.

"Early" is decided as (ℓ − t) mod 256 ∈ [1, 127]. On-time packets always
beat early ones. Among on-time packets the earliest deadline wins. Among
early packets, the one that becomes eligible soonest wins.

### The shared comparator tree (`scheduler`)

The keys go into a binary tree of comparators (`cmp_tree`). On equal keys
the lower slot wins. The tree stores no keys, so the five ports can share it
by taking turns:

- Every cycle a new operation is launched for the next port in rotation
  (0, 1, 2, 3, 4, 0, …), announced on `launch_valid` and `launch_port`.
- A row of registers after the first four levels (16-leaf subtrees) splits
  the tree into two pipeline stages.
- At the top, a last comparison checks the horizon. The winner is accepted
  if it is on-time, or if it is early with ℓ − t ≤ h of that port.
  Otherwise the port gets nothing this round.
- The answer (`res_valid`, slot, early flag, ℓ) appears two cycles after the
  launch.

Each port therefore gets a fresh answer every 5 cycles, well within one
20-cycle packet time.

**Pipeline hazard.** An answer may already be in flight when a port clears
its bit in that packet's leaf. The output port therefore ignores scheduler
answers from the moment it clears a leaf until its next operation is
launched. Without this a packet could be sent twice.

### Logic-sharing variant (`sched_grouped`)

Most of the chip's scheduler cost is the 256 leaf comparators. Setting
`SCHED_K` > 1 on `rt_router` swaps in `sched_grouped`, which saves
comparators by giving up time:

- The leaves are packed into 256/K groups. Each group is a K-entry register
  file with a single comparator. It scans its entries one per cycle while
  keeping a running minimum.
- One combinational tree over the group minima follows, then the horizon
  check.
- Delay is K + 1 + log2(256/K) levels, and about 2·256/K comparators are
  needed.
- An operation is launched every K cycles. The port and t are sampled at
  launch. The answer comes K + 1 cycles later.

With K = 4 each port is answered every 20 cycles, once per packet time.
The full router test passes unchanged with K = 4. Larger K answers each port
less often than once per packet. Deadlines then still hold at low load, but
time-constrained packets are no longer sent back to back. That case is not
tested.

## Output ports and byte-level pre-emption (`out_port`)

Each output port has two sides.

**Time-constrained side.**
- It has two 20-byte packet slots. When one is free, the port accepts the
  next scheduler answer for it and reads the packet's two chunks from
  memory.
- This lets one packet be fetched while the other is being sent.

**Best-effort side.**
- A FIFO of two flits is filled from the best-effort bus.
- A credit counter starts at 2, the size of the downstream input buffer in
  flits. A credit is spent when the first byte of a flit leaves. One comes
  back with every `ack` pulse.

**Per-byte arbitration.** Each cycle the port sends one byte, chosen as:

1. the current time-constrained packet if it is on-time (ℓ ≤ t);
2. otherwise a best-effort byte, if a flit is waiting and its credit was
   paid;
3. otherwise an early time-constrained packet that the scheduler accepted
   within the horizon.

Each byte carries its `vc` bit, so a worm can be interrupted between any two
bytes and resumed later. An early packet that has started is finished only
when no best-effort byte wants the link.

## The best-effort path

1. **`be_input`** (one per input port) holds two 5-byte flits. It closes a
   flit after 5 bytes or at the end of the packet.
   - On the head flit it computes the route and steps the offset.
   - When the bus takes a flit, it sends an `ack` to the upstream sender one
     cycle later.
2. **`be_bus`** moves one flit per cycle, a 40-bit word, from an input
   buffer to an output FIFO. It uses round-robin arbitration over the inputs.
   - Allocation is wormhole: a head flit claims a free output, which stays
     bound to that input until the tail flit passes.
   - An input only competes when its output FIFO has room.
3. **`out_port`** sends the flit as described above.

Over three hops through one router, with two links looped back
(injection → +x → −x in → +y → −y in → reception), a b-byte packet arrives
**22 + b cycles** after its first byte is injected. This is one cycle per
byte plus a fixed cost for header processing and flit accumulation at each
hop. The prototype chip that inspired this design reports 30 + b for the
same loop, so this RTL has fewer internal register stages.

## Timing summary

| event | cycles |
|---|---|
| packet time (clock tick) | 20 |
| scheduler answer after launch | 2 (tree) or K + 1 (grouped) |
| scheduler launches per port | every 5 cycles (tree) or 5·K (grouped) |
| memory data after read grant | 1 |
| flit ack after the flit leaves the input buffer | 1 |
| best-effort latency, 3 hops | 22 + b |
| pool fill after reset | 256 |

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `rt_router` | `NPKT` | 256 | time-constrained packet slots (leaves, memory, pool) |
| | `NCONN` | 256 | connection table entries |
| | `TICK_CYCLES` | 20 | cycles per packet time |
| | `SPLIT` | 4 | tree levels before the pipeline register |
| | `SCHED_K` | 1 | 1 = comparator tree; 2, 4, … = grouped scheduler |
| `be_input` | `BUF_FLITS` | 2 | input buffer in flits |
| `out_port` | `CREDITS`, `BE_FLITS` | 2, 2 | downstream buffer size, local flit FIFO |

`rt_pkg` holds the shared widths and types: port numbers, the 8-bit time,
80-bit chunks, the connection-table entry, the sort key and the flit.

## Where this design departs from the original chip, or fills in gaps

The following parts follow the original chip's description:

- the split into two virtual channels with different switching
- the shared packet memory in 10-byte chunks with round-robin access
- the stack of idle addresses
- the connection table with its three fields and the ℓ + d rewrite
- the leaf contents and key layout
- the shared, pipelined comparator tree with the horizon check at the top
- the grouped scheduler
- the priority order on the link
- 5-byte flits, a 10-byte input buffer, dimension-ordered routing and
  per-flit acknowledgements

These are this design's own choices:

- the encodings of `vc`, `ctrl_sel` and the signed offsets, and the byte
  order of the time-constrained header
- the reset behaviour, and the pool fill state machine
- pre-emption between any two bytes, rather than only at flit boundaries
- two packet slots per output port, and the credit counter
- where the pipeline register sits, and a launch every cycle
- dropping packets of connections with an empty mask
- lowest-slot tie-breaking

Not included:

- the I/O pads
- clock synchronisation between routers (all routers are assumed to share
  synchronized packet-time clocks)
- the processor and its protocol software (connection set-up, admission
  control)

The 3-hop best-effort latency is 22 + b rather than the chip's 30 + b.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against a model written independently in the testbench, counts
checks and failures, and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_rt_router` | Whole router at default size, with +x→−x and +y→−y loopbacks and a neighbour on +x. It covers best-effort packets over 3 hops with payload, offsets and 22 + b latency checked. It also covers multi-hop and multicast connections, id and deadline rewriting, and a long periodic connection across clock wrap with more packets than slots. Every packet is checked against its deadline and the horizon. It counts each mechanism: best-effort stalls on credits, pre-emption, early packets sent and held, multicast, wrap, slot reuse, drop and back-to-back packets. |
| `tb_rt_router_grouped` | the same test with `SCHED_K = 4` |
| `tb_fig10_workload` | Three connections with (d, I_min) = (8, 9), (5, 7), (3, 4) packet times share one link with h = 0, plus saturating best-effort traffic. Each connection gets service in proportion to 1/I_min (67/86/150 packets in 12000 cycles). No packet starts before ℓ and every packet ends by ℓ + d. Best-effort traffic takes the rest of the link, which was idle for only 8 cycles. In the first 1000 cycles the split was 475 best-effort bytes and 120/140/240 bytes for the three connections. |
| `tb_scheduler`, `tb_sched_grouped` | 256 leaves under random loads and clears, clock wrap and changing horizons, against a direct search (grouped: against a model of the scan) |
| others | one per block: clock, control interface, table, pool, memory, inputs, bus, leaf, memory controller, output port |

To run one testbench with Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/rt_pkg.sv tb/tb_rt_router.sv \
  --top-module tb_rt_router -Mdir obj_rt
./obj_rt/Vtb_rt_router +verilator+rand+reset+2
```

The random-reset option checks that nothing depends on uninitialised state.
Every testbench has a watchdog. The full-size router test runs in well under
a minute.

## Files

- `rtl/rt_pkg.sv`: shared types and constants
- `rtl/rt_router.sv`: top level
- Time-constrained path: `tc_input`, `mem_ctrl`, `packet_memory`,
  `idle_pool`, `conn_table`, `ctrl_if`, `rt_clock`
- Scheduler: `sched_leaf`, `cmp_tree`, `scheduler`, `sched_grouped`
- Best-effort path: `be_input`, `be_bus`, `rr_arbiter`
- Output: `out_port`
- `tb/`: one testbench per block, plus the end-to-end and workload tests
