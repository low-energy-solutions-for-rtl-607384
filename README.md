# Low-energy FIFOs for networks on chip: MSCS routing and racetrack FIFOs

Router buffers take a large share of the energy of a network on chip.
This RTL covers two separate ways to reduce that cost:

1. **MSCS: multi-hop segmented circuit switching.** Packets book a circuit
   along their row (and then their column) before they send data. Each
   router then knows, in advance and in a fixed order, which packet its
   output port serves next. A flit can cross several routers in one cycle,
   and it stops in an input buffer only where its circuit is not ready
   yet. One input buffer per port and one *relay buffer* per node replace
   the many virtual-channel buffers of a conventional router.
2. **Racetrack (domain-wall memory) FIFOs.** These replace SRAM FIFO
   buffers. In racetrack memory, bits sit in magnetic domains along a wire
   and can only be reached by shifting the wire past fixed access heads.
   So a FIFO has to decide, every cycle, how to shift. Three organisations
   are built:
   - **CB**: the classic circular buffer.
   - **LB**: a linear, shift-register-like buffer.
   - **Dual**: two half-length LBs used alternately. This is the
     recommended one.

`noc_fifo_top` places the two schemes side by side. They share only the
clock and reset: an 8 x 8 MSCS mesh, plus one 128-bit, 8-flit FIFO of each
racetrack kind. Everything is synthesizable SystemVerilog-2017 except
`dwm_racetrack`, which is a behavioural model of the storage wire.

## Files

| file | what it is |
|---|---|
| `rtl/mscs_pkg.sv` | flit and reservation types (`flit_t`: head, tail, dst_x, dst_y, 128-bit data) |
| `rtl/mscs_queue.sv` | small FIFO with two read ports and an on/off output |
| `rtl/mscs_rr_arbiter.sv` | round-robin arbiter, one copy per router on a line |
| `rtl/mscs_line.sv` | one row or column: request buses, reservation queues, input buffers, multi-hop traversal |
| `rtl/mscs_node.sv` | per-node queues: row injection, central-in, relay buffer, column-entry arbitration |
| `rtl/mscs_mesh.sv` | N x N mesh of nodes, N row lines and N column lines |
| `rtl/dwm_pkg.sv` | racetrack operation and alignment-state types |
| `rtl/dwm_racetrack.sv` | behavioural racetrack: domains, shift left/right, shift-write, read heads |
| `rtl/dwm_lb_fifo.sv` | linear-buffer FIFO and its four-state alignment machine |
| `rtl/dwm_dual_fifo.sv` | Dual FIFO: two LB halves with read/write owner bits |
| `rtl/dwm_cb_fifo.sv` | circular-buffer FIFO with a centre read/write port and an offset register |
| `rtl/noc_fifo_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_noc_fifo_top` runs everything at full size |

## MSCS

### Reservations instead of per-hop arbitration

Each router has a FIFO **reservation queue** for each output direction. A
reservation `{source, destination}` sits in the queue of every router the
circuit passes through. This includes the source router but not the
destination router. The reservation at the head of a queue is the circuit
that output serves now. The tail flit of a packet pops the reservation at
each output it leaves through. Every router on the path gets the
reservations in the same order, so circuits along a line never deadlock
or cross each other.

Reservations are made on a circuit request network shared by all routers
of one row (or column), which has three buses:

| bus | width | use |
|---|---|---|
| arbitration | N | a source that wants a circuit raises its own bit |
| request | log2 N | the winner's destination, broadcast to all routers |
| flow control | N | a router raises its bit while its reservation queue is full |

Every router has its own copy of the round-robin arbiter (`mscs_rr_arbiter`).
All copies see the same arbitration bus and therefore pick the same
winner. This is why the winning source never has to be sent as a number.
An assertion in `mscs_line` checks that the copies agree. A source does
not request while any router on its path has a full queue.

In this design each node holds at most one reservation per line: the one
for the packet at the head of its injection queue. A reservation won in
cycle *t* is at the queue heads in cycle *t+1*. This gives one cycle of
request overhead per dimension.

### Multi-hop traversal and stopping short

In each cycle, every output whose current circuit starts at this router
sends the node's flit. An output whose circuit comes from upstream sends
the flit at the head of its input buffer.

A flit arriving at a router goes straight through in the same cycle if all
of these hold:

- that router's current circuit is the same reservation;
- its input buffer holds nothing older;
- fewer than `HPC_MAX` routers have been crossed this cycle;
- the next buffer is **on**.

Otherwise the flit stops and is written into that router's input buffer.
It leaves again as soon as the circuit there reaches the head of the
queue. This happens when a router is still serving an earlier reservation
or when flow control says no.

**On/off flow control** is a per-link signal meaning "there will be room
after this cycle". A flit is never sent towards a buffer that is off.

At the destination, the flit leaves through an ejection port. That port
stays with one packet from head to tail.

### Two dimensions and the relay buffer

Routing is X then Y. A packet that must turn is taken off the row into the
node's **relay buffer**, so it stops blocking the row while it waits for a
column circuit. The relay buffer is the only way into the column for
turning packets from either side.

Packets that need only the Y dimension wait in a separate **central-in**
queue. The central-in queue and the relay compete for the column injection
port. The winner is chosen per packet with alternating priority and held
until the tail flit.

On an idle mesh, the latency measured from the core's offer is:

- **Two cycles for an X-only one-flit packet:** one cycle into the node's
  injection queue, then one cycle of reservation. Traversal happens in the
  cycle the flit leaves.
- **Four cycles for an X-then-Y packet:** the same two cycles, then one
  cycle into the relay and one cycle of column reservation.

The reservation overhead is thus one cycle per dimension and two in total.

### Mechanism pulses

For observation, `mscs_mesh` brings out one pulse per line for each
mechanism:

- reservation made;
- arbitration conflict;
- request held by the flow-control bus;
- a flit passing a router without stopping;
- stopping short;
- resuming from a buffer;
- stalling on an off buffer;
- waiting for the ejection port.

Each node also has two pulses: relay turns, and central-in/relay
contention. These pulses carry no function.

### Where MSCS departs from the description it follows

- **Control register and second read port.** The original scheme has a
  control register, set one cycle ahead, and a second reservation-queue
  read port that precomputes the next circuit before teardown. Here the
  crossbar setup is combinational from the queue head. The registered
  queue gives the same one-cycle boundary. The queue's second read port
  exists (`rd1`) but feeds only status.
- **Latch before the input buffer.** The original places a latch in front
  of each input buffer. Here the flit is written straight into the buffer.
- **Reservations per node.** Each node has at most one outstanding
  reservation per line.
- **Reservation queue depth.** The depth is not given. 4 is used, so that
  the flow-control bus can actually fill in an 8-router line.
- **Arbitration policies.** The policies for central-in/relay arbitration
  and for the ejection port are this design's own.
- **Crossbar.** The 3x4 / 4x3 crossbars are not separate modules. They are
  the multiplexers inside `mscs_line` and `mscs_node`.
- **Relay buffer count.** Only one relay buffer per node is built, which is
  the main configuration. Variants with two or four relay buffers are not.

## Racetrack FIFOs

A racetrack here is one word of storage per domain, 128 bits wide. All
three FIFOs use the same operations:

- shift left;
- shift right;
- shift-write, which writes the domain under the write head;
- reads from fixed read heads.

Shifting and writing each take half a cycle, so up to **two operations
happen per cycle**. A read takes the whole cycle, so **nothing shifts in a
cycle that reads**. This is the regime in which the linear organisations
are shown to saturate their benefit.

### Common interface and timing

`wr_req`/`wr_data` and `rd_req` are held high until `wr_ack` or `rd_ack`.
The acks are combinational in the cycle the operation is done, and
`rd_data` is valid with `rd_ack`. The FIFO state changes at that clock
edge. `rd_pending` and `wr_pending` flag a request that had to wait for
alignment. `n_shifts` counts shift operations in the cycle, which serves as
the energy proxy.

### CB: circular buffer on a racetrack

This is the head/tail-pointer FIFO of an SRAM array carried over to a
racetrack.

- The L slots live in a wire of **2L-1 domains**, with one read/write port
  in the centre.
- An **offset register** records how far the wire is shifted, so any slot
  can be brought under the centre without pushing data off an end.
- Four extra read-only heads sit every second domain on either side of the
  centre.
- **Writes** shift the tail slot to the centre and then write.
- **Reads** need the head slot under any read-capable head.
- **Idle cycles** shift towards the nearest such alignment. This is the
  shift-to-read policy.

Because the head and tail move apart as the queue fills, CB spends many
cycles shifting. It is the baseline the other two improve on.

### LB: linear buffer

The LB writes at one end (domain 0) and keeps the data contiguous, like a
shift register. It needs only **L domains**.

- Read heads sit at odd positions 1, 3, 5, 7: four heads for L = 8.
- The tail (newest flit) is kept at position 1 when possible, so the next
  write can go into domain 0.
- The head (oldest flit) is at `tail + count - 1`.

The controller is a four-state machine:

| state | meaning |
|---|---|
| `RW_ALIGNED` | head under a read head and domain 0 free: a read and a write can both happen now |
| `R_ALIGNED` | only a read can happen now |
| `W_ALIGNED` | only a write can happen now |
| `UNALIGNED` | neither; a shift is needed first |

Each cycle does one of the following, in this priority:

1. **Read.** Reads if aligned. It also writes domain 0 in the same cycle if
   the tail is at position 1.
2. **Write.** Aligns the tail if needed, writes, and then shifts right if an
   operation is left.
3. **Return home.** Shift-to-read-back: shift left if the tail is at 2 or
   more, otherwise shift right.

Some transitions are checked in the testbench. From `RW_ALIGNED`:

- a read, or a write, moves to `W_ALIGNED`;
- read plus write moves to `UNALIGNED`.

From `UNALIGNED`:

- an idle cycle returns to `RW_ALIGNED`;
- a write moves to `R_ALIGNED`.

The original keeps the state in two bits and the current read head in a
one-hot shift register that moves with the data. Here both are decoded
from the tail position and the head position. The information is the same
and so is the behaviour, but the implementation differs.

A single LB cannot read in consecutive cycles when both requests are
always present. Each read+write leaves it unaligned for a cycle. Under
saturation it reads at most about half the cycles, and the testbench checks
this.

### Dual: two half-length linear buffers

Dual splits the queue into two LBs of L/2 domains, each with two read
heads. Two owner bits control them:

- **Write owner** says which half takes the next write. It flips on each
  accepted write.
- **Read owner** says which half supplies the next read. It flips on each
  accepted read.

Flits therefore alternate between the halves, and the FIFO order is
preserved. While one half realigns, the other serves. This removes the LB's
limit of one read every other cycle: under saturation, Dual reads in nearly
every cycle. An assertion checks that the two halves never differ by more
than one flit.

### Not built

- **SRAM head-flit buffer.** The variants that add a one-flit SRAM buffer
  in front of the racetrack (LB+S, and the SRAM-assisted full-system
  configurations) are not built.
- **Other configurations.** The shift policies and read-head layouts
  explored only as alternatives are not built; only the best ones are. Nor
  are post-read shifts and more than two shifts per cycle.
- **Racetrack physics.** `dwm_racetrack` models function only: no timing,
  no shift errors, and no energy.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `noc_fifo_top`, `mscs_mesh` | `N` | 8 | mesh is N x N |
| | `BUF_DEPTH` | 8 | flits per input, injection, central-in and relay buffer |
| | `RESV_DEPTH` | 4 | reservations per queue (chosen, not given) |
| `mscs_mesh`, `mscs_line` | `HPC_MAX` | 8 | routers a flit may cross in one cycle (chosen) |
| `noc_fifo_top` | `FIFO_W` | 128 | racetrack FIFO word width (chosen) |
| | `FIFO_L` | 8 | flits per racetrack FIFO |
| `dwm_cb_fifo` | `NSIDE` | 2 | read-only heads per side of the centre port |

The flit payload width is `PAYLOAD_W` = 128 in `mscs_pkg`. Coordinates are
3 bits, which limits N to 8.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops, and
each has a watchdog. With plain Verilator 5, for example:

```
verilator --binary --timing --top-module tb_noc_fifo_top \
  rtl/dwm_pkg.sv rtl/mscs_pkg.sv rtl/mscs_queue.sv rtl/mscs_rr_arbiter.sv \
  rtl/mscs_line.sv rtl/mscs_node.sv rtl/mscs_mesh.sv rtl/dwm_racetrack.sv \
  rtl/dwm_lb_fifo.sv rtl/dwm_dual_fifo.sv rtl/dwm_cb_fifo.sv rtl/noc_fifo_top.sv \
  tb/tb_noc_fifo_top.sv
./obj_dir/Vtb_noc_fifo_top
```

The testbenches do the following:

- **`tb_noc_fifo_top`** runs the top at its default size, in about one
  second of simulation:
  - it checks the idle-mesh latencies;
  - it sends 2000 random 1- and 5-flit packets, then a hot-spot phase with
    a throttled destination, and checks every flit's destination and
    order;
  - it drives the three FIFOs with random traffic against a queue model;
  - it fails if any mechanism never occurs: each mesh pulse; and, for each
    FIFO, read+write in one cycle, a held read, a held write, full, and
    shifting.
- **`tb_mscs_line` and `tb_mscs_mesh`** use smaller queues so that flow
  control and stopping short happen often. They check exact zero-load
  latencies: a 1-flit packet over seven hops arrives in one cycle after its
  reservation, and a 5-flit packet streams one flit per cycle.
- **The FIFO testbenches** check the named state transitions, random
  traffic at 10 %, 50 % and 90 % load, and saturation throughput:
  - LB: at most about 1/2;
  - Dual: more than 3/4;
  - CB: at least 1/8.

## How far to trust it

The two schemes have been checked by their testbenches: functionally and
by cycle counts at zero load, and against reference models under random
and hot-spot traffic. Each testbench was also shown to catch a deliberately
broken copy of its module.

Nothing was checked against the energy or latency figures of the original
evaluation. Those came from network and full-system simulators, not from
RTL.

The policy choices listed above are where this RTL is most likely to
differ from the original:

- the arbitration details;
- the reservation queue depth;
- the one-reservation-per-node rule;
- the derived LB state.
