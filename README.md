# Virtual-channel wormhole mesh NoC for voltage-scaled, application-specific SoCs

This is the RTL of a 4x4 mesh network-on-chip whose switching elements share
each physical link among several virtual channels. It is built for a simple
energy-saving method. When the traffic rate of the application is known in
advance, adding virtual channels makes packets arrive sooner than the
application needs. That spare latency is then spent by lowering the supply
voltage, and with it the clock frequency, until delivery time is back at the
application's limit. Dynamic power falls with the square of the supply
voltage, so this saves far more energy than the extra buffers cost.

The logic itself does not depend on the voltage. The RTL provides the network
and its one design-time knob, `NUM_VC`, the number of virtual channels per
physical channel. The testbenches measure what the voltage choice is based on:
the average packet delivery time, in clock cycles, at a given traffic rate.

## How the virtual-channel count maps to traffic

The rule is to use the fewest virtual channels that still leave the most
latency headroom at the expected traffic rate:

| traffic region | best choice |
|---|---|
| light | 2 VCs: lowest latency, smallest switch |
| medium | 4 VCs: 2 VCs saturate, 6 VCs cost more power for less headroom |
| heavy | 6 VCs |

Example: an application tolerates 310 cycles on average at 0.017 packets per
node per cycle. A network that delivers in about 250 cycles leaves room for
roughly 25 % voltage reduction; one that delivers in about 200 cycles leaves
room for about 35 %.

The default here is `NUM_VC = 4`. This RTL gives the following average
delivery times on uniform random traffic with 32-flit packets, counting at
least 20000 packets per point after a 1000-packet warm-up (`tb_noc_workload`,
run with `NUM_VC` set to 2, 4 and 6):

| rate | 2 VCs | 4 VCs | 6 VCs |
|---|---|---|---|
| 0.010 | 77 | 85 | 87 |
| 0.017 | 358 | 165 | 179 |
| 0.020 | 3774 (saturated) | 621 | 293 |

In this RTL the three rates fall into the three regions: 2 VCs are fastest at
0.010, 4 VCs at 0.017 (2 VCs are already past 310 cycles there), and 6 VCs at
0.020.
Absolute numbers depend on the router pipeline and buffer depth chosen below.

## The network

`noc_mesh` instantiates `MESH_X x MESH_Y` routers (default 4 x 4). Node
(x, y) has index `y*MESH_X + x`, with (0,0) at the south-west corner. North is
+y and east is +x. Neighbouring nodes are joined by one link in each
direction, and every link has a credit return path running the other way.
Links at the mesh boundary are tied off.

Each node's local physical channel is a port of `noc_mesh`. This is where the
node's processing element (processor, cache, memory) connects; the processing
element is not part of this RTL.

* `inj_*` carries flits from the processing element into the network.
* `ej_*` carries flits from the network to the processing element.

Both use the same protocol as the links between routers.

### Flits and packets (`noc_pkg`)

A packet is a header flit, any number of body flits and a tail flit. A
one-flit packet uses type `HEADTAIL`. Each flit is a `flit_t`:

| field | bits | meaning |
|---|---|---|
| `ftype` | 2 | BODY, HEAD, TAIL, HEADTAIL |
| `vc` | 3 | virtual channel on the link the flit is crossing |
| `data` | 32 | payload; in a header, `data[3:0]` = destination x, `data[7:4]` = destination y |

### Link protocol: credits per virtual channel

* The sender drives `valid` and `flit` for one cycle per flit. The flit's
  `vc` field names the receiver's buffer.
* The sender keeps one credit counter per virtual channel. Each counter
  starts at `BUF_DEPTH`. Sending a flit uses one credit, and the sender never
  sends on a channel whose counter is zero.
* Each time the receiver removes a flit from a virtual channel's buffer, it
  returns one credit (`credit` plus `credit_vc`).

A processing element that drives `inj_*` must follow these rules. It must
also return a credit for every flit it receives on `ej_*`. The router assumes
`BUF_DEPTH` slots per virtual channel on the processing element's side.

## The switching element (`noc_router`)

The router has five physical channels: local, north, east, south and west
(ports 0-4). Each channel carries `NUM_VC` virtual channels. Switching is
wormhole switching: a header reserves a path, the rest of the packet follows
it flit by flit, and the tail releases the path. A packet can therefore be
much longer than a buffer (32 flits through 4-flit buffers).

A flit crossing a router goes through these steps:

1. **Input buffer (`vc_buffer`).** The arriving flit is written into the FIFO
   of the virtual channel named by its `vc` field. There is one
   `BUF_DEPTH`-flit FIFO per input virtual channel. The FIFO is
   fall-through, so its front flit can be read at once.
2. **Route (`xy_route`).** If the front flit is a header, XY routing picks the
   output: first east or west until the column matches, then north or south,
   then local. XY routing cannot deadlock on a mesh.
3. **Virtual-channel allocation (`vc_allocator`).** The header asks for any
   free virtual channel on its output. Each output port has a round-robin
   arbiter, which grants one waiting header per cycle the lowest free virtual
   channel. If every virtual channel of that output is held by other packets,
   the header simply waits. This wait is the blocking that extra virtual
   channels reduce. Once granted, the input virtual channel is `ACTIVE` and
   remembers its output port and output virtual channel.
4. **Switch allocation (`switch_allocator`).** An `ACTIVE` input virtual
   channel is ready when it holds a flit and has a credit for its output
   virtual channel. Allocation takes two round-robin stages. First, each
   input port picks one ready virtual channel. Then each output port picks
   one of the input ports asking for it. So each physical channel carries at
   most one flit per cycle, and the virtual channels sharing it take turns
   flit by flit.
5. **Crossbar (`crossbar`) and output register.** The winning flit is put on
   its output, and its `vc` field is rewritten to the output virtual channel.
   It is then registered in the one-flit output stage that drives the link. In
   the same cycle a credit is sent back upstream, and the output's credit
   counter is decremented.
6. **Release.** When the tail flit passes, the input virtual channel goes back
   to `IDLE` and the output virtual channel becomes free for another header.

**Timing without contention.** A header written into an input buffer on edge
t is granted a virtual channel on edge t+1 and is on the output link from edge
t+2. Its body flits follow at one flit per cycle. From the moment a flit is
placed on an input link until it appears on the output link takes 4 edges. A
packet whose path is set up streams at one flit per cycle. A 4-flit buffer
covers the credit round trip, so a single packet runs at full link rate.

**Observation signals.** `evt_vc_wait`, `evt_credit_wait` and
`evt_sw_conflict` are internal signals with no port. They show, in each cycle,
whether any header is waiting for a virtual channel, whether any flit is held
back for lack of a credit, and whether any ready flit lost switch allocation.
The testbenches count them.

## Parameters

| parameter | default | where | notes |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | `noc_mesh` | up to 16 x 16 (4-bit coordinates) |
| `NUM_VC` | 4 | `noc_mesh`, `noc_router`, allocators | 2, 4 or 6 for the three traffic regions; 1..8 allowed |
| `BUF_DEPTH` | 4 | `noc_mesh`, `noc_router`, `vc_buffer` | flits per input virtual channel; also the initial credit count |
| `X_POS`, `Y_POS` | 0, 0 | `noc_router` | set per node by `noc_mesh` |

The flit field widths are constants in `noc_pkg`.

## What is this design's own choice

The network structure follows the method it was written for: the 4x4 mesh,
five physical channels per switch, `k` virtual channels per physical channel,
input buffers, wormhole switching, XY routing, a header waiting for a free
virtual channel, virtual channels time-sharing a link, and a crossbar. The
following points were not specified and were chosen here:

* **Flow control.** Credit-based, per virtual channel.
* **Flit format.** 32-bit payload, 2-bit type, 3-bit virtual-channel id, and
  the placement of the destination in the header.
* **Buffers.** Depth 4 per virtual channel. The output buffer is a
  single-flit output register, not a multi-flit queue.
* **Router pipeline.** Three stages (buffer write, VC allocation, switch
  allocation and traversal). The arbiters are round-robin, and the VC
  allocator picks the lowest free channel.
* **Reset.** Active-low asynchronous: buffers empty, all virtual channels
  free, credits full.
* **Mesh edges.** Boundary links are tied off.
* **Coordinates.** Start at 0.

**Not included.**

* The processing elements. They connect through `inj_*` and `ej_*`.
* Voltage and frequency scaling. This is a supply and clock setting, chosen
  at design time from the latency measurements. The logic has no controller
  for it.
* Power and energy. They need gate-level analysis in a target library and
  cannot be obtained from this RTL simulation.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_vc_buffer` | FIFO order, full and empty, simultaneous push and pop, against a queue model |
| `tb_xy_route` | all source/destination pairs of an 8x8 mesh |
| `tb_crossbar` | random permutations, VC rewrite |
| `tb_vc_allocator` | grants only to requesters; lowest free VC; one grant per port; no idle free VC while a header waits; busy tracking; round-robin fairness |
| `tb_switch_allocator` | one flit per input and per output; no idle output with a sole requester; VCs of one input take turns; contending inputs alternate |
| `tb_noc_router` | single router with behavioural neighbours: XY output, packet integrity, no interleaving within a VC, one credit per flit, 4-edge header latency and one flit per cycle, a header waiting for a VC when all are held, and back-pressure and conflicts under random load |
| `tb_noc_mesh` | full 4x4 mesh at default parameters with a traffic source and sink on every node (`tb_traffic_node`): light load, then overload, then drain. Every packet delivered intact to its destination. VC waits, credit stalls, switch conflicts and link interleaving each observed. |
| `tb_noc_workload` | the delivery-time measurement above, one rate per traffic region, at least 20000 packets per rate; checks delivery below 310 cycles at 0.017 |

The traffic source generates a packet with a fixed probability each cycle.
This is a discrete-time version of Poisson arrivals. Packets are 32 flits
long, and destinations are uniformly random among the other nodes.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/noc_pkg.sv rtl/*.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh -Mdir obj
./obj/Vtb_noc_mesh
```

`-Itb` lets Verilator find the helper modules `tb_traffic_node` and
`tb_mesh_harness`. Uninitialised state should be
randomised (`+verilator+rand+reset+2`); the design resets everything it reads.

Build times grow with the number of distinct router instances, because each
node's coordinates are parameters. On a typical machine the 4x4 mesh builds in
about a minute. `tb_noc_workload` simulates about 300 000 cycles in about
30 seconds.
