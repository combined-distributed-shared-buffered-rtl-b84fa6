# R-NoC: a roundabout router for a 2D mesh network-on-chip

## The idea

A conventional mesh router gives each input port its own FIFO and puts a
crossbar and a switch allocator behind them. Most of those buffers sit idle
most of the time, because traffic rarely loads every input at once.

The Roundabout NoC (R-NoC) router takes a different approach. It has no input
FIFOs and no crossbar. Its buffers are single-flit elastic register stages
strung along a few *lanes* that circle the router, like the lanes of a traffic
roundabout:

- An input port joins a lane at one point.
- Every output port has an exit on each lane that can carry packets for it.
- Several input ports share a lane. Whichever port has traffic uses the
  buffers, so buffers are shared instead of being pinned to a port.
- A packet that finds its exit taken does not stop the lane. It drives on
  (it is *deflected*) and switches to a *secondary* lane, where it meets the
  same exit again.
- Secondary lanes have priority at the exits, so a packet that has gone round
  once is not starved.

All decisions are local. Each register stage decides with a ready/valid
handshake and at most a two-input arbiter. At low load a packet crosses the
router on the shortest path. As load grows, the secondary lanes fill and act
as extra buffering.

This repository holds a synthesizable SystemVerilog model of the 4-lane
configuration (called C0 in *"Combined Distributed Shared-Buffered and
Diagonally-Linked Mesh Topology for High-Performance Interconnect"*,
Micromachines 2022). The model runs in a parameterised 2D mesh with XY
routing and wormhole flow control. Flits are 32 data bits plus head and tail
bits.

## Structure

| File | What it is |
|---|---|
| `rtl/rnoc_pkg.sv` | Flit type, port enum, header field positions, XY routing function, event flags. |
| `rtl/rnoc_eb.sv` | Elastic buffer: main register plus a ghost register for back-pressure. 1-cycle latency, full throughput, registered `ready`. |
| `rtl/rnoc_fcfs_rr_arb.sv` | Two-request Mealy arbiter. First-come-first-served for requests that arrive one after the other, round-robin for simultaneous ones. Locked from a packet's head flit to its tail. |
| `rtl/rnoc_port_arb.sv` | Output-port arbiter. One FCFS/RR arbiter for primary lanes 0 and 1, one for secondary lanes 2 and 3, with static priority to the secondary pair. |
| `rtl/rnoc_input_ctrl.sv` | Input controller. XY path computation writes the output port into the header, then an elastic buffer. |
| `rtl/rnoc_output_ctrl.sv` | Output controller: an elastic buffer plus a two-way demux (leave at this port, or continue down the lane). It either deflects on a busy port or waits for it, as set per instance. |
| `rtl/rnoc_path_ctrl.sv` | Path controller: an elastic buffer plus a two-way demux (stay on the primary lane, or take the switch link to the secondary lane). |
| `rtl/rnoc_lane_merge.sv` | Join point where an input port or a switch link enters a lane. A combinational mux steered by an FCFS/RR arbiter. |
| `rtl/rnoc_out_port.sv` | Output port block: port arbiter, flit mux, valid encoder and ready decoder. |
| `rtl/rnoc_router.sv` | The 4-lane router. |
| `rtl/rnoc_mesh.sv` | `MESH_X` x `MESH_Y` mesh of routers, 4x4 by default. This is the top level. |

### Router lane layout

Lanes 0 and 1 are primary; lanes 2 and 3 are secondary. Each `OUT_x` is an
output controller for port x and each `PATH_x` is a path controller. Each
`[join ...]` is a lane merge.

```
lane 0 (West, Local in):  IN_W > OUT_L(wait) > PATH_L > [join IN_L] > OUT_S > OUT_E > OUT_N > OUT_W > lane 2
lane 2 (secondary of 0):  OUT_L > [join switch from PATH_L] > OUT_S > OUT_E > OUT_N > OUT_W   (all wait)
lane 1 (S, E, N in):      IN_S > PATH_E > [join IN_E] > OUT_N > PATH_N > [join IN_N] > OUT_W(wait) > OUT_L(wait) > OUT_S(wait)
lane 3 (secondary of 1):  [switch from PATH_E] > [join switch from PATH_N] > OUT_N > OUT_W > OUT_L > OUT_S   (all wait)
```

- A controller without "(wait)" is on a primary lane. If its port is not
  granted, it deflects the packet along the lane.
- The East output has controllers on lanes 0 and 2 only. Under XY routing no
  input on lane 1 turns East.
- The lane ends after lane 2 and lane 3 (and, in this design, lane 1) are
  never reached. Assertions check this.

### Timing

Every controller is one register stage. Lane merges, output port blocks and
links add no cycle.

- **West to North:** the zero-load path through a router is 6 cycles. The head
  passes the West input controller, then `OUT_L`, `PATH_L`, `OUT_S`, `OUT_E`
  and `OUT_N`. This is the longest path of lane 0, as the paper states.
- **One hop:** a packet from node (0,0) to its East neighbour (1,0) reaches
  the local sink 5 cycles after injection.

Both latencies are checked by the testbenches.

### Header format

| Bits | Field |
|---|---|
| `data[31:28]` | Output port in the current router, rewritten by every input controller. |
| `data[27:16]` | Free for the source; the testbenches use it as a packet tag. |
| `data[15:8]` | Destination x. |
| `data[7:0]` | Destination y. |

x grows East and y grows North. Node index is `n = y*MESH_X + x`.

## Differences from the paper and choices of this design

- **Lane 1 tail waits instead of deflecting.** The paper puts the East, South
  and North inputs on lane 1. It lets the Local exit of lane 1 deflect, and
  lets packets run from the end of lane 1 into lane 3.

  Built that way, the 4x4 mesh deadlocked under 10-flit wormhole traffic. A
  waiting 10-flit packet fills several lane stages, so everything queued behind
  it waits for the same port. North-bound packets could end up waiting behind
  south-bound ones, and the reverse. Two vertically adjacent routers then
  blocked each other.

  In this design:
  - The part of lane 1 after the North input join waits at its own West, Local
    and South exits, and nothing reaches the end of lane 1.
  - Packets that need lane 3 take the switch links at `PATH_E` and `PATH_N`.
  - Packets deflected at `OUT_N` of lane 1 are always sent to lane 3.

  With this change, south-bound traffic never depends on the North output. The
  channel dependencies of the XY mesh then have no cycle.
- **Lane order.** The order of controllers on lanes 1, 2 and 3, and the exact
  places of their switch links, are this design's. The paper gives them only
  in figures. Lane 0 follows the paper's pipeline description, including the
  6-cycle longest path.
- **Meaning of "busy".** A port counts as busy when its arbiter does not grant
  this controller in the current cycle. The decision is re-made every cycle
  until the head flit moves; then the rest of the packet follows it.
- **Path controller choice.** A path controller offers each head flit to the
  primary lane first and takes the switch link only if the primary lane
  refuses it in that cycle.
- **Arbiter order memory.** The FCFS/RR arbiter remembers arrival order as the
  previous cycle's requests. After a flit moves while both inputs are
  requesting, the other input gets the next turn.
- **Ghost storage.** The ghost storage of the elastic buffer is a flip-flop
  register, not a latch, so the whole design uses one clock edge.
- **Reset.** Reset is synchronous and active high.
- **Link registers.** Links between routers have no register on the sending
  side. The receiving input controller is the register.
- **No path controller at the end of lane 2.** The paper mentions one on
  lane 2 before the West exit, whose only job is to request the next router's
  resource. Here the West output controller of lane 2 does that directly
  through the output port block.
- **No extra buffers.** The paper's optional extra lane buffers are not
  instantiated.

## Not built

- **The 9-lane C1 router.** The paper gives its lane graph only as a figure.
- **The 9-port R-NoC-D router (DM3) and the diagonally linked mesh.** The
  lane layout is only in a figure, and the quasi-minimal routing it relies on
  is not described.
- **The Hermes and Rotary baseline routers.** They are comparison points, not
  part of this design.
- **Area, power and latency-curve experiments.** These need the above and a
  45 nm flow.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_rnoc_eb`: ordering against a reference queue, 1-cycle latency, full
  rate, and capacity under a stall (main plus ghost register).
- `tb_rnoc_fcfs_rr_arb`: directed FCFS, RR, Mealy and packet-lock cases, plus
  a random run against a reference model.
- `tb_rnoc_port_arb`: secondary-over-primary priority, packet lock, and no
  starvation in a random run.
- `tb_rnoc_input_ctrl`: XY output port in the header, all other bits
  unchanged, and 1-cycle latency.
- `tb_rnoc_output_ctrl`: a deflecting controller and a waiting controller side
  by side, with whole packets on one side.
- `tb_rnoc_path_ctrl`: switching only when the primary lane is blocked, the
  forced switch, and whole packets on one side.
- `tb_rnoc_lane_merge` and `tb_rnoc_out_port`: no interleaving, order per
  source, zero added latency, and secondary priority.
- `tb_rnoc_router`: one router at (1,1) with random legal XY traffic on all
  five inputs and random back-pressure.
  - It checks the 6-cycle West-to-North zero-load latency, the exit port of
    every packet, flit order and non-interleaving.
  - It also counts deflections, lane switches, secondary-lane exits and input
    stalls, and fails if any of them never happens.
- `tb_rnoc_mesh`: the 4x4 mesh at default parameters.
  - It runs the one-hop latency check, then uniform random, transpose and
    hotspot traffic with 10-flit packets.
  - Every packet must arrive once, at the right node, in order and not
    interleaved.
  - A last phase saturates the network: every source injects whenever it
    can. A deadlock would show up there as an expired watchdog.
  - The same four mechanisms are counted.
- `tb_rnoc_mesh_8x8`: the same test on an 8x8 mesh, the largest size in the
  paper's scalability study.
- `tb_rnoc_mesh_load`: a latency-versus-load sweep of the 4x4 mesh.
  - Sources create packets at random times at a set offered load and queue
    them. Latency runs from the creation of a packet to its tail leaving the
    network.
  - It covers uniform and transpose traffic with 10-flit packets at 5 to 40
    percent load, and uniform traffic with 4-, 8-, 12- and 16-flit packets.
  - It prints the average latency and the accepted throughput of each point.
    The same delivery checks apply, and latency may not fall as load grows.

  A typical run with 10-flit uniform traffic shows an average latency of
  about 26 cycles at 5 % load and 36 cycles at 30 %. At 40 % the network is
  past saturation, and the result depends on the seed: 50 to 85 cycles.
  Accepted throughput levels off at 26 to 29 % of a flit per node and cycle.
  These numbers are for the 4-lane router only. The 9-lane routers that the
  paper compares with other designs are not built here.

Sources use `$urandom`; sinks apply random back-pressure.
