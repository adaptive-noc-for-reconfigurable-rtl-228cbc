# Fault-tolerant adaptive Network-on-Chip for 2D and 3D meshes

A reconfigurable system-on-chip places processing cores in a grid and connects them
through a mesh of routers. When a router or a link in that mesh fails, or when a region
becomes congested, a fixed routing rule such as XY either stalls or loses packets. This
design gives every router a short, ordered list of output ports for each packet instead of
a single one: a *main* port that moves the packet toward its destination, then
*alternative* ports that still make progress or at worst step sideways. The router takes
the first port on the list that is healthy and free. Because the list is derived from the
region ("zone") the destination lies in relative to the current router, it costs a few
comparators and a small case table, and it needs no routing tables and no global
knowledge of the faults.

Two routing functions are provided:

* **Gradient** for a 2D mesh: 8 zones, each with a main port and two alternatives.
* **Diagonal** for a 3D mesh: 48 zones, each with a sequence of all six directions.

The top level `adaptive_noc_top` holds one network of each kind side by side: a 4x4 2D
mesh using Gradient routing with 8-flit input buffers, and a 3x3x3 3D mesh using Diagonal
routing with 4-flit input buffers. The two networks share only the clock and the
active-low reset.

## Packets and links

Flits are 32 bits wide (`noc_pkg::FLIT_W`). A packet follows the HERMES wormhole format:

| flit | contents |
|------|----------|
| 0 (header) | destination: x in bits [3:0], y in [7:4], z in [11:8]; bits [31:12] are free for the sender (the testbenches put a source id and a sequence number there) |
| 1 (size)   | number of payload flits in bits [15:0] |
| 2 .. size+1 | payload |

A packet therefore has `size + 2` flits, and `size` may be 0. Coordinates are 4 bits, so
one dimension can have up to 16 routers.

Every link is one-directional and has three signals: `tx` (flit valid), `data` and `ack`.
The flow control is chosen per network by the `FC` parameter:

* `FC_HANDSHAKE`: `ack` means the receiver has room, and a flit moves in every cycle
  where both `tx` and `ack` are high.
* `FC_CREDIT`: the sender starts with `DEPTH` credits and raises `tx` only while it holds
  one. Every `tx` cycle is a transfer. `ack` is a one-cycle credit return, pulsed when the
  receiver frees a buffer place.

The local port of every router is exposed at the mesh boundary (`lin_*` into the network,
`lout_*` out of it). An IP core or a traffic generator connects there.

## Router

`noc_router` has one port per neighbour plus the local port. That is 5 ports in 2D:
LOCAL=0, EAST=1, WEST=2, NORTH=3, SOUTH=4. In 3D there are 7, adding UP=5 and DOWN=6.
East is +x, north is +y and up is +z. Router `(x,y,z)` is node `x + XS*(y + YS*z)`.

Each input has a first-word-fall-through FIFO (`flit_fifo`). A small phase counter per
input follows the packet through its header, size and payload flits. The counter reads the
size flit, so it knows which flit is the last one.

`switch_control` does the routing:

1. Every input whose buffer shows an unrouted header raises a request.
2. A round-robin arbiter (`rr_arbiter`) picks one request per cycle. Its pointer moves to
   just past the winner.
3. The routing unit, Gradient or Diagonal, turns the header's destination into the
   candidate list for the winner.
4. The winner is connected to the first candidate that is both *usable* and *free*:
   * *Usable* means a neighbour exists on that side, `link_ok` is high for it, and it is
     not the port the packet came in by.
   * *Free* means no other packet holds that output.
5. The connection is kept until the last flit of the packet has left. The crossbar
   (`crossbar`) carries the flits; each output has a select and an enable.

If no candidate is free, the header waits and tries again on a later arbitration turn.

Timing with no contention: a header written into an input buffer at edge k is routed
during the next cycle, connected at edge k+1 and sent on the output at edge k+2. That is
**2 cycles per hop for the header**. The rest of the packet follows at one flit per cycle.
The testbenches check this latency.

The router reports six events each cycle, and the mesh and the top bring them out per
router:

| event | meaning |
|-------|---------|
| `ev_main`  | a header was sent on its main port |
| `ev_alt`   | a header was sent on an alternative port |
| `ev_wait`  | a header had usable candidates, but all were busy |
| `ev_uturn` | a header left through its arrival port (dead end, see below) |
| `ev_dead`  | a header had no usable candidate at all |
| `ev_stall` | a connected output was held back by flow control |

## Gradient routing (2D)

Let `dx = xd - xc` and `dy = yd - yc`. If both are zero the packet goes to LOCAL (zone 0).
Otherwise the destination falls in one of eight zones. The four horizontal zones are those
with `|dx| >= |dy|`; the four vertical zones are those with `|dy| > |dx|`. So a destination
on the exact diagonal counts as horizontal.

| zone | where the destination is | main | alt 1 | alt 2 |
|------|--------------------------|------|-------|-------|
| 1 | east, `dy >= 0`, mostly horizontal | E | N | S |
| 2 | north, `dx >= 0`, mostly vertical  | N | E | W |
| 3 | north, `dx < 0`, mostly vertical   | N | W | E |
| 4 | west, `dy >= 0`, mostly horizontal | W | N | S |
| 5 | west, `dy < 0`, mostly horizontal  | W | S | N |
| 6 | south, `dx < 0`, mostly vertical   | S | W | E |
| 7 | south, `dx >= 0`, mostly vertical  | S | E | W |
| 8 | east, `dy < 0`, mostly horizontal  | E | S | W |

Destinations on an axis are assigned as follows:

* due east goes to zone 1;
* due north goes to zone 2;
* due west goes to zone 4;
* due south goes to zone 7.

This is what gives the 3-hop detours the design is meant to achieve around a single
faulty link next to the source. The second alternative of zone 8 is WEST, not NORTH as
symmetry with zones 1, 4 and 5 would suggest. This follows the original pseudocode
exactly; change the one table row in `gradient_routing.sv` if you want the symmetric
version.

## Diagonal routing (3D)

Diagonal ranks the three dimensions by distance, `|dx|`, `|dy|`, `|dz|`, from farthest to
nearest. Each dimension has a sign: positive if the difference is > 0, and negative
otherwise, which includes 0. The candidate sequence has six entries:

1. the farthest dimension, toward the destination (main);
2. the second dimension, toward the destination;
3. the nearest dimension, toward the destination;
4. the nearest dimension, away from the destination;
5. the second dimension, away from the destination;
6. the farthest dimension, away from the destination.

There are 6 orderings of the dimensions and 8 sign combinations, which makes the 48 zones.
The zone number is `6*signs + order + 1`. Ties in distance are broken X before Y before Z.
For example, from (0,0,0) to (1,1,2) the sequence is UP, EAST, NORTH, SOUTH, WEST, DOWN.

The sequence is computed, not stored. `tb_diagonal_routing` holds the 48-row reference
table as text and checks every pair of routers in a 4x4x4 mesh against it. Two rows of
the published table disagree with the rule and with the rows around them. The table
here follows the rule:

* row 12, where the published decision puts Z+ first;
* row 32, whose zone label does not match its decision sequence.

## Faults, U-turns and dead ends

Faults are inputs:

* `node_fault[n]` marks router n as dead. Its neighbours see all their links to it as
  faulty.
* `link_fault[n][p]` marks the output link of router n on port p as faulty. A broken
  bidirectional link needs both directions set.

The routers do not detect faults themselves; something outside must set these bits.
Packets must not be sent to a faulty router's local port.

The routing never picks a port whose link is faulty or that leads off the mesh. It also
normally refuses the arrival port, so a packet cannot go straight back. With only the
main port and two alternatives, though, a packet in 2D can reach a router where all three
candidates are unusable. For example, it enters a dead-end pocket between a faulty node
and the mesh border. In that case only, the arrival port is allowed as a last resort
(`ev_uturn`). If even that is impossible, `ev_dead` pulses and the header stays in its
buffer; it blocks that input until the faults change.

Adaptive wormhole routing without virtual channels is not deadlock-free. Alternatives and
U-turns can close a cycle of packets that wait on each other. At the injection rates the
design was evaluated with, 0.0015 to 0.01 packets per cycle per router, the testbenches
deliver every packet. At 0.04 packets per cycle per router, with long packets, a 4x4 mesh
with two faulty nodes was seen to lock up. Use virtual channels or a turn restriction if
heavy load is expected.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `XS2`, `YS2` | 4, 4 | 2D mesh size |
| `DEPTH2` | 8 | 2D input buffer depth, in flits |
| `FC2` | `FC_HANDSHAKE` | 2D flow control |
| `XS3`, `YS3`, `ZS3` | 3, 3, 3 | 3D mesh size |
| `DEPTH3` | 4 | 3D input buffer depth, in flits |
| `FC3` | `FC_HANDSHAKE` | 3D flow control |

`noc_mesh` and `noc_router` take the same settings as `DIM`, `XS`, `YS`, `ZS`, `DEPTH` and
`FC`, so either network can be used on its own. The 3D flow control was not specified
originally; handshake is this design's choice, and credits work as well.

Coarse synthesis with yosys of the default top gives about 30,000 cells, 8,900 flip-flop
bits and 33,700 bits of buffer memory. The memory is 43 routers times their input FIFOs.

## Simulation

Every testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. Each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/noc_pkg.sv \
          tb/tb_adaptive_noc_top.sv --top-module tb_adaptive_noc_top
./obj_dir/Vtb_adaptive_noc_top
```

Replace the name for the other testbenches:

| testbench | what it checks |
|-----------|----------------|
| `tb_gradient_routing` | every pair of routers in a 6x6 mesh, plus random fault and busy masks, against an independent zone model |
| `tb_diagonal_routing` | every pair in a 4x4x4 mesh against the 48-row zone table, plus random masks |
| `tb_flit_fifo`, `tb_rr_arbiter`, `tb_crossbar` | random traffic against reference models |
| `tb_switch_control` | directed cases at one router: main, alternatives, busy outputs, border, U-turn, dead end |
| `tb_noc_router` | one router in both flow-control modes: packet integrity, order and the 2-cycle header latency |
| `tb_noc_mesh` | a 4x4 mesh with two faulty nodes and a faulty link, and a 3x3x3 credit mesh with a faulty centre node; random traffic, every packet checked on delivery |
| `tb_adaptive_noc_top` | the default top, both networks. Uniform random traffic at 0.005 (2D, 10-24 flit packets) and 0.004 (3D) packets/cycle/router with two faulty nodes each. Then dead-end scenarios. Checks every packet and that each of the six events occurred |
| `tb_workload_hops` | the 20 single and double fault cases around a centre router in a 5x5 mesh. Checks the hop count of each detour |
| `tb_workload_hops` (3D part) | four source and destination pairs in a 3x3x3 Diagonal mesh. Checks the minimal hop counts 4, 4, 5 and 6 |
| `tb_workload_mesh` | random traffic on the evaluated network sizes: 6x6 with failed routers in the centre or near the border, 5x5, 10x10 with eight failed routers, 4x4x4, and about 1000 packets of 10-24 flits on a 4x4 mesh |

`tb/mesh_traffic.sv` generates traffic and scoreboards packets for the mesh testbenches. `tb/mesh_workload.sv` pairs it with a mesh.
`tb/router_env.sv` wraps a single router with sources and sinks.

## Departures from the original description and what is not built

* Gradient uses a main port and two alternatives, as in the routing pseudocode. One
  sentence in the prose speaks of three alternatives.
* The zone assignment of destinations on an axis, described above, follows the intended
  hop counts rather than the literal pseudocode conditions.
* A header with no usable port waits instead of being dropped. The U-turn fallback is this
  design's own addition to get packets out of dead ends.
* Buffer depth "8" for the 2D router is read as 8 flits.
* Packet format, phase tracking, the link signal names and the 2-cycle hop timing are this
  design's choices. They are modelled on the HERMES router the original was built on.
* Not built:
  * virtual channels;
  * the priority and QoS parameter adaptation studied for worst-case traffic;
  * the processing cores and the reconfigurable fabric;
  * the fault detection that would drive `node_fault` and `link_fault`.
