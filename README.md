# Q-learning deflection routing for a heterogeneous 3D network-on-chip

Chips that stack dies of different kinds end up with irregular networks.
Cores of different sizes leave gaps in the mesh, links have different lengths,
and only a few through-silicon vias (TSVs) join the layers. A routing table or
turn model designed for one such arrangement fails when the arrangement
changes: another chip, a dead TSV, a new traffic pattern.

This design combines two ideas so that nothing about the topology has to be
known at design time:

* **Buffer-less deflection routing.** Every packet is one flit. A router keeps
  no packets: each packet that enters leaves four cycles later on *some*
  output. If its preferred output is taken by an older packet, it is deflected
  to another one. Nothing blocks, so there is no deadlock. Oldest-first
  priority prevents livelock. Every router with a working link can still be
  reached.
* **Q-learning of latencies ("L-Learning").** Each router keeps a Q-table with
  one row per destination and one column per output. An entry is the
  router's estimate of how many cycles a packet needs to reach that
  destination through that output. A packet takes the cheapest free output.
  The router that receives it returns its own estimate, which the sender uses
  to refine its entry. The tables start empty and adapt at run time to the
  topology, to faults and to the traffic.

The RTL builds the complete network: routers, links, TSVs and network
interfaces. Its default configuration is a 30-router, three-layer system. The
same RTL also builds a regular X×Y×Z mesh.

## The default system

Routers 0–15 form the bottom layer and 16–28 the mid layer. Router 29 is the
only router on the memory layer. Horizontal link latencies are in cycles.
Every TSV takes one cycle.

| layer  | links (latency)                                                                                                                                               |
|--------|---------------------------------------------------------------------------------------------------------------------------------------------------------------|
| bottom | 0-1 (1), 1-2 (3), 2-3 (4), 1-7 (4), 6-7 (1), 7-10 (1), 10-11 (1), 11-12 (1), 12-13 (1), 13-14 (1), 14-15 (3), 3-15 (4\*), 13-8 (1), 8-9 (1), 4-8 (2), 4-5 (2), 2-4 (2) |
| mid    | 16-17, 17-18, 18-19, 19-20, 20-21 (1 each), 16-22 (2), 22-25 (3), 25-26 (1), 26-27 (1), 27-28 (2), 23-28 (1), 23-24 (1\*), 20-23 (4)                              |
| TSVs   | 2-20, 8-23, 11-27 (bottom to mid), 23-29 (mid to memory)                                                                                                        |

\* These two latencies are this design's assumption. All the others belong to
the described floorplan.

Directions follow the floorplan drawings: up is N, right is E, and a TSV is
U or D. The whole table is in `noc_pkg.sv` (`IRR_EDGE`), and the
`topo_neighbor`, `topo_len` and `topo_mask` functions derive each router's
ports from it. `TOPO = TOPO_MESH` builds a mesh instead. There, node
`x + X*y + X*Y*z` has E/W along x, N/S along y and U/D along z, and every
link takes one cycle.

## Packets and ports

A packet (`pkt_t`, 71 bits) holds the following fields:

* a valid bit;
* a set-up flag;
* a 7-bit destination and a 7-bit source;
* an 8-bit age, which counts the routers visited and saturates;
* a 16-bit injection time stamp;
* a 32-bit payload.

Each router has seven ports, in Q-table column order: S, W, E, D, R, U, N.
R is the local port to the network interface. Beside each link runs a return
channel (`fb_t`: valid, destination, 8-bit estimate) with the same latency as
the link.

## The router pipeline

The path from input to output is four register stages (N2 = 4 cycles):

| stage | module             | what happens                                                                                                                                             |
|-------|--------------------|----------------------------------------------------------------------------------------------------------------------------------------------------------|
| 1     | `pkt_input_adjust` | Register the six link inputs and an injected packet. Add one to each age. Flag packets addressed to this router.                                       |
| 2     | `sort_block`       | Rank the packets oldest first (ties go to the lower port) and permute them into that order.                                                             |
| 3     | `output_select`    | Serve packets in order. A packet for here takes R if R is free. Any other packet takes the free, enabled network output with the lowest Q-value for its destination. |
| 3     | `congestion_meter` | For each packet that came over a link, return {destination, Q-value of the output it got} on that link. A packet ejected here returns 0.               |
| 4     | `output_xbar`      | Steer each packet to its output and register the outputs.                                                                                               |

The Q-table (`q_table`) is read in stage 3 with the destinations of the sorted
packets. Seven rows are read at once. Only the columns of connected ports
hold storage.

**The injection rule keeps the router buffer-less.** The network interface's
packet is admitted only when fewer packets arrive on the links than the
router has usable outputs. So every packet can always be given an output. An
assertion in `output_select` checks that no packet is ever left without one.
A packet for this router that loses the R port to an older one is deflected
like any other packet. It comes back later.

**Empty entries count as cost 0.** An output that has never been tried
therefore looks attractive and gets explored. Once a packet has used it, the
entry holds a real, larger value.

## How the estimates are learned

Router A sends a packet for destination D to neighbour B through output p.
B picks its own output q for the packet and returns N3 = Q_B[D][q]. When the
estimate reaches A, `q_update` computes:

    C_est = N1(p) + N2 + N3            (link cycles + B's 4 pipeline cycles + B's estimate)
    C_new = C_old + alpha * (C_est - C_old),  alpha = ALPHA_NUM / ALPHA_DEN = 1/2

An empty entry takes C_est directly. Results saturate at 255.

The step alpha·(C_est − C_old) is rounded away from zero, so an entry always
moves at least one cycle toward a new estimate. With plain truncation, a small
learning rate such as 0.1 turns every step smaller than one cycle into zero.
Entries then freeze below their true cost, and packets circle between routers
for thousands of cycles. Division is by a constant, so the unit stays small.

Worked example, for destination 29:

* Router 3 holds 41 for W and 53 for N, so it sends the packet west to
  router 2.
* Router 2 picks U (20 cycles) and returns 20. Router 3 computes
  C_est = 4 + 4 + 20 = 28 and stores 41 + (28 − 41)/2 = 34. The step
  −6.5 is rounded to −7.
* Router 2 later receives 14 from router 20 over the TSV. It computes
  C_est = 1 + 4 + 14 = 19 and moves its entry from 20 to 19.

Both cases are in the testbenches.

Each column of the Q-table has its own update port, fed only by the return
channel of its link. Up to six entries can therefore change per cycle without
conflict.

## Set-up phase

After reset every network interface runs `setup_sequencer`. It sends one
set-up packet to every other node in increasing id order, so 30 × 29 = 870
packets travel in the default system. These packets are routed like any
others, and the estimates they cause fill the Q-tables along their paths. At
their destination they are absorbed and counted (`setup_rx`). `setup_done[i]`
goes high once node i has sent its last set-up packet. Until then the
processing element's own packets wait in the interface FIFO.

## Network interface and latency

`network_interface` queues the element's packets in a 16-deep `sync_fifo`.
`tx_ready` falls when the queue is full.

A packet is stamped with the current cycle when the router accepts it. On
ejection, `rx_latency` is the current cycle minus the stamp. The latency
therefore runs from injection into the network to ejection, and excludes time
spent waiting in the FIFO.

For one hop over a link of L cycles, the latency is 4 + L + 4. In the default
system, the shortest path from 3 to 29 (3-2-20-23-29) takes 30 cycles.

## Faults

`link_fault[i][p]` takes the link at node i's port p out of service at both of
its ends. The routers stop using the link and stop admitting injections that
would need it. Deflection then carries the traffic around the fault, and the
Q-tables re-learn.

Apply a fault only while the link is empty. A packet already on a link when
it is cut could arrive at a router that has one usable output fewer, and that
case is not handled.

## Top-level interface (`noc3d`)

| parameter     | default          | meaning                                              |
|---------------|------------------|------------------------------------------------------|
| `TOPO`        | `TOPO_IRREGULAR` | the 30-router system, or `TOPO_MESH`                 |
| `MESH_X/Y/Z`  | 4 / 4 / 4        | mesh size (used only with `TOPO_MESH`)               |
| `FIFO_DEPTH`  | 16               | network interface queue                              |
| `ALPHA_NUM`   | 1                | learning rate ALPHA_NUM / ALPHA_DEN (at most 1)      |
| `ALPHA_DEN`   | 2                |                                                      |
| `N_NODES`     | derived          | 30, or X·Y·Z                                         |

All ports are arrays indexed by node:

* `tx_valid/tx_ready/tx_dest/tx_payload`: packets from the element to the
  network;
* `rx_valid/rx_src/rx_payload/rx_latency/rx_hops`: packets delivered to the
  element, one cycle after ejection;
* `setup_done`;
* `ev_deflect`, a per-router pulse when a packet is deflected;
* `link_fault`.

`clk` is the only clock. `rst_n` is an asynchronous, active-low reset.

## What is assumed, and what is left out

These points are this design's own choices:

* all field widths;
* the rounding of the learning step;
* the 8-bit Q-values;
* the FIFO depth;
* the return-channel format and its latency;
* treating empty entries as cost 0;
* the tie rules;
* the injection rule;
* time stamping at network entry;
* the order of the set-up packets;
* the two link latencies marked above.

One conflict in the source was resolved: the TSV between routers 8 and 23 is
kept, although one of the source's tables leaves that column out.

What the RTL does not have:

* There is no relative addressing for regular networks. Node ids are
  absolute everywhere.
* The baseline router with a fixed, designer-filled priority table is not
  included.
* Power is not modelled. The `ev_deflect` pulses and the delivered packets
  are the only activity the network reports.
* The cores and the memory are not included. Their interfaces are the
  top-level ports.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/` (`tb_<module>`).
Each ends by printing `TB_RESULT checks=N failures=M`, and each has a
watchdog.

| testbench              | what it shows                                                                                                                                                              |
|------------------------|----------------------------------------------------------------------------------------------------------------------------------------------------------------------------|
| `tb_q_update`          | The worked-example numbers (34, 19), saturation, and 2000 random cases at learning rates 0.5, 0.1 and 0.9 against a reference formula.                                |
| `tb_q_table`           | Empty after reset; load and update of the example entries; random two-column updates against a reference table.                                                         |
| `tb_router`            | Exact 4-cycle latency; a route changes when the learned values cross; returned estimates; oldest-first deflection; ejection; injection refusal; a disabled port.        |
| `tb_noc3d`             | Default 30-router system end to end; details below.                                                                                                                      |
| `tb_noc3d_alpha`       | Two copies of the 30-router system learning at 0.1 and at 0.9 under the same random traffic. All packets arrive; mean latencies are about 32 and 29 cycles.        |
| `tb_noc3d_mesh`        | The 4×4×4 mesh under uniform random and hotspot traffic (40 % to routers 59 and 21), at two injection rates each. All packets arrive.                                    |
| the others             | Each pipeline stage, the link, the FIFO, the set-up sequencer and the network interface, against reference models.                                                      |

`tb_noc3d` checks these properties:

* all 870 set-up packets arrive;
* about 18,700 random packets (a fifth of them to the memory node) arrive
  once, intact;
* an idle packet from 3 to 29 then takes 30–34 cycles (30 is the shortest
  path, and that is what the learned tables give);
* with TSVs 2-20 and 8-23 cut, the first packet from 3 to 29 wanders for
  about 170 cycles, but after 20 packets the latency is about 60 (the new
  shortest path is 55 cycles).

Every testbench was run with Verilator and all of them pass. `tb_noc3d` takes
well under a minute. `tb_noc3d_mesh` takes a few minutes.

Simulate one with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_noc3d \
        -y rtl -y tb +libext+.sv -Irtl rtl/noc_pkg.sv tb/tb_noc3d.sv -o sim
    obj_dir/sim

The testbenches use two-state semantics: everything that is read is reset or
driven.
