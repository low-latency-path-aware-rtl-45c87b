# PAR XY-X: a path-aware mesh router in SystemVerilog

Dimension-order (XY) routing sends every packet along one fixed path: first
along X, then along Y. When that path is congested, a packet waits, even if a
neighbouring path is free. Path Aware Routing XY-X (PAR XY-X) keeps the
simplicity of XY routing but lets a packet step aside. A packet moves along X.
When the next X hop does not answer in time, the packet takes one productive
step along Y instead and tries X again at the next router. So the path goes X,
then Y, then X again. "Not answering in time" is detected with a timeout on
the acknowledgement that the next router piggybacks on its own data link.

This repository holds synthesizable RTL for such a network: a five-port
wormhole router and a 16x16 mesh of them with 64-bit flits and 2-flit input
buffers. It also holds self-checking testbenches for every block and for the
whole mesh.

## The network

* **Topology.** `noc_mesh` is a `MESH_X` x `MESH_Y` mesh (default 16x16).
  Router (x, y) has index `y*MESH_X + x`. East is increasing x and north is
  increasing y. Each router has a local port for its processing element (PE);
  the mesh brings these out as `local_in[n]` and `local_out[n]`.
* **Packets and flits.** A packet is 1 to 9 flits of 64 bits. The two top
  bits give the flit type: `10` head, `00` body, `01` tail, `11` a
  single-flit packet. A head flit carries the destination and source
  coordinates (4 bits each, bits 61:46) and 46 free bits (`head_flit_t` in
  `noc_pkg`). Body and tail flits carry 62 bits of payload.
* **Switching.** Wormhole: the head flit reserves a path and the rest of the
  packet follows it. An output stays locked to the packet until the tail flit
  has passed.

## Links: VALID, WAIT and the piggybacked acknowledgement

Each pair of neighbouring routers is joined by two link directions. Each
direction carries three things (`link_t`):

| field   | meaning |
|---------|---------|
| `valid` | VALID: a flit is on the link this cycle |
| `flit`  | the 64-bit flit |
| `ack`   | WAIT: the flit travelling the *other* way this cycle was taken |

A flit moves when its VALID and the WAIT coming back are high in the same
cycle. WAIT is high when the receiving input buffer is not full. The
acknowledgement has no channel of its own: it rides on the reverse data link,
next to the flit the receiver is sending itself.

Inside the mesh, `par_router` keeps the WAIT bits in separate port vectors
(`in_ack` and `out_ack`) beside the VALID+flit structs (`chan_t`). This is the
same set of wires. Splitting them lets tools see that the outgoing
VALID/flit never depends combinationally on anything arriving from the
neighbours, so no combinational loop forms around the mesh.

**Timing.** A flit written into an input buffer at a clock edge can leave the
router in the next cycle. An uncontended hop therefore costs one cycle, and a
packet crossing h links reaches its destination PE h+1 cycles after the source
router accepted it.

## Inside the router

```
 in_chan[p] --> input_fifo[p] --> address_decoder[p] --\
                     |                                   mode_controller <-- congestion_flag_register
                     v                                        |                       ^
               port_controller[p] --req--> crossbar_arbiter   |                       | timeout
                     ^                          | gnt         v                       |
                     |                    crossbar_switch --> output_port_controller[p] --> out_chan[p]
                     \------ accepted <---------------------------  (WAIT from in_ack[p])
```

| module | role |
|--------|------|
| `input_fifo` | one per port, `BUF_DEPTH` flits, first-word fall-through so that the head flit is routed before it is popped |
| `address_decoder` | compares the head flit's destination with the router's coordinates and gives the X and Y directions still pending |
| `mode_controller` | the PAR XY-X rule (below): picks one output per input |
| `port_controller` | wormhole state per input: requests the chosen output for a head flit, then locks it for the body and tail |
| `crossbar_arbiter` | first-come first-served grant per output, plus the wormhole lock |
| `crossbar_switch` | 5x5 multiplexer from the granted inputs to the outputs |
| `output_port_controller` | drives VALID and the flit, watches WAIT, counts stalled cycles and raises `timeout` |
| `congestion_flag_register` | one flag per output: set by a timeout, cleared by the next acknowledged flit |

### The routing decision

For the head flit at each input, `mode_controller` selects:

1. Local port, if both the X and Y distances are zero.
2. The Y output, if only Y is still to go.
3. The Y output (a *detour*), if both X and Y are still to go, the X output's
   congestion flag is set, and the Y output's flag is clear.
4. Otherwise the X output.

When both outputs are congested, the packet keeps X. Only minimal hops are
ever taken, so a packet never moves away from its destination.

### Timeout and re-routing

While a head flit is offered on an output and not acknowledged, that output's
stall counter runs. After `TIMEOUT` unacknowledged cycles (default 4), the
output's congestion flag is set. In the next cycle, the head flit, which has
not yet left, is offered on its alternative Y output instead. The head flit
is not committed to an output until the next router has taken it. Until then
the port controller re-evaluates the choice every cycle, so withdrawing the
offer is safe.

Body flits never re-route: they follow the output their head flit took. A
congestion flag stays set until a flit is acknowledged on that output again.

### Arbitration and load shedding

Each output grants the input that has waited longest (first-come
first-served). An age matrix records, for each pair of waiting inputs, which
one came first. Requests that arrive in the same cycle are ordered by the
sending port: east, west, north, south, then local. Traffic already in the
network therefore goes before newly injected packets; this is the
load-shedding priority. A request that leaves (re-routed or accepted) loses
its place in the queue.

## Deadlock and the `WEST_FIRST` parameter

The unrestricted XY-X rule uses all four kinds of turn (X to Y and Y to X in
both senses). With wormhole switching and no virtual channels, this allows
cyclic waits. A 4x4 mesh under random traffic with stalling PEs does lock up
in simulation.

By default (`WEST_FIRST = 1`), only packets still heading east may detour.
Packets heading west follow plain XY. The turns then used are those of the
west-first turn model, which is deadlock-free for minimal routing. Set
`WEST_FIRST = 0` for the unrestricted rule, which can deadlock.

This restriction is a departure from the routing scheme as published, which
does not discuss deadlock.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `MESH_X`, `MESH_Y` | 16, 16 | `noc_mesh` | mesh size, at most 16 each (4-bit coordinates) |
| `BUF_DEPTH` | 2 | `noc_mesh`, `par_router` | input buffer depth in flits; 4 is the other evaluated depth |
| `TIMEOUT` | 4 | `noc_mesh`, `par_router`, `output_port_controller` | unacknowledged cycles before an output is marked congested (this design's choice) |
| `WEST_FIRST` | 1 | `noc_mesh`, `par_router`, `mode_controller` | restrict detours to eastbound packets |
| `CNT_W` | 32 | `noc_mesh`, `par_router` | width of the flit counters |

Flit width (64) and coordinate width (4) are constants in `noc_pkg`.

## Status outputs

`noc_mesh` reports, for each node and each cycle:

* `detour_evt`: a head flit left on its alternative Y output.
* `timeout_evt`: an output timed out.
* `contention_evt`: an output was wanted by several inputs.
* `ejected_flits`: the running count of flits delivered to the PE.

These are for measurement only and take no part in routing.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/` that compares
it against an independent model and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_input_fifo` | random push/pop against a queue model |
| `tb_address_decoder` | directions from random coordinates |
| `tb_mode_controller` | the selection rule, including detours |
| `tb_congestion_flag_register` | set/clear behaviour |
| `tb_port_controller` | wormhole locking, with heads re-routed while waiting |
| `tb_crossbar_arbiter` | grants against an explicit first-come first-served queue, including locked outputs |
| `tb_crossbar_switch` | switching |
| `tb_output_port_controller` | timeout and counters |
| `tb_par_router` | one router: one-cycle traversal, a detour exactly `TIMEOUT` cycles after the first offer, and a scoreboard over 750 random packets with stalling neighbours |
| `tb_noc_mesh` | a 4x4 mesh end to end |
| `tb_noc_mesh_full` | the same test at full default size: 16x16, 2-flit buffers |
| `tb_noc_workload_bd4` | the same test on 16x16 with 4-flit buffers |

The mesh testbenches check:

* the hop latency in an empty mesh (h links cost h+1 cycles);
* that every packet of a random traffic phase with stalling PEs reaches the
  right node, whole, in order and not interleaved;
* that detours, timeouts, contention, full buffers, PE stalls, and single-
  and multi-flit packets all occur;
* two workload phases, uniform-random and transpose, each run for 11,000
  cycles (1,000 warm-up) at 0.2 flits/cycle per PE with 1-9-flit packets. The
  testbench prints average latency (creation to tail ejection) and
  throughput, then drains the mesh and checks delivery.

Measured on the 16x16 mesh (one random seed, 0.2 flits/cycle/PE offered,
latency counted from packet creation, so source queueing is included):

| buffer depth | traffic | accepted throughput (flits/cycle/PE) | average latency (cycles) |
|---|---|---|---|
| 2 | uniform random | 0.047 | 13,600 |
| 2 | transpose | 0.101 | 6,300 |
| 4 | uniform random | 0.057 | 10,000 |
| 4 | transpose | 0.101 | 6,300 |

At this load the mesh is past saturation: sources queue up, and the latency
reflects that queueing.

The latency and throughput figures come from this RTL and its testbench
traffic model. They are not meant to reproduce any published curve: the
injection process, the traffic definitions and the latency measurement point
all differ between simulators.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/noc_pkg.sv rtl/*.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh
./obj_dir/Vtb_noc_mesh
```

Replace `tb_noc_mesh` with any other testbench name. The 16x16 testbenches
build slowly: several minutes of C++ compilation. They then simulate the
whole test in well under a minute.

## Where this RTL makes its own choices

The published scheme gives the block diagram of the router, the routing
procedure, the VALID/WAIT flags, the timeout with piggybacked acknowledgement,
FIFO arbitration, load shedding by sender, the 16x16 mesh, 64-bit flits,
buffer depths of 2 and 4 and packets of 1 to 9 flits. The following are
choices of this design:

* the flit format;
* the direction convention;
* the `TIMEOUT` value;
* when a congestion flag is cleared;
* keeping X when both outputs are congested;
* the age-matrix arbiter and its tie order;
* the first-word fall-through buffers and the one-cycle hop structure;
* the reset: asynchronous, active low, clearing all control state but not
  buffer contents;
* the west-first restriction;
* the status outputs.

The processing elements are not part of the design; the testbenches model
them as packet sources and sinks.
