# Predictive load balancing for a mesh of FPGAs

Several FPGAs can work as one machine if each carries a small router next to
its application logic, and the routers form a 2D mesh. This design is that
router and mesh. Packets travel by wormhole switching and follow the
odd-even turn model, which is deadlock-free. It also often leaves a packet
two minimal directions to choose from. The choice is the point of the
design. Each router keeps a *block history* per output port: a counter that
goes up whenever traffic through that port is held up and down whenever it
moves. When a header may go two ways, the router prefers the port with the
lower count. This works like a branch predictor. A port that has been
congested downstream is avoided before the congestion is met again. The
effect is largest for traffic that converges on one node (fan-in).

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It has no
vendor primitives.

## The network

`plb_mesh` is a `MESH_X x MESH_Y` array of routers, 16 x 16 by default.
Node `n = y*MESH_X + x` sits in column `x` and row `y`. North is `y+1` and
east is `x+1`. The mesh does not wrap around: ports on its edge are tied off.
Every router has five ports: north, east, south, west, and a local port to
the node's processing element (PE). The PE's side of each local port is a
top-level port of the mesh:

| port        | dir | per node | meaning                          |
|-------------|-----|----------|----------------------------------|
| `inj_valid` | in  | 1        | PE offers a flit to the network  |
| `inj_flit`  | in  | 33       | the flit                         |
| `inj_ready` | out | 1        | router accepts it this cycle     |
| `ej_valid`  | out | 1        | a flit for the PE                |
| `ej_flit`   | out | 33       | the flit                         |
| `ej_ready`  | in  | 1        | PE accepts it this cycle         |

Every channel uses valid/ready flow control. A flit moves at a rising edge
when both are high. Reset (`rst_n`) is synchronous and active low.

### Packets and flits

A flit is `flit_t = {last, data[31:0]}` (package `plb_pkg`). A packet is a
header flit followed by any number of payload flits. The flit with `last`
set ends the packet, and a header may itself be `last`. There is no
"header" bit: the first flit to reach an idle input is the header.

The header carries the destination as a *relative* offset: signed `dx` in
`data[7:0]` and signed `dy` in `data[15:8]`. Bits `data[31:16]` are free for
the application. `make_header(dx, dy, tag, last)` builds a header. Each
router moves the offset one step towards zero as the header leaves, so it
reads `dx = dy = 0` when it is ejected. A PE must address a node inside the
mesh. A packet aimed outside the mesh blocks at the edge.

## Inside a router (`plb_router`)

```
 in[p] --> plb_input_buffer (1 flit) --+--> plb_oe_route --> plb_route_alloc --> binding regs
                                       |                          ^   |             |
                                       |                 plb_block_hist <-----------+ events
                                       +--------------------> plb_crossbar --> out[o]
```

* **Input buffer** (`plb_input_buffer`): holds one flit per input port. It
  takes a new flit in the same cycle the old one leaves, so a packet can
  stream at one flit per cycle through one-flit buffers.
* **Route computation** (`plb_oe_route`): returns the one or two allowed
  minimal directions for the header in the buffer (see below).
* **Allocator** (`plb_route_alloc`): binds an output to each waiting header,
  choosing between two directions by block history.
* **Block history** (`plb_block_hist`): one saturating 8-bit counter per
  output.
* **Crossbar** (`plb_crossbar`): moves the flits of each bound input to its
  output and steps the header address. It also reports, per output, whether
  a flit moved or was refused downstream.

A binding is made for a whole packet. It is released in the cycle the
`last` flit leaves, and the input's next flit is then a header.

### Timing

* A header written into an input buffer at edge *t* is routed during the
  next cycle. The binding is registered at edge *t+1*. The header crosses to
  the next router's buffer at edge *t+2*.
* Payload flits follow one per cycle. With nothing blocked, a 20-flit packet
  passes a router in 21 cycles: one routing cycle and 20 transfer cycles.
* Back-pressure is immediate. `in_ready` of a buffer is combinational in the
  `out_ready` of the output its packet is bound to. A stall therefore runs
  back along the whole worm within the cycle.

That last point has a consequence for tools. Neighbouring routers' ready
signals form structural loops around every square of the mesh. At run time
only the links held by packets are active, and the odd-even rules keep those
acyclic, so the logic always settles. Verilator still reports `UNOPTFLAT` on
the mesh, and a timing tool will see the loops too. An FPGA build would need
the loops constrained or cut with a second buffer slot.

## Choosing a direction

### Odd-even routing (which directions are allowed)

The odd-even turn model is deadlock-free without virtual channels. It
forbids three kinds of turn:

* any 180-degree turn;
* in an **even** column, a packet that came in from the west may not turn
  north or south;
* in an **odd** column, a packet may not turn to the west.

On top of that, the route logic avoids dead ends. The cases below are
`plb_oe_route` in full; `col` is the router's column and `dest` the
destination column (`col + dx`):

| offset                | allowed directions                                                   |
|-----------------------|----------------------------------------------------------------------|
| `dx = 0, dy = 0`      | local (eject)                                                        |
| `dx = 0, dy != 0`     | N or S                                                               |
| `dx > 0, dy = 0`      | E                                                                    |
| `dx > 0, dy != 0`     | N/S if `col` is odd or the packet did not enter from the west; E if `dest` is odd or `dx != 1` |
| `dx < 0, dy = 0`      | W                                                                    |
| `dx < 0, dy != 0`     | W; also N/S if `col` is even                                         |

The rule "E only if `dest` is odd or `dx != 1`" stops a packet from entering
an even destination column from the west. It could not turn north or south
there. The rules as usually written test whether the router is in the
source column. The header here carries only an offset, so that test is
replaced by "did not enter from the west". For every packet the rules can
produce, the two tests give the same answer. When two directions are
allowed, `dir0` is the north/south one.

### Predictive load balancing (which of the two)

All waiting headers are served oldest first, in the order they reached
their input buffers; headers arriving in the same cycle go in port order.
A registered 5 x 5 age matrix keeps that order. Each header, in turn:

1. If it has two directions and `hist[dir0] > hist[dir1]`, the directions
   swap: the less-blocked port becomes the preferred one. On a tie the
   north/south direction stays preferred.
2. The preferred output is tried. It is *available* if it is unbound, no
   older header took it this cycle, and the next router is ready. Success
   binds it and lowers its count by one. Failure raises its count by one
   (an *internal block*).
3. If that failed and there is a second direction, that output is tried
   the same way.

A header that gets no output waits and is tried again the next cycle, and
each try counts. Forwarding counts as well. Every cycle, each bound output
whose input holds a flit lowers its count if the flit moved. It raises the
count if the next router refused the flit (a *downstream block*). A bound
output with an empty input counts nothing. So an output that leads into
congestion gathers a high count while packets are stuck behind it, and
later headers that have a choice go the other way.

Counters saturate at 0 and 255 instead of wrapping. All events on one
output in one cycle are summed before saturating.

## Where this RTL makes its own choices

The following are this design's decisions, not part of the algorithm:

* Widths: 32-bit data, 8-bit signed offsets (meshes up to 128 x 128), 8-bit
  history counters.
* Valid/ready handshakes, the same-cycle buffer refill, and synchronous
  reset.
* Counter saturation. The algorithm leaves overflow open.
* The availability test for the preferred output includes the downstream
  ready.
* A header with only one allowed direction tries only that one.
* The history order is applied before availability is tested. A looser
  reading would consult the history only when both directions are free.
  Both pick the same port when only one of the two is free. They differ
  only in which counts are raised.
* The order of same-cycle arrivals, and Y-first on equal history.
* The neighbour links are single-cycle parallel channels. In a multi-FPGA
  system they would run over serial transceivers. Those, and the PEs with
  their application tasks, are not part of this RTL.
* The naive baseline, which always takes the north/south direction when
  both are free, is not provided.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
with an independent reference and prints `TB_RESULT checks=N failures=M`.

| testbench                | what it checks |
|--------------------------|----------------|
| `tb_plb_input_buffer`    | random traffic against a one-entry model; 20 flits in 20 cycles |
| `tb_plb_oe_route`        | every offset in a 9 x 9 window, every input port, both parities, against a reference built from the turn and dead-end rules |
| `tb_plb_block_hist`      | random event counts against a saturating model, both limits reached |
| `tb_plb_route_alloc`     | random headers, history, busy and ready against a reference that orders by arrival cycle; swaps, fall-backs and arrival-order wins all seen |
| `tb_plb_crossbar`        | random bindings: data, header step, buffer release, forward/block events |
| `tb_plb_router`          | routing latency (2 cycles) and 1 flit/cycle; Y-first on a tie; history steering a header away from a blocked port; 400 random packets on all five inputs |
| `tb_plb_mesh`            | 4 x 4 mesh, 12 packets of 20 flits per node, 30 % to a hot spot; each packet must arrive whole at its destination, and every mechanism must occur |
| `tb_plb_mesh_full`       | the same at the default 16 x 16 size: 1024 packets of 20 flits |
| `tb_plb_taskgraphs`      | task-graph traffic in four shapes on 4 x 4 meshes (below) |

Both mesh tests use `tb/plb_mesh_traffic.sv` as source and checker. It
counts history-driven swaps, fall-backs to the second direction, internal
blocks and downstream blocks, and fails if any of them never happens. A
16 x 16 run delivers all 1024 packets in about 6,400 cycles.

The workloads the algorithm was designed for are task graphs. Tasks run
for a fixed time and then send 20-flit packets to their successors.
`tb_plb_taskgraphs` runs the four shapes side by side, each on its own
4 x 4 mesh: linear fan-in, fan-in, diamond and linear. The PEs are
behavioural models in `tb/plb_taskgraph_sim.sv`. Each mesh carries two
six-task applications for six iterations, with a task time of 200 cycles.
The test checks that every packet reaches its task and that each iteration
completes. It prints the mean application execution time per shape. The
set-up is smaller than a full evaluation, which would use a 16 x 16 mesh,
eight 32-task graphs, 2000-cycle tasks and hundreds of iterations. The mesh
can carry that at its default size, but the PE models would need scaling
up. The test also runs only the predictive scheme, so it does not compare
it with a naive one.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/plb_pkg.sv rtl/plb_mesh.sv tb/tb_plb_mesh.sv --top-module tb_plb_mesh
./obj_dir/Vtb_plb_mesh
```

For another block, swap in its module and testbench. Files are found
through `-I` by module name. The 16 x 16 testbench takes several minutes
to build, and its simulation takes seconds. To try a different size or load,
change the parameters of `plb_mesh_traffic` in `tb/tb_plb_mesh.sv`:
`PKTS`, `LEN`, `HOT_PCT`, `INJ_PCT` and `EJ_PCT`.
