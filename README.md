# Minimally buffered deflection router with an iSLIP scheduler

A network-on-chip router normally keeps an input buffer on every port. Those
buffers are a large share of the router's area and power. A *deflection*
router drops them. Every flit that enters must leave on some output in the
next cycle. When two flits want the same link, the loser is sent out on a
different link ("deflected") and tries again from wherever it ends up.

Pure deflection wastes link bandwidth under load, because flits wander away
from their destinations. This design adds two things to a deflection router:

* **A small side buffer** (four flits). Each cycle, up to one flit that is about
  to be deflected is pulled off the outputs and parked there. It is re-injected
  into the router when a pipeline slot is free.
* **An iSLIP scheduler** for output allocation. Its arbiters are programmable
  priority encoders (PPEs) with round-robin priority pointers, which gives
  starvation-free, fair arbitration.

The routers form a 2D mesh with XY routing. Each router has a network
interface (NI) that connects it to a core: a processor, memory, accelerator or
I/O block. The cores themselves are not part of this RTL.

## Flits and the mesh

Each packet is a single flit, because deflected flits travel independently. A
flit (`noc_pkg::flit_t`, 57 bits) holds:

| field          | bits | meaning                                   |
|----------------|------|-------------------------------------------|
| `valid`        | 1    | slot or link holds a flit                 |
| `dst_x, dst_y` | 4+4  | destination router                        |
| `src_x, src_y` | 4+4  | sending router (added by the NI)          |
| `data`         | 32   | payload                                   |

The router ports are numbered North=0, East=1, South=2, West=3 (`dir_e`). The
x coordinate grows to the East and y grows to the North. Node `n` of the mesh
sits at `x = n % MESH_X`, `y = n / MESH_X`. Each link is the registered output
of one router, so a flit moves one hop per clock.

## Inside the router (`minbd_router`)

The router has four lanes, one per link. In a single clock cycle the flits on
those lanes pass through six steps, in this order:

1. **Eject** (`eject_unit`). At most one flit addressed to this router leaves
   for the local NI. If several have arrived, a round-robin PPE picks one. The
   others stay in the pipeline and will be deflected; they come back later.
2. **Re-inject** (`slot_inject`). If the side buffer holds a flit and a lane is
   empty, the head of the buffer takes that lane.
3. **Inject** (`slot_inject`). If a lane is still empty, the NI's next flit
   takes it. `inj_ready` tells the NI that its flit was taken.
4. **Route and schedule** (`xy_route`, `islip_scheduler`). Each flit requests
   its XY output: it first moves along x, then along y. The iSLIP scheduler
   matches requests to outputs.
5. **Deflect and switch** (`deflect_alloc`, `crossbar`). Matched flits keep
   their outputs. Every other flit takes the lowest-numbered free output that
   exists. This includes flits that lost arbitration and arrived flits that
   were not ejected.
6. **Buffer eject** (`buffer_eject`). If the side buffer is not full, one
   deflected flit (round robin among them) is taken off its output and pushed
   into the buffer. Its output then stays empty this cycle.

The outputs and the ejected flit are then registered.

**Why deflection never fails.** Flits are only placed in lanes whose link
exists, and a router at the mesh edge has fewer links. So a router never holds
more flits than it has outputs, and a deflected flit always finds a free
output. An assertion in the router checks flit conservation every cycle:
flits in plus injected plus re-injected must equal flits out plus ejected plus
buffered. A second assertion checks that nothing is sent off the mesh.

**A deflected flit addressed to this router is never buffered.** It has to
leave over a link and come back. Otherwise it could circle forever between
the side buffer and the pipeline of one router.

**Event outputs.** The router pulses one signal per event: `ev_eject`,
`ev_inject`, `ev_reinject` and `ev_buf_push`. It also raises `ev_buf_full`
(flits are deflected while the buffer is full), `ev_contend` (two or more
flits requested the same output) and `ev_deflect` (a count of deflected flits
leaving this cycle). These can drive performance counters; the testbenches
use them.

## The iSLIP scheduler (`islip_scheduler`, `ppe`)

A `ppe` receives N request bits and a priority position. It grants the first
request found by searching upward from that position, wrapping around. It
uses a masked form: requests at or above the priority position win over those
below it.

`islip_scheduler` (N inputs, M outputs) runs `ITER` iterations, each with
three steps:

* **Request:** every unmatched input requests every output it wants.
* **Grant:** every unmatched output grants the request its PPE picks,
  starting from the output's grant pointer.
* **Accept:** every unmatched input accepts the grant its PPE picks,
  starting from the input's accept pointer.

Only accepts in the first iteration move the pointers, each to one beyond its
partner. So the requester that was just served gets the lowest priority next
time, and the output arbiters drift apart rather than all picking the same
input.

Under a constant full request load, a 4×4 scheduler with one iteration reaches
a full match (four transfers per cycle) within four cycles, and the testbench
checks this.

In this router each input requests exactly one output, because XY routing
gives each flit a single productive port. One iteration therefore already
gives a maximal match, and `ITER` defaults to 1. The module is general: the
testbench also runs it with three iterations and random multi-output requests.

## Network interface (`network_interface`)

**Send side.** The core sends with a valid/ready handshake: `send_valid`,
`send_ready`, destination and data. The NI adds its own coordinates as the
source and queues the flit in a 4-entry FIFO (`flit_fifo`, the same module as
the side buffer). The flit waits there until the router finds a free lane.

**Receive side.** An ejected flit is presented for exactly one cycle on
`recv_valid`, together with its source and data. There is no back-pressure on
this side, so the core must accept the flit in that cycle.

## Timing

* **One hop takes one cycle.** A flit on a router's input is on that router's
  output register after the next clock edge.
* **Zero-load latency is hops + 1 cycles.** This is counted from the clock
  edge that accepts a packet into the NI to the edge that shows it on the
  destination's `recv_valid`. Example: corner to corner of a 3×3 mesh is
  4 hops and takes 5 cycles.
* **Measured load.** In one run of uniform random traffic at 30 % offered load
  per node on the 3×3 mesh, the mean latency was about 4.6 cycles and the
  maximum 19. On an 8×8 mesh, the same load gave a mean of about
  10.7 cycles, against about 6 at zero load. At that size 30 % per node is
  close to saturation for this router.

## Top level (`noc_mesh`)

`noc_mesh` builds a `MESH_X × MESH_Y` array of routers and NIs; links that
would leave the mesh are tied off. All core-side NI signals and the router
event signals are brought out as arrays indexed by node.

| parameter    | default | meaning                                      |
|--------------|---------|----------------------------------------------|
| `MESH_X`     | 3       | columns                                      |
| `MESH_Y`     | 3       | rows                                         |
| `SIDE_DEPTH` | 4       | side-buffer entries per router               |
| `ITER`       | 1       | iSLIP iterations                             |
| `INJ_DEPTH`  | 4       | NI injection-queue entries                   |

The coordinate fields are 4 bits wide, so meshes up to 16×16 work without
changes; widen `COORD_W` in `noc_pkg` for larger ones.

## Where this design makes its own choices

The architecture is fixed: a bufferless deflection router with one side buffer
of a few flits, the Eject → re-inject → Inject → allocate → buffer-eject order,
one eject and one buffer capture per cycle, and an iSLIP scheduler built from
round-robin PPEs on a mesh with XY routing. Everything below is this design's
own choice:

* **Allocator.** Allocation is done by iSLIP over a crossbar, followed by
  deflection of the unmatched flits. The classic minimally buffered deflection
  router uses a permutation network of 2×2 arbiter blocks instead; that
  network is **not** built here.
* **Livelock.** There is no golden-flit or age priority. The round-robin
  pointers are the only fairness mechanism, so freedom from livelock is not
  proven. In all simulated traffic every flit was delivered.
* **Details.** The single-cycle router, the flit format and widths, the port
  numbering, the tie-break rules (lowest free lane, lowest free output, round
  robin elsewhere) and the NI handshake and queue depth.
* **Reset.** All resets are synchronous and active high.

## Verifying and simulating

Every module in `rtl/` has a self-checking testbench in `tb/`, named
`tb_<module>`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`:

| testbench              | what it checks                                                             |
|------------------------|----------------------------------------------------------------------------|
| `tb_ppe`               | every request/priority combination, N = 4 and 5                            |
| `tb_islip_scheduler`   | cycle-by-cycle against a model of iSLIP; legal and maximal matches; desynchronisation |
| `tb_xy_route`          | every position/destination pair of an 8×8 mesh                             |
| `tb_flit_fifo`         | random push/pop against a queue model                                      |
| `tb_eject_unit`, `tb_slot_inject`, `tb_deflect_alloc`, `tb_crossbar`, `tb_buffer_eject` | each pipeline step against a model |
| `tb_network_interface` | flit formatting, queue order, back-pressure                                |
| `tb_minbd_router`      | directed cases (lone flit, contention into the side buffer and out again, double arrival, side buffer full) plus random traffic; scoreboard and event counts |
| `tb_noc_mesh`          | full 3×3 mesh at default parameters: zero-load latency, uniform random and hot-spot traffic, exactly-once delivery, every router mechanism seen |
| `tb_noc_mesh_8x8`      | the same test on an 8×8 mesh (64 routers) |

**Running a test.** With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_noc_mesh \
    -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_noc_mesh.sv
./obj_dir/Vtb_noc_mesh
```

The package `rtl/noc_pkg.sv` must be read first. Every testbench finishes in
well under a minute.
