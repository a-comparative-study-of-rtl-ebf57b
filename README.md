# Resource sharing interconnection networks with distributed scheduling

In a multiprocessor with pools of identical resources (FFT engines, sorters,
matrix-inversion chips, or simply idle processors), a task does not need *a particular*
resource, it needs *any free one*. An ordinary interconnection network routes by
destination address, so somebody must first find a free resource and hand out its
address: a central scheduler that serves requests one at a time and becomes the
bottleneck. The networks here do without it. A processor only says "I need n
resources"; the network itself finds free ones and connects them, and many requests
are scheduled at once, in a time set by the network depth rather than the number of
requests.

This is synthesizable SystemVerilog for three such networks, following the paper
"A Comparative Study of Distributed Resource Sharing on Multiprocessors", which designs
and compares them:

| network | module | default configuration | scheduling done by |
|---|---|---|---|
| single shared bus | `sbus_rsin` | 16 processors, 1 bus, 32 resources | broadcast free count + random arbiter |
| crossbar (multiple shared buses) | `xbar_rsin` | 16 processors x 32 buses, 1 resource per bus | a wave through the crosspoint cells |
| Omega (equivalently cube) network | `omega_rsin` | 16 x 16 network, 2 resources per output | 2x2 exchange boxes that route, reject and backtrack |

`rsin_top` holds all three side by side with their ports brought out. They share
only the clock, reset and the task and beat formats.

Configurations are written the paper's way, `p/i x j x k N/r`: p processors, i
networks of type N, each with j inputs and k outputs, r resources on each output.
The defaults are `16/1x1x1 SBUS/32`, `16/1x16x32 XBAR/1` and `16/1x16x16 CUBE/2`.
Partitioned systems, such as eight 2x2 networks, are several instances with smaller
parameters.

## Common interface

`rsin_pkg` defines:

* `task_t`: `{tag[7:0], len[7:0]}`. A task is identified by its tag and takes `len`
  beats (at least 1) to transmit.
* `beat_t`: `{valid, last, tag[7:0]}`. One word on a bus or link. `last` marks the
  final beat of a task. The tag stands in for the payload: the data width is not part
  of the scheduling scheme.
* `mode_e`: the crossbar's `MODE_REQ` / `MODE_RST` line.

On every network a processor pushes tasks into its queue (`task_push`, `task_in`, and
`task_need` for the networks that support multi-resource requests). The queue is a
`task_fifo`: FIFO order, 8 entries by default, and a push into a full queue is dropped
and flagged as `overflow`. The task's beats come out at the resources it was given,
on `res_beat`/`bus_beat`, with a one-hot or multi-hot `res_sel`/`bus_sel` naming the
receiving resources. A resource stays busy until it pulses its `svc_done` input for
one clock. The resources themselves are outside this RTL. The testbenches model each
one as a timer.

## Single shared bus (`sbus_rsin`)

The bus continuously broadcasts the number of free resources (`free_cnt`). In every
cycle in which the bus is idle, each processor whose oldest task asks for no more
resources than are free is eligible. If several are, one is picked at random: a
16-bit LFSR sets where a round-robin scan starts. The winner gets its `need`
lowest-numbered free resources, which turn busy at once. It then drives its beats onto
the bus, one per clock, to all of them. The resources have no buffers, so while all
of them are busy the bus stands idle. The grant takes one clock and the L beats
follow in the next L clocks. The bus is free in the clock after the last beat, so
back-to-back tasks cost L+1 bus clocks each.

Only the head of each queue is looked at. A head task that asks for many resources
therefore holds back smaller tasks queued behind it. The paper specifies this.

## Crossbar (`xbar_rsin`, `xbar_switch`, `xbar_cell`)

Processors drive rows and resource controllers drive columns. Each column is one bus
with R resources on it. In a **request cycle** every waiting processor raises its row
signal X. Every controller whose bus is idle and has a free resource raises its column
signal Y. The signals ripple across the array from the top-left corner. At crosspoint
C(i,j):

| mode | X(i,j+1) | Y(i+1,j) | latch set | latch reset |
|---|---|---|---|---|
| request | X & ~Y | ~X & Y & ~L | X & Y | - |
| reset   | X      | Y          | -     | X |

Data: `DO(i,j) = (L ? DI(i) : 0) | DO(i+1,j)`, a wired-OR up each column to the
controller.

So a request that meets a resource signal sets the latch and stops both signals. A
request that finds none moves right, and a resource signal that finds no request
moves down. The `~L` term lets a crosspoint that already holds a connection absorb the
resource signal. That is what keeps an allocation made in an earlier cycle from being
disturbed when a bus is offered again. At the edges:

* A processor that reads X=1 back at the right end (`x_ret`) was not served. It
  resubmits in the next request cycle.
* A controller that offered Y=1 and reads 0 back at the bottom (`y_ret`) has had its
  bus taken. It marks the bus busy and reserves its lowest free resource.

After its last beat a processor raises X in the next **reset cycle**, which clears its
latch. The controller, having seen `last`, frees the bus at the end of that same reset
cycle. `xbar_rsin` alternates the two modes every clock, so an idle processor's first
beat appears at most 3 clocks after its task is pushed.

Properties worth knowing:

* The array is combinational from corner to corner. The clock period must cover
  roughly P+M cells of ripple. The paper counts 4 gate delays per cell in request mode
  and 1 in reset mode.
* Lower-numbered processors always see a free bus first, so priority is fixed. This
  is inherent in the scheme and is not corrected here.
* Each cell's outputs are declared in their own generate scope (`g_row[i].g_col[j]`)
  so that tools see the ripple as the acyclic chain it is.

## Omega network (`omega_rsin`, `omega_net`, `xbox`)

`omega_net` is a standard N x N Omega network: log2 N stages of N/2 2x2 boxes, with a
perfect shuffle before each stage. Link l enters box position rotl(l), so box b of a
stage takes links rotr(2b) and rotr(2b+1). Box b of the last stage feeds resource
ports 2b and 2b+1. The cube network is the same network with its inputs and outputs
renamed, and behaves identically.

Each link carries five kinds of control, all counts of resources:

| signal | direction | meaning | encoding |
|---|---|---|---|
| Q | forward | query: resources wanted | 1-clock pulse + count |
| L | forward | release the connection | 1-clock pulse |
| S | backward | free resources reachable through this link | level |
| J | backward | resources of a query rejected | 1-clock pulse + count |
| C | backward | resources of a query found | 1-clock pulse + count |

### The exchange box (`xbox`)

This is the core of the design. Each box keeps one **availability register** A per
output port, holding the S last reported through that port. It reports on both input
ports S = A(upper) + A(lower), leaving out any port that is in use. Every clock it
services, in this order:

1. **Status.** A(o) is loaded when S(o) *changes*. An unchanged S does not overwrite
   an A that was zeroed by a query.
2. **Release.** L on input k is passed to every output port that input owns, and
   those ports are freed. A is not touched: the resources behind the port may still be
   busy serving, and the downstream status will say when they are free.
3. **Completions.** C from output o is added to the count found for the input that
   owns o.
4. **Rejects**, larger first. J(n) from output o reduces what is outstanding on o; if
   nothing is left, o is freed. The n resources are then sought through the *other*
   output port, if it is unused and its A is non-zero (a **reroute**). Whatever still
   cannot be placed is sent back to the previous stage as J on the input (a
   **backtrack**), and the input's outstanding query shrinks by that much.
5. **Queries**, larger first, with a random choice on a tie. The query goes to the
   unused port with the larger A (again random on a tie) and takes as many as that A
   allows. The port's A is zeroed, because the link is now taken. Any remainder goes to
   the other port (a **split**, the broadcast setting of the box), and anything left
   after that is rejected straight back. A query rejected in full leaves no state
   behind.
6. **Completion out.** When the count found for an input equals what it still
   queries, one C with that count goes back to the previous stage.

An output port carries one input's connection at a time. One input may hold both
ports when its query was split. Data beats follow the connections combinationally:
`d_out[o] = d_in[owner(o)]`. Every control output is registered, so a query costs one
clock per stage each way. In the 8x8 network a single-resource request that meets no
conflict sees its completion 7 clocks after it is issued: 3 stages forward, 1 clock at
the resource port, and 3 stages back. The box also reports `ev_reroute`,
`ev_backtrack` and `ev_split`. `omega_net` sums these over all boxes.

### Ends of the network

* `omega_proc_port` (processor end). It waits until the status on its link covers
  the head task's need. It then sends Q after a random delay of 0 to 2^BACKOFF_W - 1
  clocks, counted from the latest status change, so that processors woken by the same
  change do not all collide. It then collects C and J. If the whole query completed, it
  sends the beats and then L. If any part was rejected, it releases whatever was found,
  keeps the task, and retries only after the status changes again.
* `omega_res_port` (resource end, R resources). It reports its free count as S and
  takes min(n, free) of a Q(n). The taken part is answered with C and the rest with J,
  both one clock later. The link stays connected to the taken resources until L
  arrives. A resource taken but released without receiving any beat (a processor
  giving up a partial allocation) is freed at once.

## Behaviour under load

`tb_workload` gives twelve 16-processor systems the same random task stream. Each task
needs one resource. Arrivals are Bernoulli per clock, close to Poisson, and lengths
and service times are rounded exponentials. The systems are partitioned as in the
paper's study: k networks, each serving 16/k processors with its own resources. It
uses the paper's load measure, rho = 16 lambda (1/(16 mu_n) + 1/(32 mu_s)), with
lambda the arrival rate per processor, 1/mu_n the mean transmission time and
1/mu_s the mean service time. Mean wait, from arrival to first beat, in clocks, for
one run:

| system | mu_s/mu_n = 0.1, rho 0.08 | rho 0.20 | mu_s/mu_n = 1.0, rho 0.02 | rho 0.06 |
|---|---|---|---|---|
| 16/1x1x1 SBUS/32   | 4.48  | 31.62 | 4.74  | 27.99 |
| 16/2x1x1 SBUS/16   | 3.59  | 4.92  | 3.71  | 6.00  |
| 16/8x1x1 SBUS/4    | 3.08  | 3.35  | 3.14  | 3.48  |
| 16/16x1x1 SBUS/2   | 3.20  | 3.88  | 3.04  | 3.21  |
| 16/16x1x1 SBUS/3   | 3.04  | 3.17  | 3.04  | 3.20  |
| 16/1x16x32 XBAR/1  | 3.56  | 3.73  | 3.58  | 3.78  |
| 16/4x4x8 XBAR/1    | 3.56  | 3.73  | 3.58  | 3.78  |
| 16/8x2x4 XBAR/1    | 3.56  | 3.78  | 3.58  | 3.78  |
| 16/4x4x4 XBAR/2    | 3.56  | 3.73  | 3.58  | 3.78  |
| 16/1x16x16 CUBE/2  | 13.71 | 15.01 | 13.30 | 14.37 |
| 16/2x8x8 CUBE/2    | 11.49 | 12.38 | 11.22 | 12.02 |
| 16/4x4x4 CUBE/2    | 9.33  | 9.91  | 9.16  | 9.72  |

How to read it:

* The unpartitioned single bus is the one that saturates. Its sustainable rho is small
  under this normalisation, because every transmission passes through one bus.
* Partitioning helps until the resources, not the bus, become the bottleneck. With
  two private resources per processor (SBUS/2), the wait at mu_s/mu_n = 0.1 is
  longer than with 8 partitions.
* At these loads the crossbar's wait is close to its fixed cost: up to one clock for
  the queue, one request/reset pair, and the wait for the next request cycle.
* The Omega network pays a round trip through 2 log2 N registered stages, plus a
  random backoff, for every request. At light load it is therefore the slowest of
  the three here. In the paper's self-timed networks that round trip is a few gate
  delays per stage, not a clock.

The testbench checks delivery and the trends the paper states. For the single bus,
the wait grows with load and shrinks with more partitions, and a crossbar beats it
when transmission dominates. In the paper's cost comparison, 16/16x1x1 SBUS/3 waits
less than 16/4x4x4 CUBE/2 and XBAR/2. The testbench does not reproduce the paper's
curves. Those come from a queueing model with continuous times.

## Where this RTL departs from or adds to the paper

The paper describes these networks at the level of truth tables, signal meanings and
a per-box algorithm. The following are this implementation's choices:

* **Synchronous.** The paper's networks are self-timed waves. Here each crossbar
  request or reset cycle is one clock, each control hop in the Omega network is one
  clock, and everything has an active-low asynchronous reset.
* **Crossbar modes** simply alternate every clock. The paper only requires a single
  MODE line. How the resource controller learns that a bus is free again (the `last`
  beat, then the next reset cycle) is also this design's.
* **Crossbar data gating.** The paper gives `DO = L*DI + DO(below)` for request mode.
  The same form is used in reset mode as well, so a processor's data only ever reach
  its own bus.
* **Shared-bus eligibility.** A task may go when need <= free count, not only when
  need < free.
* **Omega box details.** Ports in use are left out of S. The port that rejected a
  query is not tried again for the same reject. Ties are broken with per-box 8-bit
  LFSRs. Processors give up partly satisfied queries. The resource-port behaviour is
  inferred from the signal meanings, because the paper does not describe the resource
  end.
* **Widths and depths** (8-bit tags and lengths, 8-entry queues, count width
  ceil(log2(N*R+1))) are not given by the paper.
* **Not implemented.** Multiple resource *types*. The paper sketches this as a type
  code per request and one availability register per type. Also not implemented are
  the alternative crossbar with separate request and reset lines, and address-mapping
  mode.
* The Markov queueing analysis and the delay-versus-load curves are performance
  results, not hardware. They are not reproduced.

## Verification

Each module has a self-checking testbench in `tb/` ending in
`TB_RESULT checks=N failures=M`, with a watchdog:

| testbench | what it establishes |
|---|---|
| `tb_xbar_cell` | every row of the cell truth table in both modes, latch and data |
| `tb_xbar_switch` | 400 random cycles against a row-by-row reference model |
| `tb_xbar_res_ctrl`, `tb_xbar_proc_port` | offer/allocate/release and request/resubmit/relinquish sequences |
| `tb_xbar_rsin` | random load with 6 processors on 3 buses; exactly-once delivery, one owner per bus, idle latency of at most 3 clocks |
| `tb_sbus_rsin` | free-count broadcast, grants only when the request fits, resources per task, bus hold time = task length |
| `tb_xbox` | hand-worked routing, split, backtrack, reroute and larger-first cases |
| `tb_omega_net` | the paper's 8x8 example (R0, R1, R4, R5 free; P0, P3, P4, P5 request): status 4 everywhere, full allocation, 7-clock round trip, the example's average delay of 3.50 forward hops (one request turned back at stage 1 and rerouted), then an overloaded round that backtracks 3 of 5 |
| `tb_omega_res_port`, `tb_omega_proc_port` | the two ends of a link |
| `tb_omega_rsin` | random 1-3 resource requests on an 8x8 network, with reroute, backtrack and split all required to occur |
| `tb_task_fifo` | queue model, overflow, simultaneous push and pop |
| `tb_workload` | the queueing workloads above (uses the harness `wl_sys`) |
| `tb_rsin_top` | all three networks at default size (16 processors, 32 resources each) under heavy load. Every task must reach exactly its resources, and each mechanism must occur: bus contention and blocking, crossbar blocking, Omega reroute, backtrack, split and reject, and a full queue |

To run one with plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
          -Irtl -y rtl -y tb rtl/rsin_pkg.sv tb/tb_rsin_top.sv --top-module tb_rsin_top
./obj_dir/Vtb_rsin_top +verilator+rand+reset+2
```

`-Wno-fatal` keeps style warnings, such as the
multi-driven note on a forced testbench variable, from stopping the build. `+verilator+rand+reset+2` starts every uninitialised variable at a
random value, so missing resets show up. `tb_workload` takes about 50 seconds to
build and 2 seconds to run.

The full-size `tb_rsin_top` builds in well under a minute and simulates in under a
second.

Size at the defaults (coarse synthesis of `rsin_top`): about 37,000 word-level cells
and 6,500 flip-flops. The Omega network's 32 exchange boxes and the crossbar's 512
crosspoints make up most of it.

## Files

* `rtl/rsin_pkg.sv`: shared types
* `rtl/task_fifo.sv`: processor task queue
* `rtl/sbus_rsin.sv`: single shared bus
* `rtl/xbar_cell.sv`, `rtl/xbar_switch.sv`, `rtl/xbar_res_ctrl.sv`,
  `rtl/xbar_proc_port.sv`, `rtl/xbar_rsin.sv`: crossbar
* `rtl/xbox.sv`, `rtl/omega_net.sv`, `rtl/omega_res_port.sv`,
  `rtl/omega_proc_port.sv`, `rtl/omega_rsin.sv`: Omega network
* `rtl/rsin_top.sv`: the three networks side by side
* `tb/tb_*.sv`: one testbench per module, plus `tb_workload`
* `tb/wl_sys.sv`: load harness wrapping one partitioned system
