# Distro: a bufferless Clos-network cell switch with static round-robin scheduling

A three-stage Clos network (input modules, central modules, output modules)
scales to many more ports than one big crossbar, but it moves contention
into the middle of the fabric. The usual cures are buffers there: buffers in
the central stage let cells overtake each other, and shared-memory input and
output modules must run their memories n or k times faster than a line.

This design keeps **no buffer anywhere in the fabric**. All three stages are
plain crossbars; every cell waits in its input port card, in a virtual output
queue (VOQ) for its destination port, exactly as in a single-stage VOQ
crossbar switch. A cell may only enter the fabric when a path through all
three stages has been reserved for it in advance, so cells of one flow can
never be reordered and no stage memory needs speedup.

The price is a scheduling problem with four contention points per cell. It
is solved by **Distro**, a fully distributed scheduler made of small
round-robin arbiters, one per contention point. Its central trick is that no
arbiter pointer ever depends on what was granted ("static round-robin"):
the pointers start in a carefully staggered pattern and then step on a fixed
clock. Under heavy uniform traffic the staggering makes almost every
request collision-free, so the switch reaches 100% throughput without any
iteration or information exchange between arbiters.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, and fully
parameterised in the three Clos dimensions.

## Naming

| symbol | meaning | default |
|---|---|---|
| `n` (`N_PORT`) | ports per input module and per output module | 8 |
| `k` (`K`) | number of input modules (IM) and of output modules (OM) | 8 |
| `m` (`M`) | number of central modules (CM) | 8 |
| `N = n*k` | ports of the switch | 64 |

* `IP(i,g)`: input port `g` of input module `i`; top-level input index `p = i*n + g`.
* `OP(j,h)`: output port `h` of output module `j`; top-level output index `q = j*n + h`.
* `VOQ(i,g,j,h)`: the queue in `IP(i,g)` for `OP(j,h)`. The `n` VOQs of one
  IP bound for the same OM `j` form *VOQ group* `(i,g,j)`.
* `LI(i,r)`: the link from `IM(i)` to `CM(r)`. `LC(r,j)`: the link from `CM(r)` to `OM(j)`.

A non-blocking Clos network needs `m >= n`; the RTL assumes it.

## The four arbitration phases

Every timeslot each input port may send one cell and each output port may
receive one. A request `[j,h]` travels forward through four arbiters; a
grant travels back along the same path.

1. **In the input port, `IP(i,g)`** (module `ip_scheduler`). `Arbiter_j`
   (k inputs) picks a non-empty VOQ group, starting its search at
   `Pointer_j`. In parallel, each of the k `Arbiter_h(j)` (n inputs) picks a
   non-empty VOQ inside its group, starting at `Pointer_h(j)`. The request is
   `[j,h]`: the group chosen by `Arbiter_j` and the VOQ chosen by that
   group's `Arbiter_h`. It is stored in the request register.
2. **On link `LI(i,r)`** (in `input_module`). No search at all: the link
   simply takes the request of port `g = Pointer_g(i,r)`. The m pointers of
   one IM are always a permutation, so the IM crossbar is conflict-free by
   construction.
3. **On link `LC(r,j)`** (in `central_module`). Among the links `LI(i,r)`,
   i = 0..k-1, whose request names OM `j`, `Arbiter_i(r,j)` picks one,
   starting at `Pointer_i(r,j)`, and passes `[h]` on to `OM(j)`.
4. **At output port `OP(j,h)`** (in `output_module`). Among the links
   `LC(r,j)`, r = 0..m-1, that carry `[h]`, `Arbiter_r(j,h)` picks one,
   starting at `Pointer_r(j,h)`.

An output port's grant is returned to the LC it picked, from there to the LI
the LC picked, and from there to the input port that LI served. That input
port sends the head cell of `VOQ(i,g,j,h)` in the next slot, and every
arbiter that took part has stored the matching crossbar setting.

All arbiters are the same `rr_arbiter`: a programmable priority encoder made
of two plain priority encoders, one over the requests at or above the
pointer and one over all requests (the wrap-around case).

## Static pointers: why they stay out of step

This is the least obvious part of the design. All pointers are reset to a
staggered pattern. For every input port `(i,g)`, with `j = (g+i) mod k`,
`h = i` and `r = (j-i) mod m`:

```
Pointer_j(i,g) = j          Pointer_h(i,g,*) = h      Pointer_g(i,r) = g
Pointer_i(r,j) = i          Pointer_r(j,h)   = r
```

After reset they step on a fixed schedule, whatever was granted:

| pointer | owner | steps by one every | counted modulo |
|---|---|---|---|
| `Pointer_j(i,g)` | IP(i,g) | slot | k |
| `Pointer_h(i,g,j)` | IP(i,g), all groups | k slots | n |
| `Pointer_g(i,r)` | LI(i,r) | slot | m |
| `Pointer_i(r,j)` | LC(r,j) | slot | k |
| `Pointer_r(j,h)` | OP(j,h) | k slots | m |

Take `n = m = k` and every VOQ backlogged. In slot `t`, `IP(i,g)` asks for
group `j = (g+i+t) mod k` and, inside it, port `h = (i + floor(t/k)) mod n`.
Link `LI(i,r)` carries port `g = (r+t) mod n`, so the k links entering
`CM(r)` carry requests for k different OMs (`j` differs with `i`): no LC
conflict. For a fixed `OP(j,h)`, `h` fixes `i` and then `j` fixes `g`: exactly
one input port asks for each output port. Every request is granted, every
output receives a cell every slot, which is where the 100% throughput under
uniform load comes from. When VOQs run empty the arbiters fall back to
searching, requests start to collide, and the fixed schedule still spreads
the collisions evenly.

The pointers of `Pointer_i` and `Pointer_r` in pairs `(r,j)`, `(j,h)` that
the reset rule never reaches (possible when `k != n` or `m != k`) start at
`(j-r) mod k` and `(j-h) mod m`. The links of an IM that the rule does not
reach (when `m > n`) take the spare pointer values `n, n+1, ...` in order
of `r`; a link whose pointer is `>= n` serves no port in that slot. Both are
this design's own completions of the rule (`distro_pkg`).

## Timing

One clock cycle is one timeslot. A slot's arbitration is split over two
cycles:

```
cycle t    cell arrives on in_*, in_ready high        -> stored in its VOQ
cycle t+1  Phase 1 in the input port                  -> request register
cycle t+2  Phases 2-4 and the grant return (combinational through
           IM -> CM -> OM -> CM -> IM -> IP)          -> crossbar settings,
                                                         grant register
cycle t+3  head cell read from the VOQ, crosses IM, CM and OM crossbars
cycle t+4  cell on out_valid/out_data (output line register)
```

So the smallest latency through the switch is 4 cycles, and the switch
accepts and delivers one cell per port per cycle. Because Phases 2-4 handle
the request Phase 1 made one cycle earlier, the network modules leave reset
one cycle after the input ports (`net_rst_n`); that keeps every pointer
pair in the relationship shown above.

The combinational path of the second stage passes three arbiters forward
and three grant merges back; a faster clock would need that path cut into
more pipeline stages, which the pointer-alignment scheme above extends to
directly (delay the network reset by the number of added stages).

## Input port card

`input_port` holds the `N` VOQs (`voq_buffer`, one array of `N*DEPTH` cells,
per-queue head pointer and count) and the Phase 1 scheduler. A cell is
offered on `in_valid` and taken when `in_ready` is high; `in_ready` is low
while the VOQ for the offered destination is full, and the source must hold
the cell. Depth per VOQ is `DEPTH` (default 32).

The scheduler's state is kept as one count per VOQ of cells that are stored
but not yet requested; the VOQ-occupancy bits and group bits the arbiters
look at are the non-zero flags of these counts. A cell leaves the count when
its VOQ is written to the request register and returns if that request is
refused. This is what lets the request register and the one-slot pipeline
work without ever requesting a cell twice.

## Modules

| file | contents |
|---|---|
| `rtl/distro_pkg.sv` | default sizes, reset values of all pointers |
| `rtl/rr_arbiter.sv` | round-robin arbiter (two priority encoders) |
| `rtl/crossbar.sv` | bufferless NI x NO crossbar |
| `rtl/voq_buffer.sv` | the N VOQs of one input port |
| `rtl/ip_scheduler.sv` | Phase 1: state, Arbiter_j, k x Arbiter_h, request register |
| `rtl/input_port.sv` | input port card: VOQs + Phase 1 + grant register |
| `rtl/input_module.sv` | IM: n x m crossbar + Phase 2 link pointers |
| `rtl/central_module.sv` | CM: k x k crossbar + Phase 3 arbiters |
| `rtl/output_module.sv` | OM: m x n crossbar + Phase 4 arbiters + output registers |
| `rtl/distro_switch.sv` | top level: N input ports, k IMs, m CMs, k OMs |

Top-level ports of `distro_switch` (all packed arrays, synchronous
active-low reset `rst_n`): `in_valid[N]`, `in_j[N]`, `in_h[N]`,
`in_data[N][DATA_W]`, `in_ready[N]`, `out_valid[N]`, `out_data[N][DATA_W]`.

## Own choices and departures

The scheduling algorithm, its pointer reset pattern and update schedule, the
structure of the input-port scheduler and the bufferless three-stage fabric
follow the published Distro design. The following are this implementation's
own:

* The two-cycle split of a timeslot and the delayed network reset.
* `Pointer_i(r,j)` steps every slot. The published update list names the
  other four pointer kinds but not this one; stepping every slot matches the
  earlier static round-robin dispatching scheme for memory-space-memory Clos
  switches that Distro builds on.
* Phase 4 arbitrates among the `m` links entering an OM (the published text
  says `k`; the two agree when `m = k`).
* Pointer values for links and pairs the reset rule does not reach.
* The state kept as counts of unrequested cells rather than plain bits.
* VOQ depth (32), cell payload width (64 bits), `in_ready` flow control, the
  output line register, port numbering and reset style.

Not included: the comparison schemes of the original work (memory-space-memory
Clos switches with concurrent dispatching, CMSD or SRRD; iSLIP and other
single-crossbar schedulers). The timing claim of the original analysis
(scheduling time `3 log n + 6 beta` for `n = m = k`) is about a chain of
arbiters; here that chain is one combinational clock cycle plus the Phase 1
cycle, and no gate-level timing was done.

## Verification

Each module has a self-checking testbench in `tb/` that compares the module
against a reference model written independently inside the testbench and
prints `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_rr_arbiter` | every single-request pattern, empty/full, 3000 random patterns against a wrap-around search |
| `tb_crossbar` | random settings and cells, idle outputs |
| `tb_voq_buffer` | per-queue FIFO order, counts, full flags, refused writes to full queues, simultaneous read and write |
| `tb_ip_scheduler` | request register every cycle against a model with its own pointers and counts; refused requests; Pointer_h stepping every k slots |
| `tb_input_port` | `in_ready`, requests only for cells not yet requested, granted cell sent exactly one cycle after the grant, FIFO order |
| `tb_input_module` | m = 6 > n = 4: link selection including links that serve no port, grant return, cell crossing one cycle later |
| `tb_central_module`, `tb_output_module` | arbitration with contention against a model of Pointer_i / Pointer_r, grants, crossbar and output timing |
| `tb_distro_switch` | whole switch at n = m = k = 4 (see below) |
| `tb_distro_switch_full` | the same test on the default 64-port switch, no parameter changed |
| `tb_distro_workloads` | load sweep 0.1 ... 1.0 on the 32-port configuration n = 4, m = k = 8 |

The end-to-end tests attach a source to every input (one cell per slot at
most, a refused cell is held) and a scoreboard to every output. Each cell
carries source, destination and a serial number; the scoreboard checks
right output, exactly once, order per input/output pair, the 4-cycle
minimum latency, and after a final drain that nothing was lost. Traffic
phases: uniform random at loads 0.1 and 0.6; full load with every VOQ kept
backlogged; a hotspot (all inputs to output 0) that fills VOQs; drain. They
also count refused requests, contention at LCs and at OPs, refused arrivals
and Pointer_r steps, and fail if any never happens.

Results observed with these testbenches:

* With every VOQ backlogged, every output carried a cell in every one of
  the 1000 measured slots, on the 16-port and on the 64-port switch (100%
  throughput, no request collided).
* Mean delay beyond the 4-cycle pipeline, 16-port switch (VOQ depth 8):
  0.2 slots at load 0.1, about 14 slots at load 0.6. 64-port default switch:
  0.2 at 0.1, about 39 at 0.6. 32-port switch (n = 4, m = k = 8,
  600-slot steps, deep VOQs): 0.2 at 0.1, 2.2 at 0.4, 26 at 0.6, 96 at 0.9.
  These are short-run figures from the testbench traffic, for orientation
  only; they show the same shape as delay-versus-load curves for this
  scheduler (small at light load, steep rise past about half load).

Each module testbench was also run against a deliberately broken copy of
its module (for example an arbiter that skips the pointer position, a
pointer that never steps, a network reset that is not delayed) and failed.

## Simulating

With Verilator 5 (all files of `rtl/`, package first):

```
verilator --binary --timing --assert -Irtl rtl/distro_pkg.sv rtl/*.sv \
    tb/tb_distro_switch.sv --top-module tb_distro_switch -Mdir obj
./obj/Vtb_distro_switch
```

Replace the testbench name for any other test. The 64-port full-size test
takes a few minutes to compile and about two seconds to run. To change the
switch size, override `N_PORT`, `K`, `M` (and `DEPTH`, `DATA_W`) on
`distro_switch`; the pointer reset values follow automatically from
`distro_pkg`. Simulated sizes: 16 ports (n = m = k = 4), 32 ports
(n = 4, m = k = 8) and the default 64 ports. Larger configurations such as
128 ports (n = 8, m = k = 16) or 256 ports (n = m = k = 16) need only the
parameters changed but were not simulated; the VOQ storage grows as
`N * N * DEPTH * DATA_W` bits (8 Mbit at the default 64 ports, 134 Mbit at
256 ports with the default depth and width).
