# Fine-grained run-time power gating for a mesh network-on-chip

The routers of a chip multiprocessor's on-chip network must always be ready
to carry a packet, so they leak power all the time, yet most of their parts
are idle most of the time. This design cuts each 5-port router into **35
separately power-gated domains**. Each one is switched on only while a packet
is actually using it:

| domains | count | what |
|---|---|---|
| input VC buffers | 20 | 5 input ports x 4 virtual channels, 4 flits of 128 bits each |
| VC multiplexers | 5 | one per input port, selects the VC that won allocation |
| crossbar multiplexers | 5 | one per output port |
| output latches | 5 | one per output port, drives the link |

A domain is switched **on when a packet is coming** and **off as soon as it
has left**. Switching a domain on takes `WAKEUP_LAT` cycles (3 by default,
which is 3 ns at 1 GHz). A flit that needs a domain that is still waking up
has to wait. Most of the design exists to hide that wait: the routers
announce packets to the routers ahead of them early enough that the domains
are already on when the flit gets there.

The RTL is a complete 4x4 mesh (`pg_mesh`) of these routers. It is sized for
an 8-CPU chip with 64 shared L2 cache banks, with a processor at 8 of the 16
routers. The processors, caches and coherence protocol are not part of the
RTL. Every router's local port is brought out instead, for a network
interface to connect to.

## Router pipeline

Each router has three stages, and each link adds one cycle. Without wakeup
waits a flit therefore takes 4 cycles per hop.

1. **RC**: a head flit at the front of its VC buffer is routed. Routing is
   look-ahead: the head already carries the output port to use at this
   router, which the previous router wrote into it. `pg_la_route` works out
   the port for the next router (to write into the header) and the port for
   the router after that (used by the wakeup logic). Routing is
   dimension-order (X first, then Y).
2. **VSA**: a separable round-robin allocator. It first picks one VC per
   input port, then one input per output port. A flit is eligible when all
   of these hold:
   - its output VC is free (a head only) or already owned by its packet;
   - the downstream VC buffer has a credit;
   - the downstream buffer entry it will land in is powered;
   - the VC mux, crossbar mux and output latch on its path are on.

   The winner is popped into the buffer's output register.
3. **ST**: the flit passes the VC mux and the crossbar mux into the output
   latch. For a head flit, the latch also writes the next router's port into
   the header. The next router stores the flit at the following edge.

Each packet keeps its VC on every hop. The VC is the packet's coherence
message class:

| VC | message class |
|---|---|
| VC0 | L1 to/from L2 request |
| VC1 | L2 to/from memory request |
| VC2 | reply |
| VC3 | persistent request |

So the router never reallocates VCs. Between head and tail, an output VC
belongs to one packet (wormhole switching). Flow control is credit based,
with one credit per buffer entry.

## Power domains and their control

`pg_domain_ctrl` is the controller of one domain. It has three states:

- **OFF**: a request (`req`) loads a counter and moves it to WAKE.
- **WAKE**: after `WAKEUP_LAT` cycles it moves to ON.
- **ON**: it goes back to OFF in the first cycle in which there is no
  request and the domain holds nothing (`busy` low).

`sw_en` is the gate of the power switch, a transistor that is not modelled.
`on` means the domain can be used. A request raised in cycle *t* makes the
domain usable in cycle *t + WAKEUP_LAT + 1*.

A sleeping domain must not drive unknown values into domains that are still
powered. Every domain output therefore goes through a hold cell, `pg_hold`,
which forces it to 0 while its domain is off. A VC buffer loses its contents
while asleep. Its pointers restart at 0.

### Who asks for what

The requests travel with each link, in the `link_wake_t` side channel
upstream to downstream:

- `hop1.vc[v]` asks the receiving input port to wake VC buffer *v*.
- `hop1.port[o]` asks the receiving router to wake the crossbar mux and
  output latch of its output *o*.
- `hop2[d]` is a request for the router two hops away. The receiving router
  passes it on, unregistered, as `hop1` on its own output *d*.

A router raises these requests for every packet routed to an output, from
the moment the head is routed until the tail has left the output latch. A
domain therefore stays on for as long as a packet for it is routed or in
flight, and it sleeps once the packet is gone.

The VC mux of an input port is requested by that port's VC-buffer wakeups
and by any flit in its buffers. The crossbar mux and output latch of an
output are requested by the `hop1.port` bits and by any local packet routed
to that output.

The `link_cred_t` side channel runs downstream to upstream. It carries:

- a credit pulse per VC;
- a `slot_ready` mask per VC, where bit *k* says whether the *k*-th free
  entry after the write pointer is powered.

An upstream router only sends a flit when the entry it will land in is
powered. It counts the flits already in its ST stage and output latch to
find which entry that is.

### Early wakeup methods (`EARLY_WAKEUP`)

- `EW_NONE`: a router only wakes the next router's domains, once the head
  is routed. With 4-cycle hops and a 3-cycle wakeup this hides little.
- `EW_LOOKAHEAD`: the router also wakes, through the next router, the
  domains of the router two hops ahead. Every hop after the first then finds
  its domains on. The first hop, the router the packet enters at, cannot be
  woken in advance. The network interface raises `ni_in_wake` for the local
  VC buffer, but the router's own VC mux, crossbar mux and output latch still
  wake up while the head waits.

  The two-hop request is raised when the head is routed at router *i*.
  With a 3-cycle wakeup the buffer at router *i+2* is usable 4 cycles later.
  If the head never waits, router *i+1* wants that buffer a cycle sooner.
  The wait at the first router gives the rest of the path that slack. In
  `tb_pg_mesh`, a 6-hop packet through a cold network arrives only 2 cycles
  later than the no-wait latency of 28 cycles.
- `EW_LA_EVERON` (default): look-ahead, and in addition the local-port VC0
  and VC2 buffers of routers with a processor attached never sleep. These
  two classes carry most of the traffic, and the first flit is written into
  them without waiting.
- `EW_LA_WINDOW`: look-ahead, and in addition every VC buffer keeps a window
  of `WINDOW` free entries ahead of its write pointer powered. Each entry is
  then a domain of its own. The window moves as flits are written and read.
  A packet no longer than the window is accepted at once, but the window
  leaks power all the time.

### Gating levels (`PG_LEVEL`)

| level | gated |
|---|---|
| 1 | input VC buffers |
| 2 | also VC and crossbar multiplexers |
| 3 (default) | also output latches |
| 0 | nothing |

The router builds the domains that a level leaves ungated with `GATED=0`.

## Files

| file | contents |
|---|---|
| `rtl/pg_pkg.sv` | flit, wake and credit types; header layout; XY routing |
| `rtl/pg_domain_ctrl.sv` | domain on/off controller with the wakeup counter |
| `rtl/pg_hold.sv` | hold cell: clamps a sleeping domain's outputs to 0 |
| `rtl/pg_vc_buffer.sv` | gated VC FIFO (whole buffer, ever-on, or active window) |
| `rtl/pg_vc_mux.sv`, `rtl/pg_xbar_mux.sv` | gated VC and crossbar multiplexers |
| `rtl/pg_out_latch.sv` | gated output latch with look-ahead header rewrite |
| `rtl/pg_rr_arb.sv` | round-robin arbiter used by the allocator |
| `rtl/pg_la_route.sv` | look-ahead XY routing (this hop, next, next-but-one) |
| `rtl/pg_router.sv` | the 35-domain router |
| `rtl/pg_mesh.sv` | top: 4x4 mesh, `CPU_MASK` marks the CPU routers |
| `tb/tb_*.sv` | a self-checking testbench per module |

### Header layout

Only the head flit carries routing information:

| bits | field |
|---|---|
| `data[1:0]` | destination x |
| `data[3:2]` | destination y |
| `data[6:4]` | look-ahead port, used at the router that receives the flit |

Ports are numbered 0 local, 1 north (y-1), 2 east (x+1), 3 south (y+1) and
4 west (x-1). At the local port the look-ahead field is ignored and the port
is computed from the destination.

### Local-port protocol

To send a flit on VC *v*, a network interface:

1. raises `ni_in_wake[n].vc[v]`;
2. waits until it has a credit and `ni_out_cred[n].slot_ready[v][0]` is set;
3. drives the flit for one cycle.

A receiving interface returns one credit per flit. It holds its
`ni_in_cred[n].slot_ready` bits at 1 for the entries it can accept.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` at the end. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pg_mesh \
    -y rtl +libext+.sv rtl/pg_pkg.sv tb/tb_pg_mesh.sv -o sim --Mdir obj
./obj/sim
```

Replace `tb_pg_mesh` with any other `tb_*` module to run its testbench.

| testbench | what it checks |
|---|---|
| `tb_pg_domain_ctrl` | exact wakeup timing for 2-, 3- and 4-cycle latencies, sleep on idle, the GATED and EVER_ON variants |
| `tb_pg_vc_buffer` | whole-buffer, window and ever-on buffers against a reference FIFO, including the `slot_ready` mask and the loss of state in sleep |
| `tb_pg_router` | one router at (1,1) with random traffic on all five ports: routing, VC kept, order, no interleaving, look-ahead header, the 3-cycle warm latency and the 3 + `WAKEUP_LAT` cold latency, all domains asleep after the drain |
| `tb_pg_mesh` | the full-size default mesh, see below |
| `tb_pg_wakeup_methods` | the three early-wakeup methods side by side on identical traffic, see below |

`tb_pg_mesh` runs the default mesh end to end in three phases:

1. an isolated packet across the mesh;
2. uniform random traffic;
3. a hot spot.

It checks that every packet arrives intact, in order and at the right node.
It also checks that the look-ahead wakeup leaves only the first router's
wait: a 6-hop packet through a cold network takes at most 4 cycles per
router plus `WAKEUP_LAT`. It counts wakeups, sleeps, power stalls, two-hop
requests, ever-on injections and credit stalls, and fails if any of them
never happens.

Building the mesh takes several minutes. The simulation itself takes under a
second.

`tb_pg_wakeup_methods` builds three 2x2 meshes, one per early-wakeup method,
and sends them identical request and reply traffic with idle gaps. Latency is
counted from the moment a packet is ready, so the wait for a sleeping local
buffer is part of it. Typical output:

| method | mean latency | first-hop wait cycles | powered domain-cycles |
|---|---|---|---|
| look-ahead | 14.5 | 440 | 12190 |
| look-ahead + CPU ever-on | 13.4 | 276 | 15229 |
| look-ahead + buffer window | 11.4 | 78 | 79117 |

The ever-on buffers remove the first-hop wait for CPU requests and replies
for a small leakage cost. The window removes it for every short packet, but
keeps far more of the router powered. The testbench checks that order.

## Departures and open points

- **Ports per domain.** The 35 domains are read as 20 buffers plus 5 of each
  kind of multiplexer or latch. The VC muxes are gated from level 2, together
  with the crossbar.
- **Assumed sizes.** These are this design's choices:
  - buffer depth: 4 flits;
  - active window: 2 entries;
  - XY routing;
  - the allocator;
  - the header layout;
  - the side channels.
- **Fixed VCs.** The VCs are fixed per message class. There is no VC
  reallocation.
- **When a domain turns off.** A domain switches off in the first idle cycle.
  There is no break-even timer or delayed sleep.
- **Two-hop relay.** The two-hop wakeup is relayed combinationally through
  the middle router. Lint tools that treat a whole array as one signal report
  a loop on `r_out_wake` in `pg_mesh`. There is none: requests only move
  forward, away from the router that raised them.
- **Not modelled.** The power switch transistors, the processors, the L1 and
  L2 caches and the token-coherence protocol are not modelled. The mesh
  reports power and activity only as the `dom_on`, `dom_waking` and
  `pg_stall` status outputs. There is no leakage or energy model.
