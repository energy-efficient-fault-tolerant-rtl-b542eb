# Fault-tolerant bufferless deflection router for 2D mesh networks-on-chip

A bufferless deflection router has no flit buffers. Every flit that enters
must leave two cycles later by some output port. When the output is not the
one the flit wants, the flit is *deflected*. This works only while every
port works. When links wear out, a flit can be assigned to a dead port, and
it then has nowhere to go.

This design keeps the usual two-stage deflection router (CHIPPER style). It
adds a small **fault-tolerant logic unit (FTLU)** and four **latches** after
the port allocator. The allocator, a permutation deflection network (PDN),
places flits without looking at faults. The FTLU then takes every flit left
on a faulty port and gives it a healthy one:

* first in the **orthogonal** direction (N/S ↔ E/W), which keeps the flit close to its path;
* failing that, in the **opposite** direction (N ↔ S, E ↔ W), through a latch.

A single extra header bit, the **fault loop bit (FLB)**, chooses XY or YX
routing in the next router. This steers a displaced flit back toward its
destination instead of letting it return to the same dead link. Two rules
prevent livelock:

* a reallocated flit never leaves by the port it came in on;
* the FLB records whether the flit was last moved onto a horizontal or a vertical port.

The RTL is SystemVerilog-2017 and synthesizable. The mesh is 8×8 by
default, with 128-bit flits.

## Router pipeline

```
 links in ──► kill ─► eject ─► inject ─► route compute ──► [B] ──► PDN ─► FTLU ─► latches ─► EX/FLB ──► [C] ──► links out
              (stage 1)                                             (stage 2)
```

* **Stage 1** runs from the input links to register B:
  * `kill_block` drops flits whose expiry field is full.
  * `eject_unit` delivers one flit per cycle that is addressed to this router.
  * `inject_unit` takes one flit from the local core into a vacant slot. It
    does so only while the router holds fewer flits than it has healthy
    ports, so every flit is sure to find an exit.
  * `route_compute` finds each flit's productive port and its hop distance.
    FLB = 0 routes XY (column first); FLB = 1 routes YX (row first).
* **Stage 2** runs from register B to register C:
  * `pdn` assigns ports.
  * `ftlu` and `latch_realloc` repair the assignment.
  * The router then updates the FLB and EX fields.
* Register C drives the outgoing link directly. The next router's stage 1
  reads that link combinationally. A flit therefore advances one router
  every **two cycles**, and a lone flit reaches a router *d* hops away
  2·*d* cycles after it is injected. Both testbenches check this latency.

The PDN (`pdn`, built from four `permuter` 2×2 switches) follows CHIPPER:

* P1 takes the north and east slots; P2 takes the south and west slots.
* Each first-rank permuter sends a flit that wants N/S to P3 and a flit that
  wants E/W to P4.
* P3 drives the N and S lines; P4 drives the E and W lines.
* In each permuter, the flit with fewer hops to go wins and takes the output
  it asks for. Ties go to the upper input.

## The FTLU: moving flits off faulty ports

This is the part that needs the most care. The FTLU receives the four PDN
lines and the fault flags NF, SF, EF and WF. It works in four steps.

1. **Input multiplexers.** A flit on a healthy line passes straight through
   (x1–x4). A flit on a faulty line goes to one of two places. If an
   orthogonal port is *empty*, it goes to the permuter section; otherwise it
   goes to the swapping section (y1–y4). A port is *empty* when:
   * no PDN flit is on it;
   * its fault flag is clear;
   * it is not the flit's input port.
2. **Permuter section.** P5 moves faulty N/S flits onto empty E/W ports. P6
   moves faulty E/W flits onto empty N/S ports. The higher-priority flit
   chooses first and prefers its productive port. A second flit that finds
   no empty port left moves on to the swapping section.
3. **Swapping section.** A faulty-line flit that found no empty orthogonal
   port is exchanged with a healthy flit on an orthogonal line. SWAP1
   handles N/S flits and SWAP2 handles E/W flits. The faulty flit takes the
   healthy port. The displaced flit is left on the faulty line.
4. **Output demultiplexers.** These merge the pass-through, permuter and
   swap results per line.

`latch_realloc` then handles whatever still sits on a faulty line. Latch L1
moves a flit from N to S, L2 from S to N, L3 from E to W and L4 from W to E.
The target port must be healthy and vacant, and it must not be the flit's
input port. The "latches" are multiplexer paths into register C, not
level-sensitive storage.

Example: the north port is faulty, and a flit that came in from the south
sits on the north line. East and west are both occupied. SWAP1 puts the
flit on its preferred side, say west. The west flit is displaced to the
north line, and L1 carries it to the free south port.

**FLB rule.** A flit that ended on a different port than the PDN gave it
leaves with FLB = 1 on an east/west port and FLB = 0 on a north/south port.
Every other flit leaves with FLB = 0.

**Three faulty ports.** When a router has only one healthy port, the
no-return rule is lifted, since every flit must leave by the port it came
in on.

**Four faulty ports.** The router is disconnected. It never injects.

### Last-resort placement (own addition)

The FTLU and latch rules do not cover every combination of occupancy, fault
flags and input ports. For example, the only vacant healthy port may be
opposite to where a displaced flit sits, while also being that flit's input
port. In that case `latch_realloc` puts the flit on the first vacant healthy
port, preferring one that respects the no-return rule. Because injection is
limited by the number of healthy ports, such a port always exists. The
`fallback` strobe counts these events; `lost` would flag a flit with no
healthy port, and it never fires in the tests.

In the 8×8 run (10 % link faults, 0.1 flits/cycle/core), the fallback
placement was used 50 times, against about 2,200 FTLU and latch moves.

## Expiry field and kill block

A flit addressed to a disconnected router would circulate forever. Each flit
therefore carries a four-bit expiry field (EX). Suppose a flit is one hop
from its destination and its productive port is faulty. The bit of the
destination side it tried is then set; that is the side opposite the
faulty port, in N, S, E, W order. When all four bits are set, `kill_block`
drops the flit as it enters the next router.

This is controlled by the `EXPIRY_EN` parameter. The default is 0, which is
the main configuration: the EX bits stay zero and the kill block is inactive.
In that case the EX wires carry nothing and can be left out of a physical
link.

## Mesh and fault flags

`mesh_noc` instantiates ROWS×COLS identical routers. Row 0 is the north edge
and column 0 the west edge. Faults are given per bidirectional link:

* `fault_h[r*(COLS-1)+c]` is the link between (r,c) and (r,c+1);
* `fault_v[r*COLS+c]` is the link between (r,c) and (r+1,c).

A faulty link:

* sets the flags of the ports at both of its ends;
* blocks the incoming channel at both of its ends.

Boundary ports are always flagged faulty, so corner and edge routers need no
special design. Flags are meant to change only while the network is empty.
They model the result of an offline or online diagnosis, which is outside
this design.

Each node exposes:

* a valid/ready injection port;
* a valid-only ejection port (the core always accepts);
* a `router_ev_t` bundle of per-cycle strobes: kill, eject, inject, P5, P6,
  SWAP1, SWAP2, latch, fallback, lost, deflect and EX-set. These are for
  monitoring only.

## Flit format (`noc_pkg`)

| field | bits | note |
|---|---|---|
| `valid` | 1 | |
| `ex` | 4 | expiry field; zero unless `EXPIRY_EN` |
| `flb` | 1 | 0 = XY, 1 = YX in the next router |
| `dst_row`, `dst_col`, `src_row`, `src_col` | 4 × 3 | coordinates; 3 bits allow up to 8×8 |
| `payload` | 116 | address fields + payload = 128-bit base flit |

Inside a router, each flit also carries its input port, its one-hot
productive port and its hop count (`rflit_t`). None of these go on a link.

## What to trust, and known limits

* **Fault patterns.** Routing with only the FLB is livelock-free when the
  faults are spread out. It is *not* livelock-free in two cases:
  * the faults split the mesh into regions joined through a single router;
  * a router is reachable from only one neighbour.

  Example: in a 4×4 mesh, node (3,1) is reachable only from (3,0). A flit
  then circles (2,1)→(2,2)→(3,2)→(3,3)→(3,2)→(2,2)→… forever. The test
  patterns avoid such pockets. Check this before using a fault pattern.

  Denser random patterns cause the same problem even when the mesh stays
  connected and every router keeps at least two links. This happens at
  concave fault corners. Example: at (2,3) in an 8×8 mesh, the west and
  north links are dead, and the flit came in from the south. The latch
  sends it east. YX routing then carries it around a loop of about ten
  routers, and it arrives at (2,3) from the south again. The rules
  guarantee progress only while the vertical port other than the input
  port works after a horizontal fault. In `tb_mesh_workloads`, with 20 % or
  30 % of the links faulty, 0.5–10 % of the flits were still circulating
  after a 4000-cycle drain. With 10 %, uniform, transpose and shuffle
  traffic delivered everything; bit-complement left 191 of 2004 flits
  circulating. The expiry field does not remove such flits, since it only
  records attempts made one hop from the destination. Removing them would
  need an extra escape rule, which this design does not have.
* **Expiry under contention.** Sent alone, every flit addressed to an
  isolated router sets its four EX bits and is killed. In traffic, a flit
  that is deflected for other reasons can loop without trying all four sides
  of the destination. The mesh test therefore sends these flits one at a
  time.
* **No golden-flit scheme.** Priority is purely "fewer hops to go, ties to
  the upper input". Under very heavy fault-free load, that alone does not
  guarantee that a flit which keeps losing arbitration is ever delivered.
  The tests drain to completion.
* **Design choices not fixed by the original technique:**
  * one ejection per cycle;
  * the valid/ready injection handshake;
  * synchronous active-low reset of registers B and C;
  * the tie-breaks;
  * register A of the classic pipeline diagram is taken to be the previous
    router's register C;
  * a permuter accepts a flit only if a port is left for it;
  * the last-resort placement.
* **Not modelled.** The processing elements and the fault diagnosis are not
  modelled; their ports are brought out. No application traces are
  included.

## Files

`rtl/` holds one module or package per file:

* `noc_pkg`: types, directions and helper functions;
* `route_compute`, `kill_block`, `eject_unit`, `inject_unit`: stage 1;
* `permuter`, `pdn`, `ftlu`, `latch_realloc`: stage 2;
* `router`: one router;
* `mesh_noc`: the top.

`tb/` holds one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_ftlu` replays the reallocation examples:
  * one faulty port, via P5 and via SWAP1;
  * north and west faulty, three cases;
  * three faulty ports;
  * a SWAP2 case;

  It then checks random properties (conservation, orthogonal moves,
  no-return rule).
* `tb_router` checks:
  * the two-cycle latency;
  * ejection and injection, including throttling;
  * the FLB after reallocation;
  * EX setting and killing;
  * that random traffic under random faults always leaves on healthy ports.
* `tb_mesh_noc` is the end-to-end test on a 4×4 mesh with the expiry field.
  It runs:
  * a lone-flit latency check;
  * heavy fault-free traffic;
  * traffic over spread link faults;
  * traffic toward a disconnected router.

  It counts each mechanism and fails if any never occurs: inject, eject,
  deflection, injection stall, P5, P6, SWAP1, SWAP2, latch, EX set, kill.
* `tb_mesh_full` uses the default 8×8 mesh. It sends a corner-to-corner
  lone flit (28 cycles), then 10 % faulty links (11 of 112) with uniform
  random traffic at 0.1 flits/cycle/core, drained to completion.
* `tb_mesh_workloads` uses the default 8×8 mesh. It runs uniform,
  transpose, bit-complement and shuffle traffic at 0.1 flits/cycle/core.
  Each pattern runs with 10 %, 20 % and 30 % random link faults. It prints
  the delivered and still-circulating flits and the average hop count per
  run, then resets the mesh before the next run. A flit that is lost,
  duplicated or misdelivered fails the test, and so does a run that
  delivers less than 90 % of its flits.

  A second part sweeps uniform traffic from 0.02 to 0.2 flits/cycle/core.
  Average latency is measured from the core queue to ejection. Fault-free,
  it rose from 11 to 15 cycles. With 10 % faults it rose from 13 to 27
  cycles.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl rtl/noc_pkg.sv tb/tb_mesh_full.sv --top-module tb_mesh_full
./obj_dir/Vtb_mesh_full
```

The same command works for any `tb/tb_<module>.sv`.

To change the mesh size, override `ROWS` and `COLS` on `mesh_noc`. For
meshes larger than 8×8, also widen `COORD_W` in `noc_pkg`.
