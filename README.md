# Table-lookup crossbar arbitration for 2D mesh/torus routers

A router for a two-dimensional mesh or torus must decide, every cycle, which
input port sends a flit to which output port of its 4x4 crossbar. An output
may serve one input and an input may send one flit. The best answer is a
*maximum cardinality matching* (MCM) between inputs with waiting flits and the
outputs those flits want. Logic that searches for an MCM at run time is slow.
The usual fast arbiters lose matches instead: each input first picks one flit
and then each output picks one input.

This design (TabArb, after Seo and Thottethodi, "Table-lookup based Crossbar
Arbitration for Minimal-Routed, 2D Mesh and Torus Networks") uses the small
size of a 2D router:

* Each input port sends the requests of **several** waiting flits at once,
  not one.
* The combined requests of all four ports index a **read-only table**. For
  every possible request pattern the table holds an MCM worked out in
  advance. Arbitration becomes a table lookup, and synthesis turns the
  constant table into combinational logic.

Minimal routing keeps the table small. A flit never leaves by the port of
the same name it came in on, so each input has only three candidate outputs.
Dimension-ordered routing (X first, then Y) leaves only one candidate for a
Y input.

The RTL is SystemVerilog (IEEE 1800-2017). Its parts:

| file | what it is |
|---|---|
| `rtl/tabarb_pkg.sv` | port numbering, flit type, request/grant vector formats, the MCM search function |
| `rtl/tabarb_table.sv` | the MCM lookup table (ARV in, AGV out) |
| `rtl/request_forwarder.sv` | one input port: picks which flits' requests go to the table, maps the grant back to a VC |
| `rtl/starvation_ctrl.sv` | timeout-based anti-starvation with a FIFO of starved flits |
| `rtl/tabarb_arbiter.sv` | the switch arbiter: 4 forwarders, ARV packing, lookup pipeline, starvation guard |
| `rtl/vc_buffer.sv` | one virtual-channel input queue (8 flits) |
| `rtl/crossbar.sv` | 4x4 crossbar with output latches |
| `rtl/ejection_port.sv` | per-input-port ejection of flits that have arrived |
| `rtl/tabarb_router.sv` | top: VC queues, arbiter, crossbar and ejection ports of one router |

## Ports, vectors and the table

The ports are numbered X+ = 0, X- = 1, Y+ = 2, Y- = 3 on both the input and
the output side. Inside the RTL a request or grant of one input port is a
4-bit mask with bit *o* set for output *o*. Candidate *k* (0..2) of input *p*
is the *k*-th of the other three outputs, counted in ascending order.

Each input port's **Port Request Vector (PRV)** has one of three formats,
chosen when the design is elaborated:

| format | width | used when | meaning |
|---|---|---|---|
| `FMT_MASK3` | 3 | the port forwards several flits, or all of them | bit *k*: candidate *k* requested |
| `FMT_CODE2` | 2 | the port forwards one flit, and a flit asks for one output | 0 none, *k*+1 candidate *k* |
| `FMT_BIT1`  | 1 | Y port under dimension-ordered routing | Y+ in asks Y- out, Y- in asks Y+ out |

The four PRVs are concatenated, X+ in the least significant bits, into the
**Aggregate Request Vector (ARV)**, which is the table index. The table entry
is the **Aggregate Grant Vector (AGV)**. It holds one **Port Grant Vector
(PGV)** per port: 2 bits (0 none, *k*+1 candidate *k*), or 1 bit for a DOR Y
port.

| configuration | PRV widths | ARV | entries | AGV |
|---|---|---|---|---|
| DOR, full forwarding (lite) | 3,3,1,1 | 8 bits | 256 | 6 bits |
| adaptive, PaRF<3,3,1,1> (aggressive, default) | 3,3,2,2 | 10 bits | 1K | 8 bits |
| adaptive, full forwarding, or PaRF<2,2,2,2>/<3,3,3,3> | 3,3,3,3 | 12 bits | 4K | 8 bits |
| adaptive, PaRF<1,1,1,1> | 2,2,2,2 | 8 bits | 256 | 8 bits |

`tabarb_table` fills the table while it is elaborated. For each index it
decodes the four masks, calls `tabarb_pkg::mcm()` and re-encodes the grants.
`mcm()` tries all 5^4 ways of giving each input no output or one output, and
keeps the first largest valid matching it finds. So when several MCMs exist,
the choice between them is fixed by the search order. No table file is
shipped. The table is a constant array that synthesis maps to a ROM or to logic.
Elaborating the 1K table takes some seconds in Verilator, and the 4K table
about four times as long.

Example (the 12-bit table): X+ asks for Y+ and Y-, X- for X+, Y+ for Y-, and
Y- for X- and Y+. The only MCM of size 4 is X+→Y+, X-→X+, Y+→Y-, Y-→X-.
`tb_tabarb_table` checks this entry.

The table module itself is parameterized only by the four PRV formats
(`F0`..`F3`, X+ to Y-). `tabarb_arbiter` derives them from `ROUTING` and the
`FWD_*` counts with `tabarb_pkg::port_format`. So configurations that need
the same table shape (for example PaRF<2,2,2,2>, PaRF<3,3,3,3> and full
forwarding) share one table.

## Partial request forwarding and the two-cycle lookup

This is the subtle part of the design.

The table for adaptive routing is too deep for one short clock cycle, so its
lookup takes two cycles (`LAT = 2`). A naive arbiter would then start a new
arbitration only every other cycle. The next request vector would depend on
which flits the previous lookup granted.

Partial request forwarding (PaRF<i,j,k,l>) removes that dependency. Port X+
forwards the requests of at most *i* flits, X- of at most *j*, and so on.
A flit whose request is still inside the lookup pipeline is not forwarded
again. Each arbitration therefore carries different flits from the one still
in flight, and a new arbitration starts every cycle. The default,
PaRF<3,3,1,1>, forwards three flits from each X port and one from each Y
port.

The cycles, for a flit seen in cycle *t* with `LAT = 2`:

```
cycle t    forwarder: choose up to FWD eligible VCs (round-robin after the
           last winner), OR their outputs into the port mask -> PRV -> ARV
           ARV is registered; the chosen VCs are marked "in flight"
cycle t+1  table lookup on the registered ARV -> AGV -> one-hot PGV per port
           forwarder: first in-flight VC (round-robin) that wanted the
           granted output wins; its queue is popped at the end of the cycle
           (the other in-flight VCs become eligible again)
cycle t+2  the flit is in the crossbar output latch (out_valid/out_flit)
```

With `LAT = 1` (lite) the lookup is in cycle *t*, so the grant and the pop
happen in the same cycle. With full forwarding (`FWD_* = 0`) and `LAT = 2`
every eligible flit is in flight after a forward, so the next cycle carries
nothing. That is the pipeline bubble full forwarding cannot avoid.

A VC is eligible when three things hold:

* its head flit is valid and bound for the crossbar;
* `out_ready` is high for the output it wants, that is, a downstream credit
  is available;
* it is not in flight.

The table has no "output free" input. Arbitration is flit by flit, so every
output is free again in each cycle, and outputs without credit are already
removed from the requests.

## Anti-starvation

A table gives the same answer to the same request pattern every time. A flit
that is not part of the stored matching can therefore lose again and again.
`starvation_ctrl` counts, for every VC head, the cycles in which it waited
for an output that could take it. After `TIMEOUT` cycles (20) the VC enters a
FIFO of starved flits. While the FIFO is not empty, its oldest flit
overrides the table:

* its port forwards only that flit;
* every other port removes requests for that output.

The starved flit then forms an isolated edge of the request graph, and every
MCM must contain it. The entry leaves the FIFO when the flit is granted.
Starved flits are served in FIFO order, at most one enters per cycle, and a
VC is never queued twice.

## The router around the arbiter

`tabarb_router` is the switch datapath of one router:

* Four network input ports, each with `NVC` VC queues of `DEPTH` flits.
* The switch arbiter.
* The 4x4 crossbar with a latch on each output.
* One ejection port per input port.

A flit (`flit_t`) is 64 data bits plus a route: `eject`, or a crossbar
output `out_port`. The routing and VC-allocation stages upstream write the
route. Heads marked `eject` leave through their input port's ejection port,
which takes one flit per cycle in round-robin order among VCs. An ejecting
flit never competes with crossbar traffic.

| port | dir | meaning |
|---|---|---|
| `in_valid[4]`, `in_vc[4]`, `in_flit[4]` | in | flit written into queue `in_vc` of each input port |
| `credit_out[4][NVC]` | out | pulse one cycle after a flit leaves that queue (credit return) |
| `out_ready[4]` | in | output may send (downstream credit available) |
| `out_valid[4]`, `out_flit[4]`, `out_vc[4]` | out | flit on each output, with the index of the VC it came from |
| `eject_ready[4]` | in | ejection consumer ready |
| `eject_valid[4]`, `eject_flit[4]` | out | ejected flits |
| `match_count` | out | crossbar grants this cycle (matching power) |
| `starve_active` | out | a starved flit is being served |

Reset is asynchronous and active low. The sender must respect the credits
(never write a full queue); an assertion checks this.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `ROUTING` | `ROUTE_ADAPTIVE` | `ROUTE_DOR` makes Y ports use the 1-bit PRV |
| `NVC` | 8 | VCs per input port |
| `DEPTH` | 8 | flits per VC queue |
| `FWD_XP`, `FWD_XM`, `FWD_YP`, `FWD_YM` | 3, 3, 1, 1 | flits forwarded per port; 0 = all (full forwarding) |
| `LAT` | 2 | arbitration latency, 1 or 2 cycles |
| `TIMEOUT` | 20 | starvation threshold in cycles |

The two evaluated router configurations:

* **aggressive**: the defaults. Adaptive routing, 8 VCs, PaRF<3,3,1,1>,
  two-cycle lookup, one arbitration per cycle.
* **lite**: `ROUTING=ROUTE_DOR, NVC=4, FWD_*=0, LAT=1`. 256-entry table,
  single-cycle arbitration.

## What is not here, and where the RTL departs

These parts surround the arbiter but are left out. Their signals are ports:

* **Routing.** Dimension-ordered or Duato's adaptive routing. The route
  arrives with each flit. Adaptive routing is assumed to be temporally
  adaptive: each attempt asks for one output.
* **VC allocation and credit counting.** `out_ready` and `credit_out` are
  the interface to them. `out_vc` is the flit's source VC, not an allocated
  downstream VC.
* **The injection port and its multiplexers**, which share the four crossbar
  inputs with the network ports. No policy for sharing them is defined here,
  so `tabarb_router` has four network inputs only.

Choices made in this RTL that the scheme leaves open:

* round-robin selection of forwarded flits and of the winning VC;
* the PRV/PGV code values and the field order;
* which MCM the table stores when several exist;
* the pipeline cut of the two-cycle lookup (ARV register);
* the starvation counter rules;
* the crossbar output register.

`request_forwarder` assumes that a VC head does not change while its request
is in flight. This holds because only a grant pops a crossbar-bound head.

## Matching power

The number of matches per arbitration shows how much a request-forwarding
scheme gains. `tb_matching_power` measures it. Each input port keeps a fixed
fraction of its VCs holding a head flit with a random legal output. A
granted head is replaced at once. Every arbitration with a non-empty ARV is
counted. The starvation timeout is set out of reach, so the numbers show the
table and the forwarding, not the override. One run of 2000 cycles per point
gives:

| scheme | 0.10 | 0.25 | 0.50 | 0.80 |
|---|---|---|---|---|
| lite: DOR, full forwarding, 4 VCs, 1 cycle | 2.56 | 2.57 | 2.64 | 2.63 |
| PaRF<1,1,1,1> | 2.77 | 2.74 | 2.77 | 2.77 |
| PaRF<2,2,2,2> | 2.77 | 3.25 | 3.29 | 3.40 |
| PaRF<3,3,1,1> (default) | 2.77 | 2.39 | 2.96 | 3.19 |
| PaRF<3,3,3,3> | 2.75 | 3.28 | 3.13 | 3.51 |
| adaptive, full forwarding | 2.78 | 3.25 | 3.61 | 3.77 |

Forwarding more requests raises the matching power, with diminishing
returns. Full forwarding is highest, and DOR (half the ports have no choice)
is lowest. The testbench checks these trends at 0.8 occupancy. It does not
model the SPAA baseline that the scheme is usually compared against.

With the 20-cycle timeout and saturating random traffic, the override is
invoked often and costs matching power. The full router testbench sees
about 2.2 matches per cycle. The design follows the threshold of 20 cycles
but has not been tuned against it.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it shows |
|---|---|
| `tb_tabarb_table` | all 256 + 1K + 4K entries of the three table shapes are valid maximum matchings (checked against a brute-force permutation search), plus the example above |
| `tb_request_forwarder` | PaRF (FWD=3, LAT=2) and full forwarding (LAT=1) against a reference model: request masks, in-flight exclusion, winning VC, starvation masking |
| `tb_starvation_ctrl` | exact 20-cycle timeout, FIFO order, no counting while the output is blocked, random run against a model |
| `tb_tabarb_arbiter` (with `arb_harness`) | lite and aggressive arbiters: grant latency, legal matching every cycle, grant count equal to the MCM of the looked-up ARV, full forwarding keeps every request, one arbitration per cycle under load, starvation episodes |
| `tb_vc_buffer`, `tb_crossbar`, `tb_ejection_port` | queue order and full flag, crossbar routing and latch, round-robin ejection |
| `tb_matching_power` (with `mp_harness`) | six forwarding schemes at four occupancies: every grant set is a legal matching, and matching power follows the expected order (see above) |
| `tb_tabarb_router` | the whole router at default parameters: ~10k flits with random routes, credits and back-pressure; each flit leaves once, by the right port, in VC order, with intact data; counts crossbar traversals, ejections, 4-match cycles, credit stalls, back-pressure and starvation episodes, and fails if any never happened |

To run one with Verilator 5 (package first):

```
verilator --binary --timing --assert --top-module tb_tabarb_router \
  rtl/tabarb_pkg.sv rtl/tabarb_table.sv rtl/request_forwarder.sv \
  rtl/starvation_ctrl.sv rtl/tabarb_arbiter.sv rtl/vc_buffer.sv \
  rtl/crossbar.sv rtl/ejection_port.sv rtl/tabarb_router.sv \
  tb/tb_tabarb_router.sv
./obj_dir/Vtb_tabarb_router
```

`tb_tabarb_arbiter` also needs `tb/arb_harness.sv`, and `tb_matching_power`
needs `tb/mp_harness.sv`; both need only the arbiter's RTL files. Building
`tb_tabarb_table` takes about two minutes, because it elaborates the 4K-entry
table. So does `tb_matching_power`, which builds six arbiters. The other
testbenches build in under a minute.

What the tests do not cover:

* a network of routers;
* the traffic patterns (uniform random, bit complement, transpose);
* latency/throughput curves. Those need the routing, VC allocation and
  injection logic that is not part of this RTL.

The `match_count` output is there for measuring matching power inside such a
system.
