# Five-port mesh routers for GALS and clockless networks-on-chip

A network-on-chip router in a 2D mesh does the same thing whatever its timing
discipline: it takes packets on five ports (East, West, North, South, Local),
decides from the target address which port each packet leaves by, and keeps
the path open until the packet's last flit has gone through (wormhole
switching). This repository holds SystemVerilog models of four designs that
approach that job in different ways:

| Design | Timing discipline | Main idea |
|---|---|---|
| **BaBaRouter** | clockless, handshake channels | one shared routing unit and per-output request queues in place of a round-robin scheduler |
| **Hermes-GLP** | GALS: one clock per router, unrelated clocks on the links | bisynchronous input FIFOs, clock gating when idle, fast/slow clock chosen by packet priority; single router and 3x3 mesh |
| **Hermes-A / Hermes-AA** | quasi-delay-insensitive, 4-phase dual-rail | routing decided at each input and held until a *kill token* tears the path down; XY (A) or west-first adaptive (AA) routing |
| **C-element cells** | cell library for clockless logic | C2, C3, C2R1, C1U1 Muller C-elements and a mutual-exclusion element |

All of it is written as synthesizable register-transfer logic, except the
mutual-exclusion element, which is a behavioural model. The clockless designs
are **clocked models**: each handshake step is taken on a clock edge. That is
the most important thing to keep in mind when reading the code. It is
explained in its own section below.

`gals_async_top` instantiates all of them side by side: BaBaRouter,
one Hermes-GLP router, a 3x3 Hermes-GLP mesh, Hermes-A, Hermes-AA and the
cells. They are not connected to one another, and each has its own ports.

## Packets

BaBaRouter and Hermes-GLP use the same packet format, built from 8-bit flits:

```
flit 0   header:  [7:4] free   [3:2] target X   [1:0] target Y
flit 1   size:    number of payload flits that follow (0..255)
flit 2.. payload
```

The router marks the last payload flit internally with an end-of-packet bit,
EOP. A size of 0 puts EOP on the size flit. Router addresses are `{X, Y}`, two
bits each, so address `4'h5` is node "11", the centre of a 3x3 mesh.

Hermes-A carries each flit as a dual-rail token of 10 bits: 8 data bits, EOP
(bit 8) and BOP, begin-of-packet (bit 9). Bit *k* is valid when exactly one of
its rails `t[k]`/`f[k]` is high. A token is complete when every bit is valid.
The *spacer*, all rails low, separates consecutive tokens (4-phase protocol).
The header flit holds target X in bits [3:0] and target Y in bits [7:4]. The
code BOP=EOP=1 never appears on a link: inside the router it is the kill token.
`hermes_a_pkg` gives the type `dr_tok_t` and the helpers `encode`,
`complete`, `is_spacer` and `kill_token`.

Port numbering, everywhere: East 0, West 1, North 2, South 3, Local 4
(`noc_pkg::port_e`). X grows towards East and Y towards North.

## BaBaRouter

```
 rx[i] -> hs_fifo (8 flits) -> baba_in_ctrl --addr (4b)--> baba_switch_ctrl --CTRL[o]--> baba_crossbar -> tx[o]
                                            --flit+EOP (9b)-------------------------------^
```

* **Input FIFO** (`hs_fifo`): 8 flits deep and 8 bits wide. It stands in for a
  chain of handshake buffers, with the same capacity and ordering.
* **IN CTRL** (`baba_in_ctrl`): the first flit's lower half is offered to the
  switch control as a routing request. Once the request is accepted, the
  header flit, the size flit and the payload go to the crossbar. IN CTRL
  counts payload flits against the size and raises EOP with the last one.
* **Switch control** (`baba_switch_ctrl`): a single unit shared by all five
  inputs.
  * An arbiter (`baba_arbiter`, round robin) picks one pending request.
  * `baba_xy_route` computes its output.
  * The input's number (3 bits) is pushed into that output's 4-entry request
    FIFO.
  * The FIFO's head is the CTRL channel telling the crossbar which input owns
    the output.
  * The request FIFOs are the fairness mechanism. Every waiting input holds a
    place in the queue, so one input cannot take the same output twice while
    another is waiting.
  * If an output's queue is full, the request waits.
* **Crossbar** (`baba_crossbar`): each output forwards the flits of the input
  named by its CTRL head. When a flit with EOP leaves, the head is popped and
  the output passes to the next queued input. Outputs are independent, so up
  to five packets cross at the same time.

In the clocked model a header needs its request cycle, one cycle in the
request FIFO, then passes. Body flits follow at one per cycle per path. In
the five-flows-at-once case (each input to a different output), all five
paths stream together: 5 flits per cycle through the router.

`router_core` is IN CTRL, switch control and crossbar without the input
buffers, so the same core also serves Hermes-GLP. It also reports which input
owns each output (`bound_valid`/`bound_in`), which Hermes-GLP needs to send
each packet's priority along with it.

## Hermes-GLP

Hermes-GLP runs each router on a clock of its own and lets links cross
between unrelated clocks. Three pieces make that work and save power:

1. **Bisynchronous FIFOs** (`bisync_fifo`) at every input. The link writes
   with the sender's clock (`rx_clk[i]`) and the router reads with its own.
   Pointers are exchanged in Gray code through two-flop synchronizers, so only
   one bit changes at a time. A synchronizer that settles late can only delay
   `full` or `empty`, never corrupt data. Each entry stores the flit plus its
   priority bit.
2. **Clock gating** (`glp_clock_ctrl`, `clk_gate`). A port is active while
   its FIFO holds data or while its IN CTRL is inside a packet. When no port
   is active the router clock is stopped by a latch-based gate. A write into
   any input FIFO wakes it again, about two cycles later.
   * "Holds data" (`occupied`) compares the Gray write and read pointers
     directly, in neither clock domain. The clock control synchronizes it on
     the switched clock, which keeps running while the router clock is gated.
   * This matters in a mesh. The writer of a link is the neighbour, and the
     neighbour's clock stops as soon as it is idle. A write-side view of the
     FIFO would then never see the last read, and the port would look busy
     for ever. This failure was found with the mesh test below.
3. **Frequency selection** (`glp_clock_ctrl`, `clk_switch`). Every packet
   carries a one-bit priority on a sideband wire (`rx_prio` in, `tx_prio` out
   with the packet).
   * If any *active* port carries a high-priority packet, the router runs on
     the fast source; otherwise it runs on the slow one.
   * The priority of idle ports is ignored.
   * `clk_switch` is a glitch-free two-source switch. A source is enabled only
     after the other has been disabled, and each enable changes only while its
     clock is low. A switch takes about two cycles of each clock.

The defaults follow a two-source setup (fast and slow in a 2:1 ratio, for
example 200 and 100 MHz). The router forwards its own clock on `tx_clk`, so
the next router can use it as the write clock of its FIFO.

Reset detail: during reset the switch passes the slow clock, so the router's
synchronous reset takes effect. Hold reset for at least a few slow-clock
cycles. The FIFOs use asynchronous resets per domain, so the linter reports
`rst_n` as used both ways.

### The 3x3 mesh

`hermes_glp_noc` joins NX x NY routers (3x3 by default) port to port. Each
output link carries the sending router's clock, and that clock writes the
neighbour's input FIFO. The routers share only the two clock sources. Each
router chooses between them and gates its own copy.

* Node *n* = 3·y + x has address {x, y}.
* Every local port has its own IP clock (`ip_clk[n]`) and brings out its
  router's clock (`loc_tx_clk[n]`).
* Inputs at the mesh edge are tied idle. Outputs at the edge always accept.

With this, two flows of different priority produce the behaviour the design
aims at. Suppose a high-priority flow crosses routers 01, 11 and 21 while a
low-priority flow crosses 10, 11 and 12:

* 01, 11 and 21 run fast;
* 10 and 12 run slow;
* the routers off both paths stay stopped;
* when the high-priority flow ends, 01 and 21 stop and 11 drops back to
  slow.

## Hermes-A and Hermes-AA

The router has no clock in its original form. Every channel is 4-phase
dual-rail:

* the sender puts a complete token;
* the receiver raises its acknowledge;
* the sender returns to the spacer;
* the receiver drops its acknowledge.

Each link is 21 wires: 10 dual-rail bits and one acknowledge.

**Input port** (`hermes_a_input_port`). A token takes one of three paths:

1. A **BOP** flit goes through **path calculation** (`hermes_a_path_calc`).
   * A completion detector waits for a complete token.
   * Only then does it let the router coordinates into two 4-bit subtractions.
   * The signs of the differences give the output. XY: East/West first, then
     North/South, Local when both are zero.
   * The result is a 4-bit dual-rail one-hot code over the four *other*
     ports. Channel *k* leads to port *k* if *k* is below the input's own
     number, otherwise to port *k+1*.
   * The decision is stored for the rest of the packet.
2. **Body flits** follow the stored decision.
3. The **EOP** flit goes to the **S-Control** (`hermes_a_s_control`). It
   sends the flit on channel A and then a kill token (BOP=EOP=1) on channel
   B, to the same output. Its handshake order is:

   ```
   Req_in+  Ack_out+  Req_in-  ReqA+ AckA+ ReqA- AckA-  ReqB+ AckB+ ReqB- AckB-  Ack_out-
   ```

   The input side is acknowledged at once. The acknowledge is released only
   when both A and B have completed, so the next packet cannot start before
   the kill token has been delivered. Delivering the kill token also clears
   the stored decision.

The stored routing decision is also offered to the outputs as one dual-rail
bit per output (`route_t`/`route_f`).

**Output port** (`hermes_a_output_port`). One output control per possible
source, a four-way arbiter, and an OR merge.

* **Output control** (`hermes_a_output_ctrl`):
  * A dual-rail half-buffer register. Each rail behaves as a C-element of the
    incoming rail and the inverted acknowledge.
  * The routing bit becomes the single-rail arbiter request: set by the true
    rail, cleared by the false rail.
  * A kill token in the register is detected by AND-ing the BOP and EOP true
    rails. It is acknowledged locally, never forwarded, and withdraws the
    request. This is how the path is torn down.
* **Arbiter** (`hermes_a_out_arbiter`):
  * First come, first served, built from six pairwise "who asked first" bits,
    one per pair of requesters.
  * A grant is kept until its request falls, that is, after the kill token.
  * Requests that rise on the same edge go to the lower index first.

**Hermes-AA** is the same router with `ROUTING=1`: west-first adaptive
routing (`hermes_aa_wf_route`).

* A packet whose target lies to the west must go West.
* Otherwise any productive direction (East, North, South) may be taken. A
  free output is preferred, checked in the order E, N, S.
* "Free" means the output's arbiter currently grants nobody (`out_busy`).
* Because West is only ever taken first, the turns that could close a
  deadlock cycle never happen.

## C-element cells

`ascend_celem` is one module. Its `CELL` parameter selects one of four cell
functions. Q is the present output and Q+ the next:

| CELL | Q+ |
|---|---|
| `CELL_C2` | A·B + A·Q + B·Q |
| `CELL_C3` | A·B·C + Q·(A + B + C) |
| `CELL_C2R1` | RST·(A·B + A·Q + B·Q), where RST low forces 0 |
| `CELL_C1U1` | B·(A + Q): B alone can clear, setting needs A and B |

Each is written as a latch that loads when the function does not reduce to
Q, so synthesis gives a latch and its enable logic. `ascend_mutex` is a
**behavioural model** of the mutual-exclusion element (metastability filter):

* Two requests (RA, RB) compete and two acknowledges (AA, AB) answer them.
* The acknowledges are mutually exclusive, and a grant is held while its
  request stays high.
* A true tie goes to RA after `RESOLVE_DELAY` time units. A real cell
  resolves a tie by an electrical race.

## How the clockless designs are modelled, and what that means

BaBaRouter and Hermes-A are clockless circuits. Writing them as
synthesizable RTL for standard tools means giving them a clock:

* **BaBaRouter** channels are valid/ready pairs. A transfer happens on a
  rising edge where both are high. The Balsa `arbitrate` construct becomes a
  round-robin arbiter, and the chain of handshake buffers becomes a circular
  FIFO of the same depth.
* **Hermes-A** keeps its dual-rail tokens, spacers and 4-phase acknowledges
  bit for bit, so the protocol can be observed and checked at every wire. The
  C-elements and completion detectors, however, are evaluated on a clock
  edge.
* The three-register ring that holds the routing decision in the clockless
  original becomes a single register. A ring of three is needed only so that
  a 4-phase pipeline can circulate one token.
* Hermes-A's `clk` only paces the evaluation. It carries no meaning at the
  links.

What carries over:

* the order of every handshake;
* path set-up and tear-down;
* arbitration fairness;
* the kill-token mechanism;
* the mutual exclusion of merges;
* adaptive routing decisions.

What does not carry over:

* timing: the absolute throughput and latency of the clockless circuits
  (hundreds of Mflit/s in 65 nm) come from cell delays that a clocked model
  does not have;
* delay insensitivity itself;
* the electrical race in arbiters.

## Departures and own choices

* **Hermes-GLP routing core.** It uses the BaBaRouter core (`router_core`).
  The original router is a synchronous design of the same structure (same
  packet format, XY routing, EOP-based release).
* **Hermes-GLP port occupancy.** It is an unclocked comparison of the
  FIFO pointers, followed by a synchronizer, as explained above.
* **Hermes-GLP input FIFO depth.** It is 8. No depth was given for this
  router, so the BaBaRouter default was used.
* **Hermes-GLP priority.** It is one bit, for two clock sources. A port's
  priority is taken from its FIFO head. While the FIFO is empty it is taken
  from the packet's last flit read. Once the packet is done it is cleared.
* **S-Control order.** The input side is acknowledged first and released
  last, as the controller's state graph shows it. A prose description would
  also allow acknowledging only after A and B. Either way, the sequence ends
  only after both.
* **Hermes-A output arbiter.** It is written as a matrix of pairwise
  first-come bits, not as a shuffle-exchange network of two-input arbiters.
* **Output request.** The output control sets its request on the *rising*
  true rail of the routing bit. A decision that is still present while the
  kill token drains therefore cannot request the output again. The routing
  bit must return to null between packets, as the input port does.
* **Packet length.** Hermes-A packets must have at least two flits, because a
  one-flit packet would carry BOP=EOP=1.
* **Coordinates.** Router coordinates and addresses are parameters. The
  defaults are node 11 for BaBaRouter and Hermes-GLP, and (1,1) for
  Hermes-A/AA.

Not provided here:

* meshes of BaBaRouter or Hermes-A routers. Only Hermes-GLP has a mesh
  (3x3). Its activation-rate sweeps over insertion rates are not run: the
  network interfaces and traffic generators of those experiments are not
  part of this RTL;
* the clock-stretching network interface for synchronous IP cores;
* transistor-level C-element topologies, and ring oscillators built from
  them;
* the RSA core used as a C-element test vehicle.

## Files

```
rtl/noc_pkg.sv             port numbering (port_e), NPORTS
rtl/hermes_a_pkg.sv        dual-rail token type and helpers
rtl/ascend_pkg.sv          C-element cell selector
rtl/gals_async_top.sv      all designs side by side

rtl/babarouter.sv          BaBaRouter = 5 x hs_fifo + router_core
rtl/router_core.sv           5 x baba_in_ctrl + baba_switch_ctrl + baba_crossbar
rtl/hs_fifo.sv               valid/ready FIFO (also the request FIFOs)
rtl/baba_in_ctrl.sv          packet framing, EOP
rtl/baba_switch_ctrl.sv      shared routing: baba_arbiter + baba_xy_route + request FIFOs
rtl/baba_arbiter.sv
rtl/baba_xy_route.sv
rtl/baba_crossbar.sv

rtl/hermes_glp_noc.sv      NX x NY mesh of hermes_glp_router
rtl/hermes_glp_router.sv   Hermes-GLP = 5 x bisync_fifo + router_core + glp_clock_ctrl
rtl/bisync_fifo.sv           Gray-pointer two-clock FIFO (uses sync2)
rtl/sync2.sv
rtl/glp_clock_ctrl.sv        clk_switch + clk_gate + activity synchronizer
rtl/clk_switch.sv
rtl/clk_gate.sv

rtl/hermes_a_router.sv     Hermes-A/AA = 5 x input port + 5 x output port
rtl/hermes_a_input_port.sv   hermes_a_path_calc + hermes_a_s_control + decision register
rtl/hermes_a_path_calc.sv    XY or hermes_aa_wf_route
rtl/hermes_aa_wf_route.sv
rtl/hermes_a_s_control.sv
rtl/hermes_a_output_port.sv  4 x hermes_a_output_ctrl + hermes_a_out_arbiter + merge
rtl/hermes_a_output_ctrl.sv
rtl/hermes_a_out_arbiter.sv

rtl/ascend_celem.sv        C2 / C3 / C2R1 / C1U1
rtl/ascend_mutex.sv        mutual-exclusion element (behavioural)
```

Every module has a testbench `tb/tb_<module>.sv`. The exceptions are the packages, `sync2` and `clk_gate`, which are tested through the modules that use them.

## Size after generic synthesis

These are Yosys generic cells, not a technology library, so only the ratios
mean much. Each router's input FIFOs are counted as memory bits.

| Module | Cells | Flip-flop bits | Memory bits |
|---|---|---|---|
| `babarouter` | 543 | 178 | 380 |
| `hermes_glp_router` | 628 | 309 | 420 |
| `hermes_glp_noc` (3x3) | 5334 | 2481 | 2916 |
| `hermes_a_router` | 2556 | 870 | 0 |
| `gals_async_top` | 11718 | 4708 | 3716 |

Hermes-A has no FIFOs, yet it is the largest single router. Every output
keeps a registered dual-rail copy of each of its four possible sources.

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/noc_pkg.sv rtl/hermes_a_pkg.sv rtl/ascend_pkg.sv \
    tb/tb_babarouter.sv --top-module tb_babarouter
./obj_dir/Vtb_babarouter
```

Replace the testbench name to run another one. To lint a module:
`verilator --lint-only -Wall -y rtl rtl/*_pkg.sv rtl/<module>.sv`.

What the testbenches establish:

* **`tb_gals_async_top`** runs every design at its default parameters at the
  same time, in about half a minute. It counts each mechanism and fails if any
  count stays at zero. The mechanisms are:
  * BaBaRouter: input FIFO full, simultaneous routing requests, queued output
    requests, five concurrent paths;
  * Hermes-GLP: clock gated, fast clock, slow clock, bisynchronous FIFO full;
  * the Hermes-GLP mesh: packets over two or more hops, routers on the fast
    clock, and every router stopped after the traffic;
  * Hermes-A/AA: kill tokens, output contention, west-first choices off the
    XY path;
  * cells: C-element hold, mutex tie.
* **Router testbenches** (`tb_babarouter`, `tb_router_core`,
  `tb_hermes_glp_router`, `tb_hermes_a_router`) rebuild every packet at the
  outputs. They compare each packet flit by flit with the next packet sent by
  its source, and check the output against the routing rule. Hermes-GLP is
  run with five sender clocks unrelated to its own.
* **`tb_hermes_glp_noc`** runs three workloads on the mesh:
  * the two-flow example above, checking each router's clock state during it;
  * random traffic between all nine nodes;
  * six fixed two-flow traffic patterns, all-high or all-low priority.
  For each pattern it prints the NoC activation rate. Each sample scores 1
  for a router on the fast source, 1/2 on the slow one and 0 when stopped.
  Samples are taken every 1 ns and averaged over routers and time. With
  50 % insertion the rates come out between 20 % and 51 %. An always-on
  NoC would score 100 %. The low-priority patterns must never select the
  fast source.
* **`tb_babarouter`** also checks the five-flows-at-once rate: five paths at
  one flit per cycle each.
* **`tb_clk_switch` and `tb_glp_clock_ctrl`** measure every pulse of the
  output clock: no runt high or low phase is allowed.
* **`tb_hermes_a_s_control`** logs every handshake transition and compares
  the sequence above.
* **`tb_hermes_a_out_arbiter`** checks first-come-first-served order on
  20,000 cycles of random requests.

To change the design:

* FIFO depths, flit width and addresses are module parameters.
* The Hermes-A token width lives in `hermes_a_pkg`.
* A new routing rule for Hermes-A goes next to `hermes_aa_wf_route` and is
  selected in `hermes_a_path_calc`.
