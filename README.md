# FRA-CSLA: a flexible five-port NoC router

An input-buffered network-on-chip router normally stalls an arriving packet
whenever the FIFO of the port it arrives on is full, even if the FIFOs of the
other ports are nearly empty. The *flexible router architecture* (FRA) removes
that stall: the input port's **FIFO flexibility controller** (FFC) stores the
packet in another port's FIFO that still has room and grants the upstream
router at once. The same total buffer space then absorbs a burst on a single
port. The "CSLA" part of the name refers to the adder used inside the input
side: every increment and the up/down occupancy count go through a
**carry select adder** built from ripple carry adders and
**Binary-to-Excess-1 converters** (BEC), in place of a plain adder.

This repository holds synthesizable SystemVerilog for the whole router. Each
block has a self-checking testbench, and an end-to-end testbench drives
traffic through the router.

## Router structure

```
            upstream links (req_US / pkt_US / gnt_US), one per port
                 |        |        |        |        |
             +---v--+ +---v--+ +---v--+ +---v--+ +---v--+
             | in E | | in W | | in N | | in S | | in L |   input_port:
             | FFC  | | FFC  | | FFC  | | FFC  | | FFC  |     ffc
             | FIFO | | FIFO | | FIFO | | FIFO | | FIFO |     fifo_buffer (+ write selector)
             | route| | route| | route| | route| | route|     routing_logic
             +--+---+ +--+---+ +--+---+ +--+---+ +--+---+
                |  req_int / gnt_int, FIFO heads  |
          ======+========= crossbar (5 x out_mux) =+=======
             +--v---+ +------+ +------+ +------+ +------+
             |out E | |out W | |out N | |out S | |out L |   output_port:
             | arb  | | arb  | | arb  | | arb  | | arb  |     rr_arbiter
             | mux  | | mux  | | mux  | | mux  | | mux  |     out_mux
             | ctrl | | ctrl | | ctrl | | ctrl | | ctrl |     output_controller
             +--+---+ +--+---+ +--+---+ +--+---+ +--+---+
                v        v        v        v        v
            downstream links (req_DS / pkt_DS / gnt_DS)
```

Ports are indexed E=0, W=1, N=2, S=3, L=4 everywhere (`fra_pkg::port_e`).
Every FIFO head is wired to the multiplexer of every output. The five
multiplexers together are the crossbar.

## How FIFO sharing works

This is the part that differs from a base router. It involves two matrices of
request/grant wires between the five controllers and the five FIFOs.

**Controller side (`ffc`).** While the upstream router holds `req_US`, the
controller raises exactly one bit of `req_fifo`:

* its own FIFO, if that FIFO is not full;
* otherwise one other FIFO allowed by `BORROW_MASK` that is not full. A
  rotating search pointer picks which one. The pointer starts the search and
  advances by one each time a borrow request is placed, whether it is granted
  or not, so repeated borrows spread over the other ports.
* nothing, if every allowed FIFO is full. The upstream router then simply
  waits.

`gnt_US` is the AND of that request with the chosen FIFO's grant, in the same
cycle.

**FIFO side (write selector in `input_port`).** Several controllers can ask
for the same FIFO in one cycle, but a FIFO takes only one write per cycle. The
selector grants the FIFO's own controller first, and otherwise the
lowest-numbered requesting port. A refused controller keeps `req_US` pending
and tries again next cycle. Its search pointer has moved on, so it usually
tries a different FIFO.

**Which FIFOs share.** `fra_pkg::FLEX_PORTS = 5'b01111`: the East, West, North
and South FIFOs lend to and borrow from each other. The Local port only uses
its own FIFO, and no other port writes into it. This follows the original
router description, where the East controller's request/grant wires go to the
W, N and S FIFOs only.

**Reading out.** A borrowed packet sits in the other port's FIFO like any
native one. The routing logic at that FIFO's head sends it on by its own
destination. There is no per-packet record of where it came from.

**Consequence: ordering.** Two packets from the same input can end up in
different FIFOs and leave in either order. The router delivers every packet
exactly once, but it does not preserve order per input. Packets are single
flits, so no wormhole packet is ever split across FIFOs.

## Links and timing

All ten links use the same request/grant handshake. The sender drives `req`
and the packet. A transfer happens at a rising clock edge where `req` and
`gnt` are both high. The sender must hold `req` and the packet stable until
that edge. Concurrent assertions check this: `ffc.a_req_held` on the upstream
side, and `output_controller.a_hold` on the router's own downstream side.

| event | edge |
|---|---|
| upstream packet granted and written to a FIFO | t |
| packet at the FIFO head; its output arbiter grants; it is written to the output register | t+1 |
| `req_DS` / `pkt_DS` offered; earliest transfer downstream | t+2 |

The router has no idle-cycle bubbles. With no contention, each output sends
one packet per cycle and each input accepts one per cycle. This holds because
an output controller is `ready` when its register is empty **or** is being
emptied in the same cycle, and a full FIFO can be written in a cycle in which
it is also popped.

Reset is synchronous and active low. It empties every FIFO and output register
and clears the search and arbitration pointers.

## Packets and routing

One packet is one 32-bit flit (`fra_pkg::flit_t`):

| bits | field |
|---|---|
| 31:28 | `dst_x` destination column |
| 27:24 | `dst_y` destination row |
| 23:0 | `payload` |

`routing_logic` uses dimension-order (XY) routing relative to the router's own
coordinates `MY_X`, `MY_Y`. It moves East (+x) or West (-x) until the column
matches, then North (+y) or South (-y), and leaves on Local when both match.
Coordinates are 4 bits, which allows meshes up to 16 x 16.

## Output port

`rr_arbiter` is a round-robin arbiter over the five `req_int` lines that want
this output. It searches from its pointer and, after a grant, moves the pointer
to the port just after the winner. It grants only when `advance` (the output
controller's `ready`) is high. The granted FIFO pops on the same edge that
loads the output register. `out_mux` is an AND-OR select of the granted head.
`output_controller` is a one-flit register that drives `req_DS` until
`gnt_DS`.

## The carry select adder

`csla` computes `{cout, sum} = a + b + cin` and works as follows:

* The operand is split into groups of 2, 2, 3, 4, 5, … bits. This is the usual
  square-root split; at 16 bits it is 2-2-3-4-5.
* The lowest group is a ripple carry adder (`rca`, built from `full_adder`)
  fed with the real carry-in.
* Each higher group adds once, with an RCA whose carry-in is 0. It gets the
  carry-in = 1 result from that sum with a `bec`, which adds one using only an
  AND chain and XORs. This replaces the second RCA of a textbook carry select
  adder.
* The carry out of the group below then selects one of the two results through
  a 2:1 multiplexer.

The router instantiates it 2 and 3 bits wide:

* FIFO read and write pointers: `ptr + 1`.
* FIFO occupancy: `count + 1` or `count + 1...1`, which subtracts one.
* The controller's search pointer: `sp + 1`, wrapped at 5.

The module default is 16 bits, and its testbench checks both widths.

## Parameters

| parameter | where | default | note |
|---|---|---|---|
| `DEPTH` | `fra_router`, `input_port`, `fifo_buffer` | 4 | flits per FIFO; power of two, at least 2 |
| `MY_X`, `MY_Y` | `fra_router`, `input_port`, `routing_logic` | 1, 1 | router position in the mesh |
| `NPORTS`, `COORD_W`, `PAYLOAD_W` | `fra_pkg` | 5, 4, 24 | port count and flit layout |
| `FLEX_PORTS` | `fra_pkg` | `5'b01111` | ports that share FIFOs |
| `WIDTH` | `csla` / `rca` / `bec` | 16 / 4 / 4 | adder width |

## What follows the original design and what does not

These parts follow the original FRA-CSLA router description:

* five input and five output ports joined by a crossbar;
* FFC + FIFO + routing logic per input;
* a full FIFO makes the FFC request another port's non-full FIFO, and it
  grants upstream once a slot is found;
* `req_int`/`gnt_int` between inputs and outputs;
* arbiter + output controller + MUX per output, with `req_DS`/`gnt_DS`
  downstream;
* a carry select adder made of RCA and BEC, with carry-selected multiplexers,
  used for the input side's additions.

These are choices of this implementation, made where the description gives no
detail:

* single-flit packets and the 32-bit flit layout;
* FIFO depth 4;
* XY routing and its direction convention;
* the same-cycle request/grant link protocol;
* requesting one borrowed FIFO at a time, with a rotating search pointer;
* own-first then lowest-index priority at a FIFO's write selector;
* round robin as the arbitration scheme (the description names it as the
  common choice but does not fix it);
* the one-flit output register;
* the CSLA group sizes;
* which additions the CSLA performs;
* the Local port being excluded from sharing;
* the `borrow_evt` status output, added for monitoring.

Not included:

* The network interface and processing element that attach to the Local port.
  The router's Local link is brought out as ordinary ports for them.
* The "existing" router with a conventional adder, which the original work
  compares against.

The original work reports FPGA and ASIC area and power numbers without stating
buffer depth or flit width, so this configuration cannot be matched against
those numbers.

## Verification

Each module has a testbench in `tb/` that compares it with a model written
independently in the bench. Each prints
`TB_RESULT checks=N failures=M` and ends itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rca`, `tb_bec`, `tb_csla` | exhaustive small widths, random and carry-chain corner cases at 16 bits |
| `tb_fifo_buffer` | queue model, flags, push into a full FIFO while popping |
| `tb_routing_logic` | all 256 destinations at two router positions |
| `tb_rr_arbiter` | reference round robin; with all five requesting, each port wins once in every 5 grants |
| `tb_output_controller`, `tb_out_mux`, `tb_output_port` | hold under stall, back-to-back flits, grant choice, one-cycle load-to-offer latency |
| `tb_ffc` | own/borrow/refused/blocked cases against a reference with its own search pointer |
| `tb_input_port` | write-selector priority, stored packets, head and `req_int`, borrowing once full |
| `tb_fra_router` | end to end at default parameters (see below) |

`tb_fra_router` runs the router at its default size through five phases:

1. two-edge latency into an idle router;
2. a permutation at one packet per port per cycle, 40 cycles;
3. a hotspot where West floods a stalled East output until the other FIFOs are
   borrowed and every FIFO is full;
4. 3000 cycles of random traffic with random downstream stalls;
5. a drain.

A scoreboard checks that every packet is delivered exactly once, unchanged, on
its XY port. The bench also counts borrows, write conflicts at a FIFO,
upstream and downstream stalls, output contention and the all-full state, and
fails if any of them never happens. It also checks that each of the E, W, N and S
FIFOs stores packets from other ports at some point, and that the Local port
never borrows or lends. About 7,600 packets pass through in a few
seconds of simulation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/fra_pkg.sv tb/tb_fra_router.sv --top-module tb_fra_router -o sim
./obj_dir/sim
```

Replace `tb_fra_router` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/fra_pkg.sv rtl/<module>.sv --top-module <module>`.

## Known lint notes

The unused `cout` pins of the CSLA instances are left open on purpose: the
pointer and count arithmetic wraps. `routing_logic` looks only at the
destination fields of the flit, so Verilator reports the payload bits as
unused. The FIFO's `count` output is not needed by `input_port`.
