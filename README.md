# Speculative and non-speculative virtual channel routers for a network-on-chip

A router in a network-on-chip has to do two allocations for every packet
before the packet's first flit can cross the switch: it has to claim a
virtual channel (VC) on the link it leaves by, and it has to win the
crossbar output that drives that link. A plain VC router does these one
after the other, which costs a pipeline stage per hop. A *speculative* VC
router does both in the same cycle and assumes the channel allocation will
succeed. When the guess is right the flit crosses a cycle earlier. When it is
wrong the switch slot is wasted and the flit tries again.

This repository holds two five-port VC routers, written in synthesizable
SystemVerilog, so that the two approaches can be compared. They share the
same input ports, VC allocator and output arbiters:

| router | allocation | crossbar | head-flit latency |
|---|---|---|---|
| `spec_vc_router` | VC and switch allocation in the same cycle | plain crossbar; losers wait in the input buffers | 3 clock edges |
| `nonspec_vc_router` | VC allocation first, switch allocation after | *contention-free* crossbar: a FIFO in front of every crossbar input | 5 clock edges |

`noc_router_top` places the two side by side. Each router keeps its own ports
(`s_*` for the speculative one, `n_*` for the other). Both share the clock and
the reset.

The design follows a short paper that compares these two routers on a small
FPGA (a Spartan-3 XC3S50). The paper gives the main ideas: the two
allocations in parallel, the five buffered ports, the crossbar with one
arbiter state machine per output, and the FIFO-buffered crossbar whose
request lines are its FIFOs' inverted empty flags. It leaves most sizes,
encodings and timings open. Those were chosen here, and the section
[Choices made here](#choices-made-here) lists them.

## Ports, flits and the mesh

Ports are numbered 0 to 4 in the order Local, North, South, East, West
(`noc_pkg::port_e`). On the input side port 0 is where the attached core
injects flits. On the output side it is where flits are ejected to the core.

A flit is one `noc_pkg::flit_t`, 18 bits wide:

| field | bits | meaning |
|---|---|---|
| `head`, `tail` | 1 + 1 | first and last flit of a packet (a single-flit packet sets both) |
| `vc` | 1 | virtual channel on the link the flit is crossing |
| `la_port` | 3 | lookahead route: the output port this flit takes at the router it is entering |
| `dst_x`, `dst_y` | 2 + 2 | destination in a mesh of up to 4x4 routers |
| `data` | 8 | payload |

Routing is dimension-ordered (X first, then Y) over a 2-D mesh. North is +y
and East is +x. The routing is *lookahead*: a router does not compute its own
route. It reads the route from `la_port`. While the flit is being decoded,
the router works out the route the flit will need at the *next* router
(`la_route`) and writes it into the outgoing head flit. The core that
injects a packet must fill in `la_port` for the first router. A router's
own mesh position is set by the parameters `ROUTER_X` and `ROUTER_Y`.

Router interface, per port:

- `in_valid`, `in_flit`: a flit offered to the input port. It is written into
  the buffer of virtual channel `in_flit.vc` on the rising clock edge.
- `in_vc_full[p][v]`: that channel's buffer is full. The sender must not send
  to a full channel. A flit sent anyway is dropped, and an assertion fires.
- `out_valid`, `out_flit`: a registered output flit. `out_flit.vc` is the
  output VC the packet was given, and `out_flit.la_port` is its route at the
  next router.

The next router is assumed always to accept a flit (there are no credits).
An output VC counts as free again once its packet's tail flit has left.

All state is reset by `rst`, which is synchronous and active high.

## How a packet crosses the speculative router

Each input port has one FIFO per virtual channel (`BUF_DEPTH` = 4 flits).
Each input VC moves through three states (`input_port`):

```
 VC_IDLE ──head at FIFO front──▶ VC_WAIT_VA ──VC granted──▶ VC_ACTIVE
    ▲        (1 cycle: decode,        (requests a VC)       (flits use the
    │         lookahead route)                               switch)
    └──────────────────── tail flit leaves ◀────────────────────┘
```

For a head flit offered before clock edge 1, with no contention:

| edge | what happens |
|---|---|
| 1 | the flit is written into its VC buffer |
| 2 | decode and routing: the output port is taken from `la_port`, and the next router's route is computed and stored |
| 3 | VC allocation and switch allocation in the same cycle. Both are won, so the flit crosses and is registered at the crossbar output |

The flit is on `out_valid/out_flit` after edge 3. The following flits of
the packet already own the VC, so each of them only needs the switch. They
leave on consecutive cycles.

### The speculative cycle in detail

In `VC_WAIT_VA` the VC does two things in one cycle:

1. It asks `vc_allocator` for a VC on its output port (`va_req`, `va_port`).
2. If that output has at least one free VC (`port_free`), it also asks the
   crossbar for the output port (`sa_req`, `sa_dest`). This is speculative,
   because the VC allocation has not yet been decided.

Both answers arrive combinationally in the same cycle. The input port sends
its flit into the crossbar together with `sa_valid`, which is high only if
the VC already owns an output VC or is being granted one in this cycle. The
possible outcomes are:

| VC allocation | switch | result |
|---|---|---|
| won | won | the flit crosses now (the fast path) |
| won | lost | the VC keeps its output VC and goes to `VC_ACTIVE`, then retries the switch alone in the next cycle |
| lost | won | failed speculation: the crossbar slot goes unused and the flit stays in the buffer |
| lost | lost | nothing happens, and the flit retries |

This is the example of the original paper. Packets B (North input) and A
(South input) both want East, and East has two free VCs. Both packets win a
VC in the same cycle. B wins the switch and crosses. A keeps its VC and
crosses one cycle later. `tb_spec_vc_router` checks exactly this timing.

The condition "request the switch only if the output has a free VC" matters
because of how the output arbiters work. An arbiter lets the current owner
of an output keep it for as long as that owner requests (see below). Without
the condition, a speculative requester that can never get a VC could hold an
output forever. With it, such a requester drops its request once the output's
VCs are used up, and the output passes on.

Only one VC of an input port can use the switch in a cycle, because the
crossbar has a single input per port. The input port chooses among its ready
VCs in round-robin order.

## The crossbar and its arbiters

`crossbar` is a 5x5 switch. Each input presents a flit, a destination port
and a request. Each output has one `xbar_arbiter`, which sees the requests of
all inputs that want that output. The output stage is registered.

`xbar_arbiter` is a state machine with states `IDLE` and `G1` to `G5`, where
`Gk` means that input k owns the output:

- the owner keeps the output while its request stays high, so a packet whose
  flits follow one another is not broken up;
- when the owner stops requesting, the output goes to the lowest-numbered
  input that is requesting, or back to `IDLE` if none is;
- the grant is the state being entered, so an input that requests in a cycle
  learns the result in that same cycle.

In the speculative router these arbiters *are* the switch allocator.

## The non-speculative router and the contention-free crossbar

In `nonspec_vc_router` the input ports run with `SPECULATIVE = 0`. A VC asks
for the switch only after it owns an output VC. The "switch" it sees first is
a FIFO. `contention_free_crossbar` puts a FIFO (`XBAR_FIFO_DEPTH` = 4) in
front of every crossbar input, storing each flit together with its
destination. The crossbar request of an input is its FIFO's empty flag,
inverted. When two FIFO heads want the same output, the arbiter picks one,
and the other simply stays at the head of its FIFO and requests again in the
next cycle. Nothing is dropped. The input port treats room in the FIFO as its
switch grant.

Each FIFO is a `fifo`, built from a control unit (`fifo_ctrl`: requests in;
enables, addresses and empty/full flags out) and a memory (`fifo_mem`:
synchronous write, asynchronous read). The input buffers of both routers use
the same `fifo`.

Head-flit timing without contention:

| edge | what happens |
|---|---|
| 1 | write into the input buffer |
| 2 | decode and routing |
| 3 | VC allocation |
| 4 | write into the crossbar FIFO |
| 5 | arbitration and traversal |

Body flits take 3 edges.

In this router an output VC is released only when its tail leaves the
crossbar output. Releasing it when the tail enters the crossbar FIFO would
let a new packet claim the VC while flits of the old one are still queued.

## VC allocation

`vc_allocator` keeps a busy bit for each output VC, 5 ports x 2 VCs. Its
requesters are the ten input VCs. Each cycle, each output port hands out its
free VCs, lowest-numbered first, to the requesters in fixed priority order
(the lowest input port first, then the lowest VC). Several packets can
therefore win VCs of one output in the same cycle, as in the example above.
A VC becomes busy on the edge after its grant. It becomes free on the edge
after its tail flit appears on the output (`rel_valid`, `rel_vc`).

## Choices made here

The following points are not fixed by the paper this design follows and were
decided here:

- 2 virtual channels per port, 4-flit input buffers, and 4-entry crossbar
  FIFOs.
- The flit format, the 8-bit payload, and the 4x4 mesh with XY routing used
  for the lookahead route.
- One cycle for decode and routing, registered crossbar outputs, and grants
  in the same cycle as requests. Together these give the latencies of 3 and
  5 edges.
- No credit flow control towards the next router.
- Speculative switch requests only when the output has a free VC. A failed
  speculation simply wastes the slot.
- Fixed priority in VC allocation, and round-robin choice of the VC that uses
  the switch.
- The arbiter reading: hold while requesting, then lowest index. The
  paper's state diagram does not label every transition.
- The crossbar's extra `in_valid`/`in_gnt` signals, which a speculative input
  needs.
- Synchronous active-high reset.

The paper reports FPGA area and speed: 343 slices at 263 MHz for the
speculative router, and 527 slices at 121 MHz for the non-speculative one, on
an XC3S50. Those figures belong to the paper's own implementation and are
not claimed for this RTL. Note also that a router with 18-bit flits, as
written here, needs about 200 pins when it is the top of a chip, more than
the 124 user I/Os of that device. The paper's implementation used 86.

Not included: the network interface that turns a core's requests into
packets, and the links between routers. The paper names them as parts of
any network-on-chip but does not design them.

## Files

`rtl/`:

| file | contents |
|---|---|
| `noc_pkg.sv` | sizes, `port_e`, `flit_t`, XY route function |
| `noc_router_top.sv` | both routers side by side |
| `spec_vc_router.sv`, `nonspec_vc_router.sv` | the two routers |
| `input_port.sv` | VC buffers, VC state, lookahead route, speculative/serial requests |
| `la_route.sv` | next-router route |
| `vc_allocator.sv` | output VC allocation and release |
| `crossbar.sv`, `xbar_arbiter.sv` | 5x5 crossbar, output arbiter FSM |
| `contention_free_crossbar.sv` | FIFO-fronted crossbar |
| `fifo.sv`, `fifo_ctrl.sv`, `fifo_mem.sv` | FIFO unit |

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`. It
also has `router_traffic.sv`, a random-packet source and scoreboard for a
whole router. The scoreboard checks that every flit arrives in order from its
source VC, on the correct output, with the correct next-hop route, and
without interleaving with another packet on the same output VC.

`tb_noc_router_top` runs both routers at their default sizes under heavy
random load. It counts how often each mechanism happens and fails if one
never does. The mechanisms are: both allocations won in one cycle, VC won but
switch lost, switch won without a VC, no free output VC, switch lost to
another input, input buffer full, a flit held in a crossbar FIFO, and a
crossbar FIFO full.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_noc_router_top.sv --top-module tb_noc_router_top -o sim
./obj_dir/sim
```

Replace `tb_noc_router_top` with any other `tb_<module>` to test one block.
Every testbench passes, and each one fails when its block is replaced by a
deliberately broken version. The end-to-end run delivers about 600 flits per
router in well under a second.

To change a size, edit `noc_pkg` (ports, VCs, payload, coordinate width) or
the module parameters (`BUF_DEPTH`, `XBAR_FIFO_DEPTH`, `ROUTER_X`,
`ROUTER_Y`). The traffic scoreboard encodes the source port and VC in the
payload, so it assumes `NUM_VC = 2` and `DATA_W = 8`.
