# CHIP-LINK: a small 4x4 network-on-chip router

CHIP-LINK is a router for a network on chip. Its job is to replace long
point-to-point wiring between IP blocks on an FPGA-class chip with short
links between routers. Each link carries 8-bit flits. Every flit names the
network address it is going to. The router looks that address up in a table
to pick one of its four output ports. When several inputs want the same
output in the same clock, a round-robin allocator decides in that clock. Each
input and each output has an 8-flit buffer. A flit waits in its input buffer
while its output is busy or full, and waits in its output buffer until the
next hop reads it.

The RTL follows the thesis "'CHIP LINK' A NOC Router for Next Generation
FPGA". That thesis first builds a bufferless router and then the buffered
one. This repository contains both:

| design | flit | buffering | routing | arbitration | flow control |
|---|---|---|---|---|---|
| full router (`chip_link_router`) | 8 bits | 8-flit FIFO per input and per output | destination address through a writable table | round robin, one cycle | back-pressure: `pf` (port free) and `ne` (not empty) |
| simple router (`simple_router`) | 18-bit phits | one register per port | source routed: 2-bit port fields in the head phit | fixed priority | losers are dropped |

`chip_link_top` places the two side by side. They share only clock and
reset: the full router's ports have the `fr_` prefix and the simple router's
have `sr_`.

## Full router: the path of a flit

```
 i[n],ew[n] ──► input FIFO ──► head prefetch ──► routing table ──► allocator ──► control ──► output FIFO ──► o[n],ne[n]
   pf[n] ◄──────┘     ▲              │  head flit          req[k][i]      gnt[k][i]    │ crossbar,       ▲ er[n]
                      └── rd_en ◄────┴──────────────── erase[i] ◄──────────────────────┘ enable[k] ─────┘
```

1. **Input FIFO** (`fifo`). `ew[n]` writes `i[n]`. `pf[n]` is high while
   the FIFO is not full. A write while `pf[n]` is low is lost, so a source
   must watch `pf`.
2. **Head prefetch** (`head_prefetch`). The FIFO's read data is registered:
   a word becomes visible one clock after it is read. The prefetch stage
   reads the FIFO as soon as its output register is empty, and again in the
   same clock that the current head is granted. So the oldest flit of every
   input is always on show, and a busy input can send one flit every clock.
3. **Routing table** (`routing_table`). Bits [7:4] of the head flit are the
   destination address. They index a 16-entry table of 2-bit output ports.
   Input `i` then raises `req[k][i]` for its output `k`. It does not raise
   it while output buffer `k` is full, so the flit stalls where it is.
4. **Allocator** (`allocator`). There is one `rr_arbiter` per output. Each
   arbiter picks one of the inputs requesting it and gives `gnt[k]`, in the
   same clock as the requests.
5. **Control** (`control`). For each output it forms a one-hot
   multiplexer. `enable[k]` writes the chosen flit into output FIFO `k`.
   `erase[i]` tells input `i` that its head has left.
6. **Output FIFO** (`fifo`). `ne[n]` is high while it holds flits. `er[n]`
   reads one, and the flit is on `o[n]` after that clock edge.

### Timing

| event | clock edge |
|---|---|
| `ew[n]` high with the flit on `i[n]` | t |
| flit on the input FIFO output, `head_valid` set | t+1 |
| request, grant and crossbar in one combinational path; flit written to the output FIFO | t+2 |
| `ne[k]` seen high | after t+2, so 3 clocks after the write |
| `er[k]` high | any later edge u |
| flit on `o[k]` | after u |

With no contention, each input and each output moves one flit per clock.
Flits from the same input to the same output stay in order. Flits from
different inputs to one output interleave in round-robin order.

### Capacity and back-pressure

Once an output is full, an input that keeps sending to it holds 17 flits:

- 8 in the output FIFO;
- 8 in its input FIFO;
- 1 on that FIFO's output register.

`pf` then goes low. The router never writes a full output FIFO; an assertion
in `chip_link_router` checks this. A stalled head blocks its whole input,
even when the flits behind it go to free outputs. There are no virtual
channels: this is plain head-of-line blocking.

### Throughput under uniform random traffic

`tb_uniform_traffic` measures the router with every output read every
clock and destinations chosen uniformly at random. Latency counts from the
clock in which a flit is generated, so it includes waiting at the source;
the unloaded minimum is 4. Two builds are measured: the default 4x4 and an
8x8 build of the same RTL. These are typical numbers, and they vary a
little with the random seed.

| offered load (flits/clock/input) | 4x4 accepted | 4x4 mean latency | 8x8 accepted | 8x8 mean latency |
|---|---|---|---|---|
| 0.1 | 0.10 | 4.1 | 0.10 | 4.1 |
| 0.3 | 0.30 | 4.2 | 0.30 | 4.3 |
| 0.5 | 0.51 | 5.0 | 0.50 | 5.3 |
| 0.7 | 0.66 (saturated) | grows without bound | 0.62 (saturated) | grows without bound |
| 1.0 | 0.66 | grows without bound | 0.62 | grows without bound |

The router saturates at about 0.66 (4x4) and 0.62 (8x8) flits per clock per
port. The cause is head-of-line blocking: each input buffer is a single
FIFO, so a blocked head flit also blocks every flit behind it. These values
match the known limit for input-queued switches with FIFO input buffers
(about 0.59 for large switches). A better allocator cannot raise them; only
virtual channels or speedup can.

## Switch allocation: the round-robin arbiter

This is the part that decides fairness, so it is worth reading closely.

`rr_arbiter` holds a one-hot priority vector, which is `0001` after reset.
Its grant logic works like a ring of fixed-priority cells:

- a "carry" enters at the cell that holds priority;
- the carry passes each cell that has no request;
- the first cell with a request takes the carry and is granted.

A ring of combinational logic would be a loop. The RTL instead walks the
ring twice in a straight line (`2N` cells) and lets only the first grant
through. The result is a grant to the first requester at or after the
priority position, produced in the same clock as the requests.

The priority register moves only in a clock that has a grant:

- `TRUE_RR = 1` (the default, and what the allocator uses): priority moves
  to the agent just after the winner. The winner becomes the lowest
  priority, and an input that was not served cannot be overtaken twice.
  With all four inputs backlogged on one output, each input gets exactly
  one grant in every four. The testbenches check this.
- `TRUE_RR = 0`: priority simply steps one position per grant ("blind"
  rotation). It exists as the alternative and is not used.

The allocator is the one-clock simplification of iSLIP that the design is
based on. It keeps the fair round robin but does no request-grant-accept
handshake. Because the table gives each flit exactly one output, an input
only ever requests one output. So the output arbiters alone make a legal
match: no input is granted twice. `gnt` is a combinational function of
`req` and the priority state. The longest path in the router therefore runs
through the table lookup, the arbiter, the crossbar and the output FIFO's
write port.

## Routing table

The table is written one entry per clock through the configuration port:
`cfg_we`, `cfg_addr` (the network address) and `cfg_port` (the output).
After reset, address `a` maps to port `a mod 4`. A lookup happens when a
flit reaches the head of its input, so rewriting an entry changes the route
of every flit still waiting. Change the table only while no flits for that
address are in flight. The testbenches do this only when the router is
drained.

The flit layout is `{addr[3:0], payload[3:0]}`. To use more address or
payload bits, change `FLIT_W` and `ADDR_W` in `chip_link_pkg`.

## Simple router

`simple_router` has no buffers, only one register on each input and output.
A phit applied at edge t is on the output after edge t+1.

Phit layout: bits [17:16] are the type (3 = head, 2 = payload, 0 and 1 =
idle). In a head phit, bits [15:14] name the output port.

`simple_alloc` is the allocator. There is one per output, and it works as
follows:

- The lowest-numbered input whose head names this port wins.
- The winner keeps the output while payload phits follow on the same input.
  The register `last` remembers who was selected.
- Any other head for that output in the same clock, or while the output is
  held, is dropped, along with its payload. This is dropping flow control:
  the sender must detect the loss itself.
- When a head is granted, the shifter removes the port field. The type stays
  in place, the bits below move up by two, and zeros fill the bottom. The
  next port field is now at [15:14] for the next router, so a head carries
  its whole path as a list of 2-bit hops.

## What follows the thesis and what is this design's own choice

These follow the thesis:

- both routers' block structure, port names and sizes: 4 ports, 8-bit flits,
  8-flit FIFOs, 18-bit phits;
- the FIFO's behaviour: registered read, occupancy counter, asynchronous
  reset;
- the one-clock non-blind round-robin allocator;
- the control block's `erase` and `enable`;
- the simple router's fixed-priority allocator with hold.

These are this design's own choices, because the thesis leaves them open:

- **Flit format**: a 4-bit address and a 4-bit payload.
- **Routing table**: 16 entries, the reset contents and the configuration
  port. The thesis only says the table is configurable.
- **Head prefetch**: the stage that keeps each input FIFO's head visible.
  The thesis's drawing has small unnamed blocks in that place.
- **Full outputs**: requests to a full output buffer are held back. Without
  this the crossbar could write into a full FIFO and lose the flit.
- **Simple router details**: the shifter keeps the type bits, and idle
  outputs send all zeros.
- **Reset**: every register has a reset, all asynchronous and active high.
  The simple router had none.
- **Arbiter**: a two-lap carry chain instead of a parallel-prefix tree. The
  logic function is the same.

Not built:

- The core network interface that cuts core data into packets. It is
  described only as background, without any format.
- Virtual channels and VC allocation. These are also background only; the
  router has none.

The thesis's reported 250 MHz and 4 ns data delay come from its own
standard-cell layout. Nothing in this RTL fixes them.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rr_arbiter` | grants against a reference round robin, reset priority, no rotation when idle, one grant each in four fully loaded clocks |
| `tb_allocator` | 1000 random request matrices against four model arbiters; no input granted twice |
| `tb_fifo` | random push and pop against a queue model; overfill and over-drain; simultaneous push and pop when full or empty |
| `tb_routing_table` | reset contents; random reconfiguration; lookups; masking by full outputs |
| `tb_control` | crossbar data, `enable` and `erase` for random legal grants |
| `tb_simple_alloc` | select and shift against a model over 3000 random clocks |
| `tb_simple_router` | latency, route-field shift, a conflict and a drop during a hold; then 5000 random clocks against a cycle model |
| `tb_chip_link_router` | a scoreboard of every flit by source and sequence number; see below |
| `tb_head_prefetch` | the read-ahead rule and `head_valid` against a model |
| `tb_uniform_traffic` | 4x4 and 8x8 routers under uniform traffic from 10 % to 100 % load: in-order, intact delivery; full acceptance up to 50 % load; 4-clock unloaded latency; a saturation point in the expected range (through `uniform_traffic_harness`) |
| `tb_chip_link_top` | the same as `tb_chip_link_router` plus a simple-router cycle model, through the top at default sizes |

The last two run through these phases:

- the three-clock latency;
- round-robin service with four inputs contending for one output;
- filling an unread output until `pf` falls after 17 flits;
- a table rewrite;
- random traffic.

They count conflicts, stalls, `pf`-low clocks and table writes, and treat a
mechanism that never happened as a failure.

To run one with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/chip_link_pkg.sv tb/tb_chip_link_top.sv --top-module tb_chip_link_top
./obj_dir/Vtb_chip_link_top
```

Replace the testbench name to run another. The package must come first on
the command line; Verilator finds the other modules through `-y`.

## Files

- `rtl/chip_link_pkg.sv`: sizes, flit and phit types
- `rtl/chip_link_top.sv`: both routers side by side
- `rtl/chip_link_router.sv`: the full router
- Full router blocks, each in its own file:
  - `rtl/fifo.sv`
  - `rtl/head_prefetch.sv`
  - `rtl/routing_table.sv`
  - `rtl/allocator.sv`
  - `rtl/rr_arbiter.sv`
  - `rtl/control.sv`
- `rtl/simple_router.sv` and `rtl/simple_alloc.sv`: the bufferless router
- `tb/tb_*.sv`: one testbench per block, for the top, and the traffic test
- `tb/uniform_traffic_harness.sv`: traffic generator, scoreboard and
  statistics for one router
