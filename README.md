# Negative-First wormhole router for a 3D mesh network on chip

A 3D network on chip stacks several dies and joins them with vertical links, so
every router in a 3D mesh has up to seven ports: the local IP core, four
in-layer neighbours (east, west, north, south) and two inter-layer neighbours
(up, down). This RTL implements such a router and a 3 x 3 x 3 mesh built from it.

Deadlock freedom comes from the turn model, not from virtual channels. A
packet takes all of its hops in negative directions (-x, -z, -y) before any
hop in a positive direction (+y, +x, +z). A packet that has moved in a
positive direction therefore never turns back to a negative one. With those
turns gone, no cyclic channel dependency can form in any of the three planes.
The router then needs only one input queue per port.

Main properties:

- wormhole switching: a packet holds an output from its first flit to its last;
- 32-bit flits and 4-flit input FIFOs;
- credit-based flow control;
- per-output arbitration by packet priority, then round robin;
- all seven inputs can be routed in parallel, to seven different outputs;
- globally asynchronous, locally synchronous (GALS) links: every router can run on its own clock.

## Packets and links

A packet is a sequence of 32-bit flits. Three framing bits travel with each flit:

| signal | meaning |
|---|---|
| `req` | a flit is on the link this cycle (it is written into the receiver's FIFO at the next rising edge) |
| `bop` | first flit of a packet (the header) |
| `eop` | last flit of a packet (a one-flit packet has both `bop` and `eop`) |

These form the `link_t` struct of `noc3d_pkg`. The header's low byte routes the packet:

| header bits | field |
|---|---|
| `[1:0]` | destination x |
| `[3:2]` | destination y |
| `[5:4]` | destination z |
| `[7:6]` | priority (3 is highest) |
| `[31:8]` | free for the sender's use |

Body flits are not interpreted. Coordinates are 2 bits wide, so a mesh can be
up to 4 routers along each axis.

**Credit.** Next to each link runs a 3-bit credit wire in the opposite direction.
It carries the number of free slots in the receiver's input FIFO (0 to 4). The
value comes straight from the FIFO's occupancy register. A sender may drive a
flit only in a cycle in which the credit it sees is non-zero. The flit then
passes combinationally through the sender's crossbar into the receiver's FIFO.
The credit therefore already reflects every earlier flit, and one count is
used up per flit. A FIFO cannot overflow, and no sender-side counter is
needed. With GALS links (below) the credit is computed in the sender's clock
domain from a count that can only overstate the occupancy, so the rule still
holds. An IP core follows the same rule on the local port: it drives
`local_in` only while `local_credit_out` is non-zero. It reports its own free
receive slots on `local_credit_in`.

## Port names and why the crossbar is only "semi"

Ports are indexed `pz=0, py=1, px=2, L=3, nz=4, ny=5, nx=6` (enum `port_e`).
Here `p`/`n` mean the positive/negative direction of x, y or z. An output
port is named after the direction it sends packets in: output `px` goes to the
+x neighbour. An **input port is named after the direction its packets are
travelling**. Input `px` receives what the -x neighbour sent out of its own
`px` output. A link therefore joins output P of one router to input P of the
neighbour in direction P, and its credit wire returns from that neighbour's
`credit_out[P]` to this router's `credit_in[P]`. As a result, input `pz` and
output `pz` sit on opposite sides of the router.

With this naming, the turn restriction becomes a wiring restriction:

- a packet on an `n` input, or a new packet from the local port, may leave through any output;
- a packet on a `p` input may only leave through a `p` output or the local output.

So the multiplexers of outputs `nz`, `ny` and `nx` have only four data inputs:
`L`, `nz`, `ny` and `nx`. The other four multiplexers have all seven. The
function `noc3d_pkg::xbar_mask` encodes this table. The semi-crossbar, the
credit switcher and the switch allocator all use it.

## Routing

`routing_function` is combinational. It compares the router address `adc`
with the destination in the header at the FIFO head and works in two phases:

- **Negative phase.** If any offset is negative, the candidates are those of
  `nx` (`dst.x < adc.x`), `nz` (`dst.z < adc.z`) and `ny` (`dst.y < adc.y`) that apply.
- **Positive phase.** Otherwise the candidates are those of `py`, `px` and `pz`
  whose coordinate is still short.
- If every coordinate matches, the packet goes to the local port.

Every candidate is a minimal hop, and the negative hops always come first.
Within a phase the choice is adaptive (`ADAPTIVE=1`, the default). The router
takes the first candidate, in the order listed, whose output is free (no
packet owns it) and has downstream credit. When no candidate qualifies, it
takes the first candidate and waits for it. The router computes the
availability vector `avail` from registered signals only, so this choice
adds no combinational loop. The choice is made once, when the header
reaches the FIFO head, and is kept for the whole packet.

With `ADAPTIVE=0` the route is always the first candidate. Routes are then
deterministic, and packets from one source to one destination stay in
order. With adaptive routing, two packets between the same pair of nodes can
overtake each other; the flits within a packet always stay in order.

## Inside the router

`router3d` is built from four kinds of block.

**Input controller** (`input_controller`, one per input). It contains four parts:

- `link_ctrl` writes every arriving flit into the FIFO. It runs on the clock of whoever drives the input (`in_clk`). It publishes the free-slot count as the credit, and it raises a sticky `protocol_err` on a framing error (a `bop` inside a packet, a body flit outside one) or on a flit that arrives when there is no free slot.
- the FIFO holds 4 entries of `{bop, eop, data}`, and its head is always visible. With `GALS=1` (the default) it is `gals_flit_fifo`, a dual-clock FIFO: written on `in_clk`, read on the router's `clk`, with Gray-coded pointers passed through two-flop synchronisers. The writer's occupancy, from which the credit is made, uses the synchronised read pointer. It is therefore never too low. A freed slot shows up in the credit two or three writer clock edges late. With `GALS=0` it is `flit_fifo`, a single-clock circular buffer, and `link_ctrl` runs on `clk`.
- `routing_function` routes the header at the head.
- `output_ctrl` raises a one-hot request for the routed port as soon as a header reaches the FIFO head, with the header's priority. It latches both and holds them until the packet's `eop` flit has left. While the switch allocator grants that port, it pops one flit per cycle, as long as the FIFO is not empty and the credit of the granted output is non-zero.

**Switch allocator** (`switch_allocator`). It holds one `output_arbiter` per
output port. Each arbiter works in three stages:

1. A priority comparator marks the inputs whose priority equals the highest priority offered. An input that is not requesting this output offers priority 0.
2. A C-element stage lets an input through only if both its request and its mark are high. Since the arbiter is synchronous to the router clock, that is the both-high (AND) condition of a Muller C-element.
3. A round-robin search, starting one past the previous winner, picks the winner.

The winner is registered. From the next cycle it owns the output: its grant
and the crossbar select stay set until that output carries a flit with `eop`.
The output is then free again one cycle later.

**Semi-crossbar** (`semi_crossbar`). It has seven multiplexers, each selected
one-hot by its arbiter. Each one passes `req`, `bop`, `eop` and `data`, and
drives all zeros when nothing is selected.

**Credit switcher** (`credit_switcher`). It has one demultiplexer per output.
Each one steers that output's incoming credit to the input controller that
currently owns the output. An input that owns nothing sees credit 0.

### Timing

Take an idle router with `GALS=0` and a header driven on an input in cycle *c*:

- the header is written into the FIFO at the end of cycle *c*;
- the request is raised in cycle *c+1*, and the arbiter registers its choice at the end of that cycle;
- the header is on the output link in cycle *c+2* and is written into the next router's FIFO at the end of *c+2*.

So a hop costs two clock edges for the header. With `GALS=1` the header must also
cross the FIFO's synchroniser. When the sender and the router share a clock, this
makes four edges from link to output link. Body flits then follow at one
per cycle, limited only by credit. Between two packets on the same output
there is one idle cycle while the arbiter re-arbitrates.

### Border routers

`router3d` has two 7-bit parameters, `IN_EN` and `OUT_EN`. They remove
inputs and outputs that have no neighbour:

- a removed input has no input controller, and its `credit_out` is 0;
- a removed output has no arbiter, and its link stays 0.

A packet must never be routed towards a removed output: its request would
never be granted. Addresses outside the mesh are therefore illegal.

## The mesh

`noc3d_mesh` instantiates `MX x MY x MZ` routers (default 3 x 3 x 3).

- `clk` is a vector with one clock per router. The clocks may be unrelated when `GALS=1`; with `GALS=0` they must all be the same clock. A router's local port runs on that router's clock.
- Node (x, y, z) has array index `x + MX*(y + MY*z)` and router address `{z, y, x}`.
- Each router's local port is a top-level port for its IP core: `local_in`, `local_credit_out`, `local_out`, `local_credit_in`.
- `protocol_err` reports each router's link-controller flags.
- Links that would leave the mesh are not built. In the default mesh the 8 corner routers have 4 ports, the 12 edge routers 5, the 6 face routers 6 and the centre router all 7.

## Where this design departs from the description it follows

The router follows a published design (FPGA implementation, VHDL). Some of
its details are not specified, or its figures disagree with its text. The
choices made here:

- **Clocking.** The original link controller stores flits "using GALS techniques", i.e. across clock domains, but says nothing about how. Here each input FIFO is a dual-clock FIFO written by the sender's clock. The link controller and the credit it returns live in the sender's clock domain, so the credit wire is synchronous to the sender. The synchroniser depth (two flops) and the Gray-pointer scheme are this design's choice. One asynchronous reset is shared by all domains. `GALS=0` gives a single-clock network.
- **Adaptivity.** The original describes the negative and positive phases as adaptive but gives no selection criterion. Here the criterion is "first free output with credit, in the listed order".
- **Header format, priority width, coordinate width.** These are not specified. The layout above is this design's own. The original also shows the priority entering the switch allocator as a separate signal; here it comes from the header.
- **Crossbar connectivity.** The text says outputs `nz/ny/nx` take flits only from the local and `n`-type inputs, and the other outputs from every input. The drawings of single multiplexers leave out the straight-through input (`nz` into `nz`) and show fewer than seven inputs for `pz`. The rule from the text is built, with straight-through added, since Negative-First routing needs it.
- **Credit switcher connectivity.** The drawings of the credit demultiplexers connect them the other way round from the crossbar. Here each demultiplexer reaches exactly the inputs its crossbar multiplexer reaches, as the text's description from the input side says.
- **Muller C-element.** The arbiter's C-elements are built as their both-inputs-high condition. A state-holding C-element in a synchronous arbiter would keep an input eligible after its request dropped.
- **Arbiters per output.** The original speaks both of "one switch allocator per input port" and of "seven arbiter modules". Here there is one arbiter per output port, which is where conflicts arise.
- **An address input labelled `adds`** appears on every input port of the original block diagram. It is not explained and is not built.
- **Framing check** (`protocol_err`) is an addition.
- **TSVs** are plain wires in the mesh. The IP cores are outside the design.

## Verification

Each module has a self-checking testbench in `tb/`. All of them print
`TB_RESULT checks=N failures=M` at the end and stop on a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_flit_fifo` | random push/pop against a queue model, including full and simultaneous push/pop |
| `tb_gals_flit_fifo` | dual-clock FIFO at two clock ratios: data order, no loss, writer count never below the true occupancy, reader never pops from an empty FIFO |
| `tb_link_ctrl` | credit = free slots for every occupancy; framing and overflow errors detected |
| `tb_routing_function` | exhaustive over a 4x4x4 space with all, no and random outputs available: minimal hops, negative hops first, exact adaptive choice |
| `tb_output_ctrl` | request/priority held for a whole packet; no pop without grant or credit |
| `tb_input_controller` | single-clock (`GALS=0`) input path, with every output available with modelled allocator and credit; one-cycle request latency |
| `tb_output_arbiter` | cycle-exact reference model of priority + round robin + wormhole lock |
| `tb_switch_allocator` | seven arbiters against a reference, with one input and one output disabled |
| `tb_semi_crossbar`, `tb_credit_switcher` | every select pattern, including pairs that are not connected |
| `tb_router3d` | default GALS router on one shared clock: 4-edge header latency, one flit per cycle streaming, priority over round robin, round-robin order, credit stall, then random legal traffic on all seven inputs, each packet leaving through a port the turn model allows |
| `tb_noc3d_mesh` | full 3x3x3 mesh at default parameters, described below |
| `tb_noc3d_mesh_2d` | the same test on one 3x3 layer with `GALS=0` and one shared clock; the routers are the planar 3-, 4- and 5-port configurations |

`tb_noc3d_mesh` is the end-to-end test:

- Every router gets its own clock. The half-periods are 5 to 8 ns and the phases differ, so neighbouring routers cross real clock domains.
- All 27 IP cores send 24 packets each, 1 to 6 flits long, with random destinations and priorities.
- Each core's receive buffer drains at random, so the network sees back-pressure.
- Every packet must arrive whole, with its flits in order, unmixed with other packets, at the node its header names, and exactly once.
- It also counts the mechanisms and fails if any never happened: flits through each of the seven output directions, output contention, contention between different priorities, credit stalls, single- and multi-flit packets, routes that go negative first and then positive, and adaptive choices (a header sent to a candidate other than the first because that one was busy).

It finishes in well under a second.

To run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc3d_pkg.sv rtl/*.sv tb/tb_noc3d_mesh.sv --top-module tb_noc3d_mesh
./obj_dir/Vtb_noc3d_mesh
```

Lint warnings that remain:

- unused signal bits, such as the header payload bits that the routing function ignores and the `full` flag of the FIFO;
- "flopped as both synchronous and async" on `rst_n`, which comes from the `disable iff (!rst_n)` of the assertions;
- signals that cross clock domains in the GALS FIFO; they cross only through the Gray-coded synchronisers.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `noc3d_pkg` | `FLIT_W` | 32 | flit width |
| `noc3d_pkg` | `COORD_W`, `PRIO_W` | 2, 2 | address and priority field widths |
| `noc3d_mesh` | `MX`, `MY`, `MZ` | 3, 3, 3 | mesh size (at most 4 with 2-bit coordinates) |
| `noc3d_mesh`, `router3d`, `input_controller` | `DEPTH` | 4 | input FIFO depth (at most 7 with the 3-bit credit; a power of two when `GALS=1`) |
| `noc3d_mesh`, `router3d`, `input_controller` | `GALS` | 1 | 1: dual-clock input FIFOs; 0: one clock |
| `noc3d_mesh`, `router3d`, `input_controller`, `routing_function` | `ADAPTIVE` | 1 | 1: adaptive choice within a routing phase; 0: fixed order |
| `router3d` | `IN_EN`, `OUT_EN` | all ones | ports that exist |

The flit width, buffer depth and mesh size are those of the original design.
The rest are this design's choices.
