# HERMES wormhole mesh network-on-chip, with reception-rate monitors

This is a synthesizable SystemVerilog model of a HERMES-style network-on-chip.
HERMES is a small packet-switched mesh for multiprocessor systems-on-chip. Each
router has five ports (East, West, North, South, Local), a FIFO on every input,
and one central controller. The controller serves the routing requests of all
inputs in round-robin order and routes with the XY algorithm. Packets move in
wormhole fashion: the header sets up a path one router at a time, the rest of
the packet follows it flit by flit, and each connection is torn down once the
last flit has gone through.

The RTL follows the description of HERMES in a thesis on abstract NoC models
for design-space exploration. That thesis uses HERMES as its cycle-accurate
reference and builds faster actor-oriented models of it. It also describes a
rate-based power estimate, which is fed by monitors that count the flits each
input buffer receives in a fixed sample window. This design builds:

- the mesh, its routers and the parts inside a router;
- both HERMES link protocols, credit and 4-phase handshake, chosen when the
  mesh is built;
- those monitors, one per router.

The actor models themselves are simulation software, not hardware, and are not
part of the RTL.

## Packets

A packet is a sequence of `FLIT_WIDTH`-bit flits:

| flit | content |
|------|---------|
| 0 | header: target router address, `y` in the upper half, `x` in the lower half |
| 1 | size: number of payload flits that follow (0 allowed) |
| 2 … | payload |

A packet of `S` flits therefore has a size field of `S - 2`. The router never
changes a flit, so the header arrives at the target unchanged.

## Links

Every router port, and each local port of the mesh, is a pair of
unidirectional links. The parameter `FLOW_CONTROL` picks one of two link
protocols for the whole mesh when it is built.

**Credit links** (`FC_CREDIT`, the default):

| signal | from | meaning |
|--------|------|---------|
| `tx` / `rx` | sender | a flit is on `data` |
| `data` | sender | the flit |
| `credit` | receiver | the input buffer has a free slot |

A flit crosses on every rising clock edge at which both `tx` and `credit` are
high. A sender that sees no credit keeps the same flit on the link; this rule
is asserted in `hermes_router`. A link carries one flit per cycle, which is
`ctf = 1` in the latency model below. The whole mesh runs on one clock.

**Handshake links** (`FC_HANDSHAKE`). Each flit is one 4-phase handshake on
the same three wires, with the credit wire now carrying the acknowledge
(`ack_rx` at an input, `ack_tx` at an output):

1. The sender raises `tx` with the flit on `data`.
2. The receiver writes the flit into its buffer and raises the acknowledge.
   If the buffer is full it waits with the acknowledge low.
3. The sender lowers `tx`.
4. The receiver lowers the acknowledge.

The sender keeps `data` still from step 1 until step 4. `hs_link_tx` (behind
each crossbar output) and `hs_link_rx` (in front of each input buffer) do this.
Both are clocked by the router clock. Back to back, a flit takes 4 cycles, so a
handshake link carries a quarter of the credit link's rate. The latency
formula below is for credit links.

## Inside a router

```
            +-------------+      +---------+
 rx/data -->| input_buffer|----->|         |--> tx/data
 credit  <--|  (x5)       |<-----| crossbar|<-- credit
            +------+------+      +----^----+
                h, header |  ack_h    | connection table
                   +------v-----------+----+
                   |    switch_control     |
                   | rr_arbiter, xy_routing|
                   +-----------------------+
```

**input_buffer.** This is a `BUFFER_DEPTH`-flit FIFO. Its `credit_o` is high
while a slot is free. The buffer also tracks the packet at its head. When a
header reaches the head of an idle buffer, the buffer raises `h` (a routing
request) and waits. Once the controller pulses `ack_h`, the buffer offers its
flits to the crossbar. The size flit loads a down counter. When the last
payload flit leaves, the buffer pulses `pkt_done`, and the controller frees the
output.

**switch_control.** One controller serves all five inputs, one request at a
time. A round works like this:

1. **Start.** The controller takes a snapshot of the requests present.
2. **Arbitrate.** `rr_arbiter` picks one of them. The search starts at the
   input after the one picked last, and the pointer moves even if the request
   is later refused.
3. **Route.** `xy_routing` reads that input's header and names an output.
   Packets travel along x first: East when the target's x is larger, West when
   smaller. Once x matches, they travel along y (North when larger, South when
   smaller), and arrive at Local at the target.
4. **Wait.** The route phase is padded to a fixed length.
5. **Check.** If the chosen output is free, the input and output are entered
   in the connection table, and the buffer gets `ack_h`. If not, the request is
   refused: it stays raised and competes again in a later round, and the
   controller goes on to other requests. `refused` pulses once per refusal.

A connection lasts until the buffer's `pkt_done`. While the output is taken,
the blocked header and everything behind it wait in their buffer. Once that
buffer is full, its credit holds the upstream router back, and so on back to
the source.

**crossbar.** This is combinational. Each busy output shows the head flit of
its connected input. Each connected input gets the credit of its output as its
acknowledge.

### Header timing

The controller is padded so that a header written into an idle router's buffer
on clock edge `t` leaves on edge `t + ARB_CYCLES` at the earliest. That is the
header forwarding time (`arbt`) of the latency model. The default of 7 is the
arbitration/routing time used in the thesis's worked examples.

The 7 cycles break down as follows:

| cycles | step |
|--------|------|
| 1 | the request becomes visible |
| 1 | start of the round |
| 1 | arbitration |
| `ARB_CYCLES - 4` | routing, padded |
| 1 | check and connect |

The header then crosses on the following edge. `ARB_CYCLES` must be at least 5.
Because the controller is central, a request that arrives while it is busy with
another input waits. Under load, header times are longer than `ARB_CYCLES`,
never shorter.

### Packet latency

With no contention, a packet of `S` flits crossing `nhops` routers (source and
target routers included) follows this formula:

    latency = nhops * ARB_CYCLES + S

Latency is counted from the cycle the source presents the header to the cycle
the target takes the last flit.

Example: from router (0,0) to router (2,2) the packet crosses 5 routers. With
21 flits that gives 5 * 7 + 21 = 56 cycles, the figure of the worked example.
The mesh testbench checks this case and two others exactly.

## Monitors

`router_monitor` counts two quantities over windows of `SAMPLE_WINDOW` cycles:

- `rec_flits[i]`: the flits written into input buffer `i`;
- `link_toggles[i]`: the number of data wires of input link `i` that changed
  value from one cycle to the next, summed over the window.

At the end of a window the totals appear on the outputs, `win_valid` pulses
for one cycle, and the counters restart.

These counts are the inputs of a rate-based power estimate:

- reception rate in bit/s = `rec_flits * FLIT_WIDTH / (T_clk * SAMPLE_WINDOW)`;
- link activity factor = `link_toggles / (FLIT_WIDTH * SAMPLE_WINDOW)`.

Each buffer's power comes from a linear function of its reception rate. The
crossbar and control power come from the router's average rate, and link power
from `C * f * Vdd^2 * wires * activity * rate`. The coefficients come from
calibrating against gate-level power analysis of a synthesized router, so that
step stays in software.

Edge routers have links that are tied off. Their monitor outputs for those
ports are constant zero.

## Parameters of `hermes_noc`

| parameter | default | notes |
|-----------|---------|-------|
| `X_SIZE`, `Y_SIZE` | 4, 4 | the 4x4 setup of the power comparison; the latency studies use 2x2 to 5x5, the application case study 6x6 |
| `FLIT_WIDTH` | 16 | the case study uses 32 |
| `BUFFER_DEPTH` | 8 | one power study uses 16 |
| `ARB_CYCLES` | 7 | header forwarding time per router, at least 5 |
| `SAMPLE_WINDOW` | 1000 | monitor window in cycles; this design's choice |
| `FLOW_CONTROL` | `FC_CREDIT` | `FC_HANDSHAKE` for the 4-phase links used by the power comparison and the case study |

Node `n = y * X_SIZE + x` holds router `(x, y)`. East is +x and North is +y.
Local port `n` of the top is the port of that node's core.

## Files

| file | content |
|------|---------|
| `rtl/hermes_pkg.sv` | port enumeration `port_e`, link protocol `flow_e`, `NPORTS` |
| `rtl/hermes_noc.sv` | top: the mesh, its wiring, one monitor per router |
| `rtl/hermes_router.sv` | one router |
| `rtl/input_buffer.sv` | input FIFO with packet tracking |
| `rtl/switch_control.sv` | central controller and connection table |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/xy_routing.sv` | XY routing decision |
| `rtl/crossbar.sv` | 5x5 crossbar |
| `rtl/router_monitor.sv` | reception-rate and link-activity counters |
| `rtl/hs_link_tx.sv` | 4-phase handshake sender, one per output in handshake mode |
| `rtl/hs_link_rx.sv` | 4-phase handshake receiver, one per input in handshake mode |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_noc_workloads.sv`, `tb/tb_noc_traffic.sv` | the mesh in five other configurations, with uniform random traffic |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs. For example, to simulate the whole
mesh:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_hermes_noc \
        -y rtl +libext+.sv rtl/hermes_pkg.sv tb/tb_hermes_noc.sv -o sim
    ./obj_dir/sim

For a unit test, replace `tb_hermes_noc` with its name and add `-y tb`. Lint
the RTL with `verilator --lint-only -Wall -y rtl rtl/hermes_pkg.sv
rtl/hermes_noc.sv`. The only remaining warnings are:

- `SYNCASYNCNET`, because the assertions sample the asynchronous reset;
- `UNUSEDPARAM` for `NPORTS` when a module that does not use it is linted
  alone.

What the testbenches check:

- **`tb_hermes_noc`** runs the top at its default parameters.
  - Exact latencies of isolated packets: 56, 65 and 11 cycles.
  - 1600 random packets, of random lengths to random targets, with consumers
    withholding credit at random. Each packet must arrive once, intact, at its
    target, and never faster than the latency bound.
  - Monitor totals against the traffic: flits into all buffers (the sum of
    `S * nhops`), flits into each local buffer, and toggles on each local link.
  - It also counts refusals, simultaneous requests, full buffers, withheld
    credit, traffic in all four directions and monitor windows, and fails if
    any of them never happened.
- **`tb_hermes_router`** checks a single router: 7-cycle header time, one flit
  per cycle after it, and correct output port and contents under random load.
- **`tb_hs_link_tx`** connects a handshake sender to a handshake receiver. It
  checks order, data stability, the 4-cycle flit period, and waiting on a full
  buffer.
- **`tb_hs_link_rx`** runs a router in handshake mode with random delays on
  all ten links. It checks the protocol on every link, one buffer write per
  handshake, and delivery of every packet.
- **`tb_noc_workloads`** builds five meshes side by side: 2x2 with 16-flit
  packets; 3x3 with 16-flit buffers and 50-flit packets; 5x5 with 100-flit
  packets; 4x4 with handshake links and 64-flit packets; and 6x6 with 32-bit
  flits, handshake links and 128-flit packets. Every node sends packets to
  random targets. Every packet must arrive intact at its target, and the
  average latency of each configuration is printed. It takes several minutes
  to build.
- **`tb_switch_control`** checks grant timing, refusal and later grant,
  round-robin order, and the routes.
- **`tb_input_buffer`**, **`tb_rr_arbiter`**, **`tb_xy_routing`**,
  **`tb_crossbar`** and **`tb_router_monitor`** compare their module against
  a reference model written in the testbench.

## Departures and limits

- **Flow control.** The default is the credit link, because the latency
  model and its worked examples assume it. For the handshake link, only the
  six signal names come from the source. The phase order, the clocking and the
  4-cycle flit period are this design's. The power comparison quotes a
  maximum link rate of 800 Mbps for 16-bit flits at 50 MHz. That is one flit
  per cycle, four times what this handshake link carries.
- **Handshake mode coverage.** The main mesh testbench runs the default
  (credit) build. Handshake mode is checked on a single router by
  `tb_hs_link_rx`, and on 4x4 and 6x6 meshes by `tb_noc_workloads`.
- **Clocking.** The credit variant of HERMES also sends a transmission clock
  with the data, so that neighbouring routers can run from different clocks.
  Here the mesh has a single clock.
- **Controller timing.** The internal split of the `ARB_CYCLES` budget is this
  design's own. Only the total, 7 cycles in the best case, comes from the
  source.
- **Packet tracking.** The flit counting that ends a connection is done in the
  input buffer. The source's interaction diagram places it in the controller.
  The behaviour at the ports is the same.
- **Arbitration pointer.** It moves whenever a request is picked for routing,
  even if the output then turns out to be busy. A round considers only the
  requests present when it starts.
- **Choices where the source is silent.** These are this design's own:
  - the reset values: the arbiter starts with input 0; FIFO storage is not
    reset;
  - the direction and node numbering;
  - zero data on idle outputs;
  - tied-off edge ports;
  - the monitor window length and its toggle-count measure of link activity.
- **Not built.** The network interface, the processing elements (a 32-bit
  MIPS-like core with private memory and DMA in the platform this NoC serves),
  the traffic generators (present only as testbench models) and the power
  equations. The local ports of the mesh are where a network interface would
  connect.
- **Other studied configurations.** The 5x5, 3x3 with 16-flit buffers, and 6x6
  with 32-bit flits configurations need only parameter changes.
  `tb_noc_workloads` runs them with uniform random traffic. The traffic of
  the source's own experiments (rates, injection times, applications) is not
  reproduced.
