# A virtual-channel mesh router with priority-based quality of service

On a network-on-chip, some traffic needs guarantees, such as a steady throughput
or a bounded latency, and the rest does not. This router handles both on the same
wires. Each physical link carries four virtual channels, and every input port keeps
a separate small buffer ("lane") for each one. A guaranteed connection gets a
virtual channel of its own along its whole path. All best-effort traffic shares the
remaining channel. When several channels want the same output link, a fixed
priority decides, again for every flit. A flit of a higher-priority connection
therefore overtakes a lower-priority packet that is already halfway through. A
blocked packet holds up only its own lane, so it cannot stall a connection behind
it.

The router has five ports: North, East, South and West for a 2-D mesh, plus a
local service port through which a client injects and ejects packets. It uses
wormhole switching, dimension-ordered (XY) routing and credit-based flow control.
The crossbar is partly connected: it has no crosspoint that would send a packet
back out through the port it came in on.

The architecture this RTL follows was built as an asynchronous (clockless)
circuit. This implementation is **clocked**: one clock cycle stands for one
handshake. See "Where this RTL departs from the original design" below.

## Flits, packets and channels

A flit is `noc_pkg::flit_t`, 36 bits wide:

| field   | bits | meaning |
|---------|------|---------|
| `vc`    | 2    | virtual channel; also the priority, 0 highest, 3 lowest (best effort) |
| `ftype` | 2    | bit 0: the flit opens a packet; bit 1: it closes one |
| `data`  | 32   | payload; in a head flit, `data[7:4]` is the destination X and `data[3:0]` the destination Y |

Because of the two type bits, packets can have any length. A one-flit packet has
both bits set (`FT_SINGLE`). A packet keeps the same channel number on every hop.
The sender picks the channel when it injects the packet. Giving each guaranteed
connection its own channel, and keeping other traffic off it, is the job of
whoever assigns traffic to channels. The router does not police this.

The coordinates are 4 bits each, so a mesh can have up to 16x16 nodes. East is +X
and North is +Y. Ports are numbered L=0, N=1, E=2, S=3, W=4 (`noc_pkg::port_e`).

## Inside the router

```
            input port controller (x5)                       output port controller (x5)
 link --> vcdmux --> 4 lanes (flit_fifo, 3 flits each) --+    scheduler <- flow_control_unit (credits)
                         |  head flits                   |        |            vc_allocator (binding)
                    routing_unit (XY)                lane_mux     | one-hot grant
                         |                               |        v
                    lane selection ------------------> crossbar (5x5, no U-turns) --> output_buffer (2) --> link
```

`noc_router` instantiates five `input_port_controller`s, one `crossbar` and five
`output_port_controller`s. Each output has its own controller. No central unit
schedules the whole switch.

**Input port.** `vcdmux` writes each arriving flit into the lane named by its
`vc` field. Each lane is a 3-flit `flit_fifo`. For every lane, `routing_unit`
computes the XY output from the flit at the front of the lane when that flit opens
a packet. It stores the result for the body and tail flits that follow. In every
cycle the controller marks the lanes whose front flit could move right now. A lane
qualifies when all of these hold:

- the target output's buffer has a free slot;
- that output holds a credit for the lane's channel;
- for a head flit, that output's channel is not bound to another packet.

Of the lanes that qualify, the lowest-numbered one (the highest priority) wins.
Its flit goes through `lane_mux` into the crossbar, together with a request to
the target output.

**Output port.** `scheduler` looks at the requests for its output (at most one per
input) and grants the one with the lowest channel number. If two inputs ask for
the same channel, the lower port number wins. The grant steers the output's
column of the crossbar, and the flit is written into `output_buffer` in the same
cycle. `flow_control_unit` then takes one credit from that channel. If the flit
is a head flit, `vc_allocator` binds the channel to the input it came from. The
binding ends when the packet's tail flit leaves the output buffer onto the link.
Until then, head flits of other packets for that channel wait in their lanes,
while other lanes of the same inputs keep moving.

**Why allocation is split this way.** Each input first picks one lane, then each
output picks among the inputs. This input-first order keeps every decision local
to one port, in the spirit of the original asynchronous design, which has no
global controller. The cost is that an input whose chosen flit loses at its output
sends nothing that cycle, even if another of its lanes could have used a
different, idle output.

## Timing, credits and full link rate

- A flit on an input link in cycle *t* is in its lane at the end of *t*. It is
  scheduled, crossed and written into the output buffer in cycle *t+1*, and it
  is on the output link in cycle *t+2*. The latency through an idle router is
  **2 cycles** on every channel.
- `credit_out[p][v]` pulses in the cycle a flit leaves lane *v* of input *p*. That
  is the grant cycle; the pulse is combinational from the grant.
- After reset, each output holds 3 credits per channel, the lane depth of an
  empty receiver. A credit that comes back on `credit_in` in one cycle can be
  used in the next.
- The credit loop is three cycles long: scheduled in cycle *s*, the flit is on
  the link in *s+1*, it leaves the receiver's lane in *s+2*, and the credit is
  usable again in *s+3*. Three credits per channel are therefore exactly enough
  for one connection to send a flit every cycle. This is why the lanes hold three
  flits: one flit per lane would do for wormhole switching, but it would not let
  a single connection run at full rate. The end-to-end test checks full rate.
- The output link uses a valid/ready handshake (`out_valid`, `out_ready`). The
  two-slot output buffer lets the scheduler arbitrate the next flit while the
  current one waits to leave. Credits guarantee that the receiver's lane has
  room, so `out_ready` only paces the link; it never protects a buffer.
- An input link has no ready signal. A sender may drive `in_valid` for channel
  *v* only while it holds a credit for *v*. Pushing into a full lane trips an
  assertion.

## Using the router

Ports of `noc_router`: `clk`, `rst_n` (asynchronous, active low), `my_x` and
`my_y` (the node's coordinates), and for each port *p* the following:

- `in_valid[p]` and `in_flit[p]` in, `credit_out[p]` (one bit per channel) back
  to the sender;
- `out_valid[p]` and `out_flit[p]` out, `out_ready[p]` and `credit_in[p]` (one
  bit per channel) from the receiver.

To build a mesh, connect router A's East output to router B's West input
(`out_valid` to `in_valid`, `out_flit` to `in_flit`). Connect B's West
`credit_out` to A's East `credit_in`, and tie A's East `out_ready` high. Do the
same in every direction. `tb/tb_mesh_qos.sv` wires a 3x3 mesh this way. At the
mesh edges, tie `in_valid` and `credit_in` low.

Rules for clients:

- Do not send a packet to your own node. The local-to-local crosspoint does not
  exist, and an assertion flags it.
- Under XY routing, packets never need a U-turn, so valid mesh traffic never
  hits a missing crosspoint.

Parameters: the package (`rtl/noc_pkg.sv`) fixes `NPORTS=5`, `NVC=4`,
`FLIT_W=32`, `LANE_DEPTH=3`, `OUTBUF_DEPTH=2` and `COORD_W=4`. `noc_router`
takes `LANE_D` and `OUTBUF_D`, which default to the package values. The credit
count follows `LANE_D`, so every router in a mesh must use the same lane depth.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a cycle-count watchdog. Run one with
Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_router.sv --top-module tb_noc_router -o sim
./obj_dir/sim
```

- `tb_noc_router` drives one router at its default parameters. It runs four
  phases:
  1. 2-cycle latency on channel 0 and on channel 3;
  2. five 200-flit packets on a contention-free permutation of inputs to
     outputs, with every output carrying a flit per cycle at the same time
     (5 flits per cycle through the router);
  3. a channel-0 packet overtaking a best-effort packet on the same output
     without being interrupted itself;
  4. about 1200 random packets with random link stalls and credit delays.

  A scoreboard checks every flit: its output, its channel, contiguity, order,
  that each packet arrives exactly once, and that no receiver lane overflows. It
  also counts each mechanism and fails if one never happened: preemption, a
  head flit waiting for a bound channel, a lane passing a blocked lane, credit
  exhaustion, a link stall, and single-flit and multi-flit packets.
- `tb_mesh_qos` runs a 3x3 mesh. Three connections use channels 0, 1 and 2, and
  heavy random best-effort traffic uses channel 3. Every connection packet must
  arrive within 4 cycles per router plus its length plus 2. In practice,
  connection latency stays constant (9 or 13 cycles), while best-effort packets
  average about 26 cycles and reach about 280.
- The block testbenches (`tb_flit_fifo`, `tb_vcdmux`, `tb_lane_mux`,
  `tb_routing_unit`, `tb_crossbar`, `tb_scheduler`, `tb_flow_control_unit`,
  `tb_vc_allocator`, `tb_output_buffer`, `tb_input_port_controller`,
  `tb_output_port_controller`) compare each block with a reference model under
  random stimulus.

The RTL also carries concurrent assertions for the protocol rules. They check
that nothing is pushed into a full lane or buffer, that no flit is scheduled
without credit, that no head flit is scheduled on a bound channel, that body
flits come only from the channel's owner, that no more credits come back than
were given, and that no packet is routed back out of its input port.

## Where this RTL departs from the original design

- **Clocked, not asynchronous.** The original router is a clockless gate-level
  circuit with handshakes on every link and a low-latency asynchronous arbiter.
  Here, every handshake takes one clock cycle. Its quoted figures (250 MHz link
  rate, 2 ns and 2.5 ns node latency for high- and low-priority channels)
  become 1 flit per cycle per link and 2 cycles of latency for every channel.
  Whether a clock of 250 MHz can be reached is not shown by this RTL.
- **Credits are spent when the scheduler grants the flit.** In the original,
  they are spent when the request is handed to the scheduler. In a clocked
  circuit that grants within the same cycle, this makes no difference in
  behaviour.
- **Routing is done per lane.** The route is computed from the flit at the front
  of each lane, not while the flit arrives on the link.
- **Own choices** where the original says nothing:
  - the flit format and head-flit layout;
  - coordinate width and orientation;
  - channel 0 as the highest priority;
  - the port tie-break in the scheduler;
  - input-first allocation;
  - a valid/ready output handshake;
  - releasing a channel when the tail flit leaves the output buffer;
  - reset values.
- **Not included:** the clients behind the local port, and any mechanism that
  keeps best-effort traffic off a connection's channel or admits connections.
  With fixed priority, a heavily loaded high-priority channel can starve lower
  channels. Guarantees hold only while guaranteed traffic stays within link
  capacity.
