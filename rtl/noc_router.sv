// noc_router: five-port virtual-channel router with priority-based QoS.
//
// The router sits at node (my_x, my_y) of a two-dimensional mesh. It has four
// mesh ports (N, E, S, W) and a local service port through which a client
// injects and ejects packets. Each input port keeps NVC lanes; each QoS
// connection uses a virtual channel of its own and best-effort traffic shares
// the lowest priority one. Packets follow XY routing, keep their channel
// number from hop to hop, hold the channel at each output until their last
// flit has left, and compete for the output link flit by flit under fixed
// channel priority. Credits, one per free lane slot, keep a sender from
// overrunning a lane.
//
// Structure: 5 input_port_controller, one partly connected crossbar, 5
// output_port_controller. An input's request is routed to the scheduler of
// the output it names; that scheduler's grant steers the crossbar and is
// returned to the input.
//
// Ports per link p: in_valid/in_flit in, credit_out (one bit per channel) back
// to the sender; out_valid/out_flit out with out_ready from the receiver,
// credit_in (one bit per channel) from the receiver. After reset every output
// holds LANE_DEPTH credits per channel, matching an empty receiver.
// Timing: a flit entering an idle router in cycle t leaves it in cycle t+2;
// each port carries up to one flit per cycle, in and out.
// The port count, lane count, lane and output buffer depths, routing,
// switching, scheduling and flow control follow the router described for
// this design. The router there is asynchronous; this implementation is
// clocked, with one flit per link per clock standing in for one handshake.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned LANE_D   = LANE_DEPTH,
  parameter int unsigned OUTBUF_D = OUTBUF_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [COORD_W-1:0]            my_x,
  input  logic [COORD_W-1:0]            my_y,
  input  logic  [NPORTS-1:0]            in_valid,
  input  flit_t [NPORTS-1:0]            in_flit,
  output logic  [NPORTS-1:0][NVC-1:0]   credit_out,
  output logic  [NPORTS-1:0]            out_valid,
  output flit_t [NPORTS-1:0]            out_flit,
  input  logic  [NPORTS-1:0]            out_ready,
  input  logic  [NPORTS-1:0][NVC-1:0]   credit_in
);
  logic  [NPORTS-1:0]              o_space;
  logic  [NPORTS-1:0][NVC-1:0]     o_credit_ok, o_vc_free;
  logic  [NPORTS-1:0]              i_req_valid, i_req_gnt;
  port_e [NPORTS-1:0]              i_req_port;
  flit_t [NPORTS-1:0]              i_req_flit;
  logic  [NPORTS-1:0][NPORTS-1:0]  o_req;      // [output][input]
  logic  [NPORTS-1:0][NPORTS-1:0]  o_gnt;      // [output][input]
  logic  [NPORTS-1:0][NPORTS-1:0][VC_W-1:0] o_req_vc;
  flit_t [NPORTS-1:0]              x_flit;
  logic  [NPORTS-1:0]              x_valid;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_port_controller #(.PORT(p), .DEPTH(LANE_D)) u_ipc (
      .clk          (clk),
      .rst_n        (rst_n),
      .my_x         (my_x),
      .my_y         (my_y),
      .in_valid     (in_valid[p]),
      .in_flit      (in_flit[p]),
      .credit_out   (credit_out[p]),
      .out_space    (o_space),
      .out_credit_ok(o_credit_ok),
      .out_vc_free  (o_vc_free),
      .req_valid    (i_req_valid[p]),
      .req_port     (i_req_port[p]),
      .req_flit     (i_req_flit[p]),
      .req_gnt      (i_req_gnt[p])
    );
  end

  // Steer each input's request to the output it names; return that output's grant.
  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++)
      for (int unsigned i = 0; i < NPORTS; i++) begin
        o_req[o][i]    = i_req_valid[i] && (i_req_port[i] == port_e'(o));
        o_req_vc[o][i] = i_req_flit[i].vc;
      end
    for (int unsigned i = 0; i < NPORTS; i++)
      i_req_gnt[i] = o_gnt[i_req_port[i]][i];
  end

  crossbar u_xbar (
    .in_flit  (i_req_flit),
    .sel      (o_gnt),
    .out_flit (x_flit),
    .out_valid(x_valid)
  );

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    output_port_controller #(.DEPTH(OUTBUF_D), .CREDITS(LANE_D)) u_opc (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (o_req[o]),
      .req_vc    (o_req_vc[o]),
      .gnt       (o_gnt[o]),
      .xbar_flit (x_flit[o]),
      .xbar_valid(x_valid[o]),
      .space     (o_space[o]),
      .credit_ok (o_credit_ok[o]),
      .vc_free   (o_vc_free[o]),
      .out_valid (out_valid[o]),
      .out_flit  (out_flit[o]),
      .out_ready (out_ready[o]),
      .credit_in (credit_in[o])
    );
  end
endmodule
