// input_port_controller: one input port of the router.
//
// Flits arriving on the input link are sorted by their virtual-channel number
// into NVC parallel lane buffers (vcdmux, flit_fifo), so a packet that is
// blocked holds up only its own lane. The routing unit gives every lane an
// output port. In each cycle the controller looks at the lanes whose head
// flit could move now: the target output has a free buffer slot, credit for
// that channel, and, for a flit that opens a packet, the channel at the output
// is not bound to another packet. Among those it picks the highest priority
// lane (lowest channel number) and sends that lane's head flit, through the
// lane multiplexer, to the switch as a request for its output. When the
// output's scheduler grants it, the flit leaves the lane and one credit for
// that channel is returned to the sender on credit_out.
//
// Interface: in_valid/in_flit from the link (always accepted; the sender must
// hold credit), credit_out one pulse per freed slot; per-output status
// vectors; req_* to the switch and schedulers, req_gnt back.
// Timing: a flit written into an empty lane can be requested in the next
// cycle; request and grant are in the same cycle; credit_out is a
// combinational pulse in the grant cycle.
// The lanes, their depth, the demultiplexer, the multiplexer and credit return
// follow the router. Selecting one lane per input per cycle before the
// outputs arbitrate (an input-first allocation) is this design's choice.
module input_port_controller
  import noc_pkg::*;
#(
  parameter int unsigned PORT  = 0,
  parameter int unsigned DEPTH = LANE_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [COORD_W-1:0]            my_x,
  input  logic [COORD_W-1:0]            my_y,
  // input link
  input  logic                          in_valid,
  input  flit_t                         in_flit,
  output logic [NVC-1:0]                credit_out,
  // status of every output port
  input  logic [NPORTS-1:0]             out_space,
  input  logic [NPORTS-1:0][NVC-1:0]    out_credit_ok,
  input  logic [NPORTS-1:0][NVC-1:0]    out_vc_free,
  // request to the switch
  output logic                          req_valid,
  output port_e                         req_port,
  output flit_t                         req_flit,
  input  logic                          req_gnt
);
  logic  [NVC-1:0] lane_push, lane_empty, lane_full, lane_pop, eligible, sel;
  flit_t [NVC-1:0] lane_head;
  port_e [NVC-1:0] route;

  vcdmux u_dmux (
    .in_valid (in_valid),
    .in_flit  (in_flit),
    .lane_push(lane_push)
  );

  for (genvar v = 0; v < NVC; v++) begin : g_lane
    logic [$clog2(DEPTH+1)-1:0] unused_count;
    flit_fifo #(.W(FLIT_BITS), .DEPTH(DEPTH)) u_lane (
      .clk  (clk),
      .rst_n(rst_n),
      .push (lane_push[v]),
      .din  (in_flit),
      .pop  (lane_pop[v]),
      .dout (lane_head[v]),
      .empty(lane_empty[v]),
      .full (lane_full[v]),
      .count(unused_count)
    );
  end

  routing_unit u_route (
    .clk      (clk),
    .rst_n    (rst_n),
    .my_x     (my_x),
    .my_y     (my_y),
    .lane_head(lane_head),
    .lane_pop (lane_pop),
    .route    (route)
  );

  always_comb begin
    for (int unsigned v = 0; v < NVC; v++) begin
      eligible[v] = !lane_empty[v]
                 && (route[v] != port_e'(PORT))
                 && out_space[route[v]]
                 && out_credit_ok[route[v]][v]
                 && (!is_head(lane_head[v].ftype) || out_vc_free[route[v]][v]);
    end
  end

  fixed_priority_arbiter #(.N(NVC)) u_lane_sel (.req(eligible), .gnt(sel));

  lane_mux u_mux (
    .lane_head(lane_head),
    .sel      (sel),
    .out_flit (req_flit)
  );

  always_comb begin
    req_port = PORT_L;
    for (int unsigned v = 0; v < NVC; v++)
      if (sel[v]) req_port = route[v];
  end

  assign req_valid  = |sel;
  assign lane_pop   = sel & {NVC{req_gnt}};
  assign credit_out = lane_pop;

  // The sender must hold a credit for every flit it sends.
  assert property (@(posedge clk) disable iff (!rst_n) (lane_push & lane_full) == '0)
    else $error("input_port_controller: flit arrived for a full lane");

  // A packet must never be routed back out of the port it arrived on.
  for (genvar v = 0; v < NVC; v++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     !lane_empty[v] |-> route[v] != port_e'(PORT))
      else $error("input_port_controller: packet routed back to its input port");
  end
endmodule
