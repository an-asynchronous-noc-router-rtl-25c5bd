// routing_unit: dimension-ordered (XY) routing for the lanes of one input port.
//
// For every lane whose head-of-buffer flit opens a packet, the unit compares
// the destination coordinates in that flit with the router's own coordinates
// and picks an output: first along X (East if the destination is further
// east, West if further west), then along Y (North/South), and the local
// service port when both match. The choice is kept in a per-lane register
// when the head flit leaves, so the body and tail flits of the packet follow
// it. route is valid for a lane whenever that lane is non-empty.
//
// Timing: the route of a head flit is combinational from the buffer head;
// the register is loaded on the cycle the head flit is popped. XY order and
// per-packet routing follow the router; the coordinate convention (East = +X,
// North = +Y) and the per-lane register are this design's choices.
module routing_unit
  import noc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [COORD_W-1:0]   my_x,
  input  logic [COORD_W-1:0]   my_y,
  input  flit_t [NVC-1:0]      lane_head,   // head-of-buffer flit of each lane
  input  logic  [NVC-1:0]      lane_pop,    // lane's head flit leaves this cycle
  output port_e [NVC-1:0]      route
);
  port_e [NVC-1:0] held;

  function automatic port_e xy_route(input logic [COORD_W-1:0] x, input logic [COORD_W-1:0] y,
                                     input logic [COORD_W-1:0] dx, input logic [COORD_W-1:0] dy);
    if (dx > x)      return PORT_E;
    else if (dx < x) return PORT_W;
    else if (dy > y) return PORT_N;
    else if (dy < y) return PORT_S;
    else             return PORT_L;
  endfunction

  always_comb begin
    for (int unsigned v = 0; v < NVC; v++) begin
      if (is_head(lane_head[v].ftype))
        route[v] = xy_route(my_x, my_y, dest_x(lane_head[v].data), dest_y(lane_head[v].data));
      else
        route[v] = held[v];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= {NVC{PORT_L}};
    end else begin
      for (int unsigned v = 0; v < NVC; v++)
        if (lane_pop[v] && is_head(lane_head[v].ftype)) held[v] <= route[v];
    end
  end
endmodule
