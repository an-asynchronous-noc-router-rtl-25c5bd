// noc_pkg: shared constants and types of the QoS virtual-channel router.
//
// A flit travels on a link together with its virtual-channel number and a
// two-bit type. The type bits say whether the flit opens a packet (bit 0) and
// whether it closes one (bit 1), so packets of any length, including a
// single flit, can be sent. The head flit carries the destination node in its
// low data bits: the X coordinate above the Y coordinate.
//
// Five ports (local service port and four mesh directions), four virtual
// channels per port, three-flit lane buffers, a two-flit output buffer and a
// 32-bit data flit follow the router this RTL implements. The coordinate
// width, the port numbering, the flit type encoding and the rule that a lower
// virtual-channel number means a higher priority are choices of this design.
package noc_pkg;

  localparam int unsigned NPORTS       = 5;   // local + N, E, S, W
  localparam int unsigned NVC          = 4;   // virtual channels (lanes) per port
  localparam int unsigned FLIT_W       = 32;  // data bits per flit
  localparam int unsigned LANE_DEPTH   = 3;   // flits per input lane buffer
  localparam int unsigned OUTBUF_DEPTH = 2;   // flits per output buffer
  localparam int unsigned COORD_W      = 4;   // bits per mesh coordinate
  localparam int unsigned VC_W         = $clog2(NVC);
  localparam int unsigned PW       = 3;

  // Port numbering. East is +X, North is +Y.
  typedef enum logic [PW-1:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;

  // Flit type: bit 0 = opens a packet, bit 1 = closes a packet.
  typedef enum logic [1:0] {
    FT_BODY   = 2'b00,
    FT_HEAD   = 2'b01,
    FT_TAIL   = 2'b10,
    FT_SINGLE = 2'b11
  } ftype_e;

  typedef struct packed {
    logic [VC_W-1:0]   vc;
    ftype_e            ftype;
    logic [FLIT_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_BITS = $bits(flit_t);

  function automatic logic is_head(input ftype_e t);
    return t[0];
  endfunction

  function automatic logic is_tail(input ftype_e t);
    return t[1];
  endfunction

  // Destination fields of a head flit.
  function automatic logic [COORD_W-1:0] dest_x(input logic [FLIT_W-1:0] d);
    return d[2*COORD_W-1:COORD_W];
  endfunction

  function automatic logic [COORD_W-1:0] dest_y(input logic [FLIT_W-1:0] d);
    return d[COORD_W-1:0];
  endfunction

endpackage
