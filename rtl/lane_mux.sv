// lane_mux: selects the head flit of one lane of an input port for the switch.
//
// All lanes of an input port share a single path into the crossbar. The
// multiplexer takes a one-hot lane select (from the lane selection of the
// input port controller) and passes that lane's head flit on; with no select
// bit set the output is all zeros. Combinational, AND-OR form (this design's
// choice).
module lane_mux
  import noc_pkg::*;
(
  input  flit_t [NVC-1:0] lane_head,
  input  logic  [NVC-1:0] sel,
  output flit_t           out_flit
);
  always_comb begin
    logic [FLIT_BITS-1:0] acc;
    acc = '0;
    for (int unsigned v = 0; v < NVC; v++)
      acc |= lane_head[v] & {FLIT_BITS{sel[v]}};
    out_flit = flit_t'(acc);
  end
endmodule
