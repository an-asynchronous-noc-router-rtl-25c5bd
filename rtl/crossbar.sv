// crossbar: partly connected 5x5 multiplexed switch.
//
// Each output of the switch is a multiplexer over the input ports, steered by
// that output's one-hot grant from its scheduler. A packet never returns
// through the port it came in on, so the connection from an input to the
// output of the same number is left out: 20 of the 25 crosspoints exist.
// Combinational. The partly connected multiplexed crossbar follows the
// router; the AND-OR multiplexer form is this design's choice.
module crossbar
  import noc_pkg::*;
(
  input  flit_t [NPORTS-1:0]                in_flit,
  input  logic  [NPORTS-1:0][NPORTS-1:0]    sel,       // [output][input], one-hot
  output flit_t [NPORTS-1:0]                out_flit,
  output logic  [NPORTS-1:0]                out_valid
);
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always_comb begin
      logic [FLIT_BITS-1:0] acc;
      acc          = '0;
      out_valid[o] = 1'b0;
      for (int unsigned i = 0; i < NPORTS; i++) begin
        if (i != o) begin
          acc          |= in_flit[i] & {FLIT_BITS{sel[o][i]}};
          out_valid[o] |= sel[o][i];
        end
      end
      out_flit[o] = flit_t'(acc);
    end
  end
endmodule
