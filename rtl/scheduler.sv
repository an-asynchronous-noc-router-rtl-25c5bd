// scheduler: per-flit, fixed-priority arbitration for one output port.
//
// Every input port presents at most one request per cycle for this output,
// tagged with its virtual channel. The requests are ordered by channel
// priority (channel 0 highest, the best-effort channel NVC-1 lowest) and,
// within one channel, by input port number (port 0 first), and the first one
// wins. Because arbitration is repeated for every flit, a flit of a higher
// priority channel overtakes the rest of a lower priority packet already in
// progress. No grant is given while the output buffer has no free slot
// (space low). Requests reaching the scheduler have already been checked for
// credit and channel ownership by the input port.
//
// Combinational; the grant is used in the same cycle to move the flit through
// the crossbar into the output buffer. Fixed priority per virtual channel and
// per-flit scheduling follow the router; the tie-break between input ports is
// this design's choice.
module scheduler
  import noc_pkg::*;
(
  input  logic [NPORTS-1:0]             req,
  input  logic [NPORTS-1:0][VC_W-1:0]   req_vc,
  input  logic                          space,
  output logic [NPORTS-1:0]             gnt,
  output logic                          gnt_valid,
  output logic [VC_W-1:0]               gnt_vc,
  output logic [PW-1:0]             gnt_port
);
  localparam int unsigned NR = NVC * NPORTS;

  logic [NR-1:0] flat_req, flat_gnt;

  always_comb begin
    flat_req = '0;
    for (int unsigned p = 0; p < NPORTS; p++)
      if (req[p] && space) flat_req[req_vc[p] * NPORTS + p] = 1'b1;
  end

  fixed_priority_arbiter #(.N(NR)) u_arb (.req(flat_req), .gnt(flat_gnt));

  always_comb begin
    gnt      = '0;
    gnt_vc   = '0;
    gnt_port = '0;
    for (int unsigned v = 0; v < NVC; v++)
      for (int unsigned p = 0; p < NPORTS; p++)
        if (flat_gnt[v * NPORTS + p]) begin
          gnt[p]   = 1'b1;
          gnt_vc   = VC_W'(v);
          gnt_port = PW'(p);
        end
    gnt_valid = |flat_gnt;
  end

endmodule
