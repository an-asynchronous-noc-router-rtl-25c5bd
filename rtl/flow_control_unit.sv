// flow_control_unit: credit counters of one output port, one per virtual channel.
//
// Each counter holds how many flits the lane of the same number in the next
// router (or in the client behind the local port) can still take. It starts at
// the lane depth, drops by one when a flit of that channel is scheduled
// towards the output, and rises by one for each credit pulse returned by the
// receiver when it frees a buffer slot. A channel whose counter is zero does
// not take part in scheduling (credit_ok low).
//
// Timing: credit_ok is a register output; a credit returned in one cycle can
// be used in the next. Per-channel credit counting follows the router;
// counting down at scheduling time (rather than when the request is first
// raised) is this design's choice in a clocked implementation.
module flow_control_unit
  import noc_pkg::*;
#(
  parameter int unsigned CREDITS = LANE_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               consume_valid,   // a flit was scheduled
  input  logic [VC_W-1:0]    consume_vc,
  input  logic [NVC-1:0]     credit_in,       // one pulse per freed slot
  output logic [NVC-1:0]     credit_ok
);
  localparam int unsigned CW = $clog2(CREDITS + 1);

  logic [NVC-1:0][CW-1:0] cnt;

  always_comb
    for (int unsigned v = 0; v < NVC; v++) credit_ok[v] = (cnt[v] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned v = 0; v < NVC; v++) cnt[v] <= CW'(CREDITS);
    end else begin
      for (int unsigned v = 0; v < NVC; v++) begin
        logic dec;
        dec = consume_valid && (consume_vc == VC_W'(v));
        cnt[v] <= cnt[v] + (credit_in[v] ? CW'(1) : CW'(0)) - (dec ? CW'(1) : CW'(0));
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   consume_valid |-> cnt[consume_vc] != '0)
    else $error("flow_control_unit: flit scheduled without credit");
  for (genvar v = 0; v < NVC; v++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     credit_in[v] |-> (cnt[v] != CW'(CREDITS)) ||
                                      (consume_valid && consume_vc == VC_W'(v)))
      else $error("flow_control_unit: more credits returned than given");
  end
endmodule
