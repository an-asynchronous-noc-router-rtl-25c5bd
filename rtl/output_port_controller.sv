// output_port_controller: one output port of the router.
//
// Holds the per-channel credit counters (flow_control_unit), the channel
// ownership table (vc_allocator), the fixed-priority scheduler and the output
// buffer. The scheduler's one-hot grant steers this output's column of the
// crossbar; the flit that comes back through the crossbar is written into the
// output buffer in the same cycle, the credit of its channel is spent, and a
// head flit binds the channel to its input port. When a packet's last flit
// leaves the output buffer the channel is released.
//
// Interface: req/req_vc/req_head from the input ports (only requests for this
// output), gnt back to the inputs and to the crossbar, xbar_flit from the
// crossbar; status vectors (space, credit_ok, vc_free) to the inputs; the
// output link (out_valid/out_flit/out_ready) and credit_in from the receiver.
// The four sub-blocks and their connections follow the router; the grouping
// into one module per output port is this design's choice.
module output_port_controller
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH   = OUTBUF_DEPTH,
  parameter int unsigned CREDITS = LANE_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0]             req,
  input  logic [NPORTS-1:0][VC_W-1:0]   req_vc,
  output logic [NPORTS-1:0]             gnt,
  input  flit_t                         xbar_flit,
  input  logic                          xbar_valid,
  output logic                          space,
  output logic [NVC-1:0]                credit_ok,
  output logic [NVC-1:0]                vc_free,
  output logic                          out_valid,
  output flit_t                         out_flit,
  input  logic                          out_ready,
  input  logic [NVC-1:0]                credit_in
);
  logic              gnt_valid;
  logic [VC_W-1:0]   gnt_vc;
  logic [PW-1:0] gnt_port;
  logic              release_valid;
  logic [VC_W-1:0]   release_vc;
  logic [NVC-1:0][PW-1:0] vc_owner;

  scheduler u_sched (
    .req      (req),
    .req_vc   (req_vc),
    .space    (space),
    .gnt      (gnt),
    .gnt_valid(gnt_valid),
    .gnt_vc   (gnt_vc),
    .gnt_port (gnt_port)
  );

  flow_control_unit #(.CREDITS(CREDITS)) u_fcu (
    .clk          (clk),
    .rst_n        (rst_n),
    .consume_valid(gnt_valid),
    .consume_vc   (gnt_vc),
    .credit_in    (credit_in),
    .credit_ok    (credit_ok)
  );

  vc_allocator u_vca (
    .clk          (clk),
    .rst_n        (rst_n),
    .sched_valid  (gnt_valid),
    .sched_vc     (gnt_vc),
    .sched_head   (is_head(xbar_flit.ftype)),
    .sched_port   (gnt_port),
    .release_valid(release_valid),
    .release_vc   (release_vc),
    .vc_free      (vc_free),
    .vc_owner     (vc_owner)
  );

  output_buffer #(.DEPTH(DEPTH)) u_obuf (
    .clk          (clk),
    .rst_n        (rst_n),
    .push         (xbar_valid),
    .din          (xbar_flit),
    .space        (space),
    .out_valid    (out_valid),
    .out_flit     (out_flit),
    .out_ready    (out_ready),
    .release_valid(release_valid),
    .release_vc   (release_vc)
  );

  assert property (@(posedge clk) disable iff (!rst_n) xbar_valid == gnt_valid)
    else $error("output_port_controller: crossbar and scheduler disagree");
  assert property (@(posedge clk) disable iff (!rst_n) xbar_valid |-> xbar_flit.vc == gnt_vc)
    else $error("output_port_controller: flit channel differs from granted channel");
endmodule
