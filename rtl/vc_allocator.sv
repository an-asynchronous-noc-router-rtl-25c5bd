// vc_allocator: ownership of the virtual channels of one output port.
//
// A packet is bound to the virtual channel of the same number at its output
// port. The binding is made when the packet's head flit wins the output's
// scheduler and lasts until the packet's last flit leaves the router through
// the output buffer. While a channel is bound, head flits of other packets
// for it are held back (vc_free is low); the owning input port is recorded so
// that flits from any other input are caught by an assertion.
//
// Timing: bind and release take effect at the clock edge ending the cycle in
// which they are signalled; vc_free is a register output. The binding rule
// follows the router; taking the channel number from the flit is this
// design's choice.
module vc_allocator
  import noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // scheduled flit (from the scheduler)
  input  logic               sched_valid,
  input  logic [VC_W-1:0]    sched_vc,
  input  logic               sched_head,
  input  logic [PW-1:0]  sched_port,
  // a packet's last flit leaves the output buffer
  input  logic               release_valid,
  input  logic [VC_W-1:0]    release_vc,
  output logic [NVC-1:0]     vc_free,
  output logic [NVC-1:0][PW-1:0] vc_owner
);
  logic [NVC-1:0] busy;

  assign vc_free = ~busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= '0;
      vc_owner <= '0;
    end else begin
      if (release_valid) busy[release_vc] <= 1'b0;
      if (sched_valid && sched_head) begin
        busy[sched_vc]     <= 1'b1;
        vc_owner[sched_vc] <= sched_port;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   sched_valid && sched_head |-> !busy[sched_vc])
    else $error("vc_allocator: head flit scheduled on a bound channel");
  assert property (@(posedge clk) disable iff (!rst_n)
                   sched_valid && !sched_head |-> busy[sched_vc] && vc_owner[sched_vc] == sched_port)
    else $error("vc_allocator: body flit from an input that does not own the channel");
  assert property (@(posedge clk) disable iff (!rst_n)
                   release_valid |-> busy[release_vc])
    else $error("vc_allocator: release of a free channel");
endmodule
