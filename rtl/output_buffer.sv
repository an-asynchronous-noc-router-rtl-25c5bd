// output_buffer: two-flit buffer between the switch and an output link.
//
// Flits granted by the scheduler are written here after crossing the switch,
// and leave over the output link with a valid/ready handshake. The buffer
// lets the scheduler arbitrate the next flit while the current one is still
// being transmitted. When a flit that closes a packet leaves, the buffer
// reports its virtual channel (release) so the channel can be given to
// another packet.
//
// Timing: a flit written in one cycle can leave in the next; one flit can be
// written and one leave in the same cycle. space is high while a slot is
// free. The two-slot buffer and its decoupling role follow the router; the
// valid/ready link handshake stands in for the asynchronous link protocol and
// is this design's choice.
module output_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = OUTBUF_DEPTH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push,
  input  flit_t           din,
  output logic            space,
  output logic            out_valid,
  output flit_t           out_flit,
  input  logic            out_ready,
  output logic            release_valid,
  output logic [VC_W-1:0] release_vc
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  flit_t            mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [CNT_W-1:0] count;
  logic             do_pop;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + PTR_W'(1);
  endfunction

  assign space         = (count != CNT_W'(DEPTH));
  assign out_valid     = (count != '0);
  assign out_flit      = mem[rd_ptr];
  assign do_pop        = out_valid && out_ready;
  assign release_valid = do_pop && is_tail(out_flit.ftype);
  assign release_vc    = out_flit.vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push)   wr_ptr <= next_ptr(wr_ptr);
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (push ? CNT_W'(1) : CNT_W'(0)) - (do_pop ? CNT_W'(1) : CNT_W'(0));
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> space)
    else $error("output_buffer: write into a full buffer");
endmodule
