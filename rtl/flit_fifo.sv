// flit_fifo: one virtual-channel lane buffer of an input port.
//
// A small first-in first-out buffer of DEPTH words held in a register array
// with a read pointer, a write pointer and an occupancy count. The head word
// is always visible on dout while empty is low. push and pop may happen in the
// same cycle; a push into a full buffer is a protocol error (the sender has
// no credit for it) and is flagged by an assertion and ignored.
//
// Timing: a word pushed in one cycle is visible on dout from the next cycle.
// The lane depth of three flits follows the router; the register-array form
// and the pointer scheme are this design's choices.
module flit_fifo #(
  parameter int unsigned W     = noc_pkg::FLIT_BITS,
  parameter int unsigned DEPTH = noc_pkg::LANE_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [W-1:0]     mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == CNT_W'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + PTR_W'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("flit_fifo: push into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("flit_fifo: pop from an empty buffer");
endmodule
