// vcdmux: virtual-channel demultiplexer at the entry of an input port.
//
// Each flit arriving on the input link carries its virtual-channel number.
// The demultiplexer decodes that number and raises the write strobe of the
// matching lane buffer; the lanes share the flit's data wires. It is purely
// combinational: a flit valid in a cycle is written into its lane at the end
// of that cycle. The block and its place in the input port follow the router;
// the decoded-strobe form is this design's choice.
module vcdmux
  import noc_pkg::*;
(
  input  logic             in_valid,
  input  flit_t            in_flit,
  output logic [NVC-1:0]   lane_push
);
  always_comb begin
    lane_push = '0;
    if (in_valid) lane_push[in_flit.vc] = 1'b1;
  end
endmodule
