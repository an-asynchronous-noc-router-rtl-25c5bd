// fixed_priority_arbiter: grants the lowest-numbered active request.
//
// Combinational. req is a vector of requests, gnt is one-hot (or zero when no
// request is active). Index 0 has the highest priority. It is the core of the
// per-output scheduler and of the lane selection in each input port.
module fixed_priority_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  // req & -req isolates the lowest set bit.
  assign gnt = req & (~req + N'(1));
endmodule
