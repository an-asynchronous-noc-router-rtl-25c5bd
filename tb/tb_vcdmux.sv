// tb_vcdmux: self-checking test of the virtual-channel demultiplexer.
//
// For every channel number and both values of in_valid, checks that exactly
// the strobe of that channel rises (none when invalid), whatever the type and
// data bits of the flit.
module tb_vcdmux;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic in_valid;
  flit_t in_flit;
  logic [NVC-1:0] lane_push;

  vcdmux dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++)
      for (int v = 0; v < NVC; v++)
        for (int val = 0; val < 2; val++) begin
          in_valid       = val[0];
          in_flit.vc     = VC_W'(v);
          in_flit.ftype  = ftype_e'($urandom % 4);
          in_flit.data   = $urandom;
          #1;
          check(lane_push == (val ? (NVC'(1) << v) : '0), "lane strobe");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
