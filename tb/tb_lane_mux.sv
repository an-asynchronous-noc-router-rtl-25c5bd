// tb_lane_mux: self-checking test of the lane multiplexer.
//
// Random lane heads and a random one-hot select (or none); the output must be
// the selected lane's flit, or all zeros with no select.
module tb_lane_mux;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  flit_t [NVC-1:0] lane_head;
  logic  [NVC-1:0] sel;
  flit_t out_flit;

  lane_mux dut (.*);

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
    repeat (500) begin
      int s;
      for (int v = 0; v < NVC; v++) begin
        lane_head[v].vc    = VC_W'($urandom);
        lane_head[v].ftype = ftype_e'($urandom % 4);
        lane_head[v].data  = $urandom;
      end
      s   = $urandom % (NVC + 1);
      sel = (s == NVC) ? '0 : NVC'(1) << s;
      #1;
      if (s == NVC) check(out_flit == '0, "no select gives zero");
      else          check(out_flit == lane_head[s], "selected lane passed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
