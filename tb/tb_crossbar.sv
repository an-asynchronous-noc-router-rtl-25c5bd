// tb_crossbar: self-checking test of the partly connected crossbar.
//
// Every output is given a random one-hot select. A select naming another port
// must deliver that input's flit; a select naming the output's own port (a
// U-turn, which has no crosspoint) must deliver nothing.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  logic  [NPORTS-1:0][NPORTS-1:0] sel;
  logic  [NPORTS-1:0] out_valid;
  int choice [NPORTS];

  crossbar dut (.*);

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
    repeat (1000) begin
      for (int i = 0; i < NPORTS; i++) begin
        in_flit[i].vc = VC_W'($urandom);
        in_flit[i].ftype = ftype_e'($urandom % 4);
        in_flit[i].data = $urandom;
      end
      for (int o = 0; o < NPORTS; o++) begin
        choice[o] = $urandom % (NPORTS + 1);
        sel[o] = (choice[o] == NPORTS) ? '0 : NPORTS'(1) << choice[o];
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        if (choice[o] == NPORTS || choice[o] == o)
          check(!out_valid[o] && out_flit[o] == '0, "no connection");
        else
          check(out_valid[o] && out_flit[o] == in_flit[choice[o]], "connection");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
