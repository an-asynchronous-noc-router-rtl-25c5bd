// tb_scheduler: self-checking test of the fixed-priority output scheduler.
//
// Random request sets (one request per input, each with a channel number) are
// compared with a reference: the lowest channel number wins, ties go to the
// lowest input number, and nothing is granted without buffer space. Also
// checks one-hot grant and the reported channel and port.
module tb_scheduler;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic [NPORTS-1:0] req, gnt;
  logic [NPORTS-1:0][VC_W-1:0] req_vc;
  logic space, gnt_valid;
  logic [VC_W-1:0] gnt_vc;
  logic [PW-1:0] gnt_port;
  int preempt = 0;

  scheduler dut (.*);

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
    repeat (2000) begin
      int best_p, best_v;
      req   = NPORTS'($urandom);
      space = ($urandom % 8 != 0);
      for (int p = 0; p < NPORTS; p++) req_vc[p] = VC_W'($urandom);
      best_p = -1; best_v = NVC;
      for (int p = 0; p < NPORTS; p++)
        if (req[p] && req_vc[p] < best_v) begin best_v = req_vc[p]; best_p = p; end
      #1;
      if (!space || best_p < 0) begin
        check(!gnt_valid && gnt == '0, "no grant");
      end else begin
        check(gnt_valid && gnt == (NPORTS'(1) << best_p), "winner");
        check(gnt_vc == VC_W'(best_v) && gnt_port == PW'(best_p), "winner channel and port");
        if (best_p != 0 && req[0]) preempt++;
      end
    end
    check(preempt > 0, "priority overrode port order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
