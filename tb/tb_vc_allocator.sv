// tb_vc_allocator: self-checking test of output channel binding.
//
// Random legal sequences of head flits (binding a free channel to an input),
// body flits from the owner and releases are applied; vc_free and vc_owner are
// compared every cycle with a model.
module tb_vc_allocator;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic sched_valid = 0, sched_head = 0, release_valid = 0;
  logic [VC_W-1:0] sched_vc = 0, release_vc = 0;
  logic [PW-1:0] sched_port = 0;
  logic [NVC-1:0] vc_free;
  logic [NVC-1:0][PW-1:0] vc_owner;
  bit busy_m [NVC];
  int owner_m [NVC];
  int binds = 0, releases = 0;

  always #5 clk = ~clk;

  vc_allocator dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      int v, r;
      @(negedge clk);
      v = $urandom % NVC;
      sched_vc = VC_W'(v);
      if (!busy_m[v]) begin
        sched_valid = ($urandom % 2);
        sched_head  = 1;
        sched_port  = PW'($urandom % NPORTS);
      end else begin
        sched_valid = ($urandom % 2);
        sched_head  = 0;
        sched_port  = PW'(owner_m[v]);
      end
      r = $urandom % NVC;
      release_valid = busy_m[r] && (r != v || !sched_valid) && ($urandom % 3 == 0);
      release_vc = VC_W'(r);
      #1;
      for (int k = 0; k < NVC; k++) begin
        check(vc_free[k] == !busy_m[k], "vc_free");
        if (busy_m[k]) check(vc_owner[k] == PW'(owner_m[k]), "owner");
      end
      @(posedge clk);
      if (release_valid) begin busy_m[r] = 0; releases++; end
      if (sched_valid && sched_head) begin busy_m[v] = 1; owner_m[v] = sched_port; binds++; end
    end
    check(binds > 50 && releases > 50, "binds and releases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
