// tb_flow_control_unit: self-checking test of the per-channel credit counters.
//
// Starts from the reset credit (three per channel), spends credits on
// scheduled flits and returns them with random pulses, never more than were
// spent. credit_ok is compared each cycle with a counter model; the test also
// checks that exactly three flits can be scheduled on a channel before it
// blocks, and that one returned credit unblocks it on the next cycle.
module tb_flow_control_unit;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic consume_valid = 0;
  logic [VC_W-1:0] consume_vc = 0;
  logic [NVC-1:0] credit_in = 0, credit_ok;
  int cnt_m [NVC];
  int blocked = 0;

  always #5 clk = ~clk;

  flow_control_unit dut (.*);

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
    for (int k = 0; k < NVC; k++) cnt_m[k] = LANE_DEPTH;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Directed: drain channel 1.
    for (int n = 0; n < LANE_DEPTH; n++) begin
      @(negedge clk); consume_valid = 1; consume_vc = 1; #1;
      check(credit_ok[1], "credit available before the lane is full");
      @(posedge clk); cnt_m[1]--;
    end
    @(negedge clk); consume_valid = 0; #1;
    check(!credit_ok[1], "blocked after three flits");
    credit_in = 4'b0010;
    @(posedge clk); cnt_m[1]++;
    @(negedge clk); credit_in = 0; #1;
    check(credit_ok[1], "one returned credit unblocks");
    // Random.
    repeat (3000) begin
      int v;
      @(negedge clk);
      v = $urandom % NVC;
      consume_valid = (cnt_m[v] > 0) && ($urandom % 2);
      consume_vc = VC_W'(v);
      for (int k = 0; k < NVC; k++)
        credit_in[k] = (cnt_m[k] - ((consume_valid && k == v) ? 1 : 0) < LANE_DEPTH - 0)
                       && (cnt_m[k] < LANE_DEPTH) && ($urandom % 3 == 0);
      #1;
      for (int k = 0; k < NVC; k++) begin
        check(credit_ok[k] == (cnt_m[k] != 0), "credit_ok matches counter");
        if (cnt_m[k] == 0) blocked++;
      end
      @(posedge clk);
      for (int k = 0; k < NVC; k++) cnt_m[k] += credit_in[k];
      if (consume_valid) cnt_m[v]--;
    end
    check(blocked > 0, "zero-credit condition reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
