// tb_flit_fifo: self-checking test of the lane buffer.
//
// Random pushes and pops (never into a full or out of an empty buffer) are
// applied to a three-deep buffer and compared every cycle with a queue model:
// head word, empty, full and occupancy. Checks also that a word pushed into an
// empty buffer is visible on the next cycle.
module tb_flit_fifo;
  localparam int unsigned W = 16, DEPTH = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [1:0] count;
  logic [W-1:0] q[$];

  always #5 clk = ~clk;

  flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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
    // Latency: push once into an empty buffer, visible one cycle later.
    @(negedge clk); push = 1; din = 16'hBEEF; #1; check(empty, "empty before first push");
    @(posedge clk); q.push_back(din);
    @(negedge clk); push = 0; #1;
    check(!empty && dout == 16'hBEEF && count == 1, "word visible one cycle after push");
    repeat (3000) begin
      @(negedge clk);
      push = ($urandom % 3 != 0) && (q.size() < DEPTH);
      pop  = ($urandom % 2 == 0) && (q.size() > 0);
      din  = W'($urandom);
      #1;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(count == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], "head word");
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
