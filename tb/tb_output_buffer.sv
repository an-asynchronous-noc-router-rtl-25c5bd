// tb_output_buffer: self-checking test of the two-flit output buffer.
//
// Random writes (only when space is reported) and a random link ready; the
// link side is compared with a queue model, and release must pulse with the
// channel number exactly when a packet's last flit leaves. Also checks that
// both slots fill when the link stalls and that a written flit can leave on
// the next cycle.
module tb_output_buffer;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, out_ready = 0;
  flit_t din = '0, out_flit;
  logic space, out_valid, release_valid;
  logic [VC_W-1:0] release_vc;
  flit_t q[$];
  int fulls = 0, rels = 0;

  always #5 clk = ~clk;

  output_buffer dut (.*);

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
    @(negedge clk); push = 1; din = '{vc: 2'd2, ftype: FT_SINGLE, data: 32'h1234}; out_ready = 0;
    @(posedge clk); q.push_back(din);
    @(negedge clk); push = 0; out_ready = 1; #1;
    check(out_valid && out_flit == q[0], "flit leaves the cycle after it was written");
    check(release_valid && release_vc == 2'd2, "release on a single-flit packet");
    @(posedge clk); void'(q.pop_front());
    repeat (4000) begin
      @(negedge clk);
      push = space && ($urandom % 3 != 0);
      din.vc = VC_W'($urandom); din.ftype = ftype_e'($urandom % 4); din.data = $urandom;
      out_ready = ($urandom % 2);
      #1;
      check(space == (q.size() < OUTBUF_DEPTH), "space flag");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() > 0) begin
        check(out_flit == q[0], "flit order");
        check(release_valid == (out_ready && is_tail(q[0].ftype)), "release pulse");
        if (release_valid) check(release_vc == q[0].vc, "release channel");
      end else check(!release_valid, "no release when empty");
      if (q.size() == OUTBUF_DEPTH) fulls++;
      if (release_valid) rels++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(fulls > 0 && rels > 0, "full buffer and releases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
