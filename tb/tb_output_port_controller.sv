// tb_output_port_controller: self-checking test of one output port.
//
// Four sources (inputs 0, 1, 3, 4) each send packets of random length on a
// random channel and request the output when the port's status allows it, as
// an input port would. The crossbar is modelled by the testbench from the
// grant. A reference model predicts the grant (lowest channel, then lowest
// input), the credit and channel-binding state and the flit order on the
// link. The receiver takes flits with a random ready and returns credits
// after a random delay; it checks that no lane ever holds more than three
// flits. Counts preemptions, credit stalls, buffer-full stalls and blocked
// head flits.
module tb_output_port_controller;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] req = '0, gnt;
  logic [NPORTS-1:0][VC_W-1:0] req_vc = '0;
  flit_t xbar_flit = '0, out_flit;
  logic xbar_valid = 0, space, out_valid, out_ready = 0;
  logic [NVC-1:0] credit_ok, vc_free, credit_in = '0;

  flit_t src [NPORTS][$];
  flit_t obuf [$];
  int credit_m [NVC], held_m [NVC], busy_m [NVC];
  int seq = 0, sent = 0;
  int preempt = 0, credit_stall = 0, full_stall = 0, head_block = 0;
  int last_vc_busy_low = 0;

  always #5 clk = ~clk;

  output_port_controller dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic make_packet(int p);
    int len, v;
    len = 1 + $urandom % 5;
    v = $urandom % NVC;
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f.vc = VC_W'(v);
      f.ftype = ftype_e'({(i == len - 1), (i == 0)});
      f.data = {8'(p), 16'(seq), 8'(i)};
      src[p].push_back(f);
    end
    seq++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NVC; v++) begin credit_m[v] = LANE_DEPTH; held_m[v] = 0; busy_m[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (6000) begin
      int wp, wv;
      bit want [NPORTS];
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        want[p] = 0;
        if (p == 2) continue;
        if (src[p].size() == 0 && $urandom % 3 == 0) make_packet(p);
        if (src[p].size() > 0) begin
          int v;
          v = src[p][0].vc;
          want[p] = 1;
          if (credit_m[v] == 0) credit_stall++;
          else if (is_head(src[p][0].ftype) && busy_m[v]) head_block++;
          else if (obuf.size() == OUTBUF_DEPTH) full_stall++;
          req[p] = (credit_m[v] > 0) && (obuf.size() < OUTBUF_DEPTH) &&
                   (!is_head(src[p][0].ftype) || !busy_m[v]);
          req_vc[p] = VC_W'(v);
        end else req[p] = 0;
      end
      req[2] = 0;
      xbar_valid = 0; xbar_flit = '0;
      out_ready = ($urandom % 3 != 0);
      // receiver returns credits after a random delay
      for (int v = 0; v < NVC; v++) begin
        credit_in[v] = (held_m[v] > 0) && ($urandom % 2);
      end
      #1;
      // model status
      check(space == (obuf.size() < OUTBUF_DEPTH), "space");
      for (int v = 0; v < NVC; v++) begin
        check(credit_ok[v] == (credit_m[v] > 0), "credit_ok");
        check(vc_free[v] == !busy_m[v], "vc_free");
      end
      wp = -1; wv = NVC;
      for (int p = 0; p < NPORTS; p++)
        if (req[p] && req_vc[p] < wv) begin wv = req_vc[p]; wp = p; end
      check(gnt == ((wp >= 0) ? NPORTS'(1) << wp : '0), "grant by channel priority then port");
      // crossbar stand-in: the granted source's flit comes back
      xbar_valid = (wp >= 0);
      xbar_flit  = (wp >= 0) ? src[wp][0] : '0;
      check(out_valid == (obuf.size() > 0), "out_valid");
      if (obuf.size() > 0) check(out_flit == obuf[0], "link flit order");
      // preemption: a higher channel wins while a lower channel packet is bound
      if (wp >= 0)
        for (int v = wv + 1; v < NVC; v++) if (busy_m[v]) begin preempt++; break; end
      @(posedge clk);
      for (int v = 0; v < NVC; v++) if (credit_in[v]) begin held_m[v]--; credit_m[v]++; end
      if (out_valid && out_ready && obuf.size() > 0) begin
        flit_t f;
        f = obuf.pop_front();
        held_m[f.vc]++;
        check(held_m[f.vc] <= LANE_DEPTH, "receiver lane never overrun");
        if (is_tail(f.ftype)) busy_m[f.vc] = 0;
      end
      if (wp >= 0) begin
        flit_t f;
        f = src[wp].pop_front();
        obuf.push_back(f);
        credit_m[f.vc]--;
        if (is_head(f.ftype)) busy_m[f.vc] = 1;
        sent++;
      end
    end
    $display("sent=%0d preempt=%0d credit_stall=%0d full_stall=%0d head_block=%0d",
             sent, preempt, credit_stall, full_stall, head_block);
    check(preempt > 0, "preemption happened");
    check(credit_stall > 0, "credit stall happened");
    check(full_stall > 0, "output buffer full happened");
    check(head_block > 0, "head flit blocked on a bound channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
