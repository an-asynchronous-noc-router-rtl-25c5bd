// tb_noc_router: end-to-end test of the router at node (2,2) of a 5x5 mesh.
//
// Every port has a sender model that honours the router's credits and a
// receiver model that takes flits and returns credits. Packets carry a tag
// (source port, channel, sequence number) in every flit, so each flit that
// leaves is checked against what was sent: right XY output, same channel,
// flits of a packet contiguous on their output channel and in order, every
// packet delivered exactly once, and no receiver lane ever holding more than
// three flits.
//
// Phases:
//  1. latency: one single-flit packet on the highest and one on the lowest
//     priority channel into an idle router; each must leave two cycles later.
//  2. throughput: five long packets on a permutation of inputs to outputs with
//     no contention; every output must carry one flit per cycle, all at once
//     (five flits per cycle through the router).
//  3. preemption: a long best-effort packet to East is overtaken by a
//     channel-0 packet to East, which must leave without interruption.
//  4. random traffic with random link stalls and credit delays.
// Mechanisms counted (each must occur): preemption at an output, a head flit
// held back by a bound channel, a lane passing a blocked lane of the same
// input, receiver credit exhausted, output link stall, single- and
// multi-flit packets, and every output used.
module tb_noc_router;
  import noc_pkg::*;
  localparam int MYX = 2, MYY = 2;
  localparam int L = 0, N = 1, E = 2, S = 3, W = 4;

  typedef struct {
    int len, out, src, vc, inj, arr_head, arr_tail, dx, dy;
    bit done;
  } pkt_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = COORD_W'(MYX), my_y = COORD_W'(MYY);
  logic  [NPORTS-1:0] in_valid = '0, out_valid, out_ready = '0;
  flit_t [NPORTS-1:0] in_flit = '0, out_flit;
  logic  [NPORTS-1:0][NVC-1:0] credit_out, credit_in = '0;

  noc_router dut (.*);

  always #5 clk = ~clk;

  pkt_t pkts [int];
  flit_t src_q [NPORTS][NVC][$];
  int credit [NPORTS][NVC];
  int outstanding [NPORTS][NVC];
  int cur [NPORTS][NVC], nidx [NPORTS][NVC], last_tail [NPORTS][NVC];
  int last_seq [NPORTS][NVC][NPORTS];
  int waiting [NPORTS][NVC][$];  // injected tags whose head has not left
  int seq = 0, cyc = 0, injected = 0, delivered = 0;
  int sent_vc [NPORTS];          // channel driven this cycle per input

  // driver knobs
  int ready_pct = 100, credit_pct = 100, inject_pct = 100;
  bit random_vc = 0;

  // mechanism counters
  int n_preempt = 0, n_vc_block = 0, n_bypass = 0, n_credit_out = 0, n_link_stall = 0;
  int n_single = 0, n_multi = 0;
  int n_out [NPORTS];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic int ref_route(int dx, int dy);
    if (dx != MYX) return (dx > MYX) ? E : W;
    if (dy != MYY) return (dy > MYY) ? N : S;
    return L;
  endfunction

  // Queue one packet; returns its tag.
  function automatic int add_packet(int p, int v, int len, int dx, int dy);
    int tag;
    tag = (p << 20) | (v << 16) | (seq & 16'hffff);
    seq++;
    pkts[tag] = '{len: len, out: ref_route(dx, dy), src: p, vc: v, inj: -1,
                  arr_head: -1, arr_tail: -1, dx: dx, dy: dy, done: 0};
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f.vc    = VC_W'(v);
      f.ftype = ftype_e'({(i == len - 1), (i == 0)});
      f.data  = {tag[23:0], (i == 0) ? {4'(dx), 4'(dy)} : 8'(i)};
      src_q[p][v].push_back(f);
    end
    return tag;
  endfunction

  // A destination reachable from input p under XY routing without a U-turn.
  task automatic rand_dest(input int p, output int dx, output int dy);
    case (p)
      L: do begin dx = $urandom % 5; dy = $urandom % 5; end while (dx == MYX && dy == MYY);
      W: begin dx = MYX + $urandom % 3; dy = $urandom % 5; end
      E: begin dx = $urandom % 3;       dy = $urandom % 5; end
      N: begin dx = MYX; dy = $urandom % 3; end
      default: begin dx = MYX; dy = MYY + $urandom % 3; end
    endcase
  endtask

  function automatic bit idle();
    foreach (pkts[t]) if (!pkts[t].done) return 0;
    return 1;
  endfunction

  // ---------------- drivers (change inputs on the falling edge) ----------------
  always @(negedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      int start;
      in_valid[p] = 0;
      in_flit[p]  = '0;
      sent_vc[p]  = -1;
      start = random_vc ? $urandom % NVC : 0;
      if ($urandom % 100 < inject_pct)
        for (int k = 0; k < NVC; k++) begin
          int v;
          v = (start + k) % NVC;
          if (sent_vc[p] < 0 && credit[p][v] > 0 && src_q[p][v].size() > 0) begin
            in_valid[p] = 1;
            in_flit[p]  = src_q[p][v][0];
            sent_vc[p]  = v;
          end
        end
      out_ready[p] = ($urandom % 100 < ready_pct);
      for (int v = 0; v < NVC; v++)
        credit_in[p][v] = (outstanding[p][v] > 0) && ($urandom % 100 < credit_pct);
    end
  end

  // ---------------- monitor (samples on the rising edge) ----------------
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      for (int v = 0; v < NVC; v++) begin
        if (credit_in[o][v]) outstanding[o][v]--;
        if (outstanding[o][v] == LANE_DEPTH) n_credit_out++;
      end
      if (out_valid[o] && !out_ready[o]) n_link_stall++;
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        int v, tag;
        f   = out_flit[o];
        v   = f.vc;
        tag = int'(f.data[31:8]);
        outstanding[o][v]++;
        check(outstanding[o][v] <= LANE_DEPTH, "receiver lane overrun");
        for (int w = v + 1; w < NVC; w++) if (cur[o][w] >= 0) begin n_preempt++; break; end
        if (!pkts.exists(tag)) begin
          check(0, "flit with unknown tag");
        end else if (is_head(f.ftype)) begin
          check(pkts[tag].out == o, "packet left by its XY output");
          check(pkts[tag].vc == v, "packet kept its channel");
          check(cur[o][v] < 0, "head flit on a channel bound to another packet");
          check(f.data[7:0] == {4'(pkts[tag].dx), 4'(pkts[tag].dy)}, "head flit intact");
          check((tag % 65536) > last_seq[pkts[tag].src][v][o],
                "packets of one input lane leave an output in order");
          last_seq[pkts[tag].src][v][o] = tag % 65536;
          if (last_tail[o][v] > pkts[tag].inj) n_vc_block++;
          // lane bypass: an older packet of the same input on another lane has not left yet
          for (int w = 0; w < NVC; w++)
            if (w != v)
              foreach (waiting[pkts[tag].src][w][i])
                if (pkts[waiting[pkts[tag].src][w][i]].inj < pkts[tag].inj) n_bypass++;
          foreach (waiting[pkts[tag].src][v][i])
            if (waiting[pkts[tag].src][v][i] == tag) begin
              waiting[pkts[tag].src][v].delete(i);
              break;
            end
          pkts[tag].arr_head = cyc;
          cur[o][v]  = tag;
          nidx[o][v] = 1;
          n_out[o]++;
        end else begin
          check(cur[o][v] == tag, "body flit belongs to the packet holding the channel");
          check(int'(f.data[7:0]) == nidx[o][v], "flits of a packet in order");
          nidx[o][v]++;
        end
        if (pkts.exists(tag) && is_tail(f.ftype)) begin
          check(nidx[o][v] == pkts[tag].len, "packet length");
          cur[o][v]       = -1;
          last_tail[o][v] = cyc;
          pkts[tag].arr_tail = cyc;
          pkts[tag].done  = 1;
          delivered++;
          if (pkts[tag].len == 1) n_single++; else n_multi++;
        end
      end
    end
    for (int p = 0; p < NPORTS; p++) begin
      for (int v = 0; v < NVC; v++) credit[p][v] += credit_out[p][v];
      if (in_valid[p]) begin
        flit_t f;
        f = src_q[p][sent_vc[p]].pop_front();
        credit[p][sent_vc[p]]--;
        if (is_head(f.ftype)) begin
          pkts[int'(f.data[31:8])].inj = cyc;
          waiting[p][sent_vc[p]].push_back(int'(f.data[31:8]));
          injected++;
        end
      end
    end
    cyc++;
  end

  task automatic wait_idle(input int limit);
    int n;
    n = 0;
    while ((!idle() || injected != pkts.size()) && n < limit) begin @(posedge clk); n++; end
    check(n < limit, "traffic drained");
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, tags [5], lo, hi;
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NVC; v++) begin
        credit[p][v] = LANE_DEPTH; outstanding[p][v] = 0; cur[p][v] = -1; nidx[p][v] = 0;
        last_tail[p][v] = -1;
        for (int o = 0; o < NPORTS; o++) last_seq[p][v][o] = -1;
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. latency, highest and lowest priority channel
    t0 = add_packet(N, 0, 1, MYX, 0);
    wait_idle(100);
    check(pkts[t0].arr_head - pkts[t0].inj == 2, "latency two cycles on channel 0");
    t1 = add_packet(W, NVC - 1, 1, 4, 1);
    wait_idle(100);
    check(pkts[t1].arr_head - pkts[t1].inj == 2, "latency two cycles on the best-effort channel");

    // 2. five concurrent streams without contention: S->N, N->L, E->S, W->E, L->W
    tags[0] = add_packet(S, 0, 200, MYX, 4);
    tags[1] = add_packet(N, 1, 200, MYX, MYY);
    tags[2] = add_packet(E, 2, 200, MYX, 0);
    tags[3] = add_packet(W, 3, 200, 4, 3);
    tags[4] = add_packet(L, 0, 200, 0, 0);
    wait_idle(1000);
    lo = 0; hi = 1 << 30;
    for (int k = 0; k < 5; k++) begin
      check(pkts[tags[k]].arr_tail - pkts[tags[k]].arr_head + 1 == 200,
            "one flit per cycle on each output");
      if (pkts[tags[k]].arr_head > lo) lo = pkts[tags[k]].arr_head;
      if (pkts[tags[k]].arr_tail < hi) hi = pkts[tags[k]].arr_tail;
    end
    check(hi - lo + 1 >= 190, "five outputs busy at the same time");

    // 3. preemption of best-effort traffic by channel 0 on output East
    t0 = add_packet(L, NVC - 1, 40, 4, 2);
    repeat (10) @(posedge clk);
    t1 = add_packet(W, 0, 12, 3, 2);
    wait_idle(500);
    check(pkts[t1].arr_tail - pkts[t1].arr_head + 1 == 12, "channel-0 packet not interrupted");
    check(pkts[t0].arr_head < pkts[t1].arr_head && pkts[t0].arr_tail > pkts[t1].arr_tail,
          "channel-0 packet overtook the best-effort packet");

    // 4. random traffic
    ready_pct = 70; credit_pct = 50; inject_pct = 80; random_vc = 1;
    for (int round = 0; round < 40; round++) begin
      for (int k = 0; k < 30; k++) begin
        int p, v, dx, dy;
        p = $urandom % NPORTS;
        v = $urandom % NVC;
        rand_dest(p, dx, dy);
        void'(add_packet(p, v, ($urandom % 3 == 0) ? 1 : 1 + $urandom % 8, dx, dy));
      end
      repeat (60) @(posedge clk);
    end
    wait_idle(20000);

    check(delivered == pkts.size(), "every packet delivered");
    $display("packets=%0d preempt=%0d vc_block=%0d bypass=%0d credit_out=%0d link_stall=%0d single=%0d multi=%0d",
             delivered, n_preempt, n_vc_block, n_bypass, n_credit_out, n_link_stall, n_single, n_multi);
    $display("per output: L=%0d N=%0d E=%0d S=%0d W=%0d", n_out[0], n_out[1], n_out[2], n_out[3], n_out[4]);
    check(n_preempt > 0, "preemption happened");
    check(n_vc_block > 0, "head flit held back by a bound channel");
    check(n_bypass > 0, "lane passed a blocked lane");
    check(n_credit_out > 0, "credit exhausted");
    check(n_link_stall > 0, "output link stalled");
    check(n_single > 0 && n_multi > 0, "single- and multi-flit packets");
    for (int o = 0; o < NPORTS; o++) check(n_out[o] > 0, "every output used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
