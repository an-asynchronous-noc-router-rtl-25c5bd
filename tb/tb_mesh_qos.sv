// tb_mesh_qos: a 3x3 mesh of routers under QoS and best-effort traffic.
//
// Nine routers are linked into a mesh: each router's East output drives its
// eastern neighbour's West input and the neighbour's West credits come back
// to the East output, likewise for North/South. A client model at every local
// port injects packets (honouring credits, lower channel first) and takes
// every flit that arrives, returning its credit at once.
//
// Traffic: three guaranteed connections, one on each of channels 0, 1 and 2
// (the NVC-1 connections a four-channel router can carry), send a four-flit
// packet every 12 cycles across the mesh. The three paths do not share a
// link with each other, but every link they use also carries best-effort
// traffic: each client sends random packets on channel 3 at a load that
// saturates the centre links.
//
// Checks: every packet arrives once, at its destination's local port, on its
// own channel, with its flits contiguous and in order, and packets of one
// source lane arrive in order. Each connection packet must arrive within
// 4 cycles per router crossed plus its length plus 2: two cycles of router
// latency and at most two flits of other traffic already in an output buffer
// ahead of it at each router. Average latencies per channel are printed, and
// the best-effort traffic must have met real contention.
module tb_mesh_qos;
  import noc_pkg::*;
  localparam int MX = 3, MY = 3, NN = MX * MY;
  localparam int L = 0, N = 1, E = 2, S = 3, W = 4;

  typedef struct {
    int len, dst, src, vc, inj, hops;
    bit done;
  } pkt_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic  [NPORTS-1:0]          r_in_valid  [NN], r_out_valid [NN], r_out_ready [NN];
  flit_t [NPORTS-1:0]          r_in_flit   [NN], r_out_flit  [NN];
  logic  [NPORTS-1:0][NVC-1:0] r_credit_out[NN], r_credit_in [NN];

  // client side of each local port
  logic           c_valid [NN];
  flit_t          c_flit  [NN];
  logic [NVC-1:0] c_credit [NN];

  always #5 clk = ~clk;

  for (genvar n = 0; n < NN; n++) begin : g_node
    noc_router u_router (
      .clk       (clk),
      .rst_n     (rst_n),
      .my_x      (COORD_W'(n % MX)),
      .my_y      (COORD_W'(n / MX)),
      .in_valid  (r_in_valid[n]),
      .in_flit   (r_in_flit[n]),
      .credit_out(r_credit_out[n]),
      .out_valid (r_out_valid[n]),
      .out_flit  (r_out_flit[n]),
      .out_ready (r_out_ready[n]),
      .credit_in (r_credit_in[n])
    );
  end

  function automatic int nb(int n, int dir);
    int x, y;
    x = n % MX; y = n / MX;
    case (dir)
      E: return (x + 1 < MX) ? n + 1 : -1;
      W: return (x > 0) ? n - 1 : -1;
      N: return (y + 1 < MY) ? n + MX : -1;
      S: return (y > 0) ? n - MX : -1;
      default: return -1;
    endcase
  endfunction

  function automatic int opposite(int dir);
    case (dir)
      E: return W;
      W: return E;
      N: return S;
      default: return N;
    endcase
  endfunction

  // mesh wiring
  always_comb begin
    for (int n = 0; n < NN; n++) begin
      r_in_valid[n][L]  = c_valid[n];
      r_in_flit[n][L]   = c_flit[n];
      r_out_ready[n][L] = 1'b1;
      r_credit_in[n][L] = c_credit[n];
      for (int d = 1; d < NPORTS; d++) begin
        int m;
        m = nb(n, d);
        if (m >= 0) begin
          r_in_valid[n][d]  = r_out_valid[m][opposite(d)];
          r_in_flit[n][d]   = r_out_flit[m][opposite(d)];
          r_out_ready[n][d] = 1'b1;
          r_credit_in[n][d] = r_credit_out[m][opposite(d)];
        end else begin
          r_in_valid[n][d]  = 1'b0;
          r_in_flit[n][d]   = '0;
          r_out_ready[n][d] = 1'b1;
          r_credit_in[n][d] = '0;
        end
      end
    end
  end

  pkt_t pkts [int];
  flit_t src_q [NN][NVC][$];
  int credit [NN][NVC];
  int cur [NN][NVC], nidx [NN][NVC];
  int last_seq [NN][NVC][NN];
  int sent_vc [NN];
  int seq = 0, cyc = 0, delivered = 0;
  longint lat_sum [NVC];
  int lat_cnt [NVC], lat_max [NVC];
  int to_return [NN][NVC];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic int add_packet(int s, int v, int len, int d);
    int tag;
    tag = (s << 20) | (v << 16) | (seq & 16'hffff);
    seq++;
    pkts[tag] = '{len: len, dst: d, src: s, vc: v, inj: -1,
                  hops: 1 + ((s % MX > d % MX) ? s % MX - d % MX : d % MX - s % MX)
                          + ((s / MX > d / MX) ? s / MX - d / MX : d / MX - s / MX),
                  done: 0};
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f.vc    = VC_W'(v);
      f.ftype = ftype_e'({(i == len - 1), (i == 0)});
      f.data  = {tag[23:0], (i == 0) ? {4'(d % MX), 4'(d / MX)} : 8'(i)};
      src_q[s][v].push_back(f);
    end
    return tag;
  endfunction

  // clients drive on the falling edge, lowest channel first
  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      c_valid[n] = 0;
      c_flit[n]  = '0;
      sent_vc[n] = -1;
      for (int v = 0; v < NVC; v++)
        if (sent_vc[n] < 0 && credit[n][v] > 0 && src_q[n][v].size() > 0) begin
          c_valid[n] = 1;
          c_flit[n]  = src_q[n][v][0];
          sent_vc[n] = v;
        end
      for (int v = 0; v < NVC; v++) begin
        c_credit[n][v] = (to_return[n][v] > 0);
        if (c_credit[n][v]) to_return[n][v]--;
      end
    end
  end

  // clients sample on the rising edge
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (r_out_valid[n][L]) begin
        flit_t f;
        int v, tag;
        f = r_out_flit[n][L];
        v = f.vc;
        tag = int'(f.data[31:8]);
        to_return[n][v]++;
        if (!pkts.exists(tag)) check(0, "unknown packet");
        else begin
          if (is_head(f.ftype)) begin
            check(pkts[tag].dst == n, "packet ejected at its destination");
            check(pkts[tag].vc == v, "packet kept its channel");
            check(cur[n][v] < 0, "packets interleaved on one channel");
            check((tag % 65536) > last_seq[pkts[tag].src][v][n], "lane order kept");
            last_seq[pkts[tag].src][v][n] = tag % 65536;
            cur[n][v] = tag; nidx[n][v] = 1;
          end else begin
            check(cur[n][v] == tag && int'(f.data[7:0]) == nidx[n][v], "flits contiguous and in order");
            nidx[n][v]++;
          end
          if (is_tail(f.ftype)) begin
            int lat;
            check(nidx[n][v] == pkts[tag].len, "packet length");
            cur[n][v] = -1;
            pkts[tag].done = 1;
            delivered++;
            lat = cyc - pkts[tag].inj;
            lat_sum[v] += lat; lat_cnt[v]++;
            if (lat > lat_max[v]) lat_max[v] = lat;
            if (v < NVC - 1)
              check(lat <= 4 * pkts[tag].hops + pkts[tag].len + 2, "connection latency bound");
          end
        end
      end
      for (int v = 0; v < NVC; v++) credit[n][v] += r_credit_out[n][L][v];
      if (c_valid[n]) begin
        flit_t f;
        f = src_q[n][sent_vc[n]].pop_front();
        credit[n][sent_vc[n]]--;
        if (is_head(f.ftype)) pkts[int'(f.data[31:8])].inj = cyc;
      end
    end
    cyc++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pending;
    for (int n = 0; n < NN; n++)
      for (int v = 0; v < NVC; v++) begin
        credit[n][v] = LANE_DEPTH; cur[n][v] = -1; to_return[n][v] = 0;
        for (int m = 0; m < NN; m++) last_seq[n][v][m] = -1;
      end
    for (int v = 0; v < NVC; v++) begin lat_sum[v] = 0; lat_cnt[v] = 0; lat_max[v] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 12 == 0) begin
        void'(add_packet(0, 0, 4, 8));   // (0,0) -> (2,2)
        void'(add_packet(6, 1, 4, 2));   // (0,2) -> (2,0)
        void'(add_packet(3, 2, 4, 5));   // (0,1) -> (2,1)
      end
      for (int n = 0; n < NN; n++)
        if ($urandom % 100 < 12 && src_q[n][NVC - 1].size() < 40) begin
          int d;
          do d = $urandom % NN; while (d == n);
          void'(add_packet(n, NVC - 1, 1 + $urandom % 8, d));
        end
    end
    pending = 1;
    for (int k = 0; k < 20000 && pending; k++) begin
      @(posedge clk);
      pending = 0;
      foreach (pkts[t]) if (!pkts[t].done) begin pending = 1; break; end
    end
    check(!pending, "all packets delivered");
    check(delivered == pkts.size(), "delivered count");
    for (int v = 0; v < NVC; v++)
      $display("channel %0d: packets=%0d mean latency=%0d.%02d max=%0d", v, lat_cnt[v],
               int'(lat_sum[v] / (lat_cnt[v] ? lat_cnt[v] : 1)),
               int'((lat_sum[v] * 100 / (lat_cnt[v] ? lat_cnt[v] : 1)) % 100), lat_max[v]);
    for (int v = 0; v < NVC; v++) check(lat_cnt[v] > 0, "traffic on every channel");
    check(lat_max[NVC - 1] > 4 * 5 + 8 + 2, "best-effort traffic saw contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
