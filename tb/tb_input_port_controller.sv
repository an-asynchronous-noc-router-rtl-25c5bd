// tb_input_port_controller: self-checking test of one input port (local port
// of node (2,2)).
//
// A credit-respecting sender interleaves packets of random length on all
// channels. The output-side status (buffer space, credit, channel free) and
// the grant are random. A model keeps one queue and one held route per lane
// and predicts, every cycle, which lane is offered (the lowest numbered lane
// that could move), its flit, its XY output and the credit returned. Counts
// the cycles in which a blocked lane was passed by another lane.
module tb_input_port_controller;
  import noc_pkg::*;
  localparam int MYX = 2, MYY = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = COORD_W'(MYX), my_y = COORD_W'(MYY);
  logic in_valid = 0;
  flit_t in_flit = '0;
  logic [NVC-1:0] credit_out;
  logic [NPORTS-1:0] out_space = '1;
  logic [NPORTS-1:0][NVC-1:0] out_credit_ok = '1, out_vc_free = '1;
  logic req_valid, req_gnt = 0;
  port_e req_port;
  flit_t req_flit;

  flit_t q [NVC][$];          // lane contents
  flit_t src [NVC][$];        // flits still to send per channel
  port_e held [NVC];
  int credit [NVC];
  int passed = 0, sent = 0, recv = 0, seq = 0;

  always #5 clk = ~clk;

  input_port_controller #(.PORT(0)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic port_e ref_route(flit_t f, port_e h);
    int dx, dy;
    if (!is_head(f.ftype)) return h;
    dx = f.data[7:4]; dy = f.data[3:0];
    if (dx != MYX) return (dx > MYX) ? PORT_E : PORT_W;
    if (dy != MYY) return (dy > MYY) ? PORT_N : PORT_S;
    return PORT_L;
  endfunction

  task automatic make_packet(int v);
    int len, dx, dy;
    len = 1 + $urandom % 4;
    do begin dx = $urandom % 5; dy = $urandom % 5; end while (dx == MYX && dy == MYY);
    for (int i = 0; i < len; i++) begin
      flit_t f;
      f.vc = VC_W'(v);
      f.ftype = ftype_e'({(i == len - 1), (i == 0)});
      f.data = {8'(v), 16'(seq), 8'(i)};
      if (i == 0) f.data[7:0] = {4'(dx), 4'(dy)};
      src[v].push_back(f);
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
    for (int v = 0; v < NVC; v++) begin credit[v] = LANE_DEPTH; held[v] = PORT_L; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5000) begin
      int sel, vin;
      bit elig [NVC];
      port_e r [NVC];
      @(negedge clk);
      // sender
      vin = $urandom % NVC;
      if (src[vin].size() == 0 && sent < 3000) make_packet(vin);
      in_valid = (credit[vin] > 0) && (src[vin].size() > 0) && ($urandom % 4 != 0);
      in_flit = in_valid ? src[vin][0] : '0;
      // output side
      out_space     = NPORTS'($urandom) | NPORTS'($urandom);
      out_credit_ok = ($urandom % 2) ? '1 : {$urandom, $urandom};
      out_vc_free   = ($urandom % 2) ? '1 : {$urandom, $urandom};
      req_gnt       = ($urandom % 4 != 0);
      #1;
      sel = -1;
      for (int v = 0; v < NVC; v++) begin
        elig[v] = 0;
        if (q[v].size() > 0) begin
          r[v] = ref_route(q[v][0], held[v]);
          elig[v] = out_space[r[v]] && out_credit_ok[r[v]][v] &&
                    (!is_head(q[v][0].ftype) || out_vc_free[r[v]][v]);
          if (elig[v] && sel < 0) sel = v;
        end
      end
      check(req_valid == (sel >= 0), "request when a lane can move");
      if (sel >= 0) begin
        check(req_flit == q[sel][0], "offered flit is head of highest priority movable lane");
        check(req_port == r[sel], "XY output of offered flit");
        check(credit_out == (req_gnt ? NVC'(1) << sel : '0), "credit returned on grant");
        if (sel > 0 && q[0].size() > 0) passed++;
      end else check(credit_out == '0, "no credit without grant");
      @(posedge clk);
      for (int v = 0; v < NVC; v++) credit[v] += credit_out[v];
      if (sel >= 0 && req_gnt) begin
        if (is_head(q[sel][0].ftype)) held[sel] = r[sel];
        void'(q[sel].pop_front());
        recv++;
      end
      if (in_valid) begin
        q[vin].push_back(src[vin].pop_front());
        credit[vin]--;
        sent++;
      end
    end
    check(passed > 0, "a blocked lane was passed by another lane");
    check(recv > 1000, "traffic flowed");
    $display("passed=%0d sent=%0d forwarded=%0d", passed, sent, recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
