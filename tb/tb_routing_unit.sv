// tb_routing_unit: self-checking test of XY routing.
//
// Random node coordinates and head-flit destinations; each lane's route is
// compared with a reference that moves along X first, then Y. After a head
// flit is popped, the lane shows a body flit and must keep the same route.
module tb_routing_unit;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x, my_y;
  flit_t [NVC-1:0] lane_head;
  logic  [NVC-1:0] lane_pop;
  port_e [NVC-1:0] route;
  port_e expect_r [NVC];

  always #5 clk = ~clk;

  routing_unit dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic port_e ref_route(int x, int y, int dx, int dy);
    if (dx != x) return (dx > x) ? PORT_E : PORT_W;
    if (dy != y) return (dy > y) ? PORT_N : PORT_S;
    return PORT_L;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [5];
    lane_pop = '0;
    lane_head = '0;
    my_x = 0; my_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      my_x = COORD_W'($urandom % 6); my_y = COORD_W'($urandom % 6);
      for (int v = 0; v < NVC; v++) begin
        int dx, dy;
        dx = $urandom % 6; dy = $urandom % 6;
        lane_head[v].vc    = VC_W'(v);
        lane_head[v].ftype = ($urandom % 2) ? FT_HEAD : FT_SINGLE;
        lane_head[v].data  = $urandom;
        lane_head[v].data[2*COORD_W-1:0] = {COORD_W'(dx), COORD_W'(dy)};
        expect_r[v] = ref_route(my_x, my_y, dx, dy);
        seen[expect_r[v]]++;
      end
      lane_pop = NVC'($urandom);
      #1;
      for (int v = 0; v < NVC; v++) check(route[v] == expect_r[v], "XY route of head flit");
      @(posedge clk);
      @(negedge clk);
      // Body flits: the popped lanes keep their route even though the
      // coordinates and data change.
      my_x = COORD_W'($urandom); my_y = COORD_W'($urandom);
      for (int v = 0; v < NVC; v++) begin
        lane_head[v].ftype = ($urandom % 2) ? FT_BODY : FT_TAIL;
        lane_head[v].data  = $urandom;
      end
      #1;
      for (int v = 0; v < NVC; v++)
        if (lane_pop[v]) check(route[v] == expect_r[v], "route held for body flits");
      lane_pop = '0;
    end
    for (int p = 0; p < 5; p++) check(seen[p] > 0, "every output direction exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
