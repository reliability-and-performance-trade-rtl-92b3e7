// tb_alash_route_unit: checks route selection at node 21 (x=1, y=1, z=1) of
// the 4x4x4 network. The reference derives shortest-path and detour ports
// from coordinates (Manhattan distance), independently of the unit's
// breadth-first routing table, and applies the selection rules: pruned
// bundles avoided while another shortest port exists, one planar detour
// otherwise, no U-turn, current adaptive layer first, then a higher adaptive
// layer, then the escape layer in x-y-z dimension order.
module tb_alash_route_unit;
  import noc_pkg::*;
  localparam int unsigned NODE = 21;
  logic [NODE_W-1:0] dst;
  logic [VC_W-1:0]   cur_vc;
  logic              detour_used;
  logic [PORT_W-1:0] in_port;
  port_mask_t        prune_mask;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] vc_free;
  logic              ok, detour, avoided, layer_up;
  logic [PORT_W-1:0] out_port;
  logic [VC_W-1:0]   out_vc;
  int checks = 0, failures = 0;
  int n_detour = 0, n_avoided = 0, n_layer_up = 0, n_blocked = 0, n_escape = 0;

  port_mask_t min_ports, far_ports;
  rt_tbl_t    tbl;

  alash_route_unit dut (
    .min_ports, .far_ports, .cur_vc, .detour_used, .in_port, .prune_mask, .vc_free,
    .ok, .out_port, .out_vc, .detour, .avoided, .layer_up
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void coords(int n, output int x, output int y, output int z);
    x = n % 4;
    y = (n / 4) % 4;
    z = n / 16;
  endfunction

  // expected result
  function automatic void ref_route(output logic e_ok, output int e_port, output int e_vc,
                                    output logic e_det, output logic e_avo, output logic e_up);
    int x, y, z, dx_, dy_, dz_, d;
    port_mask_t mn, fr, back, cand;
    coords(NODE, x, y, z);
    coords(int'(dst), dx_, dy_, dz_);
    dx_ -= x; dy_ -= y; dz_ -= z;
    mn = '0;
    if (dx_ == 0 && dy_ == 0 && dz_ == 0) mn[P_LOCAL] = 1;
    if (dx_ > 0) mn[P_EAST] = 1;
    if (dx_ < 0) mn[P_WEST] = 1;
    if (dy_ > 0) mn[P_NORTH] = 1;
    if (dy_ < 0) mn[P_SOUTH] = 1;
    if (dz_ > 0) mn[P_UP] = 1;
    if (dz_ < 0) mn[P_DOWN] = 1;
    fr = '0;
    if (mn[P_LOCAL] == 0) begin
      if (x < 3 && dx_ <= 0) fr[P_EAST] = 1;
      if (x > 0 && dx_ >= 0) fr[P_WEST] = 1;
      if (y < 3 && dy_ <= 0) fr[P_NORTH] = 1;
      if (y > 0 && dy_ >= 0) fr[P_SOUTH] = 1;
    end
    back = '0;
    if (in_port != P_LOCAL) back[in_port] = 1;
    mn &= ~back;
    fr &= ~back & ~prune_mask;
    cand = mn & ~prune_mask;
    e_det = 0;
    e_avo = (mn & prune_mask) != 0;
    if (cand == 0) begin
      if (!detour_used && fr != 0) begin
        cand = fr;
        e_det = 1;
      end else begin
        cand = mn;
        e_avo = 0;
      end
    end
    e_ok = 0; e_port = 0; e_vc = cur_vc; e_up = 0;
    if (cur_vc < NUM_VC - 1) begin
      for (int p = 0; p < NUM_PORTS; p++)
        if (!e_ok && cand[p] && vc_free[p][cur_vc]) begin
          e_ok = 1; e_port = p; e_vc = cur_vc;
        end
      for (int v = 0; v < NUM_VC - 1; v++)
        for (int p = 0; p < NUM_PORTS; p++)
          if (!e_ok && v > cur_vc && cand[p] && vc_free[p][v]) begin
            e_ok = 1; e_port = p; e_vc = v; e_up = 1;
          end
    end
    if (!e_ok) begin
      // escape layer, dimension order x, y, z
      e_det = 0;
      e_avo = 0;
      if (dx_ > 0) e_port = P_EAST;
      else if (dx_ < 0) e_port = P_WEST;
      else if (dy_ > 0) e_port = P_NORTH;
      else if (dy_ < 0) e_port = P_SOUTH;
      else if (dz_ > 0) e_port = P_UP;
      else if (dz_ < 0) e_port = P_DOWN;
      else e_port = P_LOCAL;
      if (vc_free[e_port][NUM_VC-1]) begin
        e_ok = 1; e_vc = NUM_VC - 1; e_up = (cur_vc != NUM_VC - 1);
      end else e_port = 0;
    end
  endfunction

  // the router's table lookup for the current destination
  always_comb {far_ports, min_ports} = tbl[dst];

  task automatic check(string what);
    logic e_ok, e_det, e_avo, e_up;
    int e_port, e_vc;
    #1;
    ref_route(e_ok, e_port, e_vc, e_det, e_avo, e_up);
    checks++;
    if (ok != e_ok || (e_ok && (int'(out_port) != e_port || int'(out_vc) != e_vc ||
        layer_up != e_up || detour != e_det || avoided != e_avo))) begin
      failures++;
      $display("FAIL %s dst=%0d vc=%0d in=%0d prune=%b: got ok=%b port=%0d vc=%0d det=%b avo=%b up=%b, exp ok=%b port=%0d vc=%0d det=%b avo=%b up=%b",
               what, dst, cur_vc, in_port, prune_mask, ok, out_port, out_vc, detour, avoided,
               layer_up, e_ok, e_port, e_vc, e_det, e_avo, e_up);
    end
    if (e_ok && e_det) n_detour++;
    if (e_ok && e_avo) n_avoided++;
    if (e_ok && e_up) n_layer_up++;
    if (e_ok && e_vc == NUM_VC - 1) n_escape++;
    if (!e_ok) n_blocked++;
  endtask

  task automatic expect_port(string what, int port, int vc);
    checks++;
    if (!ok || int'(out_port) != port || int'(out_vc) != vc) begin
      failures++;
      $display("FAIL %s: got ok=%b port=%0d vc=%0d, exp port %0d vc %0d", what, ok, out_port,
               out_vc, port, vc);
    end
  endtask

  initial begin
    tbl = build_route_tbl(NODE, XDIM, YDIM, ZDIM);
    // directed cases
    vc_free = '1; cur_vc = 0; detour_used = 0; in_port = P_LOCAL; prune_mask = '0;
    dst = NODE_W'(NODE);      #1; expect_port("eject", P_LOCAL, 0);
    dst = NODE_W'(NODE + 16); #1; expect_port("straight up", P_UP, 0);
    dst = NODE_W'(NODE - 16); #1; expect_port("straight down", P_DOWN, 0);
    dst = NODE_W'(NODE + 1);  #1; expect_port("east", P_EAST, 0);
    dst = NODE_W'(NODE + 17); #1; expect_port("east-up, east first", P_EAST, 0);
    prune_mask[P_UP] = 1;
    dst = NODE_W'(NODE + 16); #1; expect_port("pruned up: detour east", P_EAST, 0);
    checks++; if (!detour) begin failures++; $display("FAIL detour flag"); end
    detour_used = 1;          #1; expect_port("pruned up, detour used: up", P_UP, 0);
    detour_used = 0; in_port = P_WEST;
    dst = NODE_W'(NODE + 15); #1; expect_port("pruned up, west is back: detour east", P_EAST, 0);
    dst = NODE_W'(NODE + 16); #1; expect_port("pruned up, from west: no u-turn", P_EAST, 0);
    in_port = P_EAST;         #1; expect_port("pruned up, from east: detour west", P_WEST, 0);
    prune_mask = '0; in_port = P_LOCAL; cur_vc = 1;
    vc_free[P_UP] = 4'b1101;  #1; expect_port("layer busy: next layer", P_UP, 2);
    vc_free[P_UP] = 4'b1001;  #1; expect_port("adaptive busy: escape", P_UP, 3);
    dst = NODE_W'(NODE + 17); vc_free[P_EAST] = 4'b1000;
    vc_free[P_UP] = 4'b0001;  #1; expect_port("escape in x first", P_EAST, 3);
    vc_free[P_EAST] = 4'b0001; #1;
    checks++; if (ok) begin failures++; $display("FAIL nothing free must block"); end
    vc_free = '1; cur_vc = 3; prune_mask[P_UP] = 1; dst = NODE_W'(NODE + 16);
    #1; expect_port("escape ignores pruning", P_UP, 3);
    // random cases
    for (int k = 0; k < 20000; k++) begin
      dst         = NODE_W'($urandom % NUM_NODES);
      cur_vc      = VC_W'($urandom);
      detour_used = $urandom % 4 == 0;
      in_port     = PORT_W'($urandom % NUM_PORTS);
      prune_mask  = '0;
      prune_mask[P_UP]   = $urandom % 2;
      prune_mask[P_DOWN] = $urandom % 2;
      for (int p = 0; p < NUM_PORTS; p++) vc_free[p] = NUM_VC'($urandom) | NUM_VC'($urandom);
      check("random");
    end
    checks++;
    if (n_detour == 0 || n_avoided == 0 || n_layer_up == 0 || n_blocked == 0 || n_escape == 0) begin
      failures++;
      $display("FAIL coverage: detour %0d avoided %0d layer_up %0d blocked %0d", n_detour,
               n_avoided, n_layer_up, n_blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
