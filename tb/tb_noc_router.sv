// tb_noc_router: drives router 21 (x=1, y=1, z=1) of the 4x4x4 network from
// all seven ports at once, acting as its neighbours: upstream senders that
// obey credits and downstream receivers that return credits, sometimes late.
// Checks: zero-load latency of a head flit; every packet leaves whole, in
// order, on one output virtual channel, through a shortest-path port;
// flits on the TSV ports only when the link was ready; credits never exceed
// the buffer; pruning of the up bundle makes packets avoid it or detour (with
// the head's detour flag set); contention moves a packet to a higher layer.
module tb_noc_router;
  import noc_pkg::*;
  localparam int unsigned NODE = 21;

  logic clk = 0, rst_n = 0;
  logic [NUM_PORTS-1:0]            in_valid = '0;
  flit_t                           in_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0]            credit_out_valid;
  logic [NUM_PORTS-1:0][VC_W-1:0]  credit_out_vc;
  logic [NUM_PORTS-1:0]            out_valid;
  flit_t                           out_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0]            out_ready = '1;
  logic [NUM_PORTS-1:0]            credit_in_valid = '0;
  logic [NUM_PORTS-1:0][VC_W-1:0]  credit_in_vc = '0;
  logic tsv_active = 0, util_clear = 0, prune_up = 0, prune_down = 0;
  logic [31:0] tsv_util;
  logic ev_avoided, ev_detour, ev_layer_up, ev_stall;

  int checks = 0, failures = 0;
  int n_avoided = 0, n_detour = 0, n_layer_up = 0, n_stall = 0, n_ready_low = 0;

  noc_router #(.NODE_ID(NODE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bookkeeping
  typedef struct {
    int dst, len, seen, inport, vc_out, port_out;
    logic detoured;
  } pkt_t;
  pkt_t pk [int];
  int next_id = 1;

  // per input port: flits waiting to be sent (one packet after another)
  flit_t txq [NUM_PORTS][$];
  int    credit [NUM_PORTS][NUM_VC];
  // per output: packet open on each output channel, and credits to return
  int    open_pkt [NUM_PORTS][NUM_VC];
  int    crq [NUM_PORTS][$];
  logic  hold [NUM_PORTS];
  logic  prev_ready [NUM_PORTS];
  port_mask_t expect_ports = '0;  // directed tests: allowed exit ports, 0 = any shortest

  function automatic port_mask_t min_ports(int dst);
    int dx, dy, dz;
    port_mask_t m;
    dx = dst % 4 - NODE % 4;
    dy = (dst / 4) % 4 - (NODE / 4) % 4;
    dz = dst / 16 - NODE / 16;
    m = '0;
    if (dx == 0 && dy == 0 && dz == 0) m[P_LOCAL] = 1;
    if (dx > 0) m[P_EAST] = 1;
    if (dx < 0) m[P_WEST] = 1;
    if (dy > 0) m[P_NORTH] = 1;
    if (dy < 0) m[P_SOUTH] = 1;
    if (dz > 0) m[P_UP] = 1;
    if (dz < 0) m[P_DOWN] = 1;
    return m;
  endfunction

  task automatic queue_packet(int inport, int dst, int len, int vc);
    flit_t f;
    int id;
    id = next_id++;
    pk[id] = '{dst: dst, len: len, seen: 0, inport: inport, vc_out: -1, port_out: -1,
               detoured: 0};
    for (int i = 0; i < len; i++) begin
      f.vc = VC_W'(vc);
      if (len == 1) f.ftype = FT_HEADTAIL;
      else if (i == 0) f.ftype = FT_HEAD;
      else if (i == len - 1) f.ftype = FT_TAIL;
      else f.ftype = FT_BODY;
      f.data = {12'(id), 12'(0), 8'(i)};
      if (i == 0) begin
        f.data[HD_DST_LSB +: 8] = 8'(dst);
        f.data[HD_SRC_LSB +: 8] = 8'(inport);
      end
      txq[inport].push_back(f);
    end
  endtask

  // ------------------------------------------------------------ drivers
  always @(posedge clk) begin
    if (rst_n) begin
      // credits from the router
      for (int p = 0; p < NUM_PORTS; p++)
        if (credit_out_valid[p]) credit[p][credit_out_vc[p]]++;
      // flits leaving the router
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (out_valid[o]) begin
          flit_t f;
          int id, v;
          f = out_flit[o];
          v = int'(f.vc);
          id = int'(f.data[31:20]);
          crq[o].push_back(v);
          checks++;
          if (!prev_ready[o]) begin
            failures++;
            $display("FAIL: flit on port %0d while the link was not ready", o);
          end
          if (is_head(f.ftype)) begin
            checks++;
            if (open_pkt[o][v] != 0 || !pk.exists(id)) begin
              failures++;
              $display("FAIL: head of %0d on port %0d vc %0d (open %0d)", id, o, v,
                       open_pkt[o][v]);
            end else begin
              pk[id].port_out = o;
              pk[id].vc_out = v;
              pk[id].detoured = f.data[HD_DETOUR_BIT];
              checks++;
              if (expect_ports != 0 ? !expect_ports[o] : !min_ports(pk[id].dst)[o]) begin
                failures++;
                $display("FAIL: packet %0d to %0d left by port %0d", id, pk[id].dst, o);
              end
            end
            open_pkt[o][v] = id;
          end else begin
            checks++;
            if (open_pkt[o][v] != id) begin
              failures++;
              $display("FAIL: flit of %0d on port %0d vc %0d inside packet %0d", id, o, v,
                       open_pkt[o][v]);
            end
          end
          if (pk.exists(id)) begin
            checks++;
            if (int'(f.data[7:0]) != pk[id].seen && !is_head(f.ftype)) begin
              failures++;
              $display("FAIL: packet %0d flit %0d out of order", id, f.data[7:0]);
            end
            pk[id].seen++;
          end
          if (is_tail(f.ftype)) open_pkt[o][v] = 0;
        end
        prev_ready[o] = out_ready[o];
      end
      if (ev_avoided) n_avoided++;
      if (ev_detour) n_detour++;
      if (ev_layer_up) n_layer_up++;
      if (ev_stall) n_stall++;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      // upstream senders
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_valid[p] = 0;
        if (txq[p].size() != 0 && credit[p][txq[p][0].vc] > 0 && $urandom % 4 != 0) begin
          in_flit[p] = txq[p].pop_front();
          in_valid[p] = 1;
          credit[p][in_flit[p].vc]--;
          checks++;
          if (credit[p][in_flit[p].vc] < 0) begin
            failures++;
            $display("FAIL: credit underflow");
          end
        end
      end
      // downstream receivers return credits, one per cycle and port
      for (int o = 0; o < NUM_PORTS; o++) begin
        credit_in_valid[o] = 0;
        if (!hold[o] && crq[o].size() != 0) begin
          credit_in_valid[o] = 1;
          credit_in_vc[o] = VC_W'(crq[o].pop_front());
        end
      end
      // TSV links accept a flit only now and then
      out_ready[P_UP]   = $urandom % 4 == 0;
      out_ready[P_DOWN] = $urandom % 4 == 0;
      if (!out_ready[P_UP]) n_ready_low++;
    end
  end

  task automatic drain(int max_cycles);
    int c;
    c = 0;
    while (c < max_cycles) begin
      int busy;
      busy = 0;
      for (int p = 0; p < NUM_PORTS; p++) busy += txq[p].size();
      foreach (pk[id]) if (pk[id].seen < pk[id].len) busy++;
      if (busy == 0) break;
      @(posedge clk);
      c++;
    end
  endtask

  task automatic check_all_delivered(string what);
    foreach (pk[id]) begin
      checks++;
      if (pk[id].seen != pk[id].len) begin
        failures++;
        $display("FAIL %s: packet %0d to %0d: %0d of %0d flits", what, id, pk[id].dst,
                 pk[id].seen, pk[id].len);
      end
    end
  endtask

  int lat;
  int first_pruned_id;
  initial begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_flit[p] = '0;
      hold[p] = 0;
      prev_ready[p] = 1;
      for (int v = 0; v < NUM_VC; v++) begin
        credit[p][v] = BUF_DEPTH;
        open_pkt[p][v] = 0;
      end
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // 1. zero-load latency: one-flit packet from the west to the east neighbour
    queue_packet(P_WEST, NODE + 1, 1, 0);
    @(negedge clk);
    while (txq[P_WEST].size() != 0) @(negedge clk);
    lat = 0;
    while (!out_valid[P_EAST] && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 2) begin
      failures++;
      $display("FAIL: head latency %0d cycles after the write, expected 2", lat);
    end
    drain(100);

    // 2. random traffic from every port, shortest paths
    for (int k = 0; k < 300; k++) begin
      int ip, d;
      ip = $urandom % NUM_PORTS;
      d = $urandom % NUM_NODES;
      // a packet never turns back: keep destinations away from the arrival side
      while (min_ports(d)[ip] || (ip == P_LOCAL && d == NODE) ||
             (ip != P_LOCAL && d == NODE && $urandom % 2 == 0))
        d = $urandom % NUM_NODES;
      queue_packet(ip, d, 1 + $urandom % 8, $urandom % 2);
    end
    // hold back credits on the east port for a while
    repeat (50) @(posedge clk);
    hold[P_EAST] = 1;
    repeat (200) @(posedge clk);
    hold[P_EAST] = 0;
    drain(20000);
    check_all_delivered("random");

    // 3. pruned up bundle: straight up from the west must detour east
    prune_up = 1;
    first_pruned_id = next_id;
    expect_ports = '0;
    expect_ports[P_EAST] = 1;   // detour ports: one hop away, not back west
    expect_ports[P_NORTH] = 1;
    expect_ports[P_SOUTH] = 1;
    for (int k = 0; k < 4; k++) queue_packet(P_WEST, NODE + 16, 4, 0);
    drain(2000);
    // up-and-east from the local port: the east port avoids the pruned bundle
    expect_ports = '0;
    expect_ports[P_EAST] = 1;
    for (int k = 0; k < 4; k++) queue_packet(P_LOCAL, NODE + 17, 4, 0);
    drain(2000);
    expect_ports = '0;
    check_all_delivered("pruned");
    foreach (pk[id]) begin
      if (id >= first_pruned_id && pk[id].dst == NODE + 16 && pk[id].inport == P_WEST) begin
        checks++;
        if (!pk[id].detoured) begin
          failures++;
          $display("FAIL: packet %0d detoured without the head flag", id);
        end
      end
    end
    prune_up = 0;

    // 4. contention: two long packets for the same port in layer 0
    queue_packet(P_WEST, NODE + 1, 20, 0);
    queue_packet(P_LOCAL, NODE + 1, 20, 0);
    drain(2000);
    check_all_delivered("contention");

    checks++;
    if (n_avoided == 0 || n_detour == 0 || n_layer_up == 0 || n_stall == 0 ||
        n_ready_low == 0) begin
      failures++;
      $display("FAIL coverage: avoided %0d detour %0d layer_up %0d stall %0d", n_avoided,
               n_detour, n_layer_up, n_stall);
    end
    $display("packets %0d, avoided %0d detours %0d layer moves %0d stall cycles %0d",
             next_id - 1, n_avoided, n_detour, n_layer_up, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
