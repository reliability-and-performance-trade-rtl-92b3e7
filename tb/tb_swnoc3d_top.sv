// tb_swnoc3d_top: end-to-end test of the 64-core, four-layer network at its
// default parameters.
//
// Every node has a network-interface model that injects 64-flit packets
// under credit flow control and an ejection sink that checks each packet
// arrives whole, in order and at the right node, and returns credits. Traffic
// is skewed the way the evaluated workloads are: most packets cross between
// the second and third layers, and four nodes of the second layer send
// repeatedly straight up, so their TSV bundles become hot spots.
//
// Phase 1 runs with pruning disabled (shortest paths only), phase 2 enables
// it: after an evaluation period the hot bundles must be pruned, and packets
// must then avoid or detour around them. The testbench checks every pruning
// decision against its own mean-plus-one-standard-deviation computation on the
// counts the pruning units sampled, and checks each bundle's utilization count
// against the active cycles seen on it and the flits that crossed it. Each mechanism (TSV
// serialization, back-pressure stall, layer change, evaluation, pruning,
// avoidance, detour) must happen at least once.
module tb_swnoc3d_top;
  import noc_pkg::*;
  localparam int unsigned NN = NUM_NODES;
  localparam int unsigned L  = XDIM * YDIM;
  localparam int unsigned NT = L * (ZDIM - 1);
  localparam int unsigned PKT_LEN = PKT_FLITS;

  logic clk = 0, rst_n = 0, prune_enable = 0, util_clear = 0;
  logic [NN-1:0]             inj_valid = '0;
  flit_t                     inj_flit [NN];
  logic [NN-1:0]             inj_credit_valid;
  logic [NN-1:0][VC_W-1:0]   inj_credit_vc;
  logic [NN-1:0]             ej_valid;
  flit_t                     ej_flit [NN];
  logic [NN-1:0]             ej_credit_valid = '0;
  logic [NN-1:0][VC_W-1:0]   ej_credit_vc = '0;
  logic [31:0]               tsv_util [NT];
  logic [NT-1:0]             tsv_pruned, tsv_active;
  logic                      prune_done;
  logic [NN-1:0]             ev_avoided, ev_detour, ev_layer_up, ev_stall;

  swnoc3d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_avoided = 0, n_detour = 0, n_layer_up = 0, n_stall = 0, n_evals = 0;
  int n_pruned_seen = 0, n_tsv_beats = 0, avoided_while_off = 0;

  initial begin
    #4000000;  // 400000 cycles
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ packets
  typedef struct { int src, dst, seen; } pkt_t;
  pkt_t pk [int];
  int next_id = 1;
  flit_t txq [NN][$];
  int credit [NN][NUM_VC];
  int open_pkt [NN][NUM_VC];
  int crq [NN][$];
  int crossings [NT];
  int active_cyc [NT];

  task automatic queue_packet(int src, int dst);
    flit_t f;
    int id;
    id = next_id++;
    pk[id] = '{src: src, dst: dst, seen: 0};
    for (int i = 0; i < PKT_LEN; i++) begin
      f.vc = '0;
      f.ftype = (i == 0) ? FT_HEAD : (i == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
      f.data = {12'(id), 12'(0), 8'(i)};
      if (i == 0) begin
        f.data[HD_DST_LSB +: 8] = 8'(dst);
        f.data[HD_SRC_LSB +: 8] = 8'(src);
      end
      txq[src].push_back(f);
    end
  endtask

  // reference pruning decision
  logic [31:0] snap [NT];
  function automatic logic [NT-1:0] ref_pruned();
    logic [NT-1:0] f;
    for (int r = 0; r < ZDIM - 1; r++) begin
      real mean, var_, sd;
      mean = 0.0;
      for (int i = 0; i < L; i++) mean += real'(snap[r*L+i]);
      mean /= L;
      var_ = 0.0;
      for (int i = 0; i < L; i++) var_ += (real'(snap[r*L+i]) - mean) ** 2;
      var_ /= L;
      sd = var_ ** 0.5;
      for (int i = 0; i < L; i++) f[r*L+i] = real'(snap[r*L+i]) > mean + sd;
    end
    return f;
  endfunction

  // ------------------------------------------------------------ monitors
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        if (inj_credit_valid[n]) credit[n][inj_credit_vc[n]]++;
        if (ej_valid[n]) begin
          flit_t f;
          int id, v;
          f = ej_flit[n];
          v = int'(f.vc);
          id = int'(f.data[31:20]);
          crq[n].push_back(v);
          checks++;
          if (!pk.exists(id)) begin
            failures++;
            $display("FAIL: unknown packet %0d at node %0d", id, n);
          end else begin
            if (is_head(f.ftype)) begin
              if (open_pkt[n][v] != 0 || pk[id].dst != n || pk[id].seen != 0) begin
                failures++;
                $display("FAIL: head of %0d (to %0d) at node %0d vc %0d", id, pk[id].dst, n, v);
              end
              open_pkt[n][v] = id;
            end else if (open_pkt[n][v] != id || int'(f.data[7:0]) != pk[id].seen) begin
              failures++;
              $display("FAIL: flit %0d of packet %0d out of place at node %0d", f.data[7:0],
                       id, n);
            end
            pk[id].seen++;
            if (is_tail(f.ftype)) open_pkt[n][v] = 0;
          end
        end
      end
      for (int t = 0; t < NT; t++) begin
        if (dut.up_out_v[t]) crossings[t]++;
        if (dut.dn_out_v[t]) crossings[t]++;
        if (tsv_active[t]) begin
          n_tsv_beats++;
          active_cyc[t]++;
        end
      end
      for (int n = 0; n < NN; n++) begin
        if (ev_avoided[n]) begin
          n_avoided++;
          if (!prune_enable) avoided_while_off++;
        end
        if (ev_detour[n]) n_detour++;
        if (ev_layer_up[n]) n_layer_up++;
        if (ev_stall[n]) n_stall++;
      end
      if (dut.eval_start) snap = tsv_util;
      if (prune_done) begin
        logic [NT-1:0] e;
        n_evals++;
        e = ref_pruned();
        checks++;
        if (tsv_pruned != e) begin
          failures++;
          $display("FAIL: pruned %h, expected %h", tsv_pruned, e);
        end
        if (tsv_pruned != 0) n_pruned_seen++;
        $display("cycle %0d: evaluation %0d, pruned bundles %b", cyc, n_evals, tsv_pruned);
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int n = 0; n < NN; n++) begin
        inj_valid[n] = 0;
        if (txq[n].size() != 0 && credit[n][txq[n][0].vc] > 0) begin
          inj_flit[n] = txq[n].pop_front();
          inj_valid[n] = 1;
          credit[n][inj_flit[n].vc]--;
        end
        ej_credit_valid[n] = 0;
        if (crq[n].size() != 0) begin
          ej_credit_valid[n] = 1;
          ej_credit_vc[n] = VC_W'(crq[n].pop_front());
        end
      end
    end
  end

  // ------------------------------------------------------------ traffic
  function automatic int pick_dst(int src);
    int d;
    case ($urandom % 4)
      0: d = 32 + $urandom % L;          // into the third layer
      1: d = 16 + $urandom % L;          // into the second layer
      default: d = $urandom % NN;
    endcase
    if (d == src) d = (src + 17) % NN;
    return d;
  endfunction

  task automatic wave(int npk);
    for (int k = 0; k < npk; k++) begin
      int s;
      s = $urandom % NN;
      queue_packet(s, pick_dst(s));
    end
    for (int h = 16; h < 20; h++) queue_packet(h, h + 16);  // hot spots
  endtask

  task automatic drain(int max_cycles);
    int c, busy;
    c = 0;
    do begin
      busy = 0;
      for (int n = 0; n < NN; n++) busy += txq[n].size();
      foreach (pk[id]) if (pk[id].seen < PKT_LEN) busy++;
      if (busy != 0) @(posedge clk);
      c++;
    end while (busy != 0 && c < max_cycles);
  endtask

  initial begin
    for (int n = 0; n < NN; n++) begin
      inj_flit[n] = '0;
      for (int v = 0; v < NUM_VC; v++) begin
        credit[n][v] = BUF_DEPTH;
        open_pkt[n][v] = 0;
      end
    end
    for (int t = 0; t < NT; t++) begin
      crossings[t] = 0;
      active_cyc[t] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // phase 1: shortest paths only
    for (int w = 0; w < 4; w++) begin
      wave(24);
      repeat (600) @(posedge clk);
    end
    drain(100000);
    // phase 2: prune-and-update
    @(negedge clk);
    prune_enable = 1;
    for (int w = 0; w < 14; w++) begin
      wave(16);
      repeat (700) @(posedge clk);
    end
    drain(200000);
    repeat (20) @(posedge clk);

    foreach (pk[id]) begin
      checks++;
      if (pk[id].seen != PKT_LEN) begin
        failures++;
        $display("FAIL: packet %0d %0d->%0d delivered %0d of %0d flits", id, pk[id].src,
                 pk[id].dst, pk[id].seen, PKT_LEN);
      end
    end
    for (int t = 0; t < NT; t++) begin
      checks++;
      // both directions share the count: between 4 and 8 active cycles per
      // pair of flits, exactly 4 per flit when they never overlap
      if (tsv_util[t] != 32'(active_cyc[t]) || active_cyc[t] > 4 * crossings[t] ||
          2 * active_cyc[t] < 4 * crossings[t]) begin
        failures++;
        $display("FAIL: bundle %0d counted %0d active cycles (%0d seen) for %0d flits", t,
                 tsv_util[t], active_cyc[t], crossings[t]);
      end
    end
    cover_check(n_tsv_beats != 0, "no TSV beat");
    cover_check(n_stall != 0, "no stall");
    cover_check(n_layer_up != 0, "no move to a higher layer");
    cover_check(n_evals != 0, "no pruning evaluation");
    cover_check(n_pruned_seen != 0, "no bundle pruned");
    cover_check(n_avoided != 0, "no pruned bundle avoided");
    cover_check(n_detour != 0, "no detour");
    cover_check(avoided_while_off == 0, "bundle avoided with pruning off");
    $display("%0d packets in %0d cycles; TSV beats %0d, stall cycles %0d, layer moves %0d",
             next_id - 1, cyc, n_tsv_beats, n_stall, n_layer_up);
    $display("evaluations %0d (with pruning %0d), avoided %0d, detours %0d",
             n_evals, n_pruned_seen, n_avoided, n_detour);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void cover_check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL coverage: %s", what);
    end
  endfunction
endmodule
