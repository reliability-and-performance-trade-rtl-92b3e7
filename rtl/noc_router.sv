// noc_router: wormhole virtual-channel router of the 3D NoC.
//
// Seven ports (local, four planar, up and down through TSVs), each with an
// input buffer of 4 virtual channels of 2 flits and credit-based flow
// control towards the upstream router. Flits are 32 data bits plus type and
// channel sideband. A packet's head flit reserves an output virtual channel;
// body flits follow it and the tail flit releases it (wormhole switching).
//
// Pipeline, one flit per output port per cycle:
//  * Route and channel allocation: a round-robin arbiter picks one of the
//    input channels holding an unrouted head flit; its destination is looked
//    up in the node's routing table (built at elaboration from the topology)
//    and the alash_route_unit picks a port and a free output channel. An
//    output channel is free when no packet holds it and its downstream buffer
//    is empty. At most one head is routed per cycle.
//  * Switch allocation: each input port picks one of its routed channels that
//    has a flit, a credit for its output channel and a ready link (round
//    robin), then each output port picks one of the input ports asking for it
//    (round robin). The winner's flit is written to the output register.
//  * The output register drives the link; the freed buffer slot is returned
//    to the upstream router as a credit in the same cycle as the flit leaves.
// A head flit thus leaves two clock edges after it is at the front of its
// buffer if nothing competes, and body flits follow one per cycle.
//
// TSV support. The router owns the bundle on its up port and counts the
// cycles that bundle is active (`tsv_active`, from the link) in a
// tsv_util_counter; the count goes to the region's pruning unit. The pruning
// decisions come back as `prune_up` and `prune_down` and steer route
// selection away from those bundles. `out_ready` lets a serialized TSV link
// throttle its port; planar ports tie it high. It is sampled when the switch
// is allocated, one cycle before the flit leaves the output register, so it
// must promise that a flit offered in the next cycle will be taken.
//
// Event pulses (`ev_*`) report allocations that avoided a pruned bundle, took
// a detour, or moved a packet to a higher virtual layer, and cycles in which
// a routed flit waited for a credit or a link.
//
// The buffer sizes, channel count, wormhole switching, flit width and the
// per-router TSV counter follow the evaluated design. The pipeline, the
// arbitration and the event outputs are this design's own choices.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned NODE_ID = 0,
  parameter int unsigned XD      = XDIM,
  parameter int unsigned YD      = YDIM,
  parameter int unsigned ZD      = ZDIM,
  parameter int unsigned UTIL_W  = 32
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // flits in, credits back upstream
  input  logic       [NUM_PORTS-1:0]         in_valid,
  input  flit_t                              in_flit [NUM_PORTS],
  output logic       [NUM_PORTS-1:0]         credit_out_valid,
  output logic       [NUM_PORTS-1:0][VC_W-1:0] credit_out_vc,
  // flits out, credits from downstream
  output logic       [NUM_PORTS-1:0]         out_valid,
  output flit_t                              out_flit [NUM_PORTS],
  input  logic       [NUM_PORTS-1:0]         out_ready,
  input  logic       [NUM_PORTS-1:0]         credit_in_valid,
  input  logic       [NUM_PORTS-1:0][VC_W-1:0] credit_in_vc,
  // TSV utilization and pruning
  input  logic                               tsv_active,
  input  logic                               util_clear,
  output logic       [UTIL_W-1:0]            tsv_util,
  input  logic                               prune_up,
  input  logic                               prune_down,
  // events
  output logic                               ev_avoided,
  output logic                               ev_detour,
  output logic                               ev_layer_up,
  output logic                               ev_stall
);
  localparam int unsigned NIVC = NUM_PORTS * NUM_VC;
  localparam int unsigned CRW  = $clog2(BUF_DEPTH + 1);

  // ---------------------------------------------------------------- buffers
  flit_t                          front   [NUM_PORTS][NUM_VC];
  logic [NUM_PORTS-1:0][NUM_VC-1:0] front_v;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] deq;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] buf_full;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_ibuf
    vc_input_buffer #(.VCS(NUM_VC), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid   (in_valid[p]),
      .in_flit    (in_flit[p]),
      .front      (front[p]),
      .front_valid(front_v[p]),
      .deq        (deq[p]),
      .full       (buf_full[p])
    );
  end

  // ---------------------------------------------------------------- state
  logic [NUM_PORTS-1:0][NUM_VC-1:0]             alloc_q;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][PORT_W-1:0] oport_q;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][VC_W-1:0]   ovc_q;
  logic [NUM_PORTS-1:0][NUM_VC-1:0]             odetour_q;
  logic [NUM_PORTS-1:0][NUM_VC-1:0]             busy_q;    // output channel reserved
  logic [CRW-1:0]                               credit_q [NUM_PORTS][NUM_VC];

  port_mask_t prune_mask;
  always_comb begin
    prune_mask         = '0;
    prune_mask[P_UP]   = prune_up;
    prune_mask[P_DOWN] = prune_down;
  end

  // ------------------------------------------------ route + VC allocation
  // One request per input channel holding an unrouted head flit; a round-robin
  // arbiter picks one per cycle, and the single route unit routes it. If no
  // output channel is free the request simply loses its turn.
  localparam rt_tbl_t RT = build_route_tbl(int'(NODE_ID), XD, YD, ZD);

  logic [NIVC-1:0]             va_req;
  logic [NIVC-1:0]             va_gnt;
  logic [$clog2(NIVC)-1:0]     va_idx;
  logic                        va_any;
  logic [PORT_W-1:0]           va_port;
  logic [VC_W-1:0]             va_vc;
  flit_t                       va_head;
  rt_entry_t                   va_ent;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] vc_free;
  logic                        rt_ok, rt_detour, rt_avoided, rt_layer_up;
  logic [PORT_W-1:0]           rt_port;
  logic [VC_W-1:0]             rt_vc;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        va_req[p*NUM_VC + v] = front_v[p][v] && is_head(front[p][v].ftype) && !alloc_q[p][v];
        // atomic allocation: unreserved and drained downstream
        vc_free[p][v] = !busy_q[p][v] && (int'(credit_q[p][v]) == BUF_DEPTH);
      end
    end
    va_port = PORT_W'(int'(va_idx) / NUM_VC);
    va_vc   = VC_W'(int'(va_idx) % NUM_VC);
    va_head = front[va_port][va_vc];
    va_ent  = RT[va_head.data[HD_DST_LSB +: NODE_W]];
  end

  rr_arbiter #(.N(NIVC)) u_va_arb (
    .clk, .rst_n, .req(va_req), .advance(1'b1),
    .gnt(va_gnt), .gnt_idx(va_idx), .gnt_any(va_any)
  );

  alash_route_unit u_rt (
    .min_ports  (va_ent[NUM_PORTS-1:0]),
    .far_ports  (va_ent[2*NUM_PORTS-1:NUM_PORTS]),
    .cur_vc     (va_vc),
    .detour_used(va_head.data[HD_DETOUR_BIT]),
    .in_port    (va_port),
    .prune_mask (prune_mask),
    .vc_free    (vc_free),
    .ok         (rt_ok),
    .out_port   (rt_port),
    .out_vc     (rt_vc),
    .detour     (rt_detour),
    .avoided    (rt_avoided),
    .layer_up   (rt_layer_up)
  );

  // ------------------------------------------------ switch allocation
  logic [NUM_PORTS-1:0][NUM_VC-1:0] sa_vc_req;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] sa_vc_gnt;
  logic [VC_W-1:0]                  sa_vc_idx [NUM_PORTS];
  logic [NUM_PORTS-1:0]             sa_vc_any;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] sa_out_req;   // [out][in]
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] sa_out_gnt;   // [out][in]
  logic [PORT_W-1:0]                sa_out_idx [NUM_PORTS];
  logic [NUM_PORTS-1:0]             sa_out_any;
  logic [NUM_PORTS-1:0]             in_won;          // input port won an output

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        sa_vc_req[p][v] = alloc_q[p][v] && front_v[p][v] &&
                          credit_q[oport_q[p][v]][ovc_q[p][v]] != '0 &&
                          out_ready[oport_q[p][v]];
      end
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        sa_out_req[o][p] = sa_vc_any[p] && (int'(oport_q[p][sa_vc_idx[p]]) == o);
      end
    end
    in_won = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (sa_out_gnt[o][p]) in_won[p] = 1'b1;
      end
    end
    deq = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (in_won[p]) deq[p][sa_vc_idx[p]] = 1'b1;
    end
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_sa_in
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk, .rst_n, .req(sa_vc_req[p]), .advance(in_won[p]),
      .gnt(sa_vc_gnt[p]), .gnt_idx(sa_vc_idx[p]), .gnt_any(sa_vc_any[p])
    );
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_sa_out
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n, .req(sa_out_req[o]), .advance(1'b1),
      .gnt(sa_out_gnt[o]), .gnt_idx(sa_out_idx[o]), .gnt_any(sa_out_any[o])
    );
  end

  // ------------------------------------------------ state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_q          <= '0;
      oport_q          <= '0;
      ovc_q            <= '0;
      odetour_q        <= '0;
      busy_q           <= '0;
      out_valid        <= '0;
      credit_out_valid <= '0;
      credit_out_vc    <= '0;
      ev_avoided       <= 1'b0;
      ev_detour        <= 1'b0;
      ev_layer_up      <= 1'b0;
      ev_stall         <= 1'b0;
      for (int o = 0; o < NUM_PORTS; o++) begin
        out_flit[o] <= '0;
        for (int v = 0; v < NUM_VC; v++) credit_q[o][v] <= CRW'(BUF_DEPTH);
      end
    end else begin
      // credits returned by downstream routers
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          logic inc, dec;
          inc = credit_in_valid[o] && (int'(credit_in_vc[o]) == v);
          dec = sa_out_any[o] && (int'(ovc_q[sa_out_idx[o]][sa_vc_idx[sa_out_idx[o]]]) == v);
          if (inc && !dec) credit_q[o][v] <= credit_q[o][v] + 1'b1;
          else if (dec && !inc) credit_q[o][v] <= credit_q[o][v] - 1'b1;
        end
      end

      // switch traversal into the output registers
      for (int o = 0; o < NUM_PORTS; o++) begin
        out_valid[o] <= sa_out_any[o];
        if (sa_out_any[o]) begin
          int unsigned ip, iv;
          flit_t f;
          ip = int'(sa_out_idx[o]);
          iv = int'(sa_vc_idx[ip]);
          f  = front[ip][iv];
          f.vc = ovc_q[ip][iv];
          if (is_head(f.ftype) && odetour_q[ip][iv]) f.data[HD_DETOUR_BIT] = 1'b1;
          out_flit[o] <= f;
          if (is_tail(f.ftype)) begin
            alloc_q[ip][iv]          <= 1'b0;
            busy_q[o][ovc_q[ip][iv]] <= 1'b0;
          end
        end
      end

      // credits to upstream routers for the slots freed this cycle
      for (int p = 0; p < NUM_PORTS; p++) begin
        credit_out_valid[p] <= in_won[p];
        credit_out_vc[p]    <= sa_vc_idx[p];
      end

      // channel allocation (after the tail release, so a reservation made in
      // the same cycle wins)
      ev_avoided  <= 1'b0;
      ev_detour   <= 1'b0;
      ev_layer_up <= 1'b0;
      if (va_any && rt_ok) begin
        alloc_q[va_port][va_vc]   <= 1'b1;
        oport_q[va_port][va_vc]   <= rt_port;
        ovc_q[va_port][va_vc]     <= rt_vc;
        odetour_q[va_port][va_vc] <= rt_detour;
        busy_q[rt_port][rt_vc]    <= 1'b1;
        ev_avoided  <= rt_avoided;
        ev_detour   <= rt_detour;
        ev_layer_up <= rt_layer_up;
      end

      ev_stall <= (alloc_q & front_v & ~sa_vc_req) != '0;
    end
  end

  // ------------------------------------------------ TSV utilization counter
  tsv_util_counter #(.WIDTH(UTIL_W)) u_util (
    .clk, .rst_n, .clear(util_clear), .active(tsv_active),
    .count(tsv_util), .cycles()
  );

  // ------------------------------------------------ checks
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          assert (int'(credit_q[o][v]) <= BUF_DEPTH)
            else $error("noc_router %0d: credit overflow on port %0d vc %0d", NODE_ID, o, v);
        end
      end
    end
  end
endmodule
