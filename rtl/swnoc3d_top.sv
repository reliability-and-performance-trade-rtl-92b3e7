// swnoc3d_top: four-layer, 64-core 3D network-on-chip with TSV wear-out
// aware adaptive routing (prune-and-update).
//
// XD x YD routers per layer, ZD layers (4 x 4 x 4 = 64 by default). Routers
// of one layer are joined by planar links; each router is joined to the one
// directly above it by a vertical link, a bundle of TSVs carrying 4:1
// serialized flits in each direction (tsv_link). That gives XD*YD bundles
// between each pair of layers, 48 in all, numbered by the node id of their
// lower router.
//
// Every router counts the active cycles of the bundle above it. One
// tsv_prune_unit per pair of layers (a region of 16 bundles) re-evaluates
// every PRUNE_PERIOD cycles which bundles are used more than one standard
// deviation above the region's mean; those are pruned, and the routers at
// both ends of a pruned bundle route around it while another shortest path or
// a one-hop detour exists. With `prune_enable` low the network routes on
// shortest paths only, ignoring utilization (the routing the scheme starts
// from).
//
// Ports: each node has a local injection port (flits in, credits back) and
// an ejection port (flits out, credits in), 4 virtual channels of 2 flits
// each way. Per bundle the utilization count and the pruned flag are brought
// out, and per router the event pulses of noc_router.
//
// Planar wiring: the long-range small-world links of the evaluated network
// are not specified, so every layer is wired as a 2D mesh (see noc_pkg::nbr);
// routing tables follow the wiring, so a different planar graph only needs a
// different nbr(). PRUNE_PERIOD, the detour and the mesh wiring are this
// design's choices; the sizes, the per-router counters, the pruning rule and
// the 4:1 TSV serialization follow the evaluated design.
module swnoc3d_top
  import noc_pkg::*;
#(
  parameter int unsigned XD           = XDIM,
  parameter int unsigned YD           = YDIM,
  parameter int unsigned ZD           = ZDIM,
  parameter int unsigned UTIL_W       = 32,
  parameter int unsigned PRUNE_PERIOD = 4096,
  parameter int unsigned TSV_RATIO    = 4
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  prune_enable,
  input  logic                                  util_clear,
  // local ports (network interface side)
  input  logic [XD*YD*ZD-1:0]                   inj_valid,
  input  flit_t                                 inj_flit [XD*YD*ZD],
  output logic [XD*YD*ZD-1:0]                   inj_credit_valid,
  output logic [XD*YD*ZD-1:0][VC_W-1:0]         inj_credit_vc,
  output logic [XD*YD*ZD-1:0]                   ej_valid,
  output flit_t                                 ej_flit [XD*YD*ZD],
  input  logic [XD*YD*ZD-1:0]                   ej_credit_valid,
  input  logic [XD*YD*ZD-1:0][VC_W-1:0]         ej_credit_vc,
  // TSV bundles, indexed by lower node id
  output logic [UTIL_W-1:0]                     tsv_util [XD*YD*(ZD-1)],
  output logic [XD*YD*(ZD-1)-1:0]               tsv_pruned,
  output logic [XD*YD*(ZD-1)-1:0]               tsv_active,
  output logic                                  prune_done,
  // events per router
  output logic [XD*YD*ZD-1:0]                   ev_avoided,
  output logic [XD*YD*ZD-1:0]                   ev_detour,
  output logic [XD*YD*ZD-1:0]                   ev_layer_up,
  output logic [XD*YD*ZD-1:0]                   ev_stall
);
  localparam int unsigned L    = XD * YD;      // routers per layer
  localparam int unsigned NN   = L * ZD;       // routers
  localparam int unsigned NT   = L * (ZD - 1); // TSV bundles
  localparam int unsigned NREG = ZD - 1;       // pruning regions
  localparam int unsigned PW   = $clog2(PRUNE_PERIOD > 1 ? PRUNE_PERIOD : 2);

  // router-side signals
  logic [NUM_PORTS-1:0]            r_in_valid  [NN];
  flit_t                           r_in_flit   [NN][NUM_PORTS];
  logic [NUM_PORTS-1:0]            r_cr_out_v  [NN];
  logic [NUM_PORTS-1:0][VC_W-1:0]  r_cr_out_vc [NN];
  logic [NUM_PORTS-1:0]            r_out_valid [NN];
  flit_t                           r_out_flit  [NN][NUM_PORTS];
  logic [NUM_PORTS-1:0]            r_out_ready [NN];
  logic [NUM_PORTS-1:0]            r_cr_in_v   [NN];
  logic [NUM_PORTS-1:0][VC_W-1:0]  r_cr_in_vc  [NN];
  logic [UTIL_W-1:0]               r_util      [NN];
  logic [NN-1:0]                   r_prune_up, r_prune_down, r_tsv_active;

  // vertical links: up_* from node n to n+L, dn_* from node n+L to n
  logic [NT-1:0] up_out_v, dn_out_v, up_ready, dn_ready, up_act, dn_act;
  flit_t         up_out_f [NT];
  flit_t         dn_out_f [NT];

  // ------------------------------------------------------------- routers
  for (genvar n = 0; n < NN; n++) begin : g_node
    noc_router #(.NODE_ID(n), .XD(XD), .YD(YD), .ZD(ZD), .UTIL_W(UTIL_W)) u_router (
      .clk, .rst_n,
      .in_valid        (r_in_valid[n]),
      .in_flit         (r_in_flit[n]),
      .credit_out_valid(r_cr_out_v[n]),
      .credit_out_vc   (r_cr_out_vc[n]),
      .out_valid       (r_out_valid[n]),
      .out_flit        (r_out_flit[n]),
      .out_ready       (r_out_ready[n]),
      .credit_in_valid (r_cr_in_v[n]),
      .credit_in_vc    (r_cr_in_vc[n]),
      .tsv_active      (r_tsv_active[n]),
      .util_clear      (util_clear),
      .tsv_util        (r_util[n]),
      .prune_up        (r_prune_up[n]),
      .prune_down      (r_prune_down[n]),
      .ev_avoided      (ev_avoided[n]),
      .ev_detour       (ev_detour[n]),
      .ev_layer_up     (ev_layer_up[n]),
      .ev_stall        (ev_stall[n])
    );

    // local port
    assign r_in_valid[n][P_LOCAL]  = inj_valid[n];
    assign r_in_flit[n][P_LOCAL]   = inj_flit[n];
    assign inj_credit_valid[n]     = r_cr_out_v[n][P_LOCAL];
    assign inj_credit_vc[n]        = r_cr_out_vc[n][P_LOCAL];
    assign ej_valid[n]             = r_out_valid[n][P_LOCAL];
    assign ej_flit[n]              = r_out_flit[n][P_LOCAL];
    assign r_out_ready[n][P_LOCAL] = 1'b1;
    assign r_cr_in_v[n][P_LOCAL]   = ej_credit_valid[n];
    assign r_cr_in_vc[n][P_LOCAL]  = ej_credit_vc[n];

    // planar ports: direct wires to the neighbour
    for (genvar p = 1; p < NUM_PORTS; p++) begin : g_port
      localparam int M = nbr(n, p, XD, YD, ZD);
      localparam int unsigned Q = opposite_port(p);
      if (p == P_UP || p == P_DOWN) begin : g_vert
        // handled with the TSV links below
      end else if (M >= 0) begin : g_link
        assign r_in_valid[n][p]  = r_out_valid[M][Q];
        assign r_in_flit[n][p]   = r_out_flit[M][Q];
        assign r_cr_in_v[n][p]   = r_cr_out_v[M][Q];
        assign r_cr_in_vc[n][p]  = r_cr_out_vc[M][Q];
        assign r_out_ready[n][p] = 1'b1;
      end else begin : g_edge
        assign r_in_valid[n][p]  = 1'b0;
        assign r_in_flit[n][p]   = '0;
        assign r_cr_in_v[n][p]   = 1'b0;
        assign r_cr_in_vc[n][p]  = '0;
        assign r_out_ready[n][p] = 1'b1;
      end
    end

    // up port
    if (n < NT) begin : g_up
      assign r_in_valid[n][P_UP]  = dn_out_v[n];
      assign r_in_flit[n][P_UP]   = dn_out_f[n];
      assign r_cr_in_v[n][P_UP]   = r_cr_out_v[n+L][P_DOWN];
      assign r_cr_in_vc[n][P_UP]  = r_cr_out_vc[n+L][P_DOWN];
      assign r_out_ready[n][P_UP] = up_ready[n];
      assign r_tsv_active[n]      = up_act[n] | dn_act[n];
    end else begin : g_noup
      assign r_in_valid[n][P_UP]  = 1'b0;
      assign r_in_flit[n][P_UP]   = '0;
      assign r_cr_in_v[n][P_UP]   = 1'b0;
      assign r_cr_in_vc[n][P_UP]  = '0;
      assign r_out_ready[n][P_UP] = 1'b1;
      assign r_tsv_active[n]      = 1'b0;
    end

    // down port
    if (n >= L) begin : g_dn
      assign r_in_valid[n][P_DOWN]  = up_out_v[n-L];
      assign r_in_flit[n][P_DOWN]   = up_out_f[n-L];
      assign r_cr_in_v[n][P_DOWN]   = r_cr_out_v[n-L][P_UP];
      assign r_cr_in_vc[n][P_DOWN]  = r_cr_out_vc[n-L][P_UP];
      assign r_out_ready[n][P_DOWN] = dn_ready[n-L];
    end else begin : g_nodn
      assign r_in_valid[n][P_DOWN]  = 1'b0;
      assign r_in_flit[n][P_DOWN]   = '0;
      assign r_cr_in_v[n][P_DOWN]   = 1'b0;
      assign r_cr_in_vc[n][P_DOWN]  = '0;
      assign r_out_ready[n][P_DOWN] = 1'b1;
    end
  end

  // ------------------------------------------------------------- TSV links
  for (genvar t = 0; t < NT; t++) begin : g_tsv
    logic [FLIT_W-1:0] up_f, dn_f;
    tsv_link #(.FLIT_W(FLIT_W), .RATIO(TSV_RATIO)) u_up (
      .clk, .rst_n,
      .in_valid (r_out_valid[t][P_UP]),
      .in_flit  (r_out_flit[t][P_UP]),
      .in_ready (),
      .send_ok  (up_ready[t]),
      .out_valid(up_out_v[t]),
      .out_flit (up_f),
      .active   (up_act[t]),
      .tsv_bus  ()
    );
    tsv_link #(.FLIT_W(FLIT_W), .RATIO(TSV_RATIO)) u_dn (
      .clk, .rst_n,
      .in_valid (r_out_valid[t+L][P_DOWN]),
      .in_flit  (r_out_flit[t+L][P_DOWN]),
      .in_ready (),
      .send_ok  (dn_ready[t]),
      .out_valid(dn_out_v[t]),
      .out_flit (dn_f),
      .active   (dn_act[t]),
      .tsv_bus  ()
    );
    assign up_out_f[t]   = flit_t'(up_f);
    assign dn_out_f[t]   = flit_t'(dn_f);
    assign tsv_util[t]   = r_util[t];
    assign tsv_active[t] = up_act[t] | dn_act[t];
  end

  // ------------------------------------------------------------- pruning
  logic [PW-1:0]     period_q;
  logic              eval_start;
  logic [NREG-1:0]   reg_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) period_q <= '0;
    else if (int'(period_q) == PRUNE_PERIOD - 1) period_q <= '0;
    else period_q <= period_q + 1'b1;
  end
  assign eval_start = prune_enable && (int'(period_q) == PRUNE_PERIOD - 1);

  for (genvar r = 0; r < NREG; r++) begin : g_region
    logic [UTIL_W-1:0] u [L];
    logic [L-1:0]      flags;
    for (genvar i = 0; i < L; i++) begin : g_in
      assign u[i] = r_util[r*L + i];
    end
    tsv_prune_unit #(.N(L), .UW(UTIL_W)) u_prune (
      .clk, .rst_n, .start(eval_start), .util(u),
      .pruned(flags), .busy(), .done(reg_done[r])
    );
    assign tsv_pruned[r*L +: L] = flags;
  end
  assign prune_done = reg_done[0];

  for (genvar n = 0; n < NN; n++) begin : g_prune_wire
    if (n < NT) begin : g_u
      assign r_prune_up[n] = prune_enable && tsv_pruned[n];
    end else begin : g_nu
      assign r_prune_up[n] = 1'b0;
    end
    if (n >= L) begin : g_d
      assign r_prune_down[n] = prune_enable && tsv_pruned[n-L];
    end else begin : g_nd
      assign r_prune_down[n] = 1'b0;
    end
  end
endmodule
