// alash_route_unit: adaptive shortest-path route selection with virtual
// layers and TSV pruning (the "update" half of prune-and-update).
//
// For the head flit of a packet waiting in one input virtual channel it picks
// the output port and the output virtual channel, every cycle, combinationally.
//
// Routing table. The router looks up, for the packet's destination, two port
// masks (see noc_pkg::build_route_tbl): the ports that lie on a shortest path
// (neighbour one hop closer) and the planar ports that lead one hop away
// (neighbour one hop farther). They arrive on min_ports and far_ports.
//
// Update rule. Shortest-path ports whose TSV bundle is pruned are removed. If
// none is left, the packet takes a one-hop planar detour to a neighbour, which
// then reaches the destination through its own TSV bundle, two hops longer in
// all; a packet takes at most one such detour (flag in its head flit), so it
// cannot wander. A packet is never sent back out of the port it came in by. If no detour exists either, the pruned port is used: the
// packet must still be delivered.
//
// Adaptivity and virtual layers. Each virtual channel is a virtual layer.
// In the adaptive layers (all but the highest) the unit looks among the
// remaining candidate ports for a free output channel in the packet's current
// layer, then in a higher adaptive layer. The highest layer is an escape
// layer: it routes in dimension order (x, then y, then z: the lowest-numbered
// shortest-path port on the mesh), ignores pruning, and is deadlock-free on
// its own, so a packet blocked in the adaptive layers can always drain through
// it. A packet never goes back to a lower layer, so it never revisits a layer.
// Ports are tried in a fixed order (local, east, west, north, south, up, down).
// vc_free must only show channels that are unreserved and empty downstream
// (atomic allocation), which the escape argument relies on.
//
// Interface: `ok` is high when a port and a channel were found; `detour`
// reports that the detour was taken, `avoided` that a pruned bundle was
// skipped, `layer_up` that the packet moves to a higher layer.
// The shortest-path adaptive choice, the virtual layers and the no-revisit
// rule follow the evaluated routing; the escape layer, the detour and the port
// order are this design's own (the off-line layer assignment of the evaluated
// routing is not reproduced).
module alash_route_unit
  import noc_pkg::*;
(
  input  port_mask_t                        min_ports,
  input  port_mask_t                        far_ports,
  input  logic [VC_W-1:0]                   cur_vc,
  input  logic                              detour_used,
  input  logic [PORT_W-1:0]                 in_port,
  input  port_mask_t                        prune_mask,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]  vc_free,
  output logic                              ok,
  output logic [PORT_W-1:0]                 out_port,
  output logic [VC_W-1:0]                   out_vc,
  output logic                              detour,
  output logic                              avoided,
  output logic                              layer_up
);
  localparam int unsigned ESC = NUM_VC - 1;  // escape layer

  port_mask_t min_m, far_m, back, cand;
  logic [PORT_W-1:0] dor_port;
  logic              cand_detour, cand_avoided;

  always_comb begin
    // escape route: the lowest-numbered shortest-path port, i.e. x, then y,
    // then z on the mesh (dimension order)
    dor_port = '0;
    for (int p = NUM_PORTS - 1; p >= 0; p--) begin
      if (min_ports[p]) dor_port = PORT_W'(p);
    end

    back = '0;
    if (int'(in_port) != P_LOCAL && int'(in_port) < NUM_PORTS) back[in_port] = 1'b1;
    min_m        = min_ports & ~back;
    far_m        = far_ports & ~back & ~prune_mask;
    cand         = min_m & ~prune_mask;
    cand_detour  = 1'b0;
    cand_avoided = (min_m & prune_mask) != '0;
    if (cand == '0) begin
      if (!detour_used && far_m != '0) begin
        cand        = far_m;
        cand_detour = 1'b1;
      end else begin
        cand         = min_m;
        cand_avoided = 1'b0;
      end
    end

    ok       = 1'b0;
    out_port = '0;
    out_vc   = cur_vc;
    detour   = 1'b0;
    avoided  = 1'b0;
    if (int'(cur_vc) < ESC) begin
      // adaptive layers: the current one first, then the higher ones
      for (int unsigned v = 0; v < ESC; v++) begin
        for (int unsigned p = 0; p < NUM_PORTS; p++) begin
          if (!ok && v >= cur_vc && cand[p] && vc_free[p][v]) begin
            ok       = 1'b1;
            out_port = PORT_W'(p);
            out_vc   = VC_W'(v);
            detour   = cand_detour;
            avoided  = cand_avoided;
          end
        end
      end
    end
    // escape layer: dimension order, pruning ignored
    if (!ok && vc_free[dor_port][ESC]) begin
      ok       = 1'b1;
      out_port = dor_port;
      out_vc   = VC_W'(ESC);
    end
    layer_up = ok && (out_vc != cur_vc);
  end
endmodule
