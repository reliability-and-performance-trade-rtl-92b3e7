// noc_pkg: types, constants and topology helpers shared by the 3D NoC.
//
// The network is a stack of ZDIM planar layers of XDIM x YDIM routers. Every
// router has one local port and six network ports: four planar directions and
// an up and a down port, the latter two carried by a bundle of through-silicon
// vias (TSVs). Node ids are numbered x-fastest, then y, then layer z, so the
// 16 TSV bundles between layers z and z+1 belong to nodes z*16 .. z*16+15.
//
// Flits are 32 data bits (as in the evaluated system) plus a 2-bit flit type
// and a 2-bit virtual-channel number carried on the link; the sideband and its
// encoding are this design's own choice. A head flit holds the destination,
// the source and a detour flag in its data field (layout below, also this
// design's own choice).
//
// The topology helpers (nbr, bfs_from, build_route_tbl) let routers derive
// their routing tables at elaboration. The default planar wiring is a mesh: the long-range
// small-world links of the evaluated network are not specified, so a mesh is
// used in their place; the routing tables follow whatever nbr() returns.
package noc_pkg;

  localparam int unsigned FLIT_DATA_W = 32;  // bits per flit
  localparam int unsigned NUM_VC      = 4;   // virtual channels = virtual layers per port
  localparam int unsigned BUF_DEPTH   = 2;   // flits per virtual channel buffer
  localparam int unsigned NUM_PORTS   = 7;   // local + 4 planar + up + down
  localparam int unsigned PKT_FLITS   = 64;  // flits per packet

  localparam int unsigned XDIM = 4;
  localparam int unsigned YDIM = 4;
  localparam int unsigned ZDIM = 4;
  localparam int unsigned NUM_NODES = XDIM * YDIM * ZDIM;  // 64 cores
  localparam int unsigned NODE_W    = $clog2(NUM_NODES);
  localparam int unsigned VC_W      = $clog2(NUM_VC);
  localparam int unsigned PORT_W    = $clog2(NUM_PORTS);

  // Port numbering.
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_EAST  = 1;  // +x
  localparam int unsigned P_WEST  = 2;  // -x
  localparam int unsigned P_NORTH = 3;  // +y
  localparam int unsigned P_SOUTH = 4;  // -y
  localparam int unsigned P_UP    = 5;  // +z, TSV
  localparam int unsigned P_DOWN  = 6;  // -z, TSV

  typedef enum logic [1:0] {
    FT_BODY     = 2'b00,
    FT_HEAD     = 2'b01,
    FT_TAIL     = 2'b10,
    FT_HEADTAIL = 2'b11
  } flit_type_e;

  typedef struct packed {
    flit_type_e             ftype;
    logic [VC_W-1:0]        vc;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);  // 36 bits on the link

  // Head-flit data layout.
  localparam int unsigned HD_DST_LSB    = 0;
  localparam int unsigned HD_SRC_LSB    = 8;
  localparam int unsigned HD_DETOUR_BIT = 16;

  typedef logic [NUM_PORTS-1:0] port_mask_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FT_HEAD) || (t == FT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FT_TAIL) || (t == FT_HEADTAIL);
  endfunction

  function automatic int unsigned opposite_port(int unsigned p);
    case (p)
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_UP:    return P_DOWN;
      P_DOWN:  return P_UP;
      default: return P_LOCAL;
    endcase
  endfunction

  // Neighbour of node n through network port p, or -1 where there is none.
  function automatic int nbr(int n, int unsigned p, int unsigned xd, int unsigned yd,
                             int unsigned zd);
    int x, y, z;
    x = n % int'(xd);
    y = (n / int'(xd)) % int'(yd);
    z = n / int'(xd * yd);
    case (p)
      P_EAST:  return (x + 1 < int'(xd)) ? n + 1 : -1;
      P_WEST:  return (x > 0) ? n - 1 : -1;
      P_NORTH: return (y + 1 < int'(yd)) ? n + int'(xd) : -1;
      P_SOUTH: return (y > 0) ? n - int'(xd) : -1;
      P_UP:    return (z + 1 < int'(zd)) ? n + int'(xd * yd) : -1;
      P_DOWN:  return (z > 0) ? n - int'(xd * yd) : -1;
      default: return -1;
    endcase
  endfunction

  typedef int dist_arr_t [NUM_NODES];

  // Hop distances from node a to every node, by breadth-first search over
  // nbr(); -1 marks a node that cannot be reached.
  function automatic dist_arr_t bfs_from(int a, int unsigned xd, int unsigned yd,
                                         int unsigned zd);
    dist_arr_t dd;
    int fifo_q [NUM_NODES];
    int head, tail, cur, m, nn;
    nn = int'(xd * yd * zd);
    for (int i = 0; i < NUM_NODES; i++) dd[i] = -1;
    head = 0;
    tail = 0;
    if (a >= 0 && a < nn) begin
      dd[a] = 0;
      fifo_q[tail] = a;
      tail++;
    end
    while (head < tail) begin
      cur = fifo_q[head];
      head++;
      for (int unsigned p = 1; p < NUM_PORTS; p++) begin
        m = nbr(cur, p, xd, yd, zd);
        if (m >= 0 && m < nn && dd[m] < 0) begin
          dd[m] = dd[cur] + 1;
          fifo_q[tail] = m;
          tail++;
        end
      end
    end
    return dd;
  endfunction

  // Routing table of node `node`: for each destination d, entry[d] holds in
  // its low half the ports on a shortest path to d (local port when d is the
  // node itself) and in its high half the planar ports whose neighbour is one
  // hop farther from d (the detour candidates).
  typedef logic [2*NUM_PORTS-1:0] rt_entry_t;
  typedef rt_entry_t rt_tbl_t [NUM_NODES];

  function automatic rt_tbl_t build_route_tbl(int node, int unsigned xd, int unsigned yd,
                                              int unsigned zd);
    rt_tbl_t    t;
    port_mask_t mn, fr;
    dist_arr_t  ds;
    dist_arr_t  tmp;
    int         dn [NUM_PORTS * NUM_NODES];  // dn[p*NUM_NODES+d]: distance via port p
    int         m;
    ds = bfs_from(node, xd, yd, zd);
    for (int unsigned p = 0; p < NUM_PORTS; p++) begin
      m = (p == P_LOCAL) ? -1 : nbr(node, p, xd, yd, zd);
      tmp = bfs_from(m, xd, yd, zd);  // all -1 where there is no neighbour
      for (int d = 0; d < NUM_NODES; d++) dn[p * NUM_NODES + d] = tmp[d];
    end
    for (int d = 0; d < NUM_NODES; d++) begin
      mn = '0;
      fr = '0;
      if (d == node) mn[P_LOCAL] = 1'b1;
      for (int unsigned p = 1; p < NUM_PORTS; p++) begin
        if (ds[d] > 0 && dn[p * NUM_NODES + d] >= 0) begin
          if (dn[p * NUM_NODES + d] == ds[d] - 1) mn[p] = 1'b1;
          if (dn[p * NUM_NODES + d] == ds[d] + 1 && p != P_UP && p != P_DOWN) fr[p] = 1'b1;
        end
      end
      t[d] = {fr, mn};
    end
    return t;
  endfunction

endpackage
