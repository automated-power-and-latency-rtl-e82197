// noc_pkg -- shared types, constants and topology tables of the buffer-less
// 3D network-on-chip with Q-learning ("L-Learning") deflection routing.
//
// A packet is a single flit carrying control bits (valid, setup flag,
// destination, source, age, injection time stamp) and a payload. Routers
// have seven ports in the order S, W, E, D, R, U, N, the column order of the
// router's Q-table; R is the local (resource) port to the network interface.
// A router takes N2 = 4 cycles from input to output; a TSV takes one cycle
// and a horizontal link one to four cycles depending on its length.
//
// Two topologies are provided. TOPO_IRREGULAR is the heterogeneous system of
// 30 routers: a bottom layer (routers 0-15), a mid layer (16-28) and a memory
// layer holding router 29, joined by TSVs 2-20, 8-23, 11-27 and 23-29, with
// the horizontal link lengths of its floorplan. TOPO_MESH is a regular
// X x Y x Z mesh with router id x + X*y + X*Y*z and one-cycle links.
//
// Field widths (7-bit ids, 8-bit age, 16-bit time stamp, 32-bit payload,
// 8-bit Q-values) and the compass orientation of the irregular links are this
// design's choices; the ids, the connectivity and the link lengths follow the
// described system, except the lengths of links 3-15 and 23-24, which are
// not given and are set here to 4 and 1.
package noc_pkg;

  localparam int unsigned N_PORTS   = 7;
  localparam int unsigned PORT_W    = 3;
  localparam int unsigned ID_W      = 7;
  localparam int unsigned AGE_W     = 8;
  localparam int unsigned TS_W      = 16;
  localparam int unsigned PAYLOAD_W = 32;
  localparam int unsigned Q_W       = 8;
  localparam int unsigned ROUTER_CYCLES = 4;   // N2
  localparam int unsigned TSV_CYCLES    = 1;   // N1_v

  // Port numbers, in Q-table column order.
  localparam int unsigned P_S = 0;
  localparam int unsigned P_W = 1;
  localparam int unsigned P_E = 2;
  localparam int unsigned P_D = 3;
  localparam int unsigned P_R = 4;
  localparam int unsigned P_U = 5;
  localparam int unsigned P_N = 6;

  typedef logic [ID_W-1:0]   id_t;
  typedef logic [Q_W-1:0]    qval_t;
  typedef logic [PORT_W-1:0] port_t;

  typedef struct packed {
    logic                 valid;
    logic                 setup;     // Q-table set-up packet, not delivered to the PE
    id_t                  dest;
    id_t                  src;
    logic [AGE_W-1:0]     age;       // routers traversed, saturating
    logic [TS_W-1:0]      tstamp;    // cycle of injection into the network
    logic [PAYLOAD_W-1:0] payload;
  } pkt_t;

  // Estimate returned to the upstream router: N3 for destination `dest`.
  typedef struct packed {
    logic  valid;
    id_t   dest;
    qval_t value;
  } fb_t;

  typedef enum logic [0:0] {TOPO_IRREGULAR = 1'b0, TOPO_MESH = 1'b1} topo_e;

  function automatic int unsigned opposite(int unsigned p);
    case (p)
      P_S: return P_N;
      P_N: return P_S;
      P_W: return P_E;
      P_E: return P_W;
      P_D: return P_U;
      P_U: return P_D;
      default: return P_R;
    endcase
  endfunction

  // Irregular system: one entry per bidirectional link, {a, port at a, b, length}.
  localparam int unsigned IRR_NODES = 30;
  localparam int unsigned IRR_EDGES = 34;
  localparam int IRR_EDGE [IRR_EDGES][4] = '{
    // bottom layer
    '{ 0, P_E,  1, 1}, '{ 1, P_E,  2, 3}, '{ 2, P_E,  3, 4}, '{ 1, P_N,  7, 4},
    '{ 6, P_E,  7, 1}, '{ 7, P_N, 10, 1}, '{10, P_E, 11, 1}, '{11, P_E, 12, 1},
    '{12, P_E, 13, 1}, '{13, P_E, 14, 1}, '{14, P_E, 15, 3}, '{ 3, P_N, 15, 4},
    '{ 8, P_N, 13, 1}, '{ 8, P_E,  9, 1}, '{ 4, P_N,  8, 2}, '{ 4, P_E,  5, 2},
    '{ 2, P_N,  4, 2},
    // mid layer
    '{16, P_E, 17, 1}, '{17, P_E, 18, 1}, '{18, P_E, 19, 1}, '{19, P_E, 20, 1},
    '{20, P_E, 21, 1}, '{16, P_N, 22, 2}, '{22, P_N, 25, 3}, '{25, P_E, 26, 1},
    '{26, P_E, 27, 1}, '{27, P_E, 28, 2}, '{23, P_N, 28, 1}, '{23, P_E, 24, 1},
    '{20, P_N, 23, 4},
    // TSVs
    '{ 2, P_U, 20, TSV_CYCLES}, '{ 8, P_U, 23, TSV_CYCLES}, '{11, P_U, 27, TSV_CYCLES},
    '{23, P_U, 29, TSV_CYCLES}
  };

  function automatic int unsigned topo_nodes(topo_e topo, int unsigned mx,
                                             int unsigned my, int unsigned mz);
    return (topo == TOPO_MESH) ? mx * my * mz : IRR_NODES;
  endfunction

  // Neighbour of router r through port p, or -1 when the port is not connected.
  function automatic int topo_neighbor(topo_e topo, int unsigned mx, int unsigned my,
                                       int unsigned mz, int unsigned r, int unsigned p);
    int x, y, z;
    if (topo == TOPO_MESH) begin
      x = int'(r % mx);
      y = int'((r / mx) % my);
      z = int'(r / (mx * my));
      case (p)
        P_E: x = x + 1;
        P_W: x = x - 1;
        P_N: y = y + 1;
        P_S: y = y - 1;
        P_U: z = z + 1;
        P_D: z = z - 1;
        default: return -1;
      endcase
      if (x < 0 || y < 0 || z < 0 || x >= int'(mx) || y >= int'(my) || z >= int'(mz))
        return -1;
      return x + int'(mx) * y + int'(mx * my) * z;
    end
    for (int e = 0; e < int'(IRR_EDGES); e++) begin
      if (IRR_EDGE[e][0] == int'(r) && IRR_EDGE[e][1] == int'(p)) return IRR_EDGE[e][2];
      if (IRR_EDGE[e][2] == int'(r) && int'(opposite(IRR_EDGE[e][1])) == int'(p))
        return IRR_EDGE[e][0];
    end
    return -1;
  endfunction

  // Link length in cycles (N1) of router r's port p; 0 when not connected.
  function automatic int unsigned topo_len(topo_e topo, int unsigned mx, int unsigned my,
                                           int unsigned mz, int unsigned r, int unsigned p);
    if (topo_neighbor(topo, mx, my, mz, r, p) < 0) return 0;
    if (topo == TOPO_MESH) return 1;
    for (int e = 0; e < int'(IRR_EDGES); e++) begin
      if ((IRR_EDGE[e][0] == int'(r) && IRR_EDGE[e][1] == int'(p)) ||
          (IRR_EDGE[e][2] == int'(r) && int'(opposite(IRR_EDGE[e][1])) == int'(p)))
        return int'(IRR_EDGE[e][3]) > 0 ? int'(IRR_EDGE[e][3]) : 1;
    end
    return 0;
  endfunction

  // Bit p set when router r's port p is connected.
  function automatic logic [N_PORTS-1:0] topo_mask(topo_e topo, int unsigned mx,
                                                   int unsigned my, int unsigned mz,
                                                   int unsigned r);
    logic [N_PORTS-1:0] m;
    m = '0;
    for (int p = 0; p < int'(N_PORTS); p++)
      m[p] = (topo_neighbor(topo, mx, my, mz, r, p) >= 0);
    return m;
  endfunction

endpackage
