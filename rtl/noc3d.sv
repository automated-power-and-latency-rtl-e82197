// noc3d -- heterogeneous 3D network-on-chip with buffer-less deflection
// routing and Q-learning (L-Learning) route selection.
//
// One router and one network interface per node, joined by links whose
// latency is their length in cycles (TSVs one cycle). The default topology is
// the irregular three-layer system of 30 routers: bottom layer 0-15, mid
// layer 16-28, memory layer with router 29, joined by TSVs 2-20, 8-23, 11-27
// (between bottom and mid layer) and 23-29 (the wide memory TSV). With
// TOPO = TOPO_MESH the same RTL builds a regular MESH_X x MESH_Y x MESH_Z mesh.
//
// After reset every network interface runs the set-up phase (one set-up
// packet to every other node) while its processing element's packets wait in
// its FIFO; setup_done[i] reports that node i has sent all of them. Routing
// needs no knowledge of the topology: each router learns, per destination and
// output, the cycles a packet needs, and keeps adjusting the estimates as
// traffic and connectivity change.
//
// Ports, one entry per node: tx_* (element to network, valid/ready), rx_*
// (network to element, with measured latency and router count), setup_done,
// ev_deflect (a packet was deflected at that router this cycle) and
// link_fault[i][p], which takes the link at node i's port p (order S, W, E, D,
// R, U, N) out of service at both of its ends. A link should only be faulted
// while no packet is on it.
//
// The node numbering, connectivity and link lengths follow the described
// system (lengths of links 3-15 and 23-24 assumed); the port list is this
// design's choice.
module noc3d
  import noc_pkg::*;
#(
  parameter topo_e       TOPO        = TOPO_IRREGULAR,
  parameter int unsigned MESH_X      = 4,
  parameter int unsigned MESH_Y      = 4,
  parameter int unsigned MESH_Z      = 4,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned ALPHA_NUM   = 1,
  parameter int unsigned ALPHA_DEN   = 2,
  parameter int unsigned N_NODES     = topo_nodes(TOPO, MESH_X, MESH_Y, MESH_Z)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tx_valid   [N_NODES],
  output logic                 tx_ready   [N_NODES],
  input  id_t                  tx_dest    [N_NODES],
  input  logic [PAYLOAD_W-1:0] tx_payload [N_NODES],
  output logic                 rx_valid   [N_NODES],
  output id_t                  rx_src     [N_NODES],
  output logic [PAYLOAD_W-1:0] rx_payload [N_NODES],
  output logic [TS_W-1:0]      rx_latency [N_NODES],
  output logic [AGE_W-1:0]     rx_hops    [N_NODES],
  output logic                 setup_done [N_NODES],
  output logic                 ev_deflect [N_NODES],
  input  logic [N_PORTS-1:0]   link_fault [N_NODES]
);
  pkt_t r_in   [N_NODES][N_PORTS];
  pkt_t r_out  [N_NODES][N_PORTS];
  fb_t  f_in   [N_NODES][N_PORTS];
  fb_t  f_out  [N_NODES][N_PORTS];
  pkt_t inj    [N_NODES];
  logic inj_rdy[N_NODES];

  for (genvar r = 0; r < N_NODES; r++) begin : g_node
    localparam logic [N_PORTS-1:0] MASK = topo_mask(TOPO, MESH_X, MESH_Y, MESH_Z, r);
    localparam int unsigned LEN [N_PORTS] = '{
      topo_len(TOPO, MESH_X, MESH_Y, MESH_Z, r, 0), topo_len(TOPO, MESH_X, MESH_Y, MESH_Z, r, 1),
      topo_len(TOPO, MESH_X, MESH_Y, MESH_Z, r, 2), topo_len(TOPO, MESH_X, MESH_Y, MESH_Z, r, 3),
      topo_len(TOPO, MESH_X, MESH_Y, MESH_Z, r, 4), topo_len(TOPO, MESH_X, MESH_Y, MESH_Z, r, 5),
      topo_len(TOPO, MESH_X, MESH_Y, MESH_Z, r, 6)};

    logic [N_PORTS-1:0] port_en;

    for (genvar p = 0; p < N_PORTS; p++) begin : g_port
      localparam int NB = topo_neighbor(TOPO, MESH_X, MESH_Y, MESH_Z, r, p);
      if (NB >= 0) begin : g_link
        // link from r (port p) to NB (port opposite(p)); returns NB's estimates
        link_pipe #(.LEN(LEN[p])) u_link (
          .clk, .rst_n,
          .a_out(r_out[r][p]), .b_in(r_in[NB][opposite(p)]),
          .b_fb(f_out[NB][opposite(p)]), .a_fb(f_in[r][p])
        );
        assign port_en[p] = !(link_fault[r][p] || link_fault[NB][opposite(p)]);
      end else begin : g_open
        assign r_in[r][p] = '0;
        assign f_in[r][p] = '0;
        assign port_en[p] = 1'b0;
      end
    end

    router #(
      .ROUTER_ID(r), .N_DEST(N_NODES), .PORT_MASK(MASK), .LINK_LEN(LEN),
      .ALPHA_NUM(ALPHA_NUM), .ALPHA_DEN(ALPHA_DEN)
    ) u_router (
      .clk, .rst_n,
      .in_pkt(r_in[r]), .out_pkt(r_out[r]),
      .inj_pkt(inj[r]), .inj_ready(inj_rdy[r]),
      .fb_in(f_in[r]), .fb_out(f_out[r]),
      .port_en(port_en), .ev_deflect(ev_deflect[r])
    );

    network_interface #(
      .ROUTER_ID(r), .N_NODES(N_NODES), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_ni (
      .clk, .rst_n,
      .tx_valid(tx_valid[r]), .tx_ready(tx_ready[r]),
      .tx_dest(tx_dest[r]), .tx_payload(tx_payload[r]),
      .rx_valid(rx_valid[r]), .rx_src(rx_src[r]), .rx_payload(rx_payload[r]),
      .rx_latency(rx_latency[r]), .rx_hops(rx_hops[r]),
      .inj_pkt(inj[r]), .inj_ready(inj_rdy[r]), .ej_pkt(r_out[r][P_R]),
      .setup_done(setup_done[r]), .setup_rx()
    );
  end
endmodule
