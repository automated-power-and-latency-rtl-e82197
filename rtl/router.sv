// router -- buffer-less deflection router with Q-learning output choice
// (L-Learning), the node of the heterogeneous 3D network.
//
// Packets are single flits. Every packet that enters leaves four cycles later
// (N2 = 4) on some output; nothing is buffered or dropped. The pipeline:
//   1. pkt_input_adjust : input register, age increment, eject flag, admits a
//                         packet from the network interface if an output is free
//   2. sort_block       : oldest-first sorting and mixer crossbar
//   3. output_select    : each packet, oldest first, takes the free output with
//                         the lowest Q-value for its destination (deflected to
//                         the next best when taken); congestion_meter returns
//                         that Q-value upstream
//   4. output_xbar      : output crossbar and output register
// The Q-table (q_table) is read with the destinations of the stage-2 packets
// and updated from the estimates arriving on fb_in, which answer the packets
// this router sent out one round trip earlier.
//
// Interface: in_pkt/out_pkt are the link ports in order S, W, E, D, R, U, N;
// out_pkt[P_R] is the ejection port to the network interface and in_pkt[P_R]
// is ignored (injection uses inj_pkt/inj_ready, a valid-ready handshake).
// fb_in/fb_out carry the returned estimates, one per link, in the reverse
// direction. port_en clears a port to model a faulty link: the router stops
// using it and routes around it. ev_deflect pulses in a cycle in which a
// packet is deflected.
//
// The pipeline split over the blocks and the feedback channel format are this
// design's choices; buffer-less deflection, oldest-first priority, Q-table
// routing and the 4-cycle latency follow the described router.
module router
  import noc_pkg::*;
#(
  parameter int unsigned        ROUTER_ID   = 2,
  parameter int unsigned        N_DEST      = 30,
  parameter logic [N_PORTS-1:0] PORT_MASK   = 7'b1101110,
  parameter int unsigned        LINK_LEN [N_PORTS] = '{1, 3, 4, 1, 1, 1, 2},
  parameter int unsigned        ALPHA_NUM   = 1,
  parameter int unsigned        ALPHA_DEN   = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pkt_t               in_pkt  [N_PORTS],
  output pkt_t               out_pkt [N_PORTS],
  input  pkt_t               inj_pkt,
  output logic               inj_ready,
  input  fb_t                fb_in   [N_PORTS],
  output fb_t                fb_out  [N_PORTS],
  input  logic [N_PORTS-1:0] port_en,
  output logic               ev_deflect
);
  pkt_t               s1_pkt  [N_PORTS];
  logic [N_PORTS-1:0] s1_local;
  pkt_t               s2_pkt  [N_PORTS];
  port_t              s2_from [N_PORTS];
  logic [N_PORTS-1:0] s2_local;
  id_t                rd_dest [N_PORTS];
  qval_t              q_val   [N_PORTS][N_PORTS];
  logic               q_vld   [N_PORTS][N_PORTS];
  port_t              sel_port [N_PORTS];
  logic [N_PORTS-1:0] sel_ok;
  qval_t              sel_cost [N_PORTS];
  logic [N_PORTS-1:0] deflect;
  logic               fail;
  pkt_t               s3_pkt  [N_PORTS];
  port_t              s3_port [N_PORTS];
  logic [N_PORTS-1:0] avail;

  assign avail = PORT_MASK & port_en & ~(N_PORTS'(1) << P_R);

  pkt_input_adjust #(.ROUTER_ID(ROUTER_ID), .PORT_MASK(PORT_MASK)) u_in (
    .clk, .rst_n, .in_pkt, .inj_pkt, .inj_ready, .port_en, .s1_pkt, .s1_local
  );

  sort_block #(.N(N_PORTS)) u_sort (
    .clk, .rst_n, .in_pkt(s1_pkt), .in_local(s1_local),
    .s2_pkt, .s2_from, .s2_local
  );

  for (genvar k = 0; k < N_PORTS; k++) begin : g_rd
    assign rd_dest[k] = s2_pkt[k].dest;
  end

  q_table #(
    .N_DEST(N_DEST), .NRD(N_PORTS), .PORT_MASK(PORT_MASK),
    .LINK_LEN(LINK_LEN), .ALPHA_NUM(ALPHA_NUM), .ALPHA_DEN(ALPHA_DEN)
  ) u_qt (
    .clk, .rst_n, .rd_dest, .rd_val(q_val), .rd_vld(q_vld), .fb_in
  );

  output_select #(.N(N_PORTS)) u_sel (
    .clk, .rst_n, .s2_pkt, .s2_local, .q_val, .q_vld, .avail,
    .sel_port, .sel_ok, .sel_cost, .deflect, .fail, .s3_pkt, .s3_port
  );

  congestion_meter #(.N(N_PORTS)) u_cm (
    .clk, .rst_n, .s2_pkt, .s2_from, .sel_ok, .sel_cost, .fb_out
  );

  output_xbar #(.N(N_PORTS)) u_xbar (
    .clk, .rst_n, .s3_pkt, .s3_port, .out_pkt
  );

  assign ev_deflect = |deflect;
endmodule
