// network_interface -- the interface between a router and its processing
// element (core or memory).
//
// Transmit: the element's packets (destination and payload, valid/ready) are
// queued in a FIFO, since the buffer-less network only accepts a packet when
// the router has a free output. The head of the queue is offered to the
// router on inj_pkt and taken on inj_ready; at that moment it is stamped with
// the current cycle and the source id. The element's packets wait until this
// node's set-up phase has sent all its set-up packets.
// Receive: every packet ejected by the router (ej_pkt, never stalled) is
// delivered on rx_* together with its latency, the cycles from injection into
// the network to ejection, and the number of routers it crossed. Set-up
// packets are absorbed and counted in setup_rx instead.
// All network interfaces count cycles from the same reset, so their time
// stamps agree; latency arithmetic wraps modulo 2^16.
//
// The FIFO depth, the stamping at injection and the port list are this
// design's choices.
module network_interface
  import noc_pkg::*;
#(
  parameter int unsigned ROUTER_ID  = 0,
  parameter int unsigned N_NODES    = 30,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // processing element, transmit
  input  logic                   tx_valid,
  output logic                   tx_ready,
  input  id_t                    tx_dest,
  input  logic [PAYLOAD_W-1:0]   tx_payload,
  // processing element, receive
  output logic                   rx_valid,
  output id_t                    rx_src,
  output logic [PAYLOAD_W-1:0]   rx_payload,
  output logic [TS_W-1:0]        rx_latency,
  output logic [AGE_W-1:0]       rx_hops,
  // router
  output pkt_t                   inj_pkt,
  input  logic                   inj_ready,
  input  pkt_t                   ej_pkt,
  // set-up phase
  output logic                   setup_done,
  output logic [15:0]            setup_rx
);
  typedef struct packed {
    id_t                  dest;
    logic [PAYLOAD_W-1:0] payload;
  } req_t;

  logic [TS_W-1:0]          now;
  req_t                     q_in, q_head;
  logic                     q_valid, q_ready;
  logic                     su_valid, su_ready;
  id_t                      su_dest;
  logic [$clog2(FIFO_DEPTH):0] q_count;

  assign q_in = '{dest: tx_dest, payload: tx_payload};

  sync_fifo #(.T(req_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(tx_valid), .wr_ready(tx_ready), .wr_data(q_in),
    .rd_valid(q_valid), .rd_ready(q_ready), .rd_data(q_head),
    .count(q_count)
  );

  setup_sequencer #(.ROUTER_ID(ROUTER_ID), .N_NODES(N_NODES)) u_setup (
    .clk, .rst_n, .req_valid(su_valid), .req_dest(su_dest), .req_ready(su_ready),
    .done(setup_done)
  );

  always_comb begin
    inj_pkt        = '0;
    inj_pkt.src    = id_t'(ROUTER_ID);
    inj_pkt.tstamp = now;
    if (su_valid) begin
      inj_pkt.valid = 1'b1;
      inj_pkt.setup = 1'b1;
      inj_pkt.dest  = su_dest;
    end else if (q_valid && setup_done) begin
      inj_pkt.valid   = 1'b1;
      inj_pkt.dest    = q_head.dest;
      inj_pkt.payload = q_head.payload;
    end
    su_ready = su_valid && inj_ready;
    q_ready  = setup_done && inj_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now        <= '0;
      rx_valid   <= 1'b0;
      rx_src     <= '0;
      rx_payload <= '0;
      rx_latency <= '0;
      rx_hops    <= '0;
      setup_rx   <= '0;
    end else begin
      now      <= now + 1'b1;
      rx_valid <= ej_pkt.valid && !ej_pkt.setup;
      if (ej_pkt.valid && ej_pkt.setup) setup_rx <= setup_rx + 1'b1;
      if (ej_pkt.valid) begin
        rx_src     <= ej_pkt.src;
        rx_payload <= ej_pkt.payload;
        rx_latency <= now - ej_pkt.tstamp;
        rx_hops    <= ej_pkt.age;
      end
    end
  end
endmodule
