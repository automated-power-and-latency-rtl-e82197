// setup_sequencer -- the Q-table set-up phase of one network interface.
//
// Q-tables start empty. After reset every router sends one set-up packet to
// each other router in turn (destination 0, 1, ... N_NODES-1, skipping
// itself); as these packets travel, the estimates they cause fill the
// Q-tables along their paths. With all routers doing this at once the phase
// covers N x N router pairs. req_valid/req_dest offer the next set-up packet;
// it counts as sent on a cycle with req_valid and req_ready. `done` rises
// after the last one and stays high until the next reset.
//
// The order of destinations and the one-packet-per-pair rule are this
// design's reading of the set-up phase.
module setup_sequencer
  import noc_pkg::*;
#(
  parameter int unsigned ROUTER_ID = 0,
  parameter int unsigned N_NODES   = 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic req_valid,
  output id_t  req_dest,
  input  logic req_ready,
  output logic done
);
  localparam logic [ID_W:0] FIRST = (ROUTER_ID == 0) ? 1 : 0;
  localparam logic [ID_W:0] SELF  = (ID_W+1)'(ROUTER_ID);

  logic [ID_W:0] cur;   // next destination, never this node; >= N_NODES when finished
  logic [ID_W:0] nxt;

  assign done      = (int'(cur) >= int'(N_NODES));
  assign req_valid = !done;
  assign req_dest  = cur[ID_W-1:0];
  assign nxt       = (cur + 1'b1 == SELF) ? cur + (ID_W+1)'(2) : cur + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= FIRST;
    end else if (req_valid && req_ready) begin
      cur <= nxt;
    end
  end
endmodule
