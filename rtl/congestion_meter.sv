// congestion_meter -- produces the router's congestion outputs: the estimate
// returned to each upstream router (registered with the stage-3 register).
//
// For every sorted packet that arrived over a network link, the router sends
// back over that same link {destination, N3}, where N3 is this router's
// Q-value for the destination through the output the packet was just given
// (0 when the packet is ejected here, i.e. it has arrived). The upstream
// router adds its link and this router's pipeline cycles (equation
// C_est = N1 + N2 + N3) and updates its own Q-entry. Packets injected on the
// local port produce no estimate.
//
// Returning the estimate over the reverse direction of the link the packet
// used, as a separate {valid, dest, value} word, is this design's choice.
module congestion_meter
  import noc_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pkt_t         s2_pkt   [N],
  input  port_t        s2_from  [N],
  input  logic [N-1:0] sel_ok,
  input  qval_t        sel_cost [N],
  output fb_t          fb_out   [N_PORTS]
);
  fb_t fb_nxt [N_PORTS];

  always_comb begin
    for (int p = 0; p < int'(N_PORTS); p++) fb_nxt[p] = '0;
    for (int k = 0; k < int'(N); k++) begin
      if (s2_pkt[k].valid && sel_ok[k] && s2_from[k] != port_t'(P_R)) begin
        fb_nxt[s2_from[k]].valid = 1'b1;
        fb_nxt[s2_from[k]].dest  = s2_pkt[k].dest;
        fb_nxt[s2_from[k]].value = sel_cost[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(N_PORTS); p++) fb_out[p] <= '0;
    end else begin
      fb_out <= fb_nxt;
    end
  end
endmodule
