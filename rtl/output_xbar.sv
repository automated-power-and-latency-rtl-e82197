// output_xbar -- destination setup, demultiplexing crossbar and output
// crossbar of the router (fourth pipeline stage).
//
// Each of the sorted packets carries the output port chosen for it; the
// crossbar steers every packet to that port and registers the seven router
// outputs (six links and the local ejection port R). Output selection never
// gives one port to two packets, so at most one packet drives each output.
// Ports that receive no packet output an empty (all-zero) packet.
//
// The single registered crossbar stage is this design's choice.
module output_xbar
  import noc_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  pkt_t  s3_pkt  [N],
  input  port_t s3_port [N],
  output pkt_t  out_pkt [N_PORTS]
);
  pkt_t nxt [N_PORTS];

  always_comb begin
    for (int p = 0; p < int'(N_PORTS); p++) nxt[p] = '0;
    for (int k = 0; k < int'(N); k++)
      if (s3_pkt[k].valid) nxt[s3_port[k]] = s3_pkt[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(N_PORTS); p++) out_pkt[p] <= '0;
    end else begin
      out_pkt <= nxt;
    end
  end
endmodule
