// sort_block -- sorting block and mixer crossbar of the router (second
// pipeline stage).
//
// Orders the up to seven packets of one cycle oldest first (largest age), so
// that the output selection serves the oldest packet first; this is the
// oldest-first priority that keeps deflection routing free of livelock. Ties
// go to the lower input port number; empty slots sort last, by port number. The rank of
// every packet is computed in parallel by pairwise comparison; the mixer
// crossbar then places packet i in slot rank(i). The sorted packets, the
// port each came from and its eject flag are registered.
//
// The pairwise-rank sorter and the tie rule are this design's choices.
module sort_block
  import noc_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pkt_t        in_pkt   [N],
  input  logic [N-1:0] in_local,
  output pkt_t        s2_pkt   [N],
  output port_t       s2_from  [N],
  output logic [N-1:0] s2_local
);
  localparam int unsigned RW = $clog2(N);

  logic [RW-1:0] rank [N];
  pkt_t          srt_pkt  [N];
  port_t         srt_from [N];
  logic [N-1:0]  srt_local;

  function automatic logic older_than(pkt_t a, int unsigned ia, pkt_t b, int unsigned ib);
    if (a.valid != b.valid) return a.valid;
    if (!a.valid)           return ia < ib;
    if (a.age != b.age)     return a.age > b.age;
    return ia < ib;
  endfunction

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      rank[i] = '0;
      for (int j = 0; j < int'(N); j++)
        if (j != i && older_than(in_pkt[j], j, in_pkt[i], i)) rank[i] = rank[i] + 1'b1;
    end
    for (int k = 0; k < int'(N); k++) begin
      srt_pkt[k]   = '0;
      srt_from[k]  = '0;
      srt_local[k] = 1'b0;
      for (int i = 0; i < int'(N); i++) begin
        if (int'(rank[i]) == k) begin
          srt_pkt[k]   = in_pkt[i];
          srt_from[k]  = port_t'(i);
          srt_local[k] = in_local[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N); k++) begin
        s2_pkt[k]  <= '0;
        s2_from[k] <= '0;
      end
      s2_local <= '0;
    end else begin
      s2_pkt   <= srt_pkt;
      s2_from  <= srt_from;
      s2_local <= srt_local;
    end
  end
endmodule
