// link_pipe -- one router-to-router link: a horizontal wire or a TSV.
//
// Packets travel from router A to router B in LEN cycles (N1: one cycle for
// a TSV, one to four for a horizontal link depending on its length); the
// estimates B returns for them travel back to A in the same LEN cycles. Both
// directions are chains of LEN registers, cleared by reset. LEN must be at
// least 1.
//
// Modelling the length as register stages and giving the return path the same
// latency are this design's choices.
module link_pipe
  import noc_pkg::*;
#(
  parameter int unsigned LEN = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  pkt_t a_out,   // packet leaving router A
  output pkt_t b_in,    // packet arriving at router B
  input  fb_t  b_fb,    // estimate returned by B
  output fb_t  a_fb     // estimate arriving at A
);
  pkt_t fwd [LEN];
  fb_t  bwd [LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LEN); i++) begin
        fwd[i] <= '0;
        bwd[i] <= '0;
      end
    end else begin
      fwd[0] <= a_out;
      bwd[0] <= b_fb;
      for (int i = 1; i < int'(LEN); i++) begin
        fwd[i] <= fwd[i-1];
        bwd[i] <= bwd[i-1];
      end
    end
  end

  assign b_in = fwd[LEN-1];
  assign a_fb = bwd[LEN-1];
endmodule
