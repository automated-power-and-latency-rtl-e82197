// q_table -- per-router Q-table of the L-Learning router.
//
// One row per destination router (N_DEST rows) and one column per output
// channel in the order S, W, E, D, R, U, N; an entry holds the estimated
// number of cycles to reach the destination through that output, plus a
// "filled" bit. Only columns of connected network ports (PORT_MASK) hold
// storage, so a partially connected router has a smaller table; the local
// column R never holds a value. All entries are empty after reset.
//
// Reads: NRD independent row reads, combinational (rd_dest -> rd_val/rd_vld).
// Updates: each column p has its own update port fed by the estimate returned
// over link p (fb_in[p]); the new value is computed by q_update from the
// stored entry and written at the clock edge. Columns never share an update
// port, so up to six entries change per cycle without conflict. Reading an
// entry in the cycle it is updated returns the old value.
//
// Entries are filled at run time by the estimates returned from neighbours;
// the width Q_W and the empty bit are this design's choices.
module q_table
  import noc_pkg::*;
#(
  parameter int unsigned        N_DEST      = 30,
  parameter int unsigned        NRD         = N_PORTS,
  parameter logic [N_PORTS-1:0] PORT_MASK   = 7'b1101111,
  parameter int unsigned        LINK_LEN [N_PORTS] = '{default: 1},
  parameter int unsigned        ALPHA_NUM   = 1,
  parameter int unsigned        ALPHA_DEN   = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  id_t   rd_dest [NRD],
  output qval_t rd_val  [NRD][N_PORTS],
  output logic  rd_vld  [NRD][N_PORTS],
  input  fb_t   fb_in   [N_PORTS]
);
  localparam int unsigned AW = (N_DEST > 1) ? $clog2(N_DEST) : 1;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_col
    if (PORT_MASK[p] && p != P_R) begin : g_on
      qval_t             val [N_DEST];
      logic [N_DEST-1:0] vld;
      qval_t             old_val, new_val;
      logic              old_vld, wr;

      assign wr      = fb_in[p].valid && (int'(fb_in[p].dest) < int'(N_DEST));
      assign old_val = val[fb_in[p].dest[AW-1:0]];
      assign old_vld = vld[fb_in[p].dest[AW-1:0]];

      q_update #(.LINK_CYCLES(LINK_LEN[p]), .ALPHA_NUM(ALPHA_NUM), .ALPHA_DEN(ALPHA_DEN)) u_upd (
        .old_val(old_val), .old_vld(old_vld), .n3(fb_in[p].value), .new_val(new_val)
      );

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vld <= '0;
        end else if (wr) begin
          vld[fb_in[p].dest[AW-1:0]] <= 1'b1;
        end
      end

      always_ff @(posedge clk) begin
        if (wr) val[fb_in[p].dest[AW-1:0]] <= new_val;
      end

      for (genvar k = 0; k < NRD; k++) begin : g_rd
        assign rd_val[k][p] = val[rd_dest[k][AW-1:0]];
        assign rd_vld[k][p] = vld[rd_dest[k][AW-1:0]];
      end
    end else begin : g_off
      for (genvar k = 0; k < NRD; k++) begin : g_rd
        assign rd_val[k][p] = '0;
        assign rd_vld[k][p] = 1'b0;
      end
    end
  end
endmodule
