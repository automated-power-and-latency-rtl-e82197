// output_select -- output selection of the L-Learning deflection router
// (third pipeline stage).
//
// Packets arrive sorted oldest first, each with its Q-table row (estimated
// cycles to its destination through every output). In that order each packet
// is given an output:
//   * a packet for this router takes the local port R if no older packet has;
//   * otherwise it takes, among the connected, enabled and still free network
//     outputs, the one with the lowest Q-value (ties: lowest port number).
//     An empty Q-entry counts as cost 0, so unexplored outputs are tried
//     first while the tables fill up.
// A packet that does not get its best output is deflected to the next best
// one; since the router never holds more packets than usable outputs, every
// packet leaves. `deflect` flags such packets and `fail` a packet left without
// an output, which the injection rule excludes (checked by an assertion).
// The choice is combinational; packets and chosen ports are registered as the
// stage-3 pipeline register. sel_cost is the Q-value of the chosen output
// (0 for ejection or an empty entry), the estimate returned upstream.
//
// Lowest-Q choice, oldest-first service and deflection follow the described
// router; the zero cost of empty entries and the tie rule are this design's
// choices.
module output_select
  import noc_pkg::*;
#(
  parameter int unsigned N = N_PORTS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pkt_t               s2_pkt   [N],
  input  logic [N-1:0]       s2_local,
  input  qval_t              q_val    [N][N_PORTS],
  input  logic               q_vld    [N][N_PORTS],
  input  logic [N_PORTS-1:0] avail,           // connected and enabled outputs
  output port_t              sel_port [N],
  output logic [N-1:0]       sel_ok,
  output qval_t              sel_cost [N],
  output logic [N-1:0]       deflect,
  output logic               fail,
  output pkt_t               s3_pkt   [N],
  output port_t              s3_port  [N]
);
  logic [N_PORTS-1:0] taken;
  logic               found, any;
  qval_t              best, cost, best_all;
  port_t              bp;

  always_comb begin
    taken    = '0;
    found    = 1'b0;
    any      = 1'b0;
    best     = '1;
    best_all = '1;
    cost     = '0;
    bp       = '0;
    fail  = 1'b0;
    for (int k = 0; k < int'(N); k++) begin
      sel_port[k] = port_t'(P_R);
      sel_ok[k]   = 1'b0;
      sel_cost[k] = '0;
      deflect[k]  = 1'b0;
      if (s2_pkt[k].valid) begin
        if (s2_local[k] && !taken[P_R]) begin
          sel_port[k] = port_t'(P_R);
          sel_ok[k]   = 1'b1;
          taken[P_R]  = 1'b1;
        end else begin
          found    = 1'b0;
          any      = 1'b0;
          best     = '1;
          best_all = '1;
          bp       = '0;
          for (int p = 0; p < int'(N_PORTS); p++) begin
            if (p != int'(P_R) && avail[p]) begin
              cost = q_vld[k][p] ? q_val[k][p] : '0;
              if (!any || cost < best_all) best_all = cost;
              any = 1'b1;
              if (!taken[p] && (!found || cost < best)) begin
                best  = cost;
                bp    = port_t'(p);
                found = 1'b1;
              end
            end
          end
          if (found) begin
            sel_port[k] = bp;
            sel_ok[k]   = 1'b1;
            sel_cost[k] = best;
            taken[bp]   = 1'b1;
            deflect[k]  = s2_local[k] || (best > best_all);
          end else begin
            fail = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N); k++) begin
        s3_pkt[k]  <= '0;
        s3_port[k] <= '0;
      end
    end else begin
      for (int k = 0; k < int'(N); k++) begin
        s3_pkt[k]       <= s2_pkt[k];
        s3_pkt[k].valid <= s2_pkt[k].valid && sel_ok[k];
        s3_port[k]      <= sel_port[k];
      end
    end
  end

  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) !fail)
    else $error("output_select: packet left without an output");
endmodule
