// tb_output_select -- output selection checks.
// Directed: the walk-through decisions for destination 29: at router 3
// (W 41, N 53) the packet takes W; at router 2 (W 51, E 37, U 20, N 21) it
// takes U, and a second, younger packet for 29 is deflected to N; a packet
// for this router is ejected unless an older one took the local port.
// Random: sorted packets with random Q rows and port availability, compared
// with a reference that, per packet in order, ranks the free ports by cost.
module tb_output_select;
  import noc_pkg::*;
  int checks = 0, failures = 0, n_defl = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t               s2_pkt [N_PORTS];
  logic [N_PORTS-1:0] s2_local;
  qval_t              q_val [N_PORTS][N_PORTS];
  logic               q_vld [N_PORTS][N_PORTS];
  logic [N_PORTS-1:0] avail;
  port_t              sel_port [N_PORTS];
  logic [N_PORTS-1:0] sel_ok;
  qval_t              sel_cost [N_PORTS];
  logic [N_PORTS-1:0] deflect;
  logic               fail;
  pkt_t               s3_pkt [N_PORTS];
  port_t              s3_port [N_PORTS];

  output_select dut (
    .clk, .rst_n, .s2_pkt, .s2_local, .q_val, .q_vld, .avail,
    .sel_port, .sel_ok, .sel_cost, .deflect, .fail, .s3_pkt, .s3_port
  );

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic clear();
    for (int k = 0; k < N_PORTS; k++) begin
      s2_pkt[k] = '0;
      for (int p = 0; p < N_PORTS; p++) begin q_val[k][p] = '0; q_vld[k][p] = 0; end
    end
    s2_local = '0;
  endtask

  task automatic row(int k, int s, int w, int e, int d, int u, int n);
    int v [N_PORTS];
    v = '{s, w, e, d, 0, u, n};
    for (int p = 0; p < N_PORTS; p++) begin
      q_val[k][p] = qval_t'(v[p] < 0 ? 0 : v[p]);
      q_vld[k][p] = (v[p] >= 0) && p != P_R;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear();
    avail = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // router 3: outputs W and N
    avail = 7'b1000010;
    s2_pkt[0].valid = 1; s2_pkt[0].dest = 29;
    row(0, -1, 41, -1, -1, -1, 53);
    #1 chk("router 3 picks W", sel_port[0], P_W);
    chk("router 3 cost", sel_cost[0], 41);
    chk("router 3 no deflection", deflect[0], 0);
    // router 2: outputs W, E, U, N; two packets for 29
    avail = 7'b1100110;
    s2_pkt[1].valid = 1; s2_pkt[1].dest = 29;
    row(0, -1, 51, 37, -1, 20, 21);
    row(1, -1, 51, 37, -1, 20, 21);
    #1 chk("router 2 picks U", sel_port[0], P_U);
    chk("estimate returned", sel_cost[0], 20);
    chk("younger deflected to N", sel_port[1], P_N);
    chk("deflect flagged", deflect[1], 1);
    // ejection: older packet for here takes R, younger for here deflects
    clear();
    s2_pkt[0].valid = 1; s2_local[0] = 1;
    s2_pkt[1].valid = 1; s2_local[1] = 1;
    #1 chk("eject", sel_port[0], P_R);
    chk("eject cost 0", sel_cost[0], 0);
    chk("second local deflected", sel_port[1] != P_R && sel_ok[1], 1);
    chk("second local flagged", deflect[1], 1);
    @(posedge clk); #1;
    chk("stage register", s3_port[0], P_R);
    chk("stage register valid", s3_pkt[0].valid, 1);

    for (int c = 0; c < 3000; c++) begin
      bit    taken [N_PORTS];
      int    n_av, n_pk, expp [N_PORTS], expc [N_PORTS];
      @(negedge clk);
      clear();
      avail = 7'($urandom) & ~7'b0010000;
      n_av = $countones(avail);
      n_pk = $urandom_range(0, n_av);      // never more packets than outputs
      for (int k = 0; k < N_PORTS; k++) begin
        s2_pkt[k].valid = (k < n_pk);
        s2_pkt[k].dest  = id_t'($urandom_range(0, 29));
        s2_local[k]     = (k < n_pk) && ($urandom_range(0, 5) == 0);
        for (int p = 0; p < N_PORTS; p++) begin
          q_val[k][p] = qval_t'($urandom_range(0, 40));
          q_vld[k][p] = ($urandom_range(0, 4) != 0);
        end
      end
      for (int p = 0; p < N_PORTS; p++) taken[p] = 0;
      for (int k = 0; k < n_pk; k++) begin
        if (s2_local[k] && !taken[P_R]) begin
          expp[k] = P_R; expc[k] = 0; taken[P_R] = 1;
        end else begin
          // cheapest free output; scan costs upwards, ports upwards
          expp[k] = -1;
          for (int cst = 0; cst < 256 && expp[k] < 0; cst++)
            for (int p = 0; p < N_PORTS && expp[k] < 0; p++)
              if (avail[p] && !taken[p] && (q_vld[k][p] ? int'(q_val[k][p]) : 0) == cst) begin
                expp[k] = p; expc[k] = cst;
              end
          taken[expp[k]] = 1;
        end
      end
      #1;
      chk("no failure", fail, 0);
      for (int k = 0; k < n_pk; k++) begin
        chk("random port", sel_port[k], expp[k]);
        chk("random cost", sel_cost[k], expc[k]);
        if (deflect[k]) n_defl++;
      end
    end
    chk("deflections seen", n_defl > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
