// tb_congestion_meter -- each packet that arrived over a link must produce,
// one cycle later and on that link's return channel, its destination and the
// cost of the output it was given; injected packets and empty slots return
// nothing.
module tb_congestion_meter;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t               s2_pkt [N_PORTS];
  port_t              s2_from [N_PORTS];
  logic [N_PORTS-1:0] sel_ok;
  qval_t              sel_cost [N_PORTS];
  fb_t                fb_out [N_PORTS];

  congestion_meter dut (.clk, .rst_n, .s2_pkt, .s2_from, .sel_ok, .sel_cost, .fb_out);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    fb_t exp_fb [N_PORTS];
    for (int k = 0; k < N_PORTS; k++) begin s2_pkt[k] = '0; s2_from[k] = '0; sel_cost[k] = '0; end
    sel_ok = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int perm [N_PORTS];
      @(negedge clk);
      for (int k = 0; k < N_PORTS; k++) perm[k] = k;
      perm.shuffle();
      for (int p = 0; p < N_PORTS; p++) exp_fb[p] = '0;
      for (int k = 0; k < N_PORTS; k++) begin
        s2_pkt[k] = pkt_t'({$urandom, $urandom, $urandom});
        s2_pkt[k].valid = 1'($urandom);
        s2_from[k] = port_t'(perm[k]);
        sel_ok[k] = ($urandom_range(0, 7) != 0);
        sel_cost[k] = qval_t'($urandom);
        if (s2_pkt[k].valid && sel_ok[k] && perm[k] != P_R)
          exp_fb[perm[k]] = '{valid: 1'b1, dest: s2_pkt[k].dest, value: sel_cost[k]};
      end
      @(posedge clk); #1;
      for (int p = 0; p < N_PORTS; p++) chk("return channel", fb_out[p] == exp_fb[p], 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
