// tb_q_table -- checks the Q-table of a router with outputs W and N, both
// behind 4-cycle links (router 3 of the irregular system).
// Loads the walk-through values for destination 29 (W 41, N 53) through
// returned estimates, checks the update to 34, then runs random estimates on
// both columns against a reference table; unconnected columns must read empty.
module tb_q_table;
  import noc_pkg::*;
  localparam int unsigned ND = 30;
  localparam logic [N_PORTS-1:0] MASK = 7'b1000010;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  id_t   rd_dest [N_PORTS];
  qval_t rd_val  [N_PORTS][N_PORTS];
  logic  rd_vld  [N_PORTS][N_PORTS];
  fb_t   fb_in   [N_PORTS];

  int ref_v [ND][N_PORTS];
  bit ref_f [ND][N_PORTS];

  q_table #(.N_DEST(ND), .PORT_MASK(MASK), .LINK_LEN('{1, 4, 1, 1, 1, 1, 4})) dut (
    .clk, .rst_n, .rd_dest, .rd_val, .rd_vld, .fb_in
  );

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic send(int p, int d, int v);
    fb_in[p] = '{valid: 1'b1, dest: id_t'(d), value: qval_t'(v)};
    @(posedge clk); #1;
    fb_in[p] = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N_PORTS; p++) begin fb_in[p] = '0; rd_dest[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int d = 0; d < int'(ND); d++) begin
      rd_dest[0] = id_t'(d); #1;
      for (int p = 0; p < N_PORTS; p++) chk("empty after reset", rd_vld[0][p], 0);
    end
    send(1, 29, 33);                // 4 + 4 + 33 = 41
    send(6, 29, 45);                // 53
    rd_dest[2] = 29; #1;
    chk("W 29", rd_val[2][1], 41); chk("N 29", rd_val[2][6], 53);
    chk("W 29 filled", rd_vld[2][1], 1);
    send(1, 29, 20);
    #1 chk("W 29 updated", rd_val[2][1], 34);
    // random traffic on both columns at once, reference model alongside
    for (int d = 0; d < int'(ND); d++)
      for (int p = 0; p < N_PORTS; p++) begin ref_f[d][p] = 0; ref_v[d][p] = 0; end
    ref_f[29][1] = 1; ref_v[29][1] = 34; ref_f[29][6] = 1; ref_v[29][6] = 53;
    for (int i = 0; i < 3000; i++) begin
      int pp [2];
      pp[0] = 1; pp[1] = 6;
      foreach (pp[j]) begin
        if ($urandom_range(0, 2) != 0) begin
          automatic int d = $urandom_range(0, ND-1);
          automatic int v = $urandom_range(0, 255);
          automatic int est = (v + 8 > 255) ? 255 : v + 8;
          fb_in[pp[j]] = '{valid: 1'b1, dest: id_t'(d), value: qval_t'(v)};
          if (!ref_f[d][pp[j]])        ref_v[d][pp[j]] = est;
          else if (est >= ref_v[d][pp[j]]) ref_v[d][pp[j]] = (ref_v[d][pp[j]] + est + 1) / 2;
          else                         ref_v[d][pp[j]] = (ref_v[d][pp[j]] + est) / 2;
          ref_f[d][pp[j]] = 1;
        end
      end
      @(posedge clk); #1;
      fb_in[1] = '0; fb_in[6] = '0;
      for (int k = 0; k < N_PORTS; k++) rd_dest[k] = id_t'($urandom_range(0, ND-1));
      #1;
      for (int k = 0; k < N_PORTS; k++)
        for (int p = 0; p < N_PORTS; p++) begin
          chk("filled", rd_vld[k][p], ref_f[rd_dest[k]][p]);
          if (ref_f[rd_dest[k]][p]) chk("value", rd_val[k][p], ref_v[rd_dest[k]][p]);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
