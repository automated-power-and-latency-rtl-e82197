// tb_output_xbar -- random packets with distinct chosen ports must appear,
// one cycle later, on exactly those outputs; other outputs stay empty.
module tb_output_xbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t  s3_pkt [N_PORTS];
  port_t s3_port [N_PORTS];
  pkt_t  out_pkt [N_PORTS];

  output_xbar dut (.clk, .rst_n, .s3_pkt, .s3_port, .out_pkt);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t exp_o [N_PORTS];
    for (int k = 0; k < N_PORTS; k++) begin s3_pkt[k] = '0; s3_port[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      int perm [N_PORTS];
      @(negedge clk);
      for (int k = 0; k < N_PORTS; k++) perm[k] = k;
      perm.shuffle();
      for (int p = 0; p < N_PORTS; p++) exp_o[p] = '0;
      for (int k = 0; k < N_PORTS; k++) begin
        s3_pkt[k] = pkt_t'({$urandom, $urandom, $urandom});
        s3_pkt[k].valid = 1'($urandom);
        s3_port[k] = port_t'(perm[k]);
        if (s3_pkt[k].valid) exp_o[perm[k]] = s3_pkt[k];
      end
      @(posedge clk); #1;
      for (int p = 0; p < N_PORTS; p++) begin
        checks++;
        if (out_pkt[p] != exp_o[p]) begin failures++; $display("FAIL output %0d", p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
