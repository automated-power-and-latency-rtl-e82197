// tb_pkt_input_adjust -- router 2 of the irregular system (outputs W, E, U, N).
// Checks, on random input patterns: one-cycle registration, age + 1 on link
// packets (saturating), age 0 on injected packets, the eject flag for
// destination 2, and that injection is admitted exactly when fewer packets
// arrive than there are usable outputs (also with a port disabled).
module tb_pkt_input_adjust;
  import noc_pkg::*;
  localparam logic [N_PORTS-1:0] MASK = 7'b1100110;
  int checks = 0, failures = 0, admitted = 0, refused = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t               in_pkt [N_PORTS];
  pkt_t               inj_pkt;
  logic               inj_ready;
  logic [N_PORTS-1:0] port_en;
  pkt_t               s1_pkt [N_PORTS];
  logic [N_PORTS-1:0] s1_local;

  pkt_input_adjust #(.ROUTER_ID(2), .PORT_MASK(MASK)) dut (
    .clk, .rst_n, .in_pkt, .inj_pkt, .inj_ready, .port_en, .s1_pkt, .s1_local
  );

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
    pkt_t exp_p [N_PORTS];
    int   n_in, n_out;
    logic exp_rdy;
    for (int p = 0; p < N_PORTS; p++) in_pkt[p] = '0;
    inj_pkt = '0; port_en = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      port_en = ($urandom_range(0, 3) == 0) ? 7'b1011111 : '1;   // sometimes U faulty
      n_in = 0; n_out = 0;
      for (int p = 0; p < N_PORTS; p++) begin
        in_pkt[p] = pkt_t'({$urandom, $urandom, $urandom});
        in_pkt[p].valid = MASK[p] && (p != P_R) && ($urandom_range(0, 2) != 0);
        in_pkt[p].dest  = id_t'($urandom_range(0, 4));
        if ($urandom_range(0, 9) == 0) in_pkt[p].age = '1;
        if (in_pkt[p].valid) n_in++;
        if (MASK[p] && port_en[p] && p != P_R) n_out++;
      end
      inj_pkt = pkt_t'({$urandom, $urandom, $urandom});
      inj_pkt.valid = 1'($urandom);
      inj_pkt.dest  = id_t'($urandom_range(0, 29));
      exp_rdy = (n_in < n_out);
      #1 chk("inj_ready", inj_ready, exp_rdy);
      if (inj_pkt.valid) begin
        if (exp_rdy) admitted++; else refused++;
      end
      for (int p = 0; p < N_PORTS; p++) begin
        exp_p[p] = (p == P_R) ? inj_pkt : in_pkt[p];
        if (p == P_R) begin
          exp_p[p].valid = inj_pkt.valid && exp_rdy;
          exp_p[p].age   = '0;
        end else if (exp_p[p].age != '1) exp_p[p].age = exp_p[p].age + 1;
      end
      @(posedge clk); #1;
      for (int p = 0; p < N_PORTS; p++) begin
        chk("packet", s1_pkt[p] == exp_p[p], 1);
        chk("eject flag", s1_local[p], exp_p[p].valid && exp_p[p].dest == 2);
      end
    end
    chk("injections admitted", admitted > 0, 1);
    chk("injections refused", refused > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
