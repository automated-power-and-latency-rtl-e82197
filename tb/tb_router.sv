// tb_router -- router 3 of the irregular system (outputs W and N, both behind
// 4-cycle links), driven cycle by cycle.
// Checks: the walk-through choice W (41) over N (53) for destination 29 and
// the 4-cycle input-to-output latency; the update of that entry to 34 by a
// returned estimate of 20, seen as a change of route once N is made cheaper;
// the estimate returned upstream for a forwarded packet; oldest-first service
// with the younger packet deflected (and ev_deflect); ejection of a packet for
// router 3 with a zero estimate; the injection rule; routing around a
// disabled port.
module tb_router;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t               in_pkt [N_PORTS], out_pkt [N_PORTS];
  pkt_t               inj_pkt;
  logic               inj_ready, ev_deflect;
  fb_t                fb_in [N_PORTS], fb_out [N_PORTS];
  logic [N_PORTS-1:0] port_en;
  int                 n_deflect = 0;

  router #(
    .ROUTER_ID(3), .N_DEST(30), .PORT_MASK(7'b1000010),
    .LINK_LEN('{1, 4, 1, 1, 1, 1, 4})
  ) dut (
    .clk, .rst_n, .in_pkt, .out_pkt, .inj_pkt, .inj_ready, .fb_in, .fb_out,
    .port_en, .ev_deflect
  );

  always @(posedge clk) if (ev_deflect) n_deflect++;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic idle();
    for (int p = 0; p < N_PORTS; p++) begin in_pkt[p] = '0; fb_in[p] = '0; end
    inj_pkt = '0;
  endtask

  task automatic feedback(int p, int d, int v);
    @(negedge clk);
    idle();
    fb_in[p] = '{valid: 1'b1, dest: id_t'(d), value: qval_t'(v)};
    @(negedge clk);
    idle();
  endtask

  function automatic pkt_t mk(int dest, int age, int pay);
    pkt_t q;
    q = '0;
    q.valid = 1; q.dest = id_t'(dest); q.src = 7'd9; q.age = AGE_W'(age); q.payload = pay;
    return q;
  endfunction

  // inject one packet; return the output port it left on after exactly 4 cycles
  task automatic inject_and_route(int dest, int pay, output int port);
    @(negedge clk);
    idle();
    inj_pkt = mk(dest, 0, pay);
    #1 chk("inj_ready when idle", inj_ready, 1);
    @(negedge clk);
    idle();
    repeat (2) @(negedge clk);
    for (int p = 0; p < N_PORTS; p++) chk("not out before 4 cycles", out_pkt[p].valid, 0);
    @(negedge clk);
    port = -1;
    for (int p = 0; p < N_PORTS; p++)
      if (out_pkt[p].valid && out_pkt[p].payload == pay) port = p;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int port;
    idle();
    port_en = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Q[29][W] = 4+4+33 = 41, Q[29][N] = 4+4+45 = 53
    feedback(P_W, 29, 33);
    feedback(P_N, 29, 45);
    inject_and_route(29, 100, port);
    chk("29 leaves on W", port, P_W);
    // returned estimate 20: Q[29][W] = 41 + (28 - 41) / 2 = 34
    feedback(P_W, 29, 20);
    chk("entry now 34", int'(dut.u_qt.g_col[1].g_on.val[29]), 34);
    // N: 53 -> 53 + (4+4+25 - 53)/2 = 43, still above 34
    feedback(P_N, 29, 25);
    inject_and_route(29, 101, port);
    chk("W still cheaper (34 < 43)", port, P_W);
    // N: 43 -> 43 + (8+9 - 43)/2 = 30, now below 34
    feedback(P_N, 29, 9);
    inject_and_route(29, 102, port);
    chk("route follows learning to N (30 < 34)", port, P_N);

    // forwarded packet from W, destination 15: Q[15][W] = 48, Q[15][N] = 18
    feedback(P_W, 15, 40);
    feedback(P_N, 15, 10);
    @(negedge clk);
    idle();
    in_pkt[P_W] = mk(15, 5, 200);
    #1 chk("inj_ready with one arrival", inj_ready, 1);
    @(negedge clk);
    idle();
    @(negedge clk);
    @(negedge clk);
    chk("estimate returned on W", fb_out[P_W].valid, 1);
    chk("estimate destination", fb_out[P_W].dest, 15);
    chk("estimate value", fb_out[P_W].value, 18);
    @(negedge clk);
    chk("forwarded on N", out_pkt[P_N].valid && out_pkt[P_N].payload == 200, 1);
    chk("age incremented", out_pkt[P_N].age, 6);

    // two arrivals for 15: older (from N, age 7) gets N, younger deflected to W
    @(negedge clk);
    idle();
    in_pkt[P_W] = mk(15, 2, 300);
    in_pkt[P_N] = mk(15, 7, 301);
    inj_pkt = mk(29, 0, 302);
    #1 chk("no injection when all outputs are needed", inj_ready, 0);
    @(negedge clk);
    idle();
    @(negedge clk);
    chk("deflection reported", ev_deflect, 1);
    @(negedge clk);
    @(negedge clk);
    chk("older on N", out_pkt[P_N].payload, 301);
    chk("younger deflected to W", out_pkt[P_W].payload, 300);
    chk("nothing injected", out_pkt[P_R].valid, 0);

    // ejection of a packet for router 3
    @(negedge clk);
    idle();
    in_pkt[P_N] = mk(3, 4, 400);
    @(negedge clk);
    idle();
    @(negedge clk);
    @(negedge clk);
    chk("ejection estimate valid", fb_out[P_N].valid, 1);
    chk("ejection estimate 0", fb_out[P_N].value, 0);
    @(negedge clk);
    chk("ejected on R", out_pkt[P_R].valid && out_pkt[P_R].payload == 400, 1);

    // N disabled: a packet for 15 from W must go back on W
    port_en = 7'b0111111;
    @(negedge clk);
    idle();
    in_pkt[P_W] = mk(15, 1, 500);
    #1 chk("no injection with the only usable output taken", inj_ready, 0);
    @(negedge clk);
    idle();
    repeat (3) @(negedge clk);
    chk("rerouted to W", out_pkt[P_W].valid && out_pkt[P_W].payload == 500, 1);
    chk("nothing on disabled N", out_pkt[P_N].valid, 0);
    chk("deflections counted", n_deflect > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
