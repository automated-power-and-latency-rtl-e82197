// tb_noc3d -- end-to-end test of the 30-router heterogeneous 3D network at its
// default parameters.
//   1. Set-up phase: every node sends a set-up packet to every other node;
//      all 870 must arrive.
//   2. Uniform random traffic (plus writes to the memory node 29) from all
//      nodes; every packet must arrive once, at its destination, intact.
//   3. A lone packet from node 3 to the memory node 29 must take at most a few
//      cycles more than the shortest path 3-2-20-23-29 (30 cycles: five
//      routers of 4 cycles and links of 4, 1, 4 and 1 cycles).
//   4. The TSVs 2-20 and 8-23 are taken out of service, leaving 11-27 as the
//      only way between bottom and mid layer; packets 3 -> 29 must still all
//      arrive, and the learned latency must approach the new shortest path
//      3-15-14-13-12-11-27-28-23-29 (55 cycles: ten routers, links of
//      4+3+1+1+1+1+2+1+1 cycles).
//   5. Random traffic again with the fault in place.
// Mechanisms counted (each must occur): set-up packets, deliveries across
// layers through TSVs, deliveries to the memory node, deflections, the
// network interface holding off its element (queue full), packets delivered
// after the fault.
module tb_noc3d;
  import noc_pkg::*;
  localparam int N = 30;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 tx_valid [N], tx_ready [N], rx_valid [N], setup_done [N], ev_deflect [N];
  id_t                  tx_dest [N], rx_src [N];
  logic [PAYLOAD_W-1:0] tx_payload [N], rx_payload [N];
  logic [TS_W-1:0]      rx_latency [N];
  logic [AGE_W-1:0]     rx_hops [N];
  logic [N_PORTS-1:0]   link_fault [N];
  logic [15:0]          su_rx [N];

  noc3d dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_peek
    assign su_rx[i] = dut.g_node[i].u_ni.setup_rx;
  end

  // scoreboard: payload {src, sequence} -> destination
  int   outstanding [int];
  int   seq = 0;
  int   n_deliv = 0, n_tsv = 0, n_mem = 0, n_defl = 0, n_hold = 0, n_after_fault = 0;
  int   last_lat [N];
  bit   faulted = 0;
  longint lat_sum = 0;

  function automatic int layer(int r);
    return (r < 16) ? 0 : (r < 29) ? 1 : 2;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (ev_deflect[i]) n_defl++;
        if (tx_valid[i] && !tx_ready[i]) n_hold++;
        if (rx_valid[i]) begin
          int key;
          key = int'(rx_payload[i]);
          checks++;
          if (!outstanding.exists(key)) begin
            failures++;
            $display("FAIL unexpected packet %h at node %0d", key, i);
          end else begin
            if (outstanding[key] != i || int'(rx_src[i]) != (key >>> 20)) begin
              failures++;
              $display("FAIL packet %h at node %0d, src %0d", key, i, rx_src[i]);
            end
            outstanding.delete(key);
            n_deliv++;
            lat_sum += rx_latency[i];
            last_lat[i] = int'(rx_latency[i]);
            if (layer(int'(rx_src[i])) != layer(i)) n_tsv++;
            if (i == 29) n_mem++;
            if (faulted) n_after_fault++;
          end
        end
      end
    end
  end

  // random traffic: each node offers a packet with probability rate/1000
  task automatic traffic(int cycles, int rate);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (tx_valid[i] && !tx_ready[i]) continue;   // hold until accepted
        tx_valid[i] = 0;
        if ($urandom_range(0, 999) < rate) begin
          int d;
          d = ($urandom_range(0, 4) == 0) ? 29 : $urandom_range(0, N - 1);
          if (d == i) d = (i + 1) % N;
          tx_valid[i]   = 1;
          tx_dest[i]    = id_t'(d);
          tx_payload[i] = PAYLOAD_W'((i << 20) | (seq & 20'hFFFFF));
          seq++;
        end
      end
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (tx_valid[i] && tx_ready[i]) outstanding[int'(tx_payload[i])] = int'(tx_dest[i]);
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) if (!(tx_valid[i] && !tx_ready[i])) tx_valid[i] = 0;
    // finish offering held packets
    while (1) begin
      bit any;
      any = 0;
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (tx_valid[i] && tx_ready[i]) outstanding[int'(tx_payload[i])] = int'(tx_dest[i]);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (tx_valid[i] && tx_ready[i]) tx_valid[i] = 0;
        any |= tx_valid[i];
      end
      if (!any) break;
    end
  endtask

  task automatic drain(int max_cycles);
    for (int c = 0; c < max_cycles && outstanding.num() != 0; c++) @(posedge clk);
  endtask

  // one packet 3 -> 29 in an idle network; returns its latency
  task automatic probe(output int lat);
    @(negedge clk);
    tx_valid[3] = 1; tx_dest[3] = 29; tx_payload[3] = PAYLOAD_W'((3 << 20) | (seq & 20'hFFFFF));
    seq++;
    @(posedge clk);
    outstanding[int'(tx_payload[3])] = 29;
    @(negedge clk);
    tx_valid[3] = 0;
    drain(2000);
    lat = last_lat[29];
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, su_total, lat_a, lat_b, lat_c;
    for (int i = 0; i < N; i++) begin
      tx_valid[i] = 0; tx_dest[i] = '0; tx_payload[i] = '0; link_fault[i] = '0; last_lat[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. set-up phase
    for (int c = 0; c < 20000; c++) begin
      @(posedge clk);
      su_total = 0;
      for (int i = 0; i < N; i++) su_total += int'(su_rx[i]);
      if (su_total == N * (N - 1)) break;
    end
    $display("set-up phase complete at cycle %0d", $time / 10);
    chk("set-up packets delivered", su_total, N * (N - 1));
    for (int i = 0; i < N; i++) chk("setup_done", setup_done[i], 1);

    // 2. uniform random traffic, with a burst heavy enough to fill queues
    traffic(3000, 60);
    traffic(300, 700);
    traffic(3000, 60);
    drain(20000);
    chk("all packets delivered", outstanding.num(), 0);
    $display("delivered %0d packets, mean latency %0d cycles", n_deliv, lat_sum / n_deliv);

    // 3. learned route 3 -> 29
    repeat (3) probe(lat_a);
    $display("idle latency 3 -> 29 after learning: %0d cycles (shortest path 30)", lat_a);
    checks++;
    if (lat_a < 30 || lat_a > 34) begin
      failures++;
      $display("FAIL learned latency %0d outside 30..34", lat_a);
    end

    // 4. TSVs 2-20 and 8-23 fail
    link_fault[2][P_U] = 1'b1;
    link_fault[8][P_U] = 1'b1;
    faulted = 1;
    probe(lat_b);
    for (int k = 0; k < 20; k++) probe(lat_c);
    $display("3 -> 29 with TSVs 2-20, 8-23 faulty: first %0d, after learning %0d (shortest 55)",
             lat_b, lat_c);
    checks++;
    if (lat_c < 55 || lat_c > 63) begin
      failures++;
      $display("FAIL relearned latency %0d outside 55..63", lat_c);
    end

    // 5. random traffic with the fault
    traffic(3000, 60);
    drain(20000);
    chk("all packets delivered with fault", outstanding.num(), 0);

    chk("mechanism: set-up packets", su_total > 0, 1);
    chk("mechanism: deliveries across layers (TSV)", n_tsv > 0, 1);
    chk("mechanism: deliveries to memory node", n_mem > 0, 1);
    chk("mechanism: deflections", n_defl > 0, 1);
    chk("mechanism: element held off", n_hold > 0, 1);
    chk("mechanism: deliveries after fault", n_after_fault > 0, 1);
    $display("deliveries %0d, across layers %0d, to memory %0d, deflections %0d, hold-offs %0d",
             n_deliv, n_tsv, n_mem, n_defl, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
