// tb_noc3d_alpha -- the learning-rate comparison: two copies of the default
// 30-router network, one learning with alpha = 0.1 (old estimates dominate)
// and one with alpha = 0.9 (the latest estimate dominates), receive the same
// uniform random traffic after their set-up phases. Every packet must arrive
// once and intact in both; mean latencies are printed for comparison with the
// default alpha = 0.5 run of the end-to-end test.
module tb_noc3d_alpha;
  import noc_pkg::*;
  localparam int N = 30;
  localparam int NV = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 tx_valid [NV][N];
  id_t                  tx_dest [NV][N];
  logic [PAYLOAD_W-1:0] tx_payload [NV][N];
  logic [N_PORTS-1:0]   link_fault [N];
  logic                 tx_ready [NV][N], rx_valid [NV][N], setup_done [NV][N], ev_deflect [NV][N];
  id_t                  rx_src [NV][N];
  logic [PAYLOAD_W-1:0] rx_payload [NV][N];
  logic [TS_W-1:0]      rx_latency [NV][N];
  logic [AGE_W-1:0]     rx_hops [NV][N];

  noc3d #(.ALPHA_NUM(1), .ALPHA_DEN(10)) dut01 (
    .clk, .rst_n, .tx_valid(tx_valid[0]), .tx_ready(tx_ready[0]), .tx_dest(tx_dest[0]),
    .tx_payload(tx_payload[0]),
    .rx_valid(rx_valid[0]), .rx_src(rx_src[0]), .rx_payload(rx_payload[0]),
    .rx_latency(rx_latency[0]), .rx_hops(rx_hops[0]), .setup_done(setup_done[0]),
    .ev_deflect(ev_deflect[0]), .link_fault
  );
  noc3d #(.ALPHA_NUM(9), .ALPHA_DEN(10)) dut09 (
    .clk, .rst_n, .tx_valid(tx_valid[1]), .tx_ready(tx_ready[1]), .tx_dest(tx_dest[1]),
    .tx_payload(tx_payload[1]),
    .rx_valid(rx_valid[1]), .rx_src(rx_src[1]), .rx_payload(rx_payload[1]),
    .rx_latency(rx_latency[1]), .rx_hops(rx_hops[1]), .setup_done(setup_done[1]),
    .ev_deflect(ev_deflect[1]), .link_fault
  );

  int     outstanding [NV][int];
  int     n_deliv [NV];
  longint lat_sum [NV];
  int     seq = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int v = 0; v < NV; v++)
        for (int i = 0; i < N; i++)
          if (rx_valid[v][i]) begin
            int key;
            key = int'(rx_payload[v][i]);
            checks++;
            if (!outstanding[v].exists(key) || outstanding[v][key] != i ||
                int'(rx_src[v][i]) != (key >>> 20)) begin
              failures++;
              $display("FAIL network %0d: packet %h at node %0d", v, key, i);
            end else begin
              outstanding[v].delete(key);
              n_deliv[v]++;
              lat_sum[v] += rx_latency[v][i];
            end
          end
    end
  end

  // the same packets are generated for both networks and queued per node;
  // each network takes them at its own pace
  int q_dest [NV][N][$];
  int q_pay  [NV][N][$];

  task automatic traffic(int cycles, int rate);
    for (int c = 0; c < cycles + 30000; c++) begin
      bit busy;
      @(negedge clk);
      busy = 0;
      for (int i = 0; i < N; i++) begin
        if (c < cycles && $urandom_range(0, 999) < rate) begin
          int d;
          d = $urandom_range(0, N - 1);
          if (d == i) d = (i + 1) % N;
          for (int v = 0; v < NV; v++) begin
            q_dest[v][i].push_back(d);
            q_pay[v][i].push_back((i << 20) | (seq & 20'hFFFFF));
          end
          seq++;
        end
        for (int v = 0; v < NV; v++) begin
          tx_valid[v][i] = (q_dest[v][i].size() != 0);
          if (tx_valid[v][i]) begin
            tx_dest[v][i]    = id_t'(q_dest[v][i][0]);
            tx_payload[v][i] = PAYLOAD_W'(q_pay[v][i][0]);
            busy = 1;
          end
        end
      end
      @(posedge clk);
      for (int v = 0; v < NV; v++)
        for (int i = 0; i < N; i++)
          if (tx_valid[v][i] && tx_ready[v][i]) begin
            outstanding[v][q_pay[v][i][0]] = q_dest[v][i][0];
            void'(q_dest[v][i].pop_front());
            void'(q_pay[v][i].pop_front());
          end
      if (c >= cycles && !busy) break;
    end
    @(negedge clk);
    for (int v = 0; v < NV; v++) for (int i = 0; i < N; i++) tx_valid[v][i] = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      link_fault[i] = '0;
      for (int v = 0; v < NV; v++) begin
        tx_valid[v][i] = 0; tx_dest[v][i] = '0; tx_payload[v][i] = '0;
      end
    end
    for (int v = 0; v < NV; v++) begin n_deliv[v] = 0; lat_sum[v] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);   // set-up phase (about 500 cycles in this network)
    for (int v = 0; v < NV; v++)
      for (int i = 0; i < N; i++) chk("setup_done", setup_done[v][i], 1);
    traffic(4000, 60);
    for (int c = 0; c < 20000 && (outstanding[0].num() + outstanding[1].num()) != 0; c++)
      @(posedge clk);
    chk("alpha 0.1: all delivered", outstanding[0].num(), 0);
    chk("alpha 0.9: all delivered", outstanding[1].num(), 0);
    chk("traffic ran", n_deliv[0] > 0 && n_deliv[1] > 0, 1);
    if (n_deliv[0] > 0 && n_deliv[1] > 0)
      $display("mean latency: alpha 0.1 %0d cycles, alpha 0.9 %0d cycles (%0d packets)",
               lat_sum[0] / n_deliv[0], lat_sum[1] / n_deliv[1], n_deliv[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
