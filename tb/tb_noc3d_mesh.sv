// tb_noc3d_mesh -- the network built as a regular 4 x 4 x 4 mesh (64 routers,
// one-cycle links), run with the two synthetic workloads used to evaluate it:
//   * uniform random traffic: every node sends to random destinations;
//   * hotspot traffic: 40 % of every node's packets go to the hotspot
//     routers 59 (top layer) and 21 (second layer), the rest uniformly.
// Each runs after the set-up phase at a low and at a higher injection rate;
// every packet must arrive once, intact, at its destination. Mean latencies
// are printed. Mechanisms counted: set-up packets, deflections, deliveries to
// the hotspots, element hold-offs.
module tb_noc3d_mesh;
  import noc_pkg::*;
  localparam int N = 64;
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

  noc3d #(.TOPO(TOPO_MESH), .MESH_X(4), .MESH_Y(4), .MESH_Z(4)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_peek
    assign su_rx[i] = dut.g_node[i].u_ni.setup_rx;
  end

  int     outstanding [int];
  int     seq = 0;
  int     n_deliv = 0, n_defl = 0, n_hold = 0, n_hot = 0;
  longint lat_sum = 0;

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
          if (!outstanding.exists(key) || outstanding[key] != i ||
              int'(rx_src[i]) != (key >>> 20)) begin
            failures++;
            $display("FAIL packet %h at node %0d", key, i);
          end else begin
            outstanding.delete(key);
            n_deliv++;
            lat_sum += rx_latency[i];
            if (i == 59 || i == 21) n_hot++;
          end
        end
      end
    end
  end

  task automatic traffic(int cycles, int rate, bit hotspot);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (tx_valid[i] && !tx_ready[i]) continue;
        tx_valid[i] = 0;
        if ($urandom_range(0, 999) < rate) begin
          int d;
          if (hotspot && $urandom_range(0, 99) < 40) d = $urandom_range(0, 1) ? 59 : 21;
          else d = $urandom_range(0, N - 1);
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
    while (1) begin
      bit any;
      any = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (!(tx_valid[i] && !tx_ready[i])) tx_valid[i] = 0;
        any |= tx_valid[i];
      end
      if (!any) break;
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (tx_valid[i] && tx_ready[i]) outstanding[int'(tx_payload[i])] = int'(tx_dest[i]);
    end
  endtask

  task automatic run(string name, int rate, bit hotspot);
    int d0;
    longint l0;
    d0 = n_deliv; l0 = lat_sum;
    traffic(700, rate, hotspot);
    for (int c = 0; c < 20000 && outstanding.num() != 0; c++) @(posedge clk);
    chk({name, ": all delivered"}, outstanding.num(), 0);
    if (n_deliv > d0)
      $display("%s, injection rate %0d/1000: %0d packets, mean latency %0d cycles",
               name, rate, n_deliv - d0, (lat_sum - l0) / (n_deliv - d0));
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int su_total;
    for (int i = 0; i < N; i++) begin
      tx_valid[i] = 0; tx_dest[i] = '0; tx_payload[i] = '0; link_fault[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 50000; c++) begin
      @(posedge clk);
      su_total = 0;
      for (int i = 0; i < N; i++) su_total += int'(su_rx[i]);
      if (su_total == N * (N - 1)) break;
    end
    chk("set-up packets delivered", su_total, N * (N - 1));
    run("uniform random", 50, 0);
    run("uniform random", 300, 0);
    run("hotspot", 50, 1);
    run("hotspot", 200, 1);
    chk("mechanism: deflections", n_defl > 0, 1);
    chk("mechanism: hotspot deliveries", n_hot > 0, 1);
    chk("mechanism: element held off", n_hold > 0, 1);
    $display("deliveries %0d, deflections %0d, hold-offs %0d", n_deliv, n_defl, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
