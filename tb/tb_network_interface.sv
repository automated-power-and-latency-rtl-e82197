// tb_network_interface -- node 1 of a 4-node network, FIFO depth 4.
// Checks that the set-up packets to nodes 0, 2, 3 leave first, then the
// element's packets in order with source id and injection time stamp; that
// the element is held off (tx_ready low) when the queue is full; and that
// ejected packets are delivered with latency = now - stamp and hop count,
// while ejected set-up packets are only counted.
module tb_network_interface;
  import noc_pkg::*;
  int checks = 0, failures = 0, stalls = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 tx_valid, tx_ready, rx_valid, inj_ready, setup_done;
  id_t                  tx_dest, rx_src;
  logic [PAYLOAD_W-1:0] tx_payload, rx_payload;
  logic [TS_W-1:0]      rx_latency;
  logic [AGE_W-1:0]     rx_hops;
  pkt_t                 inj_pkt, ej_pkt;
  logic [15:0]          setup_rx;
  int                   cyc = 0;

  network_interface #(.ROUTER_ID(1), .N_NODES(4), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .tx_valid, .tx_ready, .tx_dest, .tx_payload,
    .rx_valid, .rx_src, .rx_payload, .rx_latency, .rx_hops,
    .inj_pkt, .inj_ready, .ej_pkt, .setup_done, .setup_rx
  );

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_setup [$] = '{0, 2, 3};
    int exp_data  [$];
    int sent = 0;
    tx_valid = 0; tx_dest = '0; tx_payload = '0; inj_ready = 0; ej_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the queue while the router refuses packets
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      tx_valid = 1; tx_dest = id_t'(sent % 4); tx_payload = 32'hA000 + sent;
      #1;
      if (!tx_ready) stalls++;
      @(posedge clk);
      if (tx_ready) begin exp_data.push_back(sent); sent++; end
    end
    @(negedge clk);
    tx_valid = 0;
    chk("queue holds 4", exp_data.size(), 4);
    chk("element held off", stalls > 0, 1);
    // drain through the router
    for (int c = 0; c < 60; c++) begin
      @(negedge clk);
      inj_ready = 1'($urandom);
      #1;
      if (inj_pkt.valid && inj_ready) begin
        chk("source", inj_pkt.src, 1);
        chk("stamp", inj_pkt.tstamp, cyc);
        if (exp_setup.size() != 0) begin
          chk("set-up first", inj_pkt.setup, 1);
          chk("set-up dest", inj_pkt.dest, exp_setup.pop_front());
        end else begin
          chk("data after set-up", inj_pkt.setup, 0);
          chk("data dest", inj_pkt.dest, exp_data[0] % 4);
          chk("data payload", inj_pkt.payload, 32'hA000 + exp_data[0]);
          void'(exp_data.pop_front());
        end
      end
      @(posedge clk);
    end
    @(negedge clk);
    inj_ready = 0;
    chk("all injected", exp_setup.size() + exp_data.size(), 0);
    chk("setup done", setup_done, 1);
    // ejection
    for (int c = 0; c < 40; c++) begin
      automatic int lat = $urandom_range(5, 200);
      automatic bit su  = ($urandom_range(0, 3) == 0);
      @(negedge clk);
      ej_pkt = '0;
      ej_pkt.valid = 1; ej_pkt.setup = su; ej_pkt.dest = 1; ej_pkt.src = id_t'(c % 4);
      ej_pkt.tstamp = TS_W'(cyc - lat); ej_pkt.age = AGE_W'(c); ej_pkt.payload = 32'hB000 + c;
      @(posedge clk); #1;
      ej_pkt = '0;
      chk("rx valid", rx_valid, !su);
      if (!su) begin
        chk("rx latency", rx_latency, lat);
        chk("rx src", rx_src, c % 4);
        chk("rx hops", rx_hops, c);
        chk("rx payload", rx_payload, 32'hB000 + c);
      end
    end
    chk("set-up packets counted", setup_rx > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
