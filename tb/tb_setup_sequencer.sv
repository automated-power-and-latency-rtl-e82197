// tb_setup_sequencer -- node 3 of a 7-node network must offer set-up packets
// to 0, 1, 2, 4, 5, 6 in that order, hold each until accepted, then signal done.
module tb_setup_sequencer;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, done;
  id_t  req_dest;
  int   expect_q [$] = '{0, 1, 2, 4, 5, 6};

  setup_sequencer #(.ROUTER_ID(3), .N_NODES(7)) dut (
    .clk, .rst_n, .req_valid, .req_dest, .req_ready, .done
  );

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 200 && !done; c++) begin
      @(negedge clk);
      req_ready = 1'($urandom);
      #1;
      if (req_valid) begin
        chk("destination", req_dest, expect_q.size() ? expect_q[0] : -1);
        if (req_ready) void'(expect_q.pop_front());
      end
      @(posedge clk);
    end
    #1;
    chk("all sent", expect_q.size(), 0);
    chk("done", done, 1);
    chk("no request after done", req_valid, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
