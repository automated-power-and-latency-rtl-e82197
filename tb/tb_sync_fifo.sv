// tb_sync_fifo -- random pushes and pops on a 16-deep FIFO against a queue
// model: order, full/empty flags and occupancy count.
module tb_sync_fifo;
  localparam int D = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [7:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  logic [7:0] model [$];
  int full_seen = 0;

  sync_fifo #(.T(logic [7:0]), .DEPTH(D)) dut (
    .clk, .rst_n, .wr_valid, .wr_ready, .wr_data, .rd_valid, .rd_ready, .rd_data, .count
  );

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      automatic int bias = (c / 500) % 2;   // alternate filling and draining phases
      @(negedge clk);
      wr_valid = ($urandom_range(0, 3) < (bias ? 3 : 1));
      rd_ready = ($urandom_range(0, 3) < (bias ? 1 : 3));
      wr_data  = 8'($urandom);
      #1;
      chk("count", int'(count), model.size());
      chk("rd_valid", rd_valid, model.size() != 0);
      chk("wr_ready", wr_ready, (model.size() < D) || rd_ready);
      if (model.size() == D) full_seen++;
      if (rd_valid) chk("head", rd_data, model[0]);
      @(posedge clk);
      if (rd_valid && rd_ready) void'(model.pop_front());
      if (wr_valid && wr_ready) model.push_back(wr_data);
    end
    chk("reached full", full_seen > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
