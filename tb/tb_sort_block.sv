// tb_sort_block -- random sets of up to seven packets; after one cycle the
// slots must hold the valid packets by decreasing age (ties: lower input
// port first), then the empty ones, each with its input port and eject flag.
// The reference repeatedly picks the oldest remaining packet.
module tb_sort_block;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t               in_pkt [N_PORTS];
  logic [N_PORTS-1:0] in_local;
  pkt_t               s2_pkt [N_PORTS];
  port_t              s2_from [N_PORTS];
  logic [N_PORTS-1:0] s2_local;

  sort_block dut (.clk, .rst_n, .in_pkt, .in_local, .s2_pkt, .s2_from, .s2_local);

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
    bit used [N_PORTS];
    int order [N_PORTS];
    for (int p = 0; p < N_PORTS; p++) in_pkt[p] = '0;
    in_local = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int p = 0; p < N_PORTS; p++) begin
        in_pkt[p] = pkt_t'({$urandom, $urandom, $urandom});
        in_pkt[p].valid = ($urandom_range(0, 3) != 0);
        in_pkt[p].age = AGE_W'($urandom_range(0, 6));   // frequent ties
        in_local[p] = 1'($urandom);
        used[p] = 0;
      end
      // reference: valid packets oldest first, then empty slots, by port
      for (int k = 0; k < N_PORTS; k++) begin
        automatic int best = -1;
        for (int p = 0; p < N_PORTS; p++) begin
          if (used[p]) continue;
          if (best < 0) best = p;
          else if (in_pkt[p].valid && !in_pkt[best].valid) best = p;
          else if (in_pkt[p].valid == in_pkt[best].valid &&
                   in_pkt[p].valid && in_pkt[p].age > in_pkt[best].age) best = p;
        end
        used[best] = 1;
        order[k] = best;
      end
      @(posedge clk); #1;
      for (int k = 0; k < N_PORTS; k++) begin
        chk("slot packet", s2_pkt[k] == in_pkt[order[k]], 1);
        chk("slot port", s2_from[k], order[k]);
        chk("slot eject flag", s2_local[k], in_local[order[k]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
