// tb_q_update -- checks the Q-value update arithmetic.
// Uses the worked example of the routing walk-through: an entry of 41 cycles
// behind a 4-cycle link, with a returned estimate of 20, becomes
// 41 + 0.5 * ((4 + 4 + 20) - 41) = 34; an entry of 20 behind a TSV (1 cycle)
// with a returned 14 becomes 19. Empty entries take the estimate, results
// saturate at 255, and random operands are compared with
// old + alpha * (est - old), the step rounded away from zero, for the learning
// rates 0.5, 0.1 and 0.9 (1/2, 1/10, 9/10).
module tb_q_update;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  qval_t old4, n34, new4;  logic vld4;
  qval_t old1, n31, new1;  logic vld1;

  q_update #(.LINK_CYCLES(4)) dut4 (.old_val(old4), .old_vld(vld4), .n3(n34), .new_val(new4));
  q_update #(.LINK_CYCLES(1)) dut1 (.old_val(old1), .old_vld(vld1), .n3(n31), .new_val(new1));

  qval_t new_a01, new_a09;
  q_update #(.LINK_CYCLES(4), .ALPHA_NUM(1), .ALPHA_DEN(10)) dut01 (
    .old_val(old4), .old_vld(vld4), .n3(n34), .new_val(new_a01));
  q_update #(.LINK_CYCLES(4), .ALPHA_NUM(9), .ALPHA_DEN(10)) dut09 (
    .old_val(old4), .old_vld(vld4), .n3(n34), .new_val(new_a09));

  // a / b rounded away from zero
  function automatic int awaydiv(int a, int b);
    return (a >= 0) ? (a + b - 1) / b : -((-a + b - 1) / b);
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int est, exp;
    old4 = 41; vld4 = 1; n34 = 20; #1 chk("router 3 entry", new4, 34);
    chk("router 3 entry, alpha 0.1", new_a01, 39);   // 41 - 1.3
    chk("router 3 entry, alpha 0.9", new_a09, 29);   // 41 - 11.7
    old1 = 20; vld1 = 1; n31 = 14; #1 chk("router 2 entry", new1, 19);
    old4 = 99; vld4 = 0; n34 = 20; #1 chk("empty entry", new4, 28);
    old4 = 200; vld4 = 0; n34 = 250; #1 chk("saturate", new4, 255);
    for (int i = 0; i < 2000; i++) begin
      old4 = qval_t'($urandom); vld4 = 1'($urandom); n34 = qval_t'($urandom_range(0, 255));
      #1;
      est = int'(n34) + 8;
      if (est > 255) est = 255;
      exp = vld4 ? int'(old4) + awaydiv(est - int'(old4), 2) : est;
      chk("random", new4, exp);
      chk("alpha 0.1", new_a01, vld4 ? int'(old4) + awaydiv(est - int'(old4), 10) : est);
      chk("alpha 0.9", new_a09, vld4 ? int'(old4) + awaydiv(9 * (est - int'(old4)), 10) : est);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
