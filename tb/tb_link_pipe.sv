// tb_link_pipe -- checks that a 3-cycle link delivers every packet and every
// returned estimate exactly 3 cycles after it entered, unchanged.
module tb_link_pipe;
  import noc_pkg::*;
  localparam int LEN = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pkt_t a_out, b_in;
  fb_t  b_fb, a_fb;
  pkt_t sent_p [$];
  fb_t  sent_f [$];

  link_pipe #(.LEN(LEN)) dut (.clk, .rst_n, .a_out, .b_in, .b_fb, .a_fb);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_out = '0; b_fb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      // what entered LEN cycles ago must be visible now
      if (sent_p.size() == LEN) begin
        automatic pkt_t ep = sent_p.pop_front();
        automatic fb_t  ef = sent_f.pop_front();
        checks += 2;
        if (b_in != ep) begin failures++; $display("FAIL packet at cycle %0d", c); end
        if (a_fb != ef) begin failures++; $display("FAIL estimate at cycle %0d", c); end
      end
      a_out = pkt_t'({$urandom, $urandom, $urandom});
      b_fb  = fb_t'($urandom);
      sent_p.push_back(a_out);
      sent_f.push_back(b_fb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
