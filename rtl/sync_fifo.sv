// sync_fifo -- the packet queue of the network interface.
//
// A synchronous first-in first-out buffer of DEPTH words of type T, with
// valid/ready handshakes on both sides: a word is written when wr_valid and
// wr_ready (not full) and read when rd_valid (not empty) and rd_ready. The
// head word is presented on rd_data while rd_valid is high. Read and write in
// the same cycle are allowed, also when full. `count` gives the occupancy.
// Storage is a register array addressed by wrapping pointers.
//
// The network keeps packets waiting here when the router cannot take them;
// the depth (16) is this design's choice.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_valid,
  output logic                   wr_ready,
  input  T                       wr_data,
  output logic                   rd_valid,
  input  logic                   rd_ready,
  output T                       rd_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic            do_wr, do_rd;

  assign rd_valid = (count != '0);
  assign wr_ready = (count != ($clog2(DEPTH)+1)'(DEPTH)) || rd_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign do_wr    = wr_valid && wr_ready;
  assign rd_data  = mem[rptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] v);
    return (int'(v) == int'(DEPTH) - 1) ? '0 : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      count <= count + ($clog2(DEPTH)+1)'(do_wr) - ($clog2(DEPTH)+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end
endmodule
