// pkt_input_adjust -- first pipeline stage of the router: the input register,
// packet input adjustment and destination-address preset.
//
// Every cycle it registers the packets arriving on the six link inputs and,
// on the local port R, the packet offered by the network interface. Each
// packet's age (routers visited) is incremented, saturating, so that the
// oldest-first arbitration further on sees it; a packet whose destination is
// this router is flagged for ejection.
//
// Injection rule: a buffer-less router must give every packet it holds an
// output, so a new packet is admitted only when fewer packets arrive on the
// links than the router has usable network outputs (port_en & PORT_MASK).
// inj_ready is combinational from the link inputs; the packet is taken at the
// clock edge when inj_pkt.valid and inj_ready are both high.
//
// The register, adjustment and preset functions follow the router block
// diagram; the age counting in hops and the injection rule are this design's
// choices.
module pkt_input_adjust
  import noc_pkg::*;
#(
  parameter int unsigned        ROUTER_ID = 0,
  parameter logic [N_PORTS-1:0] PORT_MASK = 7'b1101111
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pkt_t               in_pkt   [N_PORTS],  // entry P_R ignored
  input  pkt_t               inj_pkt,
  output logic               inj_ready,
  input  logic [N_PORTS-1:0] port_en,
  output pkt_t               s1_pkt   [N_PORTS],
  output logic [N_PORTS-1:0] s1_local
);
  localparam logic [AGE_W-1:0] AGE_MAX = '1;

  logic [PORT_W:0] n_in, n_out;

  always_comb begin
    n_in  = '0;
    n_out = '0;
    for (int p = 0; p < int'(N_PORTS); p++) begin
      if (p != int'(P_R)) begin
        n_in  = n_in  + (PORT_W+1)'(in_pkt[p].valid);
        n_out = n_out + (PORT_W+1)'(PORT_MASK[p] && port_en[p]);
      end
    end
    inj_ready = (n_in < n_out);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(N_PORTS); p++) s1_pkt[p] <= '0;
      s1_local <= '0;
    end else begin
      for (int p = 0; p < int'(N_PORTS); p++) begin
        pkt_t q;
        if (p == int'(P_R)) begin
          q       = inj_pkt;
          q.valid = inj_pkt.valid && inj_ready;
          q.age   = '0;
        end else begin
          q = in_pkt[p];
          if (q.age != AGE_MAX) q.age = q.age + 1'b1;
        end
        s1_pkt[p]   <= q;
        s1_local[p] <= q.valid && (q.dest == id_t'(ROUTER_ID));
      end
    end
  end
endmodule
