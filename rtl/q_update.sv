// q_update -- Q-value update arithmetic of one Q-table column (the
// "congestion input adjustment" of the router).
//
// When a neighbour B returns its estimate N3 for a packet this router sent to
// it, the total cost through that output is estimated as
//     C_est = N1 + N2 + N3
// (link cycles to B, B's pipeline cycles, B's own estimate) and the entry is
// moved towards it with learning rate alpha:
//     C_new = C_old + alpha * (C_est - C_old).
// alpha is the fraction ALPHA_NUM / ALPHA_DEN (0 < alpha <= 1); the default
// 1/2 is the learning rate 0.5 used by the design, i.e. the mean of old and
// new value, rounded towards the new estimate (41 and 28 give 34). The compared rates 0.1 and 0.9
// are 1/10 and 9/10. The step alpha * (C_est - C_old) is rounded away from
// zero, so an entry always moves at least one cycle towards a different
// estimate: rounding small steps to zero would freeze entries at low rates
// and let packets circle. Division is by a constant, so it synthesizes to
// fixed logic. An
// empty entry takes C_est directly. Results saturate at the largest Q-value.
// Purely combinational.
//
// Expressing alpha as a fraction, the rounding and the saturation are this
// design's choices.
module q_update
  import noc_pkg::*;
#(
  parameter int unsigned LINK_CYCLES = 1,              // N1 of this output
  parameter int unsigned PIPE_CYCLES = ROUTER_CYCLES,  // N2
  parameter int unsigned ALPHA_NUM   = 1,
  parameter int unsigned ALPHA_DEN   = 2
) (
  input  qval_t old_val,
  input  logic  old_vld,
  input  qval_t n3,
  output qval_t new_val
);
  localparam int unsigned QMAX = (1 << Q_W) - 1;

  logic [Q_W+1:0]        est_wide;
  qval_t                 est;
  localparam int unsigned PW = Q_W + 2 + $clog2(ALPHA_NUM + 1);

  logic signed [Q_W+1:0] diff;
  logic signed [PW-1:0]  prod, step;
  logic signed [Q_W+1:0] sum;

  always_comb begin
    est_wide = (Q_W+2)'(n3) + (Q_W+2)'(LINK_CYCLES) + (Q_W+2)'(PIPE_CYCLES);
    est      = (est_wide > (Q_W+2)'(QMAX)) ? qval_t'(QMAX) : est_wide[Q_W-1:0];
    diff     = $signed({2'b00, est}) - $signed({2'b00, old_val});
    prod     = PW'(diff) * $signed(PW'(ALPHA_NUM));
    if (prod >= 0) step = (prod + $signed(PW'(ALPHA_DEN - 1))) / $signed(PW'(ALPHA_DEN));
    else           step = -((-prod + $signed(PW'(ALPHA_DEN - 1))) / $signed(PW'(ALPHA_DEN)));
    sum      = $signed({2'b00, old_val}) + (Q_W+2)'(step);
    new_val  = old_vld ? sum[Q_W-1:0] : est;
  end
endmodule
