// rev_jk_latch: reversible JK latch without clock.
//
// Next-state function: Q+ = J.Q' + K'.Q (set, reset, hold, toggle).
// Netlist (quantum cost 0 + 4 + 1 = 5):
//   NOT(K)           -> K'
//   MF(Q, K', J)     -> (Q, K'^J, Q ? K' : J)   R is Q+; P and Q garbage
//   FG(Q+, 0)        -> Q output and the feedback copy
// The modified Fredkin gate, steered by the old state, picks J when Q = 0
// and K' when Q = 1. The NOT on K is this design's: the published cost (5)
// leaves room for it, since a NOT costs 0.
// There is no enable, so with J = K = 1 the latch toggles on every pass
// round the loop, i.e. every clk period in this model (one clk period is
// the delay of the feedback wire). rst_n clears the state to 0.
// garbage = {MF.Q, MF.P}.
module rev_jk_latch
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       j,
  input  logic       k,
  output logic       q,
  output logic [1:0] garbage
);
  localparam int unsigned QUANTUM_COST = COST_NOT.qc + COST_MF.qc + COST_FEYNMAN.qc;
  localparam int unsigned DELAY = COST_NOT.delay + COST_MF.delay + COST_FEYNMAN.delay;

  logic q_state, k_n, q_next, q_fb;

  rev_not_gate     u_not  (.a(k), .p(k_n));
  rev_mf_gate      u_mf   (.a(q_state), .b(k_n), .c(j), .p(garbage[0]), .q(garbage[1]), .r(q_next));
  rev_feynman_gate u_copy (.a(q_next), .b(1'b0), .p(q), .q(q_fb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_state <= 1'b0;
    else        q_state <= q_fb;
  end
endmodule
