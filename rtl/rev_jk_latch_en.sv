// rev_jk_latch_en: clock-enabled reversible JK latch (the "JK-FF" block).
//
// Next-state function: Q+ = E.(J.Q' + K'.Q) + E'.Q.
// Netlist (quantum cost 0 + 4 + 4 + 1 = 9, garbage 3 with e_pass):
//   NOT(K)               -> K'
//   MF1(Q, K', J)        -> (Q, K'^J, JQ' + K'Q)
//   MF2(E, MF1.R, MF1.P) -> (E, g, Q+)      load the JK value when E = 1,
//                                           keep the old state when E = 0
//   FG(Q+, 0)            -> Q output and the feedback copy
// Two outputs of MF1 (the old state and the JK value) feed MF2, as in the
// published description and its worked toggle example; the NOT on K is
// this design's.
// While E = 1 this is a latch: with J = K = 1 it toggles on every pass
// round the loop (every clk period here). Use an E pulse one clk period
// wide for a single toggle, or the master-slave version. rst_n clears
// the state to 0. e_pass is E leaving MF2; garbage = {MF2.Q, MF1.Q}.
module rev_jk_latch_en
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e,
  input  logic       j,
  input  logic       k,
  output logic       q,
  output logic       e_pass,
  output logic [1:0] garbage
);
  localparam int unsigned QUANTUM_COST = QC_JK_LATCH_E;
  localparam int unsigned DELAY = DL_JK_LATCH_E;

  logic q_state, k_n, q_old, q_jk, q_next, q_fb;

  rev_not_gate     u_not  (.a(k), .p(k_n));
  rev_mf_gate      u_mf1  (.a(q_state), .b(k_n), .c(j), .p(q_old), .q(garbage[0]), .r(q_jk));
  rev_mf_gate      u_mf2  (.a(e), .b(q_jk), .c(q_old), .p(e_pass), .q(garbage[1]), .r(q_next));
  rev_feynman_gate u_copy (.a(q_next), .b(1'b0), .p(q), .q(q_fb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_state <= 1'b0;
    else        q_state <= q_fb;
  end
endmodule
