// rev_t_latch_en: clock-enabled reversible T latch (the "T-FF" block).
//
// Next-state function: Q+ = (T & E) ^ Q.
// Netlist (quantum cost 4 + 1 = 5):
//   PG(E, T, Q)   -> (E, E^T, E.T ^ Q)    R is Q+
//   FG(Q+, 0)     -> Q output and the feedback copy
// While E = 1 and T = 1 the state toggles on every pass round the loop
// (every clk period here); an E pulse one clk period wide toggles once.
// rst_n clears the state to 0. e_pass is E leaving the Peres gate;
// garbage is E^T.
module rev_t_latch_en
  import rev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic e,
  input  logic t,
  output logic q,
  output logic e_pass,
  output logic garbage
);
  localparam int unsigned QUANTUM_COST = QC_T_LATCH_E;
  localparam int unsigned DELAY = DL_T_LATCH_E;

  logic q_state, q_next, q_fb;

  rev_peres_gate   u_pg   (.a(e), .b(t), .c(q_state), .p(e_pass), .q(garbage), .r(q_next));
  rev_feynman_gate u_copy (.a(q_next), .b(1'b0), .p(q), .q(q_fb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_state <= 1'b0;
    else        q_state <= q_fb;
  end
endmodule
