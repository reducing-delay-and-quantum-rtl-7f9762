// rev_sr_latch: clock-enabled reversible SR latch (the "SR-FF" block).
//
// Next-state function: Q+ = E.(S ^ Q).(S ^ R) ^ Q.
// With E = 1: S=1,R=0 sets, S=0,R=1 resets, S=R=0 holds, and the
// forbidden combination S=R=1 is defined to hold as well. With E = 0 the
// latch holds.
// Netlist (quantum cost 1+1+4+4+1+1 = 12):
//   FG(S, Q)              -> (S, S^Q)
//   FG(R, S)              -> (R, S^R)                  R is garbage
//   MF(S^R, S^Q, 0)       -> (g, g, (S^R).(S^Q))       AND, 0 is an ancilla
//   PG(E, that, Q)        -> (E, g, E.(S^R).(S^Q) ^ Q) = Q+
//   FG(Q+, 0), FG(., 0)   -> Q output and two feedback copies
// The Peres gate applies the enable exactly as in the clock-enabled T
// latch; the modified Fredkin gate with a constant 0 on C is an AND gate.
// Gate set and costs follow the published design (12 with this gate, 13
// when a Fredkin gate takes the place of the MF gate); the wiring is this
// design's reading of it. The published set example (S=1, R=0, E=1 from
// Q=0) gives (1, 0, 1) on the Peres gate, as here.
// Each feedback wire is one clk period of delay; rst_n clears them to 0.
// e_pass is E leaving the Peres gate (the clock for a following slave).
// garbage = {PG.Q, MF.Q, MF.P, R}.
module rev_sr_latch
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e,
  input  logic       s,
  input  logic       r,
  output logic       q,
  output logic       e_pass,
  output logic [3:0] garbage
);
  localparam int unsigned QUANTUM_COST = QC_SR_LATCH;
  localparam int unsigned DELAY = DL_SR_LATCH;

  logic [1:0] fb_state;             // the two feedback wires
  logic [1:0] fb_next;              // copies of Q+ entering them
  logic s1, s_xor_q, s_xor_r;
  logic change, q_next, t0;

  rev_feynman_gate u_fg1 (.a(s), .b(fb_state[0]), .p(s1), .q(s_xor_q));
  rev_feynman_gate u_fg2 (.a(r), .b(s1), .p(garbage[0]), .q(s_xor_r));
  rev_mf_gate      u_mf  (.a(s_xor_r), .b(s_xor_q), .c(1'b0),
                          .p(garbage[1]), .q(garbage[2]), .r(change));
  rev_peres_gate   u_pg  (.a(e), .b(change), .c(fb_state[1]),
                          .p(e_pass), .q(garbage[3]), .r(q_next));

  // fan-out of Q+: the output plus two feedback copies
  rev_feynman_gate u_cp1 (.a(q_next), .b(1'b0), .p(q), .q(t0));
  rev_feynman_gate u_cp2 (.a(t0), .b(1'b0), .p(fb_next[0]), .q(fb_next[1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fb_state <= '0;
    else        fb_state <= fb_next;
  end
endmodule
