// rev_ms_d_ff: reversible master-slave D flip-flop, modified-Fredkin version.
//
// A master D latch is open while the clock E is 1; the clock leaves the
// master's MF gate on its P output, is inverted by a NOT gate and opens the
// slave D latch while E is 0. Q therefore takes the value D had when E
// fell: a falling-edge flip-flop built from two latches.
// Netlist (quantum cost 4+1+0+4+1 = 10, three garbage lines):
//   master: MF(E, D, Qm) -> (E, g0, Qm+),  FG(Qm+, 0) -> slave input, feedback
//   NOT(E)              -> E'
//   slave:  MF(E', Qm, Qs) -> (g1, g2, Qs+), FG(Qs+, 0) -> Q, feedback
// Each feedback wire is a one-clk-period delay (see rev_d_latch); both
// states reset to 0 on rst_n (this design's addition).
// garbage = {g2, g1, g0}.
module rev_ms_d_ff
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e,
  input  logic       d,
  output logic       q,
  output logic [2:0] garbage
);
  localparam int unsigned QUANTUM_COST =
    2 * COST_MF.qc + 2 * COST_FEYNMAN.qc + COST_NOT.qc;
  localparam int unsigned DELAY = 2 * COST_MF.delay + COST_NOT.delay + COST_FEYNMAN.delay;

  logic qm_state, qs_state;
  logic e_m, e_n;
  logic qm_next, qm_out, qm_fb;
  logic qs_next, qs_fb;

  // master
  rev_mf_gate      u_m_mf   (.a(e), .b(d), .c(qm_state), .p(e_m), .q(garbage[0]), .r(qm_next));
  rev_feynman_gate u_m_copy (.a(qm_next), .b(1'b0), .p(qm_out), .q(qm_fb));
  // clock inversion after the master
  rev_not_gate     u_not    (.a(e_m), .p(e_n));
  // slave
  rev_mf_gate      u_s_mf   (.a(e_n), .b(qm_out), .c(qs_state), .p(garbage[1]), .q(garbage[2]), .r(qs_next));
  rev_feynman_gate u_s_copy (.a(qs_next), .b(1'b0), .p(q), .q(qs_fb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qm_state <= 1'b0;
      qs_state <= 1'b0;
    end else begin
      qm_state <= qm_fb;
      qs_state <= qs_fb;
    end
  end
endmodule
