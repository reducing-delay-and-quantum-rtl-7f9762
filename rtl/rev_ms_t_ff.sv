// rev_ms_t_ff: reversible master-slave T flip-flop.
//
// Master: the clock-enabled T latch (rev_t_latch_en), open while E = 1.
// The clock leaves the master's Peres gate, is inverted by a NOT gate and
// enables the slave, the clock-enabled D latch (rev_d_latch), while E = 0.
// Quantum cost 5 + 0 + 6 = 11. Q and Q' change only after E falls.
// The master keeps its own feedback loop, so while E = 1 with T = 1 it
// toggles once per clk period (one loop delay); an E pulse one clk period
// wide toggles Q once per pulse. That the master-slave T flip-flop is built
// from the T latch, a NOT gate and the D latch is this design's reading of
// the published block structure. rst_n clears all state.
// garbage = {slave MF.Q, slave E pass-through, master E^T}.
module rev_ms_t_ff
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e,
  input  logic       t,
  output logic       q,
  output logic       q_n,
  output logic [2:0] garbage
);
  logic qm, e_m, e_n;

  rev_t_latch_en u_master (
    .clk, .rst_n, .e, .t,
    .q(qm), .e_pass(e_m), .garbage(garbage[0])
  );
  rev_not_gate u_not (.a(e_m), .p(e_n));
  rev_d_latch u_slave (
    .clk, .rst_n, .e(e_n), .d(qm),
    .q, .q_n, .e_pass(garbage[1]), .garbage(garbage[2])
  );

  localparam int unsigned QUANTUM_COST =
    QC_T_LATCH_E + COST_NOT.qc + QC_D_LATCH;
  localparam int unsigned DELAY = DL_T_LATCH_E + DL_D_LATCH;
endmodule
