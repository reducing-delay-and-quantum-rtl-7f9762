// rev_ms_jk_ff: reversible master-slave JK flip-flop.
//
// Master: the clock-enabled JK latch (rev_jk_latch_en), open while E = 1.
// The clock leaves the master's second MF gate, is inverted by a NOT gate
// and enables the slave, the clock-enabled D latch (rev_d_latch), while
// E = 0. Q and Q' change only after E falls.
// Quantum cost 9 + 0 + 6 = 15.
// The master keeps its own feedback loop, so while E = 1 with J = K = 1 it
// toggles once per clk period (one loop delay); an E pulse one clk period
// wide gives exactly one toggle of Q per pulse. rst_n clears all state.
// garbage = {slave MF.Q, slave E pass-through, master garbage[1:0]}.
module rev_ms_jk_ff
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e,
  input  logic       j,
  input  logic       k,
  output logic       q,
  output logic       q_n,
  output logic [3:0] garbage
);
  logic qm, e_m, e_n;

  rev_jk_latch_en u_master (
    .clk, .rst_n, .e, .j, .k,
    .q(qm), .e_pass(e_m), .garbage(garbage[1:0])
  );
  rev_not_gate u_not (.a(e_m), .p(e_n));
  rev_d_latch u_slave (
    .clk, .rst_n, .e(e_n), .d(qm),
    .q, .q_n, .e_pass(garbage[2]), .garbage(garbage[3])
  );

  localparam int unsigned QUANTUM_COST =
    QC_JK_LATCH_E + COST_NOT.qc + QC_D_LATCH;
  localparam int unsigned DELAY = DL_JK_LATCH_E + DL_D_LATCH;
endmodule
