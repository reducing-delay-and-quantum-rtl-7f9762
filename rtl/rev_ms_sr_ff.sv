// rev_ms_sr_ff: reversible master-slave SR flip-flop.
//
// Master: the clock-enabled SR latch (rev_sr_latch), open while E = 1.
// The clock leaves the master's Peres gate, is inverted by a NOT gate and
// enables the slave, the clock-enabled D latch (rev_d_latch), while E = 0.
// Q and Q' therefore change only after E falls, to the value the master
// held at that moment (set, reset or hold; S = R = 1 holds).
// Quantum cost 12 (master) + 0 (NOT) + 6 (slave) = 18.
// garbage = {slave MF.Q, slave E pass-through, master garbage[3:0]}.
// Timing and reset as in the two latches: each feedback wire is one clk
// period, rst_n clears all state to 0.
module rev_ms_sr_ff
  import rev_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e,
  input  logic       s,
  input  logic       r,
  output logic       q,
  output logic       q_n,
  output logic [5:0] garbage
);
  logic qm, e_m, e_n;

  rev_sr_latch u_master (
    .clk, .rst_n, .e, .s, .r,
    .q(qm), .e_pass(e_m), .garbage(garbage[3:0])
  );
  rev_not_gate u_not (.a(e_m), .p(e_n));
  rev_d_latch u_slave (
    .clk, .rst_n, .e(e_n), .d(qm),
    .q, .q_n, .e_pass(garbage[4]), .garbage(garbage[5])
  );

  localparam int unsigned QUANTUM_COST =
    QC_SR_LATCH + COST_NOT.qc + QC_D_LATCH;
  localparam int unsigned DELAY = DL_SR_LATCH + DL_D_LATCH;
endmodule
