// rev_d_latch: clock-enabled reversible D latch (the "D-FF" block) with Q and Q'.
//
// Next-state function: Q+ = E ? D : Q.
// Netlist (quantum cost 4 + 1 + 1 = 6, two garbage lines):
//   MF(A=E, B=D, C=Q)   -> P = E (e_pass), Q = D ^ Q (garbage), R = Q+
//   FG(Q+, 0)           -> two copies of Q+: one to the outputs, one fed back
//   FG(Q+, 1)           -> Q and Q'
// The gate network is combinational; the feedback wire from the copy gate
// back to the MF C input is the only storage. Its delay is modelled as one
// period of clk: q_state is the value on the feedback wire and is updated
// on every rising clk edge. The outputs follow E and D at once (the latch
// is transparent while E = 1) and hold while E = 0.
// Reset (rst_n low, asynchronous) clears the stored state to 0; the reset
// is this design's addition, the gate network and its costs are the
// published ones.
module rev_d_latch
  import rev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic e,
  input  logic d,
  output logic q,
  output logic q_n,
  output logic e_pass,
  output logic garbage
);
  localparam int unsigned QUANTUM_COST = QC_D_LATCH;
  localparam int unsigned DELAY = DL_D_LATCH;

  logic q_state;        // value on the feedback wire
  logic q_next;         // MF output R
  logic q_copy, q_fb;   // Feynman copies

  rev_mf_gate      u_mf   (.a(e), .b(d), .c(q_state), .p(e_pass), .q(garbage), .r(q_next));
  rev_feynman_gate u_copy (.a(q_next), .b(1'b0), .p(q_copy), .q(q_fb));
  rev_feynman_gate u_inv  (.a(q_copy), .b(1'b1), .p(q), .q(q_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_state <= 1'b0;
    else        q_state <= q_fb;
  end
endmodule
