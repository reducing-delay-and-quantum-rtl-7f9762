// rev_t_latch: reversible T latch without clock.
//
// Next-state function: Q+ = T ^ Q.
// Netlist (quantum cost 1 + 1 = 2, one garbage line):
//   FG(T, Q)       -> (T, T^Q)     T is garbage
//   FG(T^Q, 0)     -> Q output and the feedback copy
// The exact netlist is this design's simplest realisation of the equation.
// With T = 1 the state toggles on every pass round the loop, i.e. every
// clk period in this model. rst_n clears the state to 0.
module rev_t_latch
  import rev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q,
  output logic garbage
);
  localparam int unsigned QUANTUM_COST = 2 * COST_FEYNMAN.qc;
  localparam int unsigned DELAY = 2 * COST_FEYNMAN.delay;

  logic q_state, q_next, q_fb;

  rev_feynman_gate u_xor  (.a(t), .b(q_state), .p(garbage), .q(q_next));
  rev_feynman_gate u_copy (.a(q_next), .b(1'b0), .p(q), .q(q_fb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_state <= 1'b0;
    else        q_state <= q_fb;
  end
endmodule
