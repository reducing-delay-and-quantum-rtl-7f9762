// rev_feynman_gate: 2x2 Feynman (controlled-NOT) gate.
//
// P = A, Q = A ^ B. With B tied to 0 it makes a copy of A (the reversible
// way to fan a signal out); with B tied to 1 it gives A and ~A.
// Quantum cost 1, delay one delta. Purely combinational. Function and
// costs are the standard ones for this gate.
module rev_feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
