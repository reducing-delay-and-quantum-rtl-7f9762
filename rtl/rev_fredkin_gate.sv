// rev_fredkin_gate: 3x3 Fredkin (controlled-swap) gate.
//
// P = A, Q = A'B + AC, R = A'C + AB: B and C swap places when A = 1.
// Universal and conservative (the number of ones is preserved).
// Quantum cost 5, delay 5 deltas. Purely combinational. Function and
// costs are the standard ones; the modified Fredkin gate is derived from it.
module rev_fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
