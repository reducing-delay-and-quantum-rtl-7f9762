// rev_toffoli_gate: 3x3 Toffoli (controlled-controlled-NOT) gate.
//
// P = A, Q = B, R = (A & B) ^ C: C is inverted when both controls are 1.
// Quantum cost 5, delay 5 deltas. Purely combinational. Function and
// costs are the standard ones; none of the storage elements uses it.
module rev_toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
