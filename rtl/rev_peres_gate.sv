// rev_peres_gate: 3x3 Peres gate (PG).
//
// P = A, Q = A ^ B, R = (A & B) ^ C: a Toffoli gate followed by a CNOT,
// merged for a quantum cost of 4 and a delay of 4 deltas.
// Purely combinational. The SR and T latches use it; its function is the
// standard Peres gate, which reproduces the published T-latch example.
module rev_peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
