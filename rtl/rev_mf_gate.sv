// rev_mf_gate: 3x3 modified Fredkin (MF) gate.
//
// P = A, Q = B ^ C, R = A ? B : C  (= AB + A'C).
// The Fredkin gate is realised as CNOT(C->B), a Toffoli-type stage with
// controls A and B acting on C, and CNOT(C->B). Dropping the final CNOT
// keeps the 2:1 multiplexer on R and leaves B ^ C on Q, for a quantum cost
// of 4 and a delay of 4 deltas instead of 5. R is the output the storage
// elements use: with A = E, B = new value and C = old state it is exactly
// the hold-or-load function of a clock-enabled latch.
// The cost (4/4) and the name are the design's source; the exact output
// function is this design's reading of "Fredkin gate less one CNOT", chosen
// because it reproduces every worked example of the latches.
// Purely combinational.
module rev_mf_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b ^ c;
  assign r = a ? b : c;
endmodule
