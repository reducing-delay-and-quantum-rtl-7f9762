// rev_not_gate: 1x1 reversible NOT gate, P = ~A.
//
// The only 1x1 reversible function besides the wire. Quantum cost 0,
// delay one delta. Purely combinational. Function and costs are the
// standard ones for this gate.
module rev_not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
