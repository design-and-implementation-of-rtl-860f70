// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// Mapping (A, B) -> (P, Q) with P = A and Q = A ^ B. The mapping is its own
// inverse, so the inputs can always be recovered from the outputs. Used as
// a copy/XOR cell, e.g. one per bit of the binary-to-Gray converter.
// Purely combinational; the gate equations follow the published gate
// definition exactly.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
