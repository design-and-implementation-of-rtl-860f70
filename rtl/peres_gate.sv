// peres_gate: 3x3 reversible Peres gate.
//
// Mapping (A, B, C) -> (P, Q, R) with P = A, Q = A ^ B, R = (A & B) ^ C.
// With C tied to 0 a single gate yields both the XOR (Q) and the AND (R) of
// A and B, which is what the logic unit and the partial-product generator
// use. Purely combinational; the equations follow the published gate
// definition exactly.
module peres_gate (
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
