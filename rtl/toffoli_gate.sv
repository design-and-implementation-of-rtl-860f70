// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// Mapping (A, B, C) -> (P, Q, R) with P = A, Q = B, R = (A & B) ^ C.
// With C tied to 0 the R output is the AND of A and B, which is how the
// multiplier uses it to form partial products. Purely combinational; the
// equations follow the published gate definition exactly.
module toffoli_gate (
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
