// hng_gate: 4x4 reversible HNG gate.
//
// Mapping (A, B, C, D) -> (P, Q, R, S) with
//   P = A, Q = B, R = A ^ B ^ C, S = ((A ^ B) & C) ^ (A & B) ^ D.
// With D = 0 and C = carry-in the gate is a full adder: R is the sum and
// S the carry-out, while P and Q pass A and B through. Purely
// combinational; the equations follow the published gate definition
// exactly.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
