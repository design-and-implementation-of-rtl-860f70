// tsg_gate: 4x4 reversible TSG gate.
//
// Mapping (A, B, C, D) -> (P, Q, R, S) with
//   P = A
//   Q = (~A & ~C) ^ ~B
//   R = Q ^ D
//   S = (Q & D) ^ (A & B) ^ C
// With C = 0 and D = carry-in the gate is a full adder: Q = A ^ B,
// R = A ^ B ^ Cin (sum), S = majority(A, B, Cin) (carry). Purely
// combinational; the equations follow the published gate definition
// exactly.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic t;  // the shared term (A'C') xor B'

  assign t = (~a & ~c) ^ ~b;
  assign p = a;
  assign q = t;
  assign r = t ^ d;
  assign s = (t & d) ^ (a & b) ^ c;
endmodule
