// rev_pp_and: reversible partial-product cell, y = a & b.
//
// The PPG_GATE parameter picks the 3x3 gate whose third input is tied to the
// constant 0 so that its R output equals a & b:
//   PPG_PERES (default): Peres gate, garbage P = a, Q = a ^ b.
//   PPG_TOFFOLI:         Toffoli gate, garbage P = a, Q = b.
// The garbage outputs are brought out on g_p / g_q. Purely combinational.
module rev_pp_and #(
  parameter rev_pkg::ppg_gate_e PPG_GATE = rev_pkg::PPG_PERES
) (
  input  logic a,
  input  logic b,
  output logic y,
  output logic g_p,   // garbage output P
  output logic g_q    // garbage output Q
);
  if (PPG_GATE == rev_pkg::PPG_PERES) begin : g_peres
    peres_gate u_gate (.a(a), .b(b), .c(1'b0), .p(g_p), .q(g_q), .r(y));
  end else begin : g_toffoli
    toffoli_gate u_gate (.a(a), .b(b), .c(1'b0), .p(g_p), .q(g_q), .r(y));
  end
endmodule
