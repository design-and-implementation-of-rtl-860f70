// rev_full_adder: one-bit reversible full adder built from a single 4x4 gate.
//
// The SUM_GATE parameter picks the gate:
//   SUM_HNG (default): HNG gate with inputs (A, B, Cin, 0);
//                      R = sum, S = carry-out.
//   SUM_TSG:           TSG gate with inputs (A, B, 0, Cin);
//                      R = sum, S = carry-out.
// Both wirings are the published "gate as full adder" configurations. The
// other two gate outputs are garbage (they only keep the gate reversible)
// and are brought out on g_p / g_q so a caller may observe them. A half
// adder is this cell with cin tied to 0. Purely combinational.
module rev_full_adder #(
  parameter rev_pkg::sum_gate_e SUM_GATE = rev_pkg::SUM_HNG
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic g_p,   // garbage output P
  output logic g_q    // garbage output Q
);
  if (SUM_GATE == rev_pkg::SUM_HNG) begin : g_hng
    hng_gate u_gate (
      .a(a), .b(b), .c(cin), .d(1'b0),
      .p(g_p), .q(g_q), .r(sum), .s(cout)
    );
  end else begin : g_tsg
    tsg_gate u_gate (
      .a(a), .b(b), .c(1'b0), .d(cin),
      .p(g_p), .q(g_q), .r(sum), .s(cout)
    );
  end
endmodule
