// rev_vedic_mult4: reversible 4x4 Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The operands are split into two-bit digits aH:aL and bH:bL, and the
// vertical-and-crosswise rule is applied to the digits:
//   q0 = aL*bL (vertical), q1 = aH*bL and q2 = aL*bH (crosswise),
//   q3 = aH*bH (vertical),
// each from a rev_vedic_mult2. The three columns are then summed with
// reversible ripple adders:
//   s     = q1 + q2                        (4-bit adder, 5-bit result)
//   upper = {q3, q0[3:2]} + {0, s}          (6-bit adder)
//   p     = {upper, q0[1:0]}
// The gates' garbage outputs (needed only to keep each gate reversible)
// are left unconnected on purpose; lint reports them as empty pins.
// Interface: p = a * b (8 bits). Purely combinational; the longest path
// runs through a 2x2 block and both adders.
module rev_vedic_mult4 #(
  parameter rev_pkg::ppg_gate_e PPG_GATE = rev_pkg::PPG_PERES,
  parameter rev_pkg::sum_gate_e SUM_GATE = rev_pkg::SUM_HNG
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] s_lo;
  logic       s_c;
  logic [5:0] upper;

  rev_vedic_mult2 #(.PPG_GATE(PPG_GATE), .SUM_GATE(SUM_GATE)) u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  rev_vedic_mult2 #(.PPG_GATE(PPG_GATE), .SUM_GATE(SUM_GATE)) u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  rev_vedic_mult2 #(.PPG_GATE(PPG_GATE), .SUM_GATE(SUM_GATE)) u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  rev_vedic_mult2 #(.PPG_GATE(PPG_GATE), .SUM_GATE(SUM_GATE)) u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  // Crosswise column: q1 + q2.
  rev_adder #(.WIDTH(4), .SUM_GATE(SUM_GATE)) u_add_cross (
    .a(q1), .b(q2), .cin(1'b0), .sum(s_lo), .cout(s_c)
  );

  // Merge with the two vertical terms. The product fits in 8 bits, so the
  // carry out of this adder is always 0 and is left as a garbage output.
  rev_adder #(.WIDTH(6), .SUM_GATE(SUM_GATE)) u_add_merge (
    .a({q3, q0[3:2]}), .b({1'b0, s_c, s_lo}), .cin(1'b0), .sum(upper), .cout()
  );

  assign p = {upper, q0[1:0]};
endmodule
