// rev_vedic_mult8: reversible 8x8 Vedic multiplier for operands that lie
// equally far on either side of a common base (same upper digit, lower
// digits summing to the base).
//
// The multiplicand is a = {aH, aL} and the multiplier b = {bH, bL}, each
// digit four bits. The unit computes
//   p[7:0]  = aL * bL                   (4x4 Vedic multiplier)
//   hi_prod = aH * bH                   (4x4 Vedic multiplier)
//   p[15:8] = hi_prod + {4'b0, aH}      (8-bit reversible HNG adder)
// This is the "upper digit times its successor, then lower digits
// multiplied" rule. It gives the true product only when aH == bH and the
// lower digits sum to the base:
//   * BCD operands, aL + bL == 10: decimal product = 100*p[15:8] + p[7:0]
//     (e.g. 24 x 26: p[15:8] = 6, p[7:0] = 24, i.e. 624);
//   * binary operands, aL + bL == 16: p is the exact 16-bit product.
// For other operands p still follows the equations above, but is not a*b.
// The unit does not check the operand condition; that is left to the user,
// as in the published design.
// The gates' garbage outputs (needed only to keep each gate reversible)
// are left unconnected on purpose; lint reports them as empty pins.
// Interface: a, b (8 bits), p (16 bits), hi_prod (8 bits, the intermediate
// upper-digit product). Purely combinational: one 4x4 multiplier followed
// by the 8-bit ripple adder on the upper half.
module rev_vedic_mult8 #(
  parameter rev_pkg::ppg_gate_e PPG_GATE = rev_pkg::PPG_PERES,
  parameter rev_pkg::sum_gate_e SUM_GATE = rev_pkg::SUM_HNG
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p,
  output logic [7:0]  hi_prod
);
  // Lower digits, multiplied vertically.
  rev_vedic_mult4 #(.PPG_GATE(PPG_GATE), .SUM_GATE(SUM_GATE)) u_mult_lo (
    .a(a[3:0]), .b(b[3:0]), .p(p[7:0])
  );

  // Upper digits.
  rev_vedic_mult4 #(.PPG_GATE(PPG_GATE), .SUM_GATE(SUM_GATE)) u_mult_hi (
    .a(a[7:4]), .b(b[7:4]), .p(hi_prod)
  );

  // Add the multiplicand's upper digit, zero-padded to 8 bits. The largest
  // result, 15*15 + 15 = 240, fits in 8 bits, so the carry out is garbage.
  rev_adder #(.WIDTH(8), .SUM_GATE(SUM_GATE)) u_add_hi (
    .a(hi_prod), .b({4'b0000, a[7:4]}), .cin(1'b0), .sum(p[15:8]), .cout()
  );
endmodule
