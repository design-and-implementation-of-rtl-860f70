// rev_alu: reversible 8-bit arithmetic and logic unit (top level).
//
// Both operands feed three reversible units side by side, and all results
// are available at once; there is no opcode, clock or register:
//   * rev_vedic_mult8: p = 16-bit Vedic product of a (multiplicand) and b
//     (multiplier), valid for operands with equal upper digit and lower
//     digits summing to the base (see rev_vedic_mult8);
//   * rev_logic_unit : and_out = a & b, xor_out = a ^ b (xor_out == 0 means
//     the operands are equal);
//   * rev_bin2gray   : gray_out = Gray code of a.
// The unit structure, and feeding operand A to the Gray converter, follow
// the published ALU. Leaving the garbage outputs of the gates unconnected
// at this level (they are empty pins on purpose) and offering no opcode or
// result select are choices of this implementation. The gate
// families of the multiplier are set by PPG_GATE and SUM_GATE (Peres
// partial products and HNG adders by default).
// Purely combinational: the slowest path is the multiplier's upper half
// (a 4x4 multiplier followed by an 8-bit ripple adder).
module rev_alu #(
  parameter rev_pkg::ppg_gate_e PPG_GATE = rev_pkg::PPG_PERES,
  parameter rev_pkg::sum_gate_e SUM_GATE = rev_pkg::SUM_HNG
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p,
  output logic [7:0]  and_out,
  output logic [7:0]  xor_out,
  output logic [7:0]  gray_out
);
  rev_vedic_mult8 #(.PPG_GATE(PPG_GATE), .SUM_GATE(SUM_GATE)) u_mult (
    .a(a), .b(b), .p(p), .hi_prod()
  );

  rev_logic_unit #(.WIDTH(8)) u_logic (
    .a(a), .b(b), .and_out(and_out), .xor_out(xor_out), .pp_out()
  );

  rev_bin2gray #(.WIDTH(8)) u_gray (
    .a(a), .gray(gray_out), .g_p()
  );
endmodule
