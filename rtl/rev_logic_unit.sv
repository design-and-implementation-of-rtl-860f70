// rev_logic_unit: reversible bitwise logic unit (AND and XOR).
//
// One Peres gate per bit, with inputs (A_i, B_i, C_i = 0). Each gate gives
//   pp_out[i]  = A_i           (P, garbage output)
//   xor_out[i] = A_i ^ B_i     (Q)
//   and_out[i] = A_i & B_i     (R)
// so one gate per bit yields both logic functions. xor_out is all zeros
// exactly when a == b, which is how the unit serves as an equality check.
// The width and the one-gate-per-bit structure follow the published
// design. Purely combinational, one gate level.
module rev_logic_unit #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] and_out,
  output logic [WIDTH-1:0] xor_out,
  output logic [WIDTH-1:0] pp_out
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    peres_gate u_pg (
      .a(a[i]), .b(b[i]), .c(1'b0),
      .p(pp_out[i]), .q(xor_out[i]), .r(and_out[i])
    );
  end
endmodule
