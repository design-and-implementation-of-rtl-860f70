// rev_vedic_mult2: reversible 2x2 Vedic (Urdhva Tiryagbhyam) multiplier.
//
// "Vertically and crosswise" for two-bit operands:
//   vertical   : p[0]        = a0 b0
//   crosswise  : p[1], c     = half-add(a1 b0, a0 b1)
//   vertical   : p[2], p[3]  = half-add(a1 b1, c)
// That is four partial-product gates (PPG_GATE, Peres by default) and two
// half adders (SUM_GATE full adders with carry-in 0, HNG by default): the
// published cost of four multiplications and two half additions.
// The gates' garbage outputs (needed only to keep each gate reversible)
// are left unconnected on purpose; lint reports them as empty pins.
// Interface: p = a * b (4 bits). Purely combinational.
module rev_vedic_mult2 #(
  parameter rev_pkg::ppg_gate_e PPG_GATE = rev_pkg::PPG_PERES,
  parameter rev_pkg::sum_gate_e SUM_GATE = rev_pkg::SUM_HNG
) (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  rev_pp_and #(.PPG_GATE(PPG_GATE)) u_pp00 (.a(a[0]), .b(b[0]), .y(a0b0), .g_p(), .g_q());
  rev_pp_and #(.PPG_GATE(PPG_GATE)) u_pp10 (.a(a[1]), .b(b[0]), .y(a1b0), .g_p(), .g_q());
  rev_pp_and #(.PPG_GATE(PPG_GATE)) u_pp01 (.a(a[0]), .b(b[1]), .y(a0b1), .g_p(), .g_q());
  rev_pp_and #(.PPG_GATE(PPG_GATE)) u_pp11 (.a(a[1]), .b(b[1]), .y(a1b1), .g_p(), .g_q());

  assign p[0] = a0b0;

  rev_full_adder #(.SUM_GATE(SUM_GATE)) u_ha0 (
    .a(a1b0), .b(a0b1), .cin(1'b0), .sum(p[1]), .cout(c1), .g_p(), .g_q()
  );
  rev_full_adder #(.SUM_GATE(SUM_GATE)) u_ha1 (
    .a(a1b1), .b(c1), .cin(1'b0), .sum(p[2]), .cout(p[3]), .g_p(), .g_q()
  );
endmodule
