// rev_adder: N-bit reversible ripple-carry adder.
//
// A chain of N one-bit reversible full adders (rev_full_adder). With the
// default HNG summation gate each stage is an HNG gate whose third input is
// the carry-in, whose fourth input is the constant 0 and whose last output
// is the carry-out, propagated to the next stage; this is the published
// 8-bit adder block of the multiplier (WIDTH = 8, eight HNG gates).
// The gates' garbage outputs (needed only to keep each gate reversible)
// are left unconnected on purpose; lint reports them as empty pins.
// Interface: sum = a + b + cin (WIDTH bits), cout = carry out of the top
// stage. Purely combinational; the delay is WIDTH carry stages.
module rev_adder #(
  parameter int unsigned        WIDTH    = 8,
  parameter rev_pkg::sum_gate_e SUM_GATE = rev_pkg::SUM_HNG
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    rev_full_adder #(.SUM_GATE(SUM_GATE)) u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1]),
      .g_p (),
      .g_q ()
    );
  end

  assign cout = carry[WIDTH];
endmodule
