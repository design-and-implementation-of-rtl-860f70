// rev_bin2gray: reversible binary-to-Gray code converter.
//
// One Feynman gate per bit. Gate i < WIDTH-1 takes (A_{i+1}, A_i) and gives
//   g_p[i]  = A_{i+1}            (P, garbage output)
//   gray[i] = A_{i+1} ^ A_i      (Q)
// The top gate takes (A_{WIDTH-1}, 0), so gray[WIDTH-1] = A_{WIDTH-1} and
// g_p[WIDTH-1] = A_{WIDTH-1}. The result is the reflected binary code
// gray = a ^ (a >> 1). Width and wiring follow the published design.
// Purely combinational, one gate level.
module rev_bin2gray #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] gray,
  output logic [WIDTH-1:0] g_p
);
  feynman_gate u_fg_top (
    .a(a[WIDTH-1]), .b(1'b0), .p(g_p[WIDTH-1]), .q(gray[WIDTH-1])
  );

  for (genvar i = 0; i < WIDTH - 1; i++) begin : g_bit
    feynman_gate u_fg (
      .a(a[i+1]), .b(a[i]), .p(g_p[i]), .q(gray[i])
    );
  end
endmodule
