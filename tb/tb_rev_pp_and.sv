// tb_rev_pp_and: exhaustive test of the reversible partial-product cell in
// both gate configurations (Peres and Toffoli, third input tied to 0).
module tb_rev_pp_and;
  logic a, b;
  logic y_p, gp_p, gq_p;
  logic y_t, gp_t, gq_t;
  int   checks = 0, failures = 0;

  rev_pp_and #(.PPG_GATE(rev_pkg::PPG_PERES)) dut_peres (
    .a(a), .b(b), .y(y_p), .g_p(gp_p), .g_q(gq_p)
  );
  rev_pp_and #(.PPG_GATE(rev_pkg::PPG_TOFFOLI)) dut_toffoli (
    .a(a), .b(b), .y(y_t), .g_p(gp_t), .g_q(gq_t)
  );

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b got %b expected %b", what, a, b, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic prod;
      {a, b} = 2'(v);
      #1;
      prod = (v == 3);
      check("Peres {y,g_p,g_q}", {y_p, gp_p, gq_p}, {prod, a, a ^ b});
      check("Toffoli {y,g_p,g_q}", {y_t, gp_t, gq_t}, {prod, a, b});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
