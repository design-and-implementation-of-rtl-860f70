// tb_rev_vedic_mult2: exhaustive test of the 2x2 Vedic multiplier in all
// four gate configurations (Peres/Toffoli partial products, HNG/TSG half
// adders); p must equal a * b.
module tb_rev_vedic_mult2;
  logic [1:0] a, b;
  logic [3:0] p_ph, p_pt, p_th, p_tt;
  int         checks = 0, failures = 0;

  rev_vedic_mult2 dut_ph (.a(a), .b(b), .p(p_ph));
  rev_vedic_mult2 #(.PPG_GATE(rev_pkg::PPG_PERES), .SUM_GATE(rev_pkg::SUM_TSG)) dut_pt (
    .a(a), .b(b), .p(p_pt));
  rev_vedic_mult2 #(.PPG_GATE(rev_pkg::PPG_TOFFOLI), .SUM_GATE(rev_pkg::SUM_HNG)) dut_th (
    .a(a), .b(b), .p(p_th));
  rev_vedic_mult2 #(.PPG_GATE(rev_pkg::PPG_TOFFOLI), .SUM_GATE(rev_pkg::SUM_TSG)) dut_tt (
    .a(a), .b(b), .p(p_tt));

  task automatic check(input string what, input logic [3:0] got, input int exp);
    checks++;
    if (got !== 4'(exp)) begin
      failures++;
      $display("FAIL %s %0d x %0d = %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int prod;
      {a, b} = 4'(v);
      #1;
      prod = int'(a) * int'(b);
      check("Peres/HNG", p_ph, prod);
      check("Peres/TSG", p_pt, prod);
      check("Toffoli/HNG", p_th, prod);
      check("Toffoli/TSG", p_tt, prod);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
