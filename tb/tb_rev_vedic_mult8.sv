// tb_rev_vedic_mult8: self-checking test of the 8x8 Vedic multiplier for
// equidistant operands.
//  1. All 65536 operand pairs: p[7:0] must be aL*bL, hi_prod aH*bH and
//     p[15:8] aH*bH + aH, for the default gates and for a TSG/Toffoli copy.
//  2. BCD operands with equal tens digit and units summing to 10: the
//     decimal product must be 100*p[15:8] + p[7:0] (24 x 26 = 624 gives
//     p[15:8] = 8'h06, p[7:0] = 8'h18, hi_prod = 8'h04).
//  3. Binary operands with equal upper nibble and lower nibbles summing to
//     16: p must be the exact binary product.
module tb_rev_vedic_mult8;
  logic [7:0]  a, b;
  logic [15:0] p, p_alt;
  logic [7:0]  hi, hi_alt;
  int          checks = 0, failures = 0;
  int          n_bcd = 0, n_bin = 0;

  rev_vedic_mult8 dut (.a(a), .b(b), .p(p), .hi_prod(hi));
  rev_vedic_mult8 #(.PPG_GATE(rev_pkg::PPG_TOFFOLI), .SUM_GATE(rev_pkg::SUM_TSG)) dut_alt (
    .a(a), .b(b), .p(p_alt), .hi_prod(hi_alt)
  );

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. Equations of the datapath for every operand pair.
    for (int v = 0; v < 65536; v++) begin
      int ah, al, bh, bl;
      {a, b} = 16'(v);
      #1;
      ah = int'(a[7:4]); al = int'(a[3:0]);
      bh = int'(b[7:4]); bl = int'(b[3:0]);
      check("p[7:0]", int'(p[7:0]), al * bl);
      check("hi_prod", int'(hi), ah * bh);
      check("p[15:8]", int'(p[15:8]), ah * bh + ah);
      check("alt gates p", int'(p_alt), int'(p));
      check("alt gates hi_prod", int'(hi_alt), int'(hi));
    end

    // 2. The published example, 24 x 26 in BCD.
    a = 8'h24; b = 8'h26;
    #1;
    check("example p[15:8]", int'(p[15:8]), 'h06);
    check("example p[7:0]", int'(p[7:0]), 'h18);
    check("example hi_prod", int'(hi), 'h04);

    // BCD operands: tens digit t, units u and 10-u.
    for (int t = 0; t <= 9; t++) begin
      for (int u = 1; u <= 9; u++) begin
        a = 8'((t << 4) | u);
        b = 8'((t << 4) | (10 - u));
        #1;
        n_bcd++;
        check("BCD decimal product", 100 * int'(p[15:8]) + int'(p[7:0]),
              (10 * t + u) * (10 * t + 10 - u));
      end
    end

    // 3. Binary operands: upper nibble h, lower nibbles u and 16-u.
    for (int h = 0; h <= 15; h++) begin
      for (int u = 1; u <= 15; u++) begin
        a = 8'((h << 4) | u);
        b = 8'((h << 4) | (16 - u));
        #1;
        n_bin++;
        check("binary product", int'(p), int'(a) * int'(b));
      end
    end

    checks++;
    if (n_bcd == 0 || n_bin == 0) failures++;
    $display("BCD cases %0d, binary cases %0d", n_bcd, n_bin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
