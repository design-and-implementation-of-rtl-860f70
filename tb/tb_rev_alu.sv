// tb_rev_alu: end-to-end test of the reversible ALU at its default
// parameters. Every one of the 65536 operand pairs is applied and all four
// result buses are compared with values computed here:
//   p        = {aH*bH + aH, aL*bL} (the equidistant-operand Vedic rule),
//   and_out  = a & b, xor_out = a ^ b, gray_out = a ^ (a >> 1).
// The testbench also counts how often each mechanism of the design is
// exercised, and fails if any never is:
//   * BCD equidistant multiplication (decimal product recovered exactly),
//   * binary equidistant multiplication (exact 16-bit product),
//   * a carry out of the low nibble in the upper-half adder,
//   * an equality detected through xor_out == 0.
module tb_rev_alu;
  logic [7:0]  a, b, and_out, xor_out, gray_out;
  logic [15:0] p;
  int          checks = 0, failures = 0;
  int          n_bcd = 0, n_bin = 0, n_carry = 0, n_equal = 0;

  rev_alu dut (
    .a(a), .b(b), .p(p), .and_out(and_out), .xor_out(xor_out), .gray_out(gray_out)
  );

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h got %h expected %h", what, a, b, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int ah, al, bh, bl;
      {a, b} = 16'(v);
      #1;
      ah = int'(a[7:4]); al = int'(a[3:0]);
      bh = int'(b[7:4]); bl = int'(b[3:0]);
      check("p", int'(p), ((ah * bh + ah) << 8) | (al * bl));
      check("and", int'(and_out), int'(a) & int'(b));
      check("xor", int'(xor_out), int'(a) ^ int'(b));
      check("gray", int'(gray_out), int'(a) ^ (int'(a) >> 1));
      if (((ah * bh) & 15) + ah > 15) n_carry++;
      if (xor_out == 8'h00) begin
        n_equal++;
        check("equality", int'(a), int'(b));
      end
      if (ah == bh && al + bl == 10 && ah <= 9 && al <= 9 && bl <= 9) begin
        n_bcd++;
        check("BCD product", 100 * int'(p[15:8]) + int'(p[7:0]),
              (10 * ah + al) * (10 * bh + bl));
      end
      if (ah == bh && al + bl == 16) begin
        n_bin++;
        check("binary product", int'(p), int'(a) * int'(b));
      end
    end

    // The published simulation: multiplicand 24, multiplier 26 (BCD).
    a = 8'h24; b = 8'h26;
    #1;
    check("example p", int'(p), 'h0618);
    check("example and", int'(and_out), 'h24);
    check("example xor", int'(xor_out), 'h02);
    check("example gray", int'(gray_out), 'h36);

    $display("mechanisms: bcd_mult=%0d bin_mult=%0d adder_carry=%0d equality=%0d",
             n_bcd, n_bin, n_carry, n_equal);
    checks++;
    if (n_bcd == 0 || n_bin == 0 || n_carry == 0 || n_equal == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
