// tb_rev_logic_unit: exhaustive test of the 8-bit reversible logic unit.
// For every operand pair, and_out must be a & b, xor_out a ^ b and the
// garbage pp_out a; the equality check (xor_out == 0) must hold exactly
// when a == b. The values are worked out bit by bit in the testbench.
module tb_rev_logic_unit;
  logic [7:0] a, b, and_out, xor_out, pp_out;
  int         checks = 0, failures = 0, n_equal = 0;

  rev_logic_unit dut (.a(a), .b(b), .and_out(and_out), .xor_out(xor_out), .pp_out(pp_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [7:0] e_and, e_xor;
      {a, b} = 16'(v);
      #1;
      for (int i = 0; i < 8; i++) begin
        e_and[i] = a[i] ? b[i] : 1'b0;
        e_xor[i] = a[i] ? !b[i] : b[i];
      end
      checks++;
      if ({and_out, xor_out, pp_out} !== {e_and, e_xor, a}) begin
        failures++;
        if (failures < 20)
          $display("FAIL a=%h b=%h and=%h xor=%h pp=%h", a, b, and_out, xor_out, pp_out);
      end
      checks++;
      if ((xor_out == 8'h00) != (v[15:8] == v[7:0])) failures++;
      if (xor_out == 8'h00) n_equal++;
    end
    checks++;
    if (n_equal != 256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
