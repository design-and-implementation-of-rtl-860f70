// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
// Applies all four input pairs, compares (P, Q) with the gate's defining
// equations, and checks that the mapping is a bijection (reversible).
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  bit   seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b repeated: not reversible", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
