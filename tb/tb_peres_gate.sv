// tb_peres_gate: exhaustive self-checking test of the Peres gate.
// Applies all eight input patterns, compares (P, Q, R) with the gate's
// defining equations, and checks that the mapping is a bijection.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic ep, eq, er;
      {a, b, c} = 3'(v);
      #1;
      ep = a;
      eq = (a != b);
      er = (a && b) ? !c : c;
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b expected %b%b%b", a, b, c, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
