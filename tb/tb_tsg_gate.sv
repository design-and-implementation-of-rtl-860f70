// tb_tsg_gate: exhaustive self-checking test of the TSG gate.
// Applies all sixteen input patterns, compares (P, Q, R, S) with the gate's
// defining equations, checks that the mapping is a bijection, and checks
// the full-adder use (C = 0, D = carry-in) against integer addition.
module tb_tsg_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  bit   seen [16];

  tsg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic eq, er, es;
      {a, b, c, d} = 4'(v);
      #1;
      // Q = A'C' xor B'
      eq = ((!a && !c) != !b);
      er = (eq != d);
      es = ((eq && d) != (a && b)) != c;
      checks++;
      if ({p, q, r, s} !== {a, eq, er, es}) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b expected %b%b%b%b",
                 a, b, c, d, p, q, r, s, a, eq, er, es);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeated: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
      if (!c) begin
        int total;
        total = int'(a) + int'(b) + int'(d);
        checks++;
        if ({s, r} !== 2'(total)) begin
          failures++;
          $display("FAIL full adder a=%b b=%b cin=%b -> carry=%b sum=%b", a, b, d, s, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
