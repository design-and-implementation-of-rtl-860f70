// tb_hng_gate: exhaustive self-checking test of the HNG gate.
// Applies all sixteen input patterns, compares (P, Q, R, S) with the gate's
// defining equations, checks that the mapping is a bijection, and checks
// the full-adder use (C = carry-in, D = 0) against integer addition.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  bit   seen [16];

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      logic er, es;
      {a, b, c, d} = 4'(v);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      er = ones[0];
      es = (ones >= 2) != d;   // (A^B)C ^ AB is the majority function
      checks++;
      if ({p, q, r, s} !== {a, b, er, es}) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b -> pqrs=%b%b%b%b expected %b%b%b%b",
                 a, b, c, d, p, q, r, s, a, b, er, es);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeated: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
      if (!d) begin
        checks++;
        if ({s, r} !== 2'(ones)) begin
          failures++;
          $display("FAIL full adder a=%b b=%b cin=%b -> carry=%b sum=%b", a, b, c, s, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
