// tb_rev_adder: self-checking test of the reversible ripple-carry adder at
// its default width (8 bits). Runs every pair of 8-bit operands with
// cin = 0 and cin = 1 through the default (HNG) adder and a TSG-based copy,
// and compares {cout, sum} with integer addition. Counts how often a carry
// rippled through all eight stages.
module tb_rev_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, s_h, s_t;
  logic         cin, c_h, c_t;
  int           checks = 0, failures = 0, full_ripples = 0;

  rev_adder dut_hng (.a(a), .b(b), .cin(cin), .sum(s_h), .cout(c_h));
  rev_adder #(.WIDTH(W), .SUM_GATE(rev_pkg::SUM_TSG)) dut_tsg (
    .a(a), .b(b), .cin(cin), .sum(s_t), .cout(c_t)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      int total;
      {cin, a, b} = (2 * W + 1)'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      if ((a ^ b) == '1 && cin) full_ripples++;
      checks++;
      if ({c_h, s_h} !== (W + 1)'(total)) begin
        failures++;
        if (failures < 10) $display("FAIL HNG %0d + %0d + %0d = %0d", a, b, cin, {c_h, s_h});
      end
      checks++;
      if ({c_t, s_t} !== (W + 1)'(total)) begin
        failures++;
        if (failures < 10) $display("FAIL TSG %0d + %0d + %0d = %0d", a, b, cin, {c_t, s_t});
      end
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple exercised");
    end
    $display("full-length carry ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
