// tb_rev_full_adder: exhaustive test of the one-bit reversible full adder
// in both gate configurations (HNG and TSG). {cout, sum} must equal
// a + b + cin, and the garbage outputs must be the gate's P and Q values.
module tb_rev_full_adder;
  logic a, b, cin;
  logic s_h, c_h, gp_h, gq_h;
  logic s_t, c_t, gp_t, gq_t;
  int   checks = 0, failures = 0;

  rev_full_adder #(.SUM_GATE(rev_pkg::SUM_HNG)) dut_hng (
    .a(a), .b(b), .cin(cin), .sum(s_h), .cout(c_h), .g_p(gp_h), .g_q(gq_h)
  );
  rev_full_adder #(.SUM_GATE(rev_pkg::SUM_TSG)) dut_tsg (
    .a(a), .b(b), .cin(cin), .sum(s_t), .cout(c_t), .g_p(gp_t), .g_q(gq_t)
  );

  task automatic check(input string what, input logic [1:0] got, input logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b cin=%b got %b expected %b", what, a, b, cin, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      check("HNG {cout,sum}", {c_h, s_h}, 2'(total));
      check("TSG {cout,sum}", {c_t, s_t}, 2'(total));
      check("HNG garbage", {gp_h, gq_h}, {a, b});
      check("TSG garbage", {gp_t, gq_t}, {a, a ^ b});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
