// tb_rev_bin2gray: exhaustive test of the 8-bit reversible binary-to-Gray
// converter. For every input, decoding the output back to binary (running
// XOR from the top bit down) must return the input, successive inputs must
// give codes that differ in exactly one bit, and the garbage outputs must
// be {a[7], a[7:1]}.
module tb_rev_bin2gray;
  logic [7:0] a, gray, g_p, prev;
  int         checks = 0, failures = 0;

  rev_bin2gray dut (.a(a), .gray(gray), .g_p(g_p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    for (int v = 0; v < 256; v++) begin
      logic [7:0] back;
      a = 8'(v);
      #1;
      back[7] = gray[7];
      for (int i = 6; i >= 0; i--) back[i] = back[i+1] ^ gray[i];
      checks++;
      if (back !== a) begin
        failures++;
        $display("FAIL a=%h gray=%h decodes to %h", a, gray, back);
      end
      if (v > 0) begin
        checks++;
        if ($countones(gray ^ prev) != 1) begin
          failures++;
          $display("FAIL codes of %0d and %0d differ in more than one bit", v - 1, v);
        end
      end
      checks++;
      if (g_p !== {a[7], a[7:1]}) begin
        failures++;
        $display("FAIL a=%h garbage=%h", a, g_p);
      end
      prev = gray;
    end
    // Published example: 8'h24 -> 8'h36, garbage 8'h12.
    a = 8'h24;
    #1;
    checks++;
    if (gray !== 8'h36 || g_p !== 8'h12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
