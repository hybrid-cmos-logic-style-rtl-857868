// tb_skip_full_adder: exhaustive test of the carry-skip slice on code inputs
// (single-rail sum, both carry rails, p/g rails).
module tb_skip_full_adder;
  int checks = 0, failures = 0;
  logic a, a_n, b, b_n, c, c_n, s, co, co_n, p, p_n, g, g_n;

  skip_full_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(c), .c_n(c_n),
    .s(s), .co(co), .co_n(co_n), .p(p), .p_n(p_n), .g(g), .g_n(g_n)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] sum;
      {a, b, c} = 3'(v);
      a_n = ~a; b_n = ~b; c_n = ~c;
      #1;
      sum = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if (s !== sum[0] || co !== sum[1] || co_n !== ~sum[1] ||
          p !== (a ^ b) || p_n !== ~(a ^ b) || g !== (a & b) || g_n !== ~(a & b)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b: s=%b co=%b/%b", a, b, c, s, co, co_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
