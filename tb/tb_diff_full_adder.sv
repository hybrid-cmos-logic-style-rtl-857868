// tb_diff_full_adder: exhaustive test of the differential full adder on all
// eight code inputs (sum, carry, propagate and generate rails), plus the
// detection of a non-code operand pair on the sum rails.
module tb_diff_full_adder;
  int checks = 0, failures = 0;
  logic a, a_n, b, b_n, c, c_n;
  logic s, s_n, co, co_n, p, p_n, g, g_n;

  diff_full_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(c), .c_n(c_n),
    .s(s), .s_n(s_n), .co(co), .co_n(co_n), .p(p), .p_n(p_n), .g(g), .g_n(g_n)
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
      if (s !== sum[0] || s_n !== ~sum[0] || co !== sum[1] || co_n !== ~sum[1] ||
          p !== (a ^ b) || p_n !== ~(a ^ b) || g !== (a & b) || g_n !== ~(a & b)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b: s=%b/%b co=%b/%b p=%b/%b g=%b/%b",
                 a, b, c, s, s_n, co, co_n, p, p_n, g, g_n);
      end
      // Corrupt the a pair: the sum pair must become non-code.
      a_n = a;
      #1;
      checks++;
      if (s != s_n) begin
        failures++;
        $display("FAIL non-code a not seen on sum: a=%b b=%b c=%b", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
