// tb_cla_slice: exhaustive test of the look-ahead slice on code inputs, and
// detection of a non-code operand pair on its sum rails.
module tb_cla_slice;
  int checks = 0, failures = 0;
  logic a, a_n, b, b_n, c, c_n, s, s_n, co, p, p_n, g, g_n;

  cla_slice dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .c(c), .c_n(c_n),
    .s(s), .s_n(s_n), .co(co), .p(p), .p_n(p_n), .g(g), .g_n(g_n)
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
      if (s !== sum[0] || s_n !== ~sum[0] || co !== sum[1] ||
          p !== (a ^ b) || p_n !== ~(a ^ b) || g !== (a & b) || g_n !== ~(a & b)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b: s=%b/%b co=%b", a, b, c, s, s_n, co);
      end
      b_n = b;
      #1;
      checks++;
      if (s != s_n) begin
        failures++;
        $display("FAIL non-code b not seen on sum");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
