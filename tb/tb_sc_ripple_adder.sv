// tb_sc_ripple_adder: exhaustive test of the 4-bit dual-rail ripple adder
// (its default width): sums, every carry pair, and p/g against a reference.
module tb_sc_ripple_adder;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic [W-1:0] a, a_n, b, b_n, s, s_n, p, g;
  logic         cin, cin_n;
  logic [W:0]   c, c_n;

  sc_ripple_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin), .cin_n(cin_n),
    .s(s), .s_n(s_n), .c(c), .c_n(c_n), .p(p), .g(g)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [W:0] ref_sum;
      {a, b, cin} = 9'(v);
      a_n = ~a; b_n = ~b; cin_n = ~cin;
      #1;
      ref_sum = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      checks++;
      if (s !== ref_sum[W-1:0] || c[W] !== ref_sum[W] || s_n !== ~s ||
          c_n !== ~c || p !== (a ^ b) || g !== (a & b)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b: s=%h cout=%b c=%b c_n=%b", a, b, cin, s, c[W], c, c_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
