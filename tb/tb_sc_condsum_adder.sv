// tb_sc_condsum_adder: 16-bit self-checking conditional-sum adder (default).
// Checks sum, carry out, every per-bit checker and the merged indication;
// then corrupts one operand pair and expects both that bit's checker and the
// merged indication to flag it.
module tb_sc_condsum_adder;
  import sc_pkg::*;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic [W-1:0] a, a_n, b, b_n, s;
  logic         cin, cout;
  tworail_t     bit_chk [W];
  tworail_t     chk;

  sc_condsum_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin),
    .s(s), .cout(cout), .bit_chk(bit_chk), .chk(chk)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [W:0] r;
      logic       all_ok;
      int         i;
      a = 16'($urandom); b = (n % 3 == 0) ? ~a : 16'($urandom);
      cin = 1'($urandom);
      a_n = ~a; b_n = ~b;
      #1;
      r = 17'(a) + 17'(b) + 17'(cin);
      all_ok = 1'b1;
      for (int k = 0; k < W; k++) all_ok &= tr_ok(bit_chk[k]);
      checks++;
      if ({cout, s} !== r || !all_ok || !tr_ok(chk)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b: s=%h cout=%b", a, b, cin, s, cout);
      end
      i = $urandom_range(W - 1);
      if (n % 2 == 0) a_n[i] = a[i]; else b_n[i] = b[i];
      #1;
      checks++;
      if (tr_ok(bit_chk[i]) || tr_ok(chk)) begin
        failures++;
        $display("FAIL error missed at bit %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
