// tb_condsum_2bit: exhaustive test of the two-bit conditional-sum module:
// sums, carry out and both checker outputs on code inputs; then each operand
// pair of each bit is corrupted in turn and that bit's checker must flag it.
module tb_condsum_2bit;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] a, a_n, b, b_n, s;
  logic       cin, cout;
  tworail_t   chk [2];

  condsum_2bit dut (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin), .s(s), .cout(cout), .chk(chk));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [2:0] r;
      {a, b, cin} = 5'(v);
      a_n = ~a; b_n = ~b;
      #1;
      r = 3'(a) + 3'(b) + 3'(cin);
      checks++;
      if ({cout, s} !== r || !tr_ok(chk[0]) || !tr_ok(chk[1])) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: s=%b cout=%b", a, b, cin, s, cout);
      end
      for (int i = 0; i < 2; i++) begin
        a_n = ~a; b_n = ~b;
        if (v % 2 == 0) a_n[i] = a[i]; else b_n[i] = b[i];
        #1;
        checks++;
        if (tr_ok(chk[i])) begin
          failures++;
          $display("FAIL bit %0d error missed a=%b b=%b", i, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
