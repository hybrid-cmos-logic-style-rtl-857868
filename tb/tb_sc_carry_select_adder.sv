// tb_sc_carry_select_adder: 16-bit carry-select adder with blocks of 4 (its
// default). Checks sum, carry out, the selected parity and a clean error
// indication; counts selections of the carry-1 and carry-0 results; then
// corrupts one operand pair and expects a non-code error indication.
module tb_sc_carry_select_adder;
  import sc_pkg::*;
  localparam int W = 16, B = 4;
  int checks = 0, failures = 0, sel1 = 0, sel0 = 0;

  logic [W-1:0] a, a_n, b, b_n, s;
  logic         cin, cin_n, cout, par;
  tworail_t     chk;

  sc_carry_select_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin), .cin_n(cin_n),
    .s(s), .cout(cout), .parity(par), .chk(chk)
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
      int i;
      a = 16'($urandom); b = (n % 3 == 0) ? ~a : 16'($urandom);
      cin = 1'($urandom);
      a_n = ~a; b_n = ~b; cin_n = ~cin;
      #1;
      r = 17'(a) + 17'(b) + 17'(cin);
      checks++;
      if ({cout, s} !== r || par !== ^s || !tr_ok(chk)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b: s=%h cout=%b par=%b chk=%b%b",
                 a, b, cin, s, cout, par, chk.f, chk.fd);
      end
      for (int k = 1; k < W / B; k++) begin
        logic [W:0]   lo;
        logic [W-1:0] m;
        m  = 16'((1 << (k * B)) - 1);
        lo = 17'(a & m) + 17'(b & m) + 17'(cin);
        if (lo[k*B]) sel1++; else sel0++;
      end
      i = $urandom_range(W - 1);
      if (n % 2 == 0) a_n[i] = a[i]; else b_n[i] = b[i];
      #1;
      checks++;
      if (tr_ok(chk)) begin
        failures++;
        $display("FAIL error missed at bit %0d", i);
      end
    end
    checks += 2;
    if (sel1 == 0) begin failures++; $display("FAIL carry-1 result never selected"); end
    if (sel0 == 0) begin failures++; $display("FAIL carry-0 result never selected"); end
    $display("selected carry-1 blocks %0d, carry-0 blocks %0d", sel1, sel0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
