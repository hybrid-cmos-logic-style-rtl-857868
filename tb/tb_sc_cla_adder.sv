// tb_sc_cla_adder: self-checking carry look-ahead adder at its default
// (64 bits, full look-ahead) and as a 16-bit adder with groups of 4.
// Checks the sum, carry out, sum rails, sum parity and a clean error
// indication against a reference sum; then corrupts one operand pair and
// expects the error indication to turn non-code.
module tb_sc_cla_adder;
  import sc_pkg::*;
  int checks = 0, failures = 0;

  logic [63:0] a, a_n, b, b_n, s, s_n;
  logic        cin, cin_n, cout, par;
  tworail_t    chk;

  logic [15:0] ga, ga_n, gb, gb_n, gs, gs_n;
  logic        gcout, gpar;
  tworail_t    gchk;

  sc_cla_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin), .cin_n(cin_n),
    .s(s), .s_n(s_n), .cout(cout), .parity(par), .chk(chk)
  );

  sc_cla_adder #(.WIDTH(16), .GROUP(4)) dutg (
    .a(ga), .a_n(ga_n), .b(gb), .b_n(gb_n), .cin(cin), .cin_n(cin_n),
    .s(gs), .s_n(gs_n), .cout(gcout), .parity(gpar), .chk(gchk)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [64:0] r;
      logic [16:0] gr;
      int          i;
      case (n % 5)
        0: begin a = {$urandom, $urandom}; b = ~a; end          // full propagate
        1: begin a = '1; b = 64'(n); end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      cin = 1'($urandom);
      ga = a[15:0]; gb = b[15:0];
      a_n = ~a; b_n = ~b; cin_n = ~cin; ga_n = ~ga; gb_n = ~gb;
      #1;
      r  = 65'(a) + 65'(b) + 65'(cin);
      gr = 17'(ga) + 17'(gb) + 17'(cin);
      checks++;
      if ({cout, s} !== r || s_n !== ~s || par !== ^s || !tr_ok(chk)) begin
        failures++;
        $display("FAIL 64b a=%h b=%h cin=%b: s=%h cout=%b par=%b chk=%b%b",
                 a, b, cin, s, cout, par, chk.f, chk.fd);
      end
      checks++;
      if ({gcout, gs} !== gr || gs_n !== ~gs || gpar !== ^gs || !tr_ok(gchk)) begin
        failures++;
        $display("FAIL 16b/4 a=%h b=%h cin=%b: s=%h cout=%b", ga, gb, cin, gs, gcout);
      end
      // Corrupt one operand pair.
      i = $urandom_range(63);
      if (n % 2 == 0) a_n[i] = a[i]; else b_n[i] = b[i];
      ga_n = ~ga; gb_n = ~gb;
      ga_n[i % 16] = ga[i % 16];
      #1;
      checks++;
      if (tr_ok(chk)) begin
        failures++;
        $display("FAIL 64b error missed at bit %0d", i);
      end
      checks++;
      if (tr_ok(gchk)) begin
        failures++;
        $display("FAIL 16b/4 error missed at bit %0d", i % 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
