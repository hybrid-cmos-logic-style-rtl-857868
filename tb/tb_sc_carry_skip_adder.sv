// tb_sc_carry_skip_adder: 16-bit carry-skip adder with blocks of 4 (its
// default). Checks sum, carry out, the predicted parity and a clean error
// indication; checks the skip flag of every block against the block's own
// propagate condition and counts how often the skip path carried the carry;
// then corrupts the carry-in pair with bit 0 propagating, which the carry
// checker must flag.
module tb_sc_carry_skip_adder;
  import sc_pkg::*;
  localparam int W = 16, B = 4;
  int checks = 0, failures = 0, skips = 0;

  logic [W-1:0]   a, a_n, b, b_n, s;
  logic           cin, cin_n, cout, par;
  logic [W/B-1:0] skipped;
  tworail_t       chk;

  sc_carry_skip_adder dut (
    .a(a), .a_n(a_n), .b(b), .b_n(b_n), .cin(cin), .cin_n(cin_n),
    .s(s), .cout(cout), .parity(par), .skipped(skipped), .chk(chk)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [W:0]   r, rc;
      logic [W-1:0] pp;
      case (n % 4)
        0: begin a = 16'($urandom); b = ~a; end
        1: begin a = 16'($urandom); b = ~a ^ 16'(1 << $urandom_range(15)); end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      cin = 1'($urandom);
      a_n = ~a; b_n = ~b; cin_n = ~cin;
      #1;
      r  = 17'(a) + 17'(b) + 17'(cin);
      pp = a ^ b;
      rc[0] = cin;
      for (int i = 0; i < W; i++) rc[i+1] = (a[i] & b[i]) | (pp[i] & rc[i]);
      checks++;
      if ({cout, s} !== r || par !== ^s || !tr_ok(chk)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b: s=%h cout=%b par=%b chk=%b%b",
                 a, b, cin, s, cout, par, chk.f, chk.fd);
      end
      for (int k = 0; k < W / B; k++) begin
        logic exp_skip;
        exp_skip = rc[k*B] & (&pp[k*B+:B]);
        checks++;
        if (skipped[k] !== exp_skip) begin
          failures++;
          $display("FAIL skip flag block %0d a=%h b=%h", k, a, b);
        end
        if (exp_skip) skips++;
      end
      // Corrupt the carry-in pair while bit 0 propagates.
      a[0] = ~b[0]; a_n[0] = b[0];
      cin_n = cin;
      #1;
      checks++;
      if (tr_ok(chk)) begin
        failures++;
        $display("FAIL error on carry in missed a=%h b=%h cin=%b", a, b, cin);
      end
    end
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL skip path never used");
    end
    $display("skip path used %0d times", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
