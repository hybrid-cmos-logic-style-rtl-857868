// tb_two_rail_checker: word-level double-rail checker at N = 2 (default) and
// N = 7. Complementary words must give a code word whose f equals the parity
// of x; a word with one or two corrupted bit pairs must give a non-code word.
module tb_two_rail_checker;
  import sc_pkg::*;
  int checks = 0, failures = 0;

  logic [1:0] x2, y2;
  logic [6:0] x7, y7;
  tworail_t   c2, c7;
  logic       p2, p7;

  two_rail_checker         dut2 (.x(x2), .y(y2), .chk(c2), .parity(p2));
  two_rail_checker #(.N(7)) dut7 (.x(x7), .y(y7), .chk(c7), .parity(p7));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // N = 2: all 16 input combinations.
    for (int v = 0; v < 16; v++) begin
      logic ok;
      {x2, y2} = 4'(v);
      #1;
      ok = ((x2 ^ y2) == 2'b11);
      checks++;
      if (tr_ok(c2) != ok || (ok && p2 != ^x2)) begin
        failures++;
        $display("FAIL N=2 x=%b y=%b chk=%b%b par=%b", x2, y2, c2.f, c2.fd, p2);
      end
    end
    // N = 7: random words, clean and with one or two corrupted pairs.
    for (int n = 0; n < 400; n++) begin
      x7 = 7'($urandom);
      y7 = ~x7;
      #1;
      checks++;
      if (!tr_ok(c7) || p7 != ^x7) begin
        failures++;
        $display("FAIL N=7 clean x=%b chk=%b%b par=%b", x7, c7.f, c7.fd, p7);
      end
      begin
        int i, j;
        i = $urandom_range(6);
        j = $urandom_range(6);
        if (n % 2 == 0) y7[i] = ~y7[i];
        else            x7[i] = ~x7[i];
        if (n % 3 == 0 && j != i) x7[j] = ~x7[j];
      end
      #1;
      checks++;
      if (tr_ok(c7)) begin
        failures++;
        $display("FAIL N=7 error missed x=%b y=%b", x7, y7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
