// tb_condsum_cell: exhaustive test of the conditional-sum cell: both
// conditional sums and carries, and the identities the checks rely on.
module tb_condsum_cell;
  int checks = 0, failures = 0;
  logic a, a_n, b, b_n, s0, s1, c0, c1;

  condsum_cell dut (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .s0(s0), .s1(s1), .c0(c0), .c1(c1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] r0, r1;
      {a, b} = 2'(v);
      a_n = ~a; b_n = ~b;
      #1;
      r0 = 2'(a) + 2'(b);
      r1 = 2'(a) + 2'(b) + 2'd1;
      checks++;
      if (s0 !== r0[0] || c0 !== r0[1] || s1 !== r1[0] || c1 !== r1[1] ||
          s1 !== ~s0 || c1 !== (c0 | s0)) begin
        failures++;
        $display("FAIL a=%b b=%b: s0=%b s1=%b c0=%b c1=%b", a, b, s0, s1, c0, c1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
