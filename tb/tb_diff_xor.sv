// tb_diff_xor: exhaustive test of the differential XOR.
// For every code input pair the outputs must be a xor b and its complement;
// for a non-code a pair (a == a_n) the outputs must be non-code (p == p_n).
module tb_diff_xor;
  int checks = 0, failures = 0;
  logic a, a_n, b, b_n, p, p_n;

  diff_xor dut (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .p(p), .p_n(p_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, a_n, b, b_n} = 4'(v);
      #1;
      if (b != b_n) begin
        checks++;
        if (a != a_n) begin
          if (p !== (a ^ b) || p_n !== ~(a ^ b)) begin
            failures++;
            $display("FAIL code in %b: p=%b p_n=%b", 4'(v), p, p_n);
          end
        end else if (p != p_n) begin
          failures++;
          $display("FAIL non-code a not propagated %b: p=%b p_n=%b", 4'(v), p, p_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
