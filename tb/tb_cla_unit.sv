// tb_cla_unit: carry look-ahead unit at its default (16 bits, full look-ahead)
// and with groups of 4, against carries rippled bit by bit in the testbench.
module tb_cla_unit;
  int checks = 0, failures = 0;
  logic [15:0] p, g;
  logic        c0;
  logic [16:1] gc1;
  logic [4:1]  gc4;

  cla_unit                 dut1 (.p(p), .g(g), .c0(c0), .gc(gc1));
  cla_unit #(.GROUP(4))    dut4 (.p(p), .g(g), .c0(c0), .gc(gc4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [16:0] rc;
      p  = 16'($urandom);
      g  = 16'($urandom) & 16'($urandom) & ~p;  // p and g exclusive, as from an adder
      if (n % 4 == 0) begin p = 16'hFFFF; g = 0; end
      c0 = 1'($urandom);
      #1;
      rc[0] = c0;
      for (int i = 0; i < 16; i++) rc[i+1] = g[i] | (p[i] & rc[i]);
      checks++;
      if (gc1 !== rc[16:1]) begin
        failures++;
        $display("FAIL full p=%h g=%h c0=%b: gc=%h ref=%h", p, g, c0, gc1, rc[16:1]);
      end
      checks++;
      if (gc4 !== {rc[16], rc[12], rc[8], rc[4]}) begin
        failures++;
        $display("FAIL group p=%h g=%h c0=%b: gc=%b", p, g, c0, gc4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
