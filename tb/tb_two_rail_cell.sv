// tb_two_rail_cell: exhaustive test of the two-rail checker cell.
// The output pair must be a code word exactly when both input pairs are, and
// on code inputs f must equal x xor y (the parity property).
module tb_two_rail_cell;
  int checks = 0, failures = 0;
  logic x, xd, y, yd, f, fd;

  two_rail_cell dut (.x(x), .xd(xd), .y(y), .yd(yd), .f(f), .fd(fd));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic in_ok;
      {x, xd, y, yd} = 4'(v);
      #1;
      in_ok = (x != xd) && (y != yd);
      checks++;
      if ((f != fd) != in_ok) begin
        failures++;
        $display("FAIL %b: f=%b fd=%b", 4'(v), f, fd);
      end
      if (in_ok) begin
        checks++;
        if (f != (x ^ y)) begin
          failures++;
          $display("FAIL parity %b: f=%b", 4'(v), f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
