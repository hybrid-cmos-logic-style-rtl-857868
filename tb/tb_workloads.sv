// tb_workloads: the adder sizes the schemes are evaluated at.
//   - carry look-ahead adder at 8, 16, 32 and 64 bits (the transistor-count
//     comparison sizes), random operands plus all-propagate vectors;
//   - two-bit versions of the look-ahead, carry-skip (one 2-bit block) and
//     conditional-sum adders, the size their circuit simulations use, run
//     exhaustively over all operand and carry-in combinations.
// Every result is compared with a reference sum and every error indication
// must be a code word.
module tb_workloads;
  import sc_pkg::*;
  int checks = 0, failures = 0;

  // Look-ahead adders at the four sizes, all fed from one 64-bit vector.
  logic [63:0] a, b;
  logic        cin;
  logic [7:0]  s8,  s8n;   logic co8,  p8;  tworail_t k8;
  logic [15:0] s16, s16n;  logic co16, p16; tworail_t k16;
  logic [31:0] s32, s32n;  logic co32, p32; tworail_t k32;
  logic [63:0] s64, s64n;  logic co64, p64; tworail_t k64;

  sc_cla_adder #(.WIDTH(8))  u8  (.a(a[7:0]),  .a_n(~a[7:0]),  .b(b[7:0]),  .b_n(~b[7:0]),
                                  .cin(cin), .cin_n(~cin), .s(s8),  .s_n(s8n),  .cout(co8),  .parity(p8),  .chk(k8));
  sc_cla_adder #(.WIDTH(16)) u16 (.a(a[15:0]), .a_n(~a[15:0]), .b(b[15:0]), .b_n(~b[15:0]),
                                  .cin(cin), .cin_n(~cin), .s(s16), .s_n(s16n), .cout(co16), .parity(p16), .chk(k16));
  sc_cla_adder #(.WIDTH(32)) u32 (.a(a[31:0]), .a_n(~a[31:0]), .b(b[31:0]), .b_n(~b[31:0]),
                                  .cin(cin), .cin_n(~cin), .s(s32), .s_n(s32n), .cout(co32), .parity(p32), .chk(k32));
  sc_cla_adder               u64 (.a(a), .a_n(~a), .b(b), .b_n(~b),
                                  .cin(cin), .cin_n(~cin), .s(s64), .s_n(s64n), .cout(co64), .parity(p64), .chk(k64));

  // Two-bit adders.
  logic [1:0] a2, b2, sc2, sc2n, ss2, sd2;
  logic       c2, cc2, cs2, cd2, pc2, ps2;
  logic [0:0] sk2;
  tworail_t   kc2, ks2;
  tworail_t   kd2 [2];

  sc_cla_adder #(.WIDTH(2)) u_cla2 (.a(a2), .a_n(~a2), .b(b2), .b_n(~b2), .cin(c2), .cin_n(~c2),
                                    .s(sc2), .s_n(sc2n), .cout(cc2), .parity(pc2), .chk(kc2));
  sc_carry_skip_adder #(.WIDTH(2), .BLOCK(2)) u_skp2 (.a(a2), .a_n(~a2), .b(b2), .b_n(~b2), .cin(c2), .cin_n(~c2),
                                    .s(ss2), .cout(cs2), .parity(ps2), .skipped(sk2), .chk(ks2));
  condsum_2bit u_cnd2 (.a(a2), .a_n(~a2), .b(b2), .b_n(~b2), .cin(c2), .s(sd2), .cout(cd2), .chk(kd2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b", what, a, b, cin);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a   = {$urandom, $urandom};
      b   = (n % 4 == 0) ? ~a : {$urandom, $urandom};
      cin = 1'($urandom);
      #1;
      check({co8,  s8}  === 9'(a[7:0])   + 9'(b[7:0])   + 9'(cin) && tr_ok(k8)  && p8  === ^s8,  "cla 8");
      check({co16, s16} === 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin) && tr_ok(k16) && p16 === ^s16, "cla 16");
      check({co32, s32} === 33'(a[31:0]) + 33'(b[31:0]) + 33'(cin) && tr_ok(k32) && p32 === ^s32, "cla 32");
      check({co64, s64} === 65'(a)       + 65'(b)       + 65'(cin) && tr_ok(k64) && p64 === ^s64, "cla 64");
    end
    for (int v = 0; v < 32; v++) begin
      logic [2:0] r;
      {a2, b2, c2} = 5'(v);
      #1;
      r = 3'(a2) + 3'(b2) + 3'(c2);
      check({cc2, sc2} === r && sc2n === ~sc2 && tr_ok(kc2), "cla 2-bit");
      check({cs2, ss2} === r && ps2 === ^ss2 && tr_ok(ks2), "skip 2-bit");
      check(sk2[0] === (c2 & (&(a2 ^ b2))), "skip 2-bit flag");
      check({cd2, sd2} === r && tr_ok(kd2[0]) && tr_ok(kd2[1]), "condsum 2-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
