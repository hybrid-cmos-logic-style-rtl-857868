// tb_sc_adders_top: end-to-end test of the four self-checking adders at the
// top's default sizes (64-bit look-ahead, 16-bit skip, select and
// conditional-sum adders).
//
// Every vector is applied to all four adders. Each result is compared with a
// reference sum, the parity outputs with the parity of the sum, and every
// error indication must be a code word. A second phase corrupts one input rail
// per adder and expects that adder's error indication to turn non-code.
// Counted mechanisms, each of which must occur at least once:
//   full carry propagation through the look-ahead adder, a carry taken by the
//   skip path, a carry-select block choosing its carry-1 and its carry-0
//   result, a conditional-sum multiplexer driven by a carry of 1, and a
//   detected error in each adder.
module tb_sc_adders_top;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  int n_cla_prop = 0, n_skip = 0, n_sel1 = 0, n_sel0 = 0, n_cnd1 = 0;
  int n_det_cla = 0, n_det_skp = 0, n_det_sel = 0, n_det_cnd = 0;

  logic [63:0] cla_a, cla_a_n, cla_b, cla_b_n, cla_s, cla_s_n;
  logic        cla_cin, cla_cin_n, cla_cout, cla_parity;
  tworail_t    cla_chk;
  logic [15:0] skp_a, skp_a_n, skp_b, skp_b_n, skp_s;
  logic        skp_cin, skp_cin_n, skp_cout, skp_parity;
  logic [3:0]  skp_skipped;
  tworail_t    skp_chk;
  logic [15:0] sel_a, sel_a_n, sel_b, sel_b_n, sel_s;
  logic        sel_cin, sel_cin_n, sel_cout, sel_parity;
  tworail_t    sel_chk;
  logic [15:0] cnd_a, cnd_a_n, cnd_b, cnd_b_n, cnd_s;
  logic        cnd_cin, cnd_cout;
  tworail_t    cnd_bit_chk [16];
  tworail_t    cnd_chk;

  sc_adders_top dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic drive(input logic [63:0] a, input logic [63:0] b, input logic cin);
    cla_a = a;        cla_b = b;        cla_cin = cin;
    skp_a = a[15:0];  skp_b = b[15:0];  skp_cin = cin;
    sel_a = a[31:16]; sel_b = b[31:16]; sel_cin = cin;
    cnd_a = a[47:32]; cnd_b = b[47:32]; cnd_cin = cin;
    cla_a_n = ~cla_a; cla_b_n = ~cla_b; cla_cin_n = ~cla_cin;
    skp_a_n = ~skp_a; skp_b_n = ~skp_b; skp_cin_n = ~skp_cin;
    sel_a_n = ~sel_a; sel_b_n = ~sel_b; sel_cin_n = ~sel_cin;
    cnd_a_n = ~cnd_a; cnd_b_n = ~cnd_b;
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [63:0] a, b;
      logic        cin;
      logic [64:0] r;
      logic [16:0] rs, rl, rc;
      a = {$urandom, $urandom};
      case (n % 4)
        0: b = ~a;                                  // every bit propagates
        1: b = ~a ^ (64'd1 << $urandom_range(63));  // one generate or kill
        default: b = {$urandom, $urandom};
      endcase
      cin = 1'($urandom);
      drive(a, b, cin);
      #1;

      // Carry look-ahead adder.
      r = 65'(cla_a) + 65'(cla_b) + 65'(cla_cin);
      check({cla_cout, cla_s} === r && cla_s_n === ~cla_s, "cla sum");
      check(cla_parity === ^cla_s, "cla parity");
      check(tr_ok(cla_chk), "cla false alarm");
      if (&(cla_a ^ cla_b) && cla_cin) n_cla_prop++;

      // Carry-skip adder.
      rs = 17'(skp_a) + 17'(skp_b) + 17'(skp_cin);
      check({skp_cout, skp_s} === rs, "skip sum");
      check(skp_parity === ^skp_s, "skip parity");
      check(tr_ok(skp_chk), "skip false alarm");
      if (|skp_skipped) n_skip++;

      // Carry-select adder.
      rl = 17'(sel_a) + 17'(sel_b) + 17'(sel_cin);
      check({sel_cout, sel_s} === rl, "select sum");
      check(sel_parity === ^sel_s, "select parity");
      check(tr_ok(sel_chk), "select false alarm");
      for (int k = 1; k < 4; k++) begin
        logic [16:0]  lo;
        logic [15:0]  m;
        m  = 16'((1 << (4 * k)) - 1);
        lo = 17'(sel_a & m) + 17'(sel_b & m) + 17'(sel_cin);
        if (lo[4*k]) n_sel1++; else n_sel0++;
      end

      // Conditional-sum adder.
      rc = 17'(cnd_a) + 17'(cnd_b) + 17'(cnd_cin);
      check({cnd_cout, cnd_s} === rc, "condsum sum");
      check(tr_ok(cnd_chk), "condsum false alarm");
      for (int k = 1; k < 8; k++) begin
        logic [16:0] lo;
        logic [15:0] m;
        m  = 16'((1 << (2 * k)) - 1);
        lo = 17'(cnd_a & m) + 17'(cnd_b & m) + 17'(cnd_cin);
        if (lo[2*k]) n_cnd1++;
      end

      // Error phase: one corrupted input rail per adder.
      begin
        int i;
        i = $urandom_range(63);
        cla_a_n[i] = cla_a[i];
        // skip adder: carry-in pair with bit 0 propagating
        skp_a[0] = ~skp_b[0]; skp_a_n[0] = skp_b[0]; skp_cin_n = skp_cin;
        sel_b_n[i % 16] = sel_b[i % 16];
        cnd_a_n[i % 16] = cnd_a[i % 16];
        #1;
        check(!tr_ok(cla_chk), "cla error missed");
        check(!tr_ok(skp_chk), "skip error missed");
        check(!tr_ok(sel_chk), "select error missed");
        check(!tr_ok(cnd_chk), "condsum error missed");
        if (!tr_ok(cla_chk)) n_det_cla++;
        if (!tr_ok(skp_chk)) n_det_skp++;
        if (!tr_ok(sel_chk)) n_det_sel++;
        if (!tr_ok(cnd_chk)) n_det_cnd++;
      end
    end

    $display("cla full propagation %0d, skip path %0d, select carry-1 %0d, carry-0 %0d, condsum carry-1 select %0d",
             n_cla_prop, n_skip, n_sel1, n_sel0, n_cnd1);
    $display("errors detected: cla %0d, skip %0d, select %0d, condsum %0d",
             n_det_cla, n_det_skp, n_det_sel, n_det_cnd);
    check(n_cla_prop > 0, "cla full propagation never happened");
    check(n_skip > 0, "skip path never used");
    check(n_sel1 > 0, "carry-1 result never selected");
    check(n_sel0 > 0, "carry-0 result never selected");
    check(n_cnd1 > 0, "condsum carry-1 selection never happened");
    check(n_det_cla > 0 && n_det_skp > 0 && n_det_sel > 0 && n_det_cnd > 0,
          "an adder never detected an error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
