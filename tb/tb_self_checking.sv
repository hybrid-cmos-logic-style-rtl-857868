// tb_self_checking: stuck-at fault injection into the self-checking adders.
//
// Each fault forces one internal net of one adder to 0 or 1, applies the
// same set of operand vectors (random plus all-propagate ones) and then
// releases the net. For every vector the faulty adder's sum and carry out are
// compared with the reference sum, and the fault counts as detected when the
// adder's error indication is a non-code word or, for the adders that output
// a parity, when that parity disagrees with the sum (the check a parity-coded
// data path would make).
//
// Checks per fault:
//   - fault secure (look-ahead, carry-skip, carry-select adders): no vector
//     gives a wrong result without a detection;
//   - self-testing: at least one vector detects the fault, unless the fault
//     never changes any output (it is then reported as redundant).
// For the conditional-sum adder only self-testing is checked: its carry
// selection relies on a data-path parity check outside the adder.
module tb_self_checking;
  import sc_pkg::*;
  localparam int W = 16;
  int checks = 0, failures = 0, redundant = 0;

  logic [W-1:0] a, b;
  logic         cin;

  // Look-ahead adder, full (cla) and in groups of 4 (clg).
  logic [W-1:0] cla_s, cla_sn, clg_s, clg_sn, skp_s, sel_s, cnd_s;
  logic         cla_co, clg_co, skp_co, sel_co, cnd_co;
  logic         cla_p, clg_p, skp_p, sel_p;
  logic [3:0]   skp_k;
  tworail_t     cla_k, clg_k, skp_c, sel_c, cnd_c;
  tworail_t     cnd_b [W];

  sc_cla_adder #(.WIDTH(W)) cla (.a(a), .a_n(~a), .b(b), .b_n(~b), .cin(cin), .cin_n(~cin),
                                 .s(cla_s), .s_n(cla_sn), .cout(cla_co), .parity(cla_p), .chk(cla_k));
  sc_cla_adder #(.WIDTH(W), .GROUP(4)) clg (.a(a), .a_n(~a), .b(b), .b_n(~b), .cin(cin), .cin_n(~cin),
                                 .s(clg_s), .s_n(clg_sn), .cout(clg_co), .parity(clg_p), .chk(clg_k));
  sc_carry_skip_adder skp (.a(a), .a_n(~a), .b(b), .b_n(~b), .cin(cin), .cin_n(~cin),
                           .s(skp_s), .cout(skp_co), .parity(skp_p), .skipped(skp_k), .chk(skp_c));
  sc_carry_select_adder sel (.a(a), .a_n(~a), .b(b), .b_n(~b), .cin(cin), .cin_n(~cin),
                             .s(sel_s), .cout(sel_co), .parity(sel_p), .chk(sel_c));
  sc_condsum_adder cnd (.a(a), .a_n(~a), .b(b), .b_n(~b), .cin(cin),
                        .s(cnd_s), .cout(cnd_co), .bit_chk(cnd_b), .chk(cnd_c));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {CLA, CLG, SKP, SEL, CND} adder_e;

  // Apply the vector set to the adder under fault and judge the outcome.
  task automatic run(input string name, input adder_e which);
    int detected = 0, escaped = 0, changed = 0;
    for (int n = 0; n < 600; n++) begin
      logic [W:0] r, got;
      logic       det;
      if (n < 64) begin
        a = 16'($urandom); b = ~a; cin = n[0];
        if (n >= 32) b[n % W] = a[n % W];  // one generate or kill bit
      end else begin
        a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      end
      #1;
      r = 17'(a) + 17'(b) + 17'(cin);
      case (which)
        CLA:     begin got = {cla_co, cla_s}; det = !tr_ok(cla_k) || cla_p != ^cla_s || cla_sn != ~cla_s; end
        CLG:     begin got = {clg_co, clg_s}; det = !tr_ok(clg_k) || clg_p != ^clg_s || clg_sn != ~clg_s; end
        SKP:     begin got = {skp_co, skp_s}; det = !tr_ok(skp_c) || skp_p != ^skp_s; end
        SEL:     begin got = {sel_co, sel_s}; det = !tr_ok(sel_c) || sel_p != ^sel_s; end
        default: begin got = {cnd_co, cnd_s}; det = !tr_ok(cnd_c); end
      endcase
      if (det) detected++;
      if (got !== r) changed++;
      if (got !== r && !det) escaped++;
    end
    $display("%-34s detected %0d, wrong results %0d, undetected wrong %0d",
             name, detected, changed, escaped);
    if (which != CND) begin
      checks++;
      if (escaped != 0) begin
        failures++;
        $display("FAIL %s: not fault secure", name);
      end
    end
    if (detected == 0 && changed == 0) begin
      redundant++;
      $display("     %s has no effect on any output (redundant)", name);
    end else begin
      checks++;
      if (detected == 0) begin
        failures++;
        $display("FAIL %s: never detected", name);
      end
    end
  endtask

`define STUCK(SIG, NAME, WHICH) \
  begin force SIG = 1'b0; run({NAME, " s@0"}, WHICH); release SIG; end \
  begin force SIG = 1'b1; run({NAME, " s@1"}, WHICH); release SIG; end

  initial begin
    // Fault-free reference run: nothing may be flagged.
    for (int n = 0; n < 200; n++) begin
      a = 16'($urandom); b = (n % 2 == 0) ? ~a : 16'($urandom); cin = 1'($urandom);
      #1;
      checks++;
      if (!tr_ok(cla_k) || !tr_ok(clg_k) || !tr_ok(skp_c) || !tr_ok(sel_c) || !tr_ok(cnd_c)) begin
        failures++;
        $display("FAIL false alarm without a fault");
      end
    end

    // Look-ahead adder: look-ahead carries, slice carry, P, G, sum rails.
    `STUCK(cla.gc[1],  "cla look-ahead carry 1", CLA)
    `STUCK(cla.gc[8],  "cla look-ahead carry 8", CLA)
    `STUCK(cla.gc[16], "cla look-ahead carry 16", CLA)
    `STUCK(cla.g_slice[5].g_last.u_slice.co, "cla slice 5 carry", CLA)
    `STUCK(cla.g_slice[5].g_last.u_slice.p,  "cla slice 5 P", CLA)
    `STUCK(cla.g_slice[5].g_last.u_slice.g,  "cla slice 5 G", CLA)
    `STUCK(cla.g_slice[9].g_last.u_slice.s_n, "cla slice 9 sum_n", CLA)
    `STUCK(clg.gc[2],  "clg group carry 2", CLG)
    `STUCK(clg.g_slice[5].g_inner.u_fa.co,   "clg slice 5 carry", CLG)
    `STUCK(clg.g_slice[6].g_inner.u_fa.co_n, "clg slice 6 carry_n", CLG)

    // Carry-skip adder: skip term, merged carry, ripple rails, P, sum.
    `STUCK(skp.g_blk[1].sp_n,  "skip block 1 SP_n", SKP)
    `STUCK(skp.g_blk[1].cp,    "skip block 1 C'", SKP)
    `STUCK(skp.g_blk[2].cp_n,  "skip block 2 C'_n", SKP)
    `STUCK(skp.g_blk[1].rc[2], "skip block 1 ripple carry", SKP)
    `STUCK(skp.g_blk[1].rc_n[4], "skip block 1 end carry_n", SKP)
    `STUCK(skp.g_blk[2].g_bit[1].u_fa.p, "skip slice 9 P", SKP)
    `STUCK(skp.s[6], "skip sum 6", SKP)

    // Carry-select adder: block carries, sum multiplexer, parity, ripple rails.
    `STUCK(sel.bc[2],   "select block carry 2", SEL)
    `STUCK(sel.bc_n[3], "select block carry_n 3", SEL)
    `STUCK(sel.s[9],    "select sum 9", SEL)
    `STUCK(sel.bpar[1], "select block parity 1", SEL)
    `STUCK(sel.g_blk[2].g_sel.u_rca1.c[2], "select block 2 carry-1 ripple", SEL)

    // Conditional-sum adder: the cell outputs and the check NOR.
    `STUCK(cnd.g_mod[1].u_mod.g_bit[0].s0,    "condsum bit 2 S^0", CND)
    `STUCK(cnd.g_mod[1].u_mod.g_bit[0].s1,    "condsum bit 2 S^1", CND)
    `STUCK(cnd.g_mod[1].u_mod.g_bit[0].c0,    "condsum bit 2 C^0", CND)
    `STUCK(cnd.g_mod[1].u_mod.g_bit[0].c1,    "condsum bit 2 C^1", CND)
    `STUCK(cnd.g_mod[1].u_mod.g_bit[0].nor_c, "condsum bit 2 check NOR", CND)

    $display("redundant faults: %0d", redundant);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
