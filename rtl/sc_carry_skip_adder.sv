// sc_carry_skip_adder: self-checking carry-skip adder.
//
// Adds two dual-rail WIDTH-bit operands with a dual-rail carry in. The slices
// (skip_full_adder) are cut into blocks of BLOCK bits that ripple both carry
// rails. At the end of a block spanning bits lo..hi, with carry in Cj:
//   SP_n  = ~(Cj & p[lo] & ... & p[hi])     skip signal (NAND)
//   C'    = ~(SP_n & C_n[hi+1])             = SP | C[hi+1]   (NAND)
//   C'_n  = ~C'                             (inverter)
// C' equals the rippled carry C[hi+1] but is faster when the whole block
// propagates. The pair (C[hi+1], C'_n) is checked as dual rail, and C', C'_n
// become both carry rails of the next block; the last block's C' is cout.
//
// Checking: every rippled carry pair inside the blocks and every block-end pair
// (C, C'_n) go to one double-rail checker (error indication chk, valid when
// chk.f != chk.fd). The single-rail sums are covered by parity prediction:
// `parity` is the xor of both operands' true rails and all slice carry-ins,
// which equals the parity of a correct sum; a downstream parity checker
// compares it with the sum bits. The prediction deliberately avoids the
// propagate nets: a stuck propagate net would flip a sum bit and a prediction
// built from that net alike, and the error would go unseen. The output `skipped` flags blocks whose carry
// actually went through the skip path (Cj = 1 and all p = 1); it is for
// observation only. Combinational, no clock.
module sc_carry_skip_adder
  import sc_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       a_n,
  input  logic [WIDTH-1:0]       b,
  input  logic [WIDTH-1:0]       b_n,
  input  logic                   cin,
  input  logic                   cin_n,
  output logic [WIDTH-1:0]       s,
  output logic                   cout,
  output logic                   parity,
  output logic [WIDTH/BLOCK-1:0] skipped,
  output tworail_t               chk
);
  localparam int unsigned NBLK = WIDTH / BLOCK;

  logic [WIDTH:0]   c, c_n;    // carry rails entering each slice
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] ck, ck_n;  // checked carry pairs, one per slice
  logic             chk_par;

  assign c[0]   = cin;
  assign c_n[0] = cin_n;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLOCK;
    localparam int unsigned HI = k * BLOCK + BLOCK - 1;
    logic [BLOCK:0] rc, rc_n;  // rippled carries inside the block
    logic           sp_n, cp, cp_n;

    assign rc[0]   = c[LO];
    assign rc_n[0] = c_n[LO];

    for (genvar i = 0; i < BLOCK; i++) begin : g_bit
      logic p_n_i, g_i, g_n_i;
      skip_full_adder u_fa (
        .a(a[LO+i]), .a_n(a_n[LO+i]), .b(b[LO+i]), .b_n(b_n[LO+i]),
        .c(rc[i]), .c_n(rc_n[i]),
        .s(s[LO+i]), .co(rc[i+1]), .co_n(rc_n[i+1]),
        .p(p[LO+i]), .p_n(p_n_i), .g(g_i), .g_n(g_n_i)
      );
      if (i + 1 < BLOCK) begin : g_pass
        assign c[LO+i+1]   = rc[i+1];
        assign c_n[LO+i+1] = rc_n[i+1];
        assign ck[LO+i]    = rc[i+1];
        assign ck_n[LO+i]  = rc_n[i+1];
      end
    end

    assign sp_n = ~(c[LO] & (&p[HI:LO]));
    assign cp   = ~(sp_n & rc_n[BLOCK]);
    assign cp_n = ~cp;

    assign c[HI+1]   = cp;
    assign c_n[HI+1] = cp_n;
    assign ck[HI]    = rc[BLOCK];
    assign ck_n[HI]  = cp_n;

    assign skipped[k] = ~sp_n;
  end

  two_rail_checker #(.N(WIDTH)) u_chk (
    .x(ck), .y(ck_n), .chk(chk), .parity(chk_par)
  );

  assign parity = (^a) ^ (^b) ^ (^c[WIDTH-1:0]);
  assign cout   = c[WIDTH];
endmodule
