// sc_carry_select_adder: self-checking carry-select adder.
//
// Adds two dual-rail WIDTH-bit operands with a dual-rail carry in. The first
// BLOCK bits are a dual-rail ripple adder fed by the carry in. Every later block
// holds two dual-rail ripple adders, one with its carry in tied to 0 and one
// tied to 1 (constant inputs the synthesis tool simplifies). The real carry
// into the block, produced by the previous block's carry multiplexer, selects
// one result through a sum multiplexer and a carry multiplexer.
//
// The block carry is kept in dual rail: a second carry multiplexer, steered by
// the complement rail of the incoming block carry, selects between the
// complement carry outputs of the two ripple adders.
//
// Checking: all sum pairs and carry pairs of every ripple adder, and the
// dual-rail block carries, go to one double-rail checker (error indication
// chk, valid when chk.f != chk.fd). The sum multiplexers are single rail and
// are covered by parity: each ripple adder's
// sum checker yields the parity of its sums, that parity is selected by its
// own multiplexer alongside the sums, and `parity` is the xor of the selected
// block parities. A fault in a sum multiplexer makes the sum disagree with
// `parity` in the downstream parity-checked data path.
// The block size BLOCK, the dual-rail block carry and the parity selection are
// this design's choices. Combinational, no clock.
module sc_carry_select_adder
  import sc_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] a_n,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] b_n,
  input  logic             cin,
  input  logic             cin_n,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic             parity,
  output tworail_t         chk
);
  localparam int unsigned NBLK  = WIDTH / BLOCK;
  // Checked pairs: block 0 has BLOCK sums + BLOCK carries, each later block
  // twice that; then one block-carry pair per later block.
  localparam int unsigned NRCA  = 2 * BLOCK * (2 * NBLK - 1);
  localparam int unsigned NCHK  = NRCA + NBLK - 1;

  logic [NBLK:0]      bc, bc_n;    // real carry into each block, dual rail
  logic [NBLK-1:0]    bpar;        // selected parity of each block
  logic [NCHK-1:0]    cx, cy;      // all checked pairs
  logic               chk_par;

  assign bc[0]   = cin;
  assign bc_n[0] = cin_n;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLOCK;
    if (k == 0) begin : g_first
      logic [BLOCK-1:0] s0, s0_n, p0, g0;
      logic [BLOCK:0]   c0, c0_n;
      logic             par0;
      tworail_t         sc0;
      sc_ripple_adder #(.WIDTH(BLOCK)) u_rca (
        .a(a[LO+:BLOCK]), .a_n(a_n[LO+:BLOCK]), .b(b[LO+:BLOCK]), .b_n(b_n[LO+:BLOCK]),
        .cin(cin), .cin_n(cin_n),
        .s(s0), .s_n(s0_n), .c(c0), .c_n(c0_n), .p(p0), .g(g0)
      );
      two_rail_checker #(.N(BLOCK)) u_par0 (.x(s0), .y(s0_n), .chk(sc0), .parity(par0));
      assign s[LO+:BLOCK] = s0;
      assign bc[1]        = c0[BLOCK];
      assign bc_n[1]      = c0_n[BLOCK];
      assign bpar[0]      = par0;
      assign cx[0+:2*BLOCK] = {c0[BLOCK:1],   s0};
      assign cy[0+:2*BLOCK] = {c0_n[BLOCK:1], s0_n};
    end else begin : g_sel
      localparam int unsigned CB = 2 * BLOCK * (2 * k - 1);  // first checked pair
      logic [BLOCK-1:0] sz, sz_n, so, so_n, pz, gz, po, go;
      logic [BLOCK:0]   cz, cz_n, co, co_n;
      logic             parz, paro;
      tworail_t         scz, sco;
      // Ripple adder assuming carry in 0.
      sc_ripple_adder #(.WIDTH(BLOCK)) u_rca0 (
        .a(a[LO+:BLOCK]), .a_n(a_n[LO+:BLOCK]), .b(b[LO+:BLOCK]), .b_n(b_n[LO+:BLOCK]),
        .cin(1'b0), .cin_n(1'b1),
        .s(sz), .s_n(sz_n), .c(cz), .c_n(cz_n), .p(pz), .g(gz)
      );
      // Ripple adder assuming carry in 1.
      sc_ripple_adder #(.WIDTH(BLOCK)) u_rca1 (
        .a(a[LO+:BLOCK]), .a_n(a_n[LO+:BLOCK]), .b(b[LO+:BLOCK]), .b_n(b_n[LO+:BLOCK]),
        .cin(1'b1), .cin_n(1'b0),
        .s(so), .s_n(so_n), .c(co), .c_n(co_n), .p(po), .g(go)
      );
      two_rail_checker #(.N(BLOCK)) u_parz (.x(sz), .y(sz_n), .chk(scz), .parity(parz));
      two_rail_checker #(.N(BLOCK)) u_paro (.x(so), .y(so_n), .chk(sco), .parity(paro));

      // Selection by the real carry into the block.
      assign s[LO+:BLOCK] = bc[k] ? so : sz;
      assign bc[k+1]      = bc[k] ? co[BLOCK] : cz[BLOCK];
      assign bc_n[k+1]    = bc_n[k] ? cz_n[BLOCK] : co_n[BLOCK];
      assign bpar[k]      = bc[k] ? paro : parz;

      assign cx[CB+:4*BLOCK] = {co[BLOCK:1],   so,   cz[BLOCK:1],   sz};
      assign cy[CB+:4*BLOCK] = {co_n[BLOCK:1], so_n, cz_n[BLOCK:1], sz_n};
    end
  end

  // Block-carry pairs into blocks 1 .. NBLK-1 and the carry out.
  if (NBLK > 1) begin : g_bc_chk
    assign cx[NRCA+:NBLK-1] = bc[NBLK:2];
    assign cy[NRCA+:NBLK-1] = bc_n[NBLK:2];
  end

  two_rail_checker #(.N(NCHK)) u_chk (.x(cx), .y(cy), .chk(chk), .parity(chk_par));

  assign parity = ^bpar;
  assign cout   = bc[NBLK];
endmodule
