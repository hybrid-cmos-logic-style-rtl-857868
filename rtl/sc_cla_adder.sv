// sc_cla_adder: self-checking carry look-ahead adder.
//
// Adds two dual-rail WIDTH-bit operands with a dual-rail carry in. The bits are
// cut into groups of GROUP slices. Inside a group the slices are differential
// full adders that ripple both carry rails. The last slice of each group
// (cla_slice) makes only the true carry rail from the local propagate/generate
// signals and its incoming carry. The look-ahead unit computes the group's
// carry out from all p/g signals; its inverted copy is checked against the
// slice's carry as one dual-rail pair, and the look-ahead carry and its
// inverse then feed both carry rails of the next group. GROUP = 1 (the
// default) is the full look-ahead adder, where every slice is such a last
// slice.
//
// Checking: a double-rail checker on the WIDTH sum pairs (which also yields
// the sum parity for a parity-coded data path) and one on the WIDTH carry
// pairs, merged by one more checker cell into the error indication chk
// (chk.f != chk.fd means no error). Combinational, no clock.
module sc_cla_adder
  import sc_pkg::*;
#(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned GROUP = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] a_n,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] b_n,
  input  logic             cin,
  input  logic             cin_n,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] s_n,
  output logic             cout,
  output logic             parity,
  output tworail_t         chk
);
  localparam int unsigned NGROUPS = WIDTH / GROUP;

  logic [WIDTH:0]         c, c_n;    // carry rails entering each slice
  logic [WIDTH-1:0]       p, g;
  logic [WIDTH-1:0]       ck, ck_n;  // checked carry pairs
  logic [NGROUPS:1]       gc;
  tworail_t               sum_chk, carry_chk;
  logic                   carry_par;

  assign c[0]   = cin;
  assign c_n[0] = cin_n;

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    logic p_n_i, g_n_i;
    if ((i + 1) % GROUP == 0) begin : g_last
      logic co_local;
      cla_slice u_slice (
        .a(a[i]), .a_n(a_n[i]), .b(b[i]), .b_n(b_n[i]),
        .c(c[i]), .c_n(c_n[i]),
        .s(s[i]), .s_n(s_n[i]), .co(co_local),
        .p(p[i]), .p_n(p_n_i), .g(g[i]), .g_n(g_n_i)
      );
      // Both rails of the next slice come from the look-ahead carry.
      assign c[i+1]   = gc[(i+1)/GROUP];
      assign c_n[i+1] = ~gc[(i+1)/GROUP];
      assign ck[i]    = co_local;
      assign ck_n[i]  = c_n[i+1];
    end else begin : g_inner
      diff_full_adder u_fa (
        .a(a[i]), .a_n(a_n[i]), .b(b[i]), .b_n(b_n[i]),
        .c(c[i]), .c_n(c_n[i]),
        .s(s[i]), .s_n(s_n[i]), .co(c[i+1]), .co_n(c_n[i+1]),
        .p(p[i]), .p_n(p_n_i), .g(g[i]), .g_n(g_n_i)
      );
      assign ck[i]   = c[i+1];
      assign ck_n[i] = c_n[i+1];
    end
  end

  cla_unit #(.WIDTH(WIDTH), .GROUP(GROUP)) u_cla (
    .p(p), .g(g), .c0(cin), .gc(gc)
  );

  two_rail_checker #(.N(WIDTH)) u_sum_chk (
    .x(s), .y(s_n), .chk(sum_chk), .parity(parity)
  );

  two_rail_checker #(.N(WIDTH)) u_carry_chk (
    .x(ck), .y(ck_n), .chk(carry_chk), .parity(carry_par)
  );

  two_rail_cell u_merge (
    .x(sum_chk.f), .xd(sum_chk.fd), .y(carry_chk.f), .yd(carry_chk.fd),
    .f(chk.f), .fd(chk.fd)
  );

  assign cout = c[WIDTH];
endmodule
