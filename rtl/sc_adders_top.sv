// sc_adders_top: the four self-checking fast adders side by side.
//
// Each adder has its own dual-rail operand ports and its own outputs, so they
// can be exercised independently:
//   cla_*  carry look-ahead adder (full look-ahead at CLA_GROUP = 1)
//   skp_*  carry-skip adder
//   sel_*  carry-select adder
//   cnd_*  conditional-sum adder (single-rail carry in)
// Operands arrive as (x, x_n) pairs that must be complementary; each adder
// reports its own error indication *_chk (a two-rail pair, valid when f != fd)
// and, where the scheme defines one, the parity that accompanies the sum into
// a parity-checked data path. All paths are combinational; there is no clock.
// Widths: 64 bits for the look-ahead adder (the largest size it is costed at)
// and 16 bits for the others; block sizes of 4 for carry skip and carry select
// are this design's choice.
module sc_adders_top
  import sc_pkg::*;
#(
  parameter int unsigned CLA_WIDTH  = 64,
  parameter int unsigned CLA_GROUP  = 1,
  parameter int unsigned SKP_WIDTH  = 16,
  parameter int unsigned SKP_BLOCK  = 4,
  parameter int unsigned SEL_WIDTH  = 16,
  parameter int unsigned SEL_BLOCK  = 4,
  parameter int unsigned CND_WIDTH  = 16
) (
  // carry look-ahead
  input  logic [CLA_WIDTH-1:0]           cla_a,
  input  logic [CLA_WIDTH-1:0]           cla_a_n,
  input  logic [CLA_WIDTH-1:0]           cla_b,
  input  logic [CLA_WIDTH-1:0]           cla_b_n,
  input  logic                           cla_cin,
  input  logic                           cla_cin_n,
  output logic [CLA_WIDTH-1:0]           cla_s,
  output logic [CLA_WIDTH-1:0]           cla_s_n,
  output logic                           cla_cout,
  output logic                           cla_parity,
  output tworail_t                       cla_chk,
  // carry skip
  input  logic [SKP_WIDTH-1:0]           skp_a,
  input  logic [SKP_WIDTH-1:0]           skp_a_n,
  input  logic [SKP_WIDTH-1:0]           skp_b,
  input  logic [SKP_WIDTH-1:0]           skp_b_n,
  input  logic                           skp_cin,
  input  logic                           skp_cin_n,
  output logic [SKP_WIDTH-1:0]           skp_s,
  output logic                           skp_cout,
  output logic                           skp_parity,
  output logic [SKP_WIDTH/SKP_BLOCK-1:0] skp_skipped,
  output tworail_t                       skp_chk,
  // carry select
  input  logic [SEL_WIDTH-1:0]           sel_a,
  input  logic [SEL_WIDTH-1:0]           sel_a_n,
  input  logic [SEL_WIDTH-1:0]           sel_b,
  input  logic [SEL_WIDTH-1:0]           sel_b_n,
  input  logic                           sel_cin,
  input  logic                           sel_cin_n,
  output logic [SEL_WIDTH-1:0]           sel_s,
  output logic                           sel_cout,
  output logic                           sel_parity,
  output tworail_t                       sel_chk,
  // conditional sum
  input  logic [CND_WIDTH-1:0]           cnd_a,
  input  logic [CND_WIDTH-1:0]           cnd_a_n,
  input  logic [CND_WIDTH-1:0]           cnd_b,
  input  logic [CND_WIDTH-1:0]           cnd_b_n,
  input  logic                           cnd_cin,
  output logic [CND_WIDTH-1:0]           cnd_s,
  output logic                           cnd_cout,
  output tworail_t                       cnd_bit_chk [CND_WIDTH],
  output tworail_t                       cnd_chk
);
  sc_cla_adder #(.WIDTH(CLA_WIDTH), .GROUP(CLA_GROUP)) u_cla (
    .a(cla_a), .a_n(cla_a_n), .b(cla_b), .b_n(cla_b_n),
    .cin(cla_cin), .cin_n(cla_cin_n),
    .s(cla_s), .s_n(cla_s_n), .cout(cla_cout), .parity(cla_parity), .chk(cla_chk)
  );

  sc_carry_skip_adder #(.WIDTH(SKP_WIDTH), .BLOCK(SKP_BLOCK)) u_skp (
    .a(skp_a), .a_n(skp_a_n), .b(skp_b), .b_n(skp_b_n),
    .cin(skp_cin), .cin_n(skp_cin_n),
    .s(skp_s), .cout(skp_cout), .parity(skp_parity), .skipped(skp_skipped),
    .chk(skp_chk)
  );

  sc_carry_select_adder #(.WIDTH(SEL_WIDTH), .BLOCK(SEL_BLOCK)) u_sel (
    .a(sel_a), .a_n(sel_a_n), .b(sel_b), .b_n(sel_b_n),
    .cin(sel_cin), .cin_n(sel_cin_n),
    .s(sel_s), .cout(sel_cout), .parity(sel_parity), .chk(sel_chk)
  );

  sc_condsum_adder #(.WIDTH(CND_WIDTH)) u_cnd (
    .a(cnd_a), .a_n(cnd_a_n), .b(cnd_b), .b_n(cnd_b_n), .cin(cnd_cin),
    .s(cnd_s), .cout(cnd_cout), .bit_chk(cnd_bit_chk), .chk(cnd_chk)
  );
endmodule
