// condsum_2bit: two-bit self-checking conditional-sum module.
//
// Each bit i has a conditional-sum cell and two selection multiplexers driven
// by the real carry into the bit: S_i = c_i ? S_i^1 : S_i^0 and
// c_(i+1) = c_i ? C_(i+1)^1 : C_(i+1)^0. Bit 1 is selected by bit 0's carry,
// so the module passes the carry on through multiplexers only.
//
// Checking, one double-rail checker per bit:
//   pair x(2i)   = S_i^0,                    y(2i)   = S_i^1
//   pair x(2i+1) = NOR(C_(i+1)^0, S_i^0),    y(2i+1) = C_(i+1)^1
// Both pairs are complementary in a fault-free cell (S^1 = ~S^0 and
// C^1 = C^0 | S^0). chk[0] is bit 0's checker output (f1, f0 in the usual
// labelling) and chk[1] is bit 1's (f3, f2); each is valid when f != fd.
// The multiplexers are not dual-rail checked: a faulty sum multiplexer is left
// to the parity check of the surrounding data path, and a faulty carry
// multiplexer corrupts the next bits' sums. Combinational, no clock.
module condsum_2bit
  import sc_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] a_n,
  input  logic [1:0] b,
  input  logic [1:0] b_n,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout,
  output tworail_t   chk [2]
);
  logic [2:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < 2; i++) begin : g_bit
    logic s0, s1, c0, c1, nor_c;
    logic par;

    condsum_cell u_cell (
      .a(a[i]), .a_n(a_n[i]), .b(b[i]), .b_n(b_n[i]),
      .s0(s0), .s1(s1), .c0(c0), .c1(c1)
    );

    assign s[i]   = c[i] ? s1 : s0;
    assign c[i+1] = c[i] ? c1 : c0;

    assign nor_c = ~(c0 | s0);

    two_rail_checker #(.N(2)) u_chk (
      .x({nor_c, s0}), .y({c1, s1}), .chk(chk[i]), .parity(par)
    );
  end

  assign cout = c[2];
endmodule
