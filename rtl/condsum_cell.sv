// condsum_cell: conditional-sum cell.
//
// A modified full adder that computes one bit's sum and carry out for both
// possible carries in, from dual-rail operands:
//   s0 = a xor b        (sum if carry in = 0, the true rail of a diff XOR)
//   s1 = ~(a xor b)     (sum if carry in = 1, the complementary rail)
//   c0 = NOR(a_n, b_n)  = a & b   (carry out if carry in = 0)
//   c1 = NAND(a_n, b_n) = a | b   (carry out if carry in = 1)
// s0/s1 are complementary by construction and c1 = c0 | s0, which is what the
// two-rail checks of the conditional-sum module rely on. Combinational.
module condsum_cell (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic s0,
  output logic s1,
  output logic c0,
  output logic c1
);
  diff_xor u_xor (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .p(s0), .p_n(s1));

  assign c0 = ~(a_n | b_n);
  assign c1 = ~(a_n & b_n);
endmodule
