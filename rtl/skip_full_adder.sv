// skip_full_adder: simplified differential full adder of the carry-skip adder.
//
// The propagate pair (p, p_n), the generate pair and both carry rails are
// formed as in the fully differential full adder. The sum, however, is single
// rail: a two-transistor pass XOR selects p_n when the carry c is 0 and p when
// it is 1, and a restoring inverter gives s = p xor c. The carry-skip adder
// checks its carries in dual rail and covers the sums by parity prediction, so
// the complementary sum rail is not needed. Combinational, no clock.
module skip_full_adder (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic c,
  input  logic c_n,
  output logic s,
  output logic co,
  output logic co_n,
  output logic p,
  output logic p_n,
  output logic g,
  output logic g_n
);
  logic node;

  diff_xor u_xor (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .p(p), .p_n(p_n));

  assign node = c ? p : p_n;
  assign s    = ~node;

  assign g    = ~(a_n | b_n);
  assign g_n  = ~(a & b);

  assign co_n = ~(g | (p & c));
  assign co   = ~(g_n & (p_n | c_n));
endmodule
