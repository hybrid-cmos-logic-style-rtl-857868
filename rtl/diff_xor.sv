// diff_xor: differential (dual-rail) XOR gate.
//
// Inputs are two dual-rail bits (a, a_n) and (b, b_n); outputs are the pair
// p = a xor b and p_n = its complement. The gate models the four-transistor
// complementary pass-transistor XOR: each output rail is a two-way pass network
// that steers one of the two a-rails under control of a b-rail. The p rail is
// steered by b and the p_n rail by b_n, so the two outputs are computed by
// separate paths and a non-code input (a == a_n) gives a non-code output
// (p == p_n). In the adders the same gate also forms the sum (a = P, b = carry).
// Combinational, no clock.
module diff_xor (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic p,
  output logic p_n
);
  // b = 1 passes the a_n rail, b = 0 passes the a rail.
  assign p   = b   ? a_n : a;
  // b_n = 1 (b = 0) passes a_n, b_n = 0 (b = 1) passes a.
  assign p_n = b_n ? a_n : a;
endmodule
