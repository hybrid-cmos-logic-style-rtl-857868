// diff_full_adder: fully differential full adder.
//
// All inputs and outputs are dual-rail: operands (a, a_n), (b, b_n), carry in
// (c, c_n); sum (s, s_n), carry out (co, co_n). A first differential XOR forms
// the propagate pair P = a xor b; a second one forms a xor b xor c from P and
// the carry pair, and a pair of restoring inverters drives the sum rails. The
// generate pair is G = NOR(a_n, b_n) = a.b and G_n = NAND(a, b). The two carry
// rails come from separate complex gates so that a single fault can corrupt
// only one of them:
//   co_n = ~(G | P & c)         (AND-OR-invert)
//   co   = ~(G_n & (P_n | c_n)) (OR-AND-invert)
// P and G are also outputs, for the fast-carry schemes built on this cell.
// Which rail each gate reads follows the adder's figure; the gate forms of the
// two carry gates are this design's reading. Combinational, no clock.
module diff_full_adder (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic c,
  input  logic c_n,
  output logic s,
  output logic s_n,
  output logic co,
  output logic co_n,
  output logic p,
  output logic p_n,
  output logic g,
  output logic g_n
);
  logic x2, x2_n;

  diff_xor u_xor1 (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .p(p), .p_n(p_n));
  diff_xor u_xor2 (.a(p), .a_n(p_n), .b(c), .b_n(c_n), .p(x2), .p_n(x2_n));

  // Restoring inverters on the pass-transistor outputs.
  assign s   = ~x2_n;
  assign s_n = ~x2;

  assign g    = ~(a_n | b_n);
  assign g_n  = ~(a & b);

  assign co_n = ~(g | (p & c));
  assign co   = ~(g_n & (p_n | c_n));
endmodule
