// cla_slice: last slice of a carry look-ahead group (every slice in a full
// carry look-ahead adder).
//
// Like the differential full adder it forms the dual-rail propagate pair, the
// generate pair and the dual-rail sum from the incoming carry pair (c, c_n).
// Unlike it, it produces only one carry rail, co = ~(G_n & (P_n | c_n)). The
// look-ahead unit computes the same carry a second way; the adder inverts that
// copy and checks the two as a dual-rail pair, so the look-ahead unit is
// checked without being duplicated. p and g go to the look-ahead unit.
// Combinational, no clock.
module cla_slice (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic c,
  input  logic c_n,
  output logic s,
  output logic s_n,
  output logic co,
  output logic p,
  output logic p_n,
  output logic g,
  output logic g_n
);
  logic x2, x2_n;

  diff_xor u_xor1 (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .p(p), .p_n(p_n));
  diff_xor u_xor2 (.a(p), .a_n(p_n), .b(c), .b_n(c_n), .p(x2), .p_n(x2_n));

  assign s   = ~x2_n;
  assign s_n = ~x2;

  assign g   = ~(a_n | b_n);
  assign g_n = ~(a & b);

  assign co  = ~(g_n & (p_n | c_n));
endmodule
