// sc_ripple_adder: dual-rail ripple-carry adder.
//
// WIDTH differential full adders in a chain; every signal between them is a
// dual-rail pair. Outputs are the sum rails, the carry rails at every slice
// boundary (c[0] is the carry in, c[WIDTH] the carry out) and the per-bit
// propagate/generate signals. No checker is included: the instantiating adder
// chooses which pairs to check. Combinational, no clock.
module sc_ripple_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] a_n,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] b_n,
  input  logic             cin,
  input  logic             cin_n,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] s_n,
  output logic [WIDTH:0]   c,
  output logic [WIDTH:0]   c_n,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);
  assign c[0]   = cin;
  assign c_n[0] = cin_n;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    logic p_n_i, g_n_i;
    diff_full_adder u_fa (
      .a   (a[i]),   .a_n (a_n[i]),
      .b   (b[i]),   .b_n (b_n[i]),
      .c   (c[i]),   .c_n (c_n[i]),
      .s   (s[i]),   .s_n (s_n[i]),
      .co  (c[i+1]), .co_n(c_n[i+1]),
      .p   (p[i]),   .p_n (p_n_i),
      .g   (g[i]),   .g_n (g_n_i)
    );
  end
endmodule
