// sc_condsum_adder: self-checking conditional-sum adder of WIDTH bits.
//
// WIDTH/2 two-bit conditional-sum modules in a chain: each module's carry out
// selects the next module's sums and carry. WIDTH must be even. The 2*(WIDTH/2)
// per-bit checker outputs are compressed by one further double-rail checker
// into a single error indication chk (valid when chk.f != chk.fd); the per-bit
// pairs are also brought out as bit_chk for diagnosis.
// Chaining the modules and merging their checker outputs are this design's
// choices. Combinational, no clock.
module sc_condsum_adder
  import sc_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] a_n,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] b_n,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output tworail_t         bit_chk [WIDTH],
  output tworail_t         chk
);
  localparam int unsigned NMOD = WIDTH / 2;

  logic [NMOD:0]    mc;
  logic [WIDTH-1:0] fx, fy;
  logic             par;

  assign mc[0] = cin;

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    tworail_t mchk [2];
    condsum_2bit u_mod (
      .a(a[2*m+:2]), .a_n(a_n[2*m+:2]), .b(b[2*m+:2]), .b_n(b_n[2*m+:2]),
      .cin(mc[m]), .s(s[2*m+:2]), .cout(mc[m+1]), .chk(mchk)
    );
    for (genvar i = 0; i < 2; i++) begin : g_pair
      assign bit_chk[2*m+i] = mchk[i];
      assign fx[2*m+i]      = mchk[i].f;
      assign fy[2*m+i]      = mchk[i].fd;
    end
  end

  two_rail_checker #(.N(WIDTH)) u_chk (.x(fx), .y(fy), .chk(chk), .parity(par));

  assign cout = mc[NMOD];
endmodule
