// two_rail_checker: word-level double-rail checker.
//
// Compares an N-bit word x with a word y that should be its complement and
// delivers one error-indication pair: chk.f != chk.fd when every bit pair is
// complementary, chk.f == chk.fd otherwise. The cells form a balanced binary
// tree (heap order: node k has children 2k+1 and 2k+2, leaves are the input
// pairs), which keeps the depth at ceil(log2 N) cells.
//
// Because each cell computes f = xor of its inputs' f rails on code words, the
// root f equals the parity (xor) of x. It is brought out as `parity`, so a
// dual-rail word leaving this checker can enter a parity-checked data path
// without a separate code translator.
// Combinational, no clock.
module two_rail_checker
  import sc_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output tworail_t     chk,
  output logic         parity
);
  localparam int unsigned NODES = 2 * N - 1;

  logic [NODES-1:0] nf;
  logic [NODES-1:0] nfd;

  // Leaves: the input pairs.
  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign nf[N-1+i]  = x[i];
    assign nfd[N-1+i] = y[i];
  end

  // Internal nodes: one checker cell each.
  for (genvar k = 0; k + 1 < N; k++) begin : g_node
    two_rail_cell u_cell (
      .x (nf[2*k+1]),
      .xd(nfd[2*k+1]),
      .y (nf[2*k+2]),
      .yd(nfd[2*k+2]),
      .f (nf[k]),
      .fd(nfd[k])
    );
  end

  assign chk.f  = nf[0];
  assign chk.fd = nfd[0];
  assign parity = nf[0];
endmodule
