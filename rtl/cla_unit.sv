// cla_unit: carry look-ahead unit.
//
// From the per-bit propagate p[i] and generate g[i] signals and the carry in c0
// it computes, for every group boundary, the carry into that bit position:
//   gc[k] = carry into bit k*GROUP
//         = OR over j < n of ( g[j] & p[j+1] & ... & p[n-1] ) | p[0] & ... & p[n-1] & c0,
//   with n = k*GROUP.
// Each carry is a flat two-level sum of products, so its delay does not grow
// with the carry chain. GROUP = 1 gives a carry for every bit (full look-ahead);
// a larger GROUP gives carries only at group boundaries (group look-ahead).
// The flat two-level form is this design's choice; only the unit's function is
// fixed. Combinational, no clock.
module cla_unit #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned GROUP = 1
) (
  input  logic [WIDTH-1:0]       p,
  input  logic [WIDTH-1:0]       g,
  input  logic                   c0,
  output logic [WIDTH/GROUP:1]   gc
);
  localparam int unsigned NGROUPS = WIDTH / GROUP;

  for (genvar k = 1; k <= NGROUPS; k++) begin : g_carry
    localparam int unsigned N = k * GROUP;
    logic [N:0] term;  // term[j]: generate at j propagated to N; term[N]: c0 path

    for (genvar j = 0; j <= N; j++) begin : g_term
      if (j == N) begin : g_cin
        assign term[j] = c0 & (&p[N-1:0]);
      end else if (j == N - 1) begin : g_last
        assign term[j] = g[j];
      end else begin : g_mid
        assign term[j] = g[j] & (&p[N-1:j+1]);
      end
    end

    assign gc[k] = |term;
  end
endmodule
