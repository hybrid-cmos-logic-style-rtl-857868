// two_rail_cell: totally self-checking two-rail checker cell.
//
// Takes two dual-rail pairs (x, xd) and (y, yd) and compresses them into one
// output pair (f, fd). The output is a code word (01 or 10) exactly when both
// input pairs are code words; any non-code input pair gives 00 or 11. It is two
// AND-OR-invert gates (four transistors per input pair, sixteen in static CMOS):
//   f  = ~(x & y  | xd & yd)
//   fd = ~(x & yd | xd & y)
// For code inputs f = x xor y, so a tree of these cells over the true rails of
// a word yields the word's parity on f. The polarity of f and fd is this
// design's choice; the error/valid table is the standard one.
// Combinational, no clock.
module two_rail_cell (
  input  logic x,
  input  logic xd,
  input  logic y,
  input  logic yd,
  output logic f,
  output logic fd
);
  assign f  = ~((x & y)  | (xd & yd));
  assign fd = ~((x & yd) | (xd & y));
endmodule
