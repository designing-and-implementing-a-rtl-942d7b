// two_rail_cell: one two-input two-rail checker cell.
//
// Takes two two-rail pairs (a0, b0) and (a1, b1), each of which should hold
// complementary values, and reduces them to one two-rail pair (f, g):
//   f = a0 & a1 | b0 & b1
//   g = a0 & b1 | b0 & a1
// (f, g) is complementary when both inputs are, and 00 or 11 as soon as
// either input pair is 00 or 11. This is the textbook totally self-checking
// cell; the design description names the two-rail checker but does not draw
// its gates. Purely combinational.
module two_rail_cell (
  input  logic a0,
  input  logic b0,
  input  logic a1,
  input  logic b1,
  output logic f,
  output logic g
);

  assign f = (a0 & a1) | (b0 & b1);
  assign g = (a0 & b1) | (b0 & a1);

endmodule
