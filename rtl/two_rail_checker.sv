// two_rail_checker: the two-rail checker (TRC) that closes the loop of the
// self-checking shifter.
//
// Bit i of the generated check symbol (NCS) and bit i of the stored,
// complemented reference (~RFCS) form a two-rail pair. When the register
// word has exactly as many ones as predicted, every pair is complementary
// and the checker outputs (F, G) are 01 or 10. Any mismatch gives 00 or 11.
// The result is encoded on two rails rather than one wire so that a stuck
// output line cannot fake a "good" result. The pairs are reduced by a chain
// of two_rail_cell instances (W-1 cells for W pairs). The checker's role and
// its F, G outputs follow the design description; the cell and the chain
// are this design's choice.
//
// Interface: x = true rail (NCS), y = complement rail (stored ~RFCS).
// Combinational: F, G follow x and y in the same cycle.
module two_rail_checker #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         f,
  output logic         g
);

  logic [W-1:0] fc;
  logic [W-1:0] gc;

  assign fc[0] = x[0];
  assign gc[0] = y[0];

  for (genvar i = 1; i < W; i++) begin : g_chain
    two_rail_cell u_cell (
      .a0(fc[i-1]), .b0(gc[i-1]),
      .a1(x[i]),    .b1(y[i]),
      .f (fc[i]),   .g (gc[i])
    );
  end

  assign f = fc[W-1];
  assign g = gc[W-1];

endmodule
