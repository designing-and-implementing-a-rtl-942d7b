// berger_csg: Berger check symbol generator (CSG).
//
// Counts the ones in the N-bit register word and gives the count in binary
// (the new check symbol, NCS). For N = 4 the count runs from 0 to 4 and needs
// three bits. The generator is purely combinational: NCS follows the register
// outputs in the same clock cycle. The design description gives only what the
// generator computes; the adder chain used here is this design's choice.
//
// Interface: data[N-1:0] in, ncs[CW-1:0] out, CW = ceil(log2(N+1)).
module berger_csg
  import berger_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned CW = check_width(N)
) (
  input  logic [N-1:0]  data,
  output logic [CW-1:0] ncs
);

  always_comb begin
    ncs = '0;
    for (int unsigned i = 0; i < N; i++) begin
      ncs = ncs + CW'(data[i]);
    end
  end

endmodule
