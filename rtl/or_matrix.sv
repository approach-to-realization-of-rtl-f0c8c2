// or_matrix -- disjunctive (OR) matrix of a custom-made PLA-style array.
//
// NIN input lines cross NOUT output columns; SEL[j][i] = 1 programs the
// crosspoint that connects line i to output j. Output j is the OR of its
// connected lines, so the array has NIN*NOUT crosspoints, as in the area
// estimate for matrices M2, M4 and M5.
//
// Interface: in[NIN-1:0] -> out[NOUT-1:0]. Purely combinational.
// The matrix type follows the published realization; the crosspoint encoding
// is this design's own. The default personality is a 4-to-2 encoder.
module or_matrix #(
  parameter int unsigned NIN  = 4,
  parameter int unsigned NOUT = 2,
  parameter logic [NOUT-1:0][NIN-1:0] SEL = {4'b1100, 4'b1010}
) (
  input  logic [NIN-1:0]  in,
  output logic [NOUT-1:0] out
);

  always_comb begin
    for (int j = 0; j < NOUT; j++) begin
      out[j] = |(in & SEL[j]);
    end
  end

endmodule
