// and_matrix -- conjunctive (AND) matrix of a custom-made PLA-style array.
//
// Every input is available in true and complemented form, so the array has
// 2*NIN columns and NTERM rows; its size is the 2*inputs*rows crosspoint
// count of the area estimate. A crosspoint is programmed by TRUE_SEL (the
// input itself takes part in the product) or COMP_SEL (its complement takes
// part). Row h outputs the product of all programmed literals; a row with no
// programmed literal outputs 1.
//
// Interface: in[NIN-1:0] -> term[NTERM-1:0]. Purely combinational.
// The matrix type follows the published realization (matrices M1 and M3); the
// parameter encoding of the crosspoints is this design's own. The default
// personality is a 2-to-4 decoder.
module and_matrix #(
  parameter int unsigned NIN   = 2,
  parameter int unsigned NTERM = 4,
  parameter logic [NTERM-1:0][NIN-1:0] TRUE_SEL = {2'b11, 2'b10, 2'b01, 2'b00},
  parameter logic [NTERM-1:0][NIN-1:0] COMP_SEL = {2'b00, 2'b01, 2'b10, 2'b11}
) (
  input  logic [NIN-1:0]   in,
  output logic [NTERM-1:0] term
);

  always_comb begin
    for (int h = 0; h < NTERM; h++) begin
      term[h] = &((in | ~TRUE_SEL[h]) & (~in | ~COMP_SEL[h]));
    end
  end

endmodule
