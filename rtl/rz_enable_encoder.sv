// rz_enable_encoder: turns the interleave count k into the enable bit pattern of the
// common field cells.
//
// Bit i of the pattern is set when i < k, so k = 3 gives ...000111: the cells of the three
// least significant coordinate bits interleave, the others output zero. The same pattern is
// the bit filter mask of the differential field generator. Purely combinational.
module rz_enable_encoder #(
  parameter int COORD_W = 16,
  parameter int LOGW    = $clog2(COORD_W + 1)
) (
  input  logic [LOGW-1:0]    k,     // number of interleaved bit pairs
  output logic [COORD_W-1:0] en     // thermometer code: k ones from bit 0
);
  always_comb begin
    for (int i = 0; i < COORD_W; i++)
      en[i] = (LOGW'(i) < k);
  end
endmodule
