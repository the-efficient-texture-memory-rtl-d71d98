// texel_selector: four independent texel muxes on the cache line buffer.
//
// Each mux picks one 32-bit texel out of the 2^LINE_LOG2 texels of the line buffer using its
// own offset, and marks it valid when its enable is set. With a 64-byte line each mux is 16:1.
// Follows the described design. Purely combinational.
module texel_selector
  import tex_pkg::*;
#(
  parameter int LINE_LOG2_P = LINE_LOG2
) (
  input  logic [(TEXEL_W << LINE_LOG2_P)-1:0] line,
  input  logic [3:0][LINE_LOG2_P-1:0]         off,    // offset of mux i
  input  logic [3:0]                          en,     // enable of mux i
  output logic [3:0][TEXEL_W-1:0]             texel,
  output logic [3:0]                          valid
);
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      texel[i] = line[off[i]*TEXEL_W +: TEXEL_W];
      valid[i] = en[i];
    end
  end
endmodule
