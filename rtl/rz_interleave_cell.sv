// rz_interleave_cell: one cell of the common field generator.
//
// With its enable E set the cell places one bit of each coordinate side by side, v above u,
// forming two bits of the interleaved texel index; with E clear it outputs zeros so that the
// differential field can occupy those positions. Purely combinational.
module rz_interleave_cell (
  input  logic       e,   // enable from the enable encoder
  input  logic       u,   // u coordinate bit i
  input  logic       v,   // v coordinate bit i
  output logic [1:0] a    // index bits 2i+1 (v) and 2i (u)
);
  assign a = e ? {v, u} : 2'b00;
endmodule
