// rz_common_field_gen: common field generator of the recursive-Z address translation.
//
// COORD_W interleave cells side by side. Cell i takes u_i, v_i and enable E_i and drives
// index bits 2i+1..2i, so with the first k enables set the output is
// 0..0 v_(k-1) u_(k-1) ... v_1 u_1 v_0 u_0. Building the field from identical cells avoids a
// wide mux selected by k. Purely combinational.
module rz_common_field_gen #(
  parameter int COORD_W = 16
) (
  input  logic [COORD_W-1:0]   en,     // enable pattern (k low ones)
  input  logic [COORD_W-1:0]   u,
  input  logic [COORD_W-1:0]   v,
  output logic [2*COORD_W-1:0] field   // cross-interleaved low bits
);
  for (genvar i = 0; i < COORD_W; i++) begin : g_cell
    rz_interleave_cell u_cell (
      .e (en[i]),
      .u (u[i]),
      .v (v[i]),
      .a (field[2*i+1:2*i])
    );
  end
endmodule
