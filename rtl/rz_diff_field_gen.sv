// rz_diff_field_gen: differential field generator of the recursive-Z address translation.
//
// When one side of the texture is longer, its coordinate has bits left over after the k
// interleaved pairs; they sit above the interleaved field. A 2:1 mux picks the coordinate of
// the longer side (u when m >= n, else v), the bit filter clears its k interleaved low bits
// using the enable pattern, and the left shifter moves the rest up by k, so bit j >= k of the
// coordinate lands at index bit j + k. For m = 7, n = 3 this gives u6 u5 u4 u3 0 0 0 0 0 0.
// For a square texture the selected coordinate has no bits at or above k and the field is 0.
// Purely combinational.
module rz_diff_field_gen #(
  parameter int COORD_W = 16,
  parameter int LOGW    = $clog2(COORD_W + 1)
) (
  input  logic                 m_ge_n,   // take u (1) or v (0)
  input  logic [LOGW-1:0]      k,        // shift amount = interleaved bit count
  input  logic [COORD_W-1:0]   en,       // bit filter mask (k low ones)
  input  logic [COORD_W-1:0]   u,
  input  logic [COORD_W-1:0]   v,
  output logic [2*COORD_W-1:0] field
);
  logic [COORD_W-1:0] sel, filtered;
  always_comb begin
    sel      = m_ge_n ? u : v;
    filtered = sel & ~en;
    field    = {{COORD_W{1'b0}}, filtered} << k;
  end
endmodule
