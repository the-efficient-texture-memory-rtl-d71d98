// rz_xlate_core: combinational recursive-Z address translation, A' = RZ(m, n, U, V).
//
// The texel index of a 2^m x 2^n texture is built from two fields that never overlap and are
// merged with a bitwise OR (no adder):
//   common field       v_(k-1) u_(k-1) ... v_0 u_0, k = min(m,n)  (rz_common_field_gen)
//   differential field the leftover high bits of the longer side's coordinate, shifted up
//                      by k                                      (rz_diff_field_gen)
// The four least significant bits are then rewritten for the RZU/RZFU/RZS4 placements
// (rz_placement_remap). Coordinates are first wrapped to the texture size (u mod 2^m,
// v mod 2^n); the wrap is this design's own choice, so that neighbours of an edge texel stay
// inside the texture. Inputs: log2 dimensions m, n, coordinates u, v and the placement;
// output: the texel index A' (not yet scaled to bytes or offset by the base address).
module rz_xlate_core
#(
  parameter int COORD_W = 16,
  parameter int LOGW    = $clog2(COORD_W + 1)
) (
  input  logic [LOGW-1:0]      m,
  input  logic [LOGW-1:0]      n,
  input  logic [COORD_W-1:0]   u,
  input  logic [COORD_W-1:0]   v,
  input  tex_pkg::placement_e           placement,
  output logic [2*COORD_W-1:0] a_idx
);
  logic [LOGW-1:0]      k;
  logic                 m_ge_n;
  logic [COORD_W-1:0]   en, mask_m, mask_n, uw, vw;
  logic [2*COORD_W-1:0] common_f, diff_f, merged;
  logic [3:0]           low_rz, low_pl;

  // coordinate wrap: keep the low m (n) bits
  always_comb begin
    for (int i = 0; i < COORD_W; i++) begin
      mask_m[i] = (LOGW'(i) < m);
      mask_n[i] = (LOGW'(i) < n);
    end
    uw = u & mask_m;
    vw = v & mask_n;
  end

  rz_compare_select #(.LOGW(LOGW)) u_cmp (.m(m), .n(n), .k(k), .m_ge_n(m_ge_n));

  rz_enable_encoder #(.COORD_W(COORD_W), .LOGW(LOGW)) u_enc (.k(k), .en(en));

  rz_common_field_gen #(.COORD_W(COORD_W)) u_common (
    .en(en), .u(uw), .v(vw), .field(common_f)
  );

  rz_diff_field_gen #(.COORD_W(COORD_W), .LOGW(LOGW)) u_diff (
    .m_ge_n(m_ge_n), .k(k), .en(en), .u(uw), .v(vw), .field(diff_f)
  );

  assign merged = common_f | diff_f;
  assign low_rz = merged[3:0];

  rz_placement_remap #(.LOGW(LOGW)) u_remap (
    .placement(placement), .k(k), .u(uw[1:0]), .v(vw[1:0]),
    .low_in(low_rz), .low_out(low_pl)
  );

  assign a_idx = {merged[2*COORD_W-1:4], low_pl};
endmodule
