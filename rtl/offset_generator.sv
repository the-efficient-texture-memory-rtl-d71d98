// offset_generator: line offsets of the implicit texels of a cache access.
//
// For the explicit texel (u,v) it gives the position inside the cache line of its right
// neighbour (offset2), lower neighbour (offset3) and diagonal neighbour (offset4). The offset
// of a texel is the low LINE_LOG2 bits of its placement index, and those bits depend only on
// the low LINE_LOG2 bits of u and v and on m, n clamped to LINE_LOG2. So three copies of the
// recursive-Z translation logic, LINE_LOG2 bits wide, compute the offsets from the incremented
// low coordinate bits. For a 4x4 region under RZ this yields exactly
//   offset2 = v1 (u1^u0) v0 ~u0, offset3 = (v1^v0) u1 ~v0 u0, offset4 = (v1^v0) (u1^u0) ~v0 ~u0,
// and the matching equations of the 8x2, 2x8, 16x1 and 1x16 regions; it also serves the
// RZU/RZFU/RZS4 placements. Deriving the offsets with the translation logic instead of
// separate hand-minimised equations is this design's choice. Offsets of neighbours that lie in
// another line are computed too and ignored by the enables. The texture base address must be
// line aligned. Purely combinational.
module offset_generator
  import tex_pkg::*;
#(
  parameter int LINE_LOG2_P = LINE_LOG2
) (
  input  logic [LOGW-1:0]        m,
  input  logic [LOGW-1:0]        n,
  input  logic [COORD_W-1:0]     u,
  input  logic [COORD_W-1:0]     v,
  input  placement_e             placement,
  output logic [LINE_LOG2_P-1:0] off2,   // (u+1, v)
  output logic [LINE_LOG2_P-1:0] off3,   // (u, v+1)
  output logic [LINE_LOG2_P-1:0] off4    // (u+1, v+1)
);
  localparam int LW = $clog2(LINE_LOG2_P + 1);
  localparam logic [LOGW-1:0] LMAX = LOGW'(LINE_LOG2_P);

  logic [LW-1:0]          mc, nc;
  logic [LINE_LOG2_P-1:0] u_lo, v_lo, u_nx, v_nx;
  logic [2*LINE_LOG2_P-1:0] idx2, idx3, idx4;

  always_comb begin
    mc   = LW'((m > LMAX) ? LMAX : m);
    nc   = LW'((n > LMAX) ? LMAX : n);
    u_lo = u[LINE_LOG2_P-1:0];
    v_lo = v[LINE_LOG2_P-1:0];
    u_nx = u_lo + 1'b1;
    v_nx = v_lo + 1'b1;
  end

  rz_xlate_core #(.COORD_W(LINE_LOG2_P), .LOGW(LW)) u_right (
    .m(mc), .n(nc), .u(u_nx), .v(v_lo), .placement(placement), .a_idx(idx2));
  rz_xlate_core #(.COORD_W(LINE_LOG2_P), .LOGW(LW)) u_down (
    .m(mc), .n(nc), .u(u_lo), .v(v_nx), .placement(placement), .a_idx(idx3));
  rz_xlate_core #(.COORD_W(LINE_LOG2_P), .LOGW(LW)) u_diag (
    .m(mc), .n(nc), .u(u_nx), .v(v_nx), .placement(placement), .a_idx(idx4));

  assign off2 = idx2[LINE_LOG2_P-1:0];
  assign off3 = idx3[LINE_LOG2_P-1:0];
  assign off4 = idx4[LINE_LOG2_P-1:0];
endmodule
