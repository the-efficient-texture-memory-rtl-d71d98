// quad_offsets: positions inside their cache lines of all four texels of a bilinear footprint.
//
// For the footprint with top-left texel (u,v) it gives the line offset of quad slots 0..3 =
// (u,v), (u+1,v), (u,v+1), (u+1,v+1). Slots 1..3 come from the offset generator, and slot 0
// from one more copy of the LINE_LOG2-bit recursive-Z translation logic. Offsets of texels
// that lie in different lines are still their own positions in their own lines. Burst
// accesses (texture cache support 1) need these, because a burst may start at any texel of
// the footprint. The texture base address must be line aligned. Purely combinational.
module quad_offsets
  import tex_pkg::*;
(
  input  logic [LOGW-1:0]          m,
  input  logic [LOGW-1:0]          n,
  input  logic [COORD_W-1:0]       u,
  input  logic [COORD_W-1:0]       v,
  input  placement_e               placement,
  output logic [3:0][LINE_LOG2-1:0] off
);
  localparam int LW = $clog2(LINE_LOG2 + 1);
  localparam logic [LOGW-1:0] LMAX = LOGW'(LINE_LOG2);

  logic [LW-1:0]          mc, nc;
  logic [2*LINE_LOG2-1:0] idx0;

  assign mc = LW'((m > LMAX) ? LMAX : m);
  assign nc = LW'((n > LMAX) ? LMAX : n);

  rz_xlate_core #(.COORD_W(LINE_LOG2), .LOGW(LW)) u_own (
    .m(mc), .n(nc), .u(u[LINE_LOG2-1:0]), .v(v[LINE_LOG2-1:0]), .placement(placement),
    .a_idx(idx0));
  assign off[0] = idx0[LINE_LOG2-1:0];

  offset_generator u_neigh (
    .m(m), .n(n), .u(u), .v(v), .placement(placement),
    .off2(off[1]), .off3(off[2]), .off4(off[3])
  );
endmodule
