// case_identifier: finds how many cache lines the 2x2 bilinear footprint touches.
//
// With recursive-Z placement a 2^L-texel cache line holds an aligned rectangle of the texture
// (a "region"). A prefix step derives the region shape from the texture dimensions m, n: for a
// 64-byte line (L = 4) it is 4x4 when both sides have at least 4 texels, and 8x2, 2x8, 16x1 or
// 1x16 when the short side runs out of bits. The footprint with top-left texel (u,v) then
// crosses to the next line horizontally when u sits in the last column of its region
// (u mod w == w-1) and vertically when v sits in the last row (v mod h == h-1); both tests are
// an AND of low coordinate bits. A region that already spans the whole texture width (height)
// never crosses, because the neighbour coordinate wraps inside the texture. Output:
//   cse = {cross_right, cross_down}: 00 case I (one line), 01 case II (row pairs in two lines),
//   10 case III (column pairs in two lines), 11 case IV (four lines).
// The region rule and case encoding follow the described design; the generic region formula
// for any L and the wrap at the texture edge are this design's own. Purely combinational.
module case_identifier
  import tex_pkg::*;
#(
  parameter int LINE_LOG2_P = LINE_LOG2
) (
  input  logic [LOGW-1:0]    m,
  input  logic [LOGW-1:0]    n,
  input  logic [COORD_W-1:0] u,
  input  logic [COORD_W-1:0] v,
  output case_e              cse,
  output logic [LOGW-1:0]    region_w,   // log2 region width  (prefix result)
  output logic [LOGW-1:0]    region_h    // log2 region height
);
  localparam logic [LOGW-1:0] L    = LOGW'(LINE_LOG2_P);
  localparam logic [LOGW-1:0] L_HI = LOGW'((LINE_LOG2_P + 1) / 2);
  localparam logic [LOGW-1:0] L_LO = LOGW'(LINE_LOG2_P / 2);

  logic [LOGW-1:0]    s;
  logic [COORD_W-1:0] mask_w, mask_h;
  logic               cross_r, cross_d;

  always_comb begin
    s = (m < n) ? m : n;
    if ({1'b0, s} + {1'b0, s} >= {1'b0, L}) begin   // square-like region
      region_w = L_HI;
      region_h = L_LO;
    end else if (m >= n) begin                       // short side is the height
      region_h = n;
      region_w = L - n;
    end else begin                                   // short side is the width
      region_w = m;
      region_h = L - m;
    end
    mask_w  = low_mask(region_w);
    mask_h  = low_mask(region_h);
    cross_r = (region_w < m) && ((u & mask_w) == mask_w);
    cross_d = (region_h < n) && ((v & mask_h) == mask_h);
    cse     = case_e'({cross_r, cross_d});
  end
endmodule
