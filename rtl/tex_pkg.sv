// tex_pkg: shared types and constants of the texture unit.
//
// The texture unit works on 16-bit texel coordinates and 32-bit byte addresses, with 4-byte
// RGBA8 texels and 64-byte cache lines (16 texels). A bilinear request names the top-left texel
// (u,v) of its 2x2 footprint; the four texels are numbered slot 0..3 = (u,v), (u+1,v), (u,v+1),
// (u+1,v+1). The case code tells in how many cache lines the footprint lies:
// 00 one line, 01 two lines split between the rows, 10 two lines split between the columns,
// 11 four lines. Coordinate widths, address width, texel size and line size follow the
// described design; the fraction width, the struct layouts and the placement and
// cache-support encodings are this design's own choices.
package tex_pkg;

  localparam int COORD_W   = 16;               // texel coordinate / dimension bits
  localparam int LOGW      = 5;                // width of log2 dimension fields m,n (0..16)
  localparam int ADDR_W    = 32;               // byte address
  localparam int TEXEL_W   = 32;               // RGBA8 texel
  localparam int LINE_LOG2 = 4;                // log2 texels per cache line (64-byte line)
  localparam int LINE_W    = TEXEL_W << LINE_LOG2;
  localparam int FRAC_W    = 8;                // bilinear weight fraction bits

  // Texel placement inside a texture. All share the recursive-Z order between 2x2
  // (or 4x4 for RZS4) tiles and differ only in the four least significant index bits.
  typedef enum logic [2:0] {
    PL_RZ    = 3'd0,   // recursive Z
    PL_RZU   = 3'd1,   // recursive Z with U-shaped 2x2 tiles
    PL_RZFU1 = 3'd2,   // recursive Z with flipped U, lower U flipped
    PL_RZFU2 = 3'd3,   // recursive Z with flipped U, upper U flipped
    PL_RZS4  = 3'd4    // recursive Z with 4x4 snake tiles
  } placement_e;

  typedef enum logic [1:0] {
    CASE_I   = 2'b00,  // all four texels in one line
    CASE_II  = 2'b01,  // row pairs in two lines
    CASE_III = 2'b10,  // column pairs in two lines
    CASE_IV  = 2'b11   // four lines
  } case_e;

  // Texture cache organisation: what one cache access can return to the filter.
  typedef enum logic [1:0] {
    SUP_BASE = 2'd0,   // one texel per access (four accesses per request)
    SUP_1    = 2'd1,   // burst: a run of consecutive texels (at most 16 bytes) in one line
    SUP_2    = 2'd2    // every footprint texel that lies in the accessed line
  } support_e;

  // One bilinear filtering request from the pixel shader.
  typedef struct packed {
    logic [COORD_W-1:0] u;        // top-left texel of the 2x2 footprint
    logic [COORD_W-1:0] v;
    logic [FRAC_W-1:0]  fu;       // horizontal weight of the right column, /2^FRAC_W
    logic [FRAC_W-1:0]  fv;       // vertical weight of the lower row
    logic [LOGW-1:0]    m;        // texture width  = 2^m
    logic [LOGW-1:0]    n;        // texture height = 2^n
    logic [ADDR_W-1:0]  base;     // texture base byte address
    placement_e         placement;
  } tex_req_t;

  // One cache access (an explicit texel) travelling down the pipeline.
  typedef struct packed {
    logic [COORD_W-1:0] u;        // explicit texel coordinate
    logic [COORD_W-1:0] v;
    logic [1:0]         slot;     // quad slot of the explicit texel
    case_e              cse;      // case of the whole footprint
    logic [LOGW-1:0]    m;
    logic [LOGW-1:0]    n;
    logic [ADDR_W-1:0]  base;
    placement_e         placement;
    logic [FRAC_W-1:0]  fu;
    logic [FRAC_W-1:0]  fv;
    logic               last;     // last access of its bilinear request
  } access_t;

  // Mask of the low k bits of a coordinate (k up to COORD_W).
  // whether quad slots a and b lie in the same cache line, given the footprint's case
  function automatic logic same_line(input case_e cse, input logic [1:0] a, input logic [1:0] b);
    unique case (cse)
      CASE_I:   same_line = 1'b1;
      CASE_II:  same_line = (a[1] == b[1]);
      CASE_III: same_line = (a[0] == b[0]);
      default:  same_line = (a == b);
    endcase
  endfunction

  // Texture cache support 1: footprint texels returned by a burst that starts at slot s.
  // q holds the line offsets of the four slots. The burst runs over consecutive offsets
  // s, s+1, ... for as long as each is occupied by a footprint texel of the same line, up to
  // four texels (16 bytes).
  function automatic logic [3:0] burst_mask(input case_e cse, input logic [1:0] s,
                                            input logic [3:0][LINE_LOG2-1:0] q);
    logic [3:0]           present;
    logic [2:0]           run;
    logic [LINE_LOG2:0]   want;
    logic [LINE_LOG2-1:0] d;
    for (int k = 0; k < 4; k++) begin
      want       = {1'b0, q[s]} + (LINE_LOG2 + 1)'(k);
      present[k] = 1'b0;
      for (int t = 0; t < 4; t++)
        if (same_line(cse, s, 2'(t)) && {1'b0, q[t]} == want) present[k] = 1'b1;
    end
    run = present[0] ? (present[1] ? (present[2] ? (present[3] ? 3'd4 : 3'd3) : 3'd2) : 3'd1)
                     : 3'd0;
    for (int t = 0; t < 4; t++) begin
      d             = q[t] - q[s];
      burst_mask[t] = same_line(cse, s, 2'(t)) && (q[t] >= q[s]) &&
                      ({1'b0, d} < (LINE_LOG2 + 1)'(run));
    end
  endfunction

  function automatic logic [COORD_W-1:0] low_mask(input logic [LOGW-1:0] k);
    logic [COORD_W:0] one_hot;
    one_hot = (COORD_W+1)'(1) << k;
    return COORD_W'(one_hot - 1'b1);
  endfunction

endpackage
