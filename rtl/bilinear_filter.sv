// bilinear_filter: texture filter for bilinear filtering.
//
// Collects the four texels of one request as the texels router delivers them (one to four
// cache accesses, each filling some quad slots) and, with the last access, computes the
// weighted average per RGBA8 channel:
//   top    = t0*(2^F - fu) + t1*fu          t0 = (u,v),   t1 = (u+1,v)
//   bottom = t2*(2^F - fu) + t3*fu          t2 = (u,v+1), t3 = (u+1,v+1)
//   result = (top*(2^F - fv) + bottom*fv) >> 2F          (truncating)
// with F = FRAC_W fraction bits. The filter's function is the described one; the weight
// format and the truncation are this design's choices; each byte of a texel is one channel
// and all four channels are filtered alike. The colour is registered and held
// on a valid/ready port; input is accepted while the output register is free or being read,
// so one colour can leave per cycle.
module bilinear_filter
  import tex_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [3:0][TEXEL_W-1:0] slot_texel,
  input  logic [3:0]              slot_valid,
  input  access_t                 in_acc,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [TEXEL_W-1:0]      color
);
  localparam int ONE = 1 << FRAC_W;

  logic [3:0][TEXEL_W-1:0] quad, merged;
  logic [3:0]              have, have_all;
  logic [TEXEL_W-1:0]      result;
  logic                    fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;

  always_comb begin
    for (int i = 0; i < 4; i++)
      merged[i] = slot_valid[i] ? slot_texel[i] : quad[i];
    have_all = have | slot_valid;
  end

  always_comb begin
    int unsigned t0, t1, t2, t3, wu0, wu1, wv0, wv1, top, bot;
    wu1 = 32'(in_acc.fu);
    wu0 = ONE - wu1;
    wv1 = 32'(in_acc.fv);
    wv0 = ONE - wv1;
    for (int c = 0; c < TEXEL_W / 8; c++) begin
      t0  = 32'(merged[0][8*c +: 8]);
      t1  = 32'(merged[1][8*c +: 8]);
      t2  = 32'(merged[2][8*c +: 8]);
      t3  = 32'(merged[3][8*c +: 8]);
      top = t0 * wu0 + t1 * wu1;
      bot = t2 * wu0 + t3 * wu1;
      result[8*c +: 8] = 8'((top * wv0 + bot * wv1) >> (2 * FRAC_W));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quad      <= '0;
      have      <= '0;
      out_valid <= 1'b0;
      color     <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        if (in_acc.last) begin
          have      <= '0;
          color     <= result;
          out_valid <= 1'b1;
        end else begin
          quad <= merged;
          have <= have_all;
        end
      end
    end
  end

  // every slot must have been delivered when the last access of a request arrives
  property p_quad_complete;
    @(posedge clk) disable iff (!rst_n) (fire && in_acc.last) |-> (have_all == 4'hF);
  endproperty
  a_quad_complete: assert property (p_quad_complete);
endmodule
