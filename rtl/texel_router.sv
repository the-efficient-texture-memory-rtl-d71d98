// texel_router: delivers all texels of one cache access to their bilinear quad slots.
//
// One access returns one cache line buffer. Under texture cache support 2 (support = SUP_2)
// mux 1 takes the explicit texel, at the offset carried by its own address. The offset
// generator supplies the offsets of its right, lower and diagonal neighbours for muxes 2-4.
// The enable generator switches on those that lie in the same line for this case. So a case I
// access yields all four texels, a case II access two texels of a row, a case III access two of
// a column and a case IV access one. A relative texel r (0 own, 1 right, 2 down, 3 diagonal)
// goes to quad slot (slot + r), where slot is the explicit texel's own slot. So the second
// access of a case II request (slot 2) fills slots 2 and 3, and the second access of case III
// (slot 1) fills slots 1 and 3. That slot mapping is this design's own.
// Under the baseline organisation (SUP_BASE) only mux 1 is enabled. Under support 1 (SUP_1)
// an access is a burst over the run of consecutive footprint texels that starts at the
// explicit texel (at most 16 bytes, burst_mask in tex_pkg). A second set of four muxes then
// takes every texel of that run. Their offsets come from quad_offsets on the footprint's
// top-left texel, and each goes straight to its own slot, because a burst may cover texels
// left of or above its start. The explicit texel's own offset comes from the quad offsets here;
// with a line-aligned base it equals the address bits.
// Purely combinational.
module texel_router
  import tex_pkg::*;
(
  input  support_e                support,
  input  logic [LINE_W-1:0]       line,
  input  access_t                 acc,
  input  logic [LINE_LOG2-1:0]    own_off,     // byte address bits of the explicit texel / 4
  output logic [3:0][TEXEL_W-1:0] slot_texel,
  output logic [3:0]              slot_valid
);
  // support 2 / baseline path: explicit texel and its right, lower and diagonal neighbours
  logic [3:0][LINE_LOG2-1:0] off;
  logic [3:0]                en_case, en, rel_valid;
  logic [3:0][TEXEL_W-1:0]   rel_texel;

  offset_generator u_offgen (
    .m(acc.m), .n(acc.n), .u(acc.u), .v(acc.v), .placement(acc.placement),
    .off2(off[1]), .off3(off[2]), .off4(off[3])
  );
  assign off[0] = own_off;

  enable_generator u_engen (.cse(acc.cse), .en(en_case));
  assign en = (support == SUP_BASE) ? 4'b0001 : en_case;

  texel_selector u_sel (
    .line(line), .off(off), .en(en), .texel(rel_texel), .valid(rel_valid)
  );

  // support 1 path: burst window over the whole footprint
  logic [COORD_W-1:0]        u0, v0;
  logic [3:0][LINE_LOG2-1:0] qoff;
  logic [3:0]                en_burst, burst_valid;
  logic [3:0][TEXEL_W-1:0]   burst_texel;

  assign u0 = (acc.u - COORD_W'(acc.slot[0])) & low_mask(acc.m);
  assign v0 = (acc.v - COORD_W'(acc.slot[1])) & low_mask(acc.n);

  quad_offsets u_qoff (
    .m(acc.m), .n(acc.n), .u(u0), .v(v0), .placement(acc.placement), .off(qoff));

  assign en_burst = burst_mask(acc.cse, acc.slot, qoff);

  texel_selector u_burst_sel (
    .line(line), .off(qoff), .en(en_burst), .texel(burst_texel), .valid(burst_valid)
  );

  always_comb begin
    slot_texel = '0;
    slot_valid = '0;
    if (support == SUP_1) begin
      slot_texel = burst_texel;
      slot_valid = burst_valid;
    end else begin
      for (int r = 0; r < 4; r++) begin
        if (rel_valid[r]) begin
          slot_texel[acc.slot + 2'(r)] = rel_texel[r];
          slot_valid[acc.slot + 2'(r)] = 1'b1;
        end
      end
    end
  end
endmodule
