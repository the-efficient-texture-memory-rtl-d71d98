// rz_addr_translate: pipelined texture address translation unit.
//
// Turns the explicit texel coordinate of one cache access into a byte address,
// A = (A' << 2) + B, with A' from the recursive-Z translation logic (rz_xlate_core) and B the
// texture base address; texels are 4 bytes. Two pipeline stages:
//   stage 1  index A' from common field, differential field and placement remap (no carries)
//   stage 2  shift by two and add the base address (the only adder)
// The split point is this design's choice; the described unit is pipelined but the number of
// stages is not fixed. Flow control is valid/ready on both sides; each stage holds its data
// while the next is stalled, so the unit takes one access per cycle and has a latency of two
// cycles. The access record is carried alongside the address.
module rz_addr_translate
  import tex_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  access_t           in_acc,
  output logic              out_valid,
  input  logic              out_ready,
  output access_t           out_acc,
  output logic [ADDR_W-1:0] out_addr
);
  logic [2*COORD_W-1:0] a_idx;
  logic                 s1_valid, s1_ready, s2_ready;
  access_t              s1_acc;
  logic [2*COORD_W-1:0] s1_idx;

  rz_xlate_core #(.COORD_W(COORD_W), .LOGW(LOGW)) u_core (
    .m(in_acc.m), .n(in_acc.n), .u(in_acc.u), .v(in_acc.v),
    .placement(in_acc.placement), .a_idx(a_idx)
  );

  assign s2_ready = !out_valid || out_ready;
  assign s1_ready = !s1_valid || s2_ready;
  assign in_ready = s1_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
      s1_acc    <= '0;
      s1_idx    <= '0;
      out_acc   <= '0;
      out_addr  <= '0;
    end else begin
      if (s1_ready) begin
        s1_valid <= in_valid;
        if (in_valid) begin
          s1_acc <= in_acc;
          s1_idx <= a_idx;
        end
      end
      if (s2_ready) begin
        out_valid <= s1_valid;
        if (s1_valid) begin
          out_acc  <= s1_acc;
          out_addr <= ADDR_W'(s1_idx << 2) + s1_acc.base;
        end
      end
    end
  end
endmodule
