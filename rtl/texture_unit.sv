// texture_unit: texture memory system of a GPU texture unit for bilinear filtering, with
// recursive-Z texture placement and a choice of three texture cache organisations (input
// support): support 2, one cache access per cache line touched, whatever the order of the
// texels inside the line; support 1, 16-byte bursts within a line; baseline, one texel per
// access. The support input is quasi-static: change it only while the unit is empty.
//
// Data flow, one bilinear request per cycle at best:
//   request -> case identifier (1, 2 or 4 lines?) -> coordinate generator (emits only the
//   explicit texels: one per line, per burst or per texel) -> coordinate queue -> address translation unit (recursive-Z index,
//   A = (A'<<2) + B, 2 stages) -> address queue -> L1 texture cache (direct mapped, returns the
//   line buffer, stalls on a miss) -> texels router (picks every texel of the footprint that
//   lies in this line) -> bilinear filter -> colour.
// All stages use valid/ready, so a cache miss or a slow colour consumer backs the pipeline up
// into the queues and finally holds off new requests (req_ready low).
// Interface: support (quasi-static); req (tex_req_t) with req_valid/req_ready; colour with
// color_valid/color_ready; a line fill port to the off-chip texture memory; one-cycle cache
// hit/miss event pulses and the full flags of the two queues. The texture base address must be
// 64-byte aligned. The queue depths are this design's choice.
module texture_unit
  import tex_pkg::*;
#(
  parameter int COORD_QDEPTH = 8,
  parameter int ADDR_QDEPTH  = 8,
  parameter int CACHE_BYTES  = 8192,
  parameter int LINE_BYTES   = 64,
  parameter int BUS_BYTES    = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  support_e               support,
  input  logic                   req_valid,
  output logic                   req_ready,
  input  tex_req_t               req,
  output logic                   color_valid,
  input  logic                   color_ready,
  output logic [TEXEL_W-1:0]     color,
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output logic [ADDR_W-1:0]      mem_req_addr,
  input  logic                   mem_rvalid,
  input  logic [BUS_BYTES*8-1:0] mem_rdata,
  output logic                   cache_hit,
  output logic                   cache_miss,
  output logic                   coord_q_full,
  output logic                   addr_q_full
);
  localparam int ACC_W = $bits(access_t);

  // case identification and coordinate generation
  case_e           req_cse;
  logic [LOGW-1:0] region_w, region_h;
  logic            cg_valid, cg_ready;
  access_t         cg_acc;

  case_identifier u_caseid (
    .m(req.m), .n(req.n), .u(req.u), .v(req.v),
    .cse(req_cse), .region_w(region_w), .region_h(region_h)
  );

  coord_generator u_coordgen (
    .clk, .rst_n, .support,
    .req_valid, .req_ready, .req, .req_cse,
    .out_valid(cg_valid), .out_ready(cg_ready), .out_acc(cg_acc)
  );

  // coordinate queue
  logic    cq_valid, cq_ready;
  access_t cq_acc;

  sync_fifo #(.W(ACC_W), .DEPTH(COORD_QDEPTH)) u_coord_q (
    .clk, .rst_n,
    .in_valid(cg_valid), .in_ready(cg_ready), .in_data(cg_acc),
    .out_valid(cq_valid), .out_ready(cq_ready), .out_data(cq_acc), .full(coord_q_full)
  );

  // address translation
  logic              at_valid, at_ready;
  access_t           at_acc;
  logic [ADDR_W-1:0] at_addr;

  rz_addr_translate u_xlate (
    .clk, .rst_n,
    .in_valid(cq_valid), .in_ready(cq_ready), .in_acc(cq_acc),
    .out_valid(at_valid), .out_ready(at_ready), .out_acc(at_acc), .out_addr(at_addr)
  );

  // address queue
  logic              aq_valid, aq_ready;
  access_t           aq_acc;
  logic [ADDR_W-1:0] aq_addr;

  sync_fifo #(.W(ADDR_W + ACC_W), .DEPTH(ADDR_QDEPTH)) u_addr_q (
    .clk, .rst_n,
    .in_valid(at_valid), .in_ready(at_ready), .in_data({at_addr, at_acc}),
    .out_valid(aq_valid), .out_ready(aq_ready), .out_data({aq_addr, aq_acc}), .full(addr_q_full)
  );

  // L1 texture cache
  logic                    tc_valid, tc_ready;
  logic [LINE_BYTES*8-1:0] tc_line;
  logic [ADDR_W-1:0]       tc_addr;
  access_t                 tc_acc;

  tex_cache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES), .BUS_BYTES(BUS_BYTES)) u_cache (
    .clk, .rst_n,
    .in_valid(aq_valid), .in_ready(aq_ready), .in_addr(aq_addr), .in_acc(aq_acc),
    .out_valid(tc_valid), .out_ready(tc_ready), .out_line(tc_line), .out_addr(tc_addr),
    .out_acc(tc_acc),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rvalid, .mem_rdata,
    .hit(cache_hit), .miss(cache_miss)
  );

  // texels router and filter
  logic [3:0][TEXEL_W-1:0] slot_texel;
  logic [3:0]              slot_valid;

  texel_router u_router (
    .support, .line(tc_line), .acc(tc_acc), .own_off(tc_addr[2 +: LINE_LOG2]),
    .slot_texel(slot_texel), .slot_valid(slot_valid)
  );

  bilinear_filter u_filter (
    .clk, .rst_n,
    .in_valid(tc_valid), .in_ready(tc_ready), .slot_texel(slot_texel),
    .slot_valid(slot_valid), .in_acc(tc_acc),
    .out_valid(color_valid), .out_ready(color_ready), .color(color)
  );
endmodule
