// tex_cache: direct-mapped L1 texture cache returning whole lines.
//
// CACHE_BYTES of data in lines of LINE_BYTES (8 KB and 64 bytes: 128 lines), indexed by the
// byte address bits above the line offset. An access is accepted on in_addr/in_acc when the
// cache is idle and its output register is free (or being read). On a hit the whole line is
// copied into the line buffer (out_line) and presented one cycle later, together with the
// request's address and access record, for the texels router to pick texels from. On a miss
// the cache stalls: it asks the texture memory for the line (mem_req_*), receives it in
// LINE_BYTES/BUS_BYTES beats of BUS_BYTES (mem_rvalid/mem_rdata, beat i = bytes 8i..8i+7),
// writes it into the arrays and then presents it. The miss penalty is the memory's latency plus
// one cycle per beat, as in the described cost model "constant + line size / bus width".
// Size, organisation, bus width and stall-on-miss follow the described design; the handshakes
// and the hit latency are this design's own. hit/miss pulse for one cycle per lookup.
module tex_cache
  import tex_pkg::*;
#(
  parameter int CACHE_BYTES = 8192,
  parameter int LINE_BYTES  = 64,
  parameter int BUS_BYTES   = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // lookup request
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [ADDR_W-1:0]         in_addr,
  input  access_t                   in_acc,
  // line buffer
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [LINE_BYTES*8-1:0]   out_line,
  output logic [ADDR_W-1:0]         out_addr,
  output access_t                   out_acc,
  // texture memory port
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic [ADDR_W-1:0]         mem_req_addr,
  input  logic                      mem_rvalid,
  input  logic [BUS_BYTES*8-1:0]    mem_rdata,
  // events
  output logic                      hit,
  output logic                      miss
);
  localparam int LINES  = CACHE_BYTES / LINE_BYTES;
  localparam int OFF_B  = $clog2(LINE_BYTES);
  localparam int IDX_B  = $clog2(LINES);
  localparam int TAG_B  = ADDR_W - OFF_B - IDX_B;
  localparam int BEATS  = LINE_BYTES / BUS_BYTES;
  localparam int BEAT_B = (BEATS > 1) ? $clog2(BEATS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_MEMREQ, S_FILL} state_e;

  logic [LINE_BYTES*8-1:0] data_arr [LINES];
  logic [TAG_B-1:0]        tag_arr  [LINES];
  logic [LINES-1:0]        valid_arr;

  state_e                  state;
  logic [ADDR_W-1:0]       req_addr;
  access_t                 req_acc;
  logic [BEAT_B-1:0]       beat;
  logic [LINE_BYTES*8-1:0] fill_line;

  logic [IDX_B-1:0] in_idx, req_idx;
  logic [TAG_B-1:0] in_tag, req_tag;
  logic             accept, in_hit;

  assign in_idx  = in_addr[OFF_B +: IDX_B];
  assign in_tag  = in_addr[ADDR_W-1 -: TAG_B];
  assign req_idx = req_addr[OFF_B +: IDX_B];
  assign req_tag = req_addr[ADDR_W-1 -: TAG_B];

  assign in_ready = (state == S_IDLE) && (!out_valid || out_ready);
  assign accept   = in_valid && in_ready;
  assign in_hit   = valid_arr[in_idx] && (tag_arr[in_idx] == in_tag);
  assign hit      = accept && in_hit;
  assign miss     = accept && !in_hit;

  assign mem_req_valid = (state == S_MEMREQ);
  assign mem_req_addr  = {req_addr[ADDR_W-1:OFF_B], {OFF_B{1'b0}}};

  // the line as it stands after the current beat
  always_comb begin
    fill_line = out_line;
    fill_line[beat*BUS_BYTES*8 +: BUS_BYTES*8] = mem_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      valid_arr <= '0;
      out_valid <= 1'b0;
      out_line  <= '0;
      out_addr  <= '0;
      out_acc   <= '0;
      req_addr  <= '0;
      req_acc   <= '0;
      beat      <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          req_addr <= in_addr;
          req_acc  <= in_acc;
          if (in_hit) begin
            out_line  <= data_arr[in_idx];
            out_addr  <= in_addr;
            out_acc   <= in_acc;
            out_valid <= 1'b1;
          end else begin
            state <= S_MEMREQ;
          end
        end
        S_MEMREQ: if (mem_req_ready) begin
          state <= S_FILL;
          beat  <= '0;
        end
        S_FILL: if (mem_rvalid) begin
          out_line <= fill_line;             // line buffer doubles as fill buffer
          beat     <= beat + 1'b1;
          if (beat == BEAT_B'(BEATS - 1)) begin
            valid_arr[req_idx] <= 1'b1;
            out_addr  <= req_addr;
            out_acc   <= req_acc;
            out_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_FILL && mem_rvalid && beat == BEAT_B'(BEATS - 1)) begin
      data_arr[req_idx] <= fill_line;
      tag_arr[req_idx]  <= req_tag;
    end
  end

  // a line fill beat only arrives while a fill is outstanding
  property p_beat_in_fill;
    @(posedge clk) disable iff (!rst_n) mem_rvalid |-> (state == S_FILL);
  endproperty
  a_beat_in_fill: assert property (p_beat_in_fill);
endmodule
