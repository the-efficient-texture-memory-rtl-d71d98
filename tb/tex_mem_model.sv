// tex_mem_model: behavioural model of the off-chip texture memory.
//
// Accepts one line request at a time and returns the line in LINE_BYTES/BUS_BYTES consecutive
// beats, the first one LATENCY cycles after the cycle in which the request was first
// presented. A cache miss thus costs LATENCY + beats cycles more than a hit. The
// content is computed, not stored: the 32-bit word at byte address a is texel_value(a), a fixed
// mixing function that testbenches evaluate independently. Counts requests served.
module tex_mem_model #(
  parameter int LATENCY    = 100,
  parameter int LINE_BYTES = 64,
  parameter int BUS_BYTES  = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   req_valid,
  output logic                   req_ready,
  input  logic [31:0]            req_addr,
  output logic                   rvalid,
  output logic [BUS_BYTES*8-1:0] rdata,
  output int                     n_requests
);
  localparam int BEATS = LINE_BYTES / BUS_BYTES;

  function automatic logic [31:0] texel_value(input logic [31:0] a);
    logic [31:0] x;
    x = (a >> 2) * 32'h9E3779B1;
    return x ^ (x >> 15) ^ 32'h5A5A0F0F;
  endfunction

  logic        busy;
  logic [31:0] addr;
  int          cnt;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      rvalid     <= 1'b0;
      rdata      <= '0;
      addr       <= '0;
      n_requests <= 0;
    end else begin
      rvalid <= 1'b0;
      if (!busy && req_valid) begin
        busy       <= 1'b1;
        addr       <= req_addr;
        cnt        <= 0;
        n_requests <= n_requests + 1;
      end else if (busy) begin
        cnt <= cnt + 1;
        if (cnt >= LATENCY - 2) begin
          int beat;
          beat = cnt - (LATENCY - 2);
          rvalid <= 1'b1;
          for (int w = 0; w < BUS_BYTES / 4; w++)
            rdata[32*w +: 32] <= texel_value(addr + 32'(beat * BUS_BYTES + 4 * w));
          if (beat == BEATS - 1) busy <= 1'b0;
        end
      end
    end
  end
endmodule
