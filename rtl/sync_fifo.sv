// sync_fifo: synchronous first-in first-out queue with valid/ready ports.
//
// Used as the coordinate queue between the coordinate generator and the address translation
// unit and as the address queue between the translation unit and the texture cache. DEPTH
// entries of W bits in a register array, with read and write pointers and an occupancy count.
// A write and a read may happen in the same cycle. out_data is the head entry and is valid
// whenever out_valid is set. The queue depth is this design's choice.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         full
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]   mem [DEPTH];
  logic [PW-1:0]  wr_ptr, rd_ptr;
  logic [PW:0]    count;
  logic           push, pop;

  assign full      = (count == (PW+1)'(DEPTH));
  assign in_ready  = !full;
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH);
  endproperty
  a_no_overflow: assert property (p_no_overflow);
endmodule
