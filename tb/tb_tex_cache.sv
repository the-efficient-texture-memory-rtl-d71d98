// tb_tex_cache: the 8 KB direct-mapped cache with the behavioural texture memory.
// Random lookups over a few conflicting 8 KB windows, with a randomly stalling consumer.
// Every returned line must hold the memory content of its line, carry its request's address
// and record, and the hit/miss decision must match a direct-mapped model. With the consumer
// ready, a hit must answer one cycle after acceptance and a miss 109 cycles after it, i.e. a
// miss penalty of 100 + 64/8 = 108 cycles.
module tb_tex_cache;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, mem_req_valid, mem_req_ready, mem_rvalid;
  logic hit, miss;
  logic [31:0] in_addr, out_addr, mem_req_addr;
  access_t in_acc, out_acc;
  logic [511:0] out_line;
  logic [63:0] mem_rdata;
  int n_mem;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  logic [31:0] tags[128];
  bit vld[128];
  logic [31:0] q_addr[$];
  access_t q_acc[$];
  bit q_hit[$];
  longint q_t[$];
  longint cyc = 0;
  bit rand_ready = 1;

  tex_cache dut (.clk, .rst_n, .in_valid, .in_ready, .in_addr, .in_acc, .out_valid, .out_ready,
                 .out_line, .out_addr, .out_acc, .mem_req_valid, .mem_req_ready, .mem_req_addr,
                 .mem_rvalid, .mem_rdata, .hit, .miss);
  tex_mem_model #(.LATENCY(100)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid),
    .req_ready(mem_req_ready), .req_addr(mem_req_addr), .rvalid(mem_rvalid), .rdata(mem_rdata),
    .n_requests(n_mem));

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      int idx;
      bit h;
      idx = int'(in_addr[12:6]);
      h = vld[idx] && tags[idx] == (in_addr >> 13);
      vld[idx] = 1;
      tags[idx] = in_addr >> 13;
      checks++;
      if (hit != h || miss != !h) begin
        failures++;
        $display("FAIL hit/miss %b/%b want hit=%b addr %h", hit, miss, h, in_addr);
      end
      if (h) n_hit++; else n_miss++;
      q_addr.push_back(in_addr); q_acc.push_back(in_acc); q_hit.push_back(h); q_t.push_back(cyc);
    end
    if (out_valid && out_ready) begin
      logic [31:0] a;
      access_t e;
      bit h;
      longint t0;
      logic [511:0] want;
      a = q_addr.pop_front(); e = q_acc.pop_front(); h = q_hit.pop_front(); t0 = q_t.pop_front();
      for (int w = 0; w < 16; w++) want[32*w +: 32] = texel_value({a[31:6], 6'b0} + 32'(4 * w));
      checks++;
      if (out_line !== want || out_addr !== a || out_acc !== e) begin
        failures++;
        $display("FAIL line for %h", a);
      end
      if (!rand_ready) begin
        checks++;
        if (cyc - t0 != (h ? 1 : 109)) begin
          failures++;
          $display("FAIL %s answered after %0d cycles", h ? "hit" : "miss", cyc - t0);
        end
      end
    end
    out_ready <= rand_ready ? 1'($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic lookup(logic [31:0] a);
    bit ok;
    @(negedge clk);
    in_addr = a;
    in_acc = access_t'({$urandom, $urandom, $urandom, $urandom});
    in_valid = 1;
    do begin
      #1 ok = in_ready;
      @(posedge clk);
      if (!ok) @(negedge clk);
    end while (!ok);
    #1 in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_addr = 0; in_acc = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++)
      lookup(32'h0004_0000 + 32'h2000 * $urandom_range(0, 2) + 32'($urandom_range(0, 1023)) * 4);
    rand_ready = 0;
    repeat (200) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      lookup(32'h0010_0000 + 32'h40 * $urandom_range(0, 3));
      repeat (120) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    checks++;
    if (q_addr.size() != 0 || n_hit == 0 || n_miss == 0 || n_mem != n_miss) begin
      failures++;
      $display("FAIL left=%0d hits=%0d misses=%0d mem=%0d", q_addr.size(), n_hit, n_miss, n_mem);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
