// tb_texture_unit: end-to-end test of the texture unit at its default sizes.
//
// Drives bilinear requests through the whole unit with a behavioural texture memory
// (100-cycle latency + 8 beats per line) and checks every colour against a reference
// computed from the independent placement model and the memory content function. Also checks
// the case code of every request against the number of 64-byte lines its footprint really
// touches, the total numbers of cache hits and misses against a direct-mapped cache model, and
// that a run of requests hitting one cached line yields one colour per cycle, taken seven clock
// edges after the edge that took its request (one register each in the coordinate generator,
// coordinate queue, two translation stages, address queue, cache line buffer and filter).
// Workload: raster scans over textures of every region shape and placement, then random
// requests with conflict misses and a colour consumer that stalls at random, all under cache
// support 2; then scans and random requests under the baseline and support-1 organisations,
// whose cache accesses the cache model takes from the reference access list.
// Counts how often each mechanism happened: cases I-IV, hits, misses, both queues full,
// colour back-pressure, each placement, each region shape and each cache organisation; one
// that never happened fails.
module tb_texture_unit;
  import tex_pkg::*;
  import tex_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, color_valid, color_ready;
  tex_req_t req;
  logic [31:0] color;
  logic mem_req_valid, mem_req_ready, mem_rvalid, cache_hit, cache_miss, cq_full, aq_full;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_rdata;
  int n_mem;
  support_e support = SUP_2;

  texture_unit dut (
    .clk, .rst_n, .support, .req_valid, .req_ready, .req, .color_valid, .color_ready, .color,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_rvalid, .mem_rdata,
    .cache_hit, .cache_miss, .coord_q_full(cq_full), .addr_q_full(aq_full)
  );

  tex_mem_model #(.LATENCY(100)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .rvalid(mem_rvalid), .rdata(mem_rdata), .n_requests(n_mem)
  );

  int checks = 0, failures = 0;
  logic [31:0] exp_q[$];
  int n_case[4], n_pl[5], n_shape[3], n_sup[3];
  int n_hit = 0, n_miss = 0, n_cqfull = 0, n_aqfull = 0, n_bp = 0;
  int model_hit = 0, model_miss = 0;
  logic [31:0] model_tag[128];
  bit          model_valid[128];
  int n_colors = 0;
  bit random_ready = 0;
  longint cycle = 0;
  longint color_cycle[$];
  longint acc_cycle[$];
  longint min_latency = 1000000;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  // direct-mapped cache model: 128 lines of 64 bytes
  function automatic void model_access(logic [31:0] a);
    int idx = int'((a >> 6) & 127);
    if (model_valid[idx] && model_tag[idx] == (a >> 13)) model_hit++;
    else begin
      model_miss++;
      model_valid[idx] = 1;
      model_tag[idx]   = a >> 13;
    end
  endfunction

  // issue one request; queue its expected colour and model its cache accesses
  task automatic issue(int m, int n, int u, int v, int fu, int fv, int pl, logic [31:0] base);
    logic [31:0] t[4], a[4];
    int na;
    bit ok;
    @(negedge clk);
    req.u = 16'(u); req.v = 16'(v); req.fu = 8'(fu); req.fv = 8'(fv);
    req.m = 5'(m);  req.n = 5'(n);  req.base = base; req.placement = placement_e'(pl);
    req_valid = 1'b1;
    do begin
      #1 ok = req_ready;
      @(posedge clk);
      if (!ok) @(negedge clk);
    end while (!ok);
    #1 req_valid = 1'b0;
    for (int i = 0; i < 4; i++)
      t[i] = texel_value(ref_addr(m, n, u + (i % 2), v + (i / 2), pl, base));
    exp_q.push_back(bilinear(t[0], t[1], t[2], t[3], fu, fv));
    na = ref_accesses(m, n, u, v, pl, base, int'(support), a);
    for (int i = 0; i < na; i++) model_access(a[i]);
    n_sup[support]++;
    n_pl[pl]++;
    if (m >= 2 && n >= 2) n_shape[0]++;
    else if (m > n) n_shape[1]++;
    else if (m < n) n_shape[2]++;
  endtask

  // case code seen at request acceptance against the line-count reference
  always @(posedge clk) if (rst_n && req_valid && req_ready) begin
    int cs;
    cs = ref_case(int'(req.m), int'(req.n), longint'(req.u), longint'(req.v),
                  int'(req.placement), req.base);
    checks++;
    if (int'(dut.req_cse) != cs)
      fail($sformatf("case m=%0d n=%0d u=%0d v=%0d pl=%0d: got %0d want %0d", req.m, req.n,
                     req.u, req.v, req.placement, dut.req_cse, cs));
    n_case[cs]++;
    acc_cycle.push_back(cycle);
  end

  // colour checker and event counters
  always @(posedge clk) if (rst_n) begin
    if (random_ready) color_ready <= ($urandom_range(0, 3) != 0);
    else              color_ready <= 1'b1;
    if (cache_hit)  n_hit++;
    if (cache_miss) n_miss++;
    if (cq_full)    n_cqfull++;
    if (aq_full)    n_aqfull++;
    if (color_valid && !color_ready) n_bp++;
    if (color_valid && color_ready) begin
      checks++;
      n_colors++;
      color_cycle.push_back(cycle);
      if (acc_cycle.size() != 0) begin
        longint lat;
        lat = cycle - acc_cycle.pop_front();
        if (lat < min_latency) min_latency = lat;
      end
      if (exp_q.size() == 0) fail("colour without request");
      else begin
        logic [31:0] e;
        e = exp_q.pop_front();
        if (color !== e) fail($sformatf("colour %0d: got %h want %h", n_colors, color, e));
      end
    end
  end

  task automatic drain();
    int guard = 0;
    while (exp_q.size() != 0 && guard < 200000) begin @(posedge clk); guard++; end
    repeat (5) @(posedge clk);
  endtask

  task automatic scan(int m, int n, int pl, logic [31:0] base, int wmax, int hmax);
    int w = 1 << m, h = 1 << n;
    for (int v = 0; v < ((h < hmax) ? h : hmax); v++)
      for (int u = 0; u < ((w < wmax) ? w : wmax); u++)
        issue(m, n, u, v, int'($urandom_range(0, 255)), int'($urandom_range(0, 255)), pl, base);
  endtask

  initial begin
    req_valid = 1'b0; req = '0; color_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // throughput: 16 case I requests on one line, after a warm-up miss
    issue(6, 6, 1, 1, 128, 64, 0, 32'h0001_0000);
    drain();
    color_cycle.delete();
    for (int i = 0; i < 16; i++) issue(6, 6, 1, 1, 16 * i, 255 - 16 * i, 0, 32'h0001_0000);
    drain();
    checks++;
    if (color_cycle.size() != 16 || color_cycle[15] - color_cycle[0] != 15)
      fail($sformatf("16 cached case I requests took %0d cycles, want 15",
                     color_cycle[color_cycle.size() - 1] - color_cycle[0]));

    // raster scans: every placement and region shape
    scan(6, 6, 0, 32'h0001_0000, 32, 8);
    scan(6, 6, 1, 32'h0002_0000, 32, 8);
    scan(6, 6, 2, 32'h0003_0000, 32, 8);
    scan(6, 6, 3, 32'h0004_0000, 32, 8);
    scan(6, 6, 4, 32'h0005_0000, 32, 8);
    scan(8, 1, 0, 32'h0006_0000, 32, 2);     // 8x2 lines
    scan(1, 8, 4, 32'h0007_0000, 2, 32);     // 2x8 lines
    scan(7, 0, 1, 32'h0008_0000, 40, 1);     // 16x1 lines
    scan(0, 7, 0, 32'h0009_0000, 1, 40);     // 1x16 lines
    scan(1, 1, 2, 32'h000A_0000, 2, 2);      // texture smaller than a line
    scan(10, 3, 3, 32'h000B_0000, 24, 8);
    scan(12, 12, 0, 32'h0100_0000, 16, 6);   // 4096x4096 texture
    drain();

    // random requests, colour consumer stalling at random
    random_ready = 1;
    for (int i = 0; i < 600; i++) begin
      int m, n, pl;
      m  = int'($urandom_range(0, 12));
      n  = int'($urandom_range(0, 12));
      pl = int'($urandom_range(0, 4));
      issue(m, n, int'($urandom_range(0, 65535)), int'($urandom_range(0, 65535)),
            int'($urandom_range(0, 255)), int'($urandom_range(0, 255)), pl,
            32'h0000_2000 * $urandom_range(0, 3));
    end
    drain();

    // the two other cache organisations: scans over every placement, then random requests
    for (int sp = 0; sp < 2; sp++) begin
      support = support_e'(sp);
      random_ready = 0;
      for (int pl = 0; pl < 5; pl++) scan(6, 6, pl, 32'h0010_0000 + 32'h1_0000 * pl, 12, 6);
      scan(8, 1, 4, 32'h0006_0000, 20, 2);
      scan(1, 8, 1, 32'h0007_0000, 2, 20);
      drain();
      random_ready = 1;
      for (int i = 0; i < 200; i++)
        issue(int'($urandom_range(0, 12)), int'($urandom_range(0, 12)),
              int'($urandom_range(0, 65535)), int'($urandom_range(0, 65535)),
              int'($urandom_range(0, 255)), int'($urandom_range(0, 255)),
              int'($urandom_range(0, 4)), 32'h0000_2000 * $urandom_range(0, 3));
      drain();
    end
    support = SUP_2;
    random_ready = 0;
    repeat (3) @(posedge clk);

    checks++;
    if (min_latency != 7) fail($sformatf("shortest request-to-colour latency %0d, want 7", min_latency));
    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d colours missing", exp_q.size()));
    checks++;
    if (n_hit != model_hit || n_miss != model_miss)
      fail($sformatf("hits/misses %0d/%0d, model %0d/%0d", n_hit, n_miss, model_hit, model_miss));
    checks++;
    if (n_mem != n_miss) fail($sformatf("%0d memory requests for %0d misses", n_mem, n_miss));

    $display("mechanisms: caseI=%0d caseII=%0d caseIII=%0d caseIV=%0d hit=%0d miss=%0d",
             n_case[0], n_case[1], n_case[2], n_case[3], n_hit, n_miss);
    $display("  coord_q_full=%0d addr_q_full=%0d colour_backpressure=%0d", n_cqfull, n_aqfull, n_bp);
    $display("  placements RZ/RZU/RZFU1/RZFU2/RZS4=%0d/%0d/%0d/%0d/%0d shapes sq/wide/tall=%0d/%0d/%0d",
             n_pl[0], n_pl[1], n_pl[2], n_pl[3], n_pl[4], n_shape[0], n_shape[1], n_shape[2]);
    $display("  requests under baseline/support 1/support 2=%0d/%0d/%0d", n_sup[0], n_sup[1], n_sup[2]);
    for (int i = 0; i < 3; i++) begin checks++; if (n_sup[i] == 0) fail("a cache organisation never used"); end
    for (int i = 0; i < 4; i++) begin checks++; if (n_case[i] == 0) fail("a case never happened"); end
    for (int i = 0; i < 5; i++) begin checks++; if (n_pl[i] == 0) fail("a placement never used"); end
    for (int i = 0; i < 3; i++) begin checks++; if (n_shape[i] == 0) fail("a region shape never used"); end
    checks++; if (n_hit == 0)    fail("no cache hit");
    checks++; if (n_miss == 0)   fail("no cache miss");
    checks++; if (n_cqfull == 0) fail("coordinate queue never full");
    checks++; if (n_aqfull == 0) fail("address queue never full");
    checks++; if (n_bp == 0)     fail("no colour back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
