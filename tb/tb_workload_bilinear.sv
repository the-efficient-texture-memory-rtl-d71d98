// tb_workload_bilinear: bilinear texturing of screen tiles through the whole texture unit,
// measured the way the texture memory system is evaluated: cache accesses per bilinear
// request, miss rate and average cycles per filtered colour, under each of the three texture
// cache organisations.
//
// Each pass renders a 32x32-pixel tile whose texture coordinates follow an affine mapping
// (8.8 fixed point) onto a 256x256 texture: 1:1, 2x magnified, and rotated by about 30 degrees
// at 0.9 texel per pixel. Every pass runs under each organisation and each of the five
// placements from a cold cache. Checks every colour, and that the number of cache accesses
// equals the length of the reference access list of each request. Checks that the baseline
// makes exactly four accesses per request. Every placement keeps the same 16 texels together in
// a 64-byte line, so all placements must give the same number of misses under every
// organisation, and the same access count under the baseline and support 2. Under support 1
// the order inside the line decides how many bursts a footprint needs. There the U-shaped
// tiles must need fewer accesses than recursive Z, and the 4x4 snake fewer still, as the
// placements were designed to achieve.
module tb_workload_bilinear;
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
  int n_access = 0, n_miss = 0, n_colors = 0, want_access = 0;
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (cache_hit || cache_miss) n_access++;
    if (cache_miss) n_miss++;
    if (color_valid) begin
      checks++;
      n_colors++;
      if (exp_q.size() == 0 || color !== exp_q[0]) begin
        failures++;
        $display("FAIL colour %h", color);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  support_e support;

  task automatic issue(int u, int v, int fu, int fv, int pl);
    logic [31:0] t[4];
    logic [31:0] l[4];
    bit ok;
    @(negedge clk);
    req = '{u: 16'(u), v: 16'(v), fu: 8'(fu), fv: 8'(fv), m: 5'd8, n: 5'd8,
            base: 32'h0020_0000, placement: placement_e'(pl)};
    req_valid = 1'b1;
    do begin
      #1 ok = req_ready;
      @(posedge clk);
      if (!ok) @(negedge clk);
    end while (!ok);
    #1 req_valid = 1'b0;
    for (int i = 0; i < 4; i++) begin
      l[i] = ref_addr(8, 8, u + i % 2, v + i / 2, pl, 32'h0020_0000);
      t[i] = texel_value(l[i]);
    end
    exp_q.push_back(bilinear(t[0], t[1], t[2], t[3], fu, fv));
    want_access += ref_accesses(8, 8, u, v, pl, 32'h0020_0000, int'(support), l);
  endtask

  // one 32x32 tile; s = s0 + x*dsx + y*dsy, t = t0 + x*dtx + y*dty, 8.8 fixed point
  task automatic render(int pl, int s0, int t0, int dsx, int dsy, int dtx, int dty,
                        output int accesses, output int misses, output longint cycles);
    longint start;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    n_access = 0; n_miss = 0; want_access = 0;
    start = cycle;
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        int s, t;
        s = s0 + x * dsx + y * dsy;
        t = t0 + x * dtx + y * dty;
        issue((s >> 8) & 255, (t >> 8) & 255, s & 255, t & 255, pl);
      end
    while (exp_q.size() != 0) @(posedge clk);
    cycles = cycle - start;
    accesses = n_access;
    misses = n_miss;
    checks++;
    if (n_access != want_access) begin
      failures++;
      $display("FAIL %0d cache accesses, reference %0d", n_access, want_access);
    end
  endtask

  initial begin
    automatic int acc[5], mis[5];
    automatic longint cyc[5];
    automatic string names[5] = '{"RZ", "RZU", "RZFU1", "RZFU2", "RZS4"};
    automatic int mp[3][6] = '{'{300, 500, 256, 0, 0, 256}, '{4000, 1000, 128, 0, 0, 128},
                     '{9000, 2000, 200, -115, 115, 200}};
    automatic string pass_names[3] = '{"1:1", "2x magnified", "rotated 0.9"};
    automatic string sup_names[3] = '{"baseline", "support 1", "support 2"};
    req_valid = 1'b0; req = '0; color_ready = 1'b1;
    for (int sp = 0; sp < 3; sp++)
    for (int p = 0; p < 3; p++) begin
      support = support_e'(sp);
      for (int pl = 0; pl < 5; pl++) begin
        render(pl, mp[p][0], mp[p][1], mp[p][2], mp[p][3], mp[p][4], mp[p][5],
               acc[pl], mis[pl], cyc[pl]);
        $display("%-9s %-13s %-6s accesses/request %.3f  miss rate %.2f%%  cycles/colour %.2f",
                 sup_names[sp], pass_names[p], names[pl], real'(acc[pl]) / 1024.0,
                 100.0 * real'(mis[pl]) / real'(acc[pl]), real'(cyc[pl]) / 1024.0);
      end
      if (support == SUP_BASE) begin
        checks++;
        if (acc[0] != 4 * 1024) begin
          failures++;
          $display("FAIL baseline made %0d accesses for 1024 requests", acc[0]);
        end
      end
      if (support == SUP_1) begin
        checks++;
        if (!(acc[1] < acc[0] && acc[4] < acc[1])) begin
          failures++;
          $display("FAIL support 1 accesses RZ/RZU/RZS4 = %0d/%0d/%0d", acc[0], acc[1], acc[4]);
        end
      end
      for (int pl = 1; pl < 5; pl++) begin
        checks++;
        if ((support != SUP_1 && acc[pl] != acc[0]) || mis[pl] != mis[0]) begin
          failures++;
          $display("FAIL %s differs from RZ: %0d/%0d accesses/misses vs %0d/%0d", names[pl],
                   acc[pl], mis[pl], acc[0], mis[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
