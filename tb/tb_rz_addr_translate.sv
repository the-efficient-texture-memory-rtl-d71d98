// tb_rz_addr_translate: streams random accesses through the pipelined translation unit with a
// randomly stalling consumer. Each output must carry its own access record, in order, with
// address (A' << 2) + base from the reference index. With the consumer always ready the unit
// must take one access per cycle and answer two cycles later.
module tb_rz_addr_translate;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  access_t in_acc, out_acc;
  logic [31:0] out_addr;
  int checks = 0, failures = 0;
  access_t exp_acc[$];
  longint cyc = 0, t_in[$];
  bit rand_ready = 1;

  rz_addr_translate dut (.clk, .rst_n, .in_valid, .in_ready, .in_acc, .out_valid, .out_ready,
                         .out_acc, .out_addr);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin exp_acc.push_back(in_acc); t_in.push_back(cyc); end
    if (out_valid && out_ready) begin
      access_t e;
      longint t0;
      e = exp_acc.pop_front();
      t0 = t_in.pop_front();
      checks++;
      if (out_acc !== e || out_addr !== ref_addr(int'(e.m), int'(e.n), longint'(e.u),
                                                 longint'(e.v), int'(e.placement), e.base)) begin
        failures++;
        $display("FAIL addr %h for m=%0d n=%0d u=%0d v=%0d", out_addr, e.m, e.n, e.u, e.v);
      end
      if (!rand_ready) begin
        checks++;
        if (cyc - t0 != 2) begin failures++; $display("FAIL latency %0d", cyc - t0); end
      end
    end
    out_ready <= rand_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  end

  function automatic access_t rand_acc();
    access_t a;
    a = access_t'({$urandom, $urandom, $urandom, $urandom});
    a.m = 5'($urandom_range(0, 16));
    a.n = 5'($urandom_range(0, 16));
    a.placement = placement_e'($urandom_range(0, 4));
    return a;
  endfunction

  initial begin
    in_valid = 0; in_acc = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      rand_ready = (phase == 0);
      for (int i = 0; i < 1000; i++) begin
        in_acc <= rand_acc();
        in_valid <= 1'($urandom_range(0, 3) != 0) | (phase == 1);
        @(posedge clk);
        while (in_valid && !in_ready) @(posedge clk);
      end
      in_valid <= 0;
      repeat (10) @(posedge clk);
    end
    checks++;
    if (exp_acc.size() != 0) begin failures++; $display("FAIL %0d lost", exp_acc.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
