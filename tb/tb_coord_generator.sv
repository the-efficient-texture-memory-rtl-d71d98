// tb_coord_generator: random requests and a randomly stalling queue under each cache
// organisation. Under support 2 the case codes are random, and each request must produce exactly
// its explicit texels in order (case I: slot 0; II: 0, 2; III: 0, 1; IV: 0..3). Under the
// baseline it must produce slots 0..3. Under support 1 the case comes from the line-count
// reference, and the slots must be those of the start texels in the reference burst list. Every
// access must carry wrapped coordinates, the request's fields and the last flag on the final
// one. With the queue always ready, 30 case I requests must leave in 30 cycles.
module tb_coord_generator;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, out_valid, out_ready;
  tex_req_t req;
  case_e req_cse;
  access_t out_acc;
  access_t exp_q[$];
  int checks = 0, failures = 0;
  bit rand_ready = 1;
  longint cyc = 0, first_out = -1, last_out = 0;

  support_e support = SUP_2;
  int n_multi = 0;    // support-1 requests that needed more than one burst in one line

  coord_generator dut (.clk, .rst_n, .support, .req_valid, .req_ready, .req, .req_cse, .out_valid,
                       .out_ready, .out_acc);

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin
      int slots[$];
      slots.delete();
      if (support == SUP_BASE) slots = '{0, 1, 2, 3};
      else if (support == SUP_1) begin
        logic [31:0] ba[4], t[4];
        int nb;
        nb = ref_accesses(int'(req.m), int'(req.n), longint'(req.u), longint'(req.v),
                          int'(req.placement), 32'h0, 1, ba);
        for (int q = 0; q < 4; q++)
          t[q] = ref_addr(int'(req.m), int'(req.n), longint'(req.u) + longint'(q % 2),
                          longint'(req.v) + longint'(q / 2), int'(req.placement), 32'h0);
        for (int i = 0; i < nb; i++)
          for (int q = 0; q < 4; q++) if (t[q] == ba[i]) begin slots.push_back(q); break; end
        if (nb > 1 && req_cse == CASE_I) n_multi++;
      end else
        case (req_cse)
          CASE_I:   slots = '{0};
          CASE_II:  slots = '{0, 2};
          CASE_III: slots = '{0, 1};
          default:  slots = '{0, 1, 2, 3};
        endcase
      foreach (slots[i]) begin
        access_t a;
        int wu, wv;
        wu = 1 << int'(req.m); wv = 1 << int'(req.n);
        a = '0;
        a.u = 16'((int'(req.u) + slots[i] % 2) % wu);
        a.v = 16'((int'(req.v) + slots[i] / 2) % wv);
        a.slot = 2'(slots[i]); a.cse = req_cse; a.m = req.m; a.n = req.n; a.base = req.base;
        a.placement = req.placement; a.fu = req.fu; a.fv = req.fv;
        a.last = (i == slots.size() - 1);
        exp_q.push_back(a);
      end
    end
    if (out_valid && out_ready) begin
      access_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_acc !== e) begin
        failures++;
        $display("FAIL got u=%0d v=%0d slot=%0d last=%0d want u=%0d v=%0d slot=%0d last=%0d",
                 out_acc.u, out_acc.v, out_acc.slot, out_acc.last, e.u, e.v, e.slot, e.last);
      end
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
    end
    out_ready <= rand_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  end

  // drive at the falling edge; the request is taken at the first rising edge with ready high
  // under support 1 the case must be the real one and the base line aligned
  task automatic send(case_e c);
    int mm, nn;
    bit ok;
    mm = int'($urandom_range(0, 12)); nn = int'($urandom_range(0, 12));
    @(negedge clk);
    req = '{u: 16'($urandom_range(0, (1 << mm) - 1)), v: 16'($urandom_range(0, (1 << nn) - 1)),
            fu: 8'($urandom), fv: 8'($urandom), m: 5'(mm), n: 5'(nn), base: $urandom,
            placement: placement_e'($urandom_range(0, 4))};
    req_cse = c;
    if (support == SUP_1) begin
      req.base = '0;
      req_cse = case_e'(ref_case(mm, nn, longint'(req.u), longint'(req.v), int'(req.placement),
                                 32'h0));
    end
    req_valid = 1;
    do begin
      #1 ok = req_ready;
      @(posedge clk);
      if (!ok) @(negedge clk);
    end while (!ok);
    #1 req_valid = 0;
  endtask

  initial begin
    req_valid = 0; req = '0; req_cse = CASE_I; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) send(case_e'($urandom_range(0, 3)));
    repeat (20) @(posedge clk);
    support = SUP_BASE;
    for (int i = 0; i < 300; i++) send(case_e'($urandom_range(0, 3)));
    repeat (20) @(posedge clk);
    support = SUP_1;
    for (int i = 0; i < 2000; i++) send(CASE_I);
    repeat (20) @(posedge clk);
    checks++;
    if (n_multi == 0) begin failures++; $display("FAIL no line needed two bursts"); end
    support = SUP_2;
    rand_ready = 0;
    repeat (2) @(posedge clk);
    first_out = -1;
    for (int i = 0; i < 30; i++) send(CASE_I);
    repeat (5) @(posedge clk);
    checks++;
    if (last_out - first_out != 29) begin
      failures++;
      $display("FAIL 30 case I requests took %0d cycles", last_out - first_out + 1);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
