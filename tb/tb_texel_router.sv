// tb_texel_router: for random footprints and each cache organisation, builds every cache access
// the request needs from the reference access list (its start texel gives the slot; the case
// comes from the line-count reference). It fills a line buffer with known words and checks
// that the router marks exactly the quad slots the access returns: under support 2 those in the
// same line, under support 1 those in the run of consecutive footprint addresses that starts at
// the start texel, under the baseline only the start texel. It also checks that each delivered word comes from that slot
// texel's reference position. Across the accesses of one request every slot must be delivered
// exactly once.
module tb_texel_router;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic [511:0] line;
  access_t acc;
  logic [3:0] own_off;
  logic [3:0][31:0] slot_texel;
  logic [3:0] slot_valid;
  int checks = 0, failures = 0;
  support_e support;
  texel_router dut (.support, .line, .acc, .own_off, .slot_texel, .slot_valid);
  initial begin
    for (int t = 0; t < 6000; t++) begin
      int mm, nn, uu, vv, p, cs;
      logic [31:0] a[4], st[4];
      int ns;
      logic [3:0] got;
      int expl[$];
      expl.delete();
      mm = int'($urandom_range(0, 9)); nn = int'($urandom_range(0, 9));
      uu = int'($urandom_range(0, 65535)) % (1 << mm);
      vv = int'($urandom_range(0, 65535)) % (1 << nn);
      p = int'($urandom_range(0, 4));
      for (int s = 0; s < 4; s++) a[s] = ref_addr(mm, nn, uu + s % 2, vv + s / 2, p, 32'h0);
      cs = ref_case(mm, nn, uu, vv, p, 32'h0);
      support = support_e'(t % 3);
      ns = ref_accesses(mm, nn, uu, vv, p, 32'h0, t % 3, st);
      if (t % 3 == 0) expl = '{0, 1, 2, 3};
      else for (int i = 0; i < ns; i++)
        for (int q = 0; q < 4; q++) if (a[q] == st[i]) begin expl.push_back(q); break; end
      got = '0;
      foreach (expl[i]) begin
        int s;
        s = expl[i];
        for (int w = 0; w < 16; w++) line[32*w +: 32] = $urandom;
        acc = '0;
        acc.u = 16'((uu + s % 2) % (1 << mm)); acc.v = 16'((vv + s / 2) % (1 << nn));
        acc.slot = 2'(s); acc.cse = case_e'(cs); acc.m = 5'(mm); acc.n = 5'(nn);
        acc.placement = placement_e'(p);
        own_off = a[s][5:2];
        #1;
        for (int q = 0; q < 4; q++) begin
          bit same;
          if (support == SUP_BASE) same = (q == s);
          else if (support == SUP_1) begin
            // in the run of consecutive footprint addresses that starts at a[s]
            int len;
            len = 0;
            for (int k = 0; k < 4; k++) begin
              bit found;
              found = 0;
              for (int r = 0; r < 4; r++)
                if (a[r] == a[s] + 4 * k && a[r][31:6] == a[s][31:6]) found = 1;
              if (!found) break;
              len++;
            end
            same = (a[q][31:6] == a[s][31:6]) && a[q] >= a[s] && a[q] < a[s] + 4 * len;
          end
          else same = (a[q][31:6] == a[s][31:6]);
          checks++;
          if (slot_valid[q] != same || (same && slot_texel[q] !== line[32*int'(a[q][5:2]) +: 32])) begin
            failures++;
            $display("FAIL sup=%0d m=%0d n=%0d u=%0d v=%0d pl=%0d access slot %0d, slot %0d",
                     support, mm, nn, uu, vv, p, s, q);
          end
          if (slot_valid[q]) begin
            checks++;
            if (got[q]) begin failures++; $display("FAIL slot %0d delivered twice", q); end
            got[q] = 1;
          end
        end
      end
      checks++;
      if (got != 4'hF) begin failures++; $display("FAIL slots %b delivered", got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
