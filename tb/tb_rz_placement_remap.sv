// tb_rz_placement_remap: every placement, every position inside a 4x4 tile and interleave
// counts 0..3. The expected low bits come from the hand-drawn tile orders of the reference
// package; when the tile does not fit (k too small) the input bits must pass unchanged.
module tb_rz_placement_remap;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  placement_e pl;
  logic [4:0] k;
  logic [1:0] u, v;
  logic [3:0] low_in, low_out;
  int checks = 0, failures = 0;
  rz_placement_remap dut (.placement(pl), .k, .u, .v, .low_in, .low_out);
  initial begin
    for (int p = 0; p < 5; p++)
      for (int kk = 0; kk < 4; kk++)
        for (int uu = 0; uu < 4; uu++)
          for (int vv = 0; vv < 4; vv++) begin
            logic [3:0] want;
            pl = placement_e'(p); k = 5'(kk); u = 2'(uu); v = 2'(vv);
            // RZ bits when both tile bits are interleaved, otherwise arbitrary upper bits
            low_in = (kk >= 2) ? {v[1], u[1], v[0], u[0]} : {2'($urandom), v[0], u[0]};
            want = low_in;
            if (p == 1 && kk >= 1) want = {low_in[3:2], 2'(rzu_pos(uu % 2, vv % 2))};
            if (p == 2 && kk >= 2) want = 4'(rzfu1_pos(uu, vv));
            if (p == 3 && kk >= 2) want = 4'(rzfu2_pos(uu, vv));
            if (p == 4 && kk >= 2) want = 4'(rzs4_pos(uu, vv));
            #1;
            checks++;
            if (low_out !== want) begin
              failures++;
              $display("FAIL pl=%0d k=%0d u=%0d v=%0d out=%h want %h", p, kk, uu, vv, low_out, want);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
