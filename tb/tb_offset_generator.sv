// tb_offset_generator: offsets of the three neighbours against the low four bits of their
// reference placement index, for random texture sizes, coordinates and placements; plus the
// worked example: explicit texel (1,1) of a 4x4 region under RZ gives offsets 6, 9 and 12.
module tb_offset_generator;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic [4:0] m, n;
  logic [15:0] u, v;
  placement_e pl;
  logic [3:0] off2, off3, off4;
  int checks = 0, failures = 0;
  offset_generator dut (.m, .n, .u, .v, .placement(pl), .off2, .off3, .off4);
  task automatic check(int mm, int nn, int uu, int vv, int p);
    int w2, w3, w4;
    m = 5'(mm); n = 5'(nn); u = 16'(uu); v = 16'(vv); pl = placement_e'(p);
    w2 = int'(ref_index(mm, nn, uu + 1, vv, p) % 16);
    w3 = int'(ref_index(mm, nn, uu, vv + 1, p) % 16);
    w4 = int'(ref_index(mm, nn, uu + 1, vv + 1, p) % 16);
    #1;
    checks++;
    if (int'(off2) != w2 || int'(off3) != w3 || int'(off4) != w4) begin
      failures++;
      $display("FAIL m=%0d n=%0d u=%0d v=%0d pl=%0d: %0d %0d %0d want %0d %0d %0d",
               mm, nn, uu, vv, p, off2, off3, off4, w2, w3, w4);
    end
  endtask
  initial begin
    check(6, 6, 1, 1, 0);
    checks++;
    if (off2 != 6 || off3 != 9 || off4 != 12) begin failures++; $display("FAIL example"); end
    for (int t = 0; t < 5000; t++) begin
      int mm, nn;
      mm = int'($urandom_range(0, 16)); nn = int'($urandom_range(0, 16));
      if (t % 2 == 0) begin mm = mm % 6; nn = nn % 6; end
      check(mm, nn, int'($urandom_range(0, 65535)) % (1 << mm),
            int'($urandom_range(0, 65535)) % (1 << nn), int'($urandom_range(0, 4)));
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
