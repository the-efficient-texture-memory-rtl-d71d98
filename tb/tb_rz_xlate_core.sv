// tb_rz_xlate_core: the combinational recursive-Z translation against the bit-loop reference
// for random dimensions, coordinates and placements, plus three worked examples:
// RZ(3,3,4,7) = 58, RZ(4,2,9,3) = 43 and RZ(2,4,3,9) = 39.
module tb_rz_xlate_core;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic [4:0] m, n;
  logic [15:0] u, v;
  placement_e pl;
  logic [31:0] a_idx;
  int checks = 0, failures = 0;
  rz_xlate_core dut (.m, .n, .u, .v, .placement(pl), .a_idx);
  task automatic check(int mm, int nn, int uu, int vv, int p, longint unsigned want);
    m = 5'(mm); n = 5'(nn); u = 16'(uu); v = 16'(vv); pl = placement_e'(p);
    #1;
    checks++;
    if (64'(a_idx) != want) begin
      failures++;
      $display("FAIL m=%0d n=%0d u=%0d v=%0d pl=%0d got %0d want %0d", mm, nn, uu, vv, p, a_idx, want);
    end
  endtask
  initial begin
    check(3, 3, 4, 7, 0, 58);
    check(4, 2, 9, 3, 0, 43);
    check(2, 4, 3, 9, 0, 39);
    for (int t = 0; t < 5000; t++) begin
      int mm, nn, uu, vv, p;
      mm = int'($urandom_range(0, 16)); nn = int'($urandom_range(0, 16));
      uu = int'($urandom_range(0, 65535)); vv = int'($urandom_range(0, 65535));
      p = int'($urandom_range(0, 4));
      check(mm, nn, uu, vv, p, ref_index(mm, nn, longint'(uu), longint'(vv), p));
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
