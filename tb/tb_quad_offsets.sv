// tb_quad_offsets: for random texture sizes, footprints and placements, checks the line offset
// of each of the four footprint texels against the word-in-line bits of its reference address
// (independent placement model, line-aligned base).
module tb_quad_offsets;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic [4:0] m, n;
  logic [15:0] u, v;
  placement_e placement;
  logic [3:0][3:0] off;
  int checks = 0, failures = 0;

  quad_offsets dut (.m, .n, .u, .v, .placement, .off);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int mm, nn, pl;
      mm = int'($urandom_range(0, 12)); nn = int'($urandom_range(0, 12));
      pl = int'($urandom_range(0, 4));
      m = 5'(mm); n = 5'(nn); placement = placement_e'(pl);
      u = 16'($urandom_range(0, (1 << mm) - 1));
      v = 16'($urandom_range(0, (1 << nn) - 1));
      #1;
      for (int s = 0; s < 4; s++) begin
        logic [31:0] a;
        a = ref_addr(mm, nn, longint'(u) + longint'(s % 2), longint'(v) + longint'(s / 2), pl,
                     32'h0);
        checks++;
        if (off[s] !== a[5:2]) begin
          failures++;
          $display("FAIL m=%0d n=%0d u=%0d v=%0d pl=%0d slot %0d: got %0d want %0d", mm, nn, u, v,
                   pl, s, off[s], a[5:2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
