// tb_case_identifier: random texture sizes and footprints. The expected case comes from
// counting the 64-byte lines the four texels really fall in under recursive-Z placement;
// the region shape is checked for 4x4, 8x2, 2x8, 16x1 and 1x16.
module tb_case_identifier;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic [4:0] m, n, rw, rh;
  logic [15:0] u, v;
  case_e cse;
  int checks = 0, failures = 0;
  int seen[4];
  case_identifier dut (.m, .n, .u, .v, .cse, .region_w(rw), .region_h(rh));
  task automatic shape(int mm, int nn, int w, int h);
    m = 5'(mm); n = 5'(nn); u = 0; v = 0;
    #1;
    checks++;
    if (int'(rw) != w || int'(rh) != h) begin
      failures++;
      $display("FAIL shape m=%0d n=%0d: %0dx%0d", mm, nn, 1 << rw, 1 << rh);
    end
  endtask
  initial begin
    shape(9, 9, 2, 2);
    shape(9, 1, 3, 1);
    shape(1, 9, 1, 3);
    shape(9, 0, 4, 0);
    shape(0, 9, 0, 4);
    for (int t = 0; t < 20000; t++) begin
      int mm, nn, uu, vv, want;
      mm = int'($urandom_range(0, 16)); nn = int'($urandom_range(0, 16));
      if (t % 2 == 0) begin mm = mm % 6; nn = nn % 6; end
      uu = int'($urandom_range(0, 65535)) % (1 << mm);
      vv = int'($urandom_range(0, 65535)) % (1 << nn);
      m = 5'(mm); n = 5'(nn); u = 16'(uu); v = 16'(vv);
      want = ref_case(mm, nn, longint'(uu), longint'(vv), 0, 32'h0);
      #1;
      checks++;
      seen[want]++;
      if (int'(cse) != want) begin
        failures++;
        $display("FAIL m=%0d n=%0d u=%0d v=%0d case %0d want %0d", mm, nn, uu, vv, cse, want);
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) begin failures++; $display("FAIL case %0d never seen", c); end
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
