// tb_rz_diff_field_gen: random coordinates; the expected differential field is the longer
// side's coordinate with its k low bits dropped, placed from index bit 2k upwards. Includes the
// m=7, n=3 example (u6 u5 u4 u3 followed by six zeros).
module tb_rz_diff_field_gen;
  logic m_ge_n;
  logic [4:0] k;
  logic [15:0] en, u, v;
  logic [31:0] field;
  int checks = 0, failures = 0;
  rz_diff_field_gen dut (.m_ge_n, .k, .en, .u, .v, .field);
  task automatic check(logic [31:0] want);
    #1;
    checks++;
    if (field !== want) begin
      failures++;
      $display("FAIL k=%0d sel_u=%b u=%h v=%h field=%h want %h", k, m_ge_n, u, v, field, want);
    end
  endtask
  initial begin
    m_ge_n = 1; k = 3; en = 16'h0007; u = 16'b1011010; v = 16'b101;
    check(32'b1011000000);
    for (int t = 0; t < 2000; t++) begin
      int kk;
      logic [31:0] sel;
      kk = int'($urandom_range(0, 16));
      k = 5'(kk);
      en = 16'((32'd1 << kk) - 1);
      u = 16'($urandom); v = 16'($urandom); m_ge_n = 1'($urandom);
      sel = m_ge_n ? 32'(u) : 32'(v);
      check(32'((64'(sel) >> kk) << (2 * kk)));
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
