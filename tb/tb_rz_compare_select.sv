// tb_rz_compare_select: exhaustive test of the compare-and-select logic over all 5-bit m, n.
module tb_rz_compare_select;
  logic [4:0] m, n, k;
  logic m_ge_n;
  int checks = 0, failures = 0;
  rz_compare_select dut (.m, .n, .k, .m_ge_n);
  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        m = 5'(i); n = 5'(j);
        #1;
        checks++;
        if (int'(k) != ((i < j) ? i : j) || m_ge_n != (i >= j)) begin
          failures++;
          $display("FAIL m=%0d n=%0d k=%0d m_ge_n=%0d", i, j, k, m_ge_n);
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
