// tb_rz_enable_encoder: checks the enable pattern for every interleave count 0..16.
module tb_rz_enable_encoder;
  logic [4:0] k;
  logic [15:0] en;
  int checks = 0, failures = 0;
  rz_enable_encoder dut (.k, .en);
  initial begin
    for (int i = 0; i <= 16; i++) begin
      logic [15:0] want;
      want = '0;
      for (int b = 0; b < i; b++) want[b] = 1'b1;
      k = 5'(i);
      #1;
      checks++;
      if (en !== want) begin
        failures++;
        $display("FAIL k=%0d en=%b want %b", i, en, want);
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
