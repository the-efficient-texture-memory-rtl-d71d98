// tb_rz_common_field_gen: random coordinates and interleave counts; the expected field is
// built bit by bit: index bit 2i = u_i and 2i+1 = v_i for i < k, zero above.
module tb_rz_common_field_gen;
  logic [15:0] en, u, v;
  logic [31:0] field;
  int checks = 0, failures = 0;
  rz_common_field_gen dut (.en, .u, .v, .field);
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int k;
      logic [31:0] want;
      k = int'($urandom_range(0, 16));
      u = 16'($urandom); v = 16'($urandom);
      en = 16'((32'd1 << k) - 1);
      want = '0;
      for (int i = 0; i < k; i++) begin
        want[2*i]   = u[i];
        want[2*i+1] = v[i];
      end
      #1;
      checks++;
      if (field !== want) begin
        failures++;
        $display("FAIL k=%0d u=%h v=%h field=%h want %h", k, u, v, field, want);
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
