// tb_rz_interleave_cell: checks all eight input combinations of one interleave cell.
module tb_rz_interleave_cell;
  logic e, u, v;
  logic [1:0] a;
  int checks = 0, failures = 0;
  rz_interleave_cell dut (.e, .u, .v, .a);
  initial begin
    for (int i = 0; i < 8; i++) begin
      {e, v, u} = 3'(i);
      #1;
      checks++;
      if (a !== (e ? {v, u} : 2'b00)) begin
        failures++;
        $display("FAIL e=%b u=%b v=%b a=%b", e, u, v, a);
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
