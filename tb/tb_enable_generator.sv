// tb_enable_generator: the four case codes against the texels each case shares with the
// explicit texel's line: I all four, II the right one, III the lower one, IV none.
module tb_enable_generator;
  import tex_pkg::*;
  case_e cse;
  logic [3:0] en;
  int checks = 0, failures = 0;
  logic [3:0] want[4] = '{4'b1111, 4'b0011, 4'b0101, 4'b0001};
  enable_generator dut (.cse, .en);
  initial begin
    for (int c = 0; c < 4; c++) begin
      cse = case_e'(c);
      #1;
      checks++;
      if (en !== want[c]) begin failures++; $display("FAIL case %0d en=%b", c, en); end
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
