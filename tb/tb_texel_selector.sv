// tb_texel_selector: random line buffers, offsets and enables; each mux must return the word
// at its offset and pass its enable as valid.
module tb_texel_selector;
  logic [511:0] line;
  logic [3:0][3:0] off;
  logic [3:0] en, valid;
  logic [3:0][31:0] texel;
  int checks = 0, failures = 0;
  texel_selector dut (.line, .off, .en, .texel, .valid);
  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int w = 0; w < 16; w++) line[32*w +: 32] = $urandom;
      off = 16'($urandom);
      en = 4'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (texel[i] !== line[32*int'(off[i]) +: 32] || valid[i] !== en[i]) begin
          failures++;
          $display("FAIL mux %0d offset %0d", i, off[i]);
        end
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
