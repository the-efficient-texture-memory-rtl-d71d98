// tb_sync_fifo: random pushes and pops against a queue model; checks the data order, the full
// flag and that a full queue refuses writes.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, full;
  logic [11:0] in_data, out_data;
  logic [11:0] model[$];
  int checks = 0, failures = 0, n_full = 0;

  sync_fifo #(.W(12), .DEPTH(5)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid,
                                      .out_ready, .out_data, .full);

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (full != (model.size() == 5) || out_valid != (model.size() != 0) || in_ready != !full) begin
      failures++;
      $display("FAIL flags full=%b valid=%b size=%0d", full, out_valid, model.size());
    end
    if (full) n_full++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data !== model[0]) begin
        failures++;
        $display("FAIL data %h want %h", out_data, model[0]);
      end
      void'(model.pop_front());
    end
    if (in_valid && in_ready) model.push_back(in_data);
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      bias = (i / 500) % 2;
      in_valid  <= ($urandom_range(0, 3) < 2 + bias);
      out_ready <= ($urandom_range(0, 3) < 3 - 2 * bias);
      in_data   <= 12'($urandom);
      @(posedge clk);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
