// tb_bilinear_filter: feeds random quads split over one to four accesses (as cases I-IV
// deliver them) with a randomly stalling consumer, and checks every colour against the
// reference bilinear average. Back-to-back single-access requests must give one colour per
// cycle.
module tb_bilinear_filter;
  import tex_pkg::*;
  import tex_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [3:0][31:0] slot_texel;
  logic [3:0] slot_valid;
  access_t in_acc;
  logic [31:0] color;
  logic [31:0] exp_q[$];
  int checks = 0, failures = 0, n_out = 0;
  bit rand_ready = 1;
  longint cyc = 0, t_first = -1, t_last = 0;

  bilinear_filter dut (.clk, .rst_n, .in_valid, .in_ready, .slot_texel, .slot_valid, .in_acc,
                       .out_valid, .out_ready, .color);

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      n_out++;
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
      if (color !== exp_q[0]) begin
        failures++;
        $display("FAIL colour %h want %h", color, exp_q[0]);
      end
      void'(exp_q.pop_front());
    end
    out_ready <= rand_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic beat(logic [3:0] sv, logic [31:0] t[4], bit last, int fu, int fv);
    bit ok;
    @(negedge clk);
    for (int i = 0; i < 4; i++) slot_texel[i] = sv[i] ? t[i] : 32'($urandom);
    slot_valid = sv;
    in_acc = access_t'({$urandom, $urandom, $urandom, $urandom});
    in_acc.fu = 8'(fu); in_acc.fv = 8'(fv); in_acc.last = last;
    in_valid = 1;
    do begin
      #1 ok = in_ready;
      @(posedge clk);
      if (!ok) @(negedge clk);
    end while (!ok);
    #1 in_valid = 0;
  endtask

  task automatic request(int cs);
    logic [31:0] t[4];
    int fu, fv;
    for (int i = 0; i < 4; i++) t[i] = $urandom;
    fu = int'($urandom_range(0, 255)); fv = int'($urandom_range(0, 255));
    exp_q.push_back(bilinear(t[0], t[1], t[2], t[3], fu, fv));
    case (cs)
      0: beat(4'b1111, t, 1, fu, fv);
      1: begin beat(4'b0011, t, 0, fu, fv); beat(4'b1100, t, 1, fu, fv); end
      2: begin beat(4'b0101, t, 0, fu, fv); beat(4'b1010, t, 1, fu, fv); end
      default: begin
        beat(4'b0001, t, 0, fu, fv); beat(4'b0010, t, 0, fu, fv);
        beat(4'b0100, t, 0, fu, fv); beat(4'b1000, t, 1, fu, fv);
      end
    endcase
  endtask

  initial begin
    in_valid = 0; slot_texel = '0; slot_valid = '0; in_acc = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) request(int'($urandom_range(0, 3)));
    repeat (10) @(posedge clk);
    rand_ready = 0;
    repeat (3) @(posedge clk);
    t_first = -1;
    for (int i = 0; i < 20; i++) request(0);
    repeat (5) @(posedge clk);
    checks++;
    if (t_last - t_first != 19 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL 20 colours over %0d cycles, %0d missing", t_last - t_first + 1, exp_q.size());
    end
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
