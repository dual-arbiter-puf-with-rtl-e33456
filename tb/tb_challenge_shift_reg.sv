`timescale 1ps/1ps
// tb_challenge_shift_reg: loads random challenges, shifts them left and right
// by random amounts with random idle cycles in between, and compares the
// register every cycle with an arithmetic rotation of the loaded value.
module tb_challenge_shift_reg;
  import srapuf_pkg::*;
  localparam int W = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic [W-1:0] load_value = '0;
  logic shift_en = 1'b0;
  shift_dir_e dir = SHIFT_RIGHT;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  logic [W-1:0] base;
  int pos;       // net left rotation applied to base

  challenge_shift_reg #(.WIDTH(W)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rotl(logic [W-1:0] v, int k);
    logic [2*W-1:0] d = {v, v};
    k = ((k % W) + W) % W;
    return d[2*W-1-k -: W];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    if (q !== '0) failures++;
    checks++;
    for (int t = 0; t < 40; t++) begin
      base = {$urandom, $urandom};
      load = 1'b1; load_value = base; shift_en = 1'b1;   // load wins
      @(negedge clk);
      load = 1'b0;
      pos = 0;
      checks++;
      if (q !== base) begin failures++; $display("load fail %h %h", q, base); end
      for (int s = 0; s < 30; s++) begin
        shift_en = ($urandom % 4) != 0;
        dir = shift_dir_e'($urandom % 2);
        @(negedge clk);
        if (shift_en) pos += (dir == SHIFT_LEFT) ? 1 : -1;
        checks++;
        if (q !== rotl(base, pos)) begin
          failures++;
          $display("shift fail pos=%0d q=%h exp=%h", pos, q, rotl(base, pos));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
