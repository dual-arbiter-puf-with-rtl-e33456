`timescale 1ps/1ps
// tb_obfuscation_ctrl: applies random and corner-case sequences with both
// values of A1 and checks the shift direction (odd parity = left, flipped by
// A1), the number of shift cycles (|ones - zeros|), the reported amount, and
// that `done` comes exactly one cycle after the last shift.
module tb_obfuscation_ctrl;
  import srapuf_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 64;
  localparam int CW = $clog2(W + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] seq = '0;
  logic a1 = 1'b0;
  logic busy, shift_en, done;
  shift_dir_e dir;
  logic [CW-1:0] amount;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_zero = 0;

  obfuscation_ctrl #(.WIDTH(W)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [W-1:0] s, logic a);
    int exp_amt, shifts, cyc;
    logic exp_left;
    exp_amt  = shift_amount(MAXW'(s), W);
    exp_left = shift_left(MAXW'(s), W, a);
    seq = s; a1 = a; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    seq = ~s;            // the sequence may change once started
    shifts = 0; cyc = 0;
    while (!done && cyc < 200) begin
      checks++;
      if (!busy || dir != shift_dir_e'(exp_left)) failures++;
      if (shift_en) shifts++;
      @(negedge clk);
      cyc++;
    end
    checks += 3;
    if (shifts != exp_amt) begin failures++; $display("amount %0d exp %0d", shifts, exp_amt); end
    if (cyc != exp_amt) begin failures++; $display("done after %0d cycles, exp %0d", cyc, exp_amt); end
    if (int'(amount) != exp_amt) failures++;
    if (exp_amt == 0) n_zero++;
    else if (exp_left) n_left++;
    else n_right++;
    @(negedge clk);
    checks++;
    if (busy || done) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run('0, 1'b0);
    run('1, 1'b1);
    run({32'hFFFF_FFFF, 32'h0}, 1'b0);
    run(64'h1, 1'b0);
    run(64'h3, 1'b0);
    run(64'h3, 1'b1);
    for (int t = 0; t < 60; t++) begin
      logic [W-1:0] s;
      s = {$urandom, $urandom};
      if (t % 3 == 0) s = s & {$urandom, $urandom};   // skew the counts
      run(s, logic'($urandom % 2));
    end
    checks++;
    if (n_left == 0 || n_right == 0 || n_zero == 0) failures++;
    $display("left=%0d right=%0d zero=%0d", n_left, n_right, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
