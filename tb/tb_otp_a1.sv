`timescale 1ps/1ps
// tb_otp_a1: checks the as-manufactured value, that the first programming
// pulse sets A1 and the lock, and that later pulses change nothing.
module tb_otp_a1;
  logic clk = 1'b0;
  logic prog_en = 1'b0;
  logic prog_value = 1'b0;
  logic a1, programmed;
  int checks = 0, failures = 0;

  otp_a1 dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(logic ea1, logic ep);
    checks++;
    if (a1 !== ea1 || programmed !== ep) begin
      failures++;
      $display("a1=%b programmed=%b, expected %b %b", a1, programmed, ea1, ep);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    expect_state(1'b0, 1'b0);
    prog_value = 1'b1;                 // value alone does nothing
    @(negedge clk);
    expect_state(1'b0, 1'b0);
    prog_en = 1'b1;
    @(negedge clk);
    prog_en = 1'b0;
    expect_state(1'b1, 1'b1);
    prog_value = 1'b0;
    prog_en = 1'b1;                    // a second attempt is ignored
    repeat (3) @(negedge clk);
    prog_en = 1'b0;
    expect_state(1'b1, 1'b1);
    repeat (3) @(negedge clk);
    expect_state(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
