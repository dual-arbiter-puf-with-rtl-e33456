`timescale 1ps/1ps
// tb_mux_delay_line: launches steps through two delay-line instances (two
// devices/cells) under random challenges and checks the exact arrival time of
// each line's rising edge against the additive delay model computed
// arithmetically, and that both lines drain after the step falls.
module tb_mux_delay_line;
  import tb_ref_pkg::*;
  localparam int N = 64;
  localparam int NOM = 500, SPR = 25;

  logic step = 1'b0;
  logic [N-1:0] challenge = '0;
  logic top_a, bot_a, top_b, bot_b;
  realtime t0, ta_top, ta_bot, tb_top, tb_bot;
  int checks = 0, failures = 0;
  int top_wins = 0;

  mux_delay_line dut_a (.step(step), .challenge(challenge), .top_out(top_a), .bot_out(bot_a));
  mux_delay_line #(.N_STAGES(N), .DEVICE_SEED(7), .CELL_ID(3), .NOMINAL_PS(NOM), .SPREAD_PS(SPR))
    dut_b (.step(step), .challenge(challenge), .top_out(top_b), .bot_out(bot_b));

  always @(posedge top_a) ta_top = $realtime;
  always @(posedge bot_a) ta_bot = $realtime;
  always @(posedge top_b) tb_top = $realtime;
  always @(posedge bot_b) tb_bot = $realtime;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_times(string name, realtime got_top, realtime got_bot,
                             int unsigned seed, int unsigned cid);
    int et, eb;
    race_times(seed, cid, MAXW'(challenge), N, NOM, SPR, et, eb);
    checks += 2;
    if (int'(got_top - t0) != et || int'(got_bot - t0) != eb) begin
      failures++;
      $display("%s: top %0d bot %0d, expected %0d %0d", name,
               int'(got_top - t0), int'(got_bot - t0), et, eb);
    end
    if (et < eb) top_wins++;
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      challenge = {$urandom, $urandom};
      if (t == 0) challenge = '0;
      if (t == 1) challenge = '1;
      #1000;
      t0 = $realtime;
      step = 1'b1;
      #60_000;
      check_times("a", ta_top, ta_bot, 1, 0);
      check_times("b", tb_top, tb_bot, 7, 3);
      step = 1'b0;
      #60_000;
      checks++;
      if (top_a || bot_a || top_b || bot_b) failures++;
    end
    // both outcomes must occur across challenges
    checks++;
    if (top_wins < 100 || top_wins > 300) failures++;
    $display("top line first in %0d of 400 races", top_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
