`timescale 1ps/1ps
// tb_apuf_cell: runs the cell's launch/race/capture sequence with a 100 MHz
// clock under random challenges. Where the two lines' arrival times differ by
// more than the arbiter's noise window, the captured bit must equal the
// arithmetic model's winner (1 = top line first). It also checks that the
// response changes only on the edge where `capture` is high.
module tb_apuf_cell;
  import tb_ref_pkg::*;
  localparam int N = 64;
  localparam int NOM = 500, SPR = 25, WIN = 20;
  localparam int unsigned SEED = 5, CID = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] challenge = '0;
  logic launch = 1'b0;
  logic capture = 1'b0;
  logic resp;
  int checks = 0, failures = 0, ones = 0, certain = 0;

  apuf_cell #(.N_STAGES(N), .DEVICE_SEED(SEED), .CELL_ID(CID), .NOMINAL_PS(NOM),
              .SPREAD_PS(SPR), .WINDOW_PS(WIN)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    int m;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      challenge = {$urandom, $urandom};
      repeat (8) @(negedge clk);       // drain
      held = resp;
      launch = 1'b1;
      repeat (8) @(negedge clk);       // race (80 ns)
      checks++;
      if (resp !== held) begin failures++; $display("resp changed without capture"); end
      capture = 1'b1;
      @(negedge clk);
      capture = 1'b0;
      launch = 1'b0;
      m = race_margin(SEED, CID, MAXW'(challenge), N, NOM, SPR);
      if (m >= WIN || m <= -WIN) begin
        certain++;
        checks++;
        if (resp !== (m > 0)) begin
          failures++;
          $display("challenge %h margin %0d resp %b", challenge, m, resp);
        end
        ones += int'(resp);
      end
    end
    checks++;
    if (certain < 200 || ones == 0 || ones == certain) failures++;
    $display("decided races %0d, ones %0d", certain, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
