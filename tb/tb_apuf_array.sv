`timescale 1ps/1ps
// tb_apuf_array: evaluates random challenges on an array of cells and checks
// every response bit whose race margin exceeds the noise window against the
// arithmetic model of that cell, so each cell must carry its own variation.
// The array is cut to 16 cells here to keep the simulation short; each cell
// keeps the full 64 stages.
module tb_apuf_array;
  import tb_ref_pkg::*;
  localparam int N = 64, R = 16;
  localparam int NOM = 500, SPR = 25, WIN = 20;
  localparam int unsigned SEED = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] challenge = '0;
  logic launch = 1'b0;
  logic capture = 1'b0;
  logic [R-1:0] resp;
  int checks = 0, failures = 0, differ = 0;

  apuf_array #(.N_STAGES(N), .N_RESP(R), .DEVICE_SEED(SEED), .NOMINAL_PS(NOM),
               .SPREAD_PS(SPR), .WINDOW_PS(WIN)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      challenge = {$urandom, $urandom};
      repeat (8) @(negedge clk);
      launch = 1'b1;
      repeat (8) @(negedge clk);
      capture = 1'b1;
      @(negedge clk);
      capture = 1'b0;
      launch = 1'b0;
      for (int k = 0; k < R; k++) begin
        m = race_margin(SEED, k, MAXW'(challenge), N, NOM, SPR);
        if (m >= WIN || m <= -WIN) begin
          checks++;
          if (resp[k] !== (m > 0)) begin
            failures++;
            $display("cell %0d margin %0d resp %b", k, m, resp[k]);
          end
        end
      end
      // cells see the same challenge but should not all agree
      if (resp != '0 && resp != '1) differ++;
    end
    checks++;
    if (differ < 90) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
