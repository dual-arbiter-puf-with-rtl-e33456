`timescale 1ps/1ps
// tb_nand_arbiter: races two edges with known separations. Beyond the window
// the earlier edge must always win; at a tie the outcome must be random with
// both results common; `decided` must follow the first edge and the reset.
module tb_nand_arbiter;
  localparam int W = 20;
  logic in_top = 1'b0;
  logic in_bot = 1'b0;
  logic top_first, decided;
  int checks = 0, failures = 0;
  int tie_top = 0;

  nand_arbiter #(.WINDOW_PS(W)) dut (.*);

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // top rises at 0, bottom at sep (negative: bottom first)
  task automatic race(int sep);
    #1000;
    checks++;
    if (decided) failures++;
    if (sep >= 0) begin
      in_top = 1'b1;
      #1;
      checks++;
      if (!decided) failures++;
      #(sep);
      in_bot = 1'b1;
    end else begin
      in_bot = 1'b1;
      #(-sep);
      in_top = 1'b1;
    end
    #500;
    in_top = 1'b0;
    in_bot = 1'b0;
    #500;
  endtask

  initial begin
    for (int t = 0; t < 50; t++) begin
      int sep;
      sep = W + int'($urandom % 500);
      race(sep);
      checks++;
      if (top_first !== 1'b1) begin failures++; $display("top by %0d lost", sep); end
      race(-sep);
      checks++;
      if (top_first !== 1'b0) begin failures++; $display("bottom by %0d lost", sep); end
    end
    for (int t = 0; t < 400; t++) begin
      race(0);
      tie_top += int'(top_first);
    end
    checks++;
    if (tie_top < 120 || tie_top > 280) failures++;
    $display("ties won by top: %0d of 400", tie_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
