`timescale 1ps/1ps
// otp_a1: behavioural model of the one-time-programmable device that holds the
// obfuscation bit A1. It is not synthesizable logic: a real OTP cell (an
// eFuse or antifuse) keeps its value without power and is not cleared by
// reset, which a flip-flop cannot do.
//
// The cell leaves manufacture unprogrammed, reading A1 = 0. The first clock
// edge with `prog_en` high writes `prog_value` and blows the lock; from then on
// `prog_en` is ignored and the value can never change. `programmed` shows the
// lock. The document names the OTP source of A1 but not its interface, which
// is this model's own.
module otp_a1 (
  input  logic clk,
  input  logic prog_en,
  input  logic prog_value,
  output logic a1,
  output logic programmed
);
  // as manufactured
  initial begin
    a1         = 1'b0;
    programmed = 1'b0;
  end

  always @(posedge clk) begin
    if (prog_en && !programmed) begin
      a1         <= prog_value;
      programmed <= 1'b1;
    end
  end
endmodule
