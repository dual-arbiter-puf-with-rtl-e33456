`timescale 1ps/1ps
// obfuscation_ctrl: the control logic that turns a PUF-generated sequence into
// shift commands for the challenge shift register.
//
// On `start` it examines `seq`: odd parity selects a left shift and even parity
// a right shift, and the difference between the number of ones and the number
// of zeros is the number of bit positions to shift (both as the document
// describes). The OTP bit `a1` is folded into the direction: a1 = 1 inverts it.
// The document says only that the sequence and A1 together control the shift
// register's selection line; the XOR is this design's choice.
//
// Timing: the cycle after `start` the shift begins; `shift_en` is high for
// exactly `amount` cycles, one bit per cycle, and `done` is high for one cycle
// right after the last shift (the cycle after `start` when amount is 0).
// `start` is ignored while `busy`.
module obfuscation_ctrl #(
  parameter int unsigned WIDTH = srapuf_pkg::RESPONSE_BITS,
  localparam int unsigned CW   = $clog2(WIDTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [WIDTH-1:0]       seq,
  input  logic                   a1,
  output logic                   busy,
  output logic                   shift_en,
  output srapuf_pkg::shift_dir_e dir,
  output logic [CW-1:0]          amount,
  output logic                   done
);
  import srapuf_pkg::*;

  logic [CW-1:0] ones;
  logic [CW-1:0] zeros;
  logic [CW-1:0] diff;
  logic          odd;
  logic [CW-1:0] remaining;

  always_comb begin
    ones  = CW'($countones(seq));
    zeros = CW'(WIDTH) - ones;
    diff  = (ones >= zeros) ? ones - zeros : zeros - ones;
    odd   = ^seq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      remaining <= '0;
      amount    <= '0;
      dir       <= SHIFT_RIGHT;
    end else if (!busy) begin
      if (start) begin
        busy      <= 1'b1;
        remaining <= diff;
        amount    <= diff;
        dir       <= shift_dir_e'(odd ^ a1);
      end
    end else if (remaining != '0) begin
      remaining <= remaining - 1'b1;
    end else begin
      busy <= 1'b0;
    end
  end

  assign shift_en = busy && (remaining != '0);
  assign done     = busy && (remaining == '0);

endmodule
