`timescale 1ps/1ps
// nand_arbiter: behavioural model of the cross-coupled NAND arbiter at the end
// of an arbiter PUF's delay lines. It is not synthesizable logic: its function
// depends on the arrival times of two edges.
//
// With both inputs low the latch is in its reset state. The first input to
// rise sets the decision: `top_first` becomes 1 if `in_top` rose first and 0 if
// `in_bot` rose first, matching the conventional arbiter that latches 1 when the
// data-side path wins. When the two edges arrive within WINDOW_PS of each other
// the latch goes metastable and settles randomly; the chance that the earlier
// edge still wins grows linearly from 1/2 at a tie to 1 at WINDOW_PS. This is the
// model's stand-in for the noise that makes a real PUF less than 100 % reliable;
// the window and its linear shape are this design's own choice.
//
// Interface: `top_first` changes only when the second input has risen, holds
// through the reset phase (both inputs low) and through the next race until
// that race is decided. `decided` is high from the first rising edge until both
// inputs are low again.
module nand_arbiter #(
  parameter int WINDOW_PS = 20
) (
  input  logic in_top,
  input  logic in_bot,
  output logic top_first,
  output logic decided
);
  realtime t_first;
  logic    first_is_top;
  int      dt;
  int      draw;

  initial begin
    top_first = 1'b0;
    decided   = 1'b0;
  end

  always begin
    @(posedge in_top or posedge in_bot);
    decided      = 1'b1;
    t_first      = $realtime;
    first_is_top = in_top;
    if (!(in_top && in_bot)) begin
      wait (in_top && in_bot);
    end
    dt = int'($realtime - t_first);
    if (dt >= WINDOW_PS) begin
      top_first = first_is_top;
    end else begin
      // metastable: the earlier edge wins with probability 1/2 + dt/(2*WINDOW)
      draw = int'($urandom_range(2 * WINDOW_PS - 1, 0));
      top_first = (draw < WINDOW_PS + dt) ? first_is_top : !first_is_top;
    end
    wait (!in_top && !in_bot);
    decided = 1'b0;
  end

endmodule
