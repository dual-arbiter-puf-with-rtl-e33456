`timescale 1ps/1ps
// apuf_cell: one SR-APUF hard macro, giving one response bit.
//
// It holds a launch flip-flop that drives the step into the two-layer
// multiplexer delay line, the cross-coupled NAND arbiter that decides which
// line's edge arrived first, and a capture flip-flop that brings the decision
// into the clock domain. This matches the 1-bit cell of the published design
// (delay-line multiplexers, a few flip-flops, cross-coupled NAND gates); how
// the flip-flops are used is this design's own choice.
//
// Timing: `launch` is registered, so the step rises on the clock edge after
// `launch` is first seen high. The race takes about N_STAGES * NOMINAL_PS, and
// the controller must hold `launch` high at least that long before pulsing
// `capture`; `resp` then updates on the edge where `capture` is high. The
// challenge must not change while the step is high. Before a new race the
// step must be low long enough for both lines to drain.
module apuf_cell #(
  parameter int unsigned N_STAGES    = srapuf_pkg::CHALLENGE_BITS,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned CELL_ID     = 0,
  parameter int          NOMINAL_PS  = 500,
  parameter int          SPREAD_PS   = 25,
  parameter int          WINDOW_PS   = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_STAGES-1:0] challenge,
  input  logic                launch,
  input  logic                capture,
  output logic                resp
);
  logic step_q;
  logic top_out, bot_out;
  logic top_first;
  logic decided;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step_q <= 1'b0;
    else        step_q <= launch;
  end

  mux_delay_line #(
    .N_STAGES   (N_STAGES),
    .DEVICE_SEED(DEVICE_SEED),
    .CELL_ID    (CELL_ID),
    .NOMINAL_PS (NOMINAL_PS),
    .SPREAD_PS  (SPREAD_PS)
  ) u_lines (
    .step     (step_q),
    .challenge(challenge),
    .top_out  (top_out),
    .bot_out  (bot_out)
  );

  nand_arbiter #(.WINDOW_PS(WINDOW_PS)) u_arbiter (
    .in_top   (top_out),
    .in_bot   (bot_out),
    .top_first(top_first),
    .decided  (decided)
  );

  // capture only a finished race; `decided` is otherwise unused
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  resp <= 1'b0;
    else if (capture && decided) resp <= top_first;
  end

endmodule
