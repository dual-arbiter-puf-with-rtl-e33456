`timescale 1ps/1ps
// mux_delay_line: behavioural model of the two racing multiplexer delay lines
// of one arbiter PUF cell. It is not synthesizable logic: its function is the
// analog delay of FPGA multiplexers and routing, modelled with transport delays.
//
// A step on `step` enters both lines together. Each of the N_STAGES stages is a
// pair of 2:1 multiplexers selected by one challenge bit: with the bit at 0 the
// top and bottom signals go straight through, with the bit at 1 they cross over
// (the conventional arbiter PUF). Every multiplexer input path has its own
// delay, nominal +/- spread, drawn from srapuf_pkg::stage_delay_ps with the
// device seed and the cell number, which stands in for manufacturing variation.
// At each step edge the model walks the stages once to find when the edge
// leaves each line, then drives the two outputs at those times; this gives the
// same waveforms as one delayed event per multiplexer at a small fraction of
// the simulation cost.
// The stage structure follows the conventional arbiter PUF; the delay figures
// and their uniform spread are this model's own choice.
//
// Interface: `challenge` is sampled at each edge of `step` and must be stable
// while `step` is high. `top_out` and `bot_out` rise about N_STAGES *
// NOMINAL_PS after `step` rises, in an order that depends on the challenge,
// and fall again after `step` falls. `step` must hold each level longer than
// the slower line's delay (an edge that arrives while the previous one is
// still in flight is not seen).
module mux_delay_line #(
  parameter int unsigned N_STAGES    = srapuf_pkg::CHALLENGE_BITS,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned CELL_ID     = 0,
  parameter int          NOMINAL_PS  = 500,
  parameter int          SPREAD_PS   = 25
) (
  input  logic                step,
  input  logic [N_STAGES-1:0] challenge,
  output logic                top_out,
  output logic                bot_out
);
  import srapuf_pkg::*;

  // Arrival time, after the step edge, of each line's copy of the edge:
  // walk the stages, taking at each one the delay of the multiplexer input
  // that the challenge bit selects.
  function automatic void propagate(input logic [N_STAGES-1:0] ch,
                                    output int t_top, output int t_bot);
    int nt, nb;
    t_top = 0;
    t_bot = 0;
    for (int i = 0; i < N_STAGES; i++) begin
      if (ch[i]) begin   // crossed
        nt = t_bot + stage_delay_ps(DEVICE_SEED, CELL_ID, i, PATH_TOP_CROSS,    NOMINAL_PS, SPREAD_PS);
        nb = t_top + stage_delay_ps(DEVICE_SEED, CELL_ID, i, PATH_BOT_CROSS,    NOMINAL_PS, SPREAD_PS);
      end else begin     // straight
        nt = t_top + stage_delay_ps(DEVICE_SEED, CELL_ID, i, PATH_TOP_STRAIGHT, NOMINAL_PS, SPREAD_PS);
        nb = t_bot + stage_delay_ps(DEVICE_SEED, CELL_ID, i, PATH_BOT_STRAIGHT, NOMINAL_PS, SPREAD_PS);
      end
      t_top = nt;
      t_bot = nb;
    end
  endfunction

  int   arr_top, arr_bot;
  logic level;

  initial begin
    top_out = 1'b0;
    bot_out = 1'b0;
  end

  // Each edge of the step reaches the two outputs at their arrival times.
  always @(posedge step or negedge step) begin
    level = step;
    propagate(challenge, arr_top, arr_bot);
    if (arr_top <= arr_bot) begin
      #(arr_top);
      top_out <= level;
      #(arr_bot - arr_top);
      bot_out <= level;
    end else begin
      #(arr_bot);
      bot_out <= level;
      #(arr_top - arr_bot);
      top_out <= level;
    end
  end

endmodule
