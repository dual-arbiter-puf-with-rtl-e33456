`timescale 1ps/1ps
// srapuf_pkg: types, sizes and the device-variation function shared by the
// shift-register-obfuscated arbiter PUF (SR-APUF).
//
// The challenge width and the response width default to 64 bits, the size of
// the published design (64-stage delay lines, 64 one-bit cells). The shift
// direction encoding and the delay-variation hash are this design's own
// choices: the hash stands in for the random manufacturing spread of an FPGA's
// multiplexer and routing delays so that a simulation can tell two "devices"
// apart by a seed.
package srapuf_pkg;

  localparam int unsigned CHALLENGE_BITS = 64;  // delay-line stages
  localparam int unsigned RESPONSE_BITS  = 64;  // one-bit cells in parallel

  // Direction of one obfuscation shift step.
  typedef enum logic {
    SHIFT_RIGHT = 1'b0,   // even parity of the PUF sequence
    SHIFT_LEFT  = 1'b1    // odd parity of the PUF sequence
  } shift_dir_e;

  // Path index inside one delay stage: the mux that drives the top line when
  // the challenge bit is 0 (straight) or 1 (crossed), and likewise for the
  // bottom line.
  typedef enum int unsigned {
    PATH_TOP_STRAIGHT = 0,
    PATH_TOP_CROSS    = 1,
    PATH_BOT_STRAIGHT = 2,
    PATH_BOT_CROSS    = 3
  } stage_path_e;

  // 32-bit avalanche mix (murmur3 finaliser).
  function automatic int unsigned mix32(int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE35;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay in ps of one path of one stage of one cell of one device:
  // nominal +/- spread, uniformly spread, fixed per (seed, cell, stage, path).
  function automatic int stage_delay_ps(int unsigned seed, int unsigned cell_id,
                                        int unsigned stage, int unsigned path,
                                        int nominal_ps, int spread_ps);
    int unsigned h;
    h = mix32(seed ^ 32'h5A5A_0000);
    h = mix32(h ^ (cell_id * 32'h9E37_79B1));
    h = mix32(h ^ (stage * 32'h7FEB_352D) ^ path);
    return nominal_ps - spread_ps + int'(h % (2 * spread_ps + 1));
  endfunction

endpackage
