`timescale 1ps/1ps
// challenge_shift_reg: the challenge register of the SR-APUF, a bidirectional
// shift register used for challenge obfuscation.
//
// `load` copies `load_value` in. Each clock cycle with `shift_en` high moves the
// contents one bit, left (towards the MSB) or right as `dir` says. The shift is
// circular, so no challenge bit is lost; the document says only "left shift or
// right shift", and the rotation is this design's choice. Load has priority
// over shift. `q` is the challenge applied to the delay lines.
module challenge_shift_reg #(
  parameter int unsigned WIDTH = srapuf_pkg::CHALLENGE_BITS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [WIDTH-1:0]       load_value,
  input  logic                   shift_en,
  input  srapuf_pkg::shift_dir_e dir,
  output logic [WIDTH-1:0]       q
);
  import srapuf_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (load) begin
      q <= load_value;
    end else if (shift_en) begin
      if (dir == SHIFT_LEFT) q <= {q[WIDTH-2:0], q[WIDTH-1]};
      else                   q <= {q[0], q[WIDTH-1:1]};
    end
  end
endmodule
