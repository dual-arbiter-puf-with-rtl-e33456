`timescale 1ps/1ps
// apuf_array: N_RESP SR-APUF cells side by side, all given the same challenge,
// each giving one bit of the response. The published design builds a 64-bit
// response from 64 identical hard macros in this way; every cell has its own
// delay variation (its CELL_ID feeds the device-variation model).
//
// Interface and timing are those of apuf_cell: `launch` raises all steps on
// the next clock edge, `capture` samples all arbiters at once, and `resp`
// is valid from the clock edge after `capture`.
module apuf_array #(
  parameter int unsigned N_STAGES    = srapuf_pkg::CHALLENGE_BITS,
  parameter int unsigned N_RESP      = srapuf_pkg::RESPONSE_BITS,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int          NOMINAL_PS  = 500,
  parameter int          SPREAD_PS   = 25,
  parameter int          WINDOW_PS   = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_STAGES-1:0] challenge,
  input  logic                launch,
  input  logic                capture,
  output logic [N_RESP-1:0]   resp
);
  for (genvar k = 0; k < N_RESP; k++) begin : g_cell
    apuf_cell #(
      .N_STAGES   (N_STAGES),
      .DEVICE_SEED(DEVICE_SEED),
      .CELL_ID    (k),
      .NOMINAL_PS (NOMINAL_PS),
      .SPREAD_PS  (SPREAD_PS),
      .WINDOW_PS  (WINDOW_PS)
    ) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .challenge(challenge),
      .launch   (launch),
      .capture  (capture),
      .resp     (resp[k])
    );
  end
endmodule
