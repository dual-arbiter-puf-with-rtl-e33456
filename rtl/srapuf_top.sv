`timescale 1ps/1ps
// srapuf_top: shift-register-obfuscated arbiter PUF (SR-APUF) with its
// free-running random-number mode.
//
// A challenge is not applied to the PUF as given. It is loaded into a circular
// shift register and first evaluated as it is by the 64 arbiter PUF cells. The
// 64-bit result, a sequence that depends on this chip's delays, drives the
// obfuscation control logic: its parity picks the shift direction (odd: left,
// even: right, inverted when the one-time-programmed bit A1 is 1) and the
// difference between its ones and zeros picks how many positions to shift.
// The shifted challenge is evaluated again and that result is the response.
// With `trng_en` held high and no request waiting, the loop keeps going
// without new challenges: each response steers the next shift of the register
// and the next evaluation, giving one 64-bit random word per round.
//
// The loop (sequence -> parity/count control -> shift register -> delay lines)
// follows the document. The two-pass evaluation order, the settle and race
// times counted in clock cycles, the request/response handshake and the
// free-running mode's exact round are this design's own choices.
//
// Interface: `req_ready` is high in the idle state; a request is taken on a
// clock edge with `req_valid && req_ready`. `resp_valid` is high for one cycle
// with the response on `resp_data`; there is no back-pressure. `seq_data`
// holds the first-pass sequence that set the last shift, `obf_dir` and
// `obf_amount` the last shift. `otp_prog_en`/`otp_prog_value` program A1 once.
//
// Timing: `resp_valid` rises 2*(SETTLE_CYCLES + RACE_CYCLES + 2) + obf_amount
// clock edges after the edge that takes the request (36 + obf_amount at the
// defaults). A free-running round skips the first pass, so successive
// `resp_valid` pulses are SETTLE_CYCLES + RACE_CYCLES + obf_amount + 4 cycles
// apart.
// RACE_CYCLES times the clock period must exceed the slowest delay line
// (about N_STAGES * (NOMINAL_PS + SPREAD_PS)), and SETTLE_CYCLES likewise.
module srapuf_top #(
  parameter int unsigned N_STAGES      = srapuf_pkg::CHALLENGE_BITS,
  parameter int unsigned N_RESP        = srapuf_pkg::RESPONSE_BITS,
  parameter int unsigned DEVICE_SEED   = 1,
  parameter int          NOMINAL_PS    = 500,
  parameter int          SPREAD_PS     = 25,
  parameter int          WINDOW_PS     = 20,
  parameter int unsigned SETTLE_CYCLES = 8,
  parameter int unsigned RACE_CYCLES   = 8,
  localparam int unsigned CW           = $clog2(N_RESP + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // challenge-response requests
  input  logic                   req_valid,
  input  logic [N_STAGES-1:0]    req_challenge,
  output logic                   req_ready,
  // free-running random-number mode
  input  logic                   trng_en,
  // responses
  output logic                   resp_valid,
  output logic [N_RESP-1:0]      resp_data,
  output logic [N_RESP-1:0]      seq_data,
  output srapuf_pkg::shift_dir_e obf_dir,
  output logic [CW-1:0]          obf_amount,
  // one-time programming of A1
  input  logic                   otp_prog_en,
  input  logic                   otp_prog_value,
  output logic                   otp_programmed
);
  import srapuf_pkg::*;

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_SETTLE,
    ST_RACE,
    ST_CAPTURE,
    ST_DECIDE,
    ST_OBF
  } state_e;

  localparam int unsigned TW = $clog2((SETTLE_CYCLES > RACE_CYCLES ? SETTLE_CYCLES : RACE_CYCLES) + 1);

  state_e        state;
  logic [TW-1:0] timer;
  logic          final_pass;   // 0: evaluating for the sequence, 1: for the response
  logic          have_resp;    // a response exists to steer a free-running round

  logic [N_STAGES-1:0] challenge;
  logic [N_RESP-1:0]   arr_resp;
  logic                launch, capture;
  logic                a1;
  logic                obf_start, obf_busy, obf_shift, obf_done;

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      timer      <= '0;
      final_pass <= 1'b0;
      have_resp  <= 1'b0;
      seq_data   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (req_valid) begin
            final_pass <= 1'b0;
            timer      <= TW'(SETTLE_CYCLES - 1);
            state      <= ST_SETTLE;
          end else if (trng_en) begin
            if (have_resp) begin
              final_pass <= 1'b1;
              seq_data   <= arr_resp;
              state      <= ST_OBF;
            end else begin
              final_pass <= 1'b0;
              timer      <= TW'(SETTLE_CYCLES - 1);
              state      <= ST_SETTLE;
            end
          end
        end
        ST_SETTLE: begin
          if (timer == '0) begin
            timer <= TW'(RACE_CYCLES - 1);
            state <= ST_RACE;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        ST_RACE: begin
          if (timer == '0) state <= ST_CAPTURE;
          else             timer <= timer - 1'b1;
        end
        ST_CAPTURE: state <= ST_DECIDE;
        ST_DECIDE: begin
          if (final_pass) begin
            have_resp <= 1'b1;
            state     <= ST_IDLE;
          end else begin
            seq_data   <= arr_resp;
            final_pass <= 1'b1;
            state      <= ST_OBF;
          end
        end
        ST_OBF: begin
          if (obf_done) begin
            timer <= TW'(SETTLE_CYCLES - 1);
            state <= ST_SETTLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign req_ready  = (state == ST_IDLE);
  assign launch     = (state == ST_RACE) || (state == ST_CAPTURE);
  assign capture    = (state == ST_CAPTURE);
  assign obf_start  = ((state == ST_DECIDE) && !final_pass) ||
                      ((state == ST_IDLE) && !req_valid && trng_en && have_resp);
  assign resp_valid = (state == ST_DECIDE) && final_pass;
  assign resp_data  = arr_resp;

  // ---------------------------------------------------------------- datapath
  otp_a1 u_otp (
    .clk       (clk),
    .prog_en   (otp_prog_en),
    .prog_value(otp_prog_value),
    .a1        (a1),
    .programmed(otp_programmed)
  );

  challenge_shift_reg #(.WIDTH(N_STAGES)) u_sreg (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (req_valid && req_ready),
    .load_value(req_challenge),
    .shift_en  (obf_shift),
    .dir       (obf_dir),
    .q         (challenge)
  );

  // the sequence that steers the shift is always the last captured result
  obfuscation_ctrl #(.WIDTH(N_RESP)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (obf_start),
    .seq     (arr_resp),
    .a1      (a1),
    .busy    (obf_busy),
    .shift_en(obf_shift),
    .dir     (obf_dir),
    .amount  (obf_amount),
    .done    (obf_done)
  );

  apuf_array #(
    .N_STAGES   (N_STAGES),
    .N_RESP     (N_RESP),
    .DEVICE_SEED(DEVICE_SEED),
    .NOMINAL_PS (NOMINAL_PS),
    .SPREAD_PS  (SPREAD_PS),
    .WINDOW_PS  (WINDOW_PS)
  ) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .challenge(challenge),
    .launch   (launch),
    .capture  (capture),
    .resp     (arr_resp)
  );

  // the controller is only started when idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) obf_start |-> !obf_busy);
  // the challenge is never shifted or reloaded while a race is running
  a_challenge_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                       launch |-> !obf_shift);

endmodule
