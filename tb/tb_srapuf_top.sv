`timescale 1ps/1ps
// tb_srapuf_top: end-to-end test of the SR-APUF at its default size
// (64-bit challenges, 64 cells of 64 stages, 100 MHz clock).
//
// For every response it checks, against an arithmetic model of the simulated
// chip: the first-pass sequence (bits whose race margin exceeds the arbiter's
// noise window), the shift direction and distance the control logic derived
// from that sequence (parity, ones minus zeros, A1), the response of the
// shifted challenge, and the latency in clock cycles. It runs challenge
// requests with A1 unprogrammed, programs A1 = 1 and runs more, then runs the
// free-running mode, where each response must steer the next shift. It counts
// left shifts, right shifts, rounds with A1 = 1, requests and free-running
// rounds, and fails if any of them never happened. The free-running words get
// a frequency (monobit) check.
module tb_srapuf_top;
  import srapuf_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 64, R = 64;
  localparam int S_CYC = 8, R_CYC = 8;   // the top's defaults
  localparam int WIN = 20, NOM = 500, SPR = 25;
  localparam int unsigned SEED = 1;
  localparam int CW = $clog2(R + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req_valid = 1'b0;
  logic [N-1:0] req_challenge = '0;
  logic req_ready;
  logic trng_en = 1'b0;
  logic resp_valid;
  logic [R-1:0] resp_data, seq_data;
  shift_dir_e obf_dir;
  logic [CW-1:0] obf_amount;
  logic otp_prog_en = 1'b0;
  logic otp_prog_value = 1'b0;
  logic otp_programmed;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_left = 0, n_right = 0, n_a1 = 0, n_req = 0, n_trng = 0, n_uncertain = 0;
  int trng_ones = 0;
  logic a1_model = 1'b0;
  logic [N-1:0] chal_model;   // the challenge register, as the model has it

  srapuf_top dut (.*);

  always #5000 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endfunction

  // compare a captured word with the model's response to challenge c
  function automatic void check_word(logic [R-1:0] got, logic [N-1:0] c, string what);
    int m;
    int bad = 0;
    for (int k = 0; k < R; k++) begin
      m = race_margin(SEED, k, MAXW'(c), N, NOM, SPR);
      if (m >= WIN || m <= -WIN) begin
        checks++;
        if (got[k] !== (m > 0)) bad++;
      end else begin
        n_uncertain++;
      end
    end
    failures += bad;
    if (bad != 0) $display("FAIL at cycle %0d: %s, %0d bits differ", cycle, what, bad);
  endfunction

  // check the shift the control logic made from seq, and apply it to the model
  function automatic int check_shift(logic [R-1:0] seq);
    int amt;
    logic left;
    amt  = shift_amount(MAXW'(seq), R);
    left = shift_left(MAXW'(seq), R, a1_model);
    check(int'(obf_amount) == amt, "shift amount");
    check((obf_dir == SHIFT_LEFT) == left, "shift direction");
    if (left) n_left++; else n_right++;
    if (a1_model) n_a1++;
    chal_model = N'(rotate(MAXW'(chal_model), N, amt, left));
    return amt;
  endfunction

  task automatic request(logic [N-1:0] c);
    int c0, amt;
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req_challenge = c;
    c0 = cycle;
    @(negedge clk);
    req_valid = 1'b0;
    chal_model = c;
    while (!resp_valid) @(negedge clk);
    check_word(seq_data, c, "first-pass sequence");
    amt = check_shift(seq_data);
    check_word(resp_data, chal_model, "response");
    check(cycle - c0 == 2 * (S_CYC + R_CYC + 2) + amt + 1, "request latency");
    n_req++;
    @(negedge clk);
  endtask

  initial begin
    logic [R-1:0] prev;
    int t_prev, amt;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(req_ready && !resp_valid && !otp_programmed, "idle after reset");

    // challenge-response requests, A1 unprogrammed (0)
    request('0);
    request('1);
    for (int t = 0; t < 14; t++) request({$urandom, $urandom});

    // program A1 = 1 once; a second attempt must not change it
    otp_prog_en = 1'b1; otp_prog_value = 1'b1;
    @(negedge clk);
    otp_prog_en = 1'b0;
    check(otp_programmed, "OTP programmed");
    a1_model = 1'b1;
    otp_prog_en = 1'b1; otp_prog_value = 1'b0;
    @(negedge clk);
    otp_prog_en = 1'b0;
    for (int t = 0; t < 14; t++) request({$urandom, $urandom});

    // free-running mode: each response steers the next round
    prev = resp_data;
    t_prev = cycle - 1;
    trng_en = 1'b1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      while (!resp_valid) @(negedge clk);
      check(seq_data == prev, "round steered by the previous response");
      amt = check_shift(seq_data);
      check_word(resp_data, chal_model, "free-running word");
      if (t > 0) check(cycle - t_prev == S_CYC + R_CYC + amt + 4, "free-running round length");
      t_prev = cycle;
      prev = resp_data;
      trng_ones += $countones(resp_data);
      n_trng++;
    end
    trng_en = 1'b0;
    // monobit frequency over 40 x 64 bits: within about 4 sigma of one half
    check(trng_ones > 1280 - 100 && trng_ones < 1280 + 100, "monobit frequency");

    $display("requests=%0d free-running=%0d left=%0d right=%0d a1_rounds=%0d uncertain_bits=%0d ones=%0d/2560",
             n_req, n_trng, n_left, n_right, n_a1, n_uncertain, trng_ones);
    check(n_req > 0 && n_trng > 0 && n_left > 0 && n_right > 0 && n_a1 > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
