`timescale 1ps/1ps
// tb_srapuf_quality: the uniqueness and reliability measurements on six
// simulated devices.
//
// Six SR-APUF instances with different device seeds stand for six boards.
// Each is given the same two 64-bit challenges, giving one 128-bit response
// per device. Uniqueness is the mean pairwise inter-device Hamming distance as
// a percentage of the 128 bits:
//   U = 2 / (k (k-1)) * sum_{x<y} HD(R_x, R_y) / 128 * 100.
// Reliability repeats the same two challenges NREP times on every device and
// compares each repeat with that device's first response:
//   Rel = 100 - mean_t HD(R_x, R'_x,t) / 128 * 100.
// The only noise in the model is the arbiter's metastability window, so this
// measures repeatability at one operating point, not over temperature or
// supply. The same figure is also reported for the first-pass sequence (the
// plain arbiter PUF before obfuscation). The testbench checks the Hamming
// distance sums against a second, bit-serial count and checks that the
// figures fall in plausible ranges.
module tb_srapuf_quality;
  import srapuf_pkg::*;
  localparam int K = 6, N = 64, R = 64, NREP = 10;
  localparam int CW = $clog2(R + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [K-1:0] req_valid = '0;
  logic [N-1:0] req_challenge = '0;
  logic [K-1:0] req_ready, resp_valid, otp_programmed;
  logic [R-1:0] resp_data [K];
  logic [R-1:0] seq_data [K];
  shift_dir_e   obf_dir [K];
  logic [CW-1:0] obf_amount [K];

  int checks = 0, failures = 0;
  logic [2*R-1:0] ref_resp [K];
  logic [2*R-1:0] ref_seq [K];
  logic [2*R-1:0] cur_resp [K];
  logic [2*R-1:0] cur_seq [K];
  logic [N-1:0] chal [2];

  for (genvar d = 0; d < K; d++) begin : g_dev
    srapuf_top #(.DEVICE_SEED(d + 1)) u_dev (
      .clk(clk), .rst_n(rst_n),
      .req_valid(req_valid[d]), .req_challenge(req_challenge), .req_ready(req_ready[d]),
      .trng_en(1'b0),
      .resp_valid(resp_valid[d]), .resp_data(resp_data[d]), .seq_data(seq_data[d]),
      .obf_dir(obf_dir[d]), .obf_amount(obf_amount[d]),
      .otp_prog_en(1'b0), .otp_prog_value(1'b0), .otp_programmed(otp_programmed[d])
    );
  end

  always #5000 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one 128-bit measurement on device d
  task automatic measure(int d, output logic [2*R-1:0] resp, output logic [2*R-1:0] seq);
    for (int h = 0; h < 2; h++) begin
      while (!req_ready[d]) @(negedge clk);
      req_challenge = chal[h];
      req_valid[d] = 1'b1;
      @(negedge clk);
      req_valid[d] = 1'b0;
      while (!resp_valid[d]) @(negedge clk);
      resp[h*R +: R] = resp_data[d];
      seq[h*R +: R]  = seq_data[d];
      @(negedge clk);
    end
  endtask

  function automatic int hd_serial(logic [2*R-1:0] a, logic [2*R-1:0] b);
    int c = 0;
    for (int i = 0; i < 2 * R; i++) if (a[i] != b[i]) c++;
    return c;
  endfunction

  initial begin
    int sum_inter, sum_inter2, pairs;
    int sum_intra, sum_intra_seq;
    real uniq, rel, rel_seq;
    chal[0] = 64'h0123_4567_89AB_CDEF;
    chal[1] = 64'hF0E1_D2C3_B4A5_9687;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int d = 0; d < K; d++) measure(d, ref_resp[d], ref_seq[d]);

    // uniqueness, eq. (1)
    sum_inter = 0; sum_inter2 = 0; pairs = 0;
    for (int x = 0; x < K - 1; x++)
      for (int y = x + 1; y < K; y++) begin
        sum_inter  += $countones(ref_resp[x] ^ ref_resp[y]);
        sum_inter2 += hd_serial(ref_resp[x], ref_resp[y]);
        pairs++;
      end
    checks++;
    if (sum_inter != sum_inter2 || pairs != K * (K - 1) / 2) failures++;
    uniq = 100.0 * real'(sum_inter) / real'(pairs * 2 * R);

    // reliability, eq. (2) and (3)
    sum_intra = 0; sum_intra_seq = 0;
    for (int t = 0; t < NREP; t++)
      for (int d = 0; d < K; d++) begin
        measure(d, cur_resp[d], cur_seq[d]);
        sum_intra     += hd_serial(ref_resp[d], cur_resp[d]);
        sum_intra_seq += hd_serial(ref_seq[d], cur_seq[d]);
      end
    rel     = 100.0 - 100.0 * real'(sum_intra)     / real'(NREP * K * 2 * R);
    rel_seq = 100.0 - 100.0 * real'(sum_intra_seq) / real'(NREP * K * 2 * R);

    $display("uniqueness %0.1f %% over %0d pairs of 128-bit responses", uniq, pairs);
    $display("reliability %0.1f %% (first-pass sequence %0.1f %%) over %0d repeats x %0d devices",
             rel, rel_seq, NREP, K);
    checks += 3;
    if (uniq < 35.0 || uniq > 65.0) failures++;
    if (rel_seq < 90.0 || rel_seq >= 100.0) failures++;
    if (rel > rel_seq) failures++;   // a sequence error can only spread
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
