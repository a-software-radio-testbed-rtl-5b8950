// tb_channel_estimator: checks the joint LS pass-band estimate of two users.
//
// The slot buffer is modelled here (one-cycle read).  Its 768-sample window is
// filled with the cyclic convolution of the up-sampled base midamble with the
// two users' real channels, user u delayed by 256u samples:
//   r[k] = sum_u sum_d c_u[d] * b_up[(k - d - 256u) mod 768],
//   b_up[i] = mid_chip(i/4) for i % 4 == 0, else 0,
// plus small noise.  For a real channel, mask/B leaves Re h = c exactly (up to
// coefficient rounding), so Re h[256u + d] must match c_u[d] within +-6 for every
// tap, and the image-rejected part (Im h) must carry energy.  The run time must
// be 2*256 taps x 768 cycles.
module tb_channel_estimator;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, tap_valid, busy, done;
  logic [1:0] num_users;
  logic [13:0] rd_addr;
  logic signed [11:0] rd_data;
  logic [9:0] tap_idx;
  cplx16_t tap;

  channel_estimator dut (.*);

  int checks = 0, failures = 0;
  int mem [SLOT_SAMPLES];
  int c [2][256];
  int ntaps = 0;
  longint im_energy = 0;
  int t_start, t_done;
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    rd_data <= 12'(mem[rd_addr]);
    if (rst_n && tap_valid) begin
      int u, d;
      u = int'(tap_idx) / 256; d = int'(tap_idx) % 256;
      checks++;
      if (int'(tap_idx) != ntaps || int'(tap.re) > c[u][d] + 6 || int'(tap.re) < c[u][d] - 6) begin
        failures++;
        if (failures < 10) $display("tap %0d (%0d): got %0d exp %0d", tap_idx, ntaps, tap.re, c[u][d]);
      end
      im_energy += longint'(tap.im) * longint'(tap.im);
      ntaps++;
    end
    if (rst_n && done) t_done = cyc;
  end

  initial begin
    for (int u = 0; u < 2; u++) for (int d = 0; d < 256; d++) c[u][d] = 0;
    // user 0: three paths; user 1: two paths
    c[0][30] = 500; c[0][31] = 300; c[0][45] = -200; c[0][90] = 120;
    c[1][28] = -400; c[1][60] = 250;
    for (int a = 0; a < SLOT_SAMPLES; a++) mem[a] = $signed($urandom_range(0, 2000)) - 1000;
    for (int k = 0; k < 768; k++) begin
      int acc;
      acc = 0;
      for (int u = 0; u < 2; u++)
        for (int d = 0; d < 256; d++) begin
          int i;
          i = ((k - d - 256 * u) % 768 + 768) % 768;
          if (c[u][d] != 0 && i % 4 == 0) acc += c[u][d] * mid_chip(i / 4);
        end
      mem[WIN_OFFSET + k] = acc + $signed($urandom_range(0, 2)) - 1;
    end
    start = 0; num_users = 2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk) start <= 1;
    t_start = cyc + 1;
    @(posedge clk) start <= 0;
    wait (done);
    repeat (3) @(posedge clk);
    checks++;
    if (ntaps != 512) failures++;
    checks++;
    if (im_energy < 100000) failures++;
    $display("estimation took %0d cycles", t_done - t_start);
    checks++;
    if (t_done - t_start < 512 * 768 || t_done - t_start > 512 * 768 + 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
