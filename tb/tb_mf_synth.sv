// tb_mf_synth: checks the matched-filter synthesis against a direct convolution.
//
// A random complex 256-tap channel is served with one cycle of read latency.
// For two spreading codes every output must equal
// f[k] = sum_n s[n] g[k - 4n], s[n] = ovsf(code, n) * scr(n), computed here,
// and the whole filter (316 taps) must take 316 x 16 cycles plus pipeline.
module tb_mf_synth;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, f_valid, busy, done;
  logic [3:0] code_idx;
  logic [7:0] g_idx;
  cplx16_t g_tap;
  logic [8:0] f_idx;
  logic signed [19:0] f_re, f_im;

  mf_synth dut (.*);

  int checks = 0, failures = 0;
  int gre [256], gim [256];
  int nf = 0;
  int cyc = 0, t0 = 0, t1 = 0;

  always @(posedge clk) begin
    cyc++;
    g_tap.re <= 16'(gre[g_idx]);
    g_tap.im <= 16'(gim[g_idx]);
    if (rst_n && f_valid) begin
      int er, ei;
      er = 0; ei = 0;
      for (int n = 0; n < 16; n++) begin
        int j, s;
        j = int'(f_idx) - 4 * n;
        s = ovsf_chip(int'(code_idx), n) * scr_chip(n);
        if (j >= 0 && j < 256) begin er += s * gre[j]; ei += s * gim[j]; end
      end
      checks++;
      if (int'(f_re) != er || int'(f_im) != ei || int'(f_idx) != nf) begin
        failures++;
        if (failures < 10) $display("f[%0d]: got %0d,%0d exp %0d,%0d", f_idx, f_re, f_im, er, ei);
      end
      nf++;
    end

  end

  initial begin
    for (int j = 0; j < 256; j++) begin
      gre[j] = $signed($urandom_range(0, 20000)) - 10000;
      gim[j] = $signed($urandom_range(0, 20000)) - 10000;
    end
    start = 0; code_idx = 5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      nf = 0;
      code_idx <= (c == 0) ? 4'd5 : 4'd14;
      @(posedge clk) start <= 1;
      t0 = cyc + 1;
      @(posedge clk) start <= 0;
      wait (done);
      t1 = cyc;
      repeat (2) @(posedge clk);
      @(posedge clk);
      checks++;
      if (nf != MF_LEN) failures++;
      $display("synthesis took %0d cycles", t1 - t0);
      checks++;
      if (t1 - t0 < MF_LEN * 16 || t1 - t0 > MF_LEN * 16 + 3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
