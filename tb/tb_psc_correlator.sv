// tb_psc_correlator: checks the hierarchical PSC correlator against a direct
// 256-tap correlation.
//
// The input is random noise (+-200) with the primary code, amplitude 600, placed
// every 4 samples from sample 300 on.  The reference computes
// y[n] = sum_m c[m] r[n - 4(255 - m)] with the full code and
// P[k] = sum_{n=4k}^{4k+3} y[n]^2, and every chip-rate output is compared.  The
// largest output must be at the chip holding the last code chip (sample 1320).
module tb_psc_correlator;
  import sdr_pkg::*;

  localparam int NS = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, pwr_valid;
  logic signed [11:0] in_sample;
  logic [43:0] pwr;

  psc_correlator dut (.*);

  int checks = 0, failures = 0;
  int r [NS];
  longint pref [NS / 4];
  int nout = 0;
  longint best = 0;
  int best_k = 0;

  always @(posedge clk) begin
    if (rst_n && pwr_valid) begin
      checks++;
      if (longint'(pwr) != pref[nout]) begin
        failures++;
        if (failures < 10) $display("chip %0d: got %0d exp %0d", nout, pwr, pref[nout]);
      end
      if (longint'(pwr) > best) begin best = longint'(pwr); best_k = nout; end
      nout++;
    end
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      r[n] = $signed($urandom_range(0, 400)) - 200;
      if (n >= 300 && (n - 300) % 4 == 0 && (n - 300) / 4 < 256) r[n] += 600 * psc_chip((n - 300) / 4);
    end
    for (int k = 0; k < NS / 4; k++) begin
      pref[k] = 0;
      for (int n = 4 * k; n < 4 * k + 4; n++) begin
        longint y;
        y = 0;
        for (int m = 0; m < 256; m++) begin
          int idx;
          idx = n - 4 * (255 - m);
          if (idx >= 0) y += longint'(psc_chip(m) * r[idx]);
        end
        pref[k] += y * y;
      end
    end
    in_valid = 0; in_sample = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(posedge clk);
      in_valid  <= 1;
      in_sample <= 12'(r[n]);
      if (n % 3 == 2) begin
        @(posedge clk) in_valid <= 0;   // gaps in the sample stream
      end
    end
    @(posedge clk) in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (nout != NS / 4) failures++;
    checks++;
    if (best_k != 1320 / 4) begin
      failures++;
      $display("peak at chip %0d", best_k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
