// tb_tx_pulse_shaper: checks the x4 RRC interpolator and fs/4 modulation.
//
// The testbench answers each chip request one cycle later with a random complex
// chip and keeps the list of chips sent.  Output sample n = 4g + p must equal
// sign(p) * sum_i h[p + 4i] * a[g - 2 - i] >> 14 (Re for even p, Im for odd p,
// signs + - - + ), computed here from the full 49-tap impulse response: the chip
// requested after group g-2 enters the delay line at the end of group g-1.  sample_en is held high in every
// cycle, the fastest rate the block supports; one chip request per 4 samples, one
// output per strobe and a mostly non-zero output are also checked.
module tb_tx_pulse_shaper;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sample_en, chip_req, chip_valid, out_valid;
  logic signed [13:0] chip_re, chip_im;
  logic signed [15:0] out_sample;

  tx_pulse_shaper dut (.*);

  int checks = 0, failures = 0;
  int are [4096], aim [4096];
  int nchips = 0, nout = 0, nreq = 0, nz = 0;

  always @(posedge clk) begin
    chip_valid <= 1'b0;
    if (rst_n && chip_req) begin
      are[nchips] = $signed($urandom_range(0, 4000)) - 2000;
      aim[nchips] = $signed($urandom_range(0, 4000)) - 2000;
      chip_re    <= 14'(are[nchips]);
      chip_im    <= 14'(aim[nchips]);
      chip_valid <= 1'b1;
      nchips++;
      nreq++;
    end
    if (rst_n && out_valid) begin
      int g, p;
      longint acc, e;
      g = nout / 4; p = nout % 4;
      acc = 0;
      for (int i = 0; i < 13; i++) begin
        int t, idx;
        t = p + 4 * i; idx = g - 2 - i;
        if (t < 49 && idx >= 0)
          acc += longint'(RRC_TAPS[t]) * longint'((p % 2 == 0) ? are[idx] : aim[idx]);
      end
      if (p == 1 || p == 2) acc = -acc;
      e = acc >>> 14;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      checks++;
      if (longint'(out_sample) != e) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %0d exp %0d", nout, out_sample, e);
      end
      if (out_sample != 0) nz++;
      nout++;
    end
  end

  initial begin
    sample_en = 0; chip_re = 0; chip_im = 0; chip_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk) sample_en <= 1;
    repeat (4000) @(posedge clk);
    sample_en <= 0;
    repeat (3) @(posedge clk);
    // one output per sample_en cycle (4000 of them, pipeline latency aside)
    checks++;
    if (nout < 3990 || nout > 4000) begin
      failures++;
      $display("got %0d output samples for 4000 sample strobes", nout);
    end
    checks++;
    if (nz < nout / 2) begin
      failures++;
      $display("only %0d of %0d output samples are non-zero", nz, nout);
    end
    checks++;
    if (nreq != nout / 4) begin
      failures++;
      $display("requests %0d for %0d samples", nreq, nout);
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
