// tb_dac_interp_fir: checks the x8 interpolating band-pass filter.
//
// Part 1: random fs-rate samples, one every 8 dac_en pulses; each fd-rate output
// n = 8g + q must equal sum_i DAC_TAPS[q + 8i] * x[g - 1 - i] >> 12 (saturated),
// the zero-stuffed convolution computed directly here.
// Part 2: a full-scale tone at fs/4 (the fs-rate IF signal of the transmitter)
// is interpolated; the output power at 13/32 fd (the IF replica) must exceed the
// power at 1/32 fd (the base-band replica) by more than 20 dB.
module tb_dac_interp_fir;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic dac_en, in_valid, out_valid;
  logic signed [15:0] in_sample, out_sample;

  dac_interp_fir dut (.*);

  int checks = 0, failures = 0;
  int x [4096];
  int nin = 0, nout = 0;
  bit tone = 0;
  real c_if, s_if, c_bb, s_bb;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (!tone) begin
        int g, q;
        longint acc, e;
        g = nout / 8; q = nout % 8;
        acc = 0;
        for (int i = 0; i < 4; i++)
          if (g - 1 - i >= 0) acc += longint'(DAC_TAPS[q + 8 * i]) * longint'(x[g - 1 - i]);
        e = acc >>> 12;
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        checks++;
        if (longint'(out_sample) != e) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d exp %0d", nout, out_sample, e);
        end
      end else if (nout > 64) begin
        c_if += real'(out_sample) * $cos(2.0 * 3.14159265 * 13.0 / 32.0 * nout);
        s_if += real'(out_sample) * $sin(2.0 * 3.14159265 * 13.0 / 32.0 * nout);
        c_bb += real'(out_sample) * $cos(2.0 * 3.14159265 * 1.0 / 32.0 * nout);
        s_bb += real'(out_sample) * $sin(2.0 * 3.14159265 * 1.0 / 32.0 * nout);
      end
      nout++;
    end
  end

  initial begin
    real p_if, p_bb;
    dac_en = 0; in_valid = 0; in_sample = 0;
    c_if = 0; s_if = 0; c_bb = 0; s_bb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 512; n++) begin
      x[n] = $signed($urandom_range(0, 60000)) - 30000;
      for (int q = 0; q < 8; q++) begin
        @(posedge clk);
        dac_en    <= 1;
        in_valid  <= (q == 0);
        in_sample <= 16'(x[n]);
      end
    end
    @(posedge clk) begin dac_en <= 0; in_valid <= 0; end
    repeat (3) @(posedge clk);
    // part 2: fs/4 tone
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nout = 0;
    tone = 1;
    for (int n = 0; n < 512; n++) begin
      for (int q = 0; q < 8; q++) begin
        @(posedge clk);
        dac_en    <= 1;
        in_valid  <= (q == 0);
        in_sample <= (n % 4 == 0) ? 16'sd8000 : (n % 4 == 2) ? -16'sd8000 : 16'sd0;
      end
    end
    @(posedge clk) dac_en <= 0;
    repeat (3) @(posedge clk);
    p_if = c_if * c_if + s_if * s_if;
    p_bb = c_bb * c_bb + s_bb * s_bb;
    $display("IF replica / base-band replica power ratio = %f", p_if / (p_bb + 1.0));
    checks++;
    if (!(p_if > 100.0 * p_bb)) failures++;
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
