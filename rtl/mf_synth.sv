// mf_synth: symbol matched-filter synthesis.
//
// Builds the pass-band symbol matched filter of one user as the cascade of the
// user's spreading sequence and channel estimate:
//   f[k] = sum_{n=0}^{15} s[n] * g[k - 4n],   k = 0 .. 315,
// where s[n] = ovsf(code, n) * scr(n) is the 16-chip spreading sequence (placed
// every 4 samples, i.e. up-sampled by Nc = 4) and g the user's 256-tap cleaned
// channel estimate, read from the channel analyzer (g_tap one cycle after
// g_idx).  Each output takes 16 read/add-or-subtract cycles (taps with k-4n
// outside 0..255 are skipped as zero), 316*16 = 5056 cycles per user.  f streams
// out on f_valid/f_idx with 20-bit parts, then done pulses.
// The convolution is the paper's; the serial one-tap-per-cycle schedule is this
// design's choice.
module mf_synth
  import sdr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [3:0]         code_idx,
  output logic [7:0]         g_idx,
  input  cplx16_t            g_tap,
  output logic               f_valid,
  output logic [8:0]         f_idx,
  output logic signed [19:0] f_re,
  output logic signed [19:0] f_im,
  output logic               busy,
  output logic               done
);

  logic [8:0]  k;
  logic [3:0]  n;
  logic        issue;
  logic        s1, s1_ok, s1_neg, s1_last;
  logic [8:0]  s1_k;
  logic signed [19:0] acc_re, acc_im, add_re, add_im;
  int          j;

  always_comb begin
    j     = int'(k) - 4 * int'(n);
    g_idx = 8'(j);
    add_re = '0;
    add_im = '0;
    if (s1_ok) begin
      add_re = s1_neg ? -20'(g_tap.re) : 20'(g_tap.re);
      add_im = s1_neg ? -20'(g_tap.im) : 20'(g_tap.im);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0; n <= '0; issue <= 1'b0;
      s1 <= 1'b0; s1_ok <= 1'b0; s1_neg <= 1'b0; s1_last <= 1'b0; s1_k <= '0;
      acc_re <= '0; acc_im <= '0;
      f_valid <= 1'b0; f_idx <= '0; f_re <= '0; f_im <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      f_valid <= 1'b0;
      done    <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        issue <= 1'b1;
        k     <= '0;
        n     <= '0;
      end else if (issue) begin
        n <= n + 4'd1;
        if (n == 4'd15) begin
          if (int'(k) == MF_LEN - 1) issue <= 1'b0;
          else                       k <= k + 9'd1;
        end
      end
      s1      <= issue;
      s1_ok   <= issue && (j >= 0) && (j < CH_SAMPLES);
      s1_neg  <= (ovsf_chip(int'(code_idx), int'(n)) * scr_chip(int'(n))) < 0;
      s1_last <= issue && (n == 4'd15);
      s1_k    <= k;
      if (s1) begin
        if (s1_last) begin
          f_valid <= 1'b1;
          f_idx   <= s1_k;
          f_re    <= acc_re + add_re;
          f_im    <= acc_im + add_im;
          acc_re  <= '0;
          acc_im  <= '0;
          if (!issue) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          acc_re <= acc_re + add_re;
          acc_im <= acc_im + add_im;
        end
      end
    end
  end

endmodule
