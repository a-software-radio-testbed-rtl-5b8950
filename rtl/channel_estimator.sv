// channel_estimator: joint least-squares pass-band channel estimation.
//
// Every user sends the same 192-chip base midamble, user u cyclically delayed by
// u*64 chips, after a 64-chip cyclic prefix.  Over the 768-sample base period
// (192 chips x 4 samples) the received real signal is therefore the cyclic
// convolution of the up-sampled base midamble b with the users' channels laid
// side by side, c_u occupying samples 256u .. 256u+255.  The LS estimate is
//   H[k] = R[k] * mask[k] / B[k],  mask = 1 at k=0 and 384, 2 for 0<k<384, 0 above,
// i.e. division by the DFT of the base period plus rejection of the image half of
// the real input's spectrum, which leaves the complex (analytic) pass-band channel.
// This block applies the same linear operator in the time domain,
//   h[n] = sum_{k=0}^{767} r[k] * w[(n - k) mod 768],   w = IDFT(mask / B),
// with w precomputed (16-bit real and imaginary parts, scale 2^20) in
// rtl/chest_coef.hex.  The estimate is therefore identical to the paper's
// FFT / multiply / IFFT procedure, computed with one complex-by-real multiply-
// accumulate per cycle instead of a radix-4/radix-3 FFT pair.
// Interface: on start it reads r[k] from the slot buffer at WIN_BASE + k (read
// data one cycle after rd_addr) and streams h[n], n = 0 .. 256*num_users - 1, on
// tap_valid/tap_idx/tap (scaled by 2^-OUT_SHIFT, saturated), then pulses done.
// Timing: 768 cycles per tap (the pipeline runs on across taps), 393k cycles
// for two users.
module channel_estimator
  import sdr_pkg::*;
#(
  parameter int OUT_SHIFT = 20,
  parameter int WIN_BASE  = WIN_OFFSET,
  parameter int IN_W      = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [1:0]             num_users,
  output logic [13:0]            rd_addr,
  input  logic signed [IN_W-1:0] rd_data,
  output logic                   tap_valid,
  output logic [9:0]             tap_idx,
  output cplx16_t                tap,
  output logic                   busy,
  output logic                   done
);

  logic [31:0] rom [WIN_SAMPLES];
  initial $readmemh("rtl/chest_coef.hex", rom);

  logic [9:0]  n, k, n_end;
  logic        issue, s1, s1_last;
  logic [9:0]  s1_n;
  logic [31:0] coef_q;
  logic [9:0]  caddr;
  logic signed [39:0] acc_re, acc_im;
  logic signed [39:0] p_re, p_im, sum_re, sum_im, sh_re, sh_im;

  function automatic logic signed [15:0] sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)  return 16'sh7fff;
    if (v < -40'sd32768) return -16'sh8000;
    return 16'(v);
  endfunction

  always_comb begin
    caddr   = (n >= k) ? (n - k) : 10'(int'(n) + WIN_SAMPLES - int'(k));
    rd_addr = 14'(WIN_BASE + int'(k));
    p_re    = 40'(rd_data) * 40'($signed(coef_q[31:16]));
    p_im    = 40'(rd_data) * 40'($signed(coef_q[15:0]));
    sum_re  = acc_re + p_re;
    sum_im  = acc_im + p_im;
    sh_re   = sum_re >>> OUT_SHIFT;
    sh_im   = sum_im >>> OUT_SHIFT;
  end

  always_ff @(posedge clk) begin
    coef_q <= rom[caddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0; k <= '0; n_end <= '0;
      issue <= 1'b0; s1 <= 1'b0; s1_last <= 1'b0; s1_n <= '0;
      acc_re <= '0; acc_im <= '0;
      tap_valid <= 1'b0; tap_idx <= '0; tap <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      tap_valid <= 1'b0;
      done      <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        issue <= 1'b1;
        n     <= '0;
        k     <= '0;
        n_end <= 10'(int'(num_users) * CH_SAMPLES - 1);
      end else if (issue) begin
        if (int'(k) == WIN_SAMPLES - 1) begin
          k <= '0;
          if (n == n_end) issue <= 1'b0;
          else            n <= n + 10'd1;
        end else begin
          k <= k + 10'd1;
        end
      end
      // stage 1: multiply-accumulate the sample/coefficient pair issued last cycle
      s1      <= issue;
      s1_last <= issue && (int'(k) == WIN_SAMPLES - 1);
      s1_n    <= n;
      if (s1) begin
        if (s1_last) begin
          acc_re    <= '0;
          acc_im    <= '0;
          tap_valid <= 1'b1;
          tap_idx   <= s1_n;
          tap.re    <= sat16(sh_re);
          tap.im    <= sat16(sh_im);
          if (!issue) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          acc_re <= sum_re;
          acc_im <= sum_im;
        end
      end
    end
  end

endmodule
