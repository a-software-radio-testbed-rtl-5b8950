// mf_detector: pass-band matched filtering and symbol-rate sampling.
//
// Holds one user's 316-tap complex matched filter f (loaded from the synthesis
// stream on f_valid/f_idx) and, on start, computes for each of the 138 symbols
// of the slot
//   b[s] = sum_{j=0}^{315} r[base(s) + j] * conj(f[j]),
//   base(s) = 64 s                 for s = 0..68   (data field 1)
//           = 4*1360 + 64 (s-69)   for s = 69..137 (data field 2),
// where r are the real pass-band samples of the slot buffer (rd_data one cycle
// after rd_addr).  Filtering the real pass-band signal with the analytic filter
// and sampling every N*Nc = 64 samples also moves the symbol to base band, since
// (-j)^(64 s) = 1: no explicit demodulation is needed, as in the paper.
// Output: sym_valid/sym_idx/sym, scaled by 2^-OUT_SHIFT and saturated to 16
// bits, then done.  Timing: 316 cycles per symbol, 43608 cycles per user and slot.
// The serial one-tap-per-cycle schedule and the scaling are this design's choices.
module mf_detector
  import sdr_pkg::*;
#(
  parameter int OUT_SHIFT = 16,
  parameter int IN_W      = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   f_valid,
  input  logic [8:0]             f_idx,
  input  logic signed [19:0]     f_re,
  input  logic signed [19:0]     f_im,
  input  logic                   start,
  output logic [13:0]            rd_addr,
  input  logic signed [IN_W-1:0] rd_data,
  output logic                   sym_valid,
  output logic [7:0]             sym_idx,
  output cplx16_t                sym,
  output logic                   busy,
  output logic                   done
);

  logic [39:0] fmem [MF_LEN];
  logic [39:0] f_q;

  logic [7:0]  s;
  logic [8:0]  j;
  logic        issue, s1, s1_last;
  logic [7:0]  s1_s;
  logic signed [47:0] acc_re, acc_im, sum_re, sum_im, sh_re, sh_im;
  int          base;

  function automatic logic signed [15:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)  return 16'sh7fff;
    if (v < -48'sd32768) return -16'sh8000;
    return 16'(v);
  endfunction

  always_comb begin
    base    = (int'(s) < SYMS_FIELD) ? OSR * SF * int'(s)
                                     : OSR * DATA2_START + OSR * SF * (int'(s) - SYMS_FIELD);
    rd_addr = 14'(base + int'(j));
    sum_re  = acc_re + 48'(rd_data) * 48'($signed(f_q[39:20]));
    sum_im  = acc_im - 48'(rd_data) * 48'($signed(f_q[19:0]));
    sh_re   = sum_re >>> OUT_SHIFT;
    sh_im   = sum_im >>> OUT_SHIFT;
  end

  always_ff @(posedge clk) begin
    if (f_valid && int'(f_idx) < MF_LEN) fmem[f_idx] <= {f_re, f_im};
    f_q <= fmem[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; j <= '0; issue <= 1'b0;
      s1 <= 1'b0; s1_last <= 1'b0; s1_s <= '0;
      acc_re <= '0; acc_im <= '0;
      sym_valid <= 1'b0; sym_idx <= '0; sym <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      done      <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        issue <= 1'b1;
        s     <= '0;
        j     <= '0;
      end else if (issue) begin
        if (int'(j) == MF_LEN - 1) begin
          j <= '0;
          if (int'(s) == SYMS_SLOT - 1) issue <= 1'b0;
          else                          s <= s + 8'd1;
        end else begin
          j <= j + 9'd1;
        end
      end
      s1      <= issue;
      s1_last <= issue && (int'(j) == MF_LEN - 1);
      s1_s    <= s;
      if (s1) begin
        if (s1_last) begin
          sym_valid <= 1'b1;
          sym_idx   <= s1_s;
          sym.re    <= sat16(sh_re);
          sym.im    <= sat16(sh_im);
          acc_re    <= '0;
          acc_im    <= '0;
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
