// tx_pulse_shaper: x4 polyphase root-raised-cosine interpolator with fs/4
// modulation to a real IF signal.
//
// The 49-tap RRC filter (roll-off 0.22, 12 chips, 4 samples per chip) is split
// into 4 polyphase branches of 13 taps.  On each sample_en the block outputs
// sample n = 4m + p of x'[n] = Re{ j^n x[n] }, where x[n] is the interpolated
// complex chip stream; since j^n only depends on p, the output is
//   p=0: +Re(y)   p=1: -Im(y)   p=2: -Re(y)   p=3: +Im(y),
//   y = sum_i RRC_TAPS[p + 4i] * a[m - i],
// so only the needed half of the complex filter is computed and the carrier
// multiplication reduces to sign changes, as in the paper.
// Chip flow: chip_req pulses in the cycle after the phase-3 sample; the chip
// presented on chip_valid before the next phase-3 sample is shifted into the
// delay line with that sample and used from the following phase 0 on.  A chip
// source with up to two cycles of latency keeps up even with sample_en held
// high in every cycle.  out_valid follows sample_en by one cycle.
// The result is scaled by 2^-OUT_SHIFT and saturated to 16 bits (own choice).
module tx_pulse_shaper
  import sdr_pkg::*;
#(
  parameter int OUT_SHIFT = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample_en,
  output logic               chip_req,
  input  logic               chip_valid,
  input  logic signed [13:0] chip_re,
  input  logic signed [13:0] chip_im,
  output logic               out_valid,
  output logic signed [15:0] out_sample
);

  localparam int NPH = 13;   // taps per phase

  logic signed [13:0] dl_re [NPH];
  logic signed [13:0] dl_im [NPH];
  logic signed [13:0] nxt_re, nxt_im;
  logic [1:0]         ph;

  logic signed [39:0] acc;
  logic signed [39:0] scaled;

  always_comb begin
    acc = '0;
    for (int i = 0; i < NPH; i++) begin
      int t;
      t = int'(ph) + 4 * i;
      if (t < 49) begin
        if (ph[0] == 1'b0) acc = acc + 40'(RRC_TAPS[t]) * 40'(dl_re[i]);
        else               acc = acc + 40'(RRC_TAPS[t]) * 40'(dl_im[i]);
      end
    end
    if (ph == 2'd1 || ph == 2'd2) acc = -acc;
    scaled = acc >>> OUT_SHIFT;
  end

  // the delay line holds a[m] in dl[0] during the four phases of chip m
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph         <= 2'd0;
      chip_req   <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
      nxt_re     <= '0;
      nxt_im     <= '0;
      for (int i = 0; i < NPH; i++) begin
        dl_re[i] <= '0;
        dl_im[i] <= '0;
      end
    end else begin
      chip_req  <= sample_en && (ph == 2'd3);
      out_valid <= sample_en;
      if (chip_valid) begin
        nxt_re <= chip_re;
        nxt_im <= chip_im;
      end
      if (sample_en) begin
        ph <= ph + 2'd1;
        if (scaled > 40'sd32767)       out_sample <= 16'sh7fff;
        else if (scaled < -40'sd32768) out_sample <= -16'sh8000;
        else                           out_sample <= 16'(scaled);
        if (ph == 2'd3) begin
          dl_re[0] <= nxt_re;
          dl_im[0] <= nxt_im;
          for (int i = 1; i < NPH; i++) begin
            dl_re[i] <= dl_re[i-1];
            dl_im[i] <= dl_im[i-1];
          end
        end
      end
    end
  end

endmodule
