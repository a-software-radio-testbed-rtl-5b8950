// dac_interp_fir: x8 up-sampler and band-pass FIR in front of the D/A converter.
//
// The D/A converter runs at fd = L_DA * fs.  Each fs-rate IF sample is followed
// by L_DA-1 zeros and the result is filtered by the 32-tap band-pass DAC_TAPS,
// centred at 13/32 of fd.  With fs = 14.7456 MHz and f_IF = 70 MHz = (5 - 1/4) fs
// this frequency is the replica of the IF signal (its image about fd/2), so the
// filter boosts the wanted replica instead of the sinc-shaped D/A response
// losing it.  The filter is computed in polyphase form: output phase q
// (0..7, counted on dac_en) is sum_i DAC_TAPS[q + 8i] * x[m - i], i = 0..3.
// A sample given on in_valid enters the delay line at the next phase 0.
// out_valid follows dac_en by one cycle.  L_DA = 8 is the paper's; the filter
// design (Hann-windowed cosine, gain 8 at the replica) is this design's own,
// since the paper only states what the filter must do.
module dac_interp_fir
  import sdr_pkg::*;
#(
  parameter int L_DA      = 8,
  parameter int OUT_SHIFT = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               dac_en,
  input  logic               in_valid,
  input  logic signed [15:0] in_sample,
  output logic               out_valid,
  output logic signed [15:0] out_sample
);

  localparam int NTAP = 32;
  localparam int NPH  = (NTAP + L_DA - 1) / L_DA;

  logic signed [15:0] dl [NPH];
  logic signed [15:0] nxt;
  logic [$clog2(L_DA)-1:0] q;
  logic signed [35:0] acc, scaled;

  always_comb begin
    acc = '0;
    for (int i = 0; i < NPH; i++) begin
      int t;
      t = int'(q) + L_DA * i;
      if (t < NTAP) acc = acc + 36'(DAC_TAPS[t]) * 36'(dl[i]);
    end
    scaled = acc >>> OUT_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q          <= '0;
      nxt        <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
      for (int i = 0; i < NPH; i++) dl[i] <= '0;
    end else begin
      out_valid <= dac_en;
      if (in_valid) nxt <= in_sample;
      if (dac_en) begin
        q <= (int'(q) == L_DA - 1) ? '0 : q + 1'b1;
        if (scaled > 36'sd32767)       out_sample <= 16'sh7fff;
        else if (scaled < -36'sd32768) out_sample <= -16'sh8000;
        else                           out_sample <= 16'(scaled);
        if (int'(q) == L_DA - 1) begin
          dl[0] <= in_valid ? in_sample : nxt;
          for (int i = 1; i < NPH; i++) dl[i] <= dl[i-1];
        end
      end
    end
  end

endmodule
