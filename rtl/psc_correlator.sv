// psc_correlator: matched filter for the primary synchronisation code.
//
// Correlates the real A/D samples with the 256-chip +-1 primary code at four
// samples per chip.  The code is hierarchical, c[16p + q] = outer[p] * a[q], so
// the 256-tap correlator is split into two 16-tap add/subtract stages:
//   z[n] = sum_q a[q]     * r[n - 4(15 - q)]     (taps 4 samples apart)
//   y[n] = sum_p outer[p] * z[n - 64(15 - p)]    (taps 64 samples apart)
// which needs 32 additions per sample instead of 256, and no multiplier.
// Because the taps are a whole number of chips apart the carrier phase j^n is
// the same on every tap, so correlating the pass-band samples directly gives,
// on consecutive samples, the real and imaginary parts of the base-band
// correlation.  The block therefore outputs, once per chip (every 4 accepted
// samples, counted from reset), pwr = y[4k]^2 + y[4k+1]^2 + y[4k+2]^2 + y[4k+3]^2,
// a chip-rate squared magnitude.
// Timing: pwr_valid comes 3 cycles after the in_valid of the chip's last sample.
// The two-stage structure, add/subtract only and the squared magnitude follow
// the paper; summing the four phases of a chip is this design's choice.
module psc_correlator
  import sdr_pkg::*;
#(
  parameter int IN_W = 12,
  parameter int PW   = 44
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_sample,
  output logic                   pwr_valid,
  output logic [PW-1:0]          pwr
);

  localparam int ZW = IN_W + 5;
  localparam int YW = ZW + 4;
  localparam int SR1 = 4 * 15 + 1;    // 61 samples
  localparam int SR2 = 64 * 15 + 1;   // 961 stage-1 outputs

  logic signed [IN_W-1:0] sr [SR1];
  logic signed [ZW-1:0]   zl [SR2];
  logic signed [ZW-1:0]   z;
  logic signed [YW-1:0]   y;
  logic                   v1, v2;
  logic [1:0]             ph;
  logic [PW-1:0]          acc;
  logic [PW-1:0]          ysq;

  always_comb begin
    z = '0;
    for (int q = 0; q < 16; q++) begin
      if (PSC_A[q]) z = z - ZW'(sr[4 * (15 - q)]);
      else          z = z + ZW'(sr[4 * (15 - q)]);
    end
    y = '0;
    for (int p = 0; p < 16; p++) begin
      if (PSC_OUTER[p]) y = y - YW'(zl[64 * (15 - p)]);
      else              y = y + YW'(zl[64 * (15 - p)]);
    end
    ysq = PW'(y * y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SR1; i++) sr[i] <= '0;
      for (int i = 0; i < SR2; i++) zl[i] <= '0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      ph        <= 2'd0;
      acc       <= '0;
      pwr       <= '0;
      pwr_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      pwr_valid <= 1'b0;
      if (in_valid) begin
        sr[0] <= in_sample;
        for (int i = 1; i < SR1; i++) sr[i] <= sr[i-1];
      end
      if (v1) begin
        zl[0] <= z;
        for (int i = 1; i < SR2; i++) zl[i] <= zl[i-1];
      end
      if (v2) begin
        ph <= ph + 2'd1;
        if (ph == 2'd3) begin
          pwr       <= acc + ysq;
          pwr_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc <= acc + ysq;
        end
      end
    end
  end

endmodule
