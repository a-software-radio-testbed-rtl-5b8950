// slot_timing_acq: slot-timing acquisition from the PSC correlator power.
//
// The correlator power arrives once per chip.  Because the link transmits in
// every second slot, the observation period is two slots (PERIOD_CHIPS = 5120
// chip positions).  For each chip position k the block keeps an exponentially
// averaged power
//   A[k] <- A[k] + (P - A[k]) / 2^FF_SHIFT      (forgetting factor 1 - 2^-FF_SHIFT)
// which averages over noise realisations from period to period; in the first
// period A[k] is loaded with P directly, so the array needs no reset.  While a
// period streams by, the position of the largest updated A[k] is tracked; at its
// last chip the block pulses timing_valid with that position (timing) and value
// (peak).  Resolution is one chip, as in the paper.
// Exponential averaging per position over successive periods and the arg-max
// follow the paper; FF_SHIFT and the first-period load are this design's choices.
module slot_timing_acq #(
  parameter int PERIOD_CHIPS = 5120,
  parameter int FF_SHIFT     = 3,
  parameter int PW           = 44
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            pwr_valid,
  input  logic [PW-1:0]                   pwr,
  output logic                            timing_valid,
  output logic [$clog2(PERIOD_CHIPS)-1:0] timing,
  output logic [PW-1:0]                   peak,
  output logic                            locked
);

  localparam int AW = $clog2(PERIOD_CHIPS);

  logic [PW-1:0] avg [PERIOD_CHIPS];
  logic [AW-1:0] k;
  logic          first;
  logic [PW-1:0] best_v;
  logic [AW-1:0] best_k;
  logic [PW-1:0] a_old, a_new;
  logic signed [PW:0] diff;

  always_comb begin
    a_old = avg[k];
    diff  = $signed({1'b0, pwr}) - $signed({1'b0, a_old});
    a_new = first ? pwr : PW'($signed({1'b0, a_old}) + (diff >>> FF_SHIFT));
  end

  always_ff @(posedge clk) begin
    if (pwr_valid) avg[k] <= a_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k            <= '0;
      first        <= 1'b1;
      best_v       <= '0;
      best_k       <= '0;
      timing_valid <= 1'b0;
      timing       <= '0;
      peak         <= '0;
      locked       <= 1'b0;
    end else begin
      timing_valid <= 1'b0;
      if (pwr_valid) begin
        if (int'(k) == PERIOD_CHIPS - 1) begin
          k            <= '0;
          first        <= 1'b0;
          timing_valid <= 1'b1;
          locked       <= 1'b1;
          if (a_new > best_v) begin
            timing <= k;
            peak   <= a_new;
          end else begin
            timing <= best_k;
            peak   <= best_v;
          end
          best_v <= '0;
          best_k <= '0;
        end else begin
          k <= k + 1'b1;
          if (k == '0 || a_new > best_v) begin
            best_v <= a_new;
            best_k <= k;
          end
        end
      end
    end
  end

endmodule
