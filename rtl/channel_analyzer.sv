// channel_analyzer: energy, length and position of each user's channel estimate,
// with round-off noise removal and clipping.
//
// The estimator's taps are written into a 768-word memory as they stream in
// (tap_idx = 256*user + delay), and the peak tap power max|h|^2 of each user is
// tracked on the fly.  On start the block scans each active user's 256 taps
// once (256 cycles per user): a tap counts as significant when
// |h|^2 >= max|h|^2 / 2^TH_SHIFT.  The first and last significant taps give the
// channel position (first) and length (last - first + 1); energy is the sum of
// |h|^2 over the significant taps.  done pulses after the last user.
// Read port: rd_tap (one cycle after rd_user/rd_idx) returns the cleaned
// response - the tap if it is significant and lies between first and last, zero
// otherwise - which is what the matched-filter synthesis uses.
// The outputs (energy, length, position, cleaning, clipping) are the paper's;
// the threshold rule and TH_SHIFT = 6 (-18 dB) are this design's choices.
module channel_analyzer
  import sdr_pkg::*;
#(
  parameter int TH_SHIFT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tap_valid,
  input  logic [9:0]  tap_idx,
  input  cplx16_t     tap,
  input  logic        start,
  input  logic [1:0]  num_users,
  output logic        busy,
  output logic        done,
  output logic [39:0] energy [MAX_USERS],
  output logic [7:0]  first  [MAX_USERS],
  output logic [8:0]  length [MAX_USERS],
  input  logic [1:0]  rd_user,
  input  logic [7:0]  rd_idx,
  output cplx16_t     rd_tap
);

  cplx16_t     hmem [MAX_USERS * CH_SAMPLES];
  logic [31:0] maxp [MAX_USERS];
  logic [31:0] thr  [MAX_USERS];
  logic        found [MAX_USERS];
  logic [7:0]  last [MAX_USERS];

  logic [1:0]  su;
  logic [7:0]  si;
  logic [31:0] p_in, p_scan, p_rd;
  cplx16_t     h_scan, h_rd;

  function automatic logic [31:0] pw(input cplx16_t h);
    return 32'(int'(h.re) * int'(h.re)) + 32'(int'(h.im) * int'(h.im));
  endfunction

  always_comb begin
    p_in   = pw(tap);
    h_scan = hmem[int'(su) * CH_SAMPLES + int'(si)];
    p_scan = pw(h_scan);
    h_rd   = hmem[int'(rd_user) * CH_SAMPLES + int'(rd_idx)];
    p_rd   = pw(h_rd);
  end

  always_ff @(posedge clk) begin
    if (tap_valid && int'(tap_idx) < MAX_USERS * CH_SAMPLES) hmem[tap_idx] <= tap;
    if (int'(rd_user) < MAX_USERS && p_rd >= thr[rd_user] && p_rd != 0 &&
        rd_idx >= first[rd_user] && rd_idx <= last[rd_user])
      rd_tap <= h_rd;
    else
      rd_tap <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      su   <= '0;
      si   <= '0;
      for (int u = 0; u < MAX_USERS; u++) begin
        maxp[u] <= '0; thr[u] <= '0; found[u] <= 1'b0; last[u] <= '0;
        energy[u] <= '0; first[u] <= '0; length[u] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (tap_valid && int'(tap_idx[9:8]) < MAX_USERS) begin
        if (tap_idx[7:0] == 8'd0 || p_in > maxp[tap_idx[9:8]])
          maxp[tap_idx[9:8]] <= p_in;
      end
      if (start && !busy) begin
        busy <= 1'b1;
        su   <= '0;
        si   <= '0;
        for (int u = 0; u < MAX_USERS; u++) begin
          thr[u]    <= maxp[u] >> TH_SHIFT;
          found[u]  <= 1'b0;
          energy[u] <= '0;
          first[u]  <= '0;
          last[u]   <= '0;
          length[u] <= '0;
        end
      end else if (busy) begin
        if (p_scan >= thr[su] && p_scan != 0) begin
          if (!found[su]) first[su] <= si;
          found[su]  <= 1'b1;
          last[su]   <= si;
          length[su] <= 9'(int'(si) - (found[su] ? int'(first[su]) : int'(si)) + 1);
          energy[su] <= energy[su] + 40'(p_scan);
        end
        if (si == 8'hff) begin
          si <= '0;
          if (int'(su) + 1 >= int'(num_users)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            su <= su + 2'd1;
          end
        end else begin
          si <= si + 8'd1;
        end
      end
    end
  end

endmodule
