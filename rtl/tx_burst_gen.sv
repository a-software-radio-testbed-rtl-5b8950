// tx_burst_gen: spreading, scrambling, user combining and slot assembly.
//
// One chip is produced for each chip_en pulse, one cycle later (chip_valid).
// A chip counter runs over the 2560 chips of a slot:
//   chips    0..1103  data field 1 (symbols 0..68)
//   chips 1104..1359  midamble: user u sends the base midamble cyclically shifted
//                     by u*64 chips, preceded by its 64-chip cyclic prefix
//   chips 1360..2463  data field 2 (symbols 69..137)
//   chips 2464..2559  guard period (zero)
// and the primary synchronisation code, scaled by A_PSC*(1+j), is added to
// chips 0..255.  In a data chip each active user contributes
//   gain_u * d_u * ovsf(code_u, i) * scr(i),  d_u = (+-1) + j(+-1)
// where bit 0 of the QPSK symbol selects the sign of the real part and bit 1 the
// sign of the imaginary part (0 -> +1).  A user's symbol is read from sym_in at
// the first chip of each symbol, and sym_take pulses in that cycle.
// tx_enable is sampled at chip 0: a slot started with it low is all zeros (the
// receive slot of the TDD frame) and consumes no symbols.
// Spreading, scrambling, gain, summing and slot filling follow the paper; the
// code generators, the bit-to-symbol map, A_MID and A_PSC are this design's choices.
module tx_burst_gen
  import sdr_pkg::*;
#(
  parameter int USERS_MAX = 3,
  parameter int A_MID     = 256,
  parameter int A_PSC     = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 chip_en,
  input  logic                 tx_enable,
  input  logic [1:0]           sym_in   [USERS_MAX],
  output logic [USERS_MAX-1:0] sym_take,
  input  logic [7:0]           gain     [USERS_MAX],
  input  logic [3:0]           code_idx [USERS_MAX],
  input  logic [1:0]           num_users,
  output logic                 chip_valid,
  output logic signed [13:0]   chip_re,
  output logic signed [13:0]   chip_im,
  output logic [11:0]          chip_idx,
  output logic                 slot_active
);

  logic [11:0] cnt;
  logic        active_q;
  logic [1:0]  sym_q [USERS_MAX];

  logic        active_now;
  logic        in_data, in_mid;
  int          ci, mid_j;
  logic signed [15:0] acc_re, acc_im;
  logic [USERS_MAX-1:0] take;
  logic [1:0]  d [USERS_MAX];

  always_comb begin
    ci         = int'(cnt);
    active_now = (cnt == 12'd0) ? tx_enable : active_q;
    in_data    = (ci < DATA_CHIPS) || (ci >= DATA2_START && ci < GP_START);
    in_mid     = (ci >= MID_START) && (ci < DATA2_START);
    mid_j      = ci - MID_START;
    acc_re     = '0;
    acc_im     = '0;
    take       = '0;
    for (int u = 0; u < USERS_MAX; u++) begin
      int c;
      int g;
      d[u] = sym_q[u];
      c = ovsf_chip(int'(code_idx[u]), ci % SF) * scr_chip(ci % SF);
      g = int'(gain[u]);
      if (active_now && (u < int'(num_users)) && in_data) begin
        if ((ci % SF) == 0) begin
          d[u]    = sym_in[u];
          take[u] = 1'b1;
        end
        acc_re = acc_re + 16'(d[u][0] ? -g * c : g * c);
        acc_im = acc_im + 16'(d[u][1] ? -g * c : g * c);
      end
      if (active_now && (u < int'(num_users)) && in_mid) begin
        // chip j of the midamble field carries base chip (j - Q - u*Q) mod M
        acc_re = acc_re + 16'(A_MID *
                 mid_chip((mid_j - MID_CP - u * MID_CP + 3 * MID_BASE) % MID_BASE));
      end
    end
    if (active_now && ci < PSC_CHIPS) begin
      acc_re = acc_re + 16'(A_PSC * psc_chip(ci));
      acc_im = acc_im + 16'(A_PSC * psc_chip(ci));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      active_q    <= 1'b0;
      chip_valid  <= 1'b0;
      chip_re     <= '0;
      chip_im     <= '0;
      chip_idx    <= '0;
      sym_take    <= '0;
      slot_active <= 1'b0;
      for (int u = 0; u < USERS_MAX; u++) sym_q[u] <= 2'b00;
    end else begin
      chip_valid <= chip_en;
      sym_take   <= chip_en ? take : '0;
      if (chip_en) begin
        cnt         <= (ci == SLOT_CHIPS - 1) ? 12'd0 : cnt + 12'd1;
        active_q    <= active_now;
        slot_active <= active_now;
        chip_re     <= 14'(acc_re);
        chip_im     <= 14'(acc_im);
        chip_idx    <= cnt;
        for (int u = 0; u < USERS_MAX; u++) sym_q[u] <= d[u];
      end
    end
  end

endmodule
