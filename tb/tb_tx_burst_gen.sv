// tb_tx_burst_gen: checks the slot builder chip by chip.
//
// Two users (codes 3 and 9, gains 100 and 60) send random QPSK symbols.  Every
// chip of a transmit slot is compared with a reference built here from the slot
// layout: data fields spread by ovsf*scr and scaled by the gain, the users'
// midambles (base shifted by 64 chips per user, after the cyclic prefix), and
// the primary code added to the first 256 chips.  A second slot sent with
// tx_enable low must be all zeros and consume no symbols.  Each user must take
// exactly 138 symbols per transmit slot.
module tb_tx_burst_gen;
  import sdr_pkg::*;

  localparam int U = 3;
  localparam int A_MID = 256;
  localparam int A_PSC = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic chip_en, tx_enable;
  logic [1:0] sym_in [U];
  logic [U-1:0] sym_take;
  logic [7:0] gain [U];
  logic [3:0] code_idx [U];
  logic [1:0] num_users;
  logic chip_valid, slot_active;
  logic signed [13:0] chip_re, chip_im;
  logic [11:0] chip_idx;

  tx_burst_gen #(.USERS_MAX(U), .A_MID(A_MID), .A_PSC(A_PSC)) dut (.*);

  int checks = 0, failures = 0;
  logic [1:0] syms [U][SYMS_SLOT];
  int next_sym [U];
  int chips_seen = 0;
  int slot_no = 0;

  always_comb for (int u = 0; u < U; u++) sym_in[u] = syms[u][next_sym[u] % SYMS_SLOT];

  function automatic void expected(input int c, output int er, output int ei);
    er = 0; ei = 0;
    for (int u = 0; u < 2; u++) begin
      int s, cc;
      if (c < 1104 || (c >= 1360 && c < 2464)) begin
        s  = (c < 1104) ? c / 16 : 69 + (c - 1360) / 16;
        cc = ovsf_chip(int'(code_idx[u]), c % 16) * scr_chip(c % 16) * int'(gain[u]);
        er += syms[u][s][0] ? -cc : cc;
        ei += syms[u][s][1] ? -cc : cc;
      end
      if (c >= 1104 && c < 1360)
        er += A_MID * mid_chip(((c - 1104) - 64 - 64 * u + 576) % 192);
    end
    if (c < 256) begin
      er += A_PSC * psc_chip(c);
      ei += A_PSC * psc_chip(c);
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int u = 0; u < U; u++) if (sym_take[u]) next_sym[u] <= next_sym[u] + 1;
      if (chip_valid) begin
        int er, ei;
        expected(int'(chip_idx), er, ei);
        if (slot_no == 1) begin er = 0; ei = 0; end
        checks++;
        if (int'(chip_re) != er || int'(chip_im) != ei || int'(chip_idx) != chips_seen % 2560) begin
          failures++;
          if (failures < 10) $display("chip %0d: got %0d,%0d exp %0d,%0d", chip_idx, chip_re, chip_im, er, ei);
        end
        chips_seen++;
        if (chips_seen % 2560 == 0) slot_no++;
      end
    end
  end

  initial begin
    for (int u = 0; u < U; u++) begin
      next_sym[u] = 0;
      for (int s = 0; s < SYMS_SLOT; s++) syms[u][s] = 2'($urandom);
    end
    chip_en = 0; tx_enable = 1; num_users = 2;
    gain[0] = 100; gain[1] = 60; gain[2] = 200;
    code_idx[0] = 3; code_idx[1] = 9; code_idx[2] = 5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // slot 0: transmit
    repeat (2560) begin
      @(posedge clk) chip_en <= 1;
      @(posedge clk) chip_en <= 0;
    end
    tx_enable <= 0;
    repeat (2560) begin
      @(posedge clk) chip_en <= 1;
      @(posedge clk) chip_en <= 0;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (next_sym[0] != SYMS_SLOT || next_sym[1] != SYMS_SLOT || next_sym[2] != 0) begin
      failures++;
      $display("symbols taken %0d %0d %0d", next_sym[0], next_sym[1], next_sym[2]);
    end
    checks++;
    if (chips_seen != 5120) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
