// tb_sdr_testbed_top: end-to-end loopback of the whole front end at its
// default sizes (full slots, two users, 2-slot TDD period).
//
// The transmitter runs with fs = clk/8 and the D/A interpolator at fd = clk.
// Two users (codes 3 and 10, gains 120 and 90) send random QPSK symbols.  The
// real IF samples pass through a two-path channel
//   r[n] = x[n - 37] + x[n - 59] / 2 + noise(+-8)
// into the receiver.  The receiver has to find the slot timing from the PSC,
// capture a slot, estimate both channels jointly, build the matched filters
// and detect both users.  At each rx_slot_done the decided symbols of each user
// are compared with every transmitted slot: one of them must match all 138
// symbols of both users, and successive received slots must match successive
// transmit slots.  Mechanisms that must each be seen at least once: timing
// reports and lock, slot capture, idle (receive) slots in the transmitter,
// detection of both users, a multipath channel seen by the analyzer (length
// above the pulse length of one path), a non-zero carrier-loop correction and
// D/A interpolator output.
module tb_sdr_testbed_top;
  import sdr_pkg::*;

  localparam int NSLOTS_RX = 2;
  localparam int MAXSYM = 138 * 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sample_en, dac_en;
  logic [1:0] tx_sym [MAX_USERS];
  logic [MAX_USERS-1:0] tx_sym_take;
  logic [7:0] tx_gain [MAX_USERS];
  logic [3:0] tx_code [MAX_USERS];
  logic [1:0] num_users;
  logic if_valid, dac_valid, tx_slot_active;
  logic signed [15:0] if_sample, dac_sample;
  logic adc_valid;
  logic signed [11:0] adc_sample;
  logic [3:0] rx_code [MAX_USERS];
  logic rx_valid;
  logic [1:0] rx_user, rx_bits;
  logic [7:0] rx_sym_idx;
  cplx16_t rx_sym;
  logic timing_update, timing_locked, rx_capture, rx_slot_done;
  logic [12:0] slot_timing;
  logic [43:0] timing_peak;
  logic [15:0] rx_phase;
  logic [39:0] chan_energy [MAX_USERS];
  logic [7:0] chan_first [MAX_USERS];
  logic [8:0] chan_length [MAX_USERS];

  sdr_testbed_top dut (.*);

  int checks = 0, failures = 0;
  logic [1:0] symq [2][MAXSYM];
  int ntx [2];
  logic [1:0] rxb [2][SYMS_SLOT];
  int nrx [2];
  int xs [1 << 20];
  int nif = 0;
  int cyc = 0;
  int slots_done = 0, last_match = -1;
  int n_timing = 0, n_capture = 0, n_idle = 0, n_multipath = 0, n_phase = 0, n_dac = 0;
  int n_users_ok = 0;
  logic cap_q = 0;

  always_comb for (int u = 0; u < MAX_USERS; u++)
    tx_sym[u] = (u < 2) ? symq[u][ntx[u] % MAXSYM] : 2'b00;

  // strobes and channel
  always @(posedge clk) begin
    cyc++;
    sample_en <= rst_n && (cyc % 8 == 0);
    dac_en    <= rst_n;
    adc_valid <= 1'b0;
    if (rst_n) begin
      for (int u = 0; u < 2; u++) if (tx_sym_take[u]) ntx[u]++;
      if (if_valid) begin
        int r;
        xs[nif % (1 << 20)] = int'(if_sample);
        r = $signed($urandom_range(0, 16)) - 8;
        if (nif >= 37) r += xs[(nif - 37) % (1 << 20)];
        if (nif >= 59) r += xs[(nif - 59) % (1 << 20)] / 2;
        if (r > 2047) r = 2047;
        if (r < -2048) r = -2048;
        adc_sample <= 12'(r);
        adc_valid  <= 1'b1;
        nif++;
      end
      if (dac_valid && dac_sample != 0) n_dac++;
      if (timing_update) n_timing++;
      cap_q <= rx_capture;
      if (rx_capture && !cap_q) n_capture++;
      if (!tx_slot_active && if_valid && nif > 20000) n_idle++;
      if (rx_phase != 0) n_phase++;
      if (rx_valid) begin
        rxb[rx_user][rx_sym_idx] = rx_bits;
        nrx[rx_user]++;
      end
      if (rx_slot_done) begin
        int best_j, best_e;
        best_j = -1; best_e = 1000;
        for (int j = 0; j * SYMS_SLOT + SYMS_SLOT <= ntx[0] && j * SYMS_SLOT + SYMS_SLOT <= MAXSYM; j++) begin
          int e;
          e = 0;
          for (int u = 0; u < 2; u++)
            for (int s = 0; s < SYMS_SLOT; s++)
              if (rxb[u][s] != symq[u][j * SYMS_SLOT + s]) e++;
          if (e < best_e) begin best_e = e; best_j = j; end
        end
        $display("rx slot %0d: matches tx slot %0d with %0d symbol errors; timing %0d, users got %0d/%0d symbols, channel first %0d/%0d length %0d/%0d",
                 slots_done, best_j, best_e, slot_timing, nrx[0], nrx[1], chan_first[0], chan_first[1],
                 chan_length[0], chan_length[1]);
        checks++;
        if (best_e != 0 || best_j <= last_match) failures++;
        checks++;
        if (nrx[0] != SYMS_SLOT || nrx[1] != SYMS_SLOT) failures++;
        else n_users_ok++;
        if (chan_length[0] > 24 && chan_length[1] > 24) n_multipath++;
        last_match = best_j;
        nrx[0] = 0; nrx[1] = 0;
        slots_done++;
      end
    end
  end

  task automatic mech(input string name, input int n);
    $display("mechanism %-24s seen %0d times", name, n);
    checks++;
    if (n == 0) failures++;
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      ntx[u] = 0; nrx[u] = 0;
      for (int s = 0; s < MAXSYM; s++) symq[u][s] = 2'($urandom);
    end
    sample_en = 0; dac_en = 0; adc_valid = 0; adc_sample = 0;
    num_users = 2;
    tx_gain[0] = 120; tx_gain[1] = 90; tx_gain[2] = 0;
    tx_code[0] = 3; tx_code[1] = 10; tx_code[2] = 0;
    rx_code[0] = 3; rx_code[1] = 10; rx_code[2] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (slots_done == NSLOTS_RX);
    repeat (4) @(posedge clk);
    mech("timing report", n_timing);
    mech("timing lock", int'(timing_locked));
    mech("slot capture", n_capture);
    mech("idle TDD slot", n_idle);
    mech("two users detected", n_users_ok);
    mech("multipath channel", n_multipath);
    mech("carrier correction", n_phase);
    mech("D/A interpolation", n_dac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d after %0d slots", cyc, slots_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
