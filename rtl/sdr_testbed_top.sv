// sdr_testbed_top: digital front end of one UMTS TDD testbed terminal.
//
// Transmit path (runs continuously on sample_en, fs = 4 x chip rate):
//   tx_burst_gen -> tx_pulse_shaper -> if_sample (real IF signal at fs)
//                                   -> dac_interp_fir -> dac_sample (fd = 8 fs, on dac_en)
// Slots alternate between transmit and receive (symmetric TDD, one slot in two
// carries data): the burst generator is enabled in even slots only.
//
// Receive path (on adc_valid, real IF samples at fs):
//   psc_correlator -> slot_timing_acq gives the chip position T of the PSC
//   correlation peak within the 2-slot period.  A sequencer then
//   1. waits for sample (4*(T - 255 - ADV_CHIPS)) mod 20480 of the period, the
//      start of the slot placed ADV_CHIPS early so that the channel's leading
//      taps fall inside the estimation window,
//   2. captures the 10240 samples of that slot into rx_slot_buffer,
//   3. runs channel_estimator on the midamble window (all users jointly),
//   4. runs channel_analyzer (energy, length, position, cleaning),
//   5. for each user: mf_synth builds the matched filter from the cleaned
//      channel and the user's code rx_code[u]; mf_detector filters the slot and
//      samples one output per symbol; carrier_sync[u] (cleared at the start of
//      each slot) de-rotates and decides the symbols, which leave on rx_*,
//   6. pulses rx_slot_done and returns to step 1 for the next transmit slot.
// Processing a slot takes about 0.5 million clock cycles for two users; slots
// arriving meanwhile are skipped (the blocks are serial, one multiply per cycle).
// The chain and its order are the paper's; the sequencer, the skipping of slots
// while busy, ADV_CHIPS, FF_SHIFT (forgetting factor 7/8) and MF_SHIFT (scaling
// of the matched-filter output, which sets the carrier-loop gain) are this
// design's choices.
// Lint may report rst_n as used both as an asynchronous reset and as a
// synchronous signal: the second use is only the disable condition of the
// handshake assertions below, which is not logic.
module sdr_testbed_top
  import sdr_pkg::*;
#(
  parameter int ADV_CHIPS = 8,
  parameter int FF_SHIFT  = 3,
  parameter int MF_SHIFT  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // transmitter
  input  logic                 sample_en,
  input  logic                 dac_en,
  input  logic [1:0]           tx_sym   [MAX_USERS],
  output logic [MAX_USERS-1:0] tx_sym_take,
  input  logic [7:0]           tx_gain  [MAX_USERS],
  input  logic [3:0]           tx_code  [MAX_USERS],
  input  logic [1:0]           num_users,
  output logic                 if_valid,
  output logic signed [15:0]   if_sample,
  output logic                 dac_valid,
  output logic signed [15:0]   dac_sample,
  output logic                 tx_slot_active,
  // receiver
  input  logic                 adc_valid,
  input  logic signed [11:0]   adc_sample,
  input  logic [3:0]           rx_code  [MAX_USERS],
  output logic                 rx_valid,
  output logic [1:0]           rx_user,
  output logic [7:0]           rx_sym_idx,
  output logic [1:0]           rx_bits,
  output cplx16_t              rx_sym,
  output logic                 timing_update,
  output logic [12:0]          slot_timing,
  output logic                 timing_locked,
  output logic [43:0]          timing_peak,
  output logic [15:0]          rx_phase,
  output logic                 rx_capture,
  output logic                 rx_slot_done,
  output logic [39:0]          chan_energy [MAX_USERS],
  output logic [7:0]           chan_first  [MAX_USERS],
  output logic [8:0]           chan_length [MAX_USERS]
);

  localparam int PERIOD_CHIPS   = 2 * SLOT_CHIPS;
  localparam int PERIOD_SAMPLES = PERIOD_CHIPS * OSR;

  // ---------------------------------------------------------------- transmit
  logic               chip_req, chip_valid, slot_parity;
  logic signed [13:0] chip_re, chip_im;
  logic [11:0]        chip_idx;

  tx_burst_gen u_burst (
    .clk, .rst_n,
    .chip_en    (chip_req),
    .tx_enable  (!slot_parity),
    .sym_in     (tx_sym),
    .sym_take   (tx_sym_take),
    .gain       (tx_gain),
    .code_idx   (tx_code),
    .num_users,
    .chip_valid,
    .chip_re,
    .chip_im,
    .chip_idx,
    .slot_active(tx_slot_active)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                                   slot_parity <= 1'b0;
    else if (chip_valid && int'(chip_idx) == SLOT_CHIPS - 1)      slot_parity <= !slot_parity;
  end

  tx_pulse_shaper u_shaper (
    .clk, .rst_n,
    .sample_en,
    .chip_req,
    .chip_valid,
    .chip_re,
    .chip_im,
    .out_valid (if_valid),
    .out_sample(if_sample)
  );

  dac_interp_fir u_dac (
    .clk, .rst_n,
    .dac_en,
    .in_valid  (if_valid),
    .in_sample (if_sample),
    .out_valid (dac_valid),
    .out_sample(dac_sample)
  );

  // ----------------------------------------------------------------- receive
  logic        pwr_valid;
  logic [43:0] pwr;

  psc_correlator u_psc (
    .clk, .rst_n,
    .in_valid (adc_valid),
    .in_sample(adc_sample),
    .pwr_valid,
    .pwr
  );

  slot_timing_acq #(.PERIOD_CHIPS(PERIOD_CHIPS), .FF_SHIFT(FF_SHIFT)) u_timing (
    .clk, .rst_n,
    .pwr_valid,
    .pwr,
    .timing_valid(timing_update),
    .timing      (slot_timing),
    .peak        (timing_peak),
    .locked      (timing_locked)
  );

  typedef enum logic [2:0] {
    RX_IDLE, RX_WAIT, RX_CAPTURE, RX_CHEST, RX_ANALYZE, RX_SYNTH, RX_DETECT
  } rx_state_t;

  rx_state_t   state;
  logic [14:0] sc;          // sample position within the 2-slot period
  logic [14:0] start_s;
  logic [13:0] cap_cnt;
  logic [1:0]  cur_u;
  logic        go;

  logic [13:0]        buf_raddr, est_raddr, det_raddr;
  logic               cap_we;
  logic [13:0]        cap_wa;
  logic signed [11:0] buf_rdata;

  rx_slot_buffer #(.DEPTH(SLOT_SAMPLES), .W(12)) u_buf (
    .clk,
    .wr_en  (cap_we),
    .wr_addr(cap_wa),
    .wr_data(adc_sample),
    .rd_addr(buf_raddr),
    .rd_data(buf_rdata)
  );

  assign cap_we = adc_valid && (state == RX_CAPTURE || (state == RX_WAIT && sc == start_s));
  assign cap_wa = (state == RX_CAPTURE) ? cap_cnt : 14'd0;

  assign buf_raddr = (state == RX_DETECT) ? det_raddr : est_raddr;

  logic    est_valid, est_busy, est_done;
  logic [9:0] est_idx;
  cplx16_t est_tap;

  channel_estimator u_chest (
    .clk, .rst_n,
    .start    (go && state == RX_CHEST),
    .num_users,
    .rd_addr  (est_raddr),
    .rd_data  (buf_rdata),
    .tap_valid(est_valid),
    .tap_idx  (est_idx),
    .tap      (est_tap),
    .busy     (est_busy),
    .done     (est_done)
  );

  logic    ana_busy, ana_done;
  logic [7:0] g_idx;
  cplx16_t g_tap;

  channel_analyzer u_ana (
    .clk, .rst_n,
    .tap_valid(est_valid),
    .tap_idx  (est_idx),
    .tap      (est_tap),
    .start    (go && state == RX_ANALYZE),
    .num_users,
    .busy     (ana_busy),
    .done     (ana_done),
    .energy   (chan_energy),
    .first    (chan_first),
    .length   (chan_length),
    .rd_user  (cur_u),
    .rd_idx   (g_idx),
    .rd_tap   (g_tap)
  );

  logic               f_valid, syn_busy, syn_done;
  logic [8:0]         f_idx;
  logic signed [19:0] f_re, f_im;

  mf_synth u_synth (
    .clk, .rst_n,
    .start   (go && state == RX_SYNTH),
    .code_idx(rx_code[cur_u]),
    .g_idx,
    .g_tap,
    .f_valid,
    .f_idx,
    .f_re,
    .f_im,
    .busy    (syn_busy),
    .done    (syn_done)
  );

  logic    det_valid, det_busy, det_done;
  logic [7:0] det_idx;
  cplx16_t det_sym;

  mf_detector #(.OUT_SHIFT(MF_SHIFT)) u_det (
    .clk, .rst_n,
    .f_valid,
    .f_idx,
    .f_re,
    .f_im,
    .start    (go && state == RX_DETECT),
    .rd_addr  (det_raddr),
    .rd_data  (buf_rdata),
    .sym_valid(det_valid),
    .sym_idx  (det_idx),
    .sym      (det_sym),
    .busy     (det_busy),
    .done     (det_done)
  );

  logic       cs_valid [MAX_USERS];
  logic [1:0] cs_bits  [MAX_USERS];
  cplx16_t    cs_sym   [MAX_USERS];
  logic [15:0] cs_phase [MAX_USERS];
  logic [7:0] idx_q;

  for (genvar u = 0; u < MAX_USERS; u++) begin : g_cs
    carrier_sync u_cs (
      .clk, .rst_n,
      .clear    (go && state == RX_DETECT && int'(cur_u) == u),
      .in_valid (det_valid && int'(cur_u) == u),
      .in_sym   (det_sym),
      .out_valid(cs_valid[u]),
      .out_bits (cs_bits[u]),
      .out_sym  (cs_sym[u]),
      .phase    (cs_phase[u])
    );
  end

  always_comb begin
    rx_valid   = 1'b0;
    rx_bits    = '0;
    rx_sym     = '0;
    rx_user    = '0;
    rx_sym_idx = idx_q;
    for (int u = 0; u < MAX_USERS; u++) begin
      if (cs_valid[u]) begin
        rx_valid = 1'b1;
        rx_user  = 2'(u);
        rx_bits  = cs_bits[u];
        rx_sym   = cs_sym[u];
      end
    end
  end

  assign rx_capture = (state == RX_CAPTURE);
  assign rx_phase   = cs_phase[cur_u];

  // a stage is only started when it is idle
  a_chest_idle: assert property (@(posedge clk) disable iff (!rst_n)
                  (go && state == RX_CHEST) |-> !est_busy);
  a_ana_idle:   assert property (@(posedge clk) disable iff (!rst_n)
                  (go && state == RX_ANALYZE) |-> !ana_busy);
  a_syn_idle:   assert property (@(posedge clk) disable iff (!rst_n)
                  (go && state == RX_SYNTH) |-> !syn_busy);
  a_det_idle:   assert property (@(posedge clk) disable iff (!rst_n)
                  (go && state == RX_DETECT) |-> !det_busy);

  // start sample of the slot: 4*(T - 255 - ADV) modulo the period
  always_comb begin
    int t;
    t = OSR * (int'(slot_timing) - (PSC_CHIPS - 1) - ADV_CHIPS);
    if (t < 0) t = t + PERIOD_SAMPLES;
    start_s = 15'(t);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= RX_IDLE;
      sc           <= '0;
      cap_cnt      <= '0;
      cur_u        <= '0;
      go           <= 1'b0;
      rx_slot_done <= 1'b0;
      idx_q        <= '0;
    end else begin
      go           <= 1'b0;
      rx_slot_done <= 1'b0;
      if (det_valid) idx_q <= det_idx;
      if (adc_valid) sc <= (int'(sc) == PERIOD_SAMPLES - 1) ? '0 : sc + 15'd1;
      unique case (state)
        RX_IDLE:    if (timing_locked) state <= RX_WAIT;
        RX_WAIT:    if (adc_valid && sc == start_s) begin
                      state   <= RX_CAPTURE;
                      cap_cnt <= 14'd1;
                    end
        RX_CAPTURE: if (adc_valid) begin
                      if (int'(cap_cnt) == SLOT_SAMPLES - 1) begin
                        state <= RX_CHEST;
                        go    <= 1'b1;
                      end
                      cap_cnt <= cap_cnt + 14'd1;
                    end
        RX_CHEST:   if (est_done) begin
                      state <= RX_ANALYZE;
                      go    <= 1'b1;
                    end
        RX_ANALYZE: if (ana_done) begin
                      state <= RX_SYNTH;
                      cur_u <= '0;
                      go    <= 1'b1;
                    end
        RX_SYNTH:   if (syn_done) begin
                      state <= RX_DETECT;
                      go    <= 1'b1;
                    end
        RX_DETECT:  if (det_done) begin
                      if (int'(cur_u) + 1 >= int'(num_users)) begin
                        state        <= RX_WAIT;
                        rx_slot_done <= 1'b1;
                      end else begin
                        cur_u <= cur_u + 2'd1;
                        state <= RX_SYNTH;
                        go    <= 1'b1;
                      end
                    end
        default:    state <= RX_IDLE;
      endcase
    end
  end

endmodule
