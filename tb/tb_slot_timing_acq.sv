// tb_slot_timing_acq: checks exponential averaging and the arg-max.
//
// A short period (64 chip positions, forgetting shift 2) is used.  Each period
// carries random power (0..3000) with a peak of 2500..5000 at position 37, so a
// single period may still be won by noise.  The testbench keeps its own averaged
// profile A[k] <- A[k] + (P - A[k]) >> 2 (loaded directly in the first period),
// and every reported timing and peak value must equal the arg-max and maximum
// of that profile.  After the last period the timing must be 37.
module tb_slot_timing_acq;

  localparam int PER = 64;
  localparam int NPER = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pwr_valid, timing_valid, locked;
  logic [43:0] pwr, peak;
  logic [5:0] timing;

  slot_timing_acq #(.PERIOD_CHIPS(PER), .FF_SHIFT(2)) dut (.*);

  int checks = 0, failures = 0;
  longint avg [PER];
  longint exp_peak;
  int exp_t;
  longint exp_peak_a [NPER];
  int exp_t_a [NPER];
  int nrep = 0;

  always @(posedge clk) begin
    if (rst_n && timing_valid) begin
      checks++;
      if (int'(timing) != exp_t_a[nrep] || longint'(peak) != exp_peak_a[nrep]) begin
        failures++;
        $display("period %0d: got %0d/%0d exp %0d/%0d", nrep, timing, peak, exp_t_a[nrep], exp_peak_a[nrep]);
      end
      nrep++;
    end
  end

  initial begin
    pwr_valid = 0; pwr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPER; p++) begin
      for (int k = 0; k < PER; k++) begin
        longint v;
        v = longint'($urandom_range(0, 3000));
        if (k == 37) v += longint'($urandom_range(2500, 5000));
        if (p == 0) avg[k] = v;
        else        avg[k] = avg[k] + ((v - avg[k]) >>> 2);
        if (k == 0 || avg[k] > exp_peak) begin
          exp_peak = avg[k];
          exp_t    = k;
        end
        if (k == PER - 1) begin
          exp_peak_a[p] = exp_peak;
          exp_t_a[p]    = exp_t;
        end
        @(posedge clk);
        pwr_valid <= 1;
        pwr       <= 44'(v);
        @(posedge clk) pwr_valid <= 0;
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nrep != NPER || int'(timing) != 37 || !locked) begin
      failures++;
      $display("reports %0d final timing %0d", nrep, timing);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
