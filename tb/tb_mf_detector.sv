// tb_mf_detector: checks pass-band matched filtering and symbol sampling.
//
// A random 316-tap complex filter is loaded and the slot buffer (modelled
// here, one-cycle read) holds random samples.  Each of the 138 outputs must
// equal sum_j r[base(s) + j] * conj(f[j]) >> 16 (saturated), with base(s) = 64 s
// in the first data field and 5440 + 64 (s - 69) in the second, and one
// symbol must come every 316 cycles.
module tb_mf_detector;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic f_valid, start, sym_valid, busy, done;
  logic [8:0] f_idx;
  logic signed [19:0] f_re, f_im;
  logic [13:0] rd_addr;
  logic signed [11:0] rd_data;
  logic [7:0] sym_idx;
  cplx16_t sym;

  mf_detector dut (.*);

  int checks = 0, failures = 0;
  int mem [SLOT_SAMPLES];
  int fre [MF_LEN], fim [MF_LEN];
  int ns = 0;
  int cyc = 0, t0 = 0, t1 = 0;

  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  always @(posedge clk) begin
    cyc++;
    rd_data <= 12'(mem[rd_addr]);
    if (rst_n && sym_valid) begin
      longint ar, ai;
      int base;
      base = (int'(sym_idx) < 69) ? 64 * int'(sym_idx) : 5440 + 64 * (int'(sym_idx) - 69);
      ar = 0; ai = 0;
      for (int j = 0; j < MF_LEN; j++) begin
        ar += longint'(mem[base + j]) * fre[j];
        ai -= longint'(mem[base + j]) * fim[j];
      end
      checks++;
      if (int'(sym.re) != sat(ar >>> 16) || int'(sym.im) != sat(ai >>> 16) || int'(sym_idx) != ns) begin
        failures++;
        if (failures < 10) $display("sym %0d: got %0d,%0d exp %0d,%0d", sym_idx, sym.re, sym.im,
                                    sat(ar >>> 16), sat(ai >>> 16));
      end
      ns++;
    end

  end

  initial begin
    for (int a = 0; a < SLOT_SAMPLES; a++) mem[a] = $signed($urandom_range(0, 4000)) - 2000;
    for (int j = 0; j < MF_LEN; j++) begin
      fre[j] = $signed($urandom_range(0, 8000)) - 4000;
      fim[j] = $signed($urandom_range(0, 8000)) - 4000;
    end
    f_valid = 0; f_idx = 0; f_re = 0; f_im = 0; start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = MF_LEN - 1; j >= 0; j--) begin
      @(posedge clk);
      f_valid <= 1; f_idx <= 9'(j); f_re <= 20'(fre[j]); f_im <= 20'(fim[j]);
    end
    @(posedge clk) f_valid <= 0;
    @(posedge clk) start <= 1;
    t0 = cyc + 1;
    @(posedge clk) start <= 0;
    wait (done);
    t1 = cyc;
    repeat (2) @(posedge clk);
    @(posedge clk);
    checks++;
    if (ns != SYMS_SLOT) failures++;
    $display("detection took %0d cycles", t1 - t0);
    checks++;
    if (t1 - t0 < SYMS_SLOT * 316 || t1 - t0 > SYMS_SLOT * 316 + 4) failures++;
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
