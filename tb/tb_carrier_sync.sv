// tb_carrier_sync: checks decision-directed phase tracking.
//
// Random QPSK symbols of amplitude 2000 per axis, with small noise, are
// rotated by a phase that starts at 25 degrees and then drifts by 0.1 degree
// per symbol.  After 40 symbols of acquisition every decided bit pair must
// equal the symbol sent and the loop phase must follow the applied rotation
// within +-3 degrees.  A burst with 70 degrees of offset (beyond the +-45 degree
// decision range) is then sent after clear: the loop locks with a 90-degree
// ambiguity, so decisions are checked up to a common rotation.
module tb_carrier_sync;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid, out_valid;
  cplx16_t in_sym, out_sym;
  logic [1:0] out_bits;
  logic [15:0] phase;

  carrier_sync dut (.*);

  int checks = 0, failures = 0;
  logic [1:0] sent;
  real ph_deg;
  int nsym;

  task automatic send(input logic [1:0] b, input real deg);
    real a, xr, xi;
    a  = deg * 3.14159265 / 180.0;
    xr = b[0] ? -2000.0 : 2000.0;
    xi = b[1] ? -2000.0 : 2000.0;
    @(posedge clk);
    in_valid  <= 1;
    in_sym.re <= 16'($rtoi(xr * $cos(a) - xi * $sin(a)) + $signed($urandom_range(0, 200)) - 100);
    in_sym.im <= 16'($rtoi(xr * $sin(a) + xi * $cos(a)) + $signed($urandom_range(0, 200)) - 100);
    @(posedge clk) in_valid <= 0;
  endtask

  // rotate a bit pair by k quarter turns
  function automatic logic [1:0] rot(input logic [1:0] b, input int k);
    int re, im, t;
    re = b[0] ? -1 : 1; im = b[1] ? -1 : 1;
    for (int i = 0; i < k; i++) begin t = re; re = -im; im = t; end
    return {im < 0, re < 0};
  endfunction

  initial begin
    int amb;
    clear = 0; in_valid = 0; in_sym = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ph_deg = 25.0;
    for (nsym = 0; nsym < 300; nsym++) begin
      sent = 2'($urandom);
      send(sent, ph_deg);
      @(posedge clk);
      if (nsym >= 40) begin
        real est, d;
        checks++;
        if (out_bits != sent) failures++;
        est = real'(phase) * 360.0 / 65536.0;
        d = est - ph_deg;
        while (d > 180.0) d -= 360.0;
        while (d < -180.0) d += 360.0;
        checks++;
        if (d > 3.0 || d < -3.0) begin
          failures++;
          if (failures < 10) $display("symbol %0d: phase %f applied %f", nsym, est, ph_deg);
        end
      end
      ph_deg += 0.1;
    end
    // second burst: large offset, checked up to a quarter-turn ambiguity
    @(posedge clk) clear <= 1;
    @(posedge clk) clear <= 0;
    amb = -1;
    for (nsym = 0; nsym < 150; nsym++) begin
      sent = 2'($urandom);
      send(sent, 70.0);
      @(posedge clk);
      if (nsym >= 40) begin
        if (amb < 0) for (int k = 0; k < 4; k++) if (rot(sent, k) == out_bits) amb = k;
        checks++;
        if (amb < 0 || rot(sent, amb) != out_bits) failures++;
      end
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
