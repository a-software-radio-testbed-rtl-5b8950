// tb_channel_analyzer: checks energy, position, length and cleaning.
//
// Two users' 256-tap responses are streamed in: a few strong taps on top of
// small round-off noise.  The testbench applies the rule itself (significant
// when |h|^2 >= max|h|^2 / 64), computes first, last, length and the energy of
// the significant taps, and compares them, then reads back every tap and
// expects the tap itself where it is significant and zero elsewhere.
module tb_channel_analyzer;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tap_valid, start, busy, done;
  logic [9:0] tap_idx;
  cplx16_t tap, rd_tap;
  logic [1:0] num_users, rd_user;
  logic [7:0] rd_idx;
  logic [39:0] energy [MAX_USERS];
  logic [7:0] first [MAX_USERS];
  logic [8:0] length [MAX_USERS];

  channel_analyzer dut (.*);

  int checks = 0, failures = 0;
  int hre [2][256], him [2][256];
  longint e_exp [2];
  int f_exp [2], l_exp [2];
  longint thr [2];

  function automatic longint p2(input int u, input int d);
    return longint'(hre[u][d]) * hre[u][d] + longint'(him[u][d]) * him[u][d];
  endfunction

  initial begin
    for (int u = 0; u < 2; u++)
      for (int d = 0; d < 256; d++) begin
        hre[u][d] = $signed($urandom_range(0, 6)) - 3;
        him[u][d] = $signed($urandom_range(0, 6)) - 3;
      end
    hre[0][20] = 800; him[0][20] = -300; hre[0][23] = 200; him[0][23] = 150;
    hre[0][60] = -120; him[0][60] = 40;
    hre[1][5] = 100; him[1][5] = 600; hre[1][7] = 300; hre[1][40] = -20;
    for (int u = 0; u < 2; u++) begin
      longint mx;
      mx = 0;
      for (int d = 0; d < 256; d++) if (p2(u, d) > mx) mx = p2(u, d);
      thr[u] = mx >> 6;
      e_exp[u] = 0; f_exp[u] = -1; l_exp[u] = -1;
      for (int d = 0; d < 256; d++)
        if (p2(u, d) >= thr[u] && p2(u, d) != 0) begin
          if (f_exp[u] < 0) f_exp[u] = d;
          l_exp[u] = d;
          e_exp[u] += p2(u, d);
        end
    end
    tap_valid = 0; start = 0; num_users = 2; rd_user = 0; rd_idx = 0; tap_idx = 0; tap = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      @(posedge clk);
      tap_valid <= 1; tap_idx <= 10'(i);
      tap.re <= 16'(hre[i / 256][i % 256]); tap.im <= 16'(him[i / 256][i % 256]);
    end
    @(posedge clk) tap_valid <= 0;
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    wait (done);
    @(posedge clk);
    for (int u = 0; u < 2; u++) begin
      checks++;
      if (longint'(energy[u]) != e_exp[u] || int'(first[u]) != f_exp[u] ||
          int'(length[u]) != l_exp[u] - f_exp[u] + 1) begin
        failures++;
        $display("user %0d: energy %0d/%0d first %0d/%0d length %0d/%0d", u, energy[u], e_exp[u],
                 first[u], f_exp[u], length[u], l_exp[u] - f_exp[u] + 1);
      end
    end
    for (int u = 0; u < 2; u++)
      for (int d = 0; d < 256; d++) begin
        int er, ei;
        @(posedge clk) begin rd_user <= 2'(u); rd_idx <= 8'(d); end
        @(posedge clk);
        #1;
        er = (p2(u, d) >= thr[u] && p2(u, d) != 0) ? hre[u][d] : 0;
        ei = (p2(u, d) >= thr[u] && p2(u, d) != 0) ? him[u][d] : 0;
        checks++;
        if (int'(rd_tap.re) != er || int'(rd_tap.im) != ei) begin
          failures++;
          if (failures < 10) $display("read %0d/%0d: got %0d exp %0d", u, d, rd_tap.re, er);
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
