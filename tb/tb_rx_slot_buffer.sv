// tb_rx_slot_buffer: writes a full slot of random samples, then reads every
// address back in a scrambled order and checks data and the one-cycle read
// latency; a second pass overwrites half of the words while reading others.
module tb_rx_slot_buffer;

  localparam int DEPTH = 10240;

  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en;
  logic [13:0] wr_addr, rd_addr;
  logic signed [11:0] wr_data, rd_data;

  rx_slot_buffer dut (.*);

  int checks = 0, failures = 0;
  int model [DEPTH];

  task automatic check_read(input int a);
    @(posedge clk) rd_addr <= 14'(a);
    @(posedge clk);
    #1;
    checks++;
    if (int'(rd_data) != model[a]) begin
      failures++;
      if (failures < 10) $display("addr %0d: got %0d exp %0d", a, rd_data, model[a]);
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = $signed($urandom_range(0, 4095)) - 2048;
      @(posedge clk);
      wr_en <= 1; wr_addr <= 14'(a); wr_data <= 12'(model[a]);
    end
    @(posedge clk) wr_en <= 0;
    for (int i = 0; i < DEPTH; i++) check_read((i * 7919) % DEPTH);
    for (int i = 0; i < 2000; i++) begin
      int a, b;
      a = 2 * $urandom_range(0, DEPTH / 2 - 1);
      b = a + 1;
      model[a] = $signed($urandom_range(0, 4095)) - 2048;
      @(posedge clk);
      wr_en <= 1; wr_addr <= 14'(a); wr_data <= 12'(model[a]); rd_addr <= 14'(b);
      @(posedge clk) wr_en <= 0;
      #1;
      checks++;
      if (int'(rd_data) != model[b]) failures++;
      check_read(a);
    end
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
