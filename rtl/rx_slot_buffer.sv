// rx_slot_buffer: one slot of received samples.
//
// A simple dual-port memory, DEPTH words of W bits: one write port used while a
// slot is captured (address 0 = first sample of the slot, as placed by the slot
// timing) and one read port with one cycle of latency used afterwards by the
// channel estimator and the matched filters.  The default depth is one slot,
// 2560 chips x 4 samples.  Contents are not reset; every word read is written
// by the capture first.
module rx_slot_buffer #(
  parameter int DEPTH = 10240,
  parameter int W     = 12
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic signed [W-1:0]      wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic signed [W-1:0]      rd_data
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
