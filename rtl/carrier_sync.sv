// carrier_sync: decision-directed carrier phase recovery for QPSK at symbol rate.
//
// Each matched-filter output z is de-rotated by the current phase estimate phi
// (16 bits, 2^16 = one turn): a coarse rotation by a multiple of 90 degrees
// followed by a 14-stage CORDIC for the remaining +-45 degrees (the CORDIC gain
// of about 1.647 stays in out_sym).  The de-rotated symbol v is decided,
// bit 0 = (Re v < 0), bit 1 = (Im v < 0), and the decision error
//   e = sign(Re v) * Im v - sign(Im v) * Re v      (about 2|v| sin(phase error))
// updates the phase, phi <- phi + e / 2^KP_SHIFT: a first-order decision-directed
// loop.  clear sets phi to zero (start of a burst).
// Timing: out_valid/out_bits/out_sym one cycle after in_valid; phi is updated in
// the same cycle and applies from the next symbol.
// The decision-directed principle is the paper's; the loop order, the CORDIC
// and the gain are this design's choices (the loop gain scales with the
// symbol amplitude, so KP_SHIFT is set for the amplitude delivered upstream).
module carrier_sync
  import sdr_pkg::*;
#(
  parameter int KP_SHIFT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  cplx16_t     in_sym,
  output logic        out_valid,
  output logic [1:0]  out_bits,
  output cplx16_t     out_sym,
  output logic [15:0] phase
);

  localparam int CW = 20;

  logic signed [CW-1:0] x [15];
  logic signed [CW-1:0] y [15];
  logic signed [16:0]   r [15];
  logic [15:0]          theta;
  logic [1:0]           qd;
  logic signed [CW-1:0] vx, vy;
  logic signed [CW+1:0] err;

  function automatic logic signed [15:0] sat16(input logic signed [CW-1:0] v);
    if (v > 20'sd32767)  return 16'sh7fff;
    if (v < -20'sd32768) return -16'sh8000;
    return 16'(v);
  endfunction

  always_comb begin
    theta = -phase;
    qd    = 2'((theta + 16'd8192) >> 14);
    r[0]  = 17'($signed({1'b0, theta}) - $signed({1'b0, qd, 14'd0}));
    if (r[0] > 17'sd32767) r[0] = r[0] - 17'sd65536;
    case (qd)
      2'd0: begin x[0] = CW'(in_sym.re);  y[0] = CW'(in_sym.im);  end
      2'd1: begin x[0] = -CW'(in_sym.im); y[0] = CW'(in_sym.re);  end
      2'd2: begin x[0] = -CW'(in_sym.re); y[0] = -CW'(in_sym.im); end
      default: begin x[0] = CW'(in_sym.im); y[0] = -CW'(in_sym.re); end
    endcase
    for (int i = 0; i < 14; i++) begin
      if (r[i] >= 0) begin
        x[i+1] = x[i] - (y[i] >>> i);
        y[i+1] = y[i] + (x[i] >>> i);
        r[i+1] = r[i] - 17'(ATAN_TAB[i]);
      end else begin
        x[i+1] = x[i] + (y[i] >>> i);
        y[i+1] = y[i] - (x[i] >>> i);
        r[i+1] = r[i] + 17'(ATAN_TAB[i]);
      end
    end
    vx  = x[14];
    vy  = y[14];
    err = (vx < 0 ? -(CW+2)'(vy) : (CW+2)'(vy)) - (vy < 0 ? -(CW+2)'(vx) : (CW+2)'(vx));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (clear) begin
        phase <= '0;
      end else if (in_valid) begin
        phase      <= phase + 16'(err >>> KP_SHIFT);
        out_bits   <= {vy < 0, vx < 0};
        out_sym.re <= sat16(vx);
        out_sym.im <= sat16(vy);
      end
    end
  end

endmodule
