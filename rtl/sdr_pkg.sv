// sdr_pkg: constants, types and code generators shared by the UMTS TDD front end.
//
// Slot format (burst with a 256-chip midamble): 1104 data chips, a 256-chip
// midamble (64-chip cyclic prefix followed by a 192-chip base period), 1104 data
// chips and a 96-chip guard period, 2560 chips in all.  A 256-chip primary
// synchronisation code (PSC) is added on top of the first 256 chips of each slot.
// Spreading factor 16, four samples per chip, so 10240 samples per slot.
// The chip counts 192/64/256/2560, N=16 and Nc=4 are the paper's; the 1104/96
// split of the rest of the slot follows the UMTS TDD burst with a 256-chip
// midamble and reproduces the paper's 397.44 kbit/s peak rate per user.
//
// Code generators (this design's own choices where the standard was not given):
//   psc_chip(i)   : hierarchical code a[i%16]*outer[i/16] (UMTS primary code, real part)
//   mid_chip(i)   : 192-chip base midamble, +-1 from bits of MID_BITS (LFSR x^9+x^5+1,
//                   seed 17; the seed whose 192-point DFT has the largest minimum modulus)
//   ovsf_chip(k,i): Walsh-Hadamard code k of length 16, (-1)^popcount(k & i)
//   scr_chip(i)   : cell scrambling code of length 16 from SCR_BITS
// Coefficient tables:
//   RRC_TAPS : root-raised-cosine, roll-off 0.22, 12-chip span, 4 samples/chip
//              (49 taps), h[n] = rrc((n-24)/4), peak scaled to 2^14
//   DAC_TAPS : 32-tap band-pass for the x8 D/A interpolator,
//              hann(n) * cos(2*pi*13/32*(n-15.5)), gain 8 at the IF replica, scale 2^12
//   ATAN_TAB : CORDIC angles atan(2^-i) with 2^16 = one turn
package sdr_pkg;

  localparam int SF            = 16;    // spreading factor N
  localparam int OSR           = 4;     // samples per chip Nc
  localparam int SLOT_CHIPS    = 2560;
  localparam int DATA_CHIPS    = 1104;
  localparam int MID_CHIPS     = 256;
  localparam int MID_BASE      = 192;   // M
  localparam int MID_CP        = 64;    // Q, also the longest channel in chips
  localparam int GP_CHIPS      = 96;
  localparam int PSC_CHIPS     = 256;
  localparam int SYMS_FIELD    = DATA_CHIPS / SF;     // 69
  localparam int SYMS_SLOT     = 2 * SYMS_FIELD;      // 138
  localparam int MAX_USERS     = 3;                   // MID_BASE / MID_CP
  localparam int SLOT_SAMPLES  = SLOT_CHIPS * OSR;    // 10240
  localparam int MID_START     = DATA_CHIPS;          // chip 1104
  localparam int DATA2_START   = DATA_CHIPS + MID_CHIPS;  // chip 1360
  localparam int GP_START      = DATA2_START + DATA_CHIPS; // chip 2464
  localparam int CH_SAMPLES    = MID_CP * OSR;        // 256 channel taps per user
  localparam int WIN_SAMPLES   = MID_BASE * OSR;      // 768
  localparam int MF_LEN        = CH_SAMPLES + (SF - 1) * OSR; // 316
  // sample offset, inside a slot, of the 768-sample estimation window
  localparam int WIN_OFFSET    = (MID_START + MID_CP) * OSR;  // 4672

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx16_t;

  localparam logic [191:0] MID_BITS =
    192'hd71a2fe96298c066564fda49bf2d4289d97b0d5390c42011;
  localparam logic [15:0]  PSC_A     = 16'b0110_1010_1100_0000; // bit i set -> a[i] = -1
  localparam logic [15:0]  PSC_OUTER = 16'b0010_1000_1101_1000; // bit p set -> outer[p] = -1
  localparam logic [15:0]  SCR_BITS  = 16'b0110_1011_0001_1101;

  localparam int signed RRC_TAPS [49] = '{
    61, 141, 87, -76, -208, -160, 84, 353, 393, 71, -462, -809, -590, 230, 1194,
    1553, 765, -1009, -2770, -3088, -886, 3811, 9661, 14506, 16384, 14506, 9661,
    3811, -886, -3088, -2770, -1009, 765, 1553, 1194, 230, -590, -809, -462, 71,
    393, 353, 84, -160, -208, -76, 87, 141, 61 };

  localparam int signed DAC_TAPS [32] = '{
    -10, 110, -314, 483, -393, -114, 962, -1809, 2169, -1671, 292, 1548, -3126,
    3730, -3006, 1149, 1149, -3006, 3730, -3126, 1548, 292, -1671, 2169, -1809,
    962, -114, -393, 483, -314, 110, -10 };

  localparam int signed ATAN_TAB [14] = '{
    8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3, 1 };

  // +1 / -1 chip generators
  function automatic int psc_chip(input int i);
    return (PSC_A[i % 16] ^ PSC_OUTER[(i / 16) % 16]) ? -1 : 1;
  endfunction

  function automatic int mid_chip(input int i);
    return MID_BITS[i % MID_BASE] ? -1 : 1;
  endfunction

  function automatic int ovsf_chip(input int k, input int i);
    return ($countones(k & i & 15) % 2 == 1) ? -1 : 1;
  endfunction

  function automatic int scr_chip(input int i);
    return SCR_BITS[i % 16] ? -1 : 1;
  endfunction

endpackage
