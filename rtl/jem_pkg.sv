// jem_pkg: sizes, types and shared functions of the Jet/Energy Module (JEM).
//
// A JEM sees a grid of 7 (eta) x 11 (phi) jet elements. The 4 x 8 core in
// the middle belongs to this module; the border is duplicated data: the eta
// columns 0, 5 and 6 come from the neighbouring JEMs over the backplane, and
// the phi rows 0, 9 and 10 are duplicated by the upstream electronics.
// Grid indices: eta 0..6 (core 1..4), phi 0..10 (core 1..8).
// The 9-bit link words, the 10-bit jet elements, the 256-word playback depth,
// the eight thresholds and the 8-bit energy codes are the module's own
// numbers; the code format, coefficient precision and widths of the sums are
// choices of this design (see energy_encoder and energy_sum).
package jem_pkg;

  localparam int ETA_ALL   = 7;
  localparam int PHI_ALL   = 11;
  localparam int ETA_CORE  = 4;
  localparam int PHI_CORE  = 8;
  localparam int N_FPGA    = 11;   // one Input FPGA per phi row
  localparam int CH_PER_FPGA = 8;  // 4 EM + 4 HAD links
  localparam int N_LINKS   = N_FPGA * CH_PER_FPGA;  // 88
  localparam int N_OWN_JE  = N_FPGA * ETA_CORE;     // 44
  localparam int N_NB_LO   = PHI_ALL;               // 11 from lower-eta JEM
  localparam int N_NB_HI   = 2 * PHI_ALL;           // 22 from higher-eta JEM

  localparam int LINK_W = 9;
  localparam int JE_W   = 10;
  localparam int NIB_W  = 5;
  localparam int PB_DEPTH = 256;
  localparam int PB_AW    = 8;

  localparam int N_THR  = 8;
  localparam int MULT_W = 3;
  localparam int THR_W  = 14;
  localparam int WIN_W  = 14;      // a 4x4 window holds at most 16*1022
  localparam int N_ROI  = ETA_CORE * PHI_CORE;     // 32

  localparam int ET_W   = 15;      // 32 * 1022 = 32704
  localparam int EXY_W  = 16;      // signed projections
  localparam int CODE_W = 8;
  localparam int CRATE_W = 20;     // crate sums of 16 JEMs

  localparam int COEF_FRAC = 8;

  typedef logic [LINK_W-1:0] link_t;
  typedef logic [JE_W-1:0]   je_t;
  typedef logic [NIB_W-1:0]  nib_t;
  typedef logic [MULT_W-1:0] mult_t;
  typedef logic [THR_W-1:0]  thr_t;

  typedef enum logic [1:0] {WIN_2X2 = 2'd0, WIN_3X3 = 2'd1, WIN_4X4 = 2'd2} win_e;

  // Configuration programmed over VME.
  typedef struct packed {
    logic       loopback;   // energy sums from the duplicated channels
    logic [1:0] quadrant;   // phi quadrant of the module
    thr_t [N_THR-1:0] thr;
    win_e [N_THR-1:0] win;
  } jem_cfg_t;

  // cos((r+0.5)*pi/16) * 256, rounded, for the 8 phi rows of one quadrant.
  function automatic logic [8:0] cos_q0(input int r);
    case (r)
      0: return 9'd255;  1: return 9'd245;  2: return 9'd226;  3: return 9'd198;
      4: return 9'd162;  5: return 9'd121;  6: return 9'd74;   default: return 9'd25;
    endcase
  endfunction

  // Quad-linear 8-bit codes: value = mantissa << (3 * range).
  function automatic logic [CODE_W-1:0] enc_et(input logic [ET_W-1:0] v);
    logic [ET_W-1:0] m;
    if (v < 64)        return {2'd0, v[5:0]};
    else if (v < 512)  return {2'd1, v[8:3]};
    else if (v < 4096) return {2'd2, v[11:6]};
    m = v >> 9;
    return {2'd3, (m > 63) ? 6'd63 : m[5:0]};
  endfunction

  function automatic logic [CODE_W-1:0] enc_exy(input logic signed [EXY_W-1:0] v);
    logic [EXY_W-1:0] a, m;
    a = v[EXY_W-1] ? EXY_W'(-v) : v;
    if (a < 32)        return {v[EXY_W-1], 2'd0, a[4:0]};
    else if (a < 256)  return {v[EXY_W-1], 2'd1, a[7:3]};
    else if (a < 2048) return {v[EXY_W-1], 2'd2, a[10:6]};
    m = a >> 9;
    return {v[EXY_W-1], 2'd3, (m > 31) ? 5'd31 : m[4:0]};
  endfunction

  function automatic logic [ET_W-1:0] dec_et(input logic [CODE_W-1:0] c);
    return ET_W'({9'd0, c[5:0]} << (3 * c[7:6]));
  endfunction

  function automatic logic signed [EXY_W-1:0] dec_exy(input logic [CODE_W-1:0] c);
    logic [EXY_W-1:0] a;
    a = EXY_W'({11'd0, c[4:0]} << (3 * c[6:5]));
    return c[7] ? -$signed(a) : $signed(a);
  endfunction

endpackage
