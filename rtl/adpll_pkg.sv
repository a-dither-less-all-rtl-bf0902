// adpll_pkg: widths, fixed-point formats and shared types of the ADPLL.
//
// Number formats used across the design (all are this design's choices unless
// noted):
//   * FCW: unsigned Q8.16, in cycles of the divider input clock (DCO/2) per
//     reference cycle.  26 MHz reference, 7.2 GHz DCO -> 138.46.
//   * TDC code: 0..119 (the document: 7-bit, 119 quantization levels).
//   * Corrected TDC code and phase error: signed, 4 fractional bits (TDC LSB).
//   * DCO fine word: 12 bits (the document: 16x16 varactor matrix, 12 bits).
//   * Coarse banks: MSB bank 7 bits (c0..c6), LSB bank 6 bits (c0..c5).
`timescale 1ps/1fs
package adpll_pkg;

  localparam int FCW_INT_W  = 8;
  localparam int FCW_FRAC_W = 16;
  localparam int FCW_W      = FCW_INT_W + FCW_FRAC_W;

  localparam int TDC_LEVELS = 119;  // quantization levels
  localparam int TDC_W      = 7;    // bits of the binary TDC code
  localparam int TDC_FB     = 4;
  localparam int HIST_LOG2  = 12;   // samples per TDC histogram: 2^HIST_LOG2    // fractional bits after digital correction

  localparam int FINE_W     = 12;   // DCO fine-tuning word
  localparam int FINE_MSB_W = 8;    // thermometric part of the fine word
  localparam int FINE_DAC_W = 4;    // DAC-driven varactor
  localparam int FINE_CELLS = (1 << FINE_MSB_W) - 1;  // 255 switched cells

  localparam int MSB_BANK_W = 7;
  localparam int LSB_BANK_W = 6;
  localparam int COARSE_W   = MSB_BANK_W + LSB_BANK_W;
  localparam int BIAS_W     = 5;    // DCO bias trim word

  localparam int TDC_GX_W   = 5;    // line X (gain) analog control word
  localparam int TDC_GY_W   = 6;    // line Y (DLL) calibration word

  localparam int NGEARS     = 4;    // loop-filter coefficient sets

  // Locking sequence (Fig. 9 / Table I order)
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_AFCAL  = 3'd1,
    ST_FLL    = 3'd2,
    ST_EDGE   = 3'd3,
    ST_PLL    = 3'd4,   // wide band and gear shifting
    ST_DCOCAL = 3'd5,
    ST_OPER   = 3'd6
  } lock_state_e;

  // One loop-filter coefficient set: gains are powers of two, given as
  // signed left-shift amounts.
  typedef struct packed {
    logic signed [4:0] kp_sh;
    logic signed [4:0] ki_sh;
  } gear_t;

  // Programmable configuration of the loop (register-file contents).
  typedef struct packed {
    logic [FCW_W-1:0]         fcw;        // frequency control word, Q8.16
    gear_t [NGEARS-1:0]       gears;      // loop-filter coefficient sets
    logic [1:0]               last_gear;  // number of gear shifts (0..3)
    logic [7:0]               gs_thr;     // 1st shift: |dw| below this (fine LSB)
    logic [7:0]               gs_hold;    // ... for this many cycles in a row
    logic [7:0]               gs_int1;    // cycles from gear 1 to gear 2
    logic [7:0]               gs_int2;    // cycles from gear 2 to gear 3
    logic                     gcal_en;    // TDC gain calibration enable
    logic [FCW_FRAC_W-1:0]    gcal_min_frac; // ... and only while the FCW
                                          // fraction is this far from an integer
    logic                     dcocal_en;  // run DCO calibration after locking
    logic                     mod_en;     // two-point modulation enable
  } adpll_cfg_t;

  // Arithmetic shift by a signed amount (left when positive).
  function automatic logic signed [47:0] sshift(input logic signed [47:0] v,
                                                input logic signed [4:0] sh);
    if (sh >= 0) return v <<< sh;
    else         return v >>> (-sh);
  endfunction

endpackage
