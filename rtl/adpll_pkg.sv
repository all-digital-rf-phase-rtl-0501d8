// adpll_pkg: number formats and mode encodings shared by the phase-prediction
// all-digital PLL (PP-ADPLL).
//
// All phase quantities are expressed in unit intervals (UI), one UI being one
// period of the variable (DCO) clock CKV. The frequency command word FCW is the
// expected number of CKV periods per reference period. The widths below are
// this design's own choices; the source design gives no word lengths except
// the 7-bit DCO bias control and the 8 fractional bits of the tracking-bank
// sigma-delta modulator. A lint run of this package on its own reports the
// constants as unused; every one of them is used by the modules that import it.
`timescale 1ps/1fs
package adpll_pkg;

  // Frequency command word: unsigned, FCW_IW integer and FCW_FW fractional bits.
  localparam int unsigned FCW_IW = 8;
  localparam int unsigned FCW_FW = 24;
  localparam int unsigned FCW_W  = FCW_IW + FCW_FW;

  // Integer phase words (reference-phase integer part R_RI and the CKV edge
  // count R_VI) are kept modulo 2**PH_IW; only their difference is used.
  localparam int unsigned PH_IW = 12;

  // Phase error: signed, PE_W bits with PE_FW fractional bits (UI).
  localparam int unsigned PE_W  = 28;
  localparam int unsigned PE_FW = 16;

  // Estimated DTC gain K_DTC = dt_DTC / T_V: unsigned, KD_W fractional bits.
  localparam int unsigned KD_W = 16;

  // DTC control code width and its fractional resolution inside the predictor.
  localparam int unsigned DTC_W  = 7;
  localparam int unsigned DTC_FW = 12;

  // Narrow TDC: number of delay taps after the fixed offset delay.
  localparam int unsigned TDC_TAPS = 5;

  // Loop-filter internal word and normalized tuning word (NTW, in units of f_R).
  localparam int unsigned LF_W  = 56;
  localparam int unsigned LF_FW = 40;

  // DCO gain normalization factor f_R / K_DCO: unsigned, G_IW.G_FW.
  localparam int unsigned G_IW = 12;
  localparam int unsigned G_FW = 8;
  localparam int unsigned G_W  = G_IW + G_FW;

  // DCO varactor banks.
  localparam int unsigned P_W    = 8;   // PVT bank
  localparam int unsigned A_W    = 8;   // acquisition bank
  localparam int unsigned T_IW   = 7;   // tracking bank, integer part
  localparam int unsigned T_FW   = 8;   // tracking bank, dithered fraction
  localparam int unsigned BIAS_W = 7;   // oscillator bias control

  // Which DCO varactor bank the loop currently drives.
  typedef enum logic [1:0] {
    BANK_PVT = 2'd0,
    BANK_ACQ = 2'd1,
    BANK_TRK = 2'd2
  } bank_e;

  // How the phase error combiner forms phi_E from phi_EI and phi_EF.
  typedef enum logic {
    COMB_ADD = 1'b0,   // phi_E = phi_EI + phi_EF
    COMB_MUX = 1'b1    // phi_E = int_en ? phi_EI : phi_EF
  } comb_mode_e;

  // Treatment of the fractional part of the DTC control value.
  typedef enum logic [1:0] {
    PP_TRUNC   = 2'd0,  // integer part only
    PP_SD      = 2'd1,  // first-order sigma-delta dither into the integer part
    PP_RESIDUE = 2'd2   // residue 0.5 - frac passed to the TDC output
  } pp_mode_e;

  // Tuning words of the three DCO varactor banks.
  typedef struct packed {
    logic [P_W-1:0]  p;
    logic [A_W-1:0]  a;
    logic [T_IW-1:0] t_int;
    logic [T_FW-1:0] t_frac;
  } dco_tune_t;

endpackage
