// pp_adpll: phase-prediction all-digital PLL (top level).
//
// A counter-based ADPLL working in the phase domain. Every reference cycle the
// reference phase R_R = sum(FCW) is compared with the variable phase of the
// DCO clock CKV. The integer part of the comparison comes from a CKV edge
// counter; the fractional part comes from a narrow TDC. Phase prediction makes
// the TDC narrow: the reference edge is first delayed by a DTC by
// (1 - R_RF)/K_DTC steps, so that in lock it falls just ahead of a CKV edge
// and the TDC only has to resolve jitter and prediction errors. The phase
// error is filtered (IIR cascade plus PI controller) into a normalized tuning
// word, scaled per DCO varactor bank (PVT, acquisition, tracking) and applied
// to the DCO, whose tracking bank is dithered by a MASH sigma-delta. The DTC
// gain is estimated in the background from the correlation of phi_EF with
// R_RF. Two-point modulation adds fcw_mod to the reference phase and, after
// gain normalization, to the tracking bank.
//
// The DTC, the TDC core and the DCO are behavioural models (timing in ps);
// everything else is synthesizable logic. The digital part runs on CKR, the
// reference clock retimed to CKV. Loop settings are inputs: the sequence of
// bank switches, gear shifts, type-II switch-over and integer-path shutdown is
// left to the controlling system, as in the document.
`timescale 1ps/1fs
module pp_adpll
  import adpll_pkg::*;
#(
  parameter int unsigned NSTAGE          = 4,
  parameter real         F_CENTER_HZ     = 2.0e9,
  parameter real         DF_P_HZ         = 4.0e6,
  parameter real         DF_A_HZ         = 200.0e3,
  parameter real         DF_T_HZ         = 12.0e3,
  parameter real         T_DTC_PS        = 15.0,
  parameter real         T_TDC_PS        = 15.0,
  parameter real         T_TDC_OFFSET_PS = 100.0,
  parameter int unsigned EST_A_SH        = 4,
  parameter int unsigned EST_B_SH        = 0,
  parameter int unsigned EST_MU_SH       = 16
) (
  input  logic                     fref,
  input  logic                     rst_n,
  input  logic [FCW_W-1:0]         fcw,
  input  logic signed [FCW_W-1:0]  fcw_mod,
  // loop settings
  input  bank_e                    bank,
  input  logic                     restart,
  input  comb_mode_e               comb_mode,
  input  logic                     int_en,
  input  pp_mode_e                 pp_mode,
  input  logic [NSTAGE-1:0]        iir_en,
  input  logic [NSTAGE-1:0][5:0]   lam_sh,
  input  logic [5:0]               alpha_sh,
  input  logic [5:0]               rho_sh,
  input  logic                     rho_en,
  input  logic                     rho_res,
  input  logic [G_W-1:0]           g_p,
  input  logic [G_W-1:0]           g_a,
  input  logic [G_W-1:0]           g_t,
  input  logic [BIAS_W-1:0]        bias,
  input  logic                     kdtc_en,
  input  logic                     kdtc_load,
  input  logic [KD_W-1:0]          kdtc_init,
  // outputs
  output logic                     ckv,
  output logic                     ckr,
  output logic [DTC_W-1:0]         dtc_ctrl,
  output logic signed [7:0]        tdc_half,
  output logic signed [PE_W-1:0]   phi_e,
  output logic signed [PE_W-1:0]   phi_ei,
  output logic signed [PE_W-1:0]   phi_ef,
  output logic                     aligned,
  output logic                     gear_event,
  output logic signed [LF_W-1:0]   ntw,
  output dco_tune_t                tune,
  output logic [T_IW-1:0]          t_dith,
  output logic [KD_W-1:0]          k_dtc
);
  logic                    ckvd8;
  logic [PH_IW-1:0]        r_ri, r_vi;
  logic [KD_W-1:0]         r_rf;
  logic signed [PE_W-1:0]  phi_ef_raw;

  phase_error_detector #(
    .T_DTC_PS(T_DTC_PS), .T_TDC_PS(T_TDC_PS), .T_TDC_OFFSET_PS(T_TDC_OFFSET_PS)
  ) u_pd (
    .fref, .ckv, .rst_n, .fcw, .fcw_mod, .k_dtc, .pp_mode, .int_en,
    .ckr, .ckvd8, .dtc_ctrl, .r_ri, .r_rf, .r_vi,
    .tdc_half, .phi_ef(phi_ef_raw)
  );

  dlf #(.NSTAGE(NSTAGE)) u_dlf (
    .ckr, .rst_n, .restart, .comb_mode, .int_en, .r_ri, .r_vi,
    .phi_ef(phi_ef_raw), .iir_en, .lam_sh, .alpha_sh, .rho_sh, .rho_en, .rho_res,
    .phi_e, .phi_ei, .phi_ef_q(phi_ef), .aligned, .gear_event, .ntw
  );

  kdtc_estimator #(.A_SH(EST_A_SH), .B_SH(EST_B_SH), .MU_SH(EST_MU_SH)) u_est (
    .ckr, .rst_n, .en(kdtc_en), .load(kdtc_load), .k_init(kdtc_init),
    .r_rf, .phi_ef_neg(phi_ef[PE_W-1]), .k_dtc
  );

  dco_gain_norm u_norm (
    .ckr, .rst_n, .bank, .ntw, .fcw_mod, .g_p, .g_a, .g_t, .tune
  );

  mash2_sd u_sd (
    .clk(ckvd8), .rst_n, .t_int(tune.t_int), .t_frac(tune.t_frac), .t_out(t_dith)
  );

  dco #(
    .F_CENTER_HZ(F_CENTER_HZ), .DF_P_HZ(DF_P_HZ), .DF_A_HZ(DF_A_HZ), .DF_T_HZ(DF_T_HZ)
  ) u_dco (
    .d_p(tune.p), .d_a(tune.a), .d_t(t_dith), .bias, .ckv
  );
endmodule
