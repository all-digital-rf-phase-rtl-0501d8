// phase_error_detector: digital phase error detector with phase prediction.
//
// Groups the parts that turn FREF, CKV and FCW into the integer and
// fractional phase-error inputs of the loop filter:
//  * ref_phase_acc accumulates FCW into R_R = R_RI + R_RF on CKR;
//  * phase_predictor sets the DTC code (1 - R_RF)/K_DTC so that the delayed
//    reference FREF_D lands just ahead of the next CKV edge;
//  * dtc (behavioural) delays FREF into FREF_D;
//  * ckv_gate_ckr_gen lets one CKV edge through as CKV_G after FREF_D and
//    derives the retimed reference clock CKR from it;
//  * tdc_core (behavioural) measures FREF_D to CKV_G in a few delay steps and
//    tdc_decode normalizes the result into phi_EF (CKV periods);
//  * var_phase_acc counts CKV edges and samples the count on CKV_G as R_VI.
// phi_EF includes the prediction residue when the residue option is used.
// The integer path (edge counter and sampler) stops when int_en is low.
`timescale 1ps/1fs
module phase_error_detector
  import adpll_pkg::*;
#(
  parameter real T_DTC_PS        = 15.0,
  parameter real T_DTC_INTR_PS   = 20.0,
  parameter real T_TDC_PS        = 15.0,
  parameter real T_TDC_OFFSET_PS = 100.0
) (
  input  logic                     fref,
  input  logic                     ckv,
  input  logic                     rst_n,
  input  logic [FCW_W-1:0]         fcw,
  input  logic signed [FCW_W-1:0]  fcw_mod,
  input  logic [KD_W-1:0]          k_dtc,
  input  pp_mode_e                 pp_mode,
  input  logic                     int_en,
  output logic                     ckr,
  output logic                     ckvd8,
  output logic [DTC_W-1:0]         dtc_ctrl,
  output logic [PH_IW-1:0]         r_ri,
  output logic [KD_W-1:0]          r_rf,
  output logic [PH_IW-1:0]         r_vi,
  output logic signed [7:0]        tdc_half,
  output logic signed [PE_W-1:0]   phi_ef
);
  logic                    ckv_g, fref_d;
  logic [TDC_TAPS-1:0]     therm;
  logic signed [PE_W-1:0]  phi_tdc, residue;

  ref_phase_acc u_acc (
    .ckr, .rst_n, .fcw, .fcw_mod, .r_ri, .r_rf
  );

  phase_predictor u_pred (
    .ckr, .rst_n, .mode(pp_mode), .r_rf, .k_dtc, .dtc_ctrl, .residue
  );

  dtc #(.T_STEP_PS(T_DTC_PS), .T_INTRINSIC_PS(T_DTC_INTR_PS)) u_dtc (
    .fref, .code(dtc_ctrl), .fref_d
  );

  ckv_gate_ckr_gen u_gate (
    .ckv, .fref_d, .rst_n, .ckv_g, .ckr, .ckvd8
  );

  tdc_core #(.T_INV_PS(T_TDC_PS), .T_OFFSET_PS(T_TDC_OFFSET_PS)) u_tdc (
    .fref_d, .ckv_g, .q(therm)
  );

  tdc_decode u_dec (
    .therm, .k_tdc(k_dtc), .dt_half(tdc_half), .phi_ef(phi_tdc)
  );

  var_phase_acc u_vpa (
    .ckv, .ckv_g, .rst_n, .en(int_en), .r_vi
  );

  assign phi_ef = phi_tdc + residue;
endmodule
