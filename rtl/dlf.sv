// dlf: digital loop filter.
//
// Phase error combiner, a cascade of NSTAGE single-pole IIR filters, and a
// proportional-integral controller with gear shifting, in that order, as in
// the document. Its output is the normalized tuning word NTW: the requested
// DCO frequency change in units of the reference frequency f_R (signed,
// LF_FW fractional bits). All registers run on CKR.
//
// Interface: the integer phases R_RI, R_VI and the fractional phase error
// phi_EF come from the phase error detector; the rest are loop settings that
// a controller changes while the loop settles (combiner mode, integer path
// enable, IIR enables and coefficients, alpha, rho, type-II enable, restart).
//
// Timing: phi_E is registered on the CKR edge after the measurement; NTW then
// follows combinationally and is registered by the DCO gain normalization on
// the next CKR edge.
`timescale 1ps/1fs
module dlf
  import adpll_pkg::*;
#(
  parameter int unsigned NSTAGE = 4
) (
  input  logic                     ckr,
  input  logic                     rst_n,
  input  logic                     restart,
  input  comb_mode_e               comb_mode,
  input  logic                     int_en,
  input  logic [PH_IW-1:0]         r_ri,
  input  logic [PH_IW-1:0]         r_vi,
  input  logic signed [PE_W-1:0]   phi_ef,
  input  logic [NSTAGE-1:0]        iir_en,
  input  logic [NSTAGE-1:0][5:0]   lam_sh,
  input  logic [5:0]               alpha_sh,
  input  logic [5:0]               rho_sh,
  input  logic                     rho_en,
  input  logic                     rho_res,
  output logic signed [PE_W-1:0]   phi_e,
  output logic signed [PE_W-1:0]   phi_ei,
  output logic signed [PE_W-1:0]   phi_ef_q,
  output logic                     aligned,
  output logic                     gear_event,
  output logic signed [LF_W-1:0]   ntw
);
  logic signed [LF_W-1:0] x_lf;
  logic signed [LF_W-1:0] y_iir;

  phase_error_combiner u_comb (
    .ckr, .rst_n, .mode(comb_mode), .int_en, .restart,
    .r_ri, .r_vi, .phi_ef,
    .phi_ei_q(phi_ei), .phi_ef_q, .phi_e_q(phi_e), .aligned
  );

  // Phase error from PE_FW to LF_FW fractional bits.
  assign x_lf = LF_W'(phi_e) <<< (LF_FW - PE_FW);

  iir_chain #(.NSTAGE(NSTAGE)) u_iir (
    .ckr, .rst_n, .restart, .en(iir_en), .lam_sh, .x(x_lf), .y(y_iir)
  );

  pi_ctrl u_pi (
    .ckr, .rst_n, .restart, .alpha_sh, .rho_sh, .rho_en, .rho_res,
    .x(y_iir), .tune(ntw), .gear_event
  );
endmodule
