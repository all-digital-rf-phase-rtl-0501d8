// phase_predictor: edge predictor that sets the DTC delay (phase prediction).
//
// For the next FREF edge it computes DTC_ctrl,fp = (1 - R_RF) / K_DTC, the
// delay in DTC steps that moves the FREF edge onto the next CKV edge. 1 - R_RF
// is formed by bit inversion of the top KD_W bits of R_RF; 1/K_DTC comes from
// kdtc_recip. The integer part drives the DTC. The fractional part is handled
// according to mode:
//   PP_TRUNC   - dropped;
//   PP_SD      - dithered into the integer code by a first-order sigma-delta
//                (accumulator carry), updated once per CKR;
//   PP_RESIDUE - dropped from the code, and the residue 0.5 - frac, scaled by
//                K_DTC into CKV periods, is output for addition to the TDC
//                result.
// These three options and the formula follow the document; the word lengths,
// and the sigma-delta reset to zero
// are this design's choices.
//
// Timing: dtc_ctrl and residue are combinational from the registered R_RF and
// the sigma-delta state, stable for the whole reference period until the next
// CKR rising edge.
`timescale 1ps/1fs
module phase_predictor
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  pp_mode_e                mode,
  input  logic [KD_W-1:0]         r_rf,      // fractional reference phase (MSBs)
  input  logic [KD_W-1:0]         k_dtc,     // estimated DTC gain (fraction)
  output logic [DTC_W-1:0]        dtc_ctrl,  // DTC code for the next FREF edge
  output logic signed [PE_W-1:0]  residue    // UI, PE_FW fractional bits
);
  localparam int unsigned IW = DTC_W + DTC_FW;

  logic [IW-1:0]          inv_k;
  logic [KD_W-1:0]        one_minus;
  logic [IW-1:0]          fp;          // Q(DTC_W).(DTC_FW)
  logic [DTC_W-1:0]       code_int;
  logic [DTC_FW-1:0]      code_frac;
  logic [DTC_FW:0]        sd_sum;
  logic [DTC_FW-1:0]      sd_acc_q;
  logic                   sd_carry;
  logic signed [DTC_FW+1:0]      res_steps;   // 0.5 - frac, in DTC steps
  logic signed [DTC_FW+KD_W+2:0] res_ui;

  kdtc_recip u_recip (.k_dtc(k_dtc), .inv_k(inv_k));

  always_comb begin
    one_minus = ~r_rf;
    // one_minus < 1 and inv_k < 2**DTC_W, so the product cannot overflow.
    fp        = IW'(((KD_W+IW)'(one_minus) * (KD_W+IW)'(inv_k)) >> KD_W);
    code_int  = fp[IW-1:DTC_FW];
    code_frac = fp[DTC_FW-1:0];

    sd_sum   = {1'b0, sd_acc_q} + {1'b0, code_frac};
    sd_carry = sd_sum[DTC_FW];

    dtc_ctrl = code_int;
    if (mode == PP_SD && sd_carry && code_int != '1) dtc_ctrl = code_int + 1'b1;

    // residue = 0.5 - frac (DTC steps) times K_DTC -> CKV periods
    res_steps = $signed({2'b00, 1'b1, {(DTC_FW-1){1'b0}}}) - $signed({2'b00, code_frac});
    res_ui    = res_steps * $signed({1'b0, k_dtc});
    residue   = '0;
    if (mode == PP_RESIDUE)
      residue = PE_W'(res_ui >>> (DTC_FW + KD_W - PE_FW));
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n)             sd_acc_q <= '0;
    else if (mode == PP_SD) sd_acc_q <= sd_sum[DTC_FW-1:0];
  end
endmodule
