// ref_phase_acc: reference phase accumulator of the phase-prediction ADPLL.
//
// Once per retimed reference clock CKR it adds the frequency command word FCW
// (plus an optional signed modulation word) to the reference phase R_R. The
// register content is the reference phase of the *next* FREF edge, so the DTC
// control derived from it is ready well before that edge arrives. R_R is split
// into its integer part R_RI, kept modulo 2**PH_IW, and its fractional part
// R_RF (output: its KD_W most significant bits, all the DTC path needs). Adding the modulation word here is the phase half of two-point
// modulation: its running sum is the modulation phase added to R_RF.
//
// Timing: one addition per CKR rising edge; outputs are registered.
// Reset: asynchronous, active low, clears the phase to zero (this design's
// choice; the source gives no reset behaviour).
`timescale 1ps/1fs
module ref_phase_acc
  import adpll_pkg::*;
(
  input  logic                     ckr,
  input  logic                     rst_n,
  input  logic [FCW_W-1:0]         fcw,      // unsigned Q(FCW_IW).(FCW_FW)
  input  logic signed [FCW_W-1:0]  fcw_mod,  // signed modulation word, same LSB
  output logic [PH_IW-1:0]         r_ri,     // integer part of R_R (mod 2**PH_IW)
  output logic [KD_W-1:0]          r_rf      // fractional part of R_R, MSBs
);
  localparam int unsigned RW = PH_IW + FCW_FW;

  logic [RW-1:0] rr_q;
  logic [RW-1:0] step;

  // FCW and the modulation word, both reduced modulo 2**RW (two's complement).
  always_comb begin
    step = RW'(fcw) + RW'(fcw_mod);
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else        rr_q <= rr_q + step;
  end

  assign r_ri = rr_q[RW-1:FCW_FW];
  assign r_rf = rr_q[FCW_FW-1 -: KD_W];
endmodule
