// kdtc_estimator: iterative background estimation of the DTC gain K_DTC.
//
// An error in K_DTC leaves a sawtooth in the fractional phase error phi_EF
// whose polarity is correlated with R_RF - 0.5. Per reference cycle this block
// forms e = (R_RF - 0.5) * sign(phi_EF) * 2**-b, filters it with a first-order
// IIR y[k] = y[k-1]*(1 - 2**-a) + e, scales by mu = 2**-mu_sh and integrates
// the result into the estimate. Structure and equation follow the document's
// block diagram: R_RF passes two registers (before and after the 0.5
// subtraction) and the sign one register, the sign selects +2**-b or -2**-b.
// With this design's sign convention (phi_EF > 0 when CKV is late) an
// underestimated K_DTC gives a positive correlation, so the integrator adds.
// The sign input must be the registered phi_EF of the edge whose R_RF entered
// one cycle earlier. load sets the estimate to k_init; en = 0 freezes it
// (the document allows stopping the estimation once done). Power-of-two
// a, b, mu and the word lengths are this design's choices.
//
// Timing: all registers on CKR; k_dtc is registered.
`timescale 1ps/1fs
module kdtc_estimator
  import adpll_pkg::*;
#(
  parameter int unsigned A_SH  = 4,
  parameter int unsigned B_SH  = 0,
  parameter int unsigned MU_SH = 16
) (
  input  logic              ckr,
  input  logic              rst_n,
  input  logic              en,
  input  logic              load,
  input  logic [KD_W-1:0]   k_init,
  input  logic [KD_W-1:0]   r_rf,       // fractional reference phase (MSBs)
  input  logic              phi_ef_neg,   // sign bit of phi_EF
  output logic [KD_W-1:0]   k_dtc
);
  localparam int unsigned EW  = 48;
  localparam int unsigned EFW = 40;

  logic [KD_W-1:0]        rrf_q;
  logic signed [KD_W+1:0] diff_q;
  logic                   sgn_q;
  logic signed [EW-1:0]   term, iir_q, kacc_q, kacc_d;

  always_comb begin
    // (R_RF - 0.5) with KD_W fractional bits, to EFW fractional bits, * 2^-b
    term = (EW'(diff_q) <<< (EFW - KD_W)) >>> B_SH;
    if (sgn_q) term = -term;
    kacc_d = kacc_q + (iir_q >>> MU_SH);
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      rrf_q  <= '0;
      diff_q <= '0;
      sgn_q  <= 1'b0;
      iir_q  <= '0;
      kacc_q <= EW'(k_init) <<< (EFW - KD_W);
    end else if (load) begin
      iir_q  <= '0;
      kacc_q <= EW'(k_init) <<< (EFW - KD_W);
    end else if (en) begin
      rrf_q  <= r_rf;
      diff_q <= $signed({2'b00, rrf_q}) - $signed((KD_W+2)'(1) <<< (KD_W - 1));
      sgn_q  <= phi_ef_neg;
      iir_q  <= iir_q - (iir_q >>> A_SH) + term;
      if (kacc_d <= 0)
        kacc_q <= EW'(1) <<< (EFW - KD_W);
      else if (kacc_d >= (EW'(1) <<< EFW))
        kacc_q <= (EW'(1) <<< EFW) - (EW'(1) <<< (EFW - KD_W));
      else
        kacc_q <= kacc_d;
    end
  end

  assign k_dtc = kacc_q[EFW-1 -: KD_W];
endmodule
