// tdc_decode: pseudo-thermometer edge decoder and DCO-period normalization.
//
// The TDC core delivers a thermometer code that may contain bubbles. The
// decoder takes the position of the first 0 counted from tap 0 (the number of
// leading ones n, 0..TDC_TAPS) and ignores everything after it. The signed
// TDC result is dt = n - TDC_TAPS/2 steps, held in half-step units as
// 2n - TDC_TAPS, so that TDC_TAPS = 5 gives the six levels +-0.5, +-1.5,
// +-2.5. Multiplying by K_TDC = t_inv/T_V converts steps into CKV periods,
// giving the fractional phase error phi_EF; as in the document, K_TDC is taken
// equal to the estimated DTC gain because both use the same delay cells.
// Positive phi_EF means the CKV edge came late, i.e. the DCO is slow.
// Combinational.
`timescale 1ps/1fs
module tdc_decode
  import adpll_pkg::*;
(
  input  logic [TDC_TAPS-1:0]     therm,
  input  logic [KD_W-1:0]         k_tdc,
  output logic signed [7:0]       dt_half,  // TDC result in half steps
  output logic signed [PE_W-1:0]  phi_ef    // UI, PE_FW fractional bits
);
  logic [7:0]                 n;
  logic                       seen_zero;
  logic signed [KD_W+9:0]     prod;

  always_comb begin
    n = '0;
    seen_zero = 1'b0;
    for (int i = 0; i < TDC_TAPS; i++) begin
      if (!therm[i]) seen_zero = 1'b1;
      if (!seen_zero) n = n + 8'd1;
    end
    dt_half = $signed(n + n) - $signed(8'(TDC_TAPS));
    // dt_half/2 * K: K has KD_W fractional bits, the half-step adds one more.
    prod   = dt_half * $signed({1'b0, k_tdc});
    phi_ef = PE_W'(prod >>> (KD_W + 1 - PE_FW));
  end
endmodule
