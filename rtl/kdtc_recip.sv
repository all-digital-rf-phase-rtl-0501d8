// kdtc_recip: reciprocal of the estimated DTC gain.
//
// Computes 1/K_DTC, the multiplier that converts a fraction of a CKV period
// into DTC delay steps. K_DTC is an unsigned fraction with KD_W bits; the
// result has DTC_W integer and DTC_FW fractional bits and saturates at its
// maximum when K_DTC is too small (or zero). Purely combinational: K_DTC
// changes slowly, so a divider on the reference-rate path is acceptable.
// The document only shows a 1/K_DTC multiplier input; forming it with a
// divider from the estimated K_DTC is this design's choice.
`timescale 1ps/1fs
module kdtc_recip
  import adpll_pkg::*;
(
  input  logic [KD_W-1:0]          k_dtc,
  output logic [DTC_W+DTC_FW-1:0]  inv_k
);
  localparam int unsigned IW = DTC_W + DTC_FW;
  localparam int unsigned NW = KD_W + DTC_FW + 1;

  logic [NW-1:0] num;
  logic [NW-1:0] quo;

  always_comb begin
    num = NW'(1) << (KD_W + DTC_FW);
    quo = (k_dtc == '0) ? '1 : num / NW'(k_dtc);
    inv_k = (quo > NW'({IW{1'b1}})) ? {IW{1'b1}} : quo[IW-1:0];
  end
endmodule
