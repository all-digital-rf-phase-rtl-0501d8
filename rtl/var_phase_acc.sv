// var_phase_acc: variable phase accumulator (CKV edge counter) and sampler.
//
// Counts rising edges of the DCO clock CKV, modulo 2**PH_IW, and samples the
// count on the rising edge of the gated clock CKV_G, i.e. on the CKV edge the
// TDC measures against. The sample is the integer variable phase R_VI. Both
// follow the document; the clock enable en (used when the integer path is
// switched off after lock to save power) stands for the clock gate a real
// implementation would use, and the reset to zero is this design's choice.
//
// Timing: the counter and the sampler see the same CKV edge; the sampler takes
// the count from before that edge.
`timescale 1ps/1fs
module var_phase_acc
  import adpll_pkg::*;
(
  input  logic              ckv,
  input  logic              ckv_g,
  input  logic              rst_n,
  input  logic              en,
  output logic [PH_IW-1:0]  r_vi
);
  logic [PH_IW-1:0] cnt_q;

  always_ff @(posedge ckv or negedge rst_n) begin
    if (!rst_n)  cnt_q <= '0;
    else if (en) cnt_q <= cnt_q + 1'b1;
  end

  always_ff @(posedge ckv_g or negedge rst_n) begin
    if (!rst_n)  r_vi <= '0;
    else if (en) r_vi <= cnt_q;
  end
endmodule
