// ckv_gate_ckr_gen: CKV clock gating for the TDC and generation of the
// retimed reference clock CKR.
//
// Gate-level structure as in the document's figure (instances I1..I7):
//  * I6: flip-flop with D = 1 clocked by FREF_D and asynchronously reset by
//    CKR2; its output CKV_EN goes high on the FREF_D rising edge.
//  * I1: CKV1 = CKV OR NOT CKV_EN. While CKV_EN is low CKV1 stays high; once it
//    is high, CKV edges pass, so the first CKV rising edge after FREF_D gives
//    the first rising edge of CKV1. I7 buffers CKV1 into CKV_G for the TDC.
//  * I5: flip-flop clocked by CKV1, D = FREF_D, asynchronously reset while
//    FREF_D is low. Its output CKR2 rises on that first CKV edge, which resets
//    I6 and closes the gate again; the falling FREF_D edge clears CKR2.
//  * I2, I3: CKR2 is retimed twice by CKVD8 (CKV divided by 8); I4 buffers
//    the result into CKR, which therefore rises 8 to 16 CKV periods after
//    CKR2, leaving time for the TDC and the variable-phase sampler.
// Only I1 and the divide-by-8 counter see every CKV edge. The gated clocks
// (CKV1, and the asynchronous resets derived from CKR2 and FREF_D) are the
// intended structure of this circuit, not accidental logic on clock paths.
// The global active-low reset rst_n is this design's addition; it clears I6,
// I5, I2, I3 and the divider.
`timescale 1ps/1fs
module ckv_gate_ckr_gen (
  input  logic ckv,
  input  logic fref_d,
  input  logic rst_n,
  output logic ckv_g,
  output logic ckr,
  output logic ckvd8
);
  logic       ckr2, ckv_en;
  logic       ckv1;
  logic [2:0] div_q;
  logic       ckr_meta_q, ckr3_q;
  logic       i6_rst, i5_rst_n;

  // Divide-by-8 of CKV.
  always_ff @(posedge ckv or negedge rst_n) begin
    if (!rst_n) div_q <= '0;
    else        div_q <= div_q + 3'd1;
  end
  assign ckvd8 = div_q[2];

  // I6: enable flip-flop.
  assign i6_rst = ckr2 | ~rst_n;
  always_ff @(posedge fref_d or posedge i6_rst) begin
    if (i6_rst) ckv_en <= 1'b0;
    else        ckv_en <= 1'b1;
  end

  // I1 (OR with inverted enable input) and I7 (buffer).
  assign ckv1  = ckv | ~ckv_en;
  assign ckv_g = ckv1;

  // I5: produces CKR2.
  assign i5_rst_n = fref_d & rst_n;
  always_ff @(posedge ckv1 or negedge i5_rst_n) begin
    if (!i5_rst_n) ckr2 <= 1'b0;
    else           ckr2 <= fref_d;
  end

  // I2, I3: retiming by CKVD8; I4 buffer.
  always_ff @(posedge ckvd8 or negedge rst_n) begin
    if (!rst_n) begin
      ckr_meta_q <= 1'b0;
      ckr3_q     <= 1'b0;
    end else begin
      ckr_meta_q <= ckr2;
      ckr3_q     <= ckr_meta_q;
    end
  end
  assign ckr = ckr3_q;
endmodule
