// dco_gain_norm: DCO gain normalization and varactor-bank selection.
//
// Converts the normalized tuning word NTW (frequency change in units of f_R)
// into the code of the active DCO varactor bank by multiplying it by
// f_R / K_DCO^X, X = P (PVT), A (acquisition), T (tracking), each factor given
// as an input (unsigned, G_IW.G_FW). The loop walks through the banks from
// coarse to fine; the active bank's register is loaded each CKR cycle with
// centre + NTW * f_R/K_DCO^X, rounded (P, A) or kept with T_FW fractional
// bits (T) for the sigma-delta modulator; the other banks hold their last
// value, so a coarser bank keeps the frequency it reached. The frequency half
// of two-point modulation, fcw_mod (same units as FCW, i.e. f_R), is added to
// NTW on the tracking bank only. Codes saturate at the bank limits. The
// document gives the three normalizing multipliers and the P/A/T banks; the
// centre start values, the hold-and-switch scheme and saturation are this
// design's choices.
//
// Timing: bank registers update on the CKR rising edge; reset loads centres.
`timescale 1ps/1fs
module dco_gain_norm
  import adpll_pkg::*;
(
  input  logic                     ckr,
  input  logic                     rst_n,
  input  bank_e                    bank,
  input  logic signed [LF_W-1:0]   ntw,
  input  logic signed [FCW_W-1:0]  fcw_mod,
  input  logic [G_W-1:0]           g_p,   // f_R / K_DCO^P
  input  logic [G_W-1:0]           g_a,   // f_R / K_DCO^A
  input  logic [G_W-1:0]           g_t,   // f_R / K_DCO^T
  output dco_tune_t                tune
);
  localparam int unsigned MW = LF_W + G_W + 1;
  localparam int unsigned TW = T_IW + T_FW;
  localparam logic signed [MW-1:0] P_CTR = MW'(1) <<< (P_W - 1);
  localparam logic signed [MW-1:0] A_CTR = MW'(1) <<< (A_W - 1);
  localparam logic signed [MW-1:0] T_CTR = MW'(1) <<< (TW - 1);

  logic signed [LF_W-1:0] ntw_t;
  logic signed [MW-1:0]   gain, word, prod, code;

  dco_tune_t tune_q;
  logic [P_W-1:0] p_next;
  logic [A_W-1:0] a_next;
  logic [TW-1:0]  t_next;

  function automatic logic signed [MW-1:0] clamp(input logic signed [MW-1:0] v,
                                                input int unsigned w);
    logic signed [MW-1:0] hi;
    hi = (MW'(1) <<< w) - 1;
    if (v < 0)       return '0;
    else if (v > hi) return hi;
    else             return v;
  endfunction

  always_comb begin
    ntw_t = ntw + (LF_W'(fcw_mod) <<< (LF_FW - FCW_FW));
    unique case (bank)
      BANK_PVT: begin gain = MW'(g_p); word = MW'(ntw);   end
      BANK_ACQ: begin gain = MW'(g_a); word = MW'(ntw);   end
      default:  begin gain = MW'(g_t); word = MW'(ntw_t); end
    endcase
    prod = word * gain;   // LF_FW + G_FW fractional bits
    // P and A: round to integer; T: keep T_FW fractional bits (rounded).
    if (bank == BANK_TRK)
      code = T_CTR + ((prod + (MW'(1) <<< (LF_FW + G_FW - T_FW - 1)))
                      >>> (LF_FW + G_FW - T_FW));
    else
      code = ((bank == BANK_PVT) ? P_CTR : A_CTR)
           + ((prod + (MW'(1) <<< (LF_FW + G_FW - 1))) >>> (LF_FW + G_FW));
    p_next = tune_q.p;
    a_next = tune_q.a;
    t_next = {tune_q.t_int, tune_q.t_frac};
    unique case (bank)
      BANK_PVT: p_next = P_W'(clamp(code, P_W));
      BANK_ACQ: a_next = A_W'(clamp(code, A_W));
      default:  t_next = TW'(clamp(code, TW));
    endcase
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      tune_q.p      <= P_W'(P_CTR);
      tune_q.a      <= A_W'(A_CTR);
      tune_q.t_int  <= T_IW'(1 << (T_IW - 1));
      tune_q.t_frac <= '0;
    end else begin
      tune_q.p <= p_next;
      tune_q.a <= a_next;
      {tune_q.t_int, tune_q.t_frac} <= t_next;
    end
  end

  assign tune = tune_q;
endmodule
