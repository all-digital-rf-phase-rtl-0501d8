// pi_ctrl: proportional-integral controller with gear shifting.
//
// tune = (x * alpha) + gear_offset + integral, with alpha = 2**-alpha_sh and
// rho = 2**-rho_sh. The proportional gain sets the first-order loop bandwidth
// f_BW = alpha*f_R/(2*pi); the integral path turns the type-I loop into a
// type-II loop when rho_en is set.
//  * Gear shift: when alpha_sh changes, the step that the new gain would cause
//    in the output is absorbed into gear_offset, so the tuning word stays
//    continuous (this is how this design realizes the document's "gear shift"
//    block, whose insides the document does not give).
//  * Type-I to type-II switch, residue method (from the document): at the CKR
//    edge where rho_en rises the current input is sampled as x0, and from then
//    on x - x0 is integrated instead of x while rho_res is high. Dropping
//    rho_res later lets the loop force the mean phase error to zero, which the
//    K_DTC estimator relies on; the tuning word stays continuous either way.
//  * restart clears the integral and the gear offset (used when the loop moves
//    to a finer DCO bank; this design's choice).
// Power-of-two gains follow the document's examples (2^-3, 2^-8, 2^-18).
//
// Timing: tune is combinational from x and the registers, which update on the
// CKR rising edge.
`timescale 1ps/1fs
module pi_ctrl
  import adpll_pkg::*;
(
  input  logic                   ckr,
  input  logic                   rst_n,
  input  logic                   restart,
  input  logic [5:0]             alpha_sh,
  input  logic [5:0]             rho_sh,
  input  logic                   rho_en,
  input  logic                   rho_res,     // integrate x - x0 instead of x
  input  logic signed [LF_W-1:0] x,
  output logic signed [LF_W-1:0] tune,
  output logic                   gear_event   // alpha changed this cycle
);
  logic [5:0]             alpha_sh_q;
  logic                   rho_en_q;
  logic signed [LF_W-1:0] x0_q;
  logic signed [LF_W-1:0] integ_q;
  logic signed [LF_W-1:0] gofs_q;
  logic signed [LF_W-1:0] prop;

  assign prop       = x >>> alpha_sh;
  assign gear_event = (alpha_sh != alpha_sh_q);
  assign tune       = prop + gofs_q + integ_q;

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      alpha_sh_q <= '0;
      rho_en_q   <= 1'b0;
      x0_q       <= '0;
      integ_q    <= '0;
      gofs_q     <= '0;
    end else begin
      alpha_sh_q <= alpha_sh;
      rho_en_q   <= rho_en;
      if (restart) begin
        integ_q <= '0;
        gofs_q  <= '0;
        x0_q    <= x;
      end else begin
        if (gear_event)
          gofs_q <= gofs_q + (x >>> alpha_sh_q) - prop;
        if (rho_en && !rho_en_q)
          x0_q <= x;
        else if (rho_en)
          integ_q <= integ_q + ((rho_res ? x - x0_q : x) >>> rho_sh);
      end
    end
  end
endmodule
