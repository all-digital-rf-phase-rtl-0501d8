// iir_chain: cascade of single-pole IIR filters ahead of the PI controller.
//
// Each of the NSTAGE stages computes y[k] = (1 - lambda)*y[k-1] + lambda*x[k]
// with lambda = 2**-lam_sh[i], written as y[k] = y[k-1] + (x[k]-y[k-1])*lambda.
// A stage whose enable is low passes its input through (the document notes the
// filter is not used in some modes). The four stages and the equation follow
// the document; power-of-two coefficients, the per-stage bypass and clearing
// on restart are this design's choices.
//
// Timing: the output y[k] is combinational from x[k] and the stage registers,
// which load y[k] on the CKR rising edge.
`timescale 1ps/1fs
module iir_chain
  import adpll_pkg::*;
#(
  parameter int unsigned NSTAGE = 4
) (
  input  logic                           ckr,
  input  logic                           rst_n,
  input  logic                           restart,
  input  logic [NSTAGE-1:0]              en,
  input  logic [NSTAGE-1:0][5:0]         lam_sh,
  input  logic signed [LF_W-1:0]         x,
  output logic signed [LF_W-1:0]         y
);
  logic signed [LF_W-1:0] st_q [NSTAGE];
  logic signed [LF_W-1:0] st_d [NSTAGE];
  logic signed [LF_W-1:0] sin  [NSTAGE+1];

  always_comb begin
    sin[0] = x;
    for (int i = 0; i < NSTAGE; i++) begin
      st_d[i]  = st_q[i] + ((sin[i] - st_q[i]) >>> lam_sh[i]);
      sin[i+1] = en[i] ? st_d[i] : sin[i];
    end
    y = sin[NSTAGE];
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSTAGE; i++) st_q[i] <= '0;
    end else if (restart) begin
      for (int i = 0; i < NSTAGE; i++) st_q[i] <= '0;
    end else begin
      for (int i = 0; i < NSTAGE; i++) st_q[i] <= en[i] ? st_d[i] : sin[i];
    end
  end
endmodule
