// dtc: behavioural model of the digital-to-time converter (analog part).
//
// Not synthesizable: the DTC is a delay line whose step is set by transistor
// delays. It delays each rising edge of the reference clock FREF by
// T_INTRINSIC_PS + code * T_STEP_PS and each falling edge by T_INTRINSIC_PS,
// producing FREF_D. The code is taken at the FREF rising edge. The 15 ps step
// is the delay resolution used in the document's simulations; the intrinsic
// delay is this model's choice. A real DTC's nonlinearity and noise are not
// modelled.
`timescale 1ps/1fs
module dtc
  import adpll_pkg::*;
#(
  parameter real T_STEP_PS      = 15.0,
  parameter real T_INTRINSIC_PS = 20.0
) (
  input  logic             fref,
  input  logic [DTC_W-1:0] code,
  output logic             fref_d
);
  initial fref_d = 1'b0;

  // Rising edge: intrinsic delay, then one step per code unit. The code is
  // copied at the edge so a later change cannot disturb an edge in flight.
  always @(posedge fref) begin
    automatic logic [DTC_W-1:0] n_steps = code;
    #(T_INTRINSIC_PS);
    for (int i = 0; i < int'(n_steps); i++) #(T_STEP_PS);
    fref_d <= 1'b1;
  end

  always @(negedge fref) begin
    fref_d <= #(T_INTRINSIC_PS) 1'b0;
  end
endmodule
