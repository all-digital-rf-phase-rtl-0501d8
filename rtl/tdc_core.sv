// tdc_core: behavioural model of the narrow TDC core (delay line and samplers).
//
// Not synthesizable: FREF_D travels down a chain of delay cells (a fixed
// offset delay T_OFFSET_PS, then TDC_TAPS cells of T_INV_PS each) and the cell
// outputs are sampled by flip-flops on the rising edge of the gated variable
// clock CKV_G. Tap i is high when FREF_D rose at least
// T_OFFSET_PS + i*T_INV_PS before CKV_G. The result is a thermometer code
// whose number of leading ones measures the FREF_D-to-CKV_G separation. Per
// the document the chain only needs to cover a few steps; the simulation in it
// uses six levels (+-0.5, +-1.5, +-2.5 steps) with the DTC's resolution,
// which TDC_TAPS = 5 gives. The offset delay is this model's choice.
`timescale 1ps/1fs
module tdc_core
  import adpll_pkg::*;
#(
  parameter real T_INV_PS    = 15.0,
  parameter real T_OFFSET_PS = 100.0
) (
  input  logic                fref_d,
  input  logic                ckv_g,
  output logic [TDC_TAPS-1:0] q
);
  realtime t_rise;

  initial begin
    t_rise = 0.0;
    q = '0;
  end

  always @(posedge fref_d) t_rise <= $realtime;

  always @(posedge ckv_g) begin
    for (int i = 0; i < TDC_TAPS; i++)
      q[i] <= fref_d && ($realtime - t_rise >= T_OFFSET_PS + real'(i) * T_INV_PS);
  end
endmodule
