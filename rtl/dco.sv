// dco: behavioural model of the LC-tank digitally controlled oscillator.
//
// Not synthesizable: the DCO is an LC tank with binary-weighted varactor banks
// and a negative-resistance core. The model turns the three bank codes into a
// frequency
//   f = F_CENTER_HZ + (p - 2**(P_W-1))*DF_P_HZ + (a - 2**(A_W-1))*DF_A_HZ
//       + (t - 2**(T_IW-1))*DF_T_HZ
// and toggles ckv every half period, the period being recomputed at every
// edge. The bank step sizes 4 MHz, 200 kHz and 12 kHz are the document's GSM
// example; the codes act as the inverted varactor controls of the document's
// oscillator schematic, so a larger code gives a higher frequency. Of the
// 7-bit bias input (the core current, which in the circuit sets phase noise)
// the model only keeps the fact that without current there is no
// oscillation: bias = 0 holds ckv low. Noise, the output dividers and
// nonlinearity are not modelled. The half-period delay is computed at run
// time, which is the point of the model; the linter's note that the delay
// value is not known statically refers to this.
`timescale 1ps/1fs
module dco
  import adpll_pkg::*;
#(
  parameter real F_CENTER_HZ = 2.0e9,
  parameter real DF_P_HZ     = 4.0e6,
  parameter real DF_A_HZ     = 200.0e3,
  parameter real DF_T_HZ     = 12.0e3
) (
  input  logic [P_W-1:0]    d_p,
  input  logic [A_W-1:0]    d_a,
  input  logic [T_IW-1:0]   d_t,
  input  logic [BIAS_W-1:0] bias,
  output logic              ckv
);
  real     freq_hz;
  realtime half_ps;

  always_comb begin
    freq_hz = F_CENTER_HZ
            + (real'(d_p) - real'(1 << (P_W - 1)))  * DF_P_HZ
            + (real'(d_a) - real'(1 << (A_W - 1)))  * DF_A_HZ
            + (real'(d_t) - real'(1 << (T_IW - 1))) * DF_T_HZ;
  end

  // Edges are scheduled from an accumulated ideal edge time, so the rounding
  // of each delay to the time precision does not build up into a frequency
  // error (a 12 kHz step is only about 1.5 fs per period at 2 GHz).
  realtime t_edge_ps;

  initial begin
    ckv = 1'b0;
    t_edge_ps = 0.0;
    forever begin
      half_ps   = 0.5e12 / freq_hz;
      t_edge_ps = t_edge_ps + half_ps;
      #(t_edge_ps - $realtime) ckv = (bias != '0) ? ~ckv : 1'b0;
    end
  end
endmodule
