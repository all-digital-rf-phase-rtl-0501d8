// tb_dco: unit test of the DCO behavioural model.
//
// For random P, A and T codes the CKV frequency is measured by timing 2000
// rising edges and compared with
//   2 GHz + (p-128)*4 MHz + (a-128)*200 kHz + (t-64)*12 kHz
// within 2 kHz. A one-code change of the tracking bank must move the
// frequency by 12 kHz (within 1 kHz). A zero bias code stops the
// oscillation. Watchdog: 10 ms.
`timescale 1ps/1fs
module tb_dco;
  import adpll_pkg::*;
  `include "tb_check.svh"

  logic [P_W-1:0]    d_p = 8'd128;
  logic [A_W-1:0]    d_a = 8'd128;
  logic [T_IW-1:0]   d_t = T_IW'(1 << (T_IW - 1));
  logic [BIAS_W-1:0] bias = 7'd64;
  logic              ckv;

  dco dut (.*);

  real f_meas, f_want, f0;
  realtime t0;
  int n_edges;

  task automatic measure(output real f);
    @(posedge ckv);
    @(posedge ckv);
    t0 = $realtime;
    repeat (2000) @(posedge ckv);
    f = 2000.0 / (($realtime - t0) * 1.0e-12);
  endtask

  always @(posedge ckv) n_edges++;

  initial begin
    for (int k = 0; k < 12; k++) begin
      d_p = 8'($urandom_range(60, 200));
      d_a = 8'($urandom());
      d_t = T_IW'($urandom());
      f_want = 2.0e9 + (real'(d_p) - 128.0) * 4.0e6 + (real'(d_a) - 128.0) * 200.0e3
             + (real'(d_t) - real'(1 << (T_IW - 1))) * 12.0e3;
      measure(f_meas);
      check(f_meas - f_want < 2.0e3 && f_want - f_meas < 2.0e3, "frequency from the bank codes");
    end
    d_t = T_IW'(10);
    measure(f0);
    d_t = T_IW'(11);
    measure(f_meas);
    check(f_meas - f0 - 12.0e3 < 1.0e3 && 12.0e3 - (f_meas - f0) < 1.0e3,
          "one tracking code is 12 kHz");
    bias = '0;
    #2000;
    n_edges = 0;
    #10000;
    check(n_edges == 0 && ckv == 1'b0, "no oscillation without bias current");
    bias = 7'd1;
    #10000;
    check(n_edges > 10, "oscillation resumes with bias current");
    finish();
  end

  initial begin
    #10000000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
