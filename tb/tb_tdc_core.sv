// tb_tdc_core: unit test of the TDC core behavioural model.
//
// For 300 random separations between the FREF_D and CKV_G rising edges
// (50 ps to 250 ps, kept 0.5 ps away from the tap thresholds) the
// thermometer output must have as many leading ones as there are taps with
// threshold 100 ps + i*15 ps at or below the separation, and no ones after
// the first zero. With FREF_D low at the CKV_G edge the result is all zero.
// Watchdog: 100 us.
`timescale 1ps/1fs
module tb_tdc_core;
  import adpll_pkg::*;
  `include "tb_check.svh"

  logic                fref_d = 1'b0;
  logic                ckv_g = 1'b0;
  logic [TDC_TAPS-1:0] q;

  tdc_core dut (.*);

  real dt, fr;
  int  n;
  logic [TDC_TAPS-1:0] want;
  int  seen[TDC_TAPS+1];

  initial begin
    #1000;
    for (int k = 0; k < 300; k++) begin
      dt = 50.0 + real'($urandom_range(0, 200000)) / 1000.0;
      fr = (dt - 100.0) / 15.0;
      if (fr - $floor(fr) < 0.04 || fr - $floor(fr) > 0.96) dt = dt + 1.0;
      fref_d = 1'b1;
      #(dt) ckv_g = 1'b1;
      #1;
      n = 0;
      for (int i = 0; i < TDC_TAPS; i++) if (dt >= 100.0 + 15.0 * i) n++;
      want = TDC_TAPS'((1 << n) - 1);
      seen[n]++;
      check(q == want, "thermometer code matches the separation");
      #200 ckv_g = 1'b0;
      fref_d = 1'b0;
      #300;
    end
    for (int i = 0; i <= TDC_TAPS; i++) check(seen[i] > 0, "every TDC level exercised");
    // FREF_D low: nothing
    #100 ckv_g = 1'b1;
    #1 check(q == '0, "no FREF_D edge gives an all-zero code");
    finish();
  end

  initial begin
    #100000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
