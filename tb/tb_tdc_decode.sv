// tb_tdc_decode: unit test of the TDC thermometer decoder.
//
// All 2**TDC_TAPS input words are applied with random TDC gains. The half-
// step result must be 2n - TDC_TAPS, n being the run of ones from tap 0, and
// phi_EF must be that many half steps of K_TDC, in CKV periods, within one
// output LSB. Watchdog: 1 ms.
`timescale 1ps/1fs
module tb_tdc_decode;
  import adpll_pkg::*;
  `include "tb_check.svh"

  logic [TDC_TAPS-1:0]    therm = '0;
  logic [KD_W-1:0]        k_tdc = '0;
  logic signed [7:0]      dt_half;
  logic signed [PE_W-1:0] phi_ef;

  tdc_decode dut (.*);

  int  n;
  real want, got;

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int w = 0; w < (1 << TDC_TAPS); w++) begin
        therm = TDC_TAPS'(w);
        k_tdc = KD_W'($urandom_range(1000, 4000));
        #1;
        n = 0;
        while (n < TDC_TAPS && therm[n]) n++;
        check(dt_half == 8'(2 * n - int'(TDC_TAPS)), "half-step count = 2n - taps");
        want = real'(2 * n - int'(TDC_TAPS)) / 2.0 * real'(k_tdc) / 65536.0;
        got  = real'(phi_ef) / real'(1 << PE_FW);
        check(got - want < 2.0 / real'(1 << PE_FW) && want - got < 2.0 / real'(1 << PE_FW),
              "phi_EF = half steps * K_TDC / 2");
      end
    end
    finish();
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
