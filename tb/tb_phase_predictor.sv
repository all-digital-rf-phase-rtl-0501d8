// tb_phase_predictor: unit test of the phase predictor (DTC control word).
//
// For random reference fractions R_RF and DTC gains K_DTC (0.02 to 0.05 of a
// CKV period per step) it checks, in real arithmetic:
//  * truncation mode: code*K <= 1-R_RF < (code+1)*K + 2^-15, so the delay is
//    1-R_RF rounded down to a whole DTC step, and the residue output is 0;
//  * sigma-delta mode: with R_RF fixed, the code takes the two neighbouring
//    values and its average over 4096 CKR cycles equals (1-R_RF)/K within
//    0.01 step;
//  * residue mode: residue = (0.5 - fractional code)*K within 2^-13 UI, and
//    the code is the truncated one.
// Also checks K_DTC = 0 (reciprocal saturates to the largest code).
// Watchdog: 10 ms.
`timescale 1ps/1fs
module tb_phase_predictor;
  import adpll_pkg::*;
  `include "tb_check.svh"

  logic                    ckr = 1'b0;
  logic                    rst_n = 1'b1;
  pp_mode_e                mode = PP_TRUNC;
  logic [KD_W-1:0]         r_rf = '0;
  logic [KD_W-1:0]         k_dtc = '0;
  logic [DTC_W-1:0]        dtc_ctrl;
  logic signed [PE_W-1:0]  residue;

  phase_predictor dut (.*);

  real f, k, ideal, avg, fr;
  int  lo, hi, sum;

  task automatic tick();
    #10 ckr = 1'b1;
    #10 ckr = 1'b0;
  endtask

  initial begin
    #50 rst_n = 1'b0;
    #50 rst_n = 1'b1;

    // truncation
    for (int n = 0; n < 400; n++) begin
      r_rf  = KD_W'($urandom());
      k_dtc = KD_W'($urandom_range(1311, 3277));
      #1;
      f = real'(r_rf) / 65536.0;
      k = real'(k_dtc) / 65536.0;
      check(real'(dtc_ctrl) * k <= 1.0 - f + 1e-9, "truncated delay not beyond 1-R_RF");
      check((real'(dtc_ctrl) + 1.0) * k + 3.1e-5 > 1.0 - f, "truncated delay within one step");
      check(residue == 0, "no residue in truncation mode");
    end

    // sigma-delta dithering of the fraction
    mode = PP_SD;
    for (int n = 0; n < 6; n++) begin
      r_rf  = KD_W'($urandom());
      k_dtc = KD_W'($urandom_range(1311, 3277));
      #1;
      ideal = (1.0 - real'(r_rf) / 65536.0 - 1.0 / 65536.0) / (real'(k_dtc) / 65536.0);
      sum = 0; lo = 1000; hi = -1;
      for (int c = 0; c < 4096; c++) begin
        #1;
        sum += int'(dtc_ctrl);
        if (int'(dtc_ctrl) < lo) lo = int'(dtc_ctrl);
        if (int'(dtc_ctrl) > hi) hi = int'(dtc_ctrl);
        tick();
      end
      avg = real'(sum) / 4096.0;
      check(avg - ideal < 0.01 && ideal - avg < 0.01, "sigma-delta average equals fractional code");
      check(hi - lo <= 1, "sigma-delta uses two neighbouring codes");
    end

    // residue
    mode = PP_RESIDUE;
    for (int n = 0; n < 300; n++) begin
      r_rf  = KD_W'($urandom());
      k_dtc = KD_W'($urandom_range(1311, 3277));
      #1;
      k = real'(k_dtc) / 65536.0;
      ideal = (1.0 - real'(r_rf) / 65536.0 - 1.0 / 65536.0) / k;
      fr = ideal - real'(dtc_ctrl);
      check(fr > -0.01 && fr < 1.01, "residue mode keeps the truncated code");
      avg = real'(residue) / real'(1 << PE_FW);
      check(avg - (0.5 - fr) * k < 1.3e-4 && (0.5 - fr) * k - avg < 1.3e-4,
            "residue equals (0.5 - fraction) * K_DTC");
    end

    // K_DTC = 0 saturates
    mode = PP_TRUNC;
    k_dtc = '0;
    r_rf = '0;
    #1 check(dtc_ctrl == '1, "zero gain gives the largest code");
    finish();
  end

  initial begin
    #10000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
