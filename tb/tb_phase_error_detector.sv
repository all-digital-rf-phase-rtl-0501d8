// tb_phase_error_detector: open-loop test of the phase-prediction phase
// detector (reference accumulator, predictor, DTC, CKV gating, TDC, edge
// counter).
//
// CKV is an ideal 1.8 GHz clock from the testbench and FREF is 26 MHz, so
// FCW = 69.2308 and the reference fraction cycles through thirteen values.
// The CKV phase is then delayed in 15 ps steps (one DTC/TDC step) over a full
// CKV period. Checks:
//  * at every phase, over 26 reference cycles the TDC result moves by at most
//    one level (two half steps): the DTC has removed the fractional ramp that
//    a plain TDC would see across a whole CKV period. The one exception is
//    the phase where the predicted edge sits on the boundary between two CKV
//    edges; there the result swings full scale (seen at most twice in a
//    sweep of 38 steps, 37 of which span one period);
//  * inside the TDC range, each 15 ps delay raises the mean TDC result by
//    two half steps (1.5 to 2.5);
//  * the integer difference R_RI - R_VI is constant whenever the TDC result
//    is within +-3 half steps;
//  * sigma-delta mode keeps the spread within two levels and residue mode
//    puts phi_EF off the TDC grid;
//  * with int_en low, R_VI holds.
// Watchdog: 2 ms.
`timescale 1ps/1fs
module tb_phase_error_detector;
  import adpll_pkg::*;
  `include "tb_check.svh"

  localparam real TV = 1.0e12 / 1.8e9;
  localparam real TR = 1.0e12 / 26.0e6;

  logic                    fref = 1'b0;
  logic                    ckv = 1'b0;
  logic                    rst_n = 1'b1;
  logic [FCW_W-1:0]        fcw;
  logic signed [FCW_W-1:0] fcw_mod = '0;
  logic [KD_W-1:0]         k_dtc = KD_W'(1769);
  pp_mode_e                pp_mode = PP_TRUNC;
  logic                    int_en = 1'b1;
  logic                    ckr, ckvd8;
  logic [DTC_W-1:0]        dtc_ctrl;
  logic [PH_IW-1:0]        r_ri, r_vi;
  logic [KD_W-1:0]         r_rf;
  logic signed [7:0]       tdc_half;
  logic signed [PE_W-1:0]  phi_ef;

  phase_error_detector dut (.*);

  initial forever #(TR / 2.0) fref = ~fref;

  // ideal CKV with an adjustable extra delay
  real pending = 0.0;
  realtime t_edge = 1000.0;
  initial forever begin
    t_edge = t_edge + TV / 2.0 + pending;
    pending = 0.0;
    #(t_edge - $realtime) ckv = ~ckv;
  end

  int lo, hi, sum, nd, n_off, n_wrap = 0;
  real mean, prev_mean;
  logic [PH_IW-1:0] dcur, dvals[$], dloc[$];
  logic [PH_IW-1:0] vi_held;

  // R_RI between CKR edges belongs to the coming FREF edge; keep it for the
  // comparison with that edge's R_VI after the next CKR edge
  logic [PH_IW-1:0] ri_hold = '0;
  always @(negedge ckr) ri_hold = r_ri;

  task automatic observe(input int n);
    lo = 100; hi = -100; sum = 0; n_off = 0;
    dloc.delete();
    repeat (n) begin
      @(posedge ckr);
      #1;
      if (int'(tdc_half) < lo) lo = int'(tdc_half);
      if (int'(tdc_half) > hi) hi = int'(tdc_half);
      sum += int'(tdc_half);
      dcur = ri_hold - r_vi;
      if (tdc_half >= -8'sd3 && tdc_half <= 8'sd3 && !(dcur inside {dloc})) dloc.push_back(dcur);
      // residue moves phi_EF off the odd multiples of K/2
      if (phi_ef != PE_W'((longint'(tdc_half) * 1769) >>> 1)) n_off++;
    end
    mean = real'(sum) / real'(n);
  endtask

  initial begin
    fcw = FCW_W'(longint'(1.8e9 / 26.0e6 * (2.0 ** FCW_FW) + 0.5));
    #100 rst_n = 1'b0;
    #(3.0 * TR) rst_n = 1'b1;
    repeat (10) @(posedge ckr);

    prev_mean = -100.0;
    nd = 0;
    for (int s = 0; s < 38; s++) begin
      @(negedge ckr) pending = 15.0;
      repeat (3) @(posedge ckr);
      observe(26);
      if (lo == -5 && hi == 5) n_wrap++;
      else foreach (dloc[i]) if (!(dloc[i] inside {dvals})) dvals.push_back(dloc[i]);
      if (!(lo == -5 && hi == 5)) check(hi - lo <= 2, "TDC result spread at most one level at fixed CKV phase");
      if (prev_mean > -4.0 && mean < 4.0 && prev_mean < 4.0 && mean > -4.0) begin
        nd++;
        check(mean - prev_mean > 1.5 && mean - prev_mean < 2.5,
              "15 ps later CKV raises the TDC result by one level");
      end
      prev_mean = mean;
    end
    check(nd >= 2, "sweep crossed the TDC range");
    check(n_wrap <= 2, "TDC swings full scale only where the CKV delay wraps a period");
    check(dvals.size() == 1, "R_RI - R_VI constant inside the TDC range");

    // move into the TDC range (result near zero) for the modes
    for (int s = 0; s < 40 && !(mean > -2.0 && mean < 2.0 && hi - lo <= 2); s++) begin
      @(negedge ckr) pending = 15.0;
      repeat (3) @(posedge ckr);
      observe(13);
    end
    pp_mode = PP_SD;
    repeat (5) @(posedge ckr);
    observe(52);
    check(hi - lo <= 4, "sigma-delta mode spread within two levels");
    pp_mode = PP_RESIDUE;
    repeat (3) @(posedge ckr);
    observe(26);
    check(n_off > 10, "residue mode puts phi_EF off the TDC grid");
    pp_mode = PP_TRUNC;
    observe(13);
    check(n_off == 0, "truncation mode: phi_EF on the TDC grid");

    int_en = 1'b0;
    repeat (2) @(posedge ckr);
    #1 vi_held = r_vi;
    repeat (10) @(posedge ckr);
    #1 check(r_vi == vi_held, "R_VI holds with the integer path off");
    finish();
  end

  initial begin
    #2000000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
