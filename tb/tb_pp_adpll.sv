// tb_pp_adpll: closed-loop test of the phase-prediction ADPLL at its default
// parameters.
//
// A 26 MHz reference and FCW = 1.8 GHz / 26 MHz = 69.2308 (the operating
// point of the document's simulations) drive the loop; the DCO model starts
// near 2 GHz. A DTC step and TDC step of 15 ps are used, and the K_DTC
// estimate starts 40 % high (plusarg +kerr=<percent> changes the start
// error). The testbench plays the loop controller:
//   1. PVT bank, multiplexed combiner (integer phase error only), alpha 2^-3;
//   2. restart, acquisition bank, adder combiner, alpha 2^-4, then 2^-6;
//   3. restart, tracking bank, alpha 2^-6, type-II on (rho 2^-14) with the
//      residue method, then the residue dropped so the mean phase error is
//      forced to zero, then K_DTC estimation on;
//   4. gear shift to alpha 2^-7, rho 2^-16, IIR cascade on;
//   5. integer path switched off;
//   6. DTC fraction dithered by sigma-delta, then residue mode;
//   7. two-point modulation step of +100 kHz.
// Frequencies are measured independently by counting CKV edges over a known
// number of reference periods. Each mechanism is counted and a mechanism
// that never occurred is a failure.
`timescale 1ps/1fs
module tb_pp_adpll;
  import adpll_pkg::*;

  localparam real F_REF   = 26.0e6;
  localparam real T_REF   = 1.0e12 / F_REF;          // ps
  localparam real F_TGT   = 1.8e9;
  localparam real FCW_R   = F_TGT / F_REF;
  localparam real K_TRUE  = 15.0e-12 * F_TGT;        // 0.027

  logic                    fref = 1'b0;
  logic                    rst_n = 1'b1;
  logic [FCW_W-1:0]        fcw;
  logic signed [FCW_W-1:0] fcw_mod = '0;
  bank_e                   bank = BANK_PVT;
  logic                    restart = 1'b0;
  comb_mode_e              comb_mode = COMB_MUX;
  logic                    int_en = 1'b1;
  pp_mode_e                pp_mode = PP_TRUNC;
  logic [3:0]              iir_en = '0;
  logic [3:0][5:0]         lam_sh = {4{6'd2}};
  logic [5:0]              alpha_sh = 6'd3;
  logic [5:0]              rho_sh = 6'd12;
  logic                    rho_en = 1'b0;
  logic                    rho_res = 1'b1;
  logic [G_W-1:0]          g_p, g_a, g_t;
  logic [BIAS_W-1:0]       bias = 7'd64;
  logic                    kdtc_en = 1'b0, kdtc_load = 1'b0;
  logic [KD_W-1:0]         kdtc_init;

  logic                    ckv, ckr, aligned, gear_event;
  logic [DTC_W-1:0]        dtc_ctrl;
  logic signed [7:0]       tdc_half;
  logic signed [PE_W-1:0]  phi_e, phi_ei, phi_ef;
  logic signed [LF_W-1:0]  ntw;
  dco_tune_t               tune;
  logic [T_IW-1:0]         t_dith;
  logic [KD_W-1:0]         k_dtc;

  pp_adpll dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_bank_sw = 0, n_restart = 0, n_gear = 0, n_type2 = 0, n_int_off = 0;
  int n_tdc_sat = 0, n_phi_ei = 0, n_sd_code = 0, n_residue = 0, n_iir = 0;
  int n_mash = 0, n_kdtc_upd = 0, n_mod = 0, n_mux = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference clock
  initial forever #(T_REF / 2.0) fref = ~fref;

  // CKV edge counter for frequency measurement
  longint ckv_cnt = 0;
  always @(posedge ckv) ckv_cnt++;

  int unsigned ckr_n = 0;
  always @(posedge ckr) ckr_n++;

  task automatic wait_ckr(input int n);
    repeat (n) @(posedge ckr);
  endtask

  // measured CKV cycles per reference cycle over n reference cycles
  task automatic meas_fcw(input int n, output real r);
    longint c0;
    @(posedge fref);
    c0 = ckv_cnt;
    repeat (n) @(posedge fref);
    r = real'(ckv_cnt - c0) / real'(n);
  endtask

  function automatic real pe2r(input logic signed [PE_W-1:0] v);
    return real'(v) / real'(1 << PE_FW);
  endfunction

  // mechanism observation on every CKR
  logic [KD_W-1:0] k_prev = '0;
  logic [12:0][DTC_W-1:0] dtc_hist = '0;
  real lvl;
  always @(posedge ckr) begin
    if (rst_n) begin
      if (tdc_half == 8'sd5 || tdc_half == -8'sd5) n_tdc_sat++;
      if (phi_ei != 0) n_phi_ei++;
      if (gear_event) n_gear++;
      if (iir_en != 0) n_iir++;
      if (t_dith != tune.t_int) n_mash++;
      if (k_dtc != k_prev && kdtc_en) n_kdtc_upd++;
      // residue mode: phi_EF leaves the grid of odd multiples of K_DTC/2
      if (pp_mode == PP_RESIDUE && k_dtc != 0) begin
        lvl = pe2r(phi_ef) * 2.0 * 65536.0 / real'(k_dtc);
        if ((lvl - 2.0 * $floor(lvl / 2.0) - 1.0) > 0.2 || (lvl - 2.0 * $floor(lvl / 2.0) - 1.0) < -0.2)
          n_residue++;
      end
      // sigma-delta mode: the code for a given reference fraction varies
      // (FCW fraction 3/13 repeats every 13 reference cycles)
      if (pp_mode == PP_SD && dtc_ctrl != dtc_hist[12]) n_sd_code++;
      dtc_hist <= {dtc_hist[11:0], dtc_ctrl};
      if (comb_mode == COMB_MUX && int_en) n_mux++;
      k_prev <= k_dtc;
    end
  end

  // max |phi_EF| and phi_EI activity in a window
  task automatic watch_lock(input int n, output real max_ef, output int ei_nz);
    max_ef = 0.0;
    ei_nz = 0;
    repeat (n) begin
      @(posedge ckr);
      if ((pe2r(phi_ef) > max_ef)) max_ef = pe2r(phi_ef);
      if ((-pe2r(phi_ef) > max_ef)) max_ef = -pe2r(phi_ef);
      if (phi_ei != 0) ei_nz++;
    end
  endtask

  real r, r0, mef, kd;
  int  kerr_pct;
  int  ei;

  initial begin
    fcw       = FCW_W'(longint'(FCW_R * real'(64'd1 << FCW_FW) + 0.5));
    g_p       = G_W'(int'(F_REF / 4.0e6 * 256.0 + 0.5));
    g_a       = G_W'(int'(F_REF / 200.0e3 * 256.0 + 0.5));
    g_t       = G_W'(int'(F_REF / 12.0e3 * 256.0 + 0.5));
    if (!$value$plusargs("kerr=%d", kerr_pct)) kerr_pct = 40;
    kdtc_init = KD_W'(int'((1.0 + real'(kerr_pct) / 100.0) * K_TRUE * 65536.0 + 0.5));

    #(100.0) rst_n = 1'b0;
    #(5.0 * T_REF);
    rst_n = 1'b1;

    // 1. PVT bank acquisition
    meas_fcw(4, r0);
    check(r0 > FCW_R + 4.0, "DCO starts above the target frequency");
    wait_ckr(80);
    meas_fcw(20, r);
    $display("PVT done: fcw_meas=%f (target %f) phi_e=%f", r, FCW_R, pe2r(phi_e));
    check((r - FCW_R) < 0.2 && (FCW_R - r) < 0.2, "PVT bank brings the DCO within 4 MHz");

    // 2. acquisition bank
    @(negedge ckr);
    restart = 1'b1; bank = BANK_ACQ; comb_mode = COMB_ADD; alpha_sh = 6'd4;
    n_bank_sw++; n_restart++;
    @(negedge ckr);
    restart = 1'b0;
    wait_ckr(60);
    @(negedge ckr);
    alpha_sh = 6'd6;
    wait_ckr(100);
    meas_fcw(40, r);
    $display("ACQ done: fcw_meas=%f phi_e=%f", r, pe2r(phi_e));
    check((r - FCW_R) < 0.02 && (FCW_R - r) < 0.02, "acquisition bank within 0.5 MHz");

    // 3. tracking bank, type-II, K_DTC estimation
    @(negedge ckr);
    restart = 1'b1; bank = BANK_TRK; alpha_sh = 6'd6; rho_sh = 6'd14; rho_en = 1'b1;
    n_bank_sw++; n_restart++; n_type2++;
    @(negedge ckr);
    restart = 1'b0;
    wait_ckr(150);
    @(negedge ckr);
    rho_res = 1'b0;
    wait_ckr(100);
    @(negedge ckr);
    kdtc_en = !$test$plusargs("noest");
    wait_ckr(1250);
    watch_lock(200, mef, ei);
    $display("TRK locked: max|phi_EF|=%f UI, phi_EI nonzero %0d, k_dtc=%0d (true %0d)",
             mef, ei, k_dtc, int'(K_TRUE * 65536.0));
    check(ei == 0, "integer phase error stays zero in lock");
    check(mef <= 2.5 * real'(k_dtc) / 65536.0 + 1e-6, "phi_EF within TDC range in lock");
    meas_fcw(100, r);
    $display("TRK fcw_meas=%f", r);
    check((r - FCW_R) < 0.011 && (FCW_R - r) < 0.011, "tracking lock: frequency within one CKV cycle per 100 FREF");

    // 4. gear shift and IIR cascade
    @(negedge ckr);
    alpha_sh = 6'd7; rho_sh = 6'd16; iir_en = 4'hF;
    wait_ckr(600);
    watch_lock(200, mef, ei);
    $display("gear shifted: max|phi_EF|=%f, k_dtc=%0d", mef, k_dtc);
    check(ei == 0, "phase stays locked after gear shift");

    // 5. integer path off
    @(negedge ckr);
    int_en = 1'b0; n_int_off++;
    wait_ckr(1500);
    watch_lock(200, mef, ei);
    kd = real'(k_dtc) / 65536.0;
    $display("int off: max|phi_EF|=%f, k_dtc=%f (true %f)", mef, kd, K_TRUE);
    check(mef <= 2.5 * kd + 1e-6, "fractional path alone holds lock");
    check((kd - K_TRUE) < 0.03 * K_TRUE && (K_TRUE - kd) < 0.03 * K_TRUE,
          "K_DTC estimate converged within 3 %");
    meas_fcw(100, r);
    check((r - FCW_R) < 0.011 && (FCW_R - r) < 0.011, "frequency with integer path off");

    // 6. DTC fraction handling options
    @(negedge ckr);
    pp_mode = PP_SD;
    wait_ckr(300);
    watch_lock(100, mef, ei);
    check(mef <= 2.5 * kd + 1e-6, "lock with sigma-delta dithered DTC");
    @(negedge ckr);
    pp_mode = PP_RESIDUE;
    wait_ckr(300);
    watch_lock(100, mef, ei);
    check(mef <= 3.5 * kd, "lock with residue correction");
    @(negedge ckr);
    pp_mode = PP_TRUNC;

    // 7. two-point modulation: +100 kHz step
    meas_fcw(200, r0);
    @(negedge ckr);
    fcw_mod = FCW_W'(longint'(100.0e3 / F_REF * real'(64'd1 << FCW_FW)));
    n_mod++;
    watch_lock(50, mef, ei);
    $display("modulation: max|phi_EF| in first 50 cycles=%f", mef);
    check(mef <= 2.5 * kd + 1e-6, "two-point modulation adds no phase error");
    meas_fcw(200, r);
    $display("modulation: fcw %f -> %f (expected +%f)", r0, r, 100.0e3 / F_REF);
    check((r - r0 - 100.0e3 / F_REF) < 0.006 && (r0 + 100.0e3 / F_REF - r) < 0.006,
          "modulated frequency step");

    // mechanism coverage
    $display("mechanisms: bank_sw=%0d restart=%0d gear=%0d type2=%0d int_off=%0d tdc_sat=%0d phi_ei=%0d",
             n_bank_sw, n_restart, n_gear, n_type2, n_int_off, n_tdc_sat, n_phi_ei);
    $display("            sd_code=%0d residue=%0d iir=%0d mash=%0d kdtc_upd=%0d mod=%0d mux=%0d",
             n_sd_code, n_residue, n_iir, n_mash, n_kdtc_upd, n_mod, n_mux);
    check(n_bank_sw >= 2, "bank switches happened");
    check(n_restart >= 2, "restarts happened");
    check(n_gear >= 1, "gear shift happened");
    check(n_type2 >= 1, "type-II switch happened");
    check(n_int_off >= 1, "integer path shutdown happened");
    check(n_tdc_sat >= 1, "TDC saturation during acquisition happened");
    check(n_phi_ei >= 1, "integer phase error was used");
    check(n_sd_code >= 1, "sigma-delta changed a DTC code");
    check(n_residue >= 1, "residue correction was applied");
    check(n_iir >= 1, "IIR cascade was used");
    check(n_mash >= 1, "MASH dither changed the tracking code");
    check(n_kdtc_upd >= 1, "K_DTC estimate was updated");
    check(n_mux >= 1, "multiplexing combiner was used");
    check(n_mod >= 1, "modulation was applied");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 9000 reference periods
  initial begin
    #(9000.0 * T_REF);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
