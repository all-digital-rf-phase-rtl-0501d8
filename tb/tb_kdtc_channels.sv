// tb_kdtc_channels: DTC-gain estimation on channels close to an integer
// multiple of the reference, at the top level's default parameters.
//
// For each channel FCW = 69 + Offset/f_R with f_R = 26 MHz and Offset = 0.1,
// 0.5, 1 and 10 MHz, the loop is reset and brought to lock with the same
// sequence as the main closed-loop test, shortened: PVT bank, acquisition
// bank, tracking bank with type II (residue method, then the plain
// integrator). The K_DTC estimate starts 40 % high. Estimation then runs with
// the integer path still on and again after the integer path is switched off.
// Close to an integer channel the phase error sawtooth that drives the
// estimator repeats only every f_R/Offset reference cycles (260 cycles at
// 0.1 MHz), so convergence is slowest there.
//
// Checks per channel, all against values computed here from the channel
// frequency: the DCO frequency measured by counting CKV edges, phi_EI zero
// and phi_EF inside the TDC range in lock, and the estimated DTC step
// K_DTC * T_V within 3 % of the true 15 ps. Each channel that converged is
// counted and a channel that did not is a failure.
//
// The offsets and the 40 % start error follow the document's near-integer
// evaluation; the sequence lengths and the 3 % limit are this testbench's.
`timescale 1ps/1fs
module tb_kdtc_channels;
  import adpll_pkg::*;

  localparam real F_REF  = 26.0e6;
  localparam real T_REF  = 1.0e12 / F_REF;   // ps
  localparam real T_STEP = 15.0e-12;         // DTC step of the models (s)
  localparam int  NCH    = 4;

  logic                    fref = 1'b0;
  logic                    rst_n = 1'b1;
  logic [FCW_W-1:0]        fcw = '0;
  logic signed [FCW_W-1:0] fcw_mod = '0;
  bank_e                   bank = BANK_PVT;
  logic                    restart = 1'b0;
  comb_mode_e              comb_mode = COMB_MUX;
  logic                    int_en = 1'b1;
  pp_mode_e                pp_mode = PP_TRUNC;
  logic [3:0]              iir_en = '0;
  logic [3:0][5:0]         lam_sh = {4{6'd2}};
  logic [5:0]              alpha_sh = 6'd3;
  logic [5:0]              rho_sh = 6'd14;
  logic                    rho_en = 1'b0;
  logic                    rho_res = 1'b1;
  logic [G_W-1:0]          g_p, g_a, g_t;
  logic [BIAS_W-1:0]       bias = 7'd64;
  logic                    kdtc_en = 1'b0, kdtc_load = 1'b0;
  logic [KD_W-1:0]         kdtc_init = '0;

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
  int n_converged = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial forever #(T_REF / 2.0) fref = ~fref;

  longint ckv_cnt = 0;
  always @(posedge ckv) ckv_cnt++;

  task automatic wait_ckr(input int n);
    repeat (n) @(posedge ckr);
  endtask

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

  task automatic watch_lock(input int n, output real max_ef, output int ei_nz);
    max_ef = 0.0;
    ei_nz = 0;
    repeat (n) begin
      @(posedge ckr);
      if (pe2r(phi_ef) > max_ef) max_ef = pe2r(phi_ef);
      if (-pe2r(phi_ef) > max_ef) max_ef = -pe2r(phi_ef);
      if (phi_ei != 0) ei_nz++;
    end
  endtask

  task automatic step(input bit do_restart);
    @(negedge ckr);
    restart = do_restart;
    @(negedge ckr);
    restart = 1'b0;
  endtask

  real offs [NCH] = '{0.1e6, 0.5e6, 1.0e6, 10.0e6};
  real f_tgt, fcw_r, k_true, r, mef, kd, dt_ps;
  int  ei;

  initial begin
    g_p = G_W'(int'(F_REF / 4.0e6 * 256.0 + 0.5));
    g_a = G_W'(int'(F_REF / 200.0e3 * 256.0 + 0.5));
    g_t = G_W'(int'(F_REF / 12.0e3 * 256.0 + 0.5));
    for (int ch = 0; ch < NCH; ch++) begin
      f_tgt  = 69.0 * F_REF + offs[ch];
      fcw_r  = f_tgt / F_REF;
      k_true = T_STEP * f_tgt;
      // a little random spread on the start error, 38..42 %
      kdtc_init = KD_W'(int'((1.38 + real'($urandom_range(40)) / 1000.0) * k_true * 65536.0 + 0.5));
      fcw = FCW_W'(longint'(fcw_r * real'(64'd1 << FCW_FW) + 0.5));

      // reset and initial settings
      @(negedge fref);
      rst_n = 1'b0;
      bank = BANK_PVT; comb_mode = COMB_MUX; int_en = 1'b1; pp_mode = PP_TRUNC;
      iir_en = '0; alpha_sh = 6'd3; rho_sh = 6'd14; rho_en = 1'b0; rho_res = 1'b1;
      kdtc_en = 1'b0;
      #(5.0 * T_REF);
      rst_n = 1'b1;

      // PVT bank
      wait_ckr(80);
      // acquisition bank
      @(negedge ckr);
      bank = BANK_ACQ; comb_mode = COMB_ADD; alpha_sh = 6'd4;
      step(1'b1);
      wait_ckr(60);
      @(negedge ckr);
      alpha_sh = 6'd6;
      wait_ckr(100);
      // tracking bank, type II
      @(negedge ckr);
      bank = BANK_TRK; rho_en = 1'b1;
      step(1'b1);
      wait_ckr(150);
      @(negedge ckr);
      rho_res = 1'b0;
      wait_ckr(100);
      // estimation with the integer path on, then off
      @(negedge ckr);
      kdtc_en = 1'b1;
      wait_ckr(1250);
      @(negedge ckr);
      int_en = 1'b0;
      wait_ckr(1500);

      watch_lock(200, mef, ei);
      kd    = real'(k_dtc) / 65536.0;
      dt_ps = kd / f_tgt * 1.0e12;
      meas_fcw(100, r);
      $display("offset %4.1f MHz: fcw_meas=%f (target %f) max|phi_EF|=%f UI, DTC step estimate %f ps",
               offs[ch] / 1.0e6, r, fcw_r, mef, dt_ps);
      check((r - fcw_r) < 0.011 && (fcw_r - r) < 0.011, "channel frequency locked");
      check(ei == 0, "integer phase error zero in lock");
      check(mef <= 2.5 * kd + 1e-6, "phi_EF inside the TDC range");
      if ((dt_ps - 15.0) < 0.45 && (15.0 - dt_ps) < 0.45) n_converged++;
      else begin
        failures++;
        $display("FAIL: K_DTC estimate did not converge at offset %f MHz", offs[ch] / 1.0e6);
      end
      checks++;
    end
    check(n_converged == NCH, "every channel converged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 4 channels of about 3300 reference periods each
  initial begin
    #(16000.0 * T_REF);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
