// tb_two_point_gmsk: two-point GMSK frequency modulation of the locked loop,
// at the top level's default parameters.
//
// The loop is brought to lock at 1.8 GHz from 26 MHz (FCW = 69.2308) with the
// DTC gain known, and the integer path is switched off. A pseudo-random bit
// sequence is then shaped into a GMSK frequency waveform and written every
// reference cycle to fcw_mod, which the design adds both to the reference
// phase and, after gain normalization, to the tracking bank. GSM numbers are
// used: 270.833 kbit/s (exactly 96 reference cycles per bit), Gaussian
// filter BT = 0.3, peak deviation 67.7 kHz. The frequency waveform is the
// non-return-to-zero bit stream convolved with a sampled Gaussian kernel of
// sigma = sqrt(ln 2)/(2 pi BT) bit periods, cut at +-1.5 bits and normalized
// to unit sum; the bits come from a 9-bit LFSR (x^9 + x^5 + 1) seeded from
// $urandom.
//
// Checks:
//  * phi_EF stays inside the TDC range during the modulation (two-point
//    modulation cancels the phase error the modulation would otherwise make);
//  * the DCO frequency, measured from the exact times of CKV edges over
//    windows of 16 reference cycles, follows the applied deviation to within
//    6 kHz (half a tracking-bank step), after allowing a latency of 0
//    to 3 cycles, picked as the best fit;
//  * eye opening: at bit centres the measured deviation has the sign of the
//    bit and at least 60 % of the peak deviation whenever the bit and both
//    its neighbours agree.
// The document applies GMSK from a PRBS in its modulation test but gives no
// modulation parameters; the GSM values are this testbench's choice.
`timescale 1ps/1fs
module tb_two_point_gmsk;
  import adpll_pkg::*;

  localparam real F_REF  = 26.0e6;
  localparam real T_REF  = 1.0e12 / F_REF;      // ps
  localparam real F_TGT  = 1.8e9;
  localparam real FCW_R  = F_TGT / F_REF;
  localparam real K_TRUE = 15.0e-12 * F_TGT;
  localparam int  SPB    = 96;                   // reference cycles per bit
  localparam real DEV_HZ = 67.7e3;
  localparam real BT     = 0.3;
  localparam int  HALF   = 3 * SPB / 2;          // kernel half length
  localparam int  NBITS  = 40;
  localparam int  NSAMP  = NBITS * SPB;
  localparam int  WIN    = 16;                   // measurement window (CKR)
  localparam int  NWIN   = NSAMP / WIN;

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
  logic [5:0]              rho_sh = 6'd14;
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial forever #(T_REF / 2.0) fref = ~fref;

  // exact CKV edge times for frequency measurement
  longint  ckv_cnt = 0;
  realtime t_ckv = 0.0;
  always @(posedge ckv) begin
    ckv_cnt++;
    t_ckv = $realtime;
  end

  task automatic wait_ckr(input int n);
    repeat (n) @(posedge ckr);
  endtask

  function automatic real pe2r(input logic signed [PE_W-1:0] v);
    return real'(v) / real'(1 << PE_FW);
  endfunction

  task automatic step(input bit do_restart);
    @(negedge ckr);
    restart = do_restart;
    @(negedge ckr);
    restart = 1'b0;
  endtask

  // GMSK waveform, in Hz, one value per reference cycle
  real kern [2*HALF+1];
  real fdev [NSAMP];
  bit  bits [NBITS];
  real meas [NWIN];

  task automatic build_waveform();
    real sigma, ksum, acc;
    logic [8:0] lfsr;
    sigma = $sqrt($ln(2.0)) / (2.0 * 3.14159265358979 * BT) * real'(SPB);
    ksum = 0.0;
    for (int j = -HALF; j <= HALF; j++) begin
      kern[j + HALF] = $exp(-0.5 * (real'(j) / sigma) ** 2);
      ksum += kern[j + HALF];
    end
    for (int j = 0; j <= 2 * HALF; j++) kern[j] /= ksum;
    lfsr = 9'($urandom_range(511, 1));
    for (int b = 0; b < NBITS; b++) begin
      bits[b] = lfsr[0];
      lfsr = {lfsr[4] ^ lfsr[0], lfsr[8:1]};
    end
    for (int k = 0; k < NSAMP; k++) begin
      acc = 0.0;
      for (int j = -HALF; j <= HALF; j++) begin
        int idx;
        idx = (k - j) / SPB;
        if (k - j >= 0 && idx < NBITS) acc += kern[j + HALF] * (bits[idx] ? 1.0 : -1.0);
      end
      fdev[k] = DEV_HZ * acc;
    end
  endtask

  real     mef, err, best_err, best_rms, rms, want, fw, s;
  int      best_d, ei, n_eye;
  longint  c0;
  realtime t0;

  initial begin
    fcw       = FCW_W'(longint'(FCW_R * real'(64'd1 << FCW_FW) + 0.5));
    g_p       = G_W'(int'(F_REF / 4.0e6 * 256.0 + 0.5));
    g_a       = G_W'(int'(F_REF / 200.0e3 * 256.0 + 0.5));
    g_t       = G_W'(int'(F_REF / 12.0e3 * 256.0 + 0.5));
    kdtc_init = KD_W'(int'(K_TRUE * 65536.0 + 0.5));
    build_waveform();

    #(100.0) rst_n = 1'b0;
    #(5.0 * T_REF);
    rst_n = 1'b1;

    // lock: PVT, acquisition, tracking with type II, integer path off
    wait_ckr(80);
    @(negedge ckr);
    bank = BANK_ACQ; comb_mode = COMB_ADD; alpha_sh = 6'd4;
    step(1'b1);
    wait_ckr(60);
    @(negedge ckr);
    alpha_sh = 6'd6;
    wait_ckr(100);
    @(negedge ckr);
    bank = BANK_TRK; rho_en = 1'b1;
    step(1'b1);
    wait_ckr(150);
    @(negedge ckr);
    rho_res = 1'b0;
    wait_ckr(300);
    @(negedge ckr);
    int_en = 1'b0;
    wait_ckr(300);

    // modulation: one fcw_mod value per CKR, frequency measured per window
    mef = 0.0;
    ei  = 0;
    // window w spans from its first CKR falling edge to the next window's;
    // the last CKV edge before each boundary marks it exactly
    for (int w = 0; w <= NWIN; w++) begin
      for (int i = 0; i < WIN; i++) begin
        @(negedge ckr);
        if (i == 0) begin
          if (w > 0)
            meas[w-1] = real'(ckv_cnt - c0) / ((t_ckv - t0) * 1.0e-12) - F_TGT;
          c0 = ckv_cnt;
          t0 = t_ckv;
          if (w == NWIN) break;
        end
        fcw_mod = FCW_W'(longint'(fdev[w * WIN + i] / F_REF * real'(64'd1 << FCW_FW)));
        if (pe2r(phi_ef) > mef) mef = pe2r(phi_ef);
        if (-pe2r(phi_ef) > mef) mef = -pe2r(phi_ef);
      end
    end
    fcw_mod = '0;

    $display("max |phi_EF| during modulation: %f UI (TDC range %f UI)", mef, 2.5 * K_TRUE);
    check(mef <= 2.5 * K_TRUE + 1e-6, "phi_EF inside the TDC range during modulation");

    // best-fit latency, then the frequency tracking error
    best_rms = 1.0e30;
    best_d   = 0;
    for (int d = 0; d <= 3; d++) begin
      rms = 0.0;
      for (int w = 1; w < NWIN; w++) begin
        s = 0.0;
        for (int i = 0; i < WIN; i++) s += fdev[w * WIN + i - d];
        rms += (meas[w] - s / real'(WIN)) ** 2;
      end
      if (rms < best_rms) begin
        best_rms = rms;
        best_d   = d;
      end
    end
    best_err = 0.0;
    for (int w = 1; w < NWIN; w++) begin
      s = 0.0;
      for (int i = 0; i < WIN; i++) s += fdev[w * WIN + i - best_d];
      want = s / real'(WIN);
      err  = meas[w] - want;
      if (err > best_err) best_err = err;
      if (-err > best_err) best_err = -err;
      check(err < 6.0e3 && err > -6.0e3, "DCO frequency follows the GMSK waveform");
    end
    $display("latency %0d cycles, worst frequency error %f kHz, rms %f kHz",
             best_d, best_err / 1.0e3, $sqrt(best_rms / real'(NWIN - 1)) / 1.0e3);

    // eye opening at bit centres (window centred on the middle of each bit)
    n_eye = 0;
    for (int b = 1; b < NBITS - 1; b++) begin
      if (bits[b] == bits[b-1] && bits[b] == bits[b+1]) begin
        fw = meas[(b * SPB + SPB / 2) / WIN];
        n_eye++;
        check(bits[b] ? (fw > 0.6 * DEV_HZ) : (fw < -0.6 * DEV_HZ), "eye open at bit centre");
      end
    end
    check(n_eye > 0, "bit pattern had runs to test the eye");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: lock plus modulation is about 5000 reference periods
  initial begin
    #(8000.0 * T_REF);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
