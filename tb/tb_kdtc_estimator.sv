// tb_kdtc_estimator: unit test of the DTC gain estimator, open loop.
//
// The testbench stands in for the rest of the loop: for each CKR cycle it
// draws the reference fraction R_RF from a 26 MHz / 1.8 GHz channel
// (FCW fraction 3/13 plus a slow drift) and forms the fractional phase error
// the DTC gain error would cause in a type-II loop,
//   phi_EF = (0.5 - R_RF) * (1 - K_true/K_est) + noise,
// of which only the sign is given to the estimator. Checks:
//  * from 40 % above and 40 % below the true K_DTC = 0.027 the estimate
//    converges within 2 % in 3000 cycles;
//  * with en low the estimate holds; load restores the initial value;
//  * every cycle the output equals a reference model of the estimator
//    equations, IIR[k] = IIR[k-1](1 - 2^-a) + (R_RF - 0.5) sign(phi_EF) 2^-b
//    and K[k] = K[k-1] + mu IIR, kept in 40 fractional bits and clamped to
//    (0, 1), with the register stages of the block diagram: R_RF one
//    register before and one after the -0.5, the sign one register.
// Watchdog: 10 ms.
`timescale 1ps/1fs
module tb_kdtc_estimator;
  import adpll_pkg::*;
  `include "tb_check.svh"

  localparam real K_TRUE = 0.027;

  logic              ckr = 1'b0;
  logic              rst_n = 1'b1;
  logic              en = 1'b0;
  logic              load = 1'b0;
  logic [KD_W-1:0]   k_init;
  logic [KD_W-1:0]   r_rf = '0;
  logic              phi_ef_neg = 1'b0;
  logic [KD_W-1:0]   k_dtc;

  kdtc_estimator dut (.*);

  real f = 0.0, ke, pe, err;
  logic [KD_W-1:0] held;

  // estimator pipeline: the sign of phi_EF for the fraction used one cycle
  // earlier arrives one cycle later, as in the loop
  real f_prev = 0.0;

  // reference model state (40 fractional bits)
  localparam int A = 4, B = 0, MU = 16;
  longint m_rrf = 0, m_diff = 0, m_iir = 0, m_k = 0;
  bit     m_sgn = 1'b0;

  task automatic model_edge();
    longint t, kn;
    if (!rst_n) return;
    if (load) begin
      m_iir = 0;
      m_k   = longint'(k_init) * (64'sd1 <<< 24);
    end else if (en) begin
      kn = m_k + (m_iir >>> MU);
      if (kn <= 0) kn = 64'sd1 <<< 24;
      else if (kn >= (64'sd1 <<< 40)) kn = (64'sd1 <<< 40) - (64'sd1 <<< 24);
      t = (m_diff * (64'sd1 <<< 24)) >>> B;
      if (m_sgn) t = -t;
      m_iir  = m_iir - (m_iir >>> A) + t;
      m_k    = kn;
      m_diff = m_rrf - 32768;
      m_rrf  = longint'(r_rf);
      m_sgn  = phi_ef_neg;
    end
  endtask

  task automatic cyc();
    ke = real'(k_dtc) / 65536.0;
    pe = (0.5 - f_prev) * (1.0 - K_TRUE / ke) + (real'($urandom_range(0, 2000)) - 1000.0) * 1.0e-6;
    phi_ef_neg = pe < 0.0;
    f_prev = f;
    f = f + 3.0 / 13.0 + 1.0e-4;
    f = f - $floor(f);
    r_rf = KD_W'(longint'(f * 65536.0));
    model_edge();
    #10 ckr = 1'b1;
    #1 check(k_dtc == KD_W'(m_k >>> 24), "output matches the reference model");
    #9 ckr = 1'b0;
  endtask

  task automatic run(input real start);
    k_init = KD_W'(int'(start * 65536.0));
    load = 1'b1; cyc(); load = 1'b0;
    check(k_dtc == k_init, "load sets the initial estimate");
    en = 1'b1;
    repeat (3000) cyc();
    err = (real'(k_dtc) / 65536.0 - K_TRUE) / K_TRUE;
    $display("start %f -> estimate %f (true %f)", start, real'(k_dtc) / 65536.0, K_TRUE);
    check(err < 0.02 && err > -0.02, "estimate converges within 2 %");
    en = 1'b0;
  endtask

  initial begin
    k_init = KD_W'(int'(1.4 * K_TRUE * 65536.0));
    #50 rst_n = 1'b0;
    m_rrf = 0; m_diff = 0; m_iir = 0; m_sgn = 1'b0;
    m_k = longint'(k_init) * (64'sd1 <<< 24);
    #50 rst_n = 1'b1;
    check(k_dtc == k_init, "reset loads the initial estimate");
    run(1.4 * K_TRUE);
    run(0.6 * K_TRUE);
    held = k_dtc;
    k_init = KD_W'(int'(0.03 * 65536.0));
    repeat (200) cyc();
    check(k_dtc == held, "estimate holds with en low");
    finish();
  end

  initial begin
    #10000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
