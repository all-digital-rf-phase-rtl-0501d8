// tb_dco_gain_norm: unit test of the DCO gain normalization and bank
// selection.
//
// Gains f_R/K_DCO for the GSM example (26 MHz reference; 4 MHz, 200 kHz and
// 12 kHz steps) are applied. For random normalized tuning words NTW (in units
// of f_R) it checks, after each CKR edge:
//  * only the selected bank changes; the other two hold their codes;
//  * P and A codes = centre + round(NTW * f_R / K_DCO), clamped to the bank;
//  * T code (integer + 8 fractional bits) = centre + NTW * f_R / K_DCO^T
//    within one fractional LSB; the modulation word is added to NTW on the
//    tracking bank only;
//  * reset puts every bank at its centre.
// Watchdog: 1 ms.
`timescale 1ps/1fs
module tb_dco_gain_norm;
  import adpll_pkg::*;
  `include "tb_check.svh"

  localparam real F_R = 26.0e6;

  logic                    ckr = 1'b0;
  logic                    rst_n = 1'b1;
  bank_e                   bank = BANK_PVT;
  logic signed [LF_W-1:0]  ntw = '0;
  logic signed [FCW_W-1:0] fcw_mod = '0;
  logic [G_W-1:0]          g_p, g_a, g_t;
  dco_tune_t               tune;

  dco_gain_norm dut (.*);

  real gp, ga, gt, w, want, got, m;
  dco_tune_t prev_t;

  task automatic tick();
    #10 ckr = 1'b1;
    #10 ckr = 1'b0;
  endtask

  function automatic real clampr(input real v, input real hi);
    if (v < 0.0) return 0.0;
    if (v > hi) return hi;
    return v;
  endfunction

  initial begin
    g_p = G_W'(int'(F_R / 4.0e6 * 256.0 + 0.5));
    g_a = G_W'(int'(F_R / 200.0e3 * 256.0 + 0.5));
    g_t = G_W'(int'(F_R / 12.0e3 * 256.0 + 0.5));
    gp = real'(g_p) / 256.0; ga = real'(g_a) / 256.0; gt = real'(g_t) / 256.0;
    #50 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    check(tune.p == 8'd128 && tune.a == 8'd128 && tune.t_int == T_IW'(1 << (T_IW - 1))
          && tune.t_frac == 0, "reset: banks at their centres");

    for (int k = 0; k < 600; k++) begin
      bank = bank_e'($urandom_range(0, 2));
      case (bank)
        BANK_PVT: w = (real'($urandom_range(0, 40000)) - 20000.0) / 1.0e6 * 8.0;
        BANK_ACQ: w = (real'($urandom_range(0, 40000)) - 20000.0) / 1.0e6 * 0.6;
        default:  w = (real'($urandom_range(0, 40000)) - 20000.0) / 1.0e6 * 0.04;
      endcase
      ntw = LF_W'(longint'(w * (2.0 ** LF_FW)));
      w = real'(ntw) / (2.0 ** LF_FW);
      m = 0.0;
      fcw_mod = '0;
      if (k % 4 == 0) begin
        fcw_mod = FCW_W'($signed($urandom_range(0, 2000)) - 1000);
        m = real'($signed(fcw_mod)) / (2.0 ** FCW_FW);
      end
      prev_t = tune;
      tick();
      case (bank)
        BANK_PVT: begin
          want = clampr(128.0 + $floor(w * gp + 0.5), 255.0);
          check(real'(tune.p) == want, "P code = centre + round(NTW * f_R/K_P)");
          check(tune.a == prev_t.a && {tune.t_int, tune.t_frac} == {prev_t.t_int, prev_t.t_frac},
                "A and T hold while P is active");
        end
        BANK_ACQ: begin
          want = clampr(128.0 + $floor(w * ga + 0.5), 255.0);
          check(real'(tune.a) == want, "A code = centre + round(NTW * f_R/K_A)");
          check(tune.p == prev_t.p && {tune.t_int, tune.t_frac} == {prev_t.t_int, prev_t.t_frac},
                "P and T hold while A is active");
        end
        default: begin
          want = clampr(real'(1 << (T_IW - 1)) + (w + m) * gt, real'(1 << T_IW) - 1.0 / 256.0);
          got  = real'({tune.t_int, tune.t_frac}) / 256.0;
          check(got - want <= 1.0 / 256.0 && want - got <= 1.0 / 256.0,
                "T code = centre + (NTW + modulation) * f_R/K_T");
          check(tune.p == prev_t.p && tune.a == prev_t.a, "P and A hold while T is active");
        end
      endcase
    end

    // clamping
    bank = BANK_ACQ;
    ntw = LF_W'(longint'(5.0 * (2.0 ** LF_FW)));
    tick();
    check(tune.a == 8'd255, "A code clamps at the top");
    ntw = -LF_W'(longint'(5.0 * (2.0 ** LF_FW)));
    tick();
    check(tune.a == 8'd0, "A code clamps at the bottom");
    finish();
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
