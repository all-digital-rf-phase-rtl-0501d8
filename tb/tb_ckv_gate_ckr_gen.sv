// tb_ckv_gate_ckr_gen: unit test of the CKV gating and CKR generation.
//
// CKV runs at 1.8 GHz; FREF_D pulses (19 ns high, 38.46 ns period) start at
// random offsets against CKV. For each pulse the testbench checks:
//  * CKV_G has exactly one rising edge, at the first CKV rising edge after the
//    FREF_D rising edge (same time as that CKV edge);
//  * CKR has exactly one rising edge, 8 to 17 CKV periods after the CKV_G
//    edge, and that edge coincides with a rising CKVD8 edge;
//  * CKVD8 rises every 8 CKV periods.
// Reset holds CKR and CKV_G quiet. Watchdog: 100 us.
`timescale 1ps/1fs
module tb_ckv_gate_ckr_gen;
  import adpll_pkg::*;
  `include "tb_check.svh"

  localparam real TV = 1.0e12 / 1.8e9;

  logic ckv = 1'b0;
  logic fref_d = 1'b0;
  logic rst_n = 1'b1;
  logic ckv_g, ckr, ckvd8;

  ckv_gate_ckr_gen dut (.*);

  initial forever #(TV / 2.0) ckv = ~ckv;

  realtime t_ckv, t_fd, t_g, t_ckr, t_d8, t_d8_prev;
  int n_g, n_ckr, n_d8_bad, n_d8;

  always @(posedge ckv) t_ckv = $realtime;
  always @(posedge ckv_g) begin n_g++; t_g = $realtime; end
  always @(posedge ckr) begin n_ckr++; t_ckr = $realtime; end
  always @(posedge ckvd8) begin
    t_d8_prev = t_d8;
    t_d8 = $realtime;
    n_d8++;
    if (n_d8 > 2 && ((t_d8 - t_d8_prev) - 8.0 * TV > 0.01 || 8.0 * TV - (t_d8 - t_d8_prev) > 0.01))
      n_d8_bad++;
  end

  initial begin
    #100 rst_n = 1'b0;
    #2000;
    check(ckr == 1'b0, "CKR low in reset");
    rst_n = 1'b1;
    #1000;
    for (int k = 0; k < 100; k++) begin
      #(real'($urandom_range(0, 1000)) * 0.7);
      n_g = 0; n_ckr = 0;
      fref_d = 1'b1;
      t_fd = $realtime;
      #19000 fref_d = 1'b0;
      #19460;
      check(n_g == 1, "one CKV_G edge per FREF_D pulse");
      check(t_g > t_fd && t_g - t_fd <= TV + 0.01, "CKV_G is the first CKV edge after FREF_D");
      check(n_ckr == 1, "one CKR edge per FREF_D pulse");
      check(t_ckr - t_g >= 8.0 * TV - 0.01 && t_ckr - t_g <= 17.0 * TV + 0.01,
            "CKR 8..17 CKV periods after CKV_G");
    end
    check(n_d8_bad == 0 && n_d8 > 100, "CKVD8 period is 8 CKV periods");
    finish();
  end

  initial begin
    #100000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
