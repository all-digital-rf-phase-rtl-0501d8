// tb_phase_error_combiner: unit test of the integer/fractional phase-error
// combiner.
//
// R_RI and R_VI advance by random amounts with a fixed unknown offset
// between them; an integer error e is then added. Checks:
//  * after reset or restart the offset is captured on the second CKR edge,
//    aligned rises and phi_EI is zero until then;
//  * afterwards phi_EI = e (in CKV periods), including across the counter
//    wrap;
//  * adder mode: phi_E = phi_EI + phi_EF; multiplexer mode: phi_E = phi_EI
//    while the integer path is on and phi_EF when it is off;
//  * int_en low forces phi_EI to zero and clears aligned.
// Outputs are registered, so they are checked after the CKR edge.
// Watchdog: 1 ms.
`timescale 1ps/1fs
module tb_phase_error_combiner;
  import adpll_pkg::*;
  `include "tb_check.svh"

  logic                   ckr = 1'b0;
  logic                   rst_n = 1'b1;
  comb_mode_e             mode = COMB_ADD;
  logic                   int_en = 1'b1;
  logic                   restart = 1'b0;
  logic [PH_IW-1:0]       r_ri = '0, r_vi = '0;
  logic signed [PE_W-1:0] phi_ef = '0;
  logic signed [PE_W-1:0] phi_ei_q, phi_ef_q, phi_e_q;
  logic                   aligned;

  phase_error_combiner dut (.*);

  int e;
  logic [PH_IW-1:0] ofs;
  logic signed [PE_W-1:0] one = PE_W'(1) <<< PE_FW;

  task automatic step(input int err);
    int adv;
    adv = $urandom_range(60, 80);
    r_ri = r_ri + PH_IW'(adv);
    r_vi = r_ri + ofs - PH_IW'(err);
    phi_ef = PE_W'($signed($urandom_range(0, 8000)) - 4000);
    #10 ckr = 1'b1;
    #10 ckr = 1'b0;
  endtask

  initial begin
    ofs = PH_IW'($urandom());
    #50 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    step(5);
    check(!aligned && phi_ei_q == 0, "not aligned right after reset");
    step(5);
    check(aligned && phi_ei_q == 0, "offset captured on the second CKR edge");
    for (int k = 0; k < 200; k++) begin
      e = $signed($urandom_range(0, 40)) - 20 + 5;
      step(e);
      check(phi_ei_q == PE_W'(e - 5) * one, "phi_EI = integer phase error");
      check(phi_e_q == phi_ei_q + phi_ef_q, "adder: phi_E = phi_EI + phi_EF");
      check(phi_ef_q == phi_ef, "phi_EF passed through");
    end
    mode = COMB_MUX;
    for (int k = 0; k < 20; k++) begin
      step(7);
      check(phi_e_q == PE_W'(2) * one, "multiplexer uses phi_EI while integer path on");
    end
    int_en = 1'b0;
    for (int k = 0; k < 20; k++) begin
      step(9);
      check(phi_ei_q == 0 && !aligned, "integer path off: phi_EI zero");
      check(phi_e_q == phi_ef_q, "multiplexer uses phi_EF while integer path off");
    end
    int_en = 1'b1;
    mode = COMB_ADD;
    step(3);
    step(3);
    step(-4);
    check(aligned && phi_ei_q == -PE_W'(7) * one, "re-aligned after the integer path returns");
    restart = 1'b1;
    step(10);
    restart = 1'b0;
    check(!aligned && phi_ei_q == 0, "restart clears alignment");
    step(10);
    step(10);
    check(aligned && phi_ei_q == 0, "restart captures a new offset");
    finish();
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
