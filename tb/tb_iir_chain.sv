// tb_iir_chain: unit test of the cascade of single-pole IIR stages.
//
// Checks, against a real-valued model y[k] = (1-lambda) y[k-1] + lambda x[k]
// per stage (lambda = 2**-lam_sh):
//  * all stages bypassed: y = x;
//  * one stage enabled (each stage in turn, lambda 2^-2..2^-4): step response
//    follows the model within 2**-30 of full scale relative and settles to
//    the input;
//  * four stages: random input, output matches the cascaded model;
//  * restart clears the states.
// Watchdog: 1 ms.
`timescale 1ps/1fs
module tb_iir_chain;
  import adpll_pkg::*;
  `include "tb_check.svh"

  localparam int unsigned NSTAGE = 4;

  logic                         ckr = 1'b0;
  logic                         rst_n = 1'b1;
  logic                         restart = 1'b0;
  logic [NSTAGE-1:0]            en = '0;
  logic [NSTAGE-1:0][5:0]       lam_sh = '0;
  logic signed [LF_W-1:0]       x = '0;
  logic signed [LF_W-1:0]       y;

  iir_chain dut (.*);

  real m[NSTAGE];
  real xin, s, yr, tol;

  function automatic real lf2r(input logic signed [LF_W-1:0] v);
    return real'(v) / (2.0 ** LF_FW);
  endfunction

  // model output for the present input (before the clock edge)
  function automatic real model_y();
    real v;
    v = xin;
    for (int i = 0; i < NSTAGE; i++)
      if (en[i]) v = m[i] + (v - m[i]) / (2.0 ** lam_sh[i]);
    return v;
  endfunction

  task automatic tick();
    real v;
    v = xin;
    for (int i = 0; i < NSTAGE; i++) begin
      if (en[i]) begin
        m[i] = m[i] + (v - m[i]) / (2.0 ** lam_sh[i]);
        v = m[i];
      end else begin
        m[i] = v;
      end
    end
    #10 ckr = 1'b1;
    #10 ckr = 1'b0;
  endtask

  task automatic set_x(input real v);
    xin = v;
    x = LF_W'(longint'(v * (2.0 ** LF_FW)));
    xin = lf2r(x);
  endtask

  initial begin
    #50 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    foreach (m[i]) m[i] = 0.0;
    tol = 64.0 / (2.0 ** LF_FW);

    // bypass
    for (int k = 0; k < 20; k++) begin
      set_x(real'($urandom_range(0, 2000)) / 100.0 - 10.0);
      #1 check(y == x, "bypassed chain passes x");
      tick();
    end

    // one stage at a time
    for (int st = 0; st < NSTAGE; st++) begin
      restart = 1'b1; tick(); restart = 1'b0;
      foreach (m[i]) m[i] = 0.0;
      en = '0; en[st] = 1'b1;
      lam_sh = '0; lam_sh[st] = 6'(2 + st % 3);
      set_x(1.5);
      for (int k = 0; k < 120; k++) begin
        #1 yr = model_y();
        check(lf2r(y) - yr < tol && yr - lf2r(y) < tol, "single stage follows the model");
        tick();
      end
      #1 check(lf2r(y) - 1.5 < 1e-3 && 1.5 - lf2r(y) < 1e-3, "single stage settles to the input");
    end

    // four stages, random input
    restart = 1'b1; tick(); restart = 1'b0;
    foreach (m[i]) m[i] = 0.0;
    en = '1;
    lam_sh = {6'd3, 6'd3, 6'd2, 6'd2};
    for (int k = 0; k < 300; k++) begin
      set_x(real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      #1 yr = model_y();
      check(lf2r(y) - yr < tol && yr - lf2r(y) < tol, "4-stage cascade follows the model");
      tick();
    end

    restart = 1'b1; tick(); restart = 1'b0;
    set_x(0.0);
    #1 check(y == 0, "restart clears all stages");
    finish();
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
