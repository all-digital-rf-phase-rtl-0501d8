// tb_pi_ctrl: unit test of the proportional-integral controller.
//
// Checks, with real-valued expectations:
//  * type-I: tune = x * 2**-alpha_sh for random x (restart after each gain
//    change so no gear offset is kept);
//  * gear shift: changing alpha_sh with x held leaves tune unchanged (the
//    step is absorbed) and gear_event pulses for one cycle; afterwards a
//    change of x moves tune by the new gain;
//  * type-II with the residue method: x held at its value when rho_en rose
//    gives no integration; x raised by d ramps tune by d*rho per cycle;
//  * without the residue (rho_res low) a constant x is integrated;
//  * restart clears the integral and the gear offset.
// Watchdog: 1 ms.
`timescale 1ps/1fs
module tb_pi_ctrl;
  import adpll_pkg::*;
  `include "tb_check.svh"

  logic                   ckr = 1'b0;
  logic                   rst_n = 1'b1;
  logic                   restart = 1'b0;
  logic [5:0]             alpha_sh = 6'd3;
  logic [5:0]             rho_sh = 6'd10;
  logic                   rho_en = 1'b0;
  logic                   rho_res = 1'b1;
  logic signed [LF_W-1:0] x = '0;
  logic signed [LF_W-1:0] tune;
  logic                   gear_event;

  pi_ctrl dut (.*);

  real tol, t0, t1, xr;
  int  n_gear;

  function automatic real lf2r(input logic signed [LF_W-1:0] v);
    return real'(v) / (2.0 ** LF_FW);
  endfunction

  task automatic set_x(input real v);
    x = LF_W'(longint'(v * (2.0 ** LF_FW)));
  endtask

  task automatic tick();
    #10 ckr = 1'b1;
    #10 ckr = 1'b0;
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < tol) && (b - a < tol);
  endfunction

  always @(posedge ckr) if (gear_event) n_gear++;

  initial begin
    tol = 1.0e-9;
    #50 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    tick();

    // type-I proportional gain
    for (int k = 0; k < 100; k++) begin
      alpha_sh = 6'($urandom_range(2, 9));
      restart = 1'b1; tick(); restart = 1'b0;
      set_x(real'($urandom_range(0, 200000)) / 1000.0 - 100.0);
      #1 check(near(lf2r(tune), lf2r(x) / (2.0 ** alpha_sh)), "tune = x * alpha");
      tick();
    end

    // gear shift
    restart = 1'b1; alpha_sh = 6'd3; tick(); restart = 1'b0; tick();
    set_x(2.0);
    #1 t0 = lf2r(tune);
    n_gear = 0;
    alpha_sh = 6'd5;
    #1 check(gear_event, "gear event flagged when alpha changes");
    tick();
    #1 check(near(lf2r(tune), t0), "tune continuous across the gear shift");
    check(!gear_event, "gear event lasts one cycle");
    set_x(3.0);
    #1 check(near(lf2r(tune) - t0, 1.0 / 32.0), "new gain after the gear shift");
    check(n_gear == 1, "one gear event counted");

    // type-II with residue
    restart = 1'b1; alpha_sh = 6'd4; tick(); restart = 1'b0; tick();
    set_x(0.75);
    rho_en = 1'b1; rho_res = 1'b1;
    tick();
    #1 t0 = lf2r(tune);
    repeat (20) tick();
    #1 check(near(lf2r(tune), t0), "residue method: no integration of the sampled error");
    set_x(1.75);
    #1 t0 = lf2r(tune);
    repeat (16) tick();
    #1 t1 = lf2r(tune);
    check(near(t1 - t0, 16.0 * 1.0 / 1024.0), "integral ramps by (x - x0) * rho");

    // plain type-II
    rho_res = 1'b0;
    #1 t0 = lf2r(tune);
    repeat (8) tick();
    #1 check(near(lf2r(tune) - t0, 8.0 * 1.75 / 1024.0), "plain integration of x");

    // restart
    rho_en = 1'b0;
    restart = 1'b1; tick(); restart = 1'b0;
    #1 check(near(lf2r(tune), 1.75 / 16.0), "restart clears integral and gear offset");
    finish();
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
