// tb_dlf: unit test of the digital loop filter (combiner, IIR cascade, PI).
//
// Integer and fractional phase errors are applied through the R_RI/R_VI and
// phi_EF inputs. Checks:
//  * phi_E is aligned and registered as in the combiner, and with the IIR
//    bypassed and type-I gain, NTW = phi_E * alpha on the same cycle;
//  * with one IIR stage (lambda 2^-2) and a constant phase error, NTW rises
//    as 1 - (3/4)^n towards phi_E * alpha;
//  * with type-II on (no residue), NTW keeps rising while phi_E is constant;
//  * a gear shift keeps NTW continuous and is flagged.
// Watchdog: 1 ms.
`timescale 1ps/1fs
module tb_dlf;
  import adpll_pkg::*;
  `include "tb_check.svh"

  localparam int unsigned NSTAGE = 4;

  logic                     ckr = 1'b0;
  logic                     rst_n = 1'b1;
  logic                     restart = 1'b0;
  comb_mode_e               comb_mode = COMB_ADD;
  logic                     int_en = 1'b1;
  logic [PH_IW-1:0]         r_ri = '0, r_vi = 12'd100;
  logic signed [PE_W-1:0]   phi_ef = '0;
  logic [NSTAGE-1:0]        iir_en = '0;
  logic [NSTAGE-1:0][5:0]   lam_sh = {4{6'd2}};
  logic [5:0]               alpha_sh = 6'd4;
  logic [5:0]               rho_sh = 6'd8;
  logic                     rho_en = 1'b0;
  logic                     rho_res = 1'b0;
  logic signed [PE_W-1:0]   phi_e, phi_ei, phi_ef_q;
  logic                     aligned, gear_event;
  logic signed [LF_W-1:0]   ntw;

  dlf dut (.*);

  real pe, w0, w1, tol;

  function automatic real lf2r(input logic signed [LF_W-1:0] v);
    return real'(v) / (2.0 ** LF_FW);
  endfunction
  function automatic real pe2r(input logic signed [PE_W-1:0] v);
    return real'(v) / (2.0 ** PE_FW);
  endfunction
  function automatic bit near(input real a, input real b);
    return (a - b < tol) && (b - a < tol);
  endfunction

  // one reference cycle: both phases advance by 69, error e_int + e_frac
  task automatic cyc(input int e_int, input real e_frac);
    r_ri = r_ri + 12'd69;
    r_vi = r_ri + 12'd100 - 12'(e_int);
    phi_ef = PE_W'(longint'(e_frac * (2.0 ** PE_FW)));
    #10 ckr = 1'b1;
    #10 ckr = 1'b0;
  endtask

  initial begin
    tol = 1.0e-6;
    #50 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    cyc(0, 0.0); cyc(0, 0.0);
    check(aligned, "integer phase aligned");

    // type-I, IIR bypassed
    for (int k = 0; k < 100; k++) begin
      cyc($urandom_range(0, 6) - 3, (real'($urandom_range(0, 100)) - 50.0) / 1000.0);
      #1 pe = pe2r(phi_ei) + pe2r(phi_ef_q);
      check(near(pe2r(phi_e), pe), "phi_E = phi_EI + phi_EF");
      check(near(lf2r(ntw), pe / 16.0), "NTW = phi_E * alpha");
    end

    // one IIR stage
    restart = 1'b1; cyc(0, 0.0); restart = 1'b0;
    cyc(0, 0.0); cyc(0, 0.0);
    iir_en = 4'b0001;
    for (int k = 1; k <= 30; k++) begin
      cyc(1, 0.0);
      #1 check(near(lf2r(ntw), (1.0 - 0.75 ** k) / 16.0), "IIR step response");
    end

    // type-II
    iir_en = '0;
    rho_en = 1'b1;
    cyc(1, 0.0);
    #1 w0 = lf2r(ntw);
    repeat (10) cyc(1, 0.0);
    #1 w1 = lf2r(ntw);
    check(near(w1 - w0, 10.0 / 256.0), "type-II integrates the phase error");

    // gear shift
    cyc(1, 0.0);
    #1 w0 = lf2r(ntw);
    alpha_sh = 6'd6;
    #1 check(gear_event, "gear shift flagged");
    rho_en = 1'b0;
    cyc(1, 0.0);
    #1 check(near(lf2r(ntw), w0), "NTW continuous across the gear shift");
    finish();
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
