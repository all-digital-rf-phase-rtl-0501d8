// tb_ref_phase_acc: unit test of the reference phase accumulator.
//
// Random FCW and modulation words are applied for 300 CKR cycles and the
// outputs are compared after each rising edge with a model that keeps the
// full phase in a 64-bit integer. Also checks the reset value and that the
// fraction output is the top of the fractional phase. Watchdog: 1 ms.
`timescale 1ps/1fs
module tb_ref_phase_acc;
  import adpll_pkg::*;
  `include "tb_check.svh"

  localparam int unsigned RW = PH_IW + FCW_FW;

  logic                    ckr = 1'b0;
  logic                    rst_n = 1'b1;
  logic [FCW_W-1:0]        fcw = '0;
  logic signed [FCW_W-1:0] fcw_mod = '0;
  logic [PH_IW-1:0]        r_ri;
  logic [KD_W-1:0]         r_rf;

  ref_phase_acc dut (.*);

  longint unsigned model = 0;
  int wraps = 0;
  logic [PH_IW-1:0] prev_ri = '0;

  initial begin
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    check(r_ri == 0 && r_rf == 0, "reset clears the phase");
    for (int n = 0; n < 300; n++) begin
      fcw = FCW_W'({$urandom(), $urandom()});
      fcw = {8'd69 + 8'($urandom_range(0, 3)), fcw[FCW_FW-1:0]};
      fcw_mod = (n % 3 == 0) ? FCW_W'($signed(24'($urandom()))) : '0;
      #10 ckr = 1'b1;
      model = (model + 64'(fcw) + 64'($signed(fcw_mod))) & ((64'd1 << RW) - 1);
      #10 ckr = 1'b0;
      if (r_ri < prev_ri) wraps++;
      prev_ri = r_ri;
      check(r_ri == PH_IW'(model >> FCW_FW), "integer phase");
      check(r_rf == KD_W'(model >> (FCW_FW - KD_W)), "fractional phase MSBs");
    end
    check(wraps >= 1, "integer phase wraps modulo 2**PH_IW");
    finish();
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
