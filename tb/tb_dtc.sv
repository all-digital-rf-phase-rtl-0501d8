// tb_dtc: unit test of the DTC behavioural model.
//
// Drives 200 reference pulses with random codes and measures, with the
// simulator clock, the delay from each FREF edge to the matching FREF_D
// edge: rising delay must be 20 ps + code*15 ps, falling delay 20 ps. A code
// change right after a rising edge must not disturb that edge.
// Watchdog: 100 us.
`timescale 1ps/1fs
module tb_dtc;
  import adpll_pkg::*;
  `include "tb_check.svh"

  logic             fref = 1'b0;
  logic [DTC_W-1:0] code = '0;
  logic             fref_d;

  dtc dut (.*);

  realtime t0, t1;
  int      c;

  initial begin
    #1000;
    for (int n = 0; n < 200; n++) begin
      c = $urandom_range(0, 2 ** DTC_W - 1);
      code = DTC_W'(c);
      #100 fref = 1'b1;
      t0 = $realtime;
      #1 code = DTC_W'($urandom());     // change in flight
      @(posedge fref_d);
      t1 = $realtime;
      check((t1 - t0) - (20.0 + 15.0 * c) < 0.01 && (20.0 + 15.0 * c) - (t1 - t0) < 0.01,
            "rising delay = intrinsic + code * step");
      #(3000 - (t1 - t0)) fref = 1'b0;
      t0 = $realtime;
      @(negedge fref_d);
      check($realtime - t0 > 19.99 && $realtime - t0 < 20.01, "falling delay = intrinsic");
    end
    finish();
  end

  initial begin
    #100000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
