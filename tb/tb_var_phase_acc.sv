// tb_var_phase_acc: unit test of the variable-phase (CKV edge) counter.
//
// CKV runs at 1.8 GHz. CKV_G is made like the gating circuit does: a single
// pulse that rises with a chosen CKV rising edge. After each pulse R_VI must
// equal the number of CKV rising edges counted before that edge (mod
// 2**PH_IW). With en low both the counter and the sampler hold. Watchdog:
// 1 ms.
`timescale 1ps/1fs
module tb_var_phase_acc;
  import adpll_pkg::*;
  `include "tb_check.svh"

  localparam real TV = 1.0e12 / 1.8e9;

  logic ckv = 1'b0;
  logic gate = 1'b0;
  logic rst_n = 1'b1;
  logic en = 1'b1;
  logic ckv_g;
  logic [PH_IW-1:0] r_vi;

  assign ckv_g = ckv & gate;

  var_phase_acc dut (.*);

  initial forever #(TV / 2.0) ckv = ~ckv;

  int edges = 0;          // CKV rising edges while enabled, model
  always @(posedge ckv) if (rst_n && en) edges++;

  int  want;
  logic [PH_IW-1:0] held;

  initial begin
    #100 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      repeat ($urandom_range(5, 90)) @(negedge ckv);
      want = edges;         // edges before the next rising edge
      gate = 1'b1;
      @(negedge ckv) gate = 1'b0;
      check(r_vi == PH_IW'(want), "R_VI = CKV edges before the sampling edge");
    end
    // hold
    @(negedge ckv) en = 1'b0;
    held = r_vi;
    repeat (20) @(negedge ckv);
    gate = 1'b1;
    @(negedge ckv) gate = 1'b0;
    check(r_vi == held, "sampler holds with en low");
    en = 1'b1;
    want = edges;
    gate = 1'b1;
    @(negedge ckv) gate = 1'b0;
    check(r_vi == PH_IW'(want), "counter held with en low");
    check(edges > 4096, "count wrapped modulo 2**PH_IW");
    finish();
  end

  initial begin
    #1000000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
