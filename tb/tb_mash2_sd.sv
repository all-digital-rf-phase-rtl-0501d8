// tb_mash2_sd: unit test of the second-order MASH sigma-delta dither of the
// tracking bank.
//
// For random integer and fractional inputs, the output summed over 256 clock
// cycles (the first stage's period for 8 fractional bits) must equal
// 256*t_int + t_frac within one LSB (the second stage adds a first
// difference, whose sum telescopes), and the output must stay within t_int-1 .. t_int+2. With t_frac = 0 the
// output equals t_int. Near the top of the range the output saturates
// instead of wrapping. Watchdog: 1 ms.
`timescale 1ps/1fs
module tb_mash2_sd;
  import adpll_pkg::*;
  `include "tb_check.svh"

  logic            clk = 1'b0;
  logic            rst_n = 1'b1;
  logic [T_IW-1:0] t_int = '0;
  logic [T_FW-1:0] t_frac = '0;
  logic [T_IW-1:0] t_out;

  mash2_sd dut (.*);

  int sum, lo, hi, nchg;
  logic [T_IW-1:0] prev;

  task automatic tick();
    #10 clk = 1'b1;
    #10 clk = 1'b0;
  endtask

  initial begin
    #50 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      t_int = T_IW'($urandom_range(4, (1 << T_IW) - 5));
      t_frac = (k == 0) ? '0 : T_FW'($urandom());
      repeat (8) tick();        // pipeline
      sum = 0; lo = 1 << 20; hi = -1; nchg = 0;
      prev = t_out;
      for (int c = 0; c < 256; c++) begin
        tick();
        sum += int'(t_out);
        if (int'(t_out) < lo) lo = int'(t_out);
        if (int'(t_out) > hi) hi = int'(t_out);
        if (t_out != prev) nchg++;
        prev = t_out;
      end
      // the second stage's contribution telescopes to at most one LSB
      check(sum - 256 * int'(t_int) - int'(t_frac) <= 1 && 256 * int'(t_int) + int'(t_frac) - sum <= 1,
            "average = t_int + t_frac/256");
      check(lo >= int'(t_int) - 1 && hi <= int'(t_int) + 2, "output within t_int-1..t_int+2");
      if (t_frac == 0) check(nchg == 0, "no dither for a zero fraction");
    end
    t_int = '1;
    t_frac = 8'd200;
    repeat (300) tick();
    lo = 1 << 20;
    repeat (256) begin
      tick();
      if (int'(t_out) < lo) lo = int'(t_out);
    end
    check(lo >= (1 << T_IW) - 2, "saturates at the top instead of wrapping");
    finish();
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog expired");
    failures++;
    finish();
  end
endmodule
