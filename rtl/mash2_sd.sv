// mash2_sd: second-order MASH sigma-delta dither of the DCO tracking bank.
//
// Two cascaded first-order accumulators of T_FW bits (MASH 1-1). The output
// is the integer tracking code plus c1 + c2 - c2[k-1], which lies in -1..+2
// and averages the T_FW-bit fraction, so the time-averaged frequency
// resolution is the tracking step / 2**T_FW. The structure, the 8 fractional
// bits and the clock (CKV/8) follow the document; saturating the result to
// the bank range is this design's choice.
//
// Timing: one update per rising edge of CKVD8; output registered.
`timescale 1ps/1fs
module mash2_sd
  import adpll_pkg::*;
(
  input  logic             clk,      // CKVD8
  input  logic             rst_n,
  input  logic [T_IW-1:0]  t_int,
  input  logic [T_FW-1:0]  t_frac,
  output logic [T_IW-1:0]  t_out
);
  logic [T_FW-1:0] acc1_q, acc2_q;
  logic [T_FW:0]   s1, s2;
  logic            c2_q;
  logic signed [T_IW+2:0] y;

  always_comb begin
    s1 = {1'b0, acc1_q} + {1'b0, t_frac};
    s2 = {1'b0, acc2_q} + {1'b0, s1[T_FW-1:0]};
    y  = $signed({3'b000, t_int}) + $signed({{(T_IW+2){1'b0}}, s1[T_FW]})
       + $signed({{(T_IW+2){1'b0}}, s2[T_FW]}) - $signed({{(T_IW+2){1'b0}}, c2_q});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1_q <= '0;
      acc2_q <= '0;
      c2_q   <= 1'b0;
      t_out  <= '0;
    end else begin
      acc1_q <= s1[T_FW-1:0];
      acc2_q <= s2[T_FW-1:0];
      c2_q   <= s2[T_FW];
      if (y < 0)                              t_out <= '0;
      else if (y > $signed((T_IW+3)'({T_IW{1'b1}}))) t_out <= '1;
      else                                    t_out <= T_IW'(y);
    end
  end
endmodule
