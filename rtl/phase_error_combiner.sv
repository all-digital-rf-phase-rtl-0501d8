// phase_error_combiner: integer phase error and phase error combiner.
//
// The integer phase error is phi_EI = R_RI - R_VI + offset, taken modulo
// 2**PH_IW and read as a signed number. Because the reference phase and the
// CKV edge count start from unrelated values, the offset is captured once,
// two CKR cycles after the integer path is enabled or on a restart request, so
// that phi_EI is zero at that moment (this alignment is this design's choice;
// the document only requires phi_EI to stay zero in lock). The total phase
// error is
//   COMB_ADD: phi_E = phi_EI + phi_EF (binary adder, as drawn in the document)
//   COMB_MUX: phi_E = phi_EI while the integer path is enabled, else phi_EF
// and with the integer path disabled, or during a restart, phi_EI is forced
// to zero. phi_EF already
// contains the phase-prediction residue when that option is used.
//
// Timing: phi_E and phi_EF are registered on the CKR rising edge that follows
// the TDC measurement; this is the only pipeline stage before the loop filter.
`timescale 1ps/1fs
module phase_error_combiner
  import adpll_pkg::*;
(
  input  logic                    ckr,
  input  logic                    rst_n,
  input  comb_mode_e              mode,
  input  logic                    int_en,    // integer path enabled
  input  logic                    restart,   // re-align the integer phase
  input  logic [PH_IW-1:0]        r_ri,
  input  logic [PH_IW-1:0]        r_vi,
  input  logic signed [PE_W-1:0]  phi_ef,
  output logic signed [PE_W-1:0]  phi_ei_q,
  output logic signed [PE_W-1:0]  phi_ef_q,
  output logic signed [PE_W-1:0]  phi_e_q,
  output logic                    aligned    // offset captured, phi_EI valid
);
  logic [PH_IW-1:0]        offset_q;
  logic [1:0]              wait_q;
  logic [PH_IW-1:0]        diff;
  logic signed [PE_W-1:0]  phi_ei;
  logic signed [PE_W-1:0]  phi_e;
  logic                    capture;

  assign capture = int_en && (wait_q == 2'd1);

  always_comb begin
    diff = r_ri - r_vi + offset_q;
    if (!int_en || !aligned || capture || restart)
      phi_ei = '0;
    else
      phi_ei = {{(PE_W-PE_FW-PH_IW){diff[PH_IW-1]}}, diff, {PE_FW{1'b0}}};
    if (mode == COMB_MUX) phi_e = int_en ? phi_ei : phi_ef;
    else                  phi_e = phi_ei + phi_ef;
  end

  always_ff @(posedge ckr or negedge rst_n) begin
    if (!rst_n) begin
      offset_q <= '0;
      wait_q   <= 2'd2;
      aligned  <= 1'b0;
      phi_ei_q <= '0;
      phi_ef_q <= '0;
      phi_e_q  <= '0;
    end else begin
      if (!int_en || restart) begin
        wait_q  <= 2'd2;
        aligned <= 1'b0;
      end else if (wait_q != 2'd0) begin
        wait_q <= wait_q - 2'd1;
        if (capture) begin
          offset_q <= r_vi - r_ri;
          aligned  <= 1'b1;
        end
      end
      phi_ei_q <= phi_ei;
      phi_ef_q <= phi_ef;
      phi_e_q  <= phi_e;
    end
  end
endmodule
