// cconj_mult: complex conjugate multiplier with three real multipliers.
//
// Computes p = a * conj(d) for a = ar + j ai (signal spectrum from RAM_MULT) and
// d = dr + j di (local reference spectrum from the FFT core):
//   A0 = (ar + ai) * dr,  A1 = (dr - di) * ai,  A2 = (ai - ar) * di
//   Re p = A0 - A1 = ar dr + ai di,   Im p = A1 + A2 = ai dr - ar di
// Three multiplications instead of four, as the document proposes.
//
// Pipeline (3 clocks, one sample per clock): stage 1 registers reg_arai,
// reg_dr_di, reg_ai_ar, reg_dr, reg_di, reg_ai when mult_prod_a_ce is high;
// stage 2 registers the three products; stage 3 registers the sum and the
// difference, shifted right by PROD_SHIFT and saturated to 16 bits
// (ram2_doa_dubr, ram2_doa_dubi), flagged by mult_prod_a_web. prod_pre is the
// stage-2 valid, one clock ahead of mult_prod_a_web, used to start the IFFT load.
// The equations and register names follow the document; the pipeline depth,
// PROD_SHIFT and saturation are this design's choice.
module cconj_mult
  import pacq_pkg::*;
#(
  parameter int unsigned PROD_SHIFT = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mult_prod_a_ce,
  input  cplx16_t a,
  input  cplx16_t d,
  output logic    prod_pre,
  output logic    mult_prod_a_web,
  output logic signed [15:0] ram2_doa_dubr,
  output logic signed [15:0] ram2_doa_dubi
);
  logic signed [16:0] reg_arai, reg_dr_di, reg_ai_ar;
  logic signed [15:0] reg_dr, reg_di, reg_ai;
  logic signed [33:0] a0, a1, a2;
  logic               v1, v2;
  logic signed [39:0] re_w, im_w;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; mult_prod_a_web <= 1'b0;
      reg_arai <= '0; reg_dr_di <= '0; reg_ai_ar <= '0;
      reg_dr <= '0; reg_di <= '0; reg_ai <= '0;
      a0 <= '0; a1 <= '0; a2 <= '0;
      ram2_doa_dubr <= '0; ram2_doa_dubi <= '0;
    end else begin
      v1 <= mult_prod_a_ce;
      v2 <= v1;
      mult_prod_a_web <= v2;
      if (mult_prod_a_ce) begin
        reg_arai  <= 17'(a.re) + 17'(a.im);
        reg_dr_di <= 17'(d.re) - 17'(d.im);
        reg_ai_ar <= 17'(a.im) - 17'(a.re);
        reg_dr    <= d.re;
        reg_di    <= d.im;
        reg_ai    <= a.im;
      end
      if (v1) begin
        a0 <= reg_arai  * 34'(reg_dr);
        a1 <= reg_dr_di * 34'(reg_ai);
        a2 <= reg_ai_ar * 34'(reg_di);
      end
      if (v2) begin
        ram2_doa_dubr <= sat16(re_w);
        ram2_doa_dubi <= sat16(im_w);
      end
    end
  end

  assign re_w     = (40'(a0) - 40'(a1)) >>> PROD_SHIFT;
  assign im_w     = (40'(a1) + 40'(a2)) >>> PROD_SHIFT;
  assign prod_pre = v2;
endmodule
