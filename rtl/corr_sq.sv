// corr_sq: correlation amplitude square unit, |a + jb|^2 = a*a + b*b.
//
// When cnt_eni is high the IFFT result (ifft_di_r, ifft_di_i) is latched; in the
// next clock the two squares (two 16x16 multipliers) are added and registered as
// the 32-bit unsigned ram2_max_doa_dub, flagged by mult_abs_web. Latency 2 clocks,
// one sample per clock. The structure follows the document; the latency is this
// design's choice.
module corr_sq (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cnt_eni,
  input  logic signed [15:0] ifft_di_r,
  input  logic signed [15:0] ifft_di_i,
  output logic [31:0]        ram2_max_doa_dub,
  output logic               mult_abs_web
);
  logic signed [15:0] ra, rb;
  logic               v1;
  logic signed [31:0] sa, sb;

  assign sa = ra * ra;
  assign sb = rb * rb;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ra <= '0; rb <= '0; v1 <= 1'b0;
      ram2_max_doa_dub <= '0; mult_abs_web <= 1'b0;
    end else begin
      v1           <= cnt_eni;
      mult_abs_web <= v1;
      if (cnt_eni) begin ra <= ifft_di_r; rb <= ifft_di_i; end
      if (v1) ram2_max_doa_dub <= 32'(sa) + 32'(sb);
    end
  end
endmodule
