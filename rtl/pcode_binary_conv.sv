// pcode_binary_conv: P-code chip to antipodal sample.
//
// Converts the 0/1 chip p of the P-code generator into the signed value used by
// the averaging unit: 0 becomes +1 and 1 becomes -1 (modulo-2 addition of chips
// then corresponds to multiplication of samples). The output ram1_doa is a 2-bit
// signed register, valid one clock after en, flagged by valid. The document gives
// only the function; the mapping, register and latency are this design's choice.
module pcode_binary_conv (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              p,
  output logic signed [1:0] ram1_doa,
  output logic              valid
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ram1_doa <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= en;
      if (en) ram1_doa <= p ? -2'sd1 : 2'sd1;
    end
  end
endmodule
