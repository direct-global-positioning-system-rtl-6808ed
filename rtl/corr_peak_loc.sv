// corr_peak_loc: correlation peak location processor.
//
// loc_cnt counts the valid square values of a loop from 0 (cleared by clr);
// locq is loaded with loc_cnt whenever the peak processor's a_gt_b says the
// current value is a new maximum, so after the 512 values of a loop locq holds
// the index of the (first) largest one. Follows the document.
module corr_peak_loc #(
  parameter int unsigned LW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic          a_gt_b,
  output logic [LW-1:0] locq
);
  logic [LW-1:0] loc_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      loc_cnt <= '0;
      locq    <= '0;
    end else begin
      if (en)     loc_cnt <= loc_cnt + 1'b1;
      if (a_gt_b) locq    <= loc_cnt;
    end
  end
endmodule
