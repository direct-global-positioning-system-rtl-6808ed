// corr_peak: correlation peak processor ("bubble up" maximum).
//
// CMPQ holds the largest square value seen since the last clr. Each valid input
// ram2_max_doa_dub is compared with CMPQ by a 32-bit unsigned comparator
// (a_gt_b = input > CMPQ, strict) and a multiplexer loads the larger value at
// the next clock. clr (start of a loop) sets CMPQ to zero. a_gt_b is qualified by
// en so that the location processor can use it as its load enable. Follows the
// document; the clear pulse is this design's choice.
module corr_peak (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [31:0] ram2_max_doa_dub,
  output logic [31:0] cmpq,
  output logic        a_gt_b
);
  assign a_gt_b = en && (ram2_max_doa_dub > cmpq);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) cmpq <= '0;
    else               cmpq <= a_gt_b ? ram2_max_doa_dub : cmpq;
  end
endmodule
