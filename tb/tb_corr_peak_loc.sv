// tb_corr_peak_loc: drives the location processor together with a reference
// running maximum: after each loop of 512 values locq must be the index of the
// first largest value.
module tb_corr_peak_loc;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, a_gt_b = 0;
  logic [8:0] locq;
  int checks = 0, failures = 0;
  corr_peak_loc dut (.*);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 8; l++) begin
      int mx, at;
      @(negedge clk) clr = 1; @(negedge clk) clr = 0;
      mx = -1; at = 0;
      for (int k = 0; k < 512; k++) begin
        int v;
        while ($urandom_range(0, 3) == 0) begin en = 0; a_gt_b = 0; @(negedge clk); end
        v = $urandom_range(0, 5000);
        if (l == 3 && k == 0) v = 6000;      // maximum at location 0
        if (l == 4 && k == 511) v = 6000;    // maximum at the last location
        en = 1; a_gt_b = (v > mx);
        if (v > mx) begin mx = v; at = k; end
        @(negedge clk);
      end
      en = 0; a_gt_b = 0;
      @(negedge clk);
      checks++;
      if (locq !== 9'(at)) begin failures++; $display("FAIL loop %0d: %0d vs %0d", l, locq, at); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
