// tb_corr_peak: streams of 512 random square values with gaps; after each
// stream CMPQ must hold the maximum, and a_gt_b must flag exactly the values
// that exceed the running maximum. clr restarts each stream.
module tb_corr_peak;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [31:0] ram2_max_doa_dub = 0, cmpq;
  logic a_gt_b;
  int checks = 0, failures = 0;
  corr_peak dut (.*);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 6; l++) begin
      logic [31:0] mx;
      @(negedge clk) clr = 1; @(negedge clk) clr = 0;
      mx = 0;
      for (int k = 0; k < 512; k++) begin
        while ($urandom_range(0, 3) == 0) begin en = 0; @(negedge clk); end
        en = 1;
        ram2_max_doa_dub = (l == 2) ? 32'($urandom_range(0, 1000)) : $urandom;
        #1;
        checks++;
        if (a_gt_b !== (ram2_max_doa_dub > mx)) begin failures++; if (failures < 10) $display("FAIL a_gt_b"); end
        if (ram2_max_doa_dub > mx) mx = ram2_max_doa_dub;
        @(negedge clk);
      end
      en = 0;
      @(negedge clk);
      checks++;
      if (cmpq !== mx) begin failures++; $display("FAIL loop %0d: %0d vs %0d", l, cmpq, mx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
