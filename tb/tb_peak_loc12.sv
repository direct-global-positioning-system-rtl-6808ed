// tb_peak_loc12: feeds sequences of per-loop peaks through the maximum selection
// unit and checks, after every cmp_flag, the largest and second largest values
// and locations against a reference; each update case (new maximum, new second
// maximum, neither) must occur. Also checks the comparison time (max_en to
// cmp_flag) and done_cmp.
module tb_peak_loc12;
  logic clk = 0, rst_n = 0, clr = 0, max_en = 0;
  logic [31:0] peak = 0, cp1, cp2;
  logic [8:0] peak_loc = 0, cp1_loc, cp2_loc;
  logic cmp_flag, done_cmp;
  int checks = 0, failures = 0;
  int n_max = 0, n_mid = 0, n_none = 0;
  peak_loc12 dut (.*);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 20; s++) begin
      logic [31:0] m1, m2;
      logic [8:0] l1, l2;
      @(negedge clk) clr = 1; @(negedge clk) clr = 0;
      m1 = 0; m2 = 0; l1 = 0; l2 = 0;
      for (int l = 0; l < 10; l++) begin
        int t;
        peak = $urandom_range(1, 1_000_000); peak_loc = 9'($urandom_range(0, 511));
        if (peak > m1) begin m2 = m1; l2 = l1; m1 = peak; l1 = peak_loc; n_max++; end
        else if (peak > m2) begin m2 = peak; l2 = peak_loc; n_mid++; end
        else n_none++;
        checks++; if (!done_cmp) begin failures++; $display("FAIL done_cmp idle"); end
        max_en = 1; @(negedge clk); max_en = 0;
        t = 1;
        while (!cmp_flag) begin @(negedge clk); t++; end
        checks++;
        if (cp1 !== m1 || cp2 !== m2 || cp1_loc !== l1 || cp2_loc !== l2 || t != 4) begin
          failures++;
          if (failures < 10) $display("FAIL s%0d l%0d: %0d@%0d %0d@%0d vs %0d@%0d %0d@%0d t=%0d",
                                      s, l, cp1, cp1_loc, cp2, cp2_loc, m1, l1, m2, l2, t);
        end
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    checks++; if (n_max == 0 || n_mid == 0 || n_none == 0) begin failures++; $display("FAIL case coverage"); end
    $display("cases: new max %0d, new second %0d, none %0d", n_max, n_mid, n_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
