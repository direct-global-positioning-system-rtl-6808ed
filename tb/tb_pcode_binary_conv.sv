// tb_pcode_binary_conv: checks the 0/1 -> +1/-1 conversion and its one-clock
// latency on a random chip stream with gaps.
module tb_pcode_binary_conv;
  logic clk = 0, rst_n = 0, en = 0, p = 0;
  logic signed [1:0] ram1_doa;
  logic valid;
  int checks = 0, failures = 0;
  pcode_binary_conv dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic pe, pp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    pe = 0; pp = 0;
    for (int k = 0; k < 2000; k++) begin
      en = ($urandom_range(0, 3) != 0); p = $urandom_range(0, 1);
      @(posedge clk); #1;
      checks++;
      if (valid !== en || (en && ram1_doa !== (p ? -2'sd1 : 2'sd1))) begin
        failures++; if (failures < 10) $display("FAIL k=%0d p=%0d out=%0d valid=%0d", k, p, ram1_doa, valid);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
