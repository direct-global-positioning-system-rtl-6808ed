// tb_corr_sq: random and extreme IFFT outputs through the amplitude square unit;
// each result must equal re*re + im*im two clocks after cnt_eni.
module tb_corr_sq;
  logic clk = 0, rst_n = 0, cnt_eni = 0;
  logic signed [15:0] ifft_di_r = 0, ifft_di_i = 0;
  logic [31:0] ram2_max_doa_dub;
  logic mult_abs_web;
  int checks = 0, failures = 0;
  corr_sq dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  longint eq[$];
  always @(posedge clk) if (rst_n && mult_abs_web) begin
    longint e;
    e = eq.pop_front();
    checks++;
    if (longint'(ram2_max_doa_dub) != e) begin failures++; if (failures < 10) $display("FAIL %0d vs %0d", ram2_max_doa_dub, e); end
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      cnt_eni = ($urandom_range(0, 3) != 0);
      ifft_di_r = (k == 5) ? -16'sd32768 : 16'($urandom);
      ifft_di_i = (k == 5) ? -16'sd32768 : 16'($urandom);
      if (cnt_eni) eq.push_back(longint'(ifft_di_r) * ifft_di_r + longint'(ifft_di_i) * ifft_di_i);
      @(negedge clk);
    end
    cnt_eni = 0;
    repeat (4) @(negedge clk);
    checks++; if (eq.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
