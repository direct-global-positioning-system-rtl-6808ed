// tb_cconj_mult: random complex operands (with gaps) through the three-
// multiplier complex conjugate multiplier; every output is compared with
// a * conj(d) computed directly with four products, saturated to 16 bits,
// three clocks later; prod_pre must lead mult_prod_a_web by one clock.
module tb_cconj_mult;
  import pacq_pkg::*;
  logic clk = 0, rst_n = 0, mult_prod_a_ce = 0;
  cplx16_t a, d;
  logic prod_pre, mult_prod_a_web;
  logic signed [15:0] ram2_doa_dubr, ram2_doa_dubi;
  int checks = 0, failures = 0, sats = 0;
  cconj_mult dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int er[$], ei[$];
  logic pre_d = 0;
  always @(posedge clk) if (rst_n) begin
    pre_d <= prod_pre;
    if (mult_prod_a_web) begin
      int r, i;
      r = er.pop_front(); i = ei.pop_front();
      checks++;
      if (ram2_doa_dubr !== 16'(r) || ram2_doa_dubi !== 16'(i) || !pre_d) begin
        failures++; if (failures < 10) $display("FAIL %0d,%0d vs %0d,%0d", ram2_doa_dubr, ram2_doa_dubi, r, i);
      end
    end
  end

  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32767) return -32767;
    return int'(v);
  endfunction

  initial begin
    a = '0; d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      mult_prod_a_ce = ($urandom_range(0, 4) != 0);
      if (k % 3 == 0) begin   // large operands: saturation
        a.re = 16'($urandom); a.im = 16'($urandom); d.re = 16'($urandom); d.im = 16'($urandom);
      end else begin          // small operands: exact
        a.re = 16'($urandom_range(0, 400)) - 16'sd200; a.im = 16'($urandom_range(0, 400)) - 16'sd200;
        d.re = 16'($urandom_range(0, 300)) - 16'sd150; d.im = 16'($urandom_range(0, 300)) - 16'sd150;
      end
      if (mult_prod_a_ce) begin
        longint r, i;
        r = longint'(a.re) * d.re + longint'(a.im) * d.im;
        i = longint'(a.im) * d.re - longint'(a.re) * d.im;
        if (sat(r) != r || sat(i) != i) sats++;
        er.push_back(sat(r)); ei.push_back(sat(i));
      end
      @(negedge clk);
    end
    mult_prod_a_ce = 0;
    repeat (5) @(negedge clk);
    checks++; if (er.size() != 0) begin failures++; $display("FAIL %0d results missing", er.size()); end
    checks++; if (sats == 0) begin failures++; $display("FAIL no saturation case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
