// tb_ifft_mach: IFFT_MACH with the behavioural transform core (short latency)
// over N_MS = 3 loops. The testbench plays the multiplier: a prod_pre pulse
// followed by 1024 products. Checks: the core receives the products in order;
// cnt_eni is high for exactly the first 512 results, in order; peak_clr comes
// before them and max_en once after them, after the square/peak pipeline has
// drained (after the full readout); the controller waits for cmp_flag; loop_cnt counts loops and
// acq_done rises after the last one, after which products are ignored.
module tb_ifft_mach;
  import pacq_pkg::*;
  localparam int N_MS = 3, DRAIN = 4;
  logic clk = 0, rst_n = 0, prod_pre = 0, cmp_flag = 0;
  logic ce, fwd_inv, mwr, start, mrd, done, cnt_eni, peak_clr, max_en, acq_done;
  logic [9:0] addr_x;
  logic [15:0] loop_cnt;
  cplx16_t xn, xk;
  int checks = 0, failures = 0, tr0 = 0;
  ifft_mach #(.N_MS(N_MS), .DRAIN(DRAIN)) dut (.*);
  xfft1024_model #(.LATENCY(100)) u_core (.*);
  always #5 clk = ~clk;
  initial begin #2_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  int eni = 0, clr_seen = 0, max_ens = 0, mwrs = 0, last_eni_t = 0, t = 0;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (mwr) mwrs++;
    if (peak_clr) begin chk(eni == 0, "peak_clr before results"); clr_seen++; end
    if (cnt_eni) begin
      chk(addr_x == 10'(eni), $sformatf("cnt_eni at result %0d, expected %0d", addr_x, eni));
      eni++; last_eni_t = t;
    end
    if (max_en) begin
      // the readout of the discarded 512 results finishes, then DRAIN clocks
      chk(t - last_eni_t == 512 + DRAIN + 1, $sformatf("max_en %0d clocks after last result", t - last_eni_t));
      max_ens++;
    end
  end

  initial begin
    cplx16_t pr [1024];
    xn = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    tr0 = u_core.transforms;   // ignore a start seen before reset took effect
    for (int l = 0; l < N_MS + 1; l++) begin
      int m0;
      m0 = mwrs;
      eni = 0; clr_seen = 0; max_ens = 0;
      prod_pre = 1; @(negedge clk); prod_pre = 0;
      for (int i = 0; i < 1024; i++) begin
        pr[i].re = 16'($urandom_range(0, 2000)) - 16'sd1000; pr[i].im = 16'($urandom_range(0, 2000)) - 16'sd1000;
        xn = pr[i];
        @(negedge clk);
      end
      xn = '0;
      if (l == N_MS) begin
        repeat (200) @(negedge clk);
        chk(mwrs == m0 && acq_done, "products ignored after the last loop");
        break;
      end
      chk(mwrs == m0 + 1, "one mwr per loop");
      for (int i = 0; i < 1024; i++)
        if (u_core.br[i] != real'(pr[i].re) || u_core.bi[i] != real'(pr[i].im)) begin
          chk(0, $sformatf("loop %0d product %0d not loaded", l, i)); break;
        end
      checks++;
      wait (max_en); @(negedge clk);
      repeat (5) begin
        @(negedge clk);
        chk(!acq_done && loop_cnt == 16'(l), "waits for cmp_flag");
      end
      cmp_flag = 1; @(negedge clk); cmp_flag = 0;
      repeat (3) @(negedge clk);
      chk(eni == 512 && clr_seen == 1 && max_ens == 1,
          $sformatf("loop %0d: cnt_eni %0d, peak_clr %0d, max_en %0d", l, eni, clr_seen, max_ens));
      chk(loop_cnt == 16'(l + 1), "loop_cnt");
      chk(acq_done == (l == N_MS - 1), "acq_done");
    end
    chk(u_core.transforms - tr0 == N_MS && !fwd_inv, "inverse transforms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
