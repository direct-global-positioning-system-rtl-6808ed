// tb_pcode_average: feeds two milliseconds (10230 chips each) of random +/-1
// chips with random gaps, plus a run of equal chips that must saturate, and
// compares every output point with sums of 20 chips (10 for the last point of
// a millisecond) times 2048, saturated to 16 bits. Also checks the point count,
// the end1ms pulse on the 512th point and the one-clock output latency.
module tb_pcode_average;
  localparam int CPM = 10230;
  logic clk = 0, rst_n = 0, start_avg = 0, din_valid = 0;
  logic signed [1:0] din = 0;
  logic signed [15:0] qtt;
  logic qtt_valid, end1ms;
  int checks = 0, failures = 0;
  pcode_average dut (.*);
  always #5 clk = ~clk;
  initial begin #3_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int exp_q[$];
  int got = 0, ends = 0, sat_seen = 0;
  bit expect_end[$];
  always @(posedge clk) if (rst_n && qtt_valid) begin
    int e;
    bit ee;
    e = exp_q.pop_front(); ee = expect_end.pop_front();
    checks++;
    if (qtt !== 16'(e) || end1ms !== ee) begin
      failures++; if (failures < 10) $display("FAIL point %0d: %0d vs %0d end %0d/%0d", got, qtt, e, end1ms, ee);
    end
    if (e == 32767 || e == -32767) sat_seen++;
    got++;
  end
  always @(posedge clk) if (rst_n && end1ms) ends++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start_avg = 1; @(negedge clk) start_avg = 0;
    for (int ms = 0; ms < 2; ms++) begin
      int s, g;
      s = 0; g = 0;
      for (int c = 0; c < CPM; c++) begin
        bit last;
        while ($urandom_range(0, 4) == 0) @(negedge clk);   // gaps
        din_valid = 1;
        // group 3 of ms 0 is all +1 (saturates), otherwise random
        din = (ms == 0 && c / 20 == 3) ? 2'sd1 : ($urandom_range(0, 1) ? 2'sd1 : -2'sd1);
        s += din;
        g++;
        last = (c == CPM - 1);
        if (g == 20 || last) begin
          int v;
          v = s * 2048;
          if (v > 32767) v = 32767;
          if (v < -32767) v = -32767;
          exp_q.push_back(v); expect_end.push_back(last);
          s = 0; g = 0;
        end
        @(negedge clk);
        din_valid = 0;
        // output must appear in the clock after the group's last chip
        if (g == 0) begin
          checks++;
          if (!qtt_valid) begin failures++; $display("FAIL latency at chip %0d", c); end
        end
      end
    end
    repeat (3) @(negedge clk);
    checks++; if (got != 1024) begin failures++; $display("FAIL points %0d", got); end
    checks++; if (ends != 2) begin failures++; $display("FAIL end1ms count %0d", ends); end
    checks++; if (sat_seen == 0) begin failures++; $display("FAIL no saturation case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
