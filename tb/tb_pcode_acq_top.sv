// tb_pcode_acq_top: end-to-end test of the acquisition processor at its default
// size (10 loops of 1 ms, 10230 chips each, 1024-point transforms).
//
// The testbench plays the host: it computes the local P-code that the processor
// will generate (independent reference model, started at Monday 11:30 of the
// week, PRN 5), builds a 2 ms averaged "received signal" that contains the
// reference of loop TARGET delayed by SHIFT averaging points, with pseudo-random
// noise, takes its 1024-point DFT (scaled by 1/1024) and loads it into RAM_MULT.
// Two behavioural FFT/IFFT core models complete the design.
// Checks: every averaged reference point written to RAM2; the per-loop peak
// location and value against a time-domain correlation; the final largest peak
// at SHIFT; total run time against one chip per clock. Mechanisms counted: zero
// padding of RAM2, FFT and IFFT transforms, new-maximum and new-second-maximum
// updates in the maximum selection unit, the 10-chip last group of a millisecond.
module tb_pcode_acq_top;
  import pacq_pkg::*;
  import pcode_ref_pkg::*;

  localparam int N_MS   = 10;
  localparam int CPM    = 10230;
  localparam int PRN    = 5;
  localparam int TARGET = 7;      // loop (0-based) whose reference is in the signal
  localparam int SHIFT  = 8;      // code phase in averaging points
  localparam int SCALE  = 128;    // signal amplitude per unit of the averaged code
  localparam longint N0 = 64'd10_230_000 * 64'd127_800;  // Monday 11:30

  logic clk = 0, rst_n = 0;
  logic write_en = 0, data_ld = 1, pcode_load = 0;
  cplx16_t d;
  pcode_init_t pinit;
  logic [5:0] prn = 6'(PRN);
  logic fft_ce, fft_fwd_inv, fft_mwr, fft_start, fft_mrd, fft_done;
  logic ifft_ce, ifft_fwd_inv, ifft_mwr, ifft_start, ifft_mrd, ifft_done;
  cplx16_t fft_xn, fft_xk, ifft_xn, ifft_xk;
  logic [9:0] fft_addr_x, ifft_addr_x;
  logic [31:0] q1, q2;
  logic [8:0] q1_loc, q2_loc;
  logic cmp_flag, done_cmp, acq_done;
  logic [15:0] loop_cnt;

  pcode_acq_top dut (.*);

  xfft1024_model u_fft (.clk, .ce(fft_ce), .fwd_inv(fft_fwd_inv), .mwr(fft_mwr), .start(fft_start),
                        .mrd(fft_mrd), .xn(fft_xn), .done(fft_done), .addr_x(fft_addr_x), .xk(fft_xk));
  xfft1024_model u_ifft (.clk, .ce(ifft_ce), .fwd_inv(ifft_fwd_inv), .mwr(ifft_mwr), .start(ifft_start),
                         .mrd(ifft_mrd), .xn(ifft_xn), .done(ifft_done), .addr_x(ifft_addr_x), .xk(ifft_xk));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #(10 * 400_000);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference data -------------------------------------------------------------
  bit chips[];
  int apts[];                  // averaged points (sum of +/-1), 512 per ms
  int sig[1024];               // received, averaged 2 ms window
  real sre[1024], sim[1024];
  real expc[N_MS][512];        // expected correlation per loop and lag

  function automatic int sum_group(int ms, int g);
    int s = 0, lo, hi;
    lo = ms * CPM + g * 20;
    hi = (g == 511) ? ms * CPM + CPM : lo + 20;
    for (int c = lo; c < hi; c++) s += chips[c] ? -1 : 1;
    return s;
  endfunction

  function automatic logic signed [15:0] qexp(int s);
    int v = s * 2048;
    if (v > 32767) v = 32767;
    if (v < -32767) v = -32767;
    return 16'(v);
  endfunction

  // ---- monitors --------------------------------------------------------------------
  int qidx = 0, sat_groups = 0, zero_fill = 0, new_max = 0, new_second = 0, loops_seen = 0;
  int short_groups = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.qtt_valid) begin
      int ms, g;
      ms = qidx / 512; g = qidx % 512;
      if (ms < N_MS) begin
        chk(dut.qtt == qexp(apts[qidx]), $sformatf("qtt ms %0d point %0d: %0d vs %0d", ms, g, dut.qtt, qexp(apts[qidx])));
        if (apts[qidx] * 2048 > 32767 || apts[qidx] * 2048 < -32767) sat_groups++;
        if (g == 511) short_groups++;
      end
      qidx++;
    end
    if (dut.u_fmach.state == dut.u_fmach.FT_RST && dut.ram2_wea && dut.ram2_addra == 10'd1023) zero_fill++;
    if (dut.u_max.state == dut.u_max.M_CMP) begin
      if (dut.u_max.max31_gt) new_max++;
      else if (dut.u_max.max32_gt) new_second++;
    end
    if (dut.max_en) begin
      real best; int bl; real hv;
      best = -1; bl = 0;
      for (int m = 0; m < 512; m++) if (expc[loops_seen][m] * expc[loops_seen][m] > best) begin
        best = expc[loops_seen][m] * expc[loops_seen][m]; bl = m; end
      hv = $sqrt(real'(dut.cmpq));
      $display("loop %0d: peak %0d at %0d, expected %0.0f at %0d", loops_seen, dut.cmpq, dut.locq, best, bl);
      if (loops_seen == TARGET) chk(dut.locq == 9'(SHIFT), "target loop peak location");
      chk(hv < $sqrt(best) * 1.05 + 12 && hv > $sqrt(best) * 0.95 - 12,
          $sformatf("loop %0d peak amplitude %0.1f vs %0.1f", loops_seen, hv, $sqrt(best)));
      loops_seen++;
    end
  end

  longint t_go, t_done;
  initial begin
    // P-code for N_MS + 1 ms from N0
    gen_chips(N0, CPM * (N_MS + 1), PRN, chips);
    apts = new[512 * (N_MS + 1)];
    for (int ms = 0; ms <= N_MS; ms++)
      for (int g = 0; g < 512; g++) apts[ms * 512 + g] = sum_group(ms, g);
    // received signal: reference of loop TARGET delayed by SHIFT points, plus noise
    for (int j = 0; j < 1024; j++)
      sig[j] = SCALE * apts[512 * TARGET + j - SHIFT] + int'($urandom_range(0, 400)) - 200;
    // host preprocessing: DFT / 1024, rounded
    for (int k = 0; k < 1024; k++) begin
      real ar, ai;
      ar = 0; ai = 0;
      for (int n = 0; n < 1024; n++) begin
        real ph;
        ph = -2.0 * 3.14159265358979323846 * real'((k * n) % 1024) / 1024.0;
        ar += sig[n] * $cos(ph); ai += sig[n] * $sin(ph);
      end
      sre[k] = ar / 1024.0; sim[k] = ai / 1024.0;
    end
    // expected correlation per loop: sum sig[n+m] * reference[n] (reference = 2 * sum)
    for (int l = 0; l < N_MS; l++)
      for (int m = 0; m < 512; m++) begin
        real c;
        c = 0;
        for (int n = 0; n < 512; n++) c += real'(sig[n + m]) / 1024.0 * real'(qexp(apts[512 * l + n])) / 1024.0;
        expc[l][m] = c;
      end

    pinit = tune(N0);
    d = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk) pcode_load = 1;
    @(negedge clk) pcode_load = 0;
    for (int k = 0; k < 1024; k++) begin
      write_en = 1;
      d.re = 16'($rtoi(sre[k] >= 0 ? sre[k] + 0.5 : sre[k] - 0.5));
      d.im = 16'($rtoi(sim[k] >= 0 ? sim[k] + 0.5 : sim[k] - 0.5));
      @(negedge clk);
    end
    write_en = 0;
    data_ld = 0;
    wait (dut.start_pcode);
    t_go = cyc;
    wait (acq_done);
    t_done = cyc;
    @(negedge clk);
    $display("q1 %0d at %0d, q2 %0d at %0d, %0d cycles", q1, q1_loc, q2, q2_loc, t_done - t_go);
    chk(q1_loc == 9'(SHIFT), "largest peak location");
    chk(q2 < q1 / 4, "acquisition margin");
    chk(loop_cnt == 16'(N_MS), "loop count");
    chk(t_done - t_go >= longint'(N_MS * CPM) && t_done - t_go <= longint'(N_MS * CPM + 12000),
        $sformatf("run time %0d cycles", t_done - t_go));
    chk(qidx >= N_MS * 512, "all reference points produced");
    chk(u_fft.transforms == N_MS, "forward transforms");
    chk(u_ifft.transforms == N_MS, "inverse transforms");
    $display("mechanisms: zero_fill=%0d new_max=%0d new_second=%0d short_groups=%0d saturated_groups=%0d loops=%0d",
             zero_fill, new_max, new_second, short_groups, sat_groups, loops_seen);
    chk(zero_fill == 1, "RAM2 zero padding happened");
    chk(new_max > 0, "new maximum selected");
    chk(new_second > 0, "new second maximum selected");
    chk(short_groups == N_MS, "10-chip last group each ms");
    chk(loops_seen == N_MS, "max_en per loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
