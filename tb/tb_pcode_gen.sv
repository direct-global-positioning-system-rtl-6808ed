// tb_pcode_gen: self-checking test of the P-code generator.
//
// 1. From reset (start of week) the vectors of chips 4091..4093 must match the
//    published short-cycle table (892/124, 955/2AA, E49/C92, 155/2AA) and each
//    register must restart with its initial vector.
// 2. Loaded at random chips of the week, P_i must equal the reference model for
//    a few hundred chips (random PRN).
// 3. Across an X1 and an X2 epoch, X1B must hold for 343 chips, X2A for 37 and
//    X2B for 380, and the epoch pulses must come at the reference chip.
// 4. Loaded at the start of the last X1A period of the week, X2A must stop at
//    X1A chip 3023, X2B at 3127 and X1B at 3749 (holds of 1069, 965 and 343
//    chips), and every register must restart with the new week.
module tb_pcode_gen;
  import pacq_pkg::*;
  import pcode_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, load = 0;
  pcode_init_t pinit;
  logic [5:0] prn;
  logic p, x1aq, x1bq, x2aq, x2bq, setx1aepoch, x1epoch, x2epoch, endweek;
  logic [11:0] x1a_vec, x1b_vec, x2a_vec, x2b_vec;
  logic [18:0] zcount;
  int checks = 0, failures = 0;

  pcode_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic do_load(input longint n, input int i);
    pinit = tune(n); prn = 6'(i);
    @(negedge clk) load = 1; @(negedge clk) load = 0;
  endtask

  // counts of how long each register shows its last vector
  int hold[4];
  longint c1b_first, c2a_first, c2b_first;

  initial begin
    pinit = '0; prn = 6'd1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- 1. short cycles from reset ------------------------------------------
    en = 1;
    for (int c = 1; c <= 4094; c++) begin
      if (c == 4091) begin
        chk(x1a_vec == 12'h892, "X1A 4091"); chk(x2a_vec == 12'hE49, "X2A 4091");
      end
      if (c == 4092) begin
        chk(x1a_vec == 12'h124, "X1A 4092"); chk(x2a_vec == 12'hC92, "X2A 4092");
        chk(x1b_vec == 12'h955, "X1B 4092"); chk(x2b_vec == 12'h155, "X2B 4092");
        chk(setx1aepoch, "setx1aepoch at 4092");
      end
      if (c == 4093) begin
        chk(x1a_vec == 12'h248, "X1A restart"); chk(x2a_vec == 12'h925, "X2A restart");
        chk(x1b_vec == 12'h2AA, "X1B 4093"); chk(x2b_vec == 12'h2AA, "X2B 4093");
      end
      if (c == 4094) begin
        chk(x1b_vec == 12'h554, "X1B restart"); chk(x2b_vec == 12'h554, "X2B restart");
      end
      @(negedge clk);
    end
    en = 0;
    // ---- 2. random starts -----------------------------------------------------
    for (int t = 0; t < 6; t++) begin
      longint n;
      int i;
      n = longint'($urandom_range(0, 400000)) * C1 / 400 + longint'($urandom_range(37, 100000));
      i = $urandom_range(1, 37);
      do_load(n, i);
      en = 1;
      for (int k = 0; k < 300; k++) begin
        chk(p == p_chip(n + k, i), $sformatf("P chip n=%0d prn=%0d", n + k, i));
        @(negedge clk);
      end
      en = 0;
    end
    // ---- 3. X1 and X2 epochs (week-relative chips near C1) ---------------------
    begin
      longint n0;
      n0 = C2 - 5;
      do_load(n0, 5);
      hold = '{0, 0, 0, 0};
      en = 1;
      for (longint k = 0; k < 420 + 60; k++) begin
        if (x1b_vec == 12'h2AA) hold[1]++;
        if (x2a_vec == 12'hC92) hold[2]++;
        if (x2b_vec == 12'h2AA) hold[3]++;
        chk(x1epoch == (n0 + k == C1 - 1), "x1epoch timing");
        chk(x2epoch == (n0 + k == C1 + 36), "x2epoch timing");
        if (n0 + k >= C2 && n0 + k < C2 + 300)
          chk(p == p_chip(n0 + k, 5), "P across epochs");
        @(negedge clk);
      end
      en = 0;
      chk(hold[1] - 1 == 343, $sformatf("X1B halt %0d", hold[1] - 1));
      chk(hold[2] - 1 == 37,  $sformatf("X2A halt %0d", hold[2] - 1));
      chk(hold[3] - 1 == 380, $sformatf("X2B halt %0d", hold[3] - 1));
      chk(zcount == 19'd1, "z-count after X1 epoch");
    end
    // ---- 4. end of week -------------------------------------------------------
    begin
      longint n0;
      n0 = C1 * 403199 + 64'd4092 * 3749;
      do_load(n0, 1);
      chk(endweek, "endweek flag in last X1A period");
      chk(x1b_vec == vec_at(1, 344), "X1B at chip 345");
      chk(x2a_vec == vec_at(2, 1069), "X2A at chip 1070");
      chk(x2b_vec == vec_at(3, 966), "X2B at chip 967");
      hold = '{0, 0, 0, 0};
      c1b_first = -1; c2a_first = -1; c2b_first = -1;
      en = 1;
      for (int c = 1; c <= 4092; c++) begin   // c = X1A chip number
        if (x1b_vec == 12'h2AA) begin hold[1]++; if (c1b_first < 0) c1b_first = c; end
        if (x2a_vec == 12'hC92) begin hold[2]++; if (c2a_first < 0) c2a_first = c; end
        if (x2b_vec == 12'h2AA) begin hold[3]++; if (c2b_first < 0) c2b_first = c; end
        @(negedge clk);
      end
      chk(c2a_first == 3023, $sformatf("X2A last chip at X1A chip %0d", c2a_first));
      chk(c2b_first == 3127, $sformatf("X2B last chip at X1A chip %0d", c2b_first));
      chk(c1b_first == 3749, $sformatf("X1B last chip at X1A chip %0d", c1b_first));
      chk(hold[1] - 1 == 343,  $sformatf("X1B week halt %0d", hold[1] - 1));
      chk(hold[2] - 1 == 1069, $sformatf("X2A week halt %0d", hold[2] - 1));
      chk(hold[3] - 1 == 965,  $sformatf("X2B week halt %0d", hold[3] - 1));
      // new week
      chk(zcount == 0 && !endweek, "week restart");
      for (int k = 0; k < 200; k++) begin
        chk(x1a_vec == vec(k, 0) && x1b_vec == vec(k, 1) && x2a_vec == vec(k, 2) && x2b_vec == vec(k, 3),
            $sformatf("new-week vectors chip %0d", k));
        @(negedge clk);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
