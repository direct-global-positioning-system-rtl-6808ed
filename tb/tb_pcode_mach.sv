// tb_pcode_mach: checks that PCODE_MACH waits for both the host (data_ld low)
// and the zero fill of RAM2, pulses start_avg once, enables the P-code generator
// for exactly N_MS * CHIPS_PER_MS clocks, and writes averaged points to RAM2
// addresses 0..POINTS-1, wrapping every millisecond. Reduced sizes.
module tb_pcode_mach;
  localparam int N_MS = 3, CPM = 60, PTS = 3;
  logic clk = 0, rst_n = 0, data_ld = 1, ram2_zeroed = 0, qtt_valid = 0;
  logic start_pcode, start_avg, ram2_web, done;
  logic [9:0] ram2_addrb;
  int checks = 0, failures = 0;
  pcode_mach #(.N_MS(N_MS), .CHIPS_PER_MS(CPM), .POINTS(PTS)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  int en_cycles = 0, avg_pulses = 0, writes = 0;
  always @(posedge clk) if (rst_n) begin
    if (start_pcode) en_cycles++;
    if (start_avg) avg_pulses++;
    if (ram2_web) begin
      chk(ram2_addrb == 10'(writes % PTS), $sformatf("write address %0d", ram2_addrb));
      writes++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    data_ld = 0;                       // host done, RAM2 not zeroed yet
    repeat (5) @(negedge clk);
    chk(!start_pcode && avg_pulses == 0, "must wait for RAM2 zero fill");
    ram2_zeroed = 1;
    // averaged points arrive every 20 chips
    for (int k = 0; k < N_MS * CPM + 40; k++) begin
      qtt_valid = (k % 20 == 19) && (k < N_MS * CPM + 5);
      @(negedge clk);
    end
    qtt_valid = 0;
    chk(en_cycles == N_MS * CPM, $sformatf("enabled %0d chips", en_cycles));
    chk(avg_pulses == 1, "one start_avg");
    chk(done, "done after the last millisecond");
    chk(writes == N_MS * CPM / 20, "writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
