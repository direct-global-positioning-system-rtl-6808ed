// tb_fft_mach: FFT_MACH with a RAM2 model (dp_ram) and the behavioural
// transform core (short latency). Checks: nothing happens before RAM_MULT is
// full; the zero fill writes all 1024 RAM2 words; after each end1ms the core
// receives RAM2 words 0..1023 in order (checked inside the core model); each
// result k leaves the core in the clock after RAM_MULT address k was read, with
// mult_prod_a_ce high for exactly 1024 clocks; one transform and one loop_cnt
// step per millisecond.
module tb_fft_mach;
  import pacq_pkg::*;
  localparam int LOOPS = 3;
  logic clk = 0, rst_n = 0, ram_mult_full = 0, end1ms = 0;
  logic ram2_ena, ram2_wea, ram2_zeroed, ce, fwd_inv, mwr, start, mrd, done;
  logic ram_mult_rea, mult_prod_a_ce;
  logic [9:0] ram2_addra, addr_x, ram_mult_addra;
  logic [15:0] loop_cnt, ram2_doa, ram2_dob;
  logic web = 0;
  logic [9:0] addrb = 0;
  logic [15:0] dib = 0;
  cplx16_t xn, xk;
  int checks = 0, failures = 0, tr0 = 0;

  fft_mach dut (.*);
  dp_ram #(.DEPTH(1024), .WIDTH(16)) u_ram2 (
    .clk, .ena(ram2_ena), .wea(ram2_wea), .addra(ram2_addra), .dia(16'd0), .doa(ram2_doa),
    .web, .addrb, .dib, .dob(ram2_dob));
  assign xn.re = ram2_doa;
  assign xn.im = '0;
  xfft1024_model #(.LATENCY(100)) u_core (.*);

  always #5 clk = ~clk;
  initial begin #2_000_000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  int zero_writes = 0, ce_cycles = 0;
  logic rea_d = 0;
  logic [9:0] addr_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (ram2_ena && ram2_wea) begin
      chk(ram2_addra == 10'(zero_writes), "zero fill address order");
      zero_writes++;
    end
    rea_d <= ram_mult_rea; addr_d <= ram_mult_addra;
    if (mult_prod_a_ce) begin
      ce_cycles++;
      chk(rea_d && addr_d == addr_x, $sformatf("result %0d paired with RAM_MULT address %0d", addr_x, addr_d));
    end
  end

  logic [15:0] img [1024];
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    tr0 = u_core.transforms;   // ignore a start seen before reset took effect
    repeat (20) @(negedge clk);
    chk(!ram2_ena && !ram2_zeroed && !mwr, "idle until RAM_MULT full");
    ram_mult_full = 1;
    @(negedge clk) ram_mult_full = 0;
    wait (ram2_zeroed);
    @(negedge clk);
    chk(zero_writes == 1024, $sformatf("zero fill wrote %0d words", zero_writes));
    for (int i = 0; i < 1024; i++) img[i] = 16'd0;
    for (int l = 0; l < LOOPS; l++) begin
      // averaging unit writes 512 points through port B
      for (int i = 0; i < 512; i++) begin
        web = 1; addrb = 10'(i); dib = 16'($urandom); img[i] = dib;
        @(negedge clk);
      end
      web = 0;
      end1ms = 1; @(negedge clk); end1ms = 0;
      ce_cycles = 0;
      wait (mwr === 1'b0);
      repeat (1030) @(negedge clk);
      for (int i = 0; i < 1024; i++)
        if (u_core.br[i] != real'($signed(img[i]))) begin
          chk(0, $sformatf("loop %0d sample %0d: %0f vs %0d", l, i, u_core.br[i], $signed(img[i])));
          break;
        end
      checks++;
      wait (done);
      repeat (1040) @(negedge clk);
      chk(ce_cycles == 1024, $sformatf("mult_prod_a_ce cycles %0d", ce_cycles));
    end
    chk(loop_cnt == LOOPS, "loop_cnt");
    chk(u_core.transforms - tr0 == LOOPS, "transforms");
    chk(ce && fwd_inv, "forward transform enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
