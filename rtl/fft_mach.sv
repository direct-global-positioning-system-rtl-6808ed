// fft_mach: FFT_MACH, controller of the local reference FFT processor.
//
// States (document's names):
//   ft_pc_ld  wait until the host has filled RAM_MULT (ram_mult_full)
//   ft_rst    write 1024 zeros into RAM2 through port A (zero padding); then
//             ram2_zeroed stays high
//   ft_init   wait for end1ms (512 averaged points are in RAM2)
//   ft_load   mwr in the first cycle; read RAM2 addresses 0..1023, one per cycle,
//             into the core (core takes samples the cycle after each read)
//   ft_wadr   wait until the core's address addr_x reaches 3ff, then start
//   ft_calc   wait for done
//   ft_wait1  mrd for one cycle; the RAM_MULT read of address 0 is issued in
//             the same cycle, so both streams arrive together
//   ft_wait2  first result pair is on the buses; mult_prod_a_ce goes high
//   ft_rdfft  results 1..1023; back to ft_init when addr_x = 3ff
// The loop counter loop_cnt counts mwr pulses, one per FFT.
//
// Core handshake assumed here: mwr at cycle t means samples are taken in
// t+1..t+1024; start and done are one-cycle pulses; mrd at t puts result k on
// the bus in cycle t+1+k, with addr_x = k during loading and unloading.
// fwd_inv is tied to 1 (forward). The state sequence follows the document; the
// exact cycle alignment is this design's choice for one-cycle block RAMs.
module fft_mach #(
  parameter int unsigned N  = 1024,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ram_mult_full,
  input  logic          end1ms,
  // RAM2 port A
  output logic          ram2_ena,
  output logic          ram2_wea,
  output logic [AW-1:0] ram2_addra,
  output logic          ram2_zeroed,
  // FFT/IFFT core
  output logic          ce,
  output logic          fwd_inv,
  output logic          mwr,
  output logic          start,
  output logic          mrd,
  input  logic          done,
  input  logic [AW-1:0] addr_x,
  // complex conjugate multiplication processor
  output logic          ram_mult_rea,
  output logic [AW-1:0] ram_mult_addra,
  output logic          mult_prod_a_ce,
  output logic [15:0]   loop_cnt
);
  typedef enum logic [3:0] {
    FT_PC_LD, FT_RST, FT_INIT, FT_LOAD, FT_WADR, FT_CALC, FT_WAIT1, FT_WAIT2, FT_RDFFT
  } ft_state_t;
  ft_state_t state;
  logic [AW-1:0] addr;
  logic          started;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= FT_PC_LD;
      addr        <= '0;
      ram2_zeroed <= 1'b0;
      started     <= 1'b0;
      loop_cnt    <= '0;
    end else begin
      started <= 1'b0;
      case (state)
        FT_PC_LD: if (ram_mult_full) begin state <= FT_RST; addr <= '0; end
        FT_RST: begin
          addr <= addr + 1'b1;
          if (addr == AW'(N - 1)) begin state <= FT_INIT; ram2_zeroed <= 1'b1; end
        end
        FT_INIT: if (end1ms) begin state <= FT_LOAD; addr <= '0; loop_cnt <= loop_cnt + 1'b1; end
        FT_LOAD: begin
          addr <= addr + 1'b1;
          if (addr == AW'(N - 1)) state <= FT_WADR;
        end
        FT_WADR: if (addr_x == AW'(N - 1)) begin state <= FT_CALC; started <= 1'b1; end
        FT_CALC: if (done) begin state <= FT_WAIT1; addr <= '0; end
        FT_WAIT1: begin state <= FT_WAIT2; addr <= addr + 1'b1; end
        FT_WAIT2: begin state <= FT_RDFFT; addr <= addr + 1'b1; end
        FT_RDFFT: begin
          if (addr != AW'(N - 1)) addr <= addr + 1'b1;
          if (addr_x == AW'(N - 1)) state <= FT_INIT;
        end
        default: state <= FT_PC_LD;
      endcase
    end
  end

  always_comb begin
    ram2_ena       = (state == FT_RST) || (state == FT_LOAD);
    ram2_wea       = (state == FT_RST);
    ram2_addra     = addr;
    ce             = ram2_zeroed;
    fwd_inv        = 1'b1;
    mwr            = (state == FT_LOAD) && (addr == '0);
    start          = started;
    mrd            = (state == FT_WAIT1);
    ram_mult_rea   = (state == FT_WAIT1) || (state == FT_WAIT2) || (state == FT_RDFFT);
    ram_mult_addra = addr;
    mult_prod_a_ce = (state == FT_WAIT2) || (state == FT_RDFFT);
  end
endmodule
