// ifft_mach: IFFT_MACH, controller of the IFFT processor and of the search
// units that follow it.
//
// States (document's names; the transitions are this design's):
//   ifft_init   wait for prod_pre (the product stream starts next cycle); mwr
//   ifft_load   the core takes the 1024 products; leave when addr_x = 3ff
//   ifft_wadr   start pulse
//   ifft_calc   wait for done
//   ifft_wait1  mrd pulse; peak_clr clears the peak and location registers
//   ifft_wait2  first IFFT result on the bus; cnt_eni high
//   ifft_rdfft  results 1..1023; cnt_eni stays high for the first 512 only
//               (the second half of the zero-padded correlation is discarded)
//   ifft_wait3  drain the square and peak pipeline (DRAIN cycles), then max_en
//   ifft_cmp    wait for cmp_flag from the maximum selection unit
//   ifft_dbg    count the loop; after N_MS loops go to ifft_stop, else ifft_init
//   ifft_stop   acquisition finished (acq_done)
// fwd_inv is tied to 0 (inverse). Core handshake as for FFT_MACH: mwr at t means
// samples are taken in t+1..t+1024, mrd at t puts result k on the bus at t+1+k.
module ifft_mach #(
  parameter int unsigned N_MS   = 10,
  parameter int unsigned N      = 1024,
  parameter int unsigned KEEP   = 512,
  parameter int unsigned DRAIN  = 4,
  parameter int unsigned AW     = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          prod_pre,
  // FFT/IFFT core
  output logic          ce,
  output logic          fwd_inv,
  output logic          mwr,
  output logic          start,
  output logic          mrd,
  input  logic          done,
  input  logic [AW-1:0] addr_x,
  // search units
  output logic          cnt_eni,
  output logic          peak_clr,
  output logic          max_en,
  input  logic          cmp_flag,
  output logic [15:0]   loop_cnt,
  output logic          acq_done
);
  typedef enum logic [3:0] {
    IFFT_INIT, IFFT_LOAD, IFFT_WADR, IFFT_CALC, IFFT_WAIT1, IFFT_WAIT2, IFFT_RDFFT,
    IFFT_WAIT3, IFFT_CMP, IFFT_DBG, IFFT_STOP
  } ifft_state_t;
  ifft_state_t state;
  logic [$clog2(DRAIN + 1)-1:0] drain;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IFFT_INIT;
      drain    <= '0;
      loop_cnt <= '0;
    end else begin
      case (state)
        IFFT_INIT:  if (prod_pre) state <= IFFT_LOAD;
        IFFT_LOAD:  if (addr_x == AW'(N - 1)) state <= IFFT_WADR;
        IFFT_WADR:  state <= IFFT_CALC;
        IFFT_CALC:  if (done) state <= IFFT_WAIT1;
        IFFT_WAIT1: state <= IFFT_WAIT2;
        IFFT_WAIT2: state <= IFFT_RDFFT;
        IFFT_RDFFT: if (addr_x == AW'(N - 1)) begin state <= IFFT_WAIT3; drain <= '0; end
        IFFT_WAIT3: begin
          drain <= drain + 1'b1;
          if (drain == ($bits(drain))'(DRAIN)) state <= IFFT_CMP;
        end
        IFFT_CMP:   if (cmp_flag) begin state <= IFFT_DBG; loop_cnt <= loop_cnt + 1'b1; end
        IFFT_DBG:   state <= (loop_cnt == 16'(N_MS)) ? IFFT_STOP : IFFT_INIT;
        default:    ;
      endcase
    end
  end

  always_comb begin
    ce       = 1'b1;
    fwd_inv  = 1'b0;
    mwr      = (state == IFFT_INIT) && prod_pre;
    start    = (state == IFFT_WADR);
    mrd      = (state == IFFT_WAIT1);
    peak_clr = (state == IFFT_WAIT1);
    cnt_eni  = (state == IFFT_WAIT2) || ((state == IFFT_RDFFT) && (addr_x < AW'(KEEP)));
    max_en   = (state == IFFT_WAIT3) && (drain == ($bits(drain))'(DRAIN));
    acq_done = (state == IFFT_STOP);
  end
endmodule
