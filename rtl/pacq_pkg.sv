// pacq_pkg: types and constants shared by the direct P-code acquisition processor.
//
// The P-code constants follow the GPS interface specification as quoted in the
// design description: four 12-stage LFSRs, short cycles of 4092 (X1A, X2A) and
// 4093 (X1B, X2B) chips, 3750 X1A cycles per X1 epoch, 3749 X1B cycles before
// X1B halts, 37 extra chips per X2 epoch and 403200 X1 epochs per week.
// The hex vectors are written with LFSR stage 12 as the MSB and stage 1 as the LSB.
// The data widths (16-bit complex samples, 32-bit squared magnitude) follow the
// 16-bit interface of the FFT/IFFT core.
package pacq_pkg;

  // ---- P-code generator constants ---------------------------------------------------
  localparam logic [11:0] X1A_INIT = 12'h248;  // vector of the first chip after an epoch
  localparam logic [11:0] X1B_INIT = 12'h554;
  localparam logic [11:0] X2A_INIT = 12'h925;
  localparam logic [11:0] X2B_INIT = 12'h554;
  localparam logic [11:0] X1A_LAST = 12'h124;  // vector of chip 4092 / 4093
  localparam logic [11:0] X1B_LAST = 12'h2AA;
  localparam logic [11:0] X2A_LAST = 12'hC92;
  localparam logic [11:0] X2B_LAST = 12'h2AA;
  // Feedback taps: bit k-1 set for stage k of the characteristic polynomial.
  localparam logic [11:0] X1A_TAPS = 12'b1100_1010_0000;  // 6, 8, 11, 12
  localparam logic [11:0] X1B_TAPS = 12'b1111_1001_0011;  // 1, 2, 5, 8, 9, 10, 11, 12
  localparam logic [11:0] X2A_TAPS = 12'b1111_1101_1101;  // 1, 3, 4, 5, 7, 8, 9, 10, 11, 12
  localparam logic [11:0] X2B_TAPS = 12'b1001_1000_1110;  // 2, 3, 4, 8, 9, 12

  localparam int unsigned XA_CYCLES   = 3750;  // X1A / X2A short cycles per epoch
  localparam int unsigned XB_CYCLES   = 3749;  // X1B / X2B short cycles before halting
  localparam int unsigned X2_EXTRA    = 37;    // extra chips of an X2 epoch
  localparam int unsigned PRN_MAX     = 37;    // largest X2 delay i

  // Start state of the P-code generator, produced by the tuning model. Every field
  // describes the chip that will be generated next: *_st are the LFSR vectors,
  // *_cnt the number of short cycles already completed in the current epoch,
  // dv the position inside the 37-chip X2 extension (1..37 while X2A is held in
  // its last vector after its 3750th cycle, 0 otherwise, current chip included),
  // zcount the number of X1 epochs completed in the week and x2_hist the last
  // 37 X2 chips (bit 0 = previous chip) for the X2i delay line.
  typedef struct packed {
    logic [11:0] x1a_st, x1b_st, x2a_st, x2b_st;
    logic [11:0] x1a_cnt, x1b_cnt, x2a_cnt, x2b_cnt;
    logic [5:0]  dv;
    logic [18:0] zcount;
    logic [36:0] x2_hist;
  } pcode_init_t;

  // ---- datapath types ------------------------------------------------------------
  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx16_t;

  // Saturate a wide signed value to 16 bits.
  function automatic logic signed [15:0] sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sh7FFF;
    else if (v < -40'sd32767) return -16'sh7FFF;
    else                      return v[15:0];
  endfunction

endpackage
