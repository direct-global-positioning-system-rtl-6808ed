// pcode_acq_top: direct GPS P-code acquisition processor (code phase search).
//
// The host loads the 1024-point spectrum of 2 ms of demodulated, 128-sample-
// averaged signal into RAM_MULT (write_en, d) and then drops data_ld. The
// processor then, for each of N_MS consecutive milliseconds of local P-code:
//   1. generates 10230 chips (pcode_gen, one chip per clock), converts them to
//      +/-1 and sums every 20 chips into 512 points scaled by 2048 (RAM2 holds
//      them, its upper 512 words stay zero: zero padding);
//   2. runs a forward 1024-point FFT of RAM2 on the external FFT core;
//   3. multiplies the signal spectrum by the conjugate of the reference
//      spectrum (three-multiplier complex multiplier) and streams the products
//      into the external IFFT core;
//   4. squares the first 512 IFFT outputs (correlation amplitude square), finds
//      the loop's peak and its location, and merges it into the two largest
//      peaks over all loops (q1/q1_loc, q2/q2_loc).
// acq_done rises after the last loop. Locations are code phases in units of the
// 128-sample (20-chip) averaging, 0..511, within the loop where they occurred.
//
// The two Xilinx FFT/IFFT cores are vendor IP and are not part of this RTL: their
// control and data signals are ports (fft_*, ifft_*). Handshake expected from a
// core: mwr at cycle t -> samples xn taken in t+1..t+1024; start pulse; done
// pulse when the transform is finished; mrd at t -> result k on xk in cycle
// t+1+k; addr_x = sample index during loading and unloading. Forward output
// scaled by 1/1024 (16-bit), as the document describes for its core.
//
// Some outputs are constant by design: fft_fwd_inv (1), ifft_fwd_inv (0),
// ifft_ce (1) and the imaginary part of fft_xn (the reference is real).
//
// Reset rst_n is active low and synchronous. The unit partitioning and the data
// flow follow the document; handshake timing, widths not given in it and the
// start condition of the P-code generator are this design's choices.
module pcode_acq_top
  import pacq_pkg::*;
#(
  parameter int unsigned N_MS       = 10,
  parameter int unsigned PROD_SHIFT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // host interface
  input  logic        write_en,
  input  cplx16_t     d,
  input  logic        data_ld,
  input  logic        pcode_load,
  input  pcode_init_t pinit,
  input  logic [5:0]  prn,
  // forward FFT core
  output logic        fft_ce,
  output logic        fft_fwd_inv,
  output logic        fft_mwr,
  output logic        fft_start,
  output logic        fft_mrd,
  output cplx16_t     fft_xn,
  input  logic        fft_done,
  input  logic [9:0]  fft_addr_x,
  input  cplx16_t     fft_xk,
  // inverse FFT core
  output logic        ifft_ce,
  output logic        ifft_fwd_inv,
  output logic        ifft_mwr,
  output logic        ifft_start,
  output logic        ifft_mrd,
  output cplx16_t     ifft_xn,
  input  logic        ifft_done,
  input  logic [9:0]  ifft_addr_x,
  input  cplx16_t     ifft_xk,
  // results
  output logic [31:0] q1,
  output logic [8:0]  q1_loc,
  output logic [31:0] q2,
  output logic [8:0]  q2_loc,
  output logic        cmp_flag,
  output logic        done_cmp,
  output logic [15:0] loop_cnt,
  output logic        acq_done
);
  // ---- local reference generation unit -------------------------------------------
  logic start_pcode, start_avg, p, pcode_done;
  logic signed [1:0] ram1_doa;
  logic ram1_valid;
  logic signed [15:0] qtt;
  logic qtt_valid, end1ms;
  logic [9:0] ram2_addrb;
  logic ram2_web;
  logic ram2_zeroed;

  pcode_gen u_pcode (
    .clk, .rst_n, .en(start_pcode), .load(pcode_load), .pinit, .prn, .p,
    .x1aq(), .x1bq(), .x2aq(), .x2bq(), .x1a_vec(), .x1b_vec(), .x2a_vec(), .x2b_vec(),
    .setx1aepoch(), .x1epoch(), .x2epoch(), .endweek(), .zcount());

  pcode_binary_conv u_conv (
    .clk, .rst_n, .en(start_pcode), .p, .ram1_doa, .valid(ram1_valid));

  pcode_average u_avg (
    .clk, .rst_n, .start_avg, .din_valid(ram1_valid), .din(ram1_doa),
    .qtt, .qtt_valid, .end1ms);

  pcode_mach #(.N_MS(N_MS)) u_pmach (
    .clk, .rst_n, .data_ld, .ram2_zeroed, .qtt_valid, .start_pcode, .start_avg,
    .ram2_addrb, .ram2_web, .done(pcode_done));

  // ---- local reference FFT processor ---------------------------------------------
  logic        ram2_ena, ram2_wea;
  logic [9:0]  ram2_addra;
  logic [15:0] ram2_doa;
  logic        ram_mult_full, ram_mult_rea, mult_prod_a_ce;
  logic [9:0]  ram_mult_addra;
  logic [15:0] fft_loop_cnt;

  dp_ram #(.DEPTH(1024), .WIDTH(16)) u_ram2 (
    .clk, .ena(ram2_ena), .wea(ram2_wea), .addra(ram2_addra), .dia('0), .doa(ram2_doa),
    .web(ram2_web), .addrb(ram2_addrb), .dib(qtt), .dob());

  fft_mach u_fmach (
    .clk, .rst_n, .ram_mult_full, .end1ms, .ram2_ena, .ram2_wea, .ram2_addra, .ram2_zeroed,
    .ce(fft_ce), .fwd_inv(fft_fwd_inv), .mwr(fft_mwr), .start(fft_start), .mrd(fft_mrd),
    .done(fft_done), .addr_x(fft_addr_x), .ram_mult_rea, .ram_mult_addra, .mult_prod_a_ce,
    .loop_cnt(fft_loop_cnt));

  assign fft_xn = '{re: ram2_doa, im: 16'sd0};

  // ---- complex conjugate multiplication processor -------------------------------
  logic [9:0] host_addr;
  cplx16_t    ram_mult_doa;
  logic       prod_pre, mult_prod_a_web;
  logic signed [15:0] ram2_doa_dubr, ram2_doa_dubi;

  // RAM_MULT write-address generator for the host load
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      host_addr     <= '0;
      ram_mult_full <= 1'b0;
    end else if (write_en && !ram_mult_full) begin
      host_addr <= host_addr + 1'b1;
      if (host_addr == 10'd1023) ram_mult_full <= 1'b1;
    end
  end

  dp_ram #(.DEPTH(1024), .WIDTH(32)) u_ram_mult (
    .clk, .ena(ram_mult_rea), .wea(1'b0), .addra(ram_mult_addra), .dia('0), .doa(ram_mult_doa),
    .web(write_en && !ram_mult_full), .addrb(host_addr), .dib(d), .dob());

  cconj_mult #(.PROD_SHIFT(PROD_SHIFT)) u_cmult (
    .clk, .rst_n, .mult_prod_a_ce, .a(ram_mult_doa), .d(fft_xk), .prod_pre, .mult_prod_a_web,
    .ram2_doa_dubr, .ram2_doa_dubi);

  // ---- IFFT processor -------------------------------------------------------------
  logic cnt_eni, peak_clr, max_en;

  ifft_mach #(.N_MS(N_MS)) u_imach (
    .clk, .rst_n, .prod_pre, .ce(ifft_ce), .fwd_inv(ifft_fwd_inv), .mwr(ifft_mwr),
    .start(ifft_start), .mrd(ifft_mrd), .done(ifft_done), .addr_x(ifft_addr_x),
    .cnt_eni, .peak_clr, .max_en, .cmp_flag, .loop_cnt, .acq_done);

  assign ifft_xn = '{re: ram2_doa_dubr, im: ram2_doa_dubi};

  // ---- correlation amplitude square, peak, location, maximum selection ----------
  logic [31:0] ram2_max_doa_dub, cmpq;
  logic        mult_abs_web, a_gt_b;
  logic [8:0]  locq;

  corr_sq u_sq (
    .clk, .rst_n, .cnt_eni, .ifft_di_r(ifft_xk.re), .ifft_di_i(ifft_xk.im),
    .ram2_max_doa_dub, .mult_abs_web);

  corr_peak u_peak (
    .clk, .rst_n, .clr(peak_clr), .en(mult_abs_web), .ram2_max_doa_dub, .cmpq, .a_gt_b);

  corr_peak_loc u_loc (
    .clk, .rst_n, .clr(peak_clr), .en(mult_abs_web), .a_gt_b, .locq);

  peak_loc12 u_max (
    .clk, .rst_n, .clr(1'b0), .max_en, .peak(cmpq), .peak_loc(locq),
    .cp1(q1), .cp2(q2), .cp1_loc(q1_loc), .cp2_loc(q2_loc), .cmp_flag, .done_cmp);
endmodule
