// pcode_gen: GPS P-code generator that can start at any chip of the week.
//
// Four 12-stage LFSRs (X1A, X1B, X2A, X2B) run at one chip per enabled clock.
// X1A and X2A are short-cycled to 4092 chips, X1B and X2B to 4093 chips.
// Division counters count completed short cycles: after 3749 cycles X1B (X2B)
// holds its last vector until X1A (X2A) completes 3750 cycles. X1A completing
// 3750 cycles is the X1 epoch (1.5 s) and advances the z-counter. The X2 epoch
// is 37 chips longer: X2A holds its last vector for 37 extra chips before both
// X2 registers restart. In the last X1A period of the week (z-count 403199,
// 3750th X1A cycle) X1B, X2A and X2B hold as soon as they reach their last
// vector, and all registers restart together with the new week.
// X1 = X1A ^ X1B, X2 = X2A ^ X2B, and P_i = X1 ^ X2 delayed by i chips (i = prn,
// 1..37) through a 37-bit delay line.
//
// Interface: load (synchronous) takes the start state from pinit, which a tuning
// model derives from the chip number N in the week; en advances one chip. p and
// the epoch flags are combinational from the registers and describe the current
// chip; x1aq..x2bq are stage 12 of each register and x1a_vec..x2b_vec the
// whole vectors (stage 12 = MSB).
//
// The register structure, polynomials, cycle counts, 37-chip extension and
// end-of-week rule follow the document. The load format (0-based positions and
// completed-cycle counts, loadable delay line) is this design's own.
module pcode_gen
  import pacq_pkg::*;
#(
  parameter int unsigned Z_WEEK = 403200   // X1 epochs per week
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        load,
  input  pcode_init_t pinit,
  input  logic [5:0]  prn,
  output logic        p,
  output logic        x1aq,
  output logic        x1bq,
  output logic        x2aq,
  output logic        x2bq,
  output logic [11:0] x1a_vec,
  output logic [11:0] x1b_vec,
  output logic [11:0] x2a_vec,
  output logic [11:0] x2b_vec,
  output logic        setx1aepoch,
  output logic        x1epoch,
  output logic        x2epoch,
  output logic        endweek,
  output logic [18:0] zcount
);
  logic [11:0] x1a_st, x1b_st, x2a_st, x2b_st;
  logic        x1a_last, x1b_last, x2a_last, x2b_last;
  logic [11:0] x1a_cnt, x1b_cnt, x2a_cnt, x2b_cnt;
  logic [5:0]  dv;
  logic [36:0] x2_hist;

  // ---- control decisions for the current chip ------------------------------------
  logic x1a_end, x1_ep, wk_last, wk_end, x2_ep;
  logic x1b_hold, x2a_hold, x2b_hold;
  logic x1b_rl, x2a_rl, x2b_rl;

  always_comb begin
    x1a_end  = x1a_last;
    x1_ep    = x1a_last && (x1a_cnt == 12'(XA_CYCLES - 1));
    wk_last  = (zcount == 19'(Z_WEEK - 1)) && (x1a_cnt == 12'(XA_CYCLES - 1));
    wk_end   = x1_ep && (zcount == 19'(Z_WEEK - 1));
    x2_ep    = x2a_last && (x2a_cnt == 12'(XA_CYCLES - 1)) && (dv == 6'(X2_EXTRA)) && !wk_last;
    // holds (register keeps its last vector for the next chip)
    x1b_hold = x1b_last && ((x1b_cnt == 12'(XB_CYCLES - 1)) || wk_last) && !x1_ep;
    x2a_hold = x2a_last && ((x2a_cnt == 12'(XA_CYCLES - 1)) || wk_last) && !x2_ep && !wk_end;
    x2b_hold = x2b_last && ((x2b_cnt == 12'(XB_CYCLES - 1)) || wk_last) && !x2_ep && !wk_end;
    // short-cycle restarts
    x1b_rl   = x1_ep || (x1b_last && !x1b_hold);
    x2a_rl   = wk_end || x2_ep || (x2a_last && !x2a_hold);
    x2b_rl   = wk_end || x2_ep || (x2b_last && !x2b_hold);
  end

  pcode_lfsr #(.TAPS(X1A_TAPS), .INIT(X1A_INIT), .LAST(X1A_LAST)) u_x1a (
    .clk, .rst_n, .load, .load_val(pinit.x1a_st), .adv(en), .reload(en && x1a_end),
    .state(x1a_st), .q(x1aq), .at_last(x1a_last));
  pcode_lfsr #(.TAPS(X1B_TAPS), .INIT(X1B_INIT), .LAST(X1B_LAST)) u_x1b (
    .clk, .rst_n, .load, .load_val(pinit.x1b_st), .adv(en && !x1b_hold), .reload(en && x1b_rl),
    .state(x1b_st), .q(x1bq), .at_last(x1b_last));
  pcode_lfsr #(.TAPS(X2A_TAPS), .INIT(X2A_INIT), .LAST(X2A_LAST)) u_x2a (
    .clk, .rst_n, .load, .load_val(pinit.x2a_st), .adv(en && !x2a_hold), .reload(en && x2a_rl),
    .state(x2a_st), .q(x2aq), .at_last(x2a_last));
  pcode_lfsr #(.TAPS(X2B_TAPS), .INIT(X2B_INIT), .LAST(X2B_LAST)) u_x2b (
    .clk, .rst_n, .load, .load_val(pinit.x2b_st), .adv(en && !x2b_hold), .reload(en && x2b_rl),
    .state(x2b_st), .q(x2bq), .at_last(x2b_last));

  // ---- division counters, 37-chip extension, z-counter, X2 delay line -------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1a_cnt <= '0; x1b_cnt <= '0; x2a_cnt <= '0; x2b_cnt <= '0;
      dv <= '0; zcount <= '0; x2_hist <= '0;
    end else if (load) begin
      x1a_cnt <= pinit.x1a_cnt; x1b_cnt <= pinit.x1b_cnt;
      x2a_cnt <= pinit.x2a_cnt; x2b_cnt <= pinit.x2b_cnt;
      dv <= pinit.dv; zcount <= pinit.zcount; x2_hist <= pinit.x2_hist;
    end else if (en) begin
      x2_hist <= {x2_hist[35:0], x2aq ^ x2bq};
      if (x1a_end) x1a_cnt <= x1_ep ? '0 : x1a_cnt + 12'd1;
      if (x1_ep)   zcount  <= wk_end ? '0 : zcount + 19'd1;
      if (x1_ep)         x1b_cnt <= '0;
      else if (x1b_rl)   x1b_cnt <= x1b_cnt + 12'd1;
      if (wk_end || x2_ep) begin
        x2a_cnt <= '0; x2b_cnt <= '0; dv <= '0;
      end else begin
        if (x2a_rl) x2a_cnt <= x2a_cnt + 12'd1;
        if (x2b_rl) x2b_cnt <= x2b_cnt + 12'd1;
        if (x2a_hold && !wk_last) dv <= dv + 6'd1;
      end
    end
  end

  logic [5:0] tap;
  assign tap         = (prn == '0) ? 6'd0 : ((prn > 6'(PRN_MAX)) ? 6'(PRN_MAX - 1) : prn - 6'd1);
  assign p           = x1aq ^ x1bq ^ x2_hist[tap];
  assign setx1aepoch = x1a_last;
  assign x1epoch     = x1_ep;
  assign x2epoch     = x2_ep;
  assign endweek     = wk_last;
  assign x1a_vec     = x1a_st;
  assign x1b_vec     = x1b_st;
  assign x2a_vec     = x2a_st;
  assign x2b_vec     = x2b_st;
endmodule
