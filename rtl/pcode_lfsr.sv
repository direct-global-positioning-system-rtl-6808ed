// pcode_lfsr: one 12-stage P-code shift register (X1A, X1B, X2A or X2B).
//
// Each advance shifts the register one stage towards stage 12 and feeds the
// modulo-2 sum of the tapped stages into stage 1; stage 12 is the output chip.
// The register is "short cycled": reload forces the initial vector instead of the
// shifted value, and load writes an arbitrary vector (start at any chip of a
// week). at_last flags the last vector of the short cycle. All controls are
// synchronous; load has priority over reload, reload over advance. The taps and
// vectors are parameters so one module serves all four registers.
module pcode_lfsr #(
  parameter logic [11:0] TAPS = 12'b1100_1010_0000,
  parameter logic [11:0] INIT = 12'h248,
  parameter logic [11:0] LAST = 12'h124
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [11:0] load_val,
  input  logic        adv,
  input  logic        reload,
  output logic [11:0] state,
  output logic        q,
  output logic        at_last
);
  always_ff @(posedge clk) begin
    if (!rst_n)      state <= INIT;
    else if (load)   state <= load_val;
    else if (reload) state <= INIT;
    else if (adv)    state <= {state[10:0], ^(state & TAPS)};
  end
  assign q       = state[11];
  assign at_last = (state == LAST);
endmodule
