// peak_loc12: maximum selection unit (PEAK_LOC12) with its controller MAX12_PROC.
//
// Keeps the largest (max1) and second largest (max2) per-loop correlation peaks
// and their locations over all loops. On max_en the new per-loop result
// (peak, peak_loc) is stored as max3; comparators give max31_gt = max3 > max1
// and max32_gt = max3 > max2, from which max_ind and mid_ind select the new
// first and second values among {max1, max2, max3}. The results are registered
// as cp1, cp2, cp1_loc, cp2_loc and cmp_flag pulses for one clock. done_cmp is
// high when no comparison is running. clr zeroes max1 and max2.
// MAX12_PROC states: IDLE, LOAD (max3 <= peak), CMP (update), DONE (cmp_flag).
// The datapath follows the document; the state sequence is this design's choice.
module peak_loc12 #(
  parameter int unsigned LW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          max_en,
  input  logic [31:0]   peak,
  input  logic [LW-1:0] peak_loc,
  output logic [31:0]   cp1,
  output logic [31:0]   cp2,
  output logic [LW-1:0] cp1_loc,
  output logic [LW-1:0] cp2_loc,
  output logic          cmp_flag,
  output logic          done_cmp
);
  typedef enum logic [1:0] {M_IDLE, M_LOAD, M_CMP, M_DONE} max_state_t;
  max_state_t state;

  logic [31:0]   max1, max2, max3;
  logic [LW-1:0] max1_loc, max2_loc, max3_loc;
  logic          max31_gt, max32_gt;
  logic [1:0]    max_ind, mid_ind;   // 1 = old max1, 2 = old max2, 3 = max3

  always_comb begin
    max31_gt = max3 > max1;
    max32_gt = max3 > max2;
    if (max31_gt)      begin max_ind = 2'd3; mid_ind = 2'd1; end
    else if (max32_gt) begin max_ind = 2'd1; mid_ind = 2'd3; end
    else               begin max_ind = 2'd1; mid_ind = 2'd2; end
  end

  function automatic logic [31:0] pick(input logic [1:0] s, input logic [31:0] v1,
                                       input logic [31:0] v2, input logic [31:0] v3);
    return (s == 2'd3) ? v3 : ((s == 2'd2) ? v2 : v1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      state <= M_IDLE;
      max1 <= '0; max2 <= '0; max3 <= '0;
      max1_loc <= '0; max2_loc <= '0; max3_loc <= '0;
      cp1 <= '0; cp2 <= '0; cp1_loc <= '0; cp2_loc <= '0;
      cmp_flag <= 1'b0;
    end else begin
      cmp_flag <= 1'b0;
      case (state)
        M_IDLE: if (max_en) state <= M_LOAD;
        M_LOAD: begin
          max3     <= peak;
          max3_loc <= peak_loc;
          state    <= M_CMP;
        end
        M_CMP: begin
          max1     <= pick(max_ind, max1, max2, max3);
          max2     <= pick(mid_ind, max1, max2, max3);
          max1_loc <= LW'(pick(max_ind, 32'(max1_loc), 32'(max2_loc), 32'(max3_loc)));
          max2_loc <= LW'(pick(mid_ind, 32'(max1_loc), 32'(max2_loc), 32'(max3_loc)));
          state    <= M_DONE;
        end
        M_DONE: begin
          cp1 <= max1; cp2 <= max2; cp1_loc <= max1_loc; cp2_loc <= max2_loc;
          cmp_flag <= 1'b1;
          state    <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  assign done_cmp = (state == M_IDLE);
endmodule
