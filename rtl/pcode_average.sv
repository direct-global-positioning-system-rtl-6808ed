// pcode_average: AVERAGE unit of the local reference generation unit.
//
// Turns the 10230 antipodal chips of one millisecond into 512 reference points:
// points 0..510 are sums of 20 consecutive chips, point 511 is the sum of the
// last 10 chips of the millisecond. Each sum is scaled up by 2048 (shift left by
// SCALE_SHIFT) so that the 16-bit FFT input range is used, and saturated to
// +/-32767 because a sum of 20 equal chips times 2048 would not fit 16 bits.
//
// Interface: start_avg clears the accumulator and chip counters (start of a
// millisecond); each din_valid adds din. When a group completes, qtt is presented
// with qtt_valid for one cycle, in the
// cycle after the group's last chip. end1ms pulses with the 512th point. The
// grouping, the 10-chip last group and the 2048 scaling follow the document; the
// saturation is this design's choice.
module pcode_average #(
  parameter int unsigned GROUP        = 20,
  parameter int unsigned CHIPS_PER_MS = 10230,
  parameter int unsigned POINTS       = 512,
  parameter int unsigned SCALE_SHIFT  = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_avg,
  input  logic              din_valid,
  input  logic signed [1:0] din,
  output logic signed [15:0] qtt,
  output logic              qtt_valid,
  output logic              end1ms
);
  localparam int unsigned CW = $clog2(CHIPS_PER_MS + 1);
  localparam int unsigned GW = $clog2(GROUP + 1);
  localparam int unsigned IW = $clog2(POINTS);

  logic [CW-1:0]     chip_cnt;   // chips of this ms already summed
  logic [GW-1:0]     grp_cnt;    // chips in the current group
  logic signed [7:0] acc;
  logic [IW-1:0]     pt_cnt;

  logic signed [7:0]  acc_next;
  logic               grp_done, ms_done;
  logic signed [39:0] scaled;

  always_comb begin
    acc_next = acc + 8'(din);
    ms_done  = (chip_cnt == CW'(CHIPS_PER_MS - 1));
    grp_done = (grp_cnt == GW'(GROUP - 1)) || ms_done;
    scaled   = 40'(acc_next) <<< SCALE_SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || start_avg) begin
      chip_cnt  <= '0;
      grp_cnt   <= '0;
      acc       <= '0;
      pt_cnt    <= '0;
      qtt       <= '0;
      qtt_valid <= 1'b0;
      end1ms    <= 1'b0;
    end else begin
      qtt_valid <= 1'b0;
      end1ms    <= 1'b0;
      if (din_valid) begin
        if (grp_done) begin
          qtt       <= pacq_pkg::sat16(scaled);
          qtt_valid <= 1'b1;
          pt_cnt    <= pt_cnt + 1'b1;
          end1ms    <= ms_done;
          acc       <= '0;
          grp_cnt   <= '0;
        end else begin
          acc     <= acc_next;
          grp_cnt <= grp_cnt + 1'b1;
        end
        chip_cnt <= ms_done ? '0 : chip_cnt + 1'b1;
      end
    end
  end
endmodule
