// pcode_mach: PCODE_MACH controller and RAM2 write-address generator.
//
// Sequences the local reference generation unit. After reset it waits until the
// host has finished loading the signal spectrum (data_ld low) and RAM2 has been
// zero-filled (ram2_zeroed from the FFT controller). It then clears the averaging
// unit with a one-cycle start_avg pulse and raises start_pcode, which enables the
// P-code generator for exactly N_MS * CHIPS_PER_MS chips (one chip per clock,
// consecutive milliseconds). Every averaged point (qtt_valid) is written to RAM2
// port B at address ram2_addrb = 0..POINTS-1, with ram2_web; the address wraps
// every millisecond, so the upper half of RAM2 keeps its zeros. done stays high
// after the last chip. The start condition and the state set are this design's
// choice; the signals and their roles follow the document.
module pcode_mach #(
  parameter int unsigned N_MS         = 10,
  parameter int unsigned CHIPS_PER_MS = 10230,
  parameter int unsigned POINTS       = 512,
  parameter int unsigned AW           = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          data_ld,
  input  logic          ram2_zeroed,
  input  logic          qtt_valid,
  output logic          start_pcode,
  output logic          start_avg,
  output logic [AW-1:0] ram2_addrb,
  output logic          ram2_web,
  output logic          done
);
  typedef enum logic [1:0] {PC_IDLE, PC_RUN, PC_STOP} pc_state_t;
  pc_state_t state;

  localparam int unsigned CW = $clog2(CHIPS_PER_MS);
  localparam int unsigned MW = $clog2(N_MS + 1);
  logic [CW-1:0] chip_cnt;
  logic [MW-1:0] ms_cnt;
  logic [AW-1:0] wr_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= PC_IDLE;
      chip_cnt  <= '0;
      ms_cnt    <= '0;
      start_avg <= 1'b0;
    end else begin
      start_avg <= 1'b0;
      case (state)
        PC_IDLE: if (!data_ld && ram2_zeroed) begin
          state     <= PC_RUN;
          start_avg <= 1'b1;
        end
        PC_RUN: begin
          if (chip_cnt == CW'(CHIPS_PER_MS - 1)) begin
            chip_cnt <= '0;
            ms_cnt   <= ms_cnt + 1'b1;
            if (ms_cnt == MW'(N_MS - 1)) state <= PC_STOP;
          end else begin
            chip_cnt <= chip_cnt + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // RAM2 port B address generator
  always_ff @(posedge clk) begin
    if (!rst_n || start_avg) wr_addr <= '0;
    else if (qtt_valid)      wr_addr <= (wr_addr == AW'(POINTS - 1)) ? '0 : wr_addr + 1'b1;
  end

  assign start_pcode = (state == PC_RUN);
  assign ram2_web    = qtt_valid;
  assign ram2_addrb  = wr_addr;
  assign done        = (state == PC_STOP);
endmodule
