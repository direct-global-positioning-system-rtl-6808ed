// dp_ram: dual-port block RAM (RAM2, RAM_MULT).
//
// Port A: synchronous read (doa valid the clock after ena) and write (wea).
// Port B: synchronous write (web) and read (dob). Both ports share one clock.
// A read of an address written in the same cycle returns the old word. There is
// no reset of the contents: the controllers fill the RAM before it is read.
// The document uses Virtex-E block RAMs; the read latency of one clock is this
// design's choice matching such RAMs.
module dp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             ena,
  input  logic             wea,
  input  logic [AW-1:0]    addra,
  input  logic [WIDTH-1:0] dia,
  output logic [WIDTH-1:0] doa,
  input  logic             web,
  input  logic [AW-1:0]    addrb,
  input  logic [WIDTH-1:0] dib,
  output logic [WIDTH-1:0] dob
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ena) begin
      if (wea) mem[addra] <= dia;
      doa <= mem[addra];
    end
  end
  always_ff @(posedge clk) begin
    if (web) mem[addrb] <= dib;
    dob <= mem[addrb];
  end
endmodule
