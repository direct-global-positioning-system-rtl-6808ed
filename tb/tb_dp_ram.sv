// tb_dp_ram: random reads and writes on both ports against an array model;
// checks the one-clock read latency and read-before-write on port A.
module tb_dp_ram;
  localparam int D = 64, W = 16;
  logic clk = 0, ena = 0, wea = 0, web = 0;
  logic [5:0] addra = 0, addrb = 0;
  logic [W-1:0] dia = 0, dib = 0, doa, dob;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;
  dp_ram #(.DEPTH(D), .WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [W-1:0] expa, expb;
    bit rda;
    // fill through port B
    for (int i = 0; i < D; i++) begin
      @(negedge clk) web = 1; addrb = 6'(i); dib = W'($urandom); model[i] = dib;
    end
    @(negedge clk) web = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ena = $urandom_range(0, 1); wea = ena && ($urandom_range(0, 3) == 0);
      addra = 6'($urandom_range(0, D - 1)); dia = W'($urandom);
      web = ($urandom_range(0, 3) == 0); addrb = 6'($urandom_range(0, D - 1)); dib = W'($urandom);
      if (web && wea && addra == addrb) web = 0;
      rda = ena; expa = model[addra]; expb = model[addrb];
      @(posedge clk); #1;
      if (wea) model[addra] = dia;
      if (web) model[addrb] = dib;
      if (rda) begin
        checks++;
        if (doa !== expa) begin failures++; if (failures < 10) $display("FAIL A k=%0d %h vs %h", k, doa, expa); end
      end
      checks++;
      if (dob !== expb) begin failures++; if (failures < 10) $display("FAIL B k=%0d %h vs %h", k, dob, expb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
