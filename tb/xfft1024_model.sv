// xfft1024_model: behavioural model of a 1024-point FFT/IFFT core with the
// handshake expected by the acquisition processor. Not synthesizable; for
// simulation only.
//
// Loading: mwr at cycle t -> xn is taken in cycles t+1..t+1024 (addr_x = index).
// start: the transform of the loaded block is computed (floating point radix-2
// FFT, forward when fwd_inv = 1, inverse otherwise), divided by 1024, rounded and
// saturated to 16 bits; done pulses LATENCY cycles after start.
// Unloading: mrd at cycle t -> result k is on xk in cycle t+1+k (addr_x = k).
// ce low freezes the model. transforms counts completed transforms.
module xfft1024_model
  import pacq_pkg::*;
#(
  parameter int LATENCY = 4145
) (
  input  logic       clk,
  input  logic       ce,
  input  logic       fwd_inv,
  input  logic       mwr,
  input  logic       start,
  input  logic       mrd,
  input  cplx16_t    xn,
  output logic       done,
  output logic [9:0] addr_x,
  output cplx16_t    xk
);
  localparam int N = 1024;
  real br[N], bi[N];
  cplx16_t res[N];
  bit loading = 0, reading = 0;
  int lidx = 0, ridx = 0, countdown = -1;
  int transforms = 0;

  function automatic logic signed [15:0] rnd_sat(input real v);
    real r;
    r = v / 1024.0;
    r = (r >= 0.0) ? $floor(r + 0.5) : -$floor(-r + 0.5);
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return 16'(int'(r));
  endfunction

  task automatic transform(input bit fwd);
    real ar[N], ai[N];
    int j, bits;
    real pi, s;
    pi = 3.14159265358979323846;
    s = fwd ? -1.0 : 1.0;
    bits = 10;
    for (int k = 0; k < N; k++) begin
      j = 0;
      for (int b = 0; b < bits; b++) j |= ((k >> b) & 1) << (bits - 1 - b);
      ar[j] = br[k]; ai[j] = bi[k];
    end
    for (int len = 2; len <= N; len *= 2) begin
      for (int i = 0; i < N; i += len) begin
        for (int k = 0; k < len / 2; k++) begin
          real wr, wi, tr, ti;
          wr = $cos(2.0 * pi * k / len);
          wi = s * $sin(2.0 * pi * k / len);
          tr = ar[i+k+len/2] * wr - ai[i+k+len/2] * wi;
          ti = ar[i+k+len/2] * wi + ai[i+k+len/2] * wr;
          ar[i+k+len/2] = ar[i+k] - tr; ai[i+k+len/2] = ai[i+k] - ti;
          ar[i+k] = ar[i+k] + tr;       ai[i+k] = ai[i+k] + ti;
        end
      end
    end
    for (int k = 0; k < N; k++) begin
      res[k].re = rnd_sat(ar[k]);
      res[k].im = rnd_sat(ai[k]);
    end
  endtask

  always @(posedge clk) begin
    done <= 1'b0;
    if (ce) begin
      if (loading) begin
        br[lidx] = real'(xn.re); bi[lidx] = real'(xn.im);
        lidx++;
        if (lidx == N) loading = 0;
      end
      if (mwr) begin loading = 1; lidx = 0; end
      if (reading) begin
        ridx++;
        if (ridx == N) reading = 0;
      end
      if (mrd) begin reading = 1; ridx = 0; end
      if (countdown > 0) begin
        countdown--;
        if (countdown == 0) begin done <= 1'b1; countdown = -1; end
      end
      if (start) begin
        transform(fwd_inv);
        transforms++;
        countdown = LATENCY;
      end
    end
  end

  always_comb begin
    addr_x = loading ? 10'(lidx) : (reading ? 10'(ridx) : 10'd0);
    xk     = reading ? res[ridx] : '0;
  end
  initial done = 1'b0;
endmodule
