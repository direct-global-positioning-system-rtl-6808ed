# Direct GPS P-code acquisition processor

A GPS receiver that wants the precise (P) code normally finds the short C/A code
first and hands over from it. This design searches for the P-code directly. The
P-code runs at 10.23 Mchip/s and repeats only once a week, so the receiver must
already know roughly what time it is. Even then it must search thousands of code
phases. The search is done in the frequency domain, with far fewer samples than
the raw chip rate would need:

* **Direct averaging.** One millisecond of local P-code is 10230 chips. Each run
  of 20 chips is summed into one point, which gives 512 points per millisecond.
  The received signal is averaged the same way on a host PC (128 samples per
  point) before it reaches the hardware.
* **Zero padding.** The 512 reference points are padded with 512 zeros. A
  1024-point circular correlation then gives 512 valid linear lags. Those lags
  cover one millisecond of code phase, in steps of 20 chips.
* **FFT correlation.** The processor computes the correlation as
  `IFFT( S · conj(FFT(r)) )`. Here `S` is the signal spectrum supplied by the
  host and `r` is the averaged local reference.
* **Sliding over time.** The local reference is regenerated for each of 10
  consecutive milliseconds, while the signal spectrum stays the same. The
  processor keeps the two largest correlation peaks found over all 10 loops,
  with their code phases. A clear gap between the largest and second-largest
  peak means the code has been acquired.

The processor assumes the Doppler frequency has already been removed: the host
supplies a demodulated signal.

## Data flow and timing

```
 host ──write_en,d──► RAM_MULT (1024 x 32) ─────────────────────────┐
                                                                    ▼
 pcode_gen ─p─► pcode_binary_conv ─±1─► pcode_average ─Qtt─► RAM2 ─► FFT core ─► cconj_mult ─► IFFT core
     ▲                                      │ end1ms    (1024x16)    (fft_mach)                 (ifft_mach)
 pcode_mach (start_pcode, start_avg, RAM2 address)                                                  │
                                                                                                     ▼
                         q1,q1_loc,q2,q2_loc ◄── peak_loc12 ◄── corr_peak / corr_peak_loc ◄── corr_sq
```

The processor runs in this order:

1. The host writes 1024 complex words into RAM_MULT. After the 1024th word,
   `ram_mult_full` is set. `fft_mach` then writes 1024 zeros into RAM2 and
   raises `ram2_zeroed`.
2. The host releases `data_ld`. Once RAM2 has been zeroed, `pcode_mach` enables
   the P-code generator for exactly `N_MS × 10230` clocks, one chip per clock.
3. Every 20 chips, one averaged point is written to RAM2 through port B. The
   last group of each millisecond has only 10 chips (10230 = 511·20 + 10).
   After the 512th point, `end1ms` pulses and the write address wraps to 0.
4. On `end1ms`, `fft_mach` streams RAM2 into the forward core, starts the
   transform and waits for `done`. It then reads the core's results and
   RAM_MULT together, so result `k` and signal word `k` reach the multiplier in
   the same clock.
5. The multiplier's product stream goes straight into the inverse core.
   `ifft_mach` starts it, reads out the results and raises `cnt_eni` for the
   first 512 outputs only.
6. The first 512 results are squared. A running maximum and its index give the
   peak of this loop. `max_en` then hands that peak to the maximum selection
   unit, and `ifft_mach` waits for its `cmp_flag`.
7. After `N_MS` loops, `acq_done` rises.

The P-code generator never stops between milliseconds. Each millisecond of
reference is 10230 clocks long, which is longer than the FFT and multiply of the
previous millisecond need. So the FFT of millisecond *n* overlaps the generation
of millisecond *n+1*. With a core latency of 4145 clocks, a complete 10-loop run
takes about 113,700 clocks from `data_ld` falling to `acq_done`.

A code phase reported as `qN_loc = L` in loop `m` means the signal matches the
local code starting `m` ms plus `20·L` chips after the loaded start chip.

## P-code generator (`pcode_gen`, `pcode_lfsr`)

The generator is built as specified for GPS:

* **Registers.** There are four 12-stage LFSRs: X1A, X1B, X2A and X2B. Their
  feedback taps are in `pacq_pkg`.
* **Short cycles.** Each register is short-cycled: X1A and X2A after 4092
  states, X1B and X2B after 4093 states.
* **Division counters.** These count completed short cycles. X1B stops on its
  last vector after 3749 cycles and waits there until X1A has completed 3750
  cycles. That is the X1 epoch, 15,345,000 chips or 1.5 s.
* **X2 epoch.** X2A and X2B follow the same pattern. In addition, X2A holds for
  37 more chips, so the X2 epoch is 37 chips longer than the X1 epoch.
* **z-counter.** This counts X1 epochs. At count 403199, the last one of the
  week, X1B, X2A and X2B stop as soon as they reach their last vector. All
  registers then restart together at the beginning of the week.
* **Output.** The chip output for satellite `prn` (1..37) is
  `P_i = X1 ⊕ X2(t−i)`. The delay uses a 37-bit delay line of X2.

**Starting anywhere in the week.** Acquisition needs the local code to start at
the chip the receiver expects. A synchronous `load` takes the complete generator
state from the `pcode_init_t` structure. The structure holds:

* each register's position within its short cycle;
* each register's count of completed short cycles;
* the 37-chip extension counter `dv`;
* the z-count;
* the contents of the X2 delay line.

Working out this state from a chip number is done off-chip. The host or the
testbench does it, and `tune()` in `tb/pcode_ref_pkg.sv` is a complete
reference implementation.

The generator has been checked against the published vector states (the first
chip and the end of each short cycle). It has also been checked against the
epoch holds of 343, 37 and 380 chips, and against the end-of-week stop points
of X2A, X2B and X1B.

## External FFT/IFFT cores

The forward and inverse transforms are vendor 1024-point cores, 16-bit complex
in and out, with outputs scaled by 1/1024. They are not part of this RTL. Their
signals are brought out of the top as `fft_*` and `ifft_*`. The controllers
expect this handshake:

| signal  | meaning |
|---------|---------|
| `mwr`   | one-clock pulse; samples `xn` are taken in the next 1024 clocks |
| `addr_x`| sample index while loading or unloading; `3ff` marks the last |
| `start` | one-clock pulse after loading |
| `done`  | one-clock pulse from the core when the transform is finished |
| `mrd`   | one-clock pulse; result `k` is on `xk` `k+1` clocks later |

`fwd_inv` is 1 for the forward core and 0 for the inverse core.

`tb/xfft1024_model.sv` is a behavioural core with this handshake. It computes an
exact radix-2 transform, rounds, scales by 1/1024 and saturates. By default,
`done` comes 4145 clocks after `start`, which is when the real core writes its
last result. If a real core has a different read latency, the places to change
are the `FT_WAIT1`/`FT_WAIT2` states and the corresponding `IFFT_*` states.

## Numeric scaling

The datapath widths and scaling are as follows:

* **Averaged reference.** Each averaged point (−20..20) is multiplied by 2048
  and saturated to ±32767. The FFT's 1/1024 scaling would otherwise wipe out
  the reference. Groups whose sum is 16 or more in magnitude saturate. This is
  rare for a pseudo-random code and only slightly clips the reference.
* **Complex conjugate multiplier.** Three 17×17 multiplications are used instead
  of four:
  * `A0 = (ar+ai)·dr`, `A1 = (dr−di)·ai`, `A2 = (ai−ar)·di`
  * `Re = A0−A1`, `Im = A1+A2`

  The results are shifted right by `PROD_SHIFT` (default 0) and saturated to
  16 bits. The pipeline has three stages, and `prod_pre` warns the inverse
  controller one clock before the first product.
* **Correlation square.** `re² + im²` is exact, with 32 bits unsigned and a
  latency of 2.
* **Peaks and locations.** Peaks are 32 bits and locations are 9 bits (0..511).
  A location is updated only when a value is strictly greater than the current
  peak, so ties keep the first index.

How well the signal spectrum is scaled decides whether the products saturate or
vanish. That scaling is the host's job, and `PROD_SHIFT` is the knob on the
hardware side.

## Maximum selection (`peak_loc12`)

On `max_en`, the new loop peak is loaded as `max3`. Two comparisons follow:
`max31_gt` (new peak > largest) and `max32_gt` (new peak > second largest).
Their results choose the new largest and second-largest values from
{old max1, old max2, new}. The registered outputs `q1`, `q2` and their
locations update, and `cmp_flag` pulses 4 clocks after `max_en`. `done_cmp` is
high whenever no comparison is running. The values are cleared only by reset.

## Departures and choices

These points are design choices, or places where the source description leaves
room:

* **Reset.** `rst_n` is active low and synchronous.
* **RAM_MULT full.** `ram_mult_full` is active high and is generated in the top
  from a host write counter. The host writes words 0..1023 in order with
  `write_en`.
* **Generator start.** The generator starts when both conditions hold: the host
  has released `data_ld`, and RAM2 has been zeroed. This prevents averaged
  points being overwritten by the zero fill.
* **Saturation.** Saturation of the averaged points is symmetric (±32767).
* **Loop counters.** Both controllers count one step per transform in
  `loop_cnt`.
* **Not built: debug states and RAMs.** The optional debug states (`*_dbg`,
  `*_rd`, `*_stop` of the FFT side) and their debug RAMs are not built. The
  inverse controller does use a stop state to end the run.
* **Not built: carrier NCO.** The carrier NCO is not built: the design assumes
  a demodulated input.
* **Not built: host side.** The host-side averaging and FFT of the received
  signal, and the PCI board interface, are outside the RTL.
* **Not built: overlap averaging.** An alternative reference, the overlap
  average of two references offset by half an averaging period, is not built.
  It would recover 2–3 dB when the code phase falls midway between two
  averaging points.

## Files

| file | contents |
|------|----------|
| `rtl/pacq_pkg.sv` | constants (LFSR taps, initial and last vectors, cycle counts), `pcode_init_t`, `cplx16_t`, `sat16` |
| `rtl/pcode_lfsr.sv`, `rtl/pcode_gen.sv` | P-code generator |
| `rtl/pcode_binary_conv.sv`, `rtl/pcode_average.sv`, `rtl/pcode_mach.sv` | local reference generation |
| `rtl/dp_ram.sv` | dual-port block RAM (RAM2, RAM_MULT) |
| `rtl/fft_mach.sv`, `rtl/ifft_mach.sv` | transform controllers |
| `rtl/cconj_mult.sv`, `rtl/corr_sq.sv` | complex conjugate multiplier, amplitude square |
| `rtl/corr_peak.sv`, `rtl/corr_peak_loc.sv`, `rtl/peak_loc12.sv` | per-loop peak, its location, two-largest selection |
| `rtl/pcode_acq_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/pcode_ref_pkg.sv` | independent P-code model and start-state calculation |
| `tb/xfft1024_model.sv` | behavioural FFT/IFFT core |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb -Irtl -Itb \
    rtl/pacq_pkg.sv tb/pcode_ref_pkg.sv tb/tb_pcode_acq_top.sv \
    --top-module tb_pcode_acq_top
./obj_dir/Vtb_pcode_acq_top
```

For another testbench, replace the testbench file and top module name.
`pcode_ref_pkg.sv` is needed only by `tb_pcode_gen` and `tb_pcode_acq_top`.

`tb_pcode_acq_top` runs the whole processor at its default size. That means
10 loops, 10230 chips per millisecond and 1024-point transforms. It uses two
core models and takes under a second. The test does the following:

* It starts the generator at Monday 11:30 of the GPS week for PRN 5.
* It builds a received signal that contains the reference of the 8th
  millisecond, delayed by 8 averaging points, plus noise.
* It checks every averaged point, each loop's peak against a time-domain
  correlation, the final `q1_loc = 8` with a clear margin over `q2`, the run
  time, and that zero padding, both transforms, both kinds of maximum update,
  the short last group and saturation all occurred.

The unit testbenches use reduced sizes and shorter core latency where that
helps.
