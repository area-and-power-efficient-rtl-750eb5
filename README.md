# db4 wavelet analysis filter bank with a reconfigurable multiplier block

This is a one-level discrete wavelet transform (DWT) analysis filter bank for
the 8-tap Daubechies (db4) wavelet. It is sized for slow biosignals such as an
8-bit ECG. It splits the input stream into approximation coefficients cA
(lowpass, then decimated by two) and detail coefficients cD (highpass, then
decimated by two).

ECG sample rates are a few hundred hertz, so one adder-based datapath per
filter can compute the eight taps one after another, one tap per clock. A
time-multiplexed FIR filter normally needs two things for this: a general
multiplier and a coefficient memory. Here both are replaced by a
**reconfigurable multiplier block (ReMB)**. This is a small shift-and-add
network whose multiplexer select lines choose which of the eight db4
coefficients the input is multiplied by. On a 6-input-LUT FPGA, each bit of a
ReMB adder and the 4:1 multiplexer in front of it fit in the same LUT and carry
chain. The whole multiplier therefore costs about three adders.

```
              +--------------+     +-- g(k) filter ----------------------+
 x[7:0] ----->| input memory |--+->| ReMB -> +/- mux -> accumulator (20b) |--> /2, >>10 --> cA[9:0]
 x_valid/rdy  | (8 taps)     |  |  +--------------------------------------+
              +------^-------+  +->| ReMB -> +/- mux -> accumulator (20b) |--> /2, >>10 --> cD[9:0]
                     | address     +-- h(k) filter ----------------------+
              +------+---------------------------------------------------+
              | controller: tap counter k = 0..7 -> decoder -> S0..S3, S4 for g and h |
              +-------------------------------------------------------------------+
```

## Number formats

| quantity | width | format |
|---|---|---|
| input sample x | 8 | signed two's complement |
| coefficient | 11 | 1 sign bit + 10 fractional bits, stored as integer c = round(coef * 2^10) |
| ReMB product | 19 | signed integer, c * x, full precision |
| accumulator | 20 | signed integer, sum of c(k) x(n-k) |
| output cA, cD | 10 | signed, accumulator / 2^10, truncated toward minus infinity |

The integer coefficients are:

```
g (lowpass)  = { -11,   34,   32, -192, -29, 646, 732, 236 }
h (highpass) = { -236, 732, -646,  -29, 192,  32, -34, -11 }     h(k) = (-1)^(k+1) g(7-k)
```

The sum of |g(k)| is 1912, so the largest possible |accumulator| is
128 * 1912 = 244,736. This fits in 19 bits, and the 20-bit accumulator never
overflows. Outputs lie within +/-239, so they never need the full 10 bits.

## The basic structure (`basic_structure`)

The building cell is a 4:1 multiplexer in front of an adder/subtractor:

```
   s = a + d[sel]   when sel[0] = 0
   s = a - d[sel]   when sel[0] = 1
```

The low select bit doubles as the adder's carry-in: subtraction is
`a + ~d + 1`. On the FPGA, 6 LUT inputs per bit are enough for two select
bits, three distinct data bits and the sum XOR. So one of the four mux inputs
has to repeat another. This repetition is useful: the repeated operand can
then be both added and subtracted. The cell takes its four operands already
shifted. The fixed left shifts are plain wiring, chosen where the cell is
instantiated.

## The multiplier block (`remb`)

Three basic structures and a final shift multiplexer:

```
  BS0 (S0):  a = x     d = { x<<1,   x<<1,   x<<3,   x    }  ->   3x,  -x,  9x,    0
  BS1 (S1):  a = x     d = { x<<2,   x<<2,   x<<4,   x<<4 }  ->   5x, -3x, 17x, -15x
  BS2 (S2):  a = BS0   d = { BS1<<2, BS1<<2, BS1<<6, x<<5 }
  y   (S3):  { BS2, BS2<<1, BS2<<2, BS2<<2 }[S3]
```

(d is listed from select value 0 to select value 3.) The controller holds the
select settings for the eight taps. The ReMB output is followed by a sign
multiplexer S4. It passes either y or its bitwise inverse ~y. When S4 = 1,
the accumulator adds a carry-in of 1, so it subtracts y (acc + ~y + 1 =
acc - y) without a separate negator:

| tap k | S0 | S1 | S2 | S3 | ReMB y / x | S4 | g(k) |
|---|---|---|---|---|---|---|---|
| 0 | 1 | 1 | 1 | 0 | (-x) - 4(-3x) = 11 | 1 | -11 |
| 1 | 0 | 0 | 1 | 1 | 2(3x - 4*5x) = -34 | 1 | 34 |
| 2 | 3 | - | 3 | 0 | 0 - 32x = -32 | 1 | 32 |
| 3 | 3 | 1 | 2 | 0 | 0 + 64(-3x) = -192 | 0 | -192 |
| 4 | 2 | 0 | 0 | 0 | 9x + 4*5x = 29 | 1 | -29 |
| 5 | 0 | 0 | 2 | 1 | 2(3x + 64*5x) = 646 | 0 | 646 |
| 6 | 2 | 1 | 2 | 2 | 4(9x + 64(-3x)) = -732 | 1 | 732 |
| 7 | 1 | 3 | 1 | 2 | 4((-x) - 4(-15x)) = 236 | 0 | 236 |

In tap 2 the lower structure (BS1) is not used, and S1 is driven as 0. The
fourth input of the S3 mux is never selected. Here it repeats the `<<2`
operand.

The highpass filter has its own ReMB and sign mux, driven by its own select
lines. Its coefficients are the lowpass magnitudes in reverse order with
alternating signs. So at tap k the controller gives the highpass ReMB the
S0..S3 of lowpass tap 7-k. It gives the highpass sign mux the S4 of lowpass
tap 7-k, inverted when k is even. The result is
h(k) = (-1)^(k+1) g(7-k), the usual db4 decomposition highpass.

## Time multiplexing and the controller

One input sample is processed in a frame of eight clock cycles:

1. `x_valid && x_ready` shifts the sample into the 8-entry input memory, a
   tap-delay line in which tap k holds x(n-k).
2. In cycles 1..8 the controller's counter k = 0..7 addresses the input memory.
   It also drives the decoder. Both filters multiply x(n-k) by their
   coefficient k. The accumulator loads the product at k = 0 and adds it for
   k = 1..7.
3. In cycle 9 `frame_done` flags that both accumulators hold y(n).
4. The downsampler keeps y(n) for even n (counting accepted samples from
   reset; n = 0 is kept) and drops it for odd n. It registers the kept value
   as accumulator >>> 10. In cycle 10 `c_valid` pulses with cA(m), cD(m) for
   n = 2m.

`x_ready` is high while the bank is idle and in the last tap cycle of a frame.
A source that always has data is therefore accepted exactly once every eight
cycles, and gets one cA/cD pair every sixteen cycles. Both filters compute
every output, including the ones the decimator drops, as in a plain
filter-then-decimate structure.

Reset (`rst_n`, asynchronous, active low) clears the input memory, the
accumulators and the decimation phase. The first outputs are computed as if
the signal had been zero before the first sample:

```
cA(m) = floor( sum_{k=0..7} g(k) x(2m-k) / 1024 ),   cD(m) likewise with h,   x(n<0) = 0
```

## Top-level interface (`db4_analysis_fb`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | asynchronous active-low reset |
| x_valid | in | 1 | sample offered |
| x_ready | out | 1 | sample accepted in a cycle where both are high |
| x | in | 8 | signed sample |
| c_valid | out | 1 | one-cycle pulse: new cA/cD pair |
| ca, cd | out | 10 | signed approximation / detail coefficient |

Parameters: `DATA_W = 8` and `OUT_W = 10`. The ReMB wiring and the 19/20-bit
internal widths are fixed for db4 with 8-bit input. Other input widths would
need different internal widths.

## What is fixed by the method and what is chosen here

Fixed by the method:
- the basic structure and its select-LSB carry-in;
- the ReMB network and its shifts;
- the select-line table for the lowpass filter;
- the sign multiplexer;
- the 8-cycle time-multiplexed tap-delay-line filters with a counter plus
  decoder;
- the widths 8/19/20/10;
- the 2^-10 truncation and the decimation by two.

Chosen in this implementation:
- the ready/valid input handshake and the frame sequencing;
- asynchronous reset, and zero history after reset;
- the input memory as a shift register with a counter-addressed read mux;
- clearing the accumulator by loading on tap 0;
- using S4 as the accumulator's carry-in;
- the highpass sign convention h(k) = (-1)^(k+1) g(7-k), and deriving its
  select lines from the lowpass table;
- the kept decimation phase (even n);
- the unused fourth input of the S3 mux;
- S1 = 0 for tap 2;
- signed input samples.

Not included:
- the reconstruction (synthesis) filter bank, which can reuse the same ReMB
  but whose structure is not given;
- multi-level trees of this one-level bank;
- the reference filter bank built on a general-purpose multiplier.

Reported FPGA results for this architecture (Kintex-7) are about 218 LUTs,
158 registers and 164 MHz. A generic synthesis of this RTL gives 133
flip-flop bits: 64 for the input memory, 40 for the accumulators, 20 for the
outputs and the rest for control. The LUT packing of mux and adder that makes
the ReMB cheap relies on the FPGA's synthesis tool. The RTL describes the
function, not the LUT mapping.

## Verification

Each module has a self-checking testbench in `tb/`:

- `tb_basic_structure`: random operands for all four select values.
- `tb_remb`: every 8-bit input times every tap setting, compared with the
  constants in the table above. It also checks that S1 is a don't-care for
  tap 2.
- `tb_input_memory`: random shifts, with every tap compared with a model.
- `tb_controller`, cycle by cycle:
  - the handshake and the tap counter;
  - the `frame_done` pulse;
  - both decoders against the table;
  - the 8-cycle spacing of back-to-back samples.
- `tb_tdl_filter`: 1000 frames, lowpass and highpass, including full-scale
  inputs, against the integer dot product.
- `tb_downsampler`: keep/drop phase and floor division, including negative
  values.
- `tb_db4_analysis_fb`: end to end at default parameters. It feeds 2000
  samples of a synthetic ECG-like waveform and then 2000 random samples, with
  random gaps and stalls. Every cA/cD pair is compared with a reference
  convolution. It checks that each pair appears exactly 10 cycles after x(2m)
  was accepted. It counts back-to-back accepts, stalls, idle gaps, dropped
  outputs and outputs of both signs, and fails if any of them never happens.
  The real MIT-BIH ECG records are not part of the tests.

## Simulating

All files are plain SystemVerilog-2017; `rtl/db4_pkg.sv` must come first.

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/db4_pkg.sv tb/tb_db4_analysis_fb.sv --top-module tb_db4_analysis_fb
./obj_dir/Vtb_db4_analysis_fb
```

Every testbench prints one line `TB_RESULT checks=N failures=M` and stops. A
watchdog ends the run with a failure if it hangs. To run another testbench,
replace the testbench file and `--top-module`.

## Files

| file | content |
|---|---|
| `rtl/db4_pkg.sv` | widths, `remb_sel_t` (S0..S3), `tap_ctrl_t` (S0..S3 + S4) |
| `rtl/basic_structure.sv` | 4:1 mux + add/sub cell |
| `rtl/remb.sv` | reconfigurable multiplier block |
| `rtl/tdl_filter.sv` | ReMB + sign mux + accumulator |
| `rtl/input_memory.sv` | 8-tap delay line with addressed read |
| `rtl/controller.sv` | tap counter, handshake, select-line decoder |
| `rtl/downsampler.sv` | decimation by 2 and 2^-10 truncation |
| `rtl/db4_analysis_fb.sv` | top: one-level analysis filter bank |
