# Static-segment approximate multiplier (36 × 36, radix-4 Booth core)

Audio and other DSP code tolerates small arithmetic errors, and the multiplier is
usually its largest and slowest arithmetic unit. This design multiplies two 36-bit
unsigned operands with only one 18 × 18 multiplier. From each operand it keeps one
18-bit *segment*, multiplies the two segments exactly, and shifts the 36-bit segment
product into place in the 72-bit result.

The segment choice is *static*. A dynamic-segment multiplier finds each operand's
leading one and cuts the segment just below it. That takes a leading-one detector and
two barrel shifters on the inputs, plus a wide shifter on the output. Here each operand
has only two candidate segments, the upper 18 bits or the lower 18 bits. So the hardware
shrinks to:

| dynamic segment method            | static segment method (this design)        |
|-----------------------------------|--------------------------------------------|
| n-bit leading-one detector        | (n−m)-input OR gate                        |
| n-bit shifter per operand         | m-bit 2-to-1 multiplexer per operand       |
| 2n-bit output shifter             | 2n-bit 3-to-1 multiplexer                  |

The segment multiplier is a radix-4 (modified) Booth multiplier. It forms half as many
partial products as a plain array multiplier.

## How a product is formed

With n = 36 and m = 18:

1. **Segment selection** (`bitwise_or_mux`, one per operand). `sel = |a[35:18]`. If
   `sel` is 1, the operand needs more than 18 bits, and the upper segment `a[35:18]` is
   used. If `sel` is 0, the lower segment `a[17:0]` is used, and it holds the whole
   operand exactly.
2. **Segment product** (`booth_mul`). `z = seg_a × seg_b`, exact, 36 bits.
3. **Shift code** (`seg_adder`). `{c, s} = sel_a + sel_b` counts the upper segments:
   0, 1 or 2.
4. **Placement** (`mux_3to1`). The 72-bit result is one of three zero-padded copies of
   `z`:

   | `{c,s}` | segments used       | result                          | shift      |
   |---------|---------------------|---------------------------------|------------|
   | `00`    | lower × lower       | `{36'b0, z}`                    | 0          |
   | `01`    | one upper, one lower| `{18'b0, z, 18'b0}`             | n−m = 18   |
   | `10`    | upper × upper       | `{z, 36'b0}`                    | 2(n−m) = 36|

   The code `11` cannot occur. The mux outputs zero for it, and an assertion reports it
   in simulation.

### What the result means

All four cases reduce to one statement. **y is the exact product of the two operands
after each operand of 2^18 or more has had its lower 18 bits cleared.** Consequences:

- Operands below 2^18 are multiplied exactly. 16-bit audio samples stored
  right-aligned never lose anything.
- The result is never larger than the exact product (the multiplier truncates; it does
  not round).
- The error depends on how far the upper segment is filled. Take an operand v ≥ 2^18
  whose upper segment is s = v >> 18. Its relative error is below 1/s. It is under
  2^-17 when bit 35 is set, but can approach 50 % for an operand just above 2^18 (for
  example 2^19 − 1 becomes 2^18). Data should therefore be scaled to use the top of
  the 36-bit range, or stay below 2^18.
- Nothing compensates for the dropped bits (no forced LSB, no rounding constant).

## The Booth segment multiplier

`booth_mul` is an unsigned M × M multiplier:

- **Recoding.** The operand `y` is zero-extended to an even width of at least M+1 bits
  (20 bits for M = 18), so its top bit is 0 and it is non-negative in two's complement.
  Overlapping bit triplets `y[2i+1], y[2i], y[2i-1]` (with `y[-1] = 0`) give 10 digits
  `d_i = −2·y[2i+1] + y[2i] + y[2i−1]`, each in {−2, −1, 0, +1, +2}.
- **Partial products.** Each digit is held as three signals: `neg`, `one` (|d| = 1) and
  `two` (|d| = 2). They select 0, x or 2x, negated by two's complement when `neg` is
  set. Each partial product is sign-extended to 2M+2 bits and weighted by 4^i.
- **Summation.** The partial products are summed by a plain chain of adders. The low
  2M bits are the product; the top two bits of the sum are always zero for unsigned
  inputs.

The summation is the simplest correct one. A Wallace or Dadda tree with a final
carry-propagate adder would be faster, and only that `always_comb` block would change.
Odd M works too: the testbench checks M = 7 exhaustively.

## Interface and timing

| module           | parameters (default) | ports                                                        |
|------------------|----------------------|--------------------------------------------------------------|
| `ssm_approx_mul` | `N`=36, `M`=18       | `a[N-1:0]`, `b[N-1:0]` in; `y[2N-1:0]` out                     |
| `bitwise_or_mux` | `N`=36, `M`=18       | `a[N-1:0]` in; `seg[M-1:0]`, `sel` out                         |
| `booth_mul`      | `M`=18               | `x[M-1:0]`, `y[M-1:0]` in; `z[2M-1:0]` out                     |
| `seg_adder`      | –                    | `a`, `b` in; `cs` (`ssm_pkg::shift_sel_e`) out                |
| `mux_3to1`       | `W`=72               | `d0`, `d1`, `d2[W-1:0]`, `sel` in; `y[W-1:0]` out             |

`ssm_pkg` holds the default widths (`SSM_N`, `SSM_M`) and the shift-code enum
`shift_sel_e` (`SHIFT_NONE`, `SHIFT_ONE`, `SHIFT_TWO`).

The whole multiplier is combinational: no clock, no reset, no handshake. It produces
one product per input change. To pipeline it, register the segments and flags after
`bitwise_or_mux`, or the Booth partial products.

`N` and `M` can be changed together. `bitwise_or_mux` stops elaboration unless
N/2 ≤ M < N, because the two segments must cover the whole operand. With M > N/2 the
segments overlap, and the shifts are still 0, N−M and 2(N−M).

## Where this differs from, or goes beyond, the architecture it implements

- **Operands are unsigned.** The architecture does not say how signed samples are
  handled. Audio samples must be given as magnitudes or in offset binary. A signed
  version would need the absolute value of each operand before segment selection and a
  sign fix-up of the product.
- **Shift amounts are n−m and 2(n−m)**, as the method defines them. One published
  simulation of the 32-bit variant shows products shifted by one bit less (15 and 31
  instead of 16 and 32). This design follows the definition.
- **The Booth multiplier's internals are this design's own.** The architecture only
  calls for a radix-4 Booth multiplier.
- **The code `11` at the output mux** gives zero. The architecture leaves it unspecified
  because it cannot occur.
- **Not included:** the earlier variant of the same architecture, which has n = 32,
  m = 16 and a 16 × 16 Vedic multiplier as the segment multiplier. It is the baseline
  this Booth-based version improves on. Swapping `booth_mul` for another exact M × M
  multiplier reproduces it.
- The reported FPGA results (about 1600 LUTs and 37 ns on an unnamed Xilinx device,
  against about 1750 LUTs and 47 ns for the Vedic variant) are not reproduced here.

## Verification

Each testbench checks itself and ends with `TB_RESULT checks=N failures=F`.

| testbench             | what it checks                                                                 |
|-----------------------|--------------------------------------------------------------------------------|
| `booth_mul_tb`        | M=18: corner patterns plus 20 000 random pairs; M=8 and M=7: all pairs exhaustively; each against `x*y` |
| `bitwise_or_mux_tb`   | 36/18 random operands of random magnitude and boundaries; 16/10 (overlapping segments) exhaustively |
| `seg_adder_tb`        | all four flag combinations against the count of set flags                      |
| `mux_3to1_tb`         | each legal code selects the right one of three random 72-bit words             |
| `ssm_approx_mul_tb`   | full 36-bit design against an independent truncate-then-multiply model; the result is never above the exact product; exact below 2^18; relative error below 2^-16 when both top bits are set; all four segment pairings are exercised and counted |
| `audio_workload_tb`   | two synthetic speech-like signals (2 s at 44.1 kHz, 1 s at 8 kHz, 16-bit) multiplied sample by sample: right-aligned (exact), left-aligned in 36 bits (exact), and left-aligned with random low bits (reports mean and max relative error) |

The sample products 44100 × 32000 = 1411200000, 45150 × 32000 = 1444800000 and
45150 × 39098 = 1765274700 are among the directed checks. All these operands are below
2^18, so the multiplier returns them exactly.

To run a testbench with Verilator (from the directory that holds `rtl/` and `tb/`):

```sh
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/ssm_pkg.sv rtl/bitwise_or_mux.sv rtl/booth_mul.sv rtl/seg_adder.sv \
  rtl/mux_3to1.sv rtl/ssm_approx_mul.sv tb/ssm_approx_mul_tb.sv \
  --top-module ssm_approx_mul_tb -Mdir obj_dir
./obj_dir/Vssm_approx_mul_tb
```

Replace the testbench file and top-module name for the other benches. Every run takes
well under a second.

Lint is clean apart from `UNUSEDPARAM` notes. They come from `ssm_pkg` constants that
a given module does not use.
