# Multiplier-free reconfigurable FIR filter with binary signed sub-coefficients

A reconfigurable FIR filter cannot hard-wire its coefficient multiplications
as shift-and-add networks (CSD, common sub-expression sharing), because the
coefficients change at run time. The usual way out is *coefficient
partitioning*: split every coefficient into small sub-coefficients,
precompute the products of the input sample with every possible
sub-coefficient value once, and let each tap pick the products it needs with
multiplexers. With unsigned 4-bit sub-coefficients (0..15) that means the
eight odd products x·1, x·3, …, x·15 and four 16:1 multiplexers per tap.

This design uses **binary signed sub-coefficients (BSS)**: each 4-bit
sub-coefficient is a *signed* digit in −8..+8. Its magnitude is one of
0..8, so only x·1, x·3, x·5 and x·7 have to be precomputed (x·2, x·4, x·6,
x·8 are shifts of them), and each tap needs four 8:1 multiplexers instead of
four 16:1 multiplexers. The signs are applied by the adders that combine the
four selected products.

## Coefficient format

A 16-bit two's complement coefficient h is written as

    h = d0 + 16·d1 + 256·d2 + 4096·d3,   every dk in −8..+8

Conversion works from the least significant end: take the low four bits u of
what is left; if u > 8 the digit is u − 16 (and one is carried upward),
otherwise it is u; the last digit takes whatever remains, which for any
16-bit input is within −8..+8 (e.g. 32767 = −1 + 0·16 + 0·256 + 8·4096,
−32768 = −8·4096). Each digit is stored as a sign bit and a 4-bit magnitude
(`bss_digit_t` in `bss_pkg`), zero always with a positive sign.
`bss_encode` and `bss_value` in the package convert in both directions.

Coefficients are written in ordinary two's complement; the coefficient bank
converts them on the way in.

## Datapath

```
x_in ─► [x_q] ─► precomputer ─► [x1 x3 x5 x7] ─┬─► PE tap 0 ─┐
                                               ├─► PE tap 1 ─┤   transposed
                                               │     ...     ├─► accumulation ─► y_out
                                               └─► PE tap 7 ─┘   line (8 regs)
coef write ─► coefficient bank (BSS digits) ───────► all PEs
```

* **Precomputer** (`bss_precomputer`): x·3 = 2x + x, x·5 = 4x + x,
  x·7 = 8x − x. Output registered.
* **Processing element** (`bss_pe`), one per tap, combinational:
  * Candidates x·1 … x·8. The even ones are shifts: x·2 = x·1≪1, x·4 = x·1≪2,
    x·6 = x·3≪1, x·8 = x·1≪3.
  * For each digit k, an 8:1 multiplexer picks candidate x·|dk|.
  * An AND gate zeroes the pick when dk = 0.
  * The pick is shifted left by 4k bits, giving the term Tk.
  * The select and enable come from the mux control (`bss_mux_ctrl`):
    select = |dk| − 1, enable = |dk| ≠ 0.
* **Combining the signs** (`bss_addsub_ctrl` plus three add/sub units in the
  PE). With sk the sign of digit k, the PE computes

      u = T1 ± T0   (− when s0 ≠ s1)      so  s1·u = s1T1 + s0T0
      v = T3 ± T2   (− when s2 ≠ s3)      so  s3·v = s3T3 + s2T2
      w = v  ± u    (− when s1 ≠ s3)      so  s3·w = x·h

  The overall sign s3 is not applied in the PE. It goes out as `neg`, and the
  tap's adder in the accumulation line subtracts w instead of adding it.
  That keeps the PE at exactly three add/sub units. A zero digit's sign does
  not matter, because its term is zero.
* **Accumulation line** (`bss_tap_chain`): transposed direct form. It has
  registers z0…z7. On each step z7 ← ±w7 and zt ← z(t+1) ± wt, and y_out = z0.
  After the line has filled, y(n) = Σ h_t·x(n−t). The line is 27 bits wide
  (8 + 16 + log2 8), so it cannot overflow and nothing is rounded.
* **Coefficient bank** (`bss_coef_bank`): one BSS word per tap in registers,
  written one tap at a time.

## Interface and timing (`bss_fir`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset (clears samples, line and coefficients) |
| `x_valid`, `x_in` | in | 1, 8 | signed sample, taken when `x_valid` is high |
| `y_valid`, `y_out` | out | 1, 27 | full-precision output |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, 3, 16 | write coefficient of one tap |

* A sample presented in cycle c produces its output, with `y_valid`, in
  cycle c+3. There are three register stages: the input, the precomputed
  products and the accumulation line.
* At most one sample is accepted per clock.
* A low `x_valid` stalls the whole pipeline without losing state. The output
  therefore depends only on the sequence of valid samples, not on the gaps
  between them.
* Reconfiguration needs no flush. A write in cycle c is used for every
  product formed from cycle c+1 on. Those are the samples presented from
  cycle c−1 on.
* Products already in the line keep the coefficient they were formed with.
  During a change, an output can therefore mix old and new coefficients. The
  mix is exact: each term uses the coefficient that was in force when its
  sample reached the PEs.

Parameters: `TAPS` (default 8) and `DATA_W` (default 8). The digit width and
the number of digits (4 × 4 bits, so 16-bit coefficients) are package
constants, because the 8:1 multiplexer structure depends on them.

## What follows the source architecture and what is chosen here

These parts follow the source architecture:
* the BSS digit range;
* the four precomputed odd products and the hardwired shifts;
* four 8:1 multiplexers with AND gates per tap;
* the separate mux-control and add/sub-control blocks;
* three add/sub units per tap;
* the transposed direct form;
* 4-bit partitioning of the coefficients.

These are this design's own choices, because the architecture leaves them
open:
* 8 taps and 8-bit samples;
* where the registers sit (three stages);
* the digit storage format and the conversion rule (a low digit is never −8);
* the shape of the adder tree, and passing the final sign to the
  accumulation adder;
* the coefficient write port and converting on write;
* full-precision output without rounding;
* synchronous reset.

A published implementation of this kind of filter used about 2,900 logic
elements, 355 registers and 35 pins on a Cyclone III, for a filter size that
is not stated. This design at its defaults has 431 register bits and 59
ports, so it is not a pin-for-pin match.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_bss_precomputer` | all 256 samples, with idle cycles, against x·1, x·3, x·5, x·7 |
| `tb_bss_mux_ctrl` | every magnitude 0..8 in every digit position |
| `tb_bss_addsub_ctrl` | all 16 sign patterns, the adder tree against the signed sum |
| `tb_bss_pe` | all samples × corner and random coefficients against x·h |
| `tb_bss_coef_bank` | every 16-bit coefficient: legal digits, exact value, no cross-tap writes |
| `tb_bss_tap_chain` | random signed products with random stalls, and full-scale sums, against a convolution |
| `tb_bss_fir` | whole filter at its default size (see below) |

`tb_bss_fir` runs the whole filter at its default size through four phases:
* an impulse response, which must reproduce the loaded coefficients;
* a random stream with stalls and full-scale samples;
* coefficient rewrites while samples are in flight;
* extreme coefficient sets.

It compares every output against a plain convolution and checks the
three-cycle latency on every cycle. It also counts how often each mechanism
occurs: every multiplexer select, zero digits, negative digits, stalls and
in-flight reconfiguration. Any mechanism that never occurs counts as a
failure.

To run one with Verilator (example for the full filter):

```
verilator --binary --timing --top-module tb_bss_fir -Irtl -Itb \
    rtl/bss_pkg.sv rtl/bss_precomputer.sv rtl/bss_mux_ctrl.sv rtl/bss_addsub_ctrl.sv \
    rtl/bss_pe.sv rtl/bss_coef_bank.sv rtl/bss_tap_chain.sv rtl/bss_fir.sv tb/tb_bss_fir.sv
./obj_dir/Vtb_bss_fir
```

## Limits

* The output is not truncated or saturated to a shorter word. Add that
  outside the filter if needed.
* Coefficients are limited to 16 bits. Longer coefficients would need more
  digits, and so more multiplexers and add/sub units per tap, which means
  changing `NSUB` and the adder tree in `bss_pe` and `bss_addsub_ctrl`.
* There is no coefficient read-back port.
