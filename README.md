# Bit-serial programmable FIR filter with 100 % operational efficiency

A k-tap FIR filter, `y(n) = h_0 x(n) + h_1 x(n-1) + ... + h_{k-1} x(n-k+1)`, built
entirely from bit-serial arithmetic. Samples arrive LSB first, one bit per
clock, **back to back**: a new w-bit word starts on the clock after the sign bit
of the previous one. The coefficients are ordinary m-bit two's complement
numbers applied in parallel and can be changed between samples. The output is
produced in full precision, `w + m + ceil(log2 k)` bits.

Classic bit-serial FIR filters can't do this. A serial-parallel multiplier
produces a `w + m`-bit product, so it needs `w + m` clocks per sample. In
practice `m + log2 k` zero bits are padded after every input word, which halves
throughput. This design follows a published scheme that avoids the padding:

* Each tap uses a serial-parallel multiplier that passes its carry-save high
  part to a pair of shift registers at the end of every word. A bit-serial
  adder converts that high part to binary during the next word, while the
  multiplier array is already working on the next sample.
* The multiplier's spare inputs and registers also do the accumulation of the
  transposed filter. These are the free sum input at the top of the array, the
  carry delays, the lower shift register, and the serial input of the upper
  shift register. Each tap therefore needs no separate adder and no separate
  `w + m + log2 k`-bit delay line, only two short `(w-m)`-bit registers.

Defaults: `w = 16` (`W_X`), `m = 12` (`M`), `k = 3` (`K`), so the output is 30 bits
wide and the filter takes one sample every 16 clocks. The design needs
`m + ceil(log2 k) <= w` (here 14 <= 16). An elaboration error reports any
violation.

## Timing of one word

All taps share one phase counter, `t = 0 .. w-1` (`fir_ctrl`). Phase 0 carries
the LSB of `x(n)` and phase `w-1` carries its sign bit. Two control signals are
broadcast to every tap:

| signal | high in phases | effect |
|---|---|---|
| `R` (`r`) | `w-1` | end of word: download the high part, swap the carry state, negate the sign-bit row |
| `R_1` (`a_sel`) | `w-m .. w-1` | the free sum input A takes the delayed high part instead of the delayed low part |
| `lo_en` | `0 .. m-1` | the lower shift register shifts, and the bit-serial adder sees its output |

The filter output is split in two serial streams:

* `y_l`: bits `0 .. w-1` of `y(n)`, in the same clocks as the bits of `x(n)`. It
  is combinational from `x_in`, so the filter responds immediately.
* `y_h`: bits `w .. w+m+log2k-1` of `y(n)`, in phases `0 .. m+log2k-1` of the
  following word. Later phases of `y_h` carry no meaning.

## One tap: the multiply-accumulate unit (`ma_unit`)

The core (`sp_multiplier`) is an array of m cells. Cell j holds:

* an AND gate (`x_t & h_j`);
* a full adder;
* a carry delay that feeds back to the same cell;
* a sum delay that feeds cell j-1.

The sum output of cell 0 is the result bit of the current clock. The sum input
of the top cell comes from one extra delay, fed from the **free sum input A**. A
bit placed on A in phase t is therefore added with weight `2^(t+m)`.

During the w clocks of a word, the w low bits of the result leave on `p_l`. In
the last clock (`R`), the array still holds the high part in carry-save form,
and four things happen at once:

1. the sum vector goes into the **upper** m-bit shift register;
2. the carry vector goes into the **lower** m-bit shift register;
3. the old content of the lower shift register goes into the carry delays, so
   it becomes the starting value of the next product (this is the "swap");
4. the sum delays are cleared.

During the next word, the bit-serial adder (`bs_adder`) adds the two shift
registers bit by bit and sends the high part out on `p_h`. The lower register
contributes only during phases `0..m-1`. In those same clocks it takes in new
bits at its serial input, which is how item 3 gets its value. The upper register
shifts in every clock. Its serial input is **input B**: a bit entering there in
phase t reaches the adder m clocks later, at weight `2^(w+m+t)` of the result.
This appends bits above the product's own m high bits.

A unit thus computes `P = x*h + Q` modulo `2^(w+m+log2k)`, where its neighbour
supplies Q in three pieces, each in a different place.

## How a partial sum travels from tap to tap

In transposed form, tap i computes `P_i(n) = h_i x(n) + P_{i+1}(n-1)`, and tap 0
gives `y(n)`. `P_{i+1}(n-1)` leaves tap i+1 serially, spread over two words. It
is handed over in four pieces:

| piece | bits of `P_{i+1}` | leaves tap i+1 | path | enters tap i |
|---|---|---|---|---|
| L0 | `0 .. m-1` | word n-1, phases `0..m-1`, on `p_l` | direct wire | lower shift register of tap i, then the carry delays at the `R` that starts word n |
| L1 | `m .. w-1` | word n-1, phases `m..w-1`, on `p_l` | `R_L`, `w-m` delays | input A, word n, phases `0..w-m-1` |
| H0 | `w .. w+m-1` | word n, phases `0..m-1`, on `p_h` | `R_H`, `w-m` delays | input A, word n, phases `w-m..w-1` |
| H1 | `w+m .. w+m+log2k-1` | word n, phases `m..m+log2k-1`, on `p_h` | the same `R_H` | input B, word n+1, phases `0..log2k-1` |

Every piece arrives with the weight it needs:

* L0 sits in the carry delays, with weights `2^0 .. 2^(m-1)`.
* Input A adds weight `2^(t+m)` in phase t, so phase t of word n receives bit
  `t+m`. That is L1 for `t < w-m` and H0 for `t >= w-m`. `R_1` switches A from
  `R_L` to `R_H`.
* H1 is the accumulation-growth part, which is zero or sign bits unless the sum
  outgrows `w+m` bits. It arrives while tap i is converting the high part of
  `P_i(n)` and is appended to that high part through B.

Apart from the two shift registers inside the unit, each link needs only
`2(w-m)` delays (`serial_delay`, the `R_L,i` / `R_H,i` registers), instead of
`w+m+log2k`-bit delay lines.

## Signed arithmetic and the correction constant

The published scheme describes the unsigned multiplier and says that slight
changes make it work for two's complement. The changes here are this design's
own. They keep every cell an unsigned full adder, so the hardware stays as in
the unsigned version plus one XOR per cell:

* The coefficient's sign bit has negative weight. Its partial-product bit is
  inverted in every phase except the last.
* The data sign bit (phase `w-1`) must subtract `h`. In that phase the other
  m-1 partial-product bits are inverted and the sign cell's bit is not.

With these inversions the array returns `x*h - C`, where
`C = 2^(m-1) + 2^(w-1) - 2^(w+m-1)`. All arithmetic is modulo `2^(w+m+log2k)`,
so the k taps together come out short by `k*C`. The head of the chain (tap
k-1) has no neighbour. Its L0/A/B inputs are fed from `sign_bias_src` with the
constant `k*C mod 2^(w+m+log2k)`, using the same timing a neighbour would have.
The bits are computed at elaboration time by `bsfir_pkg::sign_bias`. After
reset, the carry delays of tap k-1 start at the low m bits of that constant.

## Start-up and coefficient changes

* Reset (asynchronous, active low) clears every delay except the head tap's
  carry delays. The first clock after reset is phase 0 of word 0.
* Taps 0..k-2 start from an empty state, which does not include their share
  of the correction constant. So `y(0) .. y(k-2)` are not valid. `y_l_valid`
  goes high from word k-1. `y_h_valid` goes high one word later, because `y_h`
  always belongs to the previous word.
* The coefficients feed the AND gates directly, with no holding register. A tap
  uses its `h_i` throughout the w clocks of each word. Change `coef` right after
  the clock edge that ends a word, that is, in phase 0. Each sample is then
  multiplied by the coefficients that were present during its word. A
  simulation assertion in `bsfir_top` flags a change in any other phase. The change
  takes effect immediately, without flushing.

## Top-level interface (`bsfir_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `x_in` | in | 1 | `x(n)`, LSB first, w bits per word, no gaps |
| `coef` | in | `K x M` | `coef[i] = h_i`, two's complement |
| `y_l` | out | 1 | `y(n)` bits `0..w-1` (same clocks as `x(n)`) |
| `y_h` | out | 1 | `y(n-1)` bits `w..`, phases `0..m+log2k-1` |
| `phase` | out | `log2 W_X` | bit position of the current clock |
| `word_start` | out | 1 | phase 0 |
| `y_l_valid`, `y_h_valid` | out | 1 | the streams belong to a sample with a complete history |

To rebuild a sample `y(n)`, take `y_l` over word n and `y_h` over phases
`0..m+log2k-1` of word n+1. Read the result as a `w+m+ceil(log2 k)`-bit two's
complement number.

## Hardware per tap

The published cost per tap is:

* `m+1` full adders;
* `m` AND gates;
* `m+1` delays with reset;
* `2w+1` plain delays;
* `3m+1` 2:1 multiplexers.

This RTL has the same structure:

* m array full adders and one serial-adder full adder;
* m sum delays (the top one fed by A), cleared at `R`;
* m carry delays;
* 2m shift-register bits;
* `2(w-m)` link delays;
* one adder carry;
* load multiplexers for the two shift registers and the carry delays;
* the A multiplexer.

On top of that, each tap has m XOR gates for the signed partial products and
one AND gate that blanks the lower register after phase m-1. Once per filter,
there is the phase counter and the constant source for the head tap.

## Files

| file | contents |
|---|---|
| `rtl/bsfir_pkg.sv` | output width and sign-correction constant |
| `rtl/sp_multiplier.sv` | carry-save serial-parallel array with free sum input and carry swap |
| `rtl/bs_adder.sv` | bit-serial adder |
| `rtl/ma_unit.sv` | multiply-accumulate unit: array, two shift registers, adder |
| `rtl/serial_delay.sv` | `R_L` / `R_H` link registers |
| `rtl/fir_ctrl.sv` | phase counter, `R`, `R_1`, enables, valid flags |
| `rtl/sign_bias_src.sv` | correction constant for the head tap |
| `rtl/bsfir_top.sv` | the filter |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_bsfir_sizes.sv`, `tb/fir_run.sv` | the filter at k = 2, 4, 8 and at w = 8, m = 5 |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. For
example, the end-to-end test at default size:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_bsfir_top -y rtl -y tb +libext+.sv \
  rtl/bsfir_pkg.sv tb/tb_bsfir_top.sv
./obj_dir/Vtb_bsfir_top
```

Replace the top module and file to run another testbench. Simulating all of
them takes seconds.

## Verification

What the testbenches check:

* `tb_bsfir_top` runs the default filter (16/12/3) for 600 samples against a
  full-precision reference, bit by bit, on both output streams. Coefficients
  are reprogrammed every 9 words. It also checks:
  * the 16-clock word period;
  * the phase output;
  * the valid flags.

  It counts how often these occur: coefficient changes, results that need the
  growth bits (and so the B path), negative results, and the extreme product
  `-2^15 * -2^11`. If any of them never occurs, the test fails.
* `tb_bsfir_sizes` does the same for k = 2, 4 and 8 with w = 16, m = 12, and for
  k = 4 with w = 8, m = 5.
* The unit testbenches check:
  * the exact carry-save value of the array against `x*h - C + carry + A*2^m`;
  * the multiply-accumulate unit against a modelled neighbour, including junk
    on its inputs in the phases where they must be ignored;
  * the adder, the delay line and the controller.

## Departures and open points

* Outside the published description:
  * the signed-arithmetic scheme, its correction constant and the way that
    constant is injected;
  * the exact encodings of `R` and `R_1`;
  * the reset behaviour;
  * the valid flags.
* The lengths of the link registers (`w-m` each) and the routing of the four
  pieces come from the described data flow and from the published per-tap
  delay count. They are not given as a drawing.
* Not built: retiming and the systolic version. The published scheme suggests
  them as ways to avoid broadcasting `x`, `R` and `R_1` to every tap. Here all
  three are broadcast, as in the basic structure. With combinational `p_l`, the
  longest path runs from `x_in` through one tap's cell 0 into the next tap's
  lower register. This path does not grow with k.
* The comparison filters (bit-serial direct and transposed forms with zero
  padding, and the 100 % efficient form with full-length registers) are not
  part of this RTL.
