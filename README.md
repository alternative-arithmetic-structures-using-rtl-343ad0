# Redundant and multi-valued arithmetic in SystemVerilog

This repository has two families of fast multi-operand arithmetic. Neither
needs a carry chain on its critical path.

1. **Double carry-save (DCS) arithmetic for LUT-6 FPGAs.** A 6-input LUT can
   compute any function of six bits. So one LUT level can count the ones among
   six bits, and three LUTs form a (6,3) counter. A row of (6,3) counters takes
   six operands and adds them in a single LUT delay. The result is not a
   binary number. It is three vectors whose sum is the result. This is a
   "double carry-save" number. Two DCS numbers are again six vectors, so they
   can be added in one more LUT level. On top of this the repository builds:
   - a 12 x 12 multiply-accumulate (MAC) unit with a 28-bit accumulator;
   - a fixed-coefficient FIR filter with 25 taps and 12-bit coefficients;
   - a variable-coefficient FIR filter that shares its taps among several
     MAC units.

   The MAC and the fixed-coefficient filter have three LUT levels per clock
   and no carry propagation inside the loop.
2. **Multi-valued (current-mode) arithmetic, modelled as logic.** The
   original circuits add bits as currents and decide the result with
   comparators. Here, each circuit is written as the digital function it
   computes:
   - a six-operand adder that produces signed digits, with no carry
     propagation;
   - a seven-input counter with a four-level output;
   - a (7,3) counter that restores a binary result;
   - a 2-bit adder built on that counter;
   - an 8 x 8 multiplier that uses the (7,3) counters.

The two families are independent. `arith_top` places them side by side, and
each unit has its own ports.

## Double carry-save numbers

A W-bit DCS number is a triple `z[2:0]` of W-bit vectors. Its value is
`z[0] + z[1] + z[2]` modulo 2^W. Every vector is read as two's complement at
width W.

`dcs_reduce63` builds a DCS number from six W-bit operands with one
`counter63` per column. The counter in column i counts the ones in bit i of
the six operands and gives a 3-bit count `s2 s1 s0`. Its outputs go to three
places:

- s0 goes to `z[0][i]`;
- s1 goes to `z[1][i+1]`;
- s2 goes to `z[2][i+2]`.

As a result, `z[1]` is the vector of s1 bits shifted left by one, and `z[2]`
is the vector of s2 bits shifted left by two. The lowest bit of `z[1]` is 0,
and so are the two lowest bits of `z[2]`. Bits shifted out at the top are
dropped, which is exactly arithmetic modulo 2^W.

**Addition and subtraction** (`dcs_addsub`). Adding two DCS numbers means
feeding their six vectors into one `dcs_reduce63`. Subtraction uses
a - b = a + ~b0 + ~b1 + ~b2 + 3, because -b = ~b0 + ~b1 + ~b2 + 3 modulo 2^W.
The adder inverts the three vectors of b. It then supplies the constant 3 for
free in the two lowest bits of `z[2]`, which are always zero after the
reduction. When `sub` is set, bit 0 and bit 1 of `z[2]` are set to 1 (weights
1 and 2).

**Back to binary** (`dcs_to_binary`). Converting to binary needs a real
carry-propagate addition. It uses a row of full adders to go from three
vectors to two, then one W-bit addition. This adder sits outside the loops.
In the MAC it has a pipeline stage of its own, and in the FIR filter it is
used once per output sample.

`six_operand_csa` follows the ordinary carry-save scheme: one (6,3) level,
then one (3,2) level. The result is two vectors, `s` and `c`, with
s + c = sum of the six operands.

## Negative partial products without carries: the half-weight column

A multiplier's negative partial product is written as "invert the row and add
1". That +1 is the usual nuisance. Every row would need its own carry-in, and
the only free slots are the two low zeros of `z[2]`, which were already used
above. This design handles it in two ways.

1. **A half-weight column.** Every operand vector gets an extra bit 0 with
   weight 1/2, so a partial product is W+1 bits wide. The +1 of a negative
   row is put into this column twice, and two halves make 1. The negation
   bits are placed like this:

   | negation bit | rows whose half column carries it |
   |---|---|
   | row 0 | rows 0 and 1 |
   | row 1 | rows 2 and 3 |
   | row 2 | rows 4 and 5 |

   The half column therefore always holds an even number of ones. Its
   counter's s0 is always 0 and is dropped. Its s1 (weight 1) and s2
   (weight 2) fall into bit 0 of `z[1]` and `z[2]`.
2. **The residue.** The negation bits of rows 3, 4 and 5 do not fit, because
   each of the six half-column slots is already used by a pair. They leave
   the multiplier as a 3-bit **residue** of weight 1. `dcs_accumulate`, the
   stage that adds a DCS product to a DCS sum, uses the same trick. Each
   residue bit goes twice into that stage's own half column.

Both counter levels stay pure (6,3) counters, and the residue costs no extra
level. Both the Booth multiplier (`booth_ppgen`) and the constant multiplier
(`csd_ppgen`) produce rows in this format. The synthesizable assertions in
`dcs_accumulate`, `fir_tap` and `mac_dcs` check that the half-column sum is
even.

## MAC unit (`mac_dcs`)

`mac_dcs` is a pipeline in three parts:

1. **Input registers.** `a`, `b`, `clear` and `in_valid` are registered.
2. **Multiply and accumulate.** `booth_ppgen` recodes `b` into six radix-4
   Booth digits in {-2..2} and selects 0, ±a or ±2a. Each row is
   sign-extended to the full 28 bits. A negative row is the complement of the
   whole shifted row, and its negation bit goes to the half column or the
   residue as described above.
   - A `dcs_reduce63` of width 29 turns the six rows into a DCS product.
   - `dcs_accumulate` adds the product, the DCS accumulator and the residue.
   - This takes three LUT levels: Booth selection, (6,3), and (6,3).
3. **Output.** `dcs_to_binary` converts the accumulator, and the result is
   registered.

| edge | what happens |
|---|---|
| t | `in_valid`, `a`, `b` and `clear` are sampled |
| t+1 | `acc_dcs` = old accumulator + a*b, or just a*b when `clear` was set |
| t+2 | `result` = binary value of `acc_dcs`, and `result_valid` = 1 |

The unit accepts one operation per clock. Without `in_valid`, the accumulator
holds its value. Reset is asynchronous and active low.

A 12 x 12 product needs 24 bits. The accumulator has 28 bits so that at least
16 full-scale products fit before overflow. Overflow wraps modulo 2^28. The
parameters MW, NW and W change the sizes. NW must be even and at most 12,
because the unit has six Booth rows.

## FIR filter on several MAC units (`mac_fir`)

`mac_fir` computes `y(n) = sum_k h_k x(n-k)` with coefficients that can be
rewritten at run time. The default is 15 taps on four `mac_dcs` units. The N
taps are split into M groups of P = ceil(N/M) taps, and MAC unit j works
through taps j*P .. j*P+P-1 one per clock. The sampling rate is therefore
f_clk / ceil(N/M). With the defaults, P = 4, so a 300 MHz clock gives
75 MHz.

- **Input.** A sample is taken on an edge where `in_valid` and `in_ready`
  are both high. It enters a 15-entry shift register of past samples.
  `in_ready` is high when the unit is idle and in the last of the P issue
  cycles. Streaming samples back to back therefore keeps every MAC busy on
  every clock, and offering samples faster stalls them.
- **Issue.** In issue cycle p, every MAC gets its group's tap p. The MACs
  clear their accumulators on p = 0, so each output starts a fresh sum.
  Unused tap slots (when M does not divide N) get zero operands.
- **Output.** A flag for the last issue cycle travels alongside the MAC
  pipeline. When it arrives, the M binary MAC results are added and
  registered as `y`, and `out_valid` is set. The output register is set
  P+3 edges after the edge that accepted the sample.
- **Coefficients.** They sit in a register file written through `coef_we`,
  `coef_addr` and `coef_data`. A write takes effect from the next issue
  cycle, so rewrite them while no sample is in flight if every output must
  use one coefficient set.

## Fixed-coefficient FIR filter (`fir_dcs`)

`fir_dcs` is a transposed-form filter:
`y[n] = sum_k H[k] * x[n-k]`, with integer coefficients `H[k] = h[k]*2^(CW-1)`.

**Coefficients.** Each coefficient is a parameter given as two masks:

- bit i of `COEF_POS[k]` means +2^i;
- bit i of `COEF_NEG[k]` means -2^i.

A multiplication by a constant is then only shifted copies of the sample, one
per nonzero digit. Each copy is inverted when its digit is negative
(`csd_ppgen`, at most six digits per coefficient). For example, 616 is
+2^9 +2^7 -2^5 +2^3, written as `COEF_POS = 12'h288` and `COEF_NEG = 12'h020`.

**Taps.** Tap k has two parts:

1. **Multiply stage** (`fir_tap`). It reduces the shifted copies to a DCS
   product with one `dcs_reduce63`. If a coefficient has three or fewer
   nonzero digits, it skips the reduction. The three rows already form a DCS
   product, and all their negation bits go to the residue.
2. **Accumulate stage** (`dcs_accumulate`). It adds the product, the residue
   and the registered DCS sum of tap k+1. The result goes into tap k's DCS
   register.

**Sharing.** A linear-phase filter has symmetric coefficients, so taps k and
N-1-k use the same product. The RTL compares the masks of the two taps and
instantiates the multiply stage only once when they are equal.

**Output and timing.**

- Tap 0's DCS sum is converted to binary and registered.
- The taps advance only when `in_valid` is set. This allows at most one
  sample per clock, and gaps are allowed.
- Sample x[n] is applied with `in_valid` at edge t. `y[n]` appears with
  `out_valid` after edge t+1.
- The output is `DW+CW` bits wide. It is scaled by 2^(CW-1) relative to the
  real-valued coefficients.

**Built-in filters.**

| filter | taps | coefficient width | sum of abs(h) | output | how to build |
|---|---|---|---|---|---|
| F2 (default) | 25 | 12 bits | 1.4785 | 24 bits, no overflow for 12-bit input | `fir_dcs` with no overrides |
| F1 | 51 | 16 bits | 1.6776 | 28 bits, no overflow | `N=51, CW=16`, and the 51 x 16-bit masks given in `tb/tb_fir_fir51.sv` |

Both filters are low-pass and have at most four nonzero digits per
coefficient. The testbenches write the integer coefficients out in full:

- F2: `-8, -12, -1, 23, 40, 18, -42, -102, -82, 60, 296, 522, 616, ...`
  (symmetric);
- F1: see `tb/tb_fir_fir51.sv`.

## Multi-valued arithmetic, as logic

**Six-operand signed-digit adder** (`sd_mo_adder`). It adds six unsigned
N-bit numbers. At bit position i, `sd_digit_slice` counts the ones among the
six bits (0..6) and makes a carry when the count is at least 3. It subtracts
4 for that carry. The carry goes **two** positions up, because 4 = 2^2. The
slice then adds the carry arriving from position i-2. The digit

  `s_i = count - 4*carry_out + carry_in`

always lies in {-1, 0, 1, 2, 3}. The sum equals `sum_i 2^i s_i`, and no carry
travels further than two positions.

`mv_to_binary` compares each digit with 0, 1, 2 and 3 and splits it into
`s = 2*sh + slp - sln`:

| s | -1 | 0 | 1 | 2 | 3 |
|---|---|---|---|---|---|
| sh slp sln | 0 0 1 | 0 0 0 | 0 1 0 | 1 0 0 | 1 1 0 |

Then one row of full adders, again without carry propagation, makes a binary
signed-digit number:

- full adder i adds `sh[i-1]`, `slp[i]` and `~sln[i]`;
- `pp[i] = carry[i-1]` and `pn[i] = ~sum[i]`;
- the result is `sum = pp - pn`, and each digit `pp[i]-pn[i]` lies in
  {-1, 0, 1}.

The delay does not depend on N. The module has N+2 digits and N+3 binary
positions. The carry out of the top full adder is always zero, and an
assertion checks this.

**Counters.**

- `mv_counter_mvout` counts seven bits. It gives the top bit (count >= 4) in
  binary, and count mod 4 as one four-level digit (2-bit integer).
- `mv_counter73` is a complete (7,3) counter built the way the comparator
  circuit works (`mv_level_decode`):
  - one decision `vo = level > 3`;
  - three threshold decisions on `level` or, when `vo` is set, on
    `level - 4`;
  - `s = {vo, v2, v1 & ~v2 | v3}`.
- `mv_adder2` reuses that output stage. Its input level is
  x0 + y0 + ci + 2*x1 + 2*y1, so the counter becomes a 2-bit adder.

**8 x 8 multiplier** (`mv_mult8x8`). It works in five steps:

1. It forms 64 AND partial products.
2. Column 7 has eight bits, and column 8 would have eight once column 7's
   carry arrives. One half adder in each brings every column to seven bits or
   fewer.
3. One `mv_counter73` per column gives three rows, with weights 1, 2 and 4.
4. One row of full adders reduces these to two rows.
5. A ripple-carry adder gives the 16-bit product.

## Top level (`arith_top`)

`arith_top` instantiates every unit at its default size, each with its own
ports.

| prefix | unit |
|---|---|
| `fir_` | filter F2 |
| `mac_` | MAC unit |
| `mfir_` | 15-tap filter on four MAC units |
| `das_` | a 28-bit DCS add/subtract, plus the binary value of its result |
| `csa_` | 16-bit six-operand carry-save adder |
| `sdm_` | 8-bit signed-digit six-operand adder |
| `cmv_`, `c73_`, `add2_`, `mul_` | the counters, the 2-bit adder and the multiplier |

`clk` and `rst_n` drive only the two filters and the MAC. Everything else is
combinational.

## How far this follows the original design

These parts follow the original design:

- the DCS format and the (6,3) counter arrays;
- DCS subtraction with three inverted vectors plus 3;
- modified Booth recoding with 12 x 12 operands and 28-bit sign extension;
- the three-LUT-level MAC loop with a separate pipelined three-operand adder;
- the transposed fixed-coefficient filter with one multiply level and one
  accumulate level per tap, and sizes 25 taps / 12 bits and 51 taps /
  16 bits with their coefficients;
- the digit arithmetic, comparator equations and full-adder row of the
  signed-digit adder;
- the (7,3) counter equations;
- the input weights of the 2-bit adder;
- the reduction sequence of the multiplier.

These are this design's own choices:

- **Where the +1 of negative rows goes.** The half-weight column and the
  residue that `dcs_accumulate` absorbs are a concrete scheme written for
  this RTL. The original only says that the sign digits are back-extended
  and doubled in the first digit, and that the rest is settled at
  accumulation.
- **Sign extension.** Partial products are sign-extended in full instead of
  with the constant-ones trick. The value modulo 2^W is the same, and
  synthesis folds the copies.
- **The top digits of a Booth row.** These are the sign of the selected
  multiple, so a zero Booth digit (bits 000 or 111) gives an all-zero row.
  This agrees with the original's selection table. It departs from the
  original's shortcut sign formula b XOR a_sign, which would give ones there
  for a negative multiplicand.
- **Handshakes, reset and registers.** The `in_valid`/`clear`/`out_valid`
  handshakes, the asynchronous reset and the exact register placement (input
  registers in the MAC, output registers in both units) are not specified by
  the original.
- **The full-adder wiring of the signed-digit adder.** The original states
  the idea (one full-adder row, no propagation) but not the exact wiring.
- **The multiplier's counter count.** It uses a (7,3) counter on every
  column, 16 in all. The original's multiplier uses eight. Counters on short
  columns have constant-zero inputs and shrink in synthesis, but the
  structure is not the original's optimised one.
- **Bit-level models of current-mode circuits.** The multi-valued circuits
  are modelled by their function on integers. Current levels, bias,
  comparator references and every analog effect are outside this RTL.
- **The structure of the filter on several MAC units.** The original gives
  only its sampling rate and the 15-tap, four-unit example. The tap
  assignment, sample history, coefficient register file, handshake and
  final adder are this design's own.
- **Widths the original does not give.** These are 28 bits for the
  standalone DCS add/subtract and 16 bits for the carry-save adder.

The transistor-level current-mode circuits are not included.

## Verification

Each unit has a self-checking testbench in `tb/`. Each testbench:

- compares the unit with an integer model written independently of the RTL;
- uses `$urandom` for stimulus;
- has a watchdog;
- ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_counter63`, `tb_counter32`, `tb_mv_counter_mvout`, `tb_mv_counter73`, `tb_mv_adder2`, `tb_sd_digit_slice`, `tb_mv_to_binary` | exhaustive |
| `tb_mv_mult8x8` | exhaustive, all 65536 products |
| `tb_dcs_reduce63`, `tb_dcs_addsub`, `tb_six_operand_csa`, `tb_dcs_to_binary`, `tb_dcs_accumulate` | random, with corner values and chained operations |
| `tb_booth_ppgen` | all operand corners plus random operands; checks the row sum, that the half column is even, and that every Booth digit occurs |
| `tb_csd_ppgen`, `tb_fir_tap` | every 12-bit sample for four-digit, six-digit and three-digit coefficients (both tap paths), including the six-digit coefficient -693 with a negative top digit |
| `tb_mac_dcs` | 3000 cycles with clears, idle cycles and a run past 24 bits; checks the accumulator and the result at their exact cycles |
| `tb_mac_fir` | random coefficients, reloaded mid-stream; random and full-rate samples; checks every output value, the latency, one sample per four clocks, and stalls |
| `tb_fir_dcs`, `tb_fir_fir51` | F2 and F1: impulse response, full-scale steps, random samples with gaps; exact output timing; `tb_fir_fir51` also checks that the masks encode the integer coefficients |
| `tb_sd_mo_adder`, `tb_sd_mo_adder_widths` | a worked example 31+30+30+26+24+24 = 165 and random operands at 8, 16, 32 and 64 bits |
| `tb_arith_top` | all units at once at default sizes (no parameter overrides), 6000 cycles |

`tb_arith_top` also counts mechanisms and fails if any of them never occurs:

- FIR taps with three or fewer and with four coefficient digits;
- MAC clear, accumulate, hold, and growth past 24 bits;
- stall, full rate, and output after a coefficient reload in the filter on
  four MAC units;
- DCS add, subtract and negative results;
- carry-save carries;
- signed digits -1 and 3;
- counter overflow;
- 2-bit adder carry;
- large products.

All testbenches pass. Each testbench was also run against a copy of its unit
with one deliberate bug, and it reported failures.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/arith_pkg.sv \
    tb/tb_fir_dcs.sv --top-module tb_fir_dcs -o sim
obj_dir/sim
```

Each testbench runs in well under a second of wall-clock time.
The RTL lints clean apart from unused-bit warnings. These come from:

- the top carry of full-adder rows, which falls off a modulo-2^W result;
- the constant rows of unused coefficient digits.
