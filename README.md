# Pre-encoded NR4SD multipliers for fixed-coefficient DSP

Many DSP kernels (FFT twiddle factors, filter taps, codec transforms) multiply
run-time data by coefficients that never change and sit in a ROM. A radix-4
Modified Booth (MB) multiplier halves the number of partial products, but it
has to recode the coefficient on every use. Two familiar ways to handle this
each cost something:

* store the coefficient in 2's complement and recode it on the fly. This puts
  an MB encoder in front of every partial product generator, on the
  critical path;
* store it already MB-encoded. The encoder goes away, but each radix-4 digit
  needs 3 bits (sign, two, one), so the ROM grows by 50 %.

This RTL stores each coefficient in **non-redundant radix-4 signed-digit
(NR4SD)** form instead. A radix-4 digit then takes only four values, so
2 bits hold it. Only the most significant digit stays in MB form, with 3
bits, so that the whole 2's complement range is covered. An n-bit
coefficient takes **n + 1 bits** of ROM. A three-gate decoder per digit
rebuilds the selection signals for the partial product generator. Two digit
sets are provided, and both are built:

| variant | digit set of the low digits | stored bits of digit j        | digit value              |
|---------|-----------------------------|-------------------------------|--------------------------|
| NR4SD-  | {-2, -1, 0, +1}             | n<sub>2j+1</sub>, n<sub>2j</sub> | −2·n<sub>2j+1</sub> + n<sub>2j</sub> |
| NR4SD+  | {-1, 0, +1, +2}             | n<sub>2j+1</sub>, n<sub>2j</sub> | +2·n<sub>2j+1</sub> − n<sub>2j</sub> |

The top digit is always MB: {-2, -1, 0, +1, +2}.

## Recoding a coefficient

The recoding runs from the least significant bit pair upwards. A carry
c<sub>0</sub> = 0 enters at the bottom. Each digit slice takes b<sub>2j+1</sub>,
b<sub>2j</sub> and the incoming carry c<sub>2j</sub>, and passes them through
two chained half adders. One of the two is an ordinary half adder (HA). The
other, HA\*, has a negatively weighted sum output: its outputs satisfy
2c − s = x + y, so c = x | y and s = x ^ y.

* **NR4SD-**: HA at bit 2j, then HA\* at bit 2j+1. The sum of the upper adder
  is negative, so the digit is −2·n<sub>2j+1</sub> + n<sub>2j</sub>.
* **NR4SD+**: HA\* at bit 2j, then HA at bit 2j+1. The digit is
  +2·n<sub>2j+1</sub> − n<sub>2j</sub>.

Both satisfy 2·b<sub>2j+1</sub> + b<sub>2j</sub> + c<sub>2j</sub> =
4·c<sub>2j+2</sub> + digit<sub>j</sub>, so the carry moves up one digit
position. After k − 1 slices (n = 2k) the top digit is MB-recoded from the
triplet {b<sub>2k−1</sub>, b<sub>2k−2</sub>, c<sub>2k−2</sub>}. Its value is
−2b<sub>2k−1</sub> + b<sub>2k−2</sub> + c<sub>2k−2</sub>. The MB sign is
s = b<sub>2k−1</sub> ⊕ (b<sub>2k−1</sub> ∧ b<sub>2k−2</sub> ∧ c<sub>2k−2</sub>).
The all-ones triplet has digit 0, and this form of s gives it s = 0 rather
than 1, which saves switching.

Examples for 8-bit values (most significant digit first; a minus sign marks
a negative digit):

| value | 2's complement | NR4SD-            | NR4SD+          |
|-------|----------------|-------------------|-----------------|
| −128  | 10000000       | −2 0 0 0          | −2 0 0 0        |
| −102  | 10011010       | −1 −2 −1 −2       | −2 1 2 2        |
| +89   | 01011001       | 2 −2 −2 1         | 1 1 2 1         |
| +127  | 01111111       | 2 0 0 −1          | 2 0 0 −1        |

The testbench of the word encoder checks these digit by digit.

**Stored word** (n + 1 bits; the bit order is this design's choice):

```
 [n:n-2]            [2j+1:2j]                    [1:0]
 {s, two, one}  ...  {n_2j+1, n_2j}  ...  {n_1, n_0}
 MB top digit        NR4SD digit j (j = 0 .. k-2)
```

In this RTL the recoding is real hardware (`nr4sd_word_encoder`). The ROM
applies it to its constant coefficient table, so synthesis folds the encoders
into constant ROM contents. The encoding is therefore "offline", and nobody
has to maintain a hand-encoded table.

## The multiplier datapath

`nr4sd_multiplier` computes P = A·B. A is an n-bit 2's complement
multiplicand, B a stored word, and P a 2n-bit 2's complement product.

1. **Digit decoders** (`nr4sd_digit_decoder`, one per low digit) turn the
   2 stored bits into one-hot selections:
   * NR4SD-: one+ = ¬n<sub>hi</sub>·n<sub>lo</sub>,
     one− = n<sub>hi</sub>·n<sub>lo</sub>,
     two− = n<sub>hi</sub>·¬n<sub>lo</sub>
   * NR4SD+: one+ = n<sub>hi</sub>·n<sub>lo</sub>,
     one− = ¬n<sub>hi</sub>·n<sub>lo</sub>,
     two+ = n<sub>hi</sub>·¬n<sub>lo</sub>

   The 3 MB bits of the top digit need no decoder.
2. **Partial product generators** (`nr4sd_ppg` for the low digits, `mb_ppg`
   for the top digit) form the n + 1 bits
   p<sub>i</sub> = (one·a<sub>i</sub> ∨ two·a<sub>i−1</sub>) ⊕ neg, with
   a<sub>−1</sub> = 0 and a<sub>n</sub> = a<sub>n−1</sub>. This is A·digit
   in one's complement. The missing +1 of a negation is cin<sub>j</sub> =
   neg:
   * NR4SD-: two− ∨ one−
   * NR4SD+: one−
   * MB: s

   Each generator outputs its top bit **inverted**.
3. **Sign extension without extension bits.** Take an (n+1)-bit
   2's complement value x and invert its top bit. The result, read as an
   unsigned number, equals x + 2<sup>n</sup>. Summing all k partial products,
   each weighted by 4<sup>j</sup>, therefore adds 2<sup>n</sup>·Σ4<sup>j</sup>
   too much. The correction term adds
   COR = Σ cin<sub>j</sub>·4<sup>j</sup> + 2<sup>n</sup>·(1 + Σ 2<sup>2j+1</sup>).
   The constant rows together come to 2<sup>n</sup>·2<sup>n</sup> =
   2<sup>2n</sup>, which is 0 modulo 2<sup>2n</sup>. So no row needs sign
   bits beyond its own n + 1, and P is exact. The constant is the bit pattern
   1010…1011 placed at bit n.
4. **CSA tree** (`csa_tree`). Its inputs are the k weighted partial
   products, the carry-in row and the constant row: k + 2 rows (10 for
   n = 16). Wallace-style 3:2 counter levels reduce them to a sum and a carry
   row.
5. **Fast adder** (`cla_adder`). A two-level carry-lookahead adder (4-bit
   groups, then direct lookahead over all groups) produces P.

Apart from the small decoders, this is the same structure as a pre-encoded MB
multiplier, but the ROM is almost a third narrower (n + 1 against 3n/2 bits:
17 against 24 at n = 16).

## System, timing and interface

`nr4sd_mult_system` is one complete unit: ROM, multiplier and registers.

| port      | dir | width  | meaning                                         |
|-----------|-----|--------|-------------------------------------------------|
| `clk`     | in  | 1      | clock, rising edge                              |
| `rst`     | in  | 1      | synchronous reset, active high                  |
| `cen`     | in  | 1      | start an operation this cycle (ROM read enable) |
| `addr`    | in  | ADDR_W | coefficient address                             |
| `a`       | in  | N      | multiplicand, 2's complement                    |
| `p`       | out | 2N     | product, 2's complement                         |
| `p_valid` | out | 1      | `p` holds the product of an operation           |

How an operation moves through the unit:

* **Rising edge with `cen` = 1:** the ROM loads the stored word at `addr`,
  and `a` is registered next to it.
* **Following cycle:** the combinational multiplier works.
* **Next rising edge:** the product is loaded into `p`, and `p_valid`
  goes high.

A new operation can start on every cycle. While `cen` = 0, the ROM output and
the multiplicand register hold, so `p` keeps showing the last product and
`p_valid` falls.

`nr4sd_top` holds one NR4SD- and one NR4SD+ system. They share only `clk`
and `rst`; the NR4SD- ports carry the prefix `m_` and the NR4SD+ ports the
prefix `p_`. At its defaults each system has:

* 16-bit operands and a 32-bit product;
* a 16 × 17-bit ROM with a 4-bit address.

Its first three ROM entries hold the coefficients of a published simulation
example:

| system | multiplicands (addresses 0, 1, 2) | coefficients | products      |
|--------|-----------------------------------|--------------|---------------|
| NR4SD- | 20, 30, 34                        | 5, 10, 7     | 100, 300, 238 |
| NR4SD+ | 10, 20, 30                        | 10, 20, 25   | 100, 400, 750 |

The remaining entries are range corners and the 8-bit examples above.

Parameters (all modules):

* `MODE` (`NR4SD_MINUS` / `NR4SD_PLUS`, from `nr4sd_pkg`) selects the digit
  set.
* `N` is the operand width. It must be even and at least 4.
* `DEPTH` and `ADDR_W` set the ROM size.
* `COEFFS` is the coefficient table, given as plain integers and truncated
  to N bits.

## Files

| file | role |
|------|------|
| `rtl/nr4sd_pkg.sv` | digit-set enum, selection-signal structs |
| `rtl/nr4sd_digit_cell.sv` | one HA/HA\* recoding slice |
| `rtl/mb_msd_encoder.sv` | MB encoder of the top digit |
| `rtl/nr4sd_word_encoder.sv` | n-bit coefficient → (n+1)-bit stored word |
| `rtl/nr4sd_coeff_rom.sv` | synchronous ROM of pre-encoded coefficients |
| `rtl/nr4sd_digit_decoder.sv` | 2 stored bits → one+/one−/two |
| `rtl/nr4sd_ppg.sv`, `rtl/mb_ppg.sv` | partial product generators |
| `rtl/csa_tree.sv` | carry-save reduction tree |
| `rtl/cla_adder.sv` | two-level carry-lookahead adder |
| `rtl/nr4sd_multiplier.sv` | combinational datapath |
| `rtl/nr4sd_mult_system.sv` | ROM + registers + datapath |
| `rtl/nr4sd_top.sv` | NR4SD- and NR4SD+ systems side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, the end-to-end test at full size:

```
verilator --binary --timing -Irtl -y rtl rtl/nr4sd_pkg.sv tb/tb_nr4sd_top.sv \
          --top-module tb_nr4sd_top
./obj_dir/Vtb_nr4sd_top
```

Replace `tb_nr4sd_top` with any other `tb_*` name to run that testbench.
Every testbench takes well under a second.

What the testbenches establish:

* **Recoding slices, MB encoder, decoders:** checked exhaustively against the
  encoding tables.
* **Word encoder:**
  * every 8-bit value, plus random 16-bit values; the digits must stay inside
    their set and sum back to the coefficient;
  * the worked examples, digit by digit.
* **Partial product generators:** x + cin = A·digit for every digit.
* **Multiplier:** all 65 536 operand pairs at 8 bits, plus random pairs at 16
  bits, for both digit sets. The reference recoding in the testbench is
  arithmetic, not a copy of the gate equations.
* **System and top:** checked cycle-accurately at the default size. This
  covers:
  * the published example products;
  * a 20 000-cycle random stream with random stalls and a mid-run reset.

  The top test also counts how often each mechanism occurs: every digit value
  of each set, every MB top-digit value, the all-ones triplet with its
  forced-zero sign, back-to-back operations, stalls and resets. It fails if
  any of them never happens.

## Where this RTL makes its own choices

The description this design follows gives the number system, the encoders,
the decoder equations, the partial product weighting and the correction term.
The choices below are this implementation's own.

* **Partial product generators.** Their gate-level form is the plain
  AND-OR-XOR form described above.
* **CSA tree.** The Wallace-style 3:2 grouping is an own choice; only "a CSA
  tree" was specified.
* **Final adder.** A two-level CLA with 4-bit groups; only a "fast CLA" was
  specified.
* **ROM interface:**
  * registered (synchronous) read;
  * `cen` taken as an active-high enable;
  * synchronous active-high reset that clears the outputs;
  * out-of-range addresses read as zero.
* **Timing and status:** the one-cycle multiplier stage with a registered
  product, and the `p_valid` output.
* **ROM contents.** Apart from the example coefficients, they are arbitrary.
* **Bit order** of the stored word.
* **NR4SD+ half adder.** Its HA\* is the same cell as in NR4SD-. Every row of
  the NR4SD+ encoding table confirms this.

Not included:

* the conventional MB multiplier, which stores 2's complement coefficients
  and encodes them on the fly;
* the pre-encoded MB multiplier, which stores 3 bits per digit.

Both are only reference points for the NR4SD designs.

The published area comparison (FPGA slices for 16-bit designs: 297 for MB,
129 for NR4SD-, 134 for NR4SD+) was not reproduced. Generic Yosys synthesis
gives about 810 word-level cells for one 16-bit `nr4sd_multiplier`. That
number cannot be compared with slice counts.
