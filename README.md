# Probabilistic multiplier: exact high half, gate-level low half

This is an unsigned N x N-bit multiplier (N = 8 by default) that gives up
accuracy in the low half of the product to save gates. It is meant for image
and signal processing work, where a slightly wrong low-order result costs
little. The 2N-bit product is cut at column N:

* **Upper N bits.** An exact multiplier takes the high halves of the two
  operands: a radix-4 Booth recoder, partial-product generators, a carry-save
  tree and a carry-lookahead adder. It also takes one *compensation* bit from
  the low half.
* **Lower N bits.** There is no partial-product array. Each product bit is the
  output of a single two-input OR gate on one bit of each operand's low half.
  One extra AND gate makes the compensation bit.

```
   A[N-1:N/2] B[N-1:N/2]                  A[N/2-1:0] B[N/2-1:0]
        |         |                               |        |
   +----v---------v-------+   comp       +-------v--------v----------+
   |  perfect multiplier  |<-------------|  LSB upper: AND-OR gate   |
   |  (msb_booth_mult)    |              |  LSB lower: OR gates      |
   +----------+-----------+              +-------------+-------------+
              |                                        |
          P[2N-1:N]                                 P[N-1:0]
```

With H = N/2, the whole design computes:

```
P[2N-1:N] = A[N-1:H] * B[N-1:H] + comp
comp      = A[H-1] & B[H-1]
P[N-1]    = A[H-1] | B[H-1]
P[N-2:0]  = OR gates on A[k], B[k] for k = 0 .. H-2   (bit map below)
```

The cross products `A_hi * B_lo` and `A_lo * B_hi` are not formed anywhere.
This is the main source of error (see *Accuracy*). The design has no clock.
A result is ready one combinational delay after the operands change, and the
longest path runs through the Booth multiplier.

## The imperfect low half

The low half is the unusual part, so here it is bit by bit. Gate k, for
k = 0 .. H-2, is `A[k] | B[k]`. Each gate drives two product bits, one in the
upper quarter of the low half and one mirrored into the lower quarter:

```
P[H + k]     = A[k] | B[k]          k = 0 .. H-2
P[H - 2 - k] = A[k] | B[k]          k = 0 .. H-2
P[H - 1]     = A[0] | B[0]          (middle bit, see below)
P[N - 1]     = A[H-1] | B[H-1]      (LSB upper gate)
```

For the default N = 8, with `o = A[3:0] | B[3:0]`:

| product bit | P7 | P6 | P5 | P4 | P3 | P2 | P1 | P0 |
|-------------|----|----|----|----|----|----|----|----|
| source      | o3 | o2 | o1 | o0 | o0 | o0 | o1 | o2 |

and `comp = A[3] & B[3]` adds one unit at column 8.

Some of this follows the gate-level diagram closely. The OR gates, the
AND-OR gate on bit H-1, and the wires from gate H-2 to P[N-2] and P0 and from
gate H-3 to P[N-3] and P1 are drawn there. Two points are this design's own:

* The diagram shows no gate for the middle bit P[H-1]. It is driven by gate 0
  here.
* How the compensation bit enters the exact multiplier is not specified. Here
  it is one more addend row of the carry-save tree, with a single bit in
  column 0. So it adds 1 at weight 2^N. The sum still fits:
  (2^H-1)^2 + 1 < 2^N.

Worked example (N = 8): A = 0xB7, B = 0x9C.
A_hi * B_hi = 11 * 9 = 99 = 0x63, and comp = A3 & B3 = 0.
The low half gives `o = 0111 | 1100 = 1111`, so all eight low bits are 1.
The result is 0x63FF = 25599. The exact product is 28548.

## The perfect multiplier (`msb_booth_mult`)

It follows the usual modified-Booth pipeline, all combinational. The exact
multiplier is required and drawn as four blocks. Their insides, listed below,
are standard choices made for this design.

1. **`booth_encoder`** zero-extends the unsigned W-bit multiplier (W = H).
   It cuts it into G = W/2 + 1 overlapping 3-bit windows. Each window becomes
   a digit in {-2, -1, 0, +1, +2}, carried as `pm_pkg::booth_digit_t`
   `{neg, one, two}`. A zero digit is never marked negative, and an immediate
   assertion checks that every digit code is legal.
2. **`booth_decoder`** (one per digit) selects 0, A or 2A and inverts the
   selection for a negative digit. The result is a (W+2)-bit one's-complement
   partial product. The missing +1 comes out separately as `neg`.
3. The partial products are sign-extended to 2W bits and shifted by 2i. The
   `neg` bits form one extra row and the compensation bit another.
   For N = 8 that makes 3 + 1 + 1 = 5 rows of 8 bits.
4. **`csa_tree`** reduces the rows to two. Each level groups the rows in
   threes through full adders, so R rows become 2*(R/3) + R%3 rows. Levels
   repeat until two rows remain: three levels for five rows. All arithmetic
   is modulo 2^WIDTH.
5. **`cla_adder`** adds the last two rows. It uses 4-bit lookahead groups:
   inside a group every carry is a flat sum of products of generate,
   propagate and the group carry-in. The group carries are chained.

## Accuracy

The testbenches measure the error e = exact - approximate. At N = 8, over
all 65536 operand pairs:

| measure                          | value     |
|----------------------------------|-----------|
| mean error                       | 1601.0    |
| mean absolute error              | 1606.6    |
| maximum absolute error           | 6914      |
| mean relative error (exact != 0) | 21.0 %    |

A run of 1000 random 8-bit pairs gives about 19 % mean relative error.

Almost all of this comes from the dropped cross products. The relative error
falls roughly as 2^-(N/2) as N grows. Random samples measured 13.9 % at
N = 10, 8.8 % at N = 12, 4.6 % at N = 14, 2.7 % at N = 16 and under 0.1 %
at N = 32.

The error analysis this architecture was published with claims far better
figures. It gives an average error of 1.25 % (98.75 % accuracy) for
1000 random 8-bit inputs. It also gives closed-form error bounds that depend
only on the number of approximated columns, such as a mean absolute error of
2^(LSB-2) - 1/4. The structure implemented here does not reach these figures.
They can hold only if the low-half errors are the only ones, that is, if the
cross products were produced somewhere. No such structure is described, so
this RTL builds the structure as drawn and reports the accuracy it actually
gets. Use it on that basis. The power, delay and area figures published with
the design are transistor-level results, and this RTL makes no claim about
them.

## Files

| file | contents |
|------|----------|
| `rtl/prob_mult.sv` | top: N x N probabilistic multiplier |
| `rtl/lsb_imperfect.sv` | low half: groups the two parts below |
| `rtl/lsb_upper.sv` | AND-OR gate: P[N-1] and the compensation bit |
| `rtl/lsb_lower.sv` | OR gates for P[N-2:0] |
| `rtl/msb_booth_mult.sv` | exact high-half multiplier plus compensation |
| `rtl/booth_encoder.sv`, `rtl/booth_decoder.sv` | radix-4 Booth recoder and partial-product generator |
| `rtl/csa_tree.sv` | carry-save reduction tree, any number of rows |
| `rtl/cla_adder.sv` | carry-lookahead adder |
| `rtl/pm_pkg.sv` | `booth_digit_t` and `booth_groups()` |
| `tb/tb_*.sv` | self-checking testbench for each module |
| `tb/pm_tb_pkg.sv` | reference model `pm_ref()` and error statistics |
| `tb/pm_sweep_point.sv`, `tb/tb_prob_mult_sweep.sv` | width sweep, N = 4 to 32 |

Parameters: `prob_mult.N` is the operand width. It defaults to 8 and must be
even and at least 4. The submodules take W = N/2 or a row count and width,
and `prob_mult` derives these from N.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops.
Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pm_pkg.sv tb/pm_tb_pkg.sv tb/tb_prob_mult.sv --top-module tb_prob_mult
./obj_dir/Vtb_prob_mult
```

Swap `tb_prob_mult` for any other `tb_*` name. `tb_prob_mult` runs the
default 8-bit design over all operand pairs plus 1000 random ones. It prints
the error statistics and counts how often each mechanism was exercised:
compensation bit set, and each Booth digit value. If any of them never
occurs, that counts as a failure. The unit testbenches run exhaustively
where the input space is small and randomly otherwise. `tb_prob_mult_sweep`
checks N = 4, 6, 10, 12, 14, 16 and 32 against the reference model and
prints the error at each width.

## Changing the design

* **A different split or width:** set `N`. The low half always spans the
  lower N/2 operand bits.
* **Another exact multiplier:** any exact multiplier will do for the high
  half, as long as it computes `a*b + comp` over 2W bits. Replace
  `msb_booth_mult`.
* **Another compensation scheme:** change the single row `rows[G+1]` in
  `msb_booth_mult` and the gate in `lsb_upper`.
* **Pipelining:** the design is purely combinational. Put registers at the
  ports of `prob_mult`, or between `csa_tree` and `cla_adder`, if timing
  needs them.
