# Fused add-multiply-accumulate unit with direct sum-to-Booth recoding

This unit computes

    acc <= acc + X * (A + B)

once per clock cycle. X, A and B are N-bit operands (8 by default), either two's
complement or unsigned, and `acc` is a 2N-bit accumulator (16 by default).

The main idea is that the sum `Y = A + B` is never formed. A conventional design adds A and B
with a carry-propagate adder, then Booth-recodes the result, then multiplies. Here a
*sum-to-modified-Booth* (S-MB) recoder turns the two addends straight into radix-4 Booth
digits. Each digit comes from a slice of two full adders, and the slices are chained by
carries, like a ripple-carry adder of half as many stages. The Booth digits halve the
number of partial products.
Those partial products, the correction bits of the negated ones and the fed-back
accumulator all go into one Wallace tree of carry-save adders. A single carry-lookahead
adder at the end turns the tree's result into the next accumulator value. The unit
therefore has just one carry-propagate adder, at its output.

```
 A, B ──► smb_recoder ──► ND Booth digits ──┐
                                            ├──► booth_ppgen ──► ND rows + neg_row ──┐
 X ─────────────────────────────────────────┘                                        │
                                   ┌─────────────────────────────────────────────────┘
                                   ▼
        acc (fed back) ──────► csa_tree ──► sum, carry ──► cla_adder ──► mac_accumulator ──► acc
```

## Sum-to-Booth recoding (`smb_recoder`)

This is the least familiar part of the design.

A radix-4 modified Booth digit is normally taken from three bits of a finished
binary number: `d = -2*y[2k+1] + y[2k] + y[2k-1]`, with values -2 to +2. The recoder
produces digits of exactly this three-bit form, `{n, p1, p2}` with value `-2n + p1 + p2`,
so that

    A + B = Σ_i 4^i * (-2*n_i + p1_i + p2_i)

The ordinary Booth table then applies to each digit unchanged. A digit's three bits no
longer come from one number, though: they come from the full adders of that digit's slice
and the slice below.

**Slice j** covers bit positions 2j and 2j+1 and takes two carries from the slice below,
`c1` and `c2`. Both have weight 4^j.

| step | cell | inputs | outputs |
|------|------|--------|---------|
| even position 2j | full adder | a[2j], b[2j], c1 | sum `s`, carry `h` |
| odd position 2j+1 | full adder | a[2j+1], b[2j+1], h | sum `t`, carry `co` |
| digit j | — | — | `n = t`, `p1 = s`, `p2 = c2` (from below) |
| carries up | — | — | `c1 = co`, `c2 = t` |

The sum bit `t` has weight +2^(2j+1), but a Booth digit needs a *negative* bit at that
position. The identity `+t·2^(2j+1) = −t·2^(2j+1) + t·2^(2j+2)` solves this: `t` becomes
the digit's negative bit, and a copy of it moves up as the second carry `c2`. That carry
enters the next digit directly as its `y[2k-1]` bit.

Why two carries? With one carry, a slice would have to represent values from 0 to 7 as
digit + 4·carry, which reaches only 6. The second carry, which bypasses the full adders,
closes that gap.

**Signed operands** (`tc = 1`). The sign bits weigh negatively, so the odd position of the
top pair uses the signed full adder FA*: `-2·co + s = -a - b + h`. Its outputs are
`s = a^b^h` and `co = maj(a, b, ~h)`. Its positive `s` becomes the top digit's negative
bit by the same rewrite as above. The top term of the sum is then `y_K = s - co`, which
lies in {-1, 0, +1}.

**Odd widths.** The lone top bit position uses a final cell:
- For signed operands it is the same signed cell, and its carry forms the top digit's
  negative bit.
- For unsigned operands it is a plain full adder, and its carry gives one extra digit.

Number of digits: `ND = (N+1)/2 + 1`. For N = 8 that is 5 digits, which is enough for the
9-bit sum A + B.

Example: A = B = 2 (8-bit).
- Slice 0 gives digit 0 and passes `c1 = 1` upward.
- Slice 1 gives digit `{0, 1, 0} = +1`.
- A + B = 1·4 = 4.

The S-MB1 scheme provides the cell types used here: a conventional FA, the signed FA*,
and a signed cell at the end for odd widths. How the cells are wired into slices is this
design's own arrangement. It is checked exhaustively for 8-bit and 7-bit operands in
both number modes. Two related schemes build the same function from signed half adders
(S-MB2, S-MB3) and are not provided.

## Partial products (`booth_encoder`, `booth_ppgen`)

`booth_encoder` maps a digit to `{neg, one, two}` following the modified Booth table:

| y2k+1 y2k y2k-1 | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| multiple | 0 | +X | +X | +2X | −2X | −X | −X | 0 |

`booth_ppgen` builds one row per digit. Each row is X or 2X, sign-extended to the full
accumulator width and shifted left by 2i. A negative multiple is sent as its one's
complement. The missing +1 of each negation is put at bit 2i of one extra row, `neg_row`.
Those positions never collide, so one row holds all the corrections.

X is extended by one bit: sign-extended when `tc = 1` and zero-extended when `tc = 0`.
This lets the same signed rows serve unsigned operands. There are no 3X "hard multiples".

## Carry-save tree and final adder (`csa_tree`, `csa_row`, `cla_adder`)

`csa_tree` takes `ND + 2` rows: the partial products, `neg_row` and the current
accumulator. Each layer passes groups of three rows through a `csa_row` (a row of full
adders) and passes leftover rows through unchanged. Layers repeat until two rows remain.
At the default size that is 7 → 5 → 4 → 3 → 2, four full-adder delays. Accumulation
therefore costs no adder of its own.

`cla_adder` adds the final sum and carry vectors. Groups of `GROUP` bits (4 by default)
compute every internal carry directly from generate/propagate terms and the group's
carry-in. Group carries pass from group to group. All arithmetic is modulo 2^ACC_W.

## Interface and timing (`lp_mac`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low; clears `acc` |
| `en` | in | 1 | accumulate the current X, A, B at the next edge |
| `clr` | in | 1 | clear `acc` at the next edge (wins over `en`) |
| `tc` | in | 1 | 1: operands are two's complement; 0: unsigned |
| `x`, `a`, `b` | in | N | operands |
| `acc` | out | ACC_W | accumulated result |

Parameters:
- `N`: operand width, default 8, even or odd.
- `ACC_W`: accumulator width, default 2N.

The datapath from the operands to the accumulator input is combinational. In a cycle
with `en` high, `acc` becomes `acc + X*(A+B)` at the next rising edge. The new operand set
can follow on the next cycle, which gives one operation per clock with one cycle of
latency. `tc` may change from cycle to cycle. The product can need 2N+1 bits, so sums
wrap modulo 2^ACC_W. There is no saturation or overflow flag.

Package `mac_pkg` holds the digit types (`mb_bits_t`, `mb_ctrl_t`) and the helper
functions `mb_digits()` and `mb_value()`.

## Where this design makes its own choices

The source design fixes these points:
- the fused add-multiply-accumulate structure;
- direct recoding of A + B with FA/FA*-type cells;
- radix-4 Booth partial products;
- a CSA tree that takes in the accumulator;
- a carry-lookahead final adder;
- 8-bit X, A and B and a 16-bit Z.

These points are this design's own choices:
- the slice wiring of the recoder (the two-carry scheme above);
- the one/two/neg encoding;
- full-width sign extension of the partial products rather than a sign-extension-prevention trick;
- the Wallace grouping;
- the CLA group size;
- single-cycle timing;
- the `en`/`clr`/`rst_n` controls;
- wrap-around on overflow;
- a run-time `tc` input in place of separate signed and unsigned builds.

The reported area and power figures for a 90 nm standard-cell implementation are not
reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_smb_recoder` | every (A, B) pair, 8-bit and 7-bit, signed and unsigned: the weighted digit sum equals A + B |
| `tb_booth_encoder` | all 8 digit patterns against the Booth table |
| `tb_booth_ppgen` | random X and digits: each row plus its correction equals digit·X·4^i, and all rows together equal the product |
| `tb_csa_tree` | trees of 3, 4, 7 and 10 rows against plain addition |
| `tb_cla_adder` | 16-bit/group-4 and 13-bit/group-5 adders, with random operands and long carry chains |
| `tb_mac_accumulator` | load, hold, clear priority, asynchronous reset |
| `tb_lp_mac` | the whole unit at its default size (see below) |
| `tb_lp_mac_odd` | the same end-to-end test at N = 7, ACC_W = 14 |

`tb_lp_mac` starts with a worked example: X = A = B = 2 gives 8, and a second operand set
is then added to it. It goes on with extreme operands and about 20,000 random cycles.
Every cycle it compares `acc`, both before and after the clock edge, with an integer
reference model.

It also counts how often each mechanism occurs and fails if one never does. The counted
mechanisms are:
- signed and unsigned accumulation;
- clear and hold;
- accumulator wrap-around;
- negative products;
- each Booth digit value from −2 to +2;
- a non-zero top digit;
- the asynchronous reset.

To run a testbench with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mac_pkg.sv tb/tb_lp_mac.sv \
          --top-module tb_lp_mac --Mdir obj_tb_lp_mac
./obj_tb_lp_mac/Vtb_lp_mac
```

Replace `tb_lp_mac` with any other testbench name. Each run takes well under a second.
To lint a module on its own:

```
verilator --lint-only -Wall -y rtl rtl/mac_pkg.sv rtl/lp_mac.sv --top-module lp_mac
```

All RTL is synthesizable SystemVerilog-2017. It lints clean under `verilator -Wall` and
elaborates with the slang front end of yosys.
