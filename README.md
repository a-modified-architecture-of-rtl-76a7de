# SPST multiplier-accumulator (radix-4 Booth, hybrid CSA accumulation)

A multiply-accumulate unit computes `acc = acc + x*y` once per clock. In a
plain design a multiplier produces a product, a carry-propagate adder turns it
into binary, and a second 2N-bit adder adds it to the accumulator. That
accumulation adder sets the critical path. This design drops the separate
accumulator adder:

* The multiplier `y` is radix-4 Booth recoded, so an N×N product has only N/2
  partial-product rows.
* The rows go into one carry-save adder (CSA) tree **together with the
  previous accumulator value**. The accumulator is kept in redundant
  sum/carry form, so no carry has to propagate inside the accumulation loop.
* Small 2-bit carry look-ahead adders inside the tree resolve the low half of
  the result as the tree goes. Only the high N bits are left for the final
  adder.
* **Spurious power suppression (SPST):** a detection unit looks at `y` and
  finds the rows whose Booth digit is zero. Those rows are not loaded into
  the tree's input registers, so they cause no switching inside the adders.

The default size is 8×8 with a 16-bit accumulator (`N = 8`). Any even
`N` from 4 to 64 is accepted. Sizes 4, 6, 8, 12 and 16 have been simulated.

## Pipeline and interface

```
          stage 1                      stage 2                   stage 3
 x,y,op ─► Booth encoders ─► rows ─► SPST row  ─► hybrid CSA tree ─► acc regs ─► N-bit CLA ─► acc_out
           SPST detector ─ zero ──►  registers     (+ fed-back      (lo | sh,ch,cy)   (high half)
                                                  acc state) ◄──────────┘
```

| port        | dir | width | meaning                                              |
|-------------|-----|-------|------------------------------------------------------|
| `clk`       | in  | 1     | clock                                                |
| `rst_n`     | in  | 1     | asynchronous active-low reset; clears everything     |
| `in_valid`  | in  | 1     | an operation is presented this cycle                 |
| `op`        | in  | 2     | `OP_MUL` acc=x·y, `OP_MAC` acc+=x·y, `OP_MSU` acc−=x·y, `OP_CLR` acc=0 |
| `x`, `y`    | in  | N     | multiplicand and multiplier, two's complement        |
| `out_valid` | out | 1     | `acc_out` is new this cycle                          |
| `acc_out`   | out | 2N    | accumulated value, two's complement, wraps mod 2^2N  |

Timing: an operation presented with `in_valid` at clock edge *t* shows up on
`acc_out`, with `out_valid` high, right after edge *t+2*. So the latency is three
register stages. One operation is accepted every clock, back to back, with no
stalls. Idle cycles (`in_valid` low) leave the accumulator and all row
registers unchanged. `acc_out` keeps the last result.

## Partial-product rows: the N_i and S_i bits

This part takes the most care to follow. Row *i* stands for digit
`d_i ∈ {−2,−1,0,+1,+2}` of the group `{y[2i+1], y[2i], y[2i−1]}` (with
`y[−1] = 0`), and it enters the tree at column 2i.

1. **Selection:** `pp_generator` picks 0, X or 2X as an N+1-bit two's
   complement value.
2. **One's complement plus N_i:** for a negative digit the value is only
   inverted. The missing +1 travels as a separate bit, `nbit` (N_i), which
   the tree adds in column 2i. It rides in the next level's row, in column
   2i, which is free there because row i+1 starts at column 2i+2.
3. **Sign bit inverted (S_i):** each row's sign bit is inverted. This turns the
   row into the non-negative number `row_i = value_i + 2^N`. The tree then
   never has to sign-extend a row. The extra 2^N·4^i of every row is removed
   by one constant, added once in the last level:

   `K = −Σ_i 2^(N+2i) mod 2^(2N)` (for N = 8, `K = 0xAB00`).

   `mac_pkg::sext_const` computes K.

So `Σ_i 4^i (row_i − 2^N + nbit_i) = x·y`. A zero digit gives the row
`{1, 0…0}`, which contributes exactly nothing once K is included. This is
the "neutral row" that the SPST registers put in place of a suppressed row.

Multiply-subtract flips the sign of every digit (`sub` input of
`pp_generator`). It costs nothing in the tree.

## The hybrid CSA tree (`csa_accumulator`)

The tree is a linear array of N/2+1 levels (5 for 8×8):

| level      | adds to the running sum/carry words                                  |
|------------|------------------------------------------------------------------------|
| 0          | fed-back accumulator (sum word, carry word) + row 0                    |
| j = 1…N/2−1| row j at column 2j, plus N_(j−1) at column 2j−2                        |
| N/2        | constant K (or K + 2^N, see below), plus N_(N/2−1) at column N−2       |

Each level uses a full adder wherever three bits can meet and a half adder
wherever only two can. The choice is fixed at elaboration by
`row_has_bit`/`carry_has_bit`. After level j ≥ 1, columns 2j−2 and 2j−1 get no
more operand bits. A `cla2` (2-bit CLA with inputs a1, a0, b1, b0 and cin) adds
their sum and carry bits into two final result bits and passes its carry to
the next level's `cla2`. Later levels do not compute those columns at all.

After the last level the state is:

* `acc_lo`: the low N bits, already binary;
* `acc_sh`, `acc_ch`: the high N bits as sum and carry words;
* `acc_cy`: the carry out of the `cla2` chain, of weight 2^N.

Value = `{acc_sh + acc_ch + acc_cy, acc_lo}` mod 2^2N.

**Feedback.** On the next operation the state enters level 0 as a sum word
`{acc_sh, acc_lo}` and a carry word `{acc_ch, 0…0}`. Because the carry word's
low half is zero, level 0 needs only half adders there. `acc_cy` has to enter
at column N, and every level is already full in that column. It is therefore
folded into the constant row: the last level adds either K or K + 2^N, chosen
by `acc_cy`. That is a selection between two constants, not an adder.
`OP_MUL` and `OP_CLR` take the feedback as zero.

**Final adder (`cla_adder`).** This is stage 3, an N-bit adder that computes
`acc_sh + acc_ch + acc_cy` with full carry look-ahead: every carry is a
sum of products of generate and propagate terms. Its carry out would be bit
2N of the accumulator and is dropped.

## Spurious power suppression

* `spst_detector` reads only the multiplier. It flags row i when its group is
  `000` or `111`, because a zero digit cannot change the result. For
  `OP_CLR` it flags every row.
* `spst_row_latch` (one per row) is the stage-1 register. For an accepted
  operation it loads the new row only if the row is not flagged. A flagged row
  leaves the stored bits untouched, and a registered flag makes the output
  present the neutral row `{1,0…0}` with N_i = 0. So the flip-flops of a
  suppressed row do not toggle. Only the flag and the row's output
  multiplexer change.

The suppression is done with edge-triggered registers with a load enable, not
with transparent latches. This keeps the design free of level-sensitive
storage. It also means the same registers serve as the pipeline boundary.

## Files

| file | content |
|------|---------|
| `rtl/mac_pkg.sv` | `mac_op_e`, `booth_digit_t`, `sext_const()` |
| `rtl/booth_encoder.sv` | radix-4 recoding of one group |
| `rtl/pp_generator.sv` | one row: 0/±X/±2X, one's complement, N_i, inverted sign |
| `rtl/spst_detector.sv` | SPST detection unit |
| `rtl/spst_row_latch.sv` | SPST data-controlling register for one row |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | CSA cells |
| `rtl/cla2.sv` | 2-bit CLA inside the tree |
| `rtl/csa_accumulator.sv` | hybrid CSA tree + accumulator registers |
| `rtl/cla_adder.sv` | final carry look-ahead adder |
| `rtl/spst_mac.sv` | top level |

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

* exhaustive: `tb_booth_encoder`, `tb_cla2`, `tb_pp_generator` (all x, digits,
  signs at N=8), `tb_spst_detector` (all y and ops), `tb_cla_adder` (all 8-bit
  operands; random 16-bit ones);
* random against a reference model: `tb_spst_row_latch` (also checks that a
  suppressed row's stored bits never change), `tb_csa_accumulator` (arbitrary
  rows, not only Booth rows, 20 000 clocks);
* end to end: `tb_spst_mac` (default 8×8) and `tb_spst_mac_n16` (16×16). Each
  runs 20 000 random operations with idle gaps and corner operands (most
  negative, most positive, 0, −1) through all four ops. Every result is
  checked against integer arithmetic at exactly three clocks of latency. The
  testbench also counts, and requires, suppressed rows, fully suppressed
  products, negative and ±2 digits, a fed-back `cla2` chain carry and
  accumulator wrap-around.

Run one with plain Verilator from the project root, for example:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/tb_spst_mac.sv --top-module tb_spst_mac -o sim
./obj_dir/sim
```

To change the size, set `N` on `spst_mac` (even, 4…64). Rows, tree levels,
constant and adder widths all follow from it.

## Departures and open points

* **No saturation.** The accumulator is 2N bits and wraps. A saturating MAC
  would need guard bits and an overflow test on the redundant state, and no
  structure for that is given.
* **Rows are N+1 bits.** An 8×8 row is often drawn as 8 bits wide, but ±2X
  needs 9.
* **Cell placement.** The FA/HA/CLA mix follows the scheme described above.
  The exact placement of each cell in the tree is this design's own, and so is
  the way the `cla2` chain carry re-enters (through the constant row).
* **Operation encoding, valid handshake, reset and register placement**
  between the three stages are this design's choices.
* **SPST uses registers, not latches** (see above). The power saving itself
  is not measured here; only the absence of row-register activity is checked.
* **The final adder runs on every operation.** Because the loop carries the
  redundant state, it could instead run only when a final result is needed.
  The simpler always-on form is used.
