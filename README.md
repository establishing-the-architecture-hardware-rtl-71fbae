# Flagged BCD adder

A decimal (BCD) adder has to do two additions per digit: first the binary sum
of the two digit codes, then, when that sum is above 9, a second addition of
the constant 6 (`0110`) that skips the six unused 4-bit codes and produces the
decimal carry. The classic single-digit BCD adder spends a second 4-bit binary
adder on that correction.

The flagged BCD adder removes the second adder. Because one operand of the
correction is a constant, the carries of `S' + 0110` reduce to one OR and one
AND gate, and the correction becomes "invert these bits of `S'`". A small
*flag bit computation* block works out which bits to invert, a *flag inversion*
block inverts them, and a multiplexer chooses between the corrected and the
uncorrected digit. This repository holds synthesizable SystemVerilog for that
digit slice, for the binary adders it can use as its first stage, and for a
multi-digit adder built from it (two digits by default).

Everything is combinational: there is no clock, no register and no reset.

## One digit slice

```
 a[3:0] b[3:0] cin
     |     |    |
  +------------------+
  | fast binary adder|  S' = a + b + cin (binary), carry Co
  +------------------+
     |S'[3:0]     |Co
     |            v
     |   +-------------------+
     +-->| excess-9 detector |---> Cout  (1 when {Co,S'} > 9)
     |   +-------------------+       |
     |            +------------------+--------------------+
     v            v                                       |
  +-------------------------+   F[4:0]  +---------------+ |
  | flag bit computation    |---------->| flag inversion|--M[3:0]
  +-------------------------+    S'     +---------------+ |   |
     |                                                    |   |
     +------------------------- S' ----------------> 0 [ 8:4 mux ] 1
                                                     sel = Cout
                                                          |
                                                       r[3:0], cout = Cout
```

`flagged_bcd_adder` wires the steps together:

1. **Fast binary adder** (`fast_binary_adder`) adds the two digit codes and the
   incoming decimal carry. For valid BCD inputs `{Co, S'}` is 0..19.
2. **Excess-9 detector** (`excess9_detector`) raises `Cout` when `{Co, S'}`
   exceeds 9: `Cout = Co | S3'·S2' | S3'·S1'`. `Cout` is at once the decimal
   carry out of the digit and the multiplexer select.
3. **Flag bit computation** (`flag_bit_computation`) and **flag inversion**
   (`flag_inversion_logic`) form `M = S' + 6 (mod 16)` without an adder.
4. **Output multiplexer** (`bcd_mux`, four 2:1 multiplexers) passes `S'` when
   `Cout = 0` and `M` when `Cout = 1`.

### Why the flags work

Adding `0110` to `S'` bit by bit, with `d_i` the carry into bit `i`:

| bit | constant bit | carry in              | result bit        |
|-----|--------------|-----------------------|-------------------|
| 0   | 0            | d1 = 0                | S0'               |
| 1   | 1            | 0                     | not S1'           |
| 2   | 1            | d2 = S1'              | S2' xor not d2    |
| 3   | 0            | d3 = S2' or d2        | S3' xor d3        |
| out |              | d4 = S3' and d3       |                   |

Bit 2's carry uses OR because the constant bit there is 1 (the majority of
`S2'`, 1 and `d2`); bit 3's uses AND because the constant bit is 0. The flags
are named after these carries:

```
F0 = 0   F1 = 1   F2 = not d2   F3 = d3   F4 = d4
M0 = S0'   M1 = F2   M2 = F2 xor S2'   M3 = F3 xor S3'
```

(`M1 = F2` because `not S1' = not d2`.) `F4`, the carry out of `S' + 6`, is
not needed: the decimal carry is already `Cout`.

The correction is selected only in two ranges, and both give the right digit:

* `Co = 0`, `S'` = 10..15: `S' + 6` = 16..21, so `M` = 0..5 and the dropped
  carry is the decimal carry.
* `Co = 1`, `S'` = 0..3 (sums 16..19): `M = S' + 6` = 6..9.

In the flag block the `S'` bits enter only while `Cout = 1`; while `Cout = 0`
they are held at 0. The multiplexer ignores this path then, so the choice
does not change any result. It only keeps the flag logic from switching when
its output is not used.

## First-stage adders

`fast_binary_adder` has a `KIND` parameter (`bcd_pkg::adder_kind_t`). All
three structures are built from the one-bit `full_adder` and give identical
sums.

| `KIND`                 | module        | structure                                                                 |
|------------------------|---------------|---------------------------------------------------------------------------|
| `ADDER_CSK` (default)  | `csk_adder`   | 2-bit ripple blocks; a block whose bits all propagate passes its carry-in through a skip multiplexer |
| `ADDER_CSLA`           | `csla_adder`  | low 2-bit ripple block; each higher block computed for carry-in 0 and 1, then selected |
| `ADDER_RCA`            | `rca_adder`   | plain ripple chain of four full adders                                    |

The design was characterised with a carry-skip and with a carry-select first
stage. The reported FPGA figures for one digit were 9 logic elements, 12.98 ns
and 146.31 mW (carry-skip) against 13 logic elements, 12.30 ns and 146.43 mW
(carry-select). Carry-skip is the default here because it is the smaller one.
The reference adders (modified carry-skip, and the carry-select variant) were
only cited, not specified. The block size of 2 bits and the conventional
skip and select structures are therefore this implementation's own choices.

`full_adder` stands for a low-power hybrid full-adder cell: pseudo-NMOS
logic for the carry, pass-transistor logic for the sum, and an extra circuit
that drives the weak level-restoring PMOS. Only the cell's logic function
can be written as RTL. The transistor circuit is not modelled, so this RTL
carries none of the cell's power or delay properties.

## Multi-digit adder (top level)

`flagged_bcd_top #(DIGITS = 2, KIND = ADDER_CSK)` chains `DIGITS` slices: the
`cout` of digit `i` is the `cin` of digit `i+1`. So the decimal carries ripple
from digit to digit.

| port   | dir | width      | meaning                                         |
|--------|-----|------------|-------------------------------------------------|
| `a`    | in  | 4·DIGITS   | packed BCD operand, least significant digit in `[3:0]` |
| `b`    | in  | 4·DIGITS   | packed BCD operand                              |
| `cin`  | in  | 1          | decimal carry into digit 0 (tie to 0 for plain addition) |
| `sum`  | out | 4·DIGITS   | packed BCD sum                                  |
| `cout` | out | 1          | decimal carry out of the top digit              |

The result is `cout·10^DIGITS + sum`. Inputs with a digit above 9 are not
BCD. The outputs for them are whatever the logic yields and are not
checked.

## Where this RTL departs from, or goes beyond, the design as described

* **Carry-in per digit.** The single-digit block diagram has no carry input.
  Each slice gets a `cin` port so that digits can be chained, and the
  first-stage adder adds it in.
* **Two-digit structure.** The two-digit adder was described only as "two
  digits". Chaining the slices through `Cout` is the natural reading, but it
  is an assumption.
* **Excess-9 detector gates.** The detector's schematic pairs `Co` with `S2'`
  and `S3'` with `S1'`. The written description says the output is 1 exactly
  when the sum exceeds 9. The RTL implements that function
  (`Co | S3'·(S2' | S1')`). It is the same function as the correction logic
  of the classic BCD adder.
* **F0.** One place gives `F0 = 0` and another gives `F0 = S0'`. The RTL uses
  `F0 = 0`. `F0` does not affect any output.
* **Gate types in the flag and inversion schematics.** The carry equations
  fix OR for `d3` and AND for `d4`. XOR for `M2` and `M3` follows from
  `M = S' + 6`.
* **Not built:** the classic two-adder BCD adder and the other decimal adders
  that the design was compared against (correction-free, carry-skip BCD).
  They are baselines, not part of this design.

## Files

| file                              | contents |
|-----------------------------------|----------|
| `rtl/bcd_pkg.sv`                  | `bcd_digit_t`, `adder_kind_t` |
| `rtl/full_adder.sv`               | one-bit full adder |
| `rtl/rca_adder.sv`, `rtl/csk_adder.sv`, `rtl/csla_adder.sv` | binary adders, `WIDTH` (4) and, for skip/select, `BLOCK` (2) |
| `rtl/fast_binary_adder.sv`        | first stage, picks one of the three by `KIND` |
| `rtl/excess9_detector.sv`         | `Cout` |
| `rtl/flag_bit_computation.sv`     | `d4..d1`, `F4..F0` |
| `rtl/flag_inversion_logic.sv`     | `M3..M0` |
| `rtl/bcd_mux.sv`                  | 8:4 output multiplexer |
| `rtl/flagged_bcd_adder.sv`        | one digit slice |
| `rtl/flagged_bcd_top.sv`          | `DIGITS`-digit adder, top level |
| `tb/tb_<module>.sv`               | self-checking testbench for each module |
| `tb/tb_flagged_bcd_top_full.sv`   | the top at its defaults through the complete two-digit addition table |

## Verification

Every testbench compares the outputs with integer arithmetic and ends with a
line `TB_RESULT checks=N failures=M`. Each has a watchdog.

* The binary adders are checked exhaustively at 4 and 8 bits, with both
  carry-ins.
* The digit slice is checked for all 200 digit pairs and carry-ins, with each
  of the three first stages.
* The flag, detector and multiplexer blocks are checked over all their inputs.
* `tb_flagged_bcd_top_full` runs all 20,000 two-digit additions on the
  default top.
* `tb_flagged_bcd_top` adds carry-select and ripple-carry instances and a
  four-digit instance. The four-digit instance gets 2,000 random additions
  plus `9999 + 0 + 1`, which sends a carry through all four digits.

Both top-level testbenches count the mechanisms of the design and fail if one
never occurs:

* a digit passed through uncorrected;
* a digit corrected from a 4-bit sum of 10..15;
* a digit corrected after a binary carry (sums 16..19);
* a carry from digit 0 into digit 1;
* a digit that overflows only because of the incoming carry;
* a carry out of the top digit.

Each testbench has also been run against a deliberately broken copy of its
module, and each copy made it fail.

Simulating with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/bcd_pkg.sv tb/tb_flagged_bcd_top_full.sv --top-module tb_flagged_bcd_top_full
./obj_dir/Vtb_flagged_bcd_top_full
```

Any other testbench runs the same way with its own file and module name.
`verilator --lint-only -Wall -Irtl -y rtl rtl/bcd_pkg.sv rtl/flagged_bcd_top.sv`
lints the design. The remaining lint warnings are about unused signals, which
are expected:

* `S0'` is not needed by the detector or the flag block.
* `S1'` is not read by the inversion block, because `M1` comes from `F2`.
* The slice does not use the `d` carries or `F0`, `F1` and `F4`.

## Changing it

* **More digits:** set `DIGITS`. The carry chain grows linearly.
* **Another first stage:** set `KIND`. To add a structure, extend
  `adder_kind_t` and add a branch to `fast_binary_adder`.
* **Different block size:** set `BLOCK` in `flagged_bcd_adder`, which passes
  it to the carry-skip and carry-select adders. It must divide 4.
