# Carry look-ahead decimal (BCD) adder

Decimal arithmetic is still the norm in banking, billing and anything else
where 0.1 must stay exactly 0.1. Numbers stored as binary-coded decimal
(BCD, four bits per digit, codes 0000..1001) can be added directly in
hardware. That avoids converting to binary and back. The catch is that a
4-bit binary adder produces codes 1010..1111 and carries at 16 rather than
at 10. Every digit therefore needs a correction step.

This RTL is a combinational four-digit (16-bit) BCD adder. Each digit does
its binary add with a small carry look-ahead (prefix) network rather than
a bit-serial ripple. It then detects whether the digit went past 9 and
adds 6 where needed. The digits are chained by their decimal carries.

```
            a[15:12] b[15:12]   a[11:8] b[11:8]   a[7:4] b[7:4]   a[3:0] b[3:0]
                |  |              |  |              |  |            |  |
   co <--- [digit 3] <-carry3- [digit 2] <-carry2- [digit 1] <-carry1- [digit 0] <--- cin
                |                 |                 |                 |
            s[15:12]           s[11:8]            s[7:4]            s[3:0]
```

## Inside one digit

`bcd_digit_adder` adds two digits `a`, `b` and a carry `cin` in five
stages. Each stage is its own module:

| stage | module | what it computes |
|---|---|---|
| pre | `pg_pre` | per bit: propagate `p = a ^ b`, generate `g = a & b` |
| carry network | `carry_network` (uses `black_cell`, `gray_cell`) | carries `c1..c4` into bits 1..3 and out of bit 3 |
| post | `pg_post` | binary sum `z = p ^ {c3, c2, c1, cin}` |
| correction detect | `bcd_correct_detect` | `corr = c4 \| z4&z3 \| z4&z2` |
| correction add | `bcd_correct_adder` (uses `full_adder`) | `s = z + 6` if `corr`, else `s = z` (mod 16) |

The digit's decimal carry out is `corr` itself.

### The carry network

A carry look-ahead adder writes every carry as a function of the operands
and the carry in. No carry has to wait for the one below it. In prefix
form, with `G[i:j]`/`P[i:j]` the generate/propagate of the bit span i..j:

```
c1 = G[0]   | P[0]   & cin
c2 = G[1:0] | P[1:0] & cin
c3 = G[2:0] | P[2:0] & cin
c4 = G[3:0] | P[3:0] & cin
```

Two levels of **black cells** build the span signals. A black cell joins
two adjacent spans: `G = Gh | Ph&Gl`, `P = Ph&Pl`. Level 1 builds spans
1:0 and 3:2. Level 2 builds 3:0 and 2:0. One **gray cell** per bit then
folds in the carry: `c = G | P&cin`. A gray cell is a black cell without
the propagate output. Every carry is therefore at most three cell levels
from the operands.

The network also brings out the group propagate and generate of all four
bits (`p_out`, `g_out`), for use by a second-level look-ahead unit. The
digit adder leaves them unconnected, because digits here are chained by
their decimal carries.

### Decimal correction

Number the binary sum bits z1..z4 from the least significant bit, so
`z[0]`..`z[3]` in the RTL. A 4-bit sum is 10..15 exactly when z4 is set
together with z2 or z3. A sum of 16..19 shows up as the binary carry c4.
So the correction condition is `c4 | z4&z2 | z4&z3`.

Adding 0110 skips the six unused codes. Its bit 0 is zero, so only bits
1..3 need full adders. The carry out of the top full adder is dropped. When
the correction is applied the decimal carry is 1 anyway, and it is already
on `co`.

Example: 8 + 7 gives z = 1111 and corr = 1. Then 1111 + 0110 = 0101, so the
digit is 5 with carry 1. Example: 9 + 9 + 1 gives z = 0011, c4 = 1 and
corr = 1. Then 0011 + 0110 = 1001, so the digit is 9 with carry 1.

## Interface and timing

`bcd_adder16 #(parameter int unsigned DIGITS = 4)`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | 4*DIGITS | packed BCD operands, digit 0 in bits 3:0 |
| `cin` | in | 1 | carry into digit 0 |
| `s` | out | 4*DIGITS | BCD sum |
| `co` | out | 1 | carry out of the top digit: the sum exceeded 10^DIGITS - 1 |

The adder is purely combinational. It has no clock and no reset, and the
result is valid one propagation delay after the inputs change. Register it
outside if it sits in a pipeline.

Operands must be valid BCD (every digit 0..9). The output is then always
valid BCD. `bcd_digit_adder` contains a deferred immediate assertion that
checks this in simulation. Digits 10..15 on the inputs are not rejected or
flagged. The same equations are simply applied to them.

Only the look-ahead is inside a digit. Between digits the decimal carry
ripples, so the delay grows linearly with `DIGITS`. Set `DIGITS` (for
example to 8 for a 32-bit adder) to widen the adder. Nothing else changes.

A reported FPGA implementation of this four-digit architecture used about
24 LUTs with a 10-level input-to-output path of roughly 12-16 ns on a
7-series part. Those numbers come from the original report and have not
been reproduced here.

## Files

`rtl/`:

- `bcd_pkg.sv`: digit type `bcd_digit_t`, the correction constant 0110, the default digit count
- `bcd_adder16.sv`: the multi-digit adder (top)
- `bcd_digit_adder.sv`: one digit
- `pg_pre.sv`, `carry_network.sv`, `black_cell.sv`, `gray_cell.sv`, `pg_post.sv`: binary look-ahead add
- `bcd_correct_detect.sv`, `bcd_correct_adder.sv`, `full_adder.sv`: decimal correction

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each
computes its expected values in plain integer arithmetic. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- The leaf cells, the carry network and the correction stages are tested
  over their full input spaces.
- `tb_bcd_digit_adder` runs all 200 valid digit/carry combinations.
- `tb_bcd_adder16` runs the four-digit adder at its default size. It uses
  directed corner cases (0 + 0, 9999 + 0 + 1, 9999 + 9999 + 1, 5000 + 5000,
  and others) and 200,000 random operand pairs.
- `tb_bcd_adder16` also counts how often each mechanism was exercised, and
  fails if one never was. The mechanisms are: correction of a digit sum of
  10..15, correction on a binary carry (16..19), a carry passed through a
  digit whose own sum is 9, a carry rippling from `cin` to `co`, overflow,
  and use of the carry in.
- `tb_bcd_adder32` runs the same checks with `DIGITS = 8`, a 32-bit
  adder, using 100,000 random pairs.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/bcd_pkg.sv tb/tb_bcd_adder16.sv \
          --top-module tb_bcd_adder16 -Mdir obj_tb
./obj_tb/Vtb_bcd_adder16
```

Swap in any other `tb_<module>` the same way. `-Irtl` lets Verilator find
each submodule by its file name. The package must come first on the command
line. The whole top-level test runs in well under a second.

## What follows the original design and what does not

These parts follow the original design:

- four cascaded one-digit BCD adders, carry in at digit 0 and overflow at the top
- the one-digit adder split into pre-processing (propagate/generate), a
  carry network of gray cells, post-processing (sum bits), correction
  detection from z4&z2, z4&z3 and the top carry, and a +6 correction adder
  built from full adders
- the correction flag doubling as the digit carry out
- the group propagate/generate outputs of the 4-bit look-ahead
- the port names `a`, `b`, `cin`, `s`, `co`

These are this implementation's own choices:

- **Propagate and generate encoding.** Propagate is `a ^ b`, which doubles
  as the half sum. Generate is `a & b`.
- **Carry-network topology.** The network is a two-level Sklansky-style
  prefix tree. Black cells form the span signals, with gray cells at the
  end. Only "gray blocks" and a simplified prefix structure were specified.
- **Correction adder.** It is a 3-bit ripple of full adders on bits 1..3.
- **Digit ordering.** Digit 0 sits in the low bits.
- **No registers, clock or reset.**
- **No handling of invalid BCD inputs.**
- **`DIGITS` parameter.** Widening is by this parameter, rather than by
  instantiating more digit adders by hand.

The conventional BCD adder is not included. It is two ripple 4-bit binary
adders with correction logic between them, and it served only as the
comparison baseline. Power and timing are not modelled.
