# Vedic multipliers: 2x2 up to 32x32, with a size selector

This is a family of unsigned binary multipliers built on the *Urdhva-Tiryagbhyam*
("vertically and crosswise") rule of Vedic arithmetic. You multiply the vertical
digit pairs and the crosswise digit pairs of the two numbers. Every such partial
product is independent of the others, so hardware can form them all at once and
then only add them up. A 2x2-bit multiplier is the leaf. Each larger size
(4x4, 8x8, 16x16, 32x32) is four copies of the size below it plus three adders.
A top level, `vedic_multi`, runs a 4x4, an 8x8, a 16x16 and a 32x32 multiplier
side by side. A two-bit select code picks which of them delivers its product.

All of it is combinational: no clock, no pipeline registers, no handshake. The
only storage is one transparent latch per output of the selector.

## Vertically and crosswise

Take two 2-bit numbers a = a1 a0 and b = b1 b0. The rule works column by column,
right to left:

| step | column | what is added | result bit |
|------|--------|---------------|------------|
| 1 | vertical, right | a0·b0 | q0 |
| 2 | crosswise | a1·b0 + a0·b1 | q1, carry c1 |
| 3 | vertical, left | a1·b1 + c1 | q2, carry |
| 4 | — | the carry of step 3 | q3 |

In binary a one-bit product is an AND. Step 2 is a half adder on two ANDs, and
step 3 a half adder on an AND and the carry. That is all of `vedic_2x2`: four
ANDs and two `half_adder` instances. For example, 10 x 11 gives q = 0110.

For wider operands the same rule is applied to *digits that are themselves
half-words*. That is the recursion below.

## Doubling the width: four sub-products and an adder tree

This is the part that needs the most care. Split the 2H-bit operands into H-bit
halves, a = {ah, al} and b = {bh, bl}. Four HxH multipliers give:

```
q0 = al*bl   (vertical, right)
q1 = ah*bl   (crosswise)
q2 = al*bh   (crosswise)
q3 = ah*bh   (vertical, left)            each 2H bits wide
a*b = q3·2^(2H) + (q1 + q2)·2^H + q0
```

`vedic_adder_tree` adds them with three adders, aligned like this (H = 2, the
4x4 level):

```
                 bit:  7 6 5 4 3 2 1 0
adder 1 (3H = 6 bits)  [  q3   ] 0 0         {q3, H zeros}
                     + 0 0 [  q2   ]         {H zeros, q2}
adder 2 (2H = 4 bits)      [  q1   ]         q1
                     +     0 0 [q0hi]        {H zeros, q0[2H-1:H]}
adder 3 (3H = 6 bits)  adder1 + {H zeros, adder2}  -> product bits [4H-1:H]
product bits [H-1:0]   = q0[H-1:0]        (no adder at all)
```

The low H bits of q0 overlap nothing else, so they go straight to the output.
The upper half of q0 is folded in by adder 2. Every adder output drops its
carry, which is safe:

* adder 1 is at most (2^H − 1)^2 · (2^H + 1), below 2^(3H);
* adder 2 is at most (2^H − 1)^2 + 2^H − 1 = (2^H − 1)·2^H, below 2^(2H);
* adder 3 is exactly (a·b) >> H, below 2^(3H).

Adder widths per level:

| multiplier | built from | adders |
|-----------|------------|--------|
| `vedic_4x4`   | 4 x `vedic_2x2`   | 6, 4, 6 bits |
| `vedic_8x8`   | 4 x `vedic_4x4`   | 12, 8, 12 bits |
| `vedic_16x16` | 4 x `vedic_8x8`   | 24, 16, 24 bits |
| `vedic_32x32` | 4 x `vedic_16x16` | 48, 32, 48 bits |

So a 32x32 multiplier holds 256 `vedic_2x2` leaves and 85 adder trees. The
adder itself, `vedic_adder`, is a plain `a + b` of parameter width. The source
design does not say how its adders are built, so the synthesis tool's carry
chain is used. A carry-save or prefix adder would drop in here without touching
anything else.

Each NxN module is written out by hand, with no generic recursive module, so
each size stays its own readable unit with fixed ports `a`, `b` and `q`.

## The size selector, `vedic_multi`

| `sel` | multiplier | operands | output |
|-------|-----------|----------|--------|
| 00 | 4x4   | `a[3:0]` x `b[3:0]`   | `out1[7:0]`  |
| 01 | 8x8   | `b[7:0]` x `c[7:0]`   | `out2[15:0]` |
| 10 | 16x16 | `c[15:0]` x `d[15:0]` | `out3[31:0]` |
| 11 | 32x32 | `d[31:0]` x `d[31:0]` | `out4[63:0]` |

The operand buses overlap: `b` is the second operand of the 4x4 and the first
of the 8x8, and so on. The 32x32 multiplier squares `d`. A smaller multiplier
uses the low bits of a wider bus. `sel[1]` is the original design's selection
line S0, and `sel[0]` is S1. The codes are named in `vedic_pkg::size_sel_e`.

All four multipliers compute all the time. The selection acts on the outputs.
Each output has a transparent latch, open while its own code is on `sel`, so:

* while selected, an output follows its operands after the combinational delay;
* once `sel` moves on, the output keeps the last product it showed;
* an output that was never selected holds its power-up value, because there is
  no reset.

The latches are deliberate, and synthesis reports 120 latch bits. If you want a
single multiplexed result word instead, replace the four `always_latch` blocks
with one `always_comb` case on `size`.

## Timing

Every multiplier is one combinational path from `a`/`b` to `q`. The depth grows
with each doubling by three adder levels at most, and in practice by one long
carry chain. There is no latency in cycles. A user who needs a clock rate should
register the operands and the product around the block, or pipeline between
the sub-multipliers and the adder tree. Neither is part of this RTL.

## Where this follows the source and where it interprets it

Taken from the original design: the 2x2 gate structure, the four-way split and
the three-adder arrangement at every level, the adder widths, the selector's
code table, the operand pairing, the per-output latches, and every example
vector used in the tests.

Choices and readings made here:

* **16x16 adder widths.** One description of the 16x16 level gives "two 12-bit
  and one 8-bit" adders. Its schematic uses 24- and 16-bit adders, which are the
  widths the arithmetic needs. 12/8 are the 8x8 level's widths. 24/16 is built.
* **32x32 q0 slice.** One drawing labels the q0 slice fed to adder 2 as
  `q0[31:15]`, which would be 17 bits. The other levels use the exact upper half
  of q0, and so does this one: `q0[31:16]`.
* **Selector output.** The selector is drawn as a 4-to-1 mux with one output Y.
  Its waveform and schematic show four separate outputs, each held by a latch.
  The four latched outputs are built.
* **Unused high bits** of `b`, `c` and `d` for the smaller multipliers, and the
  32x32 operand being `d` twice, were read from the example waveform. Its four
  products all check out with this reading.
* **Signedness:** unsigned only. Every example is unsigned.
* **Reset:** none, because none is described.
* **Adder and half-adder insides** are not described. They are the plainest
  correct circuits.
* The source also ran the 4x4 and 8x8 multipliers on an FPGA board, with
  switches and LEDs. That board wiring is not part of this RTL. The multiplier
  ports are where it would connect.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
integer arithmetic done in the testbench and prints
`TB_RESULT checks=N failures=M`. Each also has a time-based watchdog, because
there is no clock.

| testbench | coverage |
|-----------|----------|
| `tb_half_adder` | all 4 inputs |
| `tb_vedic_adder` | 4-bit exhaustive; 48-bit corners and 2000 random |
| `tb_vedic_2x2` | all 16 pairs, plus the example vectors |
| `tb_vedic_adder_tree` | H=2 for all 256 operand pairs; H=16 corners and 2000 random |
| `tb_vedic_4x4` | all 256 pairs, plus example and board vectors (1010 x 1110 = 10001100, and the 3-bit 101 x 110 = 011110) |
| `tb_vedic_8x8` | all 65 536 pairs, plus example and board vectors (FF x FF = FE01) |
| `tb_vedic_16x16` | example vectors, corners, 20 000 random |
| `tb_vedic_32x32` | 0x12345000 x 0x1234 = 0x14B60404000, corners, 20 000 random |
| `tb_vedic_multi` | replays the four-step selector example, then 4000 random steps against a latch model |

`tb_vedic_multi` works on the top level exactly as built, with no parameter
changes. It also counts how often each select code was used, how often a
selected output followed new operands, and how often an unselected output held
while its operands changed. If any of these counts is zero, the test fails.

Each testbench has also been run against a deliberately broken copy of its
module, such as a swapped crosswise operand or a lost carry, and it reported
failures every time.

## Simulating

With Verilator 5 (it needs `--timing` for the `#` delays):

```
verilator --binary --timing --assert -Irtl rtl/vedic_pkg.sv tb/tb_vedic_multi.sv \
          --top-module tb_vedic_multi -Mdir obj -o sim
./obj/sim
```

Replace `tb_vedic_multi` with any other testbench name. `-Irtl` lets Verilator
find each module in `rtl/<module>.sv`. Every testbench finishes in well under a
second of run time. Elaborating the 32x32 level takes Verilator about a minute.

## Files

* `rtl/vedic_pkg.sv`: the select-code enum.
* `rtl/half_adder.sv`, `rtl/vedic_adder.sv`: the arithmetic primitives.
* `rtl/vedic_2x2.sv`: the leaf multiplier.
* `rtl/vedic_adder_tree.sv`: the three-adder combiner, parameter `H` (half width).
* `rtl/vedic_4x4.sv` … `rtl/vedic_32x32.sv`: the four recursive levels.
* `rtl/vedic_multi.sv`: the top level with the size selector.
* `tb/tb_*.sv`: one self-checking testbench per module.
