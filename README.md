# Clock-gated, hardware-shared 64-bit ALU

An ALU usually evaluates every operation every cycle and then throws all
results but one away. This design cuts that waste in two ways:

* **Clock gating.** Each family of operations lives in its own *unit*, and
  each unit ends in its own result register. A small clock-gating block
  passes the clock only to the unit of the selected operation, so in any
  cycle at most one unit's register is clocked. The other units' registers
  (and, in a real device, their clock nets) stay still.
* **Hardware sharing.** ADD, SUB, INC and DEC all have the form
  "A plus something", so one *adder + 2's complement* unit does all four.
  There are no separate adder, subtractor, incrementer and decrementer units.

An output multiplexer, steered by the same select code, puts the selected
unit's register on the result `Z`.

There are two ALUs, both 64 bits wide:

| ALU | Select | Units | Operations |
|---|---|---|---|
| `alu8_opt` | 3 bits | 5 | AND, XNOR, XOR, OR, ADD, SUB, INC, DEC |
| `alu15_opt` | 4 bits | 11 | the eight above, plus rotate right/left, shift right/left, BCD add, BCD subtract, BCD multiply, and NOP |

`alu_top` holds both ALUs side by side. They share the clock and nothing else.

## Operation codes

The 8-operation ALU uses codes 0000 to 0111 without the leading zero.

| `sel` | Operation | Unit (gated clock) | Result |
|---|---|---|---|
| 0000 | AND | `and_unit` | `A & B` |
| 0001 | XNOR | `xnor_unit` | `~(A ^ B)` |
| 0010 | XOR | `xor_unit` | `A ^ B` |
| 0011 | OR | `or_unit` | `A \| B` |
| 0100 | ADD | `addsub2c_unit` | `A + B` mod 2^64 |
| 0101 | SUB | `addsub2c_unit` | `A - B` mod 2^64 |
| 0110 | INC | `addsub2c_unit` | `A + 1` |
| 0111 | DEC | `addsub2c_unit` | `A - 1` |
| 1000 | rotate right | `rotate_right_unit` | A rotated right by one place |
| 1001 | rotate left | `rotate_left_unit` | A rotated left by one place |
| 1010 | shift right | `shift_right_unit` | A shifted right by one place, 0 shifted in |
| 1011 | shift left | `shift_left_unit` | A shifted left by one place, 0 shifted in |
| 1100 | BCD add | `bcd_addsub_unit` | A + B, 16 decimal digits, mod 10^16 |
| 1101 | BCD subtract | `bcd_addsub_unit` | A - B, mod 10^16 (10's complement if A < B) |
| 1110 | BCD multiply | `bcd_mult_unit` | low 16 digits of A x B |
| 1111 | NOP | none | 0 |

The codes are also in `alu_pkg::op15_e`. There are no status flags: no carry,
no overflow, no zero flag.

## Timing and how to drive it

* Set `sel`, `a` and `b` before a rising edge of `clk`. Keep `sel` stable
  while `clk` is low, because the gating latches sample it then.
* The selected unit captures its result at that edge. From then on `Z` shows
  the result for as long as `sel` stays the same.
* The latency is one clock edge, and a new operation can start every cycle.
  The testbenches change inputs on the falling edge and check on the next
  rising edge.
* `Z` is the selected unit's register passed through a combinational
  multiplexer. If you change `sel`, `Z` at once shows the newly selected
  unit's register. That register still holds the last result that unit
  computed, maybe many cycles ago, until the next rising edge. Code that only
  reads `Z` one edge after setting `sel` never sees this stale value.
* No register has a reset. Each unit's register holds an undefined value
  until its unit is first selected.

## Clock gating

`clock_gating_logic15` (11 clocks) and `clock_gating_logic8` (5 clocks)
decode `sel` into a one-hot enable. Each enable drives a `clock_gate` cell:

* a latch that is transparent while `clk` is low and holds the enable;
* an AND of `clk` with the latched enable.

This is the usual glitch-free gating cell. A change of `sel` during the high
phase cannot cut a clock pulse short or start a new one; it takes effect at
the next rising edge. Synthesis reports one latch per gated clock (16 for
`alu_top`). These latches are intended.

The code-to-unit mapping is in the table above:

* all four arithmetic codes select the one shared unit;
* both BCD add and BCD subtract select the BCD adder/subtractor;
* NOP clocks nothing.

On an FPGA, clocks made in logic like this are normally mapped onto the
vendor's clock-buffer enables, or replaced by register clock enables. The RTL
keeps explicit gated clocks because gating the clock is the point of the
design.

## The shared adder + 2's complement unit

`addsub2c_unit` has two adders and two multiplexers:

```
            MUX2 (2:1)          2's complement       MUX1 (3:1)
 B ──┬──► 0 ┐                                   ┌── 0 ◄── B
 1 ──┼──► 1 ┴─► invert ─► adder 1 (+1) ─────────┼── 1
     │                                          └── 2 ◄── 1
     │                                               │
 A ──┼────────────────────────────────► adder 2 ◄────┘  (carry-in 0)
                                            │
                                       register ─► z
```

| Operation | MUX1 | MUX2 | Adder 2 computes |
|---|---|---|---|
| ADD | 0 | 0 | A + B |
| SUB | 1 | 0 | A + (~B + 1) |
| INC | 2 | – | A + 1 |
| DEC | 1 | 1 | A + (~1 + 1) = A - 1 |

Both adders are 64 bits wide. The select bits are `sel[1:0]` (`alu_pkg::arith_op_e`).

## Shift and rotate units

Each of these units is only wiring into 64 flip-flops. Each moves operand A by
exactly one bit place. B is not used.

## BCD units

The BCD operations treat each 64-bit operand as 16 packed BCD digits, with
digit 0 in bits [3:0]. The operands must be valid BCD: every nibble 0 to 9.
Other nibble values give undefined digits.

**Add/subtract** (`bcd_addsub_unit`):

* Each digit passes through a `bcd_digit_adder`: a 4-bit binary add, then a
  +6 correction and a decimal carry when the sum is above 9.
* The 16 digit adders form a ripple-carry chain.
* To subtract, a multiplexer feeds each adder the 9's complement of B's digit
  (`nines_complement`, which computes (x XOR 1111) + 1010 modulo 16).
  A carry of 1 enters digit 0. The sum is then A + (10^16 - B).
* The result is taken modulo 10^16. If A < B you get the 10's complement of
  B - A, in the same way as a binary subtraction wraps around.

**Multiply** (`bcd_mult_unit` around `bcd_array_mult`):

* Every digit of A is multiplied by every digit of B at the same time: 256
  single-digit products for 16 x 16 digits.
* Each product is formed in binary (`bcd_digit_mult`, 0 to 81). That cell
  merges pairs of partial products that a decimal digit can never set at
  the same time, for example x3·y2 and x2·y3. The product is then split
  into a tens digit and a units digit (`bin2bcd`).
* For each digit y_i of B, the units digits form one 32-digit row with weight
  10^(i+j) and the tens digits another with weight 10^(i+j+1).
* A chain of 32 BCD adders, each 32 digits wide, sums the 32 rows into the
  32-digit product. The product cannot overflow.
* The ALU has one 64-bit result bus, so the unit registers only the low 16
  digits of the product.

The multiplier is by far the largest unit. After coarse synthesis it accounts for
about 7,300 of the 7,500 cells of `alu15_opt`.

## Where this RTL departs from, or adds to, its source

The design follows a published description of these ALUs. That description
gives the unit structure, the operation codes, the clock table and the
drawings of the shared adder unit, the shift/rotate wiring, the one-digit BCD
adder/subtractor, the 9's complement cell and the BCD multiplier array. These
points are this RTL's own, or settle conflicts in the description:

* **Adder width.** The shared unit's adders are described as 8-bit. Here they
  are 64-bit, because the ALU is 64 bits wide.
* **Multiplexer table.** The description's select table for the shared unit
  has its two multiplexer columns swapped relative to its drawing. The reading
  used here gives every operation its named result.
* **Multiplexer count.** The description mentions three multiplexers in that
  unit, but only two are drawn or used. Two are built.
* **9's complement constant.** The description names the added constant as
  0110. It must be 1010 to give 9 - x; 1010 is 0110 with its bits reversed.
* **Gate-level detail not fully reproduced.** The one-digit BCD multiplier
  and the binary-to-BCD converter are described as hand-optimized gate
  networks. The multiplier keeps their main trick: partial products that can
  never both be 1 for a decimal digit are merged, leaving 12 bits instead of
  16. It then adds those bits with a plain adder rather than the drawn
  half/full-adder network. The converter is written by function, as a
  division by 10 with remainder. The order of the adders that sum the
  multiplier's partial products is also not the one drawn. The results are
  the same, but the area will differ.
* **BCD add/subtract.** The multi-digit ripple chain and carry-in = 1 for
  subtraction are chosen here. So are the modulo-10^16 result and dropping the
  final decimal carry.
* **Product width.** Only the low 16 digits of the BCD product are kept.
* **Operands of the one-operand units.** Shift and rotate use operand A.
* **Input side.** A and B are wired straight to every unit. No input-side
  selector or operand isolation is built.
* **NOP, reset and flags.** NOP outputs 0. There is no reset and there are no
  flags. The pin counts reported for the original FPGA builds (196 and 197)
  match exactly A, B, `sel`, `clk` and `Z`.
* **Clock-gating cell.** The latch-based clock-gating cell is chosen here.

The non-gated, non-shared "conventional" ALUs that the description uses as
baselines are not included. Nor are its FPGA power and resource figures: they
are measurements that simulation cannot reproduce.

## Files

* `rtl/alu_pkg.sv`: width, operation codes, unit numbering.
* `rtl/alu_top.sv`, `rtl/alu15_opt.sv`, `rtl/alu8_opt.sv`: the ALUs.
* `rtl/clock_gating_logic15.sv`, `rtl/clock_gating_logic8.sv`,
  `rtl/clock_gate.sv`: clock gating.
* `rtl/and_unit.sv`, `rtl/xnor_unit.sv`, `rtl/xor_unit.sv`, `rtl/or_unit.sv`:
  logic units.
* `rtl/addsub2c_unit.sv`: the shared arithmetic unit.
* `rtl/rotate_right_unit.sv`, `rtl/rotate_left_unit.sv`,
  `rtl/shift_right_unit.sv`, `rtl/shift_left_unit.sv`: rotate and shift units.
* `rtl/bcd_addsub_unit.sv`, `rtl/bcd_adder_n.sv`, `rtl/bcd_digit_adder.sv`,
  `rtl/nines_complement.sv`: BCD add/subtract.
* `rtl/bcd_mult_unit.sv`, `rtl/bcd_array_mult.sv`, `rtl/bcd_digit_mult.sv`,
  `rtl/bin2bcd.sv`: BCD multiply.
* `tb/tb_<module>.sv`: a self-checking testbench for each module. The
  exceptions are the helpers `clock_gate`, `bcd_digit_adder` and
  `bcd_adder_n`, which are tested through the modules that use them.
* `tb/tb_bcd_ref_pkg.sv`, `tb/tb_alu_ref_pkg.sv`: reference models used by
  the testbenches. They do decimal digit-array arithmetic and plain
  SystemVerilog operators, and share no code with the RTL.

Every module has a width parameter `W` where it applies, with default 64.
`bcd_array_mult` has a digit count `N`, with default 16.

## Verification

Each testbench drives its module, compares the outputs with values worked out
independently, and ends by printing `TB_RESULT checks=<n> failures=<n>`.

* **Small combinational cells.** These are checked exhaustively:
  * the 9's complement, all 10 digits;
  * the digit multiplier, all 100 pairs;
  * the binary-to-BCD converter, all values 0 to 99.
* **Units.** The units get corner cases and random operands, and every check
  also confirms the one-edge latency.
* **Array multiplier.** It is checked at 16 x 16 digits and at 4 x 4 digits.
* **Clock-gating blocks.** These are checked for:
  * exactly the right gated clock in every high phase;
  * all gated clocks low in the low phase;
  * no change when `sel` moves in the middle of a high phase.
* **ALU testbenches.** They also check that every unit other than the
  selected one keeps its register value.
* **`tb_alu_top`.** This is the end-to-end test at full default size. It runs
  3000 cycles on both ALUs. It checks every result, and checks that in every
  cycle exactly the selected unit's clock pulsed. It counts:
  * each operation code;
  * each use of the shared adder for ADD, SUB, INC and DEC;
  * each cycle a unit was held off while its operands changed.

  A mechanism that never happened counts as a failure.

To run a testbench with Verilator 5, list the packages first and let
Verilator find the rest:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/alu_pkg.sv tb/tb_bcd_ref_pkg.sv tb/tb_alu_ref_pkg.sv \
    tb/tb_alu_top.sv --top-module tb_alu_top -o sim
./obj_dir/sim
```

For another testbench, replace `tb_alu_top` with its name. Testbenches that do
not use the reference packages only need `rtl/alu_pkg.sv` before them.
Building `tb_alu_top` takes a few seconds, most of it spent on the BCD
multiplier, and running it takes well under a second.
