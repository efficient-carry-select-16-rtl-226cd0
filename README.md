# 16-bit square-root carry-select adder with excess-1 converters

A ripple-carry adder is small but slow: the carry has to travel through
every bit. A carry-select adder cuts the operands into stages. Each stage
computes its result twice ahead of time, once assuming a carry-in of 0 and
once assuming 1. When the real carry arrives from the stage below, it
only picks one of the two results through a multiplexer. The carry then
crosses one multiplexer per stage instead of one full adder per bit.

This design refines that scheme in two ways:

* **Square-root stage sizes.** The stages grow toward the most significant
  end: 2, 2, 3, 4 and 5 bits. A higher stage has more time to finish its
  internal ripple before the carry from below reaches its multiplexer.
  So larger stages cost no extra delay, and the adder needs fewer stages
  and multiplexers.
* **Binary-to-excess-1 converter (BEC) instead of a second adder.** A
  classic carry-select stage has two ripple adders. Here the carry-in 1
  result is made from the carry-in 0 result by adding one. The BEC does
  that with one inverter, one XOR per bit and a chain of AND gates, which
  is far fewer transistors than a second adder. The AND gates are a
  three-transistor pass-transistor cell, which saves more transistors.

The RTL models every cell by its logic function. The transistor-level
parts have no meaning at logic level: the pass-transistor AND, the
transmission-gate XOR and multiplexer, and their sizes, power and delay.
Only their function is modelled.

## Stage map

`{cout, sum} = a + b + cin`, 16-bit operands.

| stage | bits   | module       | how it is built                                   | carry out |
|-------|--------|--------------|---------------------------------------------------|-----------|
| 1     | 1:0    | `rca_stage1` | two full adders in cascade, carry-in `cin`        | C1        |
| 2     | 3:2    | `csa_stage`  | 2-bit adder with carry-in 0, 3-bit BEC, 6:3 mux   | C3        |
| 3     | 6:4    | `csa_stage`  | 3-bit adder with carry-in 0, 4-bit BEC, 8:4 mux   | C6        |
| 4     | 10:7   | `csa_stage`  | 4-bit adder with carry-in 0, 5-bit BEC, 10:5 mux  | C10       |
| 5     | 15:11  | `csa_stage`  | 5-bit adder with carry-in 0, 6-bit BEC, 12:6 mux  | `cout`    |

Stage 1 has nothing to select: its carry-in is known at once. The stage
widths are in `csa_pkg::STAGE_W`. The top module `sqrt_csa16` lays out the
stages from that list with `csa_pkg::stage_lsb()`. An elaboration check
makes sure the widths add up to `ADDER_W`.

## Inside a carry-select stage

This is the part that is easiest to misread. A `WIDTH`-bit stage
(`csa_stage`) works on **`WIDTH+1` bits**, not `WIDTH`:

1. `rca_c0` adds the stage's slices of `a` and `b` with the carry-in fixed
   at 0. It returns `r0 = {carry, sum}`, which is `WIDTH+1` bits.
2. `bec` of width `WIDTH+1` gives `r1 = r0 + 1`. That is exactly the
   result with carry-in 1, carry bit included. `r0` is at most
   `2*(2**WIDTH - 1)`, so `r0 + 1` never wraps, and the top bit of `r1` is
   the correct carry-in 1 carry-out.
3. `mux_bank` of width `WIDTH+1` (made of `mux2_tg` cells) picks `r1`
   when the incoming carry is 1, and `r0` when it is 0. The low `WIDTH`
   bits are the stage's sum. The top bit is the carry to the next stage.

So the 2-bit stage uses a 3-bit BEC and a "6:3" multiplexer (three 2:1
muxes), the 3-bit stage a 4-bit BEC, and so on. `r0` and `r1` depend only
on the stage's own operand bits. The path from the stage's carry-in to its
outputs is a single 2:1 mux.

### The converter

For `b` of `WIDTH` bits, `x = b + 1 mod 2**WIDTH`:

```
X0 = ~B0
Xi =  Bi ^ (B0 & B1 & ... & B(i-1))      for i >= 1
```

The AND term for bit `i` is built by one `and_3t` cell from the term for
bit `i-1` and bit `B(i-1)`. The chain therefore has `WIDTH-2` AND cells.
For the 3-bit BEC that is one inverter, two XORs and one AND. A ripple
chain is used for the wider converters too; a tree would be faster, but
the chain is the plain extension of the 3-bit circuit.

## Cells

| module       | function                        | modelling note |
|--------------|---------------------------------|----------------|
| `inv_cell`   | `vout = ~vin`                   | static inverter |
| `xor_tg`     | `y = a ^ b`                     | two inverters and two transmission gates. `b` steers them, passing `a` or `~a` |
| `mux2_tg`    | `y = s ? a : b`                 | inverter on `s` and two transmission gates. Pin `a` is chosen when `s = 1` |
| `and_3t`     | `and_out = a & b`               | written as a pass device (`a ? b : 0`). The weak high level of a real pass-transistor AND is not modelled |
| `half_adder` | `{carry, sum} = a + b`          | one `xor_tg` and an AND |
| `full_adder` | `{cout, sum} = a + b + cin`     | `sum = (a^b)^cin` from two `xor_tg`, `cout = ab + a·cin + b·cin` |

## What follows the source design and what does not

Taken from the source design:

* the five stage widths and the bit ranges;
* the carry-select stage built from a carry-in 0 ripple adder, a
  `WIDTH+1`-bit BEC and a bank of 2:1 muxes;
* the BEC equations;
* the 3-transistor AND cell inside the BEC;
* the mux polarity `y = s·a + s'·b`;
* the full-adder equations;
* the 2-bit first stage made of two full adders.

Choices of this implementation:

* **Carry-in port.** The first stage has a carry-in pin; here it is the top-level `cin`
  port. Tie it to 0 for a plain `a + b`.
* **Half adder at bit 0.** The carry-in 0 ripple adder (`rca_c0`) uses a
  half adder for bit 0 and full adders above. The source names the half
  adder as a building block but does not say where it goes.
* **BEC chain.** The AND chain of the 4-, 5- and 6-bit converters extends
  the 3-bit circuit; only the 3-bit converter is drawn in the source.
* **XOR steering.** The way `xor_tg` steers its transmission gates is one
  plausible reading of an 8-transistor XOR. Any such reading has the same
  logic function.
* **Stage 4 carry name.** "C10" for the carry out of stage 4 is a name of
  this implementation.
* **No clock.** The adder is purely combinational: no clock, no reset, no
  registers. The source describes no registers and gives delays only as
  analog measurements.

Not modelled:

* the conventional carry-select adder with two ripple adders per stage.
  It is the baseline the design is compared against;
* the variant of the BEC built with conventional AND gates. It has the
  same logic function as the one built here;
* transistor counts, power and delay. These are properties of the
  180 nm transistor implementation.

## Verification

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs.

* The gate cells, the half adder, the full adder and stage 1 are
  checked exhaustively.
* `tb_bec` checks every input at widths 3, 4, 5 and 6.
* `tb_rca_c0` checks every input at widths 2 to 5.
* `tb_csa_stage` checks every input, including carry-in, at widths
  2 to 5. It also confirms that both the ripple result and the excess-1
  result were selected.
* `tb_mux_bank` checks the 6:3 bank exhaustively and a 12:6 bank with
  random vectors.
* `tb_sqrt_csa16` runs the full 16-bit adder at its default size:
  * directed corner cases;
  * 200,000 random operand pairs with random carry-in;
  * a check of the carry between stages against 64-bit reference
    arithmetic.

  For every carry-select stage it counts three events, and fails if any
  never happens:
  * the excess-1 result was selected;
  * the ripple result was selected;
  * a carry passed straight through the stage.

  It does the same for the adder's carry-out and for a carry that
  travels from bit 0 to `cout`.

Each testbench was also run against a deliberately broken copy of its
module, and each one reported failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/csa_pkg.sv \
          tb/tb_sqrt_csa16.sv --top-module tb_sqrt_csa16 -o sim
./obj_dir/sim
```

Replace `tb_sqrt_csa16` with any other `tb_<module>` to test one block.
`csa_pkg.sv` must come first, because the top module and its testbench
import it.

## Changing it

* **Stage widths.** Edit `STAGE_W` (and `N_STAGES`/`ADDER_W`) in
  `rtl/csa_pkg.sv`. The first entry is the ripple stage. The widths must
  add up to `ADDER_W`, which an elaboration check enforces.
  `tb_sqrt_csa16` is written in terms of the package; its directed
  vectors assume 16 bits.
* **Stage width limits.** `csa_stage` works for any `WIDTH >= 1`, because
  its BEC is then at least 2 bits wide. `bec` needs `WIDTH >= 2`.
