# Fault-tolerant arithmetic from a parity-preserving reversible gate

This RTL builds adders and array multipliers out of one five-input,
five-output reversible gate, the PPRG (parity preserving reversible gate).
Two properties of the gate carry the whole design:

* **Reversible.** The gate maps its 32 input patterns one-to-one onto its
  32 output patterns. No information is lost, and that is the motivation
  for reversible logic in low-power design. Outputs that the function does
  not need are "garbage" outputs. They cannot be dropped from the gate, so
  they are counted as a cost.
* **Parity preserving.** The XOR of the five outputs always equals the XOR
  of the five inputs. A network of such gates keeps this property as a
  whole. So comparing the parity of a unit's external inputs with the
  parity of all its outputs (results plus garbage) detects any odd number
  of wrong output bits. This is the "fault tolerant" part.

On this gate sit a half adder and a full adder (one gate each), an N-bit
ripple-carry parallel adder, two small array multipliers (2×3 and 3×2), a
general M×N array multiplier and a 16-bit adder/subtractor. Everything is
combinational: there is no clock, no register and no reset anywhere.

## The gate

With inputs A..E, outputs P..T and the helper term `X = (~A & ~C) ^ ~B`:

| output | function                          |
|--------|-----------------------------------|
| P      | A                                 |
| Q      | X ^ D                             |
| R      | (X & D) ^ (A & B) ^ C             |
| S      | (A & ~B) ^ C ^ (~X & D)           |
| T      | D ^ E ^ (A & C)                   |

Tying some inputs to constants selects a function at Q and R:

| setting          | Q               | R                     | used by              |
|------------------|-----------------|-----------------------|----------------------|
| C = D = E = 0    | A ^ B           | A & B                 | half adder           |
| C = E = 0, D=Cin | A ^ B ^ Cin     | (A ^ B)&Cin ^ (A & B) | full adder           |
| B = 1, D = 0     | ~(A \| C) (NOR) | –                     | (NOR mode, tested)   |
| A = C = E = 0    | B ^ D           | B & D                 | controlled inverter  |

**The R equation.** R can also be read with `X ^ D` as its first term. With
that term the gate is neither reversible nor parity preserving, and with
C = E = 0 its R output is `A | B` (xor Cin), not a carry. With the product
`X & D`, all three claims about the gate hold. An exhaustive check over the
32 input patterns confirms this, and `tb/tb_pprg.sv` repeats that check.
This RTL uses the product form.

## Adder cells and the parallel adder

Both adder cells use one gate. Operand B goes to gate port A and operand A
goes to gate port B; the gate is symmetric in the two for these outputs.
The sum is taken from Q and the carry from R. P, S and T are garbage
(g1, g2, g3, three per cell). The full adder feeds its carry in on port D.

`pprg_parallel_adder` (N = 4 by default) puts a half adder at bit 0 and
N-1 full adders above it, rippling the carry from each R into the next D.
It has no carry input. The sum is `s_o`, the carry out is `co_o`, and all
3N garbage bits come out on `garbage_o`.

## The 2×3 and 3×2 multipliers

Each multiplier is one 4-bit parallel adder fed with AND partial products
`aibj`. The 4-bit sum and the carry out form the 5-bit product. The operand
placement is the least obvious part of the design:

| adder input | bit 3  | bit 2  | bit 1  | bit 0  |
|-------------|--------|--------|--------|--------|
| 2×3, A      | 0      | a1b1   | a1b0   | a0b0   |
| 2×3, B      | a1b2   | a0b2   | a0b1   | 0      |
| 3×2, A      | 0      | a2b0   | a1b0   | a0b0   |
| 3×2, B      | a2b1   | a1b1   | a0b1   | 0      |

In the 3×2 case the two rows are simply `a·b0` and `a·b1` shifted left by
one. The 2×3 case does not split the products by rows of b. It places each
of its six partial products at its weight i+j, split over the two operands
so that no column holds more than two. Both multipliers have 4 PPRG cells
and therefore 12 garbage outputs. The AND gates that form the partial
products are ordinary gates, not PPRGs.

## The M×N array multiplier

`pprg_array_mult` generalises the multipliers above to any size (default
4×4). Row j is `a & {M{b[j]}}`. Bit 0 of row 0 is product bit 0. Stage j
(j = 1..N-1) is an M-bit parallel adder. It adds row j to the running sum,
which is the carry out and upper sum bits of the previous stage. Each
stage's lowest sum bit is product bit j. The last stage supplies the top M
bits. The design has N-1 adders, M·(N-1) cells and 3·M·(N-1) garbage bits.
At 3×2 it uses a 3-bit adder (9 garbage bits), where `pprg_mult_3x2` pads
to 4 bits (12). This row-by-row arrangement is this design's own.

## The 16-bit adder/subtractor

`pprg_addsub16` (N = 16) has inputs `a`, `b`, `c` and `cntrl`, and outputs
`s`, `co` and every internal carry. Each bit has two gates:

* a controlled inverter (Q = b ^ cntrl);
* a full adder.

A further controlled inverter forms the carry into bit 0 as `c ^ cntrl`.
This gives:

* `cntrl = 0`: `{co, s} = a + b + c`
* `cntrl = 1`: `{co, s} = a - b - c` in two's complement (`co = 1` means
  no borrow)

`carry_o[k]` is the carry out of bit k. Adding 15 and 7 gives 22, with
carries out of bits 0..3 only. Only the port names, the width and that one
addition are fixed for this unit. The meaning of `cntrl` and `c`, and the
use of gates as inverters, are this design's choices.

## Parity checking

Each arithmetic module exports its garbage bits and a parity reference:

* `pp_parity_o` on the multipliers: the XOR of all partial products;
* `in_parity_o` on the adder/subtractor: the XOR of a, b, c and cntrl.

`cntrl` drives 17 inverter cells, an odd number, so it counts once.
Internal carries and running-sum bits are the output of one cell and the
input of the next, so they cancel. For a fault-free unit the reference
therefore equals the XOR of the unit's results and garbage bits.
`pprg_arith_top` compares the two for each unit and raises
`*_parity_err_o`. The check detects an odd number of wrong gate output
bits. It misses even numbers of errors, and it misses faults in the AND
gates that form partial products before they reach a PPRG. The error flags
are this design's addition: the gate's parity property is what they rest
on, but no checker circuit is given for it.

## Top level

`pprg_arith_top` places the four units side by side with separate ports:

| prefix | unit                      |
|--------|---------------------------|
| `m23_` | 2×3 multiplier            |
| `m32_` | 3×2 multiplier            |
| `arr_` | array multiplier          |
| `add_` | adder/subtractor          |

Its parameters are `ADD_N` = 16, `MUL_M` = 4 and `MUL_N` = 4. All paths are
combinational. The longest is the adder/subtractor's ripple through 16
full-adder cells after one inverter cell.

## Where this departs from the usual description

* The R output uses `X & D`, not `X ^ D` (see "The gate").
* The adder/subtractor's control semantics, its inverter cells and its
  full adder at bit 0 are assumptions.
* The M×N multiplier's structure and its 4×4 default are assumptions.
* The parity reference outputs, the garbage ports and the error flags are
  additions.
* No timing model: reported delays and memory figures are tool results, not
  hardware, and have no counterpart here.

## Files

| file                       | content                                  |
|----------------------------|------------------------------------------|
| `rtl/pprg_pkg.sv`          | gate port structs, cell garbage count    |
| `rtl/pprg.sv`              | the 5×5 gate                             |
| `rtl/pprg_half_adder.sv`   | one-gate half adder                      |
| `rtl/pprg_full_adder.sv`   | one-gate full adder                      |
| `rtl/pprg_parallel_adder.sv` | N-bit ripple adder                     |
| `rtl/pprg_mult_2x3.sv`, `rtl/pprg_mult_3x2.sv` | small multipliers  |
| `rtl/pprg_array_mult.sv`   | M×N array multiplier                     |
| `rtl/pprg_addsub16.sv`     | 16-bit adder/subtractor                  |
| `rtl/pprg_arith_top.sv`    | top with parity error flags              |
| `tb/tb_<module>.sv`        | one self-checking testbench per module   |

## Verification

Every testbench compares against integer arithmetic or equations
evaluated in the testbench itself. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pprg` tries all 32 inputs. It checks every output, parity, that no
  two input patterns share an output pattern, and the NOR, half-adder and
  full-adder modes.
* The adder cells and the 4-bit adder are tested exhaustively for result
  and parity.
* The multipliers are tested exhaustively. The array multiplier runs at
  4×4, 2×3 and 3×2.
* `tb_pprg_addsub16` runs the 15+7 case, corner cases and 4000 random
  vectors in both modes. It checks every internal carry.
* `tb_pprg_arith_top` runs the top at its default parameters. It forces
  single wrong output bits into each unit and checks that the flag rises.
  It also counts that each mechanism occurred at least once: product carry
  out, add, subtract, carry in, carry out and detected fault.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/pprg_pkg.sv \
          tb/tb_pprg_arith_top.sv --top-module tb_pprg_arith_top
./obj_dir/Vtb_pprg_arith_top
```

Replace the testbench name to run any other test. All of them finish in
well under a second.
