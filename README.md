# Redundant adaptive multiplier

An unsigned integer multiplier made from three layers of very small logic.
Layer 1 is AND gates that form the partial products. Layer 2 is XOR/AND
units, each giving a sum bit and a carry bit. Layer 3 has a further XOR/AND
unit plus an OR gate that merges the carries. The multiplier is called
"adaptive" because of how the third layer is ordered. In each XOR/AND unit the
AND result is a single gate, and it settles long before the XOR, which takes
several gates. The AND is therefore the "first preference": the carry moves on
to the next column while the sum bit is still settling.

The top level, `redundent_adaptive_mul`, multiplies two 32-bit operands into
a 64-bit product and registers the product on the clock. The module name keeps
the spelling of the published top level.

## The 2 x 2 multiplier

The smallest instance (`ram_mul2x2`) shows the whole idea. The product
columns are called *parts*. A 2 x 2 multiplier has three parts plus a final
carry:

```
part 0:  P0 = a0 & b0

part 1:  layer 1   u = a0 & b1,  v = a1 & b0
         layer 2   XOR/AND unit (u, v)     -> x2 = u ^ v,   c2 = u & v
         layer 3   XOR/AND unit (x2, 0)    -> P1 = x2 ^ 0,  c3 = x2 & 0
                   OR                      -> carry = c2 | c3

part 2:  layer 1   w = a1 & b1
         XOR/AND unit (w, carry)           -> P2 = w ^ carry, P3 = w & carry
```

In part 1 the third-layer unit has a constant 0 on its second input. That
unit and the OR gate together form the reusable cell `ram_pref_cell`: two
XOR/AND units and an OR, which is a full adder. The two AND outputs can never
both be 1, because when `u & v` is 1, `u ^ v` is 0. So the OR adds them
without losing a carry, and `s + 2*cout = in0 + in1 + cin` holds exactly. In
wider multipliers the input that is 0 here carries a real bit.

## From 2 bits to 32 bits

An N x N multiplier has 2N-1 parts: 3 at 2 bits, 5 at 3 bits, 7 at 4 bits and
63 at 32 bits. Only the 2 x 2 wiring and these part counts are defined by the
design. The way the wider multiplier is put together, in `ram_array_mul`, is
this implementation's own choice. It is a plain ripple array built only from
the cells above:

* `ram_pp_layer` forms all N*N partial-product bits, `pp[i][j] = a[j] & b[i]`.
* Row 0 of the running sum is partial-product row 0.
* Each further row i adds partial-product row i to the running sum shifted
  right by one bit. It does this with N `ram_pref_cell`s chained by their
  carries. The first cell of each row gets a carry of 0, like the part-1 cell
  of the 2 x 2 design. The carry out of the last cell becomes the top bit of
  the new running sum.
* After row i, the lowest bit of the running sum is final and becomes product
  bit i. After the last row, the remaining N bits are the upper half of the
  product.

At N = 2 the module instantiates `ram_mul2x2` unchanged. At N = 1 the product
is the single AND. The structure at N = 32 is 1024 AND gates and 992 cells,
where each cell is 2 XOR, 2 AND and 1 OR. The longest combinational path
ripples through about 2N cells, so about 64 cells at the default size. No
faster adder (carry-save, tree or lookahead) is used, because the design
describes none.

## Top level: ports and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `a`, `b` | in | 32 | unsigned operands |
| `c` | out | 64 | registered product `a * b` |
| `outputcout` | out | 64 | no function, always 0 |

The product of the operands present at a rising edge of `clk` appears on `c`
just after that edge. The latency is one cycle, and a new product can be
started every cycle. There is no reset: `c` holds an arbitrary value until the
first clock edge. The published top level brings out `outputcout` but never
drives it. A two-state netlist cannot leave it floating, so it is tied to
zero. Where to put the register is also this implementation's choice: the
design shows a clock port but no register.

`WIDTH` (default 32) is a parameter of `redundent_adaptive_mul`,
`ram_array_mul` and `ram_pp_layer`. Any width of 1 or more works. `c` and
`outputcout` are `2*WIDTH` bits wide.

## Files

| file | content |
|---|---|
| `rtl/ram_xa_unit.sv` | XOR/AND two-output unit (half adder) |
| `rtl/ram_pref_cell.sv` | third-layer cell: two XOR/AND units and the carry OR |
| `rtl/ram_pp_layer.sv` | first layer: partial-product AND gates |
| `rtl/ram_mul2x2.sv` | the 2 x 2 multiplier, wired gate for gate |
| `rtl/ram_array_mul.sv` | WIDTH x WIDTH combinational multiplier |
| `rtl/redundent_adaptive_mul.sv` | top level with the product register |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the outputs with products computed by the
simulator's own `*` operator, or with bit-level sums. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

* The unit, the cell and the 2 x 2 multiplier are checked over all their
  input combinations.
* The array multiplier is checked over all inputs at widths 1, 2, 3 and 4.
  It gets 500 random pairs at width 8, and corner cases plus 2000 random
  pairs at width 32.
* The top-level test runs at the default 32 bits. It applies 3 x 2 = 6, then
  corner cases (all ones, 2^31 squared, zero), then 3000 random pairs.
  * It checks that `c` does not change before the clock edge and equals the
    new product right after it.
  * It counts how often the carry out of part 1 occurs, how often the product
    reaches bit 63, and how often the product is zero. It fails if any of
    these never happened.

Each testbench was also run against a copy of its module with one deliberate
error, and each one caught the error. The errors were:

* AND replaced by OR in the unit
* carry OR replaced by AND in the cell
* wrong multiplier bit gating one partial-product row
* P2 and P3 swapped in the 2 x 2 multiplier
* dropped row carry in the array
* product register removed from the top level

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl \
          --top-module redundent_adaptive_mul_tb tb/redundent_adaptive_mul_tb.sv
./obj_dir/Vredundent_adaptive_mul_tb
```

Replace the top module name to run another testbench. All testbenches finish
in well under a second.

## How far to trust it

The following parts follow the published design:

* the 2 x 2 gate structure
* the three layers and the carry OR
* the part counts
* the port names and widths of the top level

These parts are this implementation's own choices:

* the ripple arrangement of the cells beyond 2 bits
* the register on `c` and its one-cycle latency
* having no reset
* unsigned operands
* tying `outputcout` to zero

The name mentions redundant-basis finite-field arithmetic. That arithmetic
is only background here: this multiplier does integer multiplication, with
ordinary carries. The digit-level redundant-basis multipliers for fields with
`n = T*m + 1` are announced in the original work but never specified, so
they are not implemented.
