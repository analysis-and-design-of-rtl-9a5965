# Multiplexer-based 4-2 compressor and an 8x8 compressor-tree multiplier

In a parallel multiplier most of the delay is spent reducing partial products,
and the workhorse of that reduction is the 4-2 compressor. The classic
compressor is two full adders in series, which puts about four XOR delays on
its critical path. The compressor here has only about two. A first level of
simple gates forms a few signals from each input pair. A second level of 2:1
multiplexers then selects every output from those signals. Every output path
is therefore one gate followed by at most two multiplexers, and no output
waits for another output.

To show the cell in use, it is built into an 8x8-bit unsigned multiplier:
an AND array, a two-level tree of 4-2 compressor rows and a 16-bit
full-adder chain.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017) and purely
combinational.

## The 4-2 compressor (`compressor_4_2`)

### What it computes

Five bits of weight 1 go in: `i1..i4` from the column and `cin` from the
next lower column. Three bits come out:

    i1 + i2 + i3 + i4 + cin = sum + 2 * (carry + cout)

`carry` goes down to the next reduction stage. `cout` goes sideways to the
`cin` of the next higher column. **`cout` depends only on `i1..i4`**. This is
what makes a row of compressors fast: a column's `cin` never reaches its
`cout`, so no carry ripples along the row.

### The freedom it exploits

With *n* bits set among the five inputs, the outputs are fixed for most
values of *n*. When exactly two are set, the weight-2 value may leave on
either `carry` or `cout`. The cell uses that freedom so that `cout` can be
computed from the input pairs alone:

| case | `cout` |
|---|---|
| `i3 = i4 = 0` | `i1 & i2` |
| otherwise | `i1 \| i2` |

`carry` then makes up whatever is left:

| `cin` | `carry` |
|---|---|
| 1 | `(i1 ^ i2) ? ~(i3 ^ i4) : (i3 \| i4)` |
| 0 | `(i3 & i4) & ~(i1 ^ i2)` |

`sum` is the parity of all five bits.

### How it is built

The first level produces these signals, each in both polarities. The
functions of C–F were chosen so that the multiplexer tree below meets the
equation:

| signal | function | cell |
|---|---|---|
| A | `i1 ^ i2` | two-output XOR/XNOR (`xor_xnor2`) |
| B | `i3 ^ i4` | `xor_xnor2` |
| C | `~(i1 & i2)` | NAND |
| D | `~(i1 \| i2)` | NOR |
| E | `~(i3 \| i4)` | NOR |
| F | `~(i3 & i4)` | NAND |

Seven `mux2` cells form the second level:

| output | multiplexer | select | input 0 | input 1 |
|---|---|---|---|---|
| sum | `u_s0` | B | A | ~A |
| sum | `u_s1` | B | ~A | A |
| sum | `u_s2` | cin | `u_s0` | `u_s1` |
| carry | `u_c0` | A | ~E | ~B |
| carry | `u_c1` | F | ~A | 0 |
| carry | `u_c2` | ~cin | `u_c0` | `u_c1` |
| cout | `u_o0` | E | ~D | ~C |

There are no inverters on the outputs, and each output appears in true
polarity.

### Where this departs from the published circuit

The published schematic is followed for:

- the names A–F of the first-level signals and the input pair each is formed from;
- the select line of every multiplexer;
- the constant-0 input;
- the whole sum tree.

Read literally, the drawn carry and cout multiplexers do not satisfy the
equation above, whatever polarity is chosen for the gate outputs. Two
details were therefore changed, the fewest that make the cell correct for
all 32 input combinations:

- **`u_c0`:** the two data inputs are exchanged. ~E is on input 0 and ~B is
  on input 1.
- **`u_o0`:** the multiplexer is fed with ~D and ~C, on inputs 0 and 1.
  The drawing has C and D. Both polarities come from the first-level gates
  at no cost.

The compressor's testbench confirms the result. It checks the equation for
all 32 input combinations, and checks the fixed rows of the general 4-2
truth table.

The transistor-level circuits are modelled only by their logic function:

- the non-full-swing XOR/XNOR gates;
- the pass-transistor multiplexers.

Nothing about delay, power or transistor count is modelled. For reference,
the published figures are:

- 66 transistors;
- 854 ps delay into a large buffer load, 260 ps into a unit-inverter load;
- about 1.2 µW at 1 MHz, in 0.18 µm CMOS at 1.8 V.

## Rows of compressors (`compressor_row`)

`compressor_row #(W)` places one cell per column and links the `cout` of
column *i* to the `cin` of column *i+1*. It reduces four aligned operands to
two vectors:

    x1 + x2 + x3 + x4 + cin = sum + 2*carry + 2^W * cout

Here `carry[i]` has weight 2^(i+1). Because `cout` ignores `cin`, the row's
delay does not depend on `W`.

## The 8x8 multiplier (`mult8x8`, top)

    multiplier[7:0], multiplicand[7:0]
            |
        pp_gen            8 rows: pp[i] = multiplicand & {8{multiplier[i]}}
        /       \
    row group 1   row group 2      rows 0-3 / rows 4-7, row k shifted by k,
    (12 columns)  (12 columns)     one compressor_row each
        \       /
    second-level compressor_row (16 columns):
        sum1, carry1<<1, sum2<<4, carry2<<5
            |
    final_adder (16 full adders, ripple carry)
            |
        product[15:0]

The ports are `multiplier`, `multiplicand` (8 bits each) and `product`
(16 bits). Sizes come from `mult_pkg`:

| constant | value | meaning |
|---|---|---|
| `OPERAND_W` | 8 | operand width |
| `PRODUCT_W` | 16 | product width |
| `ROWS_PER_GROUP` | 4 | partial-product rows per first-level row |
| `ROW1_W` | 12 | columns of a first-level row |
| `ROW2_W` | 16 | columns of the second-level row and the final adder |

The tree shape follows the published block diagram:

- partial-product generation;
- two compressors side by side;
- one compressor below them;
- a final adder made of full adders.

The following are this design's own choices:

- the column layout;
- unsigned operands;
- zero carry-ins;
- a ripple-carry final adder.

**Dropped bits.** The product of two 8-bit numbers is below 2^16, and every
stage preserves the sum of its inputs. Arithmetic modulo 2^16 is therefore
exact, and a few bits of weight 2^16 are simply not connected:

- the second-level `cout`;
- bit 15 of the second-level carry vector;
- the final adder's `cout`.

The linter reports these as unused. The first-level rows have one spare
column with zero inputs, so their `cout` is always 0.

**Timing.** There are no registers. The published circuit is characterised at
about 1.9 ns from inputs to product, for one multiplication per 2 ns clock
(500 MHz). Registering the operands and product is left to the user.

The published specification table lists 520 MHz, while its text says
500 MHz. The testbench uses 500 MHz. Neither figure is a property of
zero-delay RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_compressor_4_2` | all 32 inputs: the equation, sum parity, the fixed truth-table rows, that `cout` is independent of `cin`, and that both resolutions of the open n = 2 rows occur |
| `tb_compressor_row` | 20 000 random vectors plus corner cases: the row equation, and that toggling `cin` changes only column 0 |
| `tb_final_adder` | random vectors plus corner cases, including a full-length carry |
| `tb_pp_gen` | all 65 536 operand pairs, bit by bit |
| `tb_mux2`, `tb_xor_xnor2`, `tb_full_adder` | exhaustive |
| `tb_mult8x8` | end to end at full size; details below |

`tb_mult8x8` applies all 65 536 operand pairs, one per 2 ns clock cycle, and
checks each product against the integer product. It also checks that the
sweep took exactly one cycle per product. It fails if any of these mechanisms
never occurred:

- horizontal carries in each first-level row;
- horizontal carries in the second-level row;
- carries in the final adder;
- a product that uses bit 15.

Each testbench runs in well under a second.

## Simulating

With Verilator 5, from the repository root, for any testbench `tb_<name>`:

    verilator --binary --timing --assert -Irtl -Itb rtl/mult_pkg.sv \
        tb/tb_<name>.sv --top-module tb_<name> -Mdir obj_<name> -o sim
    ./obj_<name>/sim

## Changing it

- **Compressor rows.** `compressor_row` and `final_adder` take any width `W`.
- **Operand width.** `pp_gen` takes any width `N`. `mult8x8` is wired for the
  8-row tree: two groups of four rows, then one second-level row.

A different operand width needs a different tree:

- 16 rows would need four first-level rows, two second-level rows and a third
  level.
- `ROW1_W` and `ROW2_W` in `mult_pkg` follow the rule above: the group span
  plus one spare column, and the product width.
