# Urdhva Tiryakbhyam ("vertically and crosswise") multiplier

This is a small combinational unsigned multiplier meant as the multiply unit of an ALU. Its
structure follows the Urdhva Tiryakbhyam rule of Vedic arithmetic. The rule works the way long
multiplication is done by hand, one result column at a time. For each column, take the pairs of
digits that land in that column: straight down ("vertically") and across ("crosswise"). Multiply
each pair and add the products to the carry left over from the previous column. Keep the last
digit as the result digit, and carry the rest into the next column.

In binary, a digit product is a single AND gate. So the whole multiplier comes down to one row of
AND gates, plus one small adder per column joined by carry buses. The published size is 4 × 4 bits
with an 8-bit product. The RTL takes the operand width as a parameter, `WIDTH`, which defaults to 4.

## Worked example

Take 14 × 13 = 182. In decimal, the rule gives three steps:

| step | digits combined             | column sum + carry in | digit kept | carry out |
|------|-----------------------------|-----------------------|------------|-----------|
| 1    | 4·3 (vertical, units)       | 12 + 0                | 2          | 1         |
| 2    | 1·3 + 4·1 (crosswise, tens) | 7 + 1 = 8             | 8          | 0         |
| 3    | 1·1 (vertical, hundreds)    | 1 + 0                 | 1          | 0         |

The result is 182. In binary the same operands are `a = 1110` and `b = 1101`, and the product is
`1011_0110`. The testbench checks this case in both operand orders.

## Column structure at 4 bits

Column *k* holds every bit product `a[i] & b[j]` with `i + j = k`:

| column k | bit products                    | count | carry in (bits) | adder output          |
|----------|---------------------------------|-------|-----------------|-----------------------|
| 0        | a0b0                            | 1     | –               | `r[0]` directly (no adder) |
| 1        | a1b0, a0b1                      | 2     | 0 (none)        | `r[1]`, carry 1 bit   |
| 2        | a2b0, a1b1, a0b2                | 3     | 1               | `r[2]`, carry 2 bits  |
| 3        | a3b0, a2b1, a1b2, a0b3          | 4     | 2               | `r[3]`, carry 2 bits  |
| 4        | a3b1, a2b2, a1b3                | 3     | 2               | `r[4]`, carry 2 bits  |
| 5        | a3b2, a2b3                      | 2     | 2               | `r[5]`, carry 2 bits  |
| 6        | a3b3                            | 1     | 2               | `r[6]`, carry = `c`   |

That makes 16 AND gates and six column adders. The full product is `{c, r}`, where `c` is product
bit 7.

### Why the carries are buses

A column can add up to four bits plus its carry, so its sum can reach 6. The carry it passes on
is that sum shifted right by one, which can be 2 or 3. So the link between two columns is a
multi-bit bus, not a single carry wire.

The width of each bus is worked out at elaboration time by `vedic_pkg`:

- `col_pp(k, W)` gives the number of bit products in column *k*.
- `carry_max(k, W)` gives the largest carry that can leave column *k*. It runs the recurrence
  `c_k = (col_pp(k) + c_{k-1}) / 2`, starting from `c_{-1} = 0`.
- `carry_w(k, W)` gives the number of bits needed to hold that largest carry.

At 4 bits the largest carries are 0, 1, 2, 3, 3, 2, 1, so the buses are 1, 1, 2, 2, 2, 2, 1 bits
wide. The carry out of the last column can never exceed 1, because the product of two *W*-bit
numbers fits in 2*W* bits. An immediate assertion in `vedic_mul` checks this.

The recurrence is an upper bound. At larger widths it can make the last bus wider than one bit.
Its upper bits then always stay zero.

### Timing

The multiplier has no clock, no registers and no reset. All bit products appear after one AND
delay. After that, the critical path is the carry ripple through the 2*W*−2 column adders, from
column 1 to the final carry `c`. To use the multiplier in a pipelined datapath, put registers
around it.

## Modules

| file                     | module            | role |
|--------------------------|-------------------|------|
| `rtl/vedic_pkg.sv`       | `vedic_pkg`       | Constant functions: bit products per column and carry-bus widths. |
| `rtl/ut_pp_array.sv`     | `ut_pp_array`     | The AND row: `pp[i][j] = a[i] & b[j]`. |
| `rtl/ut_column_adder.sv` | `ut_column_adder` | Adds `N_PP` product bits and a `CIN_W`-bit carry. Outputs the sum's LSB `s` and the rest of the sum as `cout` (`COUT_W` bits). |
| `rtl/vedic_mul.sv`       | `vedic_mul` (top) | Groups the products into columns. Column 0 drives `r[0]` directly; columns 1 … 2W−2 each get a column adder, chained by carry buses. |

Ports of the top module, `vedic_mul #(WIDTH = 4)`:

| port | dir | width     | meaning |
|------|-----|-----------|---------|
| `a`  | in  | WIDTH     | unsigned multiplicand |
| `b`  | in  | WIDTH     | unsigned multiplier |
| `r`  | out | 2·WIDTH−1 | product bits 0 … 2·WIDTH−2 |
| `c`  | out | 1         | product bit 2·WIDTH−1, the carry out of the last column |

## What is published and what is chosen here

These parts follow the published design:

- the column-by-column rule
- the 4-bit size
- the row of 16 AND gates
- `r0` taken straight from a0·b0
- one adder per column from 1 to 6, with bus-width carries between neighbours
- the port names a, b, r0…r6 and C6

These parts are choices made for this RTL:

- **Inside the column adder.** Each adder is a plain word-level sum of its input bits and carry.
  The published design shows the adders only as boxes. Synthesis turns the sum into whatever adder
  tree suits the target, so gate counts will differ from any particular hand-drawn netlist.
- **Unsigned operands only.** No signed mode is provided.
- **Carry-bus widths.** Each bus is the smallest width that can hold its column's worst case.
- **Any operand width.** The width is generalised through `WIDTH`. Only 4 bits is the published
  configuration; 8 and 16 bits are checked in simulation.
- **Purely combinational.** There is no pipelining and no handshake.

Not included:

- **The ALU.** It is only named as the intended user, and its operations are not defined.
- **FPGA area and delay.** A slice/LUT count and path delay were reported for a Virtex-class FPGA:
  16 slices, 29 LUTs and 33.1 ns, against 293 slices, 509 LUTs and 88.7 ns for an array
  multiplier. These depend on the vendor flow and are not reproduced here. In generic cells,
  `vedic_mul` at 4 bits synthesises to 16 ANDs and six small adders.

## Verification

Every testbench checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`. Each one also has a cycle watchdog.

- `tb/tb_vedic_mul.sv` tests the top at its default size (4 bits). It runs the worked example in
  both orders, then all 256 operand pairs against `a*b`. It also counts how often a column passes
  on a carry of 2 or more, and how often the final carry `c` is set. It fails if either never
  happens.
- `tb/tb_vedic_mul_wide.sv` builds the multiplier at 8 and 16 bits. It runs the corner cases and
  5000 random pairs.
- `tb/tb_ut_pp_array.sv` checks all 16 bit products for all 256 operand pairs.
- `tb/tb_ut_column_adder.sv` tests the four column shapes used at 4 bits: 4, 2, 3 and 1 products,
  each with its carry width. It applies every input pattern and every carry value the column can
  receive.

To simulate with Verilator 5 (example for the top-level test):

```
verilator --binary --timing --assert -Irtl --top-module tb_vedic_mul \
  rtl/vedic_pkg.sv rtl/ut_pp_array.sv rtl/ut_column_adder.sv rtl/vedic_mul.sv \
  tb/tb_vedic_mul.sv
./obj_dir/Vtb_vedic_mul
```

To run another test, swap in its testbench file and `--top-module`. To lint the RTL alone:

```
verilator --lint-only -Wall -Irtl --top-module vedic_mul rtl/*.sv
```
