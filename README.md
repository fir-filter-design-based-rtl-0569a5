# Four-tap systolic FIR filter over GF(2^9)

This RTL computes a four-tap filter

    y = a*h1 + b*h2 + c*h3 + d*h4

in the binary field GF(2^9). The four products come from four systolic
multiplier arrays that run in parallel. A pipelined adder tree sums them. In
GF(2^m) a bit product is an AND and a bit sum is an XOR, so no carry ever
travels across a word. That means every pipeline stage is short: one level of
XOR for the modular reduction, then one AND and one XOR. The design takes a
new set of samples every clock. Each result appears seven clocks after its
samples.

A second structure stands beside the filter and has its own ports: a
bit-level systolic multiplier grid of 8 x 9 AND/XOR cells. The grid is cut into
3 x 3 blocks with a flip-flop on every line that crosses a cut. A product
leaves it 2N - 1 = 5 clocks after its operands enter, where N = 9/3 is the
number of blocks per side.

Everything is synthesizable SystemVerilog with a synchronous, active-high
reset. Each block has a self-checking testbench.

## Arithmetic

Words are 9-bit polynomials over GF(2): bit k is the coefficient of x^k. The
sum of two words is their XOR. Products are reduced modulo the field
polynomial

    F(x) = x^9 + x^4 + x^3 + x + 1        (gf_pkg::F_LOW = 9'b0_0001_1011)

This pentanomial is irreducible, so GF(2^9) is a field. It is a design choice,
not a given, and it is a parameter (`F_LOW`, the bits of F below x^9). Any
other irreducible degree-9 polynomial can be used without changing the logic.

The filter coefficients are short. Each regular processing element (PE)
handles one coefficient bit. Array 1 has four regular PEs, so `h1` has 4 bits.
Arrays 2 to 4 have three each, so `h2`, `h3` and `h4` have 3 bits. A
coefficient h = sum h[t] x^t multiplies a sample x as

    x * h mod F = sum over t of h[t] * (x * x^t mod F)

So each PE needs the next power x * x^t of the sample, and that power is what
travels from PE to PE.

## The multiplicand word: reduction one step late

This is the least obvious part of the arrays. The sample's running power
travels between PEs as an **(M+1)-bit word u**, a 10-bit value of degree up to
9. Its top bit has not yet been folded back into the field. Each PE holds a
modular reduction cell (`nmrc`) that does two things:

1. Folds the top bit back: `r = u[8:0] ^ (u[9] ? F_LOW : 0)`. This is
   x * x^t mod F, the reduced power for this PE's coefficient bit.
2. Forms the next power by a plain shift, `u_next = {r, 1'b0}`, and leaves it
   unreduced for the next PE.

Each PE then works out `s_out = s_in ^ (r & {9{h[t]}})`, with an AND cell of 9
gates and an XOR cell of 9 gates. It registers `s_out`, `u_next` and a valid
flag. The path through one PE is therefore one XOR (reduction), one AND and
one XOR (accumulation). The shift is only wiring.

`PE-1`, the first stage of every array, takes the sample in as the word
`{0, x}` and starts the partial sum at zero. The sample is already reduced, so
its reduction cell has nothing to fold. PE-1 is therefore written as the
array's input register, not as its own module.

## Filter pipeline

```
 a ─► [PE-1]─►[PE]─►[PE]─►[PE]─►[PE]──────► p1 ─┐
 b ─► [PE-1]─►[PE]─►[PE]─►[PE]─►[DELAY]───► p2 ─┤ AC ─┐
 c ─► [PE-1]─►[PE]─►[PE]─►[PE]─►[DELAY]───► p3 ─┐      AC ─► y
 d ─► [PE-1]─►[PE]─►[PE]─►[PE]─►[DELAY]───► p4 ─┘ AC ─┘
        clk 1  2     3     4     5            6        7
```

Array 1 has five stages: PE-1 and four regular PEs. Arrays 2 to 4 have one
coefficient bit fewer. A delay cell, one register on the partial sum and its
valid flag, brings them to five stages too. So all four products reach the
adder tree in the same cycle. An assertion in `fir` checks this.

The adder tree has three addition cells (XOR plus a register). Cells 1 and 2
add the pairs p1+p2 and p3+p4. Cell 3 adds the two sums. Latency from a..d to
y is therefore 5 + 2 = 7 clocks, with one result per clock. The general
formula is `3 + NPE_FIRST` clocks.

To use it as a convolution filter, drive `a, b, c, d` with x[n], x[n-1],
x[n-2], x[n-3] from a three-register delay line. The testbench does this. It
checks the impulse response and random streams against a reference
convolution.

## Multiplier grid (`sfg_mult`)

Cell (i, j) sits in row i (0..7) and column j (0..8). It receives:

- bit `a[i]` on a line along row i;
- bit `b[(j - i) mod 9]` on a line down the diagonal. Row 0 sees b0..b8.
  Row 1 starts with b8, row 3 with b6, and so on;
- a partial sum from the cell above (zero into row 0).

It passes down `s ^ (a[i] & b[(j-i) mod 9])`. The bottom of column j delivers

    p[j] = XOR over i of  a[i] & b[(j - i) mod 9]

which is a(x) * b(x) modulo x^9 + 1 over GF(2). Note that this is **not** the
field product the filter arrays compute. The grid is a separate multiplier and
is not wired into the filter.

Pipelining: cuts after rows 2 and 5 and after columns 2 and 5 split the grid
into 3 x 3 blocks. Every line crossing a cut gets one flip-flop:

- row lines at column cuts;
- sum lines at row cuts;
- diagonals at either kind of cut, and twice where a diagonal passes a block
  corner.

Block (I, J) therefore works I + J clocks after the operands are taken. To make
every signal that meets in a block arrive at the same time, the inputs are
skewed:

- row i's `a` bit enters i/3 clocks late;
- a diagonal entering on the top edge at column j0 enters j0/3 clocks late;
- a diagonal entering on the left edge at row i0 enters i0/3 clocks late.

Column block J finishes at clock 2 + J. Alignment registers delay it by 2 - J
more, and one output register follows. The whole `p` appears at clock
NRB + NCB - 1 = 5, where NRB and NCB are the numbers of row and column blocks.
A new operand pair can enter every clock. The parameters `ROWS`, `COLS` and
`L` (block size) are free. The testbench also runs L = 2 (4 x 5 blocks,
latency 8).

## Ports of the top, `fir`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset, clears every register |
| a, b, c, d | in | 9 | samples into arrays 1..4 |
| in_valid | in | 1 | a..d carry a sample set this cycle |
| h1 | in | 4 | coefficient of array 1 |
| h2, h3, h4 | in | 3 | coefficients of arrays 2..4 |
| y, y_valid | out | 9, 1 | filter output, 7 clocks after its samples |
| sfg_a | in | 8 | grid operand a |
| sfg_b | in | 9 | grid operand b |
| sfg_valid | in | 1 | grid operands valid |
| sfg_p, sfg_p_valid | out | 9, 1 | grid product, 5 clocks after its operands |

Hold the coefficients steady while samples are in flight. A sample that is
inside an array when a coefficient changes is multiplied partly by the old
bits and partly by the new ones. There is no stall or back-pressure: the
pipelines advance every clock, and the valid flags only mark which cycles hold
data.

## Parameters

| parameter | default | where |
|---|---|---|
| `M` | 9 | word width, from the 9-bit sample and output buses |
| `F_LOW` | `9'b000011011` | field polynomial below x^M (design choice) |
| `NPE_FIRST` | 4 | regular PEs in array 1 (five PEs with PE-1) |
| `NPE_OTHER` | 3 | regular PEs in arrays 2..4 (four with PE-1, plus a delay cell) |
| `SFG_ROWS`, `SFG_COLS`, `SFG_L` | 8, 9, 3 | grid size and block size |

The first four defaults are in `gf_pkg`.

## What is given and what is chosen

These parts come from the description of the design:

- the four parallel arrays with five elements each;
- the delay cell in arrays 2 to 4;
- PEs made of an AND cell, an XOR cell and a modular reduction cell;
- the (M+1)-bit multiplicand bus between PEs;
- the 9-bit buses;
- the two-level adder tree of three cells, with the five-plus-two-cycle timing;
- the 8 x 9 grid with its cyclic b indexing, 3 x 3 blocks, flip-flops on cut
  lines and 2N - 1 latency.

These are choices made here:

- **Arithmetic in GF(2^9).** The AND/XOR cells and the reduction cell only
  make sense as carry-free polynomial arithmetic, so the filter is a
  GF(2^9) filter, not an integer one. The multiplier is sometimes described
  as a Montgomery multiplier. Nothing in the cells described introduces the
  x^-m factor of Montgomery multiplication, so both structures form plain
  polynomial-basis products.
- **Field polynomial.** `F_LOW` is a design choice (see Arithmetic).
- **Coefficient width and source.** One coefficient bit per regular PE,
  supplied on ports. A build with fixed coefficients would tie these ports to
  constants.
- **The insides of the reduction cell.** Only its name and widths are given.
  The reduce-then-shift cell above is the simplest one with those widths.
- **PE-1 as the input register** of each array.
- **Grid input skew and output alignment**, so that the grid accepts one
  operand pair per clock and delivers p as one word.
- **Valid flags, reset style and the pairing in the adder tree.** The
  synchronous reset matches the flip-flop type seen in the original
  implementation.
- **No clock enable.** The original simulation shows a `ce` input, but its
  role is unknown, so there is none here.

Not included:

- the truncated fixed-point multiplier that this filter is compared against;
- the alternative four-cell systolic adder (the three-cell tree is the
  low-latency option and is the one built).

The published simulation feeds three sets of samples (1,1,1,1),
(4,5,9,9) and (20,29,73,105). Its coefficients are unknown, so its outputs
cannot be reproduced. The testbench runs those samples and checks them against
the reference model instead.

Size: generic synthesis of `fir` gives 390 flip-flops, 95 of them in the grid,
and 90 ports. The original FPGA implementation reports 151 flip-flops and 47
I/Os. The difference comes from the coefficient ports, the valid pipelines and
the grid.

## Files

`rtl/`

| file | contents |
|---|---|
| `gf_pkg.sv` | width, field polynomial, PE counts |
| `nmrc.sv` | modular reduction cell (combinational) |
| `regular_pe.sv` | one coefficient bit: reduction, AND cell, XOR cell, registers |
| `gf_array.sv` | PE-1 + regular PEs + delay cells; one tap product |
| `adder_cell.sv` | registered XOR of two words |
| `adder_tree.sv` | three addition cells, two levels |
| `sfg_mult.sv` | 8 x 9 bit-level grid with 3 x 3 block pipelining |
| `delay_line.sv` | N-stage shift register used by the grid |
| `fir.sv` | top: the filter and, beside it, the grid |

`tb/`

- `gf_ref_pkg.sv` holds the reference arithmetic: a carry-less schoolbook
  product, then long division by F. It is independent of the PE order.
- There is one `<module>_tb.sv` per module. Each prints
  `TB_RESULT checks=N failures=F`.
- `fir_tb` runs the whole design at its default parameters and checks every
  output and its latency. It covers idle cycles, coefficient changes,
  products that need reduction, a reset mid-stream and the grid's own
  stream, and it counts each of these.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/fir_tb.sv \
    --top-module fir_tb -Mdir obj_fir
./obj_fir/Vfir_tb
```

The packages go first on the command line, and `-y` lets Verilator find each
module in its own file. For a single block, swap in its testbench, for example
`tb/sfg_mult_tb.sv` with `--top-module sfg_mult_tb`. Lint the design with
`verilator --lint-only -Wall -y rtl rtl/gf_pkg.sv rtl/fir.sv`. It reports no
warnings.
