# Multiple addition of bit-serial numbers

Some arithmetic units have to add many numbers at once. An inner-product
unit is an example: with `m` products and `n`-bit multipliers fed one bit at a
time, it adds `m·n` numbers. When the numbers arrive **bit-serially**, least
significant bit first, one bit of every addend per clock, the problem becomes
**column counting**. In every clock, a *parallel counter* counts how many of
the current column's bits are one. The low bit of that count is a sum bit.
The higher bits are *carries*, and they belong to later columns. The adders
here differ only in how they treat those carries.

This library has SystemVerilog RTL for every scheme of that kind described in
the source material. The schemes fall into three classes:

| class | carries are... | modules |
|---|---|---|
| 1 | fed back to a counter's inputs through delay cells | `fb_counter_cell`, `class1_multistage`, `class1_fa_tree` |
| 2 | fed forward as new serial numbers into further counters | `class2_adder` |
| 3 | accumulated word-wide, in a carry-save or a parallel adder | `class3_csa_adder`, `class3_cpa_adder` |

All of them produce the same serial result. The addends are `m`
two's-complement numbers of `n` bits. The sum has `n + ext(m)` bits, where
`ext(m) = floor(log2 m) + 1`, so it cannot overflow.

## Parallel counters and the carry rule

A `(p;q)` counter (`par_counter`) has `p` inputs and `q` outputs, with
`p < 2^q`. Its outputs, read as a binary number, give how many inputs are one.
`(3;2)` is a full adder. `(7;3)` and `(15;4)` are *saturated* counters
(`p = 2^q − 1`). Here the counter is written as a plain sum and left to
synthesis. The source leaves the best inner structure as an open question.

Suppose a counter's output bit of weight `2^j` is produced while column `i` is
being counted. That bit belongs to column `i + j`, so it must wait `j` clocks.
This one rule drives every scheme below.

## Class 1: carries fed back

**Single counter (`fb_counter_cell`).** One counter counts the `m` addend bits
of the column. It also counts the `c` carries that earlier columns left for
this one. Output bit `j` (for `j = 1..c`) goes back to the counter's own
inputs through a chain of `j` memory cells (`delay_line`). The number of
carries `c` is the smallest integer with `2^(c+1) − 1 ≥ m + c`. That makes the
counter `(m+c ; c+1)`, and its count can never exceed its width. The default
has `m = 11`, a `(14;4)` counter and 1+2+3 = 6 memory cells. With `m = 2` it is
a full adder with one carry flip-flop, which is the classic serial adder.

**Counters of limited size (`class1_multistage`).** A very large counter is
impractical, so the addends are split into groups of at most `GROUP`. Each
group goes into its own feedback cell. Each cell outputs one serial number,
and the next stage reduces those numbers the same way, until one number
remains. The default has `m = 13` and `GROUP = 5`, which is what a `(7;3)`
counter can take besides its own two carries. The first stage has two `(7;3)`
cells and one `(5;3)` cell, and the second stage is a `(5;3)` cell. With
`PIPE = 1` a memory cell sits on every number passed between stages. Each
clock then covers only one stage, and the sum comes out `STAGES − 1` clocks
later.

**Full-adder tree (`class1_fa_tree`).** This is the `GROUP = 2` extreme. Each
full adder takes two serial numbers plus its own stored carry. Each stage
halves the set of numbers, and when the count is odd, one number passes along
unchanged. With the default `PIPE_EVERY = 1`, every full adder also stores
its sum. The clock period is then one full adder plus one flip-flop, and the
latency is `ceil(log2 m)` clocks. For `m = 256` that is 255 full adders, 255
carry flip-flops, 8 stages and a latency of 8. `PIPE_EVERY = k` keeps those
sum flip-flops only after every `k`-th stage: a longer clock period, but a
latency of only `floor(stages / k)`. `PIPE_EVERY = 0` removes them.

## Class 2: carries fed forward (`class2_adder`)

Here a counter keeps none of its carries. Its `q` outputs, with output `j`
delayed `j` clocks, are themselves `q` serial numbers with the same total.
A smaller counter then counts those. For `m = 13` the chain is
`(13;4) → (4;3) → (3;2)`. After that only two numbers remain, and a final full
adder with one fed-back carry adds them. That final carry is the only feedback
in the circuit. Class 2 needs more stages and slightly more memory than
class 1. It is built here for completeness, not as a recommendation.

## Class 3: carries accumulated word-wide

Instead of shifting carries cell by cell, a class 3 adder keeps "what earlier
columns still owe" as a small binary number. It adds each new count to that
number.

**Carry-save (`class3_csa_adder`).** The pending value is held as two
`(q−1)`-bit registers, `A` and `B`. Full adder `j` adds counter bit `y[j]`,
`A[j]` and `B[j]`. The sum output of full adder 0 is the column's sum bit.
Everything else moves down one weight for the next column:

- `A` takes the sum outputs of full adders 1..q−2, with the counter's top bit
  `y[q−1]` on top.
- `B` takes all the carry outputs.

The default `(31;5)` counter needs 8 flip-flops. For `m = 256` it needs 16.

**Parallel adder (`class3_cpa_adder`).** The pending value is one `q`-bit
register `R`. An ordinary `q`-bit adder computes `y + R`. Bit 0 of the result
is the sum bit, and the rest of the result, including the carry out, becomes
the next `R`. `R` never exceeds `m`, so `q` bits are enough. The default is
`m = 15` with a `(15;4)` counter and 4 flip-flops. For `m = 256` it needs 9.
The adder is written as `+`, so synthesis may build it as ripple-carry or
carry-look-ahead.

Class 3 needs far fewer memory cells than class 1 (9 or 16 against 34 or more
for 256 addends). In exchange, every clock contains a counter plus a word
adder.

## Timing and use

Every adder block has the same interface: `clk`, `rst_n` (asynchronous,
active low), `clear` (synchronous), `x[m-1:0]` (the current column) and `sum`
(one bit).

1. Raise `clear` for one clock. This empties every carry and pipeline memory.
2. In each following clock, present column `k` on `x`: bit `k` of every
   addend, starting with `k = 0`.
3. Once an addend's `n` bits have been presented, keep presenting its sign bit
   (*sign prolongation*). The upper sum bits depend on it.
4. Sum bit `k` is valid in the same clock as column `k` for all schemes except
   the pipelined ones. For those, it is valid `delta` clocks later:
   `delta = floor(ceil(log2 m) / PIPE_EVERY)` for the tree, and `STAGES − 1`
   for `class1_multistage` with `PIPE = 1`.
5. Read `n + ext(m)` bits.

With `delta = 0`, the sum is a combinational function of the column and the
stored carries. The clock period must cover the counter and any adder behind
it.

`addend_shifter` is a bank of `m` shift registers loaded in parallel. It
shifts arithmetically, so it supplies the columns with sign prolongation
built in. The column for bit 0 appears in the clock after `load`.

## The top level

`multi_serial_adder_top` places one instance of each scheme side by side. Each
instance has its own `addend_shifter`, addend input port and serial sum output:

| prefix | scheme | m | delta |
|---|---|---|---|
| `c1s` | class 1, single `(14;4)` counter | 11 | 0 |
| `c1m` | class 1, `(7;3)`/`(5;3)` counters, two stages | 13 | 0 |
| `c1t` | class 1, pipelined full-adder tree | 256 | 8 |
| `c2`  | class 2, `(13;4)(4;3)(3;2)(3;2)` | 13 | 0 |
| `c3s` | class 3, `(31;5)` + carry-save | 31 | 0 |
| `c3p` | class 3, `(15;4)` + parallel adder | 15 | 0 |

Addends are `N = 8` bits. A single `load` pulse captures the addends of every
scheme and clears every carry memory in the same edge. The next addition may
start once the slowest sum is out, which takes 8 + 9 + 8 = 25 clocks after
`load`. The addend ports are packed `[m-1:0][N-1:0]` arrays.

## Sizes compared with the published figures

For 256 addends, the published table of class 1 adders (one row per counter
size) can be compared with this RTL:

| counters | published: counters / carry memories / stages | this RTL |
|---|---|---|
| (3;2) | 255 / 255 / 8 | 255 / 255 / 8 (`class1_fa_tree`) |
| (7;3) | 64 / 192 / 4 | 65 / 193 / 4 (`class1_multistage`, GROUP=5) |
| (15;4) | 24 / 141 / 3 | 28 / 157 / 3 (GROUP=11) |
| (31;5) | 10 / 100 / 2 | 11 / 106 / 2 (GROUP=26) |
| (63;6) | 5 / 75 / 2 | 6 / 78 / 2 (GROUP=57) |
| (127;7) | 3 / 52 / 2 | 4 / 55 / 2 (GROUP=120) |
| (255;8) | 2 / 34 / 2 | 3 / 35 / 2 (GROUP=248) |
| single | 1 / 36 / 1 | 1 / 36 / 1 (`fb_counter_cell`, N_IN=256: a (264;9) counter) |

The small differences come from partitioning. This RTL groups addends in
index order and gives every group its own carries. The published counts come
from other partitions, which are not detailed. Rewirings that send one
counter's carries into another counter give the same sum; they are mentioned
as an option but not specified, so they are not built.

## Where this RTL makes its own choices

- **Reset and clear.** There is an asynchronous `rst_n`, and a synchronous
  `clear` that starts each addition. The top drives `clear` from `load`.
- **One clock edge.** Every memory cell uses the same edge. The class 3
  schemes could clock their carry registers slightly later than the sum, to
  raise the frequency. That option is not modelled.
- **Counter inside.** Counters are behavioural popcounts. Their output timing
  is therefore whatever synthesis makes of them, not a tuned full-adder
  network with a fast LSB.
- **Odd numbers in the pipelined tree.** An odd number passed along also gets
  a flip-flop, so it stays aligned with the others.
- **Parameter ranges.** `addend_shifter` needs `N ≥ 2`. The carry-save class 3
  adder needs `m ≥ 2`. `class1_multistage` needs `GROUP ≥ 2`.
- **Not built.** The generalised counters with weighted inputs or several
  same-weight outputs, e.g. `(3,2;4)` and `(6;2,2)`, appear only as notation.
  No scheme uses them, and their output assignment is not defined. The
  inner-product unit is the motivating application, not a specified design.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench computes
the expected sum with integer arithmetic. It compares every serial output bit
in its exact clock, so it checks the latency as well as the value. Test inputs
are random addends plus three corner cases: all `−1` (every column all ones,
the counters' largest count), all most-negative and all most-positive.
Additions follow each other with no idle clock, so `clear` is exercised while
the carry memories are full.

- `tb_multi_serial_adder_top` runs the whole top at its default parameters. It
  also counts negative sums, all-ones columns, clears of full carry memories
  and sum bits above `N`. If any of these never occurs, the test fails.
- `tb_table_a` runs the eight 256-addend class 1 configurations from the
  comparison table.
- The block testbenches also run other sizes: 2, 40, 100 and 256 addends,
  three-stage partitions, and trees with sum flip-flops after every stage,
  every second or third stage, or none.

To simulate with Verilator (the package must come first):

```
verilator --binary --timing --assert rtl/msa_pkg.sv \
  $(ls rtl/*.sv | grep -v msa_pkg) tb/tb_multi_serial_adder_top.sv \
  --top-module tb_multi_serial_adder_top -o sim && ./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.
