# Recursive matrix inversion and determinant networks

This RTL inverts an N x N matrix and computes its determinant with fixed-latency
networks that call themselves on half-size blocks. Split the matrix as

```
A = | U  V |     U, V, W, Z are (N/2) x (N/2)
    | W  Z |
```

and use the Schur complements `C = U - V Z^-1 W` and `D = Z - W U^-1 V`. Then

```
A^-1 = | C^-1   X   |     X = -U^-1 V D^-1
       |  Y    D^-1 |     Y = -Z^-1 W C^-1

Det(A) = Det(U) * Det(D)
```

The right-hand sides need only half-size inverses, half-size determinants, matrix
products and matrix differences. So an inverter of size N is built from four
inverters of size N/2, six multipliers and two subtractors. A determinant network
of size N is built from one inverter of size N/2, two multipliers, one subtractor
and two determinant networks of size N/2. The SystemVerilog does the same: `matinv`
and `matdet` instantiate themselves with `N/2` until they reach N = 1.

Every block passes matrices in one format and has a fixed latency. Delay lines
alone keep the operands of every block in step. Nothing stalls and there is no
flow control. The inverse takes O(N log N) cycles. The recursion needs U, Z, C and
D to be nonsingular at every level. This always holds for symmetric positive
definite matrices, and also for strictly diagonally dominant ones.

## The column-serial stream

A matrix moves along a path of N words, one column per clock cycle, **last column
first**. A `valid` bit goes with each column. Every block takes its operands in this
format and sends its result out in the same format, so blocks can be chained
directly.

This ordering is what makes the recursion work. Look at the upper N/2 words of an
input column stream. For the first N/2 cycles they carry the columns of V, and for
the next N/2 cycles the columns of U. The lower N/2 words carry Z and then W. The
result comes back in the same order: X then C^-1 on the upper half, D^-1 then Y on
the lower half. So a size-N network has two inputs and two outputs of N/2 words
each. Each input and output carries two half-size matrices one after the other,
and each of those is a valid stream for a size-N/2 network.

## The multiplier (`matmul`)

Both operands enter as column streams during the same N cycles. That is awkward for
`C = A*B`: the term `C[i][j] = sum_k A[i][k] B[k][j]` needs column k of A together
with *row* k of B. The multiplier has three parts:

1. **Transposition.** An N x N array of registers works as switch nodes. A
   modulo-N column counter writes each incoming column of B into its own slot. In
   the next N cycles, row k of B is sent down the N columns of the processor array,
   in the same k order in which A arrives.
2. **Skew.** Row i of A waits N + i cycles: N for the transposition and i for the
   systolic skew. Column j of B waits j cycles. The arithmetic processors pass `a`
   to the right and `b` downwards through one register each. Processor (i,j)
   therefore meets `A[i][k]` and `B[k][j]` in the same cycle, for every k, at cycle
   `N + k' + i + j`, where k' is the arrival position of column k.
3. **Accumulate and send out.** Each processor (`mac_pe`) keeps a full-precision
   sum of its products. The last processor finishes at cycle 4N-3. On the next
   cycle the whole array is copied into an output register and the accumulators are
   cleared. The output register then shifts one column per cycle towards the output,
   last column first.

The first result column appears **4N-1 cycles** after the first input column. With
`NEGATE=1` the processors subtract their products, which gives `-A*B`. The last two
multipliers of the inverter use this to form X and Y. A multiplier handles one
product at a time. It can start the next product 4N-1 cycles after the previous one
started.

`matadd` is the adder/subtractor. It has one registered adding element (`add_elem`)
per row, so it adds exactly one cycle.

## The inversion network (`matinv`)

One level of the recursion (H = N/2; TI, TM are the latencies of a size-H inverter
and multiplier):

| step | block | operands | result ready at (cycles after U enters) |
|---|---|---|---|
| separate | 2 switch nodes | upper: V, U; lower: Z, W | V and Z wait H cycles, so all four start together |
| 1 | 2 inverters | U, Z | U^-1, Z^-1 at TI |
| 2 | 2 multipliers | P = U^-1 V, Q = Z^-1 W | TI + TM |
| 3 | 2 multipliers | V Q, W P | TI + 2TM |
| 4 | 2 subtractors | C = U - V Q, D = Z - W P | TI + 2TM + 1 |
| 5 | 2 inverters | C^-1, D^-1 | 2TI + 2TM + 1 |
| 6 | 2 negating multipliers | X = -P D^-1, Y = -Q C^-1 | 2TI + 3TM + 1 |
| merge | delay lines | X then C^-1; D^-1 then Y | C^-1 and Y wait H more cycles |

Each operand that is ready early waits in a `delay_line` of exactly the right
length. For example, V waits TI cycles before it meets U^-1, and TM more before it
meets Q. U waits TI + 2TM cycles before the subtraction. P and Q wait TI + TM + 1
cycles for D^-1 and C^-1. At the output, C^-1 is delayed TM + H cycles and D^-1 is
delayed TM cycles. This way X and D^-1 leave together, followed by C^-1 and Y.

The latency from the first input column to the first result column is

```
T(1) = 35                                  (reciprocal)
T(N) = N/2 + 2 T(N/2) + 3 (4(N/2) - 1) + 1 = N/2 + 2 T(N/2) + 6N - 2
```

| N | inverse latency | determinant latency |
|---|---|---|
| 1 | 35 | 1 |
| 2 | 81 | 45 |
| 4 | 186 | 144 |
| 8 | 422 | 366 |

The recurrence is O(N log N). `matinv_pkg` holds these formulas as functions
(`mul_lat`, `inv_lat`, `det_lat`), and the RTL sizes its delay lines from them.
Each testbench measures the latency and compares it with these functions.

At N = 1 the inverter is `recip`. This is a restoring divider that produces one
quotient bit per cycle and computes `2^32 / |u|` in the word format. Its latency is
35 cycles.

## The determinant network (`matdet`)

The input stream is the same as for the inverter. U is inverted and `P = U^-1 V`
is formed. Then `W P` is formed and subtracted from the delayed Z, which gives the
Schur complement S. Meanwhile U waits in a delay line. When S is ready, two
half-size determinant networks start on U and S in the same cycle. A final
fixed-point multiply gives `Det(U) * Det(S)`. At N = 1 the determinant is the
element itself, one cycle later. The result is valid for one cycle, `det_lat(N)`
cycles after the first input column:

```
Td(1) = 1
Td(N) = N/2 + T(N/2) + 2 (4(N/2) - 1) + 1 + Td(N/2) + 1
```

## The top (`matinv_det_top`)

The top sends one input stream to both networks. It returns A^-1 on
`out_valid`/`out_col` and Det(A) on `det_valid`/`det`. With the default N = 8, the
determinant arrives 366 cycles after the first input column, and the first inverse
column arrives 422 cycles after it. A new matrix may enter once both results have
left. Starting earlier is not supported, and assertions in the multipliers and the
reciprocal flag it.

## Number format and accuracy

Words are signed fixed point, 32 bits with 16 fraction bits (`W`, `FRAC` in
`matinv_pkg`). Additions saturate. Each processor keeps the full 64-bit products in
a 72-bit accumulator. The sum is scaled back (truncated toward minus infinity) and
saturated only when it leaves the array. The reciprocal saturates, and 1/0 gives
the largest positive word.

In the testbenches the matrices are `I + 0.2 B B^T` or `2I + 0.2 R`, where B and R
have entries in [-1, 1]. For these matrices the largest element error of the 8 x 8
inverse is about 3e-5, and the determinant is within about 6e-5 relative error.
There is no scaling, so badly conditioned matrices lose accuracy at each level. A
determinant beyond about ±32768 saturates.

## What follows the original architecture and what is added

These parts follow the published recursive architecture:
- the block formulas
- the recursive structure of both networks
- the column-serial format with the last column first
- the split of each input path into two blocks by switch nodes, with a half-size
  delay on the first block
- the multiplier built from transposition by switch nodes, skew delays and a
  systolic array of accumulating processors
- the unit-delay adder
- the synchronisation by delay lines
- the output order X, C^-1 / D^-1, Y

These are choices of this implementation:
- the number format and saturation
- the valid bit that goes with each column
- the reset (a synchronous, active-low `rst_n` clears valid bits, counters and
  accumulators)
- the exact latency of each block and so the lengths of the delay lines
- the N = 1 reciprocal divider and the N = 1 determinant
- the `NEGATE` option used for the minus signs of X and Y
- the shared input of the top
- the default N = 8

These parts are not built:
- The reduction of a general nonsingular matrix to the positive definite matrix
  A^T A. The architecture offers this only as an aside.
- A separate buffer-node block. Fan-out is plain wiring here.

## Size

A coarse generic synthesis at the default N = 8 gives the following. The
inverter has about 17,600 word-level cells, 49,500 flip-flop bits and 659,000
bits of delay-line storage, which the tools infer as memories. The determinant
network has about 7,900 cells, 20,600 flip-flop bits and 375,000 memory bits. A
4 x 4 multiplier has 323 cells. Most of the storage is in the long delay lines,
which hold a half-size matrix stream for the latency of an inverter. They can be
built as RAM-based FIFOs without changing the behaviour.

## Files

| file | contents |
|---|---|
| `rtl/matinv_pkg.sv` | word type, fixed-point helpers, latency functions |
| `rtl/delay_line.sv` | unit-delay chain on a column bus with its valid bit |
| `rtl/switch_node.sv` | counter that splits a path into its two blocks |
| `rtl/add_elem.sv`, `rtl/matadd.sv` | adding element and matrix adder/subtractor |
| `rtl/mac_pe.sv`, `rtl/matmul.sv` | arithmetic processor and matrix multiplier |
| `rtl/recip.sv` | 1x1 inverse (sequential divider) |
| `rtl/matinv.sv`, `rtl/matdet.sv` | recursive inversion and determinant networks |
| `rtl/matinv_det_top.sv` | top |
| `tb/tb_util_pkg.sv` | real-valued reference (Gauss-Jordan), random test matrices |
| `tb/tb_<block>.sv` | self-checking testbench of each block |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. It
checks values against independent references (exact integer arithmetic for the
arithmetic blocks, Gauss-Jordan elimination in `real` for the networks), and it
checks latencies against the package formulas. `tb_matinv_det_top` runs the top at
N = 8 end to end. It also counts how often each mechanism of the outer level acted:
the switch-node separation, the transposition feed, the Schur subtraction, the
negating multiply, the four phases of the output merge and the final determinant
product. Compiling it takes about a minute. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/matinv_pkg.sv tb/tb_util_pkg.sv tb/tb_matinv_det_top.sv \
  --top-module tb_matinv_det_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another block (`tb_matmul`, `tb_matinv`,
`tb_matdet`, ...). To change the size, set `N` on the top. N must be a power of
two. The latency functions and delay-line lengths follow automatically. The number of
arithmetic processors grows as about 1.5 N^2 log2 N (288 at N = 8 in the
inverter), and compile time grows with it.
