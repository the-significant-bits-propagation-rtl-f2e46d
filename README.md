# Partial-defect-tolerant bit-plane FIR array

Many signal-processing applications can live with an output that is slightly wrong, as long
as the error is small compared with the value. This design is a pipelined FIR filter that
builds on that fact. It protects with triple modular redundancy (TMR) only those cells whose
defects could cost the output more than a chosen number of significant bits. Every other
cell is an ordinary full-adder cell. The threshold is a parameter, `ALPHA`. With the default
`ALPHA = 1`, only the 4 cells of the most significant column of the last bit-plane are
triplicated, out of 512. The worst error any remaining single defect can cause is then
2^(W-2) on a W-bit output. Without protection it could be 2^(W-1), the most significant bit.

The filter computes

    y_i = c_0 x_i + c_1 x_{i-1} + ... + c_{KC-1} x_{i-KC+1}

one output word per clock. The array is a semi-systolic bit-plane array (BPA). It is
semi-systolic because each input word is broadcast to all rows of a bit-plane in the same
clock, instead of travelling from cell to cell.

## The bit-plane array

Each coefficient is split into its M bits. Bit-plane k multiplies the input stream by bit k
of every coefficient:

    y_i = sum over k of 2^k * ( c_0^k x_i + c_1^k x_{i-1} + ... + c_{KC-1}^k x_{i-KC+1} )

Bit-plane 0 sits on top and bit-plane M-1 at the bottom. Each bit-plane has KC rows. Each
row has L0 cells, with the most significant column on the left.

**The cell** (`bpa_cell`) is a full adder whose third operand is a partial-product bit:
`sum = a ^ b ^ (x & c)` and `carry = majority(a, b, x & c)`. Here `b` is the sum bit from
the cell above, at the same weight. `a` is the carry from the cell above and one column to
the right, at the weight below. `x` is one bit of the broadcast input word and `c` is the
row's coefficient bit. A row (`bpa_row`) therefore adds `x * c` to a partial result held as
a sum vector and a carry vector (carry-save form). No carry ripples along the row, so a row
is one full-adder delay deep.

**Rows and timing** (`bit_plane`). A register follows every row. Row r of a bit-plane uses
coefficient `c_{KC-1-r}`. A partial result enters row 0 in clock t and meets input word
x(t+r) in row r. It therefore collects `c_{KC-1} x(t) + ... + c_0 x(t+KC-1)`, the transposed
FIR form.

**Between bit-planes** (`pdt_bpa`), the partial result moves one column to the right. This
multiplies it by 1/2, so the next plane's bit of weight 2^(k+1) lines up. The sum vector
shifts and the carry vector goes straight down, because a carry already has twice the weight
of its column. The rightmost sum bit is final at that point and leaves the array as output
bit `y[k]`. Bit-plane k sees the input delayed by k*KC clocks, so it meets the partial
result of the same output word.

**At the bottom**, a ripple-carry adder (`final_adder`) turns the carry-save pair into the
upper L0 bits of `y`. It is made of the same basic cell. Output bits `y[M-2:0]` leave the
array early. They pass through delay lines (`delay_line`) so that a whole word appears in
the same clock.

Output width: `W = L0 + M` bits. Bits `y[M-1:0]` come one from each bit-plane, and
`y[W-1:M]` comes from the adder.

Latency: a word's newest input `x_i` reaches the output `KC*(M-1)+1` clocks after it is
applied. Its oldest input `x_{i-KC+1}` reaches it after `KC*M` clocks, one clock per row. A
new word follows every clock.

## Where a defect's error goes: the significance model

This is the least obvious part of the design. It decides which cells are triplicated.

A defective cell gives a wrong sum or a wrong carry. Everything after the cell is exact
carry-save addition, so the wrong bit reaches the output with its weight unchanged. An
inverted sum of the cell at bit-plane k, bit weight j, changes `y` by exactly ±2^(k+j). An
inverted carry changes it by ±2^(k+j+1).

The model views the array as a graph with one vertex per cell. A sum edge keeps the number of
significant bits of an error (weight 0). A carry edge, one column to the left, costs one
(weight 1). The shortest-path closure of this graph is computed in min-plus algebra: ⊕ is
min and ⊙ is +, and the closure is A ⊕ A² ⊕ ... for the adjacency matrix A. Restricted to
the output, it collapses to a simple rule:

- Draw bit-plane k shifted M-1-k columns to the right, so that equal weights line up.
- Number the columns of that drawing from the left, starting at 0.
- A cell in drawing column `d` can leave at worst `d` significant bits at the output.
  With the columns numbered this way, `d = col + (M-1-k)`, where col is the cell's own
  column from the left within its row.

A cell is **critical**, and built as a `tmr_cell`, when `d < ALPHA`.
`pdt_bpa_pkg::is_critical()` evaluates this at elaboration time. `bpa_row` then places a
`tmr_cell` or a `bpa_cell` in each column. A `tmr_cell` is three basic cells with common
inputs and two 2-of-3 voters (`maj_voter`), one for the carry and one for the sum.

For KC = 4 and M = 8, the rule gives these counts of basic cells. Each triplicated cell
counts three times. Voters and the final adder are not counted.

| ALPHA | L0 = 16 (n = 8) | L0 = 24 (n = 16) | L0 = 32 (n = 24) |
|------:|----------------:|-----------------:|-----------------:|
| 0     | 512             | 768              | 1024             |
| 1     | 520             | 776              | 1032             |
| 2     | 536             | 792              | 1048             |
| 4     | 592             | 848              | 1104             |
| 8     | 800             | 1056             | 1312             |
| 16    | 1312            | 1568             | 1824             |

A partition based on any bit flip at the output (Hamming distance) protects far more cells.
For example, take the second cell from the right in the first row. A sum defect there
changes the output by only 2^1. That small change can still turn 10000000 into 01111111 and
flip every output bit. A Hamming-based partition must therefore protect this cell; this
design does not. That alternative partition is not built.

## Interface of `pdt_bpa`

| Port    | Dir | Width                           | Meaning |
|---------|-----|---------------------------------|---------|
| `clk`   | in  | 1                               | clock |
| `rst_n` | in  | 1                               | synchronous, active low; clears every pipeline register |
| `x`     | in  | `N`                             | input word, unsigned, one per clock |
| `coef`  | in  | `[KC-1:0][M-1:0]`               | `coef[i]` is c_i, unsigned; hold it constant while results are wanted |
| `flt`   | in  | `[M-1:0][KC-1:0][L0-1:0][1:0]`  | defect injection, `flt[k][r][j] = {carry, sum}` inverts that output of the cell at plane k, row r, weight j (copy 0 of a TMR cell); tie to 0 |
| `y`     | out | `L0+M`                          | output word |

After reset, the output is the response to an input history of zeros. There is no valid
flag: the filter runs continuously.

| Parameter | Default | Meaning |
|-----------|--------:|---------|
| `KC`      | 4  | number of coefficients |
| `M`       | 8  | coefficient width, which is also the number of bit-planes |
| `N`       | 8  | input word width |
| `L0`      | 16 | cells per row; must be at least `N + ceil(log2 KC) + 1` (checked by an assertion) |
| `ALPHA`   | 1  | significance threshold; 0 gives an unprotected array |

The defaults are the smallest of the three evaluated array sizes. The other two need
`N = 16, L0 = 24` and `N = 24, L0 = 32`. The small array used to explain the structure
(KC = 3, M = 2, N = 3, L0 = 6) also works.

## Design choices and departures

- **Unsigned operands.** The reference drawing carries the sign of `x` into the guard
  columns, which suggests two's-complement input. It gives no rule that keeps a signed
  carry-save result exact when it is shifted between bit-planes. A bit-level model showed
  that copying the top sum bit into the freed column gives wrong words at these sizes. Here
  `x` and the coefficients are unsigned. `x` is zero-extended over the guard columns, and
  the column freed by the shift receives 0. With that, the array is exact whenever `L0` is
  wide enough (see the parameter table). Signed input would need an offset correction
  outside the array. That correction is not included.
- **Defect injection.** `flt` exists only to exercise the fault tolerance. In a product it
  would be tied to zero, and synthesis then removes it.
- **Voters** are assumed defect-free. Injected defects reach one copy of a TMR cell.
- **The final adder** is a plain ripple-carry adder with no register of its own. It is never
  triplicated.
- **Reset** and the exact number of alignment delays on the early output bits are this
  design's own choices.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|-----------|---------------|
| `tb_bpa_cell`, `tb_maj_voter`, `tb_tmr_cell` | exhaustive truth tables; the TMR cell hides all 48 injected single-copy defects |
| `tb_bpa_row` | a row preserves value (`s_out + 2*co = s_in + a_in + x*c`); defects in TMR columns are hidden, defects in plain columns shift the value by exactly their weight |
| `tb_bit_plane` | KC-clock latency and the transposed-FIR sum, with coefficient bits changing in flight |
| `tb_final_adder`, `tb_delay_line` | adder against `+`, delay against a queue |
| `tb_pdt_bpa_pkg` | the partition rule reproduces every count in the table above; a min-plus shortest-path closure of the rebuilt error-propagation graph gives the same distance `d` for every cell |
| `tb_pdt_bpa` | whole array at default size: exact output words, latency of an impulse, and 40 single-defect runs (masked in critical cells; elsewhere an error of exactly ±2^weight, never above 2^(W-1-ALPHA)) |
| `tb_pdt_bpa_example` | the same at KC = 3, M = 2, N = 3, L0 = 6 with ALPHA = 2 |
| `tb_pdt_bpa_arrays` | all three evaluated array sizes (ALPHA = 8, 2, 16), through the harness `arr_check` |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/pdt_bpa_pkg.sv tb/tb_pdt_bpa.sv --top-module tb_pdt_bpa -o sim
    ./obj_dir/sim

The package must be listed first, because it is not found by module search. Each run takes
well under a second.

## Files

- `rtl/pdt_bpa_pkg.sv`: the significance model (distance `d`, critical rule, cell counts)
- `rtl/pdt_bpa.sv`: top level (bit-planes, shifts, input and output delays, final adder)
- `rtl/bit_plane.sv`, `rtl/bpa_row.sv`: a bit-plane and a row
- `rtl/bpa_cell.sv`, `rtl/tmr_cell.sv`, `rtl/maj_voter.sv`: the cells
- `rtl/final_adder.sv`, `rtl/delay_line.sv`: the vector-merging adder and the delay chains
- `tb/`: the testbenches above, plus `arr_check.sv`
