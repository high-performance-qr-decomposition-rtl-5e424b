# Streaming Modified Gram-Schmidt QR decomposition core

This core computes the QR decomposition A = QR of a square real matrix in
IEEE754 single precision. The default size is 256 x 256. It reads and writes
one whole column of the matrix every clock cycle. Its main idea is a
reordered Modified Gram-Schmidt (MGS) loop. The multiply-subtract datapath
that updates the columns feeds the dot-product datapath directly. So while
projection i is being applied, the dot products, norms and quotients for
projection i+1 are already being computed from the columns just updated.
Both datapaths are busy at the same time. For large matrices the run time
tends to the ideal n(n+1)/2 cycles: 34,872 cycles for n = 256 against the
ideal 32,896, which is 94% of peak.

Everything is plain synthesizable SystemVerilog. The floating-point
operators are written out in the RTL, not taken from a vendor library.

## The algorithm as the hardware runs it

Classic MGS normalises column i and then, for every later column j, forms a
dot product and subtracts a projection. Each of those steps waits for a
long-latency result before the next can start. This core rewrites the update
without the normalised vector:

    a_j <- a_j - s_ij * a_i ,  with  s_ij = <a_i, a_j> / <a_i, a_i>

and computes every s_ij one iteration early. Indices are zero-based and
p_ij = <a_i, a_j>. The work is split into passes. Each pass reads a
sequence of columns, one per cycle, through the scalar datapath.

* **Pre-loop pass.** Columns 0..n-1 flow through the scalar datapath
  unchanged, because its multiplier input is forced to zero. They go into the
  dot-product unit, which latches column 0 and forms p_00, p_01, ..., p_0,n-1.
  From these the math unit produces:
  * ir_00 = 1/sqrt(p_00);
  * r_00 = sqrt(p_00);
  * s_0j = p_0j / p_00;
  * r_0j = p_0j * ir_00.
* **Iteration i (i = 0..n-1).** Column i is read first and latched at the
  multiplier inputs. With the subtracter input zeroed and the coefficient
  ir_ii, the lanes produce q_i = ir_ii * a_i, which overwrites a_i in the RAM.
  Then columns j = i+1..n-1 are read and updated to a_j - s_ij * a_i. Each
  update is written back to the RAM and, in the same cycle, sent to the
  dot-product unit. That unit latches the first of them (the new a_{i+1}) and
  forms p_{i+1,j} for every j. The math unit turns these into ir_{i+1,i+1},
  s_{i+1,j} and row i+1 of R while iteration i is still running.
  * Iteration n-1 is just q_{n-1}.

When the run ends, the RAM holds Q in place of A. R has left the core as a
stream of (row, column, value) elements.

Mathematically this is still MGS: each column sees the same dependent
operations in the same order. Only the grouping of the loops changes, so
the numerical behaviour is that of MGS.

## Architecture

```
            +----------------------------------------------------------+
            |                                                          |
 ext port ->| column_ram --> scalar_datapath --+--> (write-back) column_ram
            |  N banks        N x mult_sub     |                       |
            |                    ^ coef        +--> vector_datapath    |
            |                    |                  N mults + tree     |
            |                coef_fifo <-- math_unit <-----+           |
            |                                   |  div, sqrt, 1/sqrt   |
            |  qrd_ctrl (sequencer)             +--> R stream out      |
            +----------------------------------------------------------+
```

| Module | Role |
|---|---|
| `qrd_top` | Wires the core. Holds the external port and the R stream. |
| `qrd_ctrl` | Sequencer. Runs the pre-loop pass, the iterations and the drain. One column is issued per cycle. Each pass waits for its coefficients. |
| `column_ram` | One memory per row element (N banks of N words), so a whole column is one access. A registered multiplexer selects between the core and the external port. Reads take 2 cycles. |
| `scalar_datapath` | N `mult_sub` lanes. a_i is latched at the multiplier inputs. One common coefficient feeds all lanes. The `zero_c` mode produces q_i and the `mul_zero` mode passes columns through. |
| `mult_sub` | y = c - k*x with the product rounded before the subtraction, 4 cycles. |
| `vector_datapath` | Latches the first vector of each pass. N `fp_mul_r` multipliers feed a balanced tree of `fp_add_r` adders, padded to 2 + 4*ceil(log2 N) cycles. |
| `math_unit` | Latches p_ii at the divider's denominator and produces ir_ii, then s_ij (coefficient stream). It also produces r_ii and r_ij (R stream). |
| `fp_div`, `fp_sqrt`, `fp_rsqrt` | Pipelined elementary functions with latencies 17, 11 and 11. |
| `coef_fifo` | Aligns the coefficients made during pass i with the columns of pass i+1. First-word fall-through, depth N. |
| `fp_mul_r`, `fp_add_r` | Registered single-precision multiplier and adder. |
| `pipe_delay` | Fixed-latency delay line for data, tags and valid bits. |
| `qrd_pkg` | The `float_t` type, column tags (`stag_t`, `vtag_t`) and the floating-point functions. |

### What travels with a column

`qrd_ctrl` issues each column with its controls and a tag (`stag_t`). The
controls are `latch_ai`, `zero_c`, `mul_zero` and `pop`. The tag holds:

* the write-back column;
* whether the result goes on to the dot-product unit;
* whether it is the first vector of a pass;
* the R row and column.

The FIFO head is sampled at issue. A delay line carries the controls, the tag
and the coefficient alongside the 2-cycle RAM read, so that they reach the
scalar datapath together with the column. The dot-product unit then carries
the `first`, `row` and `col` fields on to the math unit. No unit relies on a
fixed schedule. Each one acts on valid bits and tags, so a pass may pause at
any cycle without corrupting anything.

### Coefficient ordering

A pass consumes, in this order:

1. the normalisation value ir_ii, for q_i;
2. then s_{i,i+1}, ..., s_{i,n-1}.

In the math unit, ir comes from the reciprocal square root (11 cycles) and
s comes from the divider (17 cycles). The ir result is therefore delayed to
17 cycles as well. All coefficients then leave in the order of the dot
products that made them. The R stream is equalised the same way. r_ii comes
from the square root. r_ij = p_ij * ir_ii must wait 11 cycles for ir_ii and
then 1 multiplier cycle. Every R element therefore leaves 12 cycles after its
dot product.

## Timing

All units are fully pipelined and accept one column per cycle. The loop
latency is measured from issuing a pass's first forwarded column to the
moment its coefficient can be popped:

| stage | cycles |
|---|---|
| RAM read (registered mux + registered output) | 2 |
| multiply-subtract | 4 |
| dot product, 2 + 4*ceil(log2 N) | 34 at N = 256 |
| divider | 17 |
| FIFO visibility and the second coefficient | 2 |

A pass of c columns therefore occupies max(c, about 60) cycles at N = 256. A
pass with more columns than the loop latency hides that latency completely.
Shorter passes, which come near the end of the run, wait for it (`lat_wait`
in `qrd_ctrl`). The run length is close to n + sum over c = 1..n of
max(c, D), where D is about 60. Start to done, in cycles, with each size's
own default latencies:

| N | this core (cycle model) | reported for the original design | ideal n(n+1)/2 | sustained/peak |
|---|---|---|---|---|
| 64 | 3,428 (simulated) | 3,355 | 2,080 | 61% |
| 128 | 9,878 | 9,741 | 8,256 | 84% |
| 256 | 34,872 (simulated) | 34,607 | 32,896 | 94% |
| 384 | 76,266 | 75,690 | 73,920 | 97% |
| 512 | 133,802 | 133,408 | 131,328 | 98% |

The small surplus, about N cycles, comes from running the pre-loop as a pass
of its own. The 256 x 256 and 64 x 64 runs have been simulated, and both
match the cycle model exactly. The testbenches check this.

## Arithmetic

All operators are IEEE754 binary32 and round to nearest, ties to even:

* add, multiply and divide are correctly rounded;
* square root is correctly rounded, by a digit-by-digit recurrence;
* the reciprocal square root is a rounded square root followed by a rounded
  division of 1.0, so it has two roundings.

Special cases:

* subnormal inputs are read as zero, and results that would be subnormal are
  flushed to zero;
* overflow gives infinity;
* invalid operations give the quiet NaN 0x7FC00000.

The multiply-subtract lanes are not fused, like a DSP block's multiply-add.

Each operator is a combinational function in `qrd_pkg` followed by a delay
line of the operator's latency (`pipe_delay`). The intent is that a
retiming synthesis flow spreads those registers through the logic. The RTL
has not been timing-closed on any device.

The results are accurate to single precision. In the 256 x 256 test (random
entries in [-1, 1] plus 4 on the diagonal) the maximum errors were:

* |Q - Q_ref| = 2e-5, with Q_ref from MGS in double precision;
* |R - R_ref| = 1e-5, for |R| up to 10;
* |Q^T Q - I| = 3e-5.

## Using the core

Ports of `qrd_top`. Every float is a `float_t` (32 bits), and column
buses are `float_t [N-1:0]` with element r at index r.

| Port | Direction | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock and active-low synchronous reset. |
| `ext_we`, `ext_re`, `ext_col`, `ext_wdata` | in | Column-wide external access, used while `busy` is low. |
| `ext_rdata` | out | The column read, 2 cycles after `ext_re`. |
| `start` | in | Pulse while idle to start a decomposition. |
| `busy` | out | High while running. The external port is ignored then. |
| `done` | out | Pulses when Q has been written over A. |
| `r_valid`, `r_row`, `r_col`, `r_data` | out | One element of R per valid cycle, zero-based indices, row by row. Elements below the diagonal are never sent. |

To run a decomposition:

1. Hold `rst_n` low for a cycle.
2. Write the N columns of A with `ext_we`.
3. Pulse `start`.
4. Collect the R elements from the R stream.
5. Wait for `done`.
6. Read the N columns of Q with `ext_re`.

Parameters, with defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 256 | Matrix size. Must be at least 2. |
| `SCALAR_LAT` | 4 | Multiply-subtract latency. |
| `VEC_LAT` | 2 + 4*clog2(N) | Dot-product latency. |
| `DIV_LAT` | 17 | Divider latency. |
| `RSQRT_LAT` | 11 | Reciprocal square root latency. |
| `SQRT_LAT` | 11 | Square root latency. |

`DIV_LAT` must be at least `RSQRT_LAT`, and `VEC_LAT` must be at least
1 + clog2(N).

A matrix smaller than N can be factored by loading diag(A, I). The result is
then diag(Q, I) and diag(R, I), at the run time of a full N run.

Size at N = 256:

* 512 multipliers, 256 in the lanes and 256 in the dot product;
* 511 adders and subtracters in the lanes and the tree;
* one divider, one square root, one reciprocal square root and one more
  multiplier;
* 2 Mbit of column RAM in 256 banks;
* the FIFO.

## Simulation

Every testbench is self-checking and ends with a `TB_RESULT checks=...
failures=...` line. Each can be built with Verilator from the project root.
For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/qrd_pkg.sv \
  tb/tb_fp_pkg.sv tb/tb_qrd_top.sv --top-module tb_qrd_top -Mdir obj_top
./obj_top/Vtb_qrd_top
```

* **Operators:** `tb_fp_add_r`, `tb_fp_mul_r`, `tb_fp_div`, `tb_fp_sqrt`,
  `tb_fp_rsqrt` and `tb_mult_sub`. Thousands of random operations each, plus
  special cases, compared bit-exactly with double-precision arithmetic
  rounded to single (`tb_fp_pkg`). Latencies are checked too.
* **Datapath units:** `tb_scalar_datapath`, `tb_vector_datapath` and
  `tb_math_unit`. Bit-exact against lane-by-lane, tree-order and
  function-by-function references, with exact latencies and tags.
* **Storage and control:** `tb_coef_fifo` (queue model), `tb_column_ram`
  (reference memory, port ownership) and `tb_qrd_ctrl`. The controller test
  compares the issued column schedule with an independently written one and
  models the coefficient return path.
* **`tb_qrd_top`:** end to end at N = 64 with every latency at its default.
  The early passes are longer than the loop latency and overlap; the late
  ones are shorter and wait. It
  checks:
  * Q and R against double-precision MGS;
  * Q^T Q = I;
  * that every element of R is delivered exactly once;
  * the exact run length against a cycle model.

  It also counts the pre-loop pass-through, the q passes, the latency waits,
  the passes overlapped with the next pass's coefficient computation, and
  the external loads and reads. Each must have happened.
* **`tb_qrd_full`:** the same checks on one full 256 x 256 decomposition with
  every parameter at its default. It takes about 1.5 minutes to build and 2
  seconds to run.

## Departures and limits

* **Real data only.** The complex form of the core is not built. In that
  form, complex multiply-adds are mapped onto pairs of real multiply-adds,
  and each complex dot product is four real dot products, one of them with
  conjugation.
* **Full-width only.** There is no multi-cycle variant that processes a
  column in m cycles with 1/m of the datapath.
* **Fixed size.** The matrix size is fixed when the core is built. There is
  no run-time size.
* **No extra fan-out pipelining.** Nothing extra is added on the control
  signals or on the FIFO output, which drives all N lanes. A large build
  would need a few such stages for timing.
* **Square-root latency.** It is a choice of this design (11 cycles). The
  reciprocal square root is built from a square root and a division. It is
  not a dedicated operator.
* **Pre-loop costs about N cycles.** It runs as a separate pass (see
  Timing).
* **Vector latency at N = 384.** `VEC_LAT` follows 2 + 4*ceil(log2 N),
  which gives 38 cycles at N = 384. The figure reported for the original
  design at that size is 34.
* **No pipeline timing.** The operator pipelines are placeholders for
  retiming (see Arithmetic). The register placement has not been checked for
  any target frequency.
