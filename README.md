# Stochastic matrix-function estimator for graph analytics

Some graph rankings need a few entries of a matrix function f(A), where A is
the adjacency matrix of the graph. One example is subgraph centrality, the
diagonal of e^A: node i's score counts the closed walks through i, with
shorter walks weighted more. Forming f(A) exactly costs O(N^3). A would also
turn dense, so this is out of reach for large graphs. This accelerator
estimates the diagonal stochastically instead. If V has random ±1 entries, the
expected value of V Vᵀ is the identity. So the diagonal of f(A) V Vᵀ, averaged
over many random V, converges to diag f(A). The product f(A) V is computed
without forming f(A), through a Chebyshev expansion
f(A) ≈ Σ c[m] T_m(A). The recurrence T_m = 2·A·T_{m-1} − T_{m-2} needs only
sparse-matrix times dense-block products.

The RTL is written in SystemVerilog in `rtl/`, with self-checking testbenches
in `tb/`. It computes in IEEE single precision throughout.

## The computation

For `n_blocks` blocks of NB test vectors (Ns = n_blocks · NB vectors in all):

```
V = M0 = random ±1 (N x NB),  W = c[0]·V            RNG
M1 = A·V                                            SPMM, plain mode
W  = c[1]·M1 + W                                    AXPY
for m = 2 .. nc:
    M0 = 2·A·M1 − M0                                SPMM, Chebyshev mode
    W  = c[m]·M0 + W                                AXPY
    swap(M0, M1)
R[i] += Σ_b W[i][b]·V[i][b]     (R cleared in block 1)   DOT
```

After the run the host reads R and divides by Ns to get the estimate of
diag f(A). The coefficients c[0..nc] come from the host and choose the
function: Chebyshev coefficients of e^x give subgraph centrality, and those of
a step function give spectrum histograms through traces, i.e. sums of R. The
matrix must be scaled so that the spectrum of A lies where the Chebyshev
expansion is valid, usually [−1, 1]. That scaling is the host's job too.

Only the diagonal of W·Vᵀ is formed. The DOT step is one dot product per row,
not a full matrix product. This is all that diagonal and trace estimates need.

## Structure

| module | role |
|---|---|
| `sme_top` | buffers, kernel instances, routing between them, host port |
| `sme_ctrl` | runs the loop nest above; holds the coefficient file c[0..NC_MAX] |
| `sme_rng` | xorshift64* generator; writes V, M0 and W rows |
| `sme_spmm` | CSR sparse matrix times NB-column dense block |
| `sme_axpy` | W = c·X + W, row by row |
| `sme_dot` | R[i] += Σ_b W[i][b]·V[i][b], balanced adder tree over the lanes |
| `sme_ram` | buffer with one write port and two registered read ports |
| `fp32_mul`, `fp32_add` | combinational single-precision multiplier and adder |
| `sme_pkg` | fp32 type, constants, bank, kernel and mode encodings |

Each kernel processes all NB columns of a row in parallel: NB multiplier and
adder lanes. Only one kernel runs at a time. The controller starts it with a
one-cycle `start` pulse and waits for its one-cycle `done` pulse. While a
kernel runs, the controller's `kernel` output gives it the buffers.

### Buffers and the pointer swap

Four vector banks hold one NB·32-bit word per node: V, MA, MB and W. M0 and M1
are not fixed banks. A swap bit in the controller maps M0 to MA and M1 to MB, or
the other way round. The end of each Chebyshev step flips that bit, so no data
are copied. The controller turns its state and the swap bit into three bank
selects:

| step | read port A (`x_bank`) | read port B (`z_bank`) | written bank |
|---|---|---|---|
| RNG | – | – | V, M0 (±1) and W (±c[0]) |
| SPMM plain | V (random rows) | – | M1 |
| AXPY after it | M1 | W | W |
| SPMM Chebyshev | M1 (random rows) | M0 (row i) | M0, in place |
| AXPY after it | M0 | W | W |
| DOT | W | V | R |

The Chebyshev SPMM updates M0 in place. This is safe because it reads Z[i] just
before it writes row i, and later rows never read row i of M0 again.

The other buffers are R (one fp32 per node), `row_ptr` (N_MAX+1 entries) and
the non-zero array, whose entries hold a column index and an fp32 value.
`row_ptr` is read at i and i+1 in the same cycle. All buffers are on-chip
arrays with one cycle of read latency.

### Random test vectors

The generator keeps a 64-bit xorshift state. Each step shifts right by 12, left
by 25 and right by 27, XORing each result back in. The new state is multiplied
by 2685821657736338717, keeping the low 64 bits, to give the output word.
Bit b of that word makes column b of the row −1.0 if set and +1.0 if clear. So
each generator step gives one row of NB values, and NB may be at most 64. W's
row is c[0] with its sign flipped where the value is −1, which equals
c[0]·(±1) exactly. The state carries over from pass to pass, so each block gets
new vectors. `seed_load` sets the state. An all-zero seed, which xorshift would
never leave, is replaced by 0xdecafbad.

### Sparse matrix–block product

A is stored in compressed sparse row (CSR) form. `row_ptr[i]` to
`row_ptr[i+1]−1` index the column and value entries of row i. For each row,
`sme_spmm` does this:

1. Fetch both row pointers (2 cycles).
2. For each non-zero, fetch the column and value, then fetch row `col` of X,
   then do `acc[b] = acc[b] + val·X[col][b]` in every lane (3 cycles). `acc`
   starts at +0.
3. Test for the end of the row, fetch Z[i], and write `acc` (plain mode) or
   `2·acc − Z[i]` (Chebyshev mode) (3 cycles).

A row takes 5 + 3·nnz(i) cycles, and an empty row is handled like any other.
The schedule is strictly sequential: no non-zeros overlap and no adds are
pipelined. This is the simplest schedule, chosen for correctness, not speed.

### AXPY and DOT

Both kernels fetch a row in one cycle and write the result in the next. They
finish one row per clock, with the last write N+1 cycles after `start` and
`done` one cycle later. DOT adds the NB products in a balanced tree: lanes
(0,1), (2,3), … then pairs of those sums. Lanes above NB, if NB is not a power
of two, count as +0. The tree sum is then added to the old R[i]. In the first
block, the `first` flag replaces the old R[i] by +0, which performs the
clearing of R.

### Arithmetic

`fp32_mul` and `fp32_add` are combinational and round to nearest, ties to
even. Subnormal operands count as zero, and results below the normal range
flush to a signed zero. Results above the range become ±infinity. Invalid
operations give the quiet NaN 0x7FC00000. Each multiply and each add rounds
separately, with no fused multiply-add. With these rules and the summation
orders above, every result is exactly reproducible. The testbenches compare
bit for bit.

## Host port and use

With `busy` low, use the host port as follows:

1. Write `row_ptr[0..N]`: `host_we`, `host_sel = HSEL_ROWPTR`,
   `host_addr = i`, `host_wdata = row_ptr[i]`.
2. Write each non-zero j: `host_sel = HSEL_CSR`,
   `host_wdata = {value_fp32, column}` (value in bits 63:32).
3. Write c[0..nc]: `host_sel = HSEL_COEF`, `host_wdata[31:0]` = fp32.
4. Load the seed with `seed_load` and `seed`. This is optional.
5. Pulse `start`, with `n_rows` = N, `nc` ≥ 1 and `n_blocks` ≥ 1 held stable.
6. Wait for `done`. Then present `host_raddr` and read R one cycle later on
   `host_rdata`. Divide by n_blocks·NB.

`rst_n` is an asynchronous, active-low reset for the control state. The
buffers are not reset and need no reset: each run writes every word before it
reads it.

Run time per block is about nc·(6·N + 3·nnz) + 2·N cycles, plus a few cycles
per kernel launch. It is dominated by SPMM. The 1024-node, 16384-non-zero graph
with nc = 4 takes 223,257 cycles per block of 8 vectors.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NB` | 8 | test vectors per block (lanes) |
| `N_MAX` | 1024 | nodes that fit |
| `NNZ_MAX` | 16384 | non-zeros that fit |
| `NC_MAX` | 63 | largest Chebyshev index `nc` |
| `BW` | 16 | width of `n_blocks` |

None of these values comes from a published configuration. They are chosen to
keep all data on chip. Large graphs, with tens of millions of nodes, would need
the buffers moved to external memory. The kernels need no change for that,
since all their memory access goes through simple address/data ports with a
fixed one-cycle latency.

## Relation to the published design

The published estimator is a set of OpenCL kernels (random generator, SPMM,
AXPY, DOT) on a Stratix-V PCIe card, launched by a POWER8 host. This RTL
follows these parts of it:

- the loop nest;
- the CSR format;
- the xorshift64* generator and its bit-to-sign rule;
- the on-the-fly initialisation of V, M0 and W;
- the pointer swap;
- single precision.

The following are this design's own choices:

- **Storage:** all arrays are held on chip and loaded through a simple host
  port, not in the board's DDR memory behind PCIe.
- **Sequencing:** an RTL controller runs the kernels one after another, instead
  of the host launching them.
- **Schedules:** the kernels use the simple schedules described above. No
  throughput figures were available to match.
- **Diagonal only:** only the diagonal of W·Vᵀ is accumulated.
- **Normalisation:** the division R/Ns is left to the host.
- **Seeding:** the seed comes from the host, with 0xdecafbad replacing an
  all-zero seed.
- **Rounding details:** flush-to-zero, tree order and separate rounding of
  multiply and add.
- **All widths, depths and handshakes.**

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/fp_ref_pkg.sv` work in double precision and round to fp32 with the
hardware's rules. They also hold an independent xorshift64* step.

- `tb_fp32_mul`, `tb_fp32_add`: directed cases (ties, zeros, overflow,
  underflow, infinity, NaN) and several thousand random operands.
- `tb_sme_ram`: random traffic against a model, including read-during-write.
- `tb_sme_rng`: rows against the reference generator, over three passes, with
  the zero-seed substitute. Also checks one row per clock.
- `tb_sme_spmm`: the 8-node, 22-non-zero example matrix and a random matrix
  with empty rows, in both modes. Also checks the cycle count
  5·N + 3·nnz + 1.
- `tb_sme_axpy`, `tb_sme_dot`: random rows. They check the write order, the
  row-per-clock rate, the `done` timing and the `first` flag.
- `tb_sme_ctrl`: stand-in kernels with random latencies. Checks the order of
  kernel launches, the coefficients and the bank selects against the loop nest,
  for nc of 1, 4, 5 and 15.
- `tb_sme_top`: end to end at default parameters. It runs the example graph
  with nc = 5 and 2 blocks, then a 10-node graph with two isolated nodes,
  nc = 1 and a zero seed. Every R[i] is compared with a full model of the
  algorithm. It counts each mechanism: RNG, plain and Chebyshev SPMM, AXPY, R
  cleared and accumulated, pointer swaps, empty rows and the seed substitute.
- `tb_sme_capacity`: a random graph filling all 1024 nodes and 16384
  non-zeros, checked the same way.

The example coefficients in the testbenches are not true Chebyshev
coefficients of any particular function. They test the datapath, not how good
the estimate is.

## Simulating

With Verilator 5 (two-state, `--timing`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/sme_pkg.sv tb/fp_ref_pkg.sv \
    tb/tb_sme_top.sv -y rtl --top-module tb_sme_top -Mdir obj_top
./obj_top/Vtb_sme_top
```

Replace `tb_sme_top` with any other testbench name. Unit testbenches that use
no floating-point module still need `rtl/sme_pkg.sv`, and the kernel
testbenches also need `tb/fp_ref_pkg.sv`. All testbenches finish in seconds.
