# An interior-point KKT accelerator for spacecraft-rendezvous MPC

A model predictive controller for a chaser spacecraft solves a small
constrained optimisation problem at every sample. The solver is a
primal-dual interior-point method, and almost all of its time goes into one
linear system per iteration: the KKT system `A_k c_k = b_k`, whose unknown
`c_k` is the search direction for the primal variables θ (states and inputs
over the horizon) and the equality multipliers λ.

This RTL is the peripheral that takes that linear system off the
processor. The processor still does the interior-point bookkeeping. It
writes the time-varying prediction matrices and the iteration's vectors into
the peripheral over AXI4-lite, then starts four steps:

1. **Build Φ.** Form the weighted constraint term `Φ_i = H_i + G_iᵀ diag(w_i) G_i`
   for every stage.
2. **Stream the matrix.** Send the KKT matrix row by row, in a compact 24-column
   block form, to a diagonal preconditioner. The preconditioner stores the
   scaled matrix as fixed-point columns.
3. **Build the right-hand side.** Compute `b_k` with a second multiply–accumulate
   pass over the same rows.
4. **Solve.** Run a fixed number of MINRES iterations and leave `c_k` for the
   processor to read.

The main idea comes from the design by Hartley and Maciejowski ("Predictive
Control for Spacecraft Rendezvous in an Elliptical Orbit using an FPGA").
After diagonal scaling, every entry of the matrix and every Lanczos vector
lies in [-1, 1]. The expensive part of MINRES, the Lanczos matrix–vector
product, can therefore run in narrow fixed point: 25-bit matrix entries and
35-bit vector entries, 24 multipliers, one matrix row per clock. Everything
whose size is not known in advance runs in single-precision float. That
covers Φ, `b_k`, the Givens rotations and the solution update.

Default sizes:
- 6 states (3 positions, 3 velocities);
- 6 inputs (± thrust on 3 axes);
- 6 terminal equality rows;
- 12 inequality constraints per stage;
- horizons N = 1 … 20.

## The linear system and its compact form

For horizon N the KKT matrix has `n = N(2·6+6) + 2·6 + 6 = 18N + 18` rows,
which is 378 at N = 20. The unknown vector is ordered
`[x_0 u_0 x_1 u_1 … x_N | λ_0 λ_1 … λ_N λ_T]`.

Every row touches at most four consecutive 6-element slices of that vector.
So the matrix is kept as 24 numbers per row, in four 6-wide segments:

| rows                      | segment 0 | segment 1 | segment 2 | segment 3 |
|---------------------------|-----------|-----------|-----------|-----------|
| stage i, 6 state rows     | Φ_xx,i    | Φ_xu,i    | −I        | A_iᵀ      |
| stage i, 6 input rows     | Φ_ux,i    | Φ_uu,i    | 0         | B_iᵀ      |
| terminal, 6 rows          | H_N       | 0         | −I        | F_Nᵀ      |
| λ_0, 6 rows               | −I        | 0         | 0         | 0         |
| λ_{i+1}, 6 rows per stage | A_i       | B_i       | −I        | 0         |
| λ_T, 6 rows               | F_N       | 0         | 0         | 0         |

What each segment multiplies:
- stage and terminal rows: x_i, u_i, λ_i, λ_{i+1}. For the terminal rows that is x_N, –, λ_N, λ_T.
- dual rows (λ_0, λ_{i+1}, λ_T): x_i, u_i, x_{i+1}.

A 24-wide row times the right four slices gives one entry of `A v`. That is
why the matrix–vector unit has exactly 3·6 + 6 = 24 multipliers.

The right-hand side is `b_k = [-h; f] − [H+Φ  Fᵀ  Gᵀ; F 0 0] m_k`. It needs
the same rows plus the `G_iᵀ` block, which multiplies the third part of
`m_k`. Mode 4 therefore appends 12 numbers to every row: `G_iᵀ` on the stage
rows and zeros elsewhere.

## Linear system builder (`linear_system_builder`)

**Data RAM.** The processor writes 32-bit float words to a 4096-word data
RAM (mode 1), in any layout it likes:
- A_i and B_i for each stage, row-major;
- G_i, H_i, H_N and F_N;
- the vectors m_k, w_k and [-h; f].

Three registers say where the vectors start: `M_BASE`, `W_BASE` and `RHS_BASE`.

**Index RAMs** (`matrix_index`). These locate the stage matrices. There are
five of them (A, B, G, F, H), each N_max+1 = 21 words. Word i holds the start
address of that stage's matrix. The address of element e of the stage-i
matrix is `index[i] + e`: one index-RAM read and one adder. A time-invariant
model is stored once, and every stage points at the same copy. For H, entry N
points at H_N. For F, entry N points at F_N.

**Mode 2** (`phi_builder`) computes each entry of Φ_i as a 12-term dot product
over the constraint rows: `H[p][q] + Σ_c w_c · G[c][p] · G[c][q]`. The
terminal block is H_N. One term enters per clock. `fp_mac` multiplies in
float, converts the product to Q32.32 fixed point, accumulates, and converts
back. The result goes row-wise into the Φ RAM: `20·12² + 6² = 2916` words. A
full N = 20 build takes `1728N + 36` cycles.

**Modes 3 and 4** (`row_sequencer`) walk the compact form, addressing the Φ
RAM, the data RAM and the generated −I and 0 blocks. Each clock they emit one
number with:
- its row;
- its slot;
- the index of the vector element it multiplies.

Mode 3 sends the stream to the preconditioner. Mode 4 sets a flag that
appends the Gᵀ segment and routes the stream into `b_builder`. There a second
`fp_mac` forms the row's dot product with `m_k` and a float subtractor makes
`b_r = [-h; f]_r − dot`.

Speeds: mode 3 runs at 24 cycles per row. Mode 4 runs at 36 cycles per row.

## Preconditioner and the fixed-point matrix (`preconditioner`)

The scaling is `M_r = (Σ_p |A_rp|)^(-1/2)`, applied on both sides: MINRES
solves `(M A M) c̃ = M b / ‖M b‖`, and then `c = M ‖M b‖ c̃`. Each row of
`M A M` then has absolute sum at most 1, so its eigenvalues and all Lanczos
quantities stay in [-1, 1].

The preconditioner has three phases:
1. **Capture.** While the mode-3 stream arrives, accumulate each row's
   absolute sum in Q32.32. At the same time, store the stream (value and
   vector index) in a sequence RAM.
2. **Scale factors.** Compute each `M_r` with the float reciprocal square root
   and store it in the M RAM.
3. **Scale.** Read the sequence back and multiply each number by `M_row · M_col`.
   `M_col` is found through the stored vector index. Convert to sFix25_23 with
   saturation and write the result to one of 24 column RAMs.

The solver reads `M` later to scale `b` and the solution.

## MINRES solver (`minres_solver`)

This is the part that needs the most care.

**The matrix–vector product** (`lanczos_matvec`). Row r of the 24 column RAMs
is read together with the four vector slices that row multiplies. The
slices come from a banked copy of the current Lanczos vector v:
- 6 dual-port "x" RAMs, where element k of every x_i is in RAM k;
- 6 dual-port "λ" RAMs, organised the same way;
- 6 single-port "u" RAMs.

With this layout the four slices of any row come out in one cycle. The dual
rows read a second x slice (x_{i+1}) through the x RAMs' second port.

Each of the 24 products is sFix25_23 × sFix35_33. It is done as two partial
products (`split_mult`: 25×18 and 25×17, a register, then shift-and-add),
which fits the 25×18 hardware multipliers of the target FPGA family. A
registered five-level adder tree sums the products, and the total is rescaled
to sFix35_33. Throughput is one row per clock; latency is 8 cycles.

**One iteration** makes three passes over the rows:

| pass | work |
|------|------|
| A | `z = (MAM) v_j` row by row; `α = v_jᵀ z` accumulated in Q.50 |
| B | `z ← z − α v_j − β_j v_{j−1}`; `zᵀz` accumulated in sFix52_50 |
| — | `1/β_{j+1} = zᵀz^(-1/2)` in fixed point (`fix_rsqrt`); `β_{j+1} = zᵀz · (1/β_{j+1})`; rotation scalars δ, ρ₂, ρ₃ in float; `(δ² + β_{j+1}²)^(-1/2)` in float (`fp_rsqrt`) |
| C | `w = (v_j − ρ₃ w_{j−2} − ρ₂ w_{j−1}) / ρ₁`; `x ← x + c η w`; `v_{j+1} = z / β_{j+1}` written back to the banked RAMs |

This is the standard three-term MINRES recurrence with Givens rotations. The
Lanczos half (v, z, α, β) is fixed point. The rotation and the w/x update are
single-precision float. An iteration takes about `3n + 200` cycles, which is
about 1330 cycles at N = 20.

**Reciprocal square roots.** `fix_rsqrt` computes `2^57 / isqrt(x)` from a
restoring integer square root (`isqrt_sm`) and a restoring divider
(`div_sm`), one bit per clock: 93 cycles. These are scalar operations, so the
state machines are deliberately not pipelined. `fp_rsqrt` reuses the same two
state machines on a float's mantissa, with the exponent halved.

**Numerical behaviour.** Because the Lanczos vectors are fixed point, they
slowly lose orthogonality. MINRES therefore needs somewhat more than n
iterations to reach what exact arithmetic would reach in n. The controller
runs a fixed count, `I_MR = ⌈η · rows⌉`, with η around 0.9–1.2. Measured on
random test systems, as the relative residual `‖A c − b‖∞ / ‖b‖∞`:

| system | I_MR | relative residual |
|---|---|---|
| N = 2 (54 rows) | 54 | 1.2e-2 |
| N = 2 (54 rows) | 74 | 3e-3 |
| N = 3 (72 rows) | 87 | 9e-4 |
| N = 4 (90 rows) | 108 | 5e-5 to 1.2e-4 |
| N = 20 (378 rows) | 416 | 2.8e-5 |
| N = 20 (378 rows) | 454 | 2.4e-5 to 4.5e-5 |

These numbers need a regular KKT matrix. The random test systems give each
stage only three independent thrust directions (each axis has a + and a −
input). At N = 1 the six terminal equalities then over-determine x_1, so the
matrix is singular. MINRES stalls there, at a preconditioned residual of about
0.25. At N = 2 the matrix is regular but badly conditioned (residuals between
6e-3 and 5e-2 were seen at 1.2·rows). This is a property of the linear system, not of the
arithmetic. A controller has to treat such horizons as infeasible.

## Processor interface (`axi_lite_regs`, `pcore`)

`pcore` is the top. It has an AXI4-lite slave port with 18-bit byte addresses
and 32-bit data, plus an `irq_done` pulse. Word addresses:

| word address | register |
|---|---|
| `0x0000` | CTRL (write): bit 0 mode 2, bit 1 mode 3, bit 2 mode 4, bit 3 MINRES. Any write clears the sticky done bits. |
| `0x0001` | STATUS (read): bit 0 builder busy, bit 1 preconditioner busy, bit 2 solver busy. Sticky done bits: 8 Φ, 9 row stream, 10 preconditioner, 11 solver. |
| `0x0002`, `0x0003` | N, I_MR |
| `0x0004` … `0x0006` | M_BASE, W_BASE, RHS_BASE (data RAM word addresses) |
| `0x0007` | ITER, the MINRES iterations done |
| `0x1000 + 32·sel + i` | index RAM `sel` (0 A, 1 B, 2 G, 3 F, 4 H), entry i |
| `0x4000 + a` | data RAM word a (write) |
| `0x8000 + r` | solution element r, float (read) |
| `0xC000 + r` | b_k element r, float (read), as the last mode-4 run built it |

Bus behaviour:
- A write needs AW and W together. It is answered the next cycle.
- RVALID rises on the second clock edge after the read handshake.
- Responses are always OKAY.

One interior-point iteration:
1. Write the changed data-RAM words.
2. Write CTRL=1 and wait for STATUS bit 8.
3. Write CTRL=2 and wait for bit 10.
4. Write CTRL=4 and wait for bit 9, then for bit 0 to clear.
5. Write CTRL=8 and wait for bit 11 (or `irq_done`).
6. Read the n solution words, and b_k where the convergence tests need
   `‖b_k‖∞`.

Start a step only when the previous one has finished. The hardware does not
queue commands.

## Number formats

| quantity | format |
|---|---|
| data RAM, Φ, b_k, M, solution, rotation scalars, w, x | IEEE single. Arithmetic truncates; denormals are flushed to zero. |
| dot-product accumulators (Φ, b_k, row sums) | Q32.32, 64-bit signed |
| scaled matrix (column RAMs) | sFix25_23 |
| Lanczos vectors v, z | sFix35_33 |
| α, β, zᵀz | sFix52_50 (Q.50 in 64-bit registers) |
| 1/β | sFix64_32 |

## Sizes and what they hold

- `NMAX = 20` sets:
  - the index RAMs (21 words);
  - the Φ RAM (2916 words);
  - every row-indexed memory (378 rows);
  - the v RAMs.
- `DDEPTH = 4096` is the data RAM. An N = 20 problem with a different A_i and
  B_i at every stage needs about 3100 words.
- The evaluated configuration (N = 20 with `I_MR` from 335 to 447, i.e. η
  0.9–1.2) fits, as does any horizon up to 20.
- At N = 20 and η = 1.1, one KKT solve takes about 0.56 M clock cycles. The
  build steps (modes 2–4 and the preconditioner) take about 0.1 M more.

## How far this follows the original design

Taken from it:
- the split of work between processor and peripheral;
- the four builder modes;
- the index RAMs;
- the size of the Φ RAM and how the Φ dot products are computed (float
  multiply, Q32.32 accumulation);
- the 24-column block form and its row order;
- the row-sum preconditioner, with its sequence buffer and the 24 column RAMs;
- the v RAM banking (2·6 dual-port, 6 single-port);
- the 24-multiplier matrix–vector unit with split 25×18 products;
- all the fixed-point formats;
- the state-machine square root and divider for 1/β;
- single-precision float everywhere else.

This design's own choices:
- **Register map, handshakes and streams.** The AXI register map, all
  start/busy/done handshakes and the stream formats between blocks.
- **b_k read-back.** The processor's convergence and infeasibility tests use
  `‖b_k‖∞`, but b_k is built here. So b_k is kept and can be read over the
  bus. How the original gets b_k to the processor is not described.
- **Data RAM.** It is random access, not a FIFO.
- **Preconditioner RAM.** It has three read ports, not two: two serve the
  row and column scaling, the third lets the solver read M to scale b and the
  solution. In a block-RAM device this is two dual-port copies.
- **MINRES schedule.** The three-pass schedule and the exact form of the
  recurrence.
- **Float reciprocal square root.** It is built from the integer state
  machines.
- **Float arithmetic.** The float operators are single-cycle functions, not
  pipelined float cores. The arithmetic truncates instead of rounding to
  nearest.
- **Row count.** The solver works on `18N + 18` rows. The original design
  quotes its iteration count as η·(18N + 12). `I_MR` is a register, so either
  rule can be used.
- **Terminal row block.** In the terminal rows, F_Nᵀ fills the whole fourth
  segment; the original prints it as `[F_Nᵀ, 0]`. With six terminal equality
  rows, F_N is 6×6, so there is no zero part left.
- **Single clock.** The whole peripheral runs on one clock. The original
  clocks the processor at 100 MHz and the accelerator at 200 MHz. Any
  clock-domain crossing belongs outside `pcore`.

Not included: the MicroBlaze processor with its interior-point software, and
the Ethernet link to the plant simulation. `pcore`'s AXI4-lite port is where
the processor connects.

## Files

Everything is under `rtl/` (design) and `tb/` (testbenches).

| file | content |
|---|---|
| `mpc_pkg.sv` | sizes, types, float and fixed-point helper functions |
| `pcore.sv` | top |
| `axi_lite_regs.sv` | register block |
| `linear_system_builder.sv` | modes 1–4 and their RAMs |
| `phi_builder.sv`, `row_sequencer.sv`, `b_builder.sv`, `matrix_index.sv`, `fp_mac.sv` | builder parts |
| `minres_solver.sv` | solver, v RAMs, column RAMs |
| `preconditioner.sv`, `lanczos_matvec.sv`, `split_mult.sv` | solver parts |
| `fix_rsqrt.sv`, `fp_rsqrt.sv`, `isqrt_sm.sv`, `div_sm.sv` | reciprocal square roots |
| `shared_ram.sv` | generic RAM: one write port and NRD synchronous read ports |

Each file's opening comment gives the block's interface and timing.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`, and there are
three whole-design ones:
- `tb/tb_pcore.sv` runs N = 3.
- `tb/tb_pcore_full.sv` runs N = 20 with `I_MR` = 416, with the top at its
  default parameters. It takes about a second of simulation.

The first two drive the AXI port through one complete iteration. They check:
- register read-back;
- the sticky status bits;
- every element of the row stream;
- every b_k value, as built and as read back over AXI;
- the solution's residual against a dense reference model (`tb/tb_kkt.svh`).

They also count each mechanism: mode runs, rows, the Gᵀ extension, the
preconditioner square roots, MINRES iterations, both kinds of reciprocal
square root, and held bus responses.

A third, `tb/tb_pcore_sweep.sv`, uses the peripheral the way the controller
does within one sample. On one instance, without reset, it solves horizons
N = 3, 20 and 4, with two interior-point iterations each. The second
iteration rewrites only m_k, w_k and [-h; f]; the prediction matrices stay
where the index RAMs point. Every solve must reach a residual below 2e-2 with
`I_MR` = ⌈1.2 · rows⌉.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mpc_pkg.sv tb/tb_pcore_full.sv --top-module tb_pcore_full
./obj_dir/Vtb_pcore_full
```

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.
