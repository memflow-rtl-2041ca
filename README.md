# MemFlow-style memory-driven matrix accelerator

Large dense linear algebra kernels (matrix multiply, LU, QR) are limited less
by arithmetic than by data movement. A DRAM access costs an order of magnitude
more time and energy than an on-chip SRAM access. This accelerator therefore
schedules around memory. Matrices are cut into 16 x 16 blocks. Each step of
the computation is a *macro node* that works on a few blocks. A
software-controlled scratch-pad keeps blocks on chip for as long as they are
useful. When the scratch-pad is full, the controller evicts the block whose
next use lies furthest in the future, which is Belady's optimal policy. This is
possible because the whole schedule is known in advance. Each macro node runs
on a datapath built for it: a multiply/accumulate array for blocked multiply,
a divide/multiply/subtract pipeline for LU, and a norm/square-root/divide/
update pipeline for Householder QR.

```
            +-------------------- memflow_top --------------------+
  command ->| memflow_ctrl --(i,j,l)-- block_scheduler              |
   stats  <-|   |  slot tags, next-use victim scan                  |
            |   v                                                   |
   DRAM  <->| dma <-> scratchpad: region A (PA banks)               |
            |    \               region B (PB banks)  -> mm_engine  |
            |     \              region C (PB banks) <->            |
            |      +-> lu_engine registers                          |
            |      +-> qr_engine registers (block and V)            |
            +-------------------------------------------------------+
```

All arithmetic is signed Q16.16 fixed point on 32-bit words (`memflow_pkg`):
a product is `(a*b) >>> 16`, a quotient is `(a <<< 16) / b` (0 for b = 0),
and the square root rounds down.

## Macro nodes and loop orders

`C = A * B`, with `A` of size (nb_m·16) x (nb_k·16) and `B` of size
(nb_k·16) x (nb_n·16). This is a loop nest over block indices i (block row of
C), j (block column of C) and l (the reduction index). Macro node (i, j, l)
computes `C(i,j) += A(i,l) * B(l,j)` on three blocks. The nest can run in any
of six orders: IJL, JIL, LIJ, ILJ, LJI, JLI, written outermost loop first.
The order decides which blocks are reused soon. `block_scheduler` steps
through the nest and gives one (i, j, l) per handshake, with a `last` flag. The
same dimension table (`level_dim` in the package) drives the scheduler and the
next-use computation. This keeps the two consistent.

For each node the controller handles the three regions in the order C, A, B.
Then it starts `mm_engine`. Both LU and QR have the same shape: one 16 x 16
block is loaded into the engine's registers, factorised, and written back.

## Scratch-pad regions and block layouts

The scratch-pad is made of `sram_bank` instances, each 1024 x 32 bits (4 KB).
Each bank has one registered read port and one write port, and a read in the
same cycle as a write returns the old word. There are three regions:

| region | banks | slots (blocks) | layout of element (r, c) in a block |
|--------|-------|----------------|--------------------------------------|
| A      | PA = 4 | 16 | bank r % PA, address (r / PA)·16 + c |
| B      | PB = 8 | 32 | bank c % PB, address r·(16/PB) + c / PB |
| C      | PB = 8 | 32 | same as B |

The layouts are chosen so that one common address gives the datapath what
it needs in a single cycle:

- A column of PA elements of A.
- A row of PB elements of B.
- A row segment of PB elements of C, read and written back.

A slot is a fixed range of addresses in every bank of the region. It is 64
words for A and 32 words for B and C. The DMA uses a narrow element port
(region, row, column). The datapath uses the wide ports. The controller never
lets both run at the same time, and an assertion checks this.

## Replacement: furthest next use

This is the core of the design, and the part that needs the most care.

**Tags.** Each region has a table with a valid bit and the block's two
indices for every slot. A is indexed (i, l), B is (l, j), and C is (i, j).
A lookup compares all slots in one cycle. A hit costs nothing. On a miss the
block goes to the lowest free slot. If no slot is free, a victim has to be
chosen.

**Next use in closed form.** Every block of a region has two fixed loop
indices, and the third index is free. Given the current loop position
(c0, c1, c2), outermost first, the next node that uses block (x, y) is found
as follows. Take the longest prefix of the current position that the block
allows. A fixed level must match the block's index, and a free level is kept.
Then step the first level after that prefix forward:

- if that level is fixed, to the block's value, which must be greater than the
  current one;
- if it is free, to current + 1, which must be inside its limit.

Every deeper level is set to its smallest allowed value: the block's index
where it is fixed, 0 where it is free. The prefix lengths 2, 1 and 0 are tried
in that order, and the first one that works gives the answer. If none works,
the block is never used again. `next_use` in `memflow_ctrl` is a purely
combinational function of (region, x, y, current position, limits, order).
No future reference string is stored.

**Victim scan.** Next-use positions are compared as the tuple (u0, u1, u2),
and "never" counts as later than any position. The controller scans the slots
of the region one per cycle and keeps the latest one. Ties go to the lowest
slot. The scan costs up to 32 cycles per eviction. That is small next to a
256-word block transfer, and it avoids building 32 next-use units.

**C blocks are special.** They carry partial sums:

- A C block is loaded from DRAM only when it already holds partial sums (l > 0
  in the current pass) or when `accumulate` asks to add to the C in DRAM.
  Otherwise the datapath starts it from zero. This is counted as a zero-start.
- An evicted C block is written back. If it will be needed again, this is a
  *spill*, and it is reloaded later.
- A and B blocks are never written back.
- After the last node, every resident C block is flushed.

**Cross-check.** `tb/sched_ref_pkg.sv` builds the node list independently and
replays it with brute-force Belady per region, using the same tie rule. The
controller testbench requires the same sequence of block transfers and the
same counts for every loop order; the top testbench requires the same counts. The regions are shrunk to 2–3 slots so
that evictions and spills happen often.

## Datapaths

### Matrix multiply (`mm_engine`)

PA x PB = 4 x 8 = 32 multipliers and 32 adders. One node `C += A·B` (or
`C -= A·B` when `negate` is set) is done in tiles of PA rows by PB columns of
C. For each tile:

1. Load the C segment into the accumulators, PA cycles. When `c_zero` is set,
   the accumulators start from zero instead.
2. Multiply-accumulate for 16 cycles. Each cycle reads one A column of PA
   elements and one B row of PB elements.
3. One drain cycle.
4. Store the tile, PA cycles.

A 16x16x16 node takes 201 cycles from start to done.

### LU, TRS and LUCPL (`lu_engine`)

A blocked LU needs three kinds of block step, and one datapath runs all of
them:

| node | operation | role in a blocked LU | cycles |
|------|-----------|----------------------|--------|
| LU | A → L·U in place | diagonal block | 52 |
| TRS | A → L⁻¹·A | blocks right of the diagonal | 37 |
| LUCPL | A → A·U⁻¹ | blocks below the diagonal | 77 |

The engine holds the working block in registers. For TRS and LUCPL it also
holds a second *factor block*, which is the output of an LU node and is used
unchanged: L is its strict lower triangle with an implied unit diagonal, and U
is its upper triangle. Pivoting is not done.

For each pivot k there is a divide phase and an update phase:

- **Divide phase.** DIVS = 16 dividers form `x_i = a_ik / d`.
  - LU: d = `a_kk`, rows below the pivot.
  - LUCPL: d = `u_kk`, all rows.
  - TRS: skipped, because L has a unit diagonal.
- **Update phase.** LANES = 64 multiply/subtract lanes apply
  `a_ij -= m_i · r_j`, 4 rows per cycle. The results go straight back into the
  block registers.
  - LU: m = a's column k, r = a's row k; rows i > k, columns j > k.
  - TRS: m = L's column k, r = a's row k; rows i > k, all columns.
  - LUCPL: m = a's column k, r = U's row k; all rows, columns j > k.

### QR (`qr_engine`)

Householder QR with reflectors `P = I - v vᵀ`, normalised so that |v|² = 2.
For each column k:

1. A multiplier row and an adder tree form `sigma = Σ_{i≥k} a_ik²`.
2. `alpha = -sign(a_kk)·sqrt(sigma)`.
3. `d = sqrt(sigma - a_kk·alpha)`.
4. DIVS = 2 dividers produce `v_i = u_i / d`, with `u_k = a_kk - alpha`.
5. For each later column j, the dot product `w_j = Σ v_i a_ij` is formed in
   one cycle. The next cycle applies `a_ij -= v_i w_j`.

The engine returns R in the block registers and the reflectors V in a second
register block. A 16 x 16 block takes 417 cycles.

The same engine runs **QRUpdateTr** (`mode = QR_UTR` at start). V is loaded
beforehand from a factorised diagonal block. The engine then runs only the
dot-product and update steps, for every k and every column, so
`A → P_15 … P_1 P_0 A = H(V)ᵀ A`. This turns the other blocks of the diagonal
block's block row into blocks of R. It takes 513 cycles.

**QRCPL** (`QR_CPL`) works on a stacked pair: an upper triangular R in the
block registers and a block B in a third register block. It eliminates B, so
`[R; B] → H·[R'; 0]`. Reflector k has one head entry `h_k` in row k of R and
a 16-entry tail in B's column k. The steps are those of QR, with pair
operands:

- the norm adds `r_kk²` to the sum of B's column;
- the dividers produce the tail into column k of V;
- one more divider produces the head, which is kept in a register vector H.

It takes 417 cycles.

**QRUpdate** (`QR_UPD`) applies the reflectors left in V and H to another
pair `[A; B]`: the blocks to the right of the eliminated pair, in the same two
block rows. It takes 513 cycles. The heads stay inside the engine, so the
QRUpdate commands of one QRCPL must run before the next QRCPL.

## Blocked LU and QR by chaining single-block operations

The controller sequences the blocked multiply itself. LU and QR over many
blocks are issued by a host as a series of single-block commands. Blocks are
most convenient stored as *tiles*: contiguous 16 x 16 arrays, so that every
row length is 16 and all size inputs are 1.

For a 2 x 2-tile matrix `[A00 A01; A10 A11]`, the end-to-end test runs:

1. `OP_LU` on A00.
2. `OP_TRS` on A01, with the factor at A00 (`b_base`).
3. `OP_LUCPL` on A10, with the factor at A00.
4. `OP_MM` with `accumulate` and `negate`: A11 -= A10·A01.
5. `OP_LU` on A11.

The tiles then hold L and U of the whole matrix. Larger matrices follow the
usual right-looking order.

For QR of the same 2 x 2-tile shape, the end-to-end test runs:

1. `OP_QR` on A00: R over it, V to a spare tile (`c_base`).
2. `OP_QRUTR` on A01, with that V at `b_base`.
3. `OP_QRCPL` with A00 at `a_base` and A10 at `b_base`. R' goes over A00 and
   the reflector tails go over A10.
4. `OP_QRUPD` with A01 at `a_base` and A11 at `b_base`. Both are updated in
   place.
5. `OP_QR` on A11.

The upper tiles then hold R of the whole matrix. For larger matrices, each
diagonal step repeats steps 2–4 across its block row and down its block
column. Each `OP_QRCPL` must be followed by its `OP_QRUPD` commands before the
next `OP_QRCPL`.

## DMA and DRAM interface

`dma` moves one 16 x 16 block. Element (r, c) of the block is at DRAM address
`base + r·stride + c`, with row-major order and `stride` = the matrix row length.

The DRAM port works as follows:

- A request is `mem_req`, `mem_we`, `mem_addr` and `mem_wdata`. It is taken in
  a cycle where `mem_gnt` is high.
- Read data comes back in order on `mem_rvalid`/`mem_rdata`, any number of
  cycles later.
- Loads keep issuing reads while earlier ones are outstanding. With a DRAM that
  grants every cycle, a block moves at one word per cycle plus the latency.
- The DRAM itself is external. The testbenches use a behavioural model
  (`tb/dram_model.sv`) with a configurable latency and random stalls.

## Top-level interface (`memflow_top`)

| port | meaning |
|------|---------|
| `start`, `op` | `OP_MM`, `OP_LU`, `OP_TRS`, `OP_LUCPL`, `OP_QR`, `OP_QRUTR`, `OP_QRCPL` or `OP_QRUPD`; pulse `start` while idle |
| `order` | loop order for MM |
| `nb_m`, `nb_n`, `nb_k` | matrix sizes in blocks (1..255) |
| `accumulate`, `negate` | MM: `C = A·B`, `C += A·B`, `C -= A·B` |
| `a_base`, `b_base`, `c_base` | DRAM word addresses of the matrices. Single-block operations work on the block at `a_base` (row length nb_k·16). TRS and LUCPL read the factor block, and QRUpdateTr reads V, at `b_base` (row length nb_n·16). QR writes V to `c_base` (row length nb_n·16). QRCPL and QRUpdate take the lower block of the pair at `b_base` |
| `busy`, `done` | busy until a single-cycle done pulse |
| `stats` | event counts of the last run: nodes, A/B/C loads, C stores, spills, hits per region, zero-starts, evictions, DRAM words |
| `mem_*` | DRAM port as above |

Reset is synchronous and active low everywhere.

Defaults:

| parameter | value |
|-----------|-------|
| BLK | 16 |
| PA | 4 |
| PB | 8 |
| DEPTH | 1024 |
| DIVS | 16 |
| LANES | 64 |
| QDIVS | 2 |
| NBW | 8 |
| ADDR_W | 32 |

## Where this design departs from the reference architecture

- **Separate datapaths.** The reference shares one chain of function units
  (mul, add, a function unit, div, mul, sub) among matrix multiply, LU and QR.
  Here there are three separate engines. They share the scratch-pad, the DMA
  and the controller, and only one runs at a time.
- **QR unit counts.** The QR engine uses 16 multiplier lanes plus one for the
  head, an adder tree, 2 dividers plus one for the head, and one square-root
  unit. The reference lists 15 mul, 8 add, 7 sub, 2 div and 3 sqrt for QR,
  and about 1800 bits of registers. The QR engine holds three register blocks
  (A, V, B).
- **QR pair nodes.** The engine keeps the reflector heads of the last QRCPL
  in a register vector, not in DRAM. This is what forces QRUpdate to follow
  its QRCPL directly.
- **Blocked LU/QR sequencing.** The controller does not sequence blocked LU
  or QR itself. A host chains single-block commands, so blocks are kept on
  chip only within one command. The reference applies its scratch-pad
  scheduling to these flows as well.
- **Register budget.** The LU engine keeps a second register block for the
  factor. That is 512 words, where the reference's LU datapath has about one
  block plus one column.
- **Cycle counts.** They are lower than the reference's figures for the same
  unit counts:

  | node | this design | reference |
  |------|-------------|-----------|
  | GEMM | 201 | 229 |
  | LU | 52 | 222 |
  | TRS | 37 | 222 |
  | LUCPL | 77 | 222 |
  | QR | 417 | 1932 |
  | QRCPL | 417 | 3036 |
  | QRUpdateTr | 513 | 1214 |
  | QRUpdate | 513 | 1890 |

  The testbenches check them as upper bounds.
- **Block shape.** The reference tunes three block dimensions, one per loop
  (i, j, l), together with the loop order and the split of the scratch-pad
  among A, B and C. Here the blocks are square: one design-time `BLK`. The
  split is fixed by PA and PB, with the slot counts as controller parameters.
  The offline optimiser that picks these values is not part of the hardware.
- **Numbers.** The reference does not fix a number format. Q16.16 is this
  design's choice.
- **Scheduling.** The choice of loop order, which the reference's scheduler
  optimises, is left to whoever issues the command.
- **Other choices.** These are this design's own: the bank layouts, the
  C → A → B lookup order, the serial victim scan with its tie rule, the DMA
  protocol and the stats counters.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. Compile packages
first. For the end-to-end test at default parameters:

```
verilator --binary -j 0 --top-module memflow_top_tb \
  rtl/memflow_pkg.sv tb/sched_ref_pkg.sv \
  rtl/sram_bank.sv rtl/scratchpad.sv rtl/block_scheduler.sv rtl/dma.sv \
  rtl/mm_engine.sv rtl/lu_engine.sv rtl/qr_engine.sv rtl/memflow_ctrl.sv \
  rtl/memflow_top.sv tb/dram_model.sv tb/memflow_top_tb.sv -Mdir obj
./obj/Vmemflow_top_tb
```

It runs in well under a second. It performs:

- a 6x6x3-block multiply in order LIJ;
- every other loop order on 2x2x2 blocks;
- an accumulate-and-subtract multiply;
- an LU;
- a QR;
- a blocked LU of a 32 x 32 matrix, chained as above;
- a QR of a 16 x 32 matrix (QR, then QRUpdateTr);
- a blocked QR of a 32 x 32 matrix, chained as above.

The factorisations are also checked in real arithmetic against the input
(L·U, H(V)·R and RᵀR = AᵀA).

Every word of the result in DRAM is compared with a software computation in
the same arithmetic, and the stats counters with the reference replay.
It also counts the mechanisms it must see at least once: DRAM stalls, hits in
each region, evictions, spills, reloads, zero-starts, accumulate, subtract, LU,
TRS, LUCPL, QR, QRUpdateTr, QRCPL and QRUpdate.

`memflow_workload_tb` builds with the same file list and runs larger
workloads at the default parameters in about ten seconds:

- A 256 x 256 x 256 multiply in orders IJL and LIJ. The working set exceeds
  the scratch-pad. IJL moves 1.06 M DRAM words and LIJ 1.92 M; the compulsory
  minimum is 0.2 M.
- A 64 x 64 blocked LU issued as 30 single-block commands.

Results and event counts are checked as in the end-to-end test.

The other testbenches build the same way. Use `--top-module <name>_tb` and
list only the files that the block uses. `sched_ref_pkg.sv` is needed by
`block_scheduler_tb`, `memflow_ctrl_tb` and `memflow_top_tb`. `dram_model.sv`
is needed by `dma_tb` and `memflow_top_tb`.

| testbench | what it checks |
|-----------|----------------|
| `sram_bank_tb` | read-before-write behaviour, random traffic |
| `scratchpad_tb` | every layout against the element port |
| `block_scheduler_tb` | node sequence of all six orders, handshake hold |
| `dma_tb` | loads and stores with strides, DRAM latency and stalls |
| `mm_engine_tb` | the multiply node against a software product, plus the cycle count |
| `lu_engine_tb` | LU, TRS and LUCPL against references in the same arithmetic and in real arithmetic, plus cycle counts |
| `qr_engine_tb` | QR, QRUpdateTr, QRCPL and QRUpdate results against references in the same arithmetic and in real arithmetic, plus cycle counts |
| `memflow_ctrl_tb` | the transfer sequence and counts against Belady replay, all orders |
