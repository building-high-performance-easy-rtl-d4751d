# PolyMem: a polymorphic parallel memory in SystemVerilog

A kernel on an FPGA often needs many matrix elements per clock cycle. It may
need them by rows in one loop, by columns in the next, and by small blocks or
diagonals in a third. The usual approach partitions an array over several
on-chip RAMs with a fixed cyclic or block pattern. That pattern serves one
access shape, and only when the start address is aligned. Any other shape
serialises.

PolyMem spreads a 2D matrix over `p x q` memory banks with a skewed mapping
function, called the *scheme*. It can then return `p*q` elements of several
shapes in one cycle, aligned or not, and the shape is chosen per access. This
repository has:

- the memory itself (`polymem`) with all five schemes;
- three kernels built on it, all in `polymem_system_top`:
  - a read-bandwidth microbenchmark;
  - single and mirrored matrix multiplication with matrix power;
  - a tiled matrix-power (Markov-chain) engine running on a grid of smaller PolyMems.

The scheme and access model come from the Polymorphic Register File (PRF)
line of work. The kernels reproduce the case studies of an HLS PolyMem
library. This RTL is an independent implementation; the sections below say
where it departs from that work.

## Schemes and access shapes

An access is given by its type and an anchor `(i, j)`. Lane `k`
(`0 <= k < L = p*q`) refers to:

| type | shape | element of lane k |
|------|-------|-------------------|
| `ACC_RE` | p x q rectangle | `(i + k/q, j + k%q)` |
| `ACC_RO` | row of p*q | `(i, j + k)` |
| `ACC_CO` | column of p*q | `(i + k, j)` |
| `ACC_MD` | main diagonal | `(i + k, j + k)` |
| `ACC_SD` | secondary diagonal, anchor is its top-right end | `(i + k, j - k)` |
| `ACC_TR` | transposed rectangle, q x p | `(i + k/p, j + k%p)` |

The scheme is fixed when the memory is built. It decides which types are
conflict-free, meaning every lane hits a different bank:

| scheme | conflict-free types | bank row `v` | bank column `h` |
|--------|---------------------|--------------|-----------------|
| ReO  | RE | `i % p` | `j % q` |
| ReRo | RE, RO, MD, SD | `(i + j/q) % p` | `j % q` |
| ReCo | RE, CO, MD, SD | `i % p` | `(i/p + j) % q` |
| RoCo | RO, CO, RE* | `(i + j/q) % p` | `(i/p + j) % q` |
| ReTr (p < q) | RE, TR | `i % p` | `(j + (i/p)*p) % q` |
| ReTr (p > q) | RE, TR | `(i + (j/q)*q) % p` | `j % q` |

- The bank number is `v*q + h`.
- The address inside every bank is the same for all schemes:
  `(i/p) * (M/q) + j/q`. Here `M` is the matrix width.
- Each bank therefore holds `N*M/(p*q)` words.
- `N` and `M` must be multiples of `p` and `q`.
- All tested configurations use powers of two for `p` and `q`.

\*RoCo rectangles are conflict-free only when the anchor satisfies
`i % p == 0` or `j % q == 0`. RoCo rows and columns work at any anchor. An
exhaustive check confirmed this. It covered every anchor of every shape at
2×8, 4×4, 2×2, 8×2 and 1×3 banks. It also confirmed that every other
scheme/type pair in the table is conflict-free at every anchor.

Here is the RoCo layout for p = q = 2 on the top-left 6×6 corner. Each cell
holds the bank number of that element:

```
0 1 2 3 0 1
2 3 0 1 2 3
1 0 3 2 1 0
3 2 1 0 3 2
0 1 2 3 0 1
2 3 0 1 2 3
```

- Any four consecutive cells of a row use four different banks.
- So do any four consecutive cells of a column.
- So does any 2×2 square with an even row or column anchor.

## The access datapath

`polymem` follows the PRF block structure. Each access port has its own
copy of the stage pipeline:

```
(i, j, type) -> AGU ------> m (bank of each lane) ----\
                    \                                  address shuffle --> banks
                     \----> A (address of each lane) -/   (per-bank addr,     |
                                                           enables, conflict) |
 write data (lane order) --> data shuffle (lane -> bank) ---------------------/
 read data  (lane order) <-- data shuffle (bank -> lane) <-- read delay ------
```

- **AGU** (`polymem_agu`) lists the `L` coordinates of the shape. It flags any
  coordinate that falls outside the matrix.
- **m** (`polymem_mmap`) applies the scheme formula to each coordinate.
- **A** (`polymem_amap`) gives the in-bank address of each coordinate.
- **Address shuffle** (`polymem_addr_shuffle`) turns the lane-indexed lists
  into bank-indexed ones. For each bank it produces the address, which lane
  owns that bank, and whether the bank is used. If two enabled lanes pick the
  same bank, it raises `conflict`. The lane with the highest number then wins
  the bank.
- **Banks** (`polymem_bank`): one RAM per bank with a synchronous read (one
  cycle) and a write. It has `NRP` read addresses, and address 0 is also the
  write address. A read and a write to the same address in the same cycle
  return the old word.
- **Data shuffle** (`polymem_data_shuffle`): two crossbars. Write data goes
  from lanes to banks. Read data goes from banks back to lanes, using the
  lane-to-bank map delayed by one cycle so it matches the data coming out of
  the banks.

Timing: each port accepts one access per cycle, fully pipelined. Read data
appears one cycle after the request, flagged by `rsp_valid`.

### Interface of `polymem`

| signal | meaning |
|--------|---------|
| `req_valid[p]`, `req_i[p]`, `req_j[p]`, `req_acc[p]` | access on port `p` |
| `req_we`, `req_mask[L]`, `req_wdata[L]` | port 0 only: write, per-lane mask, lane-ordered data |
| `req_err[p]` | combinational. The request has a bank conflict or touches an element outside the matrix. Masked-off lanes do not count. |
| `rsp_valid[p]`, `rsp_data[p][L]` | read result, lane order, one cycle later |

Three kinds of write use the same port:

- An all-ones mask writes a whole block.
- A partial mask writes some lanes.
- A mask of `1` writes a single element at the anchor. The kernels load
  their input this way, one word per cycle, so no alignment rule applies.

Extra ports (`NRP > 1`) add read-only datapaths that share the same banks.
Each bank then gets one read address per port.

Parameters: `W` (word width), `P`, `Q`, `N`, `M`, `SCHEME`, `NRP`. The
defaults (64-bit, 2×8 banks, 96×96, RoCo, one port) are the microbenchmark
configuration.

## The kernels

All kernels use valid/ready streams in the AXI-Stream style. A word moves
when both `valid` and `ready` are high. They have an asynchronous active-low
reset.

### `pm_bench_kernel`: read bandwidth

The microbenchmark fills a 96×96 matrix of 64-bit words (2×8 banks) from the
input stream, one element per cycle. It then takes 3072 anchor pairs.

The kernel then issues 3072 block reads, one per cycle and back to back:

- The reads are split into equal chunks, one chunk per access type the scheme
  supports.
- Read `r` lands in result slot `r mod 50`.
- Once the reads finish, the 50 result blocks (16 words each) are streamed
  out.

`read_cycles` reports the read phase. It is 3073 cycles: 3072 reads plus one
cycle of latency. That is 16 words, or 128 bytes, per cycle, so 25.6 GB/s at
200 MHz. `err_count` counts reads that the memory flagged. The benchmark
sizes are parameters (`DIM`, `P`, `Q`, `SCHEME`, `N_READS`,
`N_RESULTS_BLOCKS`).

### `pm_matrix_kernel`: multiplication and power

This kernel uses two RoCo PolyMems of 96×96 32-bit words, each with 4×4
banks:

- X has two read ports.
- Y has one read port.

It also has a result buffer organised as rows of 16-word blocks. The command
selects one of three operations:

| operation | what it computes |
|-----------|------------------|
| `OP_MM1` | `B x C`. B goes to X and C to Y. Each cycle reads a 16-wide row block of B and a 16-tall column block of C. A 16-lane multiply and adder tree (`pm_dot_unit`) adds their dot product to the current output element. |
| `OP_MM2` | `B x C`, then `C x B`. The second product reads C by rows and B by columns from the same two memories. This is the multi-view case: a single array partitioning cannot serve both products at full rate. |
| `OP_POW` | `A := A x A`, `h` times, so the result is `A^(2^h)`. A is read by rows on one port of X and by columns on the other, in the same cycle. The result is copied back with full-row block writes before the next squaring. |

Each product takes `DIM^3/(p*q) + 1` cycles (55297 at the defaults).
`compute_cycles` reports this count.

### `pm_tiled_power_kernel`: matrix power on a grid of PolyMems

One large PolyMem with many lanes becomes expensive, so the matrix is split
into a `b x b` grid of square tiles. Each tile has side `DIM/b` and lives in
its own RoCo PolyMem with `p x q` banks and two read ports.

For output row `i` (tile row `I`), local output column `jl` and block `kb`,
one cycle does the following:

- It reads the row segment `(i, kb*p*q ..)` of every tile `(I, K)` on port 0.
- It reads the column segment `(kb*p*q .., jl)` of every tile `(K, J)` on
  port 1.
- It forms the `b*b` dot products `row(I,K) . col(K,J)`.
- It adds them over `K`. That advances `b` output elements, `(i, J*DIM/b + jl)`
  for each `J`, by `p*q` terms each.

So `b^2` row-column products of `p*q` lanes run in parallel. A squaring takes
`DIM^3/(b^2*p*q) + 1` cycles. The results go to a DIM×DIM buffer and are
copied back into the tiles between squarings.

The default configuration is a 256×256 matrix with `p = q = b = 2`. With
`p = q = 1` each tile is a single bank (one element per access). The grid
still gives `b^2` products per cycle.

### `polymem_system_top`

The top places the three kernels side by side at their default sizes. Each
kernel has its own ports: `bench_*`, `mat_*` and `pow_*`. The components
that feed such kernels are not part of this RTL:

- a soft processor or host CPU;
- a DMA engine and timer;
- external DRAM and PCIe.

Their connections are the command, stream and status ports.

## Files

| file | content |
|------|---------|
| `rtl/polymem_pkg.sv` | scheme, access-type and operation enums; which types a scheme supports |
| `rtl/polymem_agu.sv` | element coordinates of an access |
| `rtl/polymem_mmap.sv` | scheme mapping: coordinate to bank |
| `rtl/polymem_amap.sv` | in-bank address |
| `rtl/polymem_addr_shuffle.sv` | lane-to-bank routing of addresses, conflict detection |
| `rtl/polymem_data_shuffle.sv` | write and read data crossbars |
| `rtl/polymem_bank.sv` | one memory bank, multi-read-port |
| `rtl/polymem.sv` | the parallel memory |
| `rtl/pm_dot_unit.sv` | L-lane multiply and adder tree (fixed point) |
| `rtl/pm_bench_kernel.sv` | read-bandwidth microbenchmark |
| `rtl/pm_matrix_kernel.sv` | multiplication, mirrored multiplication, power |
| `rtl/pm_tiled_power_kernel.sv` | tiled matrix power on a b×b grid |
| `rtl/polymem_system_top.sv` | the three kernels side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_pm_bench_schemes.sv` | the benchmark at full size with all five schemes |
| `tb/*_scheme_check.sv`, `tb/matrix_check.sv`, `tb/tiled_power_check.sv` | helpers that run one configuration's checks, used by the testbenches above |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each
has a watchdog that counts a failure if the run hangs. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/polymem_pkg.sv tb/tb_polymem.sv --top-module tb_polymem
./obj_dir/Vtb_polymem
```

Replace `tb_polymem` with any other testbench name. Verilator finds the
other modules through `-Irtl -Itb`.

| testbench | what it checks |
|-----------|----------------|
| `tb_polymem_agu`, `_mmap`, `_amap`, `_addr_shuffle`, `_data_shuffle`, `_bank` | Each stage against an independent model. The mapping test covers every anchor, for every scheme and shape, at several `p x q`, and checks conflict freedom and coverage. |
| `tb_polymem` | Seven memories run random mixes of block, masked and single writes and reads of every supported shape against a reference array. They cover every scheme with 2×4 banks on an 8×16 matrix, ReTr with 4×2 banks, and the 96×96 64-bit default with 2×8 banks. The test checks latency, conflict and out-of-range flags. |
| `tb_pm_bench_kernel`, `tb_pm_bench_schemes` | The benchmark at full size: 3072 reads in 3073 cycles, the 50 result blocks, and flagged accesses. |
| `tb_pm_matrix_kernel` (with `matrix_check`) | 1MM, 2MM and power (h = 2) at 32×32, 2×2 banks, 8 fraction bits. Also one squaring of a 384×384 matrix with 4×4 banks (3538945 cycles). Checked against a software product, including the cycle count. |
| `tb_pm_tiled_power_kernel` (with `tiled_power_check`) | Power (h = 0, 1, 3) at 32×32 with p = q = b = 2, and at 32×32 with p = q = 1, b = 4. Also one squaring of a 384×384 matrix with p = q = b = 2 (3538945 cycles). Checked against a software product, including the cycle count. |
| `tb_polymem_system_top` | The whole top at its default sizes, all three kernels at once, with random input gaps and output back-pressure. It counts each mechanism: every access type, single and block writes, two-port reads, mirrored reads, all-tile parallel reads, flagged conflicts and copy-back. A mechanism that never happens counts as a failure. About 8 s of simulation after a 2-minute build. |

## Where this design departs from the HLS library it follows

- **Arithmetic.** The original kernels use single-precision floating point.
  Here the multiply-accumulate uses `W`-bit two's-complement fixed point with
  `FRAC` fraction bits, and it wraps on overflow. Each product is shifted
  right by `FRAC` before the sum.
- **Matrix multiply throughput.** This design takes one row block and one
  column block per cycle. The reported HLS latency for 96×96 with 16 lanes
  (about 28 k cycles) implies two block pairs per cycle. Here it takes
  55297 cycles.
- **Tiled power.** The original's figure of which tile data is read in each
  step was not available. The assignment above (every row tile `(I,K)`
  against every column tile `(K,J)`, reduced over `K`) is this design's
  reading of "b^2 row-column products in parallel, then reduced". The copy
  back into the tiles costs `DIM^2/(p*q)` extra cycles per squaring.
- **Addressing.** The mapping functions are the PRF formulas written out in
  full, at the sizes above. The original library specialises its shuffles
  at compile time. Here every port has full L×L crossbars.
- **Scheme details.** The original does not print its mapping formulas.
  The ones above are the standard PRF forms. This applies in particular to
  the RoCo rectangle restriction, to ReTr for `p > q`, and to the secondary
  diagonal anchored at its top-right end.
- **Not in this RTL.**
  - The soft processor, DMA, timer, DRAM, PCIe host and transfer scheduling.
  - Bandwidth figures that include those transfers, such as the 1.6 GB/s
    measured on a PCIe card.

### Which evaluated sizes the defaults hold

| workload | at the defaults |
|----------|-----------------|
| Microbenchmark, 96×96×64-bit, 2×8 lanes, RoCo | yes (9216 words = 16 banks × 576) |
| Microbenchmark with ReO/ReRo/ReCo/ReTr | after changing the `SCHEME` parameter (same storage) |
| Matrix multiply 96×96, 4×4 | yes |
| Matrix multiply 32×32, 2×2 | zero-padded into 96×96, or with `DIM=32, P=Q=2` |
| Matrix power 256×256, p = q = b = 2 | yes (`pm_tiled_power_kernel`) |
| Matrix power 384×384 (single or tiled, any p, q, b) | no: needs 147456 words per matrix. It runs with `DIM=384` and the chosen `P`, `Q`, `B`. One of the eight squarings is simulated at 384 for 4×4 (single memory) and for p = q = b = 2 (tiled). |
