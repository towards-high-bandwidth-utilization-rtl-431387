# SpMV accelerator with partial vector duplication

This is a sparse matrix-vector multiplier, y = A·x, for an FPGA with a 512-bit
off-chip memory interface. The goal is to use that bandwidth fully. The memory
delivers four COO non-zeros per cycle. Each non-zero is a 64-bit double value, a
32-bit row index and a 32-bit column index. To keep up, the datapath has to do
three things every cycle:

* read four vector elements at four arbitrary columns, although an FPGA block
  RAM has only two ports (a **read conflict**);
* multiply four pairs of doubles;
* add four products into partial sums, even when two or more of them belong to
  the same row (a **write conflict**).

The design resolves these conflicts in hardware. The matrix data stays plain
COO, so it carries no duplicated vector values and needs no reordering:

* **Partial vector duplication.** The vector is cut into segments of `BLOCK_W`
  elements (16384 by default), and only the current segment is on chip. It is
  stored **twice**, in two sub-buffers of four dual-port BRAMs each. PE0 and PE1
  read one copy, and PE2 and PE3 read the other. Each PE has its own port on
  every BRAM of its copy. So any four columns can be read in one cycle.
* **A writing-conflict-free adder tree.** Before the products reach the
  accumulators, it sums the products that share a row. Its four outputs
  therefore always have distinct rows.
* **Partitioning.** The matrix is split into *blocks* of `BLOCK_W` columns, one
  per vector segment. Each block is split into *batches* of `BATCH_H` rows (64
  by default). A batch's partial sums live in registers while the batch runs.
  Between blocks they are kept in an on-chip partial-sum (psum) buffer.

## Data flow

```
 off-chip stream ──► decoder ──► vector buffer (2 × 4 dual-port BRAMs) ──┐ x
 (512 bit/cycle)        │                                                ▼
                        ├──────► matrix buffer (4 FIFOs) ───────────► PE0..PE3 (×)
                        │                                                │ 4 products + rows
                        │                                                ▼
                        │                      writing-conflict-free adder tree + crossbar
                        │                                                │ 4 products, distinct rows
                        └──(open batch)──► accumulators (3 register sets × BATCH_H) ◄──► psum buffer
                                                                                          │
                                                        result stream ◄───────────────────┘
```

A **beat** is one 512-bit matrix word: four non-zeros, one per PE. Beats move
through the pipeline one per cycle. This table gives the latency of each stage
at the default parameters:

| stage | cycles | module |
|---|---|---|
| matrix FIFO head to vector element ready | 2 | `vector_buffer` (BRAM read, then registered mux) |
| multiply | 6 (`MUL_LAT`) | `pe` / `fp64_mul` |
| conflict removal | 22 (`2*ADD_LAT+2`) | `adder_tree` |
| accumulate | 0 (into the register in the same cycle) | `accumulator` |

## Execution: blocks, batches and the three register sets

For each block, the stream first brings the block's vector segment (LDV), then
the block's batches one after another (LDM). A batch's non-zeros may be in any
order. The test streams list them row by row, which causes many write conflicts
on purpose.

The accumulators have **three register sets (banks)** of `BATCH_H` doubles each.
Batches use them in rotation (0, 1, 2, 0, …). While batch *i* accumulates in one
bank, two other jobs can overlap with it:

* the bank of batch *i+1* is loaded with that batch's stored partial sums (LDP);
* the bank of batch *i−1* is written back to the psum buffer (STP) once its last
  beat has drained from the pipeline.

A bank goes through these states:

`FREE → LOAD_WAIT → LOADING → READY → DONE → STORING → FREE`

* The decoder opens a bank when a batch header arrives and the bank is `FREE`.
* In the first block the bank is cleared in one cycle, because partial sums
  start at zero.
* In later blocks the bank is loaded from the psum buffer, 8 rows per cycle.
* The issue logic pops a beat from the matrix FIFOs only while the beat's bank
  is `READY`. Otherwise it stalls and bubbles enter the pipeline (the `stall`
  output).
* The beat flagged as the last of its batch moves its bank to `DONE`.

Two ordering rules keep this correct:

1. A load waits while an older bank with the same first row still has to be
   stored. This can happen when a block has fewer than three batches, so the
   next block revisits the same rows while they are still in flight.
2. The vector buffer ports serve for writing during LDV and for reading
   otherwise. So the decoder starts a new segment only when the matrix FIFOs are
   empty: every buffered non-zero must have read its element from the old
   segment. The 2-cycle read completes before the first write.

After the last block the psum buffer holds y. A read-out command streams it out
as 512-bit words of eight doubles.

Batches with no non-zeros may be left out of every block except the first. The
first block must visit every batch, because that is where its partial sums are
cleared.

## The writing-conflict-free adder tree (`adder_tree.sv`)

This is the least obvious part of the design. Four products arrive each cycle,
each with a row index. The products are grouped by row:

| rows among the valid lanes | M0 M1 → adder1 | M2 M3 → adder2 | output slots |
|---|---|---|---|
| all distinct | – | – | each lane passes its own product |
| one pair {i,j} | p_i, p_j | 0, 0 | slot i ← a3, slot j ← invalid 0 |
| a triple {i,j,k} | p_i, p_j | p_k, 0 | slot i ← a3, j,k ← 0 |
| all four | p0, p1 | p2, p3 | slot 0 ← a3, others ← 0 |
| two pairs {i,j},{k,l} | p_i, p_j | p_k, p_l | slot i ← a1, slot k ← a2, others ← 0 |

Each group's sum goes to the slot of the group's lowest lane. The control for
the input muxes (c0) and for the crossbar (c1) is computed from the row
comparisons when the products enter. It then travels down a delay line with the
products. The datapath runs as follows:

* the mux outputs are registered (cycle t+1);
* adder1 and adder2 finish at t+11;
* adder3 adds their results at t+21, while a1 and a2 are delayed to match;
* the crossbar output register is written at t+22.

Adding a zero is exact, so a pair sent through adder3 is bit-identical to the
pair's own sum.

The four output rows are distinct. So the accumulators can apply all four
results to four different registers of the bank in the same cycle. The
accumulators' adders are combinational, so the same row may come back in the
very next cycle without a hazard.

## Floating point

`fp64_mul` and `fp64_add` are IEEE-754 double-precision cores. They round to
nearest even. Each computes its result in one combinational step and then
passes it through `LAT` register stages, a stand-in for a vendor's pipelined
floating-point core. Both cores make these simplifications:

* subnormal inputs and results become signed zero;
* every NaN result is the quiet NaN `0x7FF8000000000000`;
* overflow gives ±infinity.

Both are checked bit for bit against the simulator's own double arithmetic,
including exact-tie cases.

## Command stream (`decoder.sv`)

Every command is a header word followed by its data words. The opcode sits in
bits 511:504 of the header.

| opcode | header fields | data words that follow |
|---|---|---|
| `0x01` LDV | `[31:0]` n | n words of 8 vector elements, element e in bits 64e+63:64e, for columns block_start+8w+e |
| `0x02` LDM | `[31:0]` n, `[63:32]` first row of the batch (a multiple of `BATCH_H`), `[64]` first block | n words of 4 non-zeros; non-zero e in bits 128e+127:128e as {row[31:0], col[31:0], value[63:0]}; column `0xFFFFFFFF` marks padding |
| `0x03` WB | `[31:0]` n, `[63:32]` first row (a multiple of 8) | none; n result words appear on `out_valid/out_data` |
| other | – | ignored (a header with n = 0 is ignored too) |

The hardware uses the low `log2(BLOCK_W)` bits of a column index and the low
`log2(BATCH_H)` bits of a row index. So indices may be global, as long as each
non-zero sits in the right block and batch. `in_ready` drops whenever the
decoder waits, which throttles the stream. `out_valid/out_data` has no
back-pressure.

## Parameters of `spmv_top`

| parameter | default | meaning |
|---|---|---|
| `BLOCK_W` | 16384 | vector segment / block width in columns (power of two, ≥ 64) |
| `BATCH_H` | 64 | batch height in rows (power of two, ≥ 8) |
| `ROWS` | 393216 | psum buffer capacity in rows (a multiple of 8) |
| `FIFO_DEPTH` | 64 | depth of each matrix FIFO |
| `MUL_LAT` | 6 | multiplier pipeline depth |
| `ADD_LAT` | 10 | adder pipeline depth in the adder tree |

The number of PEs (4), the 512-bit word, the two sub-buffers of four BRAMs and
the three register sets are fixed by the structure.

## Where this design departs from, or adds to, the design it implements

These come from the published design:

* the block diagram;
* four PEs with a duplicated vector in 2 × 4 BRAMs and 4-to-1 muxes;
* time-shared BRAM ports;
* a three-adder tree with a crossbar, and its cycle marks (t+11, t+21, t+22);
* three rotating accumulator register sets;
* the LDP/STP overlap;
* a block width of 2^14 and a batch height of 64;
* 64/32/32-bit COO elements, four per 512-bit word.

The following are this design's own choices, because the source does not
specify them:

* the command stream format, padding, and result write-back as a plain output
  stream;
* how the vector segment is interleaved over the BRAMs (column j goes to BRAM
  `j[2:1]` at address `{j>>3, j[0]}`);
* how the adder-tree controls are derived (they are derived from row equality
  at the input), and the choice of a3 rather than a1 for a single group;
* the multiplier latency, the FIFO depth, 8-row psum words, and the psum buffer
  size (the 96 UltraRAMs of the evaluation device, enough for 281903 rows);
* single-cycle accumulator adders;
* the load-after-store ordering rule and the bank handshake;
* flush-to-zero floating point and a synchronous active-low reset.

These limits and omissions are known:

* The combinational accumulator adders and the combinational stage inside each
  floating-point core are written for clarity, not timing. At 100 MHz they
  would need to be retimed or replaced by vendor cores.
* The host-side partitioning step and the DRAM are not part of the RTL. The
  testbenches build the stream themselves.

## Sizes the design holds

A matrix fits if its row count is at most `ROWS`. Columns are unlimited: one
block per `BLOCK_W` columns. Non-zeros are streamed, not stored. The twelve
benchmark matrices of the original evaluation range from 3140 to 281903 rows,
so all of them fit at the defaults. The batch-height sweep (32–256) is a change
of `BATCH_H`.

The bandwidth-utilisation metric used for this design is
BU = 2·nnz / (64 bytes · cycles). Its peak is 0.125 GFLOP/GB at one beat per
cycle. The testbenches print it for each run.

`tb_spmv_workloads` (the six smaller) and `tb_spmv_workloads_large` (the six
larger) run complete products at the default sizes. They use random matrices
with the dimensions and non-zero counts of the twelve benchmarks. The sparsity
patterns are random, not the real ones. Cycles are counted from the first
stream word to the last result word:

| stand-in for | n | nnz | cycles | BU |
|---|---|---|---|---|
| lns_3937 | 3937 | 25407 | 7530 | 0.105 |
| dw8192 | 8192 | 41746 | 12835 | 0.102 |
| t2d_q9 | 9801 | 87025 | 24623 | 0.110 |
| epb1 | 14734 | 95053 | 28040 | 0.106 |
| memplus | 17758 | 99147 | 33200 | 0.093 |
| raefsky1 | 3242 | 293409 | 74330 | 0.123 |
| psmigr_2 | 3140 | 540022 | 135952 | 0.124 |
| rma10 | 46835 | 2329092 | 599261 | 0.122 |
| s3dkt3m2 | 90449 | 3686223 | 964398 | 0.119 |
| mac_econ | 206500 | 1273389 | 841463 | 0.047 |
| stanford | 281903 | 2312497 | 1559718 | 0.046 |
| pwtk | 217918 | 11524432 | 3054722 | 0.118 |

Most of the loss is padding in the last word of each batch, the vector loads,
the pipeline fill, and the read-out.

The very sparse, very wide matrices (mac_econ, stanford) lose far more. With
random positions, a 64-row batch of one 16384-column block holds only about 30
non-zeros, so it is issued in about 8 cycles. A bank cannot be reused faster
than open, load, issue, drain the 30-cycle pipeline, and store. That takes
about 55 cycles for three batches, so issue stalls (the `stall` output) most of
the time. Real matrices cluster their non-zeros, which gives fewer, fuller
batches than random ones.

`tb_spmv_batch_sweep` builds the accelerator with four batch heights and runs
the six smaller workloads on each. The average BU rises with batch height:
taller batches pad fewer words and load and store partial sums less often. The
cost is registers: each of the three banks holds `BATCH_H` doubles, written by
four ports.

| `BATCH_H` | 32 | 64 | 128 | 256 |
|---|---|---|---|---|
| average BU (six smaller workloads) | 0.1037 | 0.1067 | 0.1082 | 0.1090 |

## Files

| file | contents |
|---|---|
| `rtl/spmv_pkg.sv` | widths, COO/product/tag structs, opcodes |
| `rtl/spmv_top.sv` | top level, issue logic |
| `rtl/decoder.sv` | command stream parser |
| `rtl/vector_buffer.sv`, `rtl/tdp_bram.sv` | read-conflict-free vector buffer, BRAM model |
| `rtl/matrix_buffer.sv`, `rtl/sync_fifo.sv` | matrix FIFOs |
| `rtl/pe.sv`, `rtl/fp64_mul.sv` | processing element, multiplier |
| `rtl/adder_tree.sv`, `rtl/fp64_add.sv` | conflict-free adder tree, adder |
| `rtl/accumulator.sv`, `rtl/psum_buffer.sv` | accumulators with LDP/STP, psum memory |
| `rtl/pipe_delay.sv` | fixed-latency delay line |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_spmv_top.sv` | end-to-end test at reduced sizes; counts every mechanism (merges, stalls, loads, stores, waits, FIFO full, padding) |
| `tb/tb_spmv_full.sv` | one complete product at the default sizes |
| `tb/tb_spmv_workloads.sv`, `tb/tb_spmv_workloads_large.sv` | benchmark-sized random matrices at the default sizes, with BU |
| `tb/tb_spmv_batch_sweep.sv`, `tb/spmv_bh_runner.sv` | the same workloads at batch heights 32, 64, 128, 256 |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_spmv_top \
    rtl/spmv_pkg.sv tb/tb_spmv_top.sv
./obj_dir/Vtb_spmv_top
```

Replace `tb_spmv_top` with any other testbench. `-Irtl` lets Verilator find
each module in `rtl/<name>.sv`. The package must come first on the command
line. Lint one module with:

```
verilator --lint-only -Wall -Irtl rtl/spmv_pkg.sv rtl/<module>.sv
```

All testbenches finish in seconds, except `tb_spmv_workloads_large`. It takes
about a minute and 2 GB, mostly to build its random matrices.
