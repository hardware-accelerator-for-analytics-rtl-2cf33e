# Sparse matrix accelerator for machine-learning analytics

Training algorithms such as logistic regression, SVM and matrix factorization spend most of their time in a few sparse matrix–vector kernels. These kernels are bound by memory bandwidth. A processor core needs several instructions per non-zero element. It also loses time on gathers into a vector that does not fit in its cache.

This design is an accelerator block that sits beside a core on that core's memory interface. It is built around two ideas:

- **Only stream memory.** The vector that is accessed at random (a block of x or of y) is kept in small RAMs inside the processing elements (PEs). Memory only ever sees long sequential reads of the matrix.
- **Keep the PEs busy in hardware.** A data management unit (DMU) fetches the matrix and a hardware scheduler hands its elements to the PEs. One block of four PEs sustains more than one matrix element per clock cycle.

The top level, `sparse_accel_x4`, holds four independent blocks (16 PEs). Each block has its own register and memory port. This mirrors a system in which four cores' memory interfaces each get one accelerator.

## Compute patterns

Each block runs one operation at a time. The operation is chosen by the `op` field of the CTRL register.

| op | name | matrix format | what it computes | where the vector lives |
|----|------|---------------|------------------|------------------------|
| 0 | spMdV_csr | CSR (rows) | y[r] = Σ A[r][c]·x[c], a dot product per row | x subset in the PE RAMs; y streamed out |
| 1 | spMspV_csc | CSC (columns) | y += A[:,c]·x[c] for each non-zero x[c] in a list | y subset in the PE RAMs |
| 2 | scale_update | CSR (rows) | y += A[r,:]·x[r] for each listed row r (scale every sample and fold it into per-feature weights) | y subset in the PE RAMs |
| 3 | spMdV_csc | CSC (columns) | spMspV_csc with every column listed (dense x) | y subset in the PE RAMs |

Operations 1–3 are the same datapath. For each list entry, the DMU reads that entry's column (or row) and sends every element to the PE that owns `A.idx`, together with the scale factor. That PE performs `RAM[A.idx] += A.val * x.val`.

Operation 0 is different. The PEs multiply `A.val` by `RAM[A.idx]` into a sum register. At the end of each row, the partial sums of all PEs are added by the reduction unit.

## Blocking: vectors larger than the PE RAMs

Each PE holds `DEPTH` = 4096 single-precision entries. A block therefore holds one vector subset of `NUM_PE × DEPTH` = 16384 entries.

Larger problems are cut into blocks by the host software:

- **spMdV_csr and scale_update:** the matrix is cut into column blocks. The element indices of each block run from 0 to 16383, and the matching x or y subset is loaded for each block.
- **spMspV_csc:** the matrix is cut into row blocks.

The hardware just sees one block per operation. An element whose index falls outside the block is dropped by the scheduler; it neither touches a RAM nor contributes to a sum. Across column blocks, spMdV_csr partial results are added by software.

## Memory layout

Every object in memory is an array of 64-bit words `{val[63:32], idx[31:0]}`. `val` is an IEEE-754 single.

| object | word contents |
|--------|---------------|
| matrix elements (`ELEM_BASE`) | `{A.val, A.idx}`: row-major for CSR, column-major for CSC |
| pointers (`PTR_BASE`) | `idx` = offset of the first element of row/column i from `ELEM_BASE`. There are `n+1` of them; `val` is unused |
| sparse x list (`XLIST_BASE`, ops 1–3) | `{x.val, x.idx}`: scale factor and column (or row) number |
| dense vector in (`VEC_BASE`) | `val` = entry k of the subset that is loaded (entry 0 first) |
| results (`OUT_BASE`) | `{y_k, k}` at `OUT_BASE + k` |

All addresses are word addresses. The memory bus moves 128-bit beats (two words), so beat address = word address / 2.

## Register map and programming

There is one 32-bit register per address. Writes happen on the clock edge and reads are combinational.

| addr | name | meaning |
|------|------|---------|
| 0 | CTRL | write: bit 0 start, bits 2:1 op. Read: bit 0 busy, bit 1 done, bits 3:2 op |
| 1 | VEC_BASE | start of the dense vector to load into the PE RAMs |
| 2 | VEC_LEN | entries to load. This is also the number of y entries written back by ops 1–3. Zero means the RAMs are not reloaded |
| 3 | PTR_BASE | pointer array |
| 4 | ELEM_BASE | element array |
| 5 | COUNT | number of rows (op 0) or of x-list entries (ops 1–3) |
| 6 | XLIST_BASE | x list (ops 1–3) |
| 7 | OUT_BASE | result vector |

To run an operation:

1. Write registers 1–7.
2. Write CTRL with `{op, 1}`. A start while the block is busy is ignored.
3. Wait for the completion pulse on `irq`, or poll `done` in CTRL. `done` stays set until the next start.

With `VEC_LEN = 0` the RAM contents from the previous operation are kept. This lets spMdV_csr run several row ranges against one loaded x subset.

## Memory port

- **Read requests.** Valid/ready with a beat address.
- **Read responses.** `mem_rrsp_valid` with 128 bits of data. Responses return in request order, at any latency, and the block cannot refuse them.
  - To make that safe, the DMU requests an element beat only while the read buffer has room for it and every beat still in flight.
  - `RB_DEPTH` (64 beats) must therefore be at least the memory latency in cycles to keep streaming at full rate.
- **Writes.** Valid/ready with a beat address, 128 bits of data and a 2-bit word mask. One word is written per request.

At one beat per cycle and 1 GHz, the port moves 16 GB/s. That is the bandwidth of one core interface that the block is sized for.

## DMU sequencing

The DMU (`dmu.sv`) is a state machine in front of four datapath pieces:

- a read buffer (`sync_fifo`);
- the PE scheduler;
- the reduction unit;
- an output buffer.

It also keeps a small queue that records what each outstanding read beat is for (prefetched word, column pointer, element or vector word; which half of the beat is valid; the end-of-row flag).

An operation runs in these steps:

1. **Vector load.** `VEC_LEN` words are streamed from `VEC_BASE`. Entry k becomes a LOAD command for PE `k mod NUM_PE` at address `k / NUM_PE`.
2. **spMdV_csr.**
   - The `COUNT + 1` row pointers are read ahead into a 16-entry prefetch queue. Each request reads one pointer. A prefetch request gets the read port whenever the queue has room, unless an element request is already waiting for the memory.
   - For row r, take pointer r+1 from the queue and stream the row's elements. A beat that only partly belongs to the row is masked.
   - The last beat carries an end-of-row (EOR) marker. An empty row sends a beat that holds only the marker, so it still produces y[r] = 0.
   - A row only waits for memory when the prefetch queue has run dry. Element beats of a row overlap with the PEs working on the previous row.
3. **Ops 1–3.**
   - The x list is read ahead into the same 16-entry queue.
   - For each entry, the DMU requests the column's two pointers back to back, waits for them, then streams the elements together with `x.val`.
   - That is one memory round trip per column before its elements start to arrive, since the pointer address depends on the list entry.
4. **Write back.**
   - For op 0, the reduction unit produces `{y_r, r}` into the output buffer, which is written out as results arrive.
   - For ops 1–3, the DMU waits until all PEs are idle, then reads the RAMs back through a second port. It writes `{y_k, k}` one word per cycle.
5. **Finish.** The DMU pulses `done`.

## PE scheduler and index interleaving

Vector entry k lives in PE `k mod NUM_PE` at local address `k / NUM_PE`. Interleaving spreads a row's sorted column indices over all PEs. With contiguous ranges, each stretch of a row would fall on one PE.

Each cycle, the scheduler takes one beat from the read buffer and sends its two words to the PEs that own them:

- Two words for different PEs leave in the same cycle.
- Two words for the same PE go in order over two cycles. The `sched_stall` event output counts such cycles and cycles where a PE queue is full.
- A word with an index outside the block is dropped.
- An EOR marker is broadcast to all PEs once both words of its beat have left and every PE can accept it. Each PE therefore sees the marker after all its words of that row.

## PE datapath

Each PE (`pe.sv`) has:

- a 4-entry command queue;
- the unpack logic, which checks ownership and computes the local address;
- a `DEPTH`×32 RAM with one synchronous write port and two asynchronous read ports;
- an FMA;
- a sum register;
- a 2-entry queue of finished row sums.

The PE handles one command per cycle:

| command | mode | action |
|---------|------|--------|
| LOAD | any | `RAM[a] = val` |
| ELEM | dot (op 0) | `sum = A.val * RAM[a] + sum` |
| ELEM | update (ops 1–3) | `RAM[a] = A.val * x.val + RAM[a]`: read, FMA and write in the same cycle, so back-to-back updates of one address need no forwarding |
| EOR | dot | push `sum` into the sum queue and clear it. Waits while the sum queue is full |

The reduction unit pops one sum from every PE when all have one. It adds them as a balanced tree, `(s0 + s1) + (s2 + s3)`, and tags the result with a running row number.

## Number format and rounding

All arithmetic is IEEE-754 single precision, implemented in `fp32_mul.sv` and `fp32_add.sv`:

- round to nearest even;
- subnormal inputs and results flushed to zero;
- infinities handled; NaNs produced as the canonical quiet NaN.

The FMA is a multiply followed by an add, with two roundings, not a fused operation.

A row's dot product is summed per PE in element order, then across PEs in the tree order above. It is therefore not bit-identical to a sequential software loop, in the same way as any parallel reduction. The testbenches model exactly this order.

## Performance

The following figures come from simulation with 20 cycles of memory latency and 10% random request stalls. The streaming phase excludes the vector load and the write-back.

Rows below are synthetic random matrices whose per-block row lengths match six public datasets. The length is the dataset's average non-zeros per row times 16384 over its feature count.

| profile | elements per row (block) | pattern | elements per cycle |
|---------|--------------------------|---------|--------------------|
| E2006 | ~135 | spMdV_csr | 1.59 |
| RCV1 | ~26 | spMdV_csr | 1.47 |
| Webspam | 86 | spMdV_csr | 1.58 |
| Gamevideo | 221 | spMdV_csr | 1.59 |
| MovieLens | 143 | spMdV_csr | 1.59 |
| URL | ~0.6 | spMdV_csr | 0.19 (about 3 cycles per row) |
| Webspam | 86 | scale_update | 1.11 |
| MovieLens | 143 | spMspV_csc (1/3 of columns) | 1.39 |

Notes on these figures:

- **spMdV_csr peak.** It is limited to about 1.6 of the bus's 2 words per cycle, because pairs of words sometimes map to the same PE.
- **Very sparse blocks** (URL) pay one pointer request and at least one beat per row.
- **Update patterns.** They pay one pointer round trip per column. Fetching pointers for several columns ahead would remove it; this is not done here.
- **Vector load and write-back.** The vector load runs at two words per cycle, about 8 K cycles for a full 16384-entry block. Write-back of the y subset runs at one word per cycle, 16 K cycles. Both are worth amortizing over several operations, using `VEC_LEN = 0` for op 0.

## Where this design departs from, or adds to, its source description

The source describes the following:

- the DMU/PE organization (read buffer, PE scheduler, reduction unit, output buffer, PE RAM, FMA, unpack logic, sum register);
- the four operations and how each uses the PEs;
- 4 PEs per block and 4 blocks;
- a target of ~15 GB/s per block at 1 GHz.

Everything below is this design's own choice:

- register map, memory word format, bus width, read/write protocol;
- single precision with flush to zero;
- the sizes: DEPTH 4096, read buffer 64 beats, output buffer 16, PE queues 4 and 2;
- index interleaving across PEs;
- the scheduler's two-words-per-cycle policy;
- the prefetch queue for row pointers and x-list entries, and the per-column pointer round trip in the update patterns;
- dropping out-of-range indices.

The FMA is purely combinational with a single-cycle read-modify-write of the RAM. That keeps the control simple, but it would need pipelining, and then hazard handling, to close timing at 1 GHz in a real process.

The four blocks of `sparse_accel_x4` share nothing. Splitting a job between them, and the shared interconnect to memory, are left outside the RTL.

## Files

RTL (`rtl/`), bottom-up:

- `spa_pkg.sv`: types, operation codes, word and command structs.
- `fp32_mul.sv`, `fp32_add.sv`, `fma_unit.sv`: arithmetic.
- `sync_fifo.sv`: the generic queue, used for the read buffer, output buffer and PE queues.
- `pe_ram.sv`, `pe_unpack.sv`, `pe.sv`: processing element.
- `pe_scheduler.sv`, `reduction_unit.sv`, `ctrl_regs.sv`, `dmu.sv`: data management.
- `sparse_accel.sv`: one block.
- `sparse_accel_x4.sv`: four blocks (top).

Testbenches (`tb/`):

- **Shared models.**
  - `tb_fp_pkg.sv`: reference fp32 operations computed in double precision with explicit rounding.
  - `tb_mem_model.sv`: memory with configurable latency and random request stalls.
  - `tb_accel_agent.sv`: a host plus memory for one block. It builds a random problem, checks the result and reports counters.
- **Per-module tests.** `tb_fma_unit`, `tb_pe_ram`, `tb_pe_unpack`, `tb_sync_fifo`, `tb_pe`, `tb_pe_scheduler`, `tb_reduction_unit`, `tb_ctrl_regs`, `tb_dmu` (2 PEs, small RAMs).
- **`tb_sparse_accel`:** all four operations on one block with 20-cycle memory latency and random stalls. It also covers reloading and keeping the vector, and empty rows. It measures the spMdV_csr rate (at least one element per cycle required) and requires each mechanism at least once: empty rows, two words dispatched in one cycle, PE conflict stalls, a full read buffer holding back requests, memory read and write back-pressure, and each of the four operations.
- **`tb_workloads`:** two four-block tops run eight jobs at once with dataset-like row lengths (table above). It checks every result and reports the streaming rate. It requires at least one element per cycle for the spMdV_csr jobs with rows of 26 or more elements.
- **`tb_sparse_accel_x4`:** the full design at default parameters, running the four operations on the four blocks at once. Block 0 has 100 cycles of memory latency.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Using Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/spa_pkg.sv tb/tb_fp_pkg.sv tb/tb_sparse_accel_x4.sv --top-module tb_sparse_accel_x4
./obj_dir/Vtb_sparse_accel_x4
```

Swap in any other testbench name for the last file and `--top-module`. The smaller ones finish in seconds; the full-size run takes a few minutes.

Parameters to change:

- `NUM_PE`: a power of two; 2 gives the smaller block.
- `DEPTH`: entries per PE RAM.
- `RB_DEPTH`: raise it with memory latency.
- `OB_DEPTH`.
- `NUM_BLOCKS`: on the top.
