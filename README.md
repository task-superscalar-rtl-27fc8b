# Task superscalar frontend in SystemVerilog

This is a register-transfer model of the frontend of a task superscalar
processor. It follows "Task Superscalar: An Out-of-Order Task Pipeline"
(Etsion et al., MICRO 2010). A sequential thread writes tasks into the
pipeline. A task is a kernel pointer plus a list of operands, and each operand
is marked input, output or inout. The frontend finds the data dependencies
among the in-flight tasks and renames output objects. It then hands each task
to the backend as soon as all of the task's operands are ready. Thousands of
tasks can wait in the window at once.

## Organisation

```
 thread ──► gateway ──► ORT0 ◄─► OVT0 ──► copy-back DMA 0
             │   ▲      ORT1 ◄─► OVT1 ──► copy-back DMA 1
             ▼   │        │        │
      ┌──────── message network (crossbar) ────────┐
      │ TRS0 … TRS7          ready queue ──► backend│
      └──────────────────── ▲ ─────────────────────┘
                            └── finished tasks from the backend
```

The top module is `task_superscalar_top`. It has 8 task reservation stations
(TRS) and 2 pairs of object renaming table (ORT) and object versioning table
(OVT). This is the configuration the paper settles on for a 256-core machine.
Every module has one input and one output port on `msg_noc`. That is a
crossbar with round-robin arbitration per destination. It keeps messages
between any source and destination in order. All traffic uses one message
format, `ts_msg_t`, defined in `ts_pkg`. Each ORT also has a direct
request/response link to its own OVT, plus a release wire back from the OVT.

### Module list

| module | role |
|---|---|
| `gateway` | Holds incoming tasks in a 1KB buffer (128 words). Allocates TRS slots from a queue of TRSs that have room. Issues operands in task order: memory operands go to the ORT picked by the address hash, and scalars go straight to the TRS. Stalls the thread when a 20-word task would not fit. |
| `operand_hash` | Two-stage pipelined hash of the operand base address that picks the ORT. |
| `trs` | Stores each task in 128-byte eDRAM blocks. The main block holds the task globals and 4 operands, and up to 3 indirect blocks hold 5 operands each, so a task has at most 19 operands. The TRS counts decoded and ready operands and keeps the consumer chains. It sends ready tasks to the ready queue. When a task finishes, it releases the task's versions and wakes the next consumer of each operand. |
| `trs_block_alloc` | Free-block manager of a TRS. It keeps a 64-entry buffer of free block numbers, backed by list nodes stored in the eDRAM. Each node holds 63 block numbers and a next pointer. |
| `ort` | 16-way set-associative map from an object's base address to the object's last user, version and buffer. The tags of a set sit in two 64-byte words that are read one after the other. The ORT never evicts an entry. When a set is full, the ORT stops taking operands until one of that set's entries is released. |
| `ovt` | Version records: usage count, next version, writer, buffer. Renames outputs, unblocks inout writers, copies renamed results back and releases ORT entries. |
| `rename_buckets` | Allocates rename buffers from 16 power-of-two buckets (64B to 2MB). The buckets are filled from 2MB chunks of a memory region that the operating system gives to each OVT. |
| `ready_queue` | FIFO of ready tasks to the backend. |
| `msg_noc`, `msg_fifo` | Message crossbar, and the message FIFOs at the module ports. |
| `edram_bank` | Pipelined single-port storage with a fixed read latency (22 cycles by default), standing in for an eDRAM macro. |

### Top-level interface

- `task_valid/task_ready/task_word[63:0]`: the thread's stream. Each task is a
  header word (kernel pointer and operand count) followed by one descriptor
  word per operand. A descriptor holds the scalar flag, direction, size and
  address.
- `rdy_valid/rdy_ready/rdy_task/rdy_kernel`: ready tasks to the backend.
  `rdy_task` is the task id `<TRS, slot, serial>`.
- `done_valid/done_ready/done_task`: finished tasks reported by the backend.
- `dma_*[NUM_ORT]`: one copy-back request port per OVT (source, destination,
  size), completed by a `dma_done` pulse.
- `activity[15:0]`: one-cycle pulses for observable events: thread stall, no
  TRS room, ORT hit/miss/full-set stall, rename, inout unblock, copy-back,
  stale version, chain, forward, stale consumer, ready, indirect block, and
  free-list refill and spill.

## How a task is decoded

1. **Allocation.** The gateway sends `ALLOC_REQ` to the first TRS in its queue
   of TRSs with room. The TRS takes 1 to 4 blocks and writes the main block. It
   answers with the slot number and says whether it still has room for a
   full-size task. If it does not, it announces `SPACE` later.
2. **Operands.** Operands leave the gateway strictly in task order. A memory
   operand goes to its ORT. The ORT reads the two tag words and the data word
   of the set, then makes one request to its OVT:
   - an input that hits is counted as a new reader of the current version;
   - an output that hits gets a new renamed version;
   - an inout that hits gets a new version in the same buffer;
   - a miss creates a first version, which writes the object in place.

   The ORT records the operand as the object's last user and sends `OP_INFO`
   to the operand's TRS. `OP_INFO` names the previous user if the operand has
   to wait.
3. **Consumer chaining.** A waiting operand registers with the previous user
   (`REG_CONS`). The operands of one version thus form a chain. When a reader
   gets its data, it passes `DATA_READY` down the chain at once. A writer
   passes it on when its task finishes.
4. **Renaming.** For a renamed output, the OVT takes a buffer from the rename
   buckets and sends `DATA_READY` for the output side immediately. This breaks
   write-after-read and write-after-write dependencies. An inout operand is a
   true dependency and is not renamed. Its writer gets the output-side ready
   only when every user of the previous version has finished.
5. **Dispatch and completion.** A task whose operands are all decoded and ready
   goes to the ready queue. When the backend reports the task finished, the
   TRS sends `RELEASE` to the OVT for each memory operand. It also sends
   `DATA_READY` to each operand's next consumer and frees the task's blocks.
6. **Retirement.** A version drains when its count reaches zero and no older
   version of the object is still in use. A drained version frees its renamed
   buffer and unblocks its successor. If the drained version is the latest one
   of its object, its renamed buffer is first copied back to the object's
   address through the DMA port. The ORT entry is then released, and the
   record returns to the free list.

## Choices made in this design

The paper describes the organisation and the decode flows but leaves many
details open. This design fills them in as follows:

- **Interconnect.**
  - Messages travel on one crossbar instead of a tiled network.
  - ORT and OVT use a direct synchronous link.
  - Each message costs its eDRAM accesses (22 cycles each) plus a few cycles
    of control. The paper's extra charge of 16 cycles per packet is not
    modelled.
- **Races between decoding and retirement.** Three mechanisms handle them:
  - An ORT lookup that reaches a version already retired gets a `stale`
    reply and is redone as a miss.
  - Every task carries a serial number, and each TRS keeps a bitmap of live
    slots. A consumer that registers with a task that has already finished
    is made ready at once.
  - Versions drain oldest first, so a renamed result is never copied back
    while readers of an older version still read the object.
- **Outputs.** An output that misses in the ORT writes the object in place.
  When the rename region is exhausted, an output reuses the old buffer and
  waits like an inout operand.
- **The head of a consumer chain** is kept in the ORT entry (the last user),
  not in the OVT record.
- **Storage sizes** that the paper does not give:
  - ORT: 1024 sets × 16 ways per ORT, for 32K objects in total;
  - OVT: 8192 version records per OVT;
  - rename region: 64 chunks of 2MB per OVT;
  - ready queue: 64 entries.

  The TRS size is 6144 blocks of 128B (768KB) per TRS, which gives a window
  of 49152 single-block tasks.
- **Storage implementation.**
  - The OVT records are held in an on-chip array.
  - The ORT valid bits and the TRS live-slot bitmap are small on-chip
    memories. After reset they are cleared by a sweep of one word per cycle,
    and the module takes no messages until the sweep ends.
- **Free lists.**
  - Blocks and records never handed out come from a counter, so no free list
    has to be built at reset.
  - Freed rename buffers are kept in small on-chip stacks. A buffer freed
    into a full stack is not reused and is counted as lost.
- **Operand hash.** The hash function is this design's own.
- **Lint notes.** Several message fields are unused by some receivers. The
  reset is also used by the assertions' `disable iff`, so the linter reports
  it as both synchronous and asynchronous.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- **Unit benches** (`tb_edram_bank`, `tb_operand_hash`, `tb_ready_queue`,
  `tb_msg_fifo`, `tb_msg_noc`, `tb_trs_block_alloc`, `tb_rename_buckets`)
  drive random traffic against reference models.
  - The free-block bench allocates every block, frees them all and allocates
    them again, which covers spill and refill.
  - The bucket bench checks that buffers are aligned and never overlap, and
    that the region runs out.
- **System benches.** `ts_env` plays three parts:
  - the thread, which builds a blocked Cholesky in StarSs style, renaming
    rounds, wide tasks of 8 to 19 operands with scalars, and tasks on many
    distinct objects;
  - a backend of 32 cores with random run times;
  - the DMA engines.

  It checks that every task is dispatched exactly once with its own kernel
  pointer, and that no input or inout operand is dispatched before the
  object's last earlier writer has finished. It also checks that no inout
  writer runs before the users of the previous version have finished.
  - `tb_task_superscalar_top` runs the frontend at reduced sizes (72 blocks
    per TRS, 4 ORT sets). It requires every decode mechanism to occur, and
    requires every TRS, ORT and OVT to be empty after the drain.
  - `tb_gateway`, `tb_trs`, `tb_ort` and `tb_ovt` use the same setting and
    check the properties of their own module.
  - `tb_task_superscalar_full` runs the top with its default sizes.

## Known limits

- The system benches never reach the free-list spill and refill, because a
  TRS would have to free more than 64 blocks at once. These paths are covered
  only by the unit bench.
- The decode rate has not been measured against the paper's figure of 58 ns
  per task. Each operand needs roughly four 22-cycle eDRAM accesses, and each
  ORT handles one operand at a time.
- The backend, the DMA engine and the thread are outside the frontend. The
  testbenches model them.
- With a backend that stalls for long stretches (about 10,000 cycles held in
  every 25,000) and 72 blocks per TRS, the reduced-size system bench once
  stopped making progress. The cause was not found. The configurations in
  `tb/` run to completion.
