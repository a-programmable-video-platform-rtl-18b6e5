# A four-cluster programmable video platform

HD video codecs split naturally into a macroblock pipeline of a few tasks:
parsing, transform/quantisation with intra prediction, inter prediction or
motion estimation, and deblocking. Each task needs more arithmetic than a few
RISC cores can deliver, and its tasks talk in two very different ways. Small,
irregular control messages carry syntax elements, motion vectors and
handshakes. Large, regular blocks carry residuals and reconstructed pixels.

This RTL builds the hardware side of such a platform:

* **Four PE clusters** (processing-element clusters). Each runs one task on its
  RISC cores. Each has a **hardware OS kernel (HOSK)** that schedules the task's
  threads and swaps their contexts, and one **task-specific accelerator**.
* **A control network.** It is a group of FIFOs for every ordered pair of
  clusters, used for small asynchronous messages (PUT/GET).
* **A data network.** It is a double-buffered shared memory for every ordered
  pair of clusters, used for macroblock-sized data (WRITE/READ).

The RISC cores are not part of the RTL. Their three buses to the cluster are
ports of the top, `video_platform`: the kernel-call command bus, the 32-bit
context bus and the accelerator command bus. So are their data-network ports
and the external context memory. The testbenches drive these ports with
behavioural cores written as SystemVerilog tasks.

| PID | Cluster     | Accelerator    | Typical task                           |
|-----|-------------|----------------|----------------------------------------|
| 0   | parsing     | `parse_accel`  | bitstream parsing, MVD, NAL            |
| 1   | ME/MC       | `me_accel`     | motion estimation / inter prediction   |
| 2   | filtering   | `filter_accel` | (I)TQ, intra prediction                |
| 3   | filtering   | `filter_accel` | deblocking                             |

Default sizes are those of the 720p configuration:

* 4 clusters of 4 cores.
* Control FIFOs of 32 bits × 24 entries.
* 2 KB per data link.
* A [-64, +64] search range, which gives a 144×144-pixel window.
* 16-word thread contexts.

## Block hierarchy

```
video_platform
├── ctrl_network ── ctrl_fifo (N_PE·(N_PE-1)·N_FID of them)
├── data_network ── data_link_mem (N_PE·(N_PE-1) of them)
└── pe_cluster ×4
    ├── hosk
    │   ├── hosk_tas_manager      thread/semaphore manager and scheduler
    │   └── hosk_context_manager  prefetch / swap / write-back of contexts
    ├── acc_cmd_queue             one queue per core in front of the accelerator
    └── parse_accel | me_accel | filter_accel
                        │          └── filter_6tap ×4
                        ├── me_sad4x4, me_vbs_tree, me_best_mv
                        └── filter_6tap (half-pel interpolation)
```

`vp_pkg` holds the shared types: the kernel-call and accelerator command
structs, the HOSK operation enum and all accelerator opcodes.

## Control network: PUT and GET

Every ordered pair (source, target) of distinct clusters owns `N_FID` = 4
FIFOs. Each FIFO holds `DEPTH` = 24 words of 32 bits. A FIFO is named from
each end:

* The sender writes with **PUT (target PID, FID)**.
* The receiver reads with **GET (source PID, FID)**.

So cluster 1 doing PUT(2, 3) and cluster 2 doing GET(1, 3) meet in the same
FIFO. Each cluster has one PUT port and one GET port, and both can act in the
same cycle.

Both ends can see the state of every link. `tx_full[src][dst][fid]` and
`rx_empty[dst][src][fid]` let a core look for a FIFO with room, or with data,
before it commits. The depth of 24 is sized for the largest syntax-element
transfer between tasks plus the synchronisation words of the data links, with
about 50 % margin.

PUT and GET are kernel calls (`H_PUT`, `H_GET`) and they do not block:

* A PUT to a full FIFO answers `rsp_ok = 0` and moves nothing.
* A GET from an empty FIFO answers `rsp_ok = 0`.

The caller then retries or picks another FIFO. `H_STATUS` returns the two
status bits of one FIFO. Addressing the own PID reaches no FIFO: it reads as
full and empty.

## Data network: double-buffered links

Every ordered pair of clusters owns a 2 KB dual-port memory (`data_link_mem`),
with synchronous read and 32-bit words. The address map is:

```
write port of cluster s:  byte address = target_PID * 2048 + offset
read  port of cluster d:  byte address = source_PID * 2048 + offset
```

So WRITE(2·2048 + x) by cluster 0 and READ(0·2048 + x) by cluster 2 touch the
same word. Read data arrives one cycle after the request, with `rd_valid`.

The hardware does not interpret the regions. By convention, offset bit 10
splits each link into two 1 KB regions for double buffering. For a 4:2:0
macroblock of 16-bit samples, one region carries 384 samples, which is 768 B.

The protocol runs over the control network:

1. The producer fills region r and then PUTs a sync word, such as
   {macroblock, r}, to the consumer.
2. The consumer GETs the sync word, READs region r, and PUTs a release word
   back.
3. The producer waits for that release before it overwrites region r two
   macroblocks later.

The end-to-end testbench uses exactly this scheme. It fails without the
release step, because the producer then overtakes the consumer.

## HOSK: kernel calls, scheduling and context switching

### Command bus and main controller

Each core has a valid/ready command bus carrying `hosk_cmd_t {op, a0, a1}`.
The main controller grants one core per cycle, round robin, and the answer
comes one cycle after acceptance: `rsp_valid[core]`, `rsp_data` and `rsp_ok`.

| op | call            | a0                         | a1            | answer                          |
|----|-----------------|----------------------------|---------------|---------------------------------|
| 0  | THREAD_CREATE   | entry PC                   | priority      | thread id (all ones if no slot) |
| 1  | THREAD_KILL     | –                          | –             | ends the caller's thread        |
| 2  | SET_ACTIVE      | number of active cores     | –             |                                 |
| 3  | CHANGE_PRIO     | thread id                  | new priority  |                                 |
| 4  | SEM_INIT        | semaphore id               | initial count |                                 |
| 5  | SEM_WAIT        | semaphore id               | –             | 1 = passed, 0 = caller blocked  |
| 6  | SEM_POST        | semaphore id               | –             |                                 |
| 7  | PUT             | {PID, FID} (= PID·4 + FID) | data          | ok = accepted                   |
| 8  | GET             | {PID, FID}                 | –             | data, ok = there was data       |
| 9  | STATUS          | {PID, FID}                 | –             | {tx_full, rx_empty}             |

### TAS manager (threads and semaphores)

The TAS manager keeps a descriptor per thread: its state, a 3-bit priority
(higher wins) and a next pointer. Its queues are:

* The **ready queue** is a bit vector (`ready_vec`).
* Each **semaphore** has a count and a **waiting queue**. The queue is a linked
  list with head and tail pointers, threaded through the descriptors' next
  pointers, so a post wakes the waiters in FIFO order.

Besides the calls, a scheduler makes one decision at a time. It raises
`sched_valid` with a core, the thread to switch in and the thread to switch
out. A decision is made when:

* a core's thread blocked or was killed;
* an active core is idle while a thread is ready;
* a ready thread has a strictly higher priority than the lowest-priority
  running thread (**preemption**);
* a core above the active-core count still runs a thread.

`SET_ACTIVE` therefore lets software trade cores for power or study scaling
without rebuilding its code. While a switch is in flight, new calls wait. This
keeps the descriptors consistent with the context that is moving.

### Context manager

Contexts are 16 words of 32 bits. They live in an external context memory, with
thread t at `CTX_BASE + 16·t` and its PC in word 0. A switch has three phases:

1. **Prefetch.** Read the incoming context into an on-chip buffer. The core
   keeps running meanwhile.
2. **Swap.** For 16 cycles, use the duplex 32-bit context bus of that core.
   Each cycle one word goes in (`ctx_in_data`) and one word of the outgoing
   context comes out (`ctx_out_data[core]`). `ctx_sw_idx` counts the words.
3. **Write-back.** Store the outgoing context, unless the thread was killed.

A core is therefore held for 16 cycles plus a few cycles of dispatch. This is
the figure that makes per-macroblock thread switching affordable: a 720p
30 fps pipeline has about 1850 cycles per macroblock at 200 MHz.
`THREAD_CREATE` writes the entry PC into the new thread's slot.

The memory port is request/grant. Reads return on `mem_rvalid`, in order, with
one request outstanding at a time, so any memory latency works.

## Accelerators

Every core has its own accelerator command bus carrying `acc_cmd_t {op[7:0],
a0, a1}`. `acc_cmd_queue` buffers up to 4 commands per core. It issues them to
the single accelerator round robin, tagged with the core number, and returns
each answer to the core that issued the command (`a_rsp_valid[core]`). A core
that issues several commands gets its answers in order.

### Filtering accelerator (`filter_accel`)

The filtering accelerator has a 16-entry register file of signed 16-bit samples
and four copies of a 6-tap weighted-summation datapath (`filter_6tap`). The
datapath computes

```
y = (Σ w[k]·x[k] + 2^(shift-1)) >>> shift
```

with signed 8-bit weights. Copy c reads `x[base + c·stride + k]` (mod 16),
which covers two common cases:

* **Stride 1** with common weights gives four outputs of a 6-tap FIR, for
  interpolation or deblocking.
* **Stride 0** with one matrix row per copy gives a 4-point transform of
  `x[base..base+3]`, for example the H.264 core transform.

| op   | name      | fields                                                         |
|------|-----------|----------------------------------------------------------------|
| 0x01 | F_SETW    | a0[1:0] copy, a0[4:2] tap, a0[8] all copies, a1[7:0] weight     |
| 0x02 | F_SETX    | a0[3:0] register, a1[15:0] sample                              |
| 0x03 | F_6TAB    | a0[3:0] base, a0[7:4] stride, a0[11:8] shift; answers y[0]      |
| 0x04 | F_QUANT   | y[c] = sign(x)·((\|x\|·a0[31:16] + a1) >> a0[12:8]), x = x[base+c] |
| 0x05 | F_REORDER | 4×4 zigzag reorder of the register file                        |
| 0x06 | F_GETY    | a0[1:0]: read y of one copy                                    |
| 0x07 | F_GETX    | a0[3:0]: read a sample register                                |

Every command is accepted at once and answered the next cycle.

### ME/MC accelerator (`me_accel`)

The ME/MC accelerator holds the current macroblock and a search window of
(16 + 2·SR)² bytes, which is 144 × 144 = 20.25 KB for SR = 64. Software on the
cores decides which candidates to try, for example a gradient-descent search.
For each candidate, the accelerator does the following:

1. Reads the 16 reference rows, one per cycle.
2. Forms the SADs of the four 4×4 blocks in each row (`me_sad4x4`) and
   accumulates the sixteen 4×4 SADs.
3. Builds the costs of all 41 H.264 partitions with an adder tree
   (`me_vbs_tree`). The order is 16 × 4×4, 8 × 8×4, 8 × 4×8, 4 × 8×8,
   2 × 16×8, 2 × 8×16 and 1 × 16×16, so index 40 is the 16×16 block.
4. Keeps the best cost and vector of every partition (`me_best_mv`). Ties keep
   the earlier candidate.

The answer, the 16×16 cost, comes 18 cycles after the command is accepted.
`cmd_ready` stays low meanwhile.

| op   | name      | fields                                                              |
|------|-----------|---------------------------------------------------------------------|
| 0x11 | M_LDCUR   | a0[7:0] pixel index row·16+col (col multiple of 4), a1 four pixels  |
| 0x12 | M_LDREF   | a0[7:0] row, a0[15:8] column (multiple of 4), a1 four pixels        |
| 0x13 | M_CLRBEST | reset all best costs                                                |
| 0x14 | M_SADCAND | a0[7:0] mvx, a0[15:8] mvy (signed, window centre = 0,0)             |
| 0x15 | M_GETBEST | a0[5:0] partition → {mvy, mvx, cost[15:0]}                          |
| 0x16 | M_GETCOST | a0[5:0] partition → cost of the last candidate                      |
| 0x17 | M_6TAB    | a0[7:0] row, a0[15:8] col → four half-pel pixels at col+0.5 .. +3.5 |
| 0x18 | M_SETPMV  | a0[7:0] pmvx, a0[15:8] pmvy, a1[7:0] λ                              |
| 0x19 | M_MVCE    | a0[7:0] mvx, a0[15:8] mvy → λ·(bits(mvx−pmvx) + bits(mvy−pmvy))     |
| 0x1A | M_STMV    | a0[7:0] MB column: store the best 16×16 vector in the row buffer     |
| 0x1B | M_PMV     | a0[7:0] MB column, a0[8] new row → median predictor, also set as pmv |

In every packed pixel word, a1[7:0] is the leftmost pixel. M_6TAB uses the
filter (1, −5, 20, 20, −5, 1), rounds, shifts by 5 and clips to 8 bits.

The motion-vector cost estimates the rate of a vector. `bits(d)` is the length
of the signed Exp-Golomb code of the difference d to the predictor, which is
2·⌊log2(k+1)⌋ + 1 with k = 2|d| − (d > 0). Once λ is non-zero, every
candidate's 41 partition costs include this term before the best-vector
compare, and the candidate's answer and M_GETCOST include it too. λ is 0 after
reset, which gives pure SAD.

A row buffer keeps one 16×16 vector per macroblock column: `MB_COLS` = 80
columns for 1280-pixel-wide video. While the search walks along a row, the
entry of column c still holds the vector of the macroblock above until M_STMV
overwrites it. M_PMV therefore sees three neighbours: left (the last stored
vector), top (column c) and top-right (column c+1). It takes their
component-wise median, which is the usual H.264 predictor without the
partition special cases. The left neighbour counts as zero at the start of a
row (a0[8]), and the top-right counts as zero past the last column.

### Parsing accelerator (`parse_accel`)

The parsing accelerator is built around a 64-bit left-aligned bit buffer.
Software refills it 32 bits at a time. Around the buffer sit a loadable code
table and the register files of CAVLC residual decoding, and the unit provides
the operations that dominate entropy decoding:

| op   | name       | fields                                                              |
|------|------------|---------------------------------------------------------------------|
| 0x21 | P_PUSH     | a1 = next 32 stream bits (refused if more than 32 bits are buffered) |
| 0x22 | P_FBITOP   | a0 = n (1..32): read n bits                                         |
| 0x23 | P_EXPBITOP | a0[0] = 0: ue(v), 1: se(v) Exp-Golomb code                          |
| 0x24 | P_CLZ      | leading zeros of the next 32 bits, nothing consumed                 |
| 0x25 | P_LEVEL    | number of buffered bits                                             |
| 0x26 | P_VTMATCH  | a0[1:0] table → {len, value}; the len bits are consumed             |
| 0x27 | P_RLREORDER| a0[4:0] total coefficients n, a0[8] first position 1 instead of 0   |
| 0x28 | P_T1DEC    | a0[1:0] t: read t sign bits, level[k] = ±1 for k < t                 |
| 0x29 | P_VTLOAD   | a0[5:0] entry, a0[9:8] table, a0[20:16] len (0 = empty), a1 = {value, code} |
| 0x2A | P_SETLEVEL | a0[3:0] index, a1[15:0] level                                       |
| 0x2B | P_SETRUN   | a0[3:0] index, a1[3:0] run_before                                   |
| 0x2C | P_GETCOEF  | a0[3:0] scan position → coefficient                                  |
| 0x2D | P_IWR      | a0[7:0] code address, a0[8] upper half, a1 = half of an instruction |
| 0x2E | P_RUN      | a0[7:0] start address: run the program, answer r1 at HALT           |
| 0x2F | P_GETREG   | a0[3:0] sequencer register → value                                  |
| 0x30 | P_SETREG   | a0[3:0] sequencer register, a1 = value                              |

**Table matching.** The unit compares the next bits of the stream with all 64
table entries of the chosen table in parallel, and the lowest-numbered match
wins. The cores load the code tables their format needs, for example CAVLC
coeff_token, total_zeros and run_before, or VC-1 tables.

**Run-level reordering.** It follows CAVLC: level[0] and run[0] belong to the
highest-frequency coefficient. Coefficient i lands at scan position
`start + Σ_{j≥i}(run[j] + 1) − 1`, and every other position is cleared. A set
that would pass position 15 is refused.

An operation that needs more bits than are buffered consumes nothing and
answers all ones.

**VLIW sequencer.** The accelerator can also run its own programs. These
execute from a 256-entry code memory with sixteen 32-bit registers, at one
instruction per cycle. `cmd_ready` is low while a program runs. Bits [63:60] of
an instruction choose one of two formats:

* Format 0 has two 12-bit conditions C0 and C1 and two 18-bit execution slots
  E0 and E1. The low two format bits select one of three relations:
  * each slot runs under its own condition;
  * E0 runs if both conditions hold, otherwise E1;
  * E0 runs if either condition holds, otherwise E1.
* Format 1 has one 12-bit condition C and two 24-bit execution slots. Its
  relations are:
  * if-then-else;
  * both slots run if C holds;
  * E0 runs if C holds, and E1 always runs.

So one instruction covers the one- or two-condition `if`/`else` statements that
dominate parsing code.

A condition slot is `{kind[2:0], reg[3:0], k[4:0]}`. It tests one of these:
* a register is zero;
* a register is non-zero;
* a register compared with k;
* fewer than k bits are buffered.

An execution slot is `{op[4:0], rd[3:0], field}`. The operations are:
* ALU: load immediate, add immediate, add, subtract, shift, and, move;
* jump and halt;
* each datapath operation above, with the answer going to `rd`. Field and
  register operands allow variable-length reads and trailing-ones counts held
  in registers.

Each instruction performs at most one datapath operation: the first active slot
that holds one. P_RUN is answered with r1 when a slot executes HALT.

## Where this RTL departs from the architecture it implements

* **Cores, caches and the SoC around them are not built.** This covers the RISC
  cores, the 16 KB/4 KB shared instruction/data caches of each cluster, the
  host processor, the AHB bus with its DMA controller, the DDR controller and
  the display/UART peripherals. Their interfaces to the clusters are ports of
  the top.
* **Parsing accelerator sequencer encodings.** The accelerator runs its own
  64-bit VLIW programs. It keeps the original's layout: a 4-bit format field,
  one or two 12-bit condition slots and two 18- or 24-bit execution slots. The
  meaning of each slot field is this design's own. The code memory holds 256
  instructions (2 KB), enough for the 1.8 KB CAVLC macroblock parser of the
  original. The cores can also issue every operation
  directly. The code tables are loaded at run time rather than built in.
* **Link count.** The area summary of the original implementation lists six
  FIFO groups and six link memories. The architecture text gives a link to
  every pair of clusters, one per direction. This RTL follows the text and has
  twelve directed links in each network.
* **The ME accelerator lacks some buffers.** It has no separate
  half/quarter-pel buffers. The motion-vector cost uses the Exp-Golomb bit
  count as its rate model, and the row buffer feeds a plain median predictor.
  Both are this design's choices. Sub-pel work is limited to the M_6TAB half-pel
  interpolation.
* **Transform rate.** The architecture credits the four filter copies with a
  4×4 integer transform per clock. Here the four copies produce one 4-point
  transform, which is four outputs, per cycle. A 2-D 4×4 transform takes eight
  F_6TAB commands, because its 64 products do not fit in 24 multipliers.
* **The filter accelerator keeps samples in a register file.** It has no
  input/output memories. The quantiser takes the H.264 forward form
  `(|x|·scale + offset) >> shift`.
* **This design's own choices** include all command encodings, the kernel-call
  numbering, the non-blocking PUT/GET, the data-network address map, the
  context-memory layout, the queue depth of 4, round-robin arbitration
  everywhere, the thread and semaphore counts (8 each), the 3-bit priority and
  the 4 FIFOs per link.

## Sizes against the target applications

| | needed (720p, 30 fps) | built |
|---|---|---|
| threads per task | up to 6 (H.264 encoder TQ/ITQ/INTRA) | 8 |
| active cores per task | up to 3 | 4 |
| data per link, double-buffered | 8·8·6 samples × 2 B × 2 = 1.5 KB | 2 KB |
| largest control message | 16·2 B·2 + 16·4 bit·2 = 20 words | 24 words |
| ME window for [-64, +64] | 144·144 B = 20.25 KB | 20.25 KB |
| parsing accelerator code | about 1.8 KB (CAVLC macroblock parsing) | 256 × 8 B = 2 KB (parameter `N_IMEM`) |
| cycles per macroblock at 200 MHz | 1280·720/256·30 = 108 000 MB/s → 1851 | – |

At 18 cycles per candidate, the ME accelerator can evaluate roughly 100
candidates in one macroblock time. That is ample for a directional
gradient-descent search, and far from a full search over the 129² candidates.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against
values computed in the testbench and has a cycle watchdog. Each ends by
printing `TB_RESULT checks=N failures=M`.

| testbench                 | what it exercises                                                   |
|---------------------------|---------------------------------------------------------------------|
| `tb_ctrl_fifo`            | random push/pop against a queue model, full/empty at 24             |
| `tb_ctrl_network`         | random PUT/GET on all links against per-FIFO models                 |
| `tb_data_link_mem`, `tb_data_network` | every link, both regions, read latency                  |
| `tb_filter_6tap`          | random samples and weights, rounding                                |
| `tb_filter_accel`         | FIR, transform, quantiser, zigzag, result reads                     |
| `tb_me_sad4x4`, `tb_me_vbs_tree`, `tb_me_best_mv` | datapath units against reference sums      |
| `tb_me_accel`             | 144×144 window, candidates, 18-cycle latency, half-pel, MV cost, MV row buffer |
| `tb_parse_accel`          | random bit/Exp-Golomb/VLC streams, trailing ones, run-level reorder, sequencer programs |
| `tb_acc_cmd_queue`        | four cores with random traffic, answers routed to the right core    |
| `tb_hosk_tas_manager`     | dispatch, preemption, semaphore block/wake order, kill, active cores |
| `tb_hosk_context_manager` | prefetch/swap/write-back against a memory model with random grants |
| `tb_hosk`, `tb_pe_cluster`| kernel calls, PUT/GET status, context swaps, accelerator routing    |
| `tb_video_platform`       | end to end at full default size (below)                             |
| `tb_workload_mapping`     | kernel side of the three 720p mappings (below)                      |

`tb_video_platform` runs a small macroblock pipeline through all four clusters
with the top at its default parameters:

* **Cluster 0** decodes a generated bitstream. It table-matches each
  macroblock header and Exp-Golomb-decodes the coefficients. It writes the
  coefficients of four macroblocks into link 0→2, alternating regions, and
  PUTs sync words.
* **Cluster 2** GETs each sync word, polling while the FIFO is empty, and READs
  the block. It transforms the rows with its filter accelerator, writes the
  result into link 2→3 and returns release words.
* **Cluster 3** applies a 6-tap FIR to the result and checks every value.
* **Cluster 1** loads the full search window and searches for a known motion
  vector. It sends the vector to cluster 3 and overfills a control FIFO until a
  PUT is refused.

The testbench counts each mechanism and fails any that never happened:

* context switches and preemption in every cluster;
* semaphore block and wake;
* PUT and GET, a GET on an empty FIFO and a PUT on a full one;
* both buffer regions and data-network traffic;
* the use of all three accelerators.

`tb_workload_mapping` also runs at full size. It maps the H.264 decoder, the
H.264 encoder and the VC-1 decoder task by task onto the clusters, with the
active cores and thread counts of their published mappings. It then forces
each task's reported number of context switches per macroblock through the
kernel. Every switch holds its core for 16 cycles. The worst case is the
decoder's ITQ/INTRA task: 7 switches on one core, 112 cycles, which is 6 % of
the 1851-cycle macroblock budget.

`tb/ctx_mem_model.sv` is a behavioural context memory with random grant delays.
It is used by the HOSK-level testbenches.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/vp_pkg.sv tb/tb_video_platform.sv --top-module tb_video_platform -Mdir obj
./obj/Vtb_video_platform +verilator+rand+reset+2
```

Use `+verilator+rand+reset+2` so that any missing reset shows up. The full-size
end-to-end test runs in a few seconds.
