# OrderLight: memory-side ordering for fine-grained processing-in-memory

Fine-grained processing-in-memory (PIM) puts a small SIMD compute unit next to each DRAM bank.
The host drives that unit with a stream of column-sized commands:

- load a column into the unit's temporary storage (TS);
- add or multiply a column into a TS entry;
- store a TS entry back to DRAM.

These commands depend on each other through the TS. An add must not reach the bank before the
load that filled its TS entry. But a GPU memory pipe reorders requests freely: out-of-order
operand collection, parallel L2 sub-partitions, separate read and write queues, and an FR-FCFS
scheduler that favours row hits.

The usual fix is a core-side fence. A fence stalls the warp until every earlier request is
acknowledged, which throws away most of the PIM bandwidth.

OrderLight moves the ordering point into the memory pipe. The program inserts an *OrderLight
packet* between dependent groups of PIM commands. The packet travels down the same pipe as the
requests. Every stage that could reorder requests keeps them from passing it, but only for the
channel and memory-group the packet names. The core does not wait for acknowledgements. It only
holds the packet until earlier PIM requests have left the operand collector.

This repository is synthesizable SystemVerilog of such a pipe. It runs from the GPU's SMs to the
HBM command bus, with one PIM unit per bank. Self-checking testbenches come with it.

## The OrderLight packet

An OrderLight packet uses the same request record (`mem_req_t` in `rtl/ol_pkg.sv`) as loads,
stores and PIM commands:

| field     | bits | use                                                        |
|-----------|------|------------------------------------------------------------|
| `kind`    | 2    | packet ID: `PK_LD`, `PK_ST`, `PK_PIM`, `PK_OL`             |
| `ch`      | 4    | channel the ordering applies to                            |
| `grp`     | 4    | memory-group the ordering applies to                       |
| `payload` | 32   | packet number (0, 1, 2, … per group)                       |

In this design a memory-group is four consecutive banks, so `grp = bank / 4`. Ordering is
enforced only among requests of the same channel and group. Requests to other groups, and host
traffic placed in other groups, keep all their freedom.

The other request fields are bank (4 bits), row (14), column (6), TS index (5), PIM operation,
and source SM. For a host store the payload carries the data word. For PIM multiplies it
carries the scalar.

## Where requests get reordered, and what each stage does about it

```
 SM[i]:  operand_collector ──► ldst_unit ──► icnt ──► ch[c]: l2_slice ──► mem_ctrl ──► DRAM commands
                                  │  ▲                                       │
                            L1 port  L1 miss                           pim_unit[bank] x16
```

### 1. Operand collector (`operand_collector`)

Memory instructions wait in collector units until their register operands have been read from
a banked register file. They then leave in whatever order they became ready.

There is a counter for every (channel, group) pair, 256 in all. The counter goes up when a PIM
request takes a collector unit and down when that request is issued.

An OrderLight instruction never enters a collector unit. It waits at the input (`ol_wait`) until
the counter for its channel and group reads zero. It then goes straight to the LDST queue ahead
of everything else. Instructions behind it wait too, because the warp issues in order.

### 2. L1 bypass (`ldst_unit`)

PIM requests and OrderLight packets skip the L1 and go to the interconnect. Host loads and
stores go to the L1 port. The L1 itself is outside this design. L1 misses come back on
`l1_miss_*` and are merged onto the interconnect port.

### 3. Interconnect (`icnt`)

The interconnect is a crossbar from NSM sources to NCH destinations. Destination c is the L2
slice of channel c. Each source has a FIFO. Each destination has a round-robin arbiter, followed
by a delay queue of fixed latency (120 cycles by default). Order is kept for each
source/destination pair, which is all that OrderLight needs here. Every L2 slice serves exactly
one channel, so nothing diverges at this stage.

### 4. L2 slice: copy and merge (`l2_slice`, `ol_copy`, `ol_merge`)

A slice has NSUB sub-partitions, each with an interconnect-to-L2 queue and an L2-to-DRAM queue.
A request goes to sub-partition `bank % NSUB`. The L2 arrays are not modelled: PIM requests
bypass them, and host requests are treated as misses. Because the sub-partitions drain
independently, requests of one group can come out in a different order from the one they went
in.

- **Copy (`ol_copy`).** At the split, the copy FSM sends an OrderLight packet into every
  sub-partition that its group's banks map to. The copies may leave in different cycles; a mask
  records which outputs still owe one.
- **Merge (`ol_merge`).** At the join, a sub-partition whose head is an OrderLight copy is held
  (`ol_hold`). It stays held until every sub-partition that received a copy of the same packet
  (same channel, group and packet number) also has that copy at its head. Then one merged packet
  goes out. In the meantime, other sub-partitions' requests pass in rotating order.

Because of this, no request that entered after the packet can leave before it.

### 5. Memory controller (`mem_ctrl`, `mc_scheduler`, `dram_cmd_sched`)

The controller has separate read and write queues (64 entries each), so it is a second
divergence point. A second copy/merge pair handles it:

- reads go to the read queue;
- writes (host stores and PIM stores) go to the write queue;
- an OrderLight packet goes to both.

The merge stage feeds the scheduler.

The scheduler (`mc_scheduler`) is FR-FCFS over a window of 16 requests. It prefers a row hit,
meaning the row last scheduled to that bank, and otherwise the oldest request. Each group has a
request counter and an OrderLight flag:

- The counter counts requests of the group that are in the window and not yet scheduled.
- An OrderLight packet sets the flag and is then dropped.
- While the flag is set, new requests of that group are marked blocked and counted apart.
- When the counter reaches zero, every request that came before the packet has been scheduled.
  The flag then clears, the blocked requests become eligible, and their count becomes the
  counter.
- A second packet for a group whose flag is still set waits at the input.

The scheduler also checks that each group's packet numbers run 0, 1, 2, … and that the packet is
for its own channel. A mismatch raises the sticky `seq_err`.

A scheduled request enters its bank's command queue, which is in order, 8 entries deep. The
command scheduler (`dram_cmd_sched`) issues one command per cycle: RD or WR if the row is open,
ACT if the bank is closed, PRE if another row is open. The page policy is open-page. Column
commands win over ACT, and ACT wins over PRE. Among banks the priority rotates.

Requests of one group can still be reordered across the group's four banks after scheduling.
Within a bank, order holds from scheduling onward. That is all a per-bank PIM unit needs.

### 6. PIM units (`pim_unit`, `pim_ts`, `simd_alu`)

Every bank has a PIM unit. Each unit watches the channel's command bus and acts on PIM commands
to its own bank. A column is 32 B, which gives 8 lanes of 32 bits.

| PIM op     | DRAM command | effect                                        |
|------------|--------------|-----------------------------------------------|
| `OP_LOAD`  | RD           | `TS[tsi] = column`                            |
| `OP_ADD`   | RD           | `TS[tsi] = TS[tsi] + column` (per lane)       |
| `OP_MUL`   | RD           | `TS[tsi] = scalar * column`                   |
| `OP_MAC`   | RD           | `TS[tsi] = TS[tsi] + scalar * column`         |
| `OP_STORE` | WR           | `column = TS[tsi]`                            |

A RD's data arrives on `dram_rdata` tCL = 12 cycles after the command. It passes through the ALU
and is written into TS in that cycle. For a WR, the unit drives `wvalid/wdata` tWL = 2 cycles
after the command. The TS holds 32 entries, half of a 2 KB row buffer.

With these five operations the unit can run the stream kernels:

- Add;
- Scale;
- Copy;
- Daxpy, as load b, MAC a, store;
- Triad.

## DRAM timing

The command scheduler keeps an "earliest allowed cycle" for each bank and for the channel. All
values are in cycles:

| rule                         | value | rule                           | value |
|------------------------------|-------|--------------------------------|-------|
| ACT→WR (tRCDW)               | 9     | ACT→RD (tRCD)                  | 12 *  |
| ACT→PRE (tRAS)               | 28    | PRE→ACT (tRP)                  | 12    |
| ACT→ACT any bank (tRRD)      | 3     | column→column, any bank (tCCD) | 1     |
| column→column, same bank (tCCDL) | 2 | WR→PRE (tWTP)                 | 9     |
| RD→PRE (tRTP)                | 3 *   | RD→WR (tRTW = tCL−tWL+1)       | 11 *  |
| WR→RD (tWL + tCDLR)          | 5     | read latency tCL / write tWL   | 12 / 2 |

Entries marked * are this design's own choices; the others are the evaluated HBM's values. Bank
groups are not modelled: the "same bank" rule stands in for tCCDL.

A worked case:

- Eight PIM stores to one row, then a switch to another row of the same bank.
- ACT to ACT takes tRCDW + 7·tCCDL + tWTP + tRP = 9 + 14 + 9 + 12 = 44 cycles.

`tb_dram_cmd_sched` checks this number.

## Top level (`orderlight_top`)

| parameter  | default | meaning                                             |
|------------|---------|-----------------------------------------------------|
| `NSM`      | 8       | SMs that issue PIM kernels (one warp per channel, two channels per SM) |
| `NCH`      | 16      | HBM channels                                        |
| `NBANK`    | 16      | banks per channel, one PIM unit each                |
| `NSUB`     | 2       | L2 sub-partitions per slice                         |
| `NTS`      | 32      | TS entries per PIM unit                             |
| `NCU`, `REG_W`, `LDST_Q` | 4, 8, 8 | collector units, register number width, LDST queue |
| `QDEPTH`   | 64      | L2 and read/write queue depth                       |
| `NWIN`, `CQ_DEPTH` | 16, 8 | scheduler window, per-bank command queue depth     |
| `ICNT_LAT`, `L2_LAT` | 120, 100 | interconnect and L2-to-scheduler latency   |

Ports:

- **Per SM:**
  - the instruction input `inst_*`, with the request, the number of source registers and their
    numbers;
  - the L1 port `l1_*`;
  - the L1-miss return `l1_miss_*`.
- **Per channel:**
  - the DRAM command bus `dram_cmd_valid/dram_cmd`;
  - the read data into the PIM units `dram_rdata`;
  - the PIM store data `dram_wvalid/dram_wdata`.
- **Status:**
  - `ol_wait`, `l2_ol_copied/merged/hold`, `mc_ol_copied/merged/block`, `row_switch`,
    `seq_err` and `ol_count`;
  - one per SM or per channel, as counters and strobes for observing the mechanisms.

Everything runs on one clock with an asynchronous active-low reset.

### What sits outside

The SM cores, the L1 and L2 cache arrays and the DRAM arrays are outside this design. They are
the host GPU and the memory device.

- Host load data is not returned to the SMs.
- Host store data is the request's payload word.
- The testbenches drive the SMs' instruction streams. They loop the L1 port back as "always
  miss", and use a behavioural HBM channel (`tb/hbm_channel_model.sv`). That model executes
  ACT/PRE/RD/WR, checks the protocol, returns read data after tCL and stores PIM write data
  taken at WR + tWL.

## Departures and choices to be aware of

- **One clock domain.** The evaluated GPU has a 1200 MHz core and 850 MHz HBM. Here all latencies
  are counted in one clock.
- **Only the PIM-issuing SMs are built.** The GPU has 80 SMs; the 8 that run the PIM kernels
  (one warp per channel, two warps per SM) are instantiated.
- **Fixed PIM placement.** Placement is one unit per bank, a bandwidth multiplication of 16 over
  the host. Placements with 4 or 8 units per channel, each shared by several banks, are not
  provided.
- **Operand collector.** The details are this design's own: 4 units, a register file of 4 banks,
  one read per bank per cycle, rotating priority. The counters cover all 16 × 16 channel/group
  pairs.
- **L2 and scheduler choices.** The sub-partition mapping (`bank % NSUB`), the
  scheduler window size, the blocked-request bookkeeping and the packet-number check are this
  design's choices.
- **Assumed DRAM timings.** tRCD, tRTP and tRTW are assumed values. Bank groups are not modelled.
- **PIM operations and encoding.** The operation set, and the encoding of commands onto the
  request fields, are this design's own.
- **Host traffic.** Host requests are handled at the ordering level only. No cache hits occur, and
  no read data is returned.

## Files

`rtl/`:

- `ol_pkg.sv` holds the types and field widths.
- `sync_fifo.sv` and `delay_queue.sv` are helpers.
- Every other file is one block as described above.

`tb/`:

- There is one self-checking testbench per block: `tb_<block>.sv`.
- `tb_orderlight_top.sv` runs the vector-add kernel c = a + b end to end on a reduced top:
  - 2 SMs, 2 channels, TS of 8, three tiles of 8 columns;
  - host loads and stores mixed in;
  - it checks every result column against a + b, the host stores, a clean DRAM protocol and the
    packet numbers;
  - it fails if any OrderLight mechanism never fired: collector wait, L2 copy/merge/hold,
    read/write-queue copy/merge, scheduler block, row switch.
- `tb_stream_kernels.sv` runs the other stream kernels (Copy, Scale, Daxpy, Triad) on a
  reduced top with one SM and one channel, and checks each result column.
- `tb_orderlight_full.sv` runs the same kernel on the top at its default size: 8 SMs, 16
  channels, 16 banks.

Every testbench prints one line `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ol_pkg.sv tb/tb_orderlight_top.sv \
          --top-module tb_orderlight_top -Mdir obj_top
./obj_top/Vtb_orderlight_top
```

Any other testbench works the same way: name it as the file and as `--top-module`.

- The full-size testbench takes a few minutes to compile.
- The block testbenches compile in seconds.
- Add `-Wno-fatal` if your Verilator version turns lint warnings into errors.

Verilator has no X state, and the design resets everything it reads.
