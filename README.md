# A point-to-point OCP link with burst and tag (thread) extensions

Two IP cores that know nothing about each other's bus can still talk if
each of them speaks the Open Core Protocol (OCP) at its edge. This RTL builds
such a link. An initiating core issues reads and writes. A target core, here
a word memory, executes them. Between the two sits one OCP interface that
carries three kinds of traffic:

- **simple transfers**: posted write `WR`, read `RD` and non-posted write
  `WRNP`;
- **precise INCR bursts**: up to 15 words, one request per word on
  consecutive clocks, marked with `MReqLast` and `SRespLast`;
- **tagged transfers** (the "thread extension"): a request carries a tag ID
  and an in-order flag. Out-of-order requests may be answered in a different
  order from the one in which they were sent.

Each core may run on its own clock. The OCP link runs on a third, common
OCP clock. Dual-clock FIFOs on both sides decouple the three clock domains
(asynchronous mode). A core that shares the OCP clock can use single-clock
FIFOs instead (synchronous mode).

The design follows the structure and signal set of the paper *High
Performance and Scalable on-chip Bus with Thread Extension using Open Core
Protocol*. That paper describes the behaviour in prose and timing diagrams
and prints no micro-architecture. The queueing, scheduling, clock crossing
and core-side interfaces below are therefore this design's own. The section
*Where this design makes its own choices* lists them.

## The chain

```
 m_clk domain        |            ocp_clk domain               |    s_clk domain
                     |                                         |
 initiating core     |                                         |
  breq  ----------> [async FIFO] --> +------------+   OCP    +-----------+
  wd    ----------> [async FIFO] --> | ocp_master | <======> | ocp_slave | --> [async FIFO] --> ocp_mem_core
  rsp   <---------- [async FIFO] <-- +------------+  ocp_if  +-----------+ <-- [async FIFO] <--  (target core)
                     |                                         |
 \___________ ocp_sys_master ____________/   \________ ocp_sys_slave ________/
```

| module | role |
|---|---|
| `ocp_top` | the whole link. Three clocks, one reset, and the initiating core's three streams as ports |
| `ocp_sys_master` | system master: the initiating core's side. It holds three clock-crossing FIFOs and the OCP master |
| `ocp_master` | turns burst descriptors into OCP requests, runs the write-data handshake and passes responses back |
| `ocp_if` | the OCP signal bundle, with assertions for the three handshakes |
| `ocp_slave` | accepts requests and write data, sorts them into queues, schedules them and drives responses |
| `ocp_sys_slave` | system slave: the OCP slave plus two FIFOs into the target core's clock |
| `ocp_mem_core` | target core: a 256 × 32-bit memory with a one-clock response |
| `async_fifo` | Gray-pointer dual-clock FIFO |
| `sync_fifo` | single-clock FIFO, used for the queues and for synchronous mode |
| `ocp_pkg` | widths, OCP codes and the record types that cross module boundaries |

When a core has no clock of its own, connect `ocp_clk` to its clock input as
well. The dual-clock FIFOs work unchanged with equal clocks, but they still
cost two synchronizer clocks per crossing. In that case the system block can
run in synchronous mode instead (next section).

## Synchronous and asynchronous mode

Each system block has an `ASYNC` parameter. `ocp_top` exposes it as `M_ASYNC`
for the system master and `S_ASYNC` for the system slave.

- **Asynchronous mode (`ASYNC` = 1, default).** The core may run at any
  frequency. Its streams cross through the Gray-code `async_fifo`.
- **Synchronous mode (`ASYNC` = 0).** The core must run on the OCP clock.
  Connect `ocp_clk` to its clock input. The same FIFOs remain as buffers,
  but they are single-clock `sync_fifo`s, and a word can be read on the
  clock after it is written.

The two blocks choose independently. For example, a master core without a
clock can be synchronous while the target keeps its own slower clock.
Nothing checks that a synchronous block really shares the OCP clock.

## The OCP signals

Each of the three phases completes on the OCP clock edge where its
"accept" is high while it is offered. Whatever is offered is held unchanged
until it is accepted. The assertions in `ocp_if` check this.

| phase | master drives | slave drives | completes when |
|---|---|---|---|
| request | `MCmd`(3) `MAddr`(32) `MBurstLength`(4) `MBurstSeq`(3) `MBurstPrecise` `MReqLast` `MTagID`(1) `MTagInOrder` | `SCmdAccept` | `MCmd != IDLE && SCmdAccept` |
| write data | `MData`(32) `MDataValid` | `SDataAccept` | `MDataValid && SDataAccept` |
| response | `MRespAccept` | `SResp`(2) `SData`(32) `STagID`(1) `STagInOrder` `SRespLast` | `SResp != NULL && MRespAccept` |

The codes are those of the OCP specification:

- `MCmd`: `IDLE`=0, `WR`=1, `RD`=2, `WRNP`=5;
- `SResp`: `NULL`=0, `DVA`=1;
- `MBurstSeq`: `INCR`=0. This is the only sequence used.

Addresses are byte addresses. A burst steps them by the word size, 4 bytes.

### Transfer types

- **WR** is posted. The slave answers it only when `WRITE_RESP_EN` is 1.
- **WRNP** is a write that is always answered with `DVA`. Its response
  carries zero data.
- **RD** is answered with `DVA` and the read word on `SData`.
- **Bursts.** A burst of length *n* is *n* requests on consecutive clocks,
  as long as `SCmdAccept` stays high:
  - `MBurstLength` = *n* and `MBurstPrecise` = 1 throughout;
  - the address rises by 4 from one request to the next;
  - `MReqLast` is set on the last request.
  
  Every response carries the `MReqLast` of its request back as `SRespLast`.
  Length 1 is a simple transfer.
- **Write data handshake.** Write data does not travel with the request. The
  master offers a write request only when it already holds the data word.
  When the request is accepted, the word moves into a small queue. That queue
  drains over `MData`/`MDataValid`, one word per `SDataAccept`. The data phase
  therefore starts one clock after its request at the earliest, and it may
  lag further. The slave pairs requests with data words in arrival order.
- **Without the data handshake** (`DATA_HS` = 0). The write word travels on
  `MData` together with its request and is taken with `SCmdAccept`. This is
  the basic transfer style. `MDataValid` and `SDataAccept` then stay low,
  and the slave accepts a write only when its data queue also has room.

## Tagged transfers and the slave's scheduler

This is the part that needs the most care.

Every request carries `MTagID` (two IDs, 0 and 1) and `MTagInOrder`.
Requests marked in order must not be reordered against each other and should
not be delayed. Out-of-order requests may be delayed and reordered between
tags, but they keep their order within one tag. Keeping that order is what
keeps the words of a burst in sequence.

The slave handles requests in four steps:

1. **Arrival.** Requests enter a 4-entry arrival queue. `SCmdAccept` means
   only "this queue has room". Write data words enter a separate 2-entry
   queue, and `SDataAccept` means "that queue has room". The data queue is
   deliberately shorter. It lets the data handshake push back on its own,
   before the request path does.
2. **Dispatch.** The head of the arrival queue is moved into one of three
   4-entry queues: the in-order queue, the tag-0 queue or the tag-1 queue.
   A write waits at the head until its data word is there. Each entry is
   stamped with its arrival time.
3. **Scheduling.** One operation per OCP clock goes to the target core:
   - the in-order queue is served first whenever it is not empty;
   - out-of-order queues are closed until some out-of-order request has
     waited `OOO_HOLD` (8) clocks;
   - once they are open, the head of the highest non-empty tag queue is
     served, so tag 1 goes before tag 0.
4. **Response.** The core answers in the order it received operations. The
   slave drives each answer on `SResp` with the operation's tag, in-order
   flag and last flag (`STagID`, `STagInOrder`, `SRespLast`).

The intended effect is the classic example of the tag extension. Take four
requests issued back to back:

| order sent | request | tag / order |
|---|---|---|
| 1 | `RD1` | tag 0, out of order |
| 2 | `WR2` | in order |
| 3 | `RD3` | tag 1, out of order, reads `WR2`'s address |
| 4 | `RD4` | in order |

They reach the memory as `WR2`, `RD4`, `RD3`, `RD1`. The answers come back
as DVA2 (if WR responses are on), DVA4, DVA3 with ID1 and `WR2`'s data, and
finally DVA1 with ID0.

Points to know before changing the scheduler:

- The hold is what lets a later in-order request overtake an earlier tagged
  one. With a hold shorter than the pipeline depth between master and
  slave, about 5 clocks, the reordering in the example disappears.
- Priority between tags is fixed. Constant tag-1 traffic delays tag 0
  without bound. In-order traffic delays all tagged traffic without bound.
- Tagged requests that target the same address as in-order ones are not
  kept in order with them. That is the contract of out-of-order tags.
- The arrival stamps are 16 bits wide. A tagged request that is held for
  more than about 65 000 clocks while waiting for the bus can wait one more
  wrap of the stamp.

## Clock crossing

`async_fifo` is the usual Gray-code design:

- each side has a binary pointer with an extra wrap bit;
- the pointer is published in Gray code and read on the other side through
  two flip-flops;
- `wfull` is computed in the write domain and `rempty` in the read domain;
- both flags are pessimistic and never wrong;
- reads are first-word-fall-through.

A word written at one edge makes `rempty` fall after the second following
read edge. With unrelated clocks that can take one read clock longer. All
domains share one asynchronous active-low reset, `rst_n`. Hold it low for a
few cycles of the slowest clock and release it while no traffic is
offered. No reset synchronizers are included.

## Core-side interface of `ocp_top`

All streams are valid/ready in the `m_clk` domain, and a word moves on a
clock edge where both are high.

- **`breq` / `breq_valid` / `breq_ready`**: one burst descriptor,
  `burst_req_t`. It holds `cmd` (`CMD_WR`, `CMD_RD` or `CMD_WRNP`), `addr`
  (the start byte address), `len` (1 to 15 words), `tag` and `inorder`.
- **`wd_data` / `wd_valid` / `wd_ready`**: write data, one 32-bit word per
  written word, in descriptor order.
- **`rsp` / `rsp_valid` / `rsp_ready`**: responses, `resp_t`. It holds
  `resp`, `data`, `tag`, `inorder` and `last`. Responses of one in-order
  stream or one tag come back in request order. Responses of different
  classes may be interleaved in any order.

## Timing

With all three clocks tied together, a single read on an idle link returns
16 clocks after its descriptor is taken. The 16 clocks break down as:

- four FIFO crossings (descriptor, operation, core response, OCP response)
  of 3 clocks each, 12 in total;
- request accept, dispatch, scheduling and the memory's registered answer,
  1 clock each.

With both system blocks in synchronous mode, each FIFO passes a word in one
clock, so the same read takes 8 clocks (4 + 4).

A burst streams one request per OCP clock. The target memory takes one
operation per s_clk. Throughput is therefore limited by the slower of the
two clocks and by how often the initiating core accepts responses.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `ocp_pkg` | `ADDR_W`, `DATA_W` | 32, 32 | address and data width |
| `ocp_pkg` | `BLEN_W` | 4 | `MBurstLength` width (bursts up to 15 words) |
| `ocp_pkg` | `NUM_TAGS` | 2 | tag IDs |
| `ocp_top` | `FIFO_DEPTH` | 8 | depth of every clock-crossing FIFO |
| `ocp_top` | `Q_DEPTH` | 4 | depth of each in-order/tag queue in the slave |
| `ocp_top` | `OOO_HOLD` | 8 | clocks before out-of-order requests may be served |
| `ocp_top` | `WRITE_RESP_EN` | 0 | 1: WR is answered with DVA like WRNP |
| `ocp_top` | `DATA_HS` | 1 | 1: separate write-data phase; 0: write data with the request |
| `ocp_top` | `MEM_WORDS` | 256 | words in the target memory (address taken modulo its size) |
| `ocp_top` | `M_ASYNC`, `S_ASYNC` | 1, 1 | mode of the system master and slave: 1 asynchronous, 0 synchronous (`ASYNC` in each block) |
| `ocp_slave` | `ARR_DEPTH`, `WD_DEPTH` | 4, 2 | arrival and write-data queue depths |
| `ocp_master` | `DQ_DEPTH` | 4 | master's write-data queue |

## Where this design makes its own choices

- **32-bit address and data, and the command and response codes.** These
  match the simulation traces that accompany the source description
  (`MCmd` 1 = write, 2 = read, `SResp` 1 = DVA). `WRNP` = 5 and `INCR` = 0
  come from the OCP specification.
- **Posted WR by default.** The source description is inconsistent here. Its
  basic example leaves `WR` unanswered and says `WRNP` differs from `WR` by
  its `DVA`. Its burst and tag examples show `DVA` for `WR`. Set
  `WRITE_RESP_EN` = 1 for the second behaviour.
- **Byte addresses.** The burst example steps by 4 (0x0, 0x4, 0x8, 0xC). One
  simulation trace steps by 1 (0x40, 0x41), which reads like word
  addressing. Here 0x40 and 0x41 fall in the same word.
- **Data handshake on by default.** The basic examples put write data in
  the request phase. The simulation traces of the implemented design use a
  separate, handshaked data phase. The default follows the traces.
  `DATA_HS` = 0 gives the other style.
- **Core-side descriptors.** The traces show a 32-bit control word
  (`mcontrol`) from the core. Its bit fields are not defined, so the
  descriptor format above replaces it.
- **The slave's micro-architecture.** The queue structure, `OOO_HOLD`,
  higher-tag-first priority and queue depths are all choices. The only given
  rules are that in-order traffic is served in order and first, that
  tagged traffic may be delayed, and that tags allow priority-based transfer.
- **FIFOs in synchronous mode.** The source says synchronous mode "enables
  buffer usage" and asynchronous mode uses FIFOs for flow control. Here both
  modes keep FIFOs of the same depth. Only the clocking differs.
- **The target core.** It is a plain memory. The source leaves the cores
  open.
- **Scope.** The source also sketches a whole SoC: CPU, DMA engine, memory,
  a high-speed OCP interconnect, a bridge, a peripheral interconnect, and
  timer and I/O devices. It does so only to show where OCP links are used.
  None of that is built. This RTL is the single point-to-point link that
  the source designs.

## Simulation

Every testbench prints one `TB_RESULT checks=N failures=M` line and ends with
`$finish`. Each has a watchdog. Build one with Verilator 5, from the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_ocp_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/ocp_pkg.sv tb/tb_ocp_top.sv -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_ocp_top` by its name.

| testbench | what it establishes |
|---|---|
| `tb_ocp_top` | End to end at the default parameters, with three unrelated clocks and a slow target. It fills memory with WRNP bursts, then runs 300 random bursts (WR/WRNP/RD, length 1-8, random tag and order flag) while responses are accepted only part of the time. Each class (tag 0, tag 1, in order) uses its own address region, so data stays predictable. Every response is checked for code, data, tag and `SRespLast`. It also counts that each mechanism happened: command, data and response stalls, bursts, posted and non-posted writes, reads, responses of each class, and reordering. |
| `tb_ocp_top_basic` | The same traffic and checks as `tb_ocp_top` with `DATA_HS` = 0. The data-handshake signals must stay silent, and write requests must be stalled at least once. |
| `tb_ocp_top_sync` | The same traffic and checks as `tb_ocp_top`, with the system master in synchronous mode (`m_clk` tied to `ocp_clk`) and the system slave asynchronous to a slower `s_clk`. |
| `tb_ocp_examples_sync` | The sequences of `tb_ocp_examples`, with both system blocks synchronous on one clock. The responses and their order must be unchanged, and the idle round trip must be 8 clocks. |
| `tb_ocp_examples` | The example sequences on one shared clock: simple WR/RD/WRNP, a 4-word write and read burst (requests on 4 consecutive clocks, `MReqLast` and `SRespLast` on the 4th), the four-request tag example, and the 16-clock idle round trip. |
| `tb_ocp_master` | The burst request sequence, gap-free bursts, the data-phase order (never ahead of its request) and response pass-through, under random `SCmdAccept`/`SDataAccept`. |
| `tb_ocp_slave` | The tag example's exact scheduling order, and `SCmdAccept`/`SDataAccept` back-pressure with a stalled core. |
| `tb_ocp_sys_master`, `tb_ocp_sys_slave` | Each wrapper across two unrelated clocks, against a behavioural model of the other side. |
| `tb_async_fifo` | Crossing delay, full and empty flags, and random streaming both ways between unrelated clocks. |
| `tb_ocp_mem_core` | Memory contents, one-clock latency and back-pressure. |

The simulation is two-state. Memories are not reset, so testbenches read only
words they have written.
