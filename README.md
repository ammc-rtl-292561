# AMMC — a multi-core memory controller that schedules without a master core

A heterogeneous multi-core system puts accelerators and small soft processors
side by side. All of them need data from one external SDRAM, usually in
strided or irregular patterns. In the usual arrangement a master processor
running a real-time OS decides who goes next, computes the addresses, and
copies the data. The AMMC (Advanced Multi-core Memory Controller) moves all of
that into hardware:

* Every core has a **Specialized Memory**, a local buffer the core computes on.
* Access patterns are written once, at program time, as **descriptors**. Each
  one is a base address, a size, a stride and a link to the next descriptor.
  A request from a core is then just one bit: "run my pattern".
* A hardware **Scheduler** orders the requests. In *symmetric* mode the order
  is first come, first served. In *asymmetric* mode each core has a
  programmed priority. The mode can be changed while the system runs.
* A **Memory Manager** expands the descriptors into addresses (the Address
  Manager) and moves the words (the Data Manager). Both reuse what they
  already have on chip.
* A **Pattern Aware SDRAM Controller** runs the accesses on the SDRAM.
* Four **kernel timers** per port count the cycles each request spends in
  scheduling (Ts), memory management (Tm), transfer (Tt) and computation (Tc).

This repository holds synthesizable SystemVerilog for all of these units. The
default configuration has nine core ports, one per application kernel: five
accelerator kernels (FIR, FFT, matrix multiply, Laplacian, 3-D stencil) and
four processor kernels (CRG, Huffman, In_Rem, N-Body) shared by two
processors.

## Data flow of one request

```
core_req[p] ──► Scheduler ──(port, task)──► Address Manager ──records──► record FIFO ──► Data Manager ──► SDRAM controller ──► SDRAM
                  │  Program-Time Priority      │  Descriptor Memory                        │  reuse buffer        (open-row)
                  │  Descriptor, Comparator,    │  Address Buffer                           │
                  │  Task Placer, Dispatch      │                                           ├──► Specialized Memory[buf] (port B)
                  ▼  Descriptor                 ▼                                           ▼
               Ts counter                   Tm counter                                  Tt counter, core_done[p]
```

1. The core raises `core_req[p]`. The scheduler accepts it if port `p` has no
   request in flight. A port holds at most one request, so the queue never
   needs more than `NUM_TASKS` entries.
2. The request goes into the Dispatch Descriptor, an ordered queue (next
   section). The queue head is handed to the Address Manager. The head
   carries the requesting port and the Task ID programmed for that port.
3. The Address Manager walks the task's descriptor chain. For every element
   it emits one *address record*: the direction, the target buffer, the
   SDRAM word address, the local buffer address and the requesting port. The
   final record is marked `last`.
4. The Data Manager executes the records one at a time:
   * a read moves a word SDRAM → Specialized Memory;
   * a write moves a word Specialized Memory → SDRAM.

   After the `last` record it pulses `core_done[p]`. That frees the port in
   the scheduler.

The units run concurrently. The scheduler keeps accepting and ordering new
requests while the managers work. A record FIFO of `REC_FIFO_DEPTH` = 16
entries (`record_fifo`) sits between the two managers. Address generation
therefore runs ahead of the transfers, and the Address Manager can start
expanding the next request while the Data Manager is still moving the
previous one.

## Scheduling: Comparator, Task Placer, Dispatch Descriptor

This is the part with the most behaviour to understand.

* **Program-Time Priority Descriptor** (`priority_descriptor`). For each port
  it holds a Task ID and a priority. Priority 1 is the highest. After reset,
  port *i* runs task *i* at priority 1.
* **Comparator** (`comparator`). Several requests may arrive in one cycle.
  They wait in an "arrived" set, and the Comparator forwards one per cycle:
  the best priority first, and the lowest port among equals. In symmetric
  mode it simply takes the lowest port.
* **Task Placer** (`task_placer`). It decides where the forwarded request
  enters the queue:
  * *symmetric*: at the tail, which gives FIFO order;
  * *asymmetric*: in front of the first queued entry with a strictly worse
    priority. Higher priorities therefore run first, and requests of equal
    priority stay in arrival order. This matches the rule that equal
    priorities are served FIFO, as in the architecture-based policy where
    all cores of one type share a priority.
* **Dispatch Descriptor** (`dispatch_descriptor`). The ordered queue itself.
  An insert and a dequeue may happen in the same cycle. The insert position
  is then taken relative to the queue before the head left.

**Changing the mode at run time.** The mode affects only *where a new
request is placed*. Entries already queued keep their order. For example:

1. In symmetric mode, port 8 (priority 9) and then port 6 (priority 7) are
   queued.
2. The mode switches to asymmetric.
3. Port 0 (priority 1) arrives and goes to the head.
4. Port 7 (priority 8) arrives and goes in front of port 8.

The dispatch order is 0, 7, 8, 6. `tb_scheduler` checks exactly this case.

A port's request is finished only by `core_done`. A core that keeps
`core_req` high while it is still computing is accepted again in the cycle
after its `core_done`. This is the "request & busy" state of a core with two
buffers.

## Descriptors and address generation

A descriptor (`desc_t` in `ammc_pkg`) has these fields:

| field    | bits | meaning |
|----------|------|---------|
| Command  | 1    | 0: SDRAM → local buffer, 1: local buffer → SDRAM |
| Task ID  | 4    | which Specialized Memory the data goes to or comes from |
| External Address | 24 | SDRAM word address of element 0 |
| Priority | 4    | stored only; scheduling uses the Program-Time Priority Descriptor |
| Size     | 12   | number of elements (0 is treated as 1) |
| Stride   | 16   | two's-complement distance between elements, in words |
| Offset   | 3    | 0: last descriptor; otherwise next = (index + Offset) mod 8 |

The fields are as specified. The widths, the meaning of Offset and the
handling of Size 0 are this implementation's choices.

Element *i* of a descriptor is at `External Address + i × Stride`. The local
buffer address counts up from 0 over the whole chain, so a chain fills its
buffer contiguously. A regular pattern (stencil rows, an FFT stride, a matrix
column) is one descriptor. An irregular pattern is a chain of descriptors,
possibly with negative strides, and can mix reads and writes in one request.
The walk stops after 8 descriptors, so a cyclic chain cannot hang the
controller.

**Address Buffer.** The Address Manager stores the records it generates, up
to `ABUF_DEPTH` = 64, tagged with the task. If the same task is dispatched
again and its whole list fitted, the list is replayed from the buffer. No
descriptor is fetched, and the replay runs at one record per cycle from the
cycle after acceptance. A fresh walk needs two extra cycles per descriptor.
Any descriptor write clears the buffer.

## Data reuse and the SDRAM side

**Data Manager.** It keeps a direct-mapped, write-through **reuse buffer** of
`REUSE_DEPTH` = 64 words, indexed by the low address bits.

* A read that hits is served on chip. Overlapping stencil windows and
  repeated rounds over the same inputs hit this way.
* Every write updates the buffer, so the buffer never returns stale data.

Cycles per record:

| record | cycles |
|--------|--------|
| reuse hit | 4 |
| read miss | 5 + SDRAM latency |
| write | 5 |

**SDRAM controller** (`sdram_controller`). A single-data-rate controller with
burst length 1.

* **Address map:** `{row, bank, column}` with the column in the low bits, so
  unit-stride and short-stride patterns stay in one row.
* **Open rows:** a row stays open after an access. An access to the open row
  goes straight to READ or WRITE (`row_hit`). Another row needs PRECHARGE and
  ACTIVATE first (`row_miss`).
* **Refresh:** every `T_REFI` cycles the controller closes all banks and
  issues AUTO REFRESH.
* **Timing parameters:** `T_RCD`, `T_RP`, `T_CL`, `T_WR` and `T_RFC`, in
  controller clocks.
* **Read latency:** `T_CL + 3` cycles from acceptance to `rsp_valid` on a
  row hit.

The command bus is brought out of `ammc_top` as plain signals:

* `sd_cs_n`, `sd_ras_n`, `sd_cas_n`, `sd_we_n`, `sd_ba` and `sd_a`;
* write data on `sd_dq_out`, qualified by `sd_dq_oe`;
* read data on `sd_dq_in`.

## Files

| file | unit |
|------|------|
| `rtl/ammc_pkg.sv` | widths, `desc_t`, `disp_t`, `addr_rec_t` |
| `rtl/ammc_top.sv` | the whole controller |
| `rtl/scheduler.sv` | scheduler, built from `priority_descriptor`, `comparator`, `task_placer`, `dispatch_descriptor` |
| `rtl/descriptor_memory.sv` | Descriptor Memory, one block of 8 descriptors per task |
| `rtl/address_manager.sv` | descriptor walk and Address Buffer |
| `rtl/data_manager.sv` | word mover and reuse buffer |
| `rtl/record_fifo.sv` | record FIFO between the two managers |
| `rtl/specialized_memory.sv` | dual-port local buffer (port A core, port B controller) |
| `rtl/sdram_controller.sv` | Pattern Aware SDRAM Controller |
| `rtl/kernel_timers.sv` | Ts/Tm/Tt/Tc counters |
| `tb/tb_<unit>.sv` | self-checking testbench of each unit |
| `tb/tb_ammc_top.sv` | end-to-end test at the default size |
| `tb/sdram_model.sv` | behavioural SDRAM with protocol checks (testbench only) |

Default parameters of `ammc_top`:

| parameter | default |
|-----------|---------|
| `NUM_TASKS` | 9 |
| `DESC_PER_TASK` | 8 |
| `LM_DEPTH` | 1024 words per Specialized Memory |
| `ABUF_DEPTH` | 64 |
| `REUSE_DEPTH` | 64 |
| `REC_FIFO_DEPTH` | 16 |
| `T_REFI` | 780 |

Data words are 32 bits. The port, task and priority fields are 4 bits wide,
so up to 16 ports fit without changing the package.

## Interface of `ammc_top`

**Program time.** These writes can happen at any time, but are meant to be
done before the cores start.

* `prog_desc_wr`, `prog_desc_task`, `prog_desc_idx`, `prog_desc`: write one
  descriptor.
* `prog_prio_wr`, `prog_prio_port`, `prog_prio_task`, `prog_prio_val`: set a
  port's Task ID and priority.
* `symmetric`: 1 for FIFO, 0 for priority scheduling.

**Cores**, one entry per port:

* `core_req` is a level request.
* `core_done` is a one-cycle pulse when the request has finished.
* `core_busy` is used only by the Tc timer.
* `core_lm_en`, `core_lm_we`, `core_lm_addr`, `core_lm_wdata` and
  `core_lm_rdata` are the core's port to its own Specialized Memory. Reads
  have one cycle of latency.

**Observation:**

* `ts`, `tm`, `tt`, `tc`: per-port counters, cleared by `timers_clear`.
* `ev_*`: one-cycle strobes for a dispatch, an Address Buffer hit, a reuse
  hit, an SDRAM row hit, a row miss and a refresh.

Reset is an active-low asynchronous `rst_n`. The storage arrays (descriptors,
Specialized Memories, buffer contents) are not reset. Only valid bits and
control state are.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. Each one has a watchdog. With Verilator 5, from the repository
root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/ammc_pkg.sv \
          -y rtl -y tb tb/tb_ammc_top.sv --top-module tb_ammc_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_ammc_top` with any `tb_<unit>` to test one unit. The package
is named first because the other files import it; every other module is
found through `-y`. `-Wno-fatal` keeps width warnings in the testbench
arithmetic from stopping the build.

**What `tb_ammc_top` does.** It runs the nine ports at the default size for
about 14,000 cycles:

* it starts in symmetric mode;
* it switches to the priorities of "Group I" while requests are in flight
  (FIR 1, FFT 4, Mat_Mul 5, Laplacian 3, 3-D stencil 2, CRG 6, Huffman 7,
  In_Rem 8, N-Body 9);
* it finishes with one task alone, so that the Address Buffer is reused.

**What it checks:**

* every word each core receives, and every word written to SDRAM;
* that every dispatch obeys the active ordering rule;
* the Tc counters against the busy cycles it drove;
* that the SDRAM model saw no protocol error;
* that each mechanism happened at least once: both modes, the mode switch, a
  priority overtake, Address Buffer and data reuse, row hits, row misses,
  refresh, linked descriptors and "request & busy".

**`tb_ammc_policies`** runs the same nine kernels once under each priority
table of the evaluation: symmetric, Groups I, II and III, and
architecture-based (accelerators 1, processors 2). For each one it checks
the data and the ordering rule, and it prints each policy's total cycle
count and timers.

The unit testbenches check the following:

* the scheduler orders in both modes;
* the Address Manager's records, and its cycle counts for a walk and a replay;
* the Data Manager's external-read count, compared with a model of the reuse
  buffer;
* the SDRAM controller's row hit and miss prediction, its read latency, data
  integrity and refresh rate.

## How far it follows its source, and where it departs

The unit structure and the behaviour of each unit follow the published AMMC
description:

* descriptor fields and linking;
* per-core local buffers;
* the priority descriptor, comparator, task placer and dispatch queue;
* symmetric and asymmetric modes, with FIFO among equal priorities and mode
  changes at run time;
* the address buffer and data reuse;
* the four timers per kernel.

That description gives the function of most units but not their insides.
The following are therefore this implementation's own choices:

* all widths and depths;
* the handshakes;
* the Offset encoding;
* the organisation of the Address Buffer, a single task-tagged list;
* the organisation of the reuse buffer, direct-mapped and write-through;
* the SDRAM command set and address map.

Known departures:

* **Bus System.** The bus between cores and controller is not modelled. Its
  signals are plain ports of `ammc_top`.
* **Cores.** The cores themselves (ROCCC-generated accelerators and
  MicroBlaze processors) are outside this RTL. The testbench models their
  request and buffer traffic.
* **SDRAM interface.** The board's DDR2 memory and its PHY are replaced by a
  single-data-rate command bus with burst length 1. A DDR2 PHY would go
  between `sdram_controller` and the pins.
* **Descriptor Priority field.** It is carried but unused. Scheduling
  priorities come only from the Program-Time Priority Descriptor.
* **One word at a time.** The Data Manager executes one word at a time, with
  one SDRAM access in flight. Pipelined or burst SDRAM accesses would raise
  throughput. No rate is specified to check against.
* **Ports.** The default of nine ports is the evaluated system: five
  accelerators and two processors, each processor running two kernels. The
  larger system with eight accelerators and two dual-kernel processors needs
  `NUM_TASKS = 12`.
