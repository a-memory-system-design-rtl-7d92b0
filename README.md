# Smart Memories Quad: a programmable memory system in SystemVerilog

## The idea

This is a memory system that is built to be reprogrammed. Its storage is
not a fixed cache. It is a set of small memory blocks called **mats**. Each
mat keeps a few metadata bits beside every data word and can compare and
update them on its own. The behaviour that turns the mats into caches,
local memories or FIFOs comes from a **protocol controller** that is
microcoded. The controller handles every cache miss, coherence request, DMA
transfer and network message by running a chain of short **subroutines**.
Each subroutine runs in one of several functional units. Each unit does one
kind of work: tracking, state update, data movement or network messages.
Each unit looks up what to do in its own configuration memory. You change
the memory model (coherent caches, streaming with DMA, transactions) by
rewriting those tables, not the logic.

The top module `sm_quad` is one **Quad**, built as:

- Four **Tiles**. Each Tile has 16 mats behind a crossbar.
- A two-line **inter-mat network (IMCN)**. It lets a tag mat enable or block
  a store into its data mats in the same cycle.
- One **protocol controller**, shared by the Quad's eight processors.

The processors, the system network and main memory are outside the design.
Their connections are ports of `sm_quad`.

At reset the tables hold a default program:

- MESI-style coherent data caches for the eight processors;
- indexed DMA scatter from local memory to main memory;
- processor-to-processor interrupts.

## Parts

| Module | What it is |
|---|---|
| `mem_mat` | A mat. It has 1024 × 32-bit data words and 8 metadata bits per word. It has a data comparator and a metadata comparator, and read-modify-write (RMW) logic on the metadata. Head/tail pointers let it act as a FIFO. Its total-match output can drive the IMCN, and a write can be made conditional on an IMCN line. |
| `tile_xbar` | The Tile crossbar. It has six ports: the controller's S port and D port, and four processor ports. A fixed priority per mat always lets the controller win. |
| `sm_tile` | 16 mats, the crossbar and the IMCN. |
| `p_unit` | Processor interface. It takes miss requests from eight processors and decodes them through a table into T-Unit calls. It delivers replies to the processors. |
| `t_unit`, `mshr_file`, `ushr_file` | Tracking and serialization. This unit allocates, retrieves and releases tracking registers. There are 24 processor MSHRs, 4 coherence MSHRs and 8 USHRs. It holds back a request whose line already has an MSHR. |
| `s_unit` | State update. A four-stage pipeline probes and updates tags in every Tile and ends in a decision table. |
| `d_unit`, `d_pipe`, `line_buffer` | Data movement. Four data pipes, one per Tile, move lines between mats and the line buffer. A dispatch table turns a subroutine into steps on the pipes. |
| `n_unit` | Network interface, with a separate transmitter and receiver. It has two virtual channels with an adjustable transmit priority, and it reads and writes the line buffer. |
| `dma_unit` | One DMA channel per processor, programmed through registers. Only indexed scatter is built. |
| `int_unit` | Interrupts, raised on DMA completion or by register writes. |
| `protocol_controller` | The units above, plus the call router that carries calls between them. |
| `pc_fifo`, `pc_outq`, `rr_arb`, `sm_pkg` | Shared helpers: a queue, a unit output queue, a round-robin arbiter, and the types and default program. |

### Mats and Tiles

A mat access can do all of these in one cycle:

- read or write a data word;
- read, write or RMW-update its metadata;
- compare the data with a key;
- compare the metadata with a pattern under a mask.

The two comparisons together give the **total match**.

A data cache is built from one tag mat and four data mats. The processor
model in the end-to-end test loads by reading the tag mat and a data mat in
the same cycle. It stores by writing the data mat under the condition that
the tag mat's total match is on the IMCN. In the same access, the tag mat's
RMW logic moves the line from E to M. A miss is sent to the controller as a
message.

Mat layout in each Tile (these are choices of this design):

| Mats | Use |
|---|---|
| 0 | tag mat, even processor |
| 1–4 | data mats, even processor |
| 5 | tag mat, odd processor |
| 6–9 | data mats, odd processor |
| 10–13 | local memory |
| 14 | DMA index memory |
| 15 | FIFO |

Word `w` of a line in set `s` lies in mat `base + w mod 4`, row `2s + w div 4`.

Metadata bits in a tag mat:

- bits [1:0] hold the line state: I=0, S=1, E=2, M=3;
- bit 2 is a spare "R" bit used by the tests.

### How a subroutine chain runs (the hardest part)

Every unit has the same shape:

1. an input arbiter;
2. a configuration memory indexed by the subroutine number;
3. a short pipeline;
4. an output queue.

The arbiter lets a request in only when the output queue can hold it
together with everything already in flight. So a unit never stalls
mid-pipeline, and in-flight work can always drain.

Any unit can call any other. The router in `protocol_controller` carries the
calls: seven callers feed six units. When a subroutine makes two calls, the
output queue sends them one after the other.

A read miss from processor p, with the default program:

1. **P-Unit.** It decodes the request into "allocate processor MSHR".
2. **T-Unit.** It looks the line up in all 28 MSHRs. If another request
   holds the line, this request waits at the input. Otherwise it allocates
   an MSHR, whose number becomes the tracking id.
3. **S-Unit.**
   - AG stage: reads p's tag for the set, to find a victim. In parallel, it
     sends a snoop to the tag mats of the other seven caches, across all
     four Tiles in the same cycle. The mats update their own state (for a
     read, E goes to S) only when the tag matches.
   - M1/M2 stages: condense the responses into three bits: victim dirty,
     remote hit and remote dirty.
   - DM stage: the decision table picks the next calls.
4. **What follows the decision.**
   - Dirty victim: the D-Unit copies it into the line buffer and the N-Unit
     sends a write-back.
   - Another cache holds the line: the D-Unit copies it cache to cache. The
     requester gets M for a write miss or when the copy was dirty, and S
     otherwise.
   - No other cache holds it: the N-Unit sends a Cache Miss to main memory. The Refill comes
     back to the N-Unit receiver, which writes the eight words into the line
     buffer.
5. **Install and reply.** The D-Unit writes the line into p's data mats. The
   S-Unit writes the tag and state, then calls the P-Unit reply and the
   T-Unit release.

A coherence request from main memory starts at the N-Unit receiver. It takes
one of the four coherence MSHRs and snoops all eight caches. It answers with
or without data, depending on whether a dirty copy was found.

Indexed DMA scatter runs as follows:

1. The channel reads the index memory through the S-Unit. The word it
   returns is the destination address.
2. The T-Unit allocates a USHR.
3. The D-Unit copies a line of local memory into the line buffer.
4. The N-Unit sends it.
5. When every acknowledgement has come back, the channel raises its
   processor's interrupt.

### Data pipes

Each pipe has four stages: access generation, two mat-access stages, and a
condition check. A line is moved in one of two ways:

- eight 32-bit single-mat accesses;
- four 64-bit accesses to two adjacent mats.

Each pipe has a 4-entry configuration memory, indexed by {write, 64-bit}.
An entry gives the metadata update to apply and the pattern that every
word's metadata must match. If the pattern fails, the subroutine ends
without its calls.

Pipe latency, measured from pushing an idle pipe's input queue until the
finished step is at the head of its output queue:

- 64-bit line: 8 cycles;
- 32-bit line: 12 cycles.

The pipe tests check these figures.

### Timing

| Unit | Cycles from grant to output queue |
|---|---|
| T-Unit | 1 |
| S-Unit | 4 |
| Data pipe | as above |

Every unit-to-unit call also goes through a round-robin arbiter. The
published design gives no controller latency, so the end-to-end test checks
data and ordering, not miss latency.

## How far it can be trusted

- Every module has its own self-checking testbench with random stimulus.
  Each testbench compares the module against a reference model and prints
  `TB_RESULT checks=N failures=M`.
- Each testbench was also run against a copy of its module with one
  deliberate bug. Every such copy made the testbench fail.
- `tb_sm_quad` runs the full-size Quad with no parameter overrides. It
  checks every processor load against a reference memory. It also checks
  that each of these mechanisms happened at least once:
  - refill and write-back;
  - cache-to-cache transfer;
  - MSHR conflict stall;
  - guarded store hit;
  - coherence replies with and without data;
  - DMA index read, scatter and interrupt;
  - processor interrupt;
  - reprogramming a decision-table entry at run time.
- Everything passes verilator lint and yosys synthesis with no latches and
  no combinational loops. The remaining lint warnings are about width and
  unused bits.
- What is **not** verified:
  - timing closure, area and power;
  - any memory model other than the default program.

## Where it departs from the published design

- **Caches are direct-mapped.** The published configuration uses 2-way data
  caches. The capacity is the same: 4 × 4 KB data mats per processor.
- **No instruction caches.** Instruction fetch is left to the processors'
  crossbar ports.
- **Only part of the message set is programmed.** Cache Miss, Upgrade Miss,
  Refill, Coherence Request (read and read-exclusive), write-back, index
  read and DMA scatter are programmed. Prefetch, Cache Control, uncached
  access, gather, block DMA and all transactional messages are not. The
  hardware has the table slots for them, but no subroutines.
- **Processor replies come from the S-Unit.** In the published design the
  D-Unit holds a small FSM that generates processor replies. Here the S-Unit
  tag-write subroutine calls the P-Unit reply instead.
- **Virtual-channel priority only at the transmitter.** The network
  interface has two virtual channels: requests on 0, replies on 1. A
  configuration write (`CFG_NTX`, address 32) can make the transmitter
  send one channel's messages first. At reset, the transmitter serves its
  callers in plain round robin. The receiver takes flits in the order the
  network delivers them.
- **Sizes the document does not give**, chosen here:
  - mat depth: 1024 words;
  - metadata width: 8 bits;
  - USHR count: 8;
  - queue depths;
  - all message formats and table encodings;
  - the crossbar's port count and priority;
  - the IMCN width: two lines.
- **Tracking-id lookup.** MSHR lookup is by line address only, not also by
  processor number.
- **No live-lock checking.** Nothing checks that a reprogrammed table cannot
  live-lock. As in the original, that is the programmer's job.

## Simulating

Any testbench runs with plain verilator 5 from the repository root. The
package comes first, and the other modules are found through `-y rtl`:

    verilator --binary --timing -Wno-fatal -y rtl +libext+.sv \
        rtl/sm_pkg.sv tb/tb_sm_quad.sv --top-module tb_sm_quad \
        --Mdir obj_sm_quad -o sim
    ./obj_sm_quad/sim

To run another testbench, replace `tb_sm_quad` with its name (for example
`tb_s_unit`). Every testbench ends by printing
`TB_RESULT checks=<n> failures=<m>`. It has a watchdog, so it cannot hang.
The full-size end-to-end run takes a few minutes. The unit testbenches take
seconds.

The simulator is two-state, and all state read by the design is reset. The
configuration memories load the default program from `sm_pkg` at reset. They
can be rewritten at any time through the `cfg` port of `sm_quad`.
