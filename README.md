# SNAP: a sensor-network processor with a hardware event queue

SNAP is a small 16-bit processor built for event-driven message passing. It can
be the processor of a wireless sensor node. It can also be one tile of a chip
with many processors that simulates a sensor network, one simulated node per
processor. In both roles, software does three things over and over:

- wait for something to happen;
- handle an incoming message or a timer event;
- send messages.

SNAP moves the parts of this loop that software usually does into hardware:

* **Pending events live in a timer coprocessor.** It has seven 32-bit
  timestamp registers and a free-running 40-bit incrementer. A register that
  is *on* stands for one scheduled event. When a register equals the current
  time, the coprocessor turns the register off and queues a token naming it.
* **Work is dispatched by one instruction, `DONE`.** `DONE` takes the next
  token from the *executable queue* and jumps to that token's handler. Tokens
  come from the timer and from the incoming-message buffer. With the queue
  empty, `DONE` simply waits. An idle node therefore does nothing at all.
* **Messages go through a register.** Reading r15 removes the next word of the
  incoming message. Writing r15 appends a word to the outgoing message. When
  the outgoing buffer is full, an instruction that writes r15 is skipped rather
  than stalled, so a congested network can never deadlock the processor.
  Software can check the buffer's free space first.

This repository holds synthesizable SystemVerilog for the whole processor. That
covers the fetch and execution units, the function blocks, the two memory banks
with their arbiter, the boot code, the handler table, the executable queue, the
timer coprocessor and the message buffers. Every block has a self-checking
testbench, and one testbench runs the complete processor end to end.

## Block map

```
             net_in_*                                   net_out_*
                |                                           ^
        +-------v--------+                         +--------+-------+
        | incoming buffer|--- r15 reads ---+  +----| outgoing buffer|
        +-------+--------+                 |  |    +--------+-------+
                | message token            |  | r15 writes  | status (free spaces)
        +-------v--------+   token   +-----v--+--------------v------+
 tick ->| timer          |---------->|       execution unit         |
        | coprocessor    |<----------|  decode, register file,      |
        +----------------+  SCHEDULE |  adder, shifter, logic,      |
        +----------------+  CANCEL   |  bit-field, branch, memory   |
        | executable     |  TIMESCALE|  interface                   |
        | queue          |           +--+------^-----+---+-----+----+
        +-------+--------+   B tokens,  |      | I   |   |     | bank 1
                |            TGT        |      |     |   |     v
        +-------v--------+   +----------v------+--+  |   |  +--------+
        | handler table  |-->|   fetch unit       |  |   |  | bank 1 |
        +----------------+   +---------+----------+  |   |  +--------+
                 ^ SETH                | FetchAddr   |   | ExecOp/Addr/Store/Load
                 +---------------------|-------------+   |
                                 +-----v-----------------v--+
                                 |  arbiter -> bank 0       |
                                 |  (+ boot code overlay)   |
                                 +--------------------------+
```

| file | block |
|---|---|
| `rtl/snap_pkg.sv` | widths, opcodes, B-token and timer-command types |
| `rtl/snap_top.sv` | the processor: wiring of all blocks below |
| `rtl/snap_fetch_unit.sv` | program counter and fetch loop |
| `rtl/snap_exec_unit.sv` | decode, operand reads, token generation, execution |
| `rtl/snap_regfile.sv`, `snap_adder.sv`, `snap_shifter.sv`, `snap_logic.sv`, `snap_bitfield.sv`, `snap_branch.sv`, `snap_memif.sv` | function blocks of the execution unit |
| `rtl/snap_timer.sv` | timer coprocessor |
| `rtl/snap_exec_queue.sv` | executable queue (two writers, one reader) |
| `rtl/snap_handler_table.sv` | eight handler addresses for `DONE` |
| `rtl/snap_in_buffer.sv`, `snap_out_buffer.sv` | message buffers |
| `rtl/snap_mem_bank.sv`, `snap_mem_arbiter.sv`, `snap_boot_rom.sv` | memory system |
| `rtl/snap_fifo.sv` | FIFO used by the buffers and by the I/B/TGT channels |

All blocks share one clock, and `rst_n` is an active-low asynchronous reset.
Every connection between blocks is a valid/ready handshake: a word moves in a
cycle where both are high.

## The fetch loop: every word steers the fetch of the next

This is the least familiar part of the design. Instructions are one or two
16-bit words. Every word the fetch unit fetches must be matched by exactly one
*token* on the B channel from the execution unit. The token says two things:

1. how to update the pc once that word has been fetched;
2. whether to forward the word to the execution unit on the I channel;
3. whether to forward the pc instead of the word (`pcout`). Only the jump-and-link
   instruction `JAL` uses this.

A token produced while decoding word *k* therefore governs word *k+1*. This
resembles a branch-delay slot at word granularity. The B channel is a FIFO, so
the execution unit can send both tokens of a two-word instruction at once. The
fetch unit then runs one word ahead of execution.

| pc source (`pcsel_e`) | new pc | used by |
|---|---|---|
| `PC_INC` | pc + 1 | all sequential words |
| `PC_REL` | pc + fetched word | taken conditional branch (offset word) |
| `PC_ABS` | fetched word | `JUMP` (target word) |
| `PC_TGT` | value from the TGT channel | `JR` |
| `PC_DONE` | handler_table[head token of the executable queue] | `DONE` |

Tokens sent by each instruction. "send" means the fetched word is forwarded,
"drop" means it is consumed.

| instruction | first token | second token |
|---|---|---|
| one-word ALU, event ops | INC, send (next instruction) | — |
| `ADDI LD ST BFS BFR` | INC, send (immediate) | INC, send |
| `JUMP t` | ABS, drop (t) | INC, send |
| `JAL d ; t` | ABS, send the pc of t | INC, send |
| `BR` taken / not taken | REL / INC, drop (offset) | INC, send |
| `JR r` | TGT, drop (the next word) | INC, send |
| `DONE` | DONE, drop (the next word) | INC, send |

`JAL` stores the pc it receives plus one in reg[d]. That is the address after
the instruction, so `JR d` returns there.

`JR` and `DONE` have no delay slot. The word after them is fetched but never
executed. Nothing governs the first word after reset, so it is forwarded and
followed by pc + 1.

Without stalls, the fetch unit takes three cycles per word: request, data,
update. The execution unit runs one instruction at a time and takes several
cycles each (decode, three operand-read steps, tokens, immediate, execute).
The I and B channels (4 deep) absorb the difference.

## Events and dispatch

Tokens are 3-bit numbers:

- 0–6 name a timestamp register whose event is due;
- 7 means a message has started arriving.

The incoming buffer inserts token 7 when it accepts a word flagged
`net_in_first`. The queue is 8 deep. If the timer and the buffer insert in the
same cycle, both are accepted, the timer's token first.

The handler table holds eight 16-bit addresses, one per token value. Software
writes a row with `SETH`. After reset, row 7 points at the boot loader and the
other rows point at address 0, whose `DONE` just waits again.

## Timer coprocessor

- **Incrementer.** The 40-bit incrementer advances on every cycle where `tick`
  is high. `tick` is the time base; it comes from outside the processor.
- **Current time.** This is a 32-bit window of the incrementer starting at bit
  `lsb`, which `TIMESCALE` sets to 0–8. Lowering `lsb` by one doubles the rate
  of simulated time against real time.
- **Comparing.** Each time the incrementer changes, the new window is compared
  with every register that is on. Each register is compared in 2-bit digits,
  and the digit results are ANDed from the lowest digit to the highest.
- **Firing.** A match turns the register off and marks its token pending.
  Pending tokens go to the executable queue one per cycle, lowest register
  first.
- **Latency.** A tick at clock edge k changes the incrementer. The token is
  taken by the queue at edge k+2, unless the queue is full.
- **Equality only.** Matching is on equality, not "less than or equal". An
  event whose time has already passed fires only after the 32-bit window wraps
  round, so software must schedule in the future.

| command | effect |
|---|---|
| `SCHEDULE id, hi, lo` | register reg[id] := {reg[hi], reg[lo]}, turned on |
| `CANCEL id` | register reg[id] turned off; a token not yet queued is dropped |
| `TIMESCALE id` | `lsb` := reg[id], clamped to 8 |

A command on a register wins over a match in the same cycle.

## Messages through r15

- **Reading.** Each operand field that names r15 removes one word from the
  incoming buffer. The fields are read in the order d, a, b. `ADD r15, r15, r15`
  therefore adds the next two incoming words and sends the sum. A read waits
  while the buffer is empty.
- **Writing.** A result for r15 goes into the 16-word outgoing buffer.
- **Skipping.** An instruction whose destination is r15 is checked at decode.
  If the outgoing buffer is full, the whole instruction is skipped: it reads no
  operands and writes nothing, but its words are still consumed.
- **Status.** `STATUS d` copies the number of free spaces into reg[d].

## Instruction set

Word 0 has the layout `op[15:12] d[11:8] a[7:4] b[3:0]`. Two-word instructions
carry a 16-bit immediate in word 1. r0 reads 0 and r15 is the message port.

| op | mnemonic | effect |
|---|---|---|
| 0–4 | `ADD SUB AND OR XOR d,a,b` | reg[d] := reg[a] op reg[b] |
| 5, 6 | `SLL SRL d,a,b` | reg[d] := reg[a] shifted by reg[b][3:0] |
| 7 | `ADDI d,a ; imm` | reg[d] := reg[a] + imm |
| 8 | `LD d,a ; imm` | reg[d] := mem[reg[a] + imm] |
| 9 | `ST d,a ; imm` | mem[reg[a] + imm] := reg[d] |
| 10 | `BFS d,a ; hi,lo` | reg[d][hi:lo] := reg[a] (hi in imm[11:8], lo in imm[3:0]) |
| 11 | `BFR d,a ; hi,lo` | reg[a] := reg[d][hi:lo], right-aligned |
| 12 | `BR cond(a), d ; off` | if cond(reg[d]): pc := address of the offset word + off |
| 13 | `JUMP ; target` (b=0), `JR d` (b=1), `JAL d ; target` (b=2) | pc := target / reg[d]; JAL also sets reg[d] := return address |
| 14 | `DONE` (b=0), `CANCEL d` (1), `TIMESCALE d` (2), `SETH d,a` (3), `STATUS d` (4) | event group |
| 15 | `SCHEDULE d,a,b` | timestamp register reg[d] := {reg[a], reg[b]} |

The branch conditions are EQZ 0, NEZ 1, LTZ 2, GEZ 3 and ALWAYS 4.
`tb/snap_asm_pkg.sv` has one encoder function per instruction.

## Memory and booting

There are two banks of 4096 words, and address bit 12 selects the bank.

- **Bank 0** holds code and data. The fetch unit and the execution unit share
  it through a round-robin arbiter.
- **Bank 1** holds data only and belongs to the execution unit, so its loads
  and stores never wait for fetches.
- **Timing.** Both banks answer one cycle after a request.

Addresses 0–31 of bank 0 read from a small boot program instead of the
memory. It works as follows:

1. It starts with `DONE`.
2. The first message, the *startup message*, queues token 7. Handler row 7
   points at the loader at address 2.
3. The loader reads word 0 of the message as a length N and copies the
   following N words to address 32.
4. It jumps there with `JR`.
5. The loaded program's initialisation code installs its handlers with `SETH`,
   schedules its events, and ends with `DONE`.

## Interface of `snap_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, active-low reset |
| `tick` | in | advance the timer's incrementer by one |
| `net_in_valid/ready/data[15:0]/first` | in | words from the network; `first` marks a message's first word |
| `net_out_valid/ready/data[15:0]` | out | words to the network |

The network between processors, the host computer that sends the startup
message, and the radio of a physical node are outside this design. They
connect at these ports.

Parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `BANK_AW` | 12 | words per bank = 2^BANK_AW |
| `IN_DEPTH` | 16 | depth of the incoming buffer |
| `OUT_DEPTH` | 16 | depth of the outgoing buffer |
| `EQ_DEPTH` | 8 | depth of the executable queue |
| `CH_DEPTH` | 4 | depth of the I and B channels |
| `BOOT_AW` | 5 | the boot overlay covers 2^BOOT_AW words |
| `LOAD_ADDR` | 32 | where the startup message is loaded |

`snap_timer` has its own parameters: `NTS` = 7, `INC_W` = 40 and `TS_W` = 32.

## Where this RTL departs from the original SNAP

The processor this follows was a quasi-delay-insensitive asynchronous circuit.
Its units were linked by handshake channels, and no clock was involved. This
RTL keeps the block structure and the channels (I, B, TGT, FetchAddr/FetchLine,
ExecOp/ExecAddr/ExecStore/ExecLoad, the token paths), but it runs them as
clocked valid/ready handshakes. Cycle counts here are therefore this
implementation's own.

These parts follow the original description:

- the timer (seven 32-bit registers, 40-bit incrementer, 32-bit window, 2-bit
  digits compared in a low-to-high AND chain);
- the eight-row handler table;
- the r15 message port, with skipping on a full buffer and a free-space status
  register;
- the two memory banks with an arbiter on the shared bank;
- the word-by-word B-token fetch scheme, with the pc taken from the
  incrementer, the adder, FetchLine, TGT or the executable queue;
- the semantics of `BFS`, `BFR`, `SCHEDULE`, `CANCEL`, `TIMESCALE`, `DONE`,
  `ADDI` and `JUMP`.

These are this design's own choices:

- the instruction encoding and the other instructions;
- `JAL`. The original's fetch unit can send the pc on the I channel, but no
  instruction that uses it is described, so `JAL` is this design's user of
  that path;
- the operand order for r15 reads;
- the branch conditions;
- the layout of the bit-field range;
- all buffer and queue depths, and the memory size;
- the round-robin arbitration;
- the `net_in_first` message framing;
- the boot code and its startup-message format;
- reset values;
- what `JR` and `DONE` do with the word after them.

These parts of the original are not reproduced:

- **Concurrent execution.** The original lets several function blocks work at
  once under pipelined mutual exclusion. Here the execution unit completes one
  instruction before decoding the next.
- **The sensor-node variant.** Its radio interface (serial lines, mode pins,
  radio event tokens) is not included.

## Simulating

Each testbench in `tb/` checks its own results. It prints
`TB_RESULT checks=N failures=M` and stops. Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/snap_pkg.sv tb/snap_asm_pkg.sv tb/tb_snap_top.sv --top-module tb_snap_top
./obj_dir/Vtb_snap_top
```

For another block, replace `tb_snap_top` by its testbench,
`tb_snap_<block>`.

`tb_snap_top` runs the processor at its default parameters, through these
phases:

1. It boots a program sent as the startup message.
2. It handles messages. One message has a second word that arrives late, so a
   read of r15 has to wait.
3. A 20-word burst goes out while the network refuses output. 16 words are
   buffered, 4 writes are skipped, and the status register reads 0.
4. It runs two timer events at time scale 1/4 and checks that a cancelled
   event never runs.
5. It calls a subroutine with `JAL` and returns from it with `JR`.
6. It checks that each event handler replies within 120 cycles of its
   timestamp being reached.

The testbench also counts each mechanism: message and timer dispatch, `DONE`
waiting, blocked r15 reads, skipped writes, bank-0 and bank-1 accesses, `REL`,
`ABS` and `TGT` pc updates, `JAL`, `TIMESCALE`, `CANCEL`, `BFS` and `BFR`. A mechanism
that never happened counts as a failure. The whole run takes about 10,000
cycles.

`tb_snap_tbs_node` runs the processor as one node of a time-based network
simulation, also at the default parameters:

1. Seven event messages arrive, each carrying a register number and a 32-bit
   timestamp. The message handler files each event with a single
   `SCHEDULE r15, r15, r15`, so all seven timestamp registers are on at once.
2. Time runs. The handlers must reply in timestamp order, and of two events
   with the same time, the lower register goes first.
3. One further message arrives in exactly the cycle the timer queues an event.
   The queue must take both tokens at once, timer first.

To change the programs the tests run, edit `build()` in `tb/tb_snap_top.sv`.
It places instructions at fixed addresses using the encoders in
`tb/snap_asm_pkg.sv`. `tb/tb_snap_tbs_node.sv` has its own `build()`.
