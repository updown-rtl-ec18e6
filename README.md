# UpDown accelerator RTL

A conventional core keeps track of every memory access that is still in flight.
It uses reorder-buffer entries, reservation stations, MSHRs or FIFO slots for this.
Those small local name spaces cap how many requests can be outstanding at once.
With DRAM latency in the hundreds of cycles, that cap limits the bandwidth the
core can use, however fast the memory is.

UpDown removes the cap. Every memory request carries its own *continuation
word*: the name of the thread and the handler that should run when the response
arrives. The lane that sent the request keeps no record of it. The response
returns as an ordinary event, addressed by that word, and is queued like any
other event. The only limit on outstanding requests is then the rate at which
lanes can issue them. A thread can keep issuing reads in a loop and handle the
data whenever it comes back.

This repository holds a synthesizable SystemVerilog model of one UpDown
accelerator. It has 64 event-driven lanes that sit directly on the DRAM
channels, with no caches in between.

## The event word

Everything a lane does starts from a 64-bit event word (`event_word_t` in
`rtl/updown_pkg.sv`):

| bits   | field         | meaning                                              |
|--------|---------------|------------------------------------------------------|
| 63:32  | `nwid`        | network ID: the lane where the event is executed      |
| 31:28  | `nops`        | number of operand words that travel with it (0-8)     |
| 27:20  | `tid`         | thread context to run in; `0xFF` = create a thread    |
| 19:0   | `label`       | handler entry, as an offset from the program base    |

A message (`event_msg_t`) is an event word plus up to eight 64-bit operands.
The same format is used for work sent from the controlling CPU and for DRAM
responses. A memory request (`mem_req_t`) is a read or write of 1-8 consecutive
64-bit words at a byte address. It carries the continuation word that the
response must be delivered to.

The DRAM side must follow one contract:
- For a read, it answers with an event message whose event word is the request's
  continuation, with `nops` set to the number of words read. The data is in
  `ops[0..n-1]`.
- For a write, it answers the same way with `nops = 1` and the written address
  in `ops[0]`. A handler can therefore count write acknowledgements.

The field order follows the published layout. The widths are this design's
own; only the 8-bit thread ID is implied by the reserved value `0xFF`.

## Inside a lane

```
           incoming events (DRAM responses, CPU)
                        |
                 lane_nw_if  ---- outbound request FIFO ----> to interconnect
                /          \                                        ^
        event_queue    operand_buffer                               |
             |              |                                       |
             +--> lane_datapath <--> thread_contexts (128 x 24 x 64b)
                    |     |  \
              instr_mem   |   scratchpad_bank (64 KB)
                          +---------------------------------------->+
```

`updown_lane` wires these together.

**Network interface** (`lane_nw_if`). An incoming message is accepted only when
there is room for both parts. The event word goes to the EventQ and its operands
go to the tail of the Operand Buffer, both in the same cycle. Outgoing requests
wait in a small FIFO, so the datapath does not wait for the network.

**EventQ** (`event_queue`, 32 entries) and **Operand Buffer** (`operand_buffer`,
64 words). Both are circular buffers. The Operand Buffer takes up to eight words
per cycle, and the datapath reads it at any offset from its head. Operands leave
in the same order as their events, so the operands of the event at the EventQ
head are always the oldest `nops` words of the Operand Buffer.

**Dispatch** (`lane_datapath`). An idle lane with a waiting event does the
following in one cycle:
1. It pops the event word.
2. It sets the program counter to `progbase + label`.
3. It selects the register context `tid`, or allocates the lowest free one when
   `tid` is `0xFF`.
4. It exposes the head `nops` words of the Operand Buffer as operands.

The handler then runs one instruction per cycle until one of these:
- `yield` keeps the thread's registers for its next event.
- `yieldt` frees the context.

Both release the event's operands. The next event is dispatched in the
following cycle.

**The context-full case** is this design's own rule. A `0xFF` event may find all
128 contexts busy. It must not block the queue, because the events behind it may
be the ones that free a context. So the event word and its operands are copied
from the queue heads to the queue tails, and the lane tries the next event. To
let new messages keep arriving, this happens at most every other cycle. Each
such move is reported as `alloc_stall`.

**Thread contexts** (`thread_contexts`). Each of up to 128 threads has 16
general registers and 8 special registers. Reads of the special registers are
supplied by hardware:
- r16 reads the current event word.
- r17 reads the lane's network ID.
- r18 reads the current thread ID.

r19-r23 are ordinary stored registers.

**Instruction memory** (`instr_mem`) holds 1024 32-bit instructions and the
Progbase register. **Scratchpad** (`scratchpad_bank`) holds 64 KB of 64-bit
words, byte-addressed. Both are read combinationally.

## Sends and continuations

The three send instructions are what make UpDown different. Each takes the
target address from register `a` and the continuation word from register `b`:

| instruction | payload source                                         |
|-------------|--------------------------------------------------------|
| `sendmr`    | registers `c, c+1, ...`; with the write bit clear it is a read with no payload |
| `sendm`     | scratchpad, starting at byte address in register `c`   |
| `sendmops`  | operands of the current event, starting at index `imm[6:4]` |

`imm[3]` is the write bit and `imm[2:0]` is the word count minus one. The
payload is gathered one word per cycle. The finished request then waits until
the network interface can take it (`send_stall`). The datapath goes on with the
next instruction; it never waits for the memory response.

Continuation words are built by two instructions:
- `evi a, label` builds `{own nwid, 0, own tid, label}`, so the response comes
  back to the same thread.
- `ev a, b, c, label` takes the lane from `b` and the thread from `c`, so the
  response can be sent to another lane or thread.

A typical copy loop:

```
START:  movop  r0..r3            ; src, count, dst, result address
        evi    r7, RET           ; responses come back to RET in this thread
loop:   sendmr r0, r7, 8 words   ; read 8 words, no waiting
        addi   r0, r0, 64
        ...                      ; loop until all reads are issued
        yield
RET:    sendmops r2, r8, 8 words ; write the 8 returned words to dst
        ...                      ; count; yield, or finish with yieldt
```

A single thread can issue as many reads as the loop count, with nothing to
reserve per read.

## Instruction set

The instructions are 32 bits wide; the encoding is this design's own:

```
R-type: [31:27] opcode  [26:22] a  [21:17] b  [16:12] c  [11:0] imm12
I-type: [31:27] opcode  [26:22] a  [21:17] b  [16:0] imm17
```

| op | name | effect |
|----|------|--------|
| 0 | nop | |
| 1, 2 | add, sub | a = b ± c |
| 3 | addi | a = b + sext(imm17) |
| 4, 5 | and, or | a = b & c, b \| c |
| 6, 7 | sll, srl | a = b << c[5:0], b >> c[5:0] |
| 8 | movop | a = operand imm17[2:0] |
| 9 | lds | a = scratchpad[b + sext(imm17)] |
| 10 | sts | scratchpad[b + sext(imm12)] = a |
| 11-13 | beq, bne, blt | if a ==, !=, < (unsigned) b: pc += sext(imm17) |
| 14 | jmp | pc += sext(imm17) |
| 15 | evi | a = {own nwid, 0, own tid, imm17} |
| 16 | ev | a = {b.nwid, 0, c.tid, imm12} |
| 17-19 | sendmr, sendm, sendmops | see above |
| 20, 21 | yield, yieldt | end the handler |

Undefined opcodes act as `nop`. The functions `enc_r` and `enc_i` in
`updown_pkg` build instruction words; the testbenches use them as an assembler.

## Accelerator and interconnect

`updown_accelerator` is the top. It holds 64 lanes and an `accel_interconnect`
between them and `MEM_PORTS` = 8 DRAM channels.

**Requests.** Lanes are split into groups of `NUM_LANES / MEM_PORTS`. Each
group shares one request channel, with a round-robin arbiter.

**Inbound messages.** Each lane has its own round-robin arbiter over the DRAM
response channels and the CPU event port. It routes by the low bits of the
event word's `nwid`; lane *l* answers to network ID `NWID_BASE + l`.

The interconnect keeps no state per request. This is what lets the number of
outstanding requests grow without bound.

Other ports on the top:
- `host_ev_*` carries events from the controlling CPU.
- `imem_*` and `pb_*` load programs and set Progbase, for one lane or all lanes
  at once.
- `lane_stat` gives per-lane pulses for dispatch, new thread, yield, yieldt,
  alloc stall, send, send stall and input stall.
- `out_conflict` and `in_conflict` report lost arbitrations.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `NUM_LANES` | 64 | lanes per accelerator in the original design |
| `THREADS` | 128 | threads per lane in the original design |
| `SP_BYTES` | 65536 | 64 KB scratchpad per lane in the original design |
| `MEM_PORTS` | 8 | set to the channel count of one HBM2e stack |
| `EQ_DEPTH` | 32 | own choice |
| `OB_DEPTH` | 64 | own choice (power of two) |
| `OUT_DEPTH` | 4 | own choice |
| `IMEM_DEPTH` | 1024 | own choice |
| `NWID_BASE` | 0 | first network ID, for placing several accelerators |

Each lane holds 128 × 24 × 64 bits of registers, so the full accelerator is
about 12.6 Mbit of register state plus 4 MB of scratchpad. In silicon the
register contexts and scratchpad would be SRAM macros; here they are written as
plain arrays.

## How far it follows the original, and where it departs

Taken from the original architecture:
- The event word and its four fields.
- The four dispatch steps.
- Thread creation with ID `0xFF`, and `yield`/`yieldt`.
- 16 + 8 registers, 128 threads, 64 KB scratchpad, 64 lanes.
- Split-transaction sends with three payload sources of 1-8 words.
- Continuation creation, and no bookkeeping of outstanding requests.
- One-cycle dispatch.

Departures and gaps:
- **Instruction set.** The original ISA is defined elsewhere. Only its
  messaging, continuation and thread instructions are modelled, plus a small
  integer subset chosen here. There is no floating point or multiply, and no
  `evr`. The encoding is not the original one.
- **Event word widths** are chosen here.
- **Lane-to-lane events.** Lanes can be named as continuation targets of memory
  responses. However, there is no instruction that sends an event directly to
  another lane; outbound traffic is memory requests only.
- **Not included:** the DRAM and its controllers, the controlling CPU, the
  network between accelerators and nodes, and multi-accelerator nodes. The top
  brings out their connection points as ports.
- **Own choices:** the interconnect structure, queue depths, the one-word-per-cycle
  payload gather, the recirculation of `0xFF` events when contexts run out, and
  the combinational reads of instruction memory and scratchpad.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/hbm_model.sv` is a behavioural DRAM:
- It has a fixed latency (200 cycles by default: 100 ns at 2 GHz).
- It initialises word *i* to `0x1000_0000 + i`.
- A `hold` input stalls its request channels.
- It reports how many requests are in flight.

`tb_updown_lane` runs a copy-and-sum kernel on one lane with three threads. It
checks every copied word, the sums and the write acknowledgements.

`tb_updown_accelerator` runs the top at its default parameters. Every lane runs
two copy threads. One lane is also filled with 128 idle threads so that a
further new-thread event must wait. The DRAM stalls for 500 cycles in the
middle. The test counts every mechanism and fails if any never happens:
- dispatch, thread creation, yield and yieldt;
- alloc stall, send and send stall;
- input stall;
- request and response arbitration conflicts.

It also checks every result word. About a thousand requests are in flight at
the peak.

`tb_workload_hist` runs an image-histogram kernel on one lane at its default
sizes. It uses 16 threads over 4096 input words and 64 bins kept in the
scratchpad.

Because handlers on a lane run to completion one at a time, the threads update
the shared bins without any locking. The handler that counts the last word
writes the bins back to memory. Each write acknowledgement creates a short-lived
thread (`ev` with thread ID `0xFF`) that only ends itself.

The test checks every bin against a histogram computed independently. About 500
reads are in flight from the single lane.

`tb_workload_topk` runs a top-k search (k = 8) the same way. Each returned word
is turned into a scattered 16-bit key. The handler compares it against the
smallest of the eight best keys, which are kept in the scratchpad, and on a win
it replaces that key and rescans for the new minimum. The eight keys found are
checked against the eight largest keys computed independently.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/updown_pkg.sv tb/tb_updown_accelerator.sv
./obj_dir/Vtb_updown_accelerator
```

Replace the testbench name to run any other one. The full-size accelerator test
builds and runs in well under a minute.
