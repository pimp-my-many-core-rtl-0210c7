# PIMP: message passing wired into the pipeline

Many-cores that communicate by message passing usually emulate it with memory:
the sender writes a buffer in a scratchpad, a DMA engine or remote loads move it,
and a flag in memory tells the receiver that data has arrived. Every message
then costs several network transactions, buffer management and polling of
memory.

PIMP (pipeline-integrated message passing) removes that layer. Each core gets
two small hardware FIFOs between its execute stage and the network, and seven
instructions that use them directly:

| instruction | operands    | effect |
|-------------|-------------|--------|
| `send`      | `node, msg` | put the 64-bit word `msg` into the send FIFO, addressed to `node` |
| `src`       | `rd`        | `rd` = sender id of the oldest received word (the word stays) |
| `recv`      | `rd`        | `rd` = payload of the oldest received word, which is removed |
| `brs`       | `label`     | branch if ready to send (send FIFO not full) |
| `bns`       | `label`     | branch if not ready to send (send FIFO full) |
| `bar`       | `label`     | branch if any word received (receive FIFO not empty) |
| `bnr`       | `label`     | branch if nothing received (receive FIFO empty) |

A message is a single word. The network tags it with its sender and delivers
the words of one sender to one receiver in the order they were sent, so longer
messages are just sequences of words. All seven instructions are non-blocking.
Blocking is done in software with a branch to itself:

```
wait_tx:  bns  wait_tx        # spin while the send FIFO is full
          send a0, t2         # a0 = target node, t2 = payload

wait_rx:  bnr  wait_rx        # spin while nothing has arrived
          src  t0             # who sent it
          recv t1             # what was sent
```

Replacing the self-branch by a branch to other work gives non-blocking
communication at the cost of one instruction. The hardware this needs is two
FIFOs, two multiplexer inputs each on the result and branch paths of the
execute stage, and a few decode signals.

This repository holds synthesizable SystemVerilog for a 16-node many-core built
this way. Each node has an in-order five-stage RV64I core, a 64 KiB scratchpad,
an 8-entry send FIFO and a 16-entry receive FIFO, and the nodes are joined by an
in-order word network. There are self-checking testbenches for every part and
for the whole system.

## The execute stage: where PIMP lives

The core is a classical IF-ID-EX-MEM-WB pipeline. Everything PIMP adds sits in
decode (`rv_decoder`) and execute (`pimp_ex_unit`):

```
 register operands              send FIFO            receive FIFO
   src1 (node) ───────────────> node                  node ──┐
   src2 (msg)  ───────────────> data                  data ──┤
   enqueue (send) ────────────> enqueue      dequeue <─ recv │
                                full ──┐      empty ──┐      │
                                       v              v      v
   branch unit ─────────────> [ branch mux ] <─┘   [ result mux ] <── ALU
                  selBranch ──>     │                  │  <── selResult
                                    v                  v
                               branch taken          result
```

* **Result multiplexer** (`selResult`): ALU result, or the sender id (`src`), or
  the payload (`recv`) at the head of the receive FIFO. `src` and `recv` results
  are forwarded to younger instructions like any ALU result.
* **Branch multiplexer** (`selBranch`): the ordinary branch unit, or the send
  FIFO's `full` flag (`bns`; `brs` takes it inverted), or the receive FIFO's
  `empty` flag (`bnr`; `bar` takes it inverted).
* **Send FIFO inputs** are the two forwarded register operands, unchanged:
  `rs1` is the target node (its low 4 bits), `rs2` the payload. `send` raises
  `enqueue`. Only `recv` raises `dequeue`; `src` only looks at the head.

The FIFOs present their head and their flags straight from registers
(first-word fall-through), so the values are there early in the cycle.

### Why a test stays valid

Every PIMP instruction reads and changes the FIFO state in the EX stage, one per
cycle, in program order. The network can only make the send FIFO emptier and
the receive FIFO fuller. So after `bnr` falls through, the following `src` and
`recv` are sure to find a word, and after `bns` falls through the following
`send` is sure to find room, even though the network runs on independently.

### Timing

* Branches, PIMP branches included, are resolved in EX, and the two younger
  instructions are squashed. A self-referential `bnr`/`bns` therefore
  re-examines the FIFO every **3 cycles**, and waiting time comes in multiples
  of three.
* A word granted by the network reaches the receiver's FIFO **one cycle** after
  it left the sender's FIFO.
* A load followed by an instruction that uses its result stalls one cycle.
  Everything else forwards.
* Measured on the 16-node system: a round trip of one word from node 0 to node
  1 and back takes 38 cycles from releasing the cores to node 0 stopping. Each
  additional 64-bit word adds **18 cycles**. That is the same per-word cost as
  published for the original PIMP implementation, whose one-word time of 139
  cycles includes the call overhead of its message-passing library.

### Misuse: the PIMP exception

`send` with the send FIFO full, or `src`/`recv` with the receive FIFO empty, is
an error. The original interface leaves the result undefined and raises an
exception. Here the instruction has no effect, older instructions complete,
younger ones are squashed, and the core stops with `halted` and `pimp_exc` set.
There is no trap handler. `ecall`/`ebreak` also stop the core, with no flag
(this is how programs end), and so does an illegal instruction, with `illegal`
set.

## Instruction encoding

The seven instructions use the RISC-V custom opcodes. This encoding is this
design's own:

| instr | format | opcode | funct3 | fields |
|-------|--------|--------|--------|--------|
| `send node, msg` | R | `0001011` (custom-0) | `000` | rs1 = node, rs2 = msg |
| `src rd`         | R | `0001011` | `001` | rd |
| `recv rd`        | R | `0001011` | `010` | rd |
| `brs off`        | B | `0101011` (custom-1) | `000` | offset as in `beq`, rs1 = rs2 = 0 |
| `bns off`        | B | `0101011` | `001` | |
| `bar off`        | B | `0101011` | `010` | |
| `bnr off`        | B | `0101011` | `011` | |

`tb/rv_asm_pkg.sv` has encoder functions for these and for the RV64I
instructions the testbenches use.

## Long messages and the ready handshake (software)

The hardware buffers at most 8 + 16 words per pair of nodes plus one in the
network. A long transfer must not flood a receiver that is busy with something
else. The message-passing library is therefore expected to use a handshake built
from single words. The end-to-end testbench implements it:

* **receive(from, n)**: send one "ready" word to `from`. Then take words until
  `n` have come from `from`. A word from any other node is a ready notice: mark
  that node in a per-node `ready` byte array and drop the payload.
* **send(to, n)**: if `ready[to]` is already marked, skip the wait. Otherwise
  take words, marking each sender as ready, until one comes from `to`. Then
  clear `ready[to]` and stream the `n` words with `bns`/`send`.

Collective operations follow the same pattern: a root can keep one counter per
partner, and several streams can be in flight at once. The gather phase of the
system test keeps such counters.

## The node and the system

`pimp_tile` is one node: `rv_core`, `scratchpad`, and two `msg_fifo`s. The FIFO
entries are 4 + 64 = 68 bits: node id and payload. On the network side each FIFO
has a valid/ready pair. The send FIFO's head goes out with its target. The
receive FIFO takes a word with its sender id when it is not full. A full
receive FIFO holds the word in the network, and that stalls only the senders
addressing this node.

`scratchpad` is a 64 KiB array with 64-bit words, answering in the same cycle.
It has a 32-bit fetch port, a 64-bit data port with byte enables, and a host
port.

`noc_xbar` is the network: a crossbar with a round-robin arbiter and a
one-word output register per destination. Each sender/receiver pair has exactly
one path, so order is kept.

`pimp_manycore` is the top. It has 16 tiles, the crossbar, and a host interface:

| port | meaning |
|------|---------|
| `clk`, `rst_n` | one clock; synchronous active-low reset of FIFOs, network and cores |
| `hold` | keeps all cores in reset while programs are loaded; FIFOs and network keep running |
| `load_we`, `load_node`, `load_addr`, `load_data` | write a 64-bit word into a tile's scratchpad (byte address, 8-aligned) |
| `rd_node`, `rd_addr`, `rd_data` | combinational read of a scratchpad word |
| `halted`, `pimp_exc`, `illegal` | per core: stopped, and why |
| `sleeping` | per core: pipeline held on a `bnr` to itself (only with `SLEEP_ON_BNR = 1`) |

When `hold` falls, every core starts at address 0 of its own scratchpad. A
core does not know its own node number. Software reads it from memory, where
the loader put it.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_NODES`  | 16    | tiles (the reference configuration is 4 x 4) |
| `SPM_BYTES`  | 65536 | scratchpad per tile |
| `SEND_DEPTH` | 8     | send FIFO entries |
| `RECV_DEPTH` | 16    | receive FIFO entries |
| `NODE_W`     | clog2(NUM_NODES) | node id width |
| `SLEEP_ON_BNR` | 0   | 1: hold the pipeline instead of polling on a `bnr` to itself |

All defaults are the reference configuration. Nothing is scaled down.

## How far this follows the original design, and where it departs

Taken from the original design: the instruction set and its semantics, the
non-blocking behaviour, the branch-based tests, the two plain FIFOs and their
sizes, the execute-stage multiplexers and where their inputs come from, the
decode-stage additions, the exception on misuse, the 64-bit words, 16 nodes with
64 KiB each, single-cycle memory, and branches resolved in a way that makes
polling take three cycles.

This design's own choices:

* **Network.** The original system uses a lightweight network called
  PaterNoster, which is only named, not described. The crossbar here offers the
  same service at the tile boundary: word messages, sender id, per-pair
  ordering. Its area and latency do not model that network.
* **Core.** The original is a five-stage RV64I pipeline from an earlier model.
  The pipeline here is new and minimal. It has full forwarding, no CSRs, no
  traps, no interrupts and no floating point. Accesses must be aligned.
  `ecall`/`ebreak` stop the core.
* **Exception handling.** The core stops; the original only says an exception
  is raised.
* **Encoding.** The custom-opcode encoding above is this design's own.
* **FIFO pointers** carry a wrap bit, so all entries can be used. The head is
  read asynchronously. An FPGA block-RAM mapping would add a head register.
* **One clock.** The FIFOs could decouple core and network clocks, or allow
  power-gating a core. That is not built.
* **Sleep on `bnr`** is an option, `SLEEP_ON_BNR`, off by default. The
  original names suspending a core that waits on `bnr` as an optional energy
  saving. When it is on, a taken `bnr` whose offset is 0 does not redirect.
  Instead fetch, decode and execute hold their contents, and `sleeping` goes
  high for an external clock gate. The gate itself is not built. The cycle
  after a word arrives, the `bnr` falls through. The `recv` then dequeues at
  the third clock edge after the word was written. A polling core needs three
  to five edges. Results do not change. With the option off, timing matches
  the polling core that the published cycle counts come from.
* **Host port** and **boot address** are this design's own.

What the tests establish:

* Every module compiles cleanly with Verilator lint and the slang front end.
* Each unit has a self-checking testbench, including cycle counts where a
  timing is known: 3-cycle polling, one-cycle network hop, 18 cycles per
  round-trip word.
* The full 16-node system runs a 256-word ring transfer with the handshake,
  then a 15-to-1 gather and a deliberate exception.
* Five collective operations give correct results on 2 to 16 nodes (see below).

The core is tested with directed programs only, not with a RISC-V compliance
suite.

### Collective operations

`tb_collectives` runs five collectives written with single-word messages. It
checks every result word and prints the cycles each run takes, counted from
release to the last core stopping. Each collective is a plain loop:

* **barrier:** a central barrier at node 0;
* **broadcast:** node 0 sends to each node in turn;
* **reduce:** node 0 adds the words and keeps one word counter per sender;
* **allreduce:** recursive doubling. Words that arrive early from a later
  round's partner are buffered per sender;
* **alltoall:** alternates non-blocking `brs`/`send` and `bar`/`recv` steps,
  so full FIFOs cannot deadlock it.

| operation | nodes | words | cycles |
|-----------|-------|-------|--------|
| barrier, 8 rounds | 2 / 4 / 8 / 16 | 1 | 208 / 418 / 832 / 1666 |
| broadcast | 2 / 16 | 1 | 49 / 245 |
| broadcast | 2 / 16 | 4 | 103 / 677 |
| broadcast | 2 / 16 | 13 | 265 / 1973 |
| reduce | 2 / 16 | 1 | 63 / 427 |
| reduce | 2 / 16 | 4 | 150 / 1354 |
| reduce | 2 / 16 | 13 | 411 / 4135 |
| allreduce, recursive doubling | 2 / 16 | 4 | 239 / 767 |
| alltoall | 2 / 4 / 8 / 16 | 4 per pair | 190 / 496 / 1108 / 2332 |

Against the original measurements:

* **Barrier.** It grows linearly with the node count, as in the original.
  Here it costs 26 cycles per round on 2 nodes and 13 cycles per added node.
  The original reports 83 cycles on 2 nodes and 9 per added node. Its barrier
  code and measurement method (random delays, 1000 rounds) are not given in
  detail, so these numbers are not expected to match.
* **Broadcast.** Time grows with the node count, as in the original, because
  the root sends every copy itself. Each extra word costs 18 cycles on 2 nodes
  and 144 on 16. On 2 nodes the receiver's loop sets the pace; on 16, the
  root's 15 sends do.
* **Alltoall.** The original reports time growing quadratically with the node
  count. Here it grows roughly linearly. The crossbar carries all pairs at the
  same time, so each node's work is only linear in the node count. A network
  with shared links, like the original one, would serialise more.

Allreduce is run at 4 words only. It sends before it receives. With longer
messages, two partners could each fill the other's FIFOs and deadlock. This is
a limit of that simple program, not of the hardware.

## Simulating

Any testbench builds with plain Verilator 5 from the repository root. For
example, the full system test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pimp_manycore \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/pimp_pkg.sv tb/rv_asm_pkg.sv tb/tb_pimp_manycore.sv
obj_dir/Vtb_pimp_manycore
```

Each testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_msg_fifo` | FIFO against a queue model, full/empty, fall-through |
| `tb_scratchpad` | all three ports, byte enables, host priority |
| `tb_noc_xbar` | routing, sender ids, per-pair order, 1-cycle hop, contention, back-pressure |
| `tb_rv_decoder` | PIMP and RV64I decode fields |
| `tb_pimp_ex_unit` | exhaustive multiplexer, strobe and exception behaviour |
| `tb_rv_core` | integer programs and blocking send/receive, 3-cycle polling, exception |
| `tb_rv_core_sleep` | the core with `SLEEP_ON_BNR = 1`: frozen fetch, wake-up in one cycle, dequeue at the third edge |
| `tb_pimp_tile` | a tile against a loop-back network, receive-FIFO back-pressure |
| `tb_pimp_manycore` | 16 nodes at default size: ring with handshake, gather, exception. Counts every mechanism: waits, full FIFOs, network contention, load-use stall, other-sender path, skipped handshake |
| `tb_roundtrip` | round-trip time against message length on the 16-node system |
| `tb_collectives` | barrier, broadcast, reduce, allreduce (recursive doubling) and alltoall on 2 to 16 nodes, results and cycle counts |

Test programs are built inside the testbenches with the encoder functions of
`tb/rv_asm_pkg.sv`, so no external toolchain is needed. To change the design,
edit the parameters of `pimp_manycore`. Every module's opening comment gives
its interface and timing.

## Files

`rtl/pimp_pkg.sv` holds the opcodes, select encodings and the decode control
word. The hierarchy below it is:

`pimp_manycore` → `pimp_tile` (× NUM_NODES) → `rv_core` (→ `rv_decoder`,
`rv_regfile`, `rv_alu`, `rv_branch_unit`, `pimp_ex_unit`), `scratchpad`,
`msg_fifo` × 2; and `noc_xbar` → `rr_arbiter` (× NUM_NODES).
