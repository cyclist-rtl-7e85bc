# Cyclist emulation fabric in SystemVerilog

Cyclist is a hardware emulator for RTL designs. It is a mesh of small pipelined
processors ("tiles"). A compiler breaks the target circuit's RTL dataflow graph into
word-level operations such as add, mux and compare. It places those operations on the
tiles and writes each tile a fixed loop of instructions. One trip through the loop
evaluates that tile's share of the circuit for one target clock cycle. Words move between
tiles over a statically routed mesh of tiny blocking queues, and the queues interlock the
tiles. The schedule is fixed at compile time, but no tile has to pad its code with timing
nops: it simply waits when a word has not arrived yet, or when there is no room to send one.
A debug chain through every tile lets a host read and write any state (peek/poke), run the
machine for n target cycles (step), and stream selected results out (trace). Snapshots,
replay and trigger searches are built from these.

This repository holds synthesizable RTL for the fabric. The RTL follows the architecture
published as "Cyclist: Accelerating Hardware Development". Where that description stops
(encodings, handshakes, packet formats), this design makes its own choices. They are listed
in the last sections.

## The instruction word

Each tile executes 32-bit words with no branches or jumps. Each word holds one ALU operation
and one network operation:

| bits  | 31    | 30:26 | 25:22 | 21:17 | 16 | 15:11 | 10:6 | 5:4 | 3:0 |
|-------|-------|-------|-------|-------|----|-------|------|-----|-----|
| field | trace | op    | dst   | x     | iy | y     | z    | in  | out |

* `x`, `y`, `z` name registers 0-31. Specifier **31 means the network input register**: the
  word at the head of the input queue chosen by `in` (0 N, 1 E, 2 S, 3 W).
* `iy = 1` makes `y` a 5-bit immediate (ignored by `mux` and `st`, whose `y` is always a register).
* For most operations `z` is not a register but a **width `w`**. The result is masked to `w`
  bits, with `w = 0` meaning 32, so that target signals of any width come out exact.
* `dst` is 4 bits. Values 0-14 write a register. **15 is the network destination register**:
  the result is not kept but sent to every output port whose bit is set in `out`. This is
  multicast; bit 0 is N, 1 E, 2 S, 3 W.
* If the instruction does not send its own result (`dst` is not 15, or the op is `nop`, `st` or
  `sti`) and `out` is non-zero, it **forwards the word from its `in` port** to the `out` ports.
  This happens in parallel with whatever it computes, so routing through a tile is free
  when the ALU has other work.
* `trace = 1` sends the instruction's result down the debug chain.

Because `dst` has 4 bits, instructions can write only registers 0-14. Registers 15-30 can be
read by instructions but are written only by the host. Use them for constants. Register 31
exists, but instructions cannot read it, since specifier 31 is the network input.

### Operations

`cyclist_pkg::opcode_e` numbers them 0-23 in this order. `m` is the width mask from `z`.

| op | result | op | result |
|----|--------|----|--------|
| nop | nothing | lsh | `x << y[4:0]` |
| rst | the tile's target-reset bit | rsh | `(x & m) >> y[4:0]` |
| lit | `{y,z}` zero-extended (10 bits) | rsha | `x` sign-extended from bit w-1, shifted right arithmetically, `& m` |
| not | `~x & m` | cat | `(x << w) \| (y & m)`; w = 0 gives `y` |
| and / or / xor | bitwise, full word | add / sub / mul | `(x op y) & m` |
| eq / neq | 1 or 0 | lt / gte | unsigned compare of `x & m`, `y & m` |
| mux | `x[0] ? y : z` (three registers) | ld | `mem[x]` |
| log2 | index of the highest set bit of `x & m` (0 for 0) | st | if `z[0]`: `mem[y] = x` |
| | | ldi / sti | `mem[{y,z}]` as destination / source, `x` is the data for sti |

`cyclist_pkg::mk_instr()` builds a word from its fields.

## The tile pipeline

`cyclist_tile` has five stages:

1. **fetch**: the PC addresses the code memory (1024 words), which has a synchronous read.
2. **decode**: `cyclist_decode` turns the word into a `ctrl_t` bundle.
3. **reg/net read**: the register file (32 x 32 bits, three read ports) is read. If the
   instruction needs its input port, the word at the head of that input queue is taken.
4. **execute**: `cyclist_alu` computes. Loads and stores address the data memory (1024
   words) at the clock edge that ends this stage.
5. **write-back**: the result, or the loaded word, is written to a register. It is also
   pushed into the chosen output queues and offered to the trace slot.

**No data-hazard stalls.** Write-back forwards its result to the operands in execute, and
the register file writes through to reads in the same cycle. So an instruction can use the
result of the one just before it. This includes a load followed by an instruction that uses
the loaded word.

**The only stalls are the network interlocks**, and they act at two places:

* *Input empty.* An instruction in reg/net read whose input queue is empty waits there.
  Fetch and decode hold, a bubble goes into execute, and older instructions keep draining.
  This matters: an older instruction may be the one sending the word that lets a neighbour
  produce our input.
* *Output full.* An instruction in write-back whose output queues cannot all take the word
  holds the whole pipeline. A multicast waits until every chosen port has room. A traced
  instruction also waits while the trace slot is taken.

A host access (peek or poke) also holds the pipeline for the one cycle it takes, so host
writes never race pipeline writes.

**The loop and stepping.** The program occupies code addresses 0 to `CODE_LEN-1`, after which
the PC wraps to 0. Each pass is one target cycle. The tile fetches only while its count of
remaining target cycles is non-zero. The host's step command loads that count, and it goes
down by one each time the last instruction of a pass is fetched. When it reaches zero, the
pipeline drains and the tile goes idle, which shows as `busy` = 0 in the status register.
With no waiting on the network, a pass of N instructions takes N clocks. The tile testbench
measures 185 clocks for 20 passes of 9 instructions, including pipeline fill.

## The mesh network

Each side of a tile (N, E, S, W) has a one-element input queue and a one-element output
queue (`cyclist_queue`). In `cyclist_array`, a tile's east output queue feeds the west input
queue of its east neighbour, and so on. Nothing in the network decides where a word goes:
the tiles move every word by program, from an input port to any set of output ports, and
the compiler schedules all of it.

The handshake is valid/ready. A tile reports `in_ready` only when its input queue is empty,
and its output queue takes a new word while the old one leaves. So no combinational path
crosses from one tile to the next, and a mesh of any size has no combinational loop. A word
spends one cycle in the sender's output queue and at least one in the receiver's input
queue. One link moves one word per cycle.

The mesh does not prevent deadlock; the schedule has to. A tile that waits forever for a word
that never comes, or that sends to a port nobody reads, stops its neighbours in turn.

## The host chain (debug scanchain)

Every tile has a `cyclist_debug` node, and the nodes form a chain. `cyclist_array` threads
it as a snake: along row 0 from west to east, back along row 1 from east to west, and so on.
A tile's id is its position on the chain. Each node is one register stage with no
back-pressure, so the host must accept whatever leaves the end. Packets (`dbg_pkt_t`) carry
`valid, cmd, tile(11), space(2), addr(10), data(32)`. Tile id 2047 (`TILE_BCAST`) means every
tile.

| cmd | effect |
|-----|--------|
| `CMD_PEEK` | The addressed tile reads the location and replaces the packet with `CMD_RESP` carrying the value, which continues to the host. Broadcast peeks are ignored. |
| `CMD_POKE` | Writes the location. An addressed poke is removed from the chain; a broadcast poke is applied and passed on. |
| `CMD_STEP` | Loads the number of target cycles to run. Addressed or broadcast, as for poke. |
| `CMD_TRACE` | Made by a tile: the result of a traced instruction, with `addr` = its code address. It leaves in the first empty chain slot. |

Address spaces: `SP_REG` registers, `SP_DMEM` data memory, `SP_IMEM` code memory, and
`SP_CTRL` control registers:

| addr | register |
|------|----------|
| 0 | `CODE_LEN`, instructions per target cycle (RW) |
| 1 | cycles left to run (RW; also written by step) |
| 2 | target reset bit, read by `rst` (RW) |
| 3 | status: bit 0 busy (RO) |
| 4 | target cycles completed (RO) |
| 5 | tile id (RO) |

The chain is a pure shift register, so packets keep their order. A snapshot save is a
burst of peeks sent one per cycle, and the responses come back in the same order. A restore
is a burst of pokes. Trace words travel down the same chain, which gives the host waveforms
of selected signals without recompiling.

## The top: `cyclist_array`

Parameters: `ROWS` = 14 and `COLS` = 20, so 280 tiles, the example die size in the published
work. Ports:

* `clk` and active-low asynchronous `rst_n`.
* The edge links `west_*` and `east_*` (one per row) and `north_*` and `south_*` (one per
  column). Each direction has `*_in_valid/ready/data` into the array and
  `*_out_valid/ready/data` out of it. Words at the edge are the target's IO, or links to
  another array.
* `dbg_in` and `dbg_out`, the two ends of the host chain.

Reset clears all pipeline state, queues, registers and control registers. The code and data
memories are not reset: load code, and any data the program reads, before stepping.

## Using it

A typical debugging run: poke the program into every tile, using broadcast when tiles share
code. Poke `CODE_LEN`, and poke initial target state into data memory. Broadcast a step
of n target cycles and wait until every tile reports not busy. Then peek the state.
`tb/tb_array_driver.sv` does exactly this and is the best worked example.

Simulation with Verilator (from the repository root):

```
verilator --binary --timing --assert -Irtl -Itb rtl/cyclist_pkg.sv \
          rtl/cyclist_queue.sv rtl/cyclist_alu.sv rtl/cyclist_decode.sv rtl/cyclist_regfile.sv \
          rtl/cyclist_sram.sv rtl/cyclist_debug.sv rtl/cyclist_tile.sv rtl/cyclist_array.sv \
          tb/tb_array_driver.sv tb/tb_cyclist_array_full.sv --top-module tb_cyclist_array_full
./obj_dir/Vtb_cyclist_array_full
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `tb_cyclist_queue` | order, no loss or duplication, occupancy of at most one, one word per cycle |
| `tb_cyclist_alu` | all 24 operations against a bit-level reference model, plus worked values |
| `tb_cyclist_decode` | hand-worked words, then the field rules on random words |
| `tb_cyclist_regfile` | three ports plus the host port, write-through, reset |
| `tb_cyclist_sram` | 1024-word fill, read latency, hold while not enabled, read-during-write |
| `tb_cyclist_debug` | peek response, addressed and broadcast poke and step, forwarding, trace injection and waiting |
| `tb_cyclist_tile` | a 9-instruction program over 44 target cycles with random input gaps and output back-pressure; checks every output word, trace word and final state, and one clock per instruction when free-running |
| `tb_cyclist_array` | 3 x 4 mesh, 24 target cycles, end to end |
| `tb_cyclist_array_full` | default 14 x 20 mesh, 20 target cycles, end to end (about a second of simulation) |
| `tb_cyclist_gcd` | 1 x 2 mesh emulating a hand-compiled 16-bit subtractive GCD unit for 400 target cycles, every output checked against a cycle model and Euclid's algorithm |
| `tb_cyclist_replay` | 3 x 4 mesh: snapshot save by peeks, restore by pokes, replay of a window with identical outputs and traces, and a trigger search |

The two array tests broadcast one program to every tile. It passes a word eastward and adds
1 at each column. It multicasts the same word south, accumulates what arrives from the
north, routes words from the east edge to the west edge, and counts target cycles in data
memory. One tile's instruction is traced. The edge inputs have random gaps, and the edge
outputs are held off for a stretch so that output queues fill. The tests check every word
leaving the array and the trace stream. A snapshot of every tile must match a model. Each
mechanism must also have happened: input stalls, output stalls, multicasts, routed words,
loads, stores, peeks, pokes, broadcasts, steps and traces.

### Emulating a real circuit

`tb_cyclist_gcd` shows what a compiler emits for a tile. The target is a GCD unit with
registers `x` and `y`: a load takes inputs `a` and `b`, and otherwise the larger register is
reduced by the smaller until `y` is 0. Each register lives at data address 0 of its own
tile. A pass has a combinational phase and a state-update phase. The combinational phase
loads the register, sends it to the other tile, receives the other register, and computes the
next value with `lt`, `sub`, `eq` and `mux`. The state-update phase stores it back with `sti`.
Tile 0 (12 instructions) reads the `load` input and passes it east in the same instruction
(`add r7 = in.W + 0`, width 1, `out = E`). Tile 1 needs 13 instructions. The edges are slow
and bursty, yet every output word of all 400 target cycles matches the model.

### Snapshots, replay and trigger search

`tb_cyclist_replay` shows how a host builds interactive visibility from the four commands.
It runs the array for a few target cycles and saves a snapshot, which is every tile's target
state read back by a burst of peeks, one packet per cycle. It then runs a window of cycles
while one tile traces a result. Next it restores the snapshot by a burst of pokes and feeds
the same edge inputs again. Every edge word and trace word must repeat exactly. This is how
a debugger answers "show signal s from cycle a to b": restore the nearest snapshot, run to
a, and trace from a to b.

Last comes a search. The test restores the snapshot once more and appends a traced compare
instruction (the trigger) to one tile's code. It pokes only that tile's code length, then
replays. The host finds the first cycle on which the trigger is 1.

A save of the whole default array is 280 tiles x (1024 data words + 32 registers) = 295,680
peeks, and so as many chain cycles.

## What follows the published design, and what is this design's own

Taken from the published design:

* A mesh of tiles, each a five-stage pipeline: fetch, decode, reg/net read, execute,
  write-back.
* No control flow; the program is an implicit loop.
* 32-bit datapath and 32 registers; 1024-word code and data memories.
* The 24 operations and which of them take a width mask.
* The field widths of the instruction word and the trace bit.
* A one-element input queue and output queue per direction; interlocking on them, with no
  other stalls.
* A single network input and multicast output per instruction, with routing in parallel
  with compute.
* A per-tile host interface on a chain, with peek, poke and step, individual or broadcast
  addressing, and traced results.

This design's own choices, where the published description gives none:

* The opcode numbers and the bit order of the word.
* The network specifiers (31 and 15), and `w = 0` meaning 32 bits.
* The exact meaning of `rsh`, `rsha`, `cat`, `log2` and `lit`. The operand roles of
  `ld`/`st`/`ldi`/`sti`: the published table marks them only with `a` and `e`, read here as
  address and enable.
* The valid/ready handshake, and the stall split between reg/net read and write-back.
* Memory access at the execute/write-back edge, and the forwarding paths.
* The packet layout, the response-in-place peek, the one-entry trace slot, the control
  registers, and what step means exactly.
* The 14 x 20 shape and the snake order of the chain.

Known departures and gaps:

* The published format gives `dst` 4 bits but also speaks of 32 architectural registers.
  This RTL keeps the 4-bit field, so instructions write only registers 0-14 (see above).
* The published tile reaches about 2 GHz in a 45 nm process with 0.069 mm² per tile. This
  RTL makes no timing or area claim. In particular, the code and data memories are plain
  arrays, not SRAM macros.
* The host processor, the compiler (placement, scheduling), the trigger compiler and the
  debugger front end are software or outside parts, and are not here. So is chip-level IO.

## Files

* `rtl/cyclist_pkg.sv`: types (`instr_t`, `ctrl_t`, `dbg_pkt_t`), opcodes, constants,
  `mk_instr()`.
* `rtl/cyclist_queue.sv`: one-element queue.
* `rtl/cyclist_alu.sv`: execute datapath.
* `rtl/cyclist_decode.sv`: instruction decoder.
* `rtl/cyclist_regfile.sv`: register file.
* `rtl/cyclist_sram.sv`: code and data memory.
* `rtl/cyclist_debug.sv`: debug chain node.
* `rtl/cyclist_tile.sv`: a tile.
* `rtl/cyclist_array.sv`: the mesh (top).
* `tb/`: the testbenches above; `tb_array_driver.sv` is the host and edge model shared by
  both array tests.
