# NPoC: a network processor that reshapes an on-chip crossbar

Parallel programs talk in recognisable patterns. Divide and conquer talks like
a tree, master/slave like a star, staged processing like a pipeline, and grid
solvers like a mesh or a torus. A network-on-chip with a fixed topology makes
some of these patterns take many hops. This design instead gives the router a
**reconfigurable crossbar switch (RCS)**, whose switching nodes can be set to
match any of those topologies. It also gives the router a small **network
processor (NPoC)** that watches the traffic and installs the next topology
when a communication pattern is over.

The NPoC is a 32-bit, five-stage scalar RISC pipeline. It is ordinary except
for its fourth stage. Beside the data memory, that stage can reach three more
units:

* the input buffers of the router, through the **BCTU**;
* the packet **scheduler**;
* the **reconfiguration register** that drives the crossbar.

Everything is synthesizable SystemVerilog (IEEE 1800-2017), in `rtl/`, with
self-checking testbenches in `tb/`.

```
            core 0..7 (rx_*)                                  core 0..7 (out_*)
                 |                                                   ^
                 v                                                   |
   +----------------------------+  tx_*  +-------------------------------+
   | npoc_input_buffers         |------->| npoc_rcs                      |
   |  8 buffers x 4 slots x     |<-------|  8x8 switching nodes,         |
   |  128 words, rx/tx engines, | grant  |  broadcast to linked ports     |
   |  status register per buffer|        +-------------------------------+
   +----------------------------+                    ^ topology word
        ^ slot events   ^ words/status               |
        v               |                            |
   +-----------------+  |       +--------------------------------------------+
   | npoc_scheduler  |  |       | npoc_cpu                                   |
   |  slot states,   |<-+-------|  IF  ID  EX  [MEM | BCTU | SCH | REC]  WB  |
   |  oldest first   |  send/block/erase      npoc_bctu   npoc_reconf_reg |
   +-----------------+          +--------------------------------------------+
```

## The processor pipeline

| stage | units (module) | what happens |
|---|---|---|
| IF | PC, instruction memory (`npoc_imem`) | fetch at byte address PC; PC+4 travels with the instruction |
| ID | control unit (`npoc_control`), register bank (`npoc_regfile`) | decode; read r1, r2 and r3; sign-extend the 12-bit immediate to 32 bits |
| EX | forwarding (`npoc_forwarding`), ALU (`npoc_alu`) | pick the operands; compute the result or address and the jump decision J |
| 4th | data memory (`npoc_dmem`), BCTU (`npoc_bctu`), scheduler port, reconfiguration register (`npoc_reconf_reg`) | memory or network access; taken jumps redirect the PC |
| WB | register bank | write r1 |

Each stage takes one clock. An instruction therefore writes its result five
clocks after it is fetched, and a straight-line program completes one
instruction per clock. Three situations interrupt that flow:

* **Data hazards between ALU instructions.** These are removed by forwarding.
  The operand multiplexers (selects c1 for r3, c2 for r2 and c3 for r1) take
  either the register-bank value, F1 (the result held in EX/ME) or F2 (the
  write-back value in ME/WB). F1 wins over F2 because it is younger. A value
  written in WB and read in ID the same clock goes through the register bank,
  which writes through.
* **Load-use.** A `load` or `read` produces its value only in the fourth
  stage. If the next instruction needs it, IF and ID hold for one clock and a
  bubble enters EX. After that, the value arrives through F2.
* **Taken jumps.** J and the target are registered in EX/ME. In the next
  clock the PC is loaded and the three younger instructions in IF, ID and EX
  are squashed. The target is r2+immed for `jump` and r1 for `jeq` and
  `jdi`. A taken jump therefore costs three bubbles. A jump that is not
  taken costs nothing.

Register 0 always reads as zero. A write to it is dropped.

### Instruction set and encoding

```
 31      27 26    22 21    17 16    12 11                0
+----------+--------+--------+--------+-------------------+
|  opcode  |   r1   |   r2   |   r3   |   immed (signed)  |
+----------+--------+--------+--------+-------------------+
```

| op | mnemonic | effect |
|---|---|---|
| 0 | `add r1,r2,r3` | r1 = r2 + r3 (the all-zero word is a no-op) |
| 1 | `mul r1,r2,r3` | r1 = low 32 bits of r2 × r3 |
| 2 | `addi r1,r2,imm` | r1 = r2 + imm |
| 3 | `ori r1,r2,imm` | r1 = r2 \| imm |
| 4 | `not r1,r2` | r1 = ~r2 |
| 5 | `load r1,r2,imm` | r1 = dmem[r2+imm] (word address) |
| 6 | `store r1,r2,imm` | dmem[r2+imm] = r1 |
| 7 | `jump r1,r2,imm` | PC = r2+imm, r1 = address of the next instruction |
| 8 | `jeq r1,r2,r3` | PC = r1 if r2 == r3 |
| 9 | `jdi r1,r2,r3` | PC = r1 if r2 != r3 |
| 10 | `read r1,r2,imm` | r1 = BCTU[r2+imm] |
| 11 | `write r1,r2,imm` | BCTU[r2+imm] = r1 |
| 12 | `send r1,r2,imm` | buffer r1, packet slot r2+imm: blocked → ready |
| 13 | `block r1,r2,imm` | buffer r1, slot r2+imm: ready → blocked |
| 14 | `erase r1,r2,imm` | buffer r1, slot r2+imm: ready or blocked → free |
| 15 | `reconf r1` | reconfiguration register = r1 |

Jump targets are byte addresses, so instruction k sits at 4k. Buffers are
numbered 1..8 in instructions. There is no floating point.

## The router

### Input buffers and the scheduler

Each port has a buffer of 4 slots. Each slot holds one packet of 128 32-bit
words, i.e. 4096 bits. A core writes one word per clock (`rx_valid`,
`rx_data`, `rx_ready`). The first word of a packet claims a free slot, and
`rx_ready` drops when no slot is free.

A complete packet is **ready** at once, so traffic flows without the
processor's help. The transmit engine of each buffer sends the **oldest**
ready packet into the crossbar, one word per clock while the crossbar grants
it. The next ready packet follows without an idle clock.

The scheduler (`npoc_scheduler`) keeps the state of every slot: free,
receiving, ready, blocked or sending. The program changes it with three
instructions:

* `block` holds a ready packet.
* `send` releases a blocked packet.
* `erase` drops a ready or blocked packet.

Commands on a slot that is free, still arriving or already being sent are
ignored.

Each buffer also has a **communication status register**. The hardware sets
it to 1 when the buffer has sent a packet and holds no other ready or
arriving packet, that is, when its traffic is over. The program clears it by
writing 0. Blocked packets do not keep the status from being set.

### The reconfigurable crossbar switch

`npoc_rcs` is an 8×8 grid of switching nodes. Node (r, c) connects input c to
output r. A topology is one 32-bit word with **one bit per pair of ports**.
Pair (i, j), with i < j and ports numbered 0..7, is bit
`i*(2*8-i-1)/2 + (j-i-1)`: row by row over the upper triangle, so 28 bits
are used. A set bit closes both (i, j) and (j, i), so every link is
bidirectional and no port talks to itself.

The example topologies on nodes 1..8 (port = node − 1) have these words:

| topology | links (nodes) | word |
|---|---|---|
| balanced tree | 1-2 1-3 2-4 2-5 3-6 3-7 4-8 | `0x00218303` |
| hypercube (3-cube) | 1-2 1-4 1-8 2-3 2-5 3-4 3-6 4-7 5-6 5-8 6-7 7-8 | `0x0B50A2C5` |
| pipeline | i to i+1 | `0x0A442081` |
| star | 1 to every other node | `0x0000007F` |
| 2×4 mesh | rows 1-4 and 5-8, columns i to i+4 | `0x0A612489` |
| 2×4 torus | mesh plus 1-4 and 5-8 | `0x0B61248D` |

**Reconfiguration takes two clocks.** `reconf` writes the register at the
end of its fourth stage, and the switching nodes copy the register at the
next clock edge.

**Data movement.** A sending input broadcasts each word to every output it
is linked to. If several senders share an output, the lowest-numbered one
gets it. An input advances only in a clock in which it holds *all* of its
outputs, so every neighbour receives every word, in order. The
lowest-numbered active sender always holds all of its outputs, so the switch
cannot deadlock. It can, however, starve high-numbered senders while
low-numbered ones have traffic. An input with no closed node waits.
`out_src` tells the receiving core which port a word came from.

### BCTU address map (`read` / `write`, word address r2+imm)

| address | meaning |
|---|---|
| 1 .. 8 | status register of buffer 1..8 (read/write) |
| 0x4000 + r | row r of the switching nodes in force, bit c = input c (read only) |
| 0x8000 + {buffer−1, slot, word} | one word of a stored packet (read/write), 3+2+7 bits by default |
| anything else | reads 0, writes ignored |

Addresses above 2047 do not fit the immediate, so they are built in a
register first.

## Managing topologies

The intended program is a polling loop:

1. Install the first topology.
2. Sweep i = 1..8, repeatedly. Read status register i.
3. If the status is 1, clear it and count the buffer. The counter starts at
   1.
4. When the counter reaches 8 (seven buffers finished), load the next
   topology word from data memory, `reconf` it and restart the count.
5. Stop after the sixth topology.

`tb/npoc_top_env.sv` contains such a program. It is 27 instructions long.

Measured in simulation at full size (default parameters, 50 MHz clock):

* **Pattern time.** Seven ports each broadcast 143 packets of 4096 bits, for
  1001 packets per topology. With the star, all traffic crosses port 0 and
  the pattern takes 128,257 clocks, or 2.565 ms. This is one word per clock:
  1000 × 128 clocks = 2.56 ms. The other topologies allow parallel transfers
  and take 36,737 (tree), 55,041 (mesh) and 73,345 clocks (hypercube,
  pipeline, torus).
* **Reconfiguration latency.** The switching nodes change exactly two clocks
  after `reconf` reaches the fourth stage. From the end of the last packet
  of a pattern to the new topology in the switch, the time was 14 to 108
  clocks. It depends on where the sweep is when the last status is set: a
  sweep over eight buffers with three-bubble taken jumps takes about 50 to
  100 clocks. At worst this is 2.2 µs, about 0.08 % of a 2.56 ms pattern.
  The original NPoC program is reported at 17 clocks plus 2 for the switch
  (0.38 µs). This implementation's program and jump penalty do not reach
  that figure in the worst case.

## What follows the original NPoC description, and what is this design's own

These follow the original description:

* the five-stage pipeline;
* the units of the fourth stage;
* the forwarding paths F1 and F2 with selects c1, c2 and c3;
* the 12-to-32-bit immediate;
* the instruction list;
* eight ports and the 8×8 switching-node grid;
* the six example topologies;
* the two-clock reconfiguration;
* 4096-bit packets and a 50 MHz clock;
* the polling algorithm.

These are choices of this implementation:

* **The instruction encoding and opcode numbers.** `addi` and `jdi` (jump if
  different) are used by the original management program but are not in its
  instruction tables. They are included.
* **`ori` is a bitwise OR.** The original table describes `ori` as
  "r2 + immed".
* **Jump timing.** Jumps resolve from EX/ME and squash three instructions.
  This is a reading of the original architecture figure, which labels the
  PC inputs J and DR1 and takes them from beyond EX/ME.
* **The `jump` link value.** The instruction table says "r1 = PC". Here r1
  receives the address of the instruction after the jump (PC+4), the value
  the pipeline carries with each instruction.
* **The load-use interlock.** The original figure shows no hazard unit.
  However, its program uses the result of a `read` in the very next
  instruction, so some mechanism is needed.
* **`reconf` writes the forwarded r1.** The instruction table says "register
  = r1". The architecture figure labels the reconfiguration register's
  input Alures. This design writes the forwarded r1 value directly.
* **The topology-word bit encoding.** One 32-bit word per topology is all
  the original says. The pairs encoding fits because all the example
  topologies are symmetric.
* **Everything about buffers, scheduler and crossbar beyond their roles:**
  - the slot count (4);
  - the packet states;
  - ready-on-arrival;
  - oldest-first order;
  - the status-register rule;
  - the BCTU address map;
  - the arbitration.

  The crossbar's internal design comes from separate work and is not
  reproduced here.
* **Memory sizes and load ports.** Both memories have 1024 words and are
  loaded through ports while reset is held.
* **Reset.** An asynchronous active-low reset clears all state. The
  reconfiguration register resets to 0, which means no links.

The cores attached to the router are not part of the design. Their ports are
brought out of `npoc_top`.

## Files

| file | contents |
|---|---|
| `rtl/npoc_pkg.sv` | types: opcodes, instruction and control structs, slot states, BCTU base, pair-bit function |
| `rtl/npoc_top.sv` | router: processor + buffers + scheduler + crossbar |
| `rtl/npoc_cpu.sv` | the pipeline |
| `rtl/npoc_regfile.sv`, `npoc_alu.sv`, `npoc_control.sv`, `npoc_forwarding.sv`, `npoc_imem.sv`, `npoc_dmem.sv`, `npoc_bctu.sv`, `npoc_reconf_reg.sv` | pipeline units |
| `rtl/npoc_scheduler.sv`, `npoc_input_buffers.sv`, `npoc_rcs.sv` | router units |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/npoc_asm_pkg.sv` | instruction encoder and the six topology words, for testbenches |
| `tb/npoc_top_env.sv` | end-to-end environment: programs, traffic sources, scoreboard |
| `tb/tb_npoc_top.sv` | end to end, default size, 6 packets per port per topology, plus a block/erase/send run |
| `tb/tb_npoc_workload.sv` | end to end, default size, 1001 packets per topology |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends the
simulation. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/npoc_pkg.sv tb/npoc_asm_pkg.sv tb/tb_npoc_top.sv --top-module tb_npoc_top
./obj_dir/Vtb_npoc_top
```

Replace `tb_npoc_top` with any other testbench name. `tb_npoc_workload`
moves six times 1001 packets and runs in about a second.

The end-to-end test counts how often each mechanism happens and fails if
one never does:

* interlocks;
* forwarding from EX/ME and from ME/WB;
* taken jumps;
* reconfigurations;
* receive backpressure;
* crossbar conflicts;
* blocked packets;
* traffic-over events.

## Changing it

* **Ports.** `NPORTS` can go down freely. It can go up only while
  NPORTS·(NPORTS−1)/2 ≤ 32, because a topology must fit one word. The RCS
  asserts this.
* **Buffers.** `NP` (slots) and `PW` (words per packet) must be powers of
  two, with NP ≥ 2. The BCTU packet window is `{buffer, slot, word}` at
  0x8000.
* **Programs.** The immediate is 12 bits signed. Larger constants need
  `addi` and `mul`, or a `load`.
* **Taken-jump penalty.** To shorten it, resolve jumps in EX and squash two
  instructions instead of three. This changes the timing that `tb_npoc_cpu`
  checks.
