# Instruction-level DFA monitor for network processor cores

A network processor runs packet-processing software, so a crafted data packet
can attack it. One example is a packet whose length field overflows a
bounds check and then smashes the stack. On a Harvard-architecture core the
attacker cannot run code placed on the stack, but the attack can still
return into existing library code ("return-to-library"). That code might
forward the packet to every output port and then crash the router. Either way
the processor then runs a sequence of instructions that the program's control
flow never allows.

This RTL is a hardware monitor that sits next to one processor core and checks
**every executed instruction** as it runs:

* Before the program is installed, an offline analysis of its binary builds a
  graph of all legal instruction sequences. Each node is an instruction. Each
  edge is labelled with a 4-bit **hash** of the instruction it leads to.
* Hash collisions make this graph nondeterministic: one branch can have two
  targets with the same hash. The graph is therefore converted to a
  **deterministic automaton (DFA)**. In the DFA, one state is always active.
* The DFA is stored so that **each step costs exactly one memory read**. The
  monitor therefore keeps up with a core that executes one instruction per
  clock and never stalls it.
* The processor reports an instruction. If its hash is not a valid edge of
  the current state, the monitor signals an attack. It drops the current
  packet, holds the processor in reset, and starts again from the program's
  first instruction. The next packet is processed normally.

The default build matches the FPGA prototype the design was published with:

* 4-bit nibble-sum hash
* 4096-row state machine memory of 32-bit rows (131,072 bits)
* 16-entry group base register file
* 125 MHz, one check per clock

## The hash

`hash_nibble_sum` adds the eight 4-bit nibbles of the 32-bit instruction word
and keeps the low 4 bits (the sum modulo 16). The carries mix the bits, so
real code's hashes come out close to uniformly distributed. Sums of single
bits, XOR of nibbles and mixed OR/XOR were the other candidates. They spread
the hash values less evenly and are not built.

With `HASH_W` set to some other value the same nibble sum is truncated to
`HASH_W` bits. Each extra hash bit doubles the valid-hash vector in every
memory row. Measured on benchmark graphs, a 4-bit hash costs about 40 % more
memory than a 3-bit one, and a 5-bit hash about 57 % more than a 4-bit one.

## How the DFA is laid out in memory

This layout is the heart of the design. It is the part to understand before
generating a graph for it.

A naive layout gives every state 16 slots, one per possible hash. Most states
have one or two successors, so nearly all of those slots would stay empty.
Limiting every state to two slots does not work either: subroutine returns
and hash collisions create states with many successors. The monitor instead
stores **sets of sibling states**:

* **Set.** For a state S with `g` successors, its successors occupy `g`
  consecutive rows. Within those rows they are sorted by ascending hash of
  the edge that leads to them. These `g` rows are S's set.
* **Group.** All sets of size `g` are placed one after another and form
  group `g`. There are up to 16 groups (sizes 1..16).
* **Set index.** S's set is the n-th set in its group. This number n is
  S's "offset in state group".
* **Rows of a state.** A state appears once in every set it belongs to.
  A state reached from three different branching states occupies three rows.
  Those rows have identical contents.

A row describes one state, by what it needs to find *its own* successors:

| bits (default) | field | meaning |
|---|---|---|
| `[31:28]` | number of next states `g` | size of this state's set; `0` encodes 16 |
| `[27:16]` | offset in state group | index of this state's set inside group `g` |
| `[15:0]`  | valid hash vector | bit `h` set when an outgoing edge carries hash `h` |

For other parameter values the row is `{HASH_W, OFF_W, 2**HASH_W}` bits wide,
with the fields in the same order (most significant first).

The **group base register file** holds the first row of each group. Entry
`i` holds the base of group `i+1`.

### One step

Say the current state's row is `{g, offset, vec}` and the processor reports
an instruction with hash `h`:

1. **Check.** The step is legal if `vec[h]` is set.
2. **Rank.** `k` is the number of set bits of `vec` below bit `h`. It is the
   position of the matching successor inside the set.
3. **Next row.** The next state's row is
   `base[g] + g * offset + k`.

Worked example: state *a* has two successors, with hashes 2 and 7. Its set is
set 0 of group 2, and group 2 starts at row 0x002. The processor reports an
instruction with hash 7:

* the vector is `0x0084`, so bit 7 is set and the step is legal
* one valid hash lies below 7, so `k = 1`
* the next row is `0x002 + 2*0 + 1 = 0x003`

A step reads one row and one register. Nothing is searched and no second
access is ever needed, however many successors a state has.

### The start row

The state before the processor's first instruction needs a row as well. It is
a virtual state with one edge, to the instruction at the reset vector. Its row
can be anywhere in memory (for example just after the last group). The
`cfg_start_*` port loads its address into the start row register. The monitor
returns to this row whenever the processor is reset.

### Building a graph for the monitor

The offline tool is software and is not part of this RTL. It:

1. Finds every possible successor of every instruction:
   * the next instruction
   * both ways of a branch
   * the targets of direct jumps
   * for an indirect jump, every statically known target (for instance all
     return addresses of a subroutine)
2. Labels each edge with the nibble-sum hash of the target instruction.
3. Converts the graph to a DFA by subset construction. Successors with equal
   hashes merge into one DFA state.
4. Counts each state's successors, numbers the sets within each group, and
   assigns group bases in increasing group order. Group `g` holds `g × (number
   of states with g successors)` rows.
5. Writes each state's successors into its set, ordered by hash, using the
   row format above.

On the published benchmark programs, the DFA and the set layout together need
only about 6 % more rows than the program has instructions.

## Monitor control and attack response

`monitor_ctrl` has four states:

| state | entered when | what happens |
|---|---|---|
| `MON_IDLE` | reset, or `enable` low | nothing is checked; the processor is left alone; the graph can be loaded |
| `MON_RESTART` | `enable` rises | `np_reset` is held for `RST_CYCLES`; the start row is read |
| `MON_RUN` | reset hold ends | each `instr_valid` cycle is one DFA step |
| `MON_RECOVER` | invalid hash in `MON_RUN` | `drop_packet` and `attack` pulse; `np_reset` held for `RST_CYCLES`; the start row is read |

Timing, with the default `RST_CYCLES = 4`:

```
cycle       t          t+1        t+2  t+3  t+4   t+5
instr       bad hash   (ignored while in reset)    first instr
attack      0          1          0    0    0     0
drop_packet 0          1          0    0    0     0
np_reset    0          1          1    1    1     0
state       RUN        RECOVER    ...            RUN (start row ready)
```

The three responses are registered, so they rise one clock after the
offending instruction is reported. After a legal instruction in cycle `t`,
the next state's row is on the memory output in cycle `t+1`. That is exactly
when the next instruction's hash must be checked. Idle cycles
(`instr_valid` low) leave the current row where it is.

Recovery is this simple because packet processing keeps almost no state
between packets:

* the packet being processed is discarded (the packet buffer is cleared)
* the processor restarts with a fresh stack
* the next packet is handled normally

An attack packet is caught within a few instructions of the malicious control
transfer. It therefore costs only a few cycles: legal traffic keeps flowing
and the attack packet never leaves the router.

## Interface of the top, `np_security_monitor`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `enable` | in | 1 | monitoring on; its rising edge resets the processor |
| `instr_valid` | in | 1 | the processor executed an instruction this cycle |
| `instr` | in | 32 | that instruction word |
| `np_reset` | out | 1 | hold the processor in reset |
| `drop_packet` | out | 1 | clear the current packet (one cycle) |
| `attack` | out | 1 | invalid transition detected (one cycle) |
| `cfg_mem_we/addr/wdata` | in | 1/12/32 | write one memory row |
| `cfg_base_we/idx/wdata` | in | 1/4/12 | write group base `idx+1` |
| `cfg_start_we/wdata` | in | 1/12 | write the start row address |
| `cur_state_addr` | out | 12 | row of the current DFA state |
| `running` | out | 1 | the monitor is in `MON_RUN` |

To use it:

1. Keep `enable` low.
2. Write all rows the graph uses, the 16 group bases and the start row.
3. Raise `enable`.

The memory has its own write port, so rows can be written while monitoring
runs. Rows the current program still uses should only be rewritten with
`enable` low. The base registers and the start register reset to 0. The
memory is not reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `HASH_W` | 4 | hash bits; vector `2**HASH_W` bits, count field `HASH_W` bits, `2**HASH_W` groups |
| `ROWS` | 4096 | state machine memory rows |
| `ADDR_W` | 12 | row address bits |
| `OFF_W` | 12 | offset-in-group field bits |
| `RST_CYCLES` | 4 | processor reset hold time, in cycles |

`HASH_W` = 4, `ROWS` = 4096 and the 32-bit row (which follows from 131,072
memory bits) come from the published prototype. `OFF_W`, `ADDR_W` and
`RST_CYCLES` are this design's choices. With `ROWS` = 4096, a 12-bit set
index covers even the worst case: every state in group 1. The published
memory-size figures for benchmark-sized graphs assume a 10-bit offset field
(30-bit rows). Set `OFF_W = 10` to match them.

## Files

| file | contents |
|---|---|
| `rtl/mon_pkg.sv` | default sizes and the controller state type |
| `rtl/hash_nibble_sum.sv` | instruction hash |
| `rtl/hash_compare.sv` | valid-edge test and rank `k` |
| `rtl/group_base_rf.sv` | 16-entry group base register file |
| `rtl/next_addr_calc.sv` | `base[g] + g*offset + k` |
| `rtl/state_mem.sv` | state machine memory (simple dual-port, registered read) |
| `rtl/monitor_ctrl.sv` | stepping, attack response, reset and restart |
| `rtl/np_security_monitor.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_packet_throughput` and `tb_hash_widths` |
| `tb/mon_graph_pkg.sv` | random DFA generator and memory-image builder used by the system tests |
| `tb/mon_config_harness.sv` | end-to-end run of one parameter configuration, used by `tb_hash_widths` |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each one also has a cycle watchdog.

* **Unit tests.** Each block is compared against an independent reference on
  hand-worked and random cases:
  * the nibble sum, computed by shifting
  * the rank `k`, computed by walking the vector
  * the worked address example above, plus the 16-successor case
  * RAM read latency and hold
  * a cycle-level model of the controller
* **`tb_np_security_monitor`** runs the top at its default size.
  * It generates a random 2,600-instruction program graph with fan-outs up to
    16, which uses about 3,800 of the 4,096 rows.
  * It loads the graph through the `cfg` ports.
  * It runs 400 packets at one instruction per clock, with random idle
    cycles. About a quarter of the packets leave the graph partway through.
  * It checks the current row after every step. It also checks the exact
    cycles of `attack`, `drop_packet` and `np_reset`.
  * It counts every mechanism: steps in each of the 16 groups, steps with
    `k > 0`, idle cycles, reports ignored during reset, recoveries, clean
    packets after an attack, and re-enabling.
* **`tb_packet_throughput`** runs 256-byte packets of 5,355 instructions each
  at 125 MHz, mixing 0 %, 25 % and 50 % attack packets.
  * A regular packet must take exactly 5,355 cycles. The monitor adds no
    stall.
  * An attack must be flagged one cycle after its first invalid instruction.
  * The data-processing rate with no attacks must be
    2048 bit / (5,355 × 8 ns) = 47.8 Mbit/s.
  * With attacks mixed in, the rate must rise (63.6 and 95.2 Mbit/s are
    printed), because attack packets are dropped after about 25 cycles.
* **`tb_hash_widths`** builds the monitor with 3-, 4- and 5-bit hashes and a
  10-bit offset field. The rows are then 21, 30 and 47 bits wide.
  * Each configuration runs a 900-instruction random program in its own
    harness, with the same row and flag checks as the full-size test.
  * Each must take steps out of a state with the maximum fan-out: 8, 16 or
    32 successors.

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/*.sv tb/mon_graph_pkg.sv tb/tb_np_security_monitor.sv \
  --top-module tb_np_security_monitor -o sim
obj_dir/sim
```

Unit testbenches need only `rtl/mon_pkg.sv`, their module and their
testbench. `tb_hash_widths` also needs `tb/mon_graph_pkg.sv` and
`tb/mon_config_harness.sv`. Each test finishes in about a second.

## Capacity against the published benchmarks

The state machine memory needs one row per (state, set) membership, plus the
start row. DFA sizes published for nine NpBench programs, with the 4-bit
nibble-sum hash:

| program | rows needed | largest fan-out |
|---|---|---|
| crc | 282 | 2 |
| frag | 622 | 3 |
| red | 847 | 2 |
| md5 | 3,228 | 8 |
| ssld | 854 | 5 |
| wfq | 953 | 3 |
| mtc | 2,572 | 3 |
| mpls-upstream | 1,753 | 10 |
| mpls-downstream | 1,706 | 12 |

Every program fits the 4,096 rows. md5 leaves the least room, with 868 rows
to spare. Each program fits on its own; several programs at once fit only if
their rows add up to 4,096 or fewer.

## What is outside this RTL, and where it departs from the published system

* **Not included.** These parts surround the monitor but are not part of
  this RTL; the top brings out their signals as ports instead:
  * the network processor core itself (a 32-bit MIPS soft core with
    separate instruction and data memories)
  * the router around it (Ethernet ports, packet buffers, input arbiter,
    output queues)
  * the control processor that loads graphs
  * the central store of graphs for all installed programs
  * the AES core that decrypts graphs as they arrive
  * the on-chip interconnect

  `instr`/`instr_valid` come from the core, `np_reset` goes to it,
  `drop_packet` goes to the packet buffer, and `cfg_*` comes from the control
  processor.
* **Where the hash is computed.** The hash is computed inside the monitor
  from the full instruction word. The processor only has to expose the word
  it executes. The published system has the core "report a hash", without
  saying which side computes it.
* **Own choices.** These details are not in the published description, so
  this design chose them:
  * the start row register
  * the `enable` input and the processor reset on enable
  * the 4-cycle reset hold
  * the one-cycle response latency
  * the encoding of 16 successors as count 0
  * the exact bit positions in the row
* **Flip-flop count.** The prototype monitor used 26 flip-flops. The 16 × 12
  group base registers are flip-flops here (192 of the 223 bits). An FPGA
  implementation may map them to distributed RAM instead.
* **Multiple cores.** The monitor serves one core. A multi-core processor
  needs one monitor per core, and each can share or have its own graph
  memory.
* **Hash collisions are not detected.** Like any hash-based monitor, an
  attack whose instructions happen to produce only valid hashes along the
  graph goes unnoticed. The chance of this falls geometrically with the
  attack's length.
