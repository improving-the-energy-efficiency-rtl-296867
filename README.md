# Tight Loop Cache for a microcontroller instruction fetch path

Embedded programs spend most of their time in a few short loops, and in a
microcontroller every instruction of those loops is fetched again and again
from a large program memory (flash, or block RAM on an FPGA prototype). A
read from a handful of flip-flops costs far less than a read from that
memory. A **Tight Loop Cache** (TLC) is a very small instruction store that
holds the body of the loop now running, so that most fetches are served by
the small store and the large memory stays idle.

Two things set it apart from an ordinary cache:

* **No tags and no valid bits.** The cache is indexed by the low bits of the
  fetch address. Nothing is looked up, so nothing can miss.
* **No miss penalty.** A controller watching the fetch addresses knows,
  before each fetch, whether the word is already in the cache. It then enables
  exactly one of the two memories. The core never waits: every transfer has
  its data in the following cycle.

This repository holds synthesizable SystemVerilog for the fetch side of such a
system. It sits between the AHB-Lite port of a Cortex-M0-class core and its
program memory. The core itself is not included. The testbenches stand in for
it with a driver that produces fetch streams.

## Block diagram

```
                 global_cache_enable
                        |
 HADDR, HTRANS[1], -----+------------------------------+
 HPROT[0] (core)        |                              |
        |         +-----v------------+   main_cache    |
        +-------->| loop_cache_      |------------+    |
        |         | controller       |  cache_we  |    |
        |         |  (loop_counter)  |-------+    |    |
        |         +------------------+       |    v    v
        |                                    |  +-----------------+
        |                                    |  | mem_enable_logic|--> sel (C)
        |                                    |  +-----------------+
        |                      imem_en  |         | cache_en
        |        +--------------------+ |         |
        +------->| instruction_memory |<+         |
        |        | 32 KB              |--INSTRDATA--+----------+
        |        +--------------------+             |          |
        |        +--------------------+  data_in    |          |
        +------->| loop_cache 64 B    |<------------+          |
                 | (we, en)           |--CHDATA--+             |
                 +--------------------+          v             v
                                             +---------------------+
                                             | hrdata_mux          |--> HRDATA
                                             | (select registered) |
                                             +---------------------+
```

| Module | File | Role |
|---|---|---|
| `tlc_system` | `rtl/tlc_system.sv` | top: wires the blocks below to the core's AHB-Lite port |
| `loop_cache_controller` | `rtl/loop_cache_controller.sv` | loop detection, IDLE/FILL/ACTIVE state machine |
| `loop_counter` | `rtl/loop_counter.sv` | counts the loop body to find the loop-closing branch |
| `loop_cache` | `rtl/loop_cache.sv` | 2^W-word tagless direct-mapped array |
| `instruction_memory` | `rtl/instruction_memory.sv` | 32 KB program memory, synchronous read |
| `mem_enable_logic` | `rtl/mem_enable_logic.sv` | read enables of the two memories |
| `hrdata_mux` | `rtl/hrdata_mux.sv` | picks HRDATA for the data phase |
| `tlc_pkg` | `rtl/tlc_pkg.sv` | state enum and HTRANS codes |

## How a loop is detected: address comparison

A loop ends in a **short backward branch** (sbb): a taken jump back by fewer
words than the cache holds. A classic TLC controller finds it by decoding the
branch instruction and using a branch-taken flag from the core. A Cortex-M0
exports no such flag. So this controller looks only at the fetch addresses.

The controller keeps the word address of the previous fetch and subtracts it
from the address now on the bus (`diff = HADDR[31:2] - prev`). The jump is an
sbb when:

* all bits of `diff` above the low `W` bits are ones (the jump goes backwards
  and is short), and
* the low `W` bits, called `ld`, are not zero.

So the jump goes back by 1 to 2^W-1 words, and the whole loop, branch
included, fits in the 2^W entries. This is the address-space counterpart of
the sbb instruction format: an opcode, an upper displacement of all ones, and
a W-bit lower displacement.

The price is latency. A decoding controller sees the branch as the branch
instruction is decoded. The address-compare controller sees it one cycle
later, when the branch target appears on HADDR. The design makes up for this
by making the memory-select output combinational (next section).

## The state machine

```
 IDLE --(sbb taken)--> FILL --(triggering sbb taken again)--> ACTIVE
   ^                    |  \__ sequential fetch: stay          |  \__ sequential, or
   |                    |                                      |      triggering sbb taken: stay
   +--(triggering sbb not taken, or any other jump)------------+
```

* **IDLE.** Fetches come from the instruction memory. When an sbb is seen,
  its `ld` is stored, the loop counter is loaded with it, and the state
  becomes FILL. This branch is now the *triggering* sbb.
* **FILL.** Fetches still come from the memory. Each word is also written into
  the cache (`cache_we = 1`). The loop counter counts up by one per
  sequential fetch. Because `ld` is minus the loop length, the counter
  reaches zero just as the triggering branch has been fetched.
* With the counter at zero, the next fetch decides what happens:
  * It jumps back by the stored `ld`. The triggering sbb was taken again, and
    the state becomes **ACTIVE**. The counter reloads.
  * It is sequential. The branch was not taken, and the state becomes IDLE.
  * It is anything else. The state becomes IDLE.
* Any non-sequential fetch while the counter is not zero is a jump inside the
  loop. It also sends the controller back to IDLE, from FILL or from ACTIVE.
* **ACTIVE.** Fetches come from the cache. The counter reloads each time the
  triggering sbb is taken. There is no way from ACTIVE back to FILL.

A second fetch of the same word counts as neither sequential nor a jump. A
Cortex-M0 fetching a halfword-aligned target does this: it presents, for
example, byte addresses 316 then 318. The two low address bits are ignored
throughout. A fetch is a transfer with HTRANS[1] = 1 and HPROT[0] = 0, the
AHB opcode-fetch code. Other cycles, such as idle cycles and data reads, leave
the controller untouched.

### Output timing, the subtle part

| output | IDLE | FILL | ACTIVE | kind |
|---|---|---|---|---|
| `main_cache` (1 = memory, 0 = cache) | 1 | 1 | 0 | Mealy |
| `cache_we` | 0 | 1 | 0 | Moore |

`main_cache` must already be right during the address phase of the fetch that
*causes* a transition. When the branch target appears on HADDR in FILL, that
word has to be read from the cache in that very cycle. The state register
only turns ACTIVE at the end of that cycle. Likewise, the first fetch after the
loop has to go back to memory in the cycle that leaves ACTIVE. So
`main_cache = !(fetch && next_state == ACTIVE)`.

`cache_we` is simply "state is FILL". It applies to the data phase: the cache
writes the word now on the read bus into the entry of the *previous* address.
For example, take a 4-word loop at byte addresses 312, 316, 320, 324 in an
8-entry cache:

```
HADDR (address phase)  320  324  312  316  320  324  312  316
cache index             0    1    6    7    0    1    6    7
state after the edge  IDLE IDLE FILL FILL FILL FILL ACTV ACTV
main_cache              1    1    1    1    1    1    0    0
cache write (data ph.)  -    -    -    6    7    0    1    -
HRDATA source           mem  mem  mem  mem  mem  mem  cache cache
```

Look at the 312 column where the state becomes FILL. The word for 312 is
written in the next cycle, which is the first FILL cycle. When 312 comes
round again, `main_cache` drops in its address phase, and 312's word comes
from the cache. The word for 324 is still written in that same cycle, from
the memory's data phase. The loop does not have to start at any particular
index. Entries 6, 7, 0, 1 are used in that order.

## Memories, enables and the read multiplexer

Both memories read synchronously: the address is sampled at the end of the
address phase, and the word is presented in the data phase. Each holds its
output while not enabled, as a block RAM does.

Enables follow a small truth table. With `A = global_cache_enable` and
`B = main_cache`:

```
C        = !A | (A & B)        // instruction memory is the source
imem_en  =  C & HTRANS[1]
cache_en = !C & HTRANS[1]
```

Cache *writes* do not depend on `cache_en`, which is 0 in FILL. They depend on
`cache_we` and on the registered HTRANS[1] of the fetch (`htrans_a`). So in
FILL both memories are active at once: one is read and the other is written.

`hrdata_mux` registers `C` at each transfer and steers HRDATA with the
registered copy. The data phase therefore follows the choice made in its
address phase. When `global_cache_enable` is 0, `C` is always 1, so the
cache is never read. The controller keeps running, but its choice is
overridden.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `tlc_system.IMEM_BYTES` | 32768 | program memory size (32 KB, the size of a small Cortex-M0+ MCU) |
| `tlc_system.CACHE_BYTES` | 64 | loop cache size; must be a power of two; W = log2(CACHE_BYTES/4) |
| `loop_cache.W`, `loop_cache_controller.W`, `loop_counter.W` | 4 | cache index width = displacement width |

The longest loop that can be cached is CACHE_BYTES/4 words. With 16-bit Thumb
instructions, the default 64-byte cache holds a loop of up to 32 instructions.
A 16-byte cache holds up to 8 and a 32-byte cache up to 16. Longer loops run
correctly, entirely from the program memory.

## Design choices worth knowing before you change anything

These points are this implementation's own decisions, not part of the TLC
technique itself:

* **Loop detection details:** the exact sbb test on the address difference,
  the same-word rule, and the rejection of a jump of exactly 2^W words.
* **HPROT[0] = 0 means fetch** (standard AHB). Data reads are served by the
  program memory and are never copied into the cache.
* **The cache's write qualifier is the fetch signal,** HTRANS[1] & !HPROT[0],
  not bare HTRANS[1] as in the original prototype. Without this, a load from
  a literal pool inside a loop being filled would overwrite a cache entry.
* **The loop counter's zero comparator looks at the register,** not at the
  multiplexer in front of it as in the classic counter. It therefore flags
  zero one cycle after the loop-closing branch was fetched. This is exactly
  when the address-compare controller needs to know.
* **Enable logic is a block of its own** next to the controller. The
  prototype folded it into the controller; the function is the same.
* **`cache_we` is read as a data-phase signal** (high throughout FILL). A
  textual description of the prototype says it marks the word at the address
  now on the bus, but the prototype's waveforms, and its output labels on the
  IDLE-to-FILL and FILL-to-ACTIVE transitions, show the data-phase behaviour
  used here.
* **The mux select is registered inside `hrdata_mux`** and taken from `C`,
  not from `main_cache`.
* **The delayed cache address is kept inside `loop_cache`.** The controller's
  previous-address register holds the same bits. Sharing it would save W
  flip-flops, at the cost of an extra port.
* **The program-load port** (`prog_we/prog_addr/prog_wdata`) on
  `instruction_memory` is the only way to fill the program memory. The core
  side never writes it. In a real MCU this memory is flash, with its own
  programming path.
* **Reset:** an asynchronous active-low reset clears the controller to IDLE
  and clears the output registers. The memory arrays are not reset. The cache
  needs no reset, since it is only read after FILL has written the whole loop.
* `HREADY` is tied high. The memory system never inserts wait states.

Not included: the processor core, and the decode-based variant of the
controller, which takes the instruction word and the core's condition flags.
Adding more AHB slaves needs an address decoder and a wider read multiplexer,
which this fetch-only system leaves out.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_loop_counter` | load, increment, hold, priority, wrap, zero flag against a model |
| `tb_mem_enable_logic` | all 8 input combinations of the enable table |
| `tb_hrdata_mux` | data-phase select and hold with random traffic |
| `tb_instruction_memory` | full 32 KB load, random reads, latency, hold, ignored low address bits |
| `tb_loop_cache` | the 6,7,0,1 fill pattern, delayed write address, write qualifiers, read latency |
| `tb_loop_cache_controller` | random loop/jump/idle/data traffic against a reference model that tracks loop start and end addresses; every state transition must occur |
| `tb_tlc_system` | whole system at default size: the 312..324 sequence cycle by cycle, loop sizes of 8 to 40 instructions (cache hits counted exactly), cache switched off, random traffic; every HRDATA checked; fills, activations, both kinds of exit, data reads while ACTIVE and refetches each counted |
| `tb_tlc_cache_sizes` | the same loop sizes on 16-byte and 32-byte caches (through the harness `tlc_loop_sweep`) |

With the default 64-byte cache, a loop run 20 times gets 18 of its 20 passes
from the cache. The first pass runs in IDLE, and the second fills the cache.
The loop of 40 instructions (20 words) never gets any.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/tlc_pkg.sv tb/tb_tlc_system.sv --top-module tb_tlc_system -o sim
./obj_dir/sim
```

The controller carries two assertions: the state never goes from IDLE
straight to ACTIVE, and the cache is only selected for a fetch. Build with
`--assert` to enable them.

## Power

The cache saves energy only if a read from its register array costs less than
a read from the program memory. On an FPGA, the two cost about the same, and
a prototype of this organisation saved about one milliwatt out of a memory
subsystem of about four. That is roughly a quarter of the memory-hierarchy
dynamic power at 10 MHz with a 64-byte cache and an 8-instruction loop. On an
ASIC with flash program memory, the per-access ratio is far larger. Counting
`imem_en` against `cache_en` in simulation, as `tb_tlc_system` does, gives the
access mix for a workload.
