# ABACUS: a hardware analyzer for characterizing user software

Hardware performance counters are cheap and run at full speed, but there are few of
them and they count only fixed, predefined events. Software simulators can measure
almost anything, but they run orders of magnitude slower than the real machine.
ABACUS (hArdware-Based Analyzer for the Characterization of User Software) sits
between the two. It is a block of logic placed *beside* a processor, outside its
core. It watches a small set of the processor's signals and counts workload events
in independent **profiling units**, one event per clock, with no slowdown of the
program. Software configures, starts, stops and reads the units through
memory-mapped registers on the system bus. Because each metric is a separate unit,
the analyzer can be built with whichever units an investigation needs.

This repository holds synthesizable SystemVerilog for the analyzer in its reference
configuration. That configuration was used with a LEON3 (SPARC v8) processor on an
AMBA AHB bus, and has:

* one **code profiling unit**, which counts instructions executed inside address ranges;
* two **memory reuse units**, which build reuse-distance histograms, one for the
  instruction cache and one for the data cache;
* one **instruction mix unit**, which sorts instructions into classes through an
  opcode table that software can rewrite;
* all counters 40 bits wide.

## Structure

The analyzer has three layers. The external interface layer is the only part that
changes when the analyzer is moved to another system.

```
        AHB system bus                              processor + caches
              |                                             |
  +-----------v-----------------------------------------------v-----------+
  | external    abacus_ahb_slave                     abacus_proc_signals  |
  | interface   (register window)                   (sampling register)   |
  |                   |  reg_req_t / rdata                  | events      |
  | control     abacus_controller  --run, clear, unit_en--> abacus_       |
  | logic       (decode, CTRL/UNIT_EN/INFO)                 profile_control|
  |                   |  one request per unit               | gated strobes|
  | profiling   code_prof   reuse (I$)   reuse (D$)   instr_mix           |
  | units       unit 1      unit 2       unit 3       unit 4              |
  +-----------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `abacus_pkg` | Shared constants, the register-request record `reg_req_t`, the unit numbers and the SPARC opcode extraction |
| `abacus_ahb_slave` | AHB slave. It turns bus transfers into register requests. Writes take no wait state, reads take one. |
| `abacus_controller` | Decodes each request to a unit, holds the control registers and multiplexes read data back |
| `abacus_proc_signals` | Registers the snooped processor and cache signals at the analyzer boundary |
| `abacus_profile_control` | Passes an event strobe to a unit only while the analyzer runs and that unit is enabled |
| `abacus_code_prof_unit` | Counts instructions per address range |
| `abacus_reuse_unit` | Builds a reuse-distance histogram from the cache's LRU stack |
| `abacus_instr_mix_unit` | Looks up each opcode in a table to find its class, then counts instructions per class |
| `abacus_top` | The reference configuration, with every unit wired in |

Everything runs on one clock, `hclk`. The processor signals must be synchronous to it.

## Register window

The slave decodes the low 16 bits of `HADDR`. Only 32-bit word accesses are
supported. `HADDR[15:12]` selects a unit and `HADDR[11:2]` selects a word inside
it. A word that is not used reads as 0.

| Unit (`HADDR[15:12]`) | Word | Register |
|---|---|---|
| 0 controller | 0 | `CTRL`: bit 0 `RUN`. Units count only while it is set. Bit 1 `CLEAR`: writing 1 zeroes every counter; it is a one-cycle pulse and reads back as 0. |
| | 1 | `UNIT_EN`: bit *k* enables unit *k*+1. All bits are set at reset. |
| | 2 | `INFO` (read-only): `{present-unit mask[7:0], counter width[7:0], 16'hABAC}` |
| 1 code profiling | 4*r*, 4*r*+1 | `START`*r*, `END`*r* (read/write). Reset gives an empty range. |
| | 4*r*+2, 4*r*+3 | count *r*: low 32 bits, then the upper bits |
| 2 I-cache reuse, 3 D-cache reuse | 2*k*, 2*k*+1 | histogram bin *k*: *k* = 0 counts misses, *k* = *d*+1 counts reuse distance *d* |
| 4 instruction mix | 2*k*, 2*k*+1 | count for class *k* |
| | 256 + opcode | class of that opcode (3 bits, read/write) |

Counters wrap at 2^40. At 50 MHz with one event per clock, that takes about six
hours. Read a 40-bit counter as two words while the analyzer is stopped: nothing
latches the upper word when the lower one is read.

A typical measurement runs in this order:

1. Configure the ranges and the class table.
2. Write `CTRL = 3` to clear the counters and start.
3. Run the workload.
4. Write `CTRL = 0` to stop.
5. Read the counters.

## The profiling units

### Memory reuse distance

This unit is the one most tied to its surroundings. It works with a set-associative
cache that uses LRU replacement. In such a cache, the set's LRU stack already holds
the locality of each access. If a hit lands on the line at stack position *d*, then
exactly *d* other lines of that set were used since this line was last used. The
unit does not track addresses itself. For every access, the cache gives it:

* `acc_valid`: an access took place;
* `acc_hit`: whether it hit;
* `acc_way`: the way that holds the line;
* `lru_stack[0..WAYS-1]`: the way numbers of the accessed set *before* the access,
  most recently used first.

A miss increments bin 0. A hit finds `acc_way` in the stack, all positions compared
in parallel, and increments bin *position*+1. With the 2-way caches of the reference
platform there are three bins: miss, distance 0 and distance 1. An assertion flags a
hit whose way is missing from the stack. The cache under test must bring its LRU
state out to these ports. For a 2-way cache, the stack is just the MRU way followed
by the other way. The unit itself works for any `WAYS`.

### Instruction mix

The unit indexes a 256-entry table with the opcode of each executed instruction.
For SPARC v8 the opcode is `{IR[31:30], IR[24:19]}`, that is `op` followed by `op3`.
The table entry names the counter to increment. Software can rewrite the table at
any time, so one build of the hardware supports any classification scheme with up
to `N_CLASSES` classes. An entry of `N_CLASSES` or above means the instruction is
not counted.

The table is a dual-port RAM with synchronous reads, so it maps onto one FPGA block
RAM. One port classifies instructions and the other serves the bus. The pipeline is
two stages: the table read, then the counter increment. It accepts a new instruction
every clock. The table is not reset, so load it before the first run. To use
another instruction set, change `sparc_opcode()` in `abacus_pkg` (and `OPC_W`).

### Code profiling

The unit holds `N_RANGES` pairs of start and end addresses. It compares every
executed instruction's PC against all pairs in parallel. Range *r* counts the
instruction when `START`*r* ≤ PC ≤ `END`*r*. Ranges may overlap, and one instruction
then counts in each range that holds it. The unit is mostly registers and
comparators, which makes it the largest of the units.

## Timing of an event

| Cycle | What happens |
|---|---|
| *t* | The processor presents `instr_valid` or a cache access |
| *t*+1 | `abacus_proc_signals` holds it. Profile control gates it with `RUN` and `UNIT_EN`. |
| *t*+2 | The code-profiling and reuse counters have incremented |
| *t*+3 | The instruction-mix counter has incremented (one extra cycle for the table read) |

Each source can deliver one event per clock with no back-pressure. Register writes
complete with no wait state. Register reads have one wait state: `HREADYOUT` is low
for one cycle, then the data is on `HRDATA`.

## Parameters

| Where | Parameter | Default | Origin |
|---|---|---|---|
| `abacus_top` | `CNT_W` | 40 | Counter width of the reference configuration |
| | `WAYS` | 2 | The reference platform's 2-way instruction and data caches |
| | `N_RANGES` | 6 | This design's choice, sized to the reported flip-flop count of the code profiling unit |
| | `N_CLASSES` | 6 | This design's choice, sized to the reported flip-flop count of the instruction mix unit |
| | `USE_CODE_PROF`, `USE_REUSE_I`, `USE_REUSE_D`, `USE_INSTR_MIX` | 1 | Builds or leaves out each unit |

A unit that is left out keeps its slot in the register window and reads as zero.
Its bit in `INFO` is clear.

At the defaults, coarse synthesis gives about 1,365 flip-flop bits and 768 memory
bits, the instruction-mix table, for the whole analyzer.

## How far this follows the original design

**Taken from the original description:**

* the three-layer structure and its blocks;
* the AHB attachment;
* the memory-mapped, run-time-configurable units;
* the unit mix of the reference build (two reuse units, one instruction mix unit,
  one code profiling unit);
* 40-bit counters;
* reuse distance read from the cache's LRU stack, with miss/0/1 bins for 2-way caches;
* the opcode-indexed class table in block RAM;
* start/end address registers with comparators for code profiling;
* one instruction per clock.

**Choices made here, because the description does not specify them:**

* the register map and the `CTRL`/`UNIT_EN`/`INFO` registers;
* the slave's wait-state scheme;
* the exact signals snooped, and the port form of the LRU stack;
* the role of profile control, read here as gating the events with run and enable;
* inclusive ranges;
* the opcode bits used for SPARC, and the "not counted" class code;
* the numbers of ranges and of classes;
* a single clock domain;
* counters that wrap;
* no latching of the upper word of a counter.

**Not included:**

* **The AHB master of the external interface.** The original design has one, but
  nothing says what it transfers.
* **A "miscellaneous" profiling unit.** It is shown only as a placeholder.
* **Attribution of events to individual threads.** The framework is meant for
  studying threads, but no mechanism for this is described, so every count covers
  all code the processor runs.
* **The processor and its platform.** The LEON3, its caches, the DDR controller,
  the AHB-to-APB bridge, Ethernet, the UART and the debug unit are existing IP that
  the analyzer attaches to.

## Simulation

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_abacus_top` | End-to-end test at default parameters. A software side on AHB and a processor side (synthetic instruction stream through 16 KB and 8 KB 2-way LRU cache models) check every counter against a reference model. It covers: counting only while running, disabled units, clear, reloading the table, overlapping ranges, uncounted opcodes, all reuse bins of both caches, and read wait states. |
| `tb_abacus_reuse_experiment` | The reuse-distance measurement on six synthetic workloads, from cache-resident to streaming, 20,000 back-to-back instructions each. It checks the histograms and that the bins add up to the instructions and memory operations executed. |
| `tb_abacus_top_subset` | A build without the code profiling and D-cache reuse units |
| `tb_abacus_*` (one per module) | Unit tests: AHB timing, decode, LRU-stack position (also 4-way), table pipeline, range limits, carry into the upper counter word |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/abacus_pkg.sv tb/tb_abacus_top.sv --top-module tb_abacus_top -o sim
./obj_dir/sim
```

Each of them finishes in well under a second. (`-Wno-fatal` keeps the width-extension warnings of the testbench code from stopping the build.) The `SYNCASYNCNET` lint note on the
reset comes from the `disable iff` of the protocol assertions, not from the logic.
