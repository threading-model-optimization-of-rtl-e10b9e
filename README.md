# AEMB with coarse-grained threading

AEMB is a small open-source soft processor that runs the MicroBlaze EDK 6.3
instruction set and has two hardware threads. The original core interleaves them
cycle by cycle: thread 0, thread 1, thread 0, and so on. That hides every
back-to-back dependency inside a thread. The cost is that one thread on its own can
never use more than every other cycle.

This RTL builds the *coarse-grained* variant of that core. One thread runs
back-to-back until it fetches a branch, a conditional branch or a return. In the
next cycle the core continues with the other thread. The branch is resolved in the
execute stage while the other thread runs. When the other thread branches in turn,
the first thread resumes exactly at its target or fall-through address. So a taken
branch normally costs no cycle at all. The price is paid on data hazards: a thread's
instructions now follow each other with no gap, so the core needs forwarding paths
and a hazard stall that the interleaved core could do without.

Everything is SystemVerilog in `rtl/`, one module or package per file, and the top
module is `aemb_core`. Each block has a self-checking testbench in `tb/`.

## Thread switching: how it works

### Where the switch is decided

The pipeline has four stages, all frozen together by one enable (`ena`) while any
bus waits:

| stage | what happens | modules |
|---|---|---|
| F | choose thread and address; the cache or bus returns the word one cycle later | `aemb_bpcu`, `aemb_iwbif`, `aemb_iche` |
| D | decode, read registers, forward operands, detect hazards | `aemb_ctrl`, `aemb_regf` |
| X | ALU, branch condition and target, first half of multiply and barrel shift, data and accelerator bus access, exceptions | `aemb_intu`, `aemb_brcc`, `aemb_mult`, `aemb_bsft`, `aemb_dwbif`, `aemb_xslif` |
| W | second half of multiply and shift, load and GET data, register write | `aemb_core` |

The address unit `aemb_bpcu` keeps one program counter per thread, `pc[t]`. It also
keeps a flag `ok[t]` that says whether that counter is known. It predecodes the word
in D combinationally, so it can pick the thread of the next fetch in the same cycle:

* **Branch without delay slot in D:** fetch the other thread. `ok` of the branching
  thread drops until its branch resolves in X one cycle later. X then writes the
  target, or pc+4 if the branch is not taken, into `pc[t]`.
* **Branch with delay slot in D:** fetch the delay slot from the same thread. When
  the delay slot reaches D, switch. The branch is already in X at that moment, so the
  thread's counter is known at once.
* **Any other instruction:** continue with pc+4 of the same thread.

`gpha_o` shows the thread being fetched.

A cycle-by-cycle picture of two threads A and B, where `bri` has no delay slot:

```
cycle  D (decode)        X (execute)
  1    A: bri            -              branch in decode: the next fetch is thread B
  2    B: i              A: bri         A's target is written into pc[A]
  3    B: brlid          B: i           branch with delay slot: fetch B's delay slot
  4    B: delay slot     B: brlid       delay slot in decode: the next fetch is thread A
  5    A: target         B: delay slot
```

### The only branch stall

Suppose two switching instructions of the two threads reach D in consecutive cycles:
A branches, then B's very first instruction also branches. The fetch would then have
to return to A before A's branch has left X. In that one case the address unit
fetches a bubble (`br_stall`). An interrupt or a branch without delay slot in A,
followed in the next cycle by any switching instruction in B, costs exactly one
cycle. Every other switch is free, whether or not the branch is taken.

### Starting and splitting the threads

After reset both threads start at address 0. Thread 0 runs first, and at its first
branch thread 1 starts from address 0 too, so both run the same start-up code. The
threads are split the way AEMB does it, with the *mutex* bit (bit 4) of the MSR,
which both threads share. Each thread executes `msrset rD, 0x10` and tests the old
MSR value it got back in rD. The first thread sees the bit clear. The second sees it
already set, so its conditional branch goes the other way. `tb/tb_aemb_core.sv`
shows the start-up sequence.

A thread that is done (or idle) must still branch now and then, for example in a
one-instruction `bri 0` loop. Otherwise the other thread never gets the core back.

## Data hazards

Within one thread, instructions follow each other with no gap, so D forwards operands
into the registered X operands. Each of the three operands (rA, rB, and rD for stores)
is taken from the first source that holds it, for the same thread and register:

1. the result of the instruction now in X, for one-cycle results (arithmetic, logic,
   one-bit shifts, sign extension, msrset/msrclr, link address);
2. the value being written in W, for every result, the late ones included;
3. the register file.

Multiply, barrel shift, load, GET and mfs deliver their result in W, one cycle late.
If the next instruction of the same thread reads that register, `hold` is raised for
one cycle. A bubble goes into X and the address unit fetches the D instruction again.
Because W forwards everything, a dependency with one instruction in between never
stalls. The data-hazard penalty is therefore at most one cycle.

`imm` prefixes are kept per thread. A prefix and its instruction are never split by
an injected interrupt.

## Interrupts and exceptions

* **Interrupt** (`sys_int_i`, level, synchronised by two flops): taken when MSR
  IE=1, BIP=0 and EIP=0, and no MSR-changing instruction is in D or X. The address
  unit replaces the next fetched instruction of the current thread with
  `brali r14, 0x10`. It never does this in a delay slot or after an `imm`. r14 gets
  the address of the replaced instruction, so `rtid r14, 0` returns to it. Taking the
  interrupt clears IE and switches threads like any branch.
* **Exceptions:** illegal opcodes, floating-point opcodes (`0x16`), and misaligned
  half-word or word accesses. They are taken only while MSR EE=1 and EIP=0. The
  instruction is cancelled, along with the younger instruction of its thread in D.
  r17 gets its address, and the thread continues at 0x20. ESR gets {W bit 11,
  S bit 10, rD bits 9:5, cause bits 4:0}, and EAR gets the effective address. EIP is
  set and EE cleared; `rted` undoes both.

MSR bits: IE 1, C 2, BIP 3, mutex 4, EE 8, EIP 9, thread phase 29 (reads as the
thread of the reading instruction), carry copy 31. `mfs` reads PC, MSR, EAR (3) and
ESR (5). `mts` writes the MSR.

## Buses and cache

Three 32-bit Wishbone classic masters:

* **Instruction bus (`iwb_*`).** Used only on a cache miss, one word per miss; the
  interface is read-only.
* **Data bus (`dwb_*`).** Big-endian byte lanes and selects; loads are
  zero-extended.
* **Accelerator bus (`xwb_*`).** Used by blocking GET/PUT. `xwb_adr_o` is the 4-bit
  register number from the instruction and `xwb_tag_o` its control/data bit.

Each bus stalls the whole pipeline until `ack`, with no limit on the wait. An
acknowledge that arrives while another unit holds the pipeline is remembered, so the
access is never repeated.

The instruction cache `aemb_iche` holds 512 words: 32 direct-mapped lines of 16
words. Each line has a 21-bit tag, and each word has its own valid bit, so lines fill
word by word as they are used. Address split: tag [31:11], line [10:6], word [5:2].

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `aemb_core` | `ICH_LINES`, `ICH_WORDS` | 32, 16 | cache lines and words per line |
| `aemb_bpcu` | `RST_PC` | 0 | reset address of both threads |
| `aemb_regf` | `DW`, `AW` | 32, 6 | 64 registers, thread bit as address MSB |
| `aemb_mult`, `aemb_bsft` | `DW` | 32 | data width |

## Where this RTL departs from the AEMB description

* **Branch stalls.** The AEMB description names two stall cases: back-to-back branches,
  and two branches one instruction apart when the first has no delay slot. In this
  4-stage pipeline a branch resolves one cycle after decode, so only the first case
  stalls (one cycle).
* **Data stalls.** The description stalls dependencies on non-forwardable results
  also at a distance of two instructions. Here the write-back stage forwards every
  result, so only the directly following instruction waits, and only for one cycle.
* **GPHA.** AEMB makes the thread signal in its PIPE module. Here it comes from the
  address unit, because threads change on branches. `aemb_pipe` keeps the reset and
  interrupt synchronisers and the pipeline enable.
* **Data bus cycle and strobe.** AEMB drives these separately; here they are
  asserted together for each access.
* **Multiply and barrel-shift latency.** The description gives 2 cycles in one place
  and "more than 2" in another. Two cycles are used.
* **MSR bits other than 29, the ESR layout, the vectors and the interrupt
  injection** follow MicroBlaze conventions rather than anything AEMB-specific.
* **Not implemented.** Exceptions inside a delay slot get no special delay-slot
  marking; avoid misaligned accesses in delay slots. `wdc`/`wic` are no-ops, since
  there is no data cache and the instruction cache is never invalidated. The
  non-blocking GET/PUT forms behave like the blocking ones. Integer divide, the
  register-addressed GET/PUT (opcode 0x13) and all floating-point operations are not
  implemented; they raise the illegal-opcode exception when EE is set.
* **Area.** No area figure is claimed. The reported FPGA results were for a first
  version and a specific device and tool, and are not reproduced here.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`, and
each has a watchdog. The instruction encoders used by the testbenches are in
`tb/aemb_asm_pkg.sv`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/aemb_pkg.sv tb/aemb_asm_pkg.sv rtl/aemb_*.sv \
          tb/tb_aemb_core.sv --top-module tb_aemb_core -o sim
./obj_dir/sim
```

Replace `tb_aemb_core` with any other `tb_aemb_<block>` to run a unit test.

* **`tb_aemb_core`** runs the core at its default parameters. A program built in
  memory splits the threads through the mutex bit. Thread 0 then runs arithmetic,
  forwarding chains, loads and stores of every size, multiply, barrel shifts, an `imm`
  prefix, GET/PUT to an accelerator model, two exceptions (an illegal opcode and a
  misaligned load) and an external interrupt. Thread 1 runs a byte-load loop, stores
  and a subroutine call. The memories answer after random wait states. The testbench
  checks 30 stored results. It also counts each mechanism: thread switches, branch
  stalls, hazard holds, forwards from X and from W, delay slots, imm, cache misses,
  bus waits, interrupt, exceptions, GET, PUT. A mechanism that never happened counts
  as a failure. It finishes in about 550 cycles.
* **`tb_aemb_bpcu`** runs the address unit on a random branchy program with random
  stalls, holds and interrupts. A reference model checks program order per thread,
  the switch rule, and that fetch bubbles appear exactly in the one case above.
* **`tb_aemb_ctrl`** checks the decoder against a reference decoder. It covers the
  forwarding priority, the hold, and the per-thread `imm`.
* **`tb_aemb_intu`** checks the integer unit and the MSR/ESR/EAR against a
  reference model.
* **The other testbenches** check the caches, buses, register file, multiplier,
  shifter and branch unit against simple models with random traffic.
