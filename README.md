# Octavo: a registerless, eight-thread soft processor

Octavo is a processor built around what an FPGA provides rather than around
a conventional ASIC pipeline. Its two central ideas:

* **One memory, no registers.** Instructions, data, constants and the
  "register file" live in one memory. Every instruction names three memory
  addresses, `D = A op B`. There are no load, store or immediate
  instructions. A constant is a memory word you address. Indirect addressing
  works by writing a computed address into an operand field of a later
  instruction. This is *instruction synthesis*, i.e. self-modifying code.
* **No hazards, by construction.** Eight threads issue round-robin, one
  instruction per cycle. Any two instructions in flight belong to different
  threads, except when they are eight or more cycles apart. So the pipeline
  has no stalls, no forwarding and no hazard detection. Each stage can be
  registered as deeply as the block RAMs need to run at full speed.

The RTL is parameterised by word width, address width (memory depth),
pipeline length (= number of threads, 8 to 16) and the number of
memory-mapped I/O ports. Its defaults are the reference configuration:

* 36-bit words
* 10-bit operand fields, so 1024 words
* 8 threads
* 2 I/O ports on each data memory

## Files

| file | contents |
|---|---|
| `rtl/octavo_pkg.sv` | opcodes (`opcode_e`), write/branch predicates, `make_instr` assembler helper, default thread start addresses |
| `rtl/octavo.sv` | the core: pipeline, write-back, memory copies |
| `rtl/octavo_ram.sv` | simple dual-port block RAM (I memory, and inside A/B) |
| `rtl/octavo_dmem.sv` | A or B data memory with memory-mapped I/O |
| `rtl/octavo_ctl.sv` | controller: per-thread PC memory and jump decision |
| `rtl/octavo_alu.sv` | four-stage ALU (plus any added multiplier stages) |
| `rtl/octavo_addsub.sv` | two-stage ripple-carry adder/subtractor |
| `rtl/octavo_logic.sv` | registered logic unit (also passes the adder result) |
| `rtl/octavo_mul.sv` | three-stage multiplier from two alternating half-rate multipliers |
| `tb/*_tb.sv` | one self-checking testbench per module, plus end-to-end runs of other family members (`octavo_wide_tb`, `octavo_mid_tb`, `octavo_deep_tb`, `octavo_sweep_tb` with its helper `octavo_sweep_point`) |

## Instruction set

An instruction word is `WIDTH` bits wide:

```
 WIDTH-1 .. WIDTH-4 | unused            | D (ADDR bits) | A (ADDR bits) | B (ADDR bits)
      opcode        | (2 bits at 36/10) |  destination  |   source A    |   source B  (LSBs)
```

B sits in the least-significant bits. So adding a small number to an
instruction word moves its B operand, and OR-ing an address into a word with
B = 0 sets it. The programming examples below depend on this. A word must
satisfy `WIDTH >= 4 + 3*ADDR`, and the core checks this at elaboration.

| opcode | mnemonic | action |
|---|---|---|
| 0000 | XOR | D = A ^ B |
| 0001 | AND | D = A & B |
| 0010 | OR  | D = A \| B |
| 0011 | SRL | D = A >> 1, zero fill |
| 0100 | SRA | D = A >> 1, sign fill |
| 0101 | ADD | D = A + B |
| 0110 | SUB | D = A − B |
| 0111 | (unused) | no operation: nothing written, no jump |
| 1000 | MLO | D = low word of A × B (signed) |
| 1001 | MHI | D = high word of A × B (signed) |
| 1010 | JMP | PC = D |
| 1011 | JZE | if A == 0, PC = D |
| 1100 | JNZ | if A != 0, PC = D |
| 1101 | JPO | if A >= 0, PC = D |
| 1110 | JNE | if A < 0, PC = D |
| 1111 | (unused) | no operation |

In the ALU opcodes, A and B are the *contents* of the addressed words. In
the jumps, the target is the D *field itself*, not the word stored at D.
Jumps write nothing. `make_instr(WIDTH, ADDR, op, d, a, b)` in the package
assembles a word.

## Pipeline

One instruction enters per cycle, and each stage holds a different thread:

| stage | what happens |
|---|---|
| 0 | I memory read at the thread's PC |
| 1–3 | registers only: they keep the I memory block RAM away from the A/B block RAMs |
| 4–5 | A memory reads operand A, B memory reads operand B (two cycles, RD0/RD1). Opcode and D ride along in two registers. |
| 6–7 | controller (CTL0, CTL1) produces the thread's next PC |
| 6–9 | ALU (ALU0–ALU3) produces R |
| write-back | R is written at address D into the I memory (one cycle) and into the A and B memories (WR0, WR1) |

The control loop has exactly eight registers:

1. the I memory's read-address register
2. the five instruction registers of stages 1–5
3. CTL0
4. CTL1

The controller's PC output feeds the I memory address directly, which closes
the loop. That is why there are 8 threads. The thread counter inside the controller
never has to be told which thread it serves: the PC it produces in a cycle
comes back to it exactly eight cycles later.

### Deeper family members (`THREADS` = 9 … 16)

Multipliers wider than the native DSP width need extra adders, and these
need more pipelining. Setting `THREADS` above 8 does four things:

* It adds `THREADS-8` register stages to the multiplier, after the product
  selection (`EXTRA` in `octavo_mul`/`octavo_alu`).
* It delays the logic-unit result by as many stages, so the ALU paths stay
  balanced.
* It adds the same number of spacer registers to stages 1–3.
* It adds one thread per added stage.

The control loop and the operand read-after-write loop both become exactly
`THREADS` cycles long. An instance is named after that length: an
"N-stage" Octavo below has `THREADS` = N. All the rules below keep their
form, with each stage added making a result appear two cycles later. Placing the control-loop
stages among the spacers is this design's choice.

### Timing rules for software

All three follow from the pipeline and are checked by `octavo_tb`. The
numbers are for the 8-thread pipeline.

1. **Issue rate.** Each thread issues one instruction every 8 cycles.
2. **Data results.** A result is readable by the *very next* instruction of
   the same thread. Let the instruction's PC be issued in cycle *c*:
   * its operand reads register their address at *c*+4;
   * R is registered at *c*+9;
   * the A/B RAMs are written at *c*+11.

   The next instruction's operand addresses are registered at *c*+12.
3. **Instruction writes need one delay slot.** The I memory is written at
   *c*+10. The thread's next instruction was already fetched at *c*+8. The
   *second* following instruction is the first to see a rewritten
   instruction. Put any independent instruction or a NOP (opcode 0111)
   between them.

A write to an I/O address produces `io_wren`/`io_wdata` in cycle *c*+11,
or *c*+11+2·(`THREADS`−8) in a deeper pipeline. The testbenches check this
exact latency. A read of an I/O address samples
the I/O input at the RD0 edge, *c*+4.

### One logical memory, three copies

The A memory feeds operand A, the B memory feeds operand B, and the I memory
feeds instructions. All three receive *every* write, at the same address.
Software therefore sees a single address space. An instruction can read
another instruction as data through A or B, and a data write can change
code. Only the top `IO_PORTS` addresses differ between the copies:

* A read there through the A memory returns `a_io_rdata[addr LSBs]`.
* A read there through the B memory returns `b_io_rdata[...]`.
* A write there pulses `a_io_wren` and `b_io_wren` for that port, with R on
  `a_io_wdata`/`b_io_wdata`. The word is also stored in the RAMs.

The I memory has no I/O. One instruction can therefore do two I/O reads and
one I/O write, e.g. `ADD IO1, IO0, IO1` reads `a_io_rdata[0]` and
`b_io_rdata[1]`.

## Programming by instruction synthesis

**Pointer dereference** (`a = *b`, with `Z` a word holding 0, `b` holding
the address of `c`):

```
        OR   T, T, b      ; T's B field (0) becomes the address in b
        NOP               ; delay slot
  T:    ADD  a, Z, 0      ; now ADD a, Z, c  ->  a = c
```

**Indexed access** (array sum): the loop adds the word `one` to its own
`ADD sum, sum, ARR` instruction. This steps the B field through the array.

**Subroutine return**: a return is a `JMP` whose D field is filled in by the
caller. The caller copies a prepared word `JMP <return address>` into the
last instruction of the subroutine, then jumps to it. Calls are not
re-entrant.

**Thread start**: thread *t* starts at address *t* (`START_PC` of
`octavo_ctl`). Addresses 0–7 typically hold one `JMP` per thread to its
code. A thread with nothing to do should spin on a jump to itself.

## Units

### Data memory (`octavo_dmem`)

**Read.** In RD0 the address goes to the RAM. At the same time the low
address bits select one I/O input, which is registered together with the
high address bits. In RD1 the high bits choose between the RAM word and the
registered I/O word (all ones means an I/O location), and the result is
registered.

**Write.** In WR0 the address and data are registered for the RAM. The data
is also registered onto the shared I/O output bus. If the address is an I/O
location, that port's write strobe is registered. In WR1 the RAM is written.

Reads and writes overlap only in RD0/WR1. A read therefore sees every write
presented at least one cycle earlier. The underlying RAM (`octavo_ram`)
returns the new word when a read and a write of the same address meet on
one edge.

### ALU (`octavo_alu`)

Every unit works on every instruction, and the result is picked at the end:

* **Adder/subtractor** (`octavo_addsub`): ripple-carry, split into two
  registered halves, ALU0–ALU1.
* **Logic unit** (`octavo_logic`): in ALU2. It computes XOR/AND/OR/SRL/SRA
  from the three low opcode bits, or passes the adder result for ADD/SUB.
  Each output bit is a function of six inputs: three select bits, a[i] (or
  a[i+1] for shifts), b[i] and the sum bit. That is one 6-input LUT per bit.
* **Multiplier** (`octavo_mul`): ALU0–ALU2.
* **ALU3**: chooses the logic-unit result, the low product word or the high
  product word, and registers R.

Latency is four cycles, with a new operation every cycle.

### Multiplier (`octavo_mul`)

Wide DSP multipliers cannot be clocked at the block-RAM rate. The unit
therefore uses two word-wide multipliers, each running at half rate, and
alternates between them:

1. A state bit toggles every clock.
2. On even cycles the operand pair is captured by datapath 0, on odd cycles
   by datapath 1.
3. Each datapath's product register loads two cycles after its input
   registers. So each multiplier has two full clock periods.
4. The output selects the datapath that loaded on the last edge.

The result is one 2·WIDTH-bit product per cycle, three cycles after the
operands. The two half-rate clocks of a vendor implementation (clk/2 and its
inverse) are written here as clock enables in the single clock domain. A
timing tool must be told that each multiply is a two-cycle path.

### Controller (`octavo_ctl`)

The Program Counter Memory (PCM) holds the next PC of every thread. In an
FPGA it maps to a small LUT memory; in this RTL it is a register array. A
counter walks through the threads.

* **CTL0** registers three things:
  * whether operand A is zero or non-negative;
  * the opcode;
  * D.
* **CTL1** registers the jump decision, D again, and the thread's PCM
  entry.

The output PC is D for a taken jump and the PCM entry otherwise. PC+1 is
written back to the thread's entry on the next edge.

## Interface of the core (`octavo`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; hold ≥ 2 cycles |
| `a_io_rdata`, `b_io_rdata` | in | IO_PORTS × WIDTH | I/O words read at the top addresses |
| `a_io_wdata`, `b_io_wdata` | out | WIDTH | I/O write data, valid while a strobe is high |
| `a_io_wren`, `b_io_wren` | out | IO_PORTS | one-cycle write strobe per I/O port |
| `pc_o`, `pc_thread_o`, `jump_o` | out | ADDR, log2 THREADS, 1 | PC issued each cycle, its thread, taken-jump flag (observation only) |

**What reset does:**

* Pipeline opcodes are set to NOP, and write enables are cleared.
* Every PCM entry gets its thread's start address.
* No memory is written while `rst` is high.

**What reset does not do:** memory contents are not reset. A program must be
placed in all three copies (`u_imem.mem`, `u_amem.u_ram.mem`,
`u_bmem.u_ram.mem`) before `rst` falls. The testbenches do this with
hierarchical assignments. A synthesis flow would use memory initialisation
files instead.

## Where this RTL makes its own choices

Where the published design gives the structure, this RTL follows it: the
stage layout, the memory read/write organisation, the ALU composition, the
half-rate multiplier and the controller. The following points are this
design's own decisions:

* **Instruction fields:** the position of the unused bits, so that B is in
  the LSBs.
* **Arithmetic:** multiplication is signed. The adder's carry chain is split
  at the middle.
* **Unused opcodes:** 0111 and 1111 act as NOPs.
* **Reset and start-up:**
  * reset behaviour;
  * thread *t* starts at address *t*;
  * the instruction fetched with a PC captured during reset is squashed.
* **I/O:** the default of 2 I/O ports, placed at the top addresses.
* **Multiplier clocking:** single-clock enables replace the derived
  half-rate clocks.
* **Deeper pipelines:** where the added stages sit in the multiplier, and
  the spacer registers that lengthen the control loop.
* **Not built:**
  * a synthesis test harness that serialises I/O pins;
  * FPGA-specific primitives. Memories are inferred from arrays and
    multipliers from `*`.

The observation ports `pc_o`, `pc_thread_o` and `jump_o` exist only to make
testing easier.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/octavo_pkg.sv \
          tb/octavo_tb.sv --top-module octavo_tb -Mdir obj_octavo
./obj_octavo/Voctavo_tb
```

Replace `octavo_tb` with any other testbench name:

* `octavo_ram_tb`, `octavo_dmem_tb`, `octavo_mul_tb`, `octavo_addsub_tb`,
  `octavo_logic_tb`, `octavo_alu_tb`, `octavo_ctl_tb`: one module each,
  driven with random stimulus every cycle against a reference model. They
  also check each unit's exact latency.
* `octavo_tb`: the core at its default size. Eight thread programs run
  concurrently and finish in about 2,500 cycles, well under a second:
  * pointer dereference;
  * a counted loop with back-to-back dependences;
  * signed MLO/MHI;
  * every conditional jump both taken and not taken;
  * logic operations;
  * an indexed array sum through a self-modifying B field;
  * two subroutine calls with synthesized returns;
  * I/O through both memories.

  The testbench checks the memory results, the I/O writes and their latency,
  that the three memory copies agree, and the strict round-robin order. It
  also counts that each mechanism occurred: taken and untaken jumps, I/O
  reads and writes, instruction writes, multiplies.
* `octavo_wide_tb`: the same programs on a 72-bit, 4096-word instance.
* `octavo_mid_tb`: the same programs on a 12-stage, 12-thread, 36-bit
  instance. The extra threads spin.
* `octavo_deep_tb`: the same programs on a 16-stage, 16-thread, 72-bit
  instance.
* `octavo_sweep_tb`: five family members side by side, each running a
  four-instruction square-and-output loop. The members are:
  * 16 bits, 16 words, 8 threads;
  * 40 bits, 256 words, 14 threads;
  * 50 bits, 32,768 words, 16 threads;
  * 72 bits, 4096 words, 8 threads;
  * 28 bits, 256 words, 12 threads, 4 I/O ports.

  It checks every MLO/MHI word written to I/O, the 4·THREADS-cycle spacing
  of one thread's loop, the I/O latency at each depth and the round-robin
  order. The helper `octavo_sweep_point` holds one member and its checks.
  An 8-bit word leaves only 1-bit address fields (two words of memory), so
  the narrowest member tested is 16 bits.

## Verification status

All nine files lint cleanly apart from one unused-bits warning: the unused
instruction bits are deliberately ignored. All twelve testbenches pass. Each
unit testbench also fails against a deliberately broken copy of its module
(wrong mux select, dropped carry, wrong shift fill, wrong jump condition,
registered vs. combinational read, wrong write-back stage). The design has
not been run on an FPGA, and no timing closure at the block-RAM rate is
claimed for this RTL.
