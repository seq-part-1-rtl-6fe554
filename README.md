# Single-cycle Y86-64 starter machines

This is a set of small synchronous circuits that lead up to a single-cycle
("SEQ") processor for the Y86-64 instruction set. The central idea is the
split between **state** and **logic**: a register holds a value from one clock
edge to the next, and combinational logic computes the register's next value
from its current one. A counter built as `x = x + 1` with no register is an
unstable loop; put a register in the loop and it counts 0, 1, 2, ... one step
per rising edge. The same pattern, with a program-counter register and an
instruction memory, gives a processor.

Three processors of growing ability are included, each a complete machine:

| machine      | understands          | next PC                                  | Stat                          |
|--------------|----------------------|------------------------------------------|-------------------------------|
| `nop_cpu`    | nothing (all nops)   | PC + 1                                   | always AOK                    |
| `nophalt_cpu`| nop `10`, halt `00`  | PC + 1                                   | AOK / HLT / INS               |
| `nopjmp_cpu` | nop, jmp `70 <dest>`, halt | nop: PC + 1; jmp: dest; else 0xBADBADBAD | AOK for nop, jmp; HLT; INS |

Besides them are the small building-block examples: a 3-bit counter, a
two-register exercise, a 4:1 multiplexer, two priority "case expression"
multiplexers and a 2-bit gate/adder example.

## Fetching: the ten-byte instruction word

A Y86-64 instruction is 1 to 10 bytes long. The instruction memory
(`instr_mem`) therefore returns, for an address `pc`, the ten bytes at
`pc .. pc+9` as one 80-bit word `i10bytes`, **little endian**: the byte at
`pc` is bits 7:0, the byte at `pc+1` bits 15:8, and so on. With memory

    addr: 00 01 02 03 04 05 06 07 08 09 0a 0b ...
    byte: 60 12 61 21 00 00 00 00 00 00 01 00 ...

the reads are

    pc 0: 0x00000000000021611260   (the 01 at 0x0a is the 11th byte, not included)
    pc 1: 0x01000000000000216112
    pc 2: 0x00010000000000002161
    pc 3: 0x00000100000000000021

Fields are then plain bit slices of this word:

| field                     | bits  |
|---------------------------|-------|
| ifun (low nibble, byte 0) | 3:0   |
| icode (high nibble, byte 0)| 7:4  |
| rB (low nibble, byte 1)   | 11:8  |
| rA (high nibble, byte 1)  | 15:12 |
| jmp/call destination      | 71:8  |

So `70 13 00 00 00 00 00 00 00` (jmp 0x13) has icode 7 and destination 0x13.
The read is combinational: the word follows `pc` after a logic delay, with no
clock, so a processor fetches, decodes and computes its next PC within one
cycle.

The memory holds `MEM_BYTES` bytes (default 4096, this design's choice).
Bytes at addresses at or above `MEM_BYTES` read as 0, like unused memory;
`pc + k` is a 64-bit sum and wraps past 2^64. A program is written one byte
per clock through `load_en / load_addr / load_data` (the memory array is not
reset, so clear what you do not load).

## Stat and stopping

Every processor drives a 3-bit **Stat** signal. It is the only way a machine
stops:

| name     | value | meaning                   |
|----------|-------|---------------------------|
| STAT_AOK | 1     | keep going                |
| STAT_HLT | 2     | normal stop (halt)        |
| STAT_ADR | 3     | address error (unused here) |
| STAT_INS | 4     | invalid instruction       |

AOK = 1 is what a running machine reports; HLT, ADR and INS use the usual
Y86-64 values, which are this design's choice. They live in `y86_pkg` with
the opcodes.

`run_ctrl` turns Stat into a run/stop decision. This is the subtle part of
the timing, so precisely:

* While Stat is AOK, every cycle is *run*: it is counted and the processor's
  registers update (`en = 1`).
* The first cycle whose Stat is not AOK is also counted, but the registers do
  **not** update; the machine stops and `final_stat` keeps that Stat. The PC
  therefore stays on the halting (or invalid) instruction.
* Independently, after `TIMEOUT` (default 9999) run cycles the machine stops
  with `timed_out` set; each of those cycles did update the registers.

Consequences you can check: the nop/jmp program below runs **7 cycles**
(six instructions plus the halt); the nop machine, which never stops on its
own, stops after 9999 cycles with PC = 9999 = 0x270f.

The enable input on each processor exists only for this freeze; the
processors themselves are exactly register + next-state logic.

## The nop/jmp machine in detail

    0x000: 10                     nop
    0x001: 70 13 00 00 00 00 00 00 00   jmp 0x013
    0x00a: 70 1c 00 00 00 00 00 00 00   jmp 0x01c
    0x013: 70 0a 00 00 00 00 00 00 00   jmp 0x00a
    0x01c: 10                     nop
    0x01d: 10                     nop
    0x01e: 00                     halt

PC trace: 0, 1, 0x13, 0x0a, 0x1c, 0x1d, 0x1e; Stat is AOK six times, then
HLT. On the first cycle `i10bytes` is 0x137010, icode 1, next PC 1.

Points to know:

* The jump is unconditional in effect: only icode 7 is checked, the condition
  nibble is ignored, so every jCC behaves as jmp.
* A nop is one byte long; the machine never needs the length of a jmp
  because the jump is always taken.
* For any other opcode the next PC is the junk value 0xBADBADBAD (never
  loaded, since Stat is INS and the run stops).

## The building-block examples

* `hcl_reg` — one register of a register bank: input side `d`, output side
  `q`, takes `d` on each rising edge, starts at `INIT` (applied by a
  synchronous reset). Every register in the design is one of these.
* `counter3` — `count` (3 bits, starts 000) fed by `count + 1`; wraps 111 → 000.
* `ab_regs` — registers a, b (4 bits, both start at 1) with
  `x_a = a + b`, `x_b = x_a + a`. Note that `x_b` uses the *new* `x_a`. After
  one edge (2, 3); after two edges (5, 7).
* `mux4` — sel 00/01/10/11 selects a/b/c/d.
* `case_mux` — first match wins: x == 5 → 1; x ∈ {0, 6} → 2; x > 2 → 3; else 4.
* `mux_exercise` — bar > 10 → 100; bar odd → 200; bar < 20 → 300; else 400
  (with an unsigned bar the last arm is unreachable). bar = 9, 10, 11 give
  200, 300, 100.
* `gates_example` — 2-bit `b & a` and `b + a` with the carry lost
  (0b10 + 0b11 = 0b01).

Widths that the examples leave open (the multiplexers' 64-bit data, the case
results) are choices of this design.

## Files and hierarchy

    seq1_top                   everything side by side, shared clk/rst only
      cpu_system (x3)          one machine: CPU + instr_mem + run_ctrl
        nopjmp_cpu / nophalt_cpu / nop_cpu  (selected by CPU_KIND = 2/1/0)
          hcl_reg              thePc, 64 bits, initial 0
        instr_mem
        run_ctrl
      counter3 -> hcl_reg
      ab_regs  -> hcl_reg x2
      mux4, case_mux, mux_exercise, gates_example
    y86_pkg                    opcodes, Stat codes, BAD_PC

Top parameters: `MEM_BYTES` (4096) and `TIMEOUT` (9999). To use a machine:
hold `rst`, write the program through `<jmp|halt|nop>_load_*`, release `rst`.
Each machine exposes `pc`, `stat`, `running`, `cycles`, `timed_out` and
`final_stat`. `seq1_top` only wires examples together; the three machines do
not interact.

Not included: the program register file and the data memory of a full Y86-64
machine — none of these processors uses them.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/y86_pkg.sv tb/tb_seq1_top.sv --top-module tb_seq1_top
    ./obj_dir/Vtb_seq1_top

`tb_seq1_top` runs the whole top at its default sizes: the three machines on
the programs above (nop/jmp: 7 cycles to HLT; nop/halt on five nops: 6 cycles
to HLT; nop: 9999-cycle timeout at PC 0x270f), then an invalid-instruction
run on both decoding machines, while checking the counter, the register
exercise and the combinational examples. It counts each mechanism (halt stop,
INS stop, timeout, jumps, nop steps, counter wrap, every multiplexer input and
case arm, lost carry) and fails if one never happens. It runs in well under a
second.

The other testbenches check single modules against reference models written
in the testbench (a byte-array memory, an instruction-level interpreter for
random nop/jmp chains, integer arithmetic for the examples).
