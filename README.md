# RRISC — a small superscalar machine with an 8-bit datapath

RRISC ("Radically Reduced Implementation of a Superscalar Computer") gets instruction-level
parallelism from very little hardware. Each cycle it fetches two 13-bit instructions and can
start both at once, in three independent execution pipes. It does no dependency checking:
the program keeps dependent instructions apart, usually with a single `nop` between clusters
of independent instructions. The hardware still catches one class of error. If two
instructions would write the same destination in the same cycle, it raises TRAP and stops.

This repository holds synthesizable SystemVerilog for the whole processor: dispatch, two ALU
pipes, the memory pipe, register file, collision detector, and instruction and data memories.
It also holds a self-checking testbench for every block and an end-to-end testbench that runs
programs on the full-size machine.

## The machine at a glance

| Item | Size |
|---|---|
| Data word | 8 bits |
| Instruction word | 13 bits, 4-bit opcode first |
| General registers | `$0`..`$7`, 8 bits; `$0` reads 0 and ignores writes |
| Special registers | `PC`, `AR` (address register), `SP` (stack pointer): 14 bits each; `SET` (test result) and `CY` (carry): 1 bit each |
| Instruction memory | 16384 × 13 bits, as two 8192-word banks (even and odd addresses) read together |
| Data memory | 8192 × 8 bits (13-bit address) |
| Execution pipes | master ALU (ALU + I/O), slave ALU (ALU), memory (everything else) |
| Issue width | up to two instructions per cycle |

Because registers are only 8 bits wide, every memory address passes through `AR` or `SP`.
`lrl`/`lru` build a byte in a register 6 + 2 bits at a time. `larl`/`laru` move bytes into
`AR`. `lw`/`sw` add a 6-bit offset to `AR`. Jumps are PC-relative with an 8-bit offset, or go
to `AR` (`jf`, `jalf`, `ret`). The link register of a call is `AR`, and a function saves it on
the stack with `pushl`/`pushh`.

## Instruction encoding

The field layouts and the meaning of every instruction follow the RRISC instruction set. The
numeric opcode values are this implementation's own assignment (`rtl/rrisc_pkg.sv`):

| Opcode `[12:9]` | Format | Instructions (sub-opcode `[8:6]` or bit 8) |
|---|---|---|
| 0 | N: `op sub ------` | 0 `nop`, 1 `pushl`, 2 `pushh`, 3 `popl`, 4 `poph`, 5 `sptar`, 6 `artsp`, 7 `ret` |
| 1–6 | R: `op rd r1 r2` | `add sub and or addc not` |
| 7–A | M: `op rd imm6` | `lrl lw sw larl` |
| B | O: `op sub r imm3` | 0 `sll`, 1 `srl`, 2 `sra`, 3 `lru`, 4 `iotr`, 5 `iora`, 6 `iot`, 7 `ior` |
| C | S/O: `op sub r1 r2` | 0 `slt`, 1 `seq` (ALU pipe); 2 `laru`, 3 `pushr`, 4 `popr` (memory pipe); 5–7 reserved |
| D | J: `op j imm8` | `bs` (j=0), `bns` (j=1) |
| E | J | `jn` (j=0), `jaln` (j=1) |
| F | J | `jf` (j=0), `jalf` (j=1) |

Sixteen opcodes are one too few to give every format group its own. So the two tests share
opcode C with three memory-pipe instructions, and the dispatch routes each by its
sub-opcode. `tb/rrisc_asm_pkg.sv` has one encoder function per instruction (`a_add(rd, r1,
r2)`, `a_lw(rd, imm6)`, `a_bs(offset)`, ...).

## How instructions are issued

`rrisc_dispatch` looks at the instruction pair at the PC every cycle. The instruction memory
reads asynchronously, so the pair belonging to a PC value is there in the same cycle. The
dispatch decides what to issue in that cycle, and the chosen pipes latch their instructions
on the next rising edge. Issue is in program order:

* **Pipe choice.** An ALU instruction takes the master ALU pipe if it is free, otherwise the
  slave. An I/O instruction needs the master. Everything else goes to the memory pipe. So
  ALU+ALU, ALU+I/O, ALU+memory and I/O+memory pairs issue together.
* **Pipe-conflict stall.** If both words of a pair need the same pipe (two memory
  instructions, two I/O instructions), the first issues and the second waits one cycle.
  During that cycle the dispatch asserts `nofetch`, and the memory pipe does not advance the
  PC.
* **`nop` is a barrier.** It issues alone in its own cycle, to no pipe, after everything
  before it. A pipe with nothing issued sees its enable low (the NOP flag).
* **Jumps and branches.** Once one issues, the dispatch issues nothing until the memory pipe
  reports `pcc` (PC correct):
  * jump in the even slot: the odd word is held. It issues if `cont` says the branch was not
    taken, and is dropped otherwise.
  * jump in the odd slot: the PC has already moved to the next pair, which waits the same way.
* **TRAP** stops all issue for good, and the PC stays where it is.

When the PC is odd (a jump landed on an odd address), only the odd word of the pair is
issued. Normally the PC moves from pair to pair: `{PC[13:1]+1, 0}`.

## Pipeline timing and the rules a program must follow

All three pipes have the same three stages:

| Stage | ALU pipes | Memory pipe |
|---|---|---|
| 1 | latch issued instruction, read registers | latch instruction and its address, read one register |
| 2 | compute; read `CY`; I/O strobes (master) | data-memory access; `AR`, `SP` and `PC` change at the end of the stage |
| 3 | register write on the **falling** edge; `SET`/`CY` load at the end | register write on the falling edge; `pcc`/`cont` to the dispatch |

Cycle by cycle, for an instruction A issued at the edge that ends cycle 0:

```
cycle          1        2         3                       4
A (ALU)        read     compute   write reg (falling edge) -
                                  SET/CY load at end
B issued at end of cycle 2 ->     read (sees A's value)   compute (sees A's SET/CY)
```

Two things follow:

1. **Dependent instructions must issue at least two cycles apart.** One `nop` between them
   is enough, and so is any other instruction that keeps the issue busy for a cycle. The
   register file writes on the falling edge, so a result lands half a cycle before the
   reading pipe latches its operands. No forwarding network is needed. The same distance
   covers `SET` before a branch and `CY` before `addc`.
2. **A taken or not-taken jump costs two empty issue cycles.** For a jump issued at the end
   of cycle 0, the memory pipe resolves it in cycle 2 and writes the PC at the end of that
   cycle. `pcc` is high in cycle 3, and the dispatch issues from the new pair in that same
   cycle.

`AR`, `SP` and `PC` are written at the end of stage 2, so stack instructions can follow each
other with no gap (`pushl; pushh; pushr $1; ...`). The original machine needed one `nop`
after popping `AR` before a `ret` or `jf`. Programs written that way run unchanged here; the
`nop` is simply not needed.

A program that breaks rule 1 is not detected. It just reads the old value.

## TRAP: write collisions

`rrisc_collision` compares the stage-3 writes of the three pipes every cycle. Two writes to
the same register `$1`..`$7`, two writes to `SET`, or two writes to `CY` set `trap` on the
next edge. `trap` stays set until reset; on the original board it lit an LED.

Almost every ALU instruction writes `CY`. Only `and`, `or`, `lru` and the I/O instructions
leave it alone. So **two arithmetic instructions issued in the same cycle trap**, even when
their destination registers differ. For example, `add $2,$1,$0` and `sub $3,$0,$1` sitting in
one instruction pair will trap, as will `srl` and `sra` in one pair. The dual ALU pipes pay
off for `and`/`or`/`lru`/I/O paired with an arithmetic instruction, and for ALU work paired
with memory-pipe work. This follows the collision rule as the architecture states it. The
instruction set's own arithmetic example pairs `add` with `sub` and `srl` with `sra`, so it
traps on this implementation. The testbench runs it both ways: as usually
written, where it must trap, and rescheduled, where it gives the expected values.

`CY` values: `add`/`addc` give the carry out. `sub`, `slt` and `seq` give the carry out of
`a + ~b + 1`, so 1 means no borrow. `not` clears `CY`. A shift leaves the last bit shifted out
in `CY`. `slt` compares unsigned.

## Memory-pipe details

* `lw`/`sw`: address = low 13 bits of `AR + imm6`, with `imm6` unsigned.
* Stack: `push*` writes at `SP`, then increments; `pop*` decrements, then reads. The data
  address is the low 13 bits of `SP`. `SP` resets to 0, so the stack grows upward from
  address 0.
* `pushh` stores `{00, AR[13:8]}`, and `poph` loads `AR[13:8]` from the low 6 bits.
* `jn`, `jaln`, `bs`, `bns`: target = the jump's own address + the sign-extended `imm8`.
  `jaln` and `jalf` put the address after the jump in `AR`, so `ret` (`PC <- AR`) resumes
  there.
* `lrl rd, imm6` replaces bits 5:0 of `rd` and keeps bits 7:6. `lru r, imm2` (ALU pipe)
  replaces bits 7:6.

## Terminal interface

The master ALU pipe serves four I/O instructions, through top-level ports to an external
terminal interface. That interface is not part of this design.

| Instruction | Effect | Ports |
|---|---|---|
| `iotr r` | `r <- {0000000, TBR}` | `tis_tbr` (transmit buffer ready) |
| `iora r` | `r <- {0000000, RDA}` | `tis_rda` (receive data available) |
| `iot r`  | send `r` | `tis_xmit_we` one-cycle strobe with `tis_xmit_data`, in stage 2 |
| `ior r`  | `r <- received byte` | `tis_recv_data`, `tis_recv_re` one-cycle strobe in stage 2 |

The strobe handshake is this implementation's choice.

## Top level and files

`rrisc_top` has these ports: `clk`; `rst` (synchronous, active high); a program-load port
(`prog_we`, `prog_addr`, `prog_data`) for writing the instruction memory while `rst` is
held; the terminal signals; `trap`; and `pc`. Execution starts at address 0 when `rst` falls.
The whole design is one clock domain. The register file uses the falling edge of that clock.

| File | Contents |
|---|---|
| `rtl/rrisc_pkg.sv` | widths, opcode enum, sub-opcodes, field helpers, pipe classification, write-back struct `wb_t` |
| `rtl/rrisc_dispatch.sv` | issue logic, `nofetch`, waiting for `pcc` |
| `rtl/rrisc_master_alu.sv` | master ALU pipe, I/O, `SET`/`CY` registers |
| `rtl/rrisc_slave_alu.sv` | slave ALU pipe |
| `rtl/rrisc_alu.sv` | combinational ALU used by both ALU pipes |
| `rtl/rrisc_mem_pipe.sv` | memory pipe, `PC`/`AR`/`SP` |
| `rtl/rrisc_regfile.sv` | 8 × 8 register file, 5 read / 3 write ports, falling-edge write |
| `rtl/rrisc_collision.sv` | TRAP |
| `rtl/rrisc_imem.sv`, `rtl/rrisc_dmem.sv` | memories (arrays, asynchronous read) |
| `rtl/rrisc_top.sv` | the processor |
| `tb/rrisc_asm_pkg.sv` | instruction encoders for writing test programs |
| `tb/rrisc_ref_pkg.sv` | reference model of the ALU and I/O instructions |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_rrisc_top` |

Synthesised (coarse, memories kept as memory cells), the processor without its memories is
about 470 word-level cells and 205 flip-flop bits, plus 278,592 bits of memory.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Every one also has a watchdog. To run
the end-to-end test with Verilator 5:

```
verilator --binary --timing --top-module tb_rrisc_top -y rtl \
    rtl/rrisc_pkg.sv tb/rrisc_asm_pkg.sv tb/tb_rrisc_top.sv
./obj_dir/Vtb_rrisc_top
```

Block testbenches are built the same way: list `rtl/rrisc_pkg.sv`, `tb/rrisc_asm_pkg.sv` and
`tb/rrisc_ref_pkg.sv` (where used), then the testbench. `-y rtl` finds the rest.

To write your own program, fill a queue with the `a_*` encoders and load it as the `run` task
in `tb_rrisc_top` does. Results are easiest to observe through `iot`.

## What is verified

* `tb_rrisc_alu`: 3000 random ALU instructions against integer arithmetic.
* `tb_rrisc_regfile`: random traffic on all ports, `$0`, and same-cycle read-after-write.
* `tb_rrisc_master_alu`, `tb_rrisc_slave_alu`: random instruction streams against the
  reference model, with the stage-2 and stage-3 latencies checked exactly. The master test
  also covers the `SET`/`CY` merge and the I/O strobes.
* `tb_rrisc_mem_pipe`: 4000 random memory-pipe instructions against a sequential model of
  `PC`/`AR`/`SP`/memory, with random `SET` and `nofetch`.
* `tb_rrisc_dispatch`: hand-worked cycle-by-cycle scenarios covering every issue rule above.
* `tb_rrisc_collision`, `tb_rrisc_imem`, `tb_rrisc_dmem`.
* `tb_rrisc_top`, at full size, runs seven programs:
  * the arithmetic example, with the exact cycles of its outputs checked;
  * the function-call example;
  * a branch loop with a carry chain and a store/load;
  * terminal input;
  * the unscheduled arithmetic example, which must trap;
  * a register collision;
  * readers issued zero, one and two cycles after a register's writer. Only the last one
    sees the new value.

  It also checks that each mechanism occurs at least once: dual issue, conflict stall, `nop`
  barrier, jump wait, taken and not-taken branch, held odd word, TRAP and receive strobe.

Not verified: timing of a real implementation, and longer programs such as the
demonstration programs (Life, sorting, matrix routines) that ran on the original machine.
Their code is not available.

## Differences from the original machine

* The original was partitioned over six XC4000 FPGAs (one per major unit) and ran at about
  4 MHz. Here the units are modules wired directly in one clock domain.
* The opcode numbers, the stage in which each pipe does its work, the terminal-interface
  handshake, reset values and the program-load port are this implementation's choices. The
  architecture fixes the formats, the instruction meanings, the word and memory sizes, the
  falling-edge register file, the dispatch stall causes and the `NOFETCH`/`PCC`/`CONT`
  signals. Those are kept as described.
* `AR` is written one stage earlier than the original's programming rule assumes (see
  above). Programs written for the original run unchanged.
* The dispatch tolerates a jump immediately after a branch at an odd address, which the
  original forbids. Keep the rule if programs must also run on the original.
