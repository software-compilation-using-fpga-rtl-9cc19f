# A hardware register allocator for ARM code

Register allocation is the compiler back-end step that replaces a program's unlimited
*virtual* registers with the few *physical* registers the target has. This design does
that step in FPGA logic, not in software on the processor. The host processor compiles a
function to ARM-like instructions that still name virtual registers, packs them into
fixed-size binary records and writes them into the FPGA's memory. The FPGA then
computes how long each virtual register lives. It maps each one to one of the ARM's 13
general purpose registers `r0`..`r12`, reusing a register once its previous holder is
dead and spilling to a stack slot when all 13 are taken. The host reads the mapping back,
rewrites its instructions with it and assembles the result.

The logic is two small state machines that each do one memory read or write per clock.
The first is a backward **liveness** pass and the second a forward **allocation** pass.
Memories, a sequencer and a 32-bit Avalon-MM slave for the host bridge sit around them.
The reference system is an Intel Cyclone V SoC with the FPGA clocked at 50 MHz.

## The Binary-IR record

Every instruction is a 48-byte record: twelve 32-bit words in the instruction memory.
Instruction *i* starts at word `12*i`.

| word | content |
|------|---------|
| 0 | opcode (`opcode_e`, bits [7:0]) |
| 1 | destination operand |
| 2 | source operand 1 |
| 3 | source operand 2 |
| 4 | immediate constant |
| 5 | branch target (instruction index) |
| 6-11 | reserved, zero |

An operand word (`operand_t`) has the register kind in bits [31:30] and the register
number in bits [15:0]. The kinds are 0 = absent, 1 = physical, 2 = virtual and 3 = stack
slot. Only words 1-3 matter to the allocator. The opcode, immediate and target travel
with the record so that the host can rebuild the instruction. The 48-byte size and the
list of fields come from the original description of the format. The word layout and
the operand encoding are this design's own. All of them are in `rtl/regalloc_pkg.sv`.

## Liveness pass (`liveness_fsm`)

The pass walks the instructions from last to first. For each virtual operand it checks
whether the register has been met before on the way back. If not, the current index is
the register's **last use**, which is where its live range ends. The ends are kept in
registers during the walk. Afterwards a write-out loop stores them in the liveness
memory, one `live_t {valid, last}` word per virtual register. A register that never
occurs is written with `valid = 0`.

The machine has eleven states: idle, init, then a *check* and an *extract* state for
each of destination, source 1 and source 2, then next-instruction, write-out and done.
A check state looks at the operand word and decides whether it names a virtual register
in range. The extract state takes the number and records the end. A virtual register
number of `MAX_VREGS` or more sets the `err` flag and is ignored.

The walk is one linear pass in program order and does not follow branches. A value that
lives across a backward branch would get too short a range. Straight-line code and
forward branches, as in the gcd example, are handled correctly.

## Allocation pass (`alloc_fsm`)

The pass walks forwards. For every virtual operand it takes up to four extra states:

1. `A_MAPPED` reads the allocation map. If the register is already mapped, nothing more
   is done.
2. `A_ANY_FREE` reads the register's live-range end and asks whether any of the 13
   physical registers is free.
3. `A_FIND` picks the lowest-numbered free register.
4. `A_RECORD` writes the mapping. This is `{PHYS, r}` and marks `r` busy up to the live
   range's end, or `{STACK, slot}` with a fresh slot number when nothing was free.

A physical register is free at instruction *i* if it was never given out, or if its
holder's last use is before *i*. The test is strict, so a destination never shares a
register with a source that dies in the same instruction. This is a safe choice, though
it is not the tightest possible. A mapping, once made, is never revoked: the first 13
values that are live together keep their registers, and later ones spill. Physical and
stack operands already in the input are left alone. They do not reserve a register, so
the host must keep pre-assigned registers such as argument registers out of the way of
the allocator's picks.

Before the walk, `A_CLEAR` writes an empty entry to every map address. A map entry with
kind 0 after a run means the virtual register does not occur in the program.

### Memory timing inside both machines

The RAMs have a one-cycle read latency. Both machines therefore compute the memory
address from the *next* state and next index, not the current one. The word a state
needs is then already on the read data while that state is current, with no wait
states. Holding this in mind is the key to reading the two state machines.

### Cycle counts

Counted from the start cycle to the done cycle, with *n* instructions and *k* virtual
operands in all:

- liveness: `2 + 4n + k + MAX_VREGS`
- allocation: `1 + MAX_VREGS + 4n + 2k + 2*(spills) + 3*(registers allocated)`

The gcd examples below take 144 to 228 cycles per pass at the default sizes, that is
3 to 5 us at 50 MHz. The `MAX_VREGS` terms are the clear and write-out loops.

## System around the machines (`regalloc_top`)

```
 host bridge ──Avalon-MM──► avmm_slave ──start──► regalloc_seq ──► liveness_fsm ─┐
                               │  ▲                    └──────────► alloc_fsm ───┤
                               ▼  │                                              │
             instruction RAM / liveness RAM / map RAM (bram_dp, dual port) ◄─────┘
```

Each memory has one port for the host and one for the machines. The two machines never
run at the same time. They share the machine-side ports of the instruction and liveness
memories through a multiplexer switched by the liveness machine's busy flag.
`regalloc_seq` starts liveness on the host's command and then allocation. It raises a
sticky `done` and counts the cycles of each phase.

### Host register map

The 32-bit word address has two region bits on top of a 10-bit offset at the default
sizes, 12 bits in all.

| region | content | access |
|--------|---------|--------|
| 0 | control and status registers | see below |
| 1 | instruction memory, 12 words per instruction | read/write |
| 2 | liveness table, one `live_t` per virtual register | read |
| 3 | allocation map, one `map_t` per virtual register | read |

| offset in region 0 | register |
|---|---|
| 0 | CTRL: write bit 0 = 1 to start a run |
| 1 | STATUS: bit 0 busy, bit 1 done (sticky until the next start), bit 2 error |
| 2 | N_INSTR: number of instructions; values above `MAX_INSTR` saturate |
| 3 | LIVE_CYCLES of the last run |
| 4 | ALLOC_CYCLES of the last run |
| 5 | N_SPILL: stack slots used by the last run |

The slave has no wait states (`avs_waitrequest` is tied low) and a fixed read latency of
one cycle, with `avs_readdatavalid`. Do not write the instruction memory or N_INSTR while
STATUS.busy is set.

A host session looks like this:

1. Write the records.
2. Optionally read them back to check them.
3. Write N_INSTR, then write 1 to CTRL.
4. Poll STATUS until the done bit is set.
5. Read regions 2 and 3.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `MAX_INSTR` | 64 | instruction capacity (memory depth is 12 words per instruction) |
| `MAX_VREGS` | 64 | number of virtual registers, and depth of the liveness and map memories |
| `NUM_PHYS` | 13 | allocatable registers, r0..r12 of the ARM ISA |

The original work does not give a program or register capacity. The defaults of 64 are
this design's and are far above what gcd needs. The 13 registers, the 48-byte record,
the 32-bit bus, the eleven-state liveness machine and the four allocation states follow
the original description.

## Example workload: gcd

```c
int gcd(int a, int b) { if (b == 0) return a; else return gcd(b, a % b); }
```

The testbenches encode it in two ways. The first is 15 ARM-like instructions with
virtual registers `v0`..`v5`, where `r0` and `r1` carry the arguments and the result. The
allocator gives `v0`..`v3` the registers r0..r3. `v4` reuses r2, because the quotient died
at the multiply, and `v5` reuses r1. No spills are needed. The second is 24 instructions
in the style an unoptimised compiler emits. There, the arguments and the result pass
through stack slots with `str`/`ldr` (`sp` is written as physical register 13), and
there are nine virtual registers.

| encoding | liveness | allocation |
|---|---|---|
| register-only, 15 instructions | 144 cycles, 2.9 us | 179 cycles, 3.6 us |
| with stack traffic, 24 instructions | 182 cycles, 3.6 us | 228 cycles, 4.6 us |

`tb_bram_transfer` checks the bus side on its own. It moves blocks of 1, 10 and 100 words
into the instruction memory and back, changes each word, then writes and reads the
blocks again. With back-to-back transfers, N words take N cycles to write and N + 1
cycles to read.

## How far it can be trusted, and where it departs

- **Verified in simulation:** every block against a reference model written
  independently in the testbench package (`tb/regalloc_ref_pkg.sv`). This covers the
  liveness table, the complete allocation map, the spill count and the exact cycle
  counts. The programs used are gcd, random programs, a 40-register pressure program
  (27 spills), an empty program and an out-of-range register. Not synthesized for an
  FPGA or timed.
- **Liveness is linear:** see above. Loops are not handled.
- **Pre-coloured registers are not tracked:** physical registers that already appear in
  the input do not block the allocator.
- **No register replacement on the FPGA:** rewriting the instructions with the mapping
  and producing assembly are left to the host. Doing them on the FPGA is only a
  possible extension.
- **Spilling is simple:** a spilled register gets its own stack slot for the whole
  program, and no spill or reload code is generated.
- **Not included:** the processor system and the AXI bridges of the SoC. The top module
  starts at the Avalon-MM slave that such a bridge drives.
- The measured times of the original system (about 10 us for liveness and 9 us for
  allocation on gcd) came from an instruction encoding that is not available. They are
  not comparable with the cycle counts above.

## Files

| file | content |
|---|---|
| `rtl/regalloc_pkg.sv` | record layout, opcode and register-kind enums, `instr_t`, `live_t`, `map_t` |
| `rtl/liveness_fsm.sv` | liveness pass |
| `rtl/alloc_fsm.sv` | allocation pass |
| `rtl/regalloc_seq.sv` | two-phase sequencer and cycle counters |
| `rtl/avmm_slave.sv` | host bus slave and register map |
| `rtl/bram_dp.sv` | dual-port block RAM |
| `rtl/regalloc_top.sv` | top level |
| `tb/regalloc_ref_pkg.sv` | reference model, gcd and random program builders |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_regalloc_top` runs the whole design at its default sizes |
| `tb/tb_bram_transfer.sv` | block transfers of 1, 10 and 100 words through the host bus |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own, with a
watchdog. For example, for the whole design:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/regalloc_pkg.sv tb/regalloc_ref_pkg.sv rtl/bram_dp.sv rtl/avmm_slave.sv \
  rtl/regalloc_seq.sv rtl/liveness_fsm.sv rtl/alloc_fsm.sv rtl/regalloc_top.sv \
  tb/tb_regalloc_top.sv --top-module tb_regalloc_top -o sim
./obj_dir/sim
```

For a single block, list the package files, the module and its testbench, as in
`tb_alloc_fsm`: `rtl/regalloc_pkg.sv tb/regalloc_ref_pkg.sv rtl/alloc_fsm.sv
tb/tb_alloc_fsm.sv`. `tb_bram_dp` and `tb_regalloc_seq` need no packages. The
testbenches use only two-state values and `$urandom`. The end-to-end run takes well
under a second.
