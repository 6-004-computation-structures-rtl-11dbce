# A single-cycle Beta for basic blocks

This is a 32-bit Beta processor that runs *basic blocks*: straight-line
code with no branches or jumps. It executes one instruction per clock cycle.
In each cycle the PC addresses memory, the instruction comes back, two
registers are read, the ALU computes, and then either a register is written
or memory is written at the rising edge that ends the cycle. There is no
pipeline, no cache and no stall. The only sequencing is a synchronous reset
that starts the program at address 0.

The processor implements 24 instructions:

| class | instructions | operation |
|---|---|---|
| load | `LD(Ra, lit, Rc)` | `Rc <- Mem[Ra + sext(lit)]` |
| store | `ST(Rc, lit, Ra)` | `Mem[Ra + sext(lit)] <- Rc` |
| operate, register | `ADD SUB CMPEQ CMPLT CMPLE AND OR XOR SHL SHR SRA` | `Rc <- Ra op Rb` |
| operate, literal | `ADDC SUBC CMPEQC CMPLTC CMPLEC ANDC ORC XORC SHLC SHRC SRAC` | `Rc <- Ra op sext(lit)` |

Every other opcode is a no-op: it writes neither a register nor memory.
R31 always reads as zero, and writes to it are lost.

## Instruction format

```
 31     26 25   21 20   16 15   11 10          0
+---------+-------+-------+-------+-------------+
| opcode  |  Rc   |  Ra   |  Rb   |   unused    |   register form
+---------+-------+-------+-------+-------------+
| opcode  |  Rc   |  Ra   |     literal (16)    |   literal form, LD, ST
+---------+-------+-------+---------------------+
```

The opcodes are the standard Beta assignments: LD `0x18`, ST `0x19`,
ADD `0x20`, SUB `0x21`, CMPEQ `0x24`, CMPLT `0x25`, CMPLE `0x26`, AND
`0x28`, OR `0x29`, XOR `0x2A`, SHL `0x2C`, SHR `0x2D` and SRA `0x2E`. Each
literal form is the register form plus `0x10`. For example, ADDC is `0x30`.
Two example words are `0xC01F0001` = `ADDC(R31,1,R0)` and `0x80400800` =
`ADD(R0,R1,R2)`.

## Datapath: one cycle

```
            +----+   ia    +--------+  id
 reset -->  | PC |-------->| memory |------+---- opcode <31:26> --> ctl (ROM)
            +----+         | (1024  |      |
              ^  +4        |  words)|      +-- Ra <20:16> ---------> RA1
              +--(pc_inc4) |        |      +-- Rb <15:11> --\
                           |        |      +-- Rc <25:21> ---+-RA2SEL-> RA2
                           |        |      |                 +-------> WA
                           |        | mrd  +-- lit <15:0> -- sext --+
                           |        |---+                           |
                           +--------+   |   RD1 ---------> ALU A    |
                               ^  ^     |   RD2 --+- BSEL -> ALU B <+
                          ma   |  | mwd |         +------------------> mwd
                      (ALU out)   (RD2) |   ALU out = ma ----+
                                        +-------------- WDSEL+--> WD (register file)
```

The three muxes, with their input numbering:

| mux | input 0 | input 1 |
|---|---|---|
| PC | PC + 4 | `0x00000000` (reset) |
| RA2SEL | Rb | Rc (used by ST to read the register it stores) |
| BSEL | register port B | literal, sign-extended by copying bit 15 into bits 31:16 |
| WDSEL | ALU output | memory read data `mrd` |

The ALU output is always the data address `ma`. Register port B is always
the store data `mwd`. So memory sees an address and data in every cycle,
but reads only when `moe = 1` and writes only when `wr = 1`.

## Control ROM

`ctl` is a 64-entry, 12-bit ROM addressed by the opcode. The bits of each
word, from most significant: `ra2sel bsel alufn[5:0] wdsel werf moe xwr`.
The contents are computed at elaboration from a per-opcode rule (`rom_entry`
in `rtl/ctl.sv`):

| opcode | ra2sel | bsel | alufn | wdsel | werf | moe | xwr |
|---|---|---|---|---|---|---|---|
| LD | 0 | 1 | ADD | 1 | 1 | 1 | 0 |
| ST | 1 | 1 | ADD | 0 | 0 | 0 | 1 |
| OP | 0 | 0 | op | 0 | 1 | 0 | 0 |
| OPC | 0 | 1 | op | 0 | 1 | 0 | 0 |
| anything else | 0 | 0 | 0 | 0 | 0 | 0 | 0 |

### The write-enable rule

The memory write enable must be valid from the very first clock edge, before
any real instruction has been fetched. At that point the PC holds an
arbitrary value, so the fetched word is arbitrary too. It could decode as a
store to an arbitrary address and corrupt the loaded program. The ROM's
store request `xwr` is therefore gated: `wr = xwr & ~reset`. An assertion in
`beta` checks that `wr` is never 1 on a clock edge while `reset` is 1.
Register writes are not gated. A garbage register write during reset does no
harm, because a program sets its registers before using them.

## ALU encoding

The ALU's function code is this design's own choice. It follows the usual
Beta ALU layout:

| ALUFN | unit | notes |
|---|---|---|
| `00 xxx0` / `00 xxx1` | adder | ADD / SUB (bit 0 inverts B and adds 1) |
| `01 abcd` | Boolean | result bit = `abcd[{b,a}]`: AND `011000`, OR `011110`, XOR `010110` |
| `10 xx00` / `xx01` / `xx11` | shifter | SHL / SHR / SRA by `b[4:0]` |
| `11 0011` / `0101` / `0111` | compare | CMPEQ / CMPLT / CMPLE, signed, from the Z, N, V flags of `a - b` |

All compares subtract, so the adder does double duty. If you change the
encoding, edit `beta_pkg` (constants) and `rom_entry` in `ctl`. The test
benches hold their own copy of the codes (`tb_ctl`, `tb_alu`).

## Register file

`regfile` is a two-read, one-write memory with 31 locations (R0 to R30).
Around it are a mux on each read port that returns 0 for address 31, and the
RA2SEL mux on the second read address. A write to R31 falls off the end of
the 31-location array and is ignored. Reads are combinational. A write lands
at the rising edge and is visible right after it. The registers are not
reset.

## Memory

`main_memory` is one array of 1024 32-bit words that holds both program and
data. It is word-addressed through address bits `[11:2]`, so byte addresses
wrap modulo 4 KiB. It has three ports:

* Instruction read, always on: `id = M[ia[11:2]]`.
* Data read, on when `moe = 1`, otherwise 0: `mrd = M[ma[11:2]]`.
* Data write at the rising edge when `wr = 1`: `M[ma[11:2]] <- mwd`.

Both memories are built on `ram_2r1w`. It is a generic array with two
combinational read ports, each with an output enable, and one clocked write
port. Reads and writes of locations beyond `NLOC` return 0 and are ignored.
The memory has no initial contents. Load a program by writing
`u_mem.u_ram.mem[]` from the test bench before releasing reset.

## Timing

* One instruction completes per cycle. `ia` advances by exactly 4 on every
  rising edge unless `reset` is high.
* Hold `reset` high across the first rising edge. After that edge `ia = 0`,
  and the instruction at address 0 executes during the next cycle.
* To compare against a reference, sample the outputs just before a rising
  edge. At that point the current instruction has executed, but its register
  or memory write has not happened yet. `ma` carries the ALU result of every
  instruction, so this one signal exposes nearly every computation.
* The critical path is instruction fetch, register read, ALU, and (for a
  load) data-memory read, arriving at the register-file write data. Compare
  and load instructions are usually the slowest. This single-cycle
  organisation cannot beat three memory accesses per cycle without
  pipelining.

## Where this RTL departs from the original lab design

* The source design is a gate-level netlist for a simulator with
  three-state memories. This RTL is two-state. A disabled memory read port
  returns 0 instead of floating. Reads of missing locations return 0
  instead of unknown. The rule "a write with an unknown address wipes the
  whole memory" cannot arise.
* The memory device's electrical and area figures are not modelled: delays
  (2 ns, 4 ns or 40 ns by size), rise and fall times, capacitances and the
  per-port area estimates. The RTL is zero-delay.
* Only ADD and ADDC are pinned down by encoded examples. The other opcode
  values are the standard Beta ones.
* The ALU encoding and internal structure are this design's own.
* The control ROM is written as a computed constant table rather than 64
  literal words. It could equally be synthesised as gates, which also
  speeds up signals like RA2SEL.
* The reference test program that the original lab runs for checkoff is not
  included. The test benches generate their own programs instead (see
  below).

## Files

| file | contents |
|---|---|
| `rtl/beta_pkg.sv` | opcodes, ALUFN codes, control-word struct |
| `rtl/beta_system.sv` | top: `beta` + `main_memory` |
| `rtl/beta.sv` | processor: PC, control, register file, BSEL/WDSEL, ALU |
| `rtl/pc.sv`, `rtl/pc_inc4.sv` | PC register with reset mux; +4 as a half-adder chain |
| `rtl/ctl.sv` | control ROM and write-enable gating |
| `rtl/regfile.sv` | 31 x 32 register file, R31 = 0, RA2SEL |
| `rtl/alu.sv` | ALU |
| `rtl/ram_2r1w.sv` | two-read, one-write memory array |
| `rtl/main_memory.sv` | 1024-word program/data memory |
| `tb/beta_ref_pkg.sv` | instruction encoders and reference semantics for the benches |
| `tb/tb_*.sv` | one self-checking bench per module |

## Verification

Every bench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

* `tb_beta_system` is the end-to-end test at full size (1024 words). It
  runs a random 480-word straight-line program against an instruction-level
  model and compares `ia`, `ma`, `moe`, `wr` and `mwd` every cycle, plus
  the whole data area at the end. The program does the following:
  * Sets R0 to R30.
  * Uses all 24 instructions, R31 as a source and as a destination,
    negative literals, loads from words stored earlier, and unimplemented
    opcodes.
  * Re-asserts reset in the middle of a store, which must be suppressed.

  The bench fails if any of these never happens.
* `tb_example_program` runs the three-word example program
  `ADDC(R31,1,R0); ADDC(R31,2,R1); ADD(R0,R1,R2)` on the full system.
  `ma` must be 1, 2, 3, and the zero words that follow must act as no-ops.
* `tb_beta` runs the same example and then a hand-computed sequence of
  loads, stores, shifts, compares and a no-op. It tests the processor
  alone, with a memory model in the bench.
* `tb_pc`, `tb_pc_inc4`, `tb_alu`, `tb_ctl`, `tb_regfile`, `tb_ram_2r1w`
  and `tb_main_memory` test each unit against independent models.

To simulate with Verilator 5, for example the end-to-end bench:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/beta_pkg.sv tb/beta_ref_pkg.sv tb/tb_beta_system.sv \
    --top-module tb_beta_system -Mdir obj_dir -o sim
./obj_dir/sim +verilator+rand+reset+2 +verilator+seed+7
```

Change the seed to get a different random program. Any other bench builds
the same way with its own name. The simulator is two-state, so
uninitialised state starts random. The benches initialise everything they
compare.
