# VPLP: a variable predicate logic processor

A small processor whose arithmetic logic unit changes its *logic style* from
one instruction to the next. The same 16-bit word can be treated as:

- a plain binary number (increment, decrement, load, store, compare);
- eight predicate pairs;
- eight dual-rail (differential) bits, optionally with spacer states;
- the three 8-bit lines of a reversible Fredkin gate;
- the two lines of a pseudo-quantum CNOT or SWAP gate;
- a multi-valued (quaternary) number that arrives already converted to binary.

The processor does not need a separate unit for each of these styles. It has
one *variable predicate ALU* (VPALU) that a 5-bit operation code reconfigures
on every instruction. Programs and data live in a *predicate RAM* (PRAM),
built from cells that each store one coupled bit pair (p, q).

The processor is 8-bit in the predicate sense. Every value is eight predicate
pairs, or two 8-bit halves of a 16-bit register or memory word. Addresses are
8 bits wide, so the memory is 256 words.

This repository holds synthesizable SystemVerilog for:

- the processor (`vplp`);
- its PRAM;
- the test system that loads a program into PRAM and then lets the processor
  run it (`vplp_system`, the top level);

plus a self-checking testbench for every module.

## Block structure

```
vplp_system                      test system (top)
├── pram_controller              writes the program into PRAM, then idles
├── bus_mux                      26-bit mux: controller or processor -> PRAM, select = Qrst
├── pram                         256 x 16 predicate RAM, decoder, read mux
│   └── pram8  (x256)            one 16-bit word = eight cells
│       └── pram_cell (x8)       p/q pair, registered enable, gated outputs
└── vplp                         the processor
    ├── reset_circuit            two-flop reset synchroniser -> Qrst
    ├── datapath
    │   ├── data_mux             PRAM data or MVD_in  (MS)
    │   ├── vpalu                the reconfigurable ALU
    │   ├── accumulator_a        A, 16 bit
    │   ├── register_b           B, 16 bit, load / +1 / -1
    │   ├── mv_register          multi-valued output register -> MVD_out
    │   └── flag_register        FLAGS: EQUAL, GREATER, LESS
    └── control_unit
        ├── instruction_register 16 bit, two instructions
        ├── vplc                 the controller FSM
        ├── index_counter        IC, 8 bit, operand address
        ├── program_counter      PC, 8 bit (adder + two muxes + register)
        ├── branch_adder         PC + offset
        ├── pc_save_register     copy of the PC for a later reload (PCin2)
        └── address_mux          PC or IC -> address
```

The shared types live in `vplp_pkg`:

- `opcode_e`: the instruction opcodes;
- `alu_op_e`: the VPALU operation codes;
- `ctrl_t`: the control lines the controller drives.

## Instruction words and the controller

This is the part of the design that needs the most care. The signal traces
the processor must reproduce depend on it cycle for cycle.

### Word format

A PRAM word is 16 bits and holds **two 8-bit instructions**. The high byte is
executed first, then the low byte. Then the processor fetches the next word.
Three instructions break this pattern:

- **LDB #imm16** and **LDA #imm16** take their 16-bit operand from the word
  after the current one. If LDB is in the high byte, the low byte of its own
  word still executes. The PC is then moved past the operand word.
- **LDC #imm8** (load the index counter) and **BIG #off8** (branch if greater)
  use the low byte of their own word as the operand, so they end the word.
  They must therefore sit in the high byte.

For example, the word `171D` followed by `55AF` means "LDB #55AF, then LAB".

### Opcodes

| Opcode | Mnemonic | Effect |
|---|---|---|
| 07 | HLT  | stop until reset |
| 08 | NOP  | nothing |
| 09 | LDC  | IC ← low byte of the word |
| 0A | INC  | IC ← IC + 1 |
| 0B | LDAC | A ← PRAM[IC] |
| 0C | STAC | PRAM[IC] ← A |
| 0D | LDA  | A ← next word |
| 0E | CPAH | FLAGS ← compare A[15:8] with PRAM[IC][15:8] (unsigned) |
| 12 | BIG  | if GREATER: PC ← PC + low byte |
| 14 | DEC  | IC ← IC − 1 |
| 15 | INCB | B ← B + 1 |
| 16 | DECB | B ← B − 1 |
| 17 | LDB  | B ← next word |
| 18 | INCA | A ← A + 1 |
| 19 | DECA | A ← A − 1 |
| 1B | CNB  | CNOT on B |
| 1C | SWB  | SWAP on B |
| 1D | LAB  | A ← B |
| 1E | LBA  | B ← A |
| 20 | FGO  | Fredkin gate on A.hi, B.hi, B.lo |
| 21 | INM  | A ← MVD_in |
| 22 | OUTM | MV register ← A (drives MVD_out) |
| 23–24 | DOR, DAND | dual-rail OR / AND, result in A and B |
| 25–27 | TNOT, TOR, TAND | dual-rail NOT / OR / AND with a single spacer |
| 28–2A | SNOT, SOR, SAND | dual-rail NOT / OR / AND with two spacers |

The opcodes of HLT, NOP, LDC, INC, LDAC, STAC, CPAH, BIG, DEC, DECB, LDB, CNB,
SWB, LAB and FGO are the ones the processor's recorded test runs show. The
other opcodes (LDA, INCA, DECA, INCB, LBA, INM, OUTM and the dual-rail group)
were not recorded. They were assigned in free slots of the same range.

Any undecoded opcode behaves as NOP, and so does 00. The processor has more
Boolean and predicate instructions, inherited from two earlier processors.
Their encodings and semantics are not part of this description, so they are
not decoded (see *Limits*).

### Controller timing

The controller (`vplc`) is a finite state machine. Each state lasts one
clock:

| State | What happens |
|---|---|
| FETCH | RD = 1, address = PC |
| FWAIT | PRAM data valid; the instruction register loads |
| FDEC  | OPCODE ← high byte of the instruction register |
| EX1, EX2 | decode; nothing visible changes |
| EX3   | the instruction acts (see below) |
| OPRD  | (LDB, LDA) RD = 1 with address = PC, now pointing at the operand |
| OPLD  | (LDB, LDA, LDAC, CPAH) the word read is loaded into B or A, or compared |
| NEXT  | after the high byte: OPCODE ← low byte and back to EX1. After the low byte: PC ← PC + 1 and back to FETCH |
| HALT  | after HLT, until reset |

What EX3 does depends on the instruction:

- A register instruction loads its register at the end of EX3.
- An IC instruction changes IC at the end of EX3.
- LDAC and CPAH raise RD with address = IC, then go to OPLD.
- STAC raises WR with address = IC and data = A.
- LDB and LDA advance the PC to the operand word, then go to OPRD.
- A taken BIG loads PC ← PC + offset and goes straight to FETCH.

This gives the following clock counts, measured from one OPCODE change to the
next. Fetching a new word adds 3 clocks (FETCH, FWAIT, FDEC).

| Instruction | Clocks |
|---|---|
| most instructions | 4 |
| LDAC, CPAH | 5 |
| LDB, LDA | 6 |
| LDC, BIG not taken | 4, then fetch |
| BIG taken | 3, then fetch at the target |

A register written by an instruction shows its new value three clocks after
OPCODE changes to that instruction. These counts reproduce the recorded runs
exactly. The first test program (`171D 55AF 1B20 171D AACD 1B20 0807`) runs
with this timing from reset to HALT:

- B: 55AF → 55FA → 50FF, then AACD → AA67 → 22EF;
- A: 55AF, then AACD.

`tb_vplp_full` checks the bus, OPCODE, PC, A and B at every one of those
clocks.

Reset: OPCODE is 00 after reset. The controller leaves its IDLE state on the
first clock edge after Qrst is released, and the first fetch follows.

BIG adds its offset to the address of the word that holds BIG. In the third
test program, `1202` at address 03 jumps to 05.

## The VPALU and its logic styles

The VPALU is combinational. It sees three operands:

- A, the accumulator;
- B, register B;
- D, the data multiplexer output: a PRAM word, or MVD_in when MS = 1.

It produces `res_a` for A, `res_b` for B, and three flags. The controller
decides which registers load.

| Group | Operation | Result |
|---|---|---|
| pass-through | PASS_D, PASS_A, PASS_B | D, A or B unchanged (LDB, LDA, LDAC, INM, LBA, LAB) |
| arithmetic | INC_A, DEC_A | A ± 1 modulo 2^16 |
| pseudo-quantum | CNOT | B.hi is the control, B.lo the target: B.lo ← B.lo XOR B.hi |
| | SWAP | B.hi and B.lo are exchanged |
| reversible | FRED | A.hi is the control. In every bit position where the control is 1, the bits of B.hi and B.lo are exchanged. A keeps its value, and the result goes to B |
| dual-rail | DOR, DAND | see below |
| | TNOT, TOR, TAND | single spacer |
| | SNOT, SOR, SAND | dual spacers |
| compare | CMPH | flags only: unsigned A[15:8] against D[15:8] |

### Dual-rail layout

A 16-bit register holds **8 dual-rail bits**. The high byte carries the
*true* rails and the low byte the *false* rails. Bit *i* is the pair
(word[8+i], word[i]), which has four codes:

- 10: logic 1;
- 01: logic 0;
- 00 and 11: spacers, used only by the spacer variants.

The operations are defined rail by rail:

- **DOR, DAND.** OR takes the OR of the true rails and the AND of the false
  rails. AND is the reverse. The result goes to both A and B.
- **TNOT.** Swaps the two rails.
- **TOR, TAND.** Single spacer: 00 is the spacer. If either input bit is 00,
  the output bit is 00. Otherwise the result is the DOR/DAND result.
- **SNOT.** Swaps the rails, like TNOT. Both spacers (00 and 11) are left
  unchanged by the swap.
- **SOR, SAND.** Dual spacers: 00 and 11 are both spacers.
  - If A's bit is a spacer, it passes to the output.
  - Otherwise, if B's bit is a spacer, B's passes.
  - Otherwise the result is the DOR/DAND result.

The NOT variants use A only. The OR and AND variants load both A and B.

The rail layout and the spacer rules are this design's own. The instruction
set defines these instructions only as "dual-rail NOT/OR/AND with a single
spacer (all zeroes) or with dual spacers (all zeroes and all ones)". To
change the convention, edit `vpalu.sv`. `tb_vpalu` has an independent model
of the same rules.

### Flags

The flags register is 3 bits: bit 0 EQUAL, bit 1 GREATER, bit 2 LESS. CPAH
loads it, and BIG reads GREATER.

The comparison uses only the high bytes. In the third test program, A = 55AA
compared with the word 00AA gives GREATER.

## Datapath registers

All datapath registers clear on Qrst.

- **Accumulator A** (16 bit). Loaded from `res_a` by LD1_dp. Drives `dato`, the
  data the processor writes to PRAM.
- **Register B** (16 bit). Load (LDB), increment and decrement, with load
  taking priority. The increment and decrement do not use the VPALU.
- **Multi-valued register** (16 bit). Loaded from A by OUTM (LD2_dp). Drives
  MVD_out.
- **FLAGS** (3 bit). Loaded by FLd_dp.
- **Data multiplexer.** MS = 1 selects MVD_in (INM); otherwise it selects
  PRAM data.

The quaternary/binary convertors at MVD_in and MVD_out are outside this RTL.
The ports carry the binary form.

## Control unit

- **Instruction register** (16 bit). Loaded from PRAM read data in FWAIT.
- **Index counter IC** (8 bit). Load (LDC), +1 (INC), −1 (DEC). Supplies the
  address for LDAC, STAC and CPAH.
- **Program counter PC** (8 bit). Its structure is an 8-bit adder with the
  constant 1, then Mux1 (PCld1: PCin1 instead of PC + 1), then Mux2 (PCld2:
  PCin2). The register loads when ENB is 1 and one of PCinc, PCld1 or PCld2
  is high. PCclr (Qrst) clears it asynchronously.
  - PCin1 comes from the branch adder.
  - PCin2 comes from the PC save register. PCld2 is never raised (see below).
- **Branch adder.** PC + offset, modulo 256.
- **Address multiplexer.** PC during fetches and operand reads; IC for LDAC,
  STAC and CPAH.
- **PC save register** (8 bit). It stores the PC when its save line is high,
  and its output is the PC's second load input. It is wired in, but no
  described instruction saves or restores the PC. The controller therefore
  keeps both the save line and PCld2 low, and synthesis removes the
  register.

## Predicate RAM

- **Basic cell** (`pram_cell`).
  - Four flip-flops. Dff1 and Dff3 hold the pair (p, q). They load when the
    cell's enable and the write enable are both 1.
  - Dff2 and Dff4 register the enable. Their outputs gate the cell outputs.
  - The original uses three-state buffers. Here a disabled output is 0, so
    the outputs of many cells can be OR-ed together.
  - The write enable is this design's addition: in the original, only the
    enable is shown.
- **8-bit cell** (`pram8`). Eight basic cells in parallel form one 16-bit word.
  The p bits are the high byte and the q bits the low byte.
- **PRAM** (`pram`). 256 words, an address decoder and an OR read mux.
  - Timing: read data appears one clock after RD and is held until the next
    read.
  - A write stores `din` on the clock edge where WR is high.
  - Reset clears the whole array.

## Reset and the test system

**Reset circuit.** Two flip-flops form a chain. `vplp_rst` (active high) sets
both at once. The first flop's D input is 0, so Qrst falls on the second
rising clock edge after `vplp_rst` is released. Qrst resets every register in
the processor.

**Test system** (`vplp_system`). The PRAM controller and the processor share
the PRAM through a 26-bit multiplexer:

- 8-bit address;
- 16-bit data;
- RD;
- WR.

Qrst drives the multiplexer's select:

- While the processor is held in reset, the controller owns the bus.
- While the processor runs, the processor owns the bus.

To run a program:

1. Hold `vplp_rst` high.
2. Pulse `pram_rst` low. This is active low; it clears the PRAM and restarts
   the controller.
3. The controller writes `PROGRAM[0..PROG_WORDS-1]` to addresses 0, 1, … one
   word per clock, then raises `loaded`.
4. Release `vplp_rst`. The processor starts at address 00.

Choose the program with the parameters `PROG_WORDS` and `PROGRAM`. The default
is the first test program.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_vplp_full` | Default `vplp_system`, first test program: 64 consecutive clocks from reset release to HALT against the recorded trace (address, write and read data, RD, WR, OPCODE, PC, A, B) |
| `tb_vplp_system` | Checks the PRAM image each controller wrote; then three systems run the second and third test programs, plus a program that uses every other instruction. After HLT it compares A, B, the MV register, FLAGS, IC and the whole PRAM with an instruction-level reference model. It counts each mechanism (controller writes, fetches, second-slot instructions, operand fetches, taken and untaken branches, flag loads, MV output, halts) and fails if one never happened |
| `tb_vplp_trace2` | The second test program in the four-word form of its captured run (LDB #4FB1 at address 00, no LDA): every clock from reset release to HALT, including B = 4FB1, 4FB0, B04F, B0FF at the same clocks where the first program's B changes |
| `tb_vplp_trace3` | The third test program on the system: the successive values of A, write data, PC, IC, FLAGS and OPCODE against the captured run, the order of the three writes (0E, 0C, 0D) and the number of reads |
| `tb_vplp` | The processor with a behavioural memory, third test program: the order and contents of the three stores; final A = 55AA, IC = 0D, FLAGS = GREATER; RD/WR never together; 105 clocks from reset release to HALT |
| `tb_datapath` | The datapath under directly driven control lines, including the recorded B values of the first two programs |
| `tb_control_unit`, `tb_vplc` | The control-line sequence and clock counts of each instruction class |
| `tb_vpalu` | Every operation against an independent model, on random and edge-case operands |
| `tb_pram`, `tb_pram8`, `tb_pram_cell` | Write, read latency, hold, enable gating, reset |
| other `tb_*` | The registers, counters, muxes, adder and reset circuit against reference models |

## Simulating

Verilator 5 with `--timing`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/vplp_pkg.sv tb/tb_vplp_full.sv
./obj_dir/Vtb_vplp_full
```

To run another testbench, replace `tb_vplp_full` in both lines. The
testbenches reset everything they read. Any random initial value
(`+verilator+rand+reset+2`) gives the same result.

To run your own program:

1. Instantiate `vplp_system` with `PROG_WORDS` and `PROGRAM` set, or drive
   `vplp` from your own memory.
2. Watch `halted`, `opcode`, `pc`, `ic`, `acc_a`, `reg_b` and `flags`.

## Limits and departures

- **Inherited instructions.** The Boolean and predicate instructions inherited
  from the earlier processors are not decoded. Their opcodes and semantics are
  not part of this description.
- **PC save register.** It is built and connected, but never used: no
  instruction drives its save line or the PC's PCld2.
- **Multi-valued convertors.** The quaternary/binary convertors at MVD_in and
  MVD_out are not built. The ports are 16-bit binary.
- **Unrecorded opcodes.** Opcodes not seen in the recorded runs are this
  design's assignment (see the opcode table).
- **VPALU conventions.** The VPALU operation codes, the dual-rail rail layout
  and the spacer rules are this design's choice.
- **PRAM outputs.** The PRAM's three-state outputs are replaced by gated
  outputs and an OR mux. A write enable was added to the cell.
- **Controller states.** The controller's state names and encoding are this
  design's. The clock counts match the recorded traces.
- **Lint warnings.** Verilator reports SYNCASYNCNET on Qrst and on the PRAM
  reset. Each reset clears flip-flops asynchronously, and the same signal also
  appears in a synchronous path:
  - the `disable iff` of an RD/WR assertion;
  - for Qrst, the select of the bus multiplexer, which is the intended use.

  Both resets come from synchronised or externally sequenced sources.
