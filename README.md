# Easy I: a 16-bit accumulator computer with hardwired and microprogrammed control

Easy I is about as small as a stored-program computer gets while still being
universal. Program and data share one memory. The CPU has a single
accumulator (AC), eight instructions, and a control unit that runs every
instruction as a short sequence of one-cycle register transfers. This
repository builds the machine twice, once for each of the two classic ways of
building that control unit:

* **hardwired**: a state register plus a ROM that holds the whole state
  transition table;
* **microprogrammed**: a micro-program counter, a microprogram ROM, and an
  opcode-mapping circuit that picks the first execute state.

Both control units drive the same data paths and take the same number of
cycles for every instruction, so the two machines stay in step cycle for
cycle. A third, unrelated piece sits next to them: a full adder built as a
small ROM, the textbook example of logic stored in a ROM.

The design follows a lecture-style description of Easy I: its instruction
set, data path drawing, flowcharts, state transition table, state encodings
and the two control unit structures. Where that description is silent or
contradicts itself, the choices made here are listed under
[Departures and choices](#departures-and-choices).

## Instruction set

One instruction is one 16-bit word:

| bits  | 15 | 14..10 | 9..0 |
|-------|----|--------|------|
| field | I (indirect) | opcode | X |

| Instruction | Opcode | Effect (I = 0) | Cycles |
|-------------|--------|----------------|--------|
| Comp  | 00 000 | AC <- not AC | 2 |
| ShR   | 00 001 | AC <- AC / 2 (arithmetic shift, sign kept) | 2 |
| BrN   | 00 010 | if AC < 0 then PC <- X | 2 not taken, 3 taken |
| Jump  | 00 011 | PC <- X | 2 |
| Store | 00 100 | MEM[X] <- AC | 3 |
| Load  | 00 101 | AC <- MEM[X] | 4 |
| And   | 00 110 | AC <- AC and X | 2 |
| Add   | 00 111 | AC <- AC + X | 2 |

X is a 10-bit byte address for Store, Load, Jump and BrN, and a 10-bit
immediate, zero-extended, for And and Add. Memory is byte addressed with
16-bit words, so instructions sit at even addresses and the PC steps by 2.
After reset the machine takes 2 cycles and then fetches from address 0.

There is no subtract or decrement, but they can be built from what is there:
`Comp; Add 1` negates AC, and `Comp; Add 1; Comp` computes AC - 1. The
end-to-end test program uses exactly this to run a counted loop.

The indirect bit is **ignored**: the hardware executes every instruction as
if I = 0. The instruction set also defines I = 1 forms (operand or target
taken from MEM[X]). The control unit is designed for I = 0 only, and no
states for the indirect forms are given, so they are not built. The two upper
opcode bits are not decoded either.

## Data paths

* **DI** loads the external data bus (EDB) when `di_le` is set and is the only
  source of the A bus.
* The **A bus** carries DI<9:0> zero-extended (an address or an immediate)
  or, when `abus_full` is set, the whole DI word (a data word on its way into
  AC by Load).
* The **ALU** takes the A bus on input A and AC on input B: A (000), not B
  (001), A and B (010), A + B (011), B / 2 (100). **AC** loads the ALU output
  when `ac_le` is set; AC bit 15 goes to the control unit as the BrN
  condition.
* The **PC** (`easy1_pc`) can load and increment in the same cycle. A first
  mux (`pc_is`) feeds either the A bus (0) or the PC (1) into a +2 adder. A
  second mux (`pc_sel`) loads the A bus (00), zero (01), the adder (10), or
  keeps the PC (11). Jump therefore loads X + 2 into the PC in one cycle,
  while AO gets X.
* **AO** drives the external address bus (EAB). It loads the PC (`ao_sel` 0)
  or the A bus (`ao_sel` 1) when `ao_le` is set.
* The **EDB output mux** sends DI (`edb_sel` 0) or AC (`edb_sel` 1) to the
  memory. Only Store uses it.

All registers are edge-triggered and load at the clock edge that ends the
cycle in which their enable is set. DI, AC and AO are cleared by reset. The
PC is not; it is cleared by the control unit's first reset state.

## The control unit: one state per cycle

The control unit is a Moore-style FSM with 14 named states in 4 bits. Each
state is one clock cycle and sets all control points:

| State  | Code | Does | Next |
|--------|------|------|------|
| reset1 | 0000 | 0 -> PC | reset2 |
| reset2 | 0001 | PC -> AO, PC + 2 -> PC | fetch |
| fetch  | 0010 | RD: MEM[AO] -> DI | by opcode: aopr, sopr, load1, store1, brn1, jump |
| aopr   | 0011 | AC op X -> AC (And/Add), PC -> AO, PC + 2 -> PC | fetch |
| sopr   | 0100 | op AC -> AC (Comp/ShR), PC -> AO, PC + 2 -> PC | fetch |
| store1 | 0101 | X -> AO | store2 |
| store2 | 0110 | WR: AC -> MEM[AO]; PC -> AO, PC + 2 -> PC | fetch |
| store3 | 0111 | not used | (reset1) |
| load1  | 1000 | X -> AO | load2 |
| load2  | 1001 | RD: MEM[AO] -> DI | load3 |
| load3  | 1010 | DI -> AC, PC -> AO, PC + 2 -> PC | fetch |
| brn1   | 1011 | PC -> AO, PC + 2 -> PC (assume not taken) | AC:15 ? brn2 : fetch |
| brn2   | 1100 | X -> AO, X + 2 -> PC | fetch |
| jump   | 1101 | X -> AO, X + 2 -> PC | fetch |

Three ideas make this table short.

**The fetch invariant.** At the start of every fetch, AO already holds the
address of the instruction and the PC already points to the one after it.
Fetch therefore only has to read memory. Each instruction's last state
restores the invariant ("PC -> AO, PC + 2 -> PC") while it does its own
work.

**Branch on the opcode while reading it.** The next state after fetch depends
on the opcode of the word being fetched. DI only holds that word from the end
of the cycle, so during fetch the control unit takes the opcode straight from
the data bus (`edb_opcode`). In every other state it takes it from DI.
Because the memory read is combinational, the opcode arrives within the
cycle.

**Assume the branch is not taken.** brn1 restores the invariant as if BrN
fell through, which gives AC:15 a cycle to settle. Only if AC < 0 does brn2
overwrite AO and the PC with the target. That is why BrN costs 2 cycles when
not taken and 3 when taken.

The whole table lives in one function, `easy1_pkg::cu_row(state, opcode,
ac15)`. Both control units build their ROMs from it at elaboration time, so
an edit there (for example, a new instruction) reaches both.

### Hardwired control (`easy1_cu_hardwired`)

This is a 4-bit state register and a 1024 x 18 ROM. The ROM address is
{state, AC:15, opcode}, which is 10 bits. The word is {next state (4), ALU op
(3), mem op (2), PC sel (2), PC is, DI le, AC le, AO sel, AO le, EDB sel,
abus_full}. Most states ignore the opcode and AC:15, so their word repeats
over 64 addresses. That waste is the price of a fully regular structure.

### Microprogrammed control (`easy1_cu_micro`)

Here the table is treated as a program. A 4-bit micro-PC holds the same state
codes and addresses a microprogram ROM. Each microword carries the control
points, a next-state field and a 2-bit branch field that chooses the next
micro-PC:

| Branch | Next micro-PC | Used by |
|--------|---------------|---------|
| 00 | opcode mapping (first execute state of the instruction) | fetch |
| 01 | the word's next-state field | all other states |
| 10 | (unused; also the next-state field) | none |
| 11 | AC:15 ? brn2 : fetch | brn1 |

The opcode mapping is a small combinational decoder: Comp and ShR go to
sopr, BrN to brn1, Jump to jump, Store to store1, Load to load1, And and Add
to aopr. aopr and sopr must pick their ALU operation from the opcode. For
this, opcode bit 0 is a fifth microprogram address bit, so the ROM has 32
words: aopr and sopr have two words each, and all other words are repeated.

## Memory and bus timing (`easy1_memory`)

The memory holds 512 words of 16 bits, which covers the 1 KiB reachable by a
10-bit byte address. Address bit 0 is ignored. The control bus carries NOP
(00), RD (01) or WR (10).

* Reads are combinational. `rdata` always shows the word at the current
  address, and the CPU latches it into DI at the end of an RD cycle.
* Writes take effect at the clock edge that ends the WR cycle.
* The bidirectional data bus is split into `wdata` and `rdata`.
* The memory has no reset and no load port. Load a program by writing
  `mem[]`, for example from a testbench, while `rst` is held.

## ROM full adder (`fa_rom`)

A, B and Cin form a 3-bit address. A decoder raises one of eight word lines,
and the programmed array ORs the selected word onto two bit lines, S and
Cout. The contents are S = A xor B xor Cin and Cout = majority(A, B, Cin).
The module models the decoder and OR array logically; the NMOS pull-up
circuit is not modelled.

## Top level (`easy1_top`)

`easy1_top` holds three independent circuits:

* the hardwired machine (`u_hw_cpu` + `u_hw_mem`);
* the microprogrammed machine (`u_mp_cpu` + `u_mp_mem`);
* the ROM adder.

Both machines share `clk` and `rst`. Each machine brings out its buses and
its state, AC, PC and DI. `AW` (default 10) is the byte address width. A
single machine is `easy1_cpu` (parameter `MICROPROGRAMMED`) plus one
`easy1_memory`.

## Departures and choices

Where the source description contradicts itself, this design follows:

* **Fetch reads memory for every opcode.** One table row gives Comp/ShR a
  NOP in fetch, but the flowchart and the logic require a read.
* **store2 returns to fetch.** The table names a successor state store3 but
  never defines it. The flowchart and the microprogram go straight to fetch.
  Code 0111 and the unused codes 1110 and 1111 lead back to reset1.
* **load3 uses ALU op 000 (pass A)** to move DI into AC. The table leaves the
  ALU op as don't-care there.
* **The A bus carries only X for And/Add.** The instruction set says And and
  Add use the immediate X, while the data path flowchart puts the whole DI
  word on the A bus. Here the A bus carries only X, except in load3. This
  needs one control point not in the original list, `abus_full`.
* **aopr and sopr set the ALU op from the opcode.** The microprogram as
  drawn has no rows for them (see above).

Choices where the description is silent:

* Registers are edge-triggered, although the description calls DI, AC and AO
  latches.
* Reset is synchronous and active high.
* ShR keeps the sign.
* ALU codes 101-111 pass A.
* The ROM address bit order is {state, AC:15, opcode}.
* In fetch the control unit reads the opcode from the data bus, since DI
  only holds the instruction from the end of that cycle. The description
  feeds the control unit from DI, which works only if DI is a transparent
  latch.
* BrN always goes to brn1, which then tests AC:15. This follows the state
  table; the opcode-mapping table lists BrN only with AC:15 = 1.
* The memory's size and timing, and the split data bus.

Not built:

* indirect addressing (I = 1);
* I/O devices, which are only named;
* the example PLA from the ROM/PLA technology discussion, whose functions are
  drawn but not written down.

## Files

| File | Contents |
|------|----------|
| `rtl/easy1_pkg.sv` | types, encodings, the state transition table `cu_row()` |
| `rtl/easy1_alu.sv`, `rtl/easy1_pc.sv` | ALU, program counter |
| `rtl/easy1_datapath.sv` | DI, AC, AO, A bus, PC, EDB mux |
| `rtl/easy1_cu_hardwired.sv`, `rtl/easy1_cu_micro.sv` | the two control units |
| `rtl/easy1_cpu.sv` | data paths + chosen control unit |
| `rtl/easy1_memory.sv` | memory unit |
| `rtl/fa_rom.sv` | ROM full adder |
| `rtl/easy1_top.sv` | the two machines and the ROM adder |
| `tb/easy1_iss_pkg.sv` | instruction-level reference model and assembler `enc()` |
| `tb/easy1_cu_ref_pkg.sv`, `tb/easy1_cu_check.svh` | reference state table (text form) and control unit checker |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`, has a watchdog, and
compares against values worked out separately from the RTL:

* `easy1_alu_tb`, `easy1_pc_tb`, `easy1_memory_tb`, `fa_rom_tb`: exhaustive,
  edge-case and random vectors against direct formulas or a reference array.
* `easy1_datapath_tb`: random control words every cycle against a
  register-level model.
* `easy1_cu_hardwired_tb`, `easy1_cu_micro_tb`: a random walk through all
  states. Every control point and next state is compared with a separately
  written copy of the state table, don't-cares skipped.
* `easy1_cpu_tb`: both CPU variants run 100 random programs of 40
  instructions each (random code, so every opcode, random targets,
  self-modifying stores). At each fetch the address, PC and AC, the stored
  words and the cycle count are compared with the instruction-level model.
* `easy1_top_tb`: the full top at its default parameters. Both machines run
  a multiply-by-repeated-addition program (P = 7 x N, then ShR, And, Store
  and a Jump-to-self halt), with N = 10 on the hardwired machine (285 cycles)
  and N = 6 on the microprogrammed one (177 cycles), matching the model.
  The test checks memory and AC, and counts every control state, taken and not-taken
  BrN, memory writes and the reset sequence. It also checks the ROM adder
  exhaustively.

To run a testbench with Verilator 5 from the repository root (shown for the
top; substitute the testbench name):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/easy1_pkg.sv tb/easy1_iss_pkg.sv tb/easy1_cu_ref_pkg.sv \
  tb/easy1_top_tb.sv --top-module easy1_top_tb -Mdir obj_easy1_top_tb
./obj_easy1_top_tb/Veasy1_top_tb
```

To change the instruction set or timing, edit `cu_row()` in `easy1_pkg.sv`,
the opcode mapping in `easy1_cu_micro.sv`, the reference table in
`tb/easy1_cu_ref_pkg.sv`, and the model in `tb/easy1_iss_pkg.sv`.
