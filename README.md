# LC-3 in SystemVerilog: a multicycle processor built around its addressing modes

The LC-3 is a 16-bit teaching computer. Every instruction is one 16-bit word,
and the opcode and register fields leave at most 11 bits for an address. Yet
memory has 65,536 words. The processor closes that gap with a small set of
addressing modes:

- a short offset added to the PC;
- a short offset added to a base register;
- a full 16-bit address fetched from memory (indirect loads and stores, TRAP);
- for exceptions and interrupts, a full 16-bit address fetched from a vector
  table that the hardware selects.

This RTL implements that processor as a multicycle machine with a single
shared bus. The controller states carry the LC-3 state numbers. The design
includes the trap/exception/interrupt mechanism with separate user and
supervisor stacks, a 64K-word memory, the decoder for the device-register
page, and a keyboard that can interrupt.

## How addresses are formed

All memory traffic goes through MAR (address) and MDR (data). The address
unit (`lc3_addr_unit`) has one adder. Its first input is either the PC or a
base register read from the register file's SR1 port. Its second input is
zero or a sign-extended instruction field. MARMUX then picks either that sum
or the zero-extended trap number.

| mode | address | instructions |
|---|---|---|
| register | none: operands come from registers or sign-extended imm5 | ADD, AND, NOT |
| PC + immediate, no memory access | PC + SEXT(IR[8:0]) written to a register | LEA |
| PC-relative | PC + SEXT(IR[8:0]) | LD, ST, BR |
| base + offset | BaseR + SEXT(IR[5:0]) | LDR, STR |
| PC-relative, 11 bits | PC + SEXT(IR[10:0]) | JSR |
| register jump | BaseR | JMP (RET = JMP R7), JSRR |
| memory indirect | M[PC + SEXT(IR[8:0])] | LDI, STI |
| trap vector | M[ZEXT(IR[7:0])], table at x0000-x00FF | TRAP |
| exception/interrupt vector | M[Vect_Reg], table at x0100-x01FF | not an instruction |

"PC" always means the PC after fetch, which is the instruction's address + 1.
JSR, JSRR and TRAP save that PC in R7. Conditional branches test the N/Z/P
condition codes against IR[11:9]. Only the instructions that write a register
set the codes: ADD, AND, NOT, LEA, LD, LDR and LDI.

Opcodes: BR 0000, ADD 0001, LD 0010, ST 0011, JSR/JSRR 0100, AND 0101,
LDR 0110, STR 0111, RTI 1000, NOT 1001, LDI 1010, STI 1011, JMP 1100,
reserved 1101, LEA 1110, TRAP 1111.

## Memory map

| range | contents |
|---|---|
| x0000-x00FF | trap vector table (256 entries) |
| x0100-x017F | exception vectors: x0100 illegal opcode, x0101 privilege violation |
| x0180-x01FF | interrupt vectors: x0180 keyboard |
| x0200-x2FFF | operating system; the supervisor stack grows down from x2FFF |
| x3000-xFFDF | user space; execution starts at x3000 |
| xFFE0-xFFFF | 32 device registers, selected when address bits 15:5 are all ones |

Inside the device page, KBSR (keyboard status) is at xFFE0 and KBDR (keyboard
data) at xFFE2. Accesses to the other 30 device-register addresses leave the
design through the `io_*` port of `lc3_system`.

## The controller

`lc3_control` is a Moore machine, with states numbered as in the LC-3 state
diagram. Every instruction starts with the same four states:

    18  MAR <- PC, PC <- PC+1      (go to 49 instead if an interrupt is pending)
    33  MDR <- M[MAR]              (waits for memory ready)
    35  IR  <- MDR
    32  decode: latch BEN, dispatch on IR[15:12] (opcode 1101 -> 13)

Execution then continues as follows. Each state is one cycle, plus wait cycles
in the memory states:

| instruction | states after 32 | cycles, memory without wait |
|---|---|---|
| ADD / AND / NOT / LEA | 1 / 5 / 9 / 14 | 5 |
| LD, LDR | 2 or 6, 25 (MDR <- M), 27 (DR <- MDR) | 7 |
| LDI | 10, 24 (read pointer), 26 (MAR <- MDR), 25, 27 | 9 |
| ST, STR | 3 or 7, 23 (MDR <- SR), 16 (M <- MDR) | 7 |
| STI | 11, 29, 31, 23, 16 | 9 |
| BR | 0, then 22 (PC <- PC+off9) if taken | 5 / 6 |
| JMP | 12 | 5 |
| JSR / JSRR | 4, then 21 / 20 (R7 <- PC and PC <- target together) | 6 |
| TRAP | 15 (MAR <- trapvect8), 28 (MDR <- M, R7 <- PC), 30 (PC <- MDR) | 7 |
| RTI | see below | 11-12 |

The controller drives the datapath through one packed struct, `ctrl_t`, defined
in `lc3_pkg`. It holds the load enables, the bus source, and the PCMUX, DRMUX,
SR1MUX, ADDR1MUX, ADDR2MUX, MARMUX, ALU-operation, SP-multiplexer and
vector-cause selectors. To follow a state, read its case in the
control-word `always_comb` block.

## Exceptions, interrupts and the two stacks

This is the least obvious part of the design.

An exception or interrupt works like a TRAP that no instruction asked for: PC
is loaded from a vector table. The interrupted code did not expect the jump,
so the hardware must save everything it cannot rebuild, which is the PC and
the PSR. It saves them on a stack. The service routine saves general
registers itself.

**PSR.** Bit 15 is the privilege mode (1 = user, 0 = supervisor). Bits 10:8
are the priority of the running code. Bits 2:0 are N, Z and P. `lc3_psr`
holds the register and computes BEN.

**Two stacks.** R6 is the stack pointer of whichever mode is running. When
user code is interrupted, the processor must not push onto the user's stack:
it may be invalid, and user code could read it. `lc3_sp_save` therefore keeps
two registers, Saved_USP and Saved_SSP. On entry from user mode the user's R6
goes to Saved_USP and R6 takes Saved_SSP. RTI back to user mode does the
reverse. The same block's multiplexer supplies R6-1 for pushes and R6+1 for
pops.

**Entry.** The sequence starts from one of three states:

- state 13: illegal opcode, found at decode;
- state 44: RTI executed in user mode;
- state 49: an interrupt, checked at fetch.

Each of these states latches the cause's vector address into Vect_Reg, copies
PSR into MDR and sets PSR[15] to 0. State 49 also raises PSR[10:8] to the
interrupt's priority. The sequence then continues:

    45      if the code was in user mode: Saved_USP <- R6, R6 <- Saved_SSP
    37, 41  R6 <- R6-1, MAR <- R6-1, M <- MDR        push PSR
    43      MDR <- PC-1
    47, 48  R6 <- R6-1, MAR <- R6-1, M <- MDR        push PC
    50      MAR <- Vect_Reg
    52, 54  MDR <- M, PC <- MDR                      jump to the service routine

The pushed PC is PC-1 because state 18 has already incremented PC:

- for an interrupt, PC-1 is the instruction that had not yet run;
- for an exception, it is the faulting instruction itself.

A handler that wants to skip the faulting instruction must add one to the
saved PC. The test program's handlers do this.

**RTI.** RTI runs states 8, 36, 38, 39, 40, 42 and 34:

- MAR <- R6, pop PC;
- R6+1, pop PSR;
- R6+1.

If the restored PSR says user mode, state 59 follows: Saved_SSP <- R6 and
R6 <- Saved_USP. RTI executed in user mode is itself a privilege violation
(vector x0101).

**Interrupt acceptance.** `irq` is taken at the next fetch if the device's
priority is above PSR[10:8]. While the keyboard routine runs at priority 4,
the same request cannot interrupt it again.

**Vectors.** `lc3_vector` is a small ROM indexed by cause: illegal opcode
x0100, privilege violation x0101, keyboard x0180. Its output is latched into
Vect_Reg.

## Modules

| file | role |
|---|---|
| `lc3_pkg` | opcode and state enums, datapath selector enums, `ctrl_t`, memory-map constants |
| `lc3_system` | top: processor + decoder + memory + keyboard |
| `lc3_cpu` | datapath registers, bus, and the instances below |
| `lc3_control` | state machine |
| `lc3_regfile` | R0-R7, 2 read ports, 1 write port |
| `lc3_alu` | ADD, AND, NOT, pass-through |
| `lc3_addr_unit` | address adder, ADDR1/ADDR2 muxes, MARMUX |
| `lc3_psr` | PSR and branch enable |
| `lc3_sp_save` | Saved_USP, Saved_SSP, SP +/- 1 mux |
| `lc3_vector` | vector ROM and Vect_Reg |
| `lc3_memory` | 2^16 x 16 memory with a ready handshake |
| `lc3_io_decode` | memory vs device-register routing |
| `lc3_keyboard` | KBSR/KBDR and interrupt request |

## Top-level interface (`lc3_system`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `key_valid`, `key_data` | in | 1, 8 | a keyboard character arrives (one-cycle pulse) |
| `io_en`, `io_we`, `io_addr`, `io_wdata` | out | 1, 1, 5, 16 | access to device register xFFE0 + `io_addr` (not the keyboard's) |
| `io_rdata`, `io_ready` | in | 16, 1 | its read data; ready (tie to `io_en` for single-cycle devices) |
| `pc`, `psr`, `state` | out | 16, 16, 6 | observation |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `PC_RESET` | x3000 | first instruction address |
| `PSR_RESET` | x8002 | user mode, priority 0, Z |
| `SSP_RESET` | x3000 | initial Saved_SSP |
| `MEM_LATENCY` | 1 | cycles per memory access, 1 = no wait |
| `KBD_PRIORITY` | 4 | priority of the keyboard interrupt |

Memory handshake, used between processor, decoder, memory and devices:

- the requester holds `en`, the address, the write flag and the data until
  `ready` is high;
- a read's data is taken in the cycle `ready` is high;
- a write happens on that clock edge.

An assertion in `lc3_cpu` checks that the processor keeps its address and
write flag stable while it waits.

The memory is not reset and has no load port. Testbenches fill it by
assigning `dut.u_mem.mem[addr]` before releasing reset.

## Choices made in this design

The addressing modes, the memory map, the device-page decode, the vector
addresses x0100 and x0180, the stack-switch and exception/interrupt register
transfers with their state numbers, and the PC-1 push follow the LC-3 as
described. The following are this design's own choices or readings:

- The bus is a multiplexer, not tri-state gates.
- NOT (1001) and STI (1011) are decoded as in the standard LC-3 ISA. Only
  opcode 1101 is illegal.
- The privilege-violation vector is x0101. Illegal opcode uses x0100 and
  keyboard x0180.
- The device page is xFFE0-xFFFF, so only address bits 15:5 are decoded.
  This differs from the common LC-3 page at xFE00. KBSR is at xFFE0, KBDR at
  xFFE2. KBSR bit 15 means ready and bit 14 means interrupt enable. Reading
  KBDR clears ready.
- The keyboard priority is 4. An interrupt is accepted only if its priority is
  above PSR[10:8].
- Reset state: PC x3000, user mode with Z set, Saved_SSP x3000, registers 0.
- LEA sets the condition codes.
- TRAP leaves the privilege mode and R6 alone.
- JSRR writes R7 and PC in the same state, so JSRR R7 jumps to the old R7.
- RTI to supervisor mode returns from state 34 directly to fetch.
- Memory latency is a parameter. At the default of one cycle there are no
  wait states.
- No display or machine-control register is built. Those addresses go out on
  `io_*`.
- No operating-system code is included. The testbenches load their own small
  service routines.

## Simulating

Compile a testbench with its package files first. For example, the end-to-end
testbench:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_lc3_system \
        rtl/lc3_pkg.sv tb/lc3_asm_pkg.sv rtl/lc3_*.sv tb/tb_lc3_system.sv
    ./obj_dir/Vtb_lc3_system

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

- `tb_lc3_system`: runs a program with 3-cycle memory. The program covers
  every addressing mode, a subroutine call with JSR and with JSRR, two TRAPs,
  an illegal opcode, RTI in user mode, a keyboard interrupt while user code
  polls a flag, an external device write, and the user/supervisor stack
  switch. It checks registers, memory, the PSR, the saved stack pointers and
  the pushed values. It also counts how often each of 24 mechanism states ran
  and fails if any count is zero.
- `tb_lc3_system_full`: the same program with every parameter at its default.
- `tb_lc3_worked_examples`: the small worked examples at default size: LDI
  through a pointer at x3003, TRAP x02 through the trap table, a keyboard
  interrupt of the instruction at x3020, the compiler start-up sequence,
  push/pop at x3456, and an illegal opcode inside the keyboard routine. The
  nested entry stays on the supervisor stack, and only the outer RTI restores
  the user stack pointer.
- `tb_lc3_cpu`: runs the processor alone against a bench memory with random
  wait states. It covers the pointer example at x30F6 (LEA, ADD, ST, AND,
  STR, LDI), a push and pop through R6, an illegal-opcode entry from user
  mode, and the 5-cycle ADD.
- Unit testbenches `tb_lc3_<block>`: one per module. Each compares against a
  reference computed in the testbench. The controller's testbench compares
  the state sequence of every instruction, exception, interrupt and RTI path
  with a hand-written list.

`tb/lc3_asm_pkg.sv` holds one encoder function per instruction, which makes
new test programs easy to write. It also holds the system test program.
