# A single-cycle 8-bit processor whose control unit is mostly wiring

This is a small teaching processor: four 8-bit registers, an 8-bit ALU, an 8-bit data RAM
and a 16-bit instruction RAM, executing one 16-bit instruction per clock. It is interesting
mainly for its control unit. Its opcodes were chosen so that they *are* control signals: the ALU
function select is the opcode itself, the branch condition is the low three opcode bits, and the
register addresses sit at fixed bit positions in every instruction format. What is left to decode
is five one-line Boolean equations and two wires. The rest of the control unit is a program
counter, a branch-target adder, a two-input multiplexer and a branch condition check.

## Instruction set and encoding

Every instruction is one 16-bit word with the 5-bit opcode in bits 15..11. There are three
formats:

| format    | 15..11 | 10..9    | 8..2   | 1..0   | used by |
|-----------|--------|----------|--------|--------|---------|
| register  | opcode | Rj       | unused | Ri     | ALU operations, shifts, ST, LD, JMP |
| immediate | opcode | Rj       | bit 8 unused, 7..0 = const8 | | LDI, STI |
| branch    | opcode | offset11 (10..0, signed) | | | BZ … BNN |

The top three opcode bits give the instruction's category, and the low two bits pick the
operation within it:

| opcode | instr | operation | status bits changed |
|--------|-------|-----------|---------------------|
| 00000 | INC Rj,Ri  | Rj ← Ri + 1            | Z N |
| 00001 | ADD Rj,Ri  | Rj ← Rj + Ri           | V C Z N |
| 00010 | ADDC Rj,Ri | Rj ← Rj + Ri + C       | V C Z N |
| 00011 | SUB Rj,Ri  | Rj ← Rj + ~Ri + 1      | V C Z N |
| 00100 | DEC Rj,Ri  | Rj ← Ri − 1            | Z N |
| 00101 | LDR Rj,Ri  | Rj ← Ri                | Z N |
| 00110 | SHR Rj,Ri  | Rj ← Ri >> 1           | none |
| 00111 | SHL Rj,Ri  | Rj ← Ri << 1           | none |
| 01000..01011 | AND, OR, XOR Rj,Ri; NOT Rj,Ri | Rj ← Rj op Ri; Rj ← ~Ri | Z N |
| 01100 | ST (Rj),Ri     | Mem[{R0,Rj}] ← Ri     | none |
| 01101 | LD Rj,(Ri)     | Rj ← Mem[{R0,Ri}]     | none |
| 01110 | STI (Rj),#k    | Mem[{R0,Rj}] ← k      | none |
| 01111 | LDI Rj,#k      | Rj ← k                | none |
| 10000..10011 | BNZ, BNC, BNV, BNN #off | branch if Z, C, V or N is 0 | none |
| 10100..10111 | BZ, BC, BV, BN #off     | branch if Z, C, V or N is 1 | none |
| 111xx | JMP Rj,Ri      | PC ← {Rj,Ri}          | none |

Data addresses are 16 bits made of two registers, with R0 as the high byte. A taken branch goes
to the branch's own address plus the sign-extended offset, so it reaches −1024..+1023 words. For
example `BC #0x7FD` at 0x1005 goes back to 0x1002. A jump goes to the 16-bit address
{Rj, Ri}. Opcodes 110xx are unassigned. The decoder equations make them behave as jumps.

## The control unit

```
             jump address {Rj,Ri} from registers
                         |
                 JB -> [MUX D1/D0] <---- [ADDER: PC + sext(offset11)]
                         |                       ^            ^
  V C N Z -> [Branch  ]  v                       |            |
             [Control ]-Load-> [PC] -------------+            |
                 ^              |                             |
             PL JB BC           v                             |
                 |      [Instruction RAM] --- I10..I0 --------+
                 |              | I15..I0
                 +------- [Instruction decoder] --> DA AA BA MB FS MD WR MW SL, const8
```

**Instruction decoder** (`instruction_decoder.sv`, combinational). With I15..I11 the opcode:

```
MB = I15' I14 I13 I12          constant operand (LDI, STI)
MD = I15' I14 I13 I12'         write back the RAM output (LD)
WR = I15' (I14' + I13' + I11)  write a register (ALU ops, LD, LDI)
MW = I15' I14 I13 I11'         write the data RAM (ST, STI)
SL = I15' (I14' + I13')        load the status register (the twelve ALU ops)
FS = I15..I11    DA = AA = I10..I9    BA = I1..I0    const8 = I7..I0
PL = I15         JB = I14             BC = I13..I11
```

DA, AA and BA are taken from the same bit positions whatever the format. Where those bits hold a
constant or an offset, the register addresses are don't-cares, because that instruction does not
use the register. AA equals DA: the first source register of a register-format instruction is
also its destination.

**Branch control** (`branch_control.sv`) produces the PC's Load signal:

| PL | JB | instruction | Load |
|----|----|-------------|------|
| 0  | x  | any other   | 0 (PC + 1) |
| 1  | 1  | jump        | 1, MUX selects the register pair |
| 1  | 0  | branch      | condition, MUX selects the ADDER |

BC bits 1..0 select the flag (00 Z, 01 C, 10 V, 11 N) and BC bit 2 is the value that takes
the branch. So 100 is "branch if zero" and 000 is "branch if non-zero".

**Program counter** (`program_counter.sv`): increments when Load = 0, and takes the MUX output
when Load = 1.

`control_unit.sv` connects these parts with the branch adder (`branch_adder.sv`) and the JB
multiplexer. The instruction RAM is outside it.

## The datapath and how memory instructions are addressed

`datapath.sv` holds the register file (`register_file.sv`), the MB multiplexer (register B or
the constant), the ALU (`alu.sv`), the status register (`status_register.sv`) and the MD
multiplexer (ALU result or RAM output). The data RAM (`data_memory.sv`) is outside, as is the
instruction RAM (`instruction_memory.sv`). These are the points that are easiest to get wrong:

* **Which register addresses memory.** Stores address {R0, Rj}, which is read on port A. LD
  addresses {R0, Ri}, read on port B. So the low address byte comes from a multiplexer that MW
  controls. Store data is the MB multiplexer output, which is Ri for ST and the constant for STI.
  R0 has its own read port on the register file.
* **Status bits.** SL is 1 for all twelve register-format ALU instructions, shifts included.
  The ALU also outputs a mask, `upd`, that says which bits the operation changes: all four for
  ADD, ADDC and SUB; Z and N for INC, DEC, LDR and the logic operations; none for the shifts.
  The status register loads only the masked bits.
* **Flag definitions.** N is bit 7 of the result and Z means the result is zero. C is the carry
  out of the 8-bit adder, so after SUB, C = 1 means no borrow (Rj ≥ Ri unsigned). V is
  two's-complement overflow. ADDC takes the stored C as its carry-in.
* **LDI.** The decoder passes the opcode 01111 as FS. The ALU treats every FS code outside its
  twelve operations as "F = B", so the constant on B reaches the register file.

## Timing

Everything is single-cycle. The instruction and data RAMs read asynchronously. Within one clock
the design fetches at PC, decodes, reads the registers, computes through the ALU or reads the
RAM, and chooses the next PC. On the rising edge it writes the register file, the status
register, the data RAM (for stores) and the PC. Status bits written by one instruction are seen
by the next one. Reset is synchronous and active low. It sets the PC to `RESET_PC` (0), and the
registers and status bits to 0. The RAM contents are not reset.

## What follows the source and what is this design's own

The following come from the original description of this processor: the instruction set,
opcodes and formats; the decoder equations; the branch control table; the PC, adder and
multiplexer structure; the 16-bit instruction and 8-bit data widths; and the four registers.

This design's own choices:

* the reset and its values, and the program-loading write port on the instruction RAM
  (`prog_we`, `prog_addr`, `prog_data`);
* 64K-word depths for both RAMs, which follow from 16-bit addresses, and asynchronous reads;
* the inside of the ALU, the flag arithmetic and zero-filled shifts;
* the R0 read port, the status update mask, and F = B for non-ALU FS codes;
* the order {Rj, Ri} (Rj high) for jump addresses.

The source is inconsistent about two memory instructions:

* It writes LD as `LD Rj,(Ri)` with address {R0, Ri} in two places, but gives {R0, Rj} in a
  third. This design uses Ri.
* For STI it once gives {R0, Ri}. However, the immediate format has no Ri field, so this design
  uses Rj.

It also says shifts leave the status bits alone while setting SL = 1 for them. The update mask
above satisfies both statements.

## Files

| file | contents |
|------|----------|
| `rtl/cpu_pkg.sv` | widths, opcode and branch-condition enums, control-word and status structs |
| `rtl/simple_processor.sv` | top level: control unit, instruction RAM, datapath, data RAM |
| `rtl/control_unit.sv` | PC, decoder, branch control, adder, JB multiplexer |
| `rtl/instruction_decoder.sv`, `branch_control.sv`, `branch_adder.sv`, `program_counter.sv` | control unit parts |
| `rtl/datapath.sv` | register file, MB/MD multiplexers, ALU, status register |
| `rtl/register_file.sv`, `alu.sv`, `status_register.sv` | datapath parts |
| `rtl/instruction_memory.sv`, `rtl/data_memory.sv` | the two RAMs |
| `tb/cpu_ref_pkg.sv` | instruction-level reference model used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The top's ports are: `clk`, `rst_n`, the program-load port, and, for observation, `pc`, `instr`,
`pc_load`, `status` and the data RAM write (`dmem_we`, `dmem_addr`, `dmem_wdata`). To run a
program, hold `rst_n` low, write the words with `prog_we`, then release reset. Execution starts
at address 0.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cpu_pkg.sv tb/cpu_ref_pkg.sv tb/tb_simple_processor.sv \
    --top-module tb_simple_processor -o sim
./obj_dir/sim
```

For a unit testbench, replace the last file and the top module name. Add `tb/cpu_ref_pkg.sv`
only for `tb_datapath` and `tb_simple_processor`.

`tb_simple_processor` runs the full-size processor (64K-word instruction RAM, 64K-byte data
RAM) in lock-step with the reference model. Every clock it compares the PC, all registers, the
status bits, the Load signal and every data RAM write. It runs three programs:

* the counting loop `DEC/INC/SUB/BC #-3` at 0x1000, entered by a JMP. It must store 0xF7 at
  address 0 as its 18th instruction;
* a program built from hand-encoded words (ADD R3,R0 = 0x0E00, ST (R1),R2 = 0x6202,
  LDI R0,#0x9c = 0x789C, BNV #-3 = 0x97FD, JMP R2,R1 = 0xE401);
* 200,000 random instructions over random memory contents.

The testbench counts every opcode, every branch condition both taken and not taken, jumps, and
each status bit being set and cleared. It fails if any of them never happens. The unit
testbenches check each block against tables or arithmetic written independently of the RTL. For
example, the decoder is checked against per-opcode control tables with don't-cares, and the
branch control exhaustively over all 512 input combinations.

## Limits

* There is no pipelining, interrupts, stack or I/O. The processor is exactly the
  fetch-decode-execute-in-one-clock machine described above.
* The asynchronous-read RAMs suit simulation and FPGA distributed RAM. An ASIC or block-RAM
  build would need synchronous RAMs and hence a different timing scheme.
* The testbenches' reference model shares this design's reading of the points listed above.
