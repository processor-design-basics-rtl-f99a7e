// instruction_decoder: turns one 16-bit instruction into the datapath control word, the
// branch-control inputs and the immediate constant.
//
// It is purely combinational and uses the Boolean equations derived for this instruction
// set, which work because opcodes of one category share their top three bits:
//   MB = I15' I14 I13 I12          (immediate transfers take the constant)
//   MD = I15' I14 I13 I12'         (LD writes back the data memory output)
//   WR = I15' (I14' + I13' + I11)  (ALU operations, LD and LDI write a register)
//   MW = I15' I14 I13 I11'         (ST and STI write memory)
//   SL = I15' (I14' + I13')        (register-format ALU operations load the status register)
//   FS = I15..I11, DA = AA = I10..I9, BA = I1..I0
//   PL = I15, JB = I14, BC = I13..I11
// Register addresses are taken from the instruction whatever its format; where a field holds
// a constant instead, the resulting address is a don't-care. The constant output is I7..I0.
// All of that follows the design; the struct packaging of the outputs is this design's own.
// Instruction bit 8 is unused in the register and immediate formats and belongs to the
// branch offset, which goes from the instruction straight to the branch adder, so the decoder
// leaves it unread (a lint warning about it is expected). An assertion checks the rule that
// jumps and branches modify neither registers nor memory.
//
// Interface: instr (16 bits) in; cw (ctrl_word_t), br (branch_ctrl_t), const8 out.
// Timing: combinational, no clock.
module instruction_decoder
  import cpu_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output ctrl_word_t         cw,
  output branch_ctrl_t       br,
  output logic [DATA_W-1:0]  const8
);

  logic i15, i14, i13, i12, i11;
  assign {i15, i14, i13, i12, i11} = instr[15:11];

  always_comb begin
    cw.mb = ~i15 &  i14 & i13 &  i12;
    cw.md = ~i15 &  i14 & i13 & ~i12;
    cw.wr = ~i15 & (~i14 | ~i13 | i11);
    cw.mw = ~i15 &  i14 & i13 & ~i11;
    cw.sl = ~i15 & (~i14 | ~i13);
    cw.fs = instr[15:11];
    cw.da = instr[10:9];
    cw.aa = instr[10:9];
    cw.ba = instr[1:0];

    br.pl = i15;
    br.jb = i14;
    br.bc = instr[13:11];
  end

  assign const8 = instr[DATA_W-1:0];

  // Jumps and branches modify neither registers nor data memory nor status bits.
  always_comb begin
    if (br.pl) begin
      assert (!cw.wr && !cw.mw && !cw.sl)
        else $error("jump/branch %b decoded with a register, memory or status write", instr[15:11]);
    end
  end

endmodule
