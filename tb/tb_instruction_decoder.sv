// tb_instruction_decoder: checks the instruction decoder against the instruction set's
// control-signal tables.
//
// For every 5-bit opcode, with random operand bits, the expected MB, MD, WR, MW, SL, PL and JB
// come from a per-opcode table written as strings ('-' marks a don't-care, which is not
// checked), and the field outputs (FS, DA, AA, BA, BC, constant) from the instruction format.
module tb_instruction_decoder;
  import cpu_pkg::*;

  logic [INSTR_W-1:0] instr;
  ctrl_word_t         cw;
  branch_ctrl_t       br;
  logic [DATA_W-1:0]  const8;

  int checks = 0;
  int failures = 0;

  instruction_decoder dut (.instr(instr), .cw(cw), .br(br), .const8(const8));

  // Columns: MB MD WR MW SL PL JB, indexed by opcode.
  string tbl [32] = '{
    "001010-", "001010-", "001010-", "001010-",   // INC ADD ADDC SUB
    "001010-", "001010-", "001010-", "001010-",   // DEC LDR SHR SHL
    "001010-", "001010-", "001010-", "001010-",   // AND OR XOR NOT
    "0-0100-", "-11000-", "1-0100-", "101000-",   // ST LD STI LDI
    "--00010", "--00010", "--00010", "--00010",   // BNZ BNC BNV BNN
    "--00010", "--00010", "--00010", "--00010",   // BZ BC BV BN
    "-------", "-------", "-------", "-------",   // unassigned
    "-------", "-------", "-------", "--00011"    // 111xx; JMP as 11111
  };

  task automatic check_bit(string name, logic got, byte exp_c, int op);
    if (exp_c == "-") return;
    checks++;
    if (got !== (exp_c == "1")) begin
      failures++;
      $display("FAIL op=%05b %s got=%0b exp=%c", op[4:0], name, got, exp_c);
    end
  endtask

  task automatic check_vec(string name, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL instr=%04h %s got=%0h exp=%0h", instr, name, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 32; op++) begin
      for (int k = 0; k < 16; k++) begin
        instr = {op[4:0], 11'($urandom)};
        #1;
        check_bit("MB", cw.mb, tbl[op][0], op);
        check_bit("MD", cw.md, tbl[op][1], op);
        check_bit("WR", cw.wr, tbl[op][2], op);
        check_bit("MW", cw.mw, tbl[op][3], op);
        check_bit("SL", cw.sl, tbl[op][4], op);
        check_bit("PL", br.pl, tbl[op][5], op);
        check_bit("JB", br.jb, tbl[op][6], op);
        check_vec("FS", 8'(cw.fs), 8'(op));
        check_vec("DA", 8'(cw.da), 8'(instr[10:9]));
        check_vec("AA", 8'(cw.aa), 8'(instr[10:9]));
        check_vec("BA", 8'(cw.ba), 8'(instr[1:0]));
        if (op >= 16 && op < 24) check_vec("BC", 8'(br.bc), 8'(op - 16));
        check_vec("CONST", const8, instr[7:0]);
      end
    end
    // The document's worked encodings.
    instr = 16'b00001_11_0000000_00;  // ADD R3, R0
    #1;
    check_vec("ADD.DA", 8'(cw.da), 8'd3);
    check_vec("ADD.BA", 8'(cw.ba), 8'd0);
    instr = 16'b01111_00_0_10011100;  // LDI R0, #0x9c
    #1;
    check_vec("LDI.K", const8, 8'h9c);
    check_vec("LDI.MB", 8'(cw.mb), 8'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
