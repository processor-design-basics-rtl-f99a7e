// tb_control_unit: checks program sequencing and the control word of the control unit.
//
// Each clock a random instruction, random status bits and a random register-file jump address
// are applied. The testbench predicts the next PC from the instruction set (PC + 1 for
// ordinary instructions, {Rj, Ri} for jumps, PC + offset11 for a branch whose named condition
// holds, PC + 1 otherwise) and checks it after the edge, one instruction per clock. It also
// checks Load, the control word fields and the constant. It counts jumps, and taken and
// untaken branches, which must all occur.
module tb_control_unit;
  import cpu_pkg::*;

  logic               clk = 0;
  logic               rst_n;
  logic [INSTR_W-1:0] instr;
  status_t            status;
  logic [ADDR_W-1:0]  jump_addr, pc, exp_pc;
  ctrl_word_t         cw;
  logic [DATA_W-1:0]  const8;
  logic               pc_load;

  control_unit dut (
    .clk(clk), .rst_n(rst_n), .instr(instr), .status(status), .jump_addr(jump_addr),
    .pc(pc), .cw(cw), .const8(const8), .pc_load(pc_load)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_jump = 0, n_taken = 0, n_fall = 0;

  task automatic check(string name, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL instr=%04h %s got=%04h exp=%04h", instr, name, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] op;
    logic       take, is_reg_op;
    rst_n = 0; instr = '0; status = '0; jump_addr = '0;
    @(posedge clk); #1;
    check("reset pc", pc, 16'h0000);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      instr = 16'($urandom);
      status = status_t'($urandom);
      jump_addr = 16'($urandom);
      op = instr[15:11];
      #1;
      is_reg_op = (op <= 5'd11);
      take = 1'b0;
      if (op[4] == 1'b0) begin
        exp_pc = pc + 16'd1;
      end else if (op[3]) begin
        take = 1'b1;
        exp_pc = jump_addr;
        n_jump++;
      end else begin
        case (op[2:0])
          3'd0: take = !status.z;  // BNZ
          3'd1: take = !status.c;  // BNC
          3'd2: take = !status.v;  // BNV
          3'd3: take = !status.n;  // BNN
          3'd4: take = status.z;   // BZ
          3'd5: take = status.c;   // BC
          3'd6: take = status.v;   // BV
          default: take = status.n;  // BN
        endcase
        exp_pc = take ? pc + {{5{instr[10]}}, instr[10:0]} : pc + 16'd1;
        if (take) n_taken++; else n_fall++;
      end
      check("load", 16'(pc_load), 16'(take));
      check("fs", 16'(cw.fs), 16'(op));
      check("da", 16'(cw.da), 16'(instr[10:9]));
      check("aa", 16'(cw.aa), 16'(instr[10:9]));
      check("ba", 16'(cw.ba), 16'(instr[1:0]));
      check("const", 16'(const8), 16'(instr[7:0]));
      if (op[4]) begin
        check("wr", 16'(cw.wr), 16'd0);
        check("mw", 16'(cw.mw), 16'd0);
        check("sl", 16'(cw.sl), 16'd0);
      end else begin
        check("sl", 16'(cw.sl), 16'(is_reg_op));
        check("mw", 16'(cw.mw), 16'(op == OP_ST || op == OP_STI));
        check("wr", 16'(cw.wr), 16'(is_reg_op || op == OP_LD || op == OP_LDI));
      end
      @(posedge clk); #1;
      check("pc", pc, exp_pc);
    end
    checks += 3;
    if (n_jump == 0) failures++;
    if (n_taken == 0) failures++;
    if (n_fall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
