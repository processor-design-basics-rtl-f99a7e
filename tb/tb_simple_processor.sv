// tb_simple_processor: end-to-end test of the whole processor at its default sizes.
//
// The processor runs in lock-step with the instruction-level model of cpu_ref_pkg: every clock
// the testbench checks the PC (one instruction per clock), the four registers, the status
// bits, the PC load signal and any data memory write against the model.
// Three programs run:
//   1. the counting loop used to explain PC-relative branches (DEC/INC/SUB/BC #-3 at 0x1000,
//      entered through a JMP), with its final store checked by hand-worked values and cycle;
//   2. a program built from the worked instruction encodings (ADD R3,R0 / ST (R1),R2 /
//      LDI R0,#0x9c / BNV / JMP R2,R1), whose words are also compared with those encodings;
//   3. the whole 64K-word instruction RAM and 64K-byte data RAM filled with random contents,
//      run for many thousands of cycles.
// Each mechanism is counted: every opcode, every branch condition taken and not taken, jumps,
// loads and stores, and each status bit being set and cleared; one that never happens counts
// as a failure.
module tb_simple_processor;
  import cpu_pkg::*;
  import cpu_ref_pkg::*;

  logic               clk = 0;
  logic               rst_n;
  logic               prog_we;
  logic [ADDR_W-1:0]  prog_addr;
  logic [INSTR_W-1:0] prog_data;
  logic [ADDR_W-1:0]  pc;
  logic [INSTR_W-1:0] instr;
  logic               pc_load;
  status_t            status;
  logic               dmem_we;
  logic [ADDR_W-1:0]  dmem_addr;
  logic [DATA_W-1:0]  dmem_wdata;

  simple_processor dut (
    .clk(clk), .rst_n(rst_n),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .pc(pc), .instr(instr), .pc_load(pc_load), .status(status),
    .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata)
  );

  always #5 clk = ~clk;

  cpu_model m;
  int checks = 0;
  int failures = 0;
  int op_count [32];
  int br_taken [8];
  int br_not_taken [8];
  int jumps = 0;
  int flag_set [4];
  int flag_clr [4];
  int cycles = 0;

  // Assembler helpers for the three instruction formats.
  function automatic logic [15:0] enc_r(logic [4:0] op, int j, int i);
    return {op, 2'(j), 7'b0, 2'(i)};
  endfunction
  function automatic logic [15:0] enc_i(logic [4:0] op, int j, logic [7:0] k);
    return {op, 2'(j), 1'b0, k};
  endfunction
  function automatic logic [15:0] enc_b(logic [4:0] op, int off);
    return {op, 11'(off)};
  endfunction

  // A random instruction: any of the 24 register, memory and branch opcodes, or a jump
  // (111xx or, rarely, the unassigned 110xx), with random operand bits; no branch to itself.
  function automatic logic [15:0] random_instr();
    logic [15:0] w;
    int pick;
    w = 16'($urandom);
    pick = $urandom_range(0, 99);
    if (pick < 96)      w[15:11] = 5'($urandom_range(0, 23));
    else if (pick < 99) w[15:13] = 3'b111;
    else                w[15:13] = 3'b110;
    if (w[15:14] == 2'b10 && w[10:0] == 11'd0) w[0] = 1'b1;
    return w;
  endfunction

  task automatic check(string name, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d %s got=%04h exp=%04h", cycles, name, got, exp);
    end
  endtask

  task automatic load_word(logic [15:0] a, logic [15:0] w);
    prog_we = 1; prog_addr = a; prog_data = w;
    m.imem[a] = w;
    @(posedge clk); #1;
    prog_we = 0;
  endtask

  task automatic start();
    rst_n = 0;
    m.reset();
    @(posedge clk); #1;
    rst_n = 1;
  endtask

  // One clock in lock-step with the model. Called with the clock low, 1 time unit after an edge.
  task automatic step_check(output step_info_t info);
    status_t st_prev;
    check("pc", pc, m.pc);
    st_prev = status;
    info = m.step();
    op_count[info.op]++;
    check("dmem_we", 16'(dmem_we), 16'(info.is_store));
    if (info.is_store) begin
      check("dmem_addr", dmem_addr, info.addr);
      check("dmem_wdata", 16'(dmem_wdata), 16'(info.data));
    end
    check("pc_load", 16'(pc_load), 16'(info.taken));
    if (info.op[4:3] == 2'b10) begin
      if (info.taken) br_taken[info.op[2:0]]++;
      else br_not_taken[info.op[2:0]]++;
    end
    if (info.op[4:3] == 2'b11) jumps++;
    @(posedge clk); #1;
    cycles++;
    for (int r = 0; r < NREGS; r++) check($sformatf("R%0d", r), 16'(dut.u_dp.u_regfile.regs[r]), 16'(m.r[r]));
    check("VCNZ", 16'(status), 16'({m.v, m.c, m.n, m.z}));
    for (int b = 0; b < 4; b++) begin
      if (!st_prev[b] && status[b]) flag_set[b]++;
      if (st_prev[b] && !status[b]) flag_clr[b]++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step_info_t info;
    int store_cycle;
    m = new();
    rst_n = 0; prog_we = 0; prog_addr = '0; prog_data = '0;
    @(posedge clk); #1;

    // ---- 1. Counting loop with a backward PC-relative branch ----
    load_word(16'h0000, enc_i(OP_LDI, 1, 8'h10));
    load_word(16'h0001, enc_i(OP_LDI, 2, 8'h00));
    load_word(16'h0002, enc_r(OP_JMP, 1, 2));
    load_word(16'h1000, enc_i(OP_LDI, 1, 8'h35));
    load_word(16'h1001, enc_i(OP_LDI, 2, 8'h9f));
    load_word(16'h1002, enc_r(OP_DEC, 2, 2));
    load_word(16'h1003, enc_r(OP_INC, 1, 1));
    load_word(16'h1004, enc_r(OP_SUB, 2, 1));
    load_word(16'h1005, enc_b(OP_BC, -3));
    load_word(16'h1006, enc_r(OP_ST, 3, 2));
    load_word(16'h1007, enc_b(OP_BZ, 0));
    load_word(16'h1008, enc_b(OP_BNZ, -1));
    check("BC #0x7FD word", enc_b(OP_BC, -3), 16'b10101_11111111101);
    start();
    store_cycle = -1;
    for (int k = 0; k < 30; k++) begin
      step_check(info);
      if (info.is_store && store_cycle < 0) begin
        store_cycle = k;
        // Worked by hand: three loop passes leave R2 = 0x2f - 0x38 = 0xf7, stored at {R0, R3} = 0.
        check("loop store addr", info.addr, 16'h0000);
        check("loop store data", 16'(info.data), 16'h00f7);
      end
    end
    // 3 setup + 2 + 3 passes of 4 instructions, then ST: the 18th instruction, one per clock.
    check("loop store cycle", 16'(store_cycle), 16'd17);
    check("loop R1", 16'(m.r[1]), 16'h0038);

    // ---- 2. Program from the worked encodings ----
    check("ADD R3,R0 word", enc_r(OP_ADD, 3, 0), 16'b00001_11_0000000_00);
    check("ST (R1),R2 word", enc_r(OP_ST, 1, 2), 16'b01100_01_0000000_10);
    check("LDI R0,#0x9c word", enc_i(OP_LDI, 0, 8'h9c), 16'b01111_00_0_10011100);
    check("BNV #-3 word", enc_b(OP_BNV, -3), 16'b10010_11111111101);
    check("JMP R2,R1 word", enc_r(OP_JMP, 2, 1), 16'b11100_10_0000000_01);
    m.imem.delete();
    load_word(16'h0000, enc_i(OP_LDI, 0, 8'h9c));
    load_word(16'h0001, enc_i(OP_LDI, 1, 8'h40));
    load_word(16'h0002, enc_i(OP_LDI, 2, 8'h5a));
    load_word(16'h0003, enc_r(OP_ST, 1, 2));      // mem[0x9c40] = 0x5a
    load_word(16'h0004, enc_i(OP_LDI, 3, 8'h01));
    load_word(16'h0005, enc_r(OP_ADD, 3, 0));     // R3 = 0x9d, N = 1
    load_word(16'h0006, enc_r(OP_LD, 3, 1));      // R3 = mem[0x9c40]
    load_word(16'h0007, enc_b(OP_BNV, 2));        // V = 0: skip the next word
    load_word(16'h0008, enc_i(OP_LDI, 3, 8'hee));
    load_word(16'h0009, enc_i(OP_STI, 1, 8'h77)); // mem[0x9c40] = 0x77
    load_word(16'h000a, enc_r(OP_LD, 2, 1));      // R2 = 0x77
    load_word(16'h000b, enc_i(OP_LDI, 2, 8'h00));
    load_word(16'h000c, enc_i(OP_LDI, 1, 8'h20));
    load_word(16'h000d, enc_r(OP_JMP, 2, 1));     // to 0x0020
    load_word(16'h0020, enc_b(OP_BNV, -3));       // V = 0: back to 0x001d
    load_word(16'h001d, enc_b(OP_BZ, 0));
    load_word(16'h001e, enc_b(OP_BNZ, -1));
    start();
    for (int k = 0; k < 24; k++) step_check(info);
    check("prog2 R3", 16'(m.r[3]), 16'h005a);
    check("prog2 mem", 16'(m.dmem[16'h9c40]), 16'h0077);
    check("prog2 pc parked", 16'(m.pc == 16'h001d || m.pc == 16'h001e), 16'd1);

    // ---- 3. Random contents in both memories ----
    // The data RAM is filled with random bytes. The instruction RAM is filled with random
    // words through the program port; while the program runs, the word at the PC is also
    // replaced by a fresh random instruction just before it is fetched, so that the random
    // program cannot settle into an endless loop of jumps.
    rst_n = 0;
    m.imem.delete();
    m.dmem.delete();
    for (int a = 0; a < 65536; a++) load_word(16'(a), random_instr());
    for (int a = 0; a < 65536; a++) begin
      logic [7:0] d;
      d = 8'($urandom);
      dut.u_dmem.mem[a] = d;
      m.dmem[16'(a)] = d;
    end
    start();
    for (int k = 0; k < 200000; k++) begin
      logic [15:0] w;
      w = random_instr();
      dut.u_imem.mem[m.pc] = w;
      m.imem[m.pc] = w;
      #1;
      check("fetched word", instr, w);
      step_check(info);
    end

    // ---- Coverage of the mechanisms ----
    for (int op = 0; op < 24; op++) begin
      checks++;
      if (op_count[op] == 0) begin failures++; $display("FAIL opcode %05b never executed", op[4:0]); end
    end
    for (int bc = 0; bc < 8; bc++) begin
      checks += 2;
      if (br_taken[bc] == 0) begin failures++; $display("FAIL branch %0d never taken", bc); end
      if (br_not_taken[bc] == 0) begin failures++; $display("FAIL branch %0d never fell through", bc); end
    end
    checks++;
    if (jumps == 0) begin failures++; $display("FAIL no jump"); end
    for (int b = 0; b < 4; b++) begin
      checks += 2;
      if (flag_set[b] == 0 || flag_clr[b] == 0) begin failures++; $display("FAIL status bit %0d not toggled", b); end
    end
    $display("cycles=%0d jumps=%0d loads=%0d stores=%0d sti=%0d", cycles, jumps,
             op_count[13], op_count[12], op_count[14]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
