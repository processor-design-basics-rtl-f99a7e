// tb_datapath: drives the datapath with control words and checks it against the
// instruction-level model of cpu_ref_pkg.
//
// For each random instruction the testbench builds the control word itself, from the
// instruction set's per-instruction control table (not with the RTL decoder), applies it for
// one clock, and compares the four registers and the status bits with the model. The data
// memory is a testbench array with an asynchronous read, pre-filled with random bytes; every
// store's address and data are checked, and for jumps the {Rj, Ri} jump address output is
// checked. Registers are read back through the A and B ports between instructions. Use of the MB (constant) and MD (memory) multiplexers is counted.
module tb_datapath;
  import cpu_pkg::*;
  import cpu_ref_pkg::*;

  logic              clk = 0;
  logic              rst_n;
  ctrl_word_t        cw;
  logic [DATA_W-1:0] const8;
  status_t           status;
  logic [ADDR_W-1:0] jump_addr, dmem_addr;
  logic              dmem_we;
  logic [DATA_W-1:0] dmem_wdata, dmem_rdata;
  logic [DATA_W-1:0] tbmem [65536];

  datapath dut (
    .clk(clk), .rst_n(rst_n), .cw(cw), .const8(const8), .status(status), .jump_addr(jump_addr),
    .dmem_addr(dmem_addr), .dmem_we(dmem_we), .dmem_wdata(dmem_wdata), .dmem_rdata(dmem_rdata)
  );

  assign dmem_rdata = tbmem[dmem_addr];
  always @(posedge clk) if (dmem_we) tbmem[dmem_addr] <= dmem_wdata;

  always #5 clk = ~clk;

  cpu_model m;
  int checks = 0;
  int failures = 0;
  int used_mb = 0;
  int used_md = 0;

  task automatic check(string name, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%04h exp=%04h", name, got, exp);
    end
  endtask

  // Reads all four registers through the A and B ports (jump_addr = {A, B}) with a control
  // word that writes nothing, and compares them with the model.
  task automatic check_regs();
    cw = '0;
    for (int r = 0; r < NREGS; r += 2) begin
      cw.aa = 2'(r);
      cw.ba = 2'(r + 1);
      #1;
      check($sformatf("R%0d,R%0d", r, r + 1), jump_addr, {m.r[r], m.r[r+1]});
    end
  endtask

  function automatic ctrl_word_t table_cw(logic [15:0] w);
    ctrl_word_t c;
    logic [4:0] op;
    op = w[15:11];
    c = '0;
    c.fs = op;
    c.da = w[10:9];
    c.aa = w[10:9];
    c.ba = w[1:0];
    c.mb = (op == OP_STI) || (op == OP_LDI);
    c.md = (op == OP_LD);
    c.wr = (op <= OP_NOT) || (op == OP_LD) || (op == OP_LDI);
    c.mw = (op == OP_ST) || (op == OP_STI);
    c.sl = (op <= OP_NOT);
    return c;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step_info_t info;
    logic [15:0] w;
    m = new();
    for (int a = 0; a < 65536; a++) begin
      tbmem[a] = 8'($urandom);
      m.dmem[16'(a)] = tbmem[a];
    end
    rst_n = 0; cw = '0; const8 = '0;
    @(posedge clk); #1;
    rst_n = 1;
    check_regs();
    for (int k = 0; k < 20000; k++) begin
      w = 16'($urandom);
      if (k % 8 != 7) w[15] = 1'b0;  // mostly register and memory instructions
      m.pc = 16'h0000;
      m.imem[16'h0000] = w;
      cw = table_cw(w);
      const8 = w[7:0];
      #1;
      if (w[15:14] == 2'b11) check("jump_addr", jump_addr, {m.r[w[10:9]], m.r[w[1:0]]});
      info = m.step();
      check("dmem_we", 16'(dmem_we), 16'(info.is_store));
      if (info.is_store) begin
        check("dmem_addr", dmem_addr, info.addr);
        check("dmem_wdata", 16'(dmem_wdata), 16'(info.data));
      end
      if (cw.mb && cw.wr) used_mb++;
      if (cw.md && cw.wr) used_md++;
      @(posedge clk); #1;
      check_regs();
      check("VCNZ", 16'(status), 16'({m.v, m.c, m.n, m.z}));
    end
    checks += 2;
    if (used_mb == 0) failures++;
    if (used_md == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
