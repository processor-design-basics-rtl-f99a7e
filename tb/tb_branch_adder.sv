// tb_branch_adder: checks PC + signed 11-bit offset, with the worked examples of the
// instruction set (BC #0x7FD at 0x1005 goes to 0x1002; offsets -578 and +1022; the range
// ends -1024 and +1023) and random values against integer arithmetic.
module tb_branch_adder;
  import cpu_pkg::*;

  logic [ADDR_W-1:0] pc, target;
  logic [OFFS_W-1:0] offset;

  int checks = 0;
  int failures = 0;

  branch_adder dut (.pc(pc), .offset(offset), .target(target));

  task automatic apply(logic [15:0] p, int off);
    logic [15:0] exp;
    pc = p;
    offset = OFFS_W'(off);
    exp = 16'((int'(p) + off) & 32'hFFFF);
    #1;
    checks++;
    if (target !== exp) begin
      failures++;
      $display("FAIL pc=%04h off=%0d target=%04h exp=%04h", p, off, target, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h1005, -3);
    checks++;
    if (target !== 16'h1002) begin
      failures++;
      $display("FAIL worked example");
    end
    apply(16'h1000, -578);
    apply(16'h1000, 1022);
    apply(16'h4000, -1024);
    apply(16'h4000, 1023);
    apply(16'h0001, -2);
    apply(16'hFFFF, 1);
    for (int i = 0; i < 2000; i++) apply(16'($urandom), int'($urandom_range(0, 2047)) - 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
