// tb_register_file: random writes and reads of R0..R3 against a four-entry model; checks
// reset to zero, that WR = 0 writes nothing, and the A, B and R0 read ports every cycle.
module tb_register_file;
  import cpu_pkg::*;

  logic               clk = 0;
  logic               rst_n, wr;
  logic [RADDR_W-1:0] da, aa, ba;
  logic [DATA_W-1:0]  d, a, b, r0;
  logic [DATA_W-1:0]  model [NREGS];

  int checks = 0;
  int failures = 0;

  register_file dut (.clk(clk), .rst_n(rst_n), .wr(wr), .da(da), .d(d), .aa(aa), .ba(ba),
                     .a(a), .b(b), .r0(r0));

  always #5 clk = ~clk;

  task automatic check(string name, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%02h exp=%02h", name, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr = 0; da = 0; aa = 0; ba = 0; d = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int r = 0; r < NREGS; r++) begin
      model[r] = '0;
      aa = 2'(r); ba = 2'(3 - r);
      #1;
      check("reset A", a, 8'h00);
      check("reset B", b, 8'h00);
    end
    for (int i = 0; i < 2000; i++) begin
      wr = 1'($urandom_range(0, 1));
      da = 2'($urandom);
      d  = 8'($urandom);
      @(posedge clk); #1;
      if (wr) model[da] = d;
      wr = 0;
      aa = 2'($urandom);
      ba = 2'($urandom);
      #1;
      check("A", a, model[aa]);
      check("B", b, model[ba]);
      check("R0", r0, model[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
