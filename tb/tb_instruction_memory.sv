// tb_instruction_memory: writes random 16-bit words at random addresses (including both ends
// of the 64K-word space) and reads them back asynchronously, comparing with a testbench
// associative array.
module tb_instruction_memory;
  import cpu_pkg::*;

  logic               clk = 0;
  logic [ADDR_W-1:0]  adrs, waddr;
  logic [INSTR_W-1:0] out, wdata;
  logic               we;
  logic [INSTR_W-1:0] model [logic [ADDR_W-1:0]];
  logic [ADDR_W-1:0]  key;

  int checks = 0;
  int failures = 0;

  instruction_memory dut (.clk(clk), .adrs(adrs), .out(out), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0; adrs = '0;
    for (int i = 0; i < 600; i++) begin
      waddr = (i == 0) ? 16'h0000 : (i == 1) ? 16'hFFFF : 16'($urandom);
      wdata = 16'($urandom);
      we = 1;
      model[waddr] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    // A write with we = 0 must not change anything.
    waddr = 16'h0000; wdata = ~model[16'h0000];
    @(posedge clk); #1;
    if (model.first(key) == 1) begin
      do begin
        adrs = key;
        #1;
        checks++;
        if (out !== model[key]) begin
          failures++;
          $display("FAIL adrs=%04h out=%04h exp=%04h", key, out, model[key]);
        end
      end while (model.next(key) == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
