// tb_data_memory: writes random bytes at random 16-bit addresses {R0, Rx} and reads them
// back through the asynchronous read port, comparing with a testbench associative array;
// also checks that a cycle with we = 0 leaves the contents unchanged.
module tb_data_memory;
  import cpu_pkg::*;

  logic              clk = 0;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic              we;
  logic [DATA_W-1:0] model [logic [ADDR_W-1:0]];
  logic [ADDR_W-1:0] key;

  int checks = 0;
  int failures = 0;

  data_memory dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 600; i++) begin
      addr = (i == 0) ? 16'h0000 : (i == 1) ? 16'hFFFF : 16'($urandom);
      wdata = 8'($urandom);
      we = 1;
      model[addr] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    addr = 16'hFFFF; wdata = ~model[16'hFFFF];
    @(posedge clk); #1;
    if (model.first(key) == 1) begin
      do begin
        addr = key;
        #1;
        checks++;
        if (rdata !== model[key]) begin
          failures++;
          $display("FAIL addr=%04h rdata=%02h exp=%02h", key, rdata, model[key]);
        end
      end while (model.next(key) == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
