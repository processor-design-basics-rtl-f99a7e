// tb_status_register: checks reset to zero, that SL = 0 holds all bits, and that SL = 1 loads
// exactly the bits selected by the update mask, against a model, for random inputs.
module tb_status_register;
  import cpu_pkg::*;

  logic    clk = 0;
  logic    rst_n, sl;
  status_t upd, flags, status, model;

  int checks = 0;
  int failures = 0;

  status_register dut (.clk(clk), .rst_n(rst_n), .sl(sl), .upd(upd), .flags(flags), .status(status));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; sl = 0; upd = '0; flags = '1;
    @(posedge clk); #1;
    checks++;
    if (status !== 4'b0000) begin failures++; $display("FAIL reset %04b", status); end
    model = '0;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      sl    = 1'($urandom_range(0, 1));
      upd   = status_t'($urandom);
      flags = status_t'($urandom);
      @(posedge clk); #1;
      if (sl) begin
        if (upd.v) model.v = flags.v;
        if (upd.c) model.c = flags.c;
        if (upd.n) model.n = flags.n;
        if (upd.z) model.z = flags.z;
      end
      checks++;
      if (status !== model) begin
        failures++;
        $display("FAIL i=%0d status=%04b exp=%04b", i, status, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
