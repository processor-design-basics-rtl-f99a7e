// tb_program_counter: checks reset, increment (Load = 0), load (Load = 1) and wrap-around of
// the PC against a counter kept in the testbench, one check per clock.
module tb_program_counter;
  import cpu_pkg::*;

  logic              clk = 0;
  logic              rst_n;
  logic              load;
  logic [ADDR_W-1:0] data, pc;
  logic [ADDR_W-1:0] model;

  int checks = 0;
  int failures = 0;
  int loads = 0;

  program_counter dut (.clk(clk), .rst_n(rst_n), .load(load), .data(data), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; data = '0;
    @(posedge clk); #1;
    checks++;
    if (pc !== 16'h0000) begin failures++; $display("FAIL reset pc=%04h", pc); end
    model = 16'h0000;
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      load = ($urandom_range(0, 3) == 0);
      data = (i == 10) ? 16'hFFFE : 16'($urandom);
      if (i == 10) load = 1;
      @(posedge clk); #1;
      model = load ? data : model + 16'd1;
      if (load) loads++;
      checks++;
      if (pc !== model) begin
        failures++;
        $display("FAIL cycle %0d pc=%04h exp=%04h", i, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
