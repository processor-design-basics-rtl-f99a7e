// program_counter: the 16-bit PC that addresses the instruction RAM.
//
// On every rising clock edge it either increments (load = 0), so that the next instruction
// in memory executes, or takes data (load = 1), the jump or branch target. Those two modes
// follow the design. The synchronous active-low reset and its value RESET_PC (0) are this
// design's own choice.
//
// Interface: clk, rst_n, load, data in; pc out (registered).
// Timing: pc changes one clock edge after load/data are presented.
module program_counter
  import cpu_pkg::*;
#(
  parameter logic [ADDR_W-1:0] RESET_PC = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] data,
  output logic [ADDR_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (!rst_n)    pc <= RESET_PC;
    else if (load) pc <= data;
    else           pc <= pc + ADDR_W'(1);
  end

endmodule
