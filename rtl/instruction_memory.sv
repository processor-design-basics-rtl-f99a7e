// instruction_memory: the instruction RAM, one 16-bit instruction per word.
//
// The read port is asynchronous: out shows the word at adrs in the same cycle, which is what
// lets the single-cycle processor fetch, decode and execute within one clock. The design
// calls this block an instruction RAM with an address input and a data output and gives the
// word width (16 bits); the address width (16 bits, the PC width, so 64K words) follows from
// the 16-bit jump target. The synchronous write port used to load a program is this
// design's own addition. The contents are not reset.
//
// Interface: adrs in, out; clk, we, waddr, wdata for loading.
// Timing: read combinational; write on the rising clock edge when we = 1.
module instruction_memory
  import cpu_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = INSTR_W
) (
  input  logic          clk,
  input  logic [AW-1:0] adrs,
  output logic [DW-1:0] out,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign out = mem[adrs];

endmodule
