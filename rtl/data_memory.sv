// data_memory: the 8-bit wide data RAM.
//
// It is addressed with 16 bits, {R0, Rx}: R0 supplies the high byte and a second register
// the low byte, as the memory instructions define. The write (MW = 1) happens on the rising
// clock edge; the read is asynchronous so that LD completes in its single cycle. The width
// and the {R0, Rx} addressing follow the design; the 64K-word depth follows from the 16-bit
// address, and the asynchronous read and unreset contents are this design's own choices.
//
// Interface: clk, addr, we (MW), wdata in; rdata out.
// Timing: read combinational; write on the rising clock edge.
module data_memory
  import cpu_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
