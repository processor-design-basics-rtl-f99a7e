// register_file: four 8-bit registers R0..R3.
//
// Write port: when WR = 1, register DA takes D on the rising clock edge. Read ports A and B
// show registers AA and BA combinationally. A third read port shows R0, which the memory
// instructions use as the high byte of the data address ({R0, Rx}). WR, DA, AA, BA and the
// four 8-bit registers follow the design; the R0 port is how this design provides the {R0, Rx}
// address, and the synchronous active-low reset to zero is its own choice.
//
// Interface: clk, rst_n, wr, da, d, aa, ba in; a, b, r0 out.
// Timing: reads combinational (a write shows on the next cycle); write on the rising edge.
module register_file
  import cpu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr,
  input  logic [RADDR_W-1:0] da,
  input  logic [DATA_W-1:0]  d,
  input  logic [RADDR_W-1:0] aa,
  input  logic [RADDR_W-1:0] ba,
  output logic [DATA_W-1:0]  a,
  output logic [DATA_W-1:0]  b,
  output logic [DATA_W-1:0]  r0
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wr) begin
      regs[da] <= d;
    end
  end

  assign a  = regs[aa];
  assign b  = regs[ba];
  assign r0 = regs[0];

endmodule
