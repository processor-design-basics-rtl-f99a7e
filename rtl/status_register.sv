// status_register: holds the status bits V, C, N and Z that branches test.
//
// When SL = 1 the bits selected by upd take the ALU's new values on the rising clock edge;
// the other bits, and all bits when SL = 0, keep their value. SL and the four bits follow the
// design; the per-bit update mask (so that, for example, INC leaves C and V alone) is this
// design's way of honouring which status bits each instruction affects. Reset clears all
// four bits (synchronous, active low), also this design's choice.
//
// Interface: clk, rst_n, sl, upd, flags in; status out.
// Timing: registered; the new bits are visible to the instruction that follows.
module status_register
  import cpu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sl,
  input  status_t upd,
  input  status_t flags,
  output status_t status
);

  always_ff @(posedge clk) begin
    if (!rst_n)  status <= '0;
    else if (sl) status <= (flags & upd) | (status & ~upd);
  end

endmodule
