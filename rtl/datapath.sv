// datapath: register file, operand multiplexer MB, ALU, status register and write-back
// multiplexer MD, controlled by the control word from the instruction decoder.
//
// Per cycle: registers AA and BA are read onto A and B; MB = 1 replaces B by the instruction
// constant; the ALU applies FS to A and that operand; MD = 1 selects the data memory output
// instead of the ALU result; WR = 1 writes the selection into register DA; SL = 1 loads the
// status register. The data memory is outside this block. Its address is {R0, Rx}:
//   stores (MW = 1, ST (Rj), Ri and STI (Rj), #c) use Rj, read on A;
//   loads  (LD Rj, (Ri)) use Ri, read on B.
// Store data is the MB output, so ST stores Ri and STI stores the constant. The jump target
// {Rj, Ri} = {A, B} goes back to the control unit. The list of parts and control signals
// follows the design; the address-low multiplexer controlled by MW and the use of the MB
// output as store data are this design's way of meeting the memory instructions' definitions.
//
// Interface: clk, rst_n, cw, const8 in; status, jump_addr out; data memory port
// (dmem_addr, dmem_we, dmem_wdata out; dmem_rdata in).
// Timing: single cycle; register file and status register update on the rising edge.
module datapath
  import cpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_word_t        cw,
  input  logic [DATA_W-1:0] const8,
  output status_t           status,
  output logic [ADDR_W-1:0] jump_addr,
  output logic [ADDR_W-1:0] dmem_addr,
  output logic              dmem_we,
  output logic [DATA_W-1:0] dmem_wdata,
  input  logic [DATA_W-1:0] dmem_rdata
);

  logic [DATA_W-1:0] bus_a, bus_b, r0;
  logic [DATA_W-1:0] operand_b;
  logic [DATA_W-1:0] alu_f;
  logic [DATA_W-1:0] result;
  status_t           alu_flags, alu_upd;

  register_file u_regfile (
    .clk   (clk),
    .rst_n (rst_n),
    .wr    (cw.wr),
    .da    (cw.da),
    .d     (result),
    .aa    (cw.aa),
    .ba    (cw.ba),
    .a     (bus_a),
    .b     (bus_b),
    .r0    (r0)
  );

  // MB: register or constant operand.
  assign operand_b = cw.mb ? const8 : bus_b;

  alu u_alu (
    .a     (bus_a),
    .b     (operand_b),
    .cin   (status.c),
    .fs    (cw.fs),
    .f     (alu_f),
    .flags (alu_flags),
    .upd   (alu_upd)
  );

  status_register u_status (
    .clk    (clk),
    .rst_n  (rst_n),
    .sl     (cw.sl),
    .upd    (alu_upd),
    .flags  (alu_flags),
    .status (status)
  );

  // MD: ALU result or data memory output.
  assign result = cw.md ? dmem_rdata : alu_f;

  assign dmem_addr  = {r0, (cw.mw ? bus_a : bus_b)};
  assign dmem_we    = cw.mw;
  assign dmem_wdata = operand_b;
  assign jump_addr  = {bus_a, bus_b};

endmodule
