// simple_processor: a complete single-cycle 8-bit processor with 16-bit instructions.
//
// The control unit (PC, instruction decoder, branch control, branch adder and PC source
// multiplexer) fetches one instruction per clock from the instruction RAM and drives the
// datapath (four 8-bit registers, ALU, status register) which reads and writes the 8-bit data
// RAM. In one clock cycle: the instruction at PC is read, decoded into a control word, the
// registers are read and sent to the ALU or the data RAM, the result is written back, and the
// PC is incremented or reloaded for a taken branch or a jump. That organisation follows the
// design.
//
// The program is written into the instruction RAM through the prog_* port, which is this
// design's own addition; hold rst_n low while loading. Reset (synchronous, active low) sets
// the PC to RESET_PC and clears the registers and status bits.
//
// Interface: clk, rst_n; prog_we/prog_addr/prog_data to load the program; pc, instr,
// pc_load (the PC takes a branch or jump target at the next edge), status and the data
// RAM write (dmem_we, dmem_addr, dmem_wdata) brought out for observation.
// Timing: one instruction per clock; all state changes on the rising edge.
module simple_processor
  import cpu_pkg::*;
#(
  parameter logic [ADDR_W-1:0] RESET_PC = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog_we,
  input  logic [ADDR_W-1:0]  prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  output logic [ADDR_W-1:0]  pc,
  output logic [INSTR_W-1:0] instr,
  output logic               pc_load,
  output status_t            status,
  output logic               dmem_we,
  output logic [ADDR_W-1:0]  dmem_addr,
  output logic [DATA_W-1:0]  dmem_wdata
);

  ctrl_word_t        cw;
  logic [DATA_W-1:0] const8;
  logic [ADDR_W-1:0] jump_addr;
  logic [DATA_W-1:0] dmem_rdata;

  instruction_memory u_imem (
    .clk   (clk),
    .adrs  (pc),
    .out   (instr),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_data)
  );

  control_unit #(
    .RESET_PC (RESET_PC)
  ) u_cu (
    .clk       (clk),
    .rst_n     (rst_n),
    .instr     (instr),
    .status    (status),
    .jump_addr (jump_addr),
    .pc        (pc),
    .cw        (cw),
    .const8    (const8),
    .pc_load   (pc_load)
  );

  datapath u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .cw         (cw),
    .const8     (const8),
    .status     (status),
    .jump_addr  (jump_addr),
    .dmem_addr  (dmem_addr),
    .dmem_we    (dmem_we),
    .dmem_wdata (dmem_wdata),
    .dmem_rdata (dmem_rdata)
  );

  data_memory u_dmem (
    .clk   (clk),
    .addr  (dmem_addr),
    .we    (dmem_we),
    .wdata (dmem_wdata),
    .rdata (dmem_rdata)
  );

endmodule
