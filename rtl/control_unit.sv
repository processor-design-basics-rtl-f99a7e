// control_unit: sequences the program and drives the datapath.
//
// The instruction read from the instruction RAM at address pc goes to the instruction
// decoder, which produces the datapath control word, the constant and the branch-control
// inputs PL, JB and BC. The branch control unit turns those and the status bits V, C, N, Z
// into the PC's Load signal. The PC's Data input comes from a 2:1 multiplexer selected by JB:
//   JB = 1 (jump)   : the 16-bit address {Rj, Ri} read from the register file
//   JB = 0 (branch) : the ADDER output, PC + sign-extended offset11
// With Load = 0 the PC simply increments. This structure follows the design. The
// instruction RAM sits outside this block (instr / pc ports), as does the register file
// (jump_addr port).
//
// Interface: clk, rst_n; instr from the instruction RAM; status and jump_addr from the
// datapath; pc to the instruction RAM; cw and const8 to the datapath.
// Timing: single cycle. Decode, condition check and next-PC selection are combinational;
// the PC updates on the rising clock edge that ends the instruction.
module control_unit
  import cpu_pkg::*;
#(
  parameter logic [ADDR_W-1:0] RESET_PC = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [INSTR_W-1:0] instr,
  input  status_t            status,
  input  logic [ADDR_W-1:0]  jump_addr,
  output logic [ADDR_W-1:0]  pc,
  output ctrl_word_t         cw,
  output logic [DATA_W-1:0]  const8,
  output logic               pc_load
);

  branch_ctrl_t      br;
  logic [ADDR_W-1:0] branch_target;
  logic [ADDR_W-1:0] pc_data;

  instruction_decoder u_decoder (
    .instr  (instr),
    .cw     (cw),
    .br     (br),
    .const8 (const8)
  );

  branch_control u_branch_control (
    .br     (br),
    .status (status),
    .load   (pc_load)
  );

  branch_adder u_adder (
    .pc     (pc),
    .offset (instr[OFFS_W-1:0]),
    .target (branch_target)
  );

  // PC source MUX: S = JB, D1 = register file, D0 = ADDER.
  assign pc_data = br.jb ? jump_addr : branch_target;

  program_counter #(
    .RESET_PC (RESET_PC)
  ) u_pc (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (pc_load),
    .data  (pc_data),
    .pc    (pc)
  );

endmodule
