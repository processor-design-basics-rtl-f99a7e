// branch_adder: forms the PC-relative branch target, PC + offset11.
//
// offset11 (instruction bits 10..0) is a signed two's-complement number, so it is
// sign-extended to the PC width before the add; the range is -1024..+1023 words from the
// branch instruction itself. The add is modulo 2^16. The relative addressing and the signed
// offset follow the design; wrap-around at the ends of memory is this design's own reading.
//
// Interface: pc, offset in; target out.
// Timing: combinational.
module branch_adder
  import cpu_pkg::*;
(
  input  logic [ADDR_W-1:0] pc,
  input  logic [OFFS_W-1:0] offset,
  output logic [ADDR_W-1:0] target
);

  assign target = pc + {{(ADDR_W-OFFS_W){offset[OFFS_W-1]}}, offset};

endmodule
