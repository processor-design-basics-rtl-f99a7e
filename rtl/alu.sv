// alu: the 8-bit arithmetic/logic/shift unit, selected by the 5-bit FS code.
//
//   FS     operation                FS     operation
//   00000  F = B + 1   (INC)        00110  F = B >> 1  (SHR)
//   00001  F = A + B   (ADD)        00111  F = B << 1  (SHL)
//   00010  F = A + B + Cin (ADDC)   01000  F = A & B   (AND)
//   00011  F = A + B' + 1 (SUB)     01001  F = A | B   (OR)
//   00100  F = B - 1   (DEC)        01010  F = A ^ B   (XOR)
//   00101  F = B       (LDR)        01011  F = B'      (NOT)
// The codes and operations follow the design. Because the decoder passes the opcode
// straight through as FS, the data-movement and control-flow opcodes (01100..11111) also
// reach the ALU; this design defines all of them as F = B, so LDI writes its constant,
// which arrives on B, back to the register file.
//
// Status outputs: N = F7, Z = (F == 0), C = carry out of the 8-bit add, V = signed overflow
// of the add (for SUB, C = 1 means no borrow). The instruction set lists which status bits
// each instruction affects: ADD, ADDC and SUB all four; INC, DEC, LDR, AND, OR, XOR and NOT
// only Z and N; the shifts none. upd carries that list as a per-bit mask for the status
// register. The arithmetic of C and V, the zero fill of the shifts and the mask are this
// design's reading of that list.
//
// Interface: a, b, cin, fs in; f, flags (V, C, N, Z), upd out.
// Timing: combinational.
module alu
  import cpu_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              cin,
  input  logic [FS_W-1:0]   fs,
  output logic [DATA_W-1:0] f,
  output status_t           flags,
  output status_t           upd
);

  // One adder serves every arithmetic code: F = x + y + c.
  logic [DATA_W-1:0] add_x, add_y;
  logic              add_c;
  logic [DATA_W:0]   sum;
  logic              is_add;

  always_comb begin
    add_x  = a;
    add_y  = b;
    add_c  = 1'b0;
    is_add = 1'b1;
    unique case (fs)
      OP_INC:  begin add_x = '0; add_c = 1'b1; end
      OP_ADD:  ;
      OP_ADDC: add_c = cin;
      OP_SUB:  begin add_y = ~b; add_c = 1'b1; end
      OP_DEC:  begin add_x = '1; end
      default: is_add = 1'b0;
    endcase
  end

  assign sum = {1'b0, add_x} + {1'b0, add_y} + {{DATA_W{1'b0}}, add_c};

  always_comb begin
    if (is_add) begin
      f = sum[DATA_W-1:0];
    end else begin
      unique case (fs)
        OP_LDR:  f = b;
        OP_SHR:  f = b >> 1;
        OP_SHL:  f = b << 1;
        OP_AND:  f = a & b;
        OP_OR:   f = a | b;
        OP_XOR:  f = a ^ b;
        OP_NOT:  f = ~b;
        default: f = b;
      endcase
    end

    flags.n = f[DATA_W-1];
    flags.z = (f == '0);
    flags.c = is_add & sum[DATA_W];
    flags.v = is_add & (add_x[DATA_W-1] == add_y[DATA_W-1])
                     & (f[DATA_W-1] != add_x[DATA_W-1]);

    unique case (fs)
      OP_ADD, OP_ADDC, OP_SUB:                             upd = '{v: 1'b1, c: 1'b1, n: 1'b1, z: 1'b1};
      OP_INC, OP_DEC, OP_LDR, OP_AND, OP_OR, OP_XOR, OP_NOT: upd = '{v: 1'b0, c: 1'b0, n: 1'b1, z: 1'b1};
      default:                                             upd = '0;
    endcase
  end

endmodule
