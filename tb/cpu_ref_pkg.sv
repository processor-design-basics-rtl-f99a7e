// cpu_ref_pkg: an instruction-level reference model of the processor, used by the testbenches.
//
// cpu_model executes one instruction per step() exactly as the instruction set defines it,
// written from the operation column of the instruction table rather than from the RTL's
// structure: register results, memory accesses at {R0, Rx}, the status bits each instruction
// affects, PC-relative branches and register-pair jumps. Opcodes 110xx, which the instruction
// set leaves unassigned, behave as jumps because the decoder equations (PL = I15, JB = I14)
// make them so.
package cpu_ref_pkg;

  typedef struct packed {
    logic       is_store;
    logic [15:0] addr;
    logic [7:0]  data;
    logic       taken;     // PC loaded from a branch or jump
    logic [4:0]  op;
  } step_info_t;

  class cpu_model;
    logic [7:0]  r [4];
    logic        v, c, n, z;
    logic [15:0] pc;
    logic [15:0] imem [logic [15:0]];
    logic [7:0]  dmem [logic [15:0]];

    function new();
      reset();
    endfunction

    function void reset();
      foreach (r[i]) r[i] = 8'h00;
      {v, c, n, z} = 4'b0000;
      pc = 16'h0000;
    endfunction

    function logic [15:0] fetch(logic [15:0] a);
      if (imem.exists(a)) return imem[a];
      return 16'h0000;
    endfunction

    function logic [7:0] rd_mem(logic [15:0] a);
      if (dmem.exists(a)) return dmem[a];
      return 8'h00;
    endfunction

    // Adds x + y + cin; sets C and V; returns the 8-bit sum.
    function logic [7:0] add8(logic [7:0] x, logic [7:0] y, logic cin);
      logic [8:0] s;
      int sx, sy, ss;
      s  = {1'b0, x} + {1'b0, y} + {8'b0, cin};
      sx = int'($signed(x));
      sy = int'($signed(y));
      ss = sx + sy + int'(cin);
      c  = s[8];
      v  = (ss > 127) || (ss < -128);
      return s[7:0];
    endfunction

    function step_info_t step();
      logic [15:0] ins;
      logic [4:0]  op;
      logic [1:0]  j, i;
      logic [7:0]  k, res;
      logic [10:0] off;
      logic        cond, flag;
      step_info_t  info;
      ins = fetch(pc);
      op  = ins[15:11];
      j   = ins[10:9];
      i   = ins[1:0];
      k   = ins[7:0];
      off = ins[10:0];
      info = '0;
      info.op = op;
      case (op)
        5'b00000: begin res = r[i] + 8'd1; r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b00001: begin res = add8(r[j], r[i], 1'b0); r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b00010: begin res = add8(r[j], r[i], c); r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b00011: begin
          // Rj + Ri' + 1: C is the carry out; V is the overflow of Rj - Ri.
          logic [8:0] s;
          int d;
          s = {1'b0, r[j]} + {1'b0, ~r[i]} + 9'd1;
          d = int'($signed(r[j])) - int'($signed(r[i]));
          c = s[8];
          v = (d > 127) || (d < -128);
          res = s[7:0]; r[j] = res; {n, z} = {res[7], res == 0};
        end
        5'b00100: begin res = r[i] - 8'd1; r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b00101: begin res = r[i];        r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b00110: r[j] = r[i] >> 1;
        5'b00111: r[j] = r[i] << 1;
        5'b01000: begin res = r[j] & r[i]; r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b01001: begin res = r[j] | r[i]; r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b01010: begin res = r[j] ^ r[i]; r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b01011: begin res = ~r[i];       r[j] = res; {n, z} = {res[7], res == 0}; end
        5'b01100: begin
          info.is_store = 1; info.addr = {r[0], r[j]}; info.data = r[i];
          dmem[info.addr] = info.data;
        end
        5'b01101: r[j] = rd_mem({r[0], r[i]});
        5'b01110: begin
          info.is_store = 1; info.addr = {r[0], r[j]}; info.data = k;
          dmem[info.addr] = info.data;
        end
        5'b01111: r[j] = k;
        default: ;
      endcase
      if (op[4] == 1'b0) begin
        pc = pc + 16'd1;
      end else if (op[3]) begin
        info.taken = 1;
        pc = {r[j], r[i]};
      end else begin
        case (op[1:0])
          2'b00: flag = z;
          2'b01: flag = c;
          2'b10: flag = v;
          default: flag = n;
        endcase
        cond = op[2] ? flag : !flag;
        info.taken = cond;
        pc = cond ? pc + {{5{off[10]}}, off} : pc + 16'd1;
      end
      return info;
    endfunction
  endclass

endpackage
