// tb_alu: checks every FS code of the ALU on random and corner operands against integer
// arithmetic: the result F, N, Z, C and V for the adds (C as the bit above 8 bits, V from the
// signs of the operands as seen by the user, i.e. A and B for ADD/ADDC and A and -B for SUB),
// and the per-bit status update mask from the instruction set's status-bit column.
module tb_alu;
  import cpu_pkg::*;

  logic [DATA_W-1:0] a, b, f;
  logic              cin;
  logic [FS_W-1:0]   fs;
  status_t           flags, upd;

  int checks = 0;
  int failures = 0;

  alu dut (.a(a), .b(b), .cin(cin), .fs(fs), .f(f), .flags(flags), .upd(upd));

  task automatic check(string name, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL fs=%05b a=%02h b=%02h cin=%0b %s got=%02h exp=%02h", fs, a, b, cin, name, got, exp);
    end
  endtask

  task automatic run_one();
    int ua, ub, sa, sb, full, sfull;
    logic [7:0] ef;
    logic [3:0] emask;  // v c n z
    logic       arith;
    ua = int'(a); ub = int'(b);
    sa = int'($signed(a)); sb = int'($signed(b));
    arith = 0; full = 0; sfull = 0;
    case (fs)
      5'b00000: begin ef = 8'(ub + 1);         emask = 4'b0011; end
      5'b00001: begin full = ua + ub; sfull = sa + sb; arith = 1; ef = 8'(full); emask = 4'b1111; end
      5'b00010: begin full = ua + ub + int'(cin); sfull = sa + sb + int'(cin); arith = 1; ef = 8'(full); emask = 4'b1111; end
      5'b00011: begin full = ua + (255 - ub) + 1; sfull = sa - sb; arith = 1; ef = 8'(full); emask = 4'b1111; end
      5'b00100: begin ef = 8'(ub - 1);         emask = 4'b0011; end
      5'b00101: begin ef = b;                  emask = 4'b0011; end
      5'b00110: begin ef = 8'(ub / 2);         emask = 4'b0000; end
      5'b00111: begin ef = 8'(ub * 2);         emask = 4'b0000; end
      5'b01000: begin ef = a & b;              emask = 4'b0011; end
      5'b01001: begin ef = a | b;              emask = 4'b0011; end
      5'b01010: begin ef = a ^ b;              emask = 4'b0011; end
      5'b01011: begin ef = 8'(255 - ub);       emask = 4'b0011; end
      default:  begin ef = b;                  emask = 4'b0000; end
    endcase
    #1;
    check("F", f, ef);
    check("N", 8'(flags.n), 8'(ef[7]));
    check("Z", 8'(flags.z), 8'(ef == 0));
    check("UPD", 8'(upd), 8'(emask));
    if (arith) begin
      check("C", 8'(flags.c), 8'(full > 255));
      check("V", 8'(flags.v), 8'(sfull > 127 || sfull < -128));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] corner [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    for (int op = 0; op < 32; op++) begin
      fs = 5'(op);
      foreach (corner[i]) foreach (corner[j]) for (int c = 0; c < 2; c++) begin
        a = corner[i]; b = corner[j]; cin = c[0];
        run_one();
      end
      for (int k = 0; k < 300; k++) begin
        a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
        run_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
