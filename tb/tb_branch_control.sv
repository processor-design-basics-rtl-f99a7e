// tb_branch_control: exhaustive check of the branch control unit.
//
// All combinations of PL, JB, BC and the four status bits are applied; the expected Load is
// worked out from the branch names (BNZ, BNC, ..., BN) rather than from the BC bit layout.
module tb_branch_control;
  import cpu_pkg::*;

  branch_ctrl_t br;
  status_t      st;
  logic         load;

  int checks = 0;
  int failures = 0;

  branch_control dut (.br(br), .status(st), .load(load));

  function automatic logic expected(logic pl, logic jb, logic [2:0] bc, status_t s);
    logic take;
    if (!pl) return 1'b0;
    if (jb) return 1'b1;
    case (bc)
      3'd0: take = !s.z;  // BNZ
      3'd1: take = !s.c;  // BNC
      3'd2: take = !s.v;  // BNV
      3'd3: take = !s.n;  // BNN
      3'd4: take = s.z;   // BZ
      3'd5: take = s.c;   // BC
      3'd6: take = s.v;   // BV
      default: take = s.n;  // BN
    endcase
    return take;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      br.pl = i[8];
      br.jb = i[7];
      br.bc = i[6:4];
      st    = status_t'(i[3:0]);
      #1;
      checks++;
      if (load !== expected(br.pl, br.jb, br.bc, st)) begin
        failures++;
        $display("FAIL pl=%0b jb=%0b bc=%03b vcnz=%04b load=%0b", br.pl, br.jb, br.bc, st, load);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
