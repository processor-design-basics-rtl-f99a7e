// branch_control: decides whether the PC loads a new address this cycle.
//
// Inputs from the instruction decoder say what the instruction is: PL = 0 for ordinary
// instructions, PL = 1 with JB = 1 for a jump, PL = 1 with JB = 0 for a conditional branch
// whose condition is BC. BC bit 2 gives the flag value that takes the branch, BC bits 1..0
// pick the flag: 00 Z, 01 C, 10 V, 11 N (so 100 = branch if zero, 000 = branch if non-zero).
// load = PL & (JB | condition). All of this follows the design.
//
// Interface: br (PL, JB, BC) and status (V, C, N, Z) in; load out.
// Timing: combinational.
module branch_control
  import cpu_pkg::*;
(
  input  branch_ctrl_t br,
  input  status_t      status,
  output logic         load
);

  logic flag;
  logic cond_true;

  always_comb begin
    unique case (br.bc[1:0])
      2'b00:   flag = status.z;
      2'b01:   flag = status.c;
      2'b10:   flag = status.v;
      default: flag = status.n;
    endcase
    cond_true = (flag == br.bc[2]);
    load      = br.pl & (br.jb | cond_true);
  end

endmodule
