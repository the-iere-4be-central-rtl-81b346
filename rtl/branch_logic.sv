// branch_logic: evaluates the branch conditions for the Control Unit.
//
// Six codes of micro-instruction group A each flag one conditional branch; this block
// tests the flagged condition against the CC flags, as the instruction set defines them:
//   BGT: C=0 and Z=0   BLT: C=1 and Z=0   BEQ: Z=1
//   BNE: Z=0           BGE: C=0           BLE: C=1
// `is_branch` says a branch code is present, `taken` whether its condition holds. The
// conditional logic clears the CAR (abandoning the instruction) when a branch is not
// taken. Purely combinational; the assignment of codes to branches is in iere4be_pkg.
module branch_logic
  import iere4be_pkg::*;
(
  input  grp_a_e code,
  input  logic   c,
  input  logic   z,
  output logic   is_branch,
  output logic   taken
);
  always_comb begin
    is_branch = 1'b1;
    unique case (code)
      A_BGT:   taken = !c && !z;
      A_BLT:   taken =  c && !z;
      A_BEQ:   taken =  z;
      A_BNE:   taken = !z;
      A_BGE:   taken = !c;
      A_BLE:   taken =  c;
      default: begin
        is_branch = 1'b0;
        taken     = 1'b0;
      end
    endcase
  end
endmodule
