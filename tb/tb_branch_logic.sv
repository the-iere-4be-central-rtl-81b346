// tb_branch_logic: all eight group-A codes against all four flag combinations, with
// the conditions written out from the instruction-set table.
`timescale 1ns/1ps
module tb_branch_logic;
  import iere4be_pkg::*;
  grp_a_e code;
  logic c, z, is_branch, taken;
  int checks = 0, failures = 0;

  branch_logic dut (.*);

  initial begin
    bit eb, et;
    for (int k = 0; k < 8; k++)
      for (int f = 0; f < 4; f++) begin
        code = grp_a_e'(k); c = f[1]; z = f[0];
        #1;
        eb = 1;
        case (k)
          1: et = (c == 0 && z == 0);   // BGT
          2: et = (c == 1 && z == 0);   // BLT
          3: et = (z == 1);             // BEQ
          4: et = (z == 0);             // BNE
          5: et = (c == 0);             // BGE
          6: et = (c == 1);             // BLE
          default: begin eb = 0; et = 0; end
        endcase
        checks++;
        if (is_branch != eb || taken != et) begin
          failures++;
          $display("FAIL code=%0d c=%b z=%b: branch=%b taken=%b", k, c, z, is_branch, taken);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
