// tb_control_unit: sequencing of the Control Unit.
//
// The testbench makes its own phase strobes (four master periods per micro-cycle) and
// holds IR and the CC flags at chosen values. For each case it checks, micro-cycle by
// micro-cycle, the micro-program address (CBR) against the expected path: opcode fetch
// 0..4, then the direct (5, 6) or indirect (7..14) operand fetch selected by IR7, then
// the execute sequence of the opcode, and back to 0; a failed branch condition returns
// to 0 after one word, a taken one after two; HALT stays on its word. It also checks
// that the CBR only changes at the rise of phi1 and that decoded controls match the
// word being executed.
`timescale 1ns/1ps
module tb_control_unit;
  import iere4be_pkg::*;
  logic clk = 0, rst = 1;
  logic phi1_fall, phi2_fall, phi1_rise;
  logic [7:0] ir = 0, upc;
  logic cc_c = 0, cc_z = 0, br_eval, br_taken;
  du_ctrl_t ctrl;
  logic [1:0] ph = 0;
  int checks = 0, failures = 0;

  control_unit dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) ph <= rst ? 2'd0 : ph + 2'd1;
  assign phi1_fall = (ph == 0);
  assign phi2_fall = (ph == 2);
  assign phi1_rise = (ph == 3);

  // CBR is stable inside a micro-cycle
  logic [7:0] upc_prev;
  always @(posedge clk) begin
    if (!rst && ph != 0 && upc != upc_prev) begin
      failures++;
      $display("FAIL CBR changed inside a micro-cycle");
    end
    upc_prev <= upc;
  end

  // Runs micro-cycles from the current one and compares the CBR with `path`.
  task automatic expect_path(input string name, input int path[$]);
    foreach (path[i]) begin
      @(negedge clk);             // inside phase 0 of a micro-cycle
      checks++;
      if (upc != 8'(path[i])) begin
        failures++;
        $display("FAIL %s step %0d: CBR=%0d expected %0d", name, i, upc, path[i]);
      end
      if (upc == 8'd1) begin
        checks++;
        if (!(ctrl.ld_irh && ctrl.pc_inc && ctrl.en_drin)) failures++;
      end
      if (upc == 8'd13) begin
        checks++;
        if (!(ctrl.en_mar && ctrl.ld_adla)) failures++;
      end
      repeat (3) @(negedge clk);  // rest of the micro-cycle
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    #2 rst = 0;
    ir = 8'h83;
    expect_path("ADDA ind", '{0,1,2,3,4,7,8,9,10,11,12,13,14,18,19,20});
    ir = 8'h03;
    expect_path("ADDA imm", '{0,1,2,3,4,5,6,18,19,20});
    ir = 8'h05;
    expect_path("ASLA", '{0,1,2,3,4,5,6,32,33});
    ir = 8'h8C; cc_z = 0;
    expect_path("BEQ not taken", '{0,1,2,3,4,7,8,9,10,11,12,13,14,45});
    ir = 8'h8C; cc_z = 1;
    expect_path("BEQ taken", '{0,1,2,3,4,7,8,9,10,11,12,13,14,45,46});
    ir = 8'h8B; cc_c = 1; cc_z = 0;
    expect_path("BLT taken", '{0,1,2,3,4,7,8,9,10,11,12,13,14,43,44});
    ir = 8'h8A;
    expect_path("BGT not taken", '{0,1,2,3,4,7,8,9,10,11,12,13,14,41});
    ir = 8'h82;
    expect_path("STA", '{0,1,2,3,4,7,8,9,10,11,12,13,14,38,39,40});
    ir = 8'h55;   // not an instruction: one word, then the next fetch
    expect_path("undefined", '{0,1,2,3,4,5,6,54});
    ir = 8'h10;
    expect_path("HALT", '{0,1,2,3,4,5,6,53,53,53,53});
    rst = 1; @(negedge clk); rst = 0;
    ir = 8'h20;
    expect_path("ASRA after reset", '{0,1,2,3,4,5,6,34,35,0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
