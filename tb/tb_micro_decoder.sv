// tb_micro_decoder: random micro-instructions against a reference decode written from
// the signal list: group A code 000 = PC increment; group B 000..110 = load IRL, IRH,
// MARL, MARM, MARH, enable MAR, load DRIN; group C 000..110 = load A, TR, DROUT, PC,
// enable A, DROUT, PC; 111 = none; active-low strobes inverted; ALU bits S0..S3 at
// bits 12..9. The fetch rows of the published fetch table are also decoded.
`timescale 1ns/1ps
module tb_micro_decoder;
  import iere4be_pkg::*;
  uword_t   uw;
  du_ctrl_t ctrl;
  int checks = 0, failures = 0;

  micro_decoder dut (.*);

  function automatic logic [23:0] expect_ctrl(input logic [23:0] w);
    logic [2:0] ga, gb, gc;
    logic [23:0] e;
    ga = w[23:21]; gb = w[20:18]; gc = w[17:15];
    // order of du_ctrl_t fields, MSB first
    e = '0;
    e[23] = (ga == 0);                 // pc_inc
    e[22] = (gc == 3);                 // ld_pc
    e[21] = (gc == 6);                 // en_pc
    e[20] = (gb == 0);                 // ld_irl
    e[19] = (gb == 1);                 // ld_irh
    e[18] = (gb == 2);                 // ld_marl
    e[17] = (gb == 3);                 // ld_marm
    e[16] = (gb == 4);                 // ld_marh
    e[15] = (gb == 5);                 // en_mar
    e[14] = (gb == 6);                 // ld_drin
    e[13] = ~w[4];                     // en_drin
    e[12] = (gc == 0);                 // ld_a
    e[11] = (gc == 4);                 // en_a
    e[10] = (gc == 1);                 // ld_tr
    e[9]  = (gc == 2);                 // ld_drout
    e[8]  = (gc == 5);                 // en_drout
    e[7]  = ~w[7];                     // ld_r
    e[6]  = ~w[6];                     // en_r
    e[5]  = ~w[8];                     // ld_cc
    e[4]  = ~w[5];                     // ld_adla
    e[3]  = w[14];                     // cn
    e[2]  = w[13];                     // m
    e[1]  = w[0];                      // rw
    return e;
  endfunction

  function automatic logic [23:0] pack(input du_ctrl_t c);
    return {c.pc_inc, c.ld_pc, c.en_pc, c.ld_irl, c.ld_irh, c.ld_marl, c.ld_marm, c.ld_marh,
            c.en_mar, c.ld_drin, c.en_drin, c.ld_a, c.en_a, c.ld_tr, c.ld_drout, c.en_drout,
            c.ld_r, c.en_r, c.ld_cc, c.ld_adla, c.alu_cn, c.alu_m, c.rw, 1'b0};
  endfunction

  initial begin
    logic [23:0] w;
    for (int i = 0; i < 5000; i++) begin
      w = 24'($urandom);
      uw = uword_t'(w);
      #1;
      checks++;
      if (pack(ctrl) != expect_ctrl(w) || ctrl.alu_s != {w[9], w[10], w[11], w[12]}) begin
        failures++;
        if (failures < 10) $display("FAIL w=%h ctrl=%h expected %h", w, pack(ctrl), expect_ctrl(w));
      end
    end
    // Row 1 of the fetch table: ADLA <- PC, DRIN <- (M)
    uw = uword_t'(24'b111_110_110_111111111_0_1_1_1_0_0); #1;
    checks++;
    if (!(ctrl.ld_adla && ctrl.en_pc && ctrl.ld_drin && !ctrl.pc_inc && !ctrl.en_drin)) failures++;
    // Row 4: IRH <- DRIN, PC <- PC + 1
    uw = uword_t'(24'b000_001_111_111111111_1_0_1_1_0_0); #1;
    checks++;
    if (!(ctrl.ld_irh && ctrl.pc_inc && ctrl.en_drin && !ctrl.ld_adla)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
