// tb_data_unit: register transfers of the Data Unit, driven micro-cycle by micro-cycle.
//
// The testbench makes its own phase strobes and applies one set of decoded controls per
// micro-cycle of four master periods, like the Control Unit does. It checks: the opcode
// fetch transfers (ADLA <- PC, DRIN <- data bus, IRH/IRL <- DRIN, PC + 1) including that
// ADLA changes at the fall of phi1 and not before; the three MAR nybbles, ADLA <- MAR and
// PC <- MAR; random ALU operations through A, TR, R and CC (add, subtract, compare, and,
// or, shift left, shift right, not, pass) against arithmetic computed here; and the
// store path A -> R -> DROUT onto the external data bus.
`timescale 1ns/1ps
module tb_data_unit;
  import iere4be_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] ph = 0;
  logic phi1_fall, phi2_fall;
  du_ctrl_t ctrl;
  logic [3:0] data_in = 0, data_out, a_q;
  logic data_oe, cc_c, cc_z;
  logic [11:0] addr, pc_q;
  logic [7:0] ir;
  int checks = 0, failures = 0;

  data_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst ? 2'd0 : ph + 2'd1;
  assign phi1_fall = (ph == 0);
  assign phi2_fall = (ph == 2);

  function automatic du_ctrl_t idle();
    du_ctrl_t c = '0;
    c.alu_cn = 1; c.alu_m = 1; c.alu_s = 4'hF;
    return c;
  endfunction

  // One micro-cycle with controls c; starts and ends just after phase 3.
  task automatic uc(input du_ctrl_t c);
    ctrl = c;
    repeat (4) @(negedge clk);
    ctrl = idle();
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_drin(input logic [3:0] v);
    du_ctrl_t c = idle(); c.ld_drin = 1; data_in = v; uc(c);
  endtask

  task automatic drin_to_a_tr(input logic [3:0] av, input logic [3:0] bv);
    du_ctrl_t c;
    load_drin(av); c = idle(); c.en_drin = 1; c.ld_a = 1; uc(c);
    load_drin(bv); c = idle(); c.en_drin = 1; c.ld_tr = 1; uc(c);
  endtask

  initial begin
    du_ctrl_t c;
    logic [11:0] mar_v;
    logic [3:0] av, bv, ef;
    logic ec, ez, c_old;
    logic [4:0] w;
    ctrl = idle();
    repeat (2) @(negedge clk);
    rst = 0;
    // ---- opcode fetch transfers
    for (int i = 0; i < 2; i++) begin
      c = idle(); c.en_pc = 1; c.ld_adla = 1; c.ld_drin = 1; data_in = 4'hA - 4'(i);
      ctrl = c;
      #1;                                           // phase 0: ADLA not yet written
      if (i == 1) check(addr == 12'd0, "ADLA changed before the fall of phi1");
      @(negedge clk);                               // phase 1
      check(addr == 12'(i), "ADLA <- PC");
      repeat (3) @(negedge clk);
      c = idle(); c.en_drin = 1; c.pc_inc = 1;
      if (i == 0) c.ld_irh = 1; else c.ld_irl = 1;
      uc(c);
    end
    check(ir == 8'hA9, $sformatf("IR=%h expected A9", ir));
    check(pc_q == 12'd2, "PC incremented twice");
    // ---- MAR, ADLA <- MAR, PC <- MAR
    for (int k = 0; k < 20; k++) begin
      mar_v = 12'($urandom);
      load_drin(mar_v[3:0]);  c = idle(); c.en_drin = 1; c.ld_marl = 1; uc(c);
      load_drin(mar_v[7:4]);  c = idle(); c.en_drin = 1; c.ld_marm = 1; uc(c);
      load_drin(mar_v[11:8]); c = idle(); c.en_drin = 1; c.ld_marh = 1; uc(c);
      c = idle(); c.en_mar = 1; c.ld_adla = 1; uc(c);
      check(addr == mar_v, $sformatf("ADLA=%h expected MAR %h", addr, mar_v));
      c = idle(); c.ld_pc = 1; uc(c);
      check(pc_q == mar_v, "PC <- MAR");
    end
    // ---- ALU operations
    c_old = 0;
    for (int k = 0; k < 300; k++) begin
      int op;
      av = 4'($urandom); bv = 4'($urandom); op = $urandom_range(0, 8);
      drin_to_a_tr(av, bv);
      c = idle(); c.ld_r = (op != 2); c.ld_cc = 1;
      ec = c_old;
      case (op)
        0: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b101001; w = av + bv; ef = w[3:0]; ec = w[4]; end
        1: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b000110; ef = av - bv; ec = av < bv; end
        2: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b000110; ef = av - bv; ec = av < bv; end
        3: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b111011; ef = av & bv; end
        4: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b111110; ef = av | bv; end
        5: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b101100; ef = av << 1; ec = av[3]; end
        6: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b010000; ef = {av[3], av[3:1]}; ec = av[0]; end
        7: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b110000; ef = ~av; end
        default: begin {c.alu_cn, c.alu_m, c.alu_s} = 6'b011010; ef = bv; ec = 0; end
      endcase
      ez = (ef == 0);
      uc(c);
      check({cc_c, cc_z} == {ec, ez}, $sformatf("op %0d a=%h b=%h: CC=%b%b expected %b%b",
                                                op, av, bv, cc_c, cc_z, ec, ez));
      c_old = ec;
      if (op != 2) begin
        c = idle(); c.en_r = 1; c.ld_a = 1; uc(c);
        check(a_q == ef, $sformatf("op %0d a=%h b=%h: A=%h expected %h", op, av, bv, a_q, ef));
      end else begin
        check(a_q == av, "compare changed A");
      end
    end
    // ---- store path
    for (int k = 0; k < 10; k++) begin
      av = 4'($urandom); bv = 4'($urandom);
      drin_to_a_tr(av, bv);
      c = idle(); c.ld_r = 1; {c.alu_cn, c.alu_m, c.alu_s} = 6'b111111; uc(c);
      c = idle(); c.en_r = 1; c.ld_drout = 1; uc(c);
      check(!data_oe, "data bus driven without DROUT enable");
      c = idle(); c.en_drout = 1; c.rw = 1; ctrl = c; #1;
      check(data_oe && data_out == av, "DROUT drives A on the data bus");
      uc(c);
      // A onto the internal bus
      c = idle(); c.en_a = 1; c.ld_drout = 1; uc(c);
      check(data_out == av, "DROUT <- A");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
