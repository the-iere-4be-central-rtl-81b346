// control_store: the micro-program ROM of the IERE-4BE Control Unit.
//
// 256 words of 24 bits (one word per value of the 8-bit CBR), read asynchronously like
// the EPROM it stands for. Each word drives the Data Unit for one micro-cycle. Unused
// addresses hold a word that only ends the execute cycle.
//
// The micro-program:
//   0..4    opcode fetch: ADLA <- PC, DRIN <- (M); IRH <- DRIN, PC+1; the same for IRL;
//           then /EO1 loads the CAR from the vector table (VTPR is 0 here, so IR7 picks
//           the direct or indirect operand fetch).
//   5..6    direct operand fetch: ADLA <- PC, DRIN <- (M); PC+1 with /EO2 (VTPR <- IR0-6)
//           and /EO1 (CAR <- vector of the opcode).
//   7..14   indirect operand fetch: three nybbles into MARL, MARM, MARH (PC+1 after
//           each), ADLA <- MAR, then DRIN <- (M) with /EO2 and /EO1.
//   15..54  execute sequences, one per instruction, each ending with EOE. Operands reach
//           the ALU through TR (TR <- DRIN), the result goes R -> A. STA copies A through
//           the ALU into R, then R -> DROUT and writes with DROUT enabled and R/W = 1.
//           A branch word flags its condition in group A; when the condition fails the
//           CAR is cleared, otherwise the next word loads the PC from the MAR. HALT
//           reloads the CAR from its own vector and so repeats until reset.
// The fetch words use the bit patterns of the published fetch table (with the IRH load
// first, since the first nybble in memory is the high one). The operand-fetch order
// follows the published flowchart; the execute sequences are this design's own.
module control_store
  import iere4be_pkg::*;
(
  input  logic [UADDR_W-1:0] addr,  // from the CBR
  output uword_t             uw
);
  localparam uword_t IDLE = '{grp_a: A_NONE, grp_b: B_NONE, grp_c: C_NONE,
                              cn: 1'b1, m: 1'b1, s0: 1'b1, s1: 1'b1, s2: 1'b1, s3: 1'b1,
                              ccl_n: 1'b1, rl_n: 1'b1, ren_n: 1'b1, adlal_n: 1'b1,
                              drinen_n: 1'b1, eo1_n: 1'b1, eo2_n: 1'b1, eoe: 1'b0, rw: 1'b0};

  function automatic uword_t alu(input uword_t w, input logic [5:0] op, input logic ld_r,
                                 input logic ld_cc);
    uword_t r = w;
    {r.cn, r.m, r.s3, r.s2, r.s1, r.s0} = op;
    r.rl_n  = ~ld_r;
    r.ccl_n = ~ld_cc;
    return r;
  endfunction

  // ADLA <- PC and DRIN <- (M) in one micro-cycle.
  function automatic uword_t rd_at_pc();
    uword_t r = IDLE;
    r.grp_b   = B_LD_DRIN;
    r.grp_c   = C_EN_PC;
    r.adlal_n = 1'b0;
    return r;
  endfunction

  // A group-B destination <- DRIN, PC <- PC + 1.
  function automatic uword_t drin_to(input grp_b_e dst);
    uword_t r = IDLE;
    r.grp_a    = A_PCINC;
    r.grp_b    = dst;
    r.drinen_n = 1'b0;
    return r;
  endfunction

  function automatic uword_t tr_from_drin();
    uword_t r = IDLE;
    r.grp_c    = C_LD_TR;
    r.drinen_n = 1'b0;
    return r;
  endfunction

  function automatic uword_t a_from_r_end();
    uword_t r = IDLE;
    r.grp_c = C_LD_A;
    r.ren_n = 1'b0;
    r.eoe   = 1'b1;
    return r;
  endfunction

  function automatic uword_t branch(input grp_a_e cond);
    uword_t r = IDLE;
    r.grp_a = cond;
    return r;
  endfunction

  function automatic uword_t pc_from_mar_end();
    uword_t r = IDLE;
    r.grp_c = C_LD_PC;
    r.eoe   = 1'b1;
    return r;
  endfunction

  function automatic uword_t end_exec();
    uword_t r = IDLE;
    r.eoe = 1'b1;
    return r;
  endfunction

  always_comb begin
    uw = end_exec();
    unique case (addr)
      // Opcode fetch
      8'd0:  uw = rd_at_pc();
      8'd1:  uw = drin_to(B_LD_IRH);
      8'd2:  uw = rd_at_pc();
      8'd3:  uw = drin_to(B_LD_IRL);
      8'd4:  begin uw = IDLE; uw.eo1_n = 1'b0; end
      // Direct operand fetch
      8'd5:  uw = rd_at_pc();
      8'd6:  begin uw = IDLE; uw.grp_a = A_PCINC; uw.eo2_n = 1'b0; uw.eo1_n = 1'b0; end
      // Indirect operand fetch
      8'd7:  uw = rd_at_pc();
      8'd8:  uw = drin_to(B_LD_MARL);
      8'd9:  uw = rd_at_pc();
      8'd10: uw = drin_to(B_LD_MARM);
      8'd11: uw = rd_at_pc();
      8'd12: uw = drin_to(B_LD_MARH);
      8'd13: begin uw = IDLE; uw.grp_b = B_EN_MAR; uw.adlal_n = 1'b0; end
      8'd14: begin uw = IDLE; uw.grp_b = B_LD_DRIN; uw.eo2_n = 1'b0; uw.eo1_n = 1'b0; end
      // LDA: TR <- DRIN; R,CC <- B; A <- R
      8'd15: uw = tr_from_drin();
      8'd16: uw = alu(IDLE, ALU_PASS_B, 1'b1, 1'b1);
      8'd17: uw = a_from_r_end();
      // ADDA
      8'd18: uw = tr_from_drin();
      8'd19: uw = alu(IDLE, ALU_ADD, 1'b1, 1'b1);
      8'd20: uw = a_from_r_end();
      // SUBA
      8'd21: uw = tr_from_drin();
      8'd22: uw = alu(IDLE, ALU_SUB, 1'b1, 1'b1);
      8'd23: uw = a_from_r_end();
      // CMPA: flags only
      8'd24: uw = tr_from_drin();
      8'd25: begin uw = alu(IDLE, ALU_SUB, 1'b0, 1'b1); uw.eoe = 1'b1; end
      // ANDA
      8'd26: uw = tr_from_drin();
      8'd27: uw = alu(IDLE, ALU_AND, 1'b1, 1'b1);
      8'd28: uw = a_from_r_end();
      // ORA
      8'd29: uw = tr_from_drin();
      8'd30: uw = alu(IDLE, ALU_OR, 1'b1, 1'b1);
      8'd31: uw = a_from_r_end();
      // ASLA
      8'd32: uw = alu(IDLE, ALU_SHL, 1'b1, 1'b1);
      8'd33: uw = a_from_r_end();
      // ASRA
      8'd34: uw = alu(IDLE, ALU_SHR, 1'b1, 1'b1);
      8'd35: uw = a_from_r_end();
      // NOTA
      8'd36: uw = alu(IDLE, ALU_NOT, 1'b1, 1'b1);
      8'd37: uw = a_from_r_end();
      // STA: R <- A; DROUT <- R; write
      8'd38: uw = alu(IDLE, ALU_PASS_A, 1'b1, 1'b0);
      8'd39: begin uw = IDLE; uw.grp_c = C_LD_DROUT; uw.ren_n = 1'b0; end
      8'd40: begin uw = IDLE; uw.grp_c = C_EN_DROUT; uw.rw = 1'b1; uw.eoe = 1'b1; end
      // Branches: test, then PC <- MAR
      8'd41: uw = branch(A_BGT);
      8'd42: uw = pc_from_mar_end();
      8'd43: uw = branch(A_BLT);
      8'd44: uw = pc_from_mar_end();
      8'd45: uw = branch(A_BEQ);
      8'd46: uw = pc_from_mar_end();
      8'd47: uw = branch(A_BNE);
      8'd48: uw = pc_from_mar_end();
      8'd49: uw = branch(A_BGE);
      8'd50: uw = pc_from_mar_end();
      8'd51: uw = branch(A_BLE);
      8'd52: uw = pc_from_mar_end();
      // HALT: jump to its own vector
      8'd53: begin uw = IDLE; uw.eo1_n = 1'b0; end
      default: uw = end_exec();
    endcase
  end
endmodule
