// micro_decoder: the Control Unit's decoding logic.
//
// The micro-instruction mixes a horizontal part (bits 14..0, one bit per control line,
// most of them active low) with a vertical part (bits 23..15: three 3-bit groups whose
// signals are never needed together). This block turns the current micro-instruction
// into one active-high control per Data Unit action: group A gives the PC increment,
// group B the IR/MAR/DRIN loads and the MAR enable, group C the A/TR/DROUT/PC loads and
// the A/PC/DROUT enables; the active-low bits are inverted. Branch codes of group A are
// evaluated elsewhere (branch_logic). Purely combinational. Which value of each group
// selects which action is defined in iere4be_pkg.
module micro_decoder
  import iere4be_pkg::*;
(
  input  uword_t   uw,
  output du_ctrl_t ctrl
);
  always_comb begin
    ctrl          = '0;
    ctrl.pc_inc   = (uw.grp_a == A_PCINC);

    ctrl.ld_irl   = (uw.grp_b == B_LD_IRL);
    ctrl.ld_irh   = (uw.grp_b == B_LD_IRH);
    ctrl.ld_marl  = (uw.grp_b == B_LD_MARL);
    ctrl.ld_marm  = (uw.grp_b == B_LD_MARM);
    ctrl.ld_marh  = (uw.grp_b == B_LD_MARH);
    ctrl.en_mar   = (uw.grp_b == B_EN_MAR);
    ctrl.ld_drin  = (uw.grp_b == B_LD_DRIN);

    ctrl.ld_a     = (uw.grp_c == C_LD_A);
    ctrl.ld_tr    = (uw.grp_c == C_LD_TR);
    ctrl.ld_drout = (uw.grp_c == C_LD_DROUT);
    ctrl.ld_pc    = (uw.grp_c == C_LD_PC);
    ctrl.en_a     = (uw.grp_c == C_EN_A);
    ctrl.en_drout = (uw.grp_c == C_EN_DROUT);
    ctrl.en_pc    = (uw.grp_c == C_EN_PC);

    ctrl.ld_cc    = ~uw.ccl_n;
    ctrl.ld_r     = ~uw.rl_n;
    ctrl.en_r     = ~uw.ren_n;
    ctrl.ld_adla  = ~uw.adlal_n;
    ctrl.en_drin  = ~uw.drinen_n;
    ctrl.alu_cn   = uw.cn;
    ctrl.alu_m    = uw.m;
    ctrl.alu_s    = {uw.s3, uw.s2, uw.s1, uw.s0};
    ctrl.rw       = uw.rw;
  end
endmodule
