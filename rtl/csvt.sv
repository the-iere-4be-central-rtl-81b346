// csvt: the Control Store Vector Table of the IERE-4BE.
//
// A 256 x 8 ROM holding the control-store start address of every micro-sequence. It is
// addressed by {IR7, VTPR}: with VTPR cleared (end of the opcode fetch) the address is
// 0x00 or 0x80 and selects the direct or indirect operand fetch; after VTPR has taken
// IR0-6 the address is the whole opcode and selects its execute sequence. Opcodes not in
// the instruction set point at a word that just ends the instruction. Read
// asynchronously, like the EPROM it stands for. The addresses stored are those of the
// micro-program in control_store.
module csvt
  import iere4be_pkg::*;
(
  input  logic [7:0]         addr,   // {IR7, VTPR[6:0]}
  output logic [UADDR_W-1:0] vector
);
  always_comb begin
    unique case (addr)
      8'h00:                    vector = UA_DIRECT;
      8'h80:                    vector = UA_INDIRECT;
      OP_LDA_IMM,  OP_LDA_IND:  vector = UA_LDA;
      OP_STA_IND:               vector = UA_STA;
      OP_ADDA_IMM, OP_ADDA_IND: vector = UA_ADDA;
      OP_SUBA_IMM, OP_SUBA_IND: vector = UA_SUBA;
      OP_ASLA:                  vector = UA_ASLA;
      OP_ASRA:                  vector = UA_ASRA;
      OP_CMPA_IMM, OP_CMPA_IND: vector = UA_CMPA;
      OP_ANDA_IMM, OP_ANDA_IND: vector = UA_ANDA;
      OP_ORA_IMM,  OP_ORA_IND:  vector = UA_ORA;
      OP_NOTA:                  vector = UA_NOTA;
      OP_BGT:                   vector = UA_BGT;
      OP_BLT:                   vector = UA_BLT;
      OP_BEQ:                   vector = UA_BEQ;
      OP_BNE:                   vector = UA_BNE;
      OP_BGE:                   vector = UA_BGE;
      OP_BLE:                   vector = UA_BLE;
      OP_HALT:                  vector = UA_HALT;
      default:                  vector = UA_NOP;
    endcase
  end
endmodule
