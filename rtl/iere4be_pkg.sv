// iere4be_pkg: types and constants shared by the IERE-4BE CPU.
//
// The 24-bit micro-instruction layout follows the published format bit for bit:
// bits 23..21 group A, 20..18 group B, 17..15 group C (each a 3-bit encoded field),
// bit 14 Cn, 13 M, 12..9 S0..S3 (74181 ALU controls, note S0 is the higher bit),
// then the active-low strobes /CCL, /RL, /REN, /ADLAL, /DRINEN, /EO1, /EO2 and the
// active-high EOE and R/W bits. Code value 3'b111 of each group means "no action"
// (the idle rows of the published fetch sequence carry 111 there).
//
// Codes that the published fetch sequence prints are taken from it: A=000 is the PC
// increment, B=000 loads IRL, B=001 loads IRH, B=110 loads DRIN, C=110 puts the PC on the
// address path. The other group codes, the order of the branch codes and the layout of the
// micro-program (the UA_* addresses) are this design's own choices.
package iere4be_pkg;

  localparam int unsigned DATA_W = 4;   // external and internal data bus width
  localparam int unsigned ADDR_W = 12;  // external address bus width (4K x 4 space)
  localparam int unsigned UADDR_W = 8;  // CAR/CBR width: two cascaded 4-bit counters
  localparam int unsigned UWORD_W = 24; // micro-instruction width

  // Group A: PC increment control plus one code per conditional branch.
  typedef enum logic [2:0] {
    A_PCINC = 3'b000,
    A_BGT   = 3'b001,
    A_BLT   = 3'b010,
    A_BEQ   = 3'b011,
    A_BNE   = 3'b100,
    A_BGE   = 3'b101,
    A_BLE   = 3'b110,
    A_NONE  = 3'b111
  } grp_a_e;

  // Group B: load controls on IR, MAR and DRIN, and the MAR address enable.
  typedef enum logic [2:0] {
    B_LD_IRL  = 3'b000,
    B_LD_IRH  = 3'b001,
    B_LD_MARL = 3'b010,
    B_LD_MARM = 3'b011,
    B_LD_MARH = 3'b100,
    B_EN_MAR  = 3'b101,
    B_LD_DRIN = 3'b110,
    B_NONE    = 3'b111
  } grp_b_e;

  // Group C: load controls on A, PC, TR, DROUT and enables on A, PC, DROUT.
  typedef enum logic [2:0] {
    C_LD_A     = 3'b000,
    C_LD_TR    = 3'b001,
    C_LD_DROUT = 3'b010,
    C_LD_PC    = 3'b011,
    C_EN_A     = 3'b100,
    C_EN_DROUT = 3'b101,
    C_EN_PC    = 3'b110,
    C_NONE     = 3'b111
  } grp_c_e;

  typedef struct packed {
    grp_a_e     grp_a;    // 23:21
    grp_b_e     grp_b;    // 20:18
    grp_c_e     grp_c;    // 17:15
    logic       cn;       // 14  ALU carry in, active low
    logic       m;        // 13  ALU mode: 1 = logic, 0 = arithmetic
    logic       s0;       // 12
    logic       s1;       // 11
    logic       s2;       // 10
    logic       s3;       // 9
    logic       ccl_n;    // 8   load CC
    logic       rl_n;     // 7   load R
    logic       ren_n;    // 6   R onto internal bus
    logic       adlal_n;  // 5   load address latch
    logic       drinen_n; // 4   DRIN onto internal bus
    logic       eo1_n;    // 3   load CAR from the vector table
    logic       eo2_n;    // 2   load VTPR from IR(0-6)
    logic       eoe;      // 1   end of execute: clear CAR and VTPR
    logic       rw;       // 0   memory write (1) / read (0)
  } uword_t;

  // Individual Data Unit controls after decoding.
  typedef struct packed {
    logic       pc_inc;
    logic       ld_pc;
    logic       en_pc;
    logic       ld_irl;
    logic       ld_irh;
    logic       ld_marl;
    logic       ld_marm;
    logic       ld_marh;
    logic       en_mar;
    logic       ld_drin;
    logic       en_drin;
    logic       ld_a;
    logic       en_a;
    logic       ld_tr;
    logic       ld_drout;
    logic       en_drout;
    logic       ld_r;
    logic       en_r;
    logic       ld_cc;
    logic       ld_adla;
    logic       alu_cn;
    logic       alu_m;
    logic [3:0] alu_s;    // {S3,S2,S1,S0}
    logic       rw;
  } du_ctrl_t;

  // Micro-program entry points (control store addresses).
  localparam logic [UADDR_W-1:0] UA_FETCH    = 8'd0;
  localparam logic [UADDR_W-1:0] UA_DIRECT   = 8'd5;
  localparam logic [UADDR_W-1:0] UA_INDIRECT = 8'd7;
  localparam logic [UADDR_W-1:0] UA_LDA      = 8'd15;
  localparam logic [UADDR_W-1:0] UA_ADDA     = 8'd18;
  localparam logic [UADDR_W-1:0] UA_SUBA     = 8'd21;
  localparam logic [UADDR_W-1:0] UA_CMPA     = 8'd24;
  localparam logic [UADDR_W-1:0] UA_ANDA     = 8'd26;
  localparam logic [UADDR_W-1:0] UA_ORA      = 8'd29;
  localparam logic [UADDR_W-1:0] UA_ASLA     = 8'd32;
  localparam logic [UADDR_W-1:0] UA_ASRA     = 8'd34;
  localparam logic [UADDR_W-1:0] UA_NOTA     = 8'd36;
  localparam logic [UADDR_W-1:0] UA_STA      = 8'd38;
  localparam logic [UADDR_W-1:0] UA_BGT      = 8'd41;
  localparam logic [UADDR_W-1:0] UA_BLT      = 8'd43;
  localparam logic [UADDR_W-1:0] UA_BEQ      = 8'd45;
  localparam logic [UADDR_W-1:0] UA_BNE      = 8'd47;
  localparam logic [UADDR_W-1:0] UA_BGE      = 8'd49;
  localparam logic [UADDR_W-1:0] UA_BLE      = 8'd51;
  localparam logic [UADDR_W-1:0] UA_HALT     = 8'd53;
  localparam logic [UADDR_W-1:0] UA_NOP      = 8'd54;

  // Opcodes of the instruction set.
  localparam logic [7:0] OP_LDA_IMM  = 8'h01, OP_LDA_IND  = 8'h81, OP_STA_IND  = 8'h82;
  localparam logic [7:0] OP_ADDA_IMM = 8'h03, OP_ADDA_IND = 8'h83;
  localparam logic [7:0] OP_SUBA_IMM = 8'h04, OP_SUBA_IND = 8'h84;
  localparam logic [7:0] OP_ASLA     = 8'h05, OP_ASRA     = 8'h20;
  localparam logic [7:0] OP_CMPA_IMM = 8'h06, OP_CMPA_IND = 8'h86;
  localparam logic [7:0] OP_ANDA_IMM = 8'h07, OP_ANDA_IND = 8'h87;
  localparam logic [7:0] OP_ORA_IMM  = 8'h08, OP_ORA_IND  = 8'h88;
  localparam logic [7:0] OP_NOTA     = 8'h09;
  localparam logic [7:0] OP_BGT = 8'h8A, OP_BLT = 8'h8B, OP_BEQ = 8'h8C;
  localparam logic [7:0] OP_BNE = 8'h8D, OP_BGE = 8'h8E, OP_BLE = 8'h8F;
  localparam logic [7:0] OP_HALT     = 8'h10;

  // 74181 control settings {Cn, M, S3, S2, S1, S0} used by the micro-program.
  localparam logic [5:0] ALU_PASS_B = 6'b0_1_1010; // F = B, C cleared (Cn = 0 in logic mode)
  localparam logic [5:0] ALU_ADD    = 6'b1_0_1001; // F = A plus B
  localparam logic [5:0] ALU_SUB    = 6'b0_0_0110; // F = A minus B
  localparam logic [5:0] ALU_AND    = 6'b1_1_1011; // F = A and B
  localparam logic [5:0] ALU_OR     = 6'b1_1_1110; // F = A or B
  localparam logic [5:0] ALU_SHL    = 6'b1_0_1100; // F = A plus A
  localparam logic [5:0] ALU_SHR    = 6'b0_1_0000; // F = A shifted right (extension, see alu181)
  localparam logic [5:0] ALU_NOT    = 6'b1_1_0000; // F = not A
  localparam logic [5:0] ALU_PASS_A = 6'b1_1_1111; // F = A

endpackage
