// data_unit: the Data Processing Unit of the IERE-4BE.
//
// Registers A (accumulator), TR (second ALU operand), R (ALU result), CC (C and Z flags),
// IR (IRH, IRL), MAR (MARH, MARM, MARL), ADLA (address latch driving the address bus),
// DRIN and DROUT (data in/out) and the PC, around the 4-bit ALU. Most of them meet on a
// 4-bit internal bus: a transfer R1 <- R2 enables R2 onto the bus and strobes R1. The
// bus sources are R, DRIN and A; its sinks are A, TR, IRH, IRL, MARL/M/H and DROUT.
// A 12-bit address path feeds ADLA from either the PC or the MAR, and the PC loads
// from the MAR. The ALU always sees A and TR; R and CC latch its result and flags.
//
// Timing (strobes from clock_gen, all on the master clock):
//   at the fall of phi1: ADLA loads, the PC increments;
//   at the fall of phi2: DRIN samples the external data bus, and every bus or ALU
//   destination (A, TR, IR, MAR, DROUT, R, CC, PC load) is written.
// So within one micro-cycle ADLA <- PC followed by DRIN <- (M) reads the new address.
// The register set, bus structure and widths follow the published block diagram; the
// exact strobe edges are this design's reading of the fetch timing diagram.
//
// The external data bus is split into data_in, data_out and data_oe (DROUT enable)
// instead of a tri-state port. The internal bus reads 1111 when nothing drives it
// (pulled up); the source enables must be one-hot or idle, which is asserted.
module data_unit
  import iere4be_pkg::*;
(
  input  logic              clk,
  input  logic              rst,       // synchronous, active high: clears all registers
  input  logic              phi1_fall,
  input  logic              phi2_fall,
  input  du_ctrl_t          ctrl,
  input  logic [DATA_W-1:0] data_in,   // external data bus, read side
  output logic [DATA_W-1:0] data_out,  // external data bus, DROUT
  output logic              data_oe,   // DROUT drives the external data bus
  output logic [ADDR_W-1:0] addr,      // external address bus, from ADLA
  output logic [7:0]        ir,        // {IRH, IRL}, status to the Control Unit
  output logic              cc_c,      // status to the Control Unit
  output logic              cc_z,
  output logic [DATA_W-1:0] a_q,       // visible registers, for observation
  output logic [ADDR_W-1:0] pc_q
);
  logic [3:0]  a_r, tr_r, r_r, irh_r, irl_r, marl_r, marm_r, marh_r, drin_r, drout_r;
  logic [11:0] adla_r, mar, addr_path;
  logic [3:0]  bus;
  logic [3:0]  alu_f;
  logic        alu_c, alu_z;
  logic        c_r, z_r;

  assign mar = {marh_r, marm_r, marl_r};

  // Internal 4-bit bus: one source at a time.
  always_comb begin
    unique case (1'b1)
      ctrl.en_r:    bus = r_r;
      ctrl.en_drin: bus = drin_r;
      ctrl.en_a:    bus = a_r;
      default:      bus = 4'hF;
    endcase
  end

  // 12-bit address path into ADLA.
  always_comb begin
    if (ctrl.en_mar)     addr_path = mar;
    else if (ctrl.en_pc) addr_path = pc_q;
    else                 addr_path = 12'hFFF;
  end

  alu181 u_alu (
    .a(a_r), .b(tr_r), .s(ctrl.alu_s), .m(ctrl.alu_m), .cn(ctrl.alu_cn), .c_prev(c_r),
    .f(alu_f), .c_flag(alu_c), .z_flag(alu_z)
  );

  program_counter #(.W(ADDR_W)) u_pc (
    .clk(clk), .rst(rst),
    .load(phi2_fall && ctrl.ld_pc),
    .inc(phi1_fall && ctrl.pc_inc),
    .d(mar), .q(pc_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      adla_r <= '0;
    end else if (phi1_fall && ctrl.ld_adla) begin
      adla_r <= addr_path;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_r <= '0; tr_r <= '0; r_r <= '0; irh_r <= '0; irl_r <= '0;
      marl_r <= '0; marm_r <= '0; marh_r <= '0; drin_r <= '0; drout_r <= '0;
      c_r <= 1'b0; z_r <= 1'b0;
    end else if (phi2_fall) begin
      if (ctrl.ld_drin)  drin_r  <= data_in;
      if (ctrl.ld_a)     a_r     <= bus;
      if (ctrl.ld_tr)    tr_r    <= bus;
      if (ctrl.ld_irh)   irh_r   <= bus;
      if (ctrl.ld_irl)   irl_r   <= bus;
      if (ctrl.ld_marl)  marl_r  <= bus;
      if (ctrl.ld_marm)  marm_r  <= bus;
      if (ctrl.ld_marh)  marh_r  <= bus;
      if (ctrl.ld_drout) drout_r <= bus;
      if (ctrl.ld_r)     r_r     <= alu_f;
      if (ctrl.ld_cc) begin
        c_r <= alu_c;
        z_r <= alu_z;
      end
    end
  end

  assign addr     = adla_r;
  assign data_out = drout_r;
  assign data_oe  = ctrl.en_drout;
  assign ir       = {irh_r, irl_r};
  assign cc_c     = c_r;
  assign cc_z     = z_r;
  assign a_q      = a_r;

  // Tri-state rules of the 74LS173 bus: never two drivers at once.
  a_one_bus_source : assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.en_r, ctrl.en_drin, ctrl.en_a}));
  a_one_addr_source : assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.en_mar, ctrl.en_pc}));
endmodule
