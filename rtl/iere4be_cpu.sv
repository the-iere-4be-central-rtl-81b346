// iere4be_cpu: top level of the IERE-4BE, a 4-bit micro-programmed CPU with a 12-bit
// address bus (4K x 4 memory), 18 opcodes in three addressing modes (inherent, immediate,
// indirect) and a two-level structure: a Data Unit of registers on a 4-bit internal bus
// around a 74181-style ALU, steered by a Control Unit that reads the IR and CC flags and
// steps through a micro-program.
//
// External interface: addr (from the address latch), data_in / data_out / data_oe (the
// 4-bit data bus, split into its two directions), rw (1 = write, valid with data_oe
// during the phi2 pulse; memory should latch on the fall of phi2), and the two clock
// phases phi1 / phi2. Everything runs on the master clock `clk`, four master periods per
// micro-cycle. rst is synchronous and active high; after it the CPU fetches from 000.
// The dbg_* outputs expose the visible registers and the micro-program address.
module iere4be_cpu
  import iere4be_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  output logic [ADDR_W-1:0]  addr,
  input  logic [DATA_W-1:0]  data_in,
  output logic [DATA_W-1:0]  data_out,
  output logic               data_oe,
  output logic               rw,
  output logic               phi1,
  output logic               phi2,
  output logic [DATA_W-1:0]  dbg_a,
  output logic [ADDR_W-1:0]  dbg_pc,
  output logic [1:0]         dbg_cc,    // {C, Z}
  output logic [7:0]         dbg_ir,
  output logic [UADDR_W-1:0] dbg_upc,
  output logic               dbg_br_eval,
  output logic               dbg_br_taken
);
  logic     phi1_fall, phi2_fall, phi1_rise;
  du_ctrl_t ctrl;
  logic [7:0] ir;
  logic     cc_c, cc_z;

  clock_gen u_clk (
    .clk(clk), .rst(rst), .phi1(phi1), .phi2(phi2),
    .phi1_fall(phi1_fall), .phi2_fall(phi2_fall), .phi1_rise(phi1_rise)
  );

  control_unit u_cu (
    .clk(clk), .rst(rst), .phi1_fall(phi1_fall), .phi2_fall(phi2_fall),
    .phi1_rise(phi1_rise), .ir(ir), .cc_c(cc_c), .cc_z(cc_z), .ctrl(ctrl),
    .upc(dbg_upc), .br_eval(dbg_br_eval), .br_taken(dbg_br_taken)
  );

  data_unit u_du (
    .clk(clk), .rst(rst), .phi1_fall(phi1_fall), .phi2_fall(phi2_fall), .ctrl(ctrl),
    .data_in(data_in), .data_out(data_out), .data_oe(data_oe), .addr(addr),
    .ir(ir), .cc_c(cc_c), .cc_z(cc_z), .a_q(dbg_a), .pc_q(dbg_pc)
  );

  assign rw     = ctrl.rw;
  assign dbg_cc = {cc_c, cc_z};
  assign dbg_ir = ir;
endmodule
