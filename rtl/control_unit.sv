// control_unit: the micro-programmed Control Unit of the IERE-4BE.
//
// Two-level vectoring through a control store:
//   CBR  (Control Buffer Register) holds the address of the current micro-instruction and
//        addresses the control store; it copies the CAR when phi1 rises.
//   CAR  (Control Address Register, an 8-bit counter) forms the next address and is
//        written when phi2 falls: it counts up, loads a vector from the CSVT (/EO1), or
//        is cleared (EOE, a branch whose condition fails, or reset).
//   VTPR (Vector Table Pointer Register) takes IR0-6 on /EO2 and, with IR7, addresses the
//        CSVT. It is cleared together with the CAR at the end of every instruction.
// Clearing the CAR points at address 0, the start of the opcode fetch. Because the CBR
// holds the running address while the CAR is rewritten, the control store output stays
// stable during a whole micro-cycle.
//
// Inputs are the eight IR bits and the two CC flags (the DU status); the outputs are the
// decoded Data Unit controls. VTPR is written at the fall of phi1, before the CAR is
// written at the fall of phi2, so one micro-instruction can carry both /EO2 and /EO1 and
// jump straight to the opcode's execute sequence; this edge, and the reset behaviour
// (a synchronous reset clearing CAR, CBR and VTPR), are this design's choices.
module control_unit
  import iere4be_pkg::*;
(
  input  logic               clk,
  input  logic               rst,        // reset logic: clears CAR, CBR and VTPR
  input  logic               phi1_fall,
  input  logic               phi2_fall,
  input  logic               phi1_rise,
  input  logic [7:0]         ir,
  input  logic               cc_c,
  input  logic               cc_z,
  output du_ctrl_t           ctrl,
  output logic [UADDR_W-1:0] upc,        // CBR, current micro-instruction address
  output logic               br_eval,    // a branch word is executing (this micro-cycle)
  output logic               br_taken    // ... and its condition holds
);
  logic [UADDR_W-1:0] car, cbr, vector;
  logic [6:0]         vtpr;
  uword_t             uw;
  logic               is_branch, taken, clear_car;

  control_store u_cs (.addr(cbr), .uw(uw));
  csvt u_csvt (.addr({ir[7], vtpr}), .vector(vector));
  micro_decoder u_dec (.uw(uw), .ctrl(ctrl));
  branch_logic u_br (.code(uw.grp_a), .c(cc_c), .z(cc_z), .is_branch(is_branch), .taken(taken));

  // Conditional logic.
  assign clear_car = uw.eoe || (is_branch && !taken);

  always_ff @(posedge clk) begin
    if (rst) begin
      car  <= '0;
      vtpr <= '0;
    end else begin
      if (phi1_fall && !uw.eo2_n) vtpr <= ir[6:0];
      if (phi2_fall) begin
        if (clear_car) begin
          car  <= '0;
          vtpr <= '0;
        end else if (!uw.eo1_n) begin
          car <= vector;
        end else begin
          car <= car + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)            cbr <= '0;
    else if (phi1_rise) cbr <= car;
  end

  assign upc      = cbr;
  assign br_eval  = is_branch;
  assign br_taken = is_branch && taken;
endmodule
