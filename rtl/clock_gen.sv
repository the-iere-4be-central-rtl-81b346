// clock_gen: two-phase non-overlapping clock for the IERE-4BE.
//
// The CPU is sequenced by two non-overlapping clocks, phi1 and phi2. Here they are
// derived from one free-running master clock `clk`: a micro-cycle is four master
// periods (phase 0: phi1 high, 1: both low, 2: phi2 high, 3: both low), so the
// two phases never overlap. Registers inside the CPU are all clocked by `clk` and use
// one-period strobes marking the edges of phi1 and phi2 instead of the phase clocks
// themselves:
//   phi1_fall - the master edge that ends phase 0 (phi1 falls)
//   phi2_fall - the master edge that ends phase 2 (phi2 falls)
//   phi1_rise - the master edge that ends phase 3 (phi1 rises, next micro-cycle)
// phi1/phi2 are also brought out as the CPU's clock pins. The four-period division and
// the single-clock style with strobes are this design's choices.
module clock_gen (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high; restarts at phase 0
  output logic       phi1,
  output logic       phi2,
  output logic       phi1_fall,
  output logic       phi2_fall,
  output logic       phi1_rise
);
  logic [1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  end

  always_comb begin
    phi1      = (phase == 2'd0);
    phi2      = (phase == 2'd2);
    phi1_fall = (phase == 2'd0);
    phi2_fall = (phase == 2'd2);
    phi1_rise = (phase == 2'd3);
  end
endmodule
