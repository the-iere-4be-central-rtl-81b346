// program_counter: the 12-bit programme counter (PC) of the IERE-4BE.
//
// Two controls, as described for the part: `load` copies the Memory Address Register
// (used by taken branches) and `inc` adds one (a single control line). Both act on the
// rising edge of `clk` qualified by their strobes, so the caller gates them with the
// clock phase at which the transfer should happen. Load wins if both are set; the
// address wraps from FFF to 000. Reset clears the PC, so programs start at address 000
// (the reset address is this design's choice).
module program_counter #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,   // synchronous, active high
  input  logic         load,  // PC <- d
  input  logic         inc,   // PC <- PC + 1
  input  logic [W-1:0] d,     // from MAR
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
    else if (inc)  q <= q + 1'b1;
  end
endmodule
