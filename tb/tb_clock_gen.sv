// tb_clock_gen: checks the two-phase clock. After reset phi1 must be high for one
// master period, then both low, then phi2 high, then both low, repeating every four
// periods; the phases never overlap and each edge strobe is high exactly in the period
// that ends with its edge. A counter of complete micro-cycles checks the rate.
`timescale 1ns/1ps
module tb_clock_gen;
  logic clk = 0, rst = 1;
  logic phi1, phi2, phi1_fall, phi2_fall, phi1_rise;
  int checks = 0, failures = 0;

  clock_gen dut (.*);
  always #5 clk = ~clk;

  // phi1, phi2, phi1_fall, phi2_fall, phi1_rise in each of the four periods
  localparam logic [4:0] EXP [4] = '{5'b10100, 5'b00000, 5'b01010, 5'b00001};

  initial begin
    int rises;
    repeat (2) @(negedge clk);
    rst = 0;
    rises = 0;
    for (int i = 0; i < 400; i++) begin
      checks++;
      if ({phi1, phi2, phi1_fall, phi2_fall, phi1_rise} != EXP[i % 4]) begin
        failures++;
        if (failures < 10) $display("FAIL period %0d: %b", i,
                                    {phi1, phi2, phi1_fall, phi2_fall, phi1_rise});
      end
      checks++;
      if (phi1 && phi2) failures++;
      if (phi1_rise) rises++;
      @(negedge clk);
    end
    checks++;
    if (rises != 100) failures++;
    // reset restarts at phi1
    rst = 1; @(negedge clk); rst = 0;
    checks++; if (!phi1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
