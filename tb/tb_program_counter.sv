// tb_program_counter: random load / increment sequences against a model, including
// the wrap from FFF to 000, load priority over increment and synchronous reset.
`timescale 1ns/1ps
module tb_program_counter;
  logic clk = 0, rst = 1, load = 0, inc = 0;
  logic [11:0] d = 0, q, model;
  int checks = 0, failures = 0, cyc = 0;

  program_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk); rst = 0;
    model = 0;
    checks++; if (q != 0) failures++;
    // walk across the wrap
    load = 1; d = 12'hFFD; @(negedge clk); load = 0; model = 12'hFFD;
    inc = 1; repeat (5) begin @(negedge clk); model++; checks++; if (q != model) failures++; end
    inc = 0;
    checks++; if (q != 12'h002) failures++;
    for (int i = 0; i < 2000; i++) begin
      load = ($urandom_range(0, 3) == 0);
      inc  = 1'($urandom_range(0, 1));
      d    = 12'($urandom);
      @(negedge clk);
      if (load) model = d; else if (inc) model++;
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h expected %h", q, model);
      end
    end
    rst = 1; @(negedge clk); rst = 0;
    checks++; if (q != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
