// tb_csvt: every vector-table address. 0x00 and 0x80 must give the direct and indirect
// operand fetch; each opcode of the instruction set its execute sequence; every other
// address the end-of-instruction word. Expected addresses are the micro-program layout.
`timescale 1ns/1ps
module tb_csvt;
  import iere4be_pkg::*;
  logic [7:0] addr, vector;
  int checks = 0, failures = 0;

  csvt dut (.*);

  function automatic logic [7:0] expect_vec(input logic [7:0] a);
    case (a)
      8'h00: return 8'd5;
      8'h80: return 8'd7;
      8'h01, 8'h81: return 8'd15;
      8'h82: return 8'd38;
      8'h03, 8'h83: return 8'd18;
      8'h04, 8'h84: return 8'd21;
      8'h05: return 8'd32;
      8'h20: return 8'd34;
      8'h06, 8'h86: return 8'd24;
      8'h07, 8'h87: return 8'd26;
      8'h08, 8'h88: return 8'd29;
      8'h09: return 8'd36;
      8'h8A: return 8'd41;
      8'h8B: return 8'd43;
      8'h8C: return 8'd45;
      8'h8D: return 8'd47;
      8'h8E: return 8'd49;
      8'h8F: return 8'd51;
      8'h10: return 8'd53;
      default: return 8'd54;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      checks++;
      if (vector != expect_vec(addr)) begin
        failures++;
        $display("FAIL csvt[%h]=%0d expected %0d", addr, vector, expect_vec(addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
