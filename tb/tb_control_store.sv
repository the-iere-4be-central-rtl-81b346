// tb_control_store: reads all 256 words of the micro-program ROM.
//
// The fetch words are compared with the bit patterns of the published fetch table
// (FB7FDC: ADLA <- PC, DRIN <- (M); 07FFEC: IRH <- DRIN, PC+1; 03FFEC: IRL <- DRIN, PC+1;
// FFFFF4: end of fetch). Every other word is compared with an expected word assembled
// here field by field: groups A, B, C, the ALU code {Cn, M, S3..S0} placed at bits 14..9
// as Cn, M, S0, S1, S2, S3, and the nine single-bit controls
// {/CCL, /RL, /REN, /ADLAL, /DRINEN, /EO1, /EO2, EOE, R/W}.
`timescale 1ns/1ps
module tb_control_store;
  import iere4be_pkg::*;
  logic [7:0] addr;
  uword_t     uw;
  int checks = 0, failures = 0;

  control_store dut (.*);

  localparam logic [5:0] I = 6'b111111;
  localparam logic [8:0] NOP = 9'b111111100, END = 9'b111111110;

  function automatic logic [23:0] mk(input int a, input int b, input int c,
                                     input logic [5:0] alu, input logic [8:0] low);
    return {3'(a), 3'(b), 3'(c), alu[5], alu[4], alu[0], alu[1], alu[2], alu[3], low};
  endfunction

  function automatic logic [23:0] expect_word(input int ad);
    logic [23:0] rd_pc = mk(7, 6, 6, I, 9'b111011100);
    logic [8:0]  drin_en = 9'b111101100, ld_rcc = 9'b001111100, a_end = 9'b110111110;
    case (ad)
      0, 2, 5, 7, 9, 11: return rd_pc;
      1:  return mk(0, 1, 7, I, drin_en);
      3:  return mk(0, 0, 7, I, drin_en);
      4:  return mk(7, 7, 7, I, 9'b111110100);
      6:  return mk(0, 7, 7, I, 9'b111110000);
      8:  return mk(0, 2, 7, I, drin_en);
      10: return mk(0, 3, 7, I, drin_en);
      12: return mk(0, 4, 7, I, drin_en);
      13: return mk(7, 5, 7, I, 9'b111011100);
      14: return mk(7, 6, 7, I, 9'b111110000);
      15, 18, 21, 24, 26, 29: return mk(7, 7, 1, I, drin_en);
      17, 20, 23, 28, 31, 33, 35, 37: return mk(7, 7, 0, I, a_end);
      16: return mk(7, 7, 7, 6'b011010, ld_rcc);
      19: return mk(7, 7, 7, 6'b101001, ld_rcc);
      22: return mk(7, 7, 7, 6'b000110, ld_rcc);
      25: return mk(7, 7, 7, 6'b000110, 9'b011111110);
      27: return mk(7, 7, 7, 6'b111011, ld_rcc);
      30: return mk(7, 7, 7, 6'b111110, ld_rcc);
      32: return mk(7, 7, 7, 6'b101100, ld_rcc);
      34: return mk(7, 7, 7, 6'b010000, ld_rcc);
      36: return mk(7, 7, 7, 6'b110000, ld_rcc);
      38: return mk(7, 7, 7, 6'b111111, 9'b101111100);
      39: return mk(7, 7, 2, I, 9'b110111100);
      40: return mk(7, 7, 5, I, 9'b111111111);
      41: return mk(1, 7, 7, I, NOP);
      43: return mk(2, 7, 7, I, NOP);
      45: return mk(3, 7, 7, I, NOP);
      47: return mk(4, 7, 7, I, NOP);
      49: return mk(5, 7, 7, I, NOP);
      51: return mk(6, 7, 7, I, NOP);
      42, 44, 46, 48, 50, 52: return mk(7, 7, 3, I, END);
      53: return mk(7, 7, 7, I, 9'b111110100);
      default: return mk(7, 7, 7, I, END);
    endcase
  endfunction

  task automatic expect_hex(input int ad, input logic [23:0] v);
    addr = 8'(ad); #1;
    checks++;
    if (uw != v) begin
      failures++;
      $display("FAIL word %0d = %h, fetch table gives %h", ad, uw, v);
    end
  endtask

  initial begin
    expect_hex(0, 24'hFB7FDC);
    expect_hex(1, 24'h07FFEC);
    expect_hex(2, 24'hFB7FDC);
    expect_hex(3, 24'h03FFEC);
    expect_hex(4, 24'hFFFFF4);
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      checks++;
      if (uw != expect_word(i)) begin
        failures++;
        if (failures < 20) $display("FAIL word %0d = %h expected %h", i, uw, expect_word(i));
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
