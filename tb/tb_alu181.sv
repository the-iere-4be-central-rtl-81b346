// tb_alu181: exhaustive test of the ALU against the 74181 function table.
//
// All 2^4 x 2^4 operand pairs, 16 select codes, both modes, both carry inputs and both
// values of the old C flag are applied. The expected result is written out from the
// 74181 data-sheet table (active-high data), one formula per select code; the flag
// rules (Z on zero result, C = carry of an addition or borrow of a subtraction in
// arithmetic mode, unchanged or cleared in logic mode) and the shift-right extension
// on M=1, Cn=0, S=0000 are checked as documented in the module.
`timescale 1ns/1ps
module tb_alu181;
  logic [3:0] a, b, s, f;
  logic       m, cn, c_prev, c_flag, z_flag;
  int checks = 0, failures = 0;

  alu181 dut (.*);

  // Arithmetic: returns the two terms that the 74181 adds (minus 1 written as + 1111).
  function automatic logic [4:0] arith(input logic [3:0] a, input logic [3:0] b,
                                       input logic [3:0] s, input logic cin);
    logic [3:0] t1, t2;
    case (s)
      4'b0000: begin t1 = a;        t2 = 4'h0; end
      4'b0001: begin t1 = a | b;    t2 = 4'h0; end
      4'b0010: begin t1 = a | ~b;   t2 = 4'h0; end
      4'b0011: begin t1 = 4'hF;     t2 = 4'h0; end
      4'b0100: begin t1 = a;        t2 = a & ~b; end
      4'b0101: begin t1 = a | b;    t2 = a & ~b; end
      4'b0110: begin t1 = a;        t2 = ~b; end
      4'b0111: begin t1 = a & ~b;   t2 = 4'hF; end
      4'b1000: begin t1 = a;        t2 = a & b; end
      4'b1001: begin t1 = a;        t2 = b; end
      4'b1010: begin t1 = a | ~b;   t2 = a & b; end
      4'b1011: begin t1 = a & b;    t2 = 4'hF; end
      4'b1100: begin t1 = a;        t2 = a; end
      4'b1101: begin t1 = a | b;    t2 = a; end
      4'b1110: begin t1 = a | ~b;   t2 = a; end
      default: begin t1 = a;        t2 = 4'hF; end
    endcase
    return {1'b0, t1} + {1'b0, t2} + 5'(cin);
  endfunction

  function automatic logic [3:0] logic_f(input logic [3:0] a, input logic [3:0] b,
                                         input logic [3:0] s);
    case (s)
      4'b0000: return ~a;
      4'b0001: return ~(a | b);
      4'b0010: return ~a & b;
      4'b0011: return 4'h0;
      4'b0100: return ~(a & b);
      4'b0101: return ~b;
      4'b0110: return a ^ b;
      4'b0111: return a & ~b;
      4'b1000: return ~a | b;
      4'b1001: return ~(a ^ b);
      4'b1010: return b;
      4'b1011: return a & b;
      4'b1100: return 4'hF;
      4'b1101: return a | ~b;
      4'b1110: return a | b;
      default: return a;
    endcase
  endfunction

  initial begin
    logic [4:0] sum;
    logic [3:0] ef;
    logic       ec;
    for (int im = 0; im < 2; im++)
    for (int icn = 0; icn < 2; icn++)
    for (int ic = 0; ic < 2; ic++)
    for (int is = 0; is < 16; is++)
    for (int ia = 0; ia < 16; ia++)
    for (int ib = 0; ib < 16; ib++) begin
      m = im[0]; cn = icn[0]; c_prev = ic[0]; s = is[3:0]; a = ia[3:0]; b = ib[3:0];
      #1;
      if (!m) begin
        sum = arith(a, b, s, ~cn);
        ef  = sum[3:0];
        ec  = sum[4] ^ ~cn;
      end else if (!cn && s == 0) begin
        ef = {a[3], a[3:1]};
        ec = a[0];
      end else begin
        ef = logic_f(a, b, s);
        ec = cn ? c_prev : 1'b0;
      end
      checks++;
      if (f !== ef || c_flag !== ec || z_flag !== (ef == 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL m=%b cn=%b s=%b a=%h b=%h: f=%h c=%b z=%b, expected f=%h c=%b",
                   m, cn, s, a, b, f, c_flag, z_flag, ef, ec);
      end
    end
    // Spot checks of the operations the instruction set uses.
    m = 0; cn = 1; s = 4'b1001; a = 4'h9; b = 4'h8; #1;
    checks++; if (f != 4'h1 || !c_flag) failures++;           // 9 + 8 = 0x11
    m = 0; cn = 0; s = 4'b0110; a = 4'h3; b = 4'h5; #1;
    checks++; if (f != 4'hE || !c_flag) failures++;           // 3 - 5 borrows
    m = 0; cn = 0; s = 4'b0110; a = 4'h5; b = 4'h5; #1;
    checks++; if (f != 4'h0 || c_flag || !z_flag) failures++; // equal
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
