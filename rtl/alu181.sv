// alu181: the 4-bit ALU of the IERE-4BE Data Unit.
//
// It reproduces the function table of the 74181 ALU (six control lines: M, S3..S0 and
// the active-low carry input Cn, active-high data). Per bit, X = A | S0&B | S1&~B and
// Y = S3&A&B | S2&A&~B; in arithmetic mode (M = 0) F = X plus Y plus (not Cn), in logic
// mode (M = 1) F = not (X xor Y). This yields the 16 logic and 32 arithmetic functions
// of the part.
//
// Flags for the CC register (two bits, as the block diagram shows):
//  * Z is 1 when F is zero.
//  * C in arithmetic mode is the carry out XOR the carry in: the carry of an addition
//    (Cn = 1) and the borrow of a subtraction (Cn = 0), so that A < B sets C after a
//    compare, which is what the branch conditions expect.
//  * C in logic mode is left unchanged (c_prev) when Cn = 1, so AND, OR and NOT leave it
//    alone as the instruction set says; with Cn = 0 it is cleared (used by LDA).
// The 74181 cannot shift right, yet the instruction set has ASRA. This design uses the
// logic-mode code M = 1, Cn = 0, S = 0000 (a duplicate of "not A" in the real part,
// where Cn is ignored in logic mode) for an arithmetic shift right: F = {A3, A3..A1},
// C = A0. The flag rules and this extension are this design's own choices.
// Purely combinational.
module alu181 (
  input  logic [3:0] a,      // from register A
  input  logic [3:0] b,      // from register TR
  input  logic [3:0] s,      // {S3, S2, S1, S0}
  input  logic       m,      // 1 = logic, 0 = arithmetic
  input  logic       cn,     // carry in, active low
  input  logic       c_prev, // current C flag
  output logic [3:0] f,      // result, to register R
  output logic       c_flag, // next C flag
  output logic       z_flag  // next Z flag
);
  logic [3:0] x, y;
  logic [4:0] sum;
  logic       cin;

  always_comb begin
    cin = ~cn;
    x   = a | ({4{s[0]}} & b) | ({4{s[1]}} & ~b);
    y   = ({4{s[3]}} & a & b) | ({4{s[2]}} & a & ~b);
    sum = {1'b0, x} + {1'b0, y} + {4'b0, cin};
    if (!m) begin
      f      = sum[3:0];
      c_flag = sum[4] ^ cin;
    end else if (!cn && s == 4'b0000) begin
      f      = {a[3], a[3:1]};
      c_flag = a[0];
    end else begin
      f      = ~(x ^ y);
      c_flag = cn ? c_prev : 1'b0;
    end
    z_flag = (f == 4'b0000);
  end
endmodule
