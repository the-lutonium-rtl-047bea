// alu: 8-bit arithmetic/logic unit of the 8051 core.
//
// Combinational. Add, add with carry and subtract with borrow produce the
// carry (C), the carry out of bit 3 (AC, for decimal adjust) and the signed
// overflow (OV), exactly as an 8051 does: OV is the carry into bit 7 xor the
// carry out of bit 7. Logic operations, increment/decrement, the four
// rotates, complement and nibble swap leave the flags alone, except that
// RLC/RRC rotate through C. wr_c/wr_ac/wr_ov tell which flags the operation
// writes. The rotate operations (a separate Rotate unit in the original
// decomposition) are folded into this unit here.
module alu
  import lut_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,       // accumulator operand
  input  logic [7:0] b,       // second operand (bus, immediate or register)
  input  logic       cy_in,   // PSW.C
  output logic [7:0] y,
  output logic       cy, ac, ov,
  output logic       wr_c, wr_ac, wr_ov
);
  logic [8:0] s9;
  logic [4:0] s5;
  logic [7:0] s8;
  logic       cin;

  always_comb begin
    y = a; cy = cy_in; ac = 1'b0; ov = 1'b0;
    wr_c = 1'b0; wr_ac = 1'b0; wr_ov = 1'b0;
    cin = (op == ALU_ADDC || op == ALU_SUBB) ? cy_in : 1'b0;
    s9 = '0; s5 = '0; s8 = '0;
    case (op)
      ALU_ADD, ALU_ADDC: begin
        s9 = {1'b0, a} + {1'b0, b} + 9'(cin);
        s5 = {1'b0, a[3:0]} + {1'b0, b[3:0]} + 5'(cin);
        s8 = {1'b0, a[6:0]} + {1'b0, b[6:0]} + 8'(cin);
        y = s9[7:0]; cy = s9[8]; ac = s5[4]; ov = s8[7] ^ s9[8];
        wr_c = 1'b1; wr_ac = 1'b1; wr_ov = 1'b1;
      end
      ALU_SUBB: begin
        s9 = {1'b0, a} - {1'b0, b} - 9'(cin);
        s5 = {1'b0, a[3:0]} - {1'b0, b[3:0]} - 5'(cin);
        s8 = {1'b0, a[6:0]} - {1'b0, b[6:0]} - 8'(cin);
        y = s9[7:0]; cy = s9[8]; ac = s5[4]; ov = s8[7] ^ s9[8];
        wr_c = 1'b1; wr_ac = 1'b1; wr_ov = 1'b1;
      end
      ALU_ANL:  y = a & b;
      ALU_ORL:  y = a | b;
      ALU_XRL:  y = a ^ b;
      ALU_INC:  y = b + 8'd1;
      ALU_DEC:  y = b - 8'd1;
      ALU_RL:   y = {a[6:0], a[7]};
      ALU_RR:   y = {a[0], a[7:1]};
      ALU_RLC:  begin y = {a[6:0], cy_in}; cy = a[7]; wr_c = 1'b1; end
      ALU_RRC:  begin y = {cy_in, a[7:1]}; cy = a[0]; wr_c = 1'b1; end
      ALU_CPL:  y = ~a;
      ALU_SWAP: y = {a[3:0], a[7:4]};
      ALU_PASS: y = b;
      default:  y = a;
    endcase
  end
endmodule
