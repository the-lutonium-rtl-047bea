// branch_unit: BranchUnit, next PC of every branch-type instruction.
//
// Combinational. Fetch stops after each instruction that can change the
// PC and waits for this unit's answer, taken or not (there is no
// prediction). Covers the 8051 jumps: AJMP/ACALL (11-bit page address),
// LJMP/LCALL, SJMP, JZ/JNZ, JC/JNC, JB/JNB/JBC, CJNE, DJNZ, JMP @A+DPTR and
// RET/RETI (address popped by the core). The condition inputs come from the
// units that own them (A, PSW.C, BitUnit, the compare or the decremented
// value). The instruction semantics are the 8051's; the unit's insides are
// this design's, since the original only names it.
module branch_unit (
  input  logic [7:0]  op,
  input  logic [7:0]  b1,         // second instruction byte
  input  logic [7:0]  b2,         // third instruction byte
  input  logic [15:0] npc,        // address of the next instruction
  input  logic [7:0]  acc,
  input  logic        cy,
  input  logic        bit_val,    // tested bit (JB/JNB/JBC)
  input  logic [7:0]  cmp_a,      // CJNE operands
  input  logic [7:0]  cmp_b,
  input  logic [7:0]  dec_val,    // DJNZ: value after the decrement
  input  logic [15:0] dptr,
  input  logic [15:0] ret_pc,     // RET/RETI: popped address
  output logic [15:0] target,
  output logic        taken
);
  logic [15:0] rel1, rel2;
  assign rel1 = npc + {{8{b1[7]}}, b1};
  assign rel2 = npc + {{8{b2[7]}}, b2};

  always_comb begin
    taken  = 1'b0;
    target = rel1;
    if (op[3:0] == 4'h1) begin
      taken = 1'b1; target = {npc[15:11], op[7:5], b1};
    end else if (op[3] && op[7:4] == 4'hB) begin       // CJNE Rn,#,rel
      taken = cmp_a != cmp_b; target = rel2;
    end else if (op[3] && op[7:4] == 4'hD) begin       // DJNZ Rn,rel
      taken = dec_val != 8'h00; target = rel1;
    end else begin
      case (op)
        8'h02, 8'h12: begin taken = 1'b1; target = {b1, b2}; end
        8'h22, 8'h32: begin taken = 1'b1; target = ret_pc; end
        8'h80:        taken = 1'b1;
        8'h60:        taken = acc == 8'h00;
        8'h70:        taken = acc != 8'h00;
        8'h40:        taken = cy;
        8'h50:        taken = !cy;
        8'h10, 8'h20: begin taken = bit_val;  target = rel2; end
        8'h30:        begin taken = !bit_val; target = rel2; end
        8'h73:        begin taken = 1'b1; target = dptr + 16'(acc); end
        8'hB4, 8'hB5, 8'hB6, 8'hB7: begin taken = cmp_a != cmp_b; target = rel2; end
        8'hD5:        begin taken = dec_val != 8'h00; target = rel2; end
        default:      taken = 1'b0;
      endcase
    end
    if (!taken) target = npc;
  end
endmodule
