// tb_alu: random operands for every ALU operation, compared with results
// computed here from the 8051 definitions (flags from wide arithmetic).
module tb_alu;
  import lut_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [7:0] a, b, y;
  logic cy_in, cy, ac, ov, wc, wac, wov;
  alu dut (.op, .a, .b, .cy_in, .y, .cy, .ac, .ov, .wr_c(wc), .wr_ac(wac), .wr_ov(wov));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int sa, sb, r, ey, ec, eac, eov, c;
      a = 8'($urandom); b = 8'($urandom); cy_in = 1'($urandom);
      op = alu_op_e'($urandom_range(0, 14));
      #1;
      c = (op == ALU_ADDC || op == ALU_SUBB) ? int'(cy_in) : 0;
      sa = int'($signed(a)); sb = int'($signed(b));
      ec = int'(cy_in); eac = 0; eov = 0;
      case (op)
        ALU_ADD, ALU_ADDC: begin
          r = int'(a) + int'(b) + c; ey = r & 255; ec = r > 255 ? 1 : 0;
          eac = (int'(a % 16) + int'(b % 16) + c) > 15 ? 1 : 0;
          eov = (sa + sb + c > 127 || sa + sb + c < -128) ? 1 : 0;
        end
        ALU_SUBB: begin
          r = int'(a) - int'(b) - c; ey = r & 255; ec = r < 0 ? 1 : 0;
          eac = (int'(a % 16) - int'(b % 16) - c) < 0 ? 1 : 0;
          eov = (sa - sb - c > 127 || sa - sb - c < -128) ? 1 : 0;
        end
        ALU_ANL:  ey = int'(a & b);
        ALU_ORL:  ey = int'(a | b);
        ALU_XRL:  ey = int'(a ^ b);
        ALU_INC:  ey = (int'(b) + 1) & 255;
        ALU_DEC:  ey = (int'(b) + 255) & 255;
        ALU_RL:   ey = ((int'(a) * 2) & 255) + int'(a) / 128;
        ALU_RR:   ey = int'(a) / 2 + (int'(a) % 2) * 128;
        ALU_RLC:  begin ey = ((int'(a) * 2) & 255) + int'(cy_in); ec = int'(a) / 128; end
        ALU_RRC:  begin ey = int'(a) / 2 + int'(cy_in) * 128; ec = int'(a) % 2; end
        ALU_CPL:  ey = 255 - int'(a);
        ALU_SWAP: ey = (int'(a) % 16) * 16 + int'(a) / 16;
        default:  ey = int'(b);
      endcase
      checks++;
      if (int'(y) != ey || int'(cy) != ec) begin
        failures++; $display("FAIL op %s a=%h b=%h c=%b: y=%h cy=%b want %h %0d", op.name(), a, b, cy_in, y, cy, ey, ec);
      end
      if (op inside {ALU_ADD, ALU_ADDC, ALU_SUBB}) begin
        checks++;
        if (int'(ac) != eac || int'(ov) != eov || !wc || !wac || !wov) begin
          failures++; $display("FAIL flags op %s a=%h b=%h", op.name(), a, b);
        end
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
