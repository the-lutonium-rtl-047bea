// tb_branch_unit: next PC of each kind of 8051 branch, taken and not
// taken, against targets computed here.
module tb_branch_unit;
  int checks = 0, failures = 0;
  logic [7:0] op, b1, b2, acc, cmp_a, cmp_b, dec_val;
  logic [15:0] npc, dptr, ret_pc, target;
  logic cy, bit_val, taken;
  branch_unit dut (.*);

  task automatic t(input logic [7:0] o, input logic [15:0] want, input logic want_taken,
                   input string name);
    op = o; #1;
    checks++;
    if (target != want || taken != want_taken) begin
      failures++;
      $display("FAIL %s: target %h taken %b, want %h %b", name, target, taken, want, want_taken);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [15:0] r1, r2;
      b1 = 8'($urandom); b2 = 8'($urandom); npc = 16'($urandom); acc = 8'($urandom);
      cy = 1'($urandom); bit_val = 1'($urandom); cmp_a = 8'($urandom);
      cmp_b = (i % 3 == 0) ? cmp_a : 8'($urandom); dec_val = (i % 4 == 0) ? 8'd0 : 8'($urandom);
      dptr = 16'($urandom); ret_pc = 16'($urandom);
      r1 = 16'(int'(npc) + int'($signed(b1)));
      r2 = 16'(int'(npc) + int'($signed(b2)));
      t(8'h80, r1, 1, "SJMP");
      t(8'h02, {b1, b2}, 1, "LJMP");
      t(8'h12, {b1, b2}, 1, "LCALL");
      t(8'hE1, {npc[15:11], 3'b111, b1}, 1, "AJMP");
      t(8'h22, ret_pc, 1, "RET");
      t(8'h60, acc == 0 ? r1 : npc, acc == 0, "JZ");
      t(8'h70, acc != 0 ? r1 : npc, acc != 0, "JNZ");
      t(8'h40, cy ? r1 : npc, cy, "JC");
      t(8'h50, !cy ? r1 : npc, !cy, "JNC");
      t(8'h20, bit_val ? r2 : npc, bit_val, "JB");
      t(8'h30, !bit_val ? r2 : npc, !bit_val, "JNB");
      t(8'hB4, cmp_a != cmp_b ? r2 : npc, cmp_a != cmp_b, "CJNE");
      t(8'hBB, cmp_a != cmp_b ? r2 : npc, cmp_a != cmp_b, "CJNE Rn");
      t(8'hDA, dec_val != 0 ? r1 : npc, dec_val != 0, "DJNZ Rn");
      t(8'hD5, dec_val != 0 ? r2 : npc, dec_val != 0, "DJNZ dir");
      t(8'h73, dptr + 16'(acc), 1, "JMP @A+DPTR");
      t(8'h00, npc, 0, "NOP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
