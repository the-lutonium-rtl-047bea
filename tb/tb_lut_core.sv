// tb_lut_core: the decode/execute core on its own. The testbench plays the
// part of Fetch and the SwitchBox: it holds a small program, offers opcode,
// second and third bytes on the three instruction channels (with random
// gaps), stops after each branch-type instruction until the core sends
// the next PC, and inserts one interrupt pseudo-instruction. The program
// covers immediate, register, indirect and direct moves, ADD/SUBB flags,
// MUL, DA, XCHD, MOVC (the feeder answers the code-read address on the
// accumulator channel), a DJNZ loop, LCALL/RET, an interrupt with RETI, an
// SFR write and the A5h program-memory write. Results are checked in the register file and
// on the core's outputs.
module tb_lut_core;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic i1_valid = 0, i1_ready, i2_valid = 0, i2_ready, i3_valid = 0, i3_ready;
  instr1_t i1_data;
  logic [7:0] i2_data, i3_data;
  logic br_valid, br_ready = 1, br_code;
  logic acc_valid = 0, acc_ready;
  logic [7:0] acc_data = 0;
  logic [15:0] br_pc;
  logic imem_we, sfr_we, irq_query, reti, retired, bus_done, seq_step;
  logic [12:0] imem_waddr;
  logic [7:0] imem_wdata, sfr_waddr, sfr_wdata, sfr_raddr, acc, b_reg, psw, sp, retired_op;
  logic [15:0] dptr;
  logic [1:0] bus_stages_m1;
  logic [7:0] rupt_rdata = 8'h00, prdm_rdata = 8'h00;
  logic irq_take = 1;
  logic [15:0] irq_vector = 16'h0050;
  logic [1:0] irq_ret_adjust = 2'd0;
  lut_core dut (.*);

  // ---- program ----
  logic [7:0] prog [256];
  logic       is_br [256];
  int here = 0;
  task automatic e(input int n, input logic [7:0] b0, input logic [7:0] b1 = 0,
                   input logic [7:0] b2 = 0, input logic br = 0);
    is_br[here] = br;
    prog[here] = b0; if (n > 1) prog[here + 1] = b1; if (n > 2) prog[here + 2] = b2;
    here += n;
  endtask
  int l_loop, l_irq, l_halt;

  // ---- feeder ----
  instr1_t q1 [$];
  logic [7:0] q2 [$], q3 [$];
  int pc = 0, waiting = 0, code_pend = 0, code_addr = 0, n_code = 0, fed_irq = 0, n_reti = 0, n_sfr = 0, n_imw = 0, n_br = 0;

  always @(posedge clk) if (rst_n) begin
    if (i1_valid && i1_ready) void'(q1.pop_front());
    if (i2_valid && i2_ready) void'(q2.pop_front());
    if (i3_valid && i3_ready) void'(q3.pop_front());
    if (br_valid && br_ready) begin
      n_br++;
      checks++;
      if (!waiting) begin failures++; $display("FAIL next PC %h without a branch", br_pc); end
      if (br_code) begin code_pend = 1; code_addr = int'(br_pc); end
      else begin waiting = 0; pc = int'(br_pc); end
    end
    if (acc_valid && acc_ready) begin
      n_code++; code_pend = 0; waiting = 0;
    end
    if (reti) n_reti++;
    if (sfr_we && sfr_waddr == SFR_P1) begin
      n_sfr++; checks++;
      if (sfr_wdata != 8'h55) begin failures++; $display("FAIL P1 write %h", sfr_wdata); end
    end
    if (imem_we) begin
      n_imw++; checks++;
      if (imem_waddr != 13'h1234 || imem_wdata != 8'h77) begin
        failures++; $display("FAIL imem write %h %h", imem_waddr, imem_wdata);
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (q1.size() == 0 && !waiting && pc != l_halt && $urandom_range(0, 3) != 0) begin
      int n;
      if (pc == l_irq && !fed_irq) begin
        fed_irq = 1; waiting = 1;
        q1.push_back('{irq: 1'b1, pc: 16'(pc), op: 8'h00});
      end else begin
        n = int'(op_len(prog[pc]));
        q1.push_back('{irq: 1'b0, pc: 16'(pc), op: prog[pc]});
        if (n > 1) q2.push_back(prog[pc + 1]);
        if (n > 2) q3.push_back(prog[pc + 2]);
        if (is_br[pc]) waiting = 1;
        pc += n;
      end
    end
    acc_valid = code_pend != 0; acc_data = prog[code_addr % 256];
    i1_valid = q1.size() > 0; if (i1_valid) i1_data = q1[0];
    i2_valid = q2.size() > 0 && $urandom_range(0, 4) != 0; if (q2.size() > 0) i2_data = q2[0];
    i3_valid = q3.size() > 0 && $urandom_range(0, 4) != 0; if (q3.size() > 0) i3_data = q3[0];
    br_ready = $urandom_range(0, 3) != 0;
  end

  task automatic ram(input int a, input int want);
    checks++;
    if (int'(dut.u_regfile.mem[a]) != want) begin
      failures++; $display("FAIL RAM[%h] = %h, want %h", a, dut.u_regfile.mem[a], want);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin prog[i] = 0; is_br[i] = 0; end
    e(2, 8'h74, 8'h25);                 // MOV A,#25h
    e(2, 8'h24, 8'h17);                 // ADD A,#17h      -> 3Ch
    e(2, 8'h78, 8'h30);                 // MOV R0,#30h
    e(1, 8'hF6);                        // MOV @R0,A       -> [30]=3C
    e(3, 8'h75, 8'hF0, 8'h05);          // MOV B,#5
    e(1, 8'hA4);                        // MUL AB          -> A=2C B=01
    e(2, 8'hF5, 8'h31);                 // MOV 31h,A
    e(3, 8'h90, 8'h12, 8'h34);          // MOV DPTR,#1234h
    e(1, 8'hD3);                        // SETB C
    e(2, 8'h94, 8'h0C);                 // SUBB A,#0Ch     -> 1F, C=0
    e(2, 8'hF5, 8'h35);                 // MOV 35h,A
    e(2, 8'h74, 8'h38);                 // MOV A,#38h
    e(2, 8'h24, 8'h29);                 // ADD A,#29h      -> 61h, AC=1
    e(1, 8'hD4);                        // DA A            -> 67h (BCD 38+29)
    e(1, 8'hD6);                        // XCHD A,@R0      -> A=6Ch, [30]=37h
    e(2, 8'hF5, 8'h36);                 // MOV 36h,A
    e(2, 8'h74, 8'h02);                 // MOV A,#2
    e(1, 8'h83, 0, 0, 1);               // MOVC A,@A+PC    -> E7h (byte answered by the feeder)
    e(2, 8'h80, 8'h01, 0, 1);           // SJMP over the table
    e(1, 8'hE7);                        // table
    e(2, 8'hF5, 8'h37);                 // MOV 37h,A
    e(2, 8'h7A, 8'h03);                 // MOV R2,#3
    l_loop = here;
    e(2, 8'h05, 8'h32);                 // INC 32h
    e(2, 8'hDA, 8'(l_loop - (here + 2)), 0, 1);  // DJNZ R2,l_loop
    l_irq = here;                       // interrupt inserted here
    e(3, 8'h12, 8'h00, 8'h40, 1);       // LCALL 0040h
    e(2, 8'hF5, 8'h33);                 // MOV 33h,A
    e(3, 8'h75, 8'h90, 8'h55);          // MOV P1,#55h
    e(1, 8'hA5);                        // A -> IMem[DPTR]
    l_halt = here;
    here = 8'h40;
    e(2, 8'h74, 8'h77);                 // MOV A,#77h
    e(1, 8'h22, 0, 0, 1);               // RET
    here = 8'h50;
    e(2, 8'h05, 8'h34);                 // INC 34h
    e(1, 8'h32, 0, 0, 1);               // RETI
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (pc == l_halt && q1.size() == 0 && !waiting);
    repeat (30) @(negedge clk);
    ram(8'h30, 8'h37); ram(8'h36, 8'h6C); ram(8'h37, 8'hE7); ram(8'h31, 8'h2C); ram(8'h35, 8'h1F); ram(8'h32, 3);
    ram(8'h33, 8'h77); ram(8'h34, 1);
    // the LCALL return address is the last thing pushed at 08h/09h (the
    // interrupt used the same slots before its RETI)
    ram(8'h08, l_irq + 3); ram(8'h09, 0);
    checks++;
    if (acc != 8'h77 || b_reg != 8'h01 || dptr != 16'h1234 || sp != 8'h07 || psw[7]) begin
      failures++; $display("FAIL regs A=%h B=%h DPTR=%h SP=%h PSW=%h", acc, b_reg, dptr, sp, psw);
    end
    checks++;
    if (n_reti != 1 || n_sfr != 1 || n_imw != 1 || n_br != 9 || n_code != 1) begin
      failures++; $display("FAIL counts reti %0d sfr %0d imw %0d br %0d", n_reti, n_sfr, n_imw, n_br);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
