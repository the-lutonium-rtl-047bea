// tb_lutonium: end-to-end test of the whole microcontroller at its default
// sizes (8 kB program memory, 128-byte data RAM).
//
// An 8051 program is assembled here into program memory through the boot
// port. It moves data through every kind of path of the DRBY bus (1 to 4
// stages), uses a bit operation, PUSH/POP, LCALL/RET, MUL, the program-memory
// write instruction and reads the byte back with MOVC, a MOVC A,@A+PC
// table read, port P1 with its direction register, and finally runs
// the SLEEP sequence three times: the CPU sleeps until timer 0, counting
// pulses that the testbench applies to the T0 pin (P3.4), overflows; the
// interrupt handler counts in RAM 30h and reloads the timer. At the end the
// program enables INT1 and the testbench pulses the INT1 pin (P3.3); its
// handler counts in RAM 3Dh. Results in RAM
// and registers are compared with values worked out by hand from the 8051
// instruction semantics. Every mechanism (two bytes routed in one clock,
// discarded byte, redirect, interrupt insertion, interrupt taken, bus
// transfers of 1/2/3/4 stages, sequencer steps, program-memory write, deep
// sleep) is counted and must occur.
module tb_lutonium;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic        boot_we = 0;
  logic [12:0] boot_addr = 0;
  logic [7:0]  boot_data = 0;
  logic [7:0]  p1_in, p1_out, p1_oe, p3_in, p3_out, p3_oe;
  logic        clock_pin = 0;
  logic [15:0] pc, dptr;
  logic [7:0]  acc, b_reg, psw, sp, retired_op;
  logic        sleeping, retired, ev_irq_insert, ev_redirect, ev_bus, ev_seq, ev_irq_taken;
  logic        ev_two_bytes, ev_discard, ev_imem_write, ev_code_read;
  logic [1:0]  ev_bus_stages_m1;
  logic        t0_pin = 1, int1_pin = 1;

  lutonium dut (.*);

  // pins: driven bits follow the port, released bits are pulled up
  assign p1_in = (p1_oe & p1_out) | ~p1_oe;
  always_comb begin
    p3_in = (p3_oe & p3_out) | ~p3_oe;
    p3_in[4] = t0_pin;
    p3_in[3] = int1_pin;
  end

  // ---- tiny assembler ----
  logic [7:0] prog [8192];
  int here = 0;
  task automatic emit(input logic [7:0] b); prog[here] = b; here++; endtask
  task automatic org(input int a); here = a; endtask

  int l_main, l_sub, l_loop, l_end;
  initial begin
    for (int i = 0; i < 8192; i++) prog[i] = 8'h00;
    org(0);      emit(8'h02); emit(8'h00); emit(8'h40);              // LJMP main
    org('h0B);                                                        // timer 0 vector
    emit(8'h02); emit(8'h01); emit(8'h80);                            // LJMP 0180h
    org('h13);                                                        // INT1 vector
    emit(8'h05); emit(8'h3D);                                         // INC 3Dh
    emit(8'h32);                                                      // RETI
    org('h180);
    emit(8'h05); emit(8'h30);                                         // INC 30h
    emit(8'h75); emit(8'h8A); emit(8'hFD);                            // MOV TL0,#FDh
    emit(8'h75); emit(8'h8C); emit(8'hFF);                            // MOV TH0,#FFh
    emit(8'h32);                                                      // RETI
    org('h40); l_main = here;
    emit(8'h75); emit(8'h81); emit(8'h60);                            // MOV SP,#60h
    emit(8'h74); emit(8'h05);                                         // MOV A,#5
    emit(8'h78); emit(8'h10);                                         // MOV R0,#10h
    emit(8'h28);                                                      // ADD A,R0   (RegFile->ALU)
    emit(8'hF5); emit(8'h31);                                         // MOV 31h,A
    emit(8'hE8);                                                      // MOV A,R0   (RegFile->Exchange)
    emit(8'h85); emit(8'hE0); emit(8'h32);                            // MOV 32h,ACC (A->Exchange)
    emit(8'h85); emit(8'h81); emit(8'h33);                            // MOV 33h,SP (SP->Exchange)
    emit(8'h25); emit(8'h81);                                         // ADD A,SP   (SP->ALU)
    emit(8'hF5); emit(8'h3A);                                         // MOV 3Ah,A
    emit(8'hD2); emit(8'h00);                                         // SETB 00h   (BitUnit)
    emit(8'hC0); emit(8'h31);                                         // PUSH 31h   (DMem)
    emit(8'hD0); emit(8'h34);                                         // POP 34h
    emit(8'h75); emit(8'h91); emit(8'hFF);                            // MOV P1DIR,#FFh
    emit(8'h75); emit(8'h90); emit(8'h5A);                            // MOV P1,#5Ah
    emit(8'h12); emit(8'h01); emit(8'h01);                            // LCALL 0101h
    emit(8'hF5); emit(8'h35);                                         // MOV 35h,A
    emit(8'h75); emit(8'hF0); emit(8'h07);                            // MOV B,#7
    emit(8'hA4);                                                      // MUL AB
    emit(8'hF5); emit(8'h36);                                         // MOV 36h,A
    emit(8'h85); emit(8'hF0); emit(8'h3B);                            // MOV 3Bh,B
    emit(8'h74); emit(8'hAB);                                         // MOV A,#ABh
    emit(8'h90); emit(8'h02); emit(8'h00);                            // MOV DPTR,#0200h
    emit(8'hA5);                                                      // A -> IMem[DPTR]
    emit(8'hE4);                                                      // CLR A
    emit(8'h93);                                                      // MOVC A,@A+DPTR
    emit(8'hF5); emit(8'h39);                                         // MOV 39h,A
    emit(8'h74); emit(8'h02);                                         // MOV A,#2
    emit(8'h83);                                                      // MOVC A,@A+PC
    emit(8'h80); emit(8'h01);                                         // SJMP over the table
    emit(8'h5C);                                                      // table byte
    emit(8'hF5); emit(8'h3C);                                         // MOV 3Ch,A
    emit(8'hE5); emit(8'h90);                                         // MOV A,P1   (PRDM->Exchange)
    emit(8'hF5); emit(8'h37);                                         // MOV 37h,A
    emit(8'h75); emit(8'h89); emit(8'h05);                            // MOV TMOD,#05h (count T0 pin)
    emit(8'h75); emit(8'h8A); emit(8'hFD);                            // MOV TL0,#FDh
    emit(8'h75); emit(8'h8C); emit(8'hFF);                            // MOV TH0,#FFh
    emit(8'h75); emit(8'h88); emit(8'h10);                            // MOV TCON,#10h (TR0)
    emit(8'h75); emit(8'hA8); emit(8'h02);                            // MOV IE,#02h (ET0)
    emit(8'h78); emit(8'h03);                                         // MOV R0,#3
    emit(8'h00);                                                      // NOP (loop starts odd)
    l_loop = here;
    emit(8'hF5); emit(8'hCF);                                         // MOV SLP,A  \
    emit(8'h80); emit(8'hFE);                                         // SJMP $      > SLEEP
    emit(8'hC2); emit(8'hAF);                                         // CLR EA     /
    emit(8'hD8); emit(8'(l_loop - (here + 2)));                       // DJNZ R0,loop
    emit(8'h05); emit(8'h38);                                         // INC 38h
    emit(8'h75); emit(8'hA8); emit(8'h84);                            // MOV IE,#84h (EA, EX1)
    l_end = here;
    emit(8'h80); emit(8'hFE);                                         // SJMP $
    org('h101); l_sub = here;
    emit(8'h74); emit(8'h42);                                         // MOV A,#42h
    emit(8'h22);                                                      // RET
  end

  // ---- event counters ----
  int n_two = 0, n_disc = 0, n_redir = 0, n_ins = 0, n_taken = 0, n_seq = 0, n_imw = 0, n_cr = 0;
  int n_stage [4] = '{0, 0, 0, 0};
  int n_sleep = 0, n_ret_asleep = 0, n_retired = 0;
  logic sleeping_q = 0;
  always @(posedge clk) if (rst_n) begin
    n_two   += int'(ev_two_bytes);
    n_disc  += int'(ev_discard);
    n_redir += int'(ev_redirect);
    n_ins   += int'(ev_irq_insert);
    n_taken += int'(ev_irq_taken);
    n_seq   += int'(ev_seq);
    n_imw   += int'(ev_imem_write);
    n_cr    += int'(ev_code_read);
    n_retired += int'(retired);
    if (ev_bus) n_stage[ev_bus_stages_m1]++;
    sleeping_q <= sleeping;
    if (sleeping && !sleeping_q) n_sleep++;
    if (sleeping && sleeping_q && retired) n_ret_asleep++;
  end

  // T0 pin pulses: one every 60 clocks once the program runs
  initial begin
    wait (rst_n);
    forever begin
      repeat (30) @(posedge clk); t0_pin = 0;
      repeat (30) @(posedge clk); t0_pin = 1;
    end
  end

  function automatic logic [7:0] ram(input int a);
    return dut.u_core.u_regfile.mem[a];
  endfunction

  initial begin
    int cyc;
    @(negedge clk);
    for (int i = 0; i < 8192; i++) begin
      boot_we = 1; boot_addr = 13'(i); boot_data = prog[i];
      @(negedge clk);
    end
    boot_we = 0;
    @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!(pc == 16'(l_end) && ram('h38) == 8'h01) && cyc < 20000) begin
      @(negedge clk); cyc++;
    end
    repeat (20) @(negedge clk);
    check(ram('h61) == 8'(l_loop + 4) && ram('h62) == 8'((l_loop + 4) >> 8),
          "saved PC skips the SLEEP loop");
    check(ram('h3D) == 8'h00 && dut.u_rr.ie == 8'h84, "INT1 enabled, not yet requested");
    int1_pin = 0; repeat (10) @(negedge clk); int1_pin = 1;
    repeat (100) @(negedge clk);
    $display("program done after %0d clocks, %0d instructions retired", cyc, n_retired);
    check(ram('h31) == 8'h15, "ADD A,R0 -> 31h");
    check(ram('h32) == 8'h10, "MOV 32h,ACC");
    check(ram('h33) == 8'h60, "MOV 33h,SP");
    check(ram('h3A) == 8'h70, "ADD A,SP");
    check(ram('h20) == 8'h01, "SETB 00h");
    check(ram('h34) == 8'h15, "POP 34h");
    check(ram('h35) == 8'h42, "LCALL/RET");
    check(ram('h36) == 8'hCE, "MUL low byte");
    check(ram('h3B) == 8'h01, "MUL high byte");
    check(ram('h37) == 8'h5A, "port read back");
    check(p1_out == 8'h5A && p1_oe == 8'hFF, "port pins driven");
    check(dut.u_imem.g_bank[0].u_bank.mem[4][7:0] == 8'hAB, "program-memory write");
    check(ram('h30) == 8'h03, "three timer interrupts");
    check(ram('h38) == 8'h01, "loop exited");
    check(sp == 8'h60, "stack balanced");
    check(ram(0) == 8'h00, "R0 counted down");
    check(ram('h3D) == 8'h01, "INT1 pin pulse runs the INT1 handler once");
    // mechanisms
    check(n_two > 0, "two bytes routed in one clock");
    check(n_disc > 0, "byte discarded");
    check(n_redir > 0, "redirect");
    check(n_ins >= 3, "interrupt pseudo-instructions");
    check(n_taken == 4, "interrupts taken");
    check(n_seq > 0, "sequencer steps");
    check(n_imw == 1, "program-memory write");
    check(n_cr == 2, "code reads through the SwitchBox");
    check(ram('h39) == 8'hAB, "MOVC A,@A+DPTR reads the byte written by A5h");
    check(ram('h3C) == 8'h5C, "MOVC A,@A+PC table read");
    for (int s = 0; s < 4; s++) check(n_stage[s] > 0, $sformatf("bus transfer of %0d stages", s + 1));
    check(n_sleep == 3, "deep sleep entered three times");
    check(n_ret_asleep == 0, "nothing retires while asleep");
    $display("events: two=%0d disc=%0d redir=%0d ins=%0d taken=%0d seq=%0d stages=%0d/%0d/%0d/%0d sleep=%0d",
             n_two, n_disc, n_redir, n_ins, n_taken, n_seq, n_stage[0], n_stage[1], n_stage[2],
             n_stage[3], n_sleep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, pc=%h", pc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
