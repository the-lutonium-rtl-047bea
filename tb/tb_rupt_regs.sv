// tb_rupt_regs: directed sequences for the interrupt registers: enable
// masks, timer 0/1 and INT0/INT1 requests, their polling order and the two
// priority levels, the IRUPT message for each new request,
// the interrupt decision (vector, flag clear, in-service), RETI, and the
// MOV SLP,A sleep request (sleep message first, EA set, +2 return adjust).
module tb_rupt_regs;
  import lut_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sfr_we = 0, sfr_hit;
  logic [7:0] sfr_waddr = 0, sfr_wdata = 0, sfr_raddr = 0, sfr_rdata;
  logic int0_tick_valid = 0, int0_tick_ready, tf0 = 0, tr0 = 0, clr_tf0;
  logic int1_tick_valid = 0, int1_tick_ready, tf1 = 0, tr1 = 0, clr_tf1;
  logic irupt_valid, irupt_ready = 0, query = 0, take, reti = 0, in_service, sleep_armed;
  irupt_msg_e irupt_msg;
  logic [15:0] vector;
  logic [1:0] ret_adjust;
  rupt_regs dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    sfr_we = 1; sfr_waddr = a; sfr_wdata = d;
    @(negedge clk); sfr_we = 0;
  endtask
  task automatic accept_msg(input irupt_msg_e want, input string what);
    chk(irupt_valid && irupt_msg == want, what);
    irupt_ready = 1; @(negedge clk); irupt_ready = 0;
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    chk(!irupt_valid && !take, "idle after reset");
    // timer flag while disabled: no message
    tf0 = 1; repeat (3) @(negedge clk);
    chk(!irupt_valid, "no message with EA=0");
    wr(SFR_IE, 8'h82);                   // EA + ET0
    @(negedge clk);
    accept_msg(IRUPT_OTHER, "timer request message");
    chk(!irupt_valid, "message consumed");
    query = 1; #1;
    chk(take && vector == 16'h000B && clr_tf0 && ret_adjust == 0, "timer decision");
    @(negedge clk); query = 0; tf0 = 0;
    chk(in_service, "in service");
    tf0 = 1; repeat (3) @(negedge clk);
    chk(!irupt_valid, "no nesting while in service");
    tf0 = 0; reti = 1; @(negedge clk); reti = 0;
    chk(!in_service, "RETI clears in service");
    // INT0 tick with EX0 wins over the timer
    wr(SFR_IE, 8'h83);
    int0_tick_valid = 1; tf0 = 1; @(negedge clk); int0_tick_valid = 0;
    @(negedge clk);
    accept_msg(IRUPT_OTHER, "INT0 message");
    query = 1; #1;
    chk(take && vector == 16'h0003 && !clr_tf0, "INT0 decision");
    @(negedge clk); query = 0;
    sfr_raddr = SFR_TCON; #1;
    chk(sfr_hit && sfr_rdata[1] == 1'b0, "IE0 cleared by the decision");
    reti = 1; @(negedge clk); reti = 0; tf0 = 0;
    // the INT0 handler return lets the still-pending timer flag request again
    // (it went low above, so nothing is pending now)
    while (irupt_valid) begin irupt_ready = 1; @(negedge clk); irupt_ready = 0; end
    // sleep: EA cleared by software, MOV SLP,A
    wr(SFR_IE, 8'h02);
    wr(SFR_SLP, 8'h00);
    sfr_raddr = SFR_IE; #1;
    chk(sfr_rdata == 8'h82 && sleep_armed && ret_adjust == 2, "SLP write sets EA, arms +2");
    tf0 = 1; @(negedge clk);
    accept_msg(IRUPT_SLEEP, "sleep message first");
    accept_msg(IRUPT_OTHER, "then the wake-up request");
    query = 1; #1;
    chk(take && vector == 16'h000B && ret_adjust == 2, "wake-up decision with +2");
    @(negedge clk); query = 0; tf0 = 0;
    chk(!sleep_armed, "adjust used once");
    // INT1 and timer 1: polled after INT0 and timer 0
    while (in_service) begin reti = 1; @(negedge clk); reti = 0; end
    wr(SFR_IE, 8'h8F);
    int1_tick_valid = 1; tf1 = 1; @(negedge clk); int1_tick_valid = 0;
    accept_msg(IRUPT_OTHER, "INT1/T1 message");
    query = 1; #1;
    chk(take && vector == 16'h0013 && !clr_tf1 && !clr_tf0, "INT1 before timer 1");
    @(negedge clk); query = 0;
    sfr_raddr = SFR_TCON; #1;
    chk(sfr_rdata[3] == 1'b0, "IE1 cleared by the decision");
    reti = 1; @(negedge clk); reti = 0;
    while (irupt_valid) begin irupt_ready = 1; @(negedge clk); irupt_ready = 0; end
    query = 1; #1;
    chk(take && vector == 16'h001B && clr_tf1, "timer 1 decision");
    @(negedge clk); query = 0; tf1 = 0;
    reti = 1; @(negedge clk); reti = 0;
    wr(SFR_TCON, 8'h0C);
    sfr_raddr = SFR_TCON; #1;
    chk(sfr_rdata == 8'h0C, "TCON IE1/IT1 written");
    wr(SFR_TCON, 8'h00);
    // priorities: timer 1 high (PT1), the rest low
    wr(SFR_IP, 8'h08);
    int0_tick_valid = 1; @(negedge clk); int0_tick_valid = 0;
    accept_msg(IRUPT_OTHER, "low-priority INT0 message");
    query = 1; #1;
    chk(take && vector == 16'h0003, "INT0 taken at low level");
    @(negedge clk); query = 0;
    tf1 = 1; @(negedge clk);
    accept_msg(IRUPT_OTHER, "high-priority request inside a low handler");
    query = 1; #1;
    chk(take && vector == 16'h001B && clr_tf1, "timer 1 preempts");
    @(negedge clk); query = 0; tf1 = 0;
    tf0 = 1; repeat (2) @(negedge clk);
    chk(!irupt_valid, "low request waits while both levels are busy");
    reti = 1; @(negedge clk); reti = 0;
    repeat (2) @(negedge clk);
    chk(!irupt_valid && in_service, "still in the low handler after the first RETI");
    reti = 1; @(negedge clk); reti = 0;
    @(negedge clk);
    accept_msg(IRUPT_OTHER, "pending timer 0 after the low handler returns");
    query = 1; #1;
    chk(take && vector == 16'h000B && clr_tf0, "timer 0 taken then");
    @(negedge clk); query = 0; tf0 = 0;
    reti = 1; @(negedge clk); reti = 0;
    chk(!in_service, "all levels done");
    wr(SFR_IP, 8'h00);
    // register read-back
    wr(SFR_IP, 8'h05);
    sfr_raddr = SFR_IP; #1;
    chk(sfr_hit && sfr_rdata == 8'h05, "IP read-back");
    sfr_raddr = SFR_ACC; #1;
    chk(!sfr_hit, "no hit on other SFR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
