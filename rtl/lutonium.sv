// lutonium: top level of the 8051-compatible microcontroller.
//
// The design is built around its instruction fetch loop: Fetch reads two
// bytes of program memory per access from the 64-bank interleaved IMem, the
// SwitchBox routes each byte to the decoder's opcode / byte-2 / byte-3
// channels or discards it, and the interrupt arbiter answers, before every
// instruction, whether an interrupt might be pending. Fetch only runs ahead
// while it knows instructions will execute: after each branch-type
// instruction it waits for the next PC from the core. The core (decode,
// sequencer, DRBY segmented bus, ALU, MultDiv, BitUnit, register file and
// special registers) executes, and talks to the peripherals through SFR
// accesses: interrupt registers with timers 0 and 1 (counting pulses of the
// T0/T1 pins P3.4/P3.5 or of the CLOCK pin), the INT0/INT1 pins (P3.2/P3.3)
// and ports P1 and P3 with direction registers. Peripheral pins enter through synchronizers.
//
// Deep sleep: MOV SLP,A enables interrupts and sends "sleep" to the
// interrupt arbiter, which stops answering, so fetch and execution stop
// with nothing switching but enabled counters; the next interrupt request
// wakes it at once.
//
// Interface: one clock, asynchronous active-low reset. Program memory is
// loaded through the boot write port (usable while in reset) or by the A5h
// instruction. Execution starts at address 0 after reset. The status
// outputs expose architectural state and one-clock event pulses for
// observation. This clocked, valid/ready realisation of an asynchronous
// (handshake-timed) design is this design's own choice.
module lutonium
  import lut_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // program loading
  input  logic        boot_we,
  input  logic [12:0] boot_addr,
  input  logic [7:0]  boot_data,
  // pins
  input  logic [7:0]  p1_in,
  output logic [7:0]  p1_out,
  output logic [7:0]  p1_oe,
  input  logic [7:0]  p3_in,
  output logic [7:0]  p3_out,
  output logic [7:0]  p3_oe,
  input  logic        clock_pin,
  // status
  output logic [15:0] pc,
  output logic [7:0]  acc,
  output logic [7:0]  b_reg,
  output logic [7:0]  psw,
  output logic [7:0]  sp,
  output logic [15:0] dptr,
  output logic        sleeping,
  output logic        retired,
  output logic [7:0]  retired_op,
  output logic        ev_irq_insert,
  output logic        ev_redirect,
  output logic        ev_bus,
  output logic [1:0]  ev_bus_stages_m1,
  output logic        ev_seq,
  output logic        ev_irq_taken,
  output logic        ev_two_bytes,
  output logic        ev_discard,
  output logic        ev_imem_write,
  output logic        ev_code_read     // a MOVC byte reached A through the SwitchBox
);
  // ---- fetch loop ----
  logic        mem_req, rsp_valid;
  logic [11:0] mem_pair, rsp_pair;
  logic [7:0]  rb0, rb1;
  logic [1:0]  head_valid;
  logic [15:0] head_addr [2];
  logic [7:0]  head_byte [2];
  logic [1:0]  lane_count [2];
  logic [2:0]  route [2];
  logic        irq_ins, flush, i1_free, i2_free, i3_free;
  logic [15:0] irq_pc;
  logic [2:0]  pc_hi;
  logic        ig_req, ig_valid, ig;
  logic        br_valid, br_ready, br_code;
  logic [15:0] br_pc;
  logic        waiting;
  logic        i1_valid, i1_ready, i2_valid, i2_ready, i3_valid, i3_ready;
  instr1_t     i1_data;
  logic [7:0]  i2_data, i3_data;
  logic        acc_valid, acc_ready, acc_free;
  logic [7:0]  acc_data;
  logic        core_imem_we;
  logic [12:0] core_imem_waddr;
  logic [7:0]  core_imem_wdata;

  imem u_imem (.clk, .rst_n, .req_valid(mem_req), .req_pair(mem_pair), .rsp_valid, .rsp_pair,
               .rsp_byte0(rb0), .rsp_byte1(rb1),
               .wr_en(boot_we || core_imem_we),
               .wr_addr(boot_we ? boot_addr : core_imem_waddr),
               .wr_data(boot_we ? boot_data : core_imem_wdata));

  switchbox u_sb (.clk, .rst_n, .mem_valid(rsp_valid), .mem_pair(rsp_pair), .mem_byte0(rb0),
                  .mem_byte1(rb1), .head_valid, .head_addr, .head_byte, .lane_count, .route,
                  .irq_ins, .irq_pc, .flush, .pc_hi, .i1_free, .i2_free, .i3_free,
                  .i1_valid, .i1_ready, .i1_data, .i2_valid, .i2_ready, .i2_data,
                  .i3_valid, .i3_ready, .i3_data, .acc_valid, .acc_ready, .acc_data,
                  .acc_free);

  fetch u_fetch (.clk, .rst_n, .mem_req, .mem_pair, .head_valid, .head_addr, .head_byte,
                 .lane_count, .route, .irq_ins, .irq_pc, .flush, .pc_hi, .i1_free, .i2_free,
                 .i3_free, .ig_req, .ig_valid, .ig, .br_valid, .br_pc, .br_code, .br_ready,
                 .acc_free, .waiting_branch(waiting), .pc);

  logic       irupt_valid, irupt_ready;
  irupt_msg_e irupt_msg;
  rupt_arb u_arb (.clk, .rst_n, .irupt_valid, .irupt_msg, .irupt_ready, .ig_req, .ig_valid, .ig,
                  .sleeping);

  // ---- core ----
  logic        sfr_we;
  logic [7:0]  sfr_waddr, sfr_wdata, sfr_raddr;
  logic [7:0]  rr_rdata, tm_rdata, tm1_rdata, pr_rdata;
  logic        rr_hit, tm_hit, tm1_hit, pr_hit;
  logic        irq_query, irq_take, reti;
  logic [15:0] irq_vector;
  logic [1:0]  irq_ret_adjust;

  lut_core u_core (.clk, .rst_n, .i1_valid, .i1_data, .i1_ready, .i2_valid, .i2_data, .i2_ready,
                   .i3_valid, .i3_data, .i3_ready, .br_valid, .br_pc, .br_code, .br_ready,
                   .acc_valid, .acc_data, .acc_ready, .imem_we(core_imem_we), .imem_waddr(core_imem_waddr),
                   .imem_wdata(core_imem_wdata), .sfr_we, .sfr_waddr, .sfr_wdata, .sfr_raddr,
                   .rupt_rdata(tm_hit ? tm_rdata : tm1_hit ? tm1_rdata : rr_rdata), .prdm_rdata(pr_rdata),
                   .irq_query, .irq_take, .irq_vector, .irq_ret_adjust, .reti,
                   .acc, .b_reg, .psw, .sp, .dptr, .retired, .retired_op,
                   .bus_done(ev_bus), .bus_stages_m1(ev_bus_stages_m1), .seq_step(ev_seq));

  // ---- peripherals ----
  logic t0_tv, t0_tr, ck_tv, ck_tr, i0_tv, i0_tr, tf0, tr0, clr_tf0;
  logic t1_tv, t1_tr, i1_tv, i1_tr, tf1, tr1, clr_tf1, ck_tr1;
  logic t0_lost, ck_lost, i0_lost, t1_lost, i1_lost;
  logic in_service, sleep_armed;

  pulse_sync u_ps_t0   (.clk, .rst_n, .pin(p3_in[4]), .tick_valid(t0_tv), .tick_ready(t0_tr), .lost(t0_lost));
  pulse_sync u_ps_clk  (.clk, .rst_n, .pin(clock_pin), .tick_valid(ck_tv), .tick_ready(ck_tr), .lost(ck_lost));
  pulse_sync u_ps_int0 (.clk, .rst_n, .pin(p3_in[2]), .tick_valid(i0_tv), .tick_ready(i0_tr), .lost(i0_lost));
  pulse_sync u_ps_t1   (.clk, .rst_n, .pin(p3_in[5]), .tick_valid(t1_tv), .tick_ready(t1_tr), .lost(t1_lost));
  pulse_sync u_ps_int1 (.clk, .rst_n, .pin(p3_in[3]), .tick_valid(i1_tv), .tick_ready(i1_tr), .lost(i1_lost));

  // both timers see every CLOCK tick; they always accept, so timer 0's
  // ready answers for both
  timer #(.IDX(0)) u_timer0 (.clk, .rst_n, .pin_tick_valid(t0_tv), .pin_tick_ready(t0_tr),
                 .clk_tick_valid(ck_tv), .clk_tick_ready(ck_tr), .sfr_we, .sfr_waddr, .sfr_wdata,
                 .sfr_raddr, .sfr_rdata(tm_rdata), .sfr_hit(tm_hit), .tf(tf0), .tr(tr0), .clr_tf(clr_tf0));
  timer #(.IDX(1)) u_timer1 (.clk, .rst_n, .pin_tick_valid(t1_tv), .pin_tick_ready(t1_tr),
                 .clk_tick_valid(ck_tv), .clk_tick_ready(ck_tr1), .sfr_we, .sfr_waddr, .sfr_wdata,
                 .sfr_raddr, .sfr_rdata(tm1_rdata), .sfr_hit(tm1_hit), .tf(tf1), .tr(tr1), .clr_tf(clr_tf1));

  rupt_regs u_rr (.clk, .rst_n, .sfr_we, .sfr_waddr, .sfr_wdata, .sfr_raddr, .sfr_rdata(rr_rdata),
                  .sfr_hit(rr_hit), .int0_tick_valid(i0_tv), .int0_tick_ready(i0_tr),
                  .int1_tick_valid(i1_tv), .int1_tick_ready(i1_tr), .tf0, .tr0, .clr_tf0, .tf1, .tr1,
                  .clr_tf1, .irupt_valid, .irupt_msg, .irupt_ready, .query(irq_query),
                  .take(irq_take), .vector(irq_vector), .ret_adjust(irq_ret_adjust), .reti,
                  .in_service, .sleep_armed);

  prdm u_prdm (.clk, .rst_n, .sfr_we, .sfr_waddr, .sfr_wdata, .sfr_raddr, .sfr_rdata(pr_rdata),
               .sfr_hit(pr_hit), .p1_in, .p1_out, .p1_oe, .p3_in, .p3_out, .p3_oe);

  // ---- event pulses ----
  assign ev_irq_insert = irq_ins;
  assign ev_redirect   = flush;
  assign ev_irq_taken  = irq_query && irq_take;
  assign ev_two_bytes  = head_valid == 2'b11 && route[0] >= RT_I1 && route[1] >= RT_I1;
  assign ev_discard    = (head_valid[0] && route[0] == RT_DISCARD) ||
                         (head_valid[1] && route[1] == RT_DISCARD);
  assign ev_imem_write = core_imem_we;
  assign ev_code_read  = acc_valid && acc_ready;
endmodule
