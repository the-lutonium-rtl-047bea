// rupt_regs: RuptRegs, the interrupt-control registers.
//
// Holds IE (EA, ET1, EX1, ET0, EX0), the external-interrupt flags IE0/IE1
// (set by a pulse on the INT0/INT1 pin) and IP, and sees the timers'
// overflow flags TF0/TF1. It does
// two separate jobs:
//  * It sends messages on the IRUPT channel to the interrupt arbiter: an
//    "other" message when an enabled request appears, again whenever
//    interrupts get enabled while a request is pending (so an old request is
//    not lost), and after RETI if a request is still waiting; and a "sleep"
//    message when software writes SLP. Messages may be stale: they only make
//    the fetch loop ask.
//  * When an interrupt pseudo-instruction reaches the core, it decides
//    (query) whether an interrupt is really taken, with the proper sequential
//    semantics: EA and the enables as they are now, and the two 8051
//    priority levels set by IP (PX0, PT0, PX1, PT1 = bits 0..3): a
//    high-priority request may interrupt a low-priority handler, nothing
//    interrupts a high-priority one. Within a level sources are polled in
//    the standard 8051 order: INT0 (vector 0003h), timer 0 (000Bh), INT1
//    (0013h), timer 1 (001Bh). Taking one clears its flag and marks its
//    level in service; RETI ends the higher level in service.
// Writing SLP (the sleep instruction MOV SLP,A) atomically sets EA, arms the
// return-address adjust (+2: the saved PC skips the two-byte SJMP loop of
// the SLEEP sequence) and queues the sleep message. This protocol is the
// original's; the priority scheme is the standard 8051 one. The serial
// port is not built, and IE0/IE1 are always edge-triggered (IT0/IT1 stored only).
module rupt_regs
  import lut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // SFR port
  input  logic       sfr_we,
  input  logic [7:0] sfr_waddr,
  input  logic [7:0] sfr_wdata,
  input  logic [7:0] sfr_raddr,
  output logic [7:0] sfr_rdata,
  output logic       sfr_hit,
  // interrupt sources
  input  logic       int0_tick_valid,
  output logic       int0_tick_ready,
  input  logic       int1_tick_valid,
  output logic       int1_tick_ready,
  input  logic       tf0,
  input  logic       tr0,
  output logic       clr_tf0,
  input  logic       tf1,
  input  logic       tr1,
  output logic       clr_tf1,
  // IRUPT channel to the interrupt arbiter
  output logic       irupt_valid,
  output irupt_msg_e irupt_msg,
  input  logic       irupt_ready,
  // decision for an interrupt pseudo-instruction
  input  logic       query,
  output logic       take,
  output logic [15:0] vector,
  output logic [1:0] ret_adjust,
  input  logic       reti,
  output logic       in_service,
  output logic       sleep_armed
);
  logic [7:0] ie, ip;
  logic       ie0, it0, ie1, it1;
  logic       req, req_q, other_pend, sleep_pend;
  logic [3:0] pend;                   // INT0, T0, INT1, T1 (polling order)
  logic [3:0] sel;                    // sources of the level that would be taken
  logic       hi_serv, lo_serv, hi_req, lo_req;
  logic       take_int0, take_t0, take_int1, take_t1;

  assign int0_tick_ready = 1'b1;
  assign int1_tick_ready = 1'b1;
  assign pend = {tf1 && ie[3], ie1 && ie[2], tf0 && ie[1], ie0 && ie[0]};
  assign hi_req = ie[7] && !hi_serv && (pend & ip[3:0]) != 4'b0;
  assign lo_req = ie[7] && !hi_serv && !lo_serv && pend != 4'b0;
  assign req    = hi_req || lo_req;
  assign sel    = hi_req ? pend & ip[3:0] : pend;
  assign in_service = hi_serv || lo_serv;

  always_comb begin
    take_int0 = req && sel[0];
    take_t0   = req && sel[1] && !sel[0];
    take_int1 = req && sel[2] && sel[1:0] == 2'b0;
    take_t1   = req && sel[3] && sel[2:0] == 3'b0;
    take      = req;
    vector    = take_int0 ? 16'h0003 : take_t0 ? 16'h000B : take_int1 ? 16'h0013 : 16'h001B;
    ret_adjust = sleep_armed ? 2'd2 : 2'd0;
    clr_tf0   = query && take_t0;
    clr_tf1   = query && take_t1;
  end

  assign irupt_valid = sleep_pend || other_pend;
  assign irupt_msg   = sleep_pend ? IRUPT_SLEEP : IRUPT_OTHER;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ie <= '0; ip <= '0; ie0 <= 1'b0; it0 <= 1'b0; ie1 <= 1'b0; it1 <= 1'b0; req_q <= 1'b0;
      other_pend <= 1'b0; sleep_pend <= 1'b0; hi_serv <= 1'b0; lo_serv <= 1'b0; sleep_armed <= 1'b0;
    end else begin
      req_q <= req;
      if (int0_tick_valid) ie0 <= 1'b1;
      if (int1_tick_valid) ie1 <= 1'b1;
      if (irupt_valid && irupt_ready) begin
        if (sleep_pend) sleep_pend <= 1'b0;
        else            other_pend <= 1'b0;
      end
      // new request, or interrupts (re-)enabled with one pending
      if (req && !req_q) other_pend <= 1'b1;
      if (query && take) begin
        if (hi_req) hi_serv <= 1'b1;
        else        lo_serv <= 1'b1;
        sleep_armed <= 1'b0;
        if (take_int0) ie0 <= 1'b0;
        if (take_int1) ie1 <= 1'b0;
      end
      if (reti) begin
        if (hi_serv) hi_serv <= 1'b0;
        else         lo_serv <= 1'b0;
      end
      if (sfr_we) begin
        case (sfr_waddr)
          SFR_IE:   ie <= sfr_wdata;
          SFR_IP:   ip <= sfr_wdata;
          SFR_TCON: begin
            ie1 <= sfr_wdata[3]; it1 <= sfr_wdata[2]; ie0 <= sfr_wdata[1]; it0 <= sfr_wdata[0];
          end
          SFR_SLP:  begin ie[7] <= 1'b1; sleep_armed <= 1'b1; sleep_pend <= 1'b1; end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    sfr_hit = 1'b1;
    case (sfr_raddr)
      SFR_IE:   sfr_rdata = ie;
      SFR_IP:   sfr_rdata = ip;
      SFR_TCON: sfr_rdata = {tf1, tr1, tf0, tr0, ie1, it1, ie0, it0};
      SFR_SLP:  sfr_rdata = {7'd0, sleep_armed};
      default:  begin sfr_rdata = '0; sfr_hit = 1'b0; end
    endcase
  end
endmodule
